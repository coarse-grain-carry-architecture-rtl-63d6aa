// tb_acs_unit: self-checking test of the add-compare-select unit. Random
// 8-bit state and branch metrics (including ties and extremes) are applied
// each cycle; one cycle later the decision must name the path with the
// smaller metric sum (path 1 on a tie) and the metric must be that sum.
// Both decisions must occur. Every seventh cycle en is low and the outputs
// must hold their previous values.
module tb_acs_unit;
  logic clk = 0, en = 1;
  logic [7:0] lam0, gam0, lam1, gam1;
  logic dec;
  logic [8:0] metric;
  int checks = 0, failures = 0, n0 = 0, n1 = 0;

  acs_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m0, m1;
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      lam0 = 8'($urandom); gam0 = 8'($urandom); lam1 = 8'($urandom); gam1 = 8'($urandom);
      if (n % 10 == 0) begin lam1 = gam0; gam1 = lam0; end   // tie
      if (n == 1) begin lam0 = '1; gam0 = '1; lam1 = '1; gam1 = 8'hfe; end
      m0 = int'(lam0) + int'(gam0);
      m1 = int'(lam1) + int'(gam1);
      @(negedge clk);
      checks++;
      if (dec != (m1 <= m0) || int'(metric) != ((m1 <= m0) ? m1 : m0)) begin
        failures++;
        if (failures < 10) $display("FAIL m0=%0d m1=%0d dec=%b metric=%0d", m0, m1, dec, metric);
      end
      if (dec) n1++; else n0++;
      if (n % 7 == 3) begin
        logic       hd;
        logic [8:0] hm;
        hd = dec; hm = metric;
        en = 0;
        lam0 = 8'($urandom); gam0 = 8'($urandom); lam1 = 8'($urandom); gam1 = 8'($urandom);
        @(negedge clk);
        checks++;
        if (dec != hd || metric != hm) begin failures++; $display("FAIL hold with en low"); end
        en = 1;
      end
    end
    if (n0 == 0 || n1 == 0) begin failures++; $display("FAIL a decision never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
