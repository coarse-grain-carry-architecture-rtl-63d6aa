// tb_cgc_clb: random self-checking test of one coarse-grain carry CLB (two
// bits). The reference adds the conditioned operands of both bits with their
// weights plus the three incoming carries and compares with the two sum bits
// and the three outgoing carries (each of weight 4).
module tb_cgc_clb;
  import cgc_pkg::*;

  logic [3:0] a_f, a_g, x;
  cgc_cfg_t   cfg;
  logic       c1_in, c2_in, cin, c1_out, c2_out, cout;
  logic [1:0] sum;
  int checks = 0, failures = 0;

  cgc_clb dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, got;
    for (int n = 0; n < 20000; n++) begin
      a_f = 4'($urandom); a_g = 4'($urandom); x = 4'($urandom);
      cfg = cgc_cfg_t'($urandom);
      {c1_in, c2_in, cin} = 3'($urandom);
      #1;
      total = int'(c1_in) + int'(c2_in) + int'(cin);
      for (int i = 0; i < 4; i++) begin
        total += int'((a_f[i] & (x[i] | ~cfg.cond[i])) ^ cfg.neg[i]);
        total += 2 * int'((a_g[i] & (x[i] | ~cfg.cond[i])) ^ cfg.neg[i]);
      end
      got = int'(sum) + 4 * (int'(c1_out) + int'(c2_out) + int'(cout));
      checks++;
      if (total != got) begin
        failures++;
        if (failures < 10) $display("FAIL total=%0d got=%0d", total, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
