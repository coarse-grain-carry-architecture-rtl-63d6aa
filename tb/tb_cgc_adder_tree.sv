// tb_cgc_adder_tree: self-checking test of the pipelined 4-input adder tree.
// A 16-input tree of 16-bit numbers (default, 2 levels) and a 5-input tree
// (2 levels, partly filled nodes) are fed a new random set every cycle with
// random gaps in in_valid. Expected sums are queued in the testbench and
// compared when out_valid rises; the latency from in_valid to out_valid is
// checked to be the number of tree levels, 2 cycles.
module tb_cgc_adder_tree;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [15:0][15:0] in16;
  logic [4:0][7:0]   in5;
  logic [19:0] out16;
  logic [11:0] out5;
  logic ov16, ov5;
  int checks = 0, failures = 0, cycle = 0;
  logic [19:0] q16[$];
  logic [11:0] q5[$];
  int qt[$];

  cgc_adder_tree dut16 (.clk, .rst_n, .in_valid, .in(in16), .out_valid(ov16), .out(out16));
  cgc_adder_tree #(.M(5), .W(8)) dut5 (.clk, .rst_n, .in_valid, .in(in5), .out_valid(ov5), .out(out5));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && in_valid) begin
      logic [19:0] s16;
      logic [11:0] s5;
      s16 = 0;
      s5 = 0;
      for (int i = 0; i < 16; i++) s16 += 20'(in16[i]);
      for (int i = 0; i < 5; i++)  s5  += 12'(in5[i]);
      q16.push_back(s16); q5.push_back(s5); qt.push_back(cycle);
    end
    if (ov16 !== ov5) begin failures++; $display("FAIL valid mismatch"); end
    if (ov16) begin
      logic [19:0] e16;
      logic [11:0] e5;
      int t;
      e16 = q16.pop_front();
      e5  = q5.pop_front();
      t   = qt.pop_front();
      checks += 3;
      if (out16 != e16) begin failures++; if (failures < 10) $display("FAIL16 got %h exp %h", out16, e16); end
      if (out5 != e5)   begin failures++; if (failures < 10) $display("FAIL5 got %h exp %h", out5, e5); end
      if (cycle - t != 2) begin failures++; if (failures < 10) $display("FAIL latency %0d", cycle - t); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk); #1;
      in_valid = ($urandom % 4) != 0;
      for (int i = 0; i < 16; i++) in16[i] = (n < 3) ? 16'hffff : 16'($urandom);
      for (int i = 0; i < 5; i++)  in5[i]  = (n < 3) ? 8'hff : 8'($urandom);
    end
    @(posedge clk); #1 in_valid = 0;
    repeat (5) @(negedge clk);
    if (q16.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
