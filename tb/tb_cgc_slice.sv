// tb_cgc_slice: exhaustive self-checking test of one coarse-grain carry slice.
// Every combination of the four operand bits, four selection lines, polarity,
// conditional enables and the three incoming carries is applied. The
// reference conditions the operands independently, checks the weighted
// count identity b0+b1+b2+b3+c1_in+c2_in+cin = sum + 2*(c1_out+c2_out+cout),
// and checks that each counter carry is the majority of its own inputs.
module tb_cgc_slice;
  import cgc_pkg::*;

  logic [3:0] a, x;
  cgc_cfg_t   cfg;
  logic       c1_in, c2_in, cin, sum, c1_out, c2_out, cout;
  int checks = 0, failures = 0;

  cgc_slice dut (.*);

  function automatic logic maj(logic p, logic q, logic r);
    return (p & q) | (p & r) | (q & r);
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] b;
    int total, got;
    for (int vec = 0; vec < (1 << 19); vec++) begin
      a       = vec[3:0];
      x       = vec[7:4];
      cfg.cond = vec[11:8];
      cfg.neg  = vec[15:12];
      {c1_in, c2_in, cin} = vec[18:16];
      {cfg.c0_init, cfg.c1_init, cfg.c2_init} = 3'($urandom);  // unused in a slice
      #1;
      for (int i = 0; i < 4; i++) b[i] = (cfg.cond[i] ? (a[i] & x[i]) : a[i]) ^ cfg.neg[i];
      total = int'(b[0]) + int'(b[1]) + int'(b[2]) + int'(b[3]) + int'(c1_in) + int'(c2_in) + int'(cin);
      got   = int'(sum) + 2 * (int'(c1_out) + int'(c2_out) + int'(cout));
      checks++;
      if (total != got || c1_out != maj(b[0], b[1], b[2])) begin
        failures++;
        if (failures < 10) $display("FAIL vec=%h total=%0d got=%0d", vec, total, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
