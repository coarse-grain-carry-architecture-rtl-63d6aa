// tb_dr_clb: exhaustive self-checking test of the dual-rail carry CLB. For
// every operand pair, configuration, pair of incoming rails and select input,
// the reference adds a + b + rail for each rail in integer arithmetic: the
// rail outputs are the carries of those sums, the sum bits are those of the
// rail picked by the (polarity-corrected) select signal, and the select
// output is that sum's carry (inverted when configured) in last-cell mode
// and 0 otherwise.
module tb_dr_clb;
  import dr_pkg::*;

  logic [1:0] a, b, sum;
  dr_cfg_t    cfg;
  logic       r0_in, r1_in, csel_in, r0_out, r1_out, csel_out;
  int checks = 0, failures = 0;

  dr_clb dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int z0, z1, zs, e0, e1;
    logic sel, ecs;
    for (int v = 0; v < (1 << 11); v++) begin
      {a, b, cfg, r0_in, r1_in, csel_in} = 11'(v);
      #1;
      e0  = cfg.first ? 0 : int'(r0_in);
      e1  = cfg.first ? 1 : int'(r1_in);
      z0  = int'(a) + int'(b) + e0;
      z1  = int'(a) + int'(b) + e1;
      sel = csel_in ^ cfg.in_inv;
      zs  = sel ? z1 : z0;
      ecs = cfg.last ? ((zs >= 4) ^ cfg.out_inv) : 1'b0;
      checks++;
      if (r0_out != (z0 >= 4) || r1_out != (z1 >= 4) || sum != zs[1:0] || csel_out != ecs) begin
        failures++;
        if (failures < 10) $display("FAIL v=%h sum=%b r=%b%b cs=%b", v, sum, r1_out, r0_out, csel_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
