// cgc_clb: one configurable logic block of the coarse-grain carry architecture.
//
// As in the four-input lookup table FPGA it extends, a CLB holds two halves
// (F and G), each a 16-bit lookup table followed by one carry slice, so a CLB
// handles two bits of a carry column. The three carry paths enter at the
// bottom (from the CLB below), pass from the F slice to the G slice, and leave
// at the top. Both slices share the column's selection lines and the
// column's static configuration.
//
// The two-bits-per-CLB packing follows the document's CLB counts; the lookup
// tables themselves are not modelled (the operands arrive as bits).
// Purely combinational.
module cgc_clb
  import cgc_pkg::*;
(
  input  logic [3:0] a_f,    // operand bits of the lower (F) bit
  input  logic [3:0] a_g,    // operand bits of the upper (G) bit
  input  logic [3:0] x,
  input  cgc_cfg_t   cfg,
  input  logic       c1_in,
  input  logic       c2_in,
  input  logic       cin,
  output logic [1:0] sum,    // {G, F}
  output logic       c1_out,
  output logic       c2_out,
  output logic       cout
);

  logic c1_m, c2_m, c0_m;

  cgc_slice u_f (
    .a(a_f), .x, .cfg, .c1_in, .c2_in, .cin,
    .sum(sum[0]), .c1_out(c1_m), .c2_out(c2_m), .cout(c0_m)
  );

  cgc_slice u_g (
    .a(a_g), .x, .cfg, .c1_in(c1_m), .c2_in(c2_m), .cin(c0_m),
    .sum(sum[1]), .c1_out, .c2_out, .cout
  );

endmodule
