// cgc_slice: one bit of the coarse-grain carry architecture.
//
// The slice is a (4,2) counter that adds seven bits of equal weight: the four
// conditioned operand bits and three carries arriving from the slice below.
//   And_Xor (x4) : b_i = (A_i & (x_i | ~cond_i)) ^ neg_i
//   CSA 1        : b0 + b1 + b2           = s1 + 2*c1_out
//   CSA 2        : s1 + c1_in + b3        = s2 + 2*c2_out
//   XOR          : p = s2 ^ c2_in         (propagate of the final 2-input add)
//   carry mux    : cout = p ? cin : s2    (the dedicated ripple carry chain)
//   sum          : p ^ cin
// so that b0+b1+b2+b3 + c1_in + c2_in + cin = sum + 2*(c1_out + c2_out + cout).
// The two counter carries travel to the next slice up on two new direct wires;
// only the last stage is on the ripple carry chain, so the added counters
// appear once, in the first carry generation, and not per bit of the chain.
//
// Follows the cell drawing of the architecture (blocks I to IV): the order of
// the counters, which carry enters which counter, the propagate XOR and the
// carry multiplexer. The sum XOR is done here rather than in the lookup table
// that follows the carry logic in the FPGA, and the spare configuration
// multiplexer after the XOR in the drawing is not modelled.
//
// Purely combinational; configuration is static.
module cgc_slice
  import cgc_pkg::*;
(
  input  logic [3:0] a,       // operand bits A0..A3
  input  logic [3:0] x,       // selection lines x0..x3
  input  cgc_cfg_t   cfg,
  input  logic       c1_in,   // first-counter carry from the slice below
  input  logic       c2_in,   // second-counter carry from the slice below
  input  logic       cin,     // carry chain input
  output logic       sum,
  output logic       c1_out,
  output logic       c2_out,
  output logic       cout
);

  logic [3:0] b;
  logic       s1, s2, p;

  always_comb begin
    b      = (a & (x | ~cfg.cond)) ^ cfg.neg;
    s1     = b[0] ^ b[1] ^ b[2];
    c1_out = (b[0] & b[1]) | (b[0] & b[2]) | (b[1] & b[2]);
    s2     = s1 ^ c1_in ^ b[3];
    c2_out = (s1 & c1_in) | (s1 & b[3]) | (c1_in & b[3]);
    p      = s2 ^ c2_in;
    cout   = p ? cin : s2;
    sum    = p ^ cin;
  end

endmodule
