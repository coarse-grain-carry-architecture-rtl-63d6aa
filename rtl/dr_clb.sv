// dr_clb: dual-rail carry cell of one CLB (two bit positions).
//
// Two ripple carry paths run side by side through the CLB: the zero-carry
// rail computes the carries assuming the segment's carry-in is 0, the
// one-carry rail assuming it is 1. Each bit is a 2-input add of a and b:
//   p = a ^ b,  rail carry out = p ? rail carry in : a.
// The select signal sel (csel_in corrected for polarity) is the true carry
// into the segment; it picks the rail that gives each bit's carry-in, and
// sum = p ^ (sel ? one-rail carry : zero-rail carry).
// In last-cell mode the CLB also drives csel_out, the carry leaving the
// segment, chosen between the two rails' carry-outs by sel; otherwise
// csel_out is disabled (held at 0) and the rails continue into the next CLB.
// With cfg.first the rails entering the CLB are replaced by 0 and 1, starting
// a new segment. cfg.out_inv drives csel_out inverted, so that select
// polarity can alternate from segment to segment.
//
// The two rails, the last/non-last cell modes, the carry select output with
// its enable and the alternating select polarity follow the document's
// transistor-level cell; the rail initialisation by configuration is this
// design's reading of the supply-tied devices at the rail inputs.
// Purely combinational.
module dr_clb
  import dr_pkg::*;
(
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  dr_cfg_t    cfg,
  input  logic       r0_in,     // zero-carry rail from the CLB below
  input  logic       r1_in,     // one-carry rail from the CLB below
  input  logic       csel_in,   // select signal of this segment
  output logic [1:0] sum,
  output logic       r0_out,
  output logic       r1_out,
  output logic       csel_out   // carry select output (last-cell mode)
);

  logic [2:0] r0, r1;
  logic [1:0] p;
  logic       sel;

  assign sel   = csel_in ^ cfg.in_inv;
  assign r0[0] = cfg.first ? 1'b0 : r0_in;
  assign r1[0] = cfg.first ? 1'b1 : r1_in;

  for (genvar i = 0; i < 2; i++) begin : g_bit
    assign p[i]     = a[i] ^ b[i];
    assign r0[i+1]  = p[i] ? r0[i] : a[i];
    assign r1[i+1]  = p[i] ? r1[i] : a[i];
    assign sum[i]   = p[i] ^ (sel ? r1[i] : r0[i]);
  end

  assign r0_out   = r0[2];
  assign r1_out   = r1[2];
  assign csel_out = cfg.last ? ((sel ? r1[2] : r0[2]) ^ cfg.out_inv) : 1'b0;

endmodule
