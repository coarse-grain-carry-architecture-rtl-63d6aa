// csel_adder: WIDTH-bit one-level carry-select adder on a dual-rail carry column.
//
// The column holds WIDTH/2 dual-rail CLBs (dr_clb) and is cut into segments
// of SEG bits (the bypass segment). The first segment ripples the real
// carry-in on both rails. Every later segment computes both rails from 0 and
// 1 while the earlier segments work, and its bits and its carry-out are
// selected by the carry select signal of the segment below. Only one level
// of carry select exists, so the carry path is one SEG-bit ripple followed by
// one select multiplexer per later segment. The select signal alternates
// polarity from segment to segment (odd segments drive it active low), which
// removes an inverter per segment from the critical path; the function is
// unchanged.
//
//   {cout, sum} = a + b + cin
//
// Follows the document: one-level select, per-CLB last-cell mode, alternating
// select polarity, segment sizes 4/8/12 bits (4 is the default, the best
// segment for widths up to 32 bits). WIDTH and SEG must be even because a CLB
// carries two bits; a last segment shorter than SEG is allowed.
// Purely combinational.
module csel_adder
  import dr_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned SEG   = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NCLB = WIDTH / 2;
  localparam int unsigned CPS  = SEG / 2;                 // CLBs per segment
  localparam int unsigned NSEG = (NCLB + CPS - 1) / CPS;

  logic [NCLB:0] r0, r1;
  logic [NCLB-1:0] cso;
  logic [NSEG:0]   seg_sel;   // select signal entering each segment (as driven)

  assign r0[0]      = cin;
  assign r1[0]      = cin;
  assign seg_sel[0] = cin;

  for (genvar k = 0; k < NCLB; k++) begin : g_clb
    localparam int unsigned J = k / CPS;
    dr_cfg_t cfg;
    always_comb begin
      cfg.first   = (J != 0) && (k % CPS == 0);
      cfg.last    = (k % CPS == CPS - 1) || (k == NCLB - 1);
      cfg.in_inv  = (J != 0) && ((J - 1) % 2 == 1);
      cfg.out_inv = (J % 2 == 1);
    end
    dr_clb u_clb (
      .a(a[2*k+1 -: 2]), .b(b[2*k+1 -: 2]), .cfg,
      .r0_in(r0[k]), .r1_in(r1[k]), .csel_in(seg_sel[J]),
      .sum(sum[2*k+1 -: 2]), .r0_out(r0[k+1]), .r1_out(r1[k+1]),
      .csel_out(cso[k])
    );
  end

  for (genvar j = 0; j < NSEG; j++) begin : g_seg
    localparam int unsigned LAST = ((j + 1) * CPS < NCLB) ? (j + 1) * CPS - 1 : NCLB - 1;
    assign seg_sel[j+1] = cso[LAST];
  end

  assign cout = seg_sel[NSEG] ^ ((NSEG - 1) % 2 == 1);

  initial begin
    assert (WIDTH % 2 == 0 && SEG % 2 == 0 && SEG >= 2)
      else $error("csel_adder: WIDTH and SEG must be even");
  end

endmodule
