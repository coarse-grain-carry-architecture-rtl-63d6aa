// acs_unit: add-compare-select unit of a Viterbi decoder on two coarse-grain
// carry columns.
//
// The two candidate metrics of a state are lam0+gam0 (path 0) and lam1+gam1
// (path 1), each a state metric plus a branch metric. A single 4-input
// adder/subtractor column computes
//   d = (lam0 + gam0) - (lam1 + gam1)
// so the two adders and the comparator of a conventional ACS become one
// column; the sign of d is the decision. The survivor metric is then formed
// by a second column used as a conditional adder whose selection lines are
// the decision: lam0*~dec + gam0*~dec + lam1*dec + gam1*dec.
//
//   dec    = 1 when path 1 has the smaller metric (ties go to path 1)
//   metric = min(lam0 + gam0, lam1 + gam1), W+1 bits
//
// Timing: inputs sampled on a clock edge with en high appear on dec/metric
// one cycle later; with en low the outputs hold. No reset: a decoder
// initialises its metrics through the inputs.
//
// The merged add-and-compare column follows the document; forming the
// survivor metric with a conditional column, minimum-metric selection and the
// tie rule are this design's choices.
module acs_unit
  import cgc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         en,     // update dec and metric
  input  logic [W-1:0] lam0,   // state metric, path 0
  input  logic [W-1:0] gam0,   // branch metric, path 0
  input  logic [W-1:0] lam1,   // state metric, path 1
  input  logic [W-1:0] gam1,   // branch metric, path 1
  output logic         dec,
  output logic [W:0]   metric
);

  localparam cgc_cfg_t CFG_CMP = cgc_make_cfg(4'b1100, 4'b0000);
  localparam cgc_cfg_t CFG_SEL = cgc_make_cfg(4'b0000, 4'b1111);

  logic [3:0][W+1:0] cmp_ops;
  logic [W+1:0]      d;
  logic              dec_c;
  logic [3:0][W:0]   sel_ops;
  logic [W:0]        m_c;

  assign cmp_ops = {(W+2)'(gam1), (W+2)'(lam1), (W+2)'(gam0), (W+2)'(lam0)};

  cgc_adder #(.WIDTH(W + 2)) u_cmp (
    .a(cmp_ops), .x(4'b1111), .cfg(CFG_CMP), .sum(d), .c_top()
  );

  assign dec_c   = ~d[W+1];
  assign sel_ops = {(W+1)'(gam1), (W+1)'(lam1), (W+1)'(gam0), (W+1)'(lam0)};

  cgc_adder #(.WIDTH(W + 1)) u_sel (
    .a(sel_ops), .x({dec_c, dec_c, ~dec_c, ~dec_c}), .cfg(CFG_SEL),
    .sum(m_c), .c_top()
  );

  always_ff @(posedge clk) begin
    if (en) begin
      dec    <= dec_c;
      metric <= m_c;
    end
  end

endmodule
