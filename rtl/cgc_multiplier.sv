// cgc_multiplier: pipelined parallel N x N unsigned multiplier on the
// coarse-grain carry architecture.
//
// Stage 1: ceil(N/4) partial product generators (cgc_ppgen), each taking four
// bits of the multiplier, form M*x_j for every multiplier nibble x_j and are
// registered. Stage 2 on: the partial products, shifted by 4j, are summed by
// a pipelined tree of 4-input adders (cgc_adder_tree). Halving the number of
// partial products and adding four at a time is what shrinks the multiplier.
//
//   p = a * b (2N bits)
//
// Timing: a/b/in_valid sampled on a clock edge give p/out_valid
// LATENCY = 1 + ceil(log4(ceil(N/4))) cycles later (2 cycles at N = 16); one
// product per cycle. rst_n (asynchronous, active low) clears the valid bits.
//
// The partial-product generation and the 4-input adder tree follow the
// document; the register placement (one stage after the generators, one per
// tree level) is this design's choice of a fully pipelined multiplier.
module cgc_multiplier
  import cgc_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned NPP     = (N + 3) / 4,
  localparam int unsigned TLEV    = (NPP <= 1) ? 1 : ($clog2(NPP) + 1) / 2,
  localparam int unsigned LATENCY = 1 + TLEV
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,       // multiplicand
  input  logic [N-1:0]   b,       // multiplier
  output logic           out_valid,
  output logic [2*N-1:0] p
);

  localparam int unsigned BW = 4 * NPP;

  logic [BW-1:0]                 bx;
  logic [NPP-1:0][2*N-1:0]       pp_q;
  logic                          vld_q;
  logic [2*N+2*TLEV-1:0]         tree_out;

  assign bx = BW'(b);

  for (genvar j = 0; j < NPP; j++) begin : g_pp
    logic [N+3:0] pp;
    cgc_ppgen #(.N(N)) u_pp (.m(a), .x(bx[4*j +: 4]), .pp);
    always_ff @(posedge clk) pp_q[j] <= (2*N)'(pp) << (4*j);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= 1'b0;
    else        vld_q <= in_valid;
  end

  cgc_adder_tree #(.M(NPP), .W(2 * N)) u_tree (
    .clk, .rst_n, .in_valid(vld_q), .in(pp_q),
    .out_valid, .out(tree_out)
  );

  assign p = tree_out[2*N-1:0];

endmodule
