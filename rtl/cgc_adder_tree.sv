// cgc_adder_tree: pipelined tree of 4-input adders summing M unsigned W-bit
// numbers.
//
// Level l of the tree has ceil(M/4^(l+1)) coarse-grain carry columns, each
// adding four results of the level below (missing operands are zero), and
// every level is registered in the CLB flip-flops. A tree of 4-input adders
// needs ceil(log4 M) levels where a 2-input tree needs ceil(log2 M), which is
// where the area and cycle savings of the architecture come from.
//
//   out = sum of in[0..M-1],  OUT_W = W + 2*ceil(log4 M) bits, exact.
//
// Timing: in_valid/in sampled on a rising clock edge appear on out/out_valid
// LEVELS cycles later; a new set can be accepted every cycle.
// rst_n (asynchronous, active low) clears only the valid pipeline.
//
// The tree topology follows the document. Every level is built at the full
// output width here, where the document's count widens each level by two
// bits; the function is the same.
module cgc_adder_tree
  import cgc_pkg::*;
#(
  parameter int unsigned M = 16,
  parameter int unsigned W = 16,
  localparam int unsigned LEVELS = (M <= 1) ? 1 : ($clog2(M) + 1) / 2,
  localparam int unsigned OUT_W  = W + 2 * LEVELS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [M-1:0][W-1:0]   in,
  output logic                  out_valid,
  output logic [OUT_W-1:0]      out
);

  // number of values at level l
  function automatic int unsigned count_at(int unsigned l);
    int unsigned n = M;
    for (int unsigned i = 0; i < l; i++) n = (n + 3) / 4;
    return n;
  endfunction

  logic [LEVELS:0][M-1:0][OUT_W-1:0] v;
  logic [LEVELS:0]                   vld;

  always_comb begin
    for (int j = 0; j < M; j++) v[0][j] = OUT_W'(in[j]);
  end
  assign vld[0] = in_valid;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NIN  = count_at(l);
    localparam int unsigned NOUT = count_at(l + 1);
    for (genvar j = 0; j < M; j++) begin : g_node
      if (j < NOUT) begin : g_add
        logic [3:0][OUT_W-1:0] ops;
        logic [OUT_W-1:0]      s;
        always_comb begin
          for (int i = 0; i < 4; i++)
            ops[i] = (4 * j + i < NIN) ? v[l][4*j+i] : '0;
        end
        cgc_adder #(.WIDTH(OUT_W)) u_add (
          .a(ops), .x(4'b1111), .cfg(CGC_ADD4), .sum(s), .c_top()
        );
        always_ff @(posedge clk) v[l+1][j] <= s;
      end else begin : g_none
        assign v[l+1][j] = '0;
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld[l+1] <= 1'b0;
      else        vld[l+1] <= vld[l];
    end
  end

  assign out       = v[LEVELS][0];
  assign out_valid = vld[LEVELS];

endmodule
