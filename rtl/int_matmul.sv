// int_matmul: integer matrix multiplier C = A x B for M x M matrices of
// unsigned N-bit numbers, built from the coarse-grain carry multipliers and
// 4-input adder trees.
//
// How it works: matrix A is loaded once into registers (load_a). Matrix B is
// then shifted in one column per cycle. For column j, M*M multipliers form
// every product A[i][k] * B[k][j] at once, and M adder trees (one per row i)
// of 4-input adders sum the M products of a row into C[i][j]. One column of C
// leaves per cycle, so a whole product takes 1 (load) + M (shift B) + latency
// cycles, the cycle count the document uses for this mapping.
//
// Interface:
//   load_a, a        : on a rising edge with load_a high, a[i][k] is stored.
//   b_valid, b_col   : b_col[k] = B[k][j] of one column j of B.
//   c_valid, c_col   : c_col[i] = C[i][j] for that column, LATENCY cycles
//                      after the column was accepted. Exact (no overflow).
// Timing: LATENCY = multiplier latency + adder-tree levels (3 at M=4, N=8).
// A new column is accepted every cycle. rst_n (asynchronous, active low)
// clears only the valid pipeline.
//
// From the document: M*M multipliers, M adder trees, A held while B is
// shifted. Own choices: unsigned operands, the column-per-cycle order, the
// register for A and the interface. Default M=4, N=8 holds the 2x2 and 4x4
// 8-bit cases the document measures (a 2x2 product uses the top-left
// corner with the other entries zero).
module int_matmul
  import cgc_pkg::*;
#(
  parameter int unsigned M = 4,
  parameter int unsigned N = 8,
  localparam int unsigned NPP     = (N + 3) / 4,
  localparam int unsigned MLAT    = 1 + ((NPP <= 1) ? 1 : ($clog2(NPP) + 1) / 2),
  localparam int unsigned TLEV    = (M <= 1) ? 1 : ($clog2(M) + 1) / 2,
  localparam int unsigned CW      = 2 * N + 2 * TLEV,
  localparam int unsigned LATENCY = MLAT + TLEV
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load_a,
  input  logic [M-1:0][M-1:0][N-1:0] a,      // a[i][k] = A[i][k]
  input  logic                      b_valid,
  input  logic [M-1:0][N-1:0]       b_col,  // b_col[k] = B[k][j]
  output logic                      c_valid,
  output logic [M-1:0][CW-1:0]      c_col   // c_col[i] = C[i][j]
);

  logic [M-1:0][M-1:0][N-1:0] a_q;

  always_ff @(posedge clk) begin
    if (load_a) a_q <= a;
  end

  logic [M-1:0][M-1:0][2*N-1:0] prod;
  logic [M-1:0][M-1:0]          pv;
  logic [M-1:0]                 tv;

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar k = 0; k < M; k++) begin : g_mul
      cgc_multiplier #(.N(N)) u_mul (
        .clk, .rst_n, .in_valid(b_valid), .a(a_q[i][k]), .b(b_col[k]),
        .out_valid(pv[i][k]), .p(prod[i][k])
      );
    end
    cgc_adder_tree #(.M(M), .W(2 * N)) u_tree (
      .clk, .rst_n, .in_valid(pv[i][0]), .in(prod[i]),
      .out_valid(tv[i]), .out(c_col[i])
    );
  end

  assign c_valid = tv[0];

endmodule
