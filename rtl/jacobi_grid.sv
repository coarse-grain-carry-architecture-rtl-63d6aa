// jacobi_grid: N x N Jacobi relaxation array with one 4-input adder per node.
//
// Each node holds a W-bit unsigned value. On every enabled clock edge every
// node is replaced by the average of its four neighbours,
//   y'[r][c] = (up + down + left + right) >> 2,
// where neighbours outside the array come from the boundary inputs. Each
// node's sum is one coarse-grain carry column of W+2 bits, where a 2-input
// architecture would need a small tree of two-operand adders and two adder
// delays; the divide by four is a wire shift.
//
// Interface: load writes init into the array (takes priority over en); en
// performs one relaxation step. Boundaries: top[c] is above row 0, bottom[c]
// below row N-1, left[r] left of column 0, right[r] right of column N-1.
// Timing: one step per clock cycle; the array is visible on y.
// No reset: the array is defined by load.
//
// The algorithm and the one-adder-per-node mapping follow the document; the
// boundary interface, the load port and truncating division are this
// design's choices.
module jacobi_grid
  import cgc_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned W = 16
) (
  input  logic                           clk,
  input  logic                           load,
  input  logic                           en,
  input  logic [N-1:0][N-1:0][W-1:0]     init,
  input  logic [N-1:0][W-1:0]            top,
  input  logic [N-1:0][W-1:0]            bottom,
  input  logic [N-1:0][W-1:0]            left,
  input  logic [N-1:0][W-1:0]            right,
  output logic [N-1:0][N-1:0][W-1:0]     y
);

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      logic [3:0][W+1:0] ops;
      logic [W+1:0]      s;
      always_comb begin
        ops[0] = (W+2)'((r == 0)     ? top[c]    : y[(r == 0) ? 0 : r-1][c]);
        ops[1] = (W+2)'((r == N-1)   ? bottom[c] : y[(r == N-1) ? r : r+1][c]);
        ops[2] = (W+2)'((c == 0)     ? left[r]   : y[r][(c == 0) ? 0 : c-1]);
        ops[3] = (W+2)'((c == N-1)   ? right[r]  : y[r][(c == N-1) ? c : c+1]);
      end
      cgc_adder #(.WIDTH(W + 2)) u_add (
        .a(ops), .x(4'b1111), .cfg(CGC_ADD4), .sum(s), .c_top()
      );
      always_ff @(posedge clk) begin
        if (load)    y[r][c] <= init[r][c];
        else if (en) y[r][c] <= s[W+1:2];
      end
    end
  end

endmodule
