// cgc_ppgen: non-Booth partial product generator on one conditional 4-input
// adder column.
//
// The column's four operands are the multiplicand shifted by 0, 1, 2 and 3
// bits (M, 2M, 4M, 8M) and its four selection lines are four multiplier bits
// x3..x0, so the column computes
//   pp = x0*M + x1*2M + x2*4M + x3*8M = M * x,   x = 0..15,
// every multiple from 0 to 15M, in N/2+2 CLBs (N+4 bits). Four multiplier
// bits are consumed per column, twice as many as the 0/M/2M/3M generator
// possible with a 2-input carry chain.
//
// Follows the document's mapping exactly (shifted operands, selection lines
// as multiplier bits). Unsigned. Purely combinational.
module cgc_ppgen
  import cgc_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   m,   // multiplicand
  input  logic [3:0]     x,   // four multiplier bits
  output logic [N+3:0]   pp   // m * x
);

  localparam cgc_cfg_t CFG = cgc_make_cfg(4'b0000, 4'b1111);

  logic [3:0][N+3:0] ops;

  always_comb begin
    for (int i = 0; i < 4; i++) ops[i] = (N+4)'(m) << i;
  end

  cgc_adder #(.WIDTH(N + 4)) u_col (
    .a(ops), .x, .cfg(CFG), .sum(pp), .c_top()
  );

endmodule
