// fir_da: fully pipelined M-tap FIR filter over signed N-bit samples and
// coefficients, built as bit-parallel distributed arithmetic on lookup tables
// and coarse-grain 4-input adder/subtractor columns.
//
// How it works: y[n] = sum_t h[t] * x[n-t]. The taps are split into groups of
// four. For each group a 16-entry table holds every sum of a subset of its
// four coefficients (the precomputed coefficient table of distributed
// arithmetic). Each cycle, bit b of the four samples of a group addresses its
// table, giving the group's contribution for bit plane b. The groups of one
// bit plane are added with a 4-input adder tree (when M > 4), then the N bit
// planes, each shifted by its weight, are summed by 4-input columns. The sign
// bit plane of two's complement samples has negative weight, so its operand
// is subtracted, which the column does through its inversion bit and a
// carry-in at the LSB. One output per input sample.
//
// Interface:
//   load_coef, h : on a rising edge with load_coef high, the coefficient
//                  tables are filled from h[t] (signed). Static configuration.
//   in_valid, x  : a new signed sample enters the delay line.
//   out_valid, y : the filter output for that sample, exact, signed,
//                  2N + clog2(M) bits.
// Timing: y appears LATENCY cycles after the sample edge: 4 at M = 4, N = 8
// (delay line, table, bit-plane column, one tree level); each extra level of
// the group tree (M > 4) or of the bit-plane tree adds one. New sample every
// cycle. rst_n (asynchronous, active low) clears the delay line and the valid
// pipeline.
//
// From the document: distributed arithmetic with precomputed coefficient
// tables whose sums feed 4-input adder trees, fully pipelined, table entries
// N+2 bits wide for four taps. Own choices: bit-parallel form, signed
// numbers, the order (groups first, then bit planes) and the register
// placement. Default M = 4, N = 8 is the 4-tap 8-bit filter the document
// measures.
module fir_da
  import cgc_pkg::*;
#(
  parameter int unsigned M = 4,
  parameter int unsigned N = 8,
  localparam int unsigned G  = (M + 3) / 4,          // tap groups
  localparam int unsigned NQ = (N + 3) / 4,          // bit-plane columns
  localparam int unsigned OW = 2 * N + $clog2(M),    // output width
  localparam int unsigned TW = N + 2                 // table entry width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load_coef,
  input  logic [M-1:0][N-1:0] h,
  input  logic                in_valid,
  input  logic [N-1:0]        x,
  output logic                out_valid,
  output logic [OW-1:0]       y
);

  // coefficient tables: tbl[g][addr] = sum of h[4g+i] for the set bits i
  logic [G-1:0][15:0][TW-1:0] tbl;

  always_ff @(posedge clk) begin
    if (load_coef) begin
      for (int g = 0; g < G; g++)
        for (int a = 0; a < 16; a++) begin
          logic signed [TW-1:0] s;
          s = '0;
          for (int i = 0; i < 4; i++)
            if (a[i] && (4 * g + i < M)) s += TW'($signed(h[4*g+i]));
          tbl[g][a] <= s;
        end
    end
  end

  // delay line, xd[t] = x[n-t]; groups padded with zero samples
  logic [4*G-1:0][N-1:0] xd;
  logic                  v0, v1, v2, v3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xd <= '0;
      v0 <= 1'b0;
    end else begin
      v0 <= in_valid;
      if (in_valid) begin
        for (int t = M - 1; t > 0; t--) xd[t] <= xd[t-1];
        xd[0] <= x;
      end
    end
  end

  // table lookup per bit plane and group, registered
  logic [N-1:0][G-1:0][TW-1:0] lut_q;

  always_ff @(posedge clk) begin
    for (int b = 0; b < N; b++)
      for (int g = 0; g < G; g++)
        lut_q[b][g] <= tbl[g][{xd[4*g+3][b], xd[4*g+2][b], xd[4*g+1][b], xd[4*g][b]}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= v0;
  end

  // sum of the groups of each bit plane (sign-extended to OW bits; the tree
  // works modulo 2^OW, which is exact because the result fits)
  logic [N-1:0][OW-1:0] gs;

  if (G == 1) begin : g_one
    always_comb begin
      for (int b = 0; b < N; b++) gs[b] = OW'($signed(lut_q[b][0]));
    end
    assign v2 = v1;
  end else begin : g_tree
    logic [N-1:0] tv;
    for (genvar b = 0; b < N; b++) begin : g_plane
      logic [G-1:0][OW-1:0] ops;
      logic [OW+2*(($clog2(G)+1)/2)-1:0] s;
      always_comb begin
        for (int g = 0; g < G; g++) ops[g] = OW'($signed(lut_q[b][g]));
      end
      cgc_adder_tree #(.M(G), .W(OW)) u_gt (
        .clk, .rst_n, .in_valid(v1), .in(ops), .out_valid(tv[b]), .out(s)
      );
      assign gs[b] = s[OW-1:0];
    end
    assign v2 = tv[0];
  end

  // bit planes in groups of four, shifted by weight; the sign plane is
  // subtracted
  logic [NQ-1:0][OW-1:0] qs;

  for (genvar q = 0; q < NQ; q++) begin : g_quad
    logic [3:0][OW-1:0] ops;
    logic [3:0]         neg;
    logic [OW-1:0]      s;
    always_comb begin
      for (int i = 0; i < 4; i++) begin
        ops[i] = (4 * q + i < N) ? gs[4*q+i] << (4 * q + i) : '0;
        neg[i] = (4 * q + i == N - 1);
      end
    end
    cgc_adder #(.WIDTH(OW)) u_col (
      .a(ops), .x(4'b0000), .cfg(cgc_make_cfg(neg, 4'b0000)), .sum(s), .c_top()
    );
    always_ff @(posedge clk) qs[q] <= s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v3 <= 1'b0;
    else        v3 <= v2;
  end

  // sum of the bit-plane columns
  logic [OW+2*((NQ <= 1) ? 1 : ($clog2(NQ)+1)/2)-1:0] ysum;

  cgc_adder_tree #(.M(NQ), .W(OW)) u_bt (
    .clk, .rst_n, .in_valid(v3), .in(qs), .out_valid(out_valid), .out(ysum)
  );

  assign y = ysum[OW-1:0];

endmodule
