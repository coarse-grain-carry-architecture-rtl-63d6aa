// dct8: pipelined 8-point fast DCT (Arai-Agui-Nakajima flow) mapped on
// 4-input adder/subtractor columns.
//
// Output k is the DCT sum  sum_n x[n]*cos((2n+1)*k*pi/16)  multiplied by the
// flow's scale factor S_k (S_0 = 1, S_k = 2*cos(k*pi/16)); the scaling is left
// to the stage that follows, as is usual with this flow.
//
// Stage 1 (one level of 4-input add/sub, where a 2-input fabric needs the two
// butterfly levels):
//   e0 = x0+x3+x4+x7   e1 = x1+x2+x5+x6   e2 = x1-x2-x5+x6   e3 = x0-x3-x4+x7
//   o0 = x2+x3-x4-x5   o1 = x1+x2-x5-x6   o2 = x0+x1-x6-x7   o3 = x0-x7
// Stages 2-3: seven constant-coefficient multipliers, two cycles each,
// Q8 coefficients (value/256):
//   A1 = 181 (cos(pi/4)) on e2 and e3,  A3 = 181 on o1,
//   A25 = 237 (cos(pi/8)) on o0,  A45 = 237 on o2,  A5 = 98 (cos(3pi/8)) on o0 and o2;
//   products are arithmetically shifted right by 8.
// Stage 4 (one level of 4-input add/sub, which also absorbs the adders that
// follow the multipliers):
//   F0 = e0+e1            F4 = e0-e1
//   F2 = e3+A1e2+A1e3     F6 = e3-A1e2-A1e3
//   F5 = o3-A3o1+A25o0-A5o2   F3 = o3-A3o1-A25o0+A5o2
//   F1 = o3+A3o1+A45o2+A5o0   F7 = o3+A3o1-A45o2-A5o0
//
// Interface: x (8 signed 8-bit samples) with in_valid; f (8 signed OW-bit
// results) with out_valid, LATENCY = 4 cycles, one transform per cycle.
// rst_n (asynchronous, active low) clears the valid pipeline.
//
// The algorithm, the 8-bit precision, the two-cycle constant multipliers and
// the merging of the butterfly levels and of the post-multiplier adders into
// 4-input add/subtracts follow the document; the coefficient values are the
// standard ones of this flow at 8-bit precision, and the grouping of the odd
// part into four-operand sums (two combined coefficients) is this design's.
// The constant multipliers, lookup tables in the FPGA, are written as
// multiplications by constants.
module dct8
  import cgc_pkg::*;
#(
  parameter int unsigned IW = 8,
  localparam int unsigned SW = IW + 2,       // stage-1 width
  localparam int unsigned PW = SW + 1,       // product width after >> 8
  localparam int unsigned OW = IW + 4        // output width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [7:0][IW-1:0]    x,
  output logic                  out_valid,
  output logic [7:0][OW-1:0]    f
);

  localparam int signed A1  = 181;
  localparam int signed A25 = 237;
  localparam int signed A5  = 98;

  // ---------------- stage 1 ----------------
  logic [7:0][SW-1:0] xs;
  always_comb begin
    for (int i = 0; i < 8; i++) xs[i] = SW'($signed(x[i]));
  end

  // operand index and polarity of each stage-1 sum (A0..A3)
  localparam int         S1_IDX [8][4] = '{'{0,3,4,7}, '{1,2,5,6}, '{1,6,2,5}, '{0,7,3,4},
                                           '{2,3,4,5}, '{1,2,5,6}, '{0,1,6,7}, '{0,7,0,0}};
  localparam logic [3:0] S1_NEG [8]    = '{4'b0000, 4'b0000, 4'b1100, 4'b1100,
                                           4'b1100, 4'b1100, 4'b1100, 4'b0010};
  localparam logic [3:0] S1_USE [8]    = '{4'b1111, 4'b1111, 4'b1111, 4'b1111,
                                           4'b1111, 4'b1111, 4'b1111, 4'b0011};

  logic [7:0][SW-1:0] s1, s1_q;   // {o3,o2,o1,o0,e3,e2,e1,e0}
  for (genvar k = 0; k < 8; k++) begin : g_s1
    logic [3:0][SW-1:0] ops;
    always_comb begin
      for (int i = 0; i < 4; i++) ops[i] = xs[S1_IDX[k][i]];
    end
    cgc_adder #(.WIDTH(SW)) u_add (
      .a(ops), .x(S1_USE[k]), .cfg(cgc_make_cfg(S1_NEG[k], ~S1_USE[k] | S1_USE[k])),
      .sum(s1[k]), .c_top()
    );
  end

  // ---------------- stages 2-3: constant multipliers ----------------
  function automatic logic [PW-1:0] cmul(logic [SW-1:0] v, int signed c);
    logic signed [SW+9:0] p;
    p = $signed({{10{v[SW-1]}}, v}) * $signed((SW+10)'(c));
    return PW'(p >>> 8);
  endfunction

  logic [6:0][PW-1:0] m2, m3;     // A1e2, A1e3, A3o1, A25o0, A45o2, A5o0, A5o2
  logic [7:0][SW-1:0] d2, d3;     // stage-1 values delayed with the products

  always_ff @(posedge clk) begin
    m2[0] <= cmul(s1_q[2], A1);
    m2[1] <= cmul(s1_q[3], A1);
    m2[2] <= cmul(s1_q[5], A1);
    m2[3] <= cmul(s1_q[4], A25);
    m2[4] <= cmul(s1_q[6], A25);
    m2[5] <= cmul(s1_q[4], A5);
    m2[6] <= cmul(s1_q[6], A5);
    d2    <= s1_q;
    m3    <= m2;
    d3    <= d2;
    s1_q  <= s1;
  end

  // ---------------- stage 4 ----------------
  logic [7:0][OW-1:0] f_c;
  logic [OW-1:0] e0, e1, e3, o3, a1e2, a1e3, a3o1, a25o0, a45o2, a5o0, a5o2;
  always_comb begin
    e0 = OW'($signed(d3[0])); e1 = OW'($signed(d3[1]));
    e3 = OW'($signed(d3[3])); o3 = OW'($signed(d3[7]));
    a1e2  = OW'($signed(m3[0])); a1e3  = OW'($signed(m3[1]));
    a3o1  = OW'($signed(m3[2])); a25o0 = OW'($signed(m3[3]));
    a45o2 = OW'($signed(m3[4])); a5o0  = OW'($signed(m3[5]));
    a5o2  = OW'($signed(m3[6]));
  end

  localparam logic [3:0] S4_NEG [8] = '{4'b0000, 4'b0000, 4'b0000, 4'b0110,
                                        4'b0010, 4'b1010, 4'b0110, 4'b1100};
  localparam logic [3:0] S4_USE [8] = '{4'b0011, 4'b1111, 4'b0111, 4'b1111,
                                        4'b0011, 4'b1111, 4'b0111, 4'b1111};
  logic [7:0][3:0][OW-1:0] s4_ops;
  always_comb begin
    s4_ops[0] = {OW'(0), OW'(0), e1, e0};            // F0
    s4_ops[1] = {a5o0, a45o2, a3o1, o3};             // F1
    s4_ops[2] = {OW'(0), a1e3, a1e2, e3};            // F2
    s4_ops[3] = {a5o2, a25o0, a3o1, o3};             // F3
    s4_ops[4] = {OW'(0), OW'(0), e1, e0};            // F4
    s4_ops[5] = {a5o2, a25o0, a3o1, o3};             // F5
    s4_ops[6] = {OW'(0), a1e3, a1e2, e3};            // F6
    s4_ops[7] = {a5o0, a45o2, a3o1, o3};             // F7
  end

  for (genvar k = 0; k < 8; k++) begin : g_s4
    cgc_adder #(.WIDTH(OW)) u_add (
      .a(s4_ops[k]), .x(S4_USE[k]), .cfg(cgc_make_cfg(S4_NEG[k], 4'b1111)),
      .sum(f_c[k]), .c_top()
    );
    always_ff @(posedge clk) f[k] <= f_c[k];
  end

  logic [3:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], in_valid};
  end
  assign out_valid = vld[3];

endmodule
