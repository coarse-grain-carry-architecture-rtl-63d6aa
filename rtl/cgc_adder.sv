// cgc_adder: a WIDTH-bit conditional 4-input adder/subtractor, i.e. a column
// of coarse-grain carry CLBs.
//
//   sum = ( s0*x0'*A0 + s1*x1'*A1 + s2*x2'*A2 + s3*x3'*A3 ) mod 2^WIDTH
//   with s_i = -1 if cfg.neg[i] else +1,
//        x_i' = x_i if cfg.cond[i] else 1.
//
// The column is WIDTH/2 CLBs (two bits each, rounded up). At the bottom of
// the column three configuration multiplexers initialise the three carry
// paths (the two (3,2)-counter carries and the ripple carry chain) with
// constants from cfg; a subtracted operand is inverted in its And_Xor and
// gets its +1 from one of these carry-ins, so up to three operands can be
// subtracted (use cgc_pkg::cgc_make_cfg). Operands are taken as WIDTH-bit
// two's complement or unsigned words; the caller extends them to the width
// needed to hold the result. The carries leaving the top of the column are
// brought out for chaining columns.
//
// The column, the carry initialisation and the three-subtraction limit follow
// the document. The operand selection lines x are dynamic inputs shared by
// the whole column, as the document's vertical selection lines are; polarity
// and conditional enables are static (configuration), as in the document.
// Purely combinational; an application registers the result in the CLB
// flip-flops (see the application modules).
module cgc_adder
  import cgc_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [3:0][WIDTH-1:0] a,      // operands A0..A3
  input  logic [3:0]            x,      // selection lines
  input  cgc_cfg_t              cfg,
  output logic [WIDTH-1:0]      sum,
  output logic [2:0]            c_top   // {c2, c1, c0} leaving the top
);

  localparam int unsigned NCLB = (WIDTH + 1) / 2;
  localparam int unsigned PW   = 2 * NCLB;

  logic [3:0][PW-1:0] ap;
  logic [PW-1:0]      sp;
  logic [NCLB:0]      c0, c1, c2;

  always_comb begin
    for (int i = 0; i < 4; i++) ap[i] = PW'(a[i]);
  end

  assign c0[0] = cfg.c0_init;
  assign c1[0] = cfg.c1_init;
  assign c2[0] = cfg.c2_init;

  for (genvar k = 0; k < NCLB; k++) begin : g_clb
    logic [3:0] af, ag;
    always_comb begin
      for (int i = 0; i < 4; i++) begin
        af[i] = ap[i][2*k];
        ag[i] = ap[i][2*k+1];
      end
    end
    cgc_clb u_clb (
      .a_f(af), .a_g(ag), .x, .cfg,
      .c1_in(c1[k]), .c2_in(c2[k]), .cin(c0[k]),
      .sum(sp[2*k+1 -: 2]),
      .c1_out(c1[k+1]), .c2_out(c2[k+1]), .cout(c0[k+1])
    );
  end

  assign sum   = sp[WIDTH-1:0];
  assign c_top = {c2[NCLB], c1[NCLB], c0[NCLB]};

endmodule
