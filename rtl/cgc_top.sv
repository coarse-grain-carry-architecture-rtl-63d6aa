// cgc_top: the coarse-grain carry architecture and its application mappings,
// side by side.
//
// Contents, each with its own ports:
//   col_*  one configurable CW-bit coarse-grain carry column: a conditional
//          4-input adder/subtractor with static configuration col_cfg and
//          dynamic selection lines col_x (combinational).
//   cs_*   a CSW-bit one-level carry-select adder on the dual-rail carry chain
//          with SEG-bit segments (combinational).
//   mul_*  a pipelined MULN x MULN multiplier built from non-Booth partial
//          product columns and a 4-input adder tree (latency 2 at MULN = 16).
//   acs_*  a Viterbi add-compare-select unit whose add and compare share one
//          4-input adder/subtractor column (latency 1).
//   jac_*  a JN x JN Jacobi relaxation array, one 4-input adder per node
//          (one step per cycle).
//   vit_*  a 4-state rate-1/2 Viterbi decoder whose metric update uses four
//          of the ACS units (traceback depth VDEPTH).
//   dct_*  a pipelined 8-point fast DCT on 4-input adder/subtractors
//          (latency 4).
//   heap_* a heapify engine for a tree of 2^HDEPTH-1 keys whose node
//          multiplexers and comparators are conditional 4-input columns.
//   mm_*   an MMM x MMM integer matrix multiplier over MMN-bit numbers:
//          MMM*MMM multipliers and MMM 4-input adder trees, one column of
//          the product per cycle (latency 3 at the defaults).
//   fir_*  an FIRM-tap FIR filter over signed FIRN-bit numbers in
//          distributed arithmetic: coefficient tables plus 4-input columns
//          (latency 4 at the defaults).
// clk is shared by the clocked units; rst_n (asynchronous, active low) clears
// the valid pipelines and controllers.
//
// The units and their defaults are those described for the architecture; the
// side-by-side arrangement with every unit's ports at the top is this
// design's way of presenting an architecture (rather than a single circuit).
module cgc_top
  import cgc_pkg::*;
#(
  parameter int unsigned CW   = 16,
  parameter int unsigned CSW  = 32,
  parameter int unsigned SEG  = 4,
  parameter int unsigned MULN = 16,
  parameter int unsigned ACSW = 8,
  parameter int unsigned JN   = 4,
  parameter int unsigned JW   = 16,
  parameter int unsigned VDEPTH = 16,
  parameter int unsigned HDEPTH = 3,
  parameter int unsigned HW     = 8,
  parameter int unsigned MMM    = 4,
  parameter int unsigned MMN    = 8,
  parameter int unsigned FIRM   = 4,
  parameter int unsigned FIRN   = 8,
  localparam int unsigned MM_CW = 2 * MMN + 2 * ((MMM <= 1) ? 1 : ($clog2(MMM) + 1) / 2)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // coarse-grain carry column
  input  logic [3:0][CW-1:0]            col_a,
  input  logic [3:0]                    col_x,
  input  cgc_cfg_t                      col_cfg,
  output logic [CW-1:0]                 col_sum,
  output logic [2:0]                    col_c_top,
  // dual-rail carry-select adder
  input  logic [CSW-1:0]                cs_a,
  input  logic [CSW-1:0]                cs_b,
  input  logic                          cs_cin,
  output logic [CSW-1:0]                cs_sum,
  output logic                          cs_cout,
  // multiplier
  input  logic                          mul_in_valid,
  input  logic [MULN-1:0]               mul_a,
  input  logic [MULN-1:0]               mul_b,
  output logic                          mul_out_valid,
  output logic [2*MULN-1:0]             mul_p,
  // add-compare-select
  input  logic [ACSW-1:0]               acs_lam0,
  input  logic [ACSW-1:0]               acs_gam0,
  input  logic [ACSW-1:0]               acs_lam1,
  input  logic [ACSW-1:0]               acs_gam1,
  output logic                          acs_dec,
  output logic [ACSW:0]                 acs_metric,
  // Jacobi relaxation
  input  logic                          jac_load,
  input  logic                          jac_en,
  input  logic [JN-1:0][JN-1:0][JW-1:0] jac_init,
  input  logic [JN-1:0][JW-1:0]         jac_top,
  input  logic [JN-1:0][JW-1:0]         jac_bottom,
  input  logic [JN-1:0][JW-1:0]         jac_left,
  input  logic [JN-1:0][JW-1:0]         jac_right,
  output logic [JN-1:0][JN-1:0][JW-1:0] jac_y,
  // Viterbi decoder
  input  logic                          vit_in_valid,
  input  logic [1:0]                    vit_sym,
  output logic                          vit_out_valid,
  output logic                          vit_out_bit,
  // 8-point DCT
  input  logic                          dct_in_valid,
  input  logic [7:0][7:0]               dct_x,
  output logic                          dct_out_valid,
  output logic [7:0][11:0]              dct_f,
  // heapify engine
  input  logic                          heap_load,
  input  logic [(1<<HDEPTH)-2:0][HW-1:0] heap_load_keys,
  input  logic                          heap_start,
  output logic                          heap_busy,
  output logic                          heap_done,
  output logic [(1<<HDEPTH)-2:0][HW-1:0] heap_keys,
  // integer matrix multiplier
  input  logic                          mm_load_a,
  input  logic [MMM-1:0][MMM-1:0][MMN-1:0] mm_a,
  input  logic                          mm_b_valid,
  input  logic [MMM-1:0][MMN-1:0]       mm_b_col,
  output logic                          mm_c_valid,
  output logic [MMM-1:0][MM_CW-1:0]     mm_c_col,
  // distributed-arithmetic FIR filter
  input  logic                          fir_load_coef,
  input  logic [FIRM-1:0][FIRN-1:0]     fir_h,
  input  logic                          fir_in_valid,
  input  logic [FIRN-1:0]               fir_x,
  output logic                          fir_out_valid,
  output logic [2*FIRN+$clog2(FIRM)-1:0] fir_y
);

  cgc_adder #(.WIDTH(CW)) u_col (
    .a(col_a), .x(col_x), .cfg(col_cfg), .sum(col_sum), .c_top(col_c_top)
  );

  csel_adder #(.WIDTH(CSW), .SEG(SEG)) u_csel (
    .a(cs_a), .b(cs_b), .cin(cs_cin), .sum(cs_sum), .cout(cs_cout)
  );

  cgc_multiplier #(.N(MULN)) u_mul (
    .clk, .rst_n, .in_valid(mul_in_valid), .a(mul_a), .b(mul_b),
    .out_valid(mul_out_valid), .p(mul_p)
  );

  acs_unit #(.W(ACSW)) u_acs (
    .clk, .en(1'b1), .lam0(acs_lam0), .gam0(acs_gam0), .lam1(acs_lam1), .gam1(acs_gam1),
    .dec(acs_dec), .metric(acs_metric)
  );

  jacobi_grid #(.N(JN), .W(JW)) u_jac (
    .clk, .load(jac_load), .en(jac_en), .init(jac_init),
    .top(jac_top), .bottom(jac_bottom), .left(jac_left), .right(jac_right),
    .y(jac_y)
  );

  viterbi_dec #(.W(ACSW), .DEPTH(VDEPTH)) u_vit (
    .clk, .rst_n, .in_valid(vit_in_valid), .sym(vit_sym),
    .out_valid(vit_out_valid), .out_bit(vit_out_bit)
  );

  dct8 u_dct (
    .clk, .rst_n, .in_valid(dct_in_valid), .x(dct_x),
    .out_valid(dct_out_valid), .f(dct_f)
  );

  heap_array #(.DEPTH(HDEPTH), .W(HW)) u_heap (
    .clk, .rst_n, .load(heap_load), .load_keys(heap_load_keys), .start(heap_start),
    .busy(heap_busy), .done(heap_done), .keys(heap_keys)
  );

  int_matmul #(.M(MMM), .N(MMN)) u_mm (
    .clk, .rst_n, .load_a(mm_load_a), .a(mm_a), .b_valid(mm_b_valid), .b_col(mm_b_col),
    .c_valid(mm_c_valid), .c_col(mm_c_col)
  );

  fir_da #(.M(FIRM), .N(FIRN)) u_fir (
    .clk, .rst_n, .load_coef(fir_load_coef), .h(fir_h), .in_valid(fir_in_valid), .x(fir_x),
    .out_valid(fir_out_valid), .y(fir_y)
  );

endmodule
