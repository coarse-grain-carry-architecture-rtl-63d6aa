// heap_node: one node of a parallel binary-heap (heapify) array.
//
// Every node holds a W-bit key in a register whose next value comes from a
// 4-to-1 multiplexer: the load value, the parent's key, the left child's key
// or the right child's key. The multiplexer is a coarse-grain carry column
// used as a conditional adder with one-hot selection lines
//   next = load*load_val + from_parent*p_val + swap_l*l_val + swap_r*r_val
// (the register keeps its value when no line is set).
//
// A node with children (HAS_CHILDREN = 1) also performs the three-way
// comparison of itself and its two children with a single comparator column,
// time-multiplexed over two phases, using the column's selection lines to
// pick the operands:
//   phase 0: d = l_val - r_val                 -> big_r = (d < 0)
//   phase 1: d = p - (big_r ? r_val : l_val)   -> swap  = (d < 0)
// In phase 1 of a step in which the node is active, swap_l / swap_r tell the
// chosen child to take the parent's key, and the node takes the child's key.
// Ties keep the left child and do not swap.
//
// Interface and timing: phase alternates every clock (driven by the array
// controller); active marks the steps in which this node acts as a parent;
// swap_l/swap_r are combinational outputs valid in phase 1 and take effect on
// the next clock edge. Keys are unsigned. No reset: keys are defined by load.
//
// The time-multiplexed three-way comparison and the conditional-adder
// multiplexer follow the document; the phase encoding, tie rules and the
// comparator's operand selection through the selection lines are this
// design's choices.
module heap_node
  import cgc_pkg::*;
#(
  parameter int unsigned W            = 8,
  parameter bit          HAS_CHILDREN = 1'b1
) (
  input  logic         clk,
  input  logic         load,         // take load_val
  input  logic [W-1:0] load_val,
  input  logic         phase,        // 0: compare children, 1: compare with parent
  input  logic         active,       // this node is a parent in the current step
  input  logic         from_parent,  // parent swaps with this node
  input  logic [W-1:0] p_val,        // parent's key
  input  logic [W-1:0] l_val,        // left child's key
  input  logic [W-1:0] r_val,        // right child's key
  output logic [W-1:0] val,
  output logic         swap_l,
  output logic         swap_r
);

  localparam cgc_cfg_t CFG_MUX = cgc_make_cfg(4'b0000, 4'b1111);

  logic [3:0][W-1:0] mux_ops;
  logic [3:0]        mux_sel;
  logic [W-1:0]      mux_out;

  if (HAS_CHILDREN) begin : g_cmp
    // operands: A0 = own key, A1 = -left, A2 = -right, A3 = +left
    localparam cgc_cfg_t CFG_CMP = cgc_make_cfg(4'b0110, 4'b1111);
    logic [3:0][W+1:0] cmp_ops;
    logic [3:0]        cmp_sel;
    logic [W+1:0]      d;
    logic              big_r, swap;

    assign cmp_ops = {(W+2)'(l_val), (W+2)'(r_val), (W+2)'(l_val), (W+2)'(val)};
    assign cmp_sel = phase ? {1'b0, big_r, ~big_r, 1'b1}
                           : {1'b1, 1'b1, 1'b0, 1'b0};

    cgc_adder #(.WIDTH(W + 2)) u_cmp (
      .a(cmp_ops), .x(cmp_sel), .cfg(CFG_CMP), .sum(d), .c_top()
    );

    always_ff @(posedge clk) begin
      if (active && !phase) big_r <= d[W+1];
    end

    assign swap   = active && phase && d[W+1];
    assign swap_l = swap && !big_r;
    assign swap_r = swap && big_r;
  end else begin : g_leaf
    assign swap_l = 1'b0;
    assign swap_r = 1'b0;
  end

  assign mux_ops = {r_val, l_val, p_val, load_val};
  assign mux_sel = load ? 4'b0001 : {swap_r, swap_l, from_parent, 1'b0};

  cgc_adder #(.WIDTH(W)) u_mux (
    .a(mux_ops), .x(mux_sel), .cfg(CFG_MUX), .sum(mux_out), .c_top()
  );

  always_ff @(posedge clk) begin
    if (mux_sel != 4'b0000) val <= mux_out;
  end

endmodule
