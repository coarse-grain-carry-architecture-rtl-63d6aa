// heap_array: parallel heapify engine for a complete binary tree of
// 2^DEPTH - 1 keys, one heap_node per tree node.
//
// After load (all keys written in one cycle, key i at tree position i, the
// children of i at 2i+1 and 2i+2), start begins heapifying into a max-heap
// (every parent not smaller than its children). Work proceeds in steps of
// two clock cycles (phase 0: children compared, phase 1: larger child
// compared with the parent and swapped when larger). Parents on even levels
// act in one step and parents on odd levels in the next, so that no node is
// touched by two swaps at once. The engine stops (done = 1, busy = 0) after
// two consecutive steps without a swap, which means every parent is already
// at least as large as both children.
//
// Interface: load/load_keys write the tree (ignored while busy); start
// begins heapifying; keys shows the tree at all times. rst_n (asynchronous,
// active low) returns the controller to idle.
// Timing: 2 cycles per step; a tree of DEPTH levels needs at most about
// 2*(DEPTH+1) steps after the last swap has occurred, plus the two quiet
// steps.
//
// The node-parallel heapify with per-node time-multiplexed comparison
// follows the document; the level-parity schedule and the stopping rule are
// this design's choices.
module heap_array #(
  parameter int unsigned DEPTH = 3,
  parameter int unsigned W     = 8,
  localparam int unsigned NN   = (1 << DEPTH) - 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [NN-1:0][W-1:0]  load_keys,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [NN-1:0][W-1:0]  keys
);

  localparam int unsigned NINT = (1 << (DEPTH - 1)) - 1;   // nodes with children

  logic          phase, parity;
  logic [1:0]    quiet;
  logic [NN-1:0] swap_l, swap_r;

  function automatic int unsigned level_of(int unsigned i);
    int unsigned l = 0;
    int unsigned v = i + 1;
    while (v > 1) begin v = v >> 1; l++; end
    return l;
  endfunction

  for (genvar i = 0; i < NN; i++) begin : g_node
    localparam bit INTERNAL = (i < NINT);
    localparam int unsigned PAR = (i == 0) ? 0 : (i - 1) / 2;
    logic         from_parent, act;
    logic [W-1:0] lv, rv;

    if (i == 0) begin : g_root
      assign from_parent = 1'b0;
    end else if (i % 2 == 1) begin : g_left
      assign from_parent = swap_l[PAR];
    end else begin : g_right
      assign from_parent = swap_r[PAR];
    end

    if (INTERNAL) begin : g_kids
      assign lv = keys[2*i+1];
      assign rv = keys[2*i+2];
    end else begin : g_nokids
      assign lv = '0;
      assign rv = '0;
    end

    assign act = busy && INTERNAL && ((level_of(i) % 2) == int'(parity));

    heap_node #(.W(W), .HAS_CHILDREN(INTERNAL)) u_node (
      .clk, .load(load && !busy), .load_val(load_keys[i]),
      .phase, .active(act), .from_parent,
      .p_val(keys[PAR]), .l_val(lv), .r_val(rv),
      .val(keys[i]), .swap_l(swap_l[i]), .swap_r(swap_r[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      phase        <= 1'b0;
      parity       <= 1'b0;
      quiet        <= '0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        done   <= 1'b0;
        phase  <= 1'b0;
        parity <= 1'b0;
        quiet  <= '0;
      end else if (load) begin
        done <= 1'b0;
      end
    end else begin
      phase <= ~phase;
      if (phase) begin
        parity <= ~parity;
        if ((swap_l | swap_r) != '0) begin
          quiet <= '0;
        end else if (quiet == 2'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          quiet <= quiet + 2'd1;
        end
      end
    end
  end

endmodule
