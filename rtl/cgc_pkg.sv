// cgc_pkg: types shared by the coarse-grain carry architecture.
//
// A coarse-grain carry column adds four operands A0..A3 per bit. Each operand
// passes an And_Xor conditioner: it is ANDed with a selection line x_i (when the
// operand is configured as conditional) and XORed with a static polarity bit
// (to subtract it). The three carry paths of the column (two (3,2)-counter
// carries and the ordinary carry chain) are initialised at the least
// significant bit by configuration multiplexers; setting a carry-in to one
// completes the two's complement of one inverted operand, so at most three
// operands can be subtracted.
//
// The grouping of these configuration cells into one packed struct is this
// design's own choice; the cells themselves are the small configuration boxes
// of the cell drawing.
package cgc_pkg;

  // Static configuration of one coarse-grain carry column.
  typedef struct packed {
    logic [3:0] neg;      // operand i is subtracted (XOR with 1)
    logic [3:0] cond;     // operand i is gated by its selection line x_i
    logic       c1_init;  // carry-in of the first (3,2) counter path at the LSB
    logic       c2_init;  // carry-in of the second (3,2) counter path at the LSB
    logic       c0_init;  // carry-in of the carry chain at the LSB
  } cgc_cfg_t;

  // Plain addition of all four operands, no masking.
  localparam cgc_cfg_t CGC_ADD4 = '{neg: 4'b0000, cond: 4'b0000,
                                    c1_init: 1'b0, c2_init: 1'b0, c0_init: 1'b0};

  // Build a configuration that subtracts the operands flagged in neg and
  // gates those flagged in cond. The number of subtracted operands must not
  // exceed three, the number of carry paths.
  function automatic cgc_cfg_t cgc_make_cfg(input logic [3:0] neg,
                                            input logic [3:0] cond);
    cgc_cfg_t c;
    logic [1:0] k;
    k = 2'(neg[0]) + 2'(neg[1]) + 2'(neg[2]) + 2'(neg[3]);
    c.neg     = neg;
    c.cond    = cond;
    c.c0_init = (k >= 2'd1);
    c.c1_init = (k >= 2'd2);
    c.c2_init = (k == 2'd3);
    return c;
  endfunction

endpackage
