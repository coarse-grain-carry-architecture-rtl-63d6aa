// dr_pkg: configuration of one dual-rail carry cell (one CLB, two bits).
//
// A dual-rail carry column can be used as a plain ripple adder (no cell in
// last-cell mode) or as a one-level carry-select adder: the column is cut
// into segments, the first CLB of a segment starts its two rails at 0 and 1,
// and the last CLB of a segment drives the carry select signal, chosen by the
// select signal of the previous segment, to the next segment. The select
// signal may be carried in inverted polarity in every other segment; in_inv
// and out_inv say how a cell reads and drives it.
package dr_pkg;

  typedef struct packed {
    logic first;    // segment start: zero rail starts at 0, one rail at 1
    logic last;     // last-cell mode: carry select output enabled
    logic in_inv;   // incoming select signal is active low
    logic out_inv;  // drive the outgoing select signal active low
  } dr_cfg_t;

endpackage
