// viterbi_dec: hard-decision Viterbi decoder for the 4-state, rate-1/2
// convolutional code with generators 7 and 5 (octal), built around four
// add-compare-select units of the coarse-grain carry architecture.
//
// Trellis: the state is the last two input bits {u[t-1], u[t-2]}; input u
// from state {b1, b0} emits (u^b1^b0, u^b0) and moves to state {u, b1}. State
// {u, b1} is therefore reached from {b1, 0} and {b1, 1}.
// Metric update: for each state one acs_unit adds the two predecessor state
// metrics to their branch metrics (Hamming distance, 0..2, between the
// received pair and the branch's code pair), compares them in one 4-input
// adder/subtractor column and keeps the smaller; its decision is the b0 of
// the surviving predecessor. When all four metrics reach 2^(W-1) the bit is
// cleared in all of them (the spread of the metrics is at most 4, so the
// order is preserved).
// Traceback: the last DEPTH decision vectors are kept in a shift register.
// After every symbol the decoder starts from the state with the smallest
// metric and walks DEPTH-1 steps back, state {s1, s0} -> {s0, dec[s]}; the
// first bit of the oldest state reached is the decoded bit of the symbol
// received DEPTH-1 symbols earlier.
//
// Interface: sym = {c0, c1} received bits (c0 from generator 7), in_valid
// marks a symbol. out_valid/out_bit: one decoded bit per symbol, starting
// once DEPTH symbols have been received; rst_n (asynchronous, active low)
// starts a new block in state 0.
// Timing: out_bit for symbol t is valid in the cycle after symbol t+DEPTH-1
// was accepted.
//
// The state count, the code rate, the ACS mapping and metric update plus
// traceback follow the document; the generator pair (7,5), hard-decision
// metrics, the normalisation rule, traceback from the best state and the
// depth are this design's choices.
module viterbi_dec #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] sym,        // {c0, c1}
  output logic       out_valid,
  output logic       out_bit
);

  logic [3:0][W:0]     metric;     // registered state metrics (from the ACS units)
  logic [3:0][W-1:0]   lam;        // normalised metrics fed back
  logic [3:0]          dec;        // newest decisions (registered in the ACS units)
  logic [DEPTH-2:0][3:0] hist;     // older decisions, hist[0] newest
  logic                init;       // first symbol: start from state 0
  logic [$clog2(DEPTH+1)-1:0] cnt;

  // normalisation and start-up metrics
  always_comb begin
    logic all_hi;
    all_hi = 1'b1;
    for (int s = 0; s < 4; s++) all_hi &= metric[s][W-1];
    for (int s = 0; s < 4; s++) begin
      if (init) lam[s] = (s == 0) ? '0 : W'(8);
      else      lam[s] = all_hi ? {1'b0, metric[s][W-2:0]} : metric[s][W-1:0];
    end
  end

  for (genvar ns = 0; ns < 4; ns++) begin : g_acs
    localparam logic U  = ns[1];
    localparam logic B1 = ns[0];
    // code bits of the two branches into this state (predecessor b0 = 0 / 1)
    localparam logic [1:0] C_P0 = {U ^ B1 ^ 1'b0, U ^ 1'b0};
    localparam logic [1:0] C_P1 = {U ^ B1 ^ 1'b1, U ^ 1'b1};
    logic [W-1:0] g0, g1;
    always_comb begin
      logic [1:0] e0, e1;
      e0 = sym ^ C_P0;
      e1 = sym ^ C_P1;
      g0 = W'(e0[0]) + W'(e0[1]);
      g1 = W'(e1[0]) + W'(e1[1]);
    end
    acs_unit #(.W(W)) u_acs (
      .clk, .en(in_valid),
      .lam0(lam[{B1, 1'b0}]), .gam0(g0),
      .lam1(lam[{B1, 1'b1}]), .gam1(g1),
      .dec(dec[ns]), .metric(metric[ns])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init      <= 1'b1;
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        init <= 1'b0;
        if (cnt != DEPTH[$bits(cnt)-1:0]) cnt <= cnt + 1'b1;
        out_valid <= (cnt >= DEPTH[$bits(cnt)-1:0] - 1'b1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) hist <= {hist[DEPTH-3:0], dec};
  end

  // traceback from the best state
  always_comb begin
    logic [1:0] s;
    logic [W:0] best;
    s    = 2'd0;
    best = metric[0];
    for (int k = 1; k < 4; k++) begin
      if (metric[k] < best) begin
        best = metric[k];
        s    = 2'(k);
      end
    end
    s = {s[0], dec[s]};
    for (int k = 0; k < DEPTH - 2; k++) s = {s[0], hist[k][s]};
    out_bit = s[1];
  end

endmodule
