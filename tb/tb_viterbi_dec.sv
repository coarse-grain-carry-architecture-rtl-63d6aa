// tb_viterbi_dec: self-checking test of the 4-state Viterbi decoder.
// Random message bits are encoded in the testbench with the rate-1/2 (7,5)
// code from state 0; single channel bit errors are injected at random
// positions at least 12 symbols apart (well within what the code corrects).
// Symbols are presented with random idle cycles. Every decoded bit must equal
// the message bit it stands for, in order, and the number of decoded bits
// must be the number of symbols minus DEPTH-1. Blocks restart with rst_n.
module tb_viterbi_dec;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] sym;
  logic out_valid, out_bit;
  int checks = 0, failures = 0, n_err = 0;
  logic msg[$];

  viterbi_dec dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      logic e;
      e = msg.pop_front();
      checks++;
      if (out_bit != e) begin failures++; if (failures < 10) $display("FAIL decoded %b exp %b", out_bit, e); end
    end
  end

  initial begin
    logic b1, b0, u;
    int last_err, nsym, got;
    for (int blk = 0; blk < 40; blk++) begin
      rst_n = 0;
      msg.delete();
      @(posedge clk); #1 rst_n = 1;
      b1 = 0; b0 = 0; last_err = -100;
      nsym = 100 + int'($urandom % 100);
      for (int t = 0; t < nsym; t++) begin
        while (($urandom % 4) == 0) begin @(posedge clk); #1; in_valid = 0; end
        u = 1'($urandom);
        msg.push_back(u);
        sym = {u ^ b1 ^ b0, u ^ b0};
        if (t - last_err >= 12 && ($urandom % 6) == 0) begin
          sym ^= (($urandom % 2) != 0) ? 2'b10 : 2'b01;
          last_err = t;
          n_err++;
        end
        b0 = b1; b1 = u;
        in_valid = 1;
        @(posedge clk); #1;
        in_valid = 0;
      end
      repeat (2) @(posedge clk); #1;
      got = msg.size();
      checks++;
      if (got != DEPTH - 1) begin failures++; $display("FAIL %0d bits left undecoded", got); end
    end
    $display("channel errors injected: %0d", n_err);
    if (n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
