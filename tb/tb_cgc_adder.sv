// tb_cgc_adder: self-checking test of the conditional 4-input
// adder/subtractor column. Random operands, selection lines and polarity
// patterns (at most three subtracted operands) are applied to a 16-bit column
// (the default) and to a 9-bit column (odd width, half-used top CLB); the
// result is compared with +/- x_i*A_i computed in integer arithmetic
// modulo 2^WIDTH. The three-subtraction case and the all-masked case are
// each checked explicitly.
module tb_cgc_adder;
  import cgc_pkg::*;

  logic [3:0][15:0] a16;
  logic [3:0][8:0]  a9;
  logic [3:0]       x;
  cgc_cfg_t         cfg;
  logic [15:0]      s16;
  logic [8:0]       s9;
  logic [2:0]       ct16, ct9;
  int checks = 0, failures = 0;

  cgc_adder dut16 (.a(a16), .x, .cfg, .sum(s16), .c_top(ct16));
  cgc_adder #(.WIDTH(9)) dut9 (.a(a9), .x, .cfg, .sum(s9), .c_top(ct9));

  function automatic longint model(logic [3:0][15:0] op, logic [3:0] xs,
                                   logic [3:0] neg, logic [3:0] cond);
    longint r = 0;
    for (int i = 0; i < 4; i++) begin
      if (!cond[i] || xs[i]) r += neg[i] ? -longint'(op[i]) : longint'(op[i]);
    end
    return r;
  endfunction

  task automatic run(logic [3:0] neg, logic [3:0] cond);
    longint r16, r9;
    logic [3:0][15:0] a9w;
    cfg = cgc_make_cfg(neg, cond);
    for (int i = 0; i < 4; i++) begin
      a16[i] = 16'($urandom);
      a9[i]  = 9'($urandom);
      a9w[i] = 16'(a9[i]);
    end
    #1;
    r16 = model(a16, x, neg, cond);
    r9  = model(a9w, x, neg, cond);
    checks += 2;
    if (s16 != r16[15:0]) begin
      failures++;
      if (failures < 10) $display("FAIL16 neg=%b cond=%b x=%b got=%h exp=%h", neg, cond, x, s16, r16[15:0]);
    end
    if (s9 != r9[8:0]) begin
      failures++;
      if (failures < 10) $display("FAIL9 neg=%b cond=%b x=%b got=%h exp=%h", neg, cond, x, s9, r9[8:0]);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] neg;
    // A0 - A1 - A2 - A3 and all-masked subtraction
    x = 4'b1111; run(4'b1110, 4'b0000);
    x = 4'b0000; run(4'b0111, 4'b1111);
    for (int n = 0; n < 20000; n++) begin
      do neg = 4'($urandom); while (neg == 4'b1111);
      x = 4'($urandom);
      run(neg, 4'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
