// tb_csel_adder: self-checking test of the dual-rail carry-select adder.
// Instances: 32-bit with 4-bit segments (default), 32-bit with 8- and 12-bit
// segments (12 leaves a shorter last segment) and 64-bit with 12-bit
// segments. Random operands plus carry-propagating corner cases (all ones,
// a + ~a with carry-in) are compared with a + b + cin. The number of
// additions in which a carry crossed a segment boundary is counted and must
// be non-zero.
module tb_csel_adder;
  logic [31:0] a, b, s4, s8, s12;
  logic [63:0] a64, b64, s64;
  logic        cin, co4, co8, co12, co64;
  int checks = 0, failures = 0, crossings = 0;

  csel_adder                      d4  (.a, .b, .cin, .sum(s4),  .cout(co4));
  csel_adder #(.SEG(8))           d8  (.a, .b, .cin, .sum(s8),  .cout(co8));
  csel_adder #(.SEG(12))          d12 (.a, .b, .cin, .sum(s12), .cout(co12));
  csel_adder #(.WIDTH(64), .SEG(12)) d64 (.a(a64), .b(b64), .cin, .sum(s64), .cout(co64));

  task automatic check();
    logic [32:0] e;
    logic [64:0] e64;
    #1;
    e   = 33'(a) + 33'(b) + 33'(cin);
    e64 = 65'(a64) + 65'(b64) + 65'(cin);
    checks += 4;
    if ({co4, s4} != e)   begin failures++; if (failures < 10) $display("FAIL seg4 %h+%h+%b got %h", a, b, cin, {co4, s4}); end
    if ({co8, s8} != e)   begin failures++; if (failures < 10) $display("FAIL seg8 %h+%h+%b got %h", a, b, cin, {co8, s8}); end
    if ({co12, s12} != e) begin failures++; if (failures < 10) $display("FAIL seg12 %h+%h+%b", a, b, cin); end
    if ({co64, s64} != e64) begin failures++; if (failures < 10) $display("FAIL w64 %h+%h+%b", a64, b64, cin); end
    // a carry into bit 4 (a segment boundary at SEG=4) that came from below
    if (((33'(a[3:0]) + 33'(b[3:0]) + 33'(cin)) >> 4) != 0 && (a[4] ^ b[4])) crossings++;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '0; cin = 1; a64 = '1; b64 = '0; check();
    a = 32'h1234_5678; b = ~a; cin = 1; a64 = {a, a}; b64 = ~a64; check();
    a = '1; b = '1; cin = 0; a64 = '1; b64 = '1; check();
    for (int n = 0; n < 20000; n++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom};
      if (n % 4 == 0) begin b = ~a ^ (32'h1 << (n % 32)); b64 = ~a64; end
      check();
    end
    if (crossings == 0) begin failures++; $display("no carry crossed a segment"); end
    $display("carry crossings into segment 1: %0d", crossings);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
