// tb_cgc_multiplier: self-checking test of the pipelined multiplier.
// A 16x16 multiplier (default, latency 2) and an 8x8 one (latency 2) receive
// a new random operand pair nearly every cycle; expected products are queued
// and compared when out_valid rises, and the latency of every product is
// checked. Corner operands (0, all ones) come first.
module tb_cgc_multiplier;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [15:0] a, b;
  logic [7:0]  a8, b8;
  logic [31:0] p;
  logic [15:0] p8;
  logic ov, ov8;
  int checks = 0, failures = 0, cycle = 0;
  logic [31:0] q[$];
  logic [15:0] q8[$];
  int qt[$];

  cgc_multiplier dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid(ov), .p);
  cgc_multiplier #(.N(8)) dut8 (.clk, .rst_n, .in_valid, .a(a8), .b(b8), .out_valid(ov8), .p(p8));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && in_valid) begin
      q.push_back(32'(a) * 32'(b)); q8.push_back(16'(a8) * 16'(b8)); qt.push_back(cycle);
    end
    if (ov !== ov8) begin failures++; $display("FAIL valid mismatch"); end
    if (ov) begin
      logic [31:0] e;
      logic [15:0] e8;
      int t;
      e  = q.pop_front();
      e8 = q8.pop_front();
      t  = qt.pop_front();
      checks += 3;
      if (p != e)   begin failures++; if (failures < 10) $display("FAIL16 got %h exp %h", p, e); end
      if (p8 != e8) begin failures++; if (failures < 10) $display("FAIL8 got %h exp %h", p8, e8); end
      if (cycle - t != 2) begin failures++; if (failures < 10) $display("FAIL latency %0d", cycle - t); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(posedge clk); #1;
      in_valid = ($urandom % 8) != 0;
      case (n)
        0: begin a = '1; b = '1; a8 = '1; b8 = '1; end
        1: begin a = '0; b = '1; a8 = '0; b8 = '1; end
        default: begin a = 16'($urandom); b = 16'($urandom); a8 = 8'($urandom); b8 = 8'($urandom); end
      endcase
    end
    @(posedge clk); #1 in_valid = 0;
    repeat (5) @(negedge clk);
    if (q.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
