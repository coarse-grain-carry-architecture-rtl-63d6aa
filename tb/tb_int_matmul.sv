// tb_int_matmul: self-checking test of the integer matrix multiplier.
// A 4x4 8-bit unit (default) and a 2x2 8-bit unit run side by side. Random
// matrices A are loaded, then the columns of random matrices B are streamed
// with random idle cycles; sometimes a new A is loaded on the same edge as a
// B column, which must still use the old A. Each output column is compared
// with a reference product computed here, and its latency (3 cycles) is
// checked. All-ones matrices come first, for the largest sums.
module tb_int_matmul;
  localparam int M = 4, N = 8, CW = 18;
  logic clk = 0, rst_n = 0;
  logic load_a = 0, b_valid = 0;
  logic [M-1:0][M-1:0][N-1:0] a;
  logic [M-1:0][N-1:0]        b_col;
  logic [M-1:0][CW-1:0]       c_col;
  logic [1:0][17:0]           c2_col;
  logic cv, cv2;
  int checks = 0, failures = 0, cycle = 0;
  int unsigned am[M][M];          // reference copy of the loaded A
  logic [M-1:0][CW-1:0] q[$];
  logic [1:0][17:0]     q2[$];
  int qt[$];

  int_matmul dut (.clk, .rst_n, .load_a, .a, .b_valid, .b_col, .c_valid(cv), .c_col);
  int_matmul #(.M(2)) dut2 (
    .clk, .rst_n, .load_a, .a({a[1][1:0], a[0][1:0]}), .b_valid, .b_col(b_col[1:0]),
    .c_valid(cv2), .c_col(c2_col)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (cv !== cv2) begin failures++; $display("FAIL valid mismatch"); end
    if (cv) begin
      logic [M-1:0][CW-1:0] e;
      logic [1:0][17:0]     e2;
      int t;
      e  = q.pop_front();
      e2 = q2.pop_front();
      t  = qt.pop_front();
      checks += 3;
      if (c_col != e)   begin failures++; if (failures < 10) $display("FAIL4 got %h exp %h", c_col, e); end
      if (c2_col != e2) begin failures++; if (failures < 10) $display("FAIL2 got %h exp %h", c2_col, e2); end
      if (cycle - t != 3) begin failures++; if (failures < 10) $display("FAIL latency %0d", cycle - t); end
    end
  end

  // drive one cycle; the column (if any) uses the A loaded before this edge
  task automatic drive(input logic ld, input logic bv, input bit ones);
    logic [M-1:0][CW-1:0] e;
    logic [1:0][17:0]     e2;
    load_a  = ld;
    b_valid = bv;
    for (int i = 0; i < M; i++)
      for (int k = 0; k < M; k++) a[i][k] = ones ? '1 : N'($urandom);
    for (int k = 0; k < M; k++) b_col[k] = ones ? '1 : N'($urandom);
    if (bv) begin
      for (int i = 0; i < M; i++) begin
        int unsigned s = 0;
        for (int k = 0; k < M; k++) s += am[i][k] * b_col[k];
        e[i] = CW'(s);
      end
      for (int i = 0; i < 2; i++) begin
        int unsigned s = 0;
        for (int k = 0; k < 2; k++) s += am[i][k] * b_col[k];
        e2[i] = 18'(s);
      end
      q.push_back(e); q2.push_back(e2); qt.push_back(cycle);
    end
    if (ld)
      for (int i = 0; i < M; i++)
        for (int k = 0; k < M; k++) am[i][k] = a[i][k];
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 drive(1, 0, 1);
    for (int j = 0; j < M; j++) begin @(posedge clk); #1 drive(0, 1, 1); end
    for (int n = 0; n < 2000; n++) begin
      // a new A, then the M columns of B with random gaps
      @(posedge clk); #1 drive(1, ($urandom % 4) == 0, 0);
      for (int j = 0; j < M; j++) begin
        while (($urandom % 5) == 0) begin @(posedge clk); #1 drive(0, 0, 0); end
        @(posedge clk); #1 drive(0, 1, 0);
      end
    end
    @(posedge clk); #1 drive(0, 0, 0);
    repeat (6) @(negedge clk);
    if (q.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
