// tb_jacobi_grid: self-checking test of the Jacobi relaxation array. A 4x4
// array (default) and a 2x2 array are loaded with random values, given
// random boundaries, and stepped; after every step each node is compared with
// a reference array updated in the testbench as the truncated average of its
// four neighbours. Steps with en low must leave the array unchanged.
module tb_jacobi_grid;
  localparam int N = 4, W = 16;
  logic clk = 0, load = 0, en = 0;
  logic [N-1:0][N-1:0][W-1:0] init, y;
  logic [N-1:0][W-1:0] top, bottom, left, right;
  logic [1:0][1:0][W-1:0] init2, y2;
  int checks = 0, failures = 0;
  int unsigned ref4[N][N], ref2[2][2];

  jacobi_grid dut (.clk, .load, .en, .init, .top, .bottom, .left, .right, .y);
  jacobi_grid #(.N(2)) dut2 (.clk, .load, .en, .init(init2), .top(top[1:0]), .bottom(bottom[1:0]),
                             .left(left[1:0]), .right(right[1:0]), .y(y2));

  always #5 clk = ~clk;

  function automatic int unsigned nb(int unsigned g[N][N], int n, int r, int c);
    int unsigned s;
    s  = (r == 0)     ? top[c]    : g[r-1][c];
    s += (r == n - 1) ? bottom[c] : g[r+1][c];
    s += (c == 0)     ? left[r]   : g[r][c-1];
    s += (c == n - 1) ? right[r]  : g[r][c+1];
    return s >> 2;
  endfunction

  task automatic compare();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (int'(y[r][c]) != ref4[r][c]) begin
          failures++;
          if (failures < 10) $display("FAIL4 [%0d][%0d] got %0d exp %0d", r, c, y[r][c], ref4[r][c]);
        end
      end
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (int'(y2[r][c]) != ref2[r][c]) begin
          failures++;
          if (failures < 10) $display("FAIL2 [%0d][%0d] got %0d exp %0d", r, c, y2[r][c], ref2[r][c]);
        end
      end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned nxt[N][N], g2[N][N];
    for (int run = 0; run < 20; run++) begin
      @(negedge clk);
      for (int r = 0; r < N; r++) begin
        top[r] = 16'($urandom); bottom[r] = 16'($urandom);
        left[r] = 16'($urandom); right[r] = 16'($urandom);
        for (int c = 0; c < N; c++) begin
          init[r][c] = 16'($urandom); ref4[r][c] = init[r][c];
        end
      end
      for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
        init2[r][c] = 16'($urandom); ref2[r][c] = init2[r][c];
      end
      load = 1;
      @(negedge clk);
      load = 0;
      compare();
      for (int step = 0; step < 30; step++) begin
        en = (step % 7) != 3;
        if (en) begin
          for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) nxt[r][c] = nb(ref4, N, r, c);
          for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) g2[r][c] = (r < 2 && c < 2) ? ref2[r][c] : 0;
          for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) ref2[r][c] = nb(g2, 2, r, c);
          ref4 = nxt;
        end
        @(negedge clk);
        compare();
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
