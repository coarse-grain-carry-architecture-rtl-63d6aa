// tb_heap_array: self-checking test of the heapify engine. Random key sets
// (including sorted ascending sets, the worst case, and sets with many equal
// keys) are loaded into a 7-node tree (default) and a 15-node tree; after
// done, every parent must be at least as large as its children and the
// multiset of keys must be unchanged. The number of cycles from start to
// done is checked against a loose bound of 4*DEPTH*DEPTH + 8 cycles.
module tb_heap_array;
  logic clk = 0, rst_n = 0, load = 0, start = 0;
  logic [6:0][7:0]  lk3, k3;
  logic [14:0][7:0] lk4, k4;
  logic busy3, done3, busy4, done4;
  int checks = 0, failures = 0, maxcyc3 = 0, maxcyc4 = 0;

  heap_array dut3 (.clk, .rst_n, .load, .load_keys(lk3), .start, .busy(busy3), .done(done3), .keys(k3));
  heap_array #(.DEPTH(4)) dut4 (.clk, .rst_n, .load, .load_keys(lk4), .start, .busy(busy4), .done(done4), .keys(k4));

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int c3, c4;
    int h3[int], h4[int];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      h3.delete(); h4.delete();
      for (int i = 0; i < 7; i++) begin
        lk3[i] = (n % 3 == 0) ? 8'(i * 3) : (n % 3 == 1) ? 8'($urandom % 4) : 8'($urandom);
        h3[lk3[i]] = h3.exists(lk3[i]) ? h3[lk3[i]] + 1 : 1;
      end
      for (int i = 0; i < 15; i++) begin
        lk4[i] = (n % 3 == 0) ? 8'(i) : (n % 3 == 1) ? 8'($urandom % 4) : 8'($urandom);
        h4[lk4[i]] = h4.exists(lk4[i]) ? h4[lk4[i]] + 1 : 1;
      end
      load = 1;
      @(negedge clk);
      load = 0; start = 1;
      @(negedge clk);
      start = 0;
      c3 = 1; c4 = 1;
      while (!(done3 && done4)) begin
        @(negedge clk);
        if (!done3) c3++;
        if (!done4) c4++;
      end
      if (c3 > maxcyc3) maxcyc3 = c3;
      if (c4 > maxcyc4) maxcyc4 = c4;
      chk(c3 <= 4 * 9 + 8, $sformatf("depth-3 took %0d cycles", c3));
      chk(c4 <= 4 * 16 + 8, $sformatf("depth-4 took %0d cycles", c4));
      for (int i = 0; i < 3; i++) chk(k3[i] >= k3[2*i+1] && k3[i] >= k3[2*i+2], $sformatf("heap3 node %0d", i));
      for (int i = 0; i < 7; i++) chk(k4[i] >= k4[2*i+1] && k4[i] >= k4[2*i+2], $sformatf("heap4 node %0d", i));
      for (int i = 0; i < 7; i++) if (h3.exists(k3[i])) h3[k3[i]]--; else h3[k3[i]] = -1;
      for (int i = 0; i < 15; i++) if (h4.exists(k4[i])) h4[k4[i]]--; else h4[k4[i]] = -1;
      foreach (h3[k]) chk(h3[k] == 0, "keys3 changed");
      foreach (h4[k]) chk(h4[k] == 0, "keys4 changed");
    end
    $display("max cycles to done: depth 3 = %0d, depth 4 = %0d", maxcyc3, maxcyc4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
