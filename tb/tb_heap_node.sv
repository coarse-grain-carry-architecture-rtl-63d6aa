// tb_heap_node: self-checking test of one heap node with children.
// Each trial loads a random key, presents random child keys, runs phase 0
// and phase 1 with the node active and checks the swap outputs (larger child,
// ties to the left, swap only when the child is strictly larger) and the new
// key. Trials with the node inactive must not swap, and a from_parent cycle
// must copy the parent's key. Keys are drawn from a small range to get ties.
module tb_heap_node;
  logic clk = 0, load = 0, phase = 0, active = 0, from_parent = 0;
  logic [7:0] load_val, p_val, l_val, r_val, val;
  logic swap_l, swap_r;
  int checks = 0, failures = 0, n_swap = 0;

  heap_node dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
    logic [7:0] v, big;
    logic el, er, act;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      v = (n % 2) ? 8'($urandom) : 8'($urandom % 8);
      load = 1; load_val = v;
      @(negedge clk);
      load = 0;
      chk(val == v, "load");
      l_val = (n % 2) ? 8'($urandom) : 8'($urandom % 8);
      r_val = (n % 2) ? 8'($urandom) : 8'($urandom % 8);
      act = (n % 5) != 0;
      active = act; phase = 0;
      @(negedge clk);
      phase = 1;
      #1;
      big = (r_val > l_val) ? r_val : l_val;
      el = act && (big > v) && !(r_val > l_val);
      er = act && (big > v) && (r_val > l_val);
      chk(swap_l == el && swap_r == er, $sformatf("swap v=%0d l=%0d r=%0d got %b%b", v, l_val, r_val, swap_l, swap_r));
      if (el || er) n_swap++;
      @(negedge clk);
      active = 0; phase = 0;
      chk(val == ((el || er) ? big : v), "swap value");
      from_parent = 1; p_val = 8'($urandom);
      @(negedge clk);
      from_parent = 0;
      chk(val == p_val, "from parent");
    end
    if (n_swap == 0) begin failures++; $display("FAIL no swap happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
