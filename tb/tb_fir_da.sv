// tb_fir_da: self-checking test of the distributed-arithmetic FIR filter.
// A 4-tap 8-bit filter (default, latency 4) and a 12-tap 8-bit filter (three
// tap groups, latency 5) filter the same random stream with random idle
// cycles. Coefficients are reloaded from time to time while the stream is
// idle; the first set is all -128 with full-scale samples, for the largest
// magnitudes. Each output is compared with the exact convolution computed
// here from a copy of the delay line, and its latency is checked.
module tb_fir_da;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, load_coef = 0, in_valid = 0;
  logic [3:0][N-1:0]  h4;
  logic [11:0][N-1:0] h12;
  logic [N-1:0]       x;
  logic [17:0]        y4;
  logic [19:0]        y12;
  logic ov4, ov12;
  int checks = 0, failures = 0, cycle = 0;
  int hist[12];                 // reference delay line
  int c4[4], c12[12];           // reference coefficients
  int q4[$], q12[$], qt4[$], qt12[$];

  fir_da dut4 (.clk, .rst_n, .load_coef, .h(h4), .in_valid, .x, .out_valid(ov4), .y(y4));
  fir_da #(.M(12)) dut12 (.clk, .rst_n, .load_coef, .h(h12), .in_valid, .x,
                          .out_valid(ov12), .y(y12));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (ov4) begin
      int e, t;
      logic signed [17:0] yv;
      e = q4.pop_front(); t = qt4.pop_front(); yv = y4;
      checks += 2;
      if (int'(yv) != e) begin failures++; if (failures < 10) $display("FAIL4 got %0d exp %0d", yv, e); end
      if (cycle - t != 4) begin failures++; if (failures < 10) $display("FAIL4 latency %0d", cycle - t); end
    end
    if (ov12) begin
      int e, t;
      logic signed [19:0] yv;
      e = q12.pop_front(); t = qt12.pop_front(); yv = y12;
      checks += 2;
      if (int'(yv) != e) begin failures++; if (failures < 10) $display("FAIL12 got %0d exp %0d", yv, e); end
      if (cycle - t != 5) begin failures++; if (failures < 10) $display("FAIL12 latency %0d", cycle - t); end
    end
  end

  task automatic set_coef(input bit extreme);
    logic signed [N-1:0] v;
    for (int t = 0; t < 12; t++) begin
      v = extreme ? -8'sd128 : N'($urandom);
      h12[t] = v; c12[t] = int'(v);
      if (t < 4) begin h4[t] = v; c4[t] = int'(v); end
    end
  endtask

  initial begin
    logic signed [N-1:0] xs;
    for (int t = 0; t < 12; t++) hist[t] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(posedge clk); #1;
      if (n % 500 == 0) begin
        // reload the tables while no sample is in flight
        in_valid = 0;
        repeat (8) begin @(posedge clk); #1; end
        set_coef(n == 0);
        load_coef = 1;
        @(posedge clk); #1 load_coef = 0;
      end
      in_valid = ($urandom % 6) != 0;
      xs = (n < 40) ? ((n % 2) ? -8'sd128 : 8'sd127) : N'($urandom);
      if (n < 20) xs = -8'sd128;
      x = xs;
      if (in_valid) begin
        int s4, s12;
        for (int t = 11; t > 0; t--) hist[t] = hist[t-1];
        hist[0] = int'(xs);
        s4 = 0; s12 = 0;
        for (int t = 0; t < 4; t++)  s4  += c4[t] * hist[t];
        for (int t = 0; t < 12; t++) s12 += c12[t] * hist[t];
        q4.push_back(s4); q12.push_back(s12); qt4.push_back(cycle); qt12.push_back(cycle);
      end
    end
    @(posedge clk); #1 in_valid = 0;
    repeat (8) @(negedge clk);
    if (q4.size() != 0 || q12.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
