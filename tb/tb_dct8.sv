// tb_dct8: self-checking test of the pipelined 8-point DCT.
// Random signed 8-bit vectors (plus all-max, all-min and alternating
// extremes) are applied with random gaps; each output vector is compared with
// S_k * sum_n x[n]*cos((2n+1)k*pi/16) computed in floating point, within a
// tolerance of 4 LSB for the 8-bit coefficients and truncation. The latency
// from in_valid to out_valid must be 4 cycles.
module tb_dct8;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0][7:0]  x;
  logic [7:0][11:0] f;
  logic out_valid;
  int checks = 0, failures = 0, cycle = 0;
  real rbuf[64][8];
  int  wr = 0, rd = 0;
  int  qt[$];
  real maxerr = 0.0;

  dct8 dut (.*);

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
    if (rst_n && in_valid) begin
      real r[8];
      for (int k = 0; k < 8; k++) begin
        real acc;
        logic signed [7:0] xv;
        acc = 0.0;
        for (int n = 0; n < 8; n++) begin
          xv = x[n];
          acc += real'(xv) * $cos(real'((2 * n + 1) * k) * 3.14159265358979 / 16.0);
        end
        r[k] = (k == 0) ? acc : acc * 2.0 * $cos(real'(k) * 3.14159265358979 / 16.0);
      end
      rbuf[wr % 64] = r; wr++; qt.push_back(cycle);
    end
    if (out_valid) begin
      real r[8];
      int t;
      r = rbuf[rd % 64]; rd++;
      t = qt.pop_front();
      checks++;
      if (cycle - t != 4) begin failures++; $display("FAIL latency %0d", cycle - t); end
      for (int k = 0; k < 8; k++) begin
        real e;
        logic signed [11:0] fv;
        fv = f[k];
        e = real'(fv) - r[k];
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        checks++;
        if (e > 4.0) begin
          failures++;
          if (failures < 10) $display("FAIL F%0d got %0d exp %f", k, fv, r[k]);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk); #1;
      in_valid = ($urandom % 4) != 0;
      for (int i = 0; i < 8; i++) begin
        case (n)
          0: x[i] = 8'h7f;
          1: x[i] = 8'h80;
          2: x[i] = (i % 2) ? 8'h80 : 8'h7f;
          3: x[i] = ((i / 2) % 2) ? 8'h80 : 8'h7f;
          default: x[i] = 8'($urandom);
        endcase
      end
    end
    @(posedge clk); #1 in_valid = 0;
    repeat (6) @(posedge clk);
    if (wr != rd) begin failures++; $display("FAIL results missing"); end
    $display("largest error: %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
