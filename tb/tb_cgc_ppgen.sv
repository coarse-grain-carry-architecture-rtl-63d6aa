// tb_cgc_ppgen: self-checking test of the non-Booth partial product generator.
// For random 16-bit multiplicands every multiplier nibble 0..15 is applied
// and the output is compared with m * x; all-ones multiplicands are included.
module tb_cgc_ppgen;
  logic [15:0] m;
  logic [3:0]  x;
  logic [19:0] pp;
  int checks = 0, failures = 0;

  cgc_ppgen dut (.m, .x, .pp);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      m = (n == 0) ? 16'hffff : 16'($urandom);
      for (int k = 0; k < 16; k++) begin
        x = 4'(k);
        #1;
        checks++;
        if (pp != 20'(m) * 20'(k)) begin
          failures++;
          if (failures < 10) $display("FAIL m=%h x=%0d pp=%h", m, k, pp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
