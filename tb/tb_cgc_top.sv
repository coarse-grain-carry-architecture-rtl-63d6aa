// tb_cgc_top: end-to-end self-checking test of cgc_top at its default sizes.
//
// All units run concurrently from one clock. Each cycle the testbench drives
// new operands into every unit and checks every result against integer
// models kept in the testbench:
//   column  : random polarity/conditional configuration, +/- x_i*A_i mod 2^16
//   csel    : a + b + cin, 32 bits, 4-bit segments
//   mul     : a * b with a latency of 2 cycles, queued expectations
//   acs     : min of two metric sums and the decision, one cycle later
//   jacobi  : 4x4 array stepped against a reference array
//   viterbi : a (7,5)-encoded random stream with isolated channel errors
//             must decode to the message, in order
//   dct     : S_k * sum x[n] cos((2n+1)k pi/16) within 4 LSB, latency 4
//   heap    : after each heapify run every parent >= its children and the
//             key multiset is unchanged
//   matmul  : 4x4 8-bit A x B, one product column per cycle, latency 3
//   fir     : 4-tap signed 8-bit convolution, exact, latency 4
// It counts how often each mechanism of the architecture was exercised
// (subtraction, three subtractions using all three carry-ins, conditional
// masking, a carry crossing a carry-select segment, a carry rippling through
// the whole select adder, back-to-back multiplier issue, both ACS decisions,
// a Jacobi load and step, a held Jacobi array, a corrected channel error, a
// DCT transform, a heap run that moved keys, a full 4x4 matrix product, a FIR output
// with a negative sample, including after a coefficient reload) and fails if any never happened.
module tb_cgc_top;
  import cgc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0][15:0] col_a;
  logic [3:0]       col_x;
  cgc_cfg_t         col_cfg;
  logic [15:0]      col_sum;
  logic [2:0]       col_c_top;
  logic [31:0]      cs_a, cs_b, cs_sum;
  logic             cs_cin, cs_cout;
  logic             mul_in_valid = 0, mul_out_valid;
  logic [15:0]      mul_a, mul_b;
  logic [31:0]      mul_p;
  logic [7:0]       acs_lam0, acs_gam0, acs_lam1, acs_gam1;
  logic             acs_dec;
  logic [8:0]       acs_metric;
  logic             jac_load = 0, jac_en = 0;
  logic [3:0][3:0][15:0] jac_init, jac_y;
  logic [3:0][15:0] jac_top, jac_bottom, jac_left, jac_right;

  logic             vit_in_valid = 0, vit_out_valid, vit_out_bit;
  logic [1:0]       vit_sym;
  logic             dct_in_valid = 0, dct_out_valid;
  logic [7:0][7:0]  dct_x;
  logic [7:0][11:0] dct_f;
  logic             heap_load = 0, heap_start = 0, heap_busy, heap_done;
  logic [6:0][7:0]  heap_load_keys, heap_keys;
  logic             mm_load_a = 0, mm_b_valid = 0, mm_c_valid;
  logic [3:0][3:0][7:0] mm_a;
  logic [3:0][7:0]  mm_b_col;
  logic [3:0][17:0] mm_c_col;
  int unsigned      mm_ref[4][4];
  logic [3:0][17:0] mmq[$];
  int               mmt[$];
  int               n_mm_cols = 0, n_mm_full = 0, mm_run = 0;
  logic             fir_load_coef = 0, fir_in_valid = 0, fir_out_valid;
  logic [3:0][7:0]  fir_h;
  logic [7:0]       fir_x;
  logic [17:0]      fir_y;
  int               fir_hist[4], fir_c[4], firq[$], firt[$];
  int               n_fir = 0, n_fir_neg = 0, n_fir_reload = 0;

  cgc_top dut (.*);

  logic vq[$];
  int   n_vit_err = 0, n_vit_bits = 0, n_dct = 0, n_heap_runs = 0, n_heap_moved = 0;
  real  dbuf[64][8];
  int   dwr = 0, drd = 0, dt[$];
  logic heap_done_q = 0;
  int   hcount[int];
  logic [6:0][7:0] heap_loaded;

  int checks = 0, failures = 0, cycle = 0;
  // mechanism counters
  int n_sub = 0, n_sub3 = 0, n_mask = 0, n_seg_cross = 0, n_full_prop = 0;
  int n_mul_b2b = 0, n_dec0 = 0, n_dec1 = 0, n_jload = 0, n_jstep = 0, n_jhold = 0;

  logic [31:0] mq[$];
  int          mt[$];
  int unsigned jref[4][4];
  int          acs_exp_m;
  logic        acs_exp_d, acs_pending = 0, prev_mul_valid = 0;
  int          acs_chk_m;
  logic        acs_chk_d, acs_chk = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results of the clocked units, sampled between edges
  always @(negedge clk) begin
    if (rst_n) begin
      if (mul_out_valid) begin
        logic [31:0] e;
        int t;
        e = mq.pop_front();
        t = mt.pop_front();
        checks += 2;
        if (mul_p != e) fail($sformatf("mul got %h exp %h", mul_p, e));
        if (cycle - t != 2) fail($sformatf("mul latency %0d", cycle - t));
      end
      if (mm_c_valid) begin
        logic [3:0][17:0] e;
        int t;
        e = mmq.pop_front();
        t = mmt.pop_front();
        checks += 2;
        n_mm_cols++;
        if (mm_c_col != e) fail($sformatf("matmul got %h exp %h", mm_c_col, e));
        if (cycle - t != 3) fail($sformatf("matmul latency %0d", cycle - t));
      end
      if (fir_out_valid) begin
        int e, t;
        logic signed [17:0] yv;
        e = firq.pop_front();
        t = firt.pop_front();
        yv = fir_y;
        checks += 2;
        n_fir++;
        if (int'(yv) != e) fail($sformatf("fir got %0d exp %0d", yv, e));
        if (cycle - t != 4) fail($sformatf("fir latency %0d", cycle - t));
      end
      if (acs_chk) begin
        checks++;
        if (acs_dec != acs_chk_d || int'(acs_metric) != acs_chk_m) fail("acs");
        if (acs_dec) n_dec1++; else n_dec0++;
      end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (int'(jac_y[r][c]) != jref[r][c]) fail($sformatf("jacobi [%0d][%0d]", r, c));
        end
      if (vit_out_valid) begin
        logic e;
        e = vq.pop_front();
        checks++;
        n_vit_bits++;
        if (vit_out_bit != e) fail("viterbi bit");
      end
      if (dct_in_valid) begin
        real rr[8];
        logic signed [7:0] xv;
        for (int k = 0; k < 8; k++) begin
          real acc;
          acc = 0.0;
          for (int n = 0; n < 8; n++) begin
            xv = dct_x[n];
            acc += real'(xv) * $cos(real'((2 * n + 1) * k) * 3.14159265358979 / 16.0);
          end
          rr[k] = (k == 0) ? acc : acc * 2.0 * $cos(real'(k) * 3.14159265358979 / 16.0);
        end
        dbuf[dwr % 64] = rr; dwr++; dt.push_back(cycle);
      end
      if (dct_out_valid) begin
        real rr[8];
        logic signed [11:0] fv;
        int t;
        rr = dbuf[drd % 64]; drd++;
        t = dt.pop_front();
        checks++;
        if (cycle - t != 4) fail("dct latency");
        for (int k = 0; k < 8; k++) begin
          fv = dct_f[k];
          checks++;
          if (real'(fv) - rr[k] > 4.0 || rr[k] - real'(fv) > 4.0) fail($sformatf("dct F%0d", k));
        end
        n_dct++;
      end
      if (heap_done && !heap_done_q) begin
        int h[int];
        n_heap_runs++;
        if (heap_keys != heap_loaded) n_heap_moved++;
        for (int i = 0; i < 3; i++) begin
          checks++;
          if (heap_keys[i] < heap_keys[2*i+1] || heap_keys[i] < heap_keys[2*i+2]) fail("heap order");
        end
        for (int i = 0; i < 7; i++) h[heap_loaded[i]] = h.exists(heap_loaded[i]) ? h[heap_loaded[i]] + 1 : 1;
        for (int i = 0; i < 7; i++) h[heap_keys[i]] = h.exists(heap_keys[i]) ? h[heap_keys[i]] - 1 : -1;
        foreach (h[k]) begin checks++; if (h[k] != 0) fail("heap keys"); end
      end
      heap_done_q = heap_done;
    end
  end

  function automatic int unsigned jnb(int r, int c);
    int unsigned s;
    s  = (r == 0) ? jac_top[c]    : jref[r-1][c];
    s += (r == 3) ? jac_bottom[c] : jref[r+1][c];
    s += (c == 0) ? jac_left[r]   : jref[r][c-1];
    s += (c == 3) ? jac_right[r]  : jref[r][c+1];
    return s >> 2;
  endfunction

  initial begin
    logic [3:0] neg, cond;
    longint r;
    logic [32:0] e33;
    int unsigned nxt[4][4];
    int k;
    logic vb1, vb0, vu;
    int vlast;

    for (int i = 0; i < 4; i++) begin
      jac_top[i] = 16'($urandom); jac_bottom[i] = 16'($urandom);
      jac_left[i] = 16'($urandom); jac_right[i] = 16'($urandom);
    end
    for (int rr = 0; rr < 4; rr++) for (int c = 0; c < 4; c++) jref[rr][c] = 0;
    jac_load = 1; jac_init = '0;
    vb1 = 0; vb0 = 0; vlast = -100;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1 jac_load = 0;
    n_jload++;

    for (int n = 0; n < 4000; n++) begin
      // ---- combinational units: drive, settle, check
      do neg = 4'($urandom); while (neg == 4'b1111);
      if (n == 0) neg = 4'b1110;
      cond = 4'($urandom);
      col_cfg = cgc_make_cfg(neg, cond);
      col_x = 4'($urandom);
      for (int i = 0; i < 4; i++) col_a[i] = 16'($urandom);
      cs_a = $urandom; cs_b = $urandom; cs_cin = 1'($urandom);
      if (n % 16 == 1) begin cs_b = ~cs_a; cs_cin = 1; end
      #1;
      r = 0;
      for (int i = 0; i < 4; i++)
        if (!cond[i] || col_x[i]) r += neg[i] ? -longint'(col_a[i]) : longint'(col_a[i]);
      checks++;
      if (col_sum != r[15:0]) fail($sformatf("column got %h exp %h", col_sum, r[15:0]));
      if (neg != 0) n_sub++;
      if ($countones(neg) == 3) n_sub3++;
      if ((cond & ~col_x) != 0) n_mask++;
      e33 = 33'(cs_a) + 33'(cs_b) + 33'(cs_cin);
      checks++;
      if ({cs_cout, cs_sum} != e33) fail("csel");
      for (int s = 4; s < 32; s += 4)
        if ((((33'(cs_a) & ((33'(1) << s) - 1)) + (33'(cs_b) & ((33'(1) << s) - 1)) + 33'(cs_cin)) >> s) != 0) begin n_seg_cross++; break; end
      if ((cs_a ^ cs_b) == '1 && cs_cin) n_full_prop++;

      // ---- clocked units: inputs for the next edge
      mul_in_valid = ($urandom % 5) != 0;
      mul_a = 16'($urandom); mul_b = 16'($urandom);
      if (mul_in_valid) begin
        mq.push_back(32'(mul_a) * 32'(mul_b)); mt.push_back(cycle);
        if (prev_mul_valid) n_mul_b2b++;
      end
      prev_mul_valid = mul_in_valid;

      acs_lam0 = 8'($urandom); acs_gam0 = 8'($urandom);
      acs_lam1 = 8'($urandom); acs_gam1 = 8'($urandom);
      acs_exp_d = (int'(acs_lam1) + int'(acs_gam1)) <= (int'(acs_lam0) + int'(acs_gam0));
      acs_exp_m = acs_exp_d ? int'(acs_lam1) + int'(acs_gam1) : int'(acs_lam0) + int'(acs_gam0);
      acs_pending = 1;

      k = n % 200;
      jac_load = (k == 0);
      jac_en   = !jac_load && (k % 9 != 4);
      if (jac_load) begin
        for (int rr = 0; rr < 4; rr++) for (int c = 0; c < 4; c++) begin
          jac_init[rr][c] = 16'($urandom); nxt[rr][c] = jac_init[rr][c];
        end
        n_jload++;
      end else if (jac_en) begin
        for (int rr = 0; rr < 4; rr++) for (int c = 0; c < 4; c++) nxt[rr][c] = jnb(rr, c);
        n_jstep++;
      end else begin
        nxt = jref;
        n_jhold++;
      end
      // Viterbi stream
      vit_in_valid = ($urandom % 4) != 0;
      if (vit_in_valid) begin
        vu = 1'($urandom);
        vq.push_back(vu);
        vit_sym = {vu ^ vb1 ^ vb0, vu ^ vb0};
        if (n - vlast >= 12 && ($urandom % 6) == 0) begin
          vit_sym ^= 2'b01 << ($urandom % 2);
          vlast = n;
          n_vit_err++;
        end
        vb0 = vb1; vb1 = vu;
      end

      // DCT input
      dct_in_valid = ($urandom % 3) != 0;
      for (int i = 0; i < 8; i++) dct_x[i] = (n < 2) ? ((n == 0) ? 8'h7f : 8'h80) : 8'($urandom);

      // heapify: load, start, then wait for done
      heap_load  = (n % 40 == 0);
      heap_start = (n % 40 == 1);
      if (heap_load) begin
        for (int i = 0; i < 7; i++) heap_load_keys[i] = ((n / 40) % 2) ? 8'(i * 7) : 8'($urandom);
        heap_loaded = heap_load_keys;
      end

      // matrix multiply: load A, then stream the 4 columns of B
      mm_load_a  = (n % 7 == 0);
      mm_b_valid = (n % 7 >= 2) && (n % 7 <= 5);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) mm_a[i][j] = (n < 7) ? 8'hff : 8'($urandom);
      for (int i = 0; i < 4; i++) mm_b_col[i] = (n < 7) ? 8'hff : 8'($urandom);
      if (mm_b_valid) begin
        logic [3:0][17:0] e;
        for (int i = 0; i < 4; i++) begin
          int unsigned s;
          s = 0;
          for (int j = 0; j < 4; j++) s += mm_ref[i][j] * mm_b_col[j];
          e[i] = 18'(s);
        end
        mmq.push_back(e); mmt.push_back(cycle);
        mm_run++;
        if (mm_run == 4) n_mm_full++;
      end
      if (mm_load_a) begin
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) mm_ref[i][j] = mm_a[i][j];
        mm_run = 0;
      end

      // FIR: new coefficients every 1000 cycles (stream paused around the
      // reload), otherwise a sample on most cycles
      fir_load_coef = (n % 1000 == 5);
      fir_in_valid  = (n % 1000 >= 10) && (($urandom % 4) != 0);
      if (fir_load_coef) begin
        for (int t = 0; t < 4; t++) begin
          logic signed [7:0] hv;
          hv = 8'($urandom);
          fir_h[t] = hv; fir_c[t] = int'(hv);
        end
        if (n > 5) n_fir_reload++;
      end
      fir_x = 8'($urandom);
      if (fir_in_valid) begin
        logic signed [7:0] xv;
        int s;
        xv = fir_x;
        for (int t = 3; t > 0; t--) fir_hist[t] = fir_hist[t-1];
        fir_hist[0] = int'(xv);
        s = 0;
        for (int t = 0; t < 4; t++) s += fir_c[t] * fir_hist[t];
        firq.push_back(s); firt.push_back(cycle);
        if (xv < 0) n_fir_neg++;
      end

      @(posedge clk);
      jref = nxt;
      acs_chk = acs_pending; acs_chk_d = acs_exp_d; acs_chk_m = acs_exp_m;
      #1;
    end
    mul_in_valid = 0;
    vit_in_valid = 0;
    dct_in_valid = 0;
    heap_load = 0;
    heap_start = 0;
    mm_load_a = 0;
    mm_b_valid = 0;
    fir_in_valid = 0;
    fir_load_coef = 0;
    jac_en = 0;
    acs_pending = 0;
    @(posedge clk);
    acs_chk = 0;
    repeat (3) @(posedge clk);
    #1;
    if (mq.size() != 0) fail("multiplier results missing");
    if (dwr != drd) fail("dct results missing");
    if (mmq.size() != 0) fail("matmul results missing");
    if (firq.size() != 0) fail("fir results missing");
    if (vq.size() != 15) fail($sformatf("viterbi left %0d bits, expected DEPTH-1 = 15", vq.size()));

    $display("viterbi: %0d bits decoded, %0d channel errors corrected; dct: %0d transforms; heap: %0d runs, %0d moved keys",
             n_vit_bits, n_vit_err, n_dct, n_heap_runs, n_heap_moved);
    $display("mechanisms: sub=%0d sub3=%0d mask=%0d seg_cross=%0d full_prop=%0d mul_b2b=%0d dec0=%0d dec1=%0d jload=%0d jstep=%0d jhold=%0d",
             n_sub, n_sub3, n_mask, n_seg_cross, n_full_prop, n_mul_b2b, n_dec0, n_dec1, n_jload, n_jstep, n_jhold);
    if (n_sub == 0)       fail("no subtraction");
    if (n_sub3 == 0)      fail("no three-subtraction");
    if (n_mask == 0)      fail("no conditional masking");
    if (n_seg_cross == 0) fail("no carry across a segment");
    if (n_full_prop == 0) fail("no full carry propagation");
    if (n_mul_b2b == 0)   fail("no back-to-back multiply");
    if (n_dec0 == 0 || n_dec1 == 0) fail("an ACS decision never occurred");
    if (n_jload == 0 || n_jstep == 0 || n_jhold == 0) fail("a Jacobi operation never occurred");
    if (n_vit_err == 0 || n_vit_bits == 0) fail("no corrected channel error");
    if (n_dct == 0) fail("no DCT transform");
    if (n_heap_runs == 0 || n_heap_moved == 0) fail("no heap run moved keys");
    $display("matmul: %0d product columns, %0d full 4x4 products", n_mm_cols, n_mm_full);
    if (n_mm_full == 0) fail("no full matrix product");
    $display("fir: %0d outputs, %0d negative samples, %0d coefficient reloads", n_fir, n_fir_neg, n_fir_reload);
    if (n_fir == 0 || n_fir_neg == 0 || n_fir_reload == 0) fail("fir not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
