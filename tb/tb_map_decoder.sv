// tb_map_decoder: end-to-end test of the radix-4 MAP decoder at its default
// size (windows of 32 bits, frames of up to 56 windows = 1792 bits).
//
// Random information bits are encoded by a behavioural model of the 16-state
// CCSDS recursive encoder (feedback 1+D^3+D^4, parity 1+D+D^3+D^4), mapped
// to +-A, disturbed by approximately Gaussian noise and quantised to the
// (5,2) input format, with random a-priori values in (6,2).  A reference
// model written with plain integers (no wrapping, no carry-save form)
// recomputes what the decoder must produce: forward metrics with the
// two-stage radix-4 max* approximation, per-window dummy-beta and beta
// recursions on the sliding-window schedule, the trace-back LLR of the first
// bit and the conventional LLR of the second bit of each step, using real
// arithmetic for the correction table.  The decoder's LLRs must equal the
// reference modulo 2^9.  The test also checks the output order, the count
// and contiguity of outputs (two bits per clock), the start-to-done latency
// (n_win + 2) * 16 + 5 clocks, hard decisions on a noiseless frame, and that
// the dummy-seeded and all-equal-seeded backward windows and the
// write-after-read use of the input banks all occurred.
module tb_map_decoder;
  import map_pkg::*;

  localparam int WIN_L   = 32;
  localparam int MAX_WIN = 56;
  localparam int D       = WIN_L / 2;
  localparam int MAXB    = 2 * MAX_WIN * WIN_L;   // room for two frames back to back
  localparam int MAXS    = MAXB / 2;
  localparam int WINW    = $clog2(MAX_WIN + 2) + 1;
  localparam int IDXW    = $clog2(MAX_WIN * D);

  logic clk = 0, rst_n = 0, start = 0;
  logic [WINW-1:0] n_win = '0;
  logic start_ready, busy, in_ready, llr_valid, frame_done;
  logic [IDXW-1:0] llr_step;
  sym2_t in_sym;
  sm_t llr0, llr1;

  always #5 clk = ~clk;

  map_decoder dut (
    .clk, .rst_n, .start, .n_win, .start_ready, .busy, .in_ready, .in_valid(1'b1), .in_sym,
    .llr_valid, .llr_step, .llr0, .llr1, .frame_done);

  int checks = 0, failures = 0;
  int ys [MAXB], yp [MAXB], la [MAXB];
  bit ub [MAXB];
  int ref0 [MAXS], ref1 [MAXS];
  int alpha [MAXS + 1][16];
  int win_base [2 * MAX_WIN];   // first step of the frame a window belongs to

  // ---------------- reference model ----------------
  function automatic int nsf(int s, int u);
    int a = u ^ ((s >> 1) & 1) ^ (s & 1);
    return (a << 3) | (s >> 1);
  endfunction
  function automatic int parf(int s, int u);
    int a = u ^ ((s >> 1) & 1) ^ (s & 1);
    return a ^ ((s >> 3) & 1) ^ ((s >> 1) & 1) ^ (s & 1);
  endfunction
  function automatic int lutf(int d);
    real r;
    if (d < 0) d = -d;
    r = 4.0 * $ln(1.0 + $exp(-$itor(d) / 4.0));
    return int'($floor(r + 0.5));
  endfunction
  function automatic int mstar(int x, int y);
    return ((x >= y) ? x : y) + lutf(x - y);
  endfunction
  function automatic int gm(int t, int u, int p);
    return u * (la[t] + ys[t]) + p * yp[t];
  endfunction
  function automatic int g4f(int i, int u1, int p1, int u2, int p2);
    return gm(2 * i, u1, p1) + gm(2 * i + 1, u2, p2);
  endfunction
  // Radix-4 max* of two pairs, (c0,c1) and (c2,c3); d2 = pair-0 minus pair-1 max.
  function automatic int archc(int c0, int c1, int c2, int c3, output int d2);
    int m01, m23;
    m01 = (c0 >= c1) ? c0 : c1;
    m23 = (c2 >= c3) ? c2 : c3;
    d2  = m01 - m23;
    return ((d2 >= 0) ? m01 : m23) + lutf(d2) + ((d2 >= 0) ? lutf(c0 - c1) : lutf(c2 - c3));
  endfunction
  function automatic int tree16(int v [16]);
    int a [8], b [4];
    for (int i = 0; i < 8; i++) a[i] = mstar(v[2*i], v[2*i+1]);
    for (int i = 0; i < 4; i++) b[i] = mstar(a[2*i], a[2*i+1]);
    return mstar(mstar(b[0], b[1]), mstar(b[2], b[3]));
  endfunction
  function automatic int tree32(int v [32]);
    int h0 [16], h1 [16];
    for (int i = 0; i < 16; i++) begin h0[i] = v[i]; h1[i] = v[16 + i]; end
    return mstar(tree16(h0), tree16(h1));
  endfunction

  // Backward radix-4 step i: beta_i from beta_{i+1}.
  function automatic void bstep(int i, int bn [16], output int bo [16], output int df [16]);
    for (int s = 0; s < 16; s++) begin
      int c [4];
      for (int u1 = 0; u1 < 2; u1++)
        for (int u2 = 0; u2 < 2; u2++) begin
          int sm = nsf(s, u1);
          c[2*u1 + u2] = bn[nsf(sm, u2)] + g4f(i, u1, parf(s, u1), u2, parf(sm, u2));
        end
      bo[s] = archc(c[0], c[1], c[2], c[3], df[s]);
    end
  endfunction

  task automatic reference(int n, int bw);
    int nst = n * D;
    int b0 = bw * D;
    // forward
    for (int s = 0; s < 16; s++) alpha[0][s] = (s == 0) ? 0 : -64;
    for (int i = 0; i < nst; i++)
      for (int s = 0; s < 16; s++) begin : fwd
        int c [4];
        for (int sp = 0; sp < 16; sp++)
          for (int u1 = 0; u1 < 2; u1++)
            for (int u2 = 0; u2 < 2; u2++) begin
              int sm = nsf(sp, u1);
              if (nsf(sm, u2) == s)
                c[2 * (sm & 1) + (sp & 1)] = alpha[i][sp] + g4f(b0 + i, u1, parf(sp, u1), u2, parf(sm, u2));
            end
        begin int dd; alpha[i+1][s] = archc(c[0], c[1], c[2], c[3], dd); end
      end
    // backward, window by window
    for (int w = 0; w < n; w++) begin
      int b [16], bo [16], df [16];
      for (int s = 0; s < 16; s++) b[s] = 0;
      if (w + 1 < n)
        for (int i = (w + 2) * D - 1; i >= (w + 1) * D; i--) begin
          bstep(b0 + i, b, bo, df);
          b = bo;
        end
      for (int i = (w + 1) * D - 1; i >= w * D; i--) begin
        int v0 [16], v1 [16], q0 [32], q1 [32];
        bstep(b0 + i, b, bo, df);
        for (int s = 0; s < 16; s++) begin
          int p0, p1, mag;
          mag = (df[s] < 0) ? -df[s] : df[s];
          p0 = bo[s] - lutf(df[s]);
          p1 = p0 - mag;
          v0[s] = alpha[i][s] + ((df[s] < 0) ? p1 : p0);
          v1[s] = alpha[i][s] + ((df[s] < 0) ? p0 : p1);
        end
        ref0[b0 + i] = tree16(v1) - tree16(v0);
        for (int sp = 0; sp < 16; sp++)
          for (int u1 = 0; u1 < 2; u1++)
            for (int u2 = 0; u2 < 2; u2++) begin
              int sm = nsf(sp, u1);
              int val = alpha[i][sp] + g4f(b0 + i, u1, parf(sp, u1), u2, parf(sm, u2)) + b[nsf(sm, u2)];
              if (u2 == 1) q1[2*sp + u1] = val; else q0[2*sp + u1] = val;
            end
        ref1[b0 + i] = tree32(q1) - tree32(q0);
        b = bo;
      end
    end
  endtask

  // ---------------- stimulus ----------------
  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction
  function automatic int noise(int sigma4);  // ~N(0, (sigma4/4)^2) in quarter units
    int acc = 0;
    for (int k = 0; k < 12; k++) acc += int'($urandom_range(2000)) - 1000;
    return (acc * sigma4) / 4000;
  endfunction

  // ninfo < n*WIN_L: ninfo information bits, 4 bits that return the encoder
  // to state 0, then zero (erased) symbols up to the window boundary.
  task automatic make_frame(int n, int bw, int amp, int sigma4, int lamax, int ninfo);
    int st = 0;
    for (int w = bw; w < bw + n; w++) win_base[w] = bw * D;
    for (int t = bw * WIN_L; t < (bw + n) * WIN_L; t++) begin
      int u, p;
      if (t - bw * WIN_L < ninfo) u = int'($urandom_range(1));
      else u = ((st >> 1) & 1) ^ (st & 1);          // tail: feedback bit 0
      p = parf(st, u);
      ub[t] = bit'(u);
      if (t - bw * WIN_L < ninfo + 4) begin
        ys[t] = clampi(((u != 0) ? amp : -amp) + noise(sigma4), -16, 15);
        yp[t] = clampi(((p != 0) ? amp : -amp) + noise(sigma4), -16, 15);
        la[t] = (lamax == 0) ? 0 : clampi(int'($urandom_range(2 * lamax)) - lamax, -32, 31);
      end else begin
        ys[t] = 0; yp[t] = 0; la[t] = 0;
      end
      st = nsf(st, u);
    end
  endtask

  // Arrival order: window by window, steps of a window last-first.
  int arr_cnt = 0;
  always_comb begin
    int w, st;
    w  = arr_cnt / D;
    st = w * D + (D - 1 - arr_cnt % D);
    in_sym.s0.ys = YW'(ys[2*st]);   in_sym.s0.yp = YW'(yp[2*st]);   in_sym.s0.la = LAW'(la[2*st]);
    in_sym.s1.ys = YW'(ys[2*st+1]); in_sym.s1.yp = YW'(yp[2*st+1]); in_sym.s1.la = LAW'(la[2*st+1]);
  end
  always @(posedge clk) if (in_ready) arr_cnt <= arr_cnt + 1;

  // ---------------- output checking ----------------
  int done_cnt = 0, out_cnt = 0, exp_cnt = 0, first_out = -1, last_out = -1, cyc = 0, done_cyc = -1;
  int n_cur = 0, bit_err = 0, raw_err = 0, check_bits = 0, hard_on = 0;
  int back_to_back = 0, seen_dummy_seed = 0, seen_flat_seed = 0, seen_war = 0, seen_bank1 = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (llr_valid && rst_n) begin
      int w, st;
      w  = out_cnt / D;
      st = w * D + (D - 1 - out_cnt % D);
      checks++;
      if (int'(llr_step) != st - win_base[w]) begin
        failures++;
        $display("FAIL order: got step %0d expected %0d", llr_step, st - win_base[w]);
      end
      checks += 2;
      if (llr0 !== sm_t'(ref0[st])) begin
        failures++;
        $display("FAIL llr0 step %0d: got %0d expected %0d", st, $signed(llr0), ref0[st]);
      end
      if (llr1 !== sm_t'(ref1[st])) begin
        failures++;
        $display("FAIL llr1 step %0d: got %0d expected %0d", st, $signed(llr1), ref1[st]);
      end
      if (2 * llr_step < check_bits && (($signed(llr0) > 0) != ub[2*st])) raw_err++;
      if (2 * llr_step + 1 < check_bits && (($signed(llr1) > 0) != ub[2*st+1])) raw_err++;
      if (hard_on != 0) begin
        if (2 * llr_step < check_bits) begin
          checks++;
          if (($signed(llr0) > 0) != ub[2*st])   begin failures++; bit_err++; end
        end
        if (2 * llr_step + 1 < check_bits) begin
          checks++;
          if (($signed(llr1) > 0) != ub[2*st+1]) begin failures++; bit_err++; end
        end
      end
      if (first_out < 0) first_out <= cyc;
      last_out <= cyc;
      out_cnt <= out_cnt + 1;
    end
    if (frame_done && rst_n) begin
      done_cyc <= cyc;
      done_cnt <= done_cnt + 1;
    end
    if (rst_n && dut.bw_en && dut.bw_init &&  dut.bw_seed_dummy) seen_dummy_seed++;
    if (rst_n && dut.bw_en && dut.bw_init && !dut.bw_seed_dummy) seen_flat_seed++;
    if (rst_n && dut.arr_en && dut.bw_en && dut.arr_bank == dut.bw_bank && dut.arr_addr == dut.bw_addr) seen_war++;
    if (rst_n && dut.arr_en && dut.arr_bank) seen_bank1++;
  end

  // One frame of n windows, or two frames (n and n2 windows) requested back
  // to back; ninfo < n*WIN_L selects a terminated and padded frame.
  task automatic run_frame(int n, int amp, int sigma4, int lamax, int hard, int ninfo = 0, int n2 = 0);
    int t0, nt;
    nt = n + n2;
    make_frame(n, 0, amp, sigma4, lamax, (ninfo == 0) ? n * WIN_L : ninfo);
    reference(n, 0);
    if (n2 != 0) begin
      make_frame(n2, n, amp, sigma4, lamax, n2 * WIN_L);
      reference(n2, n);
    end
    check_bits = (ninfo == 0) ? n * WIN_L : ninfo;
    hard_on = hard;
    raw_err = 0;
    arr_cnt = 0;
    out_cnt = 0;
    first_out = -1;
    done_cnt = 0;
    @(negedge clk);
    checks++;
    if (!start_ready || busy) begin failures++; $display("FAIL decoder not idle before a frame"); end
    start = 1; n_win = WINW'(n);
    t0 = cyc;
    @(negedge clk);
    if (n2 != 0) begin
      checks++;
      if (!start_ready) begin failures++; $display("FAIL second request not accepted"); end
      n_win = WINW'(n2);
      @(negedge clk);
    end
    start = 0;
    while (done_cnt < ((n2 != 0) ? 2 : 1)) @(negedge clk);
    checks++;
    if (out_cnt != nt * D) begin
      failures++;
      $display("FAIL %0d windows: %0d outputs, expected %0d", nt, out_cnt, nt * D);
    end
    checks++;
    if (last_out - first_out + 1 != nt * D) begin
      failures++;
      $display("FAIL outputs not contiguous: span %0d for %0d outputs", last_out - first_out + 1, nt * D);
    end
    checks++;
    if (done_cyc - t0 != (nt + 2) * D + 5) begin
      failures++;
      $display("FAIL latency: %0d clocks, expected %0d", done_cyc - t0, (nt + 2) * D + 5);
    end
    if (n2 != 0) back_to_back++;
    $display("%0d+%0d windows (%0d information bits in the first): %0d LLR pairs, %0d clocks, hard-decision errors %0d",
             n, n2, check_bits, out_cnt, done_cyc - t0, raw_err);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run_frame(1, 3, 0, 0, 1);           // single window, noiseless: hard decisions
    run_frame(3, 3, 3, 6, 0);           // short frame, noisy, with a-priori input
    run_frame(MAX_WIN, 3, 4, 8, 0);     // full 1792-bit frame
    run_frame(MAX_WIN, 3, 0, 0, 1);     // full frame, noiseless
    // CCSDS frame: 1784 information bits, 4 termination bits, 4 padding steps
    run_frame(MAX_WIN, 3, 0, 0, 1, 1784);
    run_frame(MAX_WIN, 3, 5, 0, 0, 1784);
    // back-to-back frames: 2 then 3 windows, and two full-size frames
    run_frame(2, 3, 3, 4, 0, 0, 3);
    run_frame(MAX_WIN, 3, 0, 0, 1, 0, MAX_WIN);
    checks += 5;
    if (back_to_back == 0)    begin failures++; $display("FAIL no back-to-back frames"); end
    if (seen_dummy_seed == 0) begin failures++; $display("FAIL no dummy-seeded backward window"); end
    if (seen_flat_seed == 0)  begin failures++; $display("FAIL no all-equal-seeded backward window"); end
    if (seen_war == 0)        begin failures++; $display("FAIL no write-after-read in the input RAM"); end
    if (seen_bank1 == 0)      begin failures++; $display("FAIL bank B2 never written"); end
    $display("mechanisms: dummy-seeded windows %0d, end windows %0d, write-after-read cycles %0d",
             seen_dummy_seed, seen_flat_seed, seen_war);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
