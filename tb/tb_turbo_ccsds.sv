// tb_turbo_ccsds: the decoder as the component (SISO) decoder of a rate-1/3
// CCSDS turbo code with 1784 information bits, decoded with eight turbo
// iterations.
//
// The testbench builds everything around the SISO that a turbo decoder
// needs and that the decoder itself does not contain: two behavioural
// 16-state encoders, the CCSDS interleaver (k1 = 8, k2 = 223, the eight
// primes 31 .. 67), BPSK over an AWGN channel at a given Eb/N0, and the
// exchange of extrinsic information.  Channel values enter as Lc*y in the
// (5,2) format; extrinsic values L - La - Ys are saturated to the (6,2)
// a-priori format and passed through the interleaver or de-interleaver to
// the other pass.  One map_decoder instance, at its default size, is run
// twice per iteration, first on the natural-order code, then on the
// interleaved one.  Neither code is terminated; the 8 steps after the 1784
// information bits are fed as zero (erased) symbols.
//
// Checks: the interleaver is a permutation; every pass delivers all LLRs in
// the expected order; after eight iterations the bit errors of each frame
// do not exceed those after the first pass; at the higher Eb/N0 every frame
// is decoded without error; iterating lowers the errors at least once.
// A sweep over Eb/N0 = 0.3, 0.5 and 0.8 dB (NFR frames each) prints the
// bit-error rate after eight iterations and fails if it rises with Eb/N0 or
// is above 1e-3 at 0.8 dB.
module tb_turbo_ccsds;
  import map_pkg::*;

  localparam int WIN_L   = 32;
  localparam int MAX_WIN = 56;
  localparam int D       = WIN_L / 2;
  localparam int K       = 1784;                 // information bits
  localparam int NT      = MAX_WIN * WIN_L;      // 1792 trellis steps
  localparam int NITER   = 8;
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
  int perm [K];
  bit ub [K];
  int ch_s [K], ch_p1 [K], ch_p2 [K];     // channel values, natural order / encoder order
  int la1 [K], la2 [K];                   // a-priori input of pass 1 (natural) and pass 2 (interleaved)
  int in_ys [NT], in_yp [NT], in_la [NT]; // what the current pass feeds
  int lout [NT];                          // what the current pass produced

  function automatic int nsf(int s, int u);
    int a = u ^ ((s >> 1) & 1) ^ (s & 1);
    return (a << 3) | (s >> 1);
  endfunction
  function automatic int parf(int s, int u);
    int a = u ^ ((s >> 1) & 1) ^ (s & 1);
    return a ^ ((s >> 3) & 1) ^ ((s >> 1) & 1) ^ (s & 1);
  endfunction
  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // CCSDS turbo interleaver: the s-th bit into the second encoder is
  // information bit perm[s].
  task automatic build_perm();
    int pr [8] = '{31, 37, 43, 47, 53, 59, 61, 67};
    bit seen [K];
    int k1 = 8, k2 = K / 8, bad = 0;
    for (int s = 0; s < K; s++) seen[s] = 0;
    for (int s = 0; s < K; s++) begin
      int m, i, j, t, q, c;
      m = s % 2;
      i = s / (2 * k2);
      j = s / 2 - i * k2;
      t = (19 * i + 1) % (k1 / 2);
      q = t % 8;
      c = (pr[q] * j + 21 * m) % k2;
      perm[s] = 2 * (t + c * (k1 / 2) + 1) - m - 1;
      if (perm[s] < 0 || perm[s] >= K || seen[perm[s]]) bad++;
      else seen[perm[s]] = 1;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL interleaver is not a permutation (%0d bad)", bad); end
  endtask

  // Standard normal sample (Box-Muller).
  function automatic real gauss();
    real r1, r2;
    r1 = ($itor($urandom_range(999999)) + 1.0) / 1000001.0;
    r2 = $itor($urandom_range(999999)) / 1000000.0;
    return $sqrt(-2.0 * $ln(r1)) * $cos(6.283185307179586 * r2);
  endfunction

  // Lc*y for a BPSK symbol (bit 1 -> +1) in quarter units, saturated to (5,2).
  function automatic int chan(int b, real sigma);
    real y = ((b != 0) ? 1.0 : -1.0) + sigma * gauss();
    return clampi(int'($floor(4.0 * 2.0 * y / (sigma * sigma) + 0.5)), -16, 15);
  endfunction

  task automatic make_frame(real ebn0_db);
    real sigma;
    int st1 = 0, st2 = 0;
    sigma = $sqrt(1.0 / (2.0 * (1.0 / 3.0) * $pow(10.0, ebn0_db / 10.0)));
    for (int t = 0; t < K; t++) ub[t] = bit'($urandom_range(1));
    for (int t = 0; t < K; t++) begin
      int u1 = int'(ub[t]), u2 = int'(ub[perm[t]]);
      ch_s[t]  = chan(u1, sigma);
      ch_p1[t] = chan(parf(st1, u1), sigma);
      ch_p2[t] = chan(parf(st2, u2), sigma);
      st1 = nsf(st1, u1);
      st2 = nsf(st2, u2);
      la1[t] = 0;
    end
  endtask

  // ---------------- decoder drive and capture ----------------
  int arr_cnt = 0, out_cnt = 0, done_cnt = 0;
  always_comb begin
    int w, st;
    w  = arr_cnt / D;
    st = w * D + (D - 1 - arr_cnt % D);
    if (st >= NT / 2) st = NT / 2 - 1;
    in_sym.s0.ys = YW'(in_ys[2*st]);   in_sym.s0.yp = YW'(in_yp[2*st]);   in_sym.s0.la = LAW'(in_la[2*st]);
    in_sym.s1.ys = YW'(in_ys[2*st+1]); in_sym.s1.yp = YW'(in_yp[2*st+1]); in_sym.s1.la = LAW'(in_la[2*st+1]);
  end
  always @(posedge clk) if (in_ready) arr_cnt <= arr_cnt + 1;

  always @(posedge clk) begin
    if (llr_valid && rst_n) begin
      int w, st;
      w  = out_cnt / D;
      st = w * D + (D - 1 - out_cnt % D);
      checks++;
      if (int'(llr_step) != st) begin
        failures++;
        $display("FAIL order: got step %0d expected %0d", llr_step, st);
      end
      lout[2*st]     <= int'($signed(llr0));
      lout[2*st + 1] <= int'($signed(llr1));
      out_cnt <= out_cnt + 1;
    end
    if (frame_done && rst_n) done_cnt <= done_cnt + 1;
  end

  task automatic siso_pass();
    arr_cnt = 0;
    out_cnt = 0;
    done_cnt = 0;
    @(negedge clk);
    start = 1; n_win = WINW'(MAX_WIN);
    @(negedge clk);
    start = 0;
    while (done_cnt == 0) @(negedge clk);
    checks++;
    if (out_cnt != NT / 2) begin
      failures++;
      $display("FAIL pass delivered %0d LLR pairs, expected %0d", out_cnt, NT / 2);
    end
    @(negedge clk);
  endtask

  // ---------------- turbo loop ----------------
  int passes = 0, improved = 0, e;
  localparam int NPT = 3;
  localparam int NFR = 40;
  localparam real PT_DB [NPT] = '{0.3, 0.5, 0.8};
  real ber [NPT];

  task automatic decode_frame(real ebn0_db, int must_clear, int verbose, output int err);
    int err_first = -1;
    err = 0;
    make_frame(ebn0_db);
    for (int it = 1; it <= NITER; it++) begin
      // pass 1: natural order, parity of the first encoder
      for (int t = 0; t < NT; t++) begin
        in_ys[t] = (t < K) ? ch_s[t]  : 0;
        in_yp[t] = (t < K) ? ch_p1[t] : 0;
        in_la[t] = (t < K) ? la1[t]   : 0;
      end
      siso_pass();
      passes++;
      if (it == 1) begin
        err_first = 0;
        for (int t = 0; t < K; t++) if ((lout[t] > 0) != ub[t]) err_first++;
      end
      for (int s = 0; s < K; s++)
        la2[s] = clampi(lout[perm[s]] - la1[perm[s]] - ch_s[perm[s]], -32, 31);
      // pass 2: interleaved order, parity of the second encoder
      for (int t = 0; t < NT; t++) begin
        in_ys[t] = (t < K) ? ch_s[perm[t]] : 0;
        in_yp[t] = (t < K) ? ch_p2[t]      : 0;
        in_la[t] = (t < K) ? la2[t]        : 0;
      end
      siso_pass();
      passes++;
      err = 0;
      for (int s = 0; s < K; s++) begin
        if ((lout[s] > 0) != ub[perm[s]]) err++;
        la1[perm[s]] = clampi(lout[s] - la2[s] - ch_s[perm[s]], -32, 31);
      end
      if (verbose != 0)
        $display("Eb/N0 %0.2f dB, iteration %0d: %0d bit errors of %0d", ebn0_db, it, err, K);
    end
    checks++;
    if (err > err_first) begin
      failures++;
      $display("FAIL iterating raised the errors from %0d to %0d", err_first, err);
    end
    if (err < err_first) improved++;
    if (must_clear != 0) begin
      checks++;
      if (err != 0) begin failures++; $display("FAIL %0d errors left at %0.2f dB", err, ebn0_db); end
    end
  endtask

  initial begin
    build_perm();
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // two frames traced iteration by iteration
    decode_frame(1.0, 0, 1, e);
    decode_frame(2.0, 1, 1, e);
    // bit error rate after eight iterations at the low end of the waterfall
    for (int p = 0; p < NPT; p++) begin
      int tot;
      tot = 0;
      for (int f = 0; f < NFR; f++) begin
        decode_frame(PT_DB[p], 0, 0, e);
        tot += e;
      end
      ber[p] = $itor(tot) / $itor(NFR * K);
      $display("Eb/N0 %0.2f dB: %0d errors in %0d bits after %0d iterations, BER %e",
               PT_DB[p], tot, NFR * K, NITER, ber[p]);
    end
    checks += NPT;
    for (int p = 1; p < NPT; p++)
      if (ber[p] > ber[p-1]) begin failures++; $display("FAIL BER rises with Eb/N0"); end
    if (ber[NPT-1] > 1.0e-3) begin failures++; $display("FAIL BER %e at %0.2f dB", ber[NPT-1], PT_DB[NPT-1]); end
    checks += 2;
    if (improved == 0) begin failures++; $display("FAIL iterations never lowered the errors"); end
    if (passes != (2 + NPT * NFR) * 2 * NITER) begin failures++; $display("FAIL %0d SISO passes", passes); end
    $display("mechanisms: SISO passes %0d, frames improved by iterating %0d", passes, improved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NPT * NFR + 6) * 2 * NITER * 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
