// tb_llr_unit: streams random radix-4 steps (with random gaps) through the
// LLR unit and checks both LLRs, the tag and the five-clock latency against
// an integer model: trace-back survivors plus alpha reduced by a balanced
// max* tree for the first bit, and all 64 two-step paths reduced by a
// balanced max* tree for the second bit.
module tb_llr_unit;
  import map_pkg::*;
  import map_ref_pkg::*;
  localparam int N = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  always #5 clk = ~clk;

  logic [9:0] in_tag = '0, out_tag;
  sm_t alpha [NS], beta_k2 [NS], g4 [16], beta_k [NS], diff [NS];
  logic out_valid;
  sm_t llr0, llr1;

  llr_unit dut (.clk, .rst_n, .in_valid, .in_tag, .alpha, .beta_k2, .g4, .beta_k, .diff,
                .out_valid, .out_tag, .llr0, .llr1);

  int ra [N][16], rk2 [N][16], rg [N][16], rbk [N][16], rdf [N][16];
  int e0 [N], e1 [N], sent_cyc [N];
  bit vld [N];

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

  initial begin
    for (int n = 0; n < N; n++) begin
      int oa, ob, v0 [16], v1 [16], q0 [32], q1 [32];
      oa = int'($urandom_range(511));
      ob = int'($urandom_range(511));
      for (int s = 0; s < 16; s++) begin
        ra[n][s]  = oa + int'($urandom_range(40)) - 20;
        rk2[n][s] = ob + int'($urandom_range(40)) - 20;
        rg[n][s]  = int'($urandom_range(40)) - 20;
        rbk[n][s] = ob + int'($urandom_range(40)) - 20;
        rdf[n][s] = (s % 5 == 0) ? 0 : int'($urandom_range(60)) - 30;
      end
      for (int s = 0; s < 16; s++) begin
        int p0, p1, mag;
        mag = (rdf[n][s] < 0) ? -rdf[n][s] : rdf[n][s];
        p0 = rbk[n][s] - lutf(rdf[n][s]);
        p1 = p0 - mag;
        v0[s] = ra[n][s] + ((rdf[n][s] < 0) ? p1 : p0);
        v1[s] = ra[n][s] + ((rdf[n][s] < 0) ? p0 : p1);
      end
      e0[n] = tree16(v1) - tree16(v0);
      for (int sp = 0; sp < 16; sp++)
        for (int u1 = 0; u1 < 2; u1++)
          for (int u2 = 0; u2 < 2; u2++) begin
            int sm, val;
            sm  = nsf(sp, u1);
            val = ra[n][sp] + rg[n][8*u1 + 4*parf(sp, u1) + 2*u2 + parf(sm, u2)] + rk2[n][nsf(sm, u2)];
            if (u2 == 1) q1[2*sp + u1] = val; else q0[2*sp + u1] = val;
          end
      e1[n] = tree32(q1) - tree32(q0);
      vld[n] = (n % 9 != 4);
    end
    for (int s = 0; s < NS; s++) begin
      alpha[s] = '0; beta_k2[s] = '0; beta_k[s] = '0; diff[s] = '0;
    end
    for (int i = 0; i < 16; i++) g4[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n <= N; n++) begin
      @(negedge clk);
      if (n < N) begin
        in_valid = vld[n];
        in_tag = 10'(n);
        for (int s = 0; s < 16; s++) begin
          alpha[s] = sm_t'(ra[n][s]); beta_k2[s] = sm_t'(rk2[n][s]); g4[s] = sm_t'(rg[n][s]);
        end
      end else in_valid = 0;
      if (n > 0)
        for (int s = 0; s < 16; s++) begin
          beta_k[s] = sm_t'(rbk[n-1][s]); diff[s] = sm_t'(rdf[n-1][s]);
        end
    end
    repeat (10) @(negedge clk);
    begin
      int nv = 0;
      for (int n = 0; n < N; n++) nv += int'(vld[n]);
      checks++;
      if (nout != nv) begin
        failures++;
        $display("FAIL %0d outputs for %0d valid steps", nout, nv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output check: the step entered at clock t appears at clock t + 5.
  int cyc = 0, nout = 0;
  int in_cyc [N];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && rst_n) in_cyc[in_tag] <= cyc;
    if (out_valid && rst_n) begin
      checks += 3;
      if (cyc - in_cyc[out_tag] != 5) begin
        failures++;
        $display("FAIL latency of step %0d: %0d", out_tag, cyc - in_cyc[out_tag]);
      end
      if (llr0 !== sm_t'(e0[out_tag])) begin
        failures++;
        $display("FAIL llr0 step %0d: got %0d expected %0d", out_tag, wrap(int'(llr0), 9), wrap(e0[out_tag], 9));
      end
      if (llr1 !== sm_t'(e1[out_tag])) begin
        failures++;
        $display("FAIL llr1 step %0d: got %0d expected %0d", out_tag, wrap(int'(llr1), 9), wrap(e1[out_tag], 9));
      end
      nout++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
