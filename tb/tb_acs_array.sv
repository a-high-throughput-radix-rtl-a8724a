// tb_acs_array: runs a forward and a backward 16-state array side by side
// over random radix-4 steps and checks every state metric, every
// second-stage difference and the start vector against an integer model of
// the recursions built from the trellis (candidates paired by the odd-time
// state, resp. by the first input bit).  The recursions are re-started from
// new metrics in the middle, and en is dropped for some clocks.
module tb_acs_array;
  import map_pkg::*;
  import map_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, init = 0;
  always #5 clk = ~clk;

  sm_t   init_met [NS];
  sym2_t sym;
  sm_t   f_cur [NS], f_met [NS], f_diff [NS], f_g4 [16];
  sm_t   b_cur [NS], b_met [NS], b_diff [NS], b_g4 [16];

  acs_array #(.BACKWARD(1'b0)) dut_f (.clk, .rst_n, .en, .init, .init_met, .sym,
    .cur(f_cur), .met(f_met), .diff(f_diff), .g4(f_g4));
  acs_array #(.BACKWARD(1'b1)) dut_b (.clk, .rst_n, .en, .init, .init_met, .sym,
    .cur(b_cur), .met(b_met), .diff(b_diff), .g4(b_g4));

  int fm [16], bm [16];
  int ys0, yp0, la0, ys1, yp1, la1;

  function automatic int g4f(int u1, int p1, int u2, int p2);
    return u1 * (la0 + ys0) + p1 * yp0 + u2 * (la1 + ys1) + p2 * yp1;
  endfunction

  task automatic check_vec(string what, sm_t v [NS], int r [16]);
    checks++;
    for (int s = 0; s < 16; s++)
      if (v[s] !== sm_t'(r[s])) begin
        failures++;
        $display("FAIL %s state %0d: got %0d expected %0d", what, s, wrap(int'(v[s]), 9), wrap(r[s], 9));
        break;
      end
  endtask

  initial begin
    for (int s = 0; s < NS; s++) init_met[s] = '0;
    sym = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int fo [16], bo [16], fd [16], bd [16];
      ys0 = int'($urandom_range(15)) - 8; yp0 = int'($urandom_range(15)) - 8;
      ys1 = int'($urandom_range(15)) - 8; yp1 = int'($urandom_range(15)) - 8;
      la0 = int'($urandom_range(16)) - 8; la1 = int'($urandom_range(16)) - 8;
      sym.s0.ys = 5'(ys0); sym.s0.yp = 5'(yp0); sym.s0.la = 6'(la0);
      sym.s1.ys = 5'(ys1); sym.s1.yp = 5'(yp1); sym.s1.la = 6'(la1);
      init = (n == 0) || (n == 200);
      if (init) begin
        int off;
        off = int'($urandom_range(511));
        for (int s = 0; s < 16; s++) begin
          fm[s] = off + int'($urandom_range(40)) - 20;
          bm[s] = fm[s];
          init_met[s] = sm_t'(fm[s]);
        end
      end
      en = (n % 17 != 5);
      #1;
      check_vec("forward start", f_cur, fm);
      check_vec("backward start", b_cur, bm);
      // integer model of one step
      for (int s = 0; s < 16; s++) begin
        int cf [4], cb [4];
        for (int sp = 0; sp < 16; sp++)
          for (int u1 = 0; u1 < 2; u1++)
            for (int u2 = 0; u2 < 2; u2++) begin
              int sm, sn;
              sm = nsf(sp, u1);
              sn = nsf(sm, u2);
              if (sn == s) cf[2 * (sm & 1) + (sp & 1)] = fm[sp] + g4f(u1, parf(sp, u1), u2, parf(sm, u2));
              if (sp == s) cb[2 * u1 + u2] = bm[sn] + g4f(u1, parf(sp, u1), u2, parf(sm, u2));
            end
        fo[s] = archc(cf[0], cf[1], cf[2], cf[3], fd[s]);
        bo[s] = archc(cb[0], cb[1], cb[2], cb[3], bd[s]);
      end
      @(negedge clk);
      init = 0;
      if (en) begin
        fm = fo; bm = bo;
        check_vec("forward metric", f_met, fm);
        check_vec("backward metric", b_met, bm);
        check_vec("forward diff", f_diff, fd);
        check_vec("backward diff", b_diff, bd);
      end else begin
        check_vec("forward hold", f_met, fm);
        check_vec("backward hold", b_met, bm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
