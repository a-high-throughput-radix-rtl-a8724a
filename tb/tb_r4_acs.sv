// tb_r4_acs: checks one radix-4 recursion unit against the integer
// two-stage max* approximation.  Random predecessor parts A, B and branch
// metrics are applied with a random common offset (so that the wrapped
// arithmetic crosses the 9-bit boundary); one clock later met_a + met_b must
// equal the reference metric and diff the second-stage difference, both
// modulo 2^9.  A cycle with en low must leave the registers unchanged.
module tb_r4_acs;
  import map_pkg::*;
  import map_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  sm_t in_a [4], in_b [4], gam [4];
  sm_t met_a, met_b, diff;
  r4_acs dut (.clk, .rst_n, .en, .in_a, .in_b, .gam, .met_a, .met_b, .diff);

  initial begin
    for (int i = 0; i < 4; i++) begin in_a[i] = '0; in_b[i] = '0; gam[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int c [4], e, d2, off, spread;
      off = int'($urandom_range(511));
      spread = (n % 3 == 0) ? 6 : 50;
      for (int i = 0; i < 4; i++) begin
        int a, b, g;
        a = off + int'($urandom_range(2 * spread)) - spread;
        b = int'($urandom_range(6));
        g = int'($urandom_range(2 * spread)) - spread;
        in_a[i] = sm_t'(a); in_b[i] = sm_t'(b); gam[i] = sm_t'(g);
        c[i] = a + b + g;
      end
      e = archc(c[0], c[1], c[2], c[3], d2);
      en = 1;
      @(negedge clk);
      checks += 2;
      if (sm_t'(met_a + met_b) !== sm_t'(e)) begin
        failures++;
        $display("FAIL metric: cands %0d %0d %0d %0d got %0d expected %0d", c[0], c[1], c[2], c[3],
                 wrap(int'(sm_t'(met_a + met_b)), 9), wrap(e, 9));
      end
      if (diff !== sm_t'(d2)) begin
        failures++;
        $display("FAIL diff: got %0d expected %0d", wrap(int'(diff), 9), wrap(d2, 9));
      end
      if (n % 10 == 0) begin
        en = 0;
        for (int i = 0; i < 4; i++) gam[i] = sm_t'($urandom);
        @(negedge clk);
        checks++;
        if (sm_t'(met_a + met_b) !== sm_t'(e)) begin
          failures++;
          $display("FAIL hold with en low");
        end
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
