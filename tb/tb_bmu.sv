// tb_bmu: checks all sixteen radix-4 branch metrics against
// gamma(u,p) = u*(la+ys) + p*yp summed over the two steps, for random and
// extreme soft inputs.
module tb_bmu;
  import map_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sym2_t sym;
  sm_t   g4 [16];
  bmu dut (.sym(sym), .g4(g4));

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int ys0, yp0, la0, ys1, yp1, la1;
      if (n < 2) begin
        ys0 = n ? 15 : -16; yp0 = ys0; ys1 = ys0; yp1 = ys0;
        la0 = n ? 31 : -32; la1 = la0;
      end else begin
        ys0 = int'($urandom_range(31)) - 16; yp0 = int'($urandom_range(31)) - 16;
        ys1 = int'($urandom_range(31)) - 16; yp1 = int'($urandom_range(31)) - 16;
        la0 = int'($urandom_range(63)) - 32; la1 = int'($urandom_range(63)) - 32;
      end
      sym.s0.ys = 5'(ys0); sym.s0.yp = 5'(yp0); sym.s0.la = 6'(la0);
      sym.s1.ys = 5'(ys1); sym.s1.yp = 5'(yp1); sym.s1.la = 6'(la1);
      @(posedge clk);
      for (int i = 0; i < 16; i++) begin
        int u1, p1, u2, p2, e;
        u1 = (i >> 3) & 1; p1 = (i >> 2) & 1; u2 = (i >> 1) & 1; p2 = i & 1;
        e  = u1 * (la0 + ys0) + p1 * yp0 + u2 * (la1 + ys1) + p2 * yp1;
        checks++;
        if ($signed(g4[i]) != e) begin
          failures++;
          $display("FAIL g4[%0d] got %0d expected %0d", i, $signed(g4[i]), e);
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
