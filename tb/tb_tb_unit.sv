// tb_tb_unit: checks the trace-back survivors.  Two path metrics P0, P1 and
// a pair correction c are drawn at random; beta = max(P0,P1) + lut(P0-P1) + c
// and Diff = P0 - P1 are what the backward recursion would deliver.  The
// survivors must be the winner (with c) and the loser (with the winner's c),
// each on the output of its own first bit.
module tb_tb_unit;
  import map_pkg::*;
  import map_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sm_t beta, diff, s0, s1;
  tb_unit dut (.beta(beta), .diff(diff), .survivor0(s0), .survivor1(s1));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int p0, p1, c, b, e0, e1, off;
      off = int'($urandom_range(511)) - 256;
      p0 = off + int'($urandom_range(120)) - 60;
      p1 = off + int'($urandom_range(120)) - 60;
      if (n % 7 == 0) p1 = p0;
      c  = int'($urandom_range(3));
      b  = ((p0 >= p1) ? p0 : p1) + lutf(p0 - p1) + c;
      beta = sm_t'(b);
      diff = sm_t'(p0 - p1);
      e0 = (p0 >= p1) ? p0 + c : p0 + c;
      e1 = p1 + c;
      @(posedge clk);
      checks += 2;
      if (s0 !== sm_t'(e0) || s1 !== sm_t'(e1)) begin
        failures++;
        $display("FAIL P0=%0d P1=%0d c=%0d: got %0d %0d", p0, p1, c,
                 wrap(int'(s0), 9), wrap(int'(s1), 9));
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
