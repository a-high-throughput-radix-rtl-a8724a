// tb_hybrid_addsub: checks d = (a0 + b0) - (a1 + b1) modulo 2^W and its sign
// for random and corner operands, at the default 10-bit width and at the
// 9-bit width used in the recursion unit.
module tb_hybrid_addsub;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [9:0] a0, b0, a1, b1, d10;
  logic       s10;
  logic [8:0] c0, e0, c1, e1, d9;
  logic       s9;

  hybrid_addsub dut10 (.a0(a0), .b0(b0), .a1(a1), .b1(b1), .diff(d10), .sign(s10));
  hybrid_addsub #(.W(9)) dut9 (.a0(c0), .b0(e0), .a1(c1), .b1(e1), .diff(d9), .sign(s9));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int x0, y0, x1, y1, r;
      if (n < 16) begin
        x0 = (n & 1) ? 1023 : 0; y0 = (n & 2) ? 1023 : 0;
        x1 = (n & 4) ? 1023 : 0; y1 = (n & 8) ? 1023 : 0;
      end else begin
        x0 = $urandom_range(1023); y0 = $urandom_range(1023);
        x1 = $urandom_range(1023); y1 = $urandom_range(1023);
      end
      a0 = 10'(x0); b0 = 10'(y0); a1 = 10'(x1); b1 = 10'(y1);
      c0 = 9'(x0);  e0 = 9'(y0);  c1 = 9'(x1);  e1 = 9'(y1);
      @(posedge clk);
      r = (x0 + y0 - x1 - y1) & 1023;
      checks += 2;
      if (d10 !== 10'(r) || s10 !== r[9]) begin
        failures++;
        $display("FAIL W=10: %0d+%0d-%0d-%0d got %0d", x0, y0, x1, y1, d10);
      end
      r = (x0 + y0 - x1 - y1) & 511;
      if (d9 !== 9'(r) || s9 !== r[8]) begin
        failures++;
        $display("FAIL W=9: %0d+%0d-%0d-%0d got %0d", x0 & 511, y0 & 511, x1 & 511, y1 & 511, d9);
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
