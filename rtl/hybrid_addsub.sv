// hybrid_addsub: hybrid 4-input addition/subtraction, d = (a0 + b0) - (a1 + b1).
//
// The radix-4 recursion unit holds each candidate metric as a carry-save pair
// (a, b).  Instead of first resolving a0+b0 and a1+b1 with two adders and then
// subtracting, this block folds the subtraction into two rows of full adders
// and resolves the result with a single carry-propagate adder:
//   row 1:  b0 + a0 + ~a1                 -> sum s1, carry c1
//   row 2:  s1 + (c1 << 1 | 1) + ~b1      -> sum s2, carry c2
//   result: s2 + (c2 << 1 | 1)
// The two injected ones complete the two's complement of a1 and b1, so the
// result is a0 + b0 - a1 - b1 modulo 2^W.  The row structure, the inverted
// a1/b1 inputs and the two constant ones follow the published full-adder
// diagram; the operand width defaults to the 10 bits that diagram shows.
// Purely combinational.  sign is the MSB of the wrapped difference.
module hybrid_addsub #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] a0,
  input  logic [W-1:0] b0,
  input  logic [W-1:0] a1,
  input  logic [W-1:0] b1,
  output logic [W-1:0] diff,
  output logic         sign
);
  logic [W-1:0] s1, c1, s2, c2, cin2;

  always_comb begin
    // First row of full adders: b0, a0 and the inverted a1.
    s1 = b0 ^ a0 ^ ~a1;
    c1 = (b0 & a0) | (b0 & ~a1) | (a0 & ~a1);
    // Second row: row-1 sum, row-1 carries shifted up with a one injected at
    // bit 0, and the inverted b1.
    cin2 = {c1[W-2:0], 1'b1};
    s2 = s1 ^ cin2 ^ ~b1;
    c2 = (s1 & cin2) | (s1 & ~b1) | (cin2 & ~b1);
    // Final carry-propagate addition with the second injected one.
    diff = s2 + {c2[W-2:0], 1'b1};
    sign = diff[W-1];
  end
endmodule
