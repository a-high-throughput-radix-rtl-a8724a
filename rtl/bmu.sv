// bmu: branch metric unit for one radix-4 step (two trellis steps).
//
// For one trellis step with systematic value ys, parity value yp and
// a-priori value la, the log-domain branch metric of a branch with input bit
// u and parity bit p (both 0/1, bit 1 sent as +1) is taken as
//   gamma(u, p) = u * (la + ys) + p * yp
// which is the usual 1/2 * (x*La + Lc*(ys*xs + yp*xp)) with the channel
// reliability folded into ys/yp and a constant, equal for all branches of
// the step, removed.  That constant cancels in every comparison.  The
// systematic sum la + ys is one radix-2 branch metric in the (7,2) format.
// The radix-4 metric of a two-step path is the sum of its two radix-2
// metrics; g4 holds all sixteen, indexed {u1, p1, u2, p2} where u1/p1 belong
// to the first step (sym.s0) and u2/p2 to the second (sym.s1).  The results
// are sign-extended into the wrapped state-metric width.  Combinational.
// Some outputs need no logic: g4[0] (both bits 0, both parities 0) is always
// zero, and g4[1] and g4[4] are a single parity value, sign-extended.
module bmu
  import map_pkg::*;
(
  input  sym2_t sym,
  output sm_t   g4 [16]
);
  logic signed [BMW-1:0] sys0, sys1;
  logic signed [BMW-1:0] g2a [4], g2b [4];

  always_comb begin
    sys0 = BMW'(sym.s0.la) + BMW'(sym.s0.ys);
    sys1 = BMW'(sym.s1.la) + BMW'(sym.s1.ys);
    for (int up = 0; up < 4; up++) begin
      g2a[up] = (up[1] ? sys0 : '0) + (up[0] ? BMW'(sym.s0.yp) : '0);
      g2b[up] = (up[1] ? sys1 : '0) + (up[0] ? BMW'(sym.s1.yp) : '0);
    end
    for (int i = 0; i < 16; i++)
      g4[i] = SMW'(g2a[i / 4]) + SMW'(g2b[i % 4]);
  end
endmodule
