// tb_unit: modified trace-back unit of the radix-4 LLR architecture.
//
// The backward recursion computes beta_k(s) of a state as
//   max(P0', P1') + lut(Diff) + (correction of the winning pair)
// where Diff = P0' - P1' compares the best paths through the two odd-time
// successors of s (first input bit 0 and 1).  From beta_k(s) and Diff this
// unit recovers the two path metrics P0, P1 (branch metric of the first
// step plus beta of the odd-time state) without recomputing them:
//   path0 = beta_k(s) - lut(Diff)        the winning path
//   path1 = path0 - |Diff|               the losing path
// and the sign of Diff decides which is which: with Diff negative,
// survivor0 = path1 and survivor1 = path0, otherwise survivor0 = path0 and
// survivor1 = path1.  survivor0/1 are the paths whose first input bit is 0/1.
// (The losing path carries the winner's pair correction, an approximation
// inherent to the method.)  Combinational; wrapped (9,2) arithmetic.
module tb_unit
  import map_pkg::*;
(
  input  sm_t beta,
  input  sm_t diff,
  output sm_t survivor0,
  output sm_t survivor1
);
  sm_t path0, path1, mag;
  logic sgn;

  always_comb begin
    sgn   = diff[SMW-1];
    mag   = sgn ? sm_t'(-diff) : diff;
    path0 = beta - sm_t'(lut_corr(diff));
    path1 = path0 - mag;
    survivor0 = sgn ? path1 : path0;
    survivor1 = sgn ? path0 : path1;
  end
endmodule
