// r4_acs: radix-4 offset-add-compare-select (OACS) recursion unit for one
// trellis state.
//
// It computes one state metric of the next radix-4 step as
//   max*(w,x,y,z) ~= max(max(w,x), max(y,z)) + lut(max(w,x) - max(y,z))
//                   + sel(lut(w,x), lut(y,z))
// where sel picks the correction of the pair that won the second comparison.
// Each candidate is (metric of a predecessor) + (radix-4 branch metric).
// The candidates arrive in two pairs, (w,x) = cand 0/1 and (y,z) = cand 2/3;
// the pairs share an intermediate (odd-time) state.
//
// Offset-first organisation: the stored metric is kept as two parts, A (the
// selected maximum) and B (the two correction terms, each registered and
// added after the register).  In the next step A, B and the branch metric are
// reduced by one carry-save row to a pair (a, b); the pair comparison of the
// first stage is done directly on the carry-save pairs by hybrid_addsub,
// while a separate adder resolves a + b for the multiplexer.  The second
// stage subtracts the two pair maxima (the difference is exported as diff for
// the trace-back unit), selects the larger and both corrections.  One radix-4
// step per clock when en is high.  All metric arithmetic wraps modulo 2^SMW.
//
// Ports: in_a/in_b are the A and B parts of the four predecessors, gam the
// four radix-4 branch metrics.  met_a/met_b are the registered parts of the
// new metric (its value is met_a + met_b); diff is the registered
// second-stage difference of the same step.  Reset clears the registers.
// met_b is the sum of two corrections of at most 3 each, so its upper six
// bits are always zero; it is kept at the metric width because it enters the
// next carry-save row as a full operand.  Structure follows the published
// recursion unit; the register reset value is this design's choice.
module r4_acs
  import map_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  sm_t  in_a [4],
  input  sm_t  in_b [4],
  input  sm_t  gam  [4],
  output sm_t  met_a,
  output sm_t  met_b,
  output sm_t  diff
);
  sm_t  ca [4], cb [4], m [4];
  sm_t  d01, d23, max01, max23, d2, max_all;
  logic s01, s23;
  lut_t lut01, lut23, lut_sel, lut_d2;
  lut_t lut_sel_q, lut_d2_q;
  sm_t  max_q, diff_q;

  // One carry-save row per candidate: A + B + gamma -> (a, b).
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      ca[i] = in_a[i] ^ in_b[i] ^ gam[i];
      cb[i] = {((in_a[i][SMW-2:0] & in_b[i][SMW-2:0]) |
                (in_a[i][SMW-2:0] & gam[i][SMW-2:0]) |
                (in_b[i][SMW-2:0] & gam[i][SMW-2:0])), 1'b0};
      m[i]  = ca[i] + cb[i];
    end
  end

  // First stage: pair comparisons on the carry-save form.
  hybrid_addsub #(.W(SMW)) u_cmp01 (
    .a0(ca[0]), .b0(cb[0]), .a1(ca[1]), .b1(cb[1]), .diff(d01), .sign(s01));
  hybrid_addsub #(.W(SMW)) u_cmp23 (
    .a0(ca[2]), .b0(cb[2]), .a1(ca[3]), .b1(cb[3]), .diff(d23), .sign(s23));

  // Second stage: compare the pair maxima, select maximum and corrections.
  always_comb begin
    max01   = s01 ? m[1] : m[0];
    max23   = s23 ? m[3] : m[2];
    lut01   = lut_corr(d01);
    lut23   = lut_corr(d23);
    d2      = max01 - max23;
    max_all = d2[SMW-1] ? max23 : max01;
    lut_sel = d2[SMW-1] ? lut23 : lut01;
    lut_d2  = lut_corr(d2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_q     <= '0;
      lut_sel_q <= '0;
      lut_d2_q  <= '0;
      diff_q    <= '0;
    end else if (en) begin
      max_q     <= max_all;
      lut_sel_q <= lut_sel;
      lut_d2_q  <= lut_d2;
      diff_q    <= d2;
    end
  end

  // Offset addition after the register.
  assign met_a = max_q;
  assign met_b = sm_t'(lut_sel_q) + sm_t'(lut_d2_q);
  assign diff  = diff_q;
endmodule
