// llr_unit: soft output of one radix-4 step, L(u_{k+1}) and L(u_{k+2}).
//
// The radix-4 step runs from even time k to k+2 and decides two bits.
//  * First bit, u_{k+1}: trace-back path.  Sixteen tb_unit instances turn
//    beta_k(s) and the backward recursion's second-stage difference into the
//    two path metrics leaving each state s (first bit 0 and 1).  One adder
//    per path adds alpha_k(s); a max* tree over the 16 paths of each bit
//    value gives the two terms of the LLR.
//  * Second bit, u_{k+2}: conventional radix-4 path.  All 64 two-step paths
//    alpha_k(s'') + gamma4 + beta_{k+2}(s) are formed and reduced by a max*
//    tree over the 32 paths of each value of u_{k+2}.
// LLR = max*(paths with bit 1) - max*(paths with bit 0), wrapped to the
// (9,2) state-metric format; positive favours bit 1.  The max* operator here
// is the exact two-input max + lut.
//
// Timing: in_valid, tag, alpha (alpha_k), beta_k2 (beta_{k+2}) and g4 belong
// to the cycle in which the backward recursion performs the step; beta_k and
// diff are that recursion's registered results and are sampled one clock
// later.  Each path has four pipeline stages (trace-back, add, max*, max*;
// and add, max*, max*, max* + subtract); the conventional path is delayed one
// extra clock so that llr0 (u_{k+1}) and llr1 (u_{k+2}) leave together with
// out_valid and out_tag five clocks after in_valid.  Using the trace-back
// method only for the first bit follows the published synthesis comparison;
// the pipeline cut points inside the max* trees are this design's choice.
module llr_unit
  import map_pkg::*;
#(
  parameter int unsigned TAGW = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [TAGW-1:0] in_tag,
  input  sm_t             alpha   [NS],
  input  sm_t             beta_k2 [NS],
  input  sm_t             g4      [16],
  input  sm_t             beta_k  [NS],
  input  sm_t             diff    [NS],
  output logic            out_valid,
  output logic [TAGW-1:0] out_tag,
  output sm_t             llr0,
  output sm_t             llr1
);
  localparam int unsigned LAT = 5;

  logic [LAT-1:0]  vld_q;
  logic [TAGW-1:0] tag_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      for (int i = 0; i < LAT; i++) tag_q[i] <= '0;
    end else begin
      vld_q    <= {vld_q[LAT-2:0], in_valid};
      tag_q[0] <= in_tag;
      for (int i = 1; i < LAT; i++) tag_q[i] <= tag_q[i-1];
    end
  end
  assign out_valid = vld_q[LAT-1];
  assign out_tag   = tag_q[LAT-1];

  // ---------------- first bit: trace-back path ----------------
  sm_t alpha_d1 [NS], alpha_d2 [NS];
  sm_t surv0 [NS], surv1 [NS];
  sm_t p1_s0 [NS], p1_s1 [NS];          // pipe 1: survivors
  sm_t p2_m0 [NS], p2_m1 [NS];          // pipe 2: alpha + survivor
  sm_t p3_m0 [4],  p3_m1 [4];           // pipe 3: 16 -> 4
  sm_t p4_llr0;                         // pipe 4: 4 -> 1, subtract

  for (genvar s = 0; s < NS; s++) begin : g_tb
    tb_unit u_tb (.beta(beta_k[s]), .diff(diff[s]),
                  .survivor0(surv0[s]), .survivor1(surv1[s]));
  end

  always_ff @(posedge clk) begin
    alpha_d1 <= alpha;
    alpha_d2 <= alpha_d1;
    p1_s0    <= surv0;
    p1_s1    <= surv1;
    for (int s = 0; s < NS; s++) begin
      p2_m0[s] <= alpha_d2[s] + p1_s0[s];
      p2_m1[s] <= alpha_d2[s] + p1_s1[s];
    end
    for (int i = 0; i < 4; i++) begin
      p3_m0[i] <= maxstar2(maxstar2(p2_m0[4*i],   p2_m0[4*i+1]),
                           maxstar2(p2_m0[4*i+2], p2_m0[4*i+3]));
      p3_m1[i] <= maxstar2(maxstar2(p2_m1[4*i],   p2_m1[4*i+1]),
                           maxstar2(p2_m1[4*i+2], p2_m1[4*i+3]));
    end
    p4_llr0 <= maxstar2(maxstar2(p3_m1[0], p3_m1[1]), maxstar2(p3_m1[2], p3_m1[3]))
             - maxstar2(maxstar2(p3_m0[0], p3_m0[1]), maxstar2(p3_m0[2], p3_m0[3]));
  end

  // ---------------- second bit: conventional radix-4 path ----------------
  sm_t q1_m0 [32], q1_m1 [32];          // pipe 1: the 64 path sums
  sm_t q2_m0 [8],  q2_m1 [8];           // pipe 2: 32 -> 8
  sm_t q3_m0 [2],  q3_m1 [2];           // pipe 3: 8 -> 2
  sm_t q4_llr1, q5_llr1;                // pipe 4: 2 -> 1, subtract; align

  always_ff @(posedge clk) begin
    for (int sp = 0; sp < NS; sp++) begin
      for (int u1 = 0; u1 < 2; u1++) begin
        for (int u2 = 0; u2 < 2; u2++) begin
          logic [3:0] sm, sn;
          logic       p1, p2;
          sm = next_state(4'(sp), 1'(u1));
          sn = next_state(sm, 1'(u2));
          p1 = parity_bit(4'(sp), 1'(u1));
          p2 = parity_bit(sm, 1'(u2));
          if (u2 == 1)
            q1_m1[2*sp + u1] <= alpha[sp] + g4[{1'(u1), p1, 1'(u2), p2}] + beta_k2[sn];
          else
            q1_m0[2*sp + u1] <= alpha[sp] + g4[{1'(u1), p1, 1'(u2), p2}] + beta_k2[sn];
        end
      end
    end
    for (int i = 0; i < 8; i++) begin
      q2_m0[i] <= maxstar2(maxstar2(q1_m0[4*i],   q1_m0[4*i+1]),
                           maxstar2(q1_m0[4*i+2], q1_m0[4*i+3]));
      q2_m1[i] <= maxstar2(maxstar2(q1_m1[4*i],   q1_m1[4*i+1]),
                           maxstar2(q1_m1[4*i+2], q1_m1[4*i+3]));
    end
    for (int i = 0; i < 2; i++) begin
      q3_m0[i] <= maxstar2(maxstar2(q2_m0[4*i],   q2_m0[4*i+1]),
                           maxstar2(q2_m0[4*i+2], q2_m0[4*i+3]));
      q3_m1[i] <= maxstar2(maxstar2(q2_m1[4*i],   q2_m1[4*i+1]),
                           maxstar2(q2_m1[4*i+2], q2_m1[4*i+3]));
    end
    q4_llr1 <= maxstar2(q3_m1[0], q3_m1[1]) - maxstar2(q3_m0[0], q3_m0[1]);
    q5_llr1 <= q4_llr1;
  end

  assign llr0 = p4_llr0;
  assign llr1 = q5_llr1;
endmodule
