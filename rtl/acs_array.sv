// acs_array: 16-state radix-4 state-metric recursion with its branch metric
// unit.  One instance is the forward (alpha) recursion, others the backward
// (beta) and the dummy-beta recursion of the sliding-window decoder.
//
// Every clock with en high, the array consumes the soft input of one radix-4
// step (two trellis steps) and computes all sixteen new metrics with sixteen
// r4_acs units.  The recursion feedback passes through a multiplexer: with
// init high, the predecessor metrics are taken from init_met (B parts zero)
// instead of the array's own registers.  This is how a recursion starts at a
// frame or window boundary, and how the beta recursion is seeded from the
// dummy-beta result.
//
//   BACKWARD = 0: met(s) at time k+2 from the four states s'' at time k that
//                 reach s; candidates paired by the odd-time state s'.
//   BACKWARD = 1: met(s'') at time k from the four states s at time k+2 that
//                 s'' reaches; candidate pairs share the first input bit u1,
//                 so pair 0 is the u1 = 0 pair.
//
// cur is the metric vector this step starts from (after the init
// multiplexer, as full values), met the registered result (A + B), diff the
// registered second-stage difference per state and g4 the radix-4 branch
// metrics of the step, all for use by the LLR unit (g4[0] is always zero
// and g4[1], g4[4] are single parity values, see bmu).  Latency one clock.
// The trellis is the CCSDS 16-state code (map_pkg); the pairing follows the
// published recursion unit.
module acs_array
  import map_pkg::*;
#(
  parameter bit BACKWARD = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  init,
  input  sm_t   init_met [NS],
  input  sym2_t sym,
  output sm_t   cur      [NS],
  output sm_t   met      [NS],
  output sm_t   diff     [NS],
  output sm_t   g4       [16]
);
  sm_t fa [NS], fb [NS];        // feedback parts after the init multiplexer
  sm_t ra [NS], rb [NS];        // registered parts
  sm_t pa [NS][4], pb [NS][4], pg [NS][4];

  bmu u_bmu (.sym(sym), .g4(g4));

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      fa[s]  = init ? init_met[s] : ra[s];
      fb[s]  = init ? '0          : rb[s];
      cur[s] = fa[s] + fb[s];
      met[s] = ra[s] + rb[s];
    end
  end

  // Trellis wiring: choose predecessor (or successor) and branch metric of
  // each candidate j of each state.
  always_comb begin
    logic [3:0] s1, s2;
    logic       u1, u2, p1, p2;
    for (int s = 0; s < NS; s++) begin
      for (int j = 0; j < 4; j++) begin
        if (!BACKWARD) begin
          s1 = {4'(s) << 1} | 4'(j >> 1);          // s'  = {s[2:0], b2}
          s2 = {s1 << 1} | 4'(j & 1);              // s'' = {s'[2:0], b1}
          u1 = s1[3] ^ s2[1] ^ s2[0];
          p1 = parity_bit(s2, u1);
          u2 = 1'(s >> 3) ^ s1[1] ^ s1[0];
          p2 = parity_bit(s1, u2);
          pa[s][j] = fa[s2];
          pb[s][j] = fb[s2];
        end else begin
          u1 = 1'(j >> 1);
          u2 = 1'(j & 1);
          s1 = next_state(4'(s), u1);
          s2 = next_state(s1, u2);
          p1 = parity_bit(4'(s), u1);
          p2 = parity_bit(s1, u2);
          pa[s][j] = fa[s2];
          pb[s][j] = fb[s2];
        end
        pg[s][j] = g4[{u1, p1, u2, p2}];
      end
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_acs
    r4_acs u_acs (
      .clk(clk), .rst_n(rst_n), .en(en),
      .in_a(pa[s]), .in_b(pb[s]), .gam(pg[s]),
      .met_a(ra[s]), .met_b(rb[s]), .diff(diff[s]));
  end
endmodule
