// map_decoder: radix-4 log-MAP soft-in/soft-out decoder for the 16-state
// CCSDS constituent code, two bits per clock.
//
// Data path (one radix-4 step, i.e. two trellis steps, per clock in every
// unit):
//   soft input --> input_ram (banks B1/B2) --> forward acs_array --> alpha_ram
//              |                          \--> backward acs_array --\
//              \--> dummy-beta acs_array (reads the arriving symbols  --> llr_unit
//                   directly, seeds the backward recursion)           /
//   alpha_ram ----------------------------------------------------------/
// sw_ctrl sequences the sliding-window schedule (see that module).  Each
// recursion is a bank of radix-4 offset-add-compare-select units with
// hybrid carry-save compare; the LLR unit computes the first bit of each
// step by trace-back from the backward metrics and the second bit
// conventionally.
//
// Interface: pulse start (while start_ready is high) with n_win, the frame
// length in windows of WIN_L bits.  The frame's windows arrive directly after
// those of the frame before it (from the next clock if the decoder is idle):
// in_ready is then high for n_win * WIN_L/2 clocks and one sym2_t (two
// trellis steps) must be valid on every one of them: the windows in order,
// but within each window the steps last-first (step w*D + D-1 down to w*D,
// D = WIN_L/2).  Frames requested in time follow each other without a gap,
// so the decoder sustains two bits per clock across frames.  Values are
// Lc-scaled channel samples in (5,2) and a-priori values in (6,2), bit 1
// sent as +1.  LLRs leave on llr_valid, two per clock (llr0 for bit
// 2*llr_step, llr1 for bit 2*llr_step+1, wrapped (9,2), positive = 1), in
// the same per-window reverse order, starting two windows after the first
// input; frame_done accompanies the last pair of each frame.  A frame of
// n_win windows started on an idle decoder takes (n_win + 2) * WIN_L/2 + 5
// clocks from start to frame_done.
// The forward recursion starts in state 0; the last window's backward
// recursion starts from all-equal metrics (unterminated end).  Frames whose
// length is not a multiple of WIN_L can be padded with zero symbols.
module map_decoder
  import map_pkg::*;
#(
  parameter int unsigned WIN_L   = 32,
  parameter int unsigned MAX_WIN = 56,
  localparam int unsigned D    = WIN_L / 2,
  localparam int unsigned AW   = $clog2(D),
  localparam int unsigned WINW = $clog2(MAX_WIN + 2) + 1,
  localparam int unsigned IDXW = $clog2(MAX_WIN * D)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [WINW-1:0] n_win,
  output logic            start_ready,
  output logic            busy,
  output logic            in_ready,
  input  logic            in_valid,
  input  sym2_t           in_sym,
  output logic            llr_valid,
  output logic [IDXW-1:0] llr_step,
  output sm_t             llr0,
  output sm_t             llr1,
  output logic            frame_done
);
  logic          dum_init, fw_en, fw_init, fw_bank, bw_en, bw_init, bw_seed_dummy;
  logic          arr_en, arr_bank, bw_bank, bw_last, ctrl_done;
  logic [AW-1:0] arr_addr, fw_addr, bw_addr;
  logic [IDXW-1:0] bw_step;

  sw_ctrl #(.WIN_L(WIN_L), .MAX_WIN(MAX_WIN)) u_ctrl (
    .clk, .rst_n, .start, .n_win, .start_ready, .busy, .done(ctrl_done),
    .arr_en, .arr_bank, .arr_addr, .dum_init,
    .fw_en, .fw_init, .fw_bank, .fw_addr,
    .bw_en, .bw_init, .bw_seed_dummy, .bw_bank, .bw_addr, .bw_step, .bw_last);

  assign in_ready = arr_en;

  // The stream has no back-pressure: the source must keep up.
  always_ff @(posedge clk) begin
    if (rst_n && in_ready)
      assert (in_valid) else $error("map_decoder: soft input missing while in_ready");
  end

  sym2_t fw_sym, bw_sym;
  input_ram #(.WIN_L(WIN_L)) u_iram (
    .clk, .we(arr_en), .wr_bank(arr_bank), .wr_addr(arr_addr), .wr_data(in_sym),
    .fa_bank(fw_bank), .fa_addr(fw_addr), .fa_data(fw_sym),
    .bk_bank(bw_bank), .bk_addr(bw_addr), .bk_data(bw_sym));

  sm_t zero_met [NS], alpha_start [NS], bw_seed [NS];
  sm_t dum_cur [NS], dum_met [NS], dum_diff [NS], dum_g4 [16];
  sm_t fw_cur [NS], fw_met [NS], fw_diff [NS], fw_g4 [16];
  sm_t bw_cur [NS], bw_met [NS], bw_diff [NS], bw_g4 [16];
  sm_t alpha_rd [NS];

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      zero_met[s]    = '0;
      // Known start state 0; the others start 16.0 lower.
      alpha_start[s] = (s == 0) ? '0 : sm_t'(-(2 ** (SMW - 3)));
      bw_seed[s]     = bw_seed_dummy ? dum_met[s] : '0;
    end
  end

  acs_array #(.BACKWARD(1'b1)) u_dummy (
    .clk, .rst_n, .en(arr_en), .init(dum_init), .init_met(zero_met), .sym(in_sym),
    .cur(dum_cur), .met(dum_met), .diff(dum_diff), .g4(dum_g4));

  acs_array #(.BACKWARD(1'b0)) u_alpha (
    .clk, .rst_n, .en(fw_en), .init(fw_init), .init_met(alpha_start), .sym(fw_sym),
    .cur(fw_cur), .met(fw_met), .diff(fw_diff), .g4(fw_g4));

  acs_array #(.BACKWARD(1'b1)) u_beta (
    .clk, .rst_n, .en(bw_en), .init(bw_init), .init_met(bw_seed), .sym(bw_sym),
    .cur(bw_cur), .met(bw_met), .diff(bw_diff), .g4(bw_g4));

  alpha_ram #(.WIN_L(WIN_L)) u_aram (
    .clk, .we(fw_en), .wr_bank(fw_bank), .wr_addr(fw_addr), .wr_data(fw_cur),
    .rd_bank(bw_bank), .rd_addr(bw_addr), .rd_data(alpha_rd));

  logic [IDXW:0] out_tag;
  llr_unit #(.TAGW(IDXW + 1)) u_llr (
    .clk, .rst_n, .in_valid(bw_en), .in_tag({bw_last, bw_step}),
    .alpha(alpha_rd), .beta_k2(bw_cur), .g4(bw_g4),
    .beta_k(bw_met), .diff(bw_diff),
    .out_valid(llr_valid), .out_tag(out_tag), .llr0, .llr1);

  assign llr_step   = out_tag[IDXW-1:0];
  assign frame_done = llr_valid && out_tag[IDXW];
endmodule
