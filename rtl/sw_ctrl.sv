// sw_ctrl: sliding-window schedule of the radix-4 MAP decoder.
//
// Time is divided into slots of D = WIN_L/2 clocks, one window per slot and
// stage.  Three window descriptors (valid, first/last window of its frame,
// window index) move one stage per slot:
//   arrival  : the window arrives, last step first, and is written into
//              input bank `par`, while the dummy-beta recursion runs backward
//              over the same arriving symbols from an all-equal start;
//   forward  : the window is read from bank ~par in step order and its alpha
//              metrics are written into alpha bank ~par (start from the known
//              initial state for the first window of a frame);
//   backward : the window is read from bank `par` in reverse order - the
//              address the arriving window is being written to - and the LLRs
//              are produced; it starts from the dummy-beta result of the
//              previous slot, or from all-equal metrics for the last window
//              of a frame.
// `par` toggles every slot, so the two input banks (and the two alpha banks)
// are always used in opposite phases and two banks suffice.  Frames follow
// each other without a gap: while the last two windows of one frame are in
// the forward and backward stages, the next frame is already arriving, so
// the decoder sustains one radix-4 step (two bits) per clock.
//
// Frame handshake: start with n_win (>= 1) is accepted while start_ready is
// high.  When the decoder is idle the first window arrives in the next clock;
// otherwise the request waits (start_ready low) until the current frame's
// last window has arrived and follows it directly.  done marks the last
// backward step of a frame.  The stage structure follows the published
// memory and dataflow diagrams; the descriptor pipeline, the handshake and
// the all-equal start at the frame end are this design's choices.  All
// outputs other than start_ready are decodes of registers.
module sw_ctrl #(
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
  output logic            done,
  // arrival and dummy-beta
  output logic            arr_en,
  output logic            arr_bank,
  output logic [AW-1:0]   arr_addr,
  output logic            dum_init,
  // forward recursion
  output logic            fw_en,
  output logic            fw_init,
  output logic            fw_bank,
  output logic [AW-1:0]   fw_addr,
  // backward recursion and LLR
  output logic            bw_en,
  output logic            bw_init,
  output logic            bw_seed_dummy,
  output logic            bw_bank,
  output logic [AW-1:0]   bw_addr,
  output logic [IDXW-1:0] bw_step,
  output logic            bw_last
);
  typedef struct packed {
    logic            valid;
    logic            first;
    logic            last;
    logic [WINW-1:0] idx;
  } win_t;

  win_t            arr_q, fw_q, bw_q, arr_nx;
  logic [AW-1:0]   j;
  logic            par, boundary, take_new;
  logic [WINW-1:0] rem_q, idx_q, pend_n;   // windows still to arrive / next index
  logic            pend_q;
  logic [WINW-1:0] new_n;
  logic            new_ok;

  assign busy        = arr_q.valid || fw_q.valid || bw_q.valid;
  assign boundary    = !busy || (j == AW'(D - 1));
  assign start_ready = !pend_q;

  // The frame whose windows arrive next: a waiting request, or a new one.
  always_comb begin
    new_ok = pend_q || (start && n_win != '0);
    new_n  = pend_q ? pend_n : n_win;
    take_new = (rem_q == '0) && new_ok;
    if (rem_q != '0) begin
      arr_nx.valid = 1'b1;
      arr_nx.first = (idx_q == '0);
      arr_nx.last  = (rem_q == WINW'(1));
      arr_nx.idx   = idx_q;
    end else if (new_ok) begin
      arr_nx.valid = 1'b1;
      arr_nx.first = 1'b1;
      arr_nx.last  = (new_n == WINW'(1));
      arr_nx.idx   = '0;
    end else begin
      arr_nx = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arr_q  <= '0;
      fw_q   <= '0;
      bw_q   <= '0;
      j      <= '0;
      par    <= 1'b0;
      rem_q  <= '0;
      idx_q  <= '0;
      pend_q <= 1'b0;
      pend_n <= '0;
    end else begin
      // Register a request that cannot start at this boundary.
      if (start && start_ready && n_win != '0 && !(boundary && take_new && !pend_q)) begin
        pend_q <= 1'b1;
        pend_n <= n_win;
      end
      if (boundary) begin
        j     <= '0;
        par   <= ~par;
        arr_q <= arr_nx;
        fw_q  <= arr_q;
        bw_q  <= fw_q;
        if (rem_q != '0) begin
          rem_q <= rem_q - 1'b1;
          idx_q <= idx_q + 1'b1;
        end else if (new_ok) begin
          rem_q  <= new_n - 1'b1;
          idx_q  <= WINW'(1);
          pend_q <= 1'b0;
        end
      end else begin
        j <= j + 1'b1;
      end
    end
  end

  always_comb begin
    arr_en        = arr_q.valid;
    arr_bank      = par;
    arr_addr      = AW'(D - 1) - j;
    dum_init      = (j == '0);
    fw_en         = fw_q.valid;
    fw_init       = fw_q.first && (j == '0);
    fw_bank       = ~par;
    fw_addr       = j;
    bw_en         = bw_q.valid;
    bw_init       = (j == '0);
    bw_seed_dummy = !bw_q.last;
    bw_bank       = par;
    bw_addr       = AW'(D - 1) - j;
    bw_step       = IDXW'(bw_q.idx) * IDXW'(D) + IDXW'(bw_addr);
    bw_last       = bw_q.valid && bw_q.last && (j == AW'(D - 1));
    done          = bw_last;
  end
endmodule
