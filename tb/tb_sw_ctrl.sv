// tb_sw_ctrl: drives the sliding-window controller (windows of 8 bits, 4
// steps) with a sequence of frames of 2, 1 and 3 windows requested back to
// back, followed after an idle period by a single-window frame.  An
// independent model lists the windows in arrival order; window g must arrive
// in slot g, run forward in slot g+1 and backward in slot g+2.  Every clock
// the testbench checks the enables, start pulses, addresses (arrival and
// backward last-first on the same bank, forward first-first on the other),
// the bank toggling per slot, the dummy or all-equal seeding of the backward
// recursion, the step index within the frame, done, busy and start_ready.
module tb_sw_ctrl;
  localparam int WIN_L = 8, MAX_WIN = 6, D = WIN_L / 2;
  localparam int WINW = $clog2(MAX_WIN + 2) + 1;
  localparam int IDXW = $clog2(MAX_WIN * D);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [WINW-1:0] n_win = '0;
  always #5 clk = ~clk;

  logic start_ready, busy, done, arr_en, arr_bank, dum_init, fw_en, fw_init, fw_bank;
  logic bw_en, bw_init, bw_seed_dummy, bw_bank, bw_last;
  logic [1:0] arr_addr, fw_addr, bw_addr;
  logic [IDXW-1:0] bw_step;

  sw_ctrl #(.WIN_L(WIN_L), .MAX_WIN(MAX_WIN)) dut (.*);

  // Window list of one burst of frames: first/last flag and index.
  int nw = 0;
  bit w_first [16], w_last [16];
  int w_idx [16];
  task automatic add_frame(int n);
    for (int i = 0; i < n; i++) begin
      w_first[nw] = (i == 0); w_last[nw] = (i == n - 1); w_idx[nw] = i;
      nw++;
    end
  endtask

  task automatic chk(string what, int got, int exp, int t);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at clock %0d of burst: got %0d expected %0d", what, t, got, exp);
    end
  endtask

  // Checks one burst of nw windows starting at the current clock.
  task automatic check_burst();
    logic bank0;
    bank0 = arr_bank;
    for (int t = 0; t < (nw + 2) * D; t++) begin
      int s, j;
      bit a, f, b;
      s = t / D; j = t % D;
      a = (s < nw); f = (s >= 1 && s <= nw); b = (s >= 2);
      chk("busy", int'(busy), 1, t);
      chk("arr_en", int'(arr_en), int'(a), t);
      chk("fw_en", int'(fw_en), int'(f), t);
      chk("bw_en", int'(bw_en), int'(b), t);
      chk("arr_bank toggles per slot", int'(arr_bank), int'(bank0 ^ 1'(s % 2)), t);
      chk("fw_bank", int'(fw_bank), int'(!arr_bank), t);
      chk("bw_bank", int'(bw_bank), int'(arr_bank), t);
      if (a) begin
        chk("arr_addr", int'(arr_addr), D - 1 - j, t);
        chk("dum_init", int'(dum_init), int'(j == 0), t);
      end
      if (f) begin
        chk("fw_addr", int'(fw_addr), j, t);
        chk("fw_init", int'(fw_init), int'(w_first[s-1] && j == 0), t);
      end
      if (b) begin
        chk("bw_addr", int'(bw_addr), D - 1 - j, t);
        chk("bw_init", int'(bw_init), int'(j == 0), t);
        chk("bw_seed_dummy", int'(bw_seed_dummy), int'(!w_last[s-2]), t);
        chk("bw_step", int'(bw_step), w_idx[s-2] * D + D - 1 - j, t);
        chk("bw_last", int'(bw_last), int'(w_last[s-2] && j == D - 1), t);
        chk("done", int'(done), int'(w_last[s-2] && j == D - 1), t);
      end
      @(negedge clk);
    end
    chk("idle after burst", int'(busy), 0, -1);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // burst 1: frames of 2, 1 and 3 windows
    nw = 0; add_frame(2); add_frame(1); add_frame(3);
    fork
      begin
        @(negedge clk);
        check_burst();
      end
      begin
        chk("start_ready when idle", int'(start_ready), 1, -1);
        start = 1; n_win = WINW'(2);
        @(negedge clk);
        n_win = WINW'(1);                         // request while frame 1 arrives
        @(negedge clk);
        start = 0;
        chk("start_ready while a request waits", int'(start_ready), 0, -1);
        @(negedge clk);
        while (!start_ready) @(negedge clk);
        start = 1; n_win = WINW'(3);
        @(negedge clk);
        start = 0;
      end
    join
    repeat (5) @(negedge clk);
    chk("still idle", int'(busy), 0, -1);
    // burst 2: a single window, started on an idle controller
    nw = 0; add_frame(1);
    start = 1; n_win = WINW'(1);
    @(negedge clk);
    start = 0;
    check_burst();
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
