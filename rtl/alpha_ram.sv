// alpha_ram: store of forward state metrics for one window.
//
// The forward recursion of window w runs one window ahead of the backward
// recursion of the same window, and the backward recursion reads the metrics
// in the reverse order.  The memory is therefore split into two banks of
// WIN_L/2 words, used alternately by even and odd windows: one bank is
// written while the other is read.  A word holds the sixteen metrics of one
// even trellis time (the start of a radix-4 step), in the wrapped (9,2)
// format.  One write and one asynchronous read port; the write takes effect
// at the clock edge.  The ping-pong organisation is this design's choice.
module alpha_ram
  import map_pkg::*;
#(
  parameter int unsigned WIN_L = 32,
  localparam int unsigned DEPTH = WIN_L / 2,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wr_bank,
  input  logic [AW-1:0] wr_addr,
  input  sm_t           wr_data [NS],
  input  logic          rd_bank,
  input  logic [AW-1:0] rd_addr,
  output sm_t           rd_data [NS]
);
  logic [NS*SMW-1:0] mem [2][DEPTH];
  logic [NS*SMW-1:0] wr_word, rd_word;

  always_comb begin
    for (int s = 0; s < NS; s++) wr_word[s*SMW +: SMW] = wr_data[s];
  end

  always_ff @(posedge clk) begin
    if (we) mem[wr_bank][wr_addr] <= wr_word;
  end

  assign rd_word = mem[rd_bank][rd_addr];

  always_comb begin
    for (int s = 0; s < NS; s++) rd_data[s] = rd_word[s*SMW +: SMW];
  end
endmodule
