// input_ram: two-bank soft-input symbol memory (banks B1 and B2).
//
// Each bank holds one window of soft input, one radix-4 step (two trellis
// steps, sym2_t) per word, so a bank has WIN_L/2 words.  The sliding-window
// schedule gives each bank, window after window, the role
//   write (a window arrives) -> forward read -> backward read with write
// and the two banks are always in opposite phases: while one bank is read by
// the forward recursion, the other is read by the backward recursion and at
// the same address receives the next arriving window ("write after read").
// Two memory banks therefore suffice.
//
// Ports: one write port (bank, address, data) and two read ports, fa_* for
// the forward recursion and bk_* for the backward recursion.  Reads are
// asynchronous, writes take effect at the clock edge, so a read and a write
// of one address in the same cycle return the old word.  The bank count and
// the write-after-read use follow the published memory schedule; word
// layout and asynchronous reads are this design's choices.
module input_ram
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
  input  sym2_t         wr_data,
  input  logic          fa_bank,
  input  logic [AW-1:0] fa_addr,
  output sym2_t         fa_data,
  input  logic          bk_bank,
  input  logic [AW-1:0] bk_addr,
  output sym2_t         bk_data
);
  sym2_t mem [2][DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_bank][wr_addr] <= wr_data;
  end

  assign fa_data = mem[fa_bank][fa_addr];
  assign bk_data = mem[bk_bank][bk_addr];
endmodule
