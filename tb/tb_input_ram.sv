// tb_input_ram: fills both banks with random words, reads them back on both
// read ports, and checks that a read of the address being written in the
// same clock returns the old word (write after read).
module tb_input_ram;
  import map_pkg::*;
  localparam int D = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we = 0, wr_bank = 0, fa_bank = 0, bk_bank = 0;
  logic [3:0] wr_addr = '0, fa_addr = '0, bk_addr = '0;
  sym2_t wr_data, fa_data, bk_data;
  logic [$bits(sym2_t)-1:0] model [2][D];

  input_ram dut (.clk, .we, .wr_bank, .wr_addr, .wr_data, .fa_bank, .fa_addr, .fa_data,
                 .bk_bank, .bk_addr, .bk_data);

  initial begin
    wr_data = '0;
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk);
        we = 1; wr_bank = 1'(b); wr_addr = 4'(a);
        wr_data = sym2_t'($urandom);
        model[b][a] = wr_data;
      end
    @(negedge clk);
    we = 0;
    for (int k = 0; k < 200; k++) begin
      fa_bank = 1'($urandom); fa_addr = 4'($urandom);
      bk_bank = 1'($urandom); bk_addr = 4'($urandom);
      #1;
      checks += 2;
      if (fa_data !== model[fa_bank][fa_addr]) begin failures++; $display("FAIL fa read"); end
      if (bk_data !== model[bk_bank][bk_addr]) begin failures++; $display("FAIL bk read"); end
    end
    // write after read: read and overwrite the same word in one clock
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      we = 1; wr_bank = 1'($urandom); wr_addr = 4'($urandom);
      bk_bank = wr_bank; bk_addr = wr_addr;
      wr_data = sym2_t'($urandom);
      #1;
      checks++;
      if (bk_data !== model[bk_bank][bk_addr]) begin failures++; $display("FAIL read before write"); end
      @(posedge clk);
      model[wr_bank][wr_addr] = wr_data;
      #1;
      checks++;
      if (bk_data !== model[bk_bank][bk_addr]) begin failures++; $display("FAIL write not stored"); end
    end
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
