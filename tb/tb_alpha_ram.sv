// tb_alpha_ram: writes random metric vectors into both banks and reads them
// back in reverse order, as the backward recursion does, while the other
// bank is being written.
module tb_alpha_ram;
  import map_pkg::*;
  localparam int D = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we = 0, wr_bank = 0, rd_bank = 0;
  logic [3:0] wr_addr = '0, rd_addr = '0;
  sm_t wr_data [NS], rd_data [NS];
  sm_t model [2][D][NS];

  alpha_ram dut (.clk, .we, .wr_bank, .wr_addr, .wr_data, .rd_bank, .rd_addr, .rd_data);

  initial begin
    for (int s = 0; s < NS; s++) wr_data[s] = '0;
    for (int w = 0; w < 6; w++) begin
      for (int j = 0; j < D; j++) begin
        @(negedge clk);
        we = 1; wr_bank = 1'(w); wr_addr = 4'(j);
        for (int s = 0; s < NS; s++) wr_data[s] = sm_t'($urandom);
        rd_bank = ~1'(w); rd_addr = 4'(D - 1 - j);
        #1;
        if (w > 0) begin
          checks++;
          for (int s = 0; s < NS; s++)
            if (rd_data[s] !== model[rd_bank][rd_addr][s]) begin
              failures++;
              $display("FAIL window %0d addr %0d state %0d", w - 1, rd_addr, s);
              break;
            end
        end
        @(posedge clk);
        for (int s = 0; s < NS; s++) model[wr_bank][wr_addr][s] = wr_data[s];
      end
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
