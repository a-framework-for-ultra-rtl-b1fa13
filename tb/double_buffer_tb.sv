// Testbench of double_buffer: a window is written into one bank while the
// other bank is read back; after the bank swap the previously written window
// must be read back intact while the next one is written, for several windows
// in a row. Read data is checked one cycle after the read strobe.
module double_buffer_tb;
  localparam int D = 1614;
  logic clk = 0, wr_bank = 0, wr_en = 0, rd_en = 0;
  logic [10:0] wr_addr = 0, rd_addr = 0;
  logic [6:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0;
  logic [6:0] win [4][D];

  double_buffer dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 4; w++) for (int i = 0; i < D; i++) win[w][i] = 7'($urandom);
    for (int w = 0; w < 4; w++) begin
      wr_bank = w[0];
      for (int i = 0; i < D; i++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = 11'(i); wr_data = win[w][i];
        rd_en = (w > 0); rd_addr = 11'(D - 1 - i);
        @(posedge clk); #1;
        wr_en = 0; rd_en = 0;
        if (w > 0) begin
          checks++;
          if (rd_data != win[w-1][D-1-i]) begin
            failures++; if (failures < 5) $display("w%0d a%0d rd=%0d exp=%0d", w, D-1-i, rd_data, win[w-1][D-1-i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
