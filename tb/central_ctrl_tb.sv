// Testbench of central_ctrl with small windows (WINDOW_RAW=40, NN_IN_LEN=8):
// a preprocessed strobe follows every fourth raw sample. Checks that writes go
// to addresses 0..7 of the active bank only, that the bank flips at each
// window end, that after a window the core is powered, reset released, a load
// requested, the network cleared and exactly NN_IN_LEN consecutive reads of
// the other bank are issued (nn_in_valid one cycle later), that the result is
// captured and the core switched off, and that a window ending while busy
// raises overrun.
module central_ctrl_tb;
  localparam int WR = 40, NL = 8;
  logic clk = 0, rst_n = 0, raw_valid = 0, pre_valid = 0;
  logic buf_wr_bank, buf_wr_en, buf_rd_en;
  logic [2:0] buf_wr_addr, buf_rd_addr;
  logic mgr_pwr_req = 0, pc_pwr_en, pc_rst_n, load_req, load_done = 0;
  logic nn_clear, nn_in_valid, nn_out_valid = 0, result_valid, busy, overrun;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_inv = 0, n_clear = 0, n_res = 0, n_over = 0, n_load = 0;
  int exp_addr = 0;
  logic rd_bank;
  logic hold_result = 0;

  central_ctrl #(.WINDOW_RAW(WR), .NN_IN_LEN(NL)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // simple models of the RRAM manager and the network
  int lt = 0, nt = -1;
  always @(posedge clk) if (rst_n) begin
    load_done <= 0; nn_out_valid <= 0;
    if (load_req && !load_done) begin lt++; if (lt == 6) begin load_done <= 1; lt = 0; n_load++; end end
    if (nn_in_valid) n_inv++;
    if (n_inv == NL && nt < 0 && !hold_result) nt = 10;
    if (nt > 0) nt--;
    if (nt == 0) begin nn_out_valid <= 1; nt = -1; n_inv = 0; end
    if (buf_wr_en) begin
      n_wr++;
      if (buf_wr_addr != 3'(exp_addr)) begin failures++; $display("wr addr %0d exp %0d", buf_wr_addr, exp_addr); end
      exp_addr++;
    end
    if (buf_rd_en) begin
      if (buf_rd_addr != 3'(n_rd % NL)) failures++;
      if (!pc_rst_n || buf_wr_bank == rd_bank) failures++;
      n_rd++;
    end
    if (nn_clear) n_clear++;
    if (result_valid) n_res++;
    if (overrun) n_over++;
    if ((load_req || buf_rd_en) && !pc_pwr_en) failures++;
  end

  task automatic window();
    logic b0 = buf_wr_bank;
    exp_addr = 0;
    for (int i = 0; i < WR; i++) begin
      raw_valid = 1; pre_valid = (i % 4 == 3) && (i > 3); @(negedge clk);
      raw_valid = 0; pre_valid = 0; @(negedge clk);
    end
    checks++; if (buf_wr_bank == b0) failures++;
    rd_bank = b0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    checks++; if (pc_pwr_en) failures++;
    rd_bank = 1;
    for (int w = 0; w < 3; w++) begin
      window();
      checks++; if (n_wr != (w + 1) * NL) begin failures++; $display("writes %0d", n_wr); end
      repeat (60) @(negedge clk);
      checks++; if (n_rd != (w + 1) * NL || n_clear != w + 1 || n_res != w + 1 || n_load != w + 1) begin
        failures++; $display("w%0d rd %0d clr %0d res %0d load %0d", w, n_rd, n_clear, n_res, n_load);
      end
      checks++; if (pc_pwr_en || busy) failures++;
    end
    // host power request keeps the core on
    mgr_pwr_req = 1; @(negedge clk);
    checks++; if (!pc_pwr_en) failures++;
    repeat (4) @(negedge clk);
    checks++; if (!pc_rst_n) failures++;
    mgr_pwr_req = 0; @(negedge clk);
    checks++; if (pc_pwr_en || pc_rst_n) failures++;
    // overrun: the network never answers during the next window
    hold_result = 1;
    window();
    window();
    checks++; if (n_over != 1) begin failures++; $display("overrun %0d", n_over); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
