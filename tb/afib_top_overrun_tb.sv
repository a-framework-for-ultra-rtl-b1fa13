// Overrun test of afib_top with windows shortened to 1000 raw samples.
//
// Samples arrive on every clock, so a window lasts 1000 cycles while one
// processing run (power-up, parameter load, 1614 network inputs, network
// latency) takes about 1680 cycles. Every second window therefore ends while
// the Processing Core is still busy: that window must be dropped with an
// overrun pulse, and the next one processed normally. Over six windows the
// testbench expects three results and three overrun pulses, never both for
// the same window, and the core powered off at the end.
module afib_top_overrun_tb;
  import afib_pkg::*;

  localparam int unsigned WIN = 1000;
  logic clk = 0, rst_n = 0;
  logic sample_valid = 0, pre_bypass = 0;
  logic signed [11:0] sample = 0;
  logic io_sess = 0, io_cmd_valid = 0, io_shift = 0, io_sdi = 0, io_sdo, io_busy;
  blk_cmd_e io_cmd = BC_NONE;
  logic pc_pwr_en, result_valid, overrun;
  logic [1:0][ACT_W-1:0] result;
  int checks = 0, failures = 0, n_res = 0, n_ovr = 0, n_win = 0;

  afib_top #(.WINDOW_RAW(WIN)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (result_valid) n_res++;
    if (overrun) n_ovr++;
    if (dut.u_ctrl.win_end) n_win++;
    if (result_valid && overrun) begin failures++; $display("result and overrun together"); end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 6 * WIN; i++) begin
      sample = 12'($urandom_range(4095)); sample_valid = 1; @(negedge clk);
    end
    sample_valid = 0;
    repeat (2500) @(negedge clk);
    checks++; if (n_win != 6) begin failures++; $display("windows %0d", n_win); end
    checks++; if (n_ovr != 3) begin failures++; $display("overruns %0d", n_ovr); end
    checks++; if (n_res != 3) begin failures++; $display("results %0d", n_res); end
    checks++; if (pc_pwr_en) begin failures++; $display("core still on"); end
    $display("windows %0d, results %0d, overruns %0d", n_win, n_res, n_ovr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
