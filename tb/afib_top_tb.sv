// End-to-end testbench of afib_top at its default sizes (6479-sample windows,
// 1614 network inputs, 47 RRAM blocks).
//
// The host first programs all 1504 RRAM cells through the shift chain and
// lets the Processing Core power down. Then five windows of a synthetic ECG
// are streamed at one sample every 3..4 clocks; the last window uses the
// preprocessing bypass. For every window the testbench predicts the stored
// samples (8-bit quantization, bandpass CIC, scaling, or the bypass path) and
// runs the integer reference network on them; each result must match. During
// the second window the host reads all latched parameters back (load,
// capture, 3008 shifts) and compares them with what was programmed.
//
// Mechanisms counted (each must occur): programming, power-up and power-down
// of the Processing Core, RRAM load after power-up, use of both buffer
// banks, filtered and bypassed windows, and parameter read-back. The
// on-time of the Processing Core per window is checked against 0.2 % of the
// window time at 70 kHz (1771 cycles).
module afib_top_tb;
  import afib_pkg::*;
  import nn_ref_pkg::*;

  localparam int NWIN = 5;
  logic clk = 0, rst_n = 0;
  logic sample_valid = 0, pre_bypass = 0;
  logic signed [11:0] sample = 0;
  logic io_sess = 0, io_cmd_valid = 0, io_shift = 0, io_sdi = 0, io_sdo, io_busy;
  blk_cmd_e io_cmd = BC_NONE;
  logic pc_pwr_en, result_valid, overrun;
  logic [1:0][ACT_W-1:0] result;

  int checks = 0, failures = 0;
  logic [N_TRITS-1:0][1:0] prm;
  int raw [$];          // all raw samples
  bit byp [$];          // bypass flag per raw sample
  int n_res = 0, n_pwr_up = 0, n_pwr_dn = 0, n_load = 0, n_bank0 = 0, n_bank1 = 0;
  int n_prog = 0, n_readback = 0, n_byp_win = 0, on_cycles = 0, max_on = 0;

  afib_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --- reference of the Data Control Core -------------------------------
  function automatic int h(int t);
    if (t < 12) return 15 - t;
    if (t < 16) return -12;
    return -(27 - t);
  endfunction
  function automatic int sat7(int v);
    return v > 63 ? 63 : v < -64 ? -64 : v;
  endfunction

  // Samples stored for window w: outputs caused by raw samples
  // WINDOW_RAW*w-1 .. WINDOW_RAW*(w+1)-2, first NN_IN_LEN of them.
  function automatic seq_t stored(int w);
    seq_t s;
    int q [$];
    int ph = 0;
    for (int g = 0; g < raw.size(); g++) begin
      bit has = 0; int v = 0;
      q.push_back(raw[g] >>> 4);
      if (byp[g]) begin has = 1; v = sat7(q[g] >>> 1); end
      else begin
        if (ph == 3) begin
          int e = 0;
          // the filter sees only the non-bypassed samples
          int k = 0;
          for (int i = g; i >= 0 && k < 28; i--) if (!byp[i]) begin e += h(k) * q[i]; k++; end
          has = 1; v = sat7(e >>> 8); ph = 0;
        end else ph++;
      end
      if (has && g >= int'(WINDOW_RAW)*w - 1 && g <= int'(WINDOW_RAW)*(w+1) - 2 && s.size() < int'(NN_IN_LEN)) s.push_back(v);
    end
    return s;
  endfunction

  // --- monitors ----------------------------------------------------------
  logic pwr_q = 0;
  int cur_on = 0;
  always @(posedge clk) if (rst_n) begin
    pwr_q <= pc_pwr_en;
    if (pc_pwr_en && !pwr_q) n_pwr_up++;
    if (!pc_pwr_en && pwr_q) n_pwr_dn++;
    if (pc_pwr_en && !io_sess) cur_on++;
    if (!pc_pwr_en && pwr_q) begin if (cur_on > max_on) max_on = cur_on; cur_on = 0; end
    if (dut.load_done) n_load++;
    if (dut.rd_en && dut.wr_bank) n_bank0++;
    if (dut.rd_en && !dut.wr_bank) n_bank1++;
  end

  // samples fed to the network, compared with the predicted buffer contents
  int nn_x [$];
  seq_t exp_x [NWIN];
  always @(posedge clk) if (rst_n && dut.nn_in_valid) nn_x.push_back(int'(signed'(dut.rd_data)));
  int exp_res [NWIN][2];
  always @(posedge clk) if (rst_n && result_valid) begin
    // result of window n_res is visible on `result` after this edge
    #1;
    checks++;
    begin
      automatic int bad = 0;
      if (n_res < NWIN && nn_x.size() == (n_res + 1) * NN_IN_LEN)
        for (int j = 0; j < NN_IN_LEN; j++) begin
          if (nn_x[n_res*NN_IN_LEN + j] != exp_x[n_res][j]) begin
            if (bad < 6) $display("window %0d sample %0d: %0d expected %0d", n_res, j,
                                   nn_x[n_res*NN_IN_LEN + j], exp_x[n_res][j]);
            bad++;
          end
        end
      else bad = 1;
      if (bad != 0) begin failures++; $display("window %0d: %0d network inputs differ", n_res, bad); end
    end
    checks++;
    if (n_res >= NWIN || result[0] != exp_res[n_res][0] || result[1] != exp_res[n_res][1]) begin
      failures++;
      $display("window %0d: result %0d %0d expected %0d %0d", n_res, result[0], result[1],
               exp_res[n_res][0], exp_res[n_res][1]);
    end else begin
      $display("window %0d: result %0d %0d ok", n_res, result[0], result[1]);
      if (n_res == NWIN - 1) n_byp_win++;
    end
    n_res++;
  end

  // --- host access ---------------------------------------------------------
  task automatic host_cmd(blk_cmd_e c);
    @(negedge clk); while (io_busy) @(negedge clk);
    io_cmd = c; io_cmd_valid = 1; @(negedge clk); io_cmd_valid = 0;
    @(negedge clk); while (io_busy) @(negedge clk);
  endtask

  task automatic program_all();
    io_sess = 1;
    @(negedge clk); while (io_busy) @(negedge clk);
    for (int b = N_BLOCKS - 1; b >= 0; b--)
      for (int bit_i = 2*N_CELLS - 1; bit_i >= 0; bit_i--) begin
        io_shift = 1; io_sdi = prm[b*N_CELLS + bit_i/2][bit_i%2]; @(negedge clk);
      end
    io_shift = 0;
    host_cmd(BC_PROGRAM);
    n_prog++;
    io_sess = 0;
  endtask

  task automatic readback();
    int bad = 0;
    io_sess = 1;
    host_cmd(BC_LOAD);
    host_cmd(BC_CAPTURE);
    for (int b = N_BLOCKS - 1; b >= 0; b--)
      for (int bit_i = 2*N_CELLS - 1; bit_i >= 0; bit_i--) begin
        @(negedge clk); while (io_busy) @(negedge clk);
        if (io_sdo != prm[b*N_CELLS + bit_i/2][bit_i%2]) bad++;
        io_shift = 1; io_sdi = 0; @(negedge clk); io_shift = 0;
      end
    io_sess = 0;
    checks++;
    if (bad != 0) begin failures++; $display("read-back: %0d bits differ", bad); end
    else n_readback++;
  endtask

  // --- stimulus ---------------------------------------------------------------
  initial begin
    for (int i = 0; i < N_TRITS; i++) prm[i] = rand_trit();
    // exponents at the top of their range keep activations away from 0
    for (int l = 0; l < N_LAYERS; l++)
      for (int t = 0; t < 2 * L_COUT[l]; t++)
        if ($urandom_range(3) != 0) prm[layer_base(l) + L_COUT[l]*L_CIN[l]*L_K[l] + t] = 2'b01;
    repeat (3) @(negedge clk); rst_n = 1;
    program_all();
    repeat (4) @(negedge clk);
    checks++; if (pc_pwr_en) begin failures++; $display("core still powered"); end

    fork
      begin
        for (int w = 0; w < NWIN; w++) begin
          for (int i = 0; i < WINDOW_RAW; i++) begin
            automatic int g = w * WINDOW_RAW + i;
            automatic int v = int'(600.0 * $sin(6.2832 * g / 400.0)) + $signed($urandom_range(800)) - 400
                              + ((g % 430) < 8 ? 1500 : 0);
            if (v > 2047) v = 2047;
            if (v < -2048) v = -2048;
            pre_bypass = (w == NWIN - 1);
            raw.push_back(v); byp.push_back(pre_bypass);
            sample = 12'(v); sample_valid = 1; @(negedge clk); sample_valid = 0;
            repeat (2 + $urandom_range(1)) @(negedge clk);
          end
          begin
            // window w is now complete: predict its result
            automatic seq_t ss = stored(w);
            automatic chan_t r = network(ss, prm);
            exp_x[w] = ss;
            exp_res[w][0] = r[0][0]; exp_res[w][1] = r[1][0];
          end
        end
      end
      begin
        // read the parameters back while the second window is sampled
        repeat (WINDOW_RAW * 3 + 9000) @(negedge clk);
        readback();
      end
    join
    repeat (3000) @(negedge clk);

    checks++; if (n_res != NWIN) begin failures++; $display("results %0d", n_res); end
    checks++; if (n_prog == 0) begin failures++; $display("never programmed"); end
    checks++; if (n_pwr_up < NWIN || n_pwr_dn < NWIN) begin failures++; $display("power cycles %0d/%0d", n_pwr_up, n_pwr_dn); end
    checks++; if (n_load < NWIN) begin failures++; $display("loads %0d", n_load); end
    checks++; if (n_bank0 == 0 || n_bank1 == 0) begin failures++; $display("banks %0d %0d", n_bank0, n_bank1); end
    checks++; if (n_byp_win == 0) begin failures++; $display("bypass window not processed"); end
    checks++; if (n_readback == 0) begin failures++; $display("no read-back"); end
    checks++; if (max_on == 0 || max_on > 1771) begin failures++; $display("on-time %0d cycles", max_on); end
    $display("mechanisms: program %0d, power up %0d, power down %0d, loads %0d, bank reads %0d/%0d, bypass windows %0d, read-backs %0d, max on-time %0d cycles",
             n_prog, n_pwr_up, n_pwr_dn, n_load, n_bank0, n_bank1, n_byp_win, n_readback, max_on);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
