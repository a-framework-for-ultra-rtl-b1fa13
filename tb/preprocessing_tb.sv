// Testbench of preprocessing: random signed 12-bit samples are quantized,
// filtered and decimated by four; each output is compared with an independent
// model (truncate to 8 bit, direct-form bandpass FIR on the last 28 samples,
// divide by 256 rounding down, saturate to 7 bit). Then bypass mode is
// checked: one output per sample, floor(q/2) saturated to 7 bit.
module preprocessing_tb;
  logic clk = 0, rst_n = 0, clear = 0, bypass = 0, in_valid = 0;
  logic signed [11:0] in = 0;
  logic out_valid;
  logic signed [6:0] out;
  int checks = 0, failures = 0;
  int hist[$];
  int exp_q[$];
  int n_filt = 0, n_byp = 0;

  preprocessing dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int h(int t);
    if (t < 12) return 15 - t;
    if (t < 16) return -12;
    return -(27 - t);
  endfunction
  function automatic int sat7(int v);
    return v > 63 ? 63 : v < -64 ? -64 : v;
  endfunction

  always @(posedge clk) if (out_valid) begin
    checks++;
    if (exp_q.size() == 0 || out != exp_q[0]) begin
      failures++; if (failures < 5) $display("out=%0d exp=%0d", out, exp_q.size() ? exp_q[0] : 999);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
    if (bypass) n_byp++; else n_filt++;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int q;
      // slow sine-like ramp plus noise keeps the filtered output in range
      in = 12'($signed($urandom_range(1200)) - 600 + ((i / 16) % 2 ? 800 : -800));
      q = $signed(in) >>> 4;
      hist.push_back(q);
      if (i % 4 == 3) begin
        automatic int e = 0;
        for (int t = 0; t < 28; t++) if (int'(hist.size()) - 1 - t >= 0) e += h(t) * hist[hist.size() - 1 - t];
        exp_q.push_back(sat7(e >>> 8));
      end
      in_valid = 1; @(negedge clk); in_valid = 0;
      repeat ($urandom_range(2)) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    bypass = 1;
    for (int i = 0; i < 300; i++) begin
      in = 12'($urandom);
      exp_q.push_back(sat7(($signed(in) >>> 4) >>> 1));
      in_valid = 1; @(negedge clk); in_valid = 0;
      if (i % 2) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (n_filt != 1000 || n_byp != 300 || exp_q.size() != 0) begin
      failures++; $display("counts %0d %0d %0d", n_filt, n_byp, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
