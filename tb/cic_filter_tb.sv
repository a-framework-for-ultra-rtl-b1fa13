// Testbench of cic_filter: random 8-bit blocks of four samples (plus a run of
// extreme values) are filtered, and every output is compared with the
// equivalent direct-form FIR out[n] = sum_t h[t] x[4n+3-t] with
// h = 15..4 (t=0..11), -12 (t=12..15), -11..0 (t=16..27), computed from the
// sample history; the output must follow its input block by one cycle.
module cic_filter_tb;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [3:0][7:0] in = 0;
  logic out_valid;
  logic signed [17:0] out;
  int checks = 0, failures = 0;
  int hist[$];

  cic_filter dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int h(int t);
    if (t < 12) return 15 - t;
    if (t < 16) return -12;
    return -(27 - t);
  endfunction

  initial begin
    automatic int hs = 0;
    for (int t = 0; t < 28; t++) hs += h(t);
    checks++;
    if (hs != 0) failures++;   // bandpass: no DC gain
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      automatic int e = 0;
      for (int j = 0; j < 4; j++) begin
        automatic int v = (n >= 500 && n < 520) ? ((n % 4 < 2) ? 127 : -128) : $signed(8'($urandom));
        in[j] = 8'(v);
        hist.push_back(v);
      end
      for (int t = 0; t < 28; t++) if (hist.size() - 1 - t >= 0) e += h(t) * hist[hist.size() - 1 - t];
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out != e) begin
        failures++; if (failures < 5) $display("n=%0d out=%0d exp=%0d v=%0d", n, out, e, out_valid);
      end
      if (n % 3 == 0) begin
        @(negedge clk);
        checks++;
        if (out_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
