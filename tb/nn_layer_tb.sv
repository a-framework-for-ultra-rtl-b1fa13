// Testbench of nn_layer (4 -> 4 channels, K=5, stride 2): skewed input
// (channels 0 and 1 together, then one cycle per channel) is streamed in;
// every output channel must produce the strided multi-channel convolution,
// channels 0 and 1 in the same cycle and channel o (o >= 2) o-1 cycles after
// channel 0, i.e. the same skew as the input.
module nn_layer_tb;
  localparam int CI = 4, CO = 4, K = 5, S = 2, L = 33;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [CI-1:0] in_valid = 0;
  logic [CI-1:0][4:0] x = 0;
  logic [CO-1:0][CI-1:0][K-1:0][1:0] w;
  logic [CO-1:0] out_valid;
  logic [CO-1:0][9:0] y;
  int checks = 0, failures = 0, cyc = 0;
  int xs[CI][L];
  int nout[CO];
  int t0[$];   // cycle of each channel-0 output

  nn_layer #(.C_IN(CI), .C_OUT(CO), .K(K), .STRIDE(S), .IN_W(5), .ACC_W(10)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int wv(logic [1:0] t);
    return t == 2'b01 ? 1 : t == 2'b11 ? -1 : 0;
  endfunction

  always @(negedge clk) begin
    cyc++;
    for (int o = 0; o < CO; o++) if (out_valid[o]) begin
      automatic int e = 0, j = nout[o], d = (o < 2) ? 0 : o - 1;
      for (int c = 0; c < CI; c++) for (int k = 0; k < K; k++) e += wv(w[o][c][k]) * xs[c][j*S + k];
      if (o == 0) t0.push_back(cyc);
      checks++;
      if ($signed(y[o]) != e) begin failures++; $display("o%0d j%0d y=%0d exp=%0d", o, j, $signed(y[o]), e); end
      checks++;
      if (j >= t0.size() || cyc != t0[j] + d) begin failures++; $display("o%0d j%0d skew wrong", o, j); end
      nout[o]++;
    end
  end

  int T[L];
  initial begin
    for (int o = 0; o < CO; o++) for (int c = 0; c < CI; c++) for (int k = 0; k < K; k++)
      w[o][c][k] = 2'($urandom_range(2) == 2 ? 2'b11 : $urandom_range(1));
    for (int c = 0; c < CI; c++) for (int i = 0; i < L; i++) xs[c][i] = $urandom_range(15);
    for (int o = 0; o < CO; o++) nout[o] = 0;
    T[0] = 0;
    for (int i = 1; i < L; i++) T[i] = T[i-1] + 1 + $urandom_range(2);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < T[L-1] + CI + 1; t++) begin
      @(posedge clk); #1;
      in_valid = 0;
      for (int c = 0; c < CI; c++) begin
        automatic int d = (c < 2) ? 0 : c - 1;
        for (int i = 0; i < L; i++) if (T[i] + d == t) begin in_valid[c] = 1; x[c] = 5'(xs[c][i]); end
      end
    end
    @(posedge clk); #1 in_valid = 0;
    repeat (10) @(posedge clk);
    for (int o = 0; o < CO; o++) begin
      checks++;
      if (nout[o] != (L - K) / S + 1) begin failures++; $display("o%0d outputs %0d", o, nout[o]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
