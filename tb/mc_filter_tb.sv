// Testbench of mc_filter (3 input channels, K=5, stride 2): inputs are
// streamed with the architecture's skew (channels 0 and 1 together, channel 2
// one cycle later). Each output is compared with the multi-channel strided
// convolution, and its cycle with the expected t + max(2, C_IN).
module mc_filter_tb;
  localparam int C = 3, K = 5, S = 2, L = 41;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [C-1:0] in_valid = 0;
  logic [C-1:0][6:0] x = 0;
  logic [C-1:0][K-1:0][1:0] w;
  logic out_valid;
  logic signed [10:0] y;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int xs[C][L];
  int tin[L];

  mc_filter #(.C_IN(C), .K(K), .STRIDE(S), .IN_W(7), .ACC_W(11)) dut (.*);
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

  // One block samples inputs and outputs at the same edge: cyc counts edges,
  // tin[i] is the edge at which channel-0 sample i was taken.
  int n_in0 = 0;
  always @(posedge clk) begin
    if (rst_n && in_valid[0]) begin tin[n_in0] = cyc; n_in0++; end
    if (rst_n && out_valid) check_out();
    cyc++;
  end

  task automatic check_out();
    automatic int e = 0, j = nout * S + K - 1;
    for (int c = 0; c < C; c++) for (int k = 0; k < K; k++) e += wv(w[c][k]) * xs[c][nout*S + k];
    checks++;
    if (y != e) begin failures++; $display("out %0d: y=%0d exp=%0d", nout, y, e); end
    checks++;
    if (cyc != tin[j] + C) begin failures++; $display("out %0d at %0d, input at %0d", nout, cyc, tin[j]); end
    nout++;
  endtask

  // Channel-0 sample i goes in at step T[i] (random gaps); channel c >= 2
  // gets its sample i exactly c-1 steps later, as the skew requires.
  int T[L];
  initial begin
    int nsteps;
    for (int c = 0; c < C; c++) for (int k = 0; k < K; k++) w[c][k] = 2'($urandom_range(2) == 2 ? 2'b11 : $urandom_range(1));
    for (int c = 0; c < C; c++) for (int i = 0; i < L; i++) xs[c][i] = $signed(7'($urandom));
    T[0] = 0;
    for (int i = 1; i < L; i++) T[i] = T[i-1] + 1 + ((i % 3 == 0) ? $urandom_range(2) : 0);
    nsteps = T[L-1] + C + 1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < nsteps; t++) begin
      in_valid = 0;
      for (int c = 0; c < C; c++) begin
        automatic int d = (c < 2) ? 0 : c - 1;
        for (int i = 0; i < L; i++) if (T[i] + d == t) begin in_valid[c] = 1; x[c] = 7'(xs[c][i]); end
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (nout != (L - K) / S + 1) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
