// Testbench of sc_filter (K=15, stride 3): a random sequence is streamed with
// random gaps, and every output is compared with the valid strided
// convolution computed directly from the sequence and weights. The number of
// outputs must be (L-K)/S+1 and each must appear exactly one cycle after the
// input that completes its window.
module sc_filter_tb;
  localparam int K = 15, S = 3, L = 60;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [6:0] x = 0;
  logic [K-1:0][1:0] w;
  logic out_valid;
  logic signed [10:0] y;
  int checks = 0, failures = 0;
  int xs[L];
  int nout;

  sc_filter #(.K(K), .STRIDE(S), .IN_W(7), .ACC_W(11)) dut (.*);
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

  // out_valid must follow the completing input by exactly one edge
  logic prev_in = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) check_out();
    prev_in = in_valid;
  end

  task automatic check_out();
    automatic int e = 0;
    for (int k = 0; k < K; k++) e += wv(w[k]) * xs[nout*S + k];
    checks++;
    if (y != e || !prev_in || (nout*S + K - 1) >= L) begin
      failures++; $display("out %0d: y=%0d exp=%0d", nout, y, e);
    end
    nout++;
  endtask

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int k = 0; k < K; k++) w[k] = (rep == 3) ? 2'b01 : 2'($urandom_range(3) == 2 ? 2'b11 : $urandom_range(1));
      for (int i = 0; i < L; i++) xs[i] = (rep == 3) ? -64 : $signed(7'($urandom));
      @(negedge clk); rst_n = 1; clear = 1; @(negedge clk); clear = 0;
      nout = 0;
      for (int i = 0; i < L; i++) begin
        while (rep[0] && $urandom_range(2) == 0) @(negedge clk);
        in_valid = 1; x = 7'(xs[i]); @(negedge clk); in_valid = 0;
      end
      repeat (3) @(negedge clk);
      checks++;
      if (nout != (L - K) / S + 1) begin failures++; $display("outputs %0d", nout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
