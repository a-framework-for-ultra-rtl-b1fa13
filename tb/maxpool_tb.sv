// Testbench of maxpool (8 channels, 14 values): several sequences of random
// signed values are fed with per-channel skew and gaps; each channel must
// emit the maximum of its 14 values exactly once, one cycle after its 14th
// value.
module maxpool_tb;
  localparam int C = 8, N = 14, W = 20;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [C-1:0] in_valid = 0, out_valid;
  logic [C-1:0][W-1:0] x = 0;
  logic [C-1:0][W-1:0] y;
  int checks = 0, failures = 0;
  int mx [C], cnt [C];
  logic [C-1:0] due;

  maxpool #(.C(C), .LEN(N), .W(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int outs = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < C; c++) cnt[c] = 0;
    for (int i = 0; i < 14 * 20; i++) begin
      due = 0;
      for (int c = 0; c < C; c++) begin
        in_valid[c] = $urandom_range(3) != 0;
        x[c] = W'($signed($urandom_range(2000)) - 1000 - (i % 7 == 0 ? 400000 : 0));
        if (in_valid[c]) begin
          if (cnt[c] == 0 || $signed(x[c]) > mx[c]) mx[c] = $signed(x[c]);
          cnt[c]++;
          if (cnt[c] == N) begin due[c] = 1; cnt[c] = 0; end
        end
      end
      @(negedge clk);
      for (int c = 0; c < C; c++) begin
        if (out_valid[c] != due[c]) begin failures++; $display("ch%0d valid %0d due %0d", c, out_valid[c], due[c]); end
        if (due[c]) begin
          checks++; outs++;
          if ($signed(y[c]) != mx[c]) begin failures++; $display("ch%0d y=%0d exp=%0d", c, $signed(y[c]), mx[c]); end
        end
      end
    end
    checks++;
    if (outs < C * 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
