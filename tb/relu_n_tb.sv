// Testbench of relu_n: random 19-bit signed inputs on three channels; each
// output must be clamp(floor(x / 256), 0, 15) one cycle after its input.
module relu_n_tb;
  localparam int C = 3, IW = 19;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [C-1:0] in_valid = 0, out_valid;
  logic [C-1:0][IW-1:0] x = 0;
  logic [C-1:0][3:0] y;
  int checks = 0, failures = 0;
  int ex [C];
  logic [C-1:0] ev;

  relu_n #(.C(C), .IN_W(IW), .OUT_W(4), .RSH(8)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      for (int c = 0; c < C; c++) begin
        int v;
        in_valid[c] = $urandom_range(1);
        // small values hit the interesting range around 0..15*256
        v = (i % 2) ? $signed($urandom_range(10000)) - 3000 : $signed(IW'($urandom));
        x[c] = IW'(v);
        v = $signed(x[c]) >>> 8;
        ev[c] = in_valid[c];
        if (in_valid[c]) ex[c] = v < 0 ? 0 : v > 15 ? 15 : v;
      end
      @(negedge clk);
      for (int c = 0; c < C; c++) begin
        checks++;
        if (out_valid[c] != ev[c] || (ev[c] && y[c] != ex[c])) begin
          failures++; $display("ch%0d y=%0d exp=%0d v=%0d/%0d", c, y[c], ex[c], out_valid[c], ev[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
