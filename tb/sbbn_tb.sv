// Testbench of sbbn: random inputs and random exponent/bias trits on two
// channels; each output is compared with (x * 2^(e)) + b, e = balanced
// ternary of the two exponent trits + 4, b = balanced ternary of the four bias
// trits, saturated to OUT_W bits, and must appear exactly two cycles after
// its input.
module sbbn_tb;
  import nn_ref_pkg::*;
  localparam int C = 2, IW = 11, OW = 19;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [C-1:0] in_valid = 0, out_valid;
  logic [C-1:0][IW-1:0] x = 0;
  logic [C-1:0][3:0] scale;
  logic [C-1:0][7:0] bias;
  logic [C-1:0][OW-1:0] y;
  int checks = 0, failures = 0;
  int exp_q[C][$];

  sbbn #(.C(C), .IN_W(IW), .OUT_W(OW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tv(logic [1:0] t);
    return t == 2'b01 ? 1 : t == 2'b11 ? -1 : 0;
  endfunction

  // input of cycle n must leave at cycle n+2
  logic [C-1:0] v_d1, v_d2;
  always @(posedge clk) begin
    v_d2 <= v_d1; v_d1 <= in_valid;
    for (int c = 0; c < C; c++) begin
      if (rst_n && out_valid[c] != v_d2[c]) begin failures++; $display("valid timing ch%0d", c); end
      if (rst_n && out_valid[c]) begin
        automatic int e = exp_q[c].pop_front();
        checks++;
        if ($signed(y[c]) != e) begin failures++; $display("ch%0d y=%0d exp=%0d", c, $signed(y[c]), e); end
      end
    end
  end

  initial begin
    v_d1 = 0; v_d2 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      for (int c = 0; c < C; c++) begin
        in_valid[c] = $urandom_range(3) != 0;
        x[c] = (i % 50 == 7) ? 11'h400 : 11'($urandom);
        for (int t = 0; t < 2; t++) scale[c][2*t +: 2] = rand_trit();
        for (int t = 0; t < 4; t++) bias[c][2*t +: 2] = rand_trit();
        if (in_valid[c]) begin
          automatic int e = tv(scale[c][1:0]) + 3*tv(scale[c][3:2]) + 4;
          automatic int b = tv(bias[c][1:0]) + 3*tv(bias[c][3:2]) + 9*tv(bias[c][5:4]) + 27*tv(bias[c][7:6]);
          exp_q[c].push_back(sat((longint'($signed(x[c])) <<< e) + b, OW));
        end
      end
      @(negedge clk);
      // scale/bias stay put for the bias stage of this input
      in_valid = 0;
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
