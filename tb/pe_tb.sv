// Testbench of pe: random inputs, weights, shift and enable; the held value
// and the product register are compared with a model of the intended
// behaviour (pass-on register, product of the ternary weight and the value
// shifting in, updated only when enabled).
module pe_tb;
  logic clk = 0, rst_n = 0, clear = 0, shift = 0, en = 0;
  logic [1:0] w = 0;
  logic signed [6:0] x_in = 0, x_out;
  logic signed [10:0] p;
  int checks = 0, failures = 0;
  int ex = 0, ep = 0;

  pe #(.W(7), .ACC_W(11)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      shift = ($urandom_range(3) != 0); en = $urandom_range(1);
      x_in = 7'($urandom); w = 2'($urandom);
      clear = ($urandom_range(50) == 0);
      @(posedge clk); #1;
      if (clear) begin ex = 0; ep = 0; end
      else if (shift) begin
        ex = x_in;
        if (en) ep = (w == 2'b01) ? x_in : (w == 2'b11) ? -x_in : 0;
      end
      checks++;
      if (x_out != ex || p != ep) begin
        failures++;
        if (failures < 5) $display("i=%0d x_out=%0d/%0d p=%0d/%0d", i, x_out, ex, p, ep);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
