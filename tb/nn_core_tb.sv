// Testbench of nn_core: random parameters and random input windows are run
// through the streaming network and the two outputs are compared with the
// integer reference model. Six windows are run back to back (with `clear`
// in between), two of them with random gaps in the input stream, and most
// with every exponent at its maximum so that the activations are not all
// zero. The latency from the last input to the result must be exactly 49
// cycles, the pipeline depth of the six layers.
module nn_core_tb;
  import afib_pkg::*;
  import nn_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [X_W-1:0] x = '0;
  logic [N_TRITS-1:0][1:0] params;
  logic out_valid;
  logic [1:0][ACT_W-1:0] y;
  int checks = 0, failures = 0;

  nn_core dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got0, got1; bit got;
  always @(posedge clk) if (out_valid) begin got = 1; got0 = y[0]; got1 = y[1]; end

  task automatic run_window(int gap_pct, int shift, bit hi);
    seq_t xs; chan_t ref_out; int last, lat;
    for (int i = 0; i < N_TRITS; i++) params[i] = rand_trit();
    // hi: every exponent at its maximum (scale 2^0), so activations spread
    // over 0..15 instead of collapsing to 0
    if (hi) for (int l = 0; l < N_LAYERS; l++)
      for (int t = 0; t < 2 * L_COUT[l]; t++)
        params[layer_base(l) + L_COUT[l]*L_CIN[l]*L_K[l] + t] = 2'b01;
    for (int i = 0; i < NN_IN_LEN; i++) xs.push_back($signed($urandom_range(127)) - 64);
    for (int i = 0; i < NN_IN_LEN; i++) xs[i] = xs[i] >>> shift;
    ref_out = network(xs, params);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    got = 0;
    for (int i = 0; i < NN_IN_LEN; i++) begin
      while ($urandom_range(99) < gap_pct) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; x = X_W'(xs[i]); @(negedge clk);
    end
    in_valid = 0;
    lat = 0;
    while (!got && lat < 1000) begin @(negedge clk); lat++; end
    checks++;
    if (!got || lat != 49) begin failures++; $display("no result / latency %0d", lat); end
    checks++;
    if (got0 != ref_out[0][0] || got1 != ref_out[1][0]) begin
      failures++; $display("mismatch: got %0d %0d exp %0d %0d", got0, got1, ref_out[0][0], ref_out[1][0]);
    end else $display("window ok: %0d %0d (latency %0d)", got0, got1, lat);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run_window(0, 0, 0);
    run_window(30, 1, 1);
    run_window(0, 2, 1);
    run_window(0, 0, 1);
    run_window(10, 0, 1);
    run_window(0, 3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
