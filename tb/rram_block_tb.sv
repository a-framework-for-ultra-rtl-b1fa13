// Testbench of rram_block (controller + analog model): two blocks are chained,
// 128 bits are shifted in, programmed, the blocks are power-cycled and loaded;
// both must latch their 32 trits and the chain order must put the first bits
// shifted in into the second block.
module rram_block_tb;
  import afib_pkg::*;
  logic clk = 0, rst_n = 0, cmd_valid = 0, chain_shift = 0, chain_in = 0;
  blk_cmd_e cmd = BC_NONE;
  logic [1:0] busy;
  logic c01, chain_out;
  logic [1:0][31:0][1:0] params;
  logic [1:0][31:0][1:0] tr;
  int checks = 0, failures = 0;

  rram_block u0 (.clk, .rst_n, .cmd_valid, .cmd, .busy(busy[0]), .chain_shift, .chain_in, .chain_out(c01), .params(params[0]));
  rram_block u1 (.clk, .rst_n, .cmd_valid, .cmd, .busy(busy[1]), .chain_shift, .chain_in(c01), .chain_out, .params(params[1]));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic command(blk_cmd_e c);
    @(negedge clk); cmd = c; cmd_valid = 1; @(negedge clk); cmd_valid = 0;
    while (|busy) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      for (int b = 0; b < 2; b++) for (int i = 0; i < 32; i++) tr[b][i] = nn_ref_pkg::rand_trit();
      for (int b = 127; b >= 0; b--) begin chain_shift = 1; chain_in = tr[b/64][(b%64)/2][b%2]; @(negedge clk); end
      chain_shift = 0;
      command(BC_PROGRAM);
      rst_n = 0; @(negedge clk); rst_n = 1;
      command(BC_LOAD);
      for (int b = 0; b < 2; b++) begin checks++; if (params[b] != tr[b]) begin failures++; $display("block %0d", b); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
