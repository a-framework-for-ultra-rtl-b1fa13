// Testbench of rram_block_ctrl against the rram_array behavioural model:
// random trits are shifted into the chain segment, programmed, the block is
// reset (power loss), loaded again and the latches must hold the programmed
// trits; capture followed by 64 shifts must return them on chain_out. Also
// checks that the analog block is powered only while busy and the load
// duration of 3*PULSE_CYC+1 busy cycles.
module rram_block_ctrl_tb;
  import afib_pkg::*;
  logic clk = 0, rst_n = 0, cmd_valid = 0, chain_shift = 0, chain_in = 0;
  blk_cmd_e cmd = BC_NONE;
  logic busy, chain_out, pwr_en;
  rram_op_e operation;
  logic [31:0] cell_sel, comp_out;
  logic [31:0][1:0] params;
  int checks = 0, failures = 0;
  logic [31:0][1:0] tr;

  rram_block_ctrl #(.PULSE_CYC(2)) dut (.*);
  rram_array u_arr (.pwr_en, .operation, .cell_sel, .comp_out);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (pwr_en && !busy) begin failures++; $display("powered while idle"); end

  task automatic command(blk_cmd_e c, output int cycles);
    @(negedge clk); cmd = c; cmd_valid = 1; @(negedge clk); cmd_valid = 0; cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < 32; i++) tr[i] = nn_ref_pkg::rand_trit();
      // shift: first bit in ends up as the segment's MSB
      for (int b = 63; b >= 0; b--) begin chain_shift = 1; chain_in = tr[b/2][b%2]; @(negedge clk); end
      chain_shift = 0;
      command(BC_PROGRAM, cyc);
      rst_n = 0; @(negedge clk); rst_n = 1;   // power cycle: latches lost
      checks++; if (params != 0) failures++;
      command(BC_LOAD, cyc);
      checks++; if (params != tr) begin failures++; $display("load r%0d: %h vs %h", r, params, tr); end
      checks++; if (cyc != 3*2 + 1 + 1) begin failures++; $display("load took %0d", cyc); end
      command(BC_CAPTURE, cyc);
      for (int b = 63; b >= 0; b--) begin
        checks++; if (chain_out != tr[b/2][b%2]) failures++;
        chain_shift = 1; chain_in = 0; @(negedge clk);
      end
      chain_shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
