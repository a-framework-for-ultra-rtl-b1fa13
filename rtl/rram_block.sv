// One RRAM block of the Processing Core: the analog memory block (behavioural
// model) together with its digital controller and parameter latches. 47 of
// these are chained through chain_in/chain_out.
//
// Interface and timing are those of rram_block_ctrl; params holds the 32
// trits latched at the last load.
module rram_block #(
  parameter int unsigned N_CELLS   = 32,
  parameter int unsigned PULSE_CYC = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cmd_valid,
  input  afib_pkg::blk_cmd_e        cmd,
  output logic                      busy,
  input  logic                      chain_shift,
  input  logic                      chain_in,
  output logic                      chain_out,
  output logic [N_CELLS-1:0][1:0]   params
);
  import afib_pkg::*;

  logic               pwr_en;
  rram_op_e           operation;
  logic [N_CELLS-1:0] cell_sel, comp_out;

  rram_block_ctrl #(.N_CELLS(N_CELLS), .PULSE_CYC(PULSE_CYC)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .busy, .chain_shift, .chain_in, .chain_out,
    .pwr_en, .operation, .cell_sel, .comp_out, .params
  );

  rram_array #(.N_CELLS(N_CELLS)) u_array (
    .pwr_en, .operation, .cell_sel, .comp_out
  );
endmodule
