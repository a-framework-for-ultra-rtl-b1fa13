// Behavioural model of the analog RRAM memory block (not synthesizable
// circuitry in the real chip).
//
// The real block holds 32 1T1R cells, each with its own read circuit, an
// opamp that buffers the programming/read pulse, a reference block for the
// pulse, word-line and comparator reference voltages, a small control logic
// decoding the 3-bit operation, and a power supply control that detaches the
// block from its 1.2 V and 3.3 V rails when pwr_en is low. This model keeps
// only the logic behaviour at the block's digital pins:
//  - each cell stores HRS, LRS1 or LRS2 and keeps it while unpowered
//    (non-volatile); cells start in HRS;
//  - a write operation applied while powered sets every selected cell
//    (cell_sel) to the written state, level-sensitively;
//  - READ_A makes comp_out high for cells in LRS1 or LRS2, READ_B for cells in
//    LRS2 (two comparator thresholds); comp_out is low otherwise and while
//    unpowered.
// Pulse shapes, voltages and cell variation are not modelled.
module rram_array #(
  parameter int unsigned N_CELLS = 32
) (
  input  logic                 pwr_en,
  input  afib_pkg::rram_op_e   operation,
  input  logic [N_CELLS-1:0]   cell_sel,
  output logic [N_CELLS-1:0]   comp_out
);
  import afib_pkg::*;

  typedef enum logic [1:0] {HRS = 2'd0, LRS1 = 2'd1, LRS2 = 2'd2} cell_state_e;
  cell_state_e state [N_CELLS];

  initial for (int i = 0; i < int'(N_CELLS); i++) state[i] = HRS;

  always @(pwr_en or operation or cell_sel) begin
    if (pwr_en)
      for (int i = 0; i < int'(N_CELLS); i++)
        if (cell_sel[i])
          case (operation)
            OP_WR_HRS:  state[i] = HRS;
            OP_WR_LRS1: state[i] = LRS1;
            OP_WR_LRS2: state[i] = LRS2;
            default: ;
          endcase
  end

  always_comb
    for (int i = 0; i < int'(N_CELLS); i++)
      comp_out[i] = pwr_en && ((operation == OP_READ_A && state[i] != HRS) ||
                               (operation == OP_READ_B && state[i] == LRS2));
endmodule
