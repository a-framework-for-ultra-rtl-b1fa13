// Digital controller and parameter latches of one RRAM memory block.
//
// Each of the 47 RRAM blocks has this controller next to it. It holds
//  - a 64-bit segment of the programming shift chain (trit i in bits
//    [2i+1:2i], encoding {neg, nz}); the segments of all blocks form one long
//    shift register driven by the RRAM manager;
//  - the parameter latches: 32 trits read from the cells once after each
//    power-up and routed straight to the processing elements;
//  - a sequencer that drives the analog block's pwr_en, 3-bit operation and
//    32-bit cell_sel and samples its 32 comparator outputs (comp_out).
// A ternary cell is read in two passes, since comp_out has one bit per cell:
// READ_A (threshold between HRS and the LRS states) gives the nz bits, READ_B
// (threshold between LRS1 and LRS2) the sign bits. Programming writes every
// cell to HRS, then the +1 cells to LRS1 and the -1 cells to LRS2. The block
// is powered only during an operation and switched off afterwards. State
// mapping (HRS = 0, LRS1 = +1, LRS2 = -1), the operation codes and the
// sequences are this design's own.
//
// Timing: every step holds its operation for PULSE_CYC cycles after a
// PULSE_CYC-cycle power-up; busy is high from the cycle after cmd_valid until
// the sequence is over (3*PULSE_CYC+1 cycles for a load, 4*PULSE_CYC+1 for programming).
module rram_block_ctrl #(
  parameter int unsigned N_CELLS   = 32,
  parameter int unsigned PULSE_CYC = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cmd_valid,
  input  afib_pkg::blk_cmd_e           cmd,
  output logic                         busy,
  input  logic                         chain_shift,
  input  logic                         chain_in,
  output logic                         chain_out,
  output logic                         pwr_en,
  output afib_pkg::rram_op_e           operation,
  output logic [N_CELLS-1:0]           cell_sel,
  input  logic [N_CELLS-1:0]           comp_out,
  output logic [N_CELLS-1:0][1:0]      params
);
  import afib_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_PWR, S_STEP1, S_STEP2, S_STEP3, S_OFF} bstate_e;
  bstate_e st;
  logic    prog;     // current sequence is a program sequence
  logic [$clog2(PULSE_CYC + 1)-1:0] cnt;
  logic [N_CELLS-1:0][1:0] sreg;
  logic [N_CELLS-1:0]      nz_q, pos_sel, neg_sel;
  logic                    last;

  assign chain_out = sreg[N_CELLS-1][1];
  assign busy      = (st != S_IDLE);
  assign last      = (cnt == ($bits(cnt))'(PULSE_CYC - 1));
  for (genvar i = 0; i < N_CELLS; i++) begin : g_sel
    assign pos_sel[i] = (sreg[i] == 2'b01);
    assign neg_sel[i] = (sreg[i] == 2'b11);
  end

  // Analog block control for the current step.
  always_comb begin
    pwr_en    = (st != S_IDLE);
    operation = OP_IDLE;
    cell_sel  = '0;
    unique case (st)
      S_STEP1: begin operation = prog ? OP_WR_HRS  : OP_READ_A; cell_sel = '1; end
      S_STEP2: begin operation = prog ? OP_WR_LRS1 : OP_READ_B; cell_sel = prog ? pos_sel : '1; end
      S_STEP3: begin operation = OP_WR_LRS2; cell_sel = neg_sel; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; prog <= 1'b0; cnt <= '0; sreg <= '0; params <= '0; nz_q <= '0;
    end else begin
      if (chain_shift && st == S_IDLE) sreg <= $bits(sreg)'({sreg, chain_in});
      unique case (st)
        S_IDLE: if (cmd_valid) begin
          cnt <= '0;
          unique case (cmd)
            BC_LOAD:    begin prog <= 1'b0; st <= S_PWR; end
            BC_PROGRAM: begin prog <= 1'b1; st <= S_PWR; end
            BC_CAPTURE: sreg <= params;
            default: ;
          endcase
        end
        S_PWR, S_STEP1, S_STEP2, S_STEP3: begin
          cnt <= last ? '0 : cnt + 1'b1;
          if (last) begin
            unique case (st)
              S_PWR:   st <= S_STEP1;
              S_STEP1: begin
                st <= S_STEP2;
                if (!prog) nz_q <= comp_out;
              end
              S_STEP2: begin
                if (prog) st <= S_STEP3;
                else begin
                  st <= S_OFF;
                  for (int i = 0; i < int'(N_CELLS); i++)
                    params[i] <= {nz_q[i] & comp_out[i], nz_q[i]};
                end
              end
              default: st <= S_OFF;
            endcase
          end
        end
        S_OFF:   st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
