// RRAM manager of the Data Control Core.
//
// It owns all access to the 47 RRAM blocks of the Processing Core. The blocks'
// digital controllers form one long shift chain (64 bits = 32 trits per
// block); the host shifts parameter data in and read-back data out one bit
// per io_shift strobe (io_sdi in, io_sdo out) and issues block commands
// (io_cmd: load = read cells into the latches, program = write the chain into
// the cells, capture = copy the latches into the chain for read-back). The
// central control requests a load after every power-up (load_req), which has
// priority over host commands. While the host holds io_sess the manager asks
// for Processing Core power (pwr_req). Commands and shifts wait for pc_ready.
// The host protocol is this design's own.
//
// Timing: a command is broadcast as a one-cycle blk_cmd_valid; the manager
// then waits until no block reports busy. load_done pulses for one cycle.
module rram_manager (
  input  logic                      clk,
  input  logic                      rst_n,
  // host side
  input  logic                      io_sess,
  input  logic                      io_cmd_valid,
  input  afib_pkg::blk_cmd_e        io_cmd,
  input  logic                      io_shift,
  input  logic                      io_sdi,
  output logic                      io_sdo,
  output logic                      busy,
  // central control
  input  logic                      load_req,
  output logic                      load_done,
  output logic                      pwr_req,
  input  logic                      pc_ready,
  // block chain
  output logic                      blk_cmd_valid,
  output afib_pkg::blk_cmd_e        blk_cmd,
  input  logic                      blk_busy,
  output logic                      chain_shift,
  output logic                      chain_in,
  input  logic                      chain_out
);
  import afib_pkg::*;

  typedef enum logic [1:0] {M_IDLE, M_ISSUE, M_WAIT} mstate_e;
  mstate_e st;
  logic    from_ctrl;

  assign pwr_req     = io_sess;
  assign busy        = (st != M_IDLE) || !pc_ready;
  assign chain_shift = io_shift && pc_ready && (st == M_IDLE);
  assign chain_in    = io_sdi;
  assign io_sdo      = chain_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; blk_cmd_valid <= 1'b0; blk_cmd <= BC_NONE; load_done <= 1'b0; from_ctrl <= 1'b0;
    end else begin
      blk_cmd_valid <= 1'b0;
      load_done     <= 1'b0;
      unique case (st)
        M_IDLE: if (pc_ready && load_req && !load_done) begin
                  blk_cmd <= BC_LOAD; from_ctrl <= 1'b1; st <= M_ISSUE;
                end else if (pc_ready && io_cmd_valid && io_cmd != BC_NONE) begin
                  blk_cmd <= io_cmd; from_ctrl <= 1'b0; st <= M_ISSUE;
                end
        M_ISSUE: begin blk_cmd_valid <= 1'b1; st <= M_WAIT; end
        M_WAIT:  if (!blk_cmd_valid && !blk_busy) begin
                   st <= M_IDLE;
                   load_done <= from_ctrl;
                 end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
