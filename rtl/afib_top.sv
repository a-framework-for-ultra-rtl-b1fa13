// AFib (atrial fibrillation) classification chip: always-on Data Control Core
// and power-gated Processing Core.
//
// Data Control Core (always on): the raw ECG samples (signed 12 bit, one per
// sample_valid strobe, 512 Hz) are quantized and bandpass/decimation
// filtered (preprocessing), and written window by window into an SRAM double
// buffer. The central control counts 6479-sample windows, swaps the buffer
// banks at every window end and runs the Processing Core on the finished
// window. The RRAM manager gives the host access to the RRAM parameter chain.
//
// Processing Core (power gated): 47 RRAM blocks of 32 ternary cells each
// with their controllers and latches (1504 trits, 1490 of them used), and the
// dataflow-driven network. After every power-up the manager has all cells
// read into the latches; then the 1614-sample window is streamed through the
// network at one sample per clock and the two 4-bit class activations are
// returned on result/result_valid. Switching the core off is modelled by
// holding it in reset (pc_pwr_en drives the external power switch), so
// everything volatile in it is lost and re-read from RRAM next time.
//
// Parameter WINDOW_RAW (default 6479) sets the raw samples per window; it
// only exists so that short windows can be tried, the design point is the
// default.
//
// This implementation uses one clock for both cores; the sample rate is set
// by the sample_valid strobe rather than by a separate 512 Hz clock.
//
// Host access: hold io_sess (the core is powered), wait for io_busy low, then
// shift 47*64 bits through io_shift/io_sdi (the first bit ends in the most
// significant bit of the last block; trit i of block b holds parameter trit
// 32*b + i as {neg, nz}), and issue io_cmd = program (1), load (0) or
// capture (2) with io_cmd_valid. After capture the latched parameters can be
// shifted out on io_sdo.
module afib_top #(
  parameter int unsigned WINDOW_RAW = afib_pkg::WINDOW_RAW
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          sample_valid,
  input  logic signed [11:0]            sample,
  input  logic                          pre_bypass,
  input  logic                          io_sess,
  input  logic                          io_cmd_valid,
  input  afib_pkg::blk_cmd_e            io_cmd,
  input  logic                          io_shift,
  input  logic                          io_sdi,
  output logic                          io_sdo,
  output logic                          io_busy,
  output logic                          pc_pwr_en,
  output logic                          result_valid,
  output logic [1:0][afib_pkg::ACT_W-1:0] result,
  output logic                          overrun
);
  import afib_pkg::*;

  localparam int unsigned AW = $clog2(NN_IN_LEN);

  // ---------------- Data Control Core ----------------
  logic                  pre_v;
  logic signed [X_W-1:0] pre_y;
  logic                  wr_bank, wr_en, rd_en;
  logic [AW-1:0]         wr_addr, rd_addr;
  logic [X_W-1:0]        rd_data;
  logic                  mgr_pwr_req, pc_rst_n, load_req, load_done;
  logic                  nn_clear, nn_in_valid, nn_out_valid;
  logic                  blk_cmd_valid, blk_busy, chain_shift, chain_in, chain_out;
  blk_cmd_e              blk_cmd;
  logic [1:0][ACT_W-1:0] nn_y;

  preprocessing u_pre (
    .clk, .rst_n, .clear(1'b0), .bypass(pre_bypass), .in_valid(sample_valid), .in(sample),
    .out_valid(pre_v), .out(pre_y)
  );

  double_buffer #(.DEPTH(NN_IN_LEN), .W(X_W)) u_buf (
    .clk, .wr_bank, .wr_en, .wr_addr, .wr_data(pre_y), .rd_en, .rd_addr, .rd_data
  );

  central_ctrl #(.WINDOW_RAW(WINDOW_RAW), .NN_IN_LEN(NN_IN_LEN)) u_ctrl (
    .clk, .rst_n, .raw_valid(sample_valid), .pre_valid(pre_v),
    .buf_wr_bank(wr_bank), .buf_wr_en(wr_en), .buf_wr_addr(wr_addr),
    .buf_rd_en(rd_en), .buf_rd_addr(rd_addr),
    .mgr_pwr_req, .pc_pwr_en, .pc_rst_n, .load_req, .load_done,
    .nn_clear, .nn_in_valid, .nn_out_valid, .result_valid, .busy(), .overrun
  );

  rram_manager u_mgr (
    .clk, .rst_n, .io_sess, .io_cmd_valid, .io_cmd, .io_shift, .io_sdi, .io_sdo, .busy(io_busy),
    .load_req, .load_done, .pwr_req(mgr_pwr_req), .pc_ready(pc_rst_n),
    .blk_cmd_valid, .blk_cmd, .blk_busy, .chain_shift, .chain_in, .chain_out
  );

  // Result register of the always-on domain.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            result <= '0;
    else if (nn_out_valid) result <= nn_y;
  end

  // ---------------- Processing Core ----------------
  logic                      pc_rst;
  logic [N_TRITS-1:0][1:0]   params;
  logic [N_BLOCKS-1:0]       bb;
  logic [N_BLOCKS:0]         chain;

  assign pc_rst    = rst_n && pc_rst_n;
  assign chain[0]  = chain_in;
  assign chain_out = chain[N_BLOCKS];
  assign blk_busy  = |bb;

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_rram
    rram_block #(.N_CELLS(N_CELLS)) u_blk (
      .clk, .rst_n(pc_rst), .cmd_valid(blk_cmd_valid), .cmd(blk_cmd), .busy(bb[b]),
      .chain_shift, .chain_in(chain[b]), .chain_out(chain[b+1]),
      .params(params[b*N_CELLS +: N_CELLS])
    );
  end

  nn_core #(.L_IN(NN_IN_LEN)) u_nn (
    .clk, .rst_n(pc_rst), .clear(nn_clear), .params, .in_valid(nn_in_valid),
    .x(signed'(rd_data)), .out_valid(nn_out_valid), .y(nn_y)
  );
endmodule
