// Central control of the Data Control Core (always powered).
//
// Windowing: the raw sample strobe is counted; every WINDOW_RAW samples
// (6479 = 12.65 s at 512 Hz) a window ends. Preprocessed samples are written
// into the active bank of the double buffer at addresses 0..NN_IN_LEN-1;
// further samples of the same window are not stored. At a window end the
// banks are swapped and, if the Processing Core is idle, processing of the
// finished bank starts; if it is still busy the window is dropped and
// `overrun` pulses.
//
// Processing sequence (power-down operation): switch the Processing Core on
// (pc_pwr_en), wait PWR_CYC cycles for its supply before releasing its reset
// (pc_rst_n), have the RRAM manager read all parameters into the latches
// (load_req / load_done), clear the network, stream the window from the
// buffer into the network one sample per cycle, capture the result and
// switch the core off again. The core is also kept on while the RRAM manager
// requests power for host access (mgr_pwr_req).
//
// Timing: nn_in_valid follows buf_rd_en by one cycle (SRAM read latency).
// result_valid pulses for one cycle with the captured result.
module central_ctrl #(
  parameter int unsigned WINDOW_RAW = 6479,
  parameter int unsigned NN_IN_LEN  = 1614,
  parameter int unsigned PWR_CYC    = 2,
  parameter int unsigned AW         = $clog2(NN_IN_LEN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          raw_valid,
  input  logic          pre_valid,
  // double buffer
  output logic          buf_wr_bank,
  output logic          buf_wr_en,
  output logic [AW-1:0] buf_wr_addr,
  output logic          buf_rd_en,
  output logic [AW-1:0] buf_rd_addr,
  // power of the Processing Core
  input  logic          mgr_pwr_req,
  output logic          pc_pwr_en,
  output logic          pc_rst_n,
  // RRAM parameter load
  output logic          load_req,
  input  logic          load_done,
  // network
  output logic          nn_clear,
  output logic          nn_in_valid,
  input  logic          nn_out_valid,
  output logic          result_valid,
  output logic          busy,
  output logic          overrun
);
  typedef enum logic [2:0] {P_IDLE, P_PWRUP, P_LOAD, P_CLEAR, P_STREAM, P_WAIT} pstate_e;
  pstate_e st;

  localparam int unsigned WCW = $clog2(WINDOW_RAW);
  logic [WCW-1:0] raw_cnt;
  logic           win_end;
  logic [AW:0]    wr_cnt;   // samples stored in the current window
  logic [$clog2(PWR_CYC + 1)-1:0] pwr_cnt;

  assign win_end   = raw_valid && (raw_cnt == WCW'(WINDOW_RAW - 1));
  assign buf_wr_en   = pre_valid && (wr_cnt < (AW+1)'(NN_IN_LEN));
  assign buf_wr_addr = wr_cnt[AW-1:0];
  assign busy      = (st != P_IDLE);
  assign pc_pwr_en = busy || mgr_pwr_req;

  // Window counting and buffer writing.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_cnt <= '0; buf_wr_bank <= 1'b0; wr_cnt <= '0;
    end else begin
      if (raw_valid) raw_cnt <= win_end ? '0 : raw_cnt + 1'b1;
      if (win_end) begin
        buf_wr_bank <= ~buf_wr_bank;
        wr_cnt      <= '0;
      end else if (buf_wr_en) begin
        wr_cnt      <= wr_cnt + 1'b1;
      end
    end
  end

  // Power good: reset of the Processing Core released PWR_CYC cycles after
  // its supply is switched on, asserted as soon as it is switched off.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwr_cnt <= '0; pc_rst_n <= 1'b0;
    end else if (!pc_pwr_en) begin
      pwr_cnt <= '0; pc_rst_n <= 1'b0;
    end else if (pwr_cnt != ($bits(pwr_cnt))'(PWR_CYC)) begin
      pwr_cnt <= pwr_cnt + 1'b1;
    end else begin
      pc_rst_n <= 1'b1;
    end
  end

  // Processing sequence.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; load_req <= 1'b0; nn_clear <= 1'b0; buf_rd_en <= 1'b0;
      buf_rd_addr <= '0; nn_in_valid <= 1'b0; result_valid <= 1'b0; overrun <= 1'b0;
    end else begin
      nn_clear     <= 1'b0;
      result_valid <= 1'b0;
      overrun      <= win_end && (st != P_IDLE);
      nn_in_valid  <= buf_rd_en;
      unique case (st)
        P_IDLE:   if (win_end) st <= P_PWRUP;
        P_PWRUP:  if (pc_rst_n) begin st <= P_LOAD; load_req <= 1'b1; end
        P_LOAD:   if (load_done) begin
                    load_req <= 1'b0; nn_clear <= 1'b1; st <= P_CLEAR;
                  end
        P_CLEAR:  begin st <= P_STREAM; buf_rd_en <= 1'b1; buf_rd_addr <= '0; end
        P_STREAM: if (buf_rd_addr == AW'(NN_IN_LEN - 1)) begin
                    buf_rd_en <= 1'b0; st <= P_WAIT;
                  end else begin
                    buf_rd_addr <= buf_rd_addr + 1'b1;
                  end
        P_WAIT:   if (nn_out_valid) begin result_valid <= 1'b1; st <= P_IDLE; end
        default:  st <= P_IDLE;
      endcase
    end
  end
endmodule
