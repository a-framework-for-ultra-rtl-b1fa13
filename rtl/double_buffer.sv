// Double buffer of the Data Control Core: two SRAM banks of DEPTH words.
//
// While one window is written into bank wr_bank by the preprocessing, the
// previous window is read from the other bank by the Processing Core; the
// central control flips wr_bank at every window boundary, so writing and
// reading alternate between the banks. Each bank is a single-port synchronous
// RAM (write or read per cycle); the banks stand for the SRAM macros.
//
// Timing: writes take effect at the clock edge; rd_data holds the word
// addressed by rd_addr one cycle after rd_en.
module double_buffer #(
  parameter int unsigned DEPTH = 1614,
  parameter int unsigned W     = 7,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_bank,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0] bank0 [DEPTH];
  logic [W-1:0] bank1 [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && !wr_bank) bank0[wr_addr] <= wr_data;
    if (wr_en &&  wr_bank) bank1[wr_addr] <= wr_data;
    if (rd_en) rd_data <= wr_bank ? bank0[rd_addr] : bank1[rd_addr];
  end

  // Writes and reads address different banks by construction.
  a_addr: assert property (@(posedge clk) wr_en |-> int'(wr_addr) < DEPTH);
  a_raddr: assert property (@(posedge clk) rd_en |-> int'(rd_addr) < DEPTH);
endmodule
