// Global max pooling, one lane per channel.
//
// Each lane keeps the running maximum of the signed values of its channel and
// emits it after LEN values (14 x 8 -> 8 in the ECG network), then starts
// over. Lanes count their own inputs, so the channel skew is preserved.
//
// Timing: out_valid/y appear one cycle after the LEN-th input of a channel.
module maxpool #(
  parameter int unsigned C   = 8,
  parameter int unsigned LEN = 14,
  parameter int unsigned W   = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [C-1:0]         in_valid,
  input  logic [C-1:0][W-1:0]  x,
  output logic [C-1:0]         out_valid,
  output logic [C-1:0][W-1:0]  y
);
  localparam int unsigned CW = $clog2(LEN + 1);

  for (genvar c = 0; c < C; c++) begin : g_ch
    logic [CW-1:0]       cnt;
    logic signed [W-1:0] mx;
    logic signed [W-1:0] nmx;
    assign nmx = (cnt == '0 || signed'(x[c]) > mx) ? signed'(x[c]) : mx;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt <= '0; mx <= '0; out_valid[c] <= 1'b0; y[c] <= '0;
      end else if (clear) begin
        cnt <= '0; out_valid[c] <= 1'b0;
      end else begin
        out_valid[c] <= 1'b0;
        if (in_valid[c]) begin
          if (cnt == CW'(LEN - 1)) begin
            cnt          <= '0;
            out_valid[c] <= 1'b1;
            y[c]         <= nmx;
          end else begin
            cnt <= cnt + 1'b1;
            mx  <= nmx;
          end
        end
      end
    end
  end
endmodule
