// Saturated ReLU ("ReLU N"), one lane per channel.
//
// Each lane drops RSH fractional bits of its signed input (arithmetic shift)
// and clamps the result to 0..2^OUT_W-1 (N = 15 for 4-bit activations):
// negative values become 0, values above N become N. The saturation limit is
// the quantization of the next layer's input.
//
// Timing: one registered cycle; per-channel valids keep the channel skew.
module relu_n #(
  parameter int unsigned C     = 2,
  parameter int unsigned IN_W  = 19,
  parameter int unsigned OUT_W = 4,
  parameter int unsigned RSH   = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic [C-1:0]             in_valid,
  input  logic [C-1:0][IN_W-1:0]   x,
  output logic [C-1:0]             out_valid,
  output logic [C-1:0][OUT_W-1:0]  y
);
  localparam logic signed [IN_W-1:0] NMAX = IN_W'((1 << OUT_W) - 1);

  for (genvar c = 0; c < C; c++) begin : g_ch
    logic signed [IN_W-1:0] s;
    assign s = signed'(x[c]) >>> RSH;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     begin out_valid[c] <= 1'b0; y[c] <= '0; end
      else if (clear) begin out_valid[c] <= 1'b0; end
      else begin
        out_valid[c] <= in_valid[c];
        if (in_valid[c]) begin
          if (s < 0)         y[c] <= '0;
          else if (s > NMAX) y[c] <= NMAX[OUT_W-1:0];
          else               y[c] <= s[OUT_W-1:0];
        end
      end
    end
  end
endmodule
