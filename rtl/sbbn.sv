// Shift-based batch normalization (SBBN), one lane per channel.
//
// The batch-norm scale is restricted to a power of two, so the multiplication
// becomes a shift. Stage 1 shifts the input left by e = 0..8, where e is the
// balanced-ternary value of two exponent trits plus 4 (nine states, 3^2).
// Stage 2 adds the bias, the balanced-ternary value of four trits (-40..40,
// 81 states, 3^4), and saturates to OUT_W bits. The result keeps 8 fractional
// bits, i.e. the effective scale is 2^(e-8); ReLU N drops them again. The
// exponent offset and the bias position are this design's reading of the
// per-layer widths (every SBBN result is 8 bits wider than its input).
//
// Timing: every stage is one registered cycle, so out_valid/y follow
// in_valid/x by two cycles; each channel keeps its own valid, preserving the
// skew between channels.
module sbbn #(
  parameter int unsigned C      = 2,
  parameter int unsigned IN_W   = 11,
  parameter int unsigned OUT_W  = 19
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic [C-1:0]                in_valid,
  input  logic [C-1:0][IN_W-1:0]      x,
  input  logic [C-1:0][3:0]           scale,   // 2 trits per channel
  input  logic [C-1:0][7:0]           bias,    // 4 trits per channel
  output logic [C-1:0]                out_valid,
  output logic [C-1:0][OUT_W-1:0]     y
);
  import afib_pkg::*;

  localparam logic signed [OUT_W:0] MAXV = (OUT_W+1)'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [OUT_W:0] MINV = -(OUT_W+1)'(1 << (OUT_W - 1));

  for (genvar c = 0; c < C; c++) begin : g_ch
    logic                    v1;
    logic signed [OUT_W:0]   sh;   // one guard bit for the bias addition
    logic signed [OUT_W:0]   sum;
    logic [3:0]              e;
    assign e   = 4'(bt2(scale[c]) + 4);
    assign sum = sh + (OUT_W+1)'(bt4(bias[c]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v1 <= 1'b0; sh <= '0; out_valid[c] <= 1'b0; y[c] <= '0;
      end else if (clear) begin
        v1 <= 1'b0; out_valid[c] <= 1'b0;
      end else begin
        // scaling PE
        v1 <= in_valid[c];
        if (in_valid[c]) sh <= (OUT_W+1)'(signed'(x[c])) <<< e;
        // bias PE
        out_valid[c] <= v1;
        if (v1) begin
          if (sum > MAXV)      y[c] <= MAXV[OUT_W-1:0];
          else if (sum < MINV) y[c] <= MINV[OUT_W-1:0];
          else                 y[c] <= sum[OUT_W-1:0];
        end
      end
    end
  end
endmodule
