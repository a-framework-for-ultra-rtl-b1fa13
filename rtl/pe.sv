// Processing element of a single-channel filter.
//
// A PE holds one input sample and hands it to the next PE of the chain when
// `shift` is high, so a chain of K PEs forms the tap delay line of a 1D filter.
// Its weight is a ternary value (-1, 0, +1) taken from an RRAM cell latch, so
// the multiplication is a choice between x, -x and 0. The product register is
// only updated when `en` is high; `en` comes from the filter's stride counter
// and stands for the clock gating that keeps unused partial sums from being
// computed. The product is taken from the value shifting in, so p belongs to
// the same window as the held sample after the edge.
//
// Timing: x_out and p change at the clock edge where shift (and en) are high.
// The product width ACC_W is the layer's result width.
module pe #(
  parameter int unsigned W     = 7,
  parameter int unsigned ACC_W = 11
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    shift,
  input  logic                    en,
  input  logic [1:0]              w,
  input  logic signed [W-1:0]     x_in,
  output logic signed [W-1:0]     x_out,
  output logic signed [ACC_W-1:0] p
);
  import afib_pkg::*;

  logic signed [ACC_W-1:0] x_ext;
  assign x_ext = ACC_W'(x_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_out <= '0;
      p     <= '0;
    end else if (clear) begin
      x_out <= '0;
      p     <= '0;
    end else if (shift) begin
      x_out <= x_in;
      if (en) begin
        unique case (trit_val(w))
          1:       p <= x_ext;
          -1:      p <= -x_ext;
          default: p <= '0;
        endcase
      end
    end
  end
endmodule
