// Single-channel (SC) filter: one input channel of one convolution filter.
//
// K processing elements form a chain; the newest sample enters the PE that
// holds weight w[K-1] and travels towards the PE holding w[0], so after an
// input the filter computes y = sum_k w[k] * x[n-K+1+k] (w[0] meets the oldest
// sample). A counter enables the PE products only for inputs at which an
// output is due: the first after K samples, then one every STRIDE samples, so
// no unused partial sums are formed. The PE products are summed by an adder
// tree (a combinational sum here).
//
// Timing: out_valid is high in the cycle after the input that completes a
// window, and y is valid in that cycle. `clear` restarts the counter and
// empties the chain at the start of a new sequence.
module sc_filter #(
  parameter int unsigned K      = 15,
  parameter int unsigned STRIDE = 3,
  parameter int unsigned IN_W   = 7,
  parameter int unsigned ACC_W  = 11
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  input  logic [K-1:0][1:0]       w,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] y
);
  localparam int unsigned CW = $clog2(K + STRIDE + 1);

  logic [CW-1:0] fill;     // samples received, saturating at K
  logic [CW-1:0] phase;    // position within the stride once filled
  logic          fire;

  // An output is due for this input if it completes the first window or
  // STRIDE further samples have arrived since the last output.
  assign fire = (fill == CW'(K - 1)) || ((fill == CW'(K)) && (phase == CW'(STRIDE - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill <= '0; phase <= '0; out_valid <= 1'b0;
    end else if (clear) begin
      fill <= '0; phase <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && fire;
      if (in_valid) begin
        if (fill != CW'(K)) fill <= fill + 1'b1;
        if (fire) phase <= '0;
        else if (fill == CW'(K)) phase <= phase + 1'b1;
      end
    end
  end

  // PE chain: pe[K-1] receives the input, pe[0] holds the oldest sample.
  logic signed [IN_W-1:0]  xs [K+1];
  logic signed [ACC_W-1:0] prod [K];
  assign xs[K] = x;

  for (genvar k = 0; k < K; k++) begin : g_pe
    pe #(.W(IN_W), .ACC_W(ACC_W)) u_pe (
      .clk, .rst_n, .clear,
      .shift(in_valid), .en(fire), .w(w[k]),
      .x_in(xs[k+1]), .x_out(xs[k]), .p(prod[k])
    );
  end

  always_comb begin
    y = '0;
    for (int k = 0; k < int'(K); k++) y += prod[k];
  end
endmodule
