// One stage of the network: a convolution / fully connected layer followed by
// shift-based batch normalization, optional global max pooling and ReLU N.
//
// LAYER selects the layer's sizes from afib_pkg (0..3 = Conv1..Conv4,
// 4..5 = FC1..FC2) and the position of its parameters in the flat vector of
// latched RRAM trits: first the weights (index ((o*C_IN + c)*K + k)), then two
// exponent trits per output channel, then four bias trits per output
// channel. This layout is this design's own. POOL_LEN > 0 inserts max pooling
// over POOL_LEN values between batch normalization and ReLU, the order used
// for the last convolution.
//
// Timing: every sub-block is a fixed pipeline (see each module); the channel
// skew is kept end to end, and no data is buffered between stages.
module nn_stage #(
  parameter int unsigned LAYER    = 0,
  parameter int unsigned POOL_LEN = 0
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  input  logic                                           clear,
  input  logic [afib_pkg::N_TRITS-1:0][1:0]              params,
  input  logic [afib_pkg::L_CIN[LAYER]-1:0]              in_valid,
  input  logic [afib_pkg::L_CIN[LAYER]-1:0][afib_pkg::L_INW[LAYER]-1:0] x,
  output logic [afib_pkg::L_COUT[LAYER]-1:0]             out_valid,
  output logic [afib_pkg::L_COUT[LAYER]-1:0][afib_pkg::ACT_W-1:0] y
);
  import afib_pkg::*;

  localparam int unsigned CI   = L_CIN[LAYER];
  localparam int unsigned CO   = L_COUT[LAYER];
  localparam int unsigned K    = L_K[LAYER];
  localparam int unsigned AW   = L_ACCW[LAYER];
  localparam int unsigned BW   = AW + BN_GROW;
  localparam int unsigned BASE = layer_base(LAYER);
  localparam int unsigned NW   = CO * CI * K;

  logic [CO-1:0][CI-1:0][K-1:0][1:0] w;
  logic [CO-1:0][3:0]                sc;
  logic [CO-1:0][7:0]                bi;
  for (genvar o = 0; o < CO; o++) begin : g_par
    for (genvar c = 0; c < CI; c++) begin : g_c
      for (genvar k = 0; k < K; k++) begin : g_k
        assign w[o][c][k] = params[BASE + (o * CI + c) * K + k];
      end
    end
    assign sc[o] = {params[BASE + NW + 2*o + 1], params[BASE + NW + 2*o]};
    assign bi[o] = {params[BASE + NW + 2*CO + 4*o + 3], params[BASE + NW + 2*CO + 4*o + 2],
                    params[BASE + NW + 2*CO + 4*o + 1], params[BASE + NW + 2*CO + 4*o]};
  end

  logic [CO-1:0]         lv, bv, pv;
  logic [CO-1:0][AW-1:0] ly;
  logic [CO-1:0][BW-1:0] by, py;

  nn_layer #(.C_IN(CI), .C_OUT(CO), .K(K), .STRIDE(L_S[LAYER]), .IN_W(L_INW[LAYER]), .ACC_W(AW)) u_layer (
    .clk, .rst_n, .clear, .in_valid, .x, .w, .out_valid(lv), .y(ly)
  );

  sbbn #(.C(CO), .IN_W(AW), .OUT_W(BW)) u_bn (
    .clk, .rst_n, .clear, .in_valid(lv), .x(ly), .scale(sc), .bias(bi), .out_valid(bv), .y(by)
  );

  if (POOL_LEN > 0) begin : g_pool
    maxpool #(.C(CO), .LEN(POOL_LEN), .W(BW)) u_pool (
      .clk, .rst_n, .clear, .in_valid(bv), .x(by), .out_valid(pv), .y(py)
    );
  end else begin : g_nopool
    assign pv = bv;
    assign py = by;
  end

  relu_n #(.C(CO), .IN_W(BW), .OUT_W(ACT_W), .RSH(RELU_RSH)) u_relu (
    .clk, .rst_n, .clear, .in_valid(pv), .x(py), .out_valid, .y
  );
endmodule
