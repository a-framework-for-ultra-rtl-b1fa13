// Dataflow-driven neural network of the AFib detector (Processing Core logic).
//
// The network is hard-wired: four 15-tap convolutions with stride 3
// (1 -> 2 -> 4 -> 6 -> 8 channels), each followed by shift-based batch
// normalization and ReLU N, with global max pooling between the last
// convolution's normalization and its ReLU, then two fully connected layers
// (8 -> 8 -> 2), also normalized and activated. There is no instruction
// stream and no buffer between layers: every layer consumes its input as a
// stream, one value per channel at a time, and the data flow is fixed by the
// wiring. All parameters (1490 trits) arrive as latched RRAM contents.
//
// Interface: pulse `clear` before a window, then present L_IN samples of the
// signed 7-bit input, at most one per cycle (in_valid). With the default
// L_IN = 1614 the layer lengths are 534, 174, 54 and 14. out_valid pulses
// once per window with the two 4-bit class activations in y (y[0], y[1]).
//
// Timing: the result appears a fixed pipeline latency (a few tens of cycles)
// after the last input sample when samples are streamed one per cycle.
module nn_core #(
  parameter int unsigned L_IN = afib_pkg::NN_IN_LEN
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clear,
  input  logic [afib_pkg::N_TRITS-1:0][1:0]  params,
  input  logic                               in_valid,
  input  logic signed [afib_pkg::X_W-1:0]    x,
  output logic                               out_valid,
  output logic [1:0][afib_pkg::ACT_W-1:0]    y
);
  import afib_pkg::*;

  // Sequence length after each convolution (valid convolution, stride S).
  localparam int unsigned LEN1 = (L_IN - L_K[0]) / L_S[0] + 1;
  localparam int unsigned LEN2 = (LEN1 - L_K[1]) / L_S[1] + 1;
  localparam int unsigned LEN3 = (LEN2 - L_K[2]) / L_S[2] + 1;
  localparam int unsigned LEN4 = (LEN3 - L_K[3]) / L_S[3] + 1;

  logic [1:0] v1;  logic [1:0][ACT_W-1:0] a1;
  logic [3:0] v2;  logic [3:0][ACT_W-1:0] a2;
  logic [5:0] v3;  logic [5:0][ACT_W-1:0] a3;
  logic [7:0] v4;  logic [7:0][ACT_W-1:0] a4;
  logic [7:0] v5;  logic [7:0][ACT_W-1:0] a5;
  logic [1:0] v6;  logic [1:0][ACT_W-1:0] a6;

  // Activations are unsigned 4-bit values; the next layer takes them as
  // 5-bit signed numbers.
  function automatic logic [4:0] ext(logic [ACT_W-1:0] a);
    return {1'b0, a};
  endfunction

  logic [1:0][4:0] x2; logic [3:0][4:0] x3; logic [5:0][4:0] x4;
  logic [7:0][4:0] x5; logic [7:0][4:0] x6;
  always_comb begin
    for (int i = 0; i < 2; i++) x2[i] = ext(a1[i]);
    for (int i = 0; i < 4; i++) x3[i] = ext(a2[i]);
    for (int i = 0; i < 6; i++) x4[i] = ext(a3[i]);
    for (int i = 0; i < 8; i++) x5[i] = ext(a4[i]);
    for (int i = 0; i < 8; i++) x6[i] = ext(a5[i]);
  end

  nn_stage #(.LAYER(0)) u_conv1 (.clk, .rst_n, .clear, .params, .in_valid(in_valid), .x(x),  .out_valid(v1), .y(a1));
  nn_stage #(.LAYER(1)) u_conv2 (.clk, .rst_n, .clear, .params, .in_valid(v1), .x(x2), .out_valid(v2), .y(a2));
  nn_stage #(.LAYER(2)) u_conv3 (.clk, .rst_n, .clear, .params, .in_valid(v2), .x(x3), .out_valid(v3), .y(a3));
  nn_stage #(.LAYER(3), .POOL_LEN(LEN4)) u_conv4 (.clk, .rst_n, .clear, .params, .in_valid(v3), .x(x4), .out_valid(v4), .y(a4));
  nn_stage #(.LAYER(4)) u_fc1   (.clk, .rst_n, .clear, .params, .in_valid(v4), .x(x5), .out_valid(v5), .y(a5));
  nn_stage #(.LAYER(5)) u_fc2   (.clk, .rst_n, .clear, .params, .in_valid(v5), .x(x6), .out_valid(v6), .y(a6));

  // FC2's two output channels arrive together (channels 0 and 1 are not skewed).
  assign out_valid = &v6;  // both FC2 channels are valid in the same cycle
  assign y         = a6;
endmodule
