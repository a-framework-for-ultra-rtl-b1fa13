// Convolutional / fully connected layer of the dataflow-driven network.
//
// A layer is a column of C_OUT multi-channel (MC) filters, one per output
// channel, all fed by the same C_IN skewed input channels; their outputs are
// computed in parallel, one value of every channel at a time. A fully
// connected layer uses the same structure with filter length 1 and stride 1
// (each channel then carries one value per classification).
//
// The input skew (channels 0 and 1 together, every further channel one cycle
// later) is re-created at the output: MC filter o is followed by max(0, o-1)
// delay registers, so the next layer receives the same pattern and layers
// can be concatenated without buffers. This delay line is this design's own
// way of producing the skew.
//
// Timing: output channel 0 appears max(2, C_IN) cycles after the channel-0
// input that completes a window; channel o a further max(0, o-1) cycles later.
module nn_layer #(
  parameter int unsigned C_IN   = 2,
  parameter int unsigned C_OUT  = 4,
  parameter int unsigned K      = 15,
  parameter int unsigned STRIDE = 3,
  parameter int unsigned IN_W   = 5,
  parameter int unsigned ACC_W  = 10
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   clear,
  input  logic [C_IN-1:0]                        in_valid,
  input  logic [C_IN-1:0][IN_W-1:0]              x,
  input  logic [C_OUT-1:0][C_IN-1:0][K-1:0][1:0] w,
  output logic [C_OUT-1:0]                       out_valid,
  output logic [C_OUT-1:0][ACC_W-1:0]            y
);
  for (genvar o = 0; o < C_OUT; o++) begin : g_mc
    logic                    v;
    logic signed [ACC_W-1:0] d;
    mc_filter #(.C_IN(C_IN), .K(K), .STRIDE(STRIDE), .IN_W(IN_W), .ACC_W(ACC_W)) u_mc (
      .clk, .rst_n, .clear, .in_valid, .x, .w(w[o]), .out_valid(v), .y(d)
    );
    if (o < 2) begin : g_nodly
      assign out_valid[o] = v;
      assign y[o]         = d;
    end else begin : g_dly
      // o-1 stage delay line for the output skew.
      logic [ACC_W-1:0] dq [o-1];
      logic [o-2:0]     vq;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          vq <= '0;
          for (int i = 0; i < o - 1; i++) dq[i] <= '0;
        end else if (clear) begin
          vq <= '0;
        end else begin
          vq[0] <= v;
          dq[0] <= d;
          for (int i = 1; i < o - 1; i++) begin
            vq[i] <= vq[i-1];
            dq[i] <= dq[i-1];
          end
        end
      end
      assign out_valid[o] = vq[o-2];
      assign y[o]         = dq[o-2];
    end
  end
endmodule
