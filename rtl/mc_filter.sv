// Multi-channel (MC) filter: one output channel of a convolution layer.
//
// It holds one SC filter per input channel and sums their outputs with a
// chain of registered adders: (SC0 + SC1), then + SC2, then + SC3 and so on.
// The input channels arrive skewed: channels 0 and 1 together, every further
// channel one cycle after the previous one, so each adder stage meets its SC
// output exactly when that output appears. With one input channel the SC
// output is just registered.
//
// Timing: for a window completed at input cycle t on channel 0, out_valid and
// y appear at t + max(2, C_IN). Each SC filter's out_valid gates its adder
// stage, so the chain also works at low input rates.
module mc_filter #(
  parameter int unsigned C_IN   = 2,
  parameter int unsigned K      = 15,
  parameter int unsigned STRIDE = 3,
  parameter int unsigned IN_W   = 7,
  parameter int unsigned ACC_W  = 11
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clear,
  input  logic [C_IN-1:0]                    in_valid,
  input  logic [C_IN-1:0][IN_W-1:0]          x,
  input  logic [C_IN-1:0][K-1:0][1:0]        w,
  output logic                               out_valid,
  output logic signed [ACC_W-1:0]            y
);
  logic [C_IN-1:0]               sc_v;
  logic signed [ACC_W-1:0]       sc_y [C_IN];

  for (genvar c = 0; c < C_IN; c++) begin : g_sc
    sc_filter #(.K(K), .STRIDE(STRIDE), .IN_W(IN_W), .ACC_W(ACC_W)) u_sc (
      .clk, .rst_n, .clear, .in_valid(in_valid[c]), .x(x[c]), .w(w[c]),
      .out_valid(sc_v[c]), .y(sc_y[c])
    );
  end

  if (C_IN == 1) begin : g_one
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      begin out_valid <= 1'b0; y <= '0; end
      else if (clear)  begin out_valid <= 1'b0; y <= '0; end
      else begin
        out_valid <= sc_v[0];
        if (sc_v[0]) y <= sc_y[0];
      end
    end
  end else begin : g_chain
    // s[c] holds SC0 + ... + SCc; stage c (c >= 1) is written when SC c fires.
    // Index 0 of s/sv is the SC0 output itself (not registered).
    logic signed [ACC_W-1:0] s [C_IN];
    logic [C_IN-1:0]         sv;
    assign s[0]  = sc_y[0];
    assign sv[0] = sc_v[0];
    for (genvar c = 1; c < C_IN; c++) begin : g_stage
      logic signed [ACC_W-1:0] a;
      assign a = s[c-1];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)     begin s[c] <= '0; sv[c] <= 1'b0; end
        else if (clear) begin s[c] <= '0; sv[c] <= 1'b0; end
        else begin
          sv[c] <= sc_v[c];
          if (sc_v[c]) s[c] <= a + sc_y[c];
        end
      end
    end
    assign out_valid = sv[C_IN-1];
    assign y         = s[C_IN-1];
  end
endmodule
