// Cascaded integrator-comb (CIC) decimation filter, decimation R = 4, processing
// R input samples per step (polyphase form).
//
// Step n receives in[0..R-1] = x[4n .. 4n+3] (in[0] oldest) and computes:
//   first integrator, chained over the block:  s_j = s_{j-1} + in[j],
//       s_{-1} = s_{R-1} of the previous step (z^-1 feedback);
//   second integrator:                         I2[n] = I2[n-1] + s_0 + .. + s_{R-1};
//   first comb:    y1[n] = I2[n-N_H] - I2[n] + R*N_H*s_{R-1};
//   second comb:   out[n] = y1[n] - y1[n-N_L].
// This structure, its signs and N_H = 4, N_L = 3 are those of the design's
// block diagram. The result is a bandpass FIR with zero DC gain:
// out[n] = sum_t h[t] x[4n+3-t] with h = 15,14,..,4 (t=0..11), -12 (t=12..15),
// -11,..,0 (t=16..27).
//
// All registers are W bits and wrap; like any CIC filter the output is exact
// as long as its true range fits W bits (|out| <= 228 * 2^(IN_W-1)).
//
// Timing: out/out_valid are registered, one cycle after in_valid.
module cic_filter #(
  parameter int unsigned IN_W = 8,
  parameter int unsigned W    = 18,
  parameter int unsigned R    = 4,
  parameter int unsigned N_H  = 4,
  parameter int unsigned N_L  = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [R-1:0][IN_W-1:0]       in,
  output logic                         out_valid,
  output logic signed [W-1:0]          out
);
  logic signed [W-1:0] i1_q, i2_q;
  logic signed [W-1:0] s [R];
  logic signed [W-1:0] i2, y1, o;
  logic signed [W-1:0] i2_d [N_H];   // I2 delay line, i2_d[N_H-1] = I2[n-N_H]
  logic signed [W-1:0] y1_d [N_L];   // y1 delay line

  always_comb begin
    logic signed [W-1:0] acc;
    acc = i1_q;
    for (int j = 0; j < int'(R); j++) begin
      acc  = acc + W'(signed'(in[j]));
      s[j] = acc;
    end
    i2 = i2_q;
    for (int j = 0; j < int'(R); j++) i2 = i2 + s[j];
    y1 = i2_d[N_H-1] - i2 + W'(R * N_H) * s[R-1];
    o  = y1 - y1_d[N_L-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1_q <= '0; i2_q <= '0; out <= '0; out_valid <= 1'b0;
      for (int i = 0; i < int'(N_H); i++) i2_d[i] <= '0;
      for (int i = 0; i < int'(N_L); i++) y1_d[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i1_q    <= s[R-1];
        i2_q    <= i2;
        i2_d[0] <= i2;
        for (int i = 1; i < int'(N_H); i++) i2_d[i] <= i2_d[i-1];
        y1_d[0] <= y1;
        for (int i = 1; i < int'(N_L); i++) y1_d[i] <= y1_d[i-1];
        out     <= o;
      end
    end
  end
endmodule
