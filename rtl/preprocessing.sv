// Input preprocessing of the Data Control Core.
//
// Raw signed 12-bit ECG samples are quantized to 8 bits (the 4 LSBs are
// dropped), collected in groups of four and passed to the CIC bandpass /
// decimation filter, which yields one sample per four inputs (512 Hz ->
// 128 Hz). The filter output is scaled by 2^-OUT_SHIFT and saturated to the
// signed OUT_W-bit NN input format. With `bypass` high, filtering and
// downsampling are skipped: every quantized sample is passed on, halved and
// saturated to OUT_W bits. Quantization by truncation, the output scaling
// and the bypass scaling are this design's choices.
//
// Timing: filtered samples appear two cycles after the fourth raw sample of a
// group, bypassed samples one cycle after their raw sample. `clear` restarts
// the grouping of four.
module preprocessing #(
  parameter int unsigned RAW_W     = 12,
  parameter int unsigned Q_W       = 8,
  parameter int unsigned OUT_W     = 7,
  parameter int unsigned CIC_W     = 18,
  parameter int unsigned OUT_SHIFT = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     bypass,
  input  logic                     in_valid,
  input  logic signed [RAW_W-1:0]  in,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out
);
  localparam int unsigned R = 4;

  logic signed [Q_W-1:0] q;
  assign q = Q_W'(in >>> (RAW_W - Q_W));

  // Group four quantized samples.
  logic [1:0]                 ph;
  logic [R-2:0][Q_W-1:0]      grp;
  logic                       blk_v;
  logic [R-1:0][Q_W-1:0]      blk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= '0; grp <= '0; blk_v <= 1'b0; blk <= '0;
    end else if (clear) begin
      ph <= '0; blk_v <= 1'b0;
    end else begin
      blk_v <= 1'b0;
      if (in_valid && !bypass) begin
        if (ph == 2'(R - 1)) begin
          blk   <= {q, grp[2], grp[1], grp[0]};
          blk_v <= 1'b1;
          ph    <= '0;
        end else begin
          grp[ph] <= q;
          ph      <= ph + 1'b1;
        end
      end
    end
  end

  logic                     cic_v;
  logic signed [CIC_W-1:0]  cic_y;
  cic_filter #(.IN_W(Q_W), .W(CIC_W), .R(R), .N_H(4), .N_L(3)) u_cic (
    .clk, .rst_n, .in_valid(blk_v), .in(blk), .out_valid(cic_v), .out(cic_y)
  );

  function automatic logic signed [OUT_W-1:0] sat(logic signed [CIC_W-1:0] v);
    localparam logic signed [CIC_W-1:0] MX = CIC_W'((1 << (OUT_W - 1)) - 1);
    localparam logic signed [CIC_W-1:0] MN = -CIC_W'(1 << (OUT_W - 1));
    if (v > MX) return MX[OUT_W-1:0];
    if (v < MN) return MN[OUT_W-1:0];
    return v[OUT_W-1:0];
  endfunction

  logic                     byp_v;
  logic signed [OUT_W-1:0]  byp_y;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byp_v <= 1'b0; byp_y <= '0;
    end else begin
      byp_v <= in_valid && bypass;
      if (in_valid && bypass) byp_y <= sat(CIC_W'(q) >>> 1);
    end
  end

  assign out_valid = cic_v || byp_v;
  assign out       = byp_v ? byp_y : sat(cic_y >>> OUT_SHIFT);
endmodule
