// llr_quantizer: channel front end that turns a received BPSK/AWGN sample y
// into the fixed-point log-likelihood ratio the decoder consumes.
//
// For antipodal signalling on an AWGN channel the LLR is 2*y/sigma^2. The
// sample y arrives as a signed fixed-point number with Y_F fraction bits and
// the factor 2/sigma^2 as an unsigned number with S_F fraction bits, so the
// product has Y_F+S_F fraction bits. It is rounded half-up to LLR_F fraction
// bits and
// clipped symmetrically to +/-(2^(LLR_W-1)-1), so that a positive and a
// negative sample of equal size give LLRs of equal size.
// The LLR formula comes from the algorithm; all widths, the rounding and the
// saturation are this design's choices.
//
// Timing: one register stage. out_valid/llr follow in_valid/y by one cycle.
module llr_quantizer #(
  parameter int unsigned Y_W   = 8,  // received sample width (signed)
  parameter int unsigned Y_F   = 5,  // fraction bits of the sample
  parameter int unsigned S_W   = 8,  // width of 2/sigma^2 (unsigned)
  parameter int unsigned S_F   = 4,  // fraction bits of 2/sigma^2
  parameter int unsigned LLR_W = 6,  // output LLR width (signed)
  parameter int unsigned LLR_F = 1   // fraction bits of the output LLR
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [Y_W-1:0]   y,
  input  logic        [S_W-1:0]   scale,
  output logic                    out_valid,
  output logic signed [LLR_W-1:0] llr
);

  localparam int unsigned P_W   = Y_W + S_W + 1;
  localparam int unsigned SHIFT = Y_F + S_F - LLR_F;
  localparam logic signed [P_W-1:0] LLR_MAX = P_W'((1 << (LLR_W - 1)) - 1);

  logic signed [P_W-1:0] prod, rounded, clipped;

  always_comb begin
    prod    = P_W'(y) * $signed({1'b0, scale});
    rounded = (prod + P_W'(1 << (SHIFT - 1))) >>> SHIFT;
    if (rounded > LLR_MAX)       clipped = LLR_MAX;
    else if (rounded < -LLR_MAX) clipped = -LLR_MAX;
    else                         clipped = rounded;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      llr       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) llr <= LLR_W'(clipped);
    end
  end

endmodule
