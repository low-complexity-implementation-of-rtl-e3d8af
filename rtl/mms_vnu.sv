// mms_vnu: one variable-node unit of the modified min-sum (MMS) decoder.
//
// Each incoming 2-bit check-to-variable message G_j is expanded by f() to a
// signed integer (+W, +w, -w, -W). The unit forms the total
//     L(Q) = LLR + sum_j f(G_j)
// and, for every edge k, the extrinsic sum L(Q) - f(G_k), i.e. the LLR plus the
// messages of all other edges. Each extrinsic sum is mapped back to 2 bits by
// g(): above T_M -> 01, 0..T_M -> 00, -T_M..-1 -> 10, below -T_M -> 11.
// The hard decision is 1 when L(Q) is negative. The equations, the 2-bit
// encoding and the decision rule follow the MMS algorithm; the LLR width and
// the values of W, w and T_M are this design's own choices.
//
// use_c2v = 0 masks all incoming messages (first pass of a decoding, when no
// check-node output exists yet), so the unit then sends g(LLR) on every edge.
//
// Interface: purely combinational, llr/c2v/use_c2v in, v2c/hard/total out.
module mms_vnu
  import mms_pkg::*;
#(
  parameter int unsigned DV    = 2,   // variable-node degree (column weight)
  parameter int unsigned LLR_W = 6,   // channel LLR width, two's complement
  parameter int unsigned W_HI  = 6,   // W: value of a strong message
  parameter int unsigned W_LO  = 2,   // w: value of a weak message
  parameter int unsigned T_M   = 6,   // mapping threshold of g()
  localparam int unsigned SUM_W = LLR_W + $clog2(DV + 1) + $clog2(W_HI + 1) + 1
) (
  input  logic signed [LLR_W-1:0] llr,
  input  msg_t        [DV-1:0]    c2v,
  input  logic                    use_c2v,
  output msg_t        [DV-1:0]    v2c,
  output logic                    hard,
  output logic signed [SUM_W-1:0] total
);

  // f(): 2-bit message to signed weight
  function automatic logic signed [SUM_W-1:0] f_expand(input msg_t m);
    logic signed [SUM_W-1:0] mag;
    mag = m[MSG_MAG] ? SUM_W'(W_HI) : SUM_W'(W_LO);
    return m[MSG_SIGN] ? -mag : mag;
  endfunction

  // g(): signed sum to 2-bit message
  function automatic msg_t g_map(input logic signed [SUM_W-1:0] s);
    msg_t m;
    m[MSG_SIGN] = s[SUM_W-1];
    if (s[SUM_W-1]) m[MSG_MAG] = (s < -$signed(SUM_W'(T_M)));
    else            m[MSG_MAG] = (s >  $signed(SUM_W'(T_M)));
    return m;
  endfunction

  logic signed [SUM_W-1:0] w_in [DV];

  always_comb begin
    total = SUM_W'(llr);
    for (int j = 0; j < DV; j++) begin
      w_in[j] = use_c2v ? f_expand(c2v[j]) : '0;
      total   = total + w_in[j];
    end
    for (int k = 0; k < DV; k++) begin
      v2c[k] = g_map(total - w_in[k]);
    end
    hard = total[SUM_W-1];
  end

endmodule
