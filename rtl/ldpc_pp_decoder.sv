// ldpc_pp_decoder: partially parallel LDPC decoder running the modified
// min-sum (MMS) algorithm with 2-bit extrinsic messages.
//
// Only P_C check-node units and P_V variable-node units are built. The
// parity-check matrix H is processed a partition at a time: P_C rows per
// cycle in the check-node phase, P_V columns per cycle in the variable-node
// phase. Between phases the messages live in an edge store of 2 bits per
// edge; two interconnection networks, one per side, connect the units to the
// edges of the active partition. Channel samples pass through a quantizer
// that forms the LLR 2y/sigma^2 and are kept in an LLR store for the whole
// decoding.
//
// Interface:
//   in_valid/in_ready/y : N received samples, one per accepted cycle, in
//                          codeword order; scale = 2/sigma^2 (held constant).
//   done                : one-cycle pulse; dec_bits[i] is the decided bit i
//                          (1 when the final L(Q_i) < 0), valid from done
//                          until the next codeword finishes.
// Timing: the last sample accepted at cycle t gives done at cycle
// t + 2 + NGV + MAX_ITER*(NGC+NGV), with NGC = M/P_C and NGV = N/P_V.
// The units, the 2-bit messages, the partitioned processing and the 10
// iterations follow the design described for this decoder; the default code
// is the 6 x 12 example code. Unit counts, widths, W, w, T_M, the quantizer
// format and the in-place edge store are this design's own choices.
module ldpc_pp_decoder
  import mms_pkg::*;
#(
  parameter int unsigned M        = H_M,       // check nodes (rows of H)
  parameter int unsigned N        = H_N,       // variable nodes (code length)
  parameter logic [0:M-1][0:N-1] H = H_EXAMPLE,
  parameter int unsigned DC       = H_DC,      // row weight
  parameter int unsigned DV       = H_DV,      // column weight
  parameter int unsigned P_C      = 2,         // check-node units
  parameter int unsigned P_V      = 4,         // variable-node units
  parameter int unsigned MAX_ITER = 10,        // decoding iterations
  parameter int unsigned LLR_W    = 6,
  parameter int unsigned W_HI     = 6,
  parameter int unsigned W_LO     = 2,
  parameter int unsigned T_M      = 6,
  parameter int unsigned Y_W      = 8,
  parameter int unsigned Y_F      = 5,
  parameter int unsigned S_W      = 8,
  parameter int unsigned S_F      = 4,
  parameter int unsigned LLR_F    = 1,
  localparam int unsigned E   = M * DC,
  localparam int unsigned NGC = M / P_C,
  localparam int unsigned NGV = N / P_V,
  localparam int unsigned EAW = (E > 1) ? $clog2(E) : 1,
  localparam int unsigned NAW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned GVW = (NGV > 1) ? $clog2(NGV) : 1,
  localparam int unsigned GCW = (NGC > 1) ? $clog2(NGC) : 1,
  localparam int unsigned IW  = $clog2(MAX_ITER + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [Y_W-1:0] y,
  input  logic        [S_W-1:0] scale,
  output logic                  done,
  output logic        [N-1:0]   dec_bits,
  output logic        [IW-1:0]  iter
);

  // ---------------- control ----------------
  logic             q_valid, llr_we, vn_en, cn_en, first;
  logic [NAW-1:0]   llr_waddr;
  logic [GVW-1:0]   grp_v;
  logic [GCW-1:0]   grp_c;
  logic signed [LLR_W-1:0] q_llr;
  dec_state_t       state;

  mms_ctrl #(.N(N), .NGV(NGV), .NGC(NGC), .MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .q_valid, .llr_we, .llr_waddr,
    .vn_en, .grp_v, .cn_en, .grp_c, .first, .iter, .done, .state
  );

  // ---------------- channel front end ----------------
  llr_quantizer #(.Y_W(Y_W), .Y_F(Y_F), .S_W(S_W), .S_F(S_F),
                  .LLR_W(LLR_W), .LLR_F(LLR_F)) u_quant (
    .clk, .rst_n, .in_valid(in_valid && in_ready), .y, .scale,
    .out_valid(q_valid), .llr(q_llr)
  );

  logic [P_V-1:0][LLR_W-1:0] llr_rd;

  mms_llr_mem #(.N(N), .LLR_W(LLR_W), .NR(P_V)) u_llr_mem (
    .clk, .rst_n, .wr_en(llr_we), .wr_addr(llr_waddr), .wr_data(q_llr),
    .rd_base(NAW'(32'(grp_v) * P_V)), .rd_data(llr_rd)
  );

  // ---------------- edge store and networks ----------------
  msg_t [E-1:0]                     edges;
  logic [P_C-1:0][DC-1:0][EAW-1:0]  cn_addr;
  msg_t [P_C-1:0][DC-1:0]           cn_in, cn_out;
  logic [P_V-1:0][DV-1:0][EAW-1:0]  vn_addr;
  msg_t [P_V-1:0][DV-1:0]           vn_in, vn_out;

  mms_edge_mem #(.E(E), .NA(P_C * DC), .NB(P_V * DV)) u_edge_mem (
    .clk, .rst_n,
    .we_a(cn_en), .addr_a(cn_addr), .data_a(cn_out),
    .we_b(vn_en), .addr_b(vn_addr), .data_b(vn_out),
    .rd_data(edges)
  );

  mms_network #(.M(M), .N(N), .H(H), .ROWS(1'b1), .D(DC), .P(P_C), .E(E)) u_net_cn (
    .grp(grp_c), .rd_data(edges), .addr(cn_addr), .msg(cn_in)
  );

  mms_network #(.M(M), .N(N), .H(H), .ROWS(1'b0), .D(DV), .P(P_V), .E(E)) u_net_vn (
    .grp(grp_v), .rd_data(edges), .addr(vn_addr), .msg(vn_in)
  );

  // ---------------- node units ----------------
  for (genvar u = 0; u < P_C; u++) begin : g_cnu
    mms_cnu #(.DC(DC)) u_cnu (.v2c(cn_in[u]), .c2v(cn_out[u]));
  end

  logic [P_V-1:0] hard;

  for (genvar u = 0; u < P_V; u++) begin : g_vnu
    mms_vnu #(.DV(DV), .LLR_W(LLR_W), .W_HI(W_HI), .W_LO(W_LO), .T_M(T_M)) u_vnu (
      .llr(llr_rd[u]), .c2v(vn_in[u]), .use_c2v(!first),
      .v2c(vn_out[u]), .hard(hard[u]), .total()
    );
  end

  // ---------------- hard decisions ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dec_bits <= '0;
    else if (vn_en)
      for (int u = 0; u < P_V; u++) dec_bits[32'(grp_v) * P_V + u] <= hard[u];
  end

  initial begin
    assert (M % P_C == 0 && N % P_V == 0)
      else $error("ldpc_pp_decoder: P_C must divide M and P_V must divide N");
  end

endmodule
