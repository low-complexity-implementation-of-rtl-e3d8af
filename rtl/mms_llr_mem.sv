// mms_llr_mem: store for the N quantized channel LLRs of one codeword.
//
// The front end writes one LLR per cycle (wr_en, wr_addr). The variable-node
// phase reads NR consecutive LLRs per cycle, those of the NR columns of the
// active partition: rd_data[u] = mem[rd_base + u]. Reads are combinational
// from a register array; writes take effect at the rising clock edge. The
// store keeps its contents for the whole decoding, because every
// variable-node pass adds the channel LLR again. Organisation and port
// arrangement are this design's choices.
module mms_llr_mem #(
  parameter int unsigned N     = 12,  // code length
  parameter int unsigned LLR_W = 6,   // LLR width
  parameter int unsigned NR    = 4,   // LLRs read per cycle
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              wr_en,
  input  logic [AW-1:0]                     wr_addr,
  input  logic signed [LLR_W-1:0]           wr_data,
  input  logic [AW-1:0]                     rd_base,
  output logic [NR-1:0][LLR_W-1:0]          rd_data
);

  logic [LLR_W-1:0] mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) mem[i] <= '0;
    end else if (wr_en) begin
      mem[wr_addr] <= wr_data;
    end
  end

  always_comb begin
    for (int u = 0; u < NR; u++) begin
      rd_data[u] = mem[AW'((32'(rd_base) + u) % N)];
    end
  end

endmodule
