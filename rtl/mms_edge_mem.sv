// mms_edge_mem: extrinsic-message store of the partially parallel decoder.
//
// One 2-bit entry per edge of the Tanner graph (E = number of ones in H).
// Messages are updated in place: in the variable-node phase an edge holds the
// variable-to-check message, and the check-node phase overwrites it with the
// check-to-variable message of the same edge. Because MMS messages are only
// 2 bits wide, this store is 2*E bits however wide the channel LLRs are.
//
// The store is a register array. All entries are visible at once on rd_data;
// the interconnection network selects from them. There are two groups of
// write ports, one for the check-node units (A) and one for the
// variable-node units (B); the controller never enables both in one cycle.
// Writes take effect at the rising clock edge. The register-array form and
// the port arrangement are this design's choices.
module mms_edge_mem
  import mms_pkg::*;
#(
  parameter int unsigned E  = 24,  // number of edges
  parameter int unsigned NA = 8,   // write ports of group A
  parameter int unsigned NB = 8,   // write ports of group B
  localparam int unsigned AW = (E > 1) ? $clog2(E) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we_a,
  input  logic [NA-1:0][AW-1:0] addr_a,
  input  msg_t [NA-1:0]        data_a,
  input  logic                 we_b,
  input  logic [NB-1:0][AW-1:0] addr_b,
  input  msg_t [NB-1:0]        data_b,
  output msg_t [E-1:0]         rd_data
);

  msg_t mem [E];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < E; e++) mem[e] <= '0;
    end else begin
      if (we_a) for (int p = 0; p < NA; p++) mem[addr_a[p]] <= data_a[p];
      if (we_b) for (int p = 0; p < NB; p++) mem[addr_b[p]] <= data_b[p];
    end
  end

  always_comb begin
    for (int e = 0; e < E; e++) rd_data[e] = mem[e];
  end

  // The two port groups belong to different decoder phases.
  a_one_group : assert property (@(posedge clk) disable iff (!rst_n) !(we_a && we_b));

endmodule
