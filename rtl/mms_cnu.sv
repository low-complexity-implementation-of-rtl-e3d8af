// mms_cnu: one check-node unit of the modified min-sum (MMS) decoder.
//
// With 2-bit messages the min-sum check update reduces to two gate trees:
// the outgoing sign on edge k is the XOR of the sign bits of all other edges
// (product of signs), and the outgoing magnitude is the AND of the magnitude
// bits of all other edges (the minimum of {weak = 0, strong = 1}). The output
// message is {sign, magnitude}. This follows the MMS check-node equations;
// the exclusion of edge k is done here by XOR-ing the edge's own sign out of
// the full parity and by one (DC-1)-input AND per edge, which is this
// design's choice of gate structure.
//
// Interface: purely combinational, DC messages in, DC messages out.
module mms_cnu
  import mms_pkg::*;
#(
  parameter int unsigned DC = 4   // check-node degree (row weight)
) (
  input  msg_t [DC-1:0] v2c,
  output msg_t [DC-1:0] c2v
);

  logic parity;

  always_comb begin
    parity = 1'b0;
    for (int k = 0; k < DC; k++) parity ^= v2c[k][MSG_SIGN];
    for (int k = 0; k < DC; k++) begin
      c2v[k][MSG_SIGN] = parity ^ v2c[k][MSG_SIGN];
      c2v[k][MSG_MAG]  = 1'b1;
      for (int l = 0; l < DC; l++)
        if (l != k) c2v[k][MSG_MAG] &= v2c[l][MSG_MAG];
    end
  end

endmodule
