// parity_predict: parity prediction block of the code-disjoint switch.
//
// Computes the even parity (XOR of all bits) of a W-bit flit. The switch uses
// one instance on each input, P_i(X_i), whose result is compared with the
// parity bit received on the link, and one on each output, P_o(X_o), whose
// result is compared with the parity bit that travelled with the flit through
// the switch. The block is purely combinational: the result is valid in the
// same cycle as the data.
//
// Even parity and the XOR tree are this design's choice; the scheme only
// names a parity check code.
module parity_predict #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] data,
  output logic         parity
);

  // Balanced XOR tree written as a reduction; synthesis builds the tree.
  always_comb parity = ^data;

endmodule
