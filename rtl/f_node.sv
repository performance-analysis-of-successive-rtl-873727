// f_node: min-sum f function of the successive-cancellation decoder.
//
// Two sign-magnitude LLRs come in.  Their sign bits are taken off and
// XORed; a compare-and-select unit passes the smaller of the two
// magnitudes; the concatenation {sign, magnitude} is the output:
//   f(c,d) = sign(c)*sign(d)*min(|c|,|d|).
// The structure (sign extractors, XOR, compare-and-select, concatenator)
// follows the published f-node diagram; the LLR word length Q is this
// design's choice.  A negative zero (sign 1, magnitude 0) can leave the node
// and is treated downstream as a hard decision of 1.
// Purely combinational.
module f_node #(
  parameter int unsigned Q = 6          // LLR word length, sign + magnitude
) (
  input  logic [Q-1:0] llr_c,            // LLR(c), sign-magnitude
  input  logic [Q-1:0] llr_d,            // LLR(d), sign-magnitude
  output logic [Q-1:0] fnode_out         // f(c,d), sign-magnitude
);
  logic         sign_c, sign_d;
  logic [Q-2:0] mag_c, mag_d, mag_min;

  always_comb begin
    sign_c  = llr_c[Q-1];
    sign_d  = llr_d[Q-1];
    mag_c   = llr_c[Q-2:0];
    mag_d   = llr_d[Q-2:0];
    mag_min = (mag_c <= mag_d) ? mag_c : mag_d;
    fnode_out = {sign_c ^ sign_d, mag_min};
  end
endmodule
