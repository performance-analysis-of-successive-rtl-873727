// p_node: two-bit decision of the last decoding stage.
//
// Instead of an f node, a g node and two hard decisions, the last stage
// decides u_{2i-1} and u_{2i} directly from the two LLRs c and d with a few
// gates and one magnitude comparator:
//   comp     = |c| >= |d|
//   u_{2i-1} = ~frozen1 & (sign(c) ^ sign(d))
//   u_{2i}   = ~frozen2 & ( ~comp & sign(d)
//                         |  comp & ~frozen1 & sign(d)
//                         |  comp &  frozen1 & sign(c) )
// u_{2i} is the sign of g(c,d,u_{2i-1}) = d + (1-2u_{2i-1})c: when |d| is
// larger it is sign(d); otherwise it is sign(c) flipped by u_{2i-1}, which
// is sign(d) whenever u_{2i-1} = 1 and sign(c) when u_{2i-1} is frozen.  At
// equal magnitudes the comparator's c side wins.  Frozen bits are 0.
// The signal names, the comparator on the q-1 magnitude bits and the
// frozen1/frozen2 inputs follow the published P-node circuit; the equation
// for u_{2i} is re-derived from the function it computes.
// Purely combinational.
module p_node #(
  parameter int unsigned Q = 6
) (
  input  logic [Q-1:0] llr_c,            // LLR(c), sign-magnitude
  input  logic [Q-1:0] llr_d,            // LLR(d), sign-magnitude
  input  logic         frozen1,          // u_{2i-1} is a frozen bit
  input  logic         frozen2,          // u_{2i} is a frozen bit
  output logic         u_odd,            // u_{2i-1}
  output logic         u_even            // u_{2i}
);
  logic sign_c, sign_d, comp;

  always_comb begin
    sign_c = llr_c[Q-1];
    sign_d = llr_d[Q-1];
    comp   = llr_c[Q-2:0] >= llr_d[Q-2:0];
    u_odd  = ~frozen1 & (sign_c ^ sign_d);
    u_even = (~comp & ~frozen2 & sign_d)
           | ( comp & ~frozen1 & ~frozen2 & sign_d)
           | ( comp &  frozen1 & ~frozen2 & sign_c);
  end
endmodule
