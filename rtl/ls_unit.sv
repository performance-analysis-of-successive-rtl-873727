// ls_unit: LS unit of the two stage channel estimator.
//
// Eight muxes pick each partial product's multiple (0, r or 3r) from the
// coordinate precalculator under C0..C7.  Four add/subtract units S0..S3
// combine pairs of products and two more, S4 and S5, combine those into the
// real and imaginary parts of the LS numerator R1*conj(XF) + R2*conj(XS).
// Every add/subtract unit computes (+/-a) + (+/-b); a negation is an XOR of
// the operand with its control bit plus that bit as carry-in, so the
// multiplication by a coordinate sign costs only XOR gates.  The mux and
// unit arrangement follows the published estimator; which component feeds
// which mux is this design's choice (see ls_ctrl for the mapping).
// Output width W+4 holds the largest sum, 4 * 3 * 2^(W-1).
// Purely combinational.
module ls_unit
  import polar_pkg::*;
#(
  parameter int unsigned W = 10
) (
  input  logic signed [W+1:0] r_x1 [4],              // ReR1, ImR1, ReR2, ImR2
  input  logic signed [W+1:0] r_x3 [4],
  input  csel_e               c_sel [8],
  input  logic [1:0]          s_ctl [6],
  output logic signed [W+3:0] num_re,
  output logic signed [W+3:0] num_im
);
  localparam int unsigned SRC [8] = '{0, 1, 2, 3, 1, 0, 3, 2};

  logic signed [W+3:0] m   [8];
  logic signed [W+3:0] lvl1[4];

  // (+/-a) + (+/-b) with XOR negation.
  function automatic logic signed [W+3:0] addsub(input logic signed [W+3:0] a,
                                                 input logic signed [W+3:0] b,
                                                 input logic [1:0] neg);
    logic signed [W+3:0] ax, bx;
    ax = a ^ {(W+4){neg[1]}};
    bx = b ^ {(W+4){neg[0]}};
    return ax + bx + (W+4)'(neg[1]) + (W+4)'(neg[0]);
  endfunction

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      unique case (c_sel[k])
        CSEL_X1: m[k] = (W+4)'(r_x1[SRC[k]]);
        CSEL_X3: m[k] = (W+4)'(r_x3[SRC[k]]);
        default: m[k] = '0;
      endcase
    end
    for (int u = 0; u < 4; u++) lvl1[u] = addsub(m[2*u], m[2*u+1], s_ctl[u]);
    num_re = addsub(lvl1[0], lvl1[1], s_ctl[4]);
    num_im = addsub(lvl1[2], lvl1[3], s_ctl[5]);
  end
endmodule
