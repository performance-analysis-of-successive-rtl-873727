// ls_coord_precalc: coordinate precalculator of the LS channel estimator.
//
// Symbol coordinates of BPSK, QPSK and 16QAM are +/-1 and +/-3, so every
// partial product of a received component r with a coordinate is +/-r or
// +/-3r.  This unit forms, for each of the four received components
// (Re R[1,k], Im R[1,k], Re R[2,k], Im R[2,k]), the multiples r and
// 3r = r + (r << 1) with one shifter and one adder, as in the published
// estimator; signs are applied later by XOR gates in the LS unit.
// Inputs and outputs are two's complement; outputs are W+2 bits.
// Purely combinational.
module ls_coord_precalc #(
  parameter int unsigned W = 10                      // received component width
) (
  input  logic signed [W-1:0] r    [4],              // ReR1, ImR1, ReR2, ImR2
  output logic signed [W+1:0] r_x1 [4],              // r
  output logic signed [W+1:0] r_x3 [4]               // 3r
);
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      r_x1[k] = (W+2)'(r[k]);
      r_x3[k] = (W+2)'(r[k]) + ((W+2)'(r[k]) <<< 1);
    end
  end
endmodule
