// ls_normalize: final normalization of the two stage channel estimator.
//
// Divides the LS numerator by D = |XF|^2 + |XS|^2.  D takes only the values
// 2, 4, 12, 20, 28 and 36 for BPSK, QPSK and 16QAM, so each is a
// multiplication by a constant K_D = round(2^FRAC / D), a shift-and-add
// (carry-save adder) tree in hardware.  All six products are formed and the
// mux F0 (real part) or F1 (imaginary part) picks one; index 7 gives 0.
// The output is the estimate scaled by 2^FRAC (FRAC fractional bits on top
// of the received samples' own scaling).  The structure follows the
// published estimator; FRAC and the rounding of K_D are this design's choice.
// Purely combinational.
module ls_normalize #(
  parameter int unsigned W    = 10,
  parameter int unsigned FRAC = 12,                  // fractional bits of the output
  localparam int unsigned NW  = W + 4,
  localparam int unsigned EW  = W + FRAC + 4
) (
  input  logic signed [NW-1:0] num_re,
  input  logic signed [NW-1:0] num_im,
  input  logic [2:0]           f_sel [2],            // F0, F1
  output logic signed [EW-1:0] eps_re,
  output logic signed [EW-1:0] eps_im
);
  localparam int unsigned DEN [6] = '{2, 4, 12, 20, 28, 36};

  function automatic logic signed [EW-1:0] scale(input logic signed [NW-1:0] v,
                                                 input logic [2:0] f);
    logic signed [EW-1:0] prod [6];
    for (int i = 0; i < 6; i++) begin
      prod[i] = EW'(v) * $signed(EW'(((1 << FRAC) + DEN[i] / 2) / DEN[i]));
    end
    return (f < 3'd6) ? prod[f] : '0;
  endfunction

  always_comb begin
    eps_re = scale(num_re, f_sel[0]);
    eps_im = scale(num_im, f_sel[1]);
  end
endmodule
