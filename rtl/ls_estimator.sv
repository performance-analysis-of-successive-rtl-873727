// ls_estimator: two stage channel estimator (least-squares estimate over two
// received samples).
//
// From two received samples R[1,k], R[2,k] and the symbols XF[k], XS[k] they
// carry (pilots or decisions; BPSK, QPSK or 16QAM), the estimator forms
//   eps = (R1*conj(XF) + R2*conj(XS)) / (|XF|^2 + |XS|^2)
// without a general multiplier or divider: the coordinate precalculator makes
// r and 3r, the LS control unit derives mux, sign and normalization controls
// from the symbols, the LS unit adds the signed partial products, and the
// final normalization multiplies by a constant reciprocal of the symbol
// energy.  These four parts and their controls (C0..C7, S0..S5, F0, F1)
// follow the published estimator; the formula, widths and registers are this
// design's reading of it.
//
// Timing: one register after the LS unit and one at the output; out_valid
// follows in_valid by two cycles, one estimate per cycle.  Reset
// (synchronous, active low) clears only the valid pipeline.
// eps_re/eps_im are two's complement, eps * 2^FRAC in units of R's LSB.
module ls_estimator
  import polar_pkg::*;
#(
  parameter int unsigned W    = 10,
  parameter int unsigned FRAC = 12,
  localparam int unsigned EW  = W + FRAC + 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  mod_e                mode,
  input  logic signed [W-1:0] r1_re, r1_im, r2_re, r2_im,
  input  logic signed [2:0]   xf_re, xf_im, xs_re, xs_im,
  output logic                out_valid,
  output logic signed [EW-1:0] eps_re,
  output logic signed [EW-1:0] eps_im
);
  logic signed [W-1:0] r    [4];
  logic signed [W+1:0] r_x1 [4], r_x3 [4];
  csel_e               c_sel [8];
  logic [1:0]          s_ctl [6];
  logic [2:0]          f_sel [2], f_sel_q [2];
  logic signed [W+3:0] num_re, num_im, num_re_q, num_im_q;
  logic signed [EW-1:0] e_re, e_im;
  logic                v_q;

  assign r = '{r1_re, r1_im, r2_re, r2_im};

  ls_coord_precalc #(.W(W)) u_pre (.r, .r_x1, .r_x3);
  ls_ctrl u_ctrl (.mode, .xf_re, .xf_im, .xs_re, .xs_im, .c_sel, .s_ctl, .f_sel);
  ls_unit #(.W(W)) u_ls (.r_x1, .r_x3, .c_sel, .s_ctl, .num_re, .num_im);
  ls_normalize #(.W(W), .FRAC(FRAC)) u_norm (
    .num_re(num_re_q), .num_im(num_im_q), .f_sel(f_sel_q), .eps_re(e_re), .eps_im(e_im)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
    if (in_valid) begin
      num_re_q <= num_re;
      num_im_q <= num_im;
      f_sel_q  <= f_sel;
    end
    if (v_q) begin
      eps_re <= e_re;
      eps_im <= e_im;
    end
  end
endmodule
