// polar_sc_top: polar code receiver back end with a two stage channel
// estimator and a 2-bit successive-cancellation decoder.
//
// Two independent parts sit side by side, each with its own ports:
//   * sc_decoder   - tree-based 2b-SC polar decoder with precomputation,
//                    N = 1024 by default, 3N/4 - 1 cycles per codeword;
//   * ls_estimator - least-squares channel estimator for BPSK, QPSK and
//                    16QAM over two received samples, two-cycle pipeline.
// In the published block diagram the estimator feeds the decoder's first
// stage, but the step between them (turning a channel estimate and received
// samples into LLRs) is not specified, so the decoder takes LLRs from its
// own port and the estimate is a port of its own.  The path decorrelator
// the published diagram places after the decoder is not part of this design.
// See sc_decoder and ls_estimator for interface timing.
module polar_sc_top
  import polar_pkg::*;
#(
  parameter int unsigned N    = 1024,                // code length
  parameter int unsigned Q    = 6,                   // LLR word length
  parameter int unsigned W    = 10,                  // received sample width
  parameter int unsigned FRAC = 12,                  // estimate fraction bits
  localparam int unsigned NL  = $clog2(N),
  localparam int unsigned JW  = (NL > 3) ? NL - 2 : 1,
  localparam int unsigned EW  = W + FRAC + 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // decoder
  input  logic                 dec_start,
  input  logic [N-1:0][Q-1:0]  dec_llr,
  input  logic [N-1:0]         dec_frozen,
  output logic                 dec_busy,
  output logic                 dec_done,
  output logic [3:0]           dec_u_out,
  output logic                 dec_u_out_valid,
  output logic [JW-1:0]        dec_u_out_index,
  output logic [N-1:0]         dec_u_hat,
  output logic [N-1:0]         dec_x_hat,
  // channel estimator
  input  logic                 est_in_valid,
  input  mod_e                 est_mode,
  input  logic signed [W-1:0]  est_r1_re, est_r1_im, est_r2_re, est_r2_im,
  input  logic signed [2:0]    est_xf_re, est_xf_im, est_xs_re, est_xs_im,
  output logic                 est_out_valid,
  output logic signed [EW-1:0] est_eps_re,
  output logic signed [EW-1:0] est_eps_im
);
  sc_decoder #(.N(N), .Q(Q)) u_dec (
    .clk, .rst_n, .start(dec_start), .llr_in(dec_llr), .frozen(dec_frozen),
    .busy(dec_busy), .done(dec_done), .u_out(dec_u_out),
    .u_out_valid(dec_u_out_valid), .u_out_index(dec_u_out_index),
    .u_hat(dec_u_hat), .x_hat(dec_x_hat)
  );

  ls_estimator #(.W(W), .FRAC(FRAC)) u_est (
    .clk, .rst_n, .in_valid(est_in_valid), .mode(est_mode),
    .r1_re(est_r1_re), .r1_im(est_r1_im), .r2_re(est_r2_re), .r2_im(est_r2_im),
    .xf_re(est_xf_re), .xf_im(est_xf_im), .xs_re(est_xs_re), .xs_im(est_xs_im),
    .out_valid(est_out_valid), .eps_re(est_eps_re), .eps_im(est_eps_im)
  );
endmodule
