// polar_pkg: types shared by the polar decoder and the channel estimator.
//
// LLRs travel through the decoder in sign-magnitude form: bit [Q-1] is the
// sign (1 = negative, so the hard decision is 1) and bits [Q-2:0] are the
// magnitude.  The package holds the decoder controller's state encoding and
// the modulation code of the channel estimator; both encodings are this
// design's choice.
package polar_pkg;

  // Controller states of the decoder.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,   // waiting for start
    ST_STAGE = 2'd1,   // one f/g stage updates its registers
    ST_PNODE = 2'd2    // the last stage decides four bits
  } dec_state_e;

  // Modulations supported by the channel estimator.
  typedef enum logic [1:0] {
    MOD_BPSK  = 2'd0,
    MOD_QPSK  = 2'd1,
    MOD_QAM16 = 2'd2
  } mod_e;

  // Mux select of one LS-unit partial product: 0, r or 3r.
  typedef enum logic [1:0] {
    CSEL_ZERO = 2'd0,
    CSEL_X1   = 2'd1,
    CSEL_X3   = 2'd2
  } csel_e;

endpackage
