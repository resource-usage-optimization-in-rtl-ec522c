// sdr_pkg: constants and types shared by the GSM receiver datapath.
//
// The numbers here are the ones the receiver is built around: a 12-bit ADC, a
// 24-bit word after decimation, a 16-sample training sequence correlated
// against a 27-sample window of the received burst, and the Q12.14 word used
// by the RLS equalizer. The peak-detection state machine follows the four
// states Idle, CORDIC, Interpolation and Output Ready.
//
// Source and choices: the sizes follow the original design:
//   - 12-bit ADC;
//   - 4-stage CIC, rate up to 128;
//   - 24-bit samples;
//   - 16-sample training sequence and 27-sample window;
//   - 12 CORDIC stages and 8 interpolation steps;
//   - Q12.14 equalizer words.
// The type and state encodings are this design's choices.
package sdr_pkg;

  localparam int ADC_W      = 12;   // ADC resolution
  localparam int DEC_W      = 24;   // word width after decimation (truncated)
  localparam int CIC_N      = 4;    // CIC stages
  localparam int CIC_RMAX   = 128;  // largest CIC decimation rate, log2(M*R) = 7
  localparam int CORR_TAPS  = 16;   // training-sequence length
  localparam int RX_LEN     = 27;   // received window that is correlated
  localparam int N_LAGS     = RX_LEN - CORR_TAPS + 1;
  localparam int CORDIC_ITERS = 12; // CORDIC stages
  localparam int INTERP_ITERS = 8;  // early/late halvings -> 1/256 sample
  localparam int EQ_IWL     = 12;   // equalizer integer word length
  localparam int EQ_FWL     = 14;   // equalizer fraction word length

  // Complex sample after decimation.
  typedef struct packed {
    logic signed [DEC_W-1:0] re;
    logic signed [DEC_W-1:0] im;
  } cplx_t;

  // States of the peak detector.
  typedef enum logic [1:0] {
    PD_IDLE   = 2'd0,
    PD_CORDIC = 2'd1,
    PD_INTERP = 2'd2,
    PD_READY  = 2'd3
  } pd_state_e;

  // Sequencer states of the RLS equalizer (one pass per received sample).
  typedef enum logic [3:0] {
    EQ_IDLE  = 4'd0,
    EQ_FILT  = 4'd1,   // y = w' * phi
    EQ_ERR   = 4'd2,   // decision and error
    EQ_PI    = 4'd3,   // pi = P * phi
    EQ_DEN   = 4'd4,   // den = lambda + phi' * pi
    EQ_DIV   = 4'd5,   // 1/den by series expansion
    EQ_GAIN  = 4'd6,   // k = pi / den, w += k * e
    EQ_PUPD  = 4'd7,   // P = (P - k * pi') / lambda
    EQ_DONE  = 4'd8
  } eq_state_e;

endpackage
