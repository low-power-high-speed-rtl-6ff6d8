// prml_pkg: word widths and constants shared by the PRML read-channel DSP.
//
// The datapath is a 6-bit system: input samples, filter coefficients and
// Viterbi inputs are 6-bit two's complement. Tap products are carried as
// 10-bit words and summed by the accumulator tree into 13 bits. A PR-IV
// level of magnitude one is represented by 24 quantisation steps, leaving
// headroom in the 6-bit range for noise. These numbers follow the source
// design; the coefficient scaling and the product rounding are this
// implementation's own choices and are described where they are used.
package prml_pkg;
  localparam int unsigned SAMPLE_W = 6;   // input sample / Viterbi input width
  localparam int unsigned COEF_W   = 6;   // coefficient width on the bus
  localparam int unsigned PROD_W   = 10;  // tap product width
  localparam int unsigned ACC_W    = 13;  // accumulator output width
  localparam int unsigned NTAPS    = 8;   // taps per FIR channel
  localparam int unsigned NCHAN    = 4;   // time-interleaved channels
  localparam int signed   UNITY    = 24;  // quantisation steps for PR level 1
  localparam int unsigned SURV_DEPTH = 10; // survivor register depth

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [PROD_W-1:0]   prod_t;
  typedef logic signed [ACC_W-1:0]    acc_t;
endpackage
