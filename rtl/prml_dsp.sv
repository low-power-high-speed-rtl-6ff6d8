// prml_dsp: low-power PR-IV (1-D^2) read-channel DSP: a 100 MS/s adaptive
// equalizer built from four 25 MS/s channels, followed by two 50 MS/s
// difference-metric Viterbi decoders, merged into one 100 Mb/s bit stream.
//
// How it works: one 6-bit sample arrives per master clock (symbol period
// T). clock_gen produces four one-hot phase enables; channel i of the
// parallel equalizer works on every fourth sample, one T after channel
// i-1. Because 1-D^2 couples only samples two apart, the even and odd
// samples form two independent 1-D channels: decoder A takes channels 1
// and 3, decoder B channels 2 and 4, each stepping every 2T. Channel i's
// output is stable for 4T after its product latches load, and the decoder
// latches it one T later. The two decoders' bits are interleaved back
// into a symbol-rate stream. This arrangement follows the source design;
// the use of clock enables and the exact sampling instants are this
// design's choices.
//
// Ports: clk, rst_n (synchronous, active low), x_in (6-bit sample per
// clock), train (high: adapt; low: load coefficients from coef_sw),
// step_up/step_dn (update step sizes in coefficient fraction LSBs),
// coef_sw[8] in. Out: z[4] and acc[4] (the four channel outputs), coef[8]
// (channel-1 coefficients), dec/err (slicer), vit_bit[2] (decoder A, B),
// data_out (merged stream, one bit per clock), merge counters' source
// signals vit_merge[2], vit_state[2] (beta) and
// vit_mstate[2] (merge state), ph[4].
// Latency: x_in to data_out is a fixed number of clocks, measured in the
// end-to-end testbench (see README).
module prml_dsp
  import prml_pkg::*;
#(
  parameter int unsigned FRAC     = 4,
  parameter int unsigned MAIN_TAP = 3,
  parameter int unsigned STEP_W   = 4,
  parameter int unsigned DEPTH    = SURV_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  sample_t                  x_in,
  input  logic                     train,
  input  logic [STEP_W-1:0]        step_up,
  input  logic [STEP_W-1:0]        step_dn,
  input  coef_t                    coef_sw [NTAPS],
  output sample_t                  z       [NCHAN],
  output acc_t                     acc     [NCHAN],
  output coef_t                    coef    [NTAPS],
  output sample_t                  dec,
  output logic signed [SAMPLE_W:0] err,
  output logic [1:0]               vit_bit,
  output logic [1:0]               vit_merge,
  output logic [1:0]               vit_state,
  output logic [1:0]               vit_mstate,
  output logic                     data_out,
  output logic [NCHAN-1:0]         ph
);
  logic    en_a, en_b;
  sample_t za, zb;
  logic    beta_a, beta_b;

  clock_gen #(.NPH(NCHAN)) u_clk (.clk, .rst_n, .ph);

  parallel_equalizer #(.FRAC(FRAC), .MAIN_TAP(MAIN_TAP), .STEP_W(STEP_W)) u_eq (
    .clk, .rst_n, .ph, .x_in, .train, .step_up, .step_dn, .coef_sw,
    .z, .acc, .coef, .dec, .err);

  // decoder A: channels 1 and 3; decoder B: channels 2 and 4
  always_comb begin
    en_a = ph[1] | ph[3];
    en_b = ph[2] | ph[0];
    za   = ph[1] ? z[0] : z[2];
    zb   = ph[2] ? z[1] : z[3];
  end

  dm_viterbi #(.DEPTH(DEPTH)) u_vit_a (
    .clk, .rst_n, .en(en_a), .z(za),
    .dout(vit_bit[0]), .beta(beta_a), .merge(vit_merge[0]), .merge_state(vit_mstate[0]));
  dm_viterbi #(.DEPTH(DEPTH)) u_vit_b (
    .clk, .rst_n, .en(en_b), .z(zb),
    .dout(vit_bit[1]), .beta(beta_b), .merge(vit_merge[1]), .merge_state(vit_mstate[1]));

  assign vit_state = {beta_b, beta_a};

  // output merge: the decoder that stepped at the last edge supplies the bit
  assign data_out = (ph[2] | ph[0]) ? vit_bit[0] : vit_bit[1];
endmodule
