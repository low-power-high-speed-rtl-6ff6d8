// parallel_equalizer: the 100 MS/s adaptive 8-tap equalizer built from four
// 25 MS/s time-interleaved FIR channels.
//
// How it works: channel i (i = 1..4) is clocked by phase enable ph[i-1],
// so successive channels start work one symbol period apart and each one
// equalizes every fourth sample. Samples and coefficients are bussed
// through the channels in a chain rather than broadcast:
//  * channel 1 takes its eight samples from the symbol-rate delay line;
//    channel k+1 takes tap 0 straight from the input and tap j from tap j-1
//    of channel k's input latches, which one period earlier held exactly
//    the samples now needed one position further down;
//  * channel 1's coefficient latches take the update circuit's output, and
//    channel k+1's coefficient latches take channel k's latch outputs.
// Only channel 1's output is sliced and drives the coefficient update, so
// the coefficients change once per four symbols. All of this follows the
// source design.
//
// Ports: clk, rst_n, ph[4], x_in (one 6-bit sample per master clock),
// train, step_up, step_dn, coef_sw[8] in; z[4] (6-bit channel outputs),
// acc[4] (13-bit sums), coef[8] (channel-1 coefficient latches), dec and
// err (slicer) out. z[i] changes at the edge that ends ph[i] and then
// holds for four symbol periods; it is the equalized sample taken at the
// previous ph[i] edge.
module parallel_equalizer
  import prml_pkg::*;
#(
  parameter int unsigned FRAC     = 4,
  parameter int unsigned MAIN_TAP = 3,
  parameter int unsigned STEP_W   = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NCHAN-1:0]         ph,
  input  sample_t                  x_in,
  input  logic                     train,
  input  logic [STEP_W-1:0]        step_up,
  input  logic [STEP_W-1:0]        step_dn,
  input  coef_t                    coef_sw [NTAPS],
  output sample_t                  z       [NCHAN],
  output acc_t                     acc     [NCHAN],
  output coef_t                    coef    [NTAPS],
  output sample_t                  dec,
  output logic signed [SAMPLE_W:0] err
);
  sample_t dl_taps [NTAPS];
  sample_t xin  [NCHAN][NTAPS];
  sample_t xq   [NCHAN][NTAPS];
  coef_t   cin  [NCHAN][NTAPS];
  coef_t   cq   [NCHAN][NTAPS];
  coef_t   cupd [NTAPS];

  delay_line u_dl (.clk, .rst_n, .x_in, .taps(dl_taps));

  always_comb begin
    for (int j = 0; j < int'(NTAPS); j++) begin
      xin[0][j] = dl_taps[j];
      cin[0][j] = cupd[j];
    end
    for (int i = 1; i < int'(NCHAN); i++) begin
      xin[i][0] = x_in;
      for (int j = 1; j < int'(NTAPS); j++) xin[i][j] = xq[i-1][j-1];
      for (int j = 0; j < int'(NTAPS); j++) cin[i][j] = cq[i-1][j];
    end
  end

  for (genvar i = 0; i < NCHAN; i++) begin : g_ch
    fir_filter u_fir (
      .clk, .rst_n, .en(ph[i]),
      .x_in(xin[i]), .c_in(cin[i]),
      .x_q(xq[i]), .c_q(cq[i]),
      .acc(acc[i]), .z(z[i]));
  end

  slicer u_slicer (.z(z[0]), .d(dec), .e(err));

  coef_update #(.FRAC(FRAC), .MAIN_TAP(MAIN_TAP), .STEP_W(STEP_W)) u_upd (
    .clk, .rst_n, .en(ph[0]), .train, .step_up, .step_dn,
    .coef_sw, .x_taps(xq[0]), .err, .coef(cupd));

  assign coef = cq[0];
endmodule
