// coef_update: stochastic-gradient coefficient update of the equalizer.
//
// The update runs once per quarter-rate cycle (enable `en`, channel 1's
// clock) and is driven by channel 1 only; the other channels reuse the
// coefficients through the latch chain. Each coefficient is kept in a
// register with FRAC extra fraction bits below the 6-bit bus word. In
// training mode (`train` high) every coefficient moves by one step in the
// direction sign(error) * sign(sample), the sign-sign form of the
// stochastic gradient rule, and saturates at the ends of its range: by
// `step_up` fraction LSBs when it increases and by `step_dn` when it
// decreases (the two externally set step sizes). With `train` low the
// registers are loaded from the external coefficient switches. As in the
// source, the main tap is loaded as a positive 5-bit value and its two
// neighbours get a forced negative sign bit; the other taps take all six
// switch bits.
//
// Timing: the sample signs are captured at one enabled edge, when the
// channel-1 input latches hold the samples whose products are just being
// latched; the error of those products is valid during the following
// quarter-rate cycle and the new coefficients are computed combinationally
// from it. The `coef` outputs are the new values, valid until channel 1's
// coefficient latches and the internal registers both take them at the
// next enabled edge: an 8T loop (4T multiply, 4T accumulate and update).
//
// Ports: clk, rst_n, en, train, step_up, step_dn, coef_sw[8], x_taps[8]
// (channel-1 input latches), err in; coef[8] out.
// The sign-sign rule, the fraction width, the saturation and the meaning
// given to the two step sizes are this design's choices: the source names
// the algorithm and the step-size switches but not the arithmetic.
module coef_update
  import prml_pkg::*;
#(
  parameter int unsigned FRAC     = 4,
  parameter int unsigned MAIN_TAP = 3,
  parameter int unsigned STEP_W   = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic                       train,
  input  logic [STEP_W-1:0]          step_up,
  input  logic [STEP_W-1:0]          step_dn,
  input  coef_t                      coef_sw [NTAPS],
  input  sample_t                    x_taps  [NTAPS],
  input  logic signed [SAMPLE_W:0]   err,
  output coef_t                      coef    [NTAPS]
);
  localparam int unsigned RW = COEF_W + FRAC;
  localparam int signed RMAX = 2 ** (RW - 1) - 1;
  localparam int signed RMIN = -(2 ** (RW - 1));

  logic signed [RW-1:0] w      [NTAPS];
  logic signed [RW-1:0] w_next [NTAPS];
  logic [NTAPS-1:0]     xneg;     // captured sample sign bits

  always_comb begin
    for (int j = 0; j < int'(NTAPS); j++) begin
      coef_t ld;
      int    t;
      if (j == int'(MAIN_TAP))
        ld = {1'b0, coef_sw[j][COEF_W-2:0]};
      else if (j == int'(MAIN_TAP) - 1 || j == int'(MAIN_TAP) + 1)
        ld = {1'b1, coef_sw[j][COEF_W-2:0]};
      else
        ld = coef_sw[j];

      t = int'(w[j]);
      if (err != '0) begin
        // direction = sign(err) * sign(x)
        if (err[SAMPLE_W] == xneg[j]) t = t + int'(step_up);
        else                          t = t - int'(step_dn);
      end
      if (t > RMAX) t = RMAX;
      if (t < RMIN) t = RMIN;

      w_next[j] = train ? RW'(t) : {ld, FRAC'(0)};
      coef[j]   = w_next[j][RW-1 -: COEF_W];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(NTAPS); j++) w[j] <= '0;
      xneg <= '0;
    end else if (en) begin
      for (int j = 0; j < int'(NTAPS); j++) begin
        w[j]    <= w_next[j];
        xneg[j] <= x_taps[j][SAMPLE_W-1];
      end
    end
  end
endmodule
