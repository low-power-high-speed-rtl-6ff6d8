// delay_line: symbol-rate tapped delay line of input samples for filter 1.
//
// The newest tap is the current input sample itself; the other NTAPS-1
// taps are registers shifted on every master clock, so taps[j] holds the
// sample received j symbol periods ago. Filter 1 copies all taps into its
// input latches on its own clock; the other three channels take their
// samples from the previous channel's latches instead (see
// parallel_equalizer). Follows the source design; reset to zero is this
// design's choice.
//
// Ports: clk, rst_n, x_in (6-bit sample, one per master clock) in;
// taps[NTAPS] out, taps[0] = x_in combinationally.
module delay_line
  import prml_pkg::*;
#(
  parameter int unsigned TAPS = NTAPS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x_in,
  output sample_t taps [TAPS]
);
  sample_t dly [TAPS-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(TAPS) - 1; j++) dly[j] <= '0;
    end else begin
      dly[0] <= x_in;
      for (int j = 1; j < int'(TAPS) - 1; j++) dly[j] <= dly[j-1];
    end
  end

  always_comb begin
    taps[0] = x_in;
    for (int j = 1; j < int'(TAPS); j++) taps[j] = dly[j-1];
  end
endmodule
