// slicer: three-level decision on the equalizer output and the error that
// drives the coefficient update.
//
// A PR-IV sample ideally takes one of the levels -1, 0, +1, represented as
// -24, 0, +24 in the 6-bit datapath. The slicer picks the nearest level,
// with decision thresholds at +/-12 (half a level), and forms the error as
// decision minus equalizer output, the signs printed at the error node of
// the source's equalizer diagram. Only channel 1's output is sliced. The
// thresholds are this design's choice. Combinational.
//
// Ports: z (6-bit) in; d (6-bit decision) and e (7-bit error) out.
module slicer
  import prml_pkg::*;
(
  input  sample_t                   z,
  output sample_t                   d,
  output logic signed [SAMPLE_W:0]  e
);
  always_comb begin
    if (z >= sample_t'(UNITY / 2))       d = sample_t'(UNITY);
    else if (z <= sample_t'(-UNITY / 2)) d = sample_t'(-UNITY);
    else                                 d = '0;
    e = (SAMPLE_W+1)'(d) - (SAMPLE_W+1)'(z);
  end
endmodule
