// dm_decision: merge decision of the difference-metric (DM) Viterbi
// algorithm for a two-state 1-D channel.
//
// How it works: the DM algorithm keeps only the current state beta (the
// state of the most recent merge) and the input z_p that caused that merge.
// A 6-bit subtractor forms d = (z_p - z)/2 (the 7-bit difference with its
// LSB dropped, so d is half the true difference). With one PR level equal
// to 24 steps, a true difference of one level is 12 in d, and:
//   beta = 1: merge at state 1 if d >= 0, merge at state 0 if d < -12,
//             no merge if -12 <= d < 0;
//   beta = 0: merge at state 1 if d >= 12, merge at state 0 if d < 0,
//             no merge if 0 <= d < 12.
// change_input (z_p must be replaced by z) is high on any merge;
// change_beta is high when the merge is at the other state. merge_state =
// beta xor change_beta is the state at which the merge happened, which is
// also the next beta; the source derives its register-exchange control
// signal by the same xor. The decision ranges reproduce the source's truth
// table for change_input. Combinational.
//
// Ports: beta, zp, z in; d, change_input, change_beta, merge_state out.
module dm_decision
  import prml_pkg::*;
(
  input  logic    beta,
  input  sample_t zp,
  input  sample_t z,
  output sample_t d,
  output logic    change_input,
  output logic    change_beta,
  output logic    merge_state
);
  localparam int signed HALF = UNITY / 2;   // one level in d units
  logic signed [SAMPLE_W:0] diff;

  always_comb begin
    diff = (SAMPLE_W+1)'(zp) - (SAMPLE_W+1)'(z);
    d    = diff[SAMPLE_W:1];
    if (beta) begin
      change_input = (d >= 0) || (d < sample_t'(-HALF));
      change_beta  = (d < sample_t'(-HALF));
    end else begin
      change_input = (d >= sample_t'(HALF)) || (d < 0);
      change_beta  = (d >= sample_t'(HALF));
    end
    merge_state = beta ^ change_beta;
  end
endmodule
