// dm_viterbi: two-state Viterbi decoder for a 1-D partial-response channel
// using the difference-metric (DM) algorithm.
//
// How it works: instead of two path metrics, the decoder stores the state
// of the most recent merge (beta) and the input z_p that caused it. Each
// step the DM decision logic compares (z_p - z)/2 with the thresholds for
// the current beta; on a merge z_p is replaced by the new input (otherwise
// it is kept and reused), and beta flips when the merge is at the other
// state. The survivor rows store the two candidate bit sequences and
// exchange them on merges. Two such decoders, each at half the symbol
// rate, decode the even and odd samples of the 1-D^2 (PR-IV) channel.
//
// Ports: clk, rst_n, en (one step per enabled cycle), z (6-bit equalized
// sample, +/-24 = +/-1) in; dout (decoded bit), beta, merge and
// merge_state (for observation) out.
// Timing: z is caught by the input latch at an enabled edge and used at
// the next one, so the bit for the sample caught at step m leaves dout
// after step m+DEPTH+1. The input latch, the recursive z_p latch, the
// beta latch and the survivor rows follow the source; resetting beta and
// z_p to zero is this design's choice.
module dm_viterbi
  import prml_pkg::*;
#(
  parameter int unsigned DEPTH = SURV_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t z,
  output logic    dout,
  output logic    beta,
  output logic    merge,
  output logic    merge_state
);
  sample_t zq;      // input latch
  sample_t zp;      // "old" input of the most recent merge
  sample_t d;
  logic    change_beta;

  dm_decision u_dec (
    .beta, .zp, .z(zq), .d,
    .change_input(merge), .change_beta, .merge_state);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      zq   <= '0;
      zp   <= '0;
      beta <= 1'b0;
    end else if (en) begin
      zq <= z;
      if (merge)       zp   <= zq;
      if (change_beta) beta <= ~beta;
    end
  end

  survivor_rows #(.DEPTH(DEPTH)) u_surv (
    .clk, .rst_n, .en, .merge, .merge_state, .dout);
endmodule
