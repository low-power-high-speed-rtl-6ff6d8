// csel_adder: W-bit two's-complement carry-select adder with a W+1-bit
// result, the building block of the accumulator tree.
//
// How it works: the W bits are split into three stages of S0, S1 and S2
// bits (LSB stage first). Every stage above the first computes its sum
// twice, once for a carry-in of 0 and once for 1; the carry coming out of
// the stage below selects one of the two, so the critical path is the
// first stage's carry plus one multiplexer per stage. The extra output bit
// is produced by the sign correction the source describes: when the two
// input sign bits differ, the true result cannot overflow, so the top
// output bit copies the adder's own top sum bit (a sign extension);
// otherwise it is the carry out, which then equals the common sign bit.
//
// Ports: a, b (W-bit signed) in; s (W+1-bit signed) out; combinational.
// The stagings used in the accumulator (2-3-5, 2-3-6, 2-4-6 for 10, 11 and
// 12 bits) are the source's; the order of the stages (smallest at the LSB
// end) is this design's reading.
module csel_adder #(
  parameter int unsigned W  = 10,
  parameter int unsigned S0 = 2,
  parameter int unsigned S1 = 3,
  parameter int unsigned S2 = 5
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W:0]   s
);
  localparam int unsigned B1 = S0;        // first bit of stage 1
  localparam int unsigned B2 = S0 + S1;   // first bit of stage 2

  // stage 0: plain add with carry-in 0
  logic [S0:0] st0;
  // stages 1 and 2: both carry assumptions
  logic [S1:0] st1_c0, st1_c1;
  logic [S2:0] st2_c0, st2_c1;
  logic        c1, c2, cout;
  logic [W-1:0] sum;

  always_comb begin
    st0    = {1'b0, a[S0-1:0]} + {1'b0, b[S0-1:0]};
    st1_c0 = {1'b0, a[B2-1:B1]} + {1'b0, b[B2-1:B1]};
    st1_c1 = {1'b0, a[B2-1:B1]} + {1'b0, b[B2-1:B1]} + (S1+1)'(1);
    st2_c0 = {1'b0, a[W-1:B2]} + {1'b0, b[W-1:B2]};
    st2_c1 = {1'b0, a[W-1:B2]} + {1'b0, b[W-1:B2]} + (S2+1)'(1);

    c1 = st0[S0];
    c2 = c1 ? st1_c1[S1] : st1_c0[S1];
    cout = c2 ? st2_c1[S2] : st2_c0[S2];
    sum = {c2 ? st2_c1[S2-1:0] : st2_c0[S2-1:0],
           c1 ? st1_c1[S1-1:0] : st1_c0[S1-1:0],
           st0[S0-1:0]};

    // MSB error correction (sign extension when the input signs differ)
    s = {(a[W-1] ^ b[W-1]) ? sum[W-1] : cout, sum};
  end

  initial begin
    assert (S0 + S1 + S2 == W) else $error("csel_adder: stages do not add up to W");
  end
endmodule
