// csm_mult: N x N two's-complement carry-save array multiplier
// (Baugh-Wooley form), the tap multiplier of each FIR channel.
//
// How it works: the partial-product bits a[i]&b[j] are formed as usual,
// except that the N-1 cross terms with exactly one sign bit are inverted;
// adding the constants 2^N and 2^(2N-1) then makes the unsigned sum of the
// array equal to the signed product modulo 2^(2N) (Baugh-Wooley). The rows
// are summed in carry-save form: each row is a line of full adders that
// adds one partial-product row to the running sum and carry vectors
// without propagating carries. A final ripple row of full adders merges the
// sum and carry vectors. Everything is combinational; in the channel the
// inputs come from the tap latches and the result is caught by the product
// latches one quarter-rate cycle later.
//
// Ports: a, b (N-bit signed) in; p (OUT_W-bit signed) out. The full product
// is 2N bits; the source carries tap products as 10-bit words without
// saying which bits are kept, so this design keeps the top OUT_W bits
// (p = full >>> (2N-OUT_W)), which for N=6, OUT_W=10 drops the two LSBs and
// loses no range. The carry-save array and Baugh-Wooley recoding follow the
// source design; the rounding choice is this design's own.
module csm_mult #(
  parameter int unsigned N     = 6,
  parameter int unsigned OUT_W = 10
) (
  input  logic signed [N-1:0]     a,
  input  logic signed [N-1:0]     b,
  output logic signed [OUT_W-1:0] p
);
  localparam int unsigned W = 2 * N;

  // partial-product rows, already shifted to their weight
  logic [W-1:0] pp [N];
  // running sum / carry vectors between the carry-save rows
  logic [W-1:0] sv [N+1];
  logic [W-1:0] cv [N+1];
  logic [W-1:0] rc [N];     // raw carries out of each row (before shift)
  logic [W:0]   mc;         // carry chain of the merging adder
  logic [W-1:0] full;

  always_comb begin
    for (int j = 0; j < int'(N); j++) begin
      pp[j] = '0;
      for (int i = 0; i < int'(N); i++) begin
        logic bit_ij;
        bit_ij = a[i] & b[j];
        if ((i == int'(N) - 1) != (j == int'(N) - 1)) bit_ij = ~bit_ij;
        pp[j][i+j] = bit_ij;
      end
    end
  end

  // constants of the Baugh-Wooley correction enter as the initial sum word
  assign sv[0] = W'((W'(1) << N) | (W'(1) << (W - 1)));
  assign cv[0] = '0;

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar k = 0; k < W; k++) begin : g_fa
      full_adder u_fa (
        .a   (sv[r][k]),
        .b   (cv[r][k]),
        .cin (pp[r][k]),
        .s   (sv[r+1][k]),
        .cout(rc[r][k])
      );
    end
    assign cv[r+1] = {rc[r][W-2:0], 1'b0};
  end

  // vector-merging ripple row
  assign mc[0] = 1'b0;
  for (genvar k = 0; k < W; k++) begin : g_merge
    full_adder u_fa (
      .a   (sv[N][k]),
      .b   (cv[N][k]),
      .cin (mc[k]),
      .s   (full[k]),
      .cout(mc[k+1])
    );
  end

  assign p = full[W-1 -: OUT_W];
endmodule
