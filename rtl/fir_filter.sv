// fir_filter: one quarter-rate 8-tap FIR channel of the parallel equalizer.
//
// How it works: on each cycle in which its clock enable `en` is high (once
// every four symbol periods) the channel copies eight input samples into
// its input latches and eight coefficients into its coefficient latches.
// Eight carry-save multipliers form the tap products, which the product
// latches capture at the next enabled edge, four symbol periods later
// (the source allows a full quarter-rate period for the multiply). The
// carry-select accumulator tree then adds the products combinationally, so
// `acc` and `z` are valid for the four symbol periods after that edge.
// The latch outputs x_q and c_q are brought out because the next channel
// takes its samples and coefficients from them.
//
// z is the 6-bit equalizer output handed to the slicer and Viterbi
// decoder. Coefficients are read with 16 = 1.0 (this design's choice: the
// source gives the 6-bit width but not the binary point), so with products
// scaled by 1/4 the output is acc/4, saturated to 6 bits.
//
// Ports: clk, rst_n, en, x_in[8], c_in[8] in; x_q[8], c_q[8], acc
// (13-bit), z (6-bit) out. Latency: samples latched at enable k appear in
// acc/z after enable k+1.
module fir_filter
  import prml_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x_in [NTAPS],
  input  coef_t   c_in [NTAPS],
  output sample_t x_q  [NTAPS],
  output coef_t   c_q  [NTAPS],
  output acc_t    acc,
  output sample_t z
);
  prod_t prod   [NTAPS];
  prod_t prod_q [NTAPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(NTAPS); j++) begin
        x_q[j]    <= '0;
        c_q[j]    <= '0;
        prod_q[j] <= '0;
      end
    end else if (en) begin
      for (int j = 0; j < int'(NTAPS); j++) begin
        x_q[j]    <= x_in[j];
        c_q[j]    <= c_in[j];
        prod_q[j] <= prod[j];
      end
    end
  end

  for (genvar j = 0; j < NTAPS; j++) begin : g_tap
    csm_mult #(.N(SAMPLE_W), .OUT_W(PROD_W)) u_mult (
      .a(x_q[j]), .b(c_q[j]), .p(prod[j]));
  end

  csel_accumulator u_acc (.prod(prod_q), .sum(acc));

  // output scaling: acc/4, saturated to the 6-bit range
  localparam int signed ZMAX = 2 ** (SAMPLE_W - 1) - 1;
  localparam int signed ZMIN = -(2 ** (SAMPLE_W - 1));
  acc_t acc_sh;
  always_comb begin
    acc_sh = acc >>> 2;
    if (acc_sh > acc_t'(ZMAX))      z = sample_t'(ZMAX);
    else if (acc_sh < acc_t'(ZMIN)) z = sample_t'(ZMIN);
    else                            z = acc_sh[SAMPLE_W-1:0];
  end
endmodule
