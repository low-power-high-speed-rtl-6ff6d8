// prml_dsp_tb: end-to-end run of the read-channel DSP at its default
// parameters.
//
// Random bits, limited to runs of at most seven equal bits in each of the
// two interleaves (as a PR-IV modulation code would), are written through
// a PR-IV channel with inter-symbol interference and a little noise:
//   x[k] = 18*(a[k]-a[k-2]) + 8*(a[k-1]-a[k-3]) + noise, noise in [-3,3].
// The design first loads its coefficients from the switches (train low),
// then trains. After the equalizer has converged, every bit of the merged
// output stream must equal the written bit LAT clocks earlier, where LAT
// is the design's fixed input-to-output latency; the testbench also
// measures the best-matching lag and checks it equals LAT.
// Mechanisms counted (each must occur): coefficient load from switches,
// the load-to-training mode switch, coefficient updates in both
// directions, all three slicer decisions, merges at state 0 and state 1
// and no-merge steps in both decoders, and saturation of a channel output.
module prml_dsp_tb;
  import prml_pkg::*;
  localparam int LAT = 29;        // x_in cycle of bit a[k] -> data_out cycle
  localparam int NCYC = 20000;
  localparam int CONVERGED = 12000;

  logic clk = 0, rst_n = 0, train = 0;
  sample_t x_in;
  logic [3:0] step_up, step_dn;
  coef_t   coef_sw [NTAPS];
  sample_t z   [NCHAN];
  acc_t    acc [NCHAN];
  coef_t   coef [NTAPS];
  sample_t dec;
  logic signed [SAMPLE_W:0] err;
  logic [1:0] vit_bit, vit_merge, vit_state, vit_mstate;
  logic data_out;
  logic [3:0] ph;

  int abit [int];
  int outb [int];
  int checks = 0, failures = 0;
  int n_load = 0, n_switch = 0, n_up = 0, n_down = 0;
  int n_dpos = 0, n_dneg = 0, n_dzero = 0, n_sat = 0;
  int n_m0 [2], n_m1 [2], n_nm [2];
  int bit_errors = 0;

  prml_dsp dut (.clk, .rst_n, .x_in, .train, .step_up, .step_dn, .coef_sw,
                .z, .acc, .coef, .dec, .err, .vit_bit, .vit_merge, .vit_state,
                .vit_mstate, .data_out, .ph);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bit_at(int k);
    return (k < 0) ? 0 : abit[k];
  endfunction

  initial begin
    coef_t prev [NTAPS];
    int best_lag, best_match;
    step_up = 4'd2; step_dn = 4'd2;
    for (int j = 0; j < 8; j++) coef_sw[j] = '0;
    coef_sw[3] = 6'sd16;              // main tap 1.0
    coef_sw[2] = 6'sd31;              // neighbours: forced sign, -1/16
    coef_sw[4] = 6'sd31;
    for (int d = 0; d < 2; d++) begin n_m0[d] = 0; n_m1[d] = 0; n_nm[d] = 0; end
    x_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int j = 0; j < 8; j++) prev[j] = coef[j];
    for (int k = 0; k < NCYC; k++) begin
      int a, run, xv;
      if (k == 200) begin train = 1; n_switch++; end
      if (!train && ph[0]) n_load++;
      // run-length limited bits, per interleave
      a = int'($urandom_range(1));
      run = 0;
      for (int r = 2; r <= 14 && bit_at(k - r) == bit_at(k - 2) && k - r >= 0; r += 2) run++;
      if (k >= 2 && run >= 6 && a == bit_at(k - 2)) a = 1 - a;
      abit[k] = a;
      xv = 18 * (a - bit_at(k - 2)) + 8 * (bit_at(k - 1) - bit_at(k - 3))
           + int'($urandom_range(6)) - 3;
      if (k < 100) xv = 31;           // a saturating preamble
      x_in = sample_t'(xv);
      // observe the design during this cycle
      outb[k] = int'(data_out);
      for (int j = 0; j < 8; j++) begin
        if (coef[j] > prev[j]) n_up++;
        if (coef[j] < prev[j]) n_down++;
        prev[j] = coef[j];
      end
      if (ph[1] && train) begin
        if (dec > 0) n_dpos++; else if (dec < 0) n_dneg++; else n_dzero++;
      end
      for (int i = 0; i < 4; i++) if (z[i] == 6'sd31 || z[i] == -6'sd32) n_sat++;
      @(posedge clk); #1;
      // decoder steps that happened at this edge
      if (ph[2] | ph[0]) begin
        if (vit_merge[0]) begin if (vit_mstate[0]) n_m1[0]++; else n_m0[0]++; end else n_nm[0]++;
      end else begin
        if (vit_merge[1]) begin if (vit_mstate[1]) n_m1[1]++; else n_m0[1]++; end else n_nm[1]++;
      end
    end
    // lag search over the converged part
    best_lag = -1; best_match = -1;
    for (int lag = 0; lag < 80; lag++) begin
      int m;
      m = 0;
      for (int k = CONVERGED; k < NCYC; k++) if (outb[k] == abit[k - lag]) m++;
      if (m > best_match) begin best_match = m; best_lag = lag; end
    end
    $display("best lag %0d matches %0d of %0d", best_lag, best_match, NCYC - CONVERGED);
    checks++;
    if (best_lag != LAT) begin failures++; $display("FAIL latency %0d, expected %0d", best_lag, LAT); end
    for (int k = CONVERGED; k < NCYC; k++) begin
      checks++;
      if (outb[k] != abit[k - LAT]) begin
        failures++; bit_errors++;
        if (bit_errors < 10) $display("FAIL bit at cycle %0d: got %0d written %0d", k, outb[k], abit[k - LAT]);
      end
    end
    $display("loads=%0d switch=%0d coef up=%0d down=%0d dec +/0/-=%0d/%0d/%0d sat=%0d",
             n_load, n_switch, n_up, n_down, n_dpos, n_dzero, n_dneg, n_sat);
    for (int d = 0; d < 2; d++)
      $display("decoder %0d: merge0=%0d merge1=%0d nomerge=%0d", d, n_m0[d], n_m1[d], n_nm[d]);
    $display("final coefs: %0d %0d %0d %0d %0d %0d %0d %0d", coef[0], coef[1], coef[2],
             coef[3], coef[4], coef[5], coef[6], coef[7]);
    checks += 5;
    if (n_load == 0 || n_switch == 0) failures++;
    if (n_up == 0 || n_down == 0) failures++;
    if (n_dpos == 0 || n_dneg == 0 || n_dzero == 0) failures++;
    if (n_sat == 0) failures++;
    for (int d = 0; d < 2; d++) if (n_m0[d] == 0 || n_m1[d] == 0 || n_nm[d] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
