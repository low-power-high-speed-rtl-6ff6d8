// parallel_equalizer_tb: checks the four time-interleaved channels against
// a plain symbol-rate 8-tap FIR computed in the testbench.
//
// One random 6-bit sample enters per clock. For the channel whose enable
// ended at a given edge, z must equal the FIR output for the sample that
// arrived four clocks earlier: sum over taps of (x[k-j]*c[j]) >>> 2, then
// >>> 2 and saturation. The coefficients the reference uses are the ones
// channel 1 latched at the start of the same quarter-rate window, as
// observed on the coef port; this checks the sample chain (tap 0 from the
// input, tap j from the previous channel's tap j-1) and the coefficient
// chain. Phase 1 loads fixed, all-different coefficients from the
// switches (training off). Phase 2 trains on a PR-IV signal with added
// inter-symbol interference and requires the mean slicer error to fall
// and the coefficients to move; the channel checks continue meanwhile.
module parallel_equalizer_tb;
  import prml_pkg::*;
  logic clk = 0, rst_n = 0, train = 0;
  logic [3:0] ph;
  sample_t x_in;
  logic [3:0] step_up, step_dn;
  coef_t   coef_sw [NTAPS];
  sample_t z   [NCHAN];
  acc_t    acc [NCHAN];
  coef_t   coef [NTAPS];
  sample_t dec;
  logic signed [SAMPLE_W:0] err;

  int xh [int];            // input sample per cycle
  int ch [int][NTAPS];     // coef port per cycle
  logic [3:0] phh [int];   // phase per cycle
  int checks = 0, failures = 0;
  int n_coef_change = 0, n_dec_pos = 0, n_dec_neg = 0, n_dec_zero = 0;
  longint err_early = 0, err_late = 0;

  clock_gen u_clk (.clk, .rst_n, .ph);
  parallel_equalizer dut (.clk, .rst_n, .ph, .x_in, .train, .step_up, .step_dn,
                          .coef_sw, .z, .acc, .coef, .dec, .err);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_z(int c, int i);
    int a;
    a = 0;
    for (int j = 0; j < 8; j++)
      a += (xh[c - j] * ch[c - i + 1][j]) >>> 2;
    a = a >>> 2;
    if (a > 31) a = 31;
    if (a < -32) a = -32;
    return a;
  endfunction

  int bits [int];

  initial begin
    int cur;
    step_up = 4'd2; step_dn = 4'd2;
    // switch settings: main tap 16 (1.0), neighbours forced negative
    coef_sw[0] = 6'sd2;  coef_sw[1] = 6'sd5;  coef_sw[2] = 6'sd30; coef_sw[3] = 6'sd16;
    coef_sw[4] = 6'sd29; coef_sw[5] = 6'sd3;  coef_sw[6] = -6'sd2; coef_sw[7] = 6'sd1;
    x_in = '0;
    for (int c = -20; c < 0; c++) begin
      xh[c] = 0; phh[c] = '0;
      for (int j = 0; j < 8; j++) ch[c][j] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cur = 0;
    for (int n = 0; n < 12000; n++) begin
      int xv;
      if (n == 4000) begin
        train = 1;
        // realistic switch start for training: small neighbours
        coef_sw[2] = 6'sd31; coef_sw[4] = 6'sd31;
        coef_sw[0] = 6'sd0; coef_sw[1] = 6'sd0; coef_sw[5] = 6'sd0; coef_sw[6] = 6'sd0; coef_sw[7] = 6'sd0;
      end
      if (n == 3990) begin
        coef_sw[2] = 6'sd31; coef_sw[4] = 6'sd31;
        coef_sw[0] = 6'sd0; coef_sw[1] = 6'sd0; coef_sw[5] = 6'sd0; coef_sw[6] = 6'sd0; coef_sw[7] = 6'sd0;
      end
      bits[n] = int'($urandom_range(1));
      if (n < 4000) xv = int'($urandom_range(63)) - 32;
      else begin
        int d0, d1;
        d0 = bits[n] - ((n >= 2) ? bits[n-2] : 0);
        d1 = ((n >= 1) ? bits[n-1] : 0) - ((n >= 3) ? bits[n-3] : 0);
        xv = 18 * d0 + 8 * d1;
        if (xv > 31) xv = 31;
        if (xv < -32) xv = -32;
      end
      x_in = sample_t'(xv);
      xh[cur] = xv;
      phh[cur] = ph;
      for (int j = 0; j < 8; j++) ch[cur][j] = int'(coef[j]);
      if (cur > 0) for (int j = 0; j < 8; j++) if (ch[cur][j] != ch[cur-1][j]) n_coef_change++;
      // outputs of the channel whose enable ended at the last edge
      if (cur >= 12) begin
        for (int i = 0; i < 4; i++) begin
          if (phh[cur-1][i]) begin
            int e;
            e = ref_z(cur - 5, i);
            checks++;
            if (int'(z[i]) != e) begin
              failures++;
              if (failures < 10) $display("FAIL cycle %0d ch %0d z=%0d exp=%0d", cur, i + 1, z[i], e);
            end
          end
        end
      end
      if (ph[1] && train) begin
        if (dec > 0) n_dec_pos++; else if (dec < 0) n_dec_neg++; else n_dec_zero++;
        if (n >= 4004 && n < 4404) err_early += (err < 0) ? -err : err;
        if (n >= 11600)            err_late  += (err < 0) ? -err : err;
      end
      @(posedge clk); #1;
      cur++;
    end
    $display("coef changes=%0d dec +/0/- = %0d/%0d/%0d  |err| early=%0d late=%0d",
             n_coef_change, n_dec_pos, n_dec_zero, n_dec_neg, err_early, err_late);
    $display("final coefs: %0d %0d %0d %0d %0d %0d %0d %0d", coef[0], coef[1], coef[2],
             coef[3], coef[4], coef[5], coef[6], coef[7]);
    checks += 3;
    if (n_coef_change == 0) failures++;
    if (n_dec_pos == 0 || n_dec_neg == 0 || n_dec_zero == 0) failures++;
    if (!(err_late < err_early)) begin failures++; $display("FAIL error did not fall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
