// dm_viterbi_tb: the decoder is stepped every other clock, as in the
// full design.
//  Part 1: noiseless 1-D samples z = 24*(a[m] - a[m-1]) of random bits
//          whose runs of equal bits are at most seven long (the run-length
//          limit a modulation code gives; see the decoder's notes on ties);
//          the bit a[m] must leave dout exactly 10 steps after the step
//          that latched z[m] (the decoder's latency).
//  Part 2: noisy samples (uniform noise up to +/-14, saturated to 6 bits);
//          after every step dout must equal a reference two-state Viterbi
//          decoder that keeps both path metrics explicitly (ties resolved
//          toward state 1) and a ten-bit register exchange.
// Counts merges at state 0, at state 1 and no-merge steps; each must occur.
module dm_viterbi_tb;
  import prml_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  sample_t z;
  logic dout, beta, merge, merge_state;
  int checks = 0, failures = 0;
  int n_m0 = 0, n_m1 = 0, n_nm = 0, n_err = 0;
  int l1, l0, zprev;
  int p0 [10];
  int p1 [10];
  int bits [$];

  dm_viterbi dut (.clk, .rst_n, .en, .z, .dout, .beta, .merge, .merge_state);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ref_step(int zz);
    int f1, f0, g1, g0, nl1, nl0;
    bit s1, s0;
    int n0 [10];
    int n1 [10];
    f1 = l1; f0 = l0 + zz - 12;          // into state 1
    g1 = l1 - zz - 12; g0 = l0;          // into state 0
    s1 = (f1 >= f0);                     // state 1 survivor comes from 1
    s0 = (g1 >= g0);                     // state 0 survivor comes from 1
    nl1 = s1 ? f1 : f0;
    nl0 = s0 ? g1 : g0;
    for (int i = 9; i > 0; i--) begin
      n1[i] = s1 ? p1[i-1] : p0[i-1];
      n0[i] = s0 ? p1[i-1] : p0[i-1];
    end
    n1[0] = 1; n0[0] = 0;
    p1 = n1; p0 = n0;
    // keep the metrics bounded
    l1 = nl1 - nl0; l0 = 0;
  endtask

  task automatic run(int nsteps, int noise, bit compare_ref);
    int a_prev, run_len;
    a_prev = 0;
    run_len = 0;
    bits.delete();
    rst_n = 0; en = 0; z = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    l1 = -12; l0 = 0; zprev = 0;
    for (int i = 0; i < 10; i++) begin p0[i] = 0; p1[i] = 0; end
    for (int m = 0; m < nsteps; m++) begin
      int a, zz;
      a = ($urandom_range(3) == 0) ? a_prev : int'($urandom_range(1));
      // run-length limit, as a modulation code provides
      run_len = (a == a_prev) ? run_len + 1 : 0;
      if (run_len > 6) begin a = 1 - a_prev; run_len = 0; end
      zz = 24 * (a - a_prev) + ((noise > 0) ? int'($urandom_range(2 * noise)) - noise : 0);
      if (zz > 31) zz = 31;
      if (zz < -32) zz = -32;
      a_prev = a;
      bits.push_back(a);
      z = sample_t'(zz);
      en = 1;
      @(posedge clk); #1;
      en = 0;
      if (merge) begin if (merge_state) n_m1++; else n_m0++; end else n_nm++;
      ref_step(zprev);
      zprev = zz;
      if (compare_ref) begin
        checks++;
        if (int'(dout) != p1[9]) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d dout=%0d ref=%0d", m, dout, p1[9]);
        end
        if (m >= 10 && int'(dout) != bits[m-10]) n_err++;
      end else if (m >= 10) begin
        checks++;
        if (int'(dout) != bits[m-10]) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d dout=%0d bit=%0d", m, dout, bits[m-10]);
        end
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    run(3000, 0, 0);
    run(3000, 14, 1);
    $display("merge0=%0d merge1=%0d nomerge=%0d noisy bit errors=%0d", n_m0, n_m1, n_nm, n_err);
    checks++;
    if (n_m0 == 0 || n_m1 == 0 || n_nm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
