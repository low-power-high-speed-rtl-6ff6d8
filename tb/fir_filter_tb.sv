// fir_filter_tb: one channel, enabled every fourth clock. Random samples
// and coefficients are presented at each enabled edge; after the next
// enabled edge acc must equal the sum over the eight taps of
// (x*c) >>> 2 and z must equal acc >>> 2 saturated to 6 bits. Checks the
// one-quarter-rate-cycle latency and that the latch outputs x_q/c_q carry
// the values taken at the last enabled edge.
module fir_filter_tb;
  import prml_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  sample_t x_in [NTAPS];
  coef_t   c_in [NTAPS];
  sample_t x_q  [NTAPS];
  coef_t   c_q  [NTAPS];
  acc_t    acc;
  sample_t z;
  int checks = 0, failures = 0, n_sat = 0;
  int exp_acc;

  fir_filter dut (.clk, .rst_n, .en, .x_in, .c_in, .x_q, .c_q, .acc, .z);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 8; j++) begin x_in[j] = '0; c_in[j] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    exp_acc = 0;
    for (int n = 0; n < 1000; n++) begin
      int nacc;
      nacc = 0;
      for (int j = 0; j < 8; j++) begin
        int xv, cv;
        xv = int'($urandom_range(63)) - 32;
        cv = (n % 3 == 0) ? int'($urandom_range(8)) - 4 : int'($urandom_range(63)) - 32;
        if (n == 5) begin xv = -32; cv = -32; end
        x_in[j] = sample_t'(xv);
        c_in[j] = coef_t'(cv);
        nacc += (xv * cv) >>> 2;
      end
      repeat (3) @(posedge clk);
      #1;
      en = 1;
      @(posedge clk); #1;
      en = 0;
      // the products of the previous set are now summed
      if (n > 0) begin
        int ez, a;
        a = exp_acc;
        ez = a >>> 2;
        if (ez > 31) begin ez = 31; n_sat++; end
        if (ez < -32) begin ez = -32; n_sat++; end
        checks += 2;
        if (int'(acc) != a) begin failures++; if (failures < 10) $display("FAIL n=%0d acc=%0d exp=%0d", n, acc, a); end
        if (int'(z) != ez) begin failures++; if (failures < 10) $display("FAIL n=%0d z=%0d exp=%0d", n, z, ez); end
      end
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (x_q[j] != x_in[j] || c_q[j] != c_in[j]) failures++;
      end
      // hold: acc must not change until the next enabled edge
      @(posedge clk); #1;
      checks++;
      if (n > 0 && int'(acc) != exp_acc) failures++;
      exp_acc = nacc;
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
