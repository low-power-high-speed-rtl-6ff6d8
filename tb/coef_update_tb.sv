// coef_update_tb: drives the coefficient update with random errors,
// sample signs, step sizes and switch settings, and compares the
// coefficient outputs every enabled cycle with a reference model of the
// sign-sign rule: load from the switches (main tap positive, neighbours
// negative) when not training; otherwise move each 10-bit register by
// +step_up or -step_dn according to sign(error)*sign(sample captured one
// update earlier), with saturation. Also counts that loads, increments,
// decrements, zero-error holds and saturation all occurred.
module coef_update_tb;
  import prml_pkg::*;
  localparam int FRAC = 4, MAIN = 3, RW = 10;
  logic clk = 0, rst_n = 0, en = 0, train = 0;
  logic [3:0] step_up, step_dn;
  coef_t   coef_sw [NTAPS];
  sample_t x_taps  [NTAPS];
  logic signed [SAMPLE_W:0] err;
  coef_t   coef    [NTAPS];
  int w_ref [NTAPS];
  int xneg_ref [NTAPS];
  int checks = 0, failures = 0;
  int n_load = 0, n_inc = 0, n_dec = 0, n_hold = 0, n_sat = 0;

  coef_update dut (.clk, .rst_n, .en, .train, .step_up, .step_dn,
                   .coef_sw, .x_taps, .err, .coef);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 8; j++) begin w_ref[j] = 0; xneg_ref[j] = 0; end
    step_up = 0; step_dn = 0; err = 0;
    for (int j = 0; j < 8; j++) begin coef_sw[j] = '0; x_taps[j] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      int nxt [NTAPS];
      // three idle cycles, then one enabled cycle
      repeat (3) @(posedge clk);
      #1;
      train   = (n % 200) >= 3;
      step_up = 4'($urandom_range(15));
      step_dn = 4'($urandom_range(15));
      // long runs of one error sign drive some taps into saturation
      if ((n / 100) % 2 == 1) err = (SAMPLE_W+1)'(int'($urandom_range(20)) - 2);
      else                    err = (SAMPLE_W+1)'(int'($urandom_range(80)) - 40);
      for (int j = 0; j < 8; j++) begin
        coef_sw[j] = coef_t'($urandom_range(63));
        x_taps[j]  = ((n / 100) % 2 == 1) ? sample_t'(5) : sample_t'($urandom_range(63));
      end
      en = 1;
      #1;
      for (int j = 0; j < 8; j++) begin
        if (!train) begin
          int ld;
          ld = int'(coef_sw[j]);
          if (j == MAIN) ld = ld & 31;
          else if (j == MAIN - 1 || j == MAIN + 1) ld = (ld & 31) - 32;
          nxt[j] = ld * 16;
          if (j == 0) n_load++;
        end else begin
          int t;
          t = w_ref[j];
          if (err == 0) n_hold++;
          else if ((err < 0) == (xneg_ref[j] != 0)) begin t += int'(step_up); n_inc++; end
          else begin t -= int'(step_dn); n_dec++; end
          if (t > 511) begin t = 511; n_sat++; end
          if (t < -512) begin t = -512; n_sat++; end
          nxt[j] = t;
        end
        checks++;
        if (int'(coef[j]) != (nxt[j] >>> FRAC)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d tap %0d coef=%0d expected %0d", n, j, coef[j], nxt[j] >>> FRAC);
        end
      end
      @(posedge clk);
      #1;
      en = 0;
      for (int j = 0; j < 8; j++) begin
        w_ref[j] = nxt[j];
        xneg_ref[j] = x_taps[j] < 0 ? 1 : 0;
      end
    end
    $display("loads=%0d inc=%0d dec=%0d hold=%0d sat=%0d", n_load, n_inc, n_dec, n_hold, n_sat);
    checks += 5;
    if (n_load == 0 || n_inc == 0 || n_dec == 0 || n_hold == 0 || n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
