// dm_decision_tb: exhaustive over beta, z_p and z (2 x 64 x 64). The
// reference works on the full 7-bit difference D = z_p - z with one level
// = 24: for beta = 1 a merge at state 1 when D >= 0 and at state 0 when
// D < -24; for beta = 0 a merge at state 1 when D >= 24 and at state 0
// when D < 0; otherwise no merge. change_input, change_beta, merge_state
// and the halved difference d are all compared, and the four boundary rows
// of the change_input truth table are checked by name.
module dm_decision_tb;
  import prml_pkg::*;
  logic beta, change_input, change_beta, merge_state;
  sample_t zp, z, d;
  int checks = 0, failures = 0;

  dm_decision dut (.beta, .zp, .z, .d, .change_input, .change_beta, .merge_state);

  task automatic expect_eq(int got, int expv, string what);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s beta=%0d zp=%0d z=%0d: got %0d exp %0d", what, beta, zp, z, got, expv);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++)
      for (int p = -32; p < 32; p++)
        for (int q = -32; q < 32; q++) begin
          int dd, m1, m0;
          beta = b[0]; zp = sample_t'(p); z = sample_t'(q);
          #1;
          dd = p - q;
          if (b == 1) begin m1 = dd >= 0;  m0 = dd < -24; end
          else        begin m1 = dd >= 24; m0 = dd < 0;   end
          expect_eq(int'(d), dd >>> 1, "d");
          expect_eq(int'(change_input), m1 | m0, "change_input");
          expect_eq(int'(change_beta), (b == 1) ? m0 : m1, "change_beta");
          if (m1 | m0) expect_eq(int'(merge_state), m1, "merge_state");
        end
    // truth-table boundary rows, written as halved differences d
    beta = 0; zp = 6'sd22; z = 6'sd0;  #1; expect_eq(int'(change_input), 0, "row 001011");
    beta = 0; zp = 6'sd24; z = 6'sd0;  #1; expect_eq(int'(change_input), 1, "row 001100");
    beta = 1; zp = -6'sd26; z = 6'sd0; #1; expect_eq(int'(change_input), 1, "row 110011");
    beta = 1; zp = -6'sd24; z = 6'sd0; #1; expect_eq(int'(change_input), 0, "row 110100");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
