// csel_accumulator_tb: the adder tree must return the exact 13-bit sum of
// eight 10-bit signed products, including all-maximum and all-minimum
// inputs where the tree's widening matters.
module csel_accumulator_tb;
  import prml_pkg::*;
  prod_t prod [NTAPS];
  acc_t  sum;
  int checks = 0, failures = 0;

  csel_accumulator dut (.prod, .sum);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int expv;
      expv = 0;
      for (int j = 0; j < 8; j++) begin
        int v;
        v = int'($urandom_range(1023)) - 512;
        if (n == 0) v = -512;
        if (n == 1) v = 511;
        if (n == 2) v = (j % 2 == 0) ? 511 : -512;
        prod[j] = prod_t'(v);
        expv += v;
      end
      #1;
      checks++;
      if (int'(sum) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got %0d expected %0d", n, sum, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
