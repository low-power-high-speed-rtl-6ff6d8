// csm_mult_tb: exhaustive check of the 6x6 Baugh-Wooley carry-save
// multiplier. For every pair of 6-bit signed operands the 10-bit output
// must equal the integer product shifted right by two (arithmetic).
module csm_mult_tb;
  logic signed [5:0] a, b;
  logic signed [9:0] p;
  int checks = 0, failures = 0;

  csm_mult dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -32; x < 32; x++) begin
      for (int y = -32; y < 32; y++) begin
        int expv;
        a = 6'(x);
        b = 6'(y);
        #1;
        expv = (x * y) >>> 2;
        checks++;
        if (int'(p) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d expected %0d", x, y, p, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
