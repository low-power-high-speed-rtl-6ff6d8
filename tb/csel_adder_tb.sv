// csel_adder_tb: checks the carry-select adder with its sign-corrected
// extra output bit in all three stagings used by the accumulator
// (10 bits 2-3-5, 11 bits 2-3-6, 12 bits 2-4-6). The 10-bit adder is
// checked exhaustively, the wider ones with corner and random operands;
// the reference is the exact signed sum.
module csel_adder_tb;
  logic signed [9:0]  a10, b10;
  logic signed [10:0] s10;
  logic signed [10:0] a11, b11;
  logic signed [11:0] s11;
  logic signed [11:0] a12, b12;
  logic signed [12:0] s12;
  int checks = 0, failures = 0;

  csel_adder dut10 (.a(a10), .b(b10), .s(s10));
  csel_adder #(.W(11), .S0(2), .S1(3), .S2(6)) dut11 (.a(a11), .b(b11), .s(s11));
  csel_adder #(.W(12), .S0(2), .S1(4), .S2(6)) dut12 (.a(a12), .b(b12), .s(s12));

  task automatic check(int got, int expv, string what);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -512; x < 512; x++) begin
      for (int y = -512; y < 512; y += 1) begin
        a10 = 10'(x);
        b10 = 10'(y);
        #1;
        check(int'(s10), x + y, "w10");
      end
    end
    for (int n = 0; n < 20000; n++) begin
      int x, y, u, v;
      x = int'($urandom_range(2047)) - 1024;
      y = int'($urandom_range(2047)) - 1024;
      u = int'($urandom_range(4095)) - 2048;
      v = int'($urandom_range(4095)) - 2048;
      if (n == 0) begin x = -1024; y = -1024; u = -2048; v = -2048; end
      if (n == 1) begin x = 1023;  y = 1023;  u = 2047;  v = 2047;  end
      a11 = 11'(x); b11 = 11'(y);
      a12 = 12'(u); b12 = 12'(v);
      #1;
      check(int'(s11), x + y, "w11");
      check(int'(s12), u + v, "w12");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
