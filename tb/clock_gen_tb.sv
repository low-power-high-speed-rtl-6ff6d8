// clock_gen_tb: after reset the four phase enables must be one-hot, start
// with ph[0], and advance by one position per master clock, so each
// enable repeats every four cycles (the quarter-rate channel clocks, one
// symbol period apart).
module clock_gen_tb;
  logic clk = 0, rst_n = 0;
  logic [3:0] ph;
  int checks = 0, failures = 0;

  clock_gen dut (.clk, .rst_n, .ph);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    #1;
    for (int c = 0; c < 100; c++) begin
      checks++;
      if (ph != 4'(1 << (c % 4))) begin
        failures++;
        $display("FAIL cycle %0d ph=%b", c, ph);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
