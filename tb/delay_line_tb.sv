// delay_line_tb: feeds random samples and checks that tap j always equals
// the sample presented j clocks earlier (tap 0 is the current input).
module delay_line_tb;
  import prml_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t x_in;
  sample_t taps [NTAPS];
  int hist [$];
  int checks = 0, failures = 0;

  delay_line dut (.clk, .rst_n, .x_in, .taps);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      x_in <= sample_t'($urandom_range(63));
      #1;
      hist.push_front(int'(x_in));
      if (n >= 7) begin
        for (int j = 0; j < 8; j++) begin
          checks++;
          if (int'(taps[j]) != hist[j]) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d tap %0d = %0d expected %0d", n, j, taps[j], hist[j]);
          end
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
