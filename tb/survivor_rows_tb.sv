// survivor_rows_tb: random merge decisions drive the two survivor rows;
// a reference keeps both candidate bit sequences as integer queues, copies
// the merge state's sequence into both on a merge, appends 0 and 1, and
// trims them to ten bits. dout must equal the oldest bit of the state-1
// sequence after every step, and must hold when the enable is low.
module survivor_rows_tb;
  logic clk = 0, rst_n = 0, en = 0, merge = 0, merge_state = 0;
  logic dout;
  int r0 [10];
  int r1 [10];
  int checks = 0, failures = 0, n_m0 = 0, n_m1 = 0, n_nm = 0;

  survivor_rows dut (.clk, .rst_n, .en, .merge, .merge_state, .dout);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++) begin r0[i] = 0; r1[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int h0 [10];
      int h1 [10];
      en = ($urandom_range(3) != 0);
      merge = ($urandom_range(2) != 0);
      merge_state = 1'($urandom_range(1));
      for (int i = 0; i < 10; i++) begin
        h0[i] = merge ? (merge_state ? r1[i] : r0[i]) : r0[i];
        h1[i] = merge ? (merge_state ? r1[i] : r0[i]) : r1[i];
      end
      @(posedge clk); #1;
      if (en) begin
        if (!merge) n_nm++; else if (merge_state) n_m1++; else n_m0++;
        for (int i = 9; i > 0; i--) begin r0[i] = h0[i-1]; r1[i] = h1[i-1]; end
        r0[0] = 0; r1[0] = 1;
      end
      checks++;
      if (int'(dout) != r1[9]) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d dout=%0d exp=%0d", n, dout, r1[9]);
      end
    end
    checks++;
    if (n_m0 == 0 || n_m1 == 0 || n_nm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
