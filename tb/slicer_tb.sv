// slicer_tb: exhaustive over the 64 equalizer output values: the decision
// must be the nearest of -24, 0, +24 (thresholds at +/-12) and the error
// the decision minus the input.
module slicer_tb;
  import prml_pkg::*;
  sample_t z, d;
  logic signed [SAMPLE_W:0] e;
  int checks = 0, failures = 0;

  slicer dut (.z, .d, .e);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32; v < 32; v++) begin
      int ed;
      z = sample_t'(v);
      #1;
      ed = (v >= 12) ? 24 : (v <= -12) ? -24 : 0;
      checks += 2;
      if (int'(d) != ed) begin failures++; $display("FAIL z=%0d d=%0d", v, d); end
      if (int'(e) != ed - v) begin failures++; $display("FAIL z=%0d e=%0d", v, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
