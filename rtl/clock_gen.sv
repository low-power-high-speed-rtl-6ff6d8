// clock_gen: generates the four quarter-rate channel clocks.
//
// The source drives its four time-interleaved channels from four clocks at
// one quarter of the symbol rate, each one symbol period T after the
// previous one, all positive-edge triggered. This design keeps a single
// symbol-rate master clock and turns the four clocks into four one-hot
// clock enables, ph[0]..ph[3]: ph[i] is high during the master cycle that
// ends in channel i+1's rising edge. The enables come from a free-running
// two-bit counter, so ph[0] is high in the first cycle after reset and
// each enable repeats every four cycles. Using enables instead of derived
// clocks is this design's choice; it gives the same sampling instants.
//
// Ports: clk, rst_n (active-low, synchronous) in; ph[4] out (registered).
module clock_gen #(
  parameter int unsigned NPH = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic [NPH-1:0] ph
);
  logic [$clog2(NPH)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else if (32'(cnt) == NPH - 1) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end

  always_comb begin
    ph = '0;
    ph[cnt] = 1'b1;
  end
endmodule
