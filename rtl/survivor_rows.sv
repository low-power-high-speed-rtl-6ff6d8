// survivor_rows: the two survivor shift-register rows of the two-state
// Viterbi decoder (register exchange).
//
// Row 0 holds the best bit sequence ending in state 0, row 1 the best one
// ending in state 1; position 0 is the newest bit. On every enabled step
// both rows shift by one and take their own state's bit (0 or 1) as the
// newest bit. When the decision logic reports a merge, both surviving
// paths pass through the merge state, so both rows first take that state's
// row as their history (the exchange multiplexers between the rows). With
// no merge, each row keeps its own history. The decoded bit is the oldest
// bit of row 1; with a depth of ten the two rows have normally agreed long
// before a bit leaves. Depth, row roles and output row follow the source;
// the reset value (all zeros) is this design's choice.
//
// Ports: clk, rst_n, en, merge, merge_state in; dout out (registered).
module survivor_rows
  import prml_pkg::*;
#(
  parameter int unsigned DEPTH = SURV_DEPTH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic merge,
  input  logic merge_state,
  output logic dout
);
  logic [DEPTH-1:0] row0, row1;
  logic [DEPTH-1:0] h0, h1;   // histories after the exchange muxes

  always_comb begin
    if (merge) begin
      h0 = merge_state ? row1 : row0;
      h1 = h0;
    end else begin
      h0 = row0;
      h1 = row1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row0 <= '0;
      row1 <= '0;
    end else if (en) begin
      row0 <= {h0[DEPTH-2:0], 1'b0};
      row1 <= {h1[DEPTH-2:0], 1'b1};
    end
  end

  assign dout = row1[DEPTH-1];
endmodule
