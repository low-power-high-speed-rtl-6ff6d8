// full_adder: one-bit full adder, the cell the carry-save multiplier array
// is tiled from.
//
// The source cell is a mirror-style CMOS adder: it first forms the inverted
// carry from A, B and CIN, then the sum through a propagate term
// P = A xor B and a second transmission-gate XOR of P with CIN. This model
// keeps that structure (propagate, then sum and carry), which is plain
// combinational logic with no timing of its own.
//
// Ports: a, b, cin in; s (sum) and cout out.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;
  always_comb begin
    p    = a ^ b;
    s    = p ^ cin;
    cout = (a & b) | (p & cin);
  end
endmodule
