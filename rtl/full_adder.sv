// full_adder: one-bit full adder, the cell of the ripple carry adder.
//
// Adds two operand bits and a carry-in and gives a sum bit and a carry-out.
// Purely combinational, no clock. The full adder as the building cell of the
// ripple chain is the design's; the gate form used here (sum as a three-way
// XOR, carry as generate OR propagate-and-carry-in) is the textbook one.
//
// Ports: a, b, cin (inputs); s, cout (outputs).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;  // propagate

  always_comb begin
    p    = a ^ b;
    s    = p ^ cin;
    cout = (a & b) | (p & cin);
  end
endmodule
