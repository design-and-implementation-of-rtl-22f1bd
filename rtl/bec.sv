// bec: binary to excess-1 converter of WIDTH bits (default 5).
//
// Outputs its input plus one, modulo 2^WIDTH. In the adder it takes the
// 5-bit result {carry, sum[3:0]} of a group's carry-in-0 ripple adder and
// forms the result that group would give with carry-in 1, replacing a
// second ripple adder with a smaller network.
//
// Bit i toggles when all lower input bits are one:
//   x[0] = ~b[0],  x[i] = b[i] ^ (b[0] & b[1] & ... & b[i-1]).
// The design gives the BEC's function and its 5-bit size; this gate form,
// the usual increment network, is this implementation's choice.
// Purely combinational.
//
// Ports: b (WIDTH-bit input), x (WIDTH-bit output, b + 1).
module bec #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);
  logic [WIDTH-1:0] all_ones;  // all_ones[i]: b[i-1:0] are all one

  assign all_ones[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_chain
    assign all_ones[i] = all_ones[i-1] & b[i-1];
  end

  assign x = b ^ all_ones;
endmodule
