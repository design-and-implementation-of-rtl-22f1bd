// mux10to5: the 10:5 multiplexer of a carry-select group.
//
// Chooses between two WIDTH-bit (default 5) group results, each
// {carry, sum[3:0]}: d0 is the result for a carry-in of 0 (from the ripple
// adder), d1 the result for a carry-in of 1 (from the excess-1 converter).
// sel is the actual carry into the group. Ten data inputs, five outputs,
// hence the name. Purely combinational.
//
// The design names the 10:5 multiplexer and its carry select; the assignment
// sel=0 -> d0, sel=1 -> d1 follows from its function.
//
// Ports: d0, d1 (WIDTH bits), sel; y (WIDTH bits).
module mux10to5 #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    y = sel ? d1 : d0;
  end
endmodule
