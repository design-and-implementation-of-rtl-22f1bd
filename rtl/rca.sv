// rca: ripple carry adder of WIDTH bits (default 4, one group of the adder).
//
// WIDTH full adders in a chain: the carry-out of stage i is the carry-in of
// stage i+1, the external carry-in enters stage 0 and the carry-out of the
// top stage is cout. Purely combinational; the delay grows with WIDTH
// because the carry ripples through every stage.
//
// The chained structure and the 4-bit default follow the design; making the
// width a parameter is this implementation's choice.
//
// Ports: a, b (WIDTH-bit operands), cin; sum (WIDTH bits), cout.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;  // c[i] is the carry into stage i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
