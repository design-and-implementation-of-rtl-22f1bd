// mcsa: Modified Carry Skip Adder, WIDTH bits (default 16) in groups of
// GROUP_WIDTH bits (default 4).
//
// A carry-select adder that needs only one ripple adder per group. The
// operands are cut into uniform groups. Group 0 is a plain ripple carry adder
// fed by the external carry-in. Every higher group computes its result for a
// carry-in of 0 with one ripple adder (carry-in tied to 0), and a binary to
// excess-1 converter adds one to that 5-bit result {carry, sum} to get the
// result for a carry-in of 1. Once the carry out of the group below is known,
// a 10:5 multiplexer picks one of the two; its carry output selects the next
// group's multiplexer, and the last one gives the adder's carry out. The
// converter takes the place of the second ripple adder (carry-in 1) of a
// conventional carry-select group, which is where the area saving comes from.
//
// With the defaults this is the 16-bit structure of the design: R1 (bits
// 3:0), then R2/BEC1/MUX1, R3/BEC2/MUX2 and R4/BEC3/MUX3 for bits 7:4, 11:8
// and 15:12. In the generate loop below, group k (k = 1..3) holds what the
// design calls r(k+1)sum / r(k+1)c (ripple adder result), becsum / becc,
// becsum1 / becc1, becsum2 / becc2 (converter result) and the multiplexer
// carries m1c, m2c and carry; r1c is the carry out of group 0.
//
// Purely combinational: no clock, no reset. Worst-case path: the group-0
// ripple carry, then one multiplexer per higher group.
//
// The structure and the 16-bit / 4-bit-group sizes follow the design; the
// WIDTH parameter (for the 8-, 32- and 64-bit versions it also mentions)
// and the requirement that WIDTH be a multiple of GROUP_WIDTH are this
// implementation's choices.
//
// Ports: a, b (WIDTH-bit operands), cin; sum (WIDTH bits), carry (carry out).
module mcsa #(
  parameter int unsigned WIDTH       = 16,
  parameter int unsigned GROUP_WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             carry
);
  localparam int unsigned NGROUPS = WIDTH / GROUP_WIDTH;

  if (WIDTH % GROUP_WIDTH != 0 || NGROUPS < 1) begin : g_bad_width
    $error("mcsa: WIDTH must be a non-zero multiple of GROUP_WIDTH");
  end

  // gc[k] is the carry out of group k (gc[0] = r1c in the 16-bit design)
  logic [NGROUPS-1:0] gc;

  // Group 0: plain ripple adder with the external carry-in
  rca #(.WIDTH(GROUP_WIDTH)) u_r1 (
    .a   (a[GROUP_WIDTH-1:0]),
    .b   (b[GROUP_WIDTH-1:0]),
    .cin (cin),
    .sum (sum[GROUP_WIDTH-1:0]),
    .cout(gc[0])
  );

  // Groups 1..NGROUPS-1: ripple adder (carry-in 0), excess-1 converter, mux
  for (genvar k = 1; k < NGROUPS; k++) begin : g_group
    localparam int unsigned LO = k * GROUP_WIDTH;

    logic [GROUP_WIDTH-1:0] rsum;    // ripple adder sum, carry-in 0
    logic                   rc;      // ripple adder carry, carry-in 0
    logic [GROUP_WIDTH:0]   becres;  // {becc, becsum}: result for carry-in 1
    logic [GROUP_WIDTH:0]   sel_res; // {mux carry, group sum}

    rca #(.WIDTH(GROUP_WIDTH)) u_rca (
      .a   (a[LO +: GROUP_WIDTH]),
      .b   (b[LO +: GROUP_WIDTH]),
      .cin (1'b0),
      .sum (rsum),
      .cout(rc)
    );

    bec #(.WIDTH(GROUP_WIDTH + 1)) u_bec (
      .b({rc, rsum}),
      .x(becres)
    );

    mux10to5 #(.WIDTH(GROUP_WIDTH + 1)) u_mux (
      .d0 ({rc, rsum}),
      .d1 (becres),
      .sel(gc[k-1]),
      .y  (sel_res)
    );

    assign sum[LO +: GROUP_WIDTH] = sel_res[GROUP_WIDTH-1:0];
    assign gc[k]                  = sel_res[GROUP_WIDTH];
  end

  assign carry = gc[NGROUPS-1];
endmodule
