// csla_group_bec: one select group of the BEC-1 carry select adder.
//
// A WIDTH-bit ripple carry adder adds the group's operand bits with carry-in
// 0. Its (WIDTH+1)-bit result {carry, sum} is the group's result for carry-in
// 0; a (WIDTH+1)-bit Binary to Excess-1 Converter adds one to it, which gives
// the result for carry-in 1 (the converter never wraps, since a + b is at most
// 2^(WIDTH+1) - 2). A (WIDTH+1)-bit two-way mux, selected by the carry out of
// the group below, passes one of the two. The converter replaces the second
// ripple adder of a classic carry select group with a chain of ANDs and XORs.
//
// Interface: a, b (WIDTH bits), c_sel in; sum (WIDTH bits), cout out. Purely
// combinational. Converting the carry together with the sum, so that the
// converter is one bit wider than the group, is this design's reading of how
// the carry for carry-in 1 is formed.
module csla_group_bec #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c_sel,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] res0;  // {carry, sum} for carry-in 0
  logic [WIDTH:0] res1;  // {carry, sum} for carry-in 1

  rca #(.WIDTH(WIDTH)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (res0[WIDTH-1:0]),
    .cout(res0[WIDTH])
  );

  bec #(.WIDTH(WIDTH + 1)) u_bec (
    .b(res0),
    .x(res1)
  );

  csla_mux #(.WIDTH(WIDTH + 1)) u_mux (
    .in0(res0),
    .in1(res1),
    .sel(c_sel),
    .out({cout, sum})
  );

endmodule
