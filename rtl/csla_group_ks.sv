// csla_group_ks: one select group of the Kogge-Stone carry select adder.
//
// A WIDTH-bit Kogge-Stone adder computes the group's {carry, sum} for
// carry-in 0, and a WIDTH-bit ripple carry adder computes it for carry-in 1.
// A (WIDTH+1)-bit two-way mux, selected by the carry out of the group below,
// passes one of the two. Only the carry-in-0 adder is a prefix adder; the
// carry-in-1 adder stays a ripple adder, as in the reference architecture.
//
// Interface: a, b (WIDTH bits), c_sel in; sum (WIDTH bits), cout out. Purely
// combinational.
module csla_group_ks #(
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

  ks_adder #(.WIDTH(WIDTH)) u_ks (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (res0[WIDTH-1:0]),
    .cout(res0[WIDTH])
  );

  rca #(.WIDTH(WIDTH)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b1),
    .sum (res1[WIDTH-1:0]),
    .cout(res1[WIDTH])
  );

  csla_mux #(.WIDTH(WIDTH + 1)) u_mux (
    .in0(res0),
    .in1(res1),
    .sel(c_sel),
    .out({cout, sum})
  );

endmodule
