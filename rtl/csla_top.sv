// csla_top: the two proposed 32-bit carry select adders side by side.
//
// Holds one csla_bec32 (groups with a ripple adder and a Binary to Excess-1
// Converter, the main design) and one csla_ks32 (groups with a Kogge-Stone
// adder and a ripple adder), each with its own operands, carry in, sum and
// carry out, so that both can be used or compared in one netlist. The two
// adders share nothing; both compute {cout, sum} = a + b + cin.
//
// Interface: bec_* ports belong to the BEC-1 adder, ks_* ports to the
// Kogge-Stone adder. Purely combinational, no clock or reset. Placing the two
// variants in one top level is this design's own arrangement.
module csla_top
  import csla_pkg::*;
(
  input  logic [CSLA_WIDTH-1:0] bec_a,
  input  logic [CSLA_WIDTH-1:0] bec_b,
  input  logic                  bec_cin,
  output logic [CSLA_WIDTH-1:0] bec_sum,
  output logic                  bec_cout,
  input  logic [CSLA_WIDTH-1:0] ks_a,
  input  logic [CSLA_WIDTH-1:0] ks_b,
  input  logic                  ks_cin,
  output logic [CSLA_WIDTH-1:0] ks_sum,
  output logic                  ks_cout
);

  csla_bec32 u_bec (
    .a   (bec_a),
    .b   (bec_b),
    .cin (bec_cin),
    .sum (bec_sum),
    .cout(bec_cout)
  );

  csla_ks32 u_ks (
    .a   (ks_a),
    .b   (ks_b),
    .cin (ks_cin),
    .sum (ks_sum),
    .cout(ks_cout)
  );

endmodule
