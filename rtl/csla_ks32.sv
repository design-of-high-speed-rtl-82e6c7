// csla_ks32: 32-bit carry select adder with Kogge-Stone group adders.
//
// The operands are cut into the eight groups of csla_pkg (widths 2, 2, 3, 4,
// 5, 6, 7, 3 from bit 0 up). The lowest group, bits [1:0], is a Kogge-Stone
// adder fed by the carry in. Every higher group (csla_group_ks) computes its
// result for carry-in 0 with a Kogge-Stone parallel prefix adder and its
// result for carry-in 1 with a ripple carry adder, both in parallel with the
// groups below; the carry out of the group below selects one of them. The
// carry out of the top group is the adder's carry out.
//
// This is the second proposed variant: the prefix adder shortens the
// carry-in-0 path at the cost of area. The group partition and the choice of
// which adder is a prefix adder follow the reference architecture; the lowest
// group taking the external carry in is this design's reading of it.
//
// Interface: a, b (32 bits), cin in; sum (32 bits), cout out, with
// {cout, sum} = a + b + cin. Purely combinational, no clock or reset.
module csla_ks32
  import csla_pkg::*;
(
  input  logic [CSLA_WIDTH-1:0] a,
  input  logic [CSLA_WIDTH-1:0] b,
  input  logic                  cin,
  output logic [CSLA_WIDTH-1:0] sum,
  output logic                  cout
);

  // carry[g] is the carry into group g; carry[NUM_GROUPS] is the carry out.
  logic [NUM_GROUPS:0] carry;

  assign carry[0] = cin;

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : gen_group
    localparam int unsigned LSB = group_lsb(g);
    localparam int unsigned W   = GROUP_W[g];
    if (g == 0) begin : gen_base
      ks_adder #(.WIDTH(W)) u_ks (
        .a   (a[LSB +: W]),
        .b   (b[LSB +: W]),
        .cin (carry[g]),
        .sum (sum[LSB +: W]),
        .cout(carry[g+1])
      );
    end else begin : gen_sel
      csla_group_ks #(.WIDTH(W)) u_group (
        .a    (a[LSB +: W]),
        .b    (b[LSB +: W]),
        .c_sel(carry[g]),
        .sum  (sum[LSB +: W]),
        .cout (carry[g+1])
      );
    end
  end

  assign cout = carry[NUM_GROUPS];

endmodule
