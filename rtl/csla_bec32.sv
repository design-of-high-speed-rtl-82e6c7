// csla_bec32: 32-bit carry select adder with Binary to Excess-1 Converters.
//
// The operands are cut into the eight groups of csla_pkg (widths 2, 2, 3, 4,
// 5, 6, 7, 3 from bit 0 up). The lowest group, bits [1:0], is a ripple carry
// adder fed by the carry in. Every higher group computes its result for
// carry-in 0 with a ripple carry adder and derives the result for carry-in 1
// from it with a BEC-1 converter (csla_group_bec), both in parallel with the
// groups below. The carry out of each group then only has to pass one mux per
// group to reach the top, instead of rippling through every bit. The carry
// out of the top group is the adder's carry out.
//
// Compared with a carry select adder that has two ripple adders per group,
// the second adder is replaced by the cheaper converter; this is the proposed
// main design. The group partition and the adder/converter/mux structure
// follow the reference architecture. The lowest group taking the external
// carry in, and the converter being one bit wider than its group so that it
// also forms the carry, are this design's reading of it.
//
// Interface: a, b (32 bits), cin in; sum (32 bits), cout out, with
// {cout, sum} = a + b + cin. Purely combinational, no clock or reset.
module csla_bec32
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
      rca #(.WIDTH(W)) u_rca (
        .a   (a[LSB +: W]),
        .b   (b[LSB +: W]),
        .cin (carry[g]),
        .sum (sum[LSB +: W]),
        .cout(carry[g+1])
      );
    end else begin : gen_sel
      csla_group_bec #(.WIDTH(W)) u_group (
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
