// bec: Binary to Excess-1 Converter (BEC-1).
//
// Adds one to its input, modulo 2^WIDTH, without a full adder: bit 0 is
// inverted, and every higher bit i is XORed with the AND of all bits below it
// (X0 = ~B0, X1 = B1 ^ B0, X2 = B2 ^ (B0 & B1), ...). The ANDs form a chain in
// which each gate takes the previous gate's output and one more input bit, as
// in the reference 4-bit structure; the default width of 4 is that structure.
// In a carry select adder it replaces the ripple adder that assumes carry-in
// 1: adding one to the carry-in-0 result gives the carry-in-1 result.
//
// Interface: b in, x = b + 1 out. Purely combinational, no clock or reset.
// Wider instances extend the 4-bit equations in the same pattern; that
// generalisation is this design's own.
module bec #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);

  // all_low[i] = AND of b[i-1:0]; all_low[0] = 1 (empty AND).
  logic [WIDTH-1:0] all_low;

  assign all_low[0] = 1'b1;

  for (genvar i = 1; i < WIDTH; i++) begin : gen_and_chain
    assign all_low[i] = all_low[i-1] & b[i-1];
  end

  assign x = b ^ all_low;

endmodule
