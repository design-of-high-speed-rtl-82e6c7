// rca: ripple carry adder.
//
// WIDTH full adders chained through their carries: bit i adds a[i], b[i] and
// the carry out of bit i-1 (cin for bit 0); sum = a ^ b ^ c and carry out =
// a.b | c.(a ^ b). The carry ripples through all WIDTH stages, so the delay
// grows linearly with the width. The carry select adders use it for the
// carry-in-0 (and, in the Kogge-Stone variant, carry-in-1) results of each
// group. The full adder's gate form is the textbook one; the reference only
// names the block.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // c[i] is the carry into bit i; c[WIDTH] is the carry out.
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : gen_full_adder
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[WIDTH];

endmodule
