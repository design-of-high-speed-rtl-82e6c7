// ks_adder: Kogge-Stone parallel prefix adder with carry in.
//
// Stage 0 forms per-bit propagate P = A ^ B and generate G = A . B; the carry
// in enters here, folded into bit 0 as G0 = A0.B0 | (A0 ^ B0).Cin. Each prefix
// stage k then combines every bit i with bit i - 2^(k-1):
//   P = P_i . P_(i-d),   G = G_i | (G_(i-d) . P_i)
// while bits with no partner below pass their pair on. After log2(WIDTH)
// stages G_i is the carry out of bit i, every bit having seen all bits below
// it through a tree in which no node drives more than two others. The sum
// stage forms S_i = P_i ^ C_(i-1), with C_(-1) = Cin. The default width 4 is
// the reference structure, with two prefix stages.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational. Where the
// carry in enters bit 0 is this design's own reading of the structure.
module ks_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 0;

  // Propagate/generate after each stage; index 0 is stage 0.
  logic [WIDTH-1:0] p [LEVELS+1];
  logic [WIDTH-1:0] g [LEVELS+1];
  // Carry into each bit.
  logic [WIDTH-1:0] c;

  always_comb begin
    p[0]    = a ^ b;
    g[0]    = a & b;
    g[0][0] = (a[0] & b[0]) | ((a[0] ^ b[0]) & cin);
    for (int k = 1; k <= LEVELS; k++) begin
      for (int i = 0; i < WIDTH; i++) begin
        if (i >= (1 << (k - 1))) begin
          p[k][i] = p[k-1][i] & p[k-1][i - (1 << (k - 1))];
          g[k][i] = g[k-1][i] | (g[k-1][i - (1 << (k - 1))] & p[k-1][i]);
        end else begin
          p[k][i] = p[k-1][i];
          g[k][i] = g[k-1][i];
        end
      end
    end
  end

  always_comb begin
    c[0] = cin;
    for (int i = 1; i < WIDTH; i++) c[i] = g[LEVELS][i-1];
  end

  assign sum  = p[0] ^ c;
  assign cout = g[LEVELS][WIDTH-1];

endmodule
