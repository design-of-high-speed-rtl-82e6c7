// csla_mux: result selector of a carry select group.
//
// WIDTH two-input multiplexers sharing one select line. A group of N sum bits
// passes N+1 bits ({carry, sum}) through it, so a "6:3" selector serves a
// 2-bit group, "8:4" a 3-bit group, and so on up to "16:8" for 7 bits. The
// select is the carry coming out of the group below: 0 picks in0 (the result
// computed for carry-in 0), 1 picks in1 (the result for carry-in 1).
//
// Interface: in0, in1, sel in; out out. Purely combinational. The default
// WIDTH of 3 is the selector of a 2-bit group.
module csla_mux #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic             sel,
  output logic [WIDTH-1:0] out
);

  always_comb out = sel ? in1 : in0;

endmodule
