// tb_csla_ks32: self-checking test of the 32-bit Kogge-Stone carry select adder.
//
// Applies the reference simulation vector (A = 32'hF86ABEAB,
// B = 32'hCCCCCCCC, giving S = 32'hC5378B77 with Cout = 1 for carry in 0 and
// S = 32'hC5378B78 for carry in 1), corner cases (zero, all ones, a carry
// rippling from bit 0 to the carry out), for every group a carry that starts
// at bit 0 and stops inside that group, and random operands. Each result is
// compared with a + b + cin computed here with a 33-bit addition. For every
// select group it counts how often the carry-in-0 and the carry-in-1 result
// was the right one (taken from the reference sum) and fails if a group never
// used either. Combinational; a watchdog ends a hung run with a failure.
module tb_csla_ks32;
  import csla_pkg::*;

  localparam int unsigned N_RANDOM = 200000;

  int checks   = 0;
  int failures = 0;
  int sel0 [NUM_GROUPS];
  int sel1 [NUM_GROUPS];

  logic [31:0] a, b, sum;
  logic        cin, cout;

  csla_ks32 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(logic [31:0] va, logic [31:0] vb, logic vc);
    logic [32:0] ref_res;
    logic [31:0] carries;
    a = va; b = vb; cin = vc;
    #1;
    ref_res = {1'b0, va} + {1'b0, vb} + {32'b0, vc};
    carries = va ^ vb ^ ref_res[31:0];  // carry into each bit
    checks++;
    if ({cout, sum} !== ref_res) begin
      failures++;
      $display("FAIL %h + %h + %b: got %b_%h expected %b_%h",
               va, vb, vc, cout, sum, ref_res[32], ref_res[31:0]);
    end
    for (int g = 1; g < NUM_GROUPS; g++)
      if (carries[group_lsb(g)]) sel1[g]++; else sel0[g]++;
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < NUM_GROUPS; g++) begin
      sel0[g] = 0;
      sel1[g] = 0;
    end
    // Reference simulation vector, both carry-in values.
    apply(32'hF86ABEAB, 32'hCCCCCCCC, 1'b0);
    checks++;
    if (sum !== 32'hC5378B77 || cout !== 1'b1) begin
      failures++;
      $display("FAIL reference vector, carry in 0");
    end
    apply(32'hF86ABEAB, 32'hCCCCCCCC, 1'b1);
    checks++;
    if (sum !== 32'hC5378B78 || cout !== 1'b1) begin
      failures++;
      $display("FAIL reference vector, carry in 1");
    end
    // Corners.
    apply(32'h0, 32'h0, 1'b0);
    apply(32'h0, 32'h0, 1'b1);
    apply(32'hFFFFFFFF, 32'h0, 1'b1);
    apply(32'hFFFFFFFF, 32'hFFFFFFFF, 1'b1);
    apply(32'hFFFFFFFF, 32'hFFFFFFFF, 1'b0);
    apply(32'h80000000, 32'h80000000, 1'b0);
    // A carry from bit 0 that runs up to bit k and stops there.
    for (int k = 0; k < 32; k++) begin
      apply(32'hFFFFFFFF >> (31 - k), 32'h0, 1'b1);
      apply(32'hFFFFFFFF >> (31 - k), 32'h1, 1'b0);
    end
    for (int n = 0; n < N_RANDOM; n++)
      apply($urandom, $urandom, 1'($urandom));
    for (int g = 1; g < NUM_GROUPS; g++) begin
      $display("group %0d (bits %0d..%0d): carry-in-0 result used %0d times, carry-in-1 result %0d times",
               g, group_lsb(g) + GROUP_W[g] - 1, group_lsb(g), sel0[g], sel1[g]);
      checks++;
      if (sel0[g] == 0 || sel1[g] == 0) begin
        failures++;
        $display("FAIL group %0d did not use both results", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
