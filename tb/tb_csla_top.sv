// tb_csla_top: end-to-end test of the top level at its default size.
//
// Drives both 32-bit carry select adders (BEC-1 and Kogge-Stone) at once:
// the BEC-1 adder gets (a, b, cin) and the Kogge-Stone adder the different
// operands (b, ~a, ~cin), so that a miswired port shows. The operands are the
// reference simulation vector (A = 32'hF86ABEAB, B = 32'hCCCCCCCC, carry in 0
// and 1), corner cases and random values; each adder's {cout, sum} is
// compared with its a + b + cin computed here. It counts
// how often each mechanism of the carry select scheme happened and fails on
// any that never did:
//   - in every select group of each adder, the carry-in-0 result being selected, and the
//     carry-in-1 result being selected;
//   - a carry entering at bit 0 and passing through every group to the
//     carry out (all bits propagate), the longest select chain;
//   - the carry out being 1, and the carry in being 1.
// The top's parameters are left at their defaults. Combinational; a watchdog
// ends a hung run with a failure.
module tb_csla_top;
  import csla_pkg::*;

  localparam int unsigned N_RANDOM = 100000;

  int checks     = 0;
  int failures   = 0;
  int sel0 [2][NUM_GROUPS];  // [0]: BEC-1 adder, [1]: Kogge-Stone adder
  int sel1 [2][NUM_GROUPS];
  int full_chain = 0;
  int cout_one   = 0;
  int cin_one    = 0;

  logic [31:0] a, b, bec_sum, ks_sum;
  logic        cin, bec_cout, ks_cout;
  logic [31:0] ka, kb;
  logic        kcin;

  assign ka   = b;
  assign kb   = ~a;
  assign kcin = ~cin;

  csla_top dut (
    .bec_a   (a),
    .bec_b   (b),
    .bec_cin (cin),
    .bec_sum (bec_sum),
    .bec_cout(bec_cout),
    .ks_a    (ka),
    .ks_b    (kb),
    .ks_cin  (kcin),
    .ks_sum  (ks_sum),
    .ks_cout (ks_cout)
  );

  // Compare one adder's result with the reference; count its mechanisms.
  task automatic score(int idx, string name, logic [31:0] va, logic [31:0] vb, logic vc,
                       logic [31:0] got_sum, logic got_cout);
    logic [32:0] ref_res;
    logic [31:0] carries;
    ref_res = {1'b0, va} + {1'b0, vb} + {32'b0, vc};
    carries = va ^ vb ^ ref_res[31:0];  // carry into each bit
    checks++;
    if ({got_cout, got_sum} !== ref_res) begin
      failures++;
      $display("FAIL %s adder %h + %h + %b: got %b_%h expected %b_%h",
               name, va, vb, vc, got_cout, got_sum, ref_res[32], ref_res[31:0]);
    end
    for (int g = 1; g < NUM_GROUPS; g++)
      if (carries[group_lsb(g)]) sel1[idx][g]++; else sel0[idx][g]++;
    if (vc && ((va ^ vb) == 32'hFFFFFFFF)) full_chain++;
    if (ref_res[32]) cout_one++;
    if (vc) cin_one++;
  endtask

  task automatic apply(logic [31:0] va, logic [31:0] vb, logic vc);
    a = va; b = vb; cin = vc;
    #1;
    score(0, "BEC-1", a, b, cin, bec_sum, bec_cout);
    score(1, "Kogge-Stone", ka, kb, kcin, ks_sum, ks_cout);
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("%s: %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL never happened: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++)
      for (int g = 0; g < NUM_GROUPS; g++) begin
        sel0[i][g] = 0;
        sel1[i][g] = 0;
      end
    apply(32'hF86ABEAB, 32'hCCCCCCCC, 1'b0);
    checks++;
    if (bec_sum !== 32'hC5378B77 || !bec_cout) begin
      failures++;
      $display("FAIL reference vector, carry in 0");
    end
    apply(32'hF86ABEAB, 32'hCCCCCCCC, 1'b1);
    checks++;
    if (bec_sum !== 32'hC5378B78 || !bec_cout) begin
      failures++;
      $display("FAIL reference vector, carry in 1");
    end
    // Reference vector on the Kogge-Stone adder: b = A, ~a = B, ~cin = 0.
    apply(32'h33333333, 32'hF86ABEAB, 1'b1);
    checks++;
    if (ks_sum !== 32'hC5378B77 || !ks_cout) begin
      failures++;
      $display("FAIL reference vector on the Kogge-Stone adder");
    end
    apply(32'hFFFFFFFF, 32'h00000000, 1'b1);
    apply(32'h00000000, 32'hFFFFFFFF, 1'b0);
    apply(32'hAAAAAAAA, 32'h55555555, 1'b1);
    apply(32'hAAAAAAAA, 32'h55555555, 1'b0);
    apply(32'h0, 32'h0, 1'b0);
    for (int n = 0; n < N_RANDOM; n++)
      apply($urandom, $urandom, 1'($urandom));
    for (int g = 1; g < NUM_GROUPS; g++) begin
      need($sformatf("BEC-1 group %0d selected its carry-in-0 result", g), sel0[0][g]);
      need($sformatf("BEC-1 group %0d selected its carry-in-1 result", g), sel1[0][g]);
      need($sformatf("Kogge-Stone group %0d selected its carry-in-0 result", g), sel0[1][g]);
      need($sformatf("Kogge-Stone group %0d selected its carry-in-1 result", g), sel1[1][g]);
    end
    need("carry from bit 0 through every group to the carry out", full_chain);
    need("carry out 1", cout_one);
    need("carry in 1", cin_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
