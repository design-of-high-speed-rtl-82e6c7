// tb_csla_group_ks: self-checking test of one Kogge-Stone carry select group.
//
// Runs every operand pair with both select values through a 4-bit (default),
// a 2-bit and a 7-bit group (the smallest and largest group widths of the
// 32-bit adder) and compares {cout, sum} with a + b + sel computed here. It
// counts the cases in which the carry-in-1 result carries out of the group
// while the carry-in-0 result does not (a carry that only the ripple adder
// with carry-in 1 produces), and fails if that never happened.
// Combinational; a watchdog ends a hung run with a failure.
module tb_csla_group_ks;

  int checks     = 0;
  int failures   = 0;
  int carry_only = 0;  // a + b = 2^W - 1 with sel = 1: carry made by the ripple adder

  logic [3:0] a4, b4, s4;
  logic [1:0] a2, b2, s2;
  logic [6:0] a7, b7, s7;
  logic       c4, co4, c2, co2, c7, co7;

  csla_group_ks              u_g4 (.a(a4), .b(b4), .c_sel(c4), .sum(s4), .cout(co4));
  csla_group_ks #(.WIDTH(2)) u_g2 (.a(a2), .b(b2), .c_sel(c2), .sum(s2), .cout(co2));
  csla_group_ks #(.WIDTH(7)) u_g7 (.a(a7), .b(b7), .c_sel(c7), .sum(s7), .cout(co7));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 128; a++)
      for (int b = 0; b < 128; b++)
        for (int c = 0; c < 2; c++) begin
          a7 = 7'(a); b7 = 7'(b); c7 = 1'(c);
          a4 = 4'(a); b4 = 4'(b); c4 = 1'(c);
          a2 = 2'(a); b2 = 2'(b); c2 = 1'(c);
          #1;
          check("group7", 32'({co7, s7}), 32'(a + b + c));
          if (c == 1 && a + b == 127) carry_only++;
          if (a < 16 && b < 16) check("group4", 32'({co4, s4}), 32'(a + b + c));
          if (a < 4 && b < 4)   check("group2", 32'({co2, s2}), 32'(a + b + c));
        end
    checks++;
    if (carry_only == 0) begin
      failures++;
      $display("FAIL the carry-in-1 path never produced the only carry out");
    end
    $display("carry made by the carry-in-1 path: %0d times", carry_only);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
