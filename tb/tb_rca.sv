// tb_rca: self-checking test of the ripple carry adder.
//
// Runs every operand pair and carry in through a 4-bit (default) and a 7-bit
// instance and compares {cout, sum} with a + b + cin computed here. Also a
// 1-bit instance, which is a single full adder. Combinational: outputs are
// read one time step after the inputs change. A watchdog ends the run with a
// failure if it has not finished in time.
module tb_rca;

  int checks   = 0;
  int failures = 0;

  logic [3:0] a4, b4, s4;
  logic [6:0] a7, b7, s7;
  logic [0:0] a1, b1, s1;
  logic       c4, co4, c7, co7, c1, co1;

  rca              u_rca4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  rca #(.WIDTH(7)) u_rca7 (.a(a7), .b(b7), .cin(c7), .sum(s7), .cout(co7));
  rca #(.WIDTH(1)) u_rca1 (.a(a1), .b(b1), .cin(c1), .sum(s1), .cout(co1));

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
          a1 = 1'(a); b1 = 1'(b); c1 = 1'(c);
          #1;
          check("rca7", 32'({co7, s7}), 32'(a + b + c));
          if (a < 16 && b < 16) check("rca4", 32'({co4, s4}), 32'(a + b + c));
          if (a < 2 && b < 2)   check("rca1", 32'({co1, s1}), 32'(a + b + c));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
