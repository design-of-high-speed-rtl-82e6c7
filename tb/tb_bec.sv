// tb_bec: self-checking test of the Binary to Excess-1 Converter.
//
// Checks the four rows of the reference truth table for the 4-bit converter
// (0000->0001, 0001->0010, 1110->1111, 1111->0000), then every input of a
// 4-bit, a 5-bit and an 8-bit instance against (b + 1) mod 2^WIDTH computed
// here with ordinary arithmetic. Combinational: inputs are applied and the
// outputs read one time step later. A watchdog ends the run with a failure
// if it has not finished in time.
module tb_bec;

  int checks   = 0;
  int failures = 0;

  logic [3:0] b4, x4;
  logic [4:0] b5, x5;
  logic [7:0] b8, x8;

  bec                u_bec4 (.b(b4), .x(x4));
  bec #(.WIDTH(5))   u_bec5 (.b(b5), .x(x5));
  bec #(.WIDTH(8))   u_bec8 (.b(b8), .x(x8));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [3:0] tbl_in  [4] = '{4'b0000, 4'b0001, 4'b1110, 4'b1111};
    static logic [3:0] tbl_out [4] = '{4'b0001, 4'b0010, 4'b1111, 4'b0000};
    for (int i = 0; i < 4; i++) begin
      b4 = tbl_in[i];
      #1;
      check("table 1 row", 32'(x4), 32'(tbl_out[i]));
    end
    for (int v = 0; v < 256; v++) begin
      b4 = 4'(v);
      b5 = 5'(v);
      b8 = 8'(v);
      #1;
      if (v < 16) check("bec4", 32'(x4), 32'((v + 1) % 16));
      if (v < 32) check("bec5", 32'(x5), 32'((v + 1) % 32));
      check("bec8", 32'(x8), 32'((v + 1) % 256));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
