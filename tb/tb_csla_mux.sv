// tb_csla_mux: self-checking test of the carry select result mux.
//
// Applies every pair of 3-bit inputs (the default, a "6:3" selector) with
// both select values, and all select values on an 8-bit instance (a "16:8"
// selector) with random data, checking that sel = 0 passes in0 and sel = 1
// passes in1. Combinational; a watchdog ends a hung run with a failure.
module tb_csla_mux;

  int checks   = 0;
  int failures = 0;

  logic [2:0] i0, i1, o3;
  logic [7:0] j0, j1, o8;
  logic       s3, s8;

  csla_mux              u_mux3 (.in0(i0), .in1(i1), .sel(s3), .out(o3));
  csla_mux #(.WIDTH(8)) u_mux8 (.in0(j0), .in1(j1), .sel(s8), .out(o8));

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
    for (int v0 = 0; v0 < 8; v0++)
      for (int v1 = 0; v1 < 8; v1++)
        for (int s = 0; s < 2; s++) begin
          i0 = 3'(v0); i1 = 3'(v1); s3 = 1'(s);
          #1;
          check("mux6:3", 32'(o3), (s != 0) ? 32'(v1) : 32'(v0));
        end
    for (int n = 0; n < 200; n++) begin
      j0 = 8'($urandom); j1 = 8'($urandom); s8 = 1'(n);
      #1;
      check("mux16:8", 32'(o8), s8 ? 32'(j1) : 32'(j0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
