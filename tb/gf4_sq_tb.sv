// Self-checking testbench for gf4_sq: all inputs against a*a computed by reference GF(2^4) multiplication.
module gf4_sq_tb;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, q;
  gf4_sq dut (.a(a), .q(q));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 4'(i); #1;
      check(32'(q), 32'(m4(a, a)), $sformatf("%0d^2", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin  // watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
