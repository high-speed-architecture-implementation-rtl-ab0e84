// Self-checking testbench for gf2_mul: all 16 operand pairs against polynomial multiplication modulo y^2+y+1.
module gf2_mul_tb;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] a, b, p;
  gf2_mul dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i); #1;
      check(32'(p), 32'(m2(a, b)), $sformatf("%0d*%0d", a, b));
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
