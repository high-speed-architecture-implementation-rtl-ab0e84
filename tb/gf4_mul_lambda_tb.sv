// Self-checking testbench for gf4_mul_lambda: all inputs against the reference product with lambda = 4'b1100.
module gf4_mul_lambda_tb;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, q;
  gf4_mul_lambda dut (.a(a), .q(q));

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
      check(32'(q), 32'(m4(a, 4'b1100)), $sformatf("lambda*%0d", a));
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
