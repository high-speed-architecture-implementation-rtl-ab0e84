// Self-checking testbench for gf2_mul_phi: all inputs against the product with phi = 2'b10.
module gf2_mul_phi_tb;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] a, q;
  gf2_mul_phi dut (.a(a), .q(q));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      a = 2'(i); #1;
      check(32'(q), 32'(m2(a, 2'b10)), $sformatf("phi*%0d", a));
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
