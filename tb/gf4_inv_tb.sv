// Self-checking testbench for gf4_inv: all inputs against an inverse found by exhaustive search (0 maps to 0).
module gf4_inv_tb;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, q;
  logic [3:0] expv;
  gf4_inv dut (.a(a), .q(q));

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
      expv = 0;
      for (int j = 1; j < 16; j++) if (m4(a, 4'(j)) == 4'd1) expv = 4'(j);
      check(32'(q), 32'(expv), $sformatf("inv %0d", a));
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
