// Self-checking testbench for affine_tf: all 256 bytes against the rotate-and-XOR form of the affine map.
module affine_tf_tb;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, q;
  affine_tf dut (.a(a), .q(q));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); #1;
      check(32'(q), 32'(affine(a)), $sformatf("AT %h", a));
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
