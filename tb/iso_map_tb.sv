// Self-checking testbench for iso_map: checks that delta maps 1 to 1 and preserves sums and products between GF(2^8) and the reference composite field.
module iso_map_tb;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, q, qa, qb;
  logic [7:0] x, y;
  iso_map dut (.a(a), .q(q));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // delta must be a field isomorphism: additive, multiplicative, 1 -> 1
    a = 8'h01; #1; check(32'(q), 32'h01, "delta(1)");
    for (int i = 0; i < 3000; i++) begin
      x = 8'($urandom); y = 8'($urandom);
      a = x; #1; qa = q;
      a = y; #1; qb = q;
      a = x ^ y; #1; check(32'(q), 32'(qa ^ qb), "delta additive");
      a = gmul(x, y); #1; check(32'(q), 32'(m8c(qa, qb)), $sformatf("delta(%h*%h)", x, y));
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
