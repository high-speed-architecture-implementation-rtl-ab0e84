// Self-checking testbench for mix_columns: the FIPS-197 example and random states against the {02}/{03} form of MixColumns.
module mix_columns_tb;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  blk_t s, q;
  mix_columns dut (.s(s), .q(q));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    s = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1;  // FIPS-197 App. B, round 1
    check(q[127:96], 32'h046681e5, "fips col0"); check(q[95:64], 32'he0cb199a, "fips col1");
    check(q[63:32], 32'h48f8d37a, "fips col2"); check(q[31:0], 32'h2806264c, "fips col3");
    for (int i = 0; i < 200; i++) begin
      s = {$urandom, $urandom, $urandom, $urandom}; #1;
      for (int w = 0; w < 4; w++) check(q[32 * w +: 32], mix_columns(s) >> (32 * w), "random");
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
