// Self-checking testbench for shift_rows: the FIPS-197 example and random states against the reference.
module shift_rows_tb;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  blk_t s, q;
  shift_rows dut (.s(s), .q(q));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    s = 128'hd42711aee0bf98f1b8b45de51e415230; #1;  // FIPS-197 App. B, round 1
    check(q[127:96], 32'hd4bf5d30, "fips col0"); check(q[95:64], 32'he0b452ae, "fips col1");
    check(q[63:32], 32'hb84111f1, "fips col2"); check(q[31:0], 32'h1e2798e5, "fips col3");
    for (int i = 0; i < 200; i++) begin
      s = {$urandom, $urandom, $urandom, $urandom}; #1;
      for (int w = 0; w < 4; w++) check(q[32 * w +: 32], shift_rows(s) >> (32 * w), "random");
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
