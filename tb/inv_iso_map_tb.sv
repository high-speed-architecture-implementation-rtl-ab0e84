// Self-checking testbench for inv_iso_map: every byte is mapped to the composite field by iso_map and must come back unchanged.
module inv_iso_map_tb;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, q, ia, iq;
  iso_map u_iso (.a(ia), .q(iq));
  inv_iso_map dut (.a(a), .q(q));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // delta^-1 must undo delta (taken from iso_map) for every byte
    for (int i = 0; i < 256; i++) begin
      ia = 8'(i); #1;
      a = iq; #1;
      check(32'(q), 32'(i), $sformatf("delta^-1(delta(%h))", ia));
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
