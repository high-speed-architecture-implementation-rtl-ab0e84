// Self-checking testbench for key_round: a new random key enters every
// clock (the FIPS-197 key first); rk must equal the reference next round
// key exactly 7 clocks later and key_out the same value 8 clocks later.
// Two stages with different round constants are checked.
module key_round_tb;
  import aes_ref_pkg::*;
  localparam int N = 200;
  int checks = 0, failures = 0;
  logic clk = 0;
  blk_t key_in, rk1, ko1, rk9, ko9;
  blk_t hist [N + 8];

  key_round #(.RCON(8'h01)) dut1 (.clk(clk), .key_in(key_in), .rk(rk1), .key_out(ko1));
  key_round #(.RCON(8'h1b)) dut9 (.clk(clk), .key_in(key_in), .rk(rk9), .key_out(ko9));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < N + 8; t++) begin
      @(negedge clk);
      if (t >= 7) begin
        chk(rk1 === next_key(hist[t - 7], 8'h01), $sformatf("rk rcon 01 at %0d", t));
        chk(rk9 === next_key(hist[t - 7], 8'h1b), $sformatf("rk rcon 1b at %0d", t));
      end
      if (t >= 8) begin
        chk(ko1 === next_key(hist[t - 8], 8'h01), $sformatf("key_out at %0d", t));
        chk(ko9 === next_key(hist[t - 8], 8'h1b), $sformatf("key_out rcon 1b at %0d", t));
      end
      if (t == 7) chk(rk1 === 128'ha0fafe1788542cb123a339392a6c7605, "FIPS-197 round key 1");
      hist[t] = (t == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      key_in = hist[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin  // watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
