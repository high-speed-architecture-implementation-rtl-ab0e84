// Self-checking testbench for key_expansion: a new random key enters every
// clock (the FIPS-197 key first); round key r (rk[r-1]) is checked against
// the reference schedule exactly 8*(r-1)+7 clocks after its cipher key.
module key_expansion_tb;
  import aes_ref_pkg::*;
  localparam int N = 120;
  localparam int LAST = 8 * 9 + 7;
  int checks = 0, failures = 0;
  logic clk = 0;
  blk_t key_in;
  blk_t rk [10];
  blk_t sched [N + LAST + 1][11];

  key_expansion dut (.clk(clk), .key_in(key_in), .rk(rk));
  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < N + LAST + 1; t++) begin
      @(negedge clk);
      for (int r = 1; r <= 10; r++) begin
        automatic int d = 8 * (r - 1) + 7;
        if (t >= d) begin
          checks++;
          if (rk[r-1] !== sched[t - d][r]) begin
            failures++;
            if (failures < 10) $display("FAIL round key %0d of key %0d: %h vs %h", r, t - d, rk[r-1], sched[t - d][r]);
          end
        end
      end
      sched[t][0] = (t == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      for (int r = 1; r <= 10; r++) sched[t][r] = next_key(sched[t][r-1], rc_of(r));
      key_in = sched[t][0];
    end
    checks++;
    if (sched[0][10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++;
      $display("FAIL reference schedule of the FIPS-197 key");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin  // watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
