// Self-checking testbench for aes_round: a normal round and a final round
// (no MixColumn) run side by side. Random states enter every clock, with
// in_valid gaps; each round key is applied 7 clocks after its state, as the
// key expansion delivers it. Outputs and out_valid are checked exactly
// 8 clocks after the input against the reference round function. The
// FIPS-197 example's round 1 is included.
module aes_round_tb;
  import aes_ref_pkg::*;
  localparam int LAT = aes_pkg::ROUND_STAGES;
  localparam int KT  = aes_pkg::KEY_TAP;
  localparam int N   = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  blk_t state_in, round_key;
  logic v_n, v_f;
  blk_t out_n, out_f;
  blk_t st_h [N + LAT], key_h [N + LAT];
  logic v_h [N + LAT];

  aes_round #(.FINAL(1'b0)) dut_n (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .state_in(state_in),
    .round_key(round_key), .out_valid(v_n), .state_out(out_n));
  aes_round #(.FINAL(1'b1)) dut_f (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .state_in(state_in),
    .round_key(round_key), .out_valid(v_f), .state_out(out_f));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < N + LAT; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        chk(v_n === v_h[t - LAT] && v_f === v_h[t - LAT], $sformatf("valid at %0d", t));
        if (v_h[t - LAT]) begin
          chk(out_n === round_fn(st_h[t - LAT], key_h[t - LAT], 1'b0), $sformatf("round out %0d", t));
          chk(out_f === round_fn(st_h[t - LAT], key_h[t - LAT], 1'b1), $sformatf("final round out %0d", t));
        end
      end
      if (t == 0) st_h[t] = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
      else        st_h[t] = {$urandom, $urandom, $urandom, $urandom};
      key_h[t] = (t == 0) ? 128'ha0fafe1788542cb123a339392a6c7605 : {$urandom, $urandom, $urandom, $urandom};
      v_h[t] = (t < N) && ($urandom_range(0, 7) != 0);
      state_in = st_h[t];
      in_valid = v_h[t];
      round_key = (t >= KT) ? key_h[t - KT] : '0;
    end
    chk(round_fn(128'h193de3bea0f4e22b9ac68d2ae9f84808, 128'ha0fafe1788542cb123a339392a6c7605, 1'b0)
        == 128'ha49c7ff2689f352b6b5bea43026a5049, "reference model on FIPS-197 round 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin  // watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
