// End-to-end self-checking testbench for aes128_enc_top at its default
// parameters. It sends the two FIPS-197 example blocks, then a long
// back-to-back stream of random plaintexts with a fresh random key for
// every block, with occasional idle clocks. Every clock it checks out_valid,
// and every valid ciphertext against the reference encryption, exactly
// m*Nr+1 = 81 clocks after the block entered. It then resets the design
// with blocks in flight and checks that none of them emerges.
// Mechanisms counted (each must occur): back-to-back blocks at one block
// per clock, a change of key between consecutive blocks, an idle input
// clock (pipeline bubble), and the reset flush. Throughput is checked as
// an unbroken run of one ciphertext per clock for the first 150 blocks.
module aes128_enc_top_tb;
  import aes_ref_pkg::*;
  localparam int LAT = aes_pkg::LATENCY;
  localparam int N   = 400;
  int checks = 0, failures = 0;
  int n_back_to_back = 0, n_key_change = 0, n_bubble = 0, n_flush = 0, n_out = 0;
  int first_in = -1, first_out = -1;
  int run = 0, longest_run = 0;   // consecutive clocks with out_valid
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  blk_t plaintext = '0, key = '0, ciphertext;
  blk_t exp_h [N + LAT];
  logic v_h [N + LAT];

  aes128_enc_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .plaintext(plaintext),
    .key(key), .out_valid(out_valid), .ciphertext(ciphertext));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    blk_t prev_key;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < N + LAT; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        chk(out_valid === v_h[t - LAT], $sformatf("out_valid at %0d", t));
        if (v_h[t - LAT]) begin
          chk(ciphertext === exp_h[t - LAT], $sformatf("ciphertext of block %0d: %h vs %h", t - LAT, ciphertext, exp_h[t - LAT]));
          n_out++;
        end
      end else begin
        chk(out_valid === 1'b0, $sformatf("no output before the latency, at %0d", t));
      end
      if (out_valid && first_out < 0) first_out = t;
      run = out_valid ? run + 1 : 0;
      if (run > longest_run) longest_run = run;
      prev_key = key;
      v_h[t] = (t < N) && (t < 150 || $urandom_range(0, 5) != 0);
      if (t == 0) begin
        plaintext = 128'h00112233445566778899aabbccddeeff;
        key       = 128'h000102030405060708090a0b0c0d0e0f;
      end else if (t == 1) begin
        plaintext = 128'h3243f6a8885a308d313198a2e0370734;
        key       = 128'h2b7e151628aed2a6abf7158809cf4f3c;
      end else begin
        plaintext = {$urandom, $urandom, $urandom, $urandom};
        key       = {$urandom, $urandom, $urandom, $urandom};
      end
      exp_h[t] = encrypt(plaintext, key);
      in_valid = v_h[t];
      if (v_h[t] && first_in < 0) first_in = t;
      if (t > 0 && v_h[t] && v_h[t-1]) begin
        n_back_to_back++;
        if (key !== prev_key) n_key_change++;
      end
      if (t > 0 && t < N && !v_h[t] && v_h[t-1]) n_bubble++;
    end
    chk(exp_h[0] === 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference: FIPS-197 C.1 vector");
    chk(exp_h[1] === 128'h3925841d02dc09fbdc118597196a0b32, "reference: FIPS-197 App. B vector");
    chk(first_out - first_in == LAT, $sformatf("latency %0d clocks, expected %0d", first_out - first_in, LAT));
    chk(n_out == N - n_bubble_total(), "every accepted block produced one ciphertext");
    chk(longest_run >= 150, $sformatf("one ciphertext per clock: longest run %0d, expected 150", longest_run));

    // reset with blocks in flight: none of them may come out
    in_valid = 1;
    repeat (40) @(negedge clk);
    in_valid = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < LAT + 5; t++) begin
      @(negedge clk);
      chk(out_valid === 1'b0, "no output after reset");
    end
    n_flush++;

    chk(n_back_to_back > 0, "mechanism: back-to-back blocks");
    chk(n_key_change > 0,   "mechanism: key change between consecutive blocks");
    chk(n_bubble > 0,       "mechanism: input bubble");
    chk(n_flush > 0,        "mechanism: reset flush");
    $display("mechanisms: back_to_back=%0d key_change=%0d bubble=%0d reset_flush=%0d ciphertexts=%0d latency=%0d longest_run=%0d",
             n_back_to_back, n_key_change, n_bubble, n_flush, n_out, first_out - first_in, longest_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int n_bubble_total();
    int n = 0;
    for (int t = 0; t < N; t++) if (!v_h[t]) n++;
    return n;
  endfunction

  initial begin  // watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
