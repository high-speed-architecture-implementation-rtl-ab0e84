// Self-checking testbench for sbox_pipe: streams all 256 bytes back to
// back, one per clock, and checks every output against the reference S-box
// (affine map of a^254) exactly six clocks after its input.
module sbox_pipe_tb;
  import aes_ref_pkg::*;
  localparam int LAT = aes_pkg::SBOX_STAGES;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] din, dout;
  logic [7:0] hist [0:255+LAT];

  sbox_pipe dut (.clk(clk), .din(din), .dout(dout));
  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 256 + LAT; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        checks++;
        if (dout !== sbox(hist[t - LAT])) begin
          failures++;
          if (failures < 10) $display("FAIL S(%h): got %h expected %h", hist[t - LAT], dout, sbox(hist[t - LAT]));
        end
      end
      din = 8'(t * 37 + 11);   // a permutation of 0..255 for t < 256
      hist[t] = din;
    end
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
