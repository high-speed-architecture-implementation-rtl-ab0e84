// Self-checking testbench for gf4_mul: streams all 256 operand pairs, one
// per clock, and checks each product against the reference GF(2^4)
// multiplication exactly one clock later (the internal sub-pipeline register).
module gf4_mul_tb;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [3:0] a, b, p;
  logic [3:0] expq [$];

  gf4_mul dut (.clk(clk), .a(a), .b(b), .p(p));
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i <= 256; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (p !== expq[0]) begin
          failures++;
          $display("FAIL pair %0d: got %h expected %h", i - 1, p, expq[0]);
        end
        void'(expq.pop_front());
      end
      {a, b} = 8'(i);
      expq.push_back(m4(4'(i >> 4), 4'(i)));
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
