// Key expansion unit: NR chained key_round stages, each with its own round
// constant (x^(r-1) in GF(2^8), computed at elaboration). key_in is round
// key 0 (the cipher key); rk[r-1] carries round key r, valid
// 8*(r-1) + 7 clocks after key_in, i.e. when AddRoundKey of round unit r
// needs it. Keys are generated on the fly, so every block may carry its own
// key. The chained per-round structure is this design's pipelining of the
// single expansion unit.
module key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned ROUNDS = NR
) (
  input  logic   clk,
  input  state_t key_in,
  output state_t rk [ROUNDS]
);
  state_t chain [ROUNDS+1];
  assign chain[0] = key_in;
  for (genvar r = 0; r < ROUNDS; r++) begin : g_round
    key_round #(.RCON(rcon(r + 1))) u_kr (
      .clk(clk), .key_in(chain[r]), .rk(rk[r]), .key_out(chain[r+1]));
  end
endmodule
