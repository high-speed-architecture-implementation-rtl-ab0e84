// One round of on-the-fly AES-128 key expansion, pipelined to run in step
// with an aes_round unit.
//   t  = SubWord(RotWord(W3)) ^ {RCON, 24'h0}
//   W'0 = W0 ^ t, W'1 = W1 ^ W'0, W'2 = W2 ^ W'1, W'3 = W3 ^ W'2
// SubWord uses four copies of the same pipelined S-box as the datapath
// (6 clocks); the previous key is delayed 6 clocks beside it, the XOR chain
// is followed by one register, so rk (this round's key) is valid 7 clocks
// after key_in, when the round unit's AddRoundKey needs it. key_out is rk
// one clock later, aligned with the next round's input. RCON is the round
// constant of this stage. A new key may enter every clock.
module key_round
  import aes_pkg::*;
#(
  parameter logic [7:0] RCON = 8'h01
) (
  input  logic   clk,
  input  state_t key_in,
  output state_t rk,
  output state_t key_out
);
  word_t  rot, sub, t;
  word_t  w [4];
  state_t dly [SBOX_STAGES];

  assign rot = {key_in[23:0], key_in[31:24]};  // RotWord of W3
  for (genvar k = 0; k < 4; k++) begin : g_sbox
    sbox_pipe u_sbox (.clk(clk), .din(rot[8 * k +: 8]), .dout(sub[8 * k +: 8]));
  end

  always_ff @(posedge clk) begin
    dly[0] <= key_in;
    for (int i = 1; i < SBOX_STAGES; i++) dly[i] <= dly[i-1];
  end

  always_comb begin
    t    = sub ^ {RCON, 24'h0};
    w[0] = dly[SBOX_STAGES-1][127:96] ^ t;
    w[1] = dly[SBOX_STAGES-1][95:64]  ^ w[0];
    w[2] = dly[SBOX_STAGES-1][63:32]  ^ w[1];
    w[3] = dly[SBOX_STAGES-1][31:0]   ^ w[2];
  end

  always_ff @(posedge clk) begin
    rk      <= {w[0], w[1], w[2], w[3]};
    key_out <= rk;
  end
endmodule
