// Fully unrolled, sub-pipelined AES-128 encryptor.
// The plaintext is XORed with the cipher key (initial AddRoundKey) and
// registered together with the key; then ten aes_round units of 8
// sub-pipeline stages each process the state while one key_expansion unit
// derives each round key on the fly alongside it. The last round omits
// MixColumn. Latency is m*Nr + 1 = 81 clocks from in_valid to out_valid;
// after that one ciphertext leaves every clock. Each block carries its own
// key. There is no stall input. Only the valid pipeline is reset
// (synchronous, active low); byte k of a block is bits [127-8k -: 8].
module aes128_enc_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  state_t plaintext,
  input  state_t key,
  output logic   out_valid,
  output state_t ciphertext
);
  state_t st [NR+1];
  logic   vl [NR+1];
  state_t key0;
  state_t rk [NR];

  // initial AddRoundKey and the input register
  always_ff @(posedge clk) begin
    st[0] <= plaintext ^ key;
    key0  <= key;
  end
  always_ff @(posedge clk)
    if (!rst_n) vl[0] <= 1'b0;
    else        vl[0] <= in_valid;

  key_expansion #(.ROUNDS(NR)) u_kexp (.clk(clk), .key_in(key0), .rk(rk));

  for (genvar r = 0; r < NR; r++) begin : g_round
    aes_round #(.FINAL(r == NR - 1)) u_round (
      .clk(clk), .rst_n(rst_n),
      .in_valid(vl[r]), .state_in(st[r]), .round_key(rk[r]),
      .out_valid(vl[r+1]), .state_out(st[r+1]));
  end

  assign out_valid  = vl[NR];
  assign ciphertext = st[NR];
endmodule
