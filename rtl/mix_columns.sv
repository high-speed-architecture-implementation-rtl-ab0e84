// MixColumn over the four columns of the state, in the rearranged form that
// needs only the {02} constant multiplier (xtime):
//   s'_r = {02}(s_r ^ s_r+1) ^ (s_r+2 ^ s_r+3) ^ s_r+1   (row indices mod 4)
// which equals the standard {02}s_r ^ {03}s_r+1 ^ s_r+2 ^ s_r+3.
// Combinational.
module mix_columns
  import aes_pkg::*;
(
  input  state_t s,
  output state_t q
);
  logic [7:0] b [4];
  always_comb
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) b[r] = s[127 - 8 * (4 * c + r) -: 8];
      for (int r = 0; r < 4; r++)
        q[127 - 8 * (4 * c + r) -: 8] = xtime(b[r] ^ b[(r + 1) % 4])
                                      ^ b[(r + 2) % 4] ^ b[(r + 3) % 4] ^ b[(r + 1) % 4];
    end
endmodule
