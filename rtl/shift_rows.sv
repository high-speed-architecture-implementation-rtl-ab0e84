// ShiftRow: row r of the 4x4 state is rotated left by r bytes (row 0 is
// unchanged). With column-major byte order, output byte (r, c) is input
// byte (r, (c + r) mod 4). Wiring only, combinational.
module shift_rows
  import aes_pkg::*;
(
  input  state_t s,
  output state_t q
);
  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        q[127 - 8 * (4 * c + r) -: 8] = s[127 - 8 * (4 * ((c + r) % 4) + r) -: 8];
endmodule
