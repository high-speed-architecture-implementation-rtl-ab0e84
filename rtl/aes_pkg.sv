// Shared types and constants of the sub-pipelined AES-128 encryptor.
// A 128-bit state holds the 16 AES bytes in FIPS-197 column-major order:
// byte k (row k%4, column k/4) sits in bits [127-8k -: 8]. The number of
// rounds and the number of pipeline sub-stages per round are the design's
// values for AES-128 (10 rounds, 8 sub-stages); the latency constants follow
// from the register placement described in aes_round and sbox_pipe.
package aes_pkg;
  typedef logic [127:0] state_t;
  typedef logic [31:0]  word_t;

  localparam int unsigned NR          = 10; // rounds of AES-128
  localparam int unsigned ROUND_STAGES = 8; // sub-pipeline registers per round
  localparam int unsigned SBOX_STAGES = 6;  // registers inside one S-box
  localparam int unsigned KEY_TAP     = 7;  // clocks from round input to AddRoundKey
  localparam int unsigned LATENCY     = ROUND_STAGES * NR + 1;

  // Multiplication by x ({02}) in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // Round constant byte of key-expansion round r (1..10): x^(r-1) in GF(2^8).
  function automatic logic [7:0] rcon(input int unsigned r);
    logic [7:0] c;
    c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction
endpackage
