// Isomorphic mapping delta from the AES field GF(2^8) (polynomial
// x^8+x^4+x^3+x+1) to the composite field GF((2^4)^2) used by the S-box.
// Output bits [7:4] are the high GF(2^4) coefficient, [3:0] the low one.
// An 8x8 binary matrix, realised as XOR trees; the matrix is the standard
// one for this composite field (the design's choice of field). Combinational.
module iso_map (
  input  logic [7:0] a,
  output logic [7:0] q
);
  always_comb begin
    q[7] = a[7] ^ a[5];
    q[6] = a[7] ^ a[6] ^ a[4] ^ a[3] ^ a[2] ^ a[1];
    q[5] = a[7] ^ a[5] ^ a[3] ^ a[2];
    q[4] = a[7] ^ a[5] ^ a[3] ^ a[2] ^ a[1];
    q[3] = a[7] ^ a[6] ^ a[2] ^ a[1];
    q[2] = a[7] ^ a[4] ^ a[3] ^ a[2] ^ a[1];
    q[1] = a[6] ^ a[4] ^ a[1];
    q[0] = a[6] ^ a[1] ^ a[0];
  end
endmodule
