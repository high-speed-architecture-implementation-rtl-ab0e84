// Inverse isomorphic mapping delta^-1 from the composite field GF((2^4)^2)
// back to the AES field GF(2^8): the inverse of the matrix in iso_map,
// realised as XOR trees. Combinational.
module inv_iso_map (
  input  logic [7:0] a,
  output logic [7:0] q
);
  always_comb begin
    q[7] = a[7] ^ a[6] ^ a[5] ^ a[1];
    q[6] = a[6] ^ a[2];
    q[5] = a[6] ^ a[5] ^ a[1];
    q[4] = a[6] ^ a[5] ^ a[4] ^ a[2] ^ a[1];
    q[3] = a[5] ^ a[4] ^ a[3] ^ a[2] ^ a[1];
    q[2] = a[7] ^ a[4] ^ a[3] ^ a[2] ^ a[1];
    q[1] = a[5] ^ a[4];
    q[0] = a[6] ^ a[5] ^ a[4] ^ a[2] ^ a[0];
  end
endmodule
