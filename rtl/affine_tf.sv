// AES affine transformation (AT), the last step of SubByte:
//   q_i = a_i ^ a_(i+4) ^ a_(i+5) ^ a_(i+6) ^ a_(i+7) ^ c_i,  c = 8'h63,
// indices mod 8, as defined by the AES standard. Combinational.
module affine_tf (
  input  logic [7:0] a,
  output logic [7:0] q
);
  localparam logic [7:0] C = 8'h63;
  always_comb
    for (int i = 0; i < 8; i++)
      q[i] = a[i] ^ a[(i + 4) % 8] ^ a[(i + 5) % 8] ^ a[(i + 6) % 8] ^ a[(i + 7) % 8] ^ C[i];
endmodule
