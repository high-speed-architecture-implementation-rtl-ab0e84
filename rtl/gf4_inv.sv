// Multiplicative inverse in GF(2^4) = GF(2^2)[x]/(x^2+x+phi), with 0 mapped
// to 0. Written as direct sum-of-products equations per output bit (the
// block's insides are this design's choice; only its function is fixed).
// Combinational.
module gf4_inv (
  input  logic [3:0] a,
  output logic [3:0] q
);
  always_comb begin
    q[3] = a[3] ^ (a[3] & a[2] & a[1]) ^ (a[3] & a[0]) ^ a[2];
    q[2] = (a[3] & a[2] & a[1]) ^ (a[3] & a[2] & a[0]) ^ (a[3] & a[0]) ^ a[2]
         ^ (a[2] & a[1]);
    q[1] = a[3] ^ (a[3] & a[2] & a[1]) ^ (a[3] & a[1] & a[0]) ^ a[2]
         ^ (a[2] & a[0]) ^ a[1];
    q[0] = (a[3] & a[2] & a[1]) ^ (a[3] & a[2] & a[0]) ^ (a[3] & a[1])
         ^ (a[3] & a[1] & a[0]) ^ (a[3] & a[0]) ^ a[2] ^ (a[2] & a[1])
         ^ (a[2] & a[1] & a[0]) ^ a[1] ^ a[0];
  end
endmodule
