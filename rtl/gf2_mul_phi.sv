// Constant multiplier by phi = {10} in GF(2^2) (field polynomial x^2+x+1).
// One adder: phi*(a1 x + a0) = (a1^a0) x + a1. Combinational. The value of
// phi is the composite-field constant of the S-box this design uses.
module gf2_mul_phi (
  input  logic [1:0] a,
  output logic [1:0] q
);
  always_comb q = {a[1] ^ a[0], a[1]};
endmodule
