// Squarer in GF(2^4) = GF(2^2)[x]/(x^2+x+phi). Squaring is linear over
// GF(2), so it reduces to a small adder network. Combinational.
module gf4_sq (
  input  logic [3:0] a,
  output logic [3:0] q
);
  always_comb q = {a[3], a[3] ^ a[2], a[2] ^ a[1], a[3] ^ a[1] ^ a[0]};
endmodule
