// Constant multiplier by lambda = {1100} in GF(2^4), the constant of the
// degree-2 extension polynomial x^2+x+lambda of the composite field
// GF((2^4)^2). Linear, three shared adders. Combinational.
module gf4_mul_lambda (
  input  logic [3:0] a,
  output logic [3:0] q
);
  logic s20;
  always_comb begin
    s20 = a[2] ^ a[0];
    q   = {s20, s20 ^ a[3] ^ a[1], a[3], a[2]};
  end
endmodule
