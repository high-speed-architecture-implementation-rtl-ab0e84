// Multiplier in GF(2^2), polynomial basis with field polynomial x^2+x+1.
// Three one-bit products (high*high, sum*sum, low*low) combined by two
// adders, the Karatsuba form drawn for this block; the field polynomial is
// the one of the composite-field S-box this design uses (a choice, not
// printed with the block). Purely combinational.
module gf2_mul (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] p
);
  logic hh, ll, mm;
  always_comb begin
    hh = a[1] & b[1];
    ll = a[0] & b[0];
    mm = (a[1] ^ a[0]) & (b[1] ^ b[0]);
    p  = {mm ^ ll, hh ^ ll};
  end
endmodule
