// Sub-pipelined multiplier in GF(2^4) = GF(2^2)[x]/(x^2+x+phi).
// The operands are split into 2-bit halves; three GF(2^2) multipliers form
// high*high, (high^low)*(high^low) and low*low, and their products are
// registered: this is the extra sub-pipeline register that splits the
// multiplier, the slowest indivisible part of the S-box, in two. After the
// register the high product is multiplied by phi and the result is
//   p = { mid ^ low , phi*high ^ low }.
// Timing: p is the product of the a, b sampled one clock earlier.
module gf4_mul (
  input  logic       clk,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] p
);
  logic [1:0] ph, pm, pl;       // GF(2^2) products before the register
  logic [1:0] ph_q, pm_q, pl_q; // after the register
  logic [1:0] ph_phi;

  gf2_mul u_hh (.a(a[3:2]),          .b(b[3:2]),          .p(ph));
  gf2_mul u_mm (.a(a[3:2] ^ a[1:0]), .b(b[3:2] ^ b[1:0]), .p(pm));
  gf2_mul u_ll (.a(a[1:0]),          .b(b[1:0]),          .p(pl));

  always_ff @(posedge clk) begin
    ph_q <= ph;
    pm_q <= pm;
    pl_q <= pl;
  end

  gf2_mul_phi u_phi (.a(ph_q), .q(ph_phi));

  always_comb p = {pm_q ^ pl_q, ph_phi ^ pl_q};
endmodule
