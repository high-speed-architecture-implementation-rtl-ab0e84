// SubByte (AES S-box) computed in the composite field GF((2^4)^2) instead
// of a look-up table, cut into sub-pipeline stages.
//   delta -> (ah, al); d = lambda*ah^2 ^ (ah^al)*al; d^-1 in GF(2^4);
//   inverse = { ah*d^-1 , (ah^al)*d^-1 } -> delta^-1 -> affine.
// Six registers: R1 after delta and the (ah^al) adder; R2 inside the first
// GF(2^4) multiplier (with a balancing register on the x^2 / x-lambda path);
// R3 before the GF(2^4) inverter; R4 after it; R5 inside the two output
// multipliers; R6 after them. delta^-1 and the affine map are combinational
// behind R6, so dout is the S-box of the din sampled six clocks earlier.
// A new byte may enter every clock. The register cuts follow the published
// round architecture; placing the split register in the first multiplier
// too, its balancing register and the field constants are this design's
// own choices.
module sbox_pipe (
  input  logic       clk,
  input  logic [7:0] din,
  output logic [7:0] dout
);
  logic [7:0] iso;
  logic [3:0] r1_ah, r1_al, r1_sum;
  logic [3:0] sq, sq_lam, r2_sl, r2_ah, r2_sum, m_sal;
  logic [3:0] r3_d, r3_ah, r3_sum;
  logic [3:0] d_inv, r4_di, r4_ah, r4_sum;
  logic [3:0] inv_h, inv_l;
  logic [7:0] r6_inv, byte_aes;

  // stage 1: isomorphic mapping and the high^low adder
  iso_map u_iso (.a(din), .q(iso));
  always_ff @(posedge clk) begin
    r1_ah  <= iso[7:4];
    r1_al  <= iso[3:0];
    r1_sum <= iso[7:4] ^ iso[3:0];
  end

  // stage 2: lambda*ah^2 in parallel with (ah^al)*al (register R2 inside)
  gf4_sq         u_sq  (.a(r1_ah), .q(sq));
  gf4_mul_lambda u_lam (.a(sq),    .q(sq_lam));
  gf4_mul        u_m1  (.clk(clk), .a(r1_sum), .b(r1_al), .p(m_sal));
  always_ff @(posedge clk) begin
    r2_sl  <= sq_lam;
    r2_ah  <= r1_ah;
    r2_sum <= r1_sum;
  end

  // stage 3: the adder that forms d
  always_ff @(posedge clk) begin
    r3_d   <= r2_sl ^ m_sal;
    r3_ah  <= r2_ah;
    r3_sum <= r2_sum;
  end

  // stage 4: inversion in GF(2^4)
  gf4_inv u_inv (.a(r3_d), .q(d_inv));
  always_ff @(posedge clk) begin
    r4_di  <= d_inv;
    r4_ah  <= r3_ah;
    r4_sum <= r3_sum;
  end

  // stages 5-6: the two output multipliers (register R5 inside), then R6
  gf4_mul u_mh (.clk(clk), .a(r4_ah),  .b(r4_di), .p(inv_h));
  gf4_mul u_ml (.clk(clk), .a(r4_sum), .b(r4_di), .p(inv_l));
  always_ff @(posedge clk) r6_inv <= {inv_h, inv_l};

  // back to GF(2^8), then the affine transformation
  inv_iso_map u_iiso (.a(r6_inv), .q(byte_aes));
  affine_tf   u_aff  (.a(byte_aes), .q(dout));
endmodule
