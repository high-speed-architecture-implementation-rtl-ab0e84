// One AES round unit with 8 sub-pipeline registers.
//   SubByte (16 x sbox_pipe, 6 registers) -> ShiftRow -> R7 ->
//   MixColumn (skipped when FINAL) -> AddRoundKey -> R8.
// Timing: state_out/out_valid are valid 8 clocks after state_in/in_valid.
// round_key is consumed combinationally by AddRoundKey in the last stage,
// so it must carry the key for the block that entered 7 clocks earlier
// (the key expansion stages deliver it that way). One block may enter
// every clock; there is no stall. Only the valid bits are reset.
// The stage count of 8 follows the design; keeping the 8 stages in the
// final round (which has no MixColumn) is this design's choice so that all
// rounds line up.
module aes_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  state_t state_in,
  input  state_t round_key,
  output logic   out_valid,
  output state_t state_out
);
  state_t sub, shifted, mixed, r7;
  logic [ROUND_STAGES-1:0] vpipe;

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    sbox_pipe u_sbox (.clk(clk), .din(state_in[8 * k +: 8]), .dout(sub[8 * k +: 8]));
  end

  shift_rows u_sr (.s(sub), .q(shifted));
  always_ff @(posedge clk) r7 <= shifted;

  if (FINAL) begin : g_final
    assign mixed = r7;
  end else begin : g_mix
    mix_columns u_mc (.s(r7), .q(mixed));
  end

  always_ff @(posedge clk) state_out <= mixed ^ round_key;

  always_ff @(posedge clk)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[ROUND_STAGES-2:0], in_valid};
  assign out_valid = vpipe[ROUND_STAGES-1];
endmodule
