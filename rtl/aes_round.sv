// aes_round: one full AES encryption round as combinational logic.
//
// The iterative core evaluates one round per clock cycle through this block:
// SubBytes (16 S-boxes), ShiftRows, MixColumns and AddRoundKey, in that order.
// When last_i is high MixColumns is bypassed, as in the final round of AES.
// INVERTED selects the inverted-rotated S-box table; the three linear steps are
// unchanged because they map a complemented state to the complemented result, so
// the inverted copy uses the same, uncomplemented round key as the normal copy.
// Ports: state_i/rkey_i in, state_o out, all 128-bit in FIPS-197 byte order.
module aes_round
  import aes_pkg::*;
#(
  parameter bit INVERTED = 1'b0
) (
  input  block_t state_i,
  input  block_t rkey_i,
  input  logic   last_i,
  output block_t state_o
);

  block_t sub, shifted, mixed;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox #(.INVERTED(INVERTED)) u_sbox (
      .a(state_i[127 - 8*i -: 8]),
      .y(sub[127 - 8*i -: 8])
    );
  end

  always_comb begin
    shifted = shift_rows(sub);
    mixed   = last_i ? shifted : mix_columns(shifted);
    state_o = mixed ^ rkey_i;
  end

endmodule
