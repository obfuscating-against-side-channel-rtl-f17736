// aes_decrypt: one round of the AES-128 inverse cipher, the decryption datapath
// of the iterative core.
//
// A round is InvShiftRows, InvSubBytes, AddRoundKey and then InvMixColumns,
// which the last round (last_i) skips; this is the straightforward inverse
// cipher, so the round keys are used in reverse order, last round key first.
// The core does round 0 (AddRoundKey with the last round key) itself. With
// INVERTED = 1 the inverted-rotated inverse S-box ~InvS(~x) is used, so a
// complemented state gives the complemented result, as the encryption rounds of
// the bit-balanced pair do. Purely combinational.
// The document names decryption as a function of the system; the round
// structure is the standard one and the inverted table follows the document's
// construction of the encryption table. Both are this design's reading.
module aes_decrypt
  import aes_pkg::*;
#(
  parameter bit INVERTED = 1'b0
) (
  input  block_t state_i,
  input  block_t rkey_i,
  input  logic   last_i,
  output block_t state_o
);

  block_t shifted, sub, added;

  always_comb begin
    shifted = inv_shift_rows(state_i);
    for (int i = 0; i < 16; i++)
      sub[127 - 8*i -: 8] = INVERTED ? INV_SBOX_INV_ROT[shifted[127 - 8*i -: 8]]
                                     : INV_SBOX[shifted[127 - 8*i -: 8]];
    added   = sub ^ rkey_i;
    state_o = last_i ? added : inv_mix_columns(added);
  end

endmodule
