// aes_inv_key_step: one backward step of the AES-128 key expansion.
//
// Given round key r and the round constant of step r, it returns round key r-1,
// so the decryption rounds can generate their keys on the fly starting from the
// last round key: w3' = w3^w2, w2' = w2^w1, w1' = w1^w0 and
// w0' = w0 ^ SubWord(RotWord(w3')) ^ rcon. Purely combinational; uses the
// normal S-box in both the normal and the inverted core, since the key is not
// complemented. The on-the-fly backward schedule is this design's choice.
module aes_inv_key_step
  import aes_pkg::*;
(
  input  block_t key_i,
  input  byte_t  rcon_i,
  output block_t key_o
);

  logic [31:0] w0, w1, w2, w3, p1, p2, p3, rot, sub;

  assign {w0, w1, w2, w3} = key_i;
  assign p1  = w1 ^ w0;
  assign p2  = w2 ^ w1;
  assign p3  = w3 ^ w2;
  assign rot = {p3[23:0], p3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox #(.INVERTED(1'b0)) u_sbox (.a(rot[31 - 8*i -: 8]), .y(sub[31 - 8*i -: 8]));
  end

  assign key_o = {w0 ^ sub ^ {rcon_i, 24'h0}, p1, p2, p3};

endmodule
