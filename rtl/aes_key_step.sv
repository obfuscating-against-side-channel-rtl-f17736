// aes_key_step: one step of the AES-128 key expansion, computed on the fly.
//
// From round key i and the round constant of step i+1 it forms round key i+1:
// the last word is rotated by one byte, passed through four S-boxes and XORed
// with the round constant, then the four words are chained by XOR. The iterative
// core registers the result once per round, so no expanded-key memory is needed
// (an implementation choice; the document only states that the key schedule is
// the standard one and is left untouched in the inverted AES copy, which is why
// the S-boxes here are always the normal table).
// Purely combinational.
module aes_key_step
  import aes_pkg::*;
(
  input  block_t key_i,
  input  byte_t  rcon_i,
  output block_t key_o
);

  logic [31:0] w0, w1, w2, w3, rot, sub, t;

  assign {w0, w1, w2, w3} = key_i;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox #(.INVERTED(1'b0)) u_sbox (.a(rot[31 - 8*i -: 8]), .y(sub[31 - 8*i -: 8]));
  end

  always_comb begin
    t     = sub ^ {rcon_i, 24'h0};
    key_o = {w0 ^ t, w0 ^ t ^ w1, w0 ^ t ^ w1 ^ w2, w0 ^ t ^ w1 ^ w2 ^ w3};
  end

endmodule
