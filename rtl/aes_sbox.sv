// aes_sbox: one-byte SubBytes lookup for the normal or the inverted AES copy.
//
// With INVERTED = 0 this is the standard AES S-box. With INVERTED = 1 it is the
// inverted-rotated table of the bit-balanced design: every output is complemented
// and the table is indexed by the complemented input, so y = ~S(~a). Fed with the
// complement of a byte, the inverted copy therefore returns the complement of the
// normal S-box output, which is what keeps every intermediate value of the
// inverted AES copy the exact bitwise inverse of the normal one.
// Both tables come from the document (normal table and its inverted-rotated
// version); here they are held as 256-entry constants in aes_pkg.
// Purely combinational; a = input byte, y = substituted byte.
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERTED = 1'b0
) (
  input  byte_t a,
  output byte_t y
);

  always_comb begin
    if (INVERTED) y = SBOX_INV_ROT[a];
    else          y = SBOX[a];
  end

endmodule
