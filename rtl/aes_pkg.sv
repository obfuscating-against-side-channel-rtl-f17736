// aes_pkg: types, tables and pure functions shared by the AES-128 datapath.
//
// The state is a 128-bit vector in the FIPS-197 byte order: byte 0 (bits 127:120)
// is row 0 / column 0, byte 1 is row 1 / column 0, and so on column by column.
// Two substitution tables are held here. SBOX is the standard AES S-box (the
// multiplicative inverse in GF(2^8) followed by the affine map). SBOX_INV_ROT is
// the table used by the inverted-data AES copy of the bit-balanced design:
// SBOX_INV_ROT[x] = ~SBOX[~x]. Every entry is inverted and the index is inverted
// (the table is "rotated" end to end), so a complemented input byte gives the
// complemented S-box output. It is not the decryption S-box; INV_SBOX and
// INV_SBOX_INV_ROT are the decryption S-box and its inverted-rotated form.
// InvMixColumns (coefficients 0e,0b,0d,09, summing to 01) also keeps the
// complement.
// ShiftRows, MixColumns and AddRoundKey are linear and keep the complement of
// their input, so only the S-box table differs between the two copies.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [127:0] block_t;

  // Rounds of AES-128.
  localparam int unsigned NR = 10;

  localparam byte_t SBOX [256] = '{
    8'h63, 8'h7c, 8'h77, 8'h7b, 8'hf2, 8'h6b, 8'h6f, 8'hc5, 8'h30, 8'h01, 8'h67, 8'h2b, 8'hfe, 8'hd7, 8'hab, 8'h76,
    8'hca, 8'h82, 8'hc9, 8'h7d, 8'hfa, 8'h59, 8'h47, 8'hf0, 8'had, 8'hd4, 8'ha2, 8'haf, 8'h9c, 8'ha4, 8'h72, 8'hc0,
    8'hb7, 8'hfd, 8'h93, 8'h26, 8'h36, 8'h3f, 8'hf7, 8'hcc, 8'h34, 8'ha5, 8'he5, 8'hf1, 8'h71, 8'hd8, 8'h31, 8'h15,
    8'h04, 8'hc7, 8'h23, 8'hc3, 8'h18, 8'h96, 8'h05, 8'h9a, 8'h07, 8'h12, 8'h80, 8'he2, 8'heb, 8'h27, 8'hb2, 8'h75,
    8'h09, 8'h83, 8'h2c, 8'h1a, 8'h1b, 8'h6e, 8'h5a, 8'ha0, 8'h52, 8'h3b, 8'hd6, 8'hb3, 8'h29, 8'he3, 8'h2f, 8'h84,
    8'h53, 8'hd1, 8'h00, 8'hed, 8'h20, 8'hfc, 8'hb1, 8'h5b, 8'h6a, 8'hcb, 8'hbe, 8'h39, 8'h4a, 8'h4c, 8'h58, 8'hcf,
    8'hd0, 8'hef, 8'haa, 8'hfb, 8'h43, 8'h4d, 8'h33, 8'h85, 8'h45, 8'hf9, 8'h02, 8'h7f, 8'h50, 8'h3c, 8'h9f, 8'ha8,
    8'h51, 8'ha3, 8'h40, 8'h8f, 8'h92, 8'h9d, 8'h38, 8'hf5, 8'hbc, 8'hb6, 8'hda, 8'h21, 8'h10, 8'hff, 8'hf3, 8'hd2,
    8'hcd, 8'h0c, 8'h13, 8'hec, 8'h5f, 8'h97, 8'h44, 8'h17, 8'hc4, 8'ha7, 8'h7e, 8'h3d, 8'h64, 8'h5d, 8'h19, 8'h73,
    8'h60, 8'h81, 8'h4f, 8'hdc, 8'h22, 8'h2a, 8'h90, 8'h88, 8'h46, 8'hee, 8'hb8, 8'h14, 8'hde, 8'h5e, 8'h0b, 8'hdb,
    8'he0, 8'h32, 8'h3a, 8'h0a, 8'h49, 8'h06, 8'h24, 8'h5c, 8'hc2, 8'hd3, 8'hac, 8'h62, 8'h91, 8'h95, 8'he4, 8'h79,
    8'he7, 8'hc8, 8'h37, 8'h6d, 8'h8d, 8'hd5, 8'h4e, 8'ha9, 8'h6c, 8'h56, 8'hf4, 8'hea, 8'h65, 8'h7a, 8'hae, 8'h08,
    8'hba, 8'h78, 8'h25, 8'h2e, 8'h1c, 8'ha6, 8'hb4, 8'hc6, 8'he8, 8'hdd, 8'h74, 8'h1f, 8'h4b, 8'hbd, 8'h8b, 8'h8a,
    8'h70, 8'h3e, 8'hb5, 8'h66, 8'h48, 8'h03, 8'hf6, 8'h0e, 8'h61, 8'h35, 8'h57, 8'hb9, 8'h86, 8'hc1, 8'h1d, 8'h9e,
    8'he1, 8'hf8, 8'h98, 8'h11, 8'h69, 8'hd9, 8'h8e, 8'h94, 8'h9b, 8'h1e, 8'h87, 8'he9, 8'hce, 8'h55, 8'h28, 8'hdf,
    8'h8c, 8'ha1, 8'h89, 8'h0d, 8'hbf, 8'he6, 8'h42, 8'h68, 8'h41, 8'h99, 8'h2d, 8'h0f, 8'hb0, 8'h54, 8'hbb, 8'h16
  };
  localparam byte_t SBOX_INV_ROT [256] = '{
    8'he9, 8'h44, 8'hab, 8'h4f, 8'hf0, 8'hd2, 8'h66, 8'hbe, 8'h97, 8'hbd, 8'h19, 8'h40, 8'hf2, 8'h76, 8'h5e, 8'h73,
    8'h20, 8'hd7, 8'haa, 8'h31, 8'h16, 8'h78, 8'he1, 8'h64, 8'h6b, 8'h71, 8'h26, 8'h96, 8'hee, 8'h67, 8'h07, 8'h1e,
    8'h61, 8'he2, 8'h3e, 8'h79, 8'h46, 8'ha8, 8'hca, 8'h9e, 8'hf1, 8'h09, 8'hfc, 8'hb7, 8'h99, 8'h4a, 8'hc1, 8'h8f,
    8'h75, 8'h74, 8'h42, 8'hb4, 8'he0, 8'h8b, 8'h22, 8'h17, 8'h39, 8'h4b, 8'h59, 8'he3, 8'hd1, 8'hda, 8'h87, 8'h45,
    8'hf7, 8'h51, 8'h85, 8'h9a, 8'h15, 8'h0b, 8'ha9, 8'h93, 8'h56, 8'hb1, 8'h2a, 8'h72, 8'h92, 8'hc8, 8'h37, 8'h18,
    8'h86, 8'h1b, 8'h6a, 8'h6e, 8'h9d, 8'h53, 8'h2c, 8'h3d, 8'ha3, 8'hdb, 8'hf9, 8'hb6, 8'hf5, 8'hc5, 8'hcd, 8'h1f,
    8'h24, 8'hf4, 8'ha1, 8'h21, 8'heb, 8'h47, 8'h11, 8'hb9, 8'h77, 8'h6f, 8'hd5, 8'hdd, 8'h23, 8'hb0, 8'h7e, 8'h9f,
    8'h8c, 8'he6, 8'ha2, 8'h9b, 8'hc2, 8'h81, 8'h58, 8'h3b, 8'he8, 8'hbb, 8'h68, 8'ha0, 8'h13, 8'hec, 8'hf3, 8'h32,
    8'h2d, 8'h0c, 8'h00, 8'hef, 8'hde, 8'h25, 8'h49, 8'h43, 8'h0a, 8'hc7, 8'h62, 8'h6d, 8'h70, 8'hbf, 8'h5c, 8'hae,
    8'h57, 8'h60, 8'hc3, 8'haf, 8'h80, 8'hfd, 8'h06, 8'hba, 8'h7a, 8'hcc, 8'hb2, 8'hbc, 8'h04, 8'h55, 8'h10, 8'h2f,
    8'h30, 8'ha7, 8'hb3, 8'hb5, 8'hc6, 8'h41, 8'h34, 8'h95, 8'ha4, 8'h4e, 8'h03, 8'hdf, 8'h12, 8'hff, 8'h2e, 8'hac,
    8'h7b, 8'hd0, 8'h1c, 8'hd6, 8'h4c, 8'h29, 8'hc4, 8'had, 8'h5f, 8'ha5, 8'h91, 8'he4, 8'he5, 8'hd3, 8'h7c, 8'hf6,
    8'h8a, 8'h4d, 8'hd8, 8'h14, 8'h1d, 8'h7f, 8'hed, 8'hf8, 8'h65, 8'hfa, 8'h69, 8'he7, 8'h3c, 8'hdc, 8'h38, 8'hfb,
    8'hea, 8'hce, 8'h27, 8'h8e, 8'h0e, 8'h1a, 8'h5a, 8'hcb, 8'h33, 8'h08, 8'hc0, 8'hc9, 8'hd9, 8'h6c, 8'h02, 8'h48,
    8'h3f, 8'h8d, 8'h5b, 8'h63, 8'h50, 8'h5d, 8'h2b, 8'h52, 8'h0f, 8'hb8, 8'ha6, 8'h05, 8'h82, 8'h36, 8'h7d, 8'h35,
    8'h89, 8'h54, 8'h28, 8'h01, 8'hd4, 8'h98, 8'hfe, 8'hcf, 8'h3a, 8'h90, 8'h94, 8'h0d, 8'h84, 8'h88, 8'h83, 8'h9c
  };

  // Decryption tables: INV_SBOX is the inverse S-box, INV_SBOX_INV_ROT[x] =
  // ~INV_SBOX[~x] its inverted-rotated form for the inverted copy.
  localparam byte_t INV_SBOX [256] = '{
    8'h52, 8'h09, 8'h6a, 8'hd5, 8'h30, 8'h36, 8'ha5, 8'h38, 8'hbf, 8'h40, 8'ha3, 8'h9e, 8'h81, 8'hf3, 8'hd7, 8'hfb,
    8'h7c, 8'he3, 8'h39, 8'h82, 8'h9b, 8'h2f, 8'hff, 8'h87, 8'h34, 8'h8e, 8'h43, 8'h44, 8'hc4, 8'hde, 8'he9, 8'hcb,
    8'h54, 8'h7b, 8'h94, 8'h32, 8'ha6, 8'hc2, 8'h23, 8'h3d, 8'hee, 8'h4c, 8'h95, 8'h0b, 8'h42, 8'hfa, 8'hc3, 8'h4e,
    8'h08, 8'h2e, 8'ha1, 8'h66, 8'h28, 8'hd9, 8'h24, 8'hb2, 8'h76, 8'h5b, 8'ha2, 8'h49, 8'h6d, 8'h8b, 8'hd1, 8'h25,
    8'h72, 8'hf8, 8'hf6, 8'h64, 8'h86, 8'h68, 8'h98, 8'h16, 8'hd4, 8'ha4, 8'h5c, 8'hcc, 8'h5d, 8'h65, 8'hb6, 8'h92,
    8'h6c, 8'h70, 8'h48, 8'h50, 8'hfd, 8'hed, 8'hb9, 8'hda, 8'h5e, 8'h15, 8'h46, 8'h57, 8'ha7, 8'h8d, 8'h9d, 8'h84,
    8'h90, 8'hd8, 8'hab, 8'h00, 8'h8c, 8'hbc, 8'hd3, 8'h0a, 8'hf7, 8'he4, 8'h58, 8'h05, 8'hb8, 8'hb3, 8'h45, 8'h06,
    8'hd0, 8'h2c, 8'h1e, 8'h8f, 8'hca, 8'h3f, 8'h0f, 8'h02, 8'hc1, 8'haf, 8'hbd, 8'h03, 8'h01, 8'h13, 8'h8a, 8'h6b,
    8'h3a, 8'h91, 8'h11, 8'h41, 8'h4f, 8'h67, 8'hdc, 8'hea, 8'h97, 8'hf2, 8'hcf, 8'hce, 8'hf0, 8'hb4, 8'he6, 8'h73,
    8'h96, 8'hac, 8'h74, 8'h22, 8'he7, 8'had, 8'h35, 8'h85, 8'he2, 8'hf9, 8'h37, 8'he8, 8'h1c, 8'h75, 8'hdf, 8'h6e,
    8'h47, 8'hf1, 8'h1a, 8'h71, 8'h1d, 8'h29, 8'hc5, 8'h89, 8'h6f, 8'hb7, 8'h62, 8'h0e, 8'haa, 8'h18, 8'hbe, 8'h1b,
    8'hfc, 8'h56, 8'h3e, 8'h4b, 8'hc6, 8'hd2, 8'h79, 8'h20, 8'h9a, 8'hdb, 8'hc0, 8'hfe, 8'h78, 8'hcd, 8'h5a, 8'hf4,
    8'h1f, 8'hdd, 8'ha8, 8'h33, 8'h88, 8'h07, 8'hc7, 8'h31, 8'hb1, 8'h12, 8'h10, 8'h59, 8'h27, 8'h80, 8'hec, 8'h5f,
    8'h60, 8'h51, 8'h7f, 8'ha9, 8'h19, 8'hb5, 8'h4a, 8'h0d, 8'h2d, 8'he5, 8'h7a, 8'h9f, 8'h93, 8'hc9, 8'h9c, 8'hef,
    8'ha0, 8'he0, 8'h3b, 8'h4d, 8'hae, 8'h2a, 8'hf5, 8'hb0, 8'hc8, 8'heb, 8'hbb, 8'h3c, 8'h83, 8'h53, 8'h99, 8'h61,
    8'h17, 8'h2b, 8'h04, 8'h7e, 8'hba, 8'h77, 8'hd6, 8'h26, 8'he1, 8'h69, 8'h14, 8'h63, 8'h55, 8'h21, 8'h0c, 8'h7d
  };
  localparam byte_t INV_SBOX_INV_ROT [256] = '{
    8'h82, 8'hf3, 8'hde, 8'haa, 8'h9c, 8'heb, 8'h96, 8'h1e, 8'hd9, 8'h29, 8'h88, 8'h45, 8'h81, 8'hfb, 8'hd4, 8'he8,
    8'h9e, 8'h66, 8'hac, 8'h7c, 8'hc3, 8'h44, 8'h14, 8'h37, 8'h4f, 8'h0a, 8'hd5, 8'h51, 8'hb2, 8'hc4, 8'h1f, 8'h5f,
    8'h10, 8'h63, 8'h36, 8'h6c, 8'h60, 8'h85, 8'h1a, 8'hd2, 8'hf2, 8'hb5, 8'h4a, 8'he6, 8'h56, 8'h80, 8'hae, 8'h9f,
    8'ha0, 8'h13, 8'h7f, 8'hd8, 8'ha6, 8'hef, 8'hed, 8'h4e, 8'hce, 8'h38, 8'hf8, 8'h77, 8'hcc, 8'h57, 8'h22, 8'he0,
    8'h0b, 8'ha5, 8'h32, 8'h87, 8'h01, 8'h3f, 8'h24, 8'h65, 8'hdf, 8'h86, 8'h2d, 8'h39, 8'hb4, 8'hc1, 8'ha9, 8'h03,
    8'he4, 8'h41, 8'he7, 8'h55, 8'hf1, 8'h9d, 8'h48, 8'h90, 8'h76, 8'h3a, 8'hd6, 8'he2, 8'h8e, 8'he5, 8'h0e, 8'hb8,
    8'h91, 8'h20, 8'h8a, 8'he3, 8'h17, 8'hc8, 8'h06, 8'h1d, 8'h7a, 8'hca, 8'h52, 8'h18, 8'hdd, 8'h8b, 8'h53, 8'h69,
    8'h8c, 8'h19, 8'h4b, 8'h0f, 8'h31, 8'h30, 8'h0d, 8'h68, 8'h15, 8'h23, 8'h98, 8'hb0, 8'hbe, 8'hee, 8'h6e, 8'hc5,
    8'h94, 8'h75, 8'hec, 8'hfe, 8'hfc, 8'h42, 8'h50, 8'h3e, 8'hfd, 8'hf0, 8'hc0, 8'h35, 8'h70, 8'he1, 8'hd3, 8'h2f,
    8'hf9, 8'hba, 8'h4c, 8'h47, 8'hfa, 8'ha7, 8'h1b, 8'h08, 8'hf5, 8'h2c, 8'h43, 8'h73, 8'hff, 8'h54, 8'h27, 8'h6f,
    8'h7b, 8'h62, 8'h72, 8'h58, 8'ha8, 8'hb9, 8'hea, 8'ha1, 8'h25, 8'h46, 8'h12, 8'h02, 8'haf, 8'hb7, 8'h8f, 8'h93,
    8'h6d, 8'h49, 8'h9a, 8'ha2, 8'h33, 8'ha3, 8'h5b, 8'h2b, 8'he9, 8'h67, 8'h97, 8'h79, 8'h9b, 8'h09, 8'h07, 8'h8d,
    8'hda, 8'h2e, 8'h74, 8'h92, 8'hb6, 8'h5d, 8'ha4, 8'h89, 8'h4d, 8'hdb, 8'h26, 8'hd7, 8'h99, 8'h5e, 8'hd1, 8'hf7,
    8'hb1, 8'h3c, 8'h05, 8'hbd, 8'hf4, 8'h6a, 8'hb3, 8'h11, 8'hc2, 8'hdc, 8'h3d, 8'h59, 8'hcd, 8'h6b, 8'h84, 8'hab,
    8'h34, 8'h16, 8'h21, 8'h3b, 8'hbb, 8'hbc, 8'h71, 8'hcb, 8'h78, 8'h00, 8'hd0, 8'h64, 8'h7d, 8'hc6, 8'h1c, 8'h83,
    8'h04, 8'h28, 8'h0c, 8'h7e, 8'h61, 8'h5c, 8'hbf, 8'h40, 8'hc7, 8'h5a, 8'hc9, 8'hcf, 8'h2a, 8'h95, 8'hf6, 8'had
  };

  // Byte i of a state vector (i = 4*column + row).
  function automatic byte_t get_byte(block_t s, int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  // Multiplication by x (02) in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // ShiftRows: row r is rotated left by r byte positions.
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = s[127 - 8*(4*((c + r) % 4) + r) -: 8];
    return o;
  endfunction

  // MixColumns on one 32-bit column {a0,a1,a2,a3}.
  function automatic logic [31:0] mix_column(logic [31:0] col);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = col;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      o[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return o;
  endfunction

  // Round constant of key-expansion step r (r = 1..10).
  function automatic byte_t rcon(int unsigned r);
    byte_t v = 8'h01;
    for (int unsigned i = 1; i < r; i++) v = xtime(v);
    return v;
  endfunction

  // Multiplication by x^-1 in GF(2^8): steps the round constant backwards.
  function automatic byte_t xtime_inv(byte_t b);
    return b[0] ? ({1'b0, b[7:1]} ^ 8'h8d) : {1'b0, b[7:1]};
  endfunction

  // InvShiftRows: row r is rotated right by r byte positions.
  function automatic block_t inv_shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*((c + r) % 4) + r) -: 8] = s[127 - 8*(4*c + r) -: 8];
    return o;
  endfunction

  // InvMixColumns on one column: MixColumns after the pre-multiplication by
  // {04,00,05,00}, which together give the {0e,0b,0d,09} matrix.
  function automatic logic [31:0] inv_mix_column(logic [31:0] col);
    byte_t a0, a1, a2, a3, u, v;
    {a0, a1, a2, a3} = col;
    u = xtime(xtime(a0 ^ a2));
    v = xtime(xtime(a1 ^ a3));
    return mix_column({a0 ^ u, a1 ^ v, a2 ^ u, a3 ^ v});
  endfunction

  function automatic block_t inv_mix_columns(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      o[127 - 32*c -: 32] = inv_mix_column(s[127 - 32*c -: 32]);
    return o;
  endfunction

endpackage
