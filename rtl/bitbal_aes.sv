// bitbal_aes: system-level bit-balanced AES-128 encryptor and decryptor.
//
// Two iterative AES cores run in lockstep on the same clock enable: the normal
// core encrypts the plaintext, the inverted core encrypts its bitwise complement
// with the inverted-rotated S-box and the unchanged cipher key. Every register
// and every round-logic net of one core then carries the complement of its twin,
// so the summed Hamming weight of each intermediate value is constant (128 bits
// set out of 256). Both cores precharge their round logic with zero between
// rounds and store round results in one of four registers chosen by a shared
// 16-bit LFSR, which steps every system clock; its two low bits pick the slot.
// Using one LFSR for both cores keeps the twins' registers complementary; that
// sharing, and the LFSR polynomial and reset seed, are this design's choices.
// The document's own arrangement is followed for the rest: input inverted before
// the inverted core, key schedule untouched, ciphertext taken from the normal
// core while the inverted core yields its complement (dout_inv_o).
// Interface and timing are those of aes_core (23 enabled cycles from key request
// to dvld_o with HD_PROTECT = 1). dec_i selects decryption for both cores; the
// complement property then holds for the inverse rounds in the same way.
// Synchronous active-low reset.
module bitbal_aes
  import aes_pkg::*;
#(
  parameter bit HD_PROTECT = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ce_i,
  input  logic   krdy_i,
  input  logic   drdy_i,
  input  logic   dec_i,           // 1: decrypt (same for both cores)
  input  block_t key_i,
  input  block_t din_i,
  output block_t dout_o,
  output block_t dout_inv_o,
  output logic   kvld_o,
  output logic   kdvld_o,         // decryption key ready
  output logic   dvld_o,
  output logic   busy_o,
  output logic   precharge_o,
  output logic [1:0] slot_o        // state register chosen in this cycle
);

  logic [15:0] slot_lfsr;
  logic        kvld_i, dvld_i, busy_i, kdvld_i;

  lfsr16 #(.RESET_VAL(16'h3C5A)) u_slot_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load_i(1'b0),
    .seed_i(16'h0),
    .en_i  (1'b1),
    .q_o   (slot_lfsr)
  );

  assign slot_o = slot_lfsr[1:0];

  aes_core #(.INVERTED(1'b0), .HD_PROTECT(HD_PROTECT)) u_core_norm (
    .clk        (clk),
    .rst_n      (rst_n),
    .ce_i       (ce_i),
    .krdy_i     (krdy_i),
    .drdy_i     (drdy_i),
    .dec_i      (dec_i),
    .key_i      (key_i),
    .din_i      (din_i),
    .slot_i     (slot_o),
    .dout_o     (dout_o),
    .kvld_o     (kvld_o),
    .kdvld_o    (kdvld_o),
    .dvld_o     (dvld_o),
    .busy_o     (busy_o),
    .precharge_o(precharge_o),
    .round_o    ()
  );

  aes_core #(.INVERTED(1'b1), .HD_PROTECT(HD_PROTECT)) u_core_inv (
    .clk        (clk),
    .rst_n      (rst_n),
    .ce_i       (ce_i),
    .krdy_i     (krdy_i),
    .drdy_i     (drdy_i),
    .dec_i      (dec_i),
    .key_i      (key_i),
    .din_i      (~din_i),
    .slot_i     (slot_o),
    .dout_o     (dout_inv_o),
    .kvld_o     (kvld_i),
    .kdvld_o    (kdvld_i),
    .dvld_o     (dvld_i),
    .busy_o     (busy_i),
    .precharge_o(),
    .round_o    ()
  );

  // The twins never drift apart.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               kvld_i == kvld_o && kdvld_i == kdvld_o && dvld_i == dvld_o && busy_i == busy_o);
  a_complement: assert property (@(posedge clk) disable iff (!rst_n)
                                 dvld_o |-> dout_inv_o == ~dout_o);

endmodule
