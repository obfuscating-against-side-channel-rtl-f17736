// dpa_aes_top: AES-128 encryptor and decryptor hardened against power and EM side-channel
// analysis by two hiding countermeasures used together.
//
//  * Bit-balancing (bitbal_aes): a normal and an inverted AES core run side by
//    side on the data and its complement, so the Hamming weight of every
//    intermediate value is balanced; zero precharge cycles between rounds and
//    randomly chosen state registers blunt Hamming-distance leakage.
//  * Random clocking (rclkgen): the cores advance only on the rising edges of a
//    random clock whose period is 3, 4, 5 or 6 system clocks, picked afresh every
//    cycle from a 16-bit LFSR, so traces of different encryptions do not align.
//    The LFSR is reseeded at the start of every encryption from a free-running
//    seed LFSR (the seed source is this design's choice).
// The host processor drives the bus ports (see aes_regs for the register map).
// Decryption (CTRL bit DEC) runs the same way with the inverse rounds.
// A block takes 23 random-clock cycles from key request to result (13 without
// precharge), i.e. 69..138 system clocks. rclk_o is the random clock, brought
// out for observation; busy_o and dvld_o mirror the status register.
// Everything runs on clk; the random clock acts as a clock enable of the cores.
// Reset is synchronous and active low; SRST in the control register resets only
// the AES cores.
module dpa_aes_top
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_we_i,
  input  logic [3:0]  bus_addr_i,
  input  logic [31:0] bus_wdata_i,
  output logic [31:0] bus_rdata_o,
  output logic        rclk_o,
  output logic        busy_o,
  output logic        dvld_o
);

  block_t      key, din, dout, dout_inv;
  logic        krdy, drdy, dec, srst, kvld, core_busy, core_dvld;
  logic        core_rst_n;
  logic        rclk_en;
  logic [15:0] seed;

  aes_regs u_regs (
    .clk        (clk),
    .rst_n      (rst_n),
    .bus_we_i   (bus_we_i),
    .bus_addr_i (bus_addr_i),
    .bus_wdata_i(bus_wdata_i),
    .bus_rdata_o(bus_rdata_o),
    .key_o      (key),
    .din_o      (din),
    .krdy_o     (krdy),
    .drdy_o     (drdy),
    .dec_o      (dec),
    .srst_o     (srst),
    .dout_i     (dout),
    .busy_i     (core_busy),
    .dvld_i     (core_dvld),
    .kvld_i     (kvld),
    .stat_busy_o(busy_o),
    .stat_dvld_o(dvld_o)
  );

  // Free-running source of the per-encryption seed.
  lfsr16 #(.RESET_VAL(16'h1D2B)) u_seed_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load_i(1'b0),
    .seed_i(16'h0),
    .en_i  (1'b1),
    .q_o   (seed)
  );

  rclkgen u_rclkgen (
    .clk      (clk),
    .rst_n    (rst_n),
    .lds_i    (drdy),
    .seed_i   (seed),
    .rclk_o   (rclk_o),
    .rclk_en_o(rclk_en),
    .period_o ()
  );

  assign core_rst_n = rst_n && !srst;

  bitbal_aes u_bitbal (
    .clk        (clk),
    .rst_n      (core_rst_n),
    .ce_i       (rclk_en),
    .krdy_i     (krdy),
    .drdy_i     (drdy),
    .dec_i      (dec),
    .key_i      (key),
    .din_i      (din),
    .dout_o     (dout),
    .dout_inv_o (dout_inv),
    .kvld_o     (kvld),
    .kdvld_o    (),
    .dvld_o     (core_dvld),
    .busy_o     (core_busy),
    .precharge_o(),
    .slot_o     ()
  );

endmodule
