// aes_regs: processor-side register interface of the DPA-resistant AES system.
//
// The host processor loads the key and the plaintext, issues commands and reads
// back the ciphertext through 32-bit slave registers on a simple synchronous bus
// (write strobe, word address, write data; read data is combinational on the
// address). Register map (word addresses):
//   0      CTRL   write: bit0 KRDY (load key), bit1 DRDY (load block and start),
//                        bit2 SRST (reset the AES cores), bit3 DEC (with
//                        DRDY: decrypt the block instead of encrypting it);
//                        bits are one-shot
//                 read : bit0 busy, bit1 dvld (ciphertext valid), bit2 kvld
//   1..4   KEY    cipher key, word 1 = key[127:96] ... word 4 = key[31:0] (write only)
//   5..8   DIN    plaintext,  word 5 = din[127:96] ... word 8 = din[31:0] (write only)
//   11..14 DOUT   ciphertext, word 11 = dout[127:96] ... word 14 = dout[31:0]
// The ciphertext at words 11..14 and the sequence reset / send key / send data /
// enable / read four words follow the document's host program; the bus
// protocol, the other addresses and the command bit positions are this design's
// choices. The core starts a block only at the next random-clock edge, so from
// DRDY until the core reports busy the start is held pending: status then reads
// busy and not dvld, so the host never mistakes the previous result for the new
// one. DRDY is dropped while busy (core busy or start pending), KRDY only while
// the core itself is busy, so a key can still follow a DRDY sent before it.
// stat_busy_o / stat_dvld_o are the two status bits as the host reads them. krdy_o, drdy_o and srst_o
// are registered one-cycle pulses, issued the cycle after the CTRL write.
module aes_regs
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_we_i,
  input  logic [3:0]  bus_addr_i,
  input  logic [31:0] bus_wdata_i,
  output logic [31:0] bus_rdata_o,
  output block_t      key_o,
  output block_t      din_o,
  output logic        krdy_o,
  output logic        drdy_o,
  output logic        dec_o,
  output logic        srst_o,
  input  block_t      dout_i,
  input  logic        busy_i,
  input  logic        dvld_i,
  input  logic        kvld_i,
  output logic        stat_busy_o,
  output logic        stat_dvld_o
);

  localparam logic [3:0] A_CTRL = 4'd0;
  localparam logic [3:0] A_KEY0 = 4'd1;
  localparam logic [3:0] A_DIN0 = 4'd5;
  localparam logic [3:0] A_OUT0 = 4'd11;

  logic ctrl_wr;
  logic start_pend;     // DRDY issued, core not yet busy
  logic busy_s, dvld_s; // status as the host sees it

  assign ctrl_wr = bus_we_i && (bus_addr_i == A_CTRL);
  assign busy_s  = busy_i || start_pend;
  assign dvld_s  = dvld_i && !start_pend;
  assign stat_busy_o = busy_s;
  assign stat_dvld_o = dvld_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      key_o  <= '0;
      din_o  <= '0;
      krdy_o <= 1'b0;
      drdy_o <= 1'b0;
      dec_o  <= 1'b0;
      srst_o <= 1'b0;
      start_pend <= 1'b0;
    end else begin
      krdy_o <= ctrl_wr && bus_wdata_i[0] && !busy_i;
      drdy_o <= ctrl_wr && bus_wdata_i[1] && !busy_s;
      if (ctrl_wr && bus_wdata_i[1] && !busy_s) dec_o <= bus_wdata_i[3];
      srst_o <= ctrl_wr && bus_wdata_i[2];
      if (drdy_o)                   start_pend <= 1'b1;
      else if (busy_i || srst_o)    start_pend <= 1'b0;
      if (bus_we_i) begin
        for (int w = 0; w < 4; w++) begin
          if (bus_addr_i == A_KEY0 + 4'(w)) key_o[127 - 32*w -: 32] <= bus_wdata_i;
          if (bus_addr_i == A_DIN0 + 4'(w)) din_o[127 - 32*w -: 32] <= bus_wdata_i;
        end
      end
    end
  end

  always_comb begin
    bus_rdata_o = '0;
    if (bus_addr_i == A_CTRL) bus_rdata_o = {29'd0, kvld_i, dvld_s, busy_s};
    for (int w = 0; w < 4; w++)
      if (bus_addr_i == A_OUT0 + 4'(w)) bus_rdata_o = dout_i[127 - 32*w -: 32];
  end

endmodule
