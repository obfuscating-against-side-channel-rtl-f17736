// aes_core: iterative AES-128 encryption and decryption core with system-level precharge and
// randomised state storage.
//
// One AES round is evaluated per (enabled) clock cycle. After a key load and a
// data load, eleven round cycles produce the eleven intermediate values of AES:
// round 0 (plaintext XOR cipher key) and rounds 1..10, the last one without
// MixColumns. Round keys are expanded on the fly, one step per round cycle.
//
// HD_PROTECT = 1 adds the document's Hamming-distance countermeasures:
//  * precharge: between two round cycles one extra cycle drives all-zero data
//    and an all-zero key into the round logic, so the round logic switches from
//    zero to each value instead of from one round value to the next (10 extra
//    cycles per block);
//  * randomised storage: each round result is written into one of SLOTS state
//    registers picked by slot_i (an LFSR outside) and read back from there.
// INVERTED = 1 builds the inverted copy used for bit-balancing: it uses the
// inverted-rotated S-box and must be fed the complemented plaintext (the cipher
// key is not complemented); all its intermediate values and its output are then
// the bitwise complement of those of the normal copy.
//
// Interface: krdy_i and drdy_i are one-cycle request pulses that may arrive in
// any system-clock cycle; they are remembered and served at the next cycle with
// ce_i high (ce_i is the random-clock enable, or tied high). key_i and din_i must
// stay stable until the request has been served (kvld_o rises, busy_o rises).
// dec_i, sampled with the data request, selects decryption: round 0 adds the
// last round key KD, then ten inverse rounds (aes_decrypt) use the round keys
// backwards, generated on the fly by aes_inv_key_step. KD is derived from the
// cipher key in the background: after a key load the forward schedule runs for
// ten enabled cycles (kdvld_o low); a decryption request waits for it, an
// encryption does not. Decryption has the same cycle count as encryption.
// A key load takes one enabled cycle, a data load one more, then 11 round cycles
// (21 with precharge): 13 (23) enabled cycles from key request to dvld_o, as in
// the document's cycle counts. dout_o holds the ciphertext while dvld_o is high.
// A data request without a loaded key waits for the key; one that arrives while
// busy_o is high is a protocol error (assertion) and is served afterwards.
// Data registers reset to zero (to all ones in the inverted copy, keeping the
// pair complementary). Reset is synchronous, active low. The request buffering,
// the status outputs and the reset values are this design's choices.
module aes_core
  import aes_pkg::*;
#(
  parameter bit          INVERTED   = 1'b0,
  parameter bit          HD_PROTECT = 1'b1,
  parameter int unsigned SLOTS      = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce_i,
  input  logic       krdy_i,
  input  logic       drdy_i,
  input  logic       dec_i,         // 1: decrypt the block of this request
  input  block_t     key_i,
  input  block_t     din_i,
  input  logic [1:0] slot_i,
  output block_t     dout_o,
  output logic       kvld_o,
  output logic       kdvld_o,       // decryption key KD ready
  output logic       dvld_o,
  output logic       busy_o,
  output logic       precharge_o,   // high in a precharge cycle
  output logic [3:0] round_o        // round evaluated in the current cycle
);

  localparam int unsigned NSLOT = HD_PROTECT ? SLOTS : 1;
  localparam int unsigned SW    = (NSLOT > 1) ? $clog2(NSLOT) : 1;
  // Reset value of the data registers: the inverted copy starts at all ones.
  localparam block_t      DINIT = INVERTED ? '1 : '0;

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_PRECHARGE} phase_t;

  phase_t     phase;
  logic       kpend, dpend;     // requests waiting for an enabled cycle
  logic       kreq, dreq;
  block_t     key_reg;          // cipher key
  block_t     din_reg;          // input block
  block_t     rk;               // round key of the current round
  byte_t      rc;               // round constant of the next key step
  logic [3:0] rnd;
  block_t     rk_next, rk_prev;
  logic       dec_q;            // mode of the block in flight
  block_t     kd_reg;           // decryption key (last round key)
  byte_t      kd_rc;
  logic [3:0] kd_cnt;           // forward key steps still to do
  block_t     kd_next;
  block_t     dec_out;
  block_t     round_in, round_key, round_out, arkey_out, result;
  block_t     store_q;
  logic       store_we;
  logic [SW-1:0] store_sel;

  assign kreq = kpend | krdy_i;
  assign dreq = dpend | drdy_i;

  // Round inputs; all zero in a precharge cycle.
  always_comb begin
    if (phase == S_ROUND) begin
      round_in  = (rnd == 4'd0) ? din_reg : store_q;
      round_key = rk;
    end else begin
      round_in  = '0;
      round_key = '0;
    end
  end

  aes_round #(.INVERTED(INVERTED)) u_round (
    .state_i(round_in),
    .rkey_i (round_key),
    .last_i (rnd == 4'(NR)),
    .state_o(round_out)
  );

  // Round 0 is AddRoundKey alone.
  assign arkey_out = round_in ^ round_key;
  assign result    = (rnd == 4'd0) ? arkey_out : (dec_q ? dec_out : round_out);

  aes_decrypt #(.INVERTED(INVERTED)) u_dec_round (
    .state_i(round_in),
    .rkey_i (round_key),
    .last_i (rnd == 4'(NR)),
    .state_o(dec_out)
  );

  aes_key_step     u_key_step     (.key_i(rk),     .rcon_i(rc),    .key_o(rk_next));
  aes_inv_key_step u_inv_key_step (.key_i(rk),     .rcon_i(rc),    .key_o(rk_prev));
  aes_key_step     u_kd_step      (.key_i(kd_reg), .rcon_i(kd_rc), .key_o(kd_next));

  assign kdvld_o = kvld_o && (kd_cnt == 4'd0);

  assign store_we  = ce_i && (phase == S_ROUND);
  assign store_sel = SW'(slot_i);

  state_store #(.SLOTS(NSLOT), .INIT(DINIT)) u_store (
    .clk  (clk),
    .rst_n(rst_n),
    .we_i (store_we),
    .sel_i(store_sel),
    .d_i  (result),
    .q_o  (store_q)
  );

  assign dout_o      = store_q;
  assign busy_o      = (phase != S_IDLE);
  assign precharge_o = (phase == S_PRECHARGE);
  assign round_o     = rnd;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= S_IDLE;
      kpend   <= 1'b0;
      dpend   <= 1'b0;
      key_reg <= '0;
      din_reg <= DINIT;
      rk      <= '0;
      rc      <= 8'h01;
      rnd     <= '0;
      dec_q   <= 1'b0;
      kd_reg  <= '0;
      kd_rc   <= 8'h01;
      kd_cnt  <= '0;
      kvld_o  <= 1'b0;
      dvld_o  <= 1'b0;
    end else begin
      kpend <= kreq;
      dpend <= dreq;
      if (ce_i) begin
        if (kd_cnt != 4'd0) begin
          kd_reg <= kd_next;
          kd_rc  <= xtime(kd_rc);
          kd_cnt <= kd_cnt - 4'd1;
        end
        unique case (phase)
          S_IDLE: begin
            if (kreq) begin
              key_reg <= key_i;
              kd_reg  <= key_i;
              kd_rc   <= 8'h01;
              kd_cnt  <= 4'(NR);
              kvld_o  <= 1'b1;
              kpend   <= 1'b0;
            end else if (dreq && kvld_o && (!dec_i || kd_cnt == 4'd0)) begin
              din_reg <= din_i;
              dec_q   <= dec_i;
              rk      <= dec_i ? kd_reg : key_reg;
              rc      <= dec_i ? rcon(NR) : 8'h01;
              rnd     <= '0;
              dvld_o  <= 1'b0;
              dpend   <= 1'b0;
              phase   <= S_ROUND;
            end
          end
          S_ROUND: begin
            rk  <= dec_q ? rk_prev : rk_next;
            rc  <= dec_q ? xtime_inv(rc) : xtime(rc);
            if (rnd == 4'(NR)) begin
              dvld_o <= 1'b1;
              rnd    <= '0;
              phase  <= S_IDLE;
            end else begin
              rnd   <= rnd + 4'd1;
              phase <= HD_PROTECT ? S_PRECHARGE : S_ROUND;
            end
          end
          S_PRECHARGE: phase <= S_ROUND;
          default:     phase <= S_IDLE;
        endcase
      end
    end
  end

  // A new block may only be requested while the core is idle.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) drdy_i |-> !busy_o);

endmodule
