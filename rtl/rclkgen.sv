// rclkgen: random clock generator (clock-period randomisation countermeasure).
//
// Every cycle of the random clock lasts 3, 4, 5 or 6 cycles of the system clock,
// i.e. its frequency varies between 33 % and 16.7 % of the system clock, so the
// round operations of the AES cores never line up from one trace to the next.
// The period of the next random cycle is chosen by polling the 16-bit LFSR twice
// at the end of the current one: on the second-to-last system cycle the LFSR's
// top bit is sampled and the LFSR steps, on the last system cycle the top bit is
// sampled again and the LFSR steps again; the two bits b1 b0 give the new period
// 3 + {b1,b0}. The 3x..6x range, the 16-bit LFSR, the two polls and the reseed at
// the start of each encryption (lds_i with seed_i) follow the document; which
// LFSR bit is polled and the duty cycle are this design's choices.
//
// Outputs: rclk_o is the random clock itself, a register output, high for the
// first floor(P/2) system cycles of a P-cycle period. rclk_en_o is high during
// the system-clock cycle that ends with a rising edge of rclk_o; the AES cores
// use it as a clock enable, so their registers change exactly at the rising
// edges of the random clock while the whole design stays in one clock domain.
// period_o is the length of the random cycle in progress.
module rclkgen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        lds_i,      // load seed (start of an encryption)
  input  logic [15:0] seed_i,
  output logic        rclk_o,
  output logic        rclk_en_o,
  output logic [2:0]  period_o
);

  logic [2:0]  cnt;       // system cycles elapsed in the current random cycle
  logic [2:0]  len;       // length of the current random cycle, 3..6
  logic        poll0;     // first polled bit
  logic        poll1_pt, poll2_pt;
  logic [15:0] lfsr_q;
  logic [2:0]  len_next;

  assign poll1_pt  = (cnt == len - 3'd2);
  assign poll2_pt  = (cnt == len - 3'd1);
  assign rclk_en_o = poll2_pt;
  assign period_o  = len;
  assign len_next  = 3'd3 + {1'b0, poll0, lfsr_q[15]};

  lfsr16 #(.RESET_VAL(16'h7575)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load_i(lds_i),
    .seed_i(seed_i),
    .en_i  (poll1_pt || poll2_pt),
    .q_o   (lfsr_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= 3'd0;
      len    <= 3'd3;
      poll0  <= 1'b0;
      rclk_o <= 1'b1;
    end else begin
      if (poll1_pt) poll0 <= lfsr_q[15];
      if (poll2_pt) begin
        cnt    <= 3'd0;
        len    <= len_next;
        rclk_o <= 1'b1;
      end else begin
        cnt    <= cnt + 3'd1;
        rclk_o <= ({1'b0, cnt} + 4'd1) < {1'b0, len >> 1};
      end
    end
  end

  // The period always lies in the 3x..6x range.
  a_len_range: assert property (@(posedge clk) disable iff (!rst_n) len >= 3'd3 && len <= 3'd6);

endmodule
