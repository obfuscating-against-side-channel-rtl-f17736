// lfsr16: 16-bit Fibonacci linear feedback shift register.
//
// Pseudo-random source for the random clock generator and for the choice of
// state register in the bit-balanced cores. The document specifies a 16-bit
// LFSR that is reseeded at the start of each encryption; the feedback
// polynomial x^16 + x^15 + x^13 + x^4 + 1 (maximal length, period 65535) is this
// design's choice. Each enabled clock shifts left by one and inserts
// q[15]^q[14]^q[12]^q[3] at bit 0.
// A load (priority over en) copies seed_i; an all-zero seed, which would lock
// the register, is replaced by 16'h0001. Synchronous active-low reset to RESET_VAL.
module lfsr16 #(
  parameter logic [15:0] RESET_VAL = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_i,
  input  logic [15:0] seed_i,
  input  logic        en_i,
  output logic [15:0] q_o
);

  logic fb;

  assign fb = q_o[15] ^ q_o[14] ^ q_o[12] ^ q_o[3];

  always_ff @(posedge clk) begin
    if (!rst_n)      q_o <= RESET_VAL;
    else if (load_i) q_o <= (seed_i == 16'h0) ? 16'h0001 : seed_i;
    else if (en_i)   q_o <= {q_o[14:0], fb};
  end

endmodule
