// state_store: randomised storage of the AES state between rounds.
//
// To keep the state register from leaking the Hamming distance between
// consecutive round outputs, the round output is written into one of SLOTS
// 128-bit registers picked by an LFSR through a multiplexer, and the next round
// reads it back from the same register. An observer of one register therefore
// sees the data only about one time in SLOTS. SLOTS = 4 is the document's number;
// SLOTS = 1 gives a plain state register.
// Write: when we_i is high the word d_i goes to slot sel_i and that slot becomes
// the read slot. q_o always shows the last written slot (combinational read).
// Registers reset synchronously to INIT (all zero in the normal AES copy, all ones
// in the inverted one, so the two copies stay complementary from reset on). The
// slot pointer, the read-back path and the reset values are this design's choices.
module state_store
  import aes_pkg::*;
#(
  parameter int unsigned SLOTS = 4,
  parameter block_t      INIT  = '0,      // reset value of every slot
  // Width of the slot select; derived, not meant to be overridden.
  parameter int unsigned SW    = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we_i,
  input  logic [SW-1:0]      sel_i,
  input  block_t                     d_i,
  output block_t                     q_o
);

  block_t        regs [SLOTS];
  logic [SW-1:0] ptr;
  logic [SW-1:0] wsel;

  // Out-of-range selects (SLOTS not a power of two) wrap into range.
  assign wsel  = SW'(32'(sel_i) % SLOTS);
  assign q_o   = regs[ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < SLOTS; i++) regs[i] <= INIT;
      ptr <= '0;
    end else if (we_i) begin
      regs[wsel] <= d_i;
      ptr        <= wsel;
    end
  end

endmodule
