// input_bit_mapper: splits one 256-bit word read from FIRST_FIFO into the
// event-framing flags and the eight (r, phi) clusters presented to the HT.
//
// Word layout. The word holds eight 32-bit slots; going from bit 255 down to
// bit 0 they carry layers 1, 0, 3, 2, 5, 4, 7, 6, i.e. layer L sits in slot
// position p = 6 - 2*(L/2) + L%2 at bits [32p+31:32p]. Inside a slot r is in
// bits 31:20 and phi in bits 15:0; r == 0 marks an empty slot, so a word may
// carry fewer than eight clusters. Bit 255 flags the start of an event and
// bit 223 its end; both come in words of their own that carry no clusters.
// Bit 240 (a spare bit of the top slot) flags a word that carries clusters.
//
// The slot order, the r/phi split at bit 20, the 12-bit r and the start and
// end bits follow the source design; the position of the valid bit, the use
// of phi bits 15:0 only and the r == 0 empty-slot code are this design's
// choices.
//
// Timing: one register stage. A word with in_valid high at a clock edge
// shows its fields one cycle later, with the flags qualified by in_valid.
module input_bit_mapper
  import ht_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [WORD_W-1:0]     in_word,
  output logic                  event_start,
  output logic                  event_end,
  output logic                  event_valid,
  output logic [N_LAYERS-1:0]   hit,        // slot holds a cluster (and event_valid)
  output cluster_t              cl [N_LAYERS]
);
  localparam int unsigned START_BIT = 255;
  localparam int unsigned END_BIT   = 223;
  localparam int unsigned VALID_BIT = 240;

  function automatic int unsigned slot_pos(input int unsigned layer);
    return 6 - 2 * (layer / 2) + (layer % 2);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      event_start <= 1'b0;
      event_end   <= 1'b0;
      event_valid <= 1'b0;
      hit         <= '0;
      for (int l = 0; l < N_LAYERS; l++) cl[l] <= '0;
    end else begin
      event_start <= in_valid && in_word[START_BIT] && !in_word[VALID_BIT];
      event_end   <= in_valid && in_word[END_BIT]   && !in_word[VALID_BIT];
      event_valid <= in_valid && in_word[VALID_BIT];
      for (int l = 0; l < N_LAYERS; l++) begin
        logic [SLOT_W-1:0] slot;
        slot      = in_word[SLOT_W*slot_pos(l) +: SLOT_W];
        cl[l].r   <= slot[31:20];
        cl[l].phi <= slot[15:0];
        hit[l]    <= in_valid && in_word[VALID_BIT] && (slot[31:20] != '0);
      end
    end
  end
endmodule
