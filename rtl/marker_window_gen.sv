// marker_window_gen: marks, in the sample stream entering the Viterbi
// detector, the five samples where the next marker is expected.
//
// A counter runs over the 260 sample slots of a frame; slot 255 is the first
// marker sample and slot 259 the last. Every Ins/Del decision shifts the
// frame grid for the rest of the sector: an insertion makes the next frame
// start one sample later (the counter steps back by one), a deletion one
// sample earlier (the counter skips one). Decisions reach this block about
// TB samples after their marker, well before the next marker window, so the
// next window is always placed on the corrected grid. The method names this
// tracking only; the counter is this design's.
//
// Interface: start_i (pulse before the first sample) clears the counter;
// win_start_o and win_end_o are combinational and belong to the sample
// offered in the same cycle with y_valid_i.
module marker_window_gen
  import bpmr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start_i,
  input  logic    y_valid_i,
  input  logic    dec_valid_i,
  input  insdel_e dec_i,
  output logic    win_start_o,
  output logic    win_end_o
);

  logic [8:0] slot;
  logic [8:0] slot_step;

  assign win_start_o = y_valid_i && (slot == 9'(VT_N));
  assign win_end_o   = y_valid_i && (slot == 9'(FRAME_LEN - 1));

  always_comb begin
    slot_step = slot;
    if (y_valid_i) slot_step = (slot == 9'(FRAME_LEN - 1)) ? '0 : slot + 9'd1;
    if (dec_valid_i) begin
      if (dec_i == ID_INS)      slot_step = slot_step - 9'd1;
      else if (dec_i == ID_DEL) slot_step = slot_step + 9'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       slot <= '0;
    else if (start_i) slot <= '0;
    else              slot <= slot_step;
  end

  // A decision must land early in a frame, far from the marker window and
  // from the slot wrap; otherwise the grid correction would be misplaced.
  a_dec_early: assert property (@(posedge clk) disable iff (!rst_n)
    dec_valid_i |-> (slot >= 9'd1 && slot < 9'(VT_N - 1)))
    else $error("marker_window_gen: decision arrived at slot %0d", slot);

endmodule
