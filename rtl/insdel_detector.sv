// insdel_detector: decides, for one marker, whether the detected bits show
// no slip, one inserted bit or one deleted bit.
//
// It follows the flow chart of the method. win_i holds the seven detected
// bits around the expected marker position p: win_i[0] is bit p-1 and
// win_i[6] is bit p+5. If bits p..p+4 equal the marker there is no error;
// if bits p+1..p+5 equal it, a bit was inserted before the marker; if bits
// p-1..p+3 equal it, a bit was deleted. With the marker +1 -1 -1 -1 +1 at
// most one of the three can hold. Otherwise the detector falls back on the
// state q with the smallest path metric difference over the marker window:
// q = 2 means no error, q = 1 an insertion and q = 3 or 4 a deletion.
//
// Purely combinational. by_pmd_o tells whether the path metric difference
// (rather than a marker match) made the decision.
module insdel_detector
  import bpmr_pkg::*;
(
  input  logic [6:0] win_i,
  input  logic [1:0] q_i,        // state index, q = q_i + 1
  output insdel_e    dec_o,
  output logic       by_pmd_o
);

  // win_i[k] is bit p-1+k; the marker bit sent first is MARKER[MK_LEN-1].
  function automatic logic match_at(input logic [6:0] w, input int base);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < int'(MK_LEN); i++)
      if (w[base + i] != MARKER[MK_LEN - 1 - i]) ok = 1'b0;
    return ok;
  endfunction

  always_comb begin
    by_pmd_o = 1'b0;
    if (match_at(win_i, 1))      dec_o = ID_NONE;
    else if (match_at(win_i, 2)) dec_o = ID_INS;
    else if (match_at(win_i, 0)) dec_o = ID_DEL;
    else begin
      by_pmd_o = 1'b1;
      case (q_i)
        2'd1:    dec_o = ID_NONE;   // q = 2
        2'd0:    dec_o = ID_INS;    // q = 1
        default: dec_o = ID_DEL;    // q = 3, 4
      endcase
    end
  end

endmodule
