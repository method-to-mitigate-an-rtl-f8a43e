// frame_aligner: reads the detected bit stream, takes the Ins/Del decision
// at every marker and cuts out each codeword with the length the decision
// implies (254 bits after a deletion, 255 with no slip, 256 after an
// insertion).
//
// Decision side: a position counter runs over the frame; when bit p+5 of
// the expected marker (frame position 260) arrives, the seven bits p-1..p+5
// and the held q of that marker go to insdel_detector. The decision moves
// the frame grid: the next frame starts at the found marker's end, so the
// counter restarts at 1-delta (delta = +1 insertion, -1 deletion, 0 none)
// for the following bit. Write side: the same stream delayed by DLY bits, so
// the decision is known before the codeword's last bit is reached (the
// decision at frame position 260 finds the write side at position 252).
// Codeword bits go out with cw_valid_o; cw_last_o and cw_type_o mark the
// last one; the five marker bits are dropped. After FRAMES decisions the
// sector is over and further bits (the guard field) are ignored until the
// next start_i.
//
// Timing: dec_valid_o pulses one cycle after the bit at frame position 260.
// The input is one bit per cycle at most. The sector must be followed by at
// least DLY + 6 further detected bits so that the last codeword comes out.
// Deciding at the marker follows the method; the counters, the delay line
// and the guard requirement are this design's.
module frame_aligner
  import bpmr_pkg::*;
#(
  parameter int unsigned FRAMES = 16,   // codewords per sector
  parameter int unsigned DLY    = 8     // write-side delay in bits, at least 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  input  logic       bit_i,
  input  logic       bit_valid_i,
  input  logic [1:0] q_i,
  input  logic       q_valid_i,
  // decision for each marker
  output logic       dec_valid_o,
  output insdel_e    dec_o,
  output logic       dec_by_pmd_o,
  // codeword bits to the VT decoder
  output logic       cw_bit_o,
  output logic       cw_valid_o,
  output logic       cw_last_o,
  output insdel_e    cw_type_o,
  output logic       done_o          // all FRAMES codewords written
);

  localparam int unsigned FC_W = $clog2(FRAMES + 1);

  // ---------------- decision side ----------------
  logic [9:0]      dpos;           // frame position of the next bit
  logic [5:0]      win;            // the six bits before the current one
  logic [6:0]      win_n;
  logic [1:0]      q_hold;
  logic [FC_W-1:0] dcount;
  logic            dactive;
  insdel_e         dec_c;
  logic            pmd_c;

  assign win_n = {bit_i, win};

  // q of this marker may arrive in the very cycle of the decision.
  logic [1:0] q_q_sel;
  assign q_q_sel = q_valid_i ? q_i : q_hold;

  insdel_detector u_det (
    .win_i   (win_n),
    .q_i     (q_q_sel),
    .dec_o   (dec_c),
    .by_pmd_o(pmd_c)
  );

  logic at_marker;
  assign at_marker = dactive && bit_valid_i && (dpos == 10'(FRAME_LEN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dpos         <= '0;
      win          <= '0;
      q_hold       <= 2'd1;
      dcount       <= '0;
      dactive      <= 1'b0;
      dec_valid_o  <= 1'b0;
      dec_o        <= ID_NONE;
      dec_by_pmd_o <= 1'b0;
    end else begin
      dec_valid_o <= 1'b0;
      if (q_valid_i) q_hold <= q_i;
      if (start_i) begin
        dpos    <= '0;
        dcount  <= '0;
        dactive <= 1'b1;
        win     <= '0;
      end else if (bit_valid_i && dactive) begin
        win <= win_n[6:1];
        if (at_marker) begin
          dec_valid_o  <= 1'b1;
          dec_o        <= dec_c;
          dec_by_pmd_o <= pmd_c;
          case (dec_c)
            ID_INS:  dpos <= 10'd0;
            ID_DEL:  dpos <= 10'd2;
            default: dpos <= 10'd1;
          endcase
          dcount <= dcount + 1'b1;
          if (dcount == FC_W'(FRAMES - 1)) dactive <= 1'b0;
        end else begin
          dpos <= dpos + 10'd1;
        end
      end
    end
  end

  // ---------------- write side ----------------
  logic [DLY-1:0]          dline;
  logic [$clog2(DLY+1)-1:0] dfill;
  logic                    wbit;
  logic                    wvalid;
  logic [9:0]              wpos;
  logic [FC_W-1:0]         wcount;
  logic                    wactive;
  logic                    pend_valid;
  insdel_e                 pend;
  logic [9:0]              cw_len;

  assign wbit   = dline[0];
  assign wvalid = bit_valid_i && (dfill == $clog2(DLY+1)'(DLY)) && wactive;

  always_comb begin
    case (pend)
      ID_INS:  cw_len = 10'(VT_N + 1);
      ID_DEL:  cw_len = 10'(VT_N - 1);
      default: cw_len = 10'(VT_N);
    endcase
  end

  logic in_cw, cw_end, fr_end;
  assign in_cw  = (wpos < 10'(VT_N - 1)) || (pend_valid && wpos < cw_len);
  assign cw_end = pend_valid && (wpos == cw_len - 10'd1);
  assign fr_end = pend_valid && (wpos == cw_len + 10'(MK_LEN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dline      <= '0;
      dfill      <= '0;
      wpos       <= '0;
      wcount     <= '0;
      wactive    <= 1'b0;
      pend_valid <= 1'b0;
      pend       <= ID_NONE;
      cw_valid_o <= 1'b0;
      cw_last_o  <= 1'b0;
      cw_bit_o   <= 1'b0;
      cw_type_o  <= ID_NONE;
    end else begin
      cw_valid_o <= 1'b0;
      cw_last_o  <= 1'b0;
      if (start_i) begin
        dfill      <= '0;
        wpos       <= '0;
        wcount     <= '0;
        wactive    <= 1'b1;
        pend_valid <= 1'b0;
      end else begin
        if (at_marker) begin
          pend_valid <= 1'b1;
          pend       <= dec_c;
        end
        if (bit_valid_i) begin
          dline <= {bit_i, dline[DLY-1:1]};
          if (dfill != $clog2(DLY+1)'(DLY)) dfill <= dfill + 1'b1;
        end
        if (wvalid) begin
          if (in_cw) begin
            cw_valid_o <= 1'b1;
            cw_bit_o   <= wbit;
            cw_last_o  <= cw_end;
            cw_type_o  <= pend;
          end
          if (fr_end) begin
            wpos       <= '0;
            pend_valid <= 1'b0;
          end else begin
            wpos <= wpos + 10'd1;
          end
          if (cw_end) begin
            wcount <= wcount + 1'b1;
            if (wcount == FC_W'(FRAMES - 1)) wactive <= 1'b0;
          end
        end
      end
    end
  end

  assign done_o = !wactive && (wcount == FC_W'(FRAMES));

  // The decision must be known before the write side needs it.
  a_dec_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    wvalid |-> (pend_valid || wpos < 10'(VT_N - 1)))
    else $error("frame_aligner: codeword end reached before its decision");

endmodule
