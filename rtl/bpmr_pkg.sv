// bpmr_pkg: constants and types shared by the insertion/deletion (Ins/Del)
// protection chain of a bit-patterned media recording channel.
//
// Data are protected by a rate-247/255 Varshamov-Tenengolts (VT) code, and
// every 255-bit VT codeword is followed by a 5-bit marker, so the recorded
// stream is made of 260-bit frames. Bits are carried as logic values, with
// 1 standing for the channel symbol +1 and 0 for -1.
//
// The code lengths, the marker length and the PR2 target 1+2D+D^2 follow the
// method this design implements. The marker pattern +1 -1 -1 -1 +1, the VT
// residue a = 0, the sample format and the state numbering are this design's
// choices (see README).
package bpmr_pkg;

  // VT code: codeword length n, data length k; the checksum is taken mod n+1 = 256.
  localparam int unsigned VT_N   = 255;
  localparam int unsigned VT_K   = 247;
  localparam int unsigned VT_P   = VT_N - VT_K;      // 8 parity bits
  localparam int unsigned VT_A   = 0;                // VT residue a

  // Marker: sent first-bit-first, MARKER[MK_LEN-1] goes out first.
  localparam int unsigned MK_LEN = 5;
  localparam logic [MK_LEN-1:0] MARKER = 5'b10001;   // +1 -1 -1 -1 +1

  localparam int unsigned FRAME_LEN = VT_N + MK_LEN; // 260

  // Outcome of the Ins/Del check on one marker.
  typedef enum logic [1:0] {
    ID_NONE = 2'd0,
    ID_INS  = 2'd1,
    ID_DEL  = 2'd2
  } insdel_e;

  // True when 1-based codeword position pos is a VT parity position (2^i).
  function automatic logic is_parity_pos(input int unsigned pos);
    return (pos != 0) && ((pos & (pos - 1)) == 0);
  endfunction

endpackage
