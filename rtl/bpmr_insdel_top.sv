// bpmr_insdel_top: write and read paths of a bit-patterned media recording
// channel protected against insertion/deletion (Ins/Del) errors.
//
// Write path: 247-bit data words are VT-encoded into 255-bit codewords
// (vt_encoder) and serialised with the 5-bit marker +1 -1 -1 -1 +1 after
// every codeword (marker_encoder), giving 260-bit frames for the medium.
// Read path: the equalised PR2 samples (target 1+2D+D^2) enter the Viterbi
// detector (viterbi_pr2). marker_window_gen tells it where each marker
// should be, so that it can measure the path metric difference over the
// marker and name the state q. frame_aligner compares the detected bits
// around the marker with the pattern at offsets 0, +1 and -1, falls back on
// q when none matches (insdel_detector), re-aligns the frame grid and cuts
// the codeword out with 254, 255 or 256 bits. vt_decoder then removes the
// inserted bit or restores the deleted one and strips the parity.
//
// The medium itself (where bits slip and noise is added) lies between
// tx_bit_o and rx_y_i and is not part of this design.
//
// Interface and timing: tx_* is a valid/ready word input and a one-bit-per-
// cycle output with backpressure. rx_start_i is pulsed before the first
// sample of a sector; samples then arrive with rx_y_valid_i, at most one
// per cycle, and the sector (FRAMES frames) must be followed by at least
// TB + 16 guard samples so that the last codeword leaves the detector.
// Data words come out in order with rx_data_valid_o, about TB + 270 sample
// times after their codeword's first sample; rx_dec_* reports the decision
// at each marker. The structure follows the method; widths, latencies and
// the guard requirement are this design's.
module bpmr_insdel_top
  import bpmr_pkg::*;
#(
  parameter int unsigned FRAMES = 16,   // codewords per sector
  parameter int unsigned Y_W    = 8,    // sample width
  parameter int unsigned Y_UNIT = 16,   // sample value of one PR2 unit
  parameter int unsigned TB     = 32,   // Viterbi survivor length
  parameter int unsigned PM_W   = 24    // Viterbi path metric width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // write path
  input  logic [VT_K-1:0]       tx_data_i,
  input  logic                  tx_valid_i,
  output logic                  tx_ready_o,
  output logic                  tx_bit_o,
  output logic                  tx_bit_valid_o,
  input  logic                  tx_bit_ready_i,
  output logic                  tx_frame_start_o,
  // read path
  input  logic                  rx_start_i,
  input  logic signed [Y_W-1:0] rx_y_i,
  input  logic                  rx_y_valid_i,
  output logic [VT_K-1:0]       rx_data_o,
  output logic                  rx_data_valid_o,
  output insdel_e               rx_corr_o,
  output logic                  rx_chk_err_o,
  output logic                  rx_len_err_o,
  output logic                  rx_overflow_o,
  output logic                  rx_dec_valid_o,
  output insdel_e               rx_dec_o,
  output logic                  rx_dec_by_pmd_o,
  output logic                  rx_done_o
);

  // ---------------- write path ----------------
  logic [VT_N-1:0] code;
  logic            code_valid, code_ready;

  vt_encoder u_vte (
    .clk, .rst_n,
    .data_i      (tx_data_i),
    .data_valid_i(tx_valid_i),
    .data_ready_o(tx_ready_o),
    .code_o      (code),
    .code_valid_o(code_valid),
    .code_ready_i(code_ready)
  );

  marker_encoder u_mke (
    .clk, .rst_n,
    .code_i       (code),
    .code_valid_i (code_valid),
    .code_ready_o (code_ready),
    .bit_o        (tx_bit_o),
    .bit_valid_o  (tx_bit_valid_o),
    .bit_ready_i  (tx_bit_ready_i),
    .frame_start_o(tx_frame_start_o)
  );

  // ---------------- read path ----------------
  logic            win_start, win_end;
  logic            det_bit, det_valid, q_valid;
  logic [1:0]      q;
  logic [PM_W-1:0] dpsi [4];
  logic            cw_bit, cw_valid, cw_last;
  insdel_e         cw_type;

  marker_window_gen u_mwg (
    .clk, .rst_n,
    .start_i    (rx_start_i),
    .y_valid_i  (rx_y_valid_i),
    .dec_valid_i(rx_dec_valid_o),
    .dec_i      (rx_dec_o),
    .win_start_o(win_start),
    .win_end_o  (win_end)
  );

  viterbi_pr2 #(
    .Y_W(Y_W), .Y_UNIT(Y_UNIT), .TB(TB), .PM_W(PM_W)
  ) u_vit (
    .clk, .rst_n,
    .start_i    (rx_start_i),
    .y_i        (rx_y_i),
    .y_valid_i  (rx_y_valid_i),
    .win_start_i(win_start),
    .win_end_i  (win_end),
    .bit_o      (det_bit),
    .bit_valid_o(det_valid),
    .q_o        (q),
    .q_valid_o  (q_valid),
    .dpsi_o     (dpsi)
  );

  frame_aligner #(.FRAMES(FRAMES)) u_fal (
    .clk, .rst_n,
    .start_i     (rx_start_i),
    .bit_i       (det_bit),
    .bit_valid_i (det_valid),
    .q_i         (q),
    .q_valid_i   (q_valid),
    .dec_valid_o (rx_dec_valid_o),
    .dec_o       (rx_dec_o),
    .dec_by_pmd_o(rx_dec_by_pmd_o),
    .cw_bit_o    (cw_bit),
    .cw_valid_o  (cw_valid),
    .cw_last_o   (cw_last),
    .cw_type_o   (cw_type),
    .done_o      (rx_done_o)
  );

  vt_decoder u_vtd (
    .clk, .rst_n,
    .start_i     (rx_start_i),
    .bit_i       (cw_bit),
    .valid_i     (cw_valid),
    .last_i      (cw_last),
    .data_o      (rx_data_o),
    .data_valid_o(rx_data_valid_o),
    .corr_o      (rx_corr_o),
    .chk_err_o   (rx_chk_err_o),
    .len_err_o   (rx_len_err_o),
    .overflow_o  (rx_overflow_o)
  );

  // The codeword length must agree with the decision that cut it.
  a_cw_type: assert property (@(posedge clk) disable iff (!rst_n)
    (cw_valid && cw_last) |-> (cw_type == rx_dec_o))
    else $error("bpmr_insdel_top: codeword type differs from the last decision");

endmodule
