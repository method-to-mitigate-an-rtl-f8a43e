// bpmr_insdel_top_tb: end-to-end test of the whole design at its default
// size (16 codewords of 247 data bits per sector). Each sector's random data
// goes through the write path; the recorded bit stream then passes a channel
// model (one inserted or deleted bit, an optional flipped marker bit, the
// PR2 response 1+2D+D^2 and Gaussian noise, quantised to 8 bits with one
// unit = 16) and is followed by a guard field; the samples go through the
// read path. Every data word must come back unchanged and in order. The
// sectors cover: no slip, insertion, deletion, slips in the first and last
// frame, marker-bit errors that leave the decision to the path metric
// difference, and noisy sectors with random slips. Each mechanism (decision
// none/insertion/deletion, decision by marker match and by q, VT correction
// of an insertion and of a deletion, a shifted marker window) is counted and
// must occur. The write path must emit each 260-bit frame without gaps, and
// each word must be out within 2*260 + TB + 40 sample times of its first
// sample.
module bpmr_insdel_top_tb;
  import bpmr_pkg::*;
  import bpmr_tb_pkg::*;

  localparam int F     = 16;
  localparam int TBL   = 32;
  localparam int GUARD = TBL + 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  data_t             tx_data, rx_data;
  logic              tx_valid, tx_ready, tx_bit, tx_bvalid, tx_bready, tx_fstart;
  logic              rx_start, rx_yv, rx_dv, rx_chk, rx_len, rx_ovf, rx_decv, rx_pmd, rx_done;
  logic signed [7:0] rx_y;
  insdel_e           rx_corr, rx_dec;
  int checks = 0, failures = 0;

  bpmr_insdel_top dut (
    .clk, .rst_n,
    .tx_data_i(tx_data), .tx_valid_i(tx_valid), .tx_ready_o(tx_ready),
    .tx_bit_o(tx_bit), .tx_bit_valid_o(tx_bvalid), .tx_bit_ready_i(tx_bready),
    .tx_frame_start_o(tx_fstart),
    .rx_start_i(rx_start), .rx_y_i(rx_y), .rx_y_valid_i(rx_yv),
    .rx_data_o(rx_data), .rx_data_valid_o(rx_dv), .rx_corr_o(rx_corr),
    .rx_chk_err_o(rx_chk), .rx_len_err_o(rx_len), .rx_overflow_o(rx_ovf),
    .rx_dec_valid_o(rx_decv), .rx_dec_o(rx_dec), .rx_dec_by_pmd_o(rx_pmd),
    .rx_done_o(rx_done)
  );

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_dec [3] = '{0, 0, 0}, n_pmd = 0, n_match = 0, n_corr [3] = '{0, 0, 0}, n_shift = 0;

  // ---------------- write-path capture ----------------
  logic txq [$];
  int   tx_first, tx_last, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && tx_bvalid && tx_bready) begin
      if (txq.size() == 0) tx_first = cyc;
      tx_last = cyc;
      txq.push_back(tx_bit);
    end
  end

  // ---------------- read-path capture ----------------
  data_t exp_q [$];
  int    exp_due [$];
  int    nwords = 0;
  data_t e;
  int    due;
  always @(posedge clk) begin
    if (rst_n && rx_dv) begin
      e   = exp_q.pop_front();
      due = exp_due.pop_front();
      check(rx_data == e, $sformatf("word %0d data", nwords));
      check(!rx_chk && !rx_len, $sformatf("word %0d error flag", nwords));
      check(cyc <= due, $sformatf("word %0d late by %0d", nwords, cyc - due));
      n_corr[int'(rx_corr)]++;
      nwords++;
    end
    if (rst_n && rx_decv) begin
      n_dec[int'(rx_dec)]++;
      if (rx_pmd) n_pmd++; else n_match++;
    end
    if (rst_n && dut.win_start && dut.u_mwg.slot != 9'(VT_N)) check(0, "window outside slot 255");
  end

  // A marker window placed off the nominal 260-sample grid.
  int samp = 0;
  always @(posedge clk) begin
    if (rx_start) samp = 0;
    else if (rx_yv) begin
      if (dut.win_start && (samp % int'(FRAME_LEN)) != int'(VT_N)) n_shift++;
      samp++;
    end
  end

  // One sector: slip kind 0 none, 1 insertion, 2 deletion, in frame sf;
  // flip_mk: flip the first marker bit of frame mf (-1: none); sigma: noise.
  task automatic run_sector(input int kind, input int sf, input int mf, input int sigma);
    data_t d [F];
    logic  c [$];
    int    pos, lvl, d0, d1, d2, mi;
    logic  mbit;
    txq.delete();
    // write path
    for (int f = 0; f < F; f++) begin
      d[f] = rand_data();
      tx_data = d[f]; tx_valid = 1;
      forever begin
        @(negedge clk);
        if (tx_ready) break;
      end
      @(posedge clk); #1;
      tx_valid = 0;
    end
    wait (txq.size() == F * int'(FRAME_LEN));
    check(tx_last - tx_first + 1 == F * int'(FRAME_LEN), "write path without gaps");
    c = txq;
    // channel: marker error, then the slip
    if (mf >= 0) begin
      mi  = mf * int'(FRAME_LEN) + int'(VT_N);
      mbit = c[mi];
      c[mi] = !mbit;
    end
    pos = sf * int'(FRAME_LEN) + int'($urandom % VT_N);
    if (kind == 1) c.insert(pos, 1'($urandom));
    if (kind == 2) c.delete(pos);
    for (int i = 0; i < GUARD; i++) c.push_back(1'($urandom));
    // read path
    @(posedge clk); #1 rx_start = 1;
    @(posedge clk); #1 rx_start = 0;
    for (int f = 0; f < F; f++) begin
      exp_q.push_back(d[f]);
      exp_due.push_back(cyc + (f + 2) * int'(FRAME_LEN) + TBL + 40);
    end
    d1 = 0; d2 = 0;
    foreach (c[k]) begin
      d0  = c[k] ? 1 : -1;
      lvl = 16 * (d0 + 2 * d1 + d2) + noise(sigma);
      if (lvl > 127) lvl = 127;
      if (lvl < -128) lvl = -128;
      rx_y = 8'(lvl); rx_yv = 1;
      d2 = d1; d1 = d0;
      @(posedge clk); #1;
    end
    rx_yv = 0;
    repeat (300) @(posedge clk);
    check(rx_done, "sector done");
    check(exp_q.size() == 0, $sformatf("%0d words missing", exp_q.size()));
    exp_q.delete(); exp_due.delete();
    #1;
  endtask

  initial begin
    tx_valid = 0; tx_bready = 1; tx_data = '0;
    rx_start = 0; rx_yv = 0; rx_y = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_sector(0, 0, -1, 0);
    run_sector(1, 3, -1, 0);
    run_sector(2, 7, -1, 0);
    run_sector(1, 15, 15, 0);    // insertion in the last frame, marker bit wrong
    run_sector(2, 0, 0, 0);      // deletion in the first frame, marker bit wrong
    run_sector(0, 0, 5, 0);      // no slip, marker bit wrong
    for (int s = 0; s < 4; s++)
      run_sector(1 + (s % 2), int'($urandom % F), -1, 1);
    check(nwords == 10 * F, $sformatf("%0d words", nwords));
    check(!rx_ovf, "no overflow");
    for (int i = 0; i < 3; i++) check(n_dec[i] > 0, $sformatf("decision kind %0d seen", i));
    for (int i = 0; i < 3; i++) check(n_corr[i] > 0, $sformatf("correction kind %0d seen", i));
    check(n_pmd > 0, "decision by path metric difference seen");
    check(n_match > 0, "decision by marker match seen");
    check(n_shift > 0, "shifted marker window seen");
    $display("decisions none/ins/del %0d/%0d/%0d, by match %0d, by q %0d, corrections %0d/%0d/%0d, shifted windows %0d",
             n_dec[0], n_dec[1], n_dec[2], n_match, n_pmd, n_corr[0], n_corr[1], n_corr[2], n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
