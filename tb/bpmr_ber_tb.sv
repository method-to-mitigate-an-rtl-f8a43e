// bpmr_ber_tb: bit-error-rate run of the whole design in the setting of the
// method's evaluation: each 16-frame sector gets one insertion or deletion
// with probability 0.5, at a uniform place; the read-back signal is PR2 with
// white Gaussian noise at a given Eb/N0 = 10 log10(sum h^2 / (2 R sigma^2)),
// with sum h^2 = 6 and R = 247/260. Forty sectors are run at each of
// 10, 12, 14 and 16 dB, and the data bit errors counted and printed. Every
// sector must deliver all its words, and at 16 dB no bit may be wrong. The
// marker decisions that differ from the true slip are counted and printed:
// a slip in the last marker bits can be seen at the following marker
// instead, which still decodes without error. A second part, at 14 dB,
// lets every recorded bit slip with a fixed probability (insertions only,
// then insertions and deletions in equal parts) and prints the BER; two
// slips between the same pair of markers are beyond the design and show up
// as bit errors.
module bpmr_ber_tb;
  import bpmr_pkg::*;
  import bpmr_tb_pkg::*;

  localparam int F       = 16;
  localparam int TBL     = 32;
  localparam int GUARD   = TBL + 16;
  localparam int SECTORS = 40;

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
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic    txq [$];
  data_t   exp_q [$];
  insdel_e dec_exp [$];
  int      bit_err = 0, dec_err = 0, nwords = 0;
  data_t   e;
  insdel_e de;

  always @(posedge clk) begin
    if (rst_n && tx_bvalid && tx_bready) txq.push_back(tx_bit);
    if (rst_n && rx_dv) begin
      e = exp_q.pop_front();
      for (int i = 0; i < int'(VT_K); i++) bit_err += int'(rx_data[i] != e[i]);
      nwords++;
    end
    if (rst_n && rx_decv) begin
      de = dec_exp.pop_front();
      dec_err += int'(rx_dec != de);
    end
  end

  // kind_force: -1 one slip with probability 0.5 per sector; otherwise a
  // slip at every recorded bit with probability pi_ppm (insertion) and
  // pd_ppm (deletion) per million.
  task automatic run_sector(input int sigma16, input int pi_ppm = 0, input int pd_ppm = 0);   // noise sd in 1/16 LSB
    logic c [$];
    logic cs [$];
    int   pos, kind, sf, lvl, d0, d1, d2, acc;
    txq.delete();
    for (int f = 0; f < F; f++) begin
      tx_data = rand_data(); tx_valid = 1;
      exp_q.push_back(tx_data);
      forever begin
        @(negedge clk);
        if (tx_ready) break;
      end
      @(posedge clk); #1;
      tx_valid = 0;
    end
    wait (txq.size() == F * int'(FRAME_LEN));
    c = txq;
    if (pi_ppm == 0 && pd_ppm == 0) begin
      kind = ($urandom % 2 == 0) ? 0 : 1 + int'($urandom % 2);
      pos  = int'($urandom % (F * int'(FRAME_LEN)));
      sf   = pos / int'(FRAME_LEN);
      if (kind == 1) c.insert(pos, 1'($urandom));
      if (kind == 2) c.delete(pos);
      // expected: the slip is reported at the marker that ends its frame
      for (int f = 0; f < F; f++)
        dec_exp.push_back((kind == 0 || f != sf) ? ID_NONE : (kind == 1) ? ID_INS : ID_DEL);
    end else begin
      cs = c;
      c.delete();
      foreach (cs[k]) begin
        if (int'($urandom % 1000000) < pd_ppm) continue;
        c.push_back(cs[k]);
        if (int'($urandom % 1000000) < pi_ppm) c.push_back(1'($urandom));
      end
      for (int f = 0; f < F; f++) dec_exp.push_back(ID_NONE);   // not compared
    end
    for (int i = 0; i < GUARD; i++) c.push_back(1'($urandom));
    @(posedge clk); #1 rx_start = 1;
    @(posedge clk); #1 rx_start = 0;
    d1 = 0; d2 = 0;
    foreach (c[k]) begin
      d0  = c[k] ? 1 : -1;
      acc = 16 * 16 * (d0 + 2 * d1 + d2) + noise(sigma16);
      lvl = (acc >= 0) ? (acc + 8) / 16 : -((-acc + 8) / 16);
      if (lvl > 127) lvl = 127;
      if (lvl < -128) lvl = -128;
      rx_y = 8'(lvl); rx_yv = 1;
      d2 = d1; d1 = d0;
      @(posedge clk); #1;
    end
    rx_yv = 0;
    repeat (300) @(posedge clk);
    check(rx_done && exp_q.size() == 0, "sector delivered all words");
    exp_q.delete();
    dec_exp.delete();
    #1;
  endtask

  initial begin
    int snr_db [4] = '{10, 12, 14, 16};
    int pslip [4][2] = '{'{100, 0}, '{1000, 0}, '{50, 50}, '{500, 500}};
    real sig;
    int  s16, nbits;
    tx_valid = 0; tx_bready = 1; tx_data = '0;
    rx_start = 0; rx_yv = 0; rx_y = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (snr_db[i]) begin
      // sigma in PR units from Eb/N0, then in 1/16 LSB (one unit = 16 LSB)
      sig = $sqrt(6.0 / (2.0 * (247.0 / 260.0) * (10.0 ** (snr_db[i] / 10.0))));
      s16 = int'(sig * 16.0 * 16.0);
      bit_err = 0; dec_err = 0; nwords = 0;
      for (int s = 0; s < SECTORS; s++) run_sector(s16);
      nbits = nwords * int'(VT_K);
      $display("Eb/N0 %0d dB: sigma %.3f units, %0d data bits, %0d bit errors (BER %.2e), %0d wrong marker decisions",
               snr_db[i], sig, nbits, bit_err, real'(bit_err) / real'(nbits), dec_err);
      check(nwords == SECTORS * F, "all words delivered");
      if (snr_db[i] == 16) begin
        check(bit_err == 0, "no bit errors at 16 dB");
      end
    end
    // slips at every bit (insertions only, then insertions and deletions
    // in equal parts), at 14 dB
    sig = $sqrt(6.0 / (2.0 * (247.0 / 260.0) * (10.0 ** 1.4)));
    s16 = int'(sig * 16.0 * 16.0);
    foreach (pslip[i]) begin
      bit_err = 0; nwords = 0;
      for (int s = 0; s < SECTORS; s++) run_sector(s16, pslip[i][0], pslip[i][1]);
      nbits = nwords * int'(VT_K);
      $display("14 dB, P_i %0d ppm, P_d %0d ppm: %0d data bits, %0d bit errors (BER %.2e)",
               pslip[i][0], pslip[i][1], nbits, bit_err, real'(bit_err) / real'(nbits));
      check(nwords == SECTORS * F, "all words delivered");
    end
    check(!rx_ovf, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
