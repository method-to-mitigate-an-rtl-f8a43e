// frame_aligner_tb: a 16-frame sector of random codewords is built with a
// slip in most frames (one bit deleted or inserted somewhere in the
// codeword) and, in some frames, one marker bit flipped so that no marker
// match is possible and the decision must come from q. The bits go in as a
// detected stream with random gaps and a q pulse per marker. Each codeword
// out must be exactly the received bits between two markers, with the right
// length and type; each decision must be the true slip, taken from the
// marker match or from q as the window allows.
module frame_aligner_tb;
  import bpmr_pkg::*;

  localparam int F = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start, b, bv, qv, dv, pmd, cwb, cwv, cwl, done;
  logic [1:0] q;
  insdel_e    dec, cwt;
  int checks = 0, failures = 0;

  frame_aligner dut (.clk, .rst_n, .start_i(start), .bit_i(b), .bit_valid_i(bv), .q_i(q),
                     .q_valid_i(qv), .dec_valid_o(dv), .dec_o(dec), .dec_by_pmd_o(pmd),
                     .cw_bit_o(cwb), .cw_valid_o(cwv), .cw_last_o(cwl), .cw_type_o(cwt),
                     .done_o(done));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic    st [$];
  int      fstart [F], mstart [F];
  insdel_e ftype [F];
  bit      fpmd [F];
  int      ndec = 0, ncw = 0, cwpos = 0, npmd = 0;
  int      seen [3] = '{0, 0, 0};

  // Marker-match reference on the received stream at nominal position p.
  function automatic bit match(input int at);
    logic [4:0] m = MARKER;
    for (int i = 0; i < 5; i++) if (st[at + i] != m[4 - i]) return 0;
    return 1;
  endfunction

  always @(posedge clk) begin
    if (rst_n && dv) begin
      check(dec == ftype[ndec], $sformatf("frame %0d decision %0d expected %0d", ndec, dec, ftype[ndec]));
      check(pmd == fpmd[ndec], $sformatf("frame %0d decided by q: %0d", ndec, pmd));
      seen[int'(dec)]++;
      npmd += int'(pmd);
      ndec++;
    end
    if (rst_n && cwv) begin
      check(cwb == st[fstart[ncw] + cwpos], $sformatf("frame %0d bit %0d", ncw, cwpos));
      if (cwl) begin
        check(cwpos + 1 == mstart[ncw] - fstart[ncw], $sformatf("frame %0d length %0d", ncw, cwpos + 1));
        check(cwt == ftype[ncw], "codeword type");
        ncw++;
        cwpos = 0;
      end else cwpos++;
    end
  end

  initial begin
    logic cw [$];
    int p;
    start = 0; b = 0; bv = 0; qv = 0; q = '0;
    for (int f = 0; f < F; f++) begin
      cw.delete();
      for (int i = 0; i < int'(VT_N); i++) cw.push_back(1'($urandom));
      ftype[f] = (f % 3 == 0) ? ID_NONE : (f % 3 == 1) ? ID_INS : ID_DEL;
      if (ftype[f] == ID_DEL) cw.delete($urandom % VT_N);
      if (ftype[f] == ID_INS) cw.insert($urandom % (VT_N + 1), 1'($urandom));
      fstart[f] = st.size();
      foreach (cw[i]) st.push_back(cw[i]);
      mstart[f] = st.size();
      for (int i = 0; i < 5; i++) st.push_back(MARKER[4 - i] ^ ((f % 4 == 3) && i == 2));
    end
    for (int i = 0; i < 20; i++) st.push_back(1'($urandom));
    // expected source of each decision: the nominal marker start p follows
    // the previous frame's true end
    for (int f = 0; f < F; f++) begin
      p = fstart[f] + VT_N;
      fpmd[f] = !(match(p) || match(p + 1) || match(p - 1));
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    start = 1; @(posedge clk); #1 start = 0;
    for (int k = 0; k < st.size(); k++) begin
      b = st[k]; bv = 1;
      qv = 0;
      for (int f = 0; f < F; f++)
        if (k == mstart[f]) begin
          qv = 1;
          q  = (ftype[f] == ID_NONE) ? 2'd1 : (ftype[f] == ID_INS) ? 2'd0 : 2'(2 + ($urandom % 2));
        end
      @(posedge clk); #1;
      qv = 0;
      if ($urandom % 5 == 0) begin
        bv = 0;
        @(posedge clk); #1;
      end
    end
    bv = 0;
    repeat (20) @(posedge clk);
    check(ndec == F && ncw == F, $sformatf("%0d decisions, %0d codewords", ndec, ncw));
    check(done, "done after the sector");
    check(npmd > 0 && npmd < F, "both decision sources used");
    for (int i = 0; i < 3; i++) check(seen[i] > 0, "every decision kind seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
