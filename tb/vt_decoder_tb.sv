// vt_decoder_tb: reference-encoded random codewords, each sent clean, with
// one bit deleted or with one random bit inserted at a random place, then
// fed to the decoder with the five-bit gap a marker leaves, so that the two
// buffers alternate. The data bits out must equal the data bits in, in
// order. Every branch of the correction rule (put back a 0 / a 1, remove
// the first bit / a 0 / a 1 / the last bit) must be reached. A 255-bit word
// with one flipped bit must raise chk_err and a 253-bit word len_err.
module vt_decoder_tb;
  import bpmr_pkg::*;
  import bpmr_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    start, b, v, last, dvalid, chk_err, len_err, ovf;
  data_t   dout;
  insdel_e corr;
  int checks = 0, failures = 0;

  vt_decoder dut (.clk, .rst_n, .start_i(start), .bit_i(b), .valid_i(v), .last_i(last),
                  .data_o(dout), .data_valid_o(dvalid), .corr_o(corr), .chk_err_o(chk_err),
                  .len_err_o(len_err), .overflow_o(ovf));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  data_t   exp_q  [$];
  insdel_e kind_q [$];
  int      flag_q [$];     // 0 none, 1 chk_err expected, 2 len_err expected
  int      branch [6] = '{0, 0, 0, 0, 0, 0};
  int      nout = 0;

  data_t   e;
  insdel_e k;
  int      fl;
  always @(posedge clk) begin
    if (rst_n && dvalid) begin
      e  = exp_q.pop_front();
      k  = kind_q.pop_front();
      fl = flag_q.pop_front();
      if (fl == 0) begin
        check(dout == e, $sformatf("word %0d data", nout));
        check(corr == k, $sformatf("word %0d correction type", nout));
        check(!chk_err && !len_err, "no error flag");
      end else begin
        check(fl == 1 ? chk_err : len_err, "error flag raised");
      end
      nout++;
    end
  end

  task automatic send(input logic [VT_N+1:0] w, input int len);
    for (int i = 0; i < len; i++) begin
      b = w[i]; v = 1; last = (i == len - 1);
      @(posedge clk); #1;
    end
    v = 0; last = 0;
    repeat (5) @(posedge clk);
    #1;
  endtask

  // Classify which rule the decoder must use, from the definition.
  task automatic classify(input logic [VT_N+1:0] w, input int len);
    int wt = 0, s, d;
    for (int i = 0; i < len; i++) wt += int'(w[i]);
    s = vt_checksum(w, len);
    if (len == int'(VT_N) - 1) begin
      d = (256 - s) % 256;
      branch[d <= wt ? 0 : 1]++;
    end else begin
      d = s;
      if (d == wt) branch[2]++;
      else if (d < wt) branch[3]++;
      else branch[4]++;
      // all-zero run after the last one with a trailing 1: fallback case
      if (d < wt && wt == 1 && w[len-1]) branch[5]++;
    end
  endtask

  initial begin
    start = 0; b = 0; v = 0; last = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      data_t d;
      code_t c;
      logic [VT_N+1:0] w;
      int kind, p, len;
      d = rand_data();
      if (t == 1 || t == 2) d = '0;
      c = ref_vt_encode(d);
      w = {2'b00, c};
      kind = t % 3;
      if (t == 1 || t == 3) kind = 2;
      len = VT_N;
      if (kind == 1) begin          // deletion at p
        p = $urandom % VT_N;
        for (int i = p; i < int'(VT_N); i++) w[i] = w[i+1];
        w[VT_N] = 0;
        len = VT_N - 1;
      end else if (kind == 2) begin // insertion before p
        logic nb;
        p  = $urandom % (VT_N + 1);
        nb = 1'($urandom);
        if (t == 1) begin p = VT_N; nb = 1; end   // 0...0 then a 1
        if (t == 3) begin p = 0; nb = 0; end      // a 0 in front: D = w
        for (int i = VT_N; i > p; i--) w[i] = w[i-1];
        w[p] = nb;
        len = VT_N + 1;
      end
      if (kind != 0) classify(w, len);
      exp_q.push_back(d);
      kind_q.push_back(kind == 0 ? ID_NONE : kind == 1 ? ID_DEL : ID_INS);
      flag_q.push_back(0);
      send(w, len);
    end
    // detected-only errors
    begin
      code_t c;
      c = ref_vt_encode(rand_data());
      c[100] = ~c[100];
      exp_q.push_back('0); kind_q.push_back(ID_NONE); flag_q.push_back(1);
      send({2'b00, c}, VT_N);
      exp_q.push_back('0); kind_q.push_back(ID_NONE); flag_q.push_back(2);
      send({2'b00, c}, VT_N - 2);
    end
    repeat (600) @(posedge clk);
    check(nout == 402, $sformatf("%0d words out", nout));
    check(!ovf, "no overflow");
    for (int i = 0; i < 6; i++) check(branch[i] > 0, $sformatf("rule %0d never used", i));
    $display("branches: %0d %0d %0d %0d %0d %0d", branch[0], branch[1], branch[2], branch[3], branch[4], branch[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
