// viterbi_pr2_tb: PR2 samples of random bits go through two detectors, one
// at the default path-metric width and one at 19 bits, whose metrics wrap.
// Phase 1, light noise: every decided bit must equal the sent bit, the first
// decision must come one cycle after sample TB-1, and at every marker window
// q must be the true state {b(p+3), b(p+4)} with a small metric difference
// there. Phase 2, heavy noise: the wrapping detector must agree bit for bit
// and q for q with the wide one, and its metrics must have wrapped.
module viterbi_pr2_tb;
  import bpmr_tb_pkg::*;

  localparam int TBL = 32;
  localparam int N1  = 2000;
  localparam int N2  = 4000;
  localparam int N   = N1 + N2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start, yv, ws, we;
  logic signed [7:0] y;
  logic              b_a, bv_a, qv_a, b_w, bv_w, qv_w;
  logic [1:0]        q_a, q_w;
  logic [23:0]       dp_a [4];
  logic [18:0]       dp_w [4];
  int checks = 0, failures = 0;

  viterbi_pr2 dut (.clk, .rst_n, .start_i(start), .y_i(y), .y_valid_i(yv), .win_start_i(ws),
                   .win_end_i(we), .bit_o(b_a), .bit_valid_o(bv_a), .q_o(q_a), .q_valid_o(qv_a),
                   .dpsi_o(dp_a));
  viterbi_pr2 #(.PM_W(19)) dutw (.clk, .rst_n, .start_i(start), .y_i(y), .y_valid_i(yv),
                   .win_start_i(ws), .win_end_i(we), .bit_o(b_w), .bit_valid_o(bv_w), .q_o(q_w),
                   .q_valid_o(qv_w), .dpsi_o(dp_w));

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

  logic bits [N+2];          // bits[0], bits[1] are the state before sample 0
  int   nout = 0, nq = 0, cyc = 0;
  int   qexp [$];
  int   wraps = 0;
  logic [18:0] pm_prev = 0;

  int e, nsamp = 0, tb_cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (yv) begin
      nsamp++;
      if (nsamp == TBL) tb_cyc = cyc;
    end
    pm_prev <= dutw.pm[0];
    if (rst_n && dutw.pm[0] < pm_prev && pm_prev - dutw.pm[0] > 19'h10000) wraps++;
    if (rst_n && bv_a) begin
      check(bv_w, "both detectors decide together");
      if (nout == 0) check(cyc == tb_cyc + 1, "first decision latency");
      if (nout < N1 - TBL) check(b_a == bits[nout + 2], $sformatf("bit %0d", nout));
      else           check(b_a == b_w, $sformatf("wrapping detector, bit %0d", nout));
      nout++;
    end
    if (rst_n && qv_a) begin
      check(qv_w && q_a == q_w, "q equal in both detectors");
      if (qexp.size() > 0) begin
        e = qexp.pop_front();
        if (e >= 0) begin
          check(int'(q_a) == e, $sformatf("q=%0d expected %0d", q_a, e));
          check(dp_a[e] < 200, $sformatf("small metric difference on the true state: %0d %0d %0d %0d", dp_a[0], dp_a[1], dp_a[2], dp_a[3]));
        end
      end
      nq++;
    end
  end

  initial begin
    int lvl;
    start = 0; yv = 0; ws = 0; we = 0; y = '0;
    for (int i = 0; i < N + 2; i++) bits[i] = 1'($urandom);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    for (int k = 0; k < N; k++) begin
      lvl = (bits[k+2] ? 1 : -1) + (bits[k+1] ? 2 : -2) + (bits[k] ? 1 : -1);
      lvl = lvl * 16 + noise(k < N1 ? 2 : 24);
      if (lvl > 127) lvl = 127;
      if (lvl < -128) lvl = -128;
      y  = 8'(lvl);
      yv = 1;
      ws = (k % 100) == 40;
      we = (k % 100) == 44;
      if (we) qexp.push_back(k < N1 ? 2 * int'(bits[k+1]) + int'(bits[k+2]) : -1);
      @(posedge clk);
      #1;
      if (k % 37 == 5) begin   // a gap in the sample stream
        yv = 0; ws = 0; we = 0;
        @(posedge clk); #1;
      end
    end
    yv = 0; ws = 0; we = 0;
    repeat (10) @(posedge clk);
    check(nout == N - TBL + 1, $sformatf("%0d decisions", nout));
    check(nq == N / 100, "one q per window");
    check(wraps > 0, "narrow metrics wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
