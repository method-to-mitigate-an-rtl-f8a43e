// marker_window_gen_tb: a 2000-sample stream with gaps. A reference grid
// (nominal 260-sample frames, moved by every injected decision) says where
// each marker window must open and close; decisions are injected early in
// frames: none, insertion, deletion and insertion again.
module marker_window_gen_tb;
  import bpmr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    start, yv, dv, ws, we;
  insdel_e dec;
  int checks = 0, failures = 0;

  marker_window_gen dut (.clk, .rst_n, .start_i(start), .y_valid_i(yv), .dec_valid_i(dv),
                         .dec_i(dec), .win_start_o(ws), .win_end_o(we));

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

  initial begin
    int frame_start;    // sample index where the current frame begins
    int nstart = 0, nend = 0;
    insdel_e plan [4] = '{ID_NONE, ID_INS, ID_DEL, ID_INS};
    int fr;
    start = 0; yv = 0; dv = 0; dec = ID_NONE;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    start = 1; @(posedge clk); #1 start = 0;
    frame_start = 0;
    fr = 0;
    for (int k = 0; k < 2000; k++) begin
      int rel;
      if (k - frame_start == int'(FRAME_LEN)) frame_start = k;
      rel = k - frame_start;
      yv = 1;
      // inject the decision of the previous frame 40 samples into this one
      dv = 0;
      if (rel == 40 && k > 200 && fr < 4) begin
        dv = 1; dec = plan[fr]; fr++;
        if (dec == ID_INS) frame_start++;
        if (dec == ID_DEL) frame_start--;
      end
      #1;
      rel = k - frame_start;
      check(ws == (rel == int'(VT_N)), $sformatf("win_start at sample %0d", k));
      check(we == (rel == int'(FRAME_LEN) - 1), $sformatf("win_end at sample %0d", k));
      nstart += int'(ws); nend += int'(we);
      @(posedge clk); #1;
      dv = 0;
      if (k % 13 == 0) begin
        yv = 0;
        #1 check(!ws && !we, "no window without a sample");
        @(posedge clk); #1;
      end
    end
    check(nstart == 7 && nend == 7, $sformatf("%0d/%0d windows", nstart, nend));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
