// marker_encoder_tb: three codewords offered back to back; the serial stream
// must be each codeword from position 1, then +1 -1 -1 -1 +1 (1 0 0 0 1),
// 780 bits with no gap, frame_start on the first bit of each frame. Then one
// frame with the output stalled now and then.
module marker_encoder_tb;
  import bpmr_pkg::*;
  import bpmr_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  code_t code;
  logic  cvalid, cready, bit_o, bvalid, bready, fstart;
  int checks = 0, failures = 0;

  marker_encoder dut (.clk, .rst_n, .code_i(code), .code_valid_i(cvalid), .code_ready_o(cready),
                      .bit_o, .bit_valid_o(bvalid), .bit_ready_i(bready), .frame_start_o(fstart));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  code_t words [4];
  logic  expbits [$];
  logic  gotbits [$];
  int    fstarts [$];
  int    cyc = 0;
  int    first_cyc = -1, last_cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && bvalid && bready) begin
      gotbits.push_back(bit_o);
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
      if (fstart) fstarts.push_back(gotbits.size() - 1);
    end
  end

  initial begin
    cvalid = 0; bready = 1; code = '0;
    for (int w = 0; w < 4; w++) begin
      words[w] = ref_vt_encode(rand_data());
      for (int i = 0; i < int'(VT_N); i++) expbits.push_back(words[w][i]);
      expbits.push_back(1); expbits.push_back(0); expbits.push_back(0);
      expbits.push_back(0); expbits.push_back(1);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < 3; w++) begin
      code = words[w]; cvalid = 1;
      forever begin
        @(negedge clk);
        if (cready) break;
      end
      @(posedge clk); #1;
    end
    cvalid = 0;
    repeat (800) @(posedge clk);
    check(gotbits.size() == 3 * FRAME_LEN, $sformatf("got %0d bits", gotbits.size()));
    check(last_cyc - first_cyc + 1 == 3 * FRAME_LEN, "frames must follow with no gap");
    check(fstarts.size() == 3, "three frame starts");
    foreach (fstarts[i]) check(fstarts[i] == i * FRAME_LEN, "frame start position");
    // fourth word with a stalling receiver
    #1 code = words[3]; cvalid = 1;
    @(posedge clk); #1 cvalid = 0;
    for (int t = 0; t < 600; t++) begin
      bready = ($urandom % 3) != 0;
      @(posedge clk); #1;
    end
    bready = 1;
    repeat (10) @(posedge clk);
    check(gotbits.size() == 4 * FRAME_LEN, "fourth frame complete under stalls");
    for (int i = 0; i < 4 * FRAME_LEN; i++)
      check(i < gotbits.size() && gotbits[i] == expbits[i], $sformatf("bit %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
