// vt_encoder_tb: random data words through the VT encoder. Each codeword is
// checked against the code's definition (checksum 0 mod 256, data bits in
// the non-power-of-two positions in order) and against the reference
// encoder; the output must appear exactly one cycle after acceptance, and a
// stalled output must hold its word.
module vt_encoder_tb;
  import bpmr_pkg::*;
  import bpmr_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  data_t data;
  logic  dvalid, dready, cvalid, cready;
  code_t code;
  int checks = 0, failures = 0;

  vt_encoder dut (.clk, .rst_n, .data_i(data), .data_valid_i(dvalid), .data_ready_o(dready),
                  .code_o(code), .code_valid_o(cvalid), .code_ready_i(cready));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t d;
    code_t exp;
    int k;
    logic ok;
    dvalid = 0; cready = 1; data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      d = rand_data();
      if (t == 0) d = '0;
      if (t == 1) d = '1;
      data = d; dvalid = 1;
      @(posedge clk);            // accepted here (ready is high)
      #1 dvalid = 0;
      check(cvalid, "valid one cycle after acceptance");
      exp = ref_vt_encode(d);
      check(code == exp, $sformatf("word %0d differs from reference", t));
      check(vt_checksum({2'b00, code}, VT_N) == 0, "checksum not 0");
      k = 0; ok = 1;
      for (int pos = 1; pos <= int'(VT_N); pos++)
        if ((pos & (pos - 1)) != 0) begin
          if (code[pos-1] != d[k]) ok = 0;
          k++;
        end
      check(ok, "data bits not in place");
      if (t % 50 == 7) begin
        // stall the output and offer a new word: it must wait
        cready = 0; data = rand_data(); dvalid = 1;
        @(posedge clk); #1;
        check(!dready && code == exp, "stall must hold the word");
        dvalid = 0; cready = 1;
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
