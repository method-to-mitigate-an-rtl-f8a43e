// insdel_detector_tb: all 128 seven-bit windows with all four q values. The
// expected decision is worked out from the marker written as a list of
// symbols (+1 -1 -1 -1 +1): match at offset 0 means no error, at +1 an
// insertion, at -1 a deletion, otherwise q (2 none, 1 insertion, 3/4
// deletion). Each decision path must be taken at least once.
module insdel_detector_tb;
  import bpmr_pkg::*;

  logic [6:0] win;
  logic [1:0] q;
  insdel_e    dec;
  logic       pmd;
  int checks = 0, failures = 0;
  int seen [6] = '{0, 0, 0, 0, 0, 0};

  insdel_detector dut (.win_i(win), .q_i(q), .dec_o(dec), .by_pmd_o(pmd));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit sym_match(input logic [6:0] w, input int first);
    int m [5] = '{1, -1, -1, -1, 1};
    for (int i = 0; i < 5; i++)
      if ((w[first + i] ? 1 : -1) != m[i]) return 0;
    return 1;
  endfunction

  initial begin
    insdel_e exp;
    bit      exp_pmd;
    for (int w = 0; w < 128; w++) begin
      for (int qq = 0; qq < 4; qq++) begin
        win = 7'(w); q = 2'(qq);
        #1;
        exp_pmd = 0;
        if (sym_match(win, 1))      exp = ID_NONE;
        else if (sym_match(win, 2)) exp = ID_INS;
        else if (sym_match(win, 0)) exp = ID_DEL;
        else begin
          exp_pmd = 1;
          exp = (qq + 1 == 2) ? ID_NONE : (qq + 1 == 1) ? ID_INS : ID_DEL;
        end
        checks++;
        if (dec != exp || pmd != exp_pmd) begin
          failures++;
          $display("FAIL: win=%b q=%0d got %0d/%0d expected %0d/%0d", win, qq + 1, dec, pmd, exp, exp_pmd);
        end
        seen[int'(exp) + 3 * int'(exp_pmd)]++;
      end
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
