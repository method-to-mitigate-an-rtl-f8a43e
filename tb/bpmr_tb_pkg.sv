// bpmr_tb_pkg: reference functions for the testbenches: a VT encoder written
// from the code's definition, the frame builder and a noise source.
package bpmr_tb_pkg;
  import bpmr_pkg::*;

  typedef logic [VT_K-1:0] data_t;
  typedef logic [VT_N-1:0] code_t;

  function automatic data_t rand_data();
    data_t d;
    for (int i = 0; i < int'(VT_K); i++) d[i] = 1'($urandom);
    return d;
  endfunction

  // VT checksum sum(i * c_i) mod 256 of a word of len bits, i from 1.
  function automatic int vt_checksum(input logic [VT_N+1:0] w, input int len);
    int s = 0;
    for (int i = 0; i < len; i++) if (w[i]) s += i + 1;
    return s % 256;
  endfunction

  // Reference encoder: data in the non-power-of-two positions, then the
  // eight parity bits chosen so that the checksum is 0.
  function automatic code_t ref_vt_encode(input data_t d);
    code_t c = '0;
    int k = 0;
    int defc;
    for (int pos = 1; pos <= int'(VT_N); pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        c[pos-1] = d[k];
        k++;
      end
    end
    defc = (256 - vt_checksum({2'b00, c}, VT_N)) % 256;
    for (int j = 0; j < 8; j++) c[(1 << j) - 1] = 1'((defc >> j) & 1);
    return c;
  endfunction

  // Approximately Gaussian integer noise, standard deviation sigma (in LSB).
  function automatic int noise(input int sigma);
    int acc = 0;
    for (int i = 0; i < 12; i++) acc += int'($urandom % 1024);
    return ((acc - 6144) * sigma) / 1024;  // sum of 12 uniforms on [0,1024): sd 1024
  endfunction

endpackage
