// vt_encoder: systematic Varshamov-Tenengolts encoder, 247 data bits in,
// one 255-bit codeword out.
//
// A VT codeword c_1..c_n satisfies sum(i * c_i) = a (mod n+1). The data bits
// fill, in order, every position that is not a power of two; the eight
// positions 1, 2, 4, ..., 128 hold parity. With s the checksum of the data
// bits alone, the deficiency d = (a - s) mod 256 is written in binary onto
// the parity positions (bit j of d on position 2^j), which makes the total
// checksum a. The code length and rate are those of the method; the
// systematic layout and a = 0 are this design's choices.
//
// Interface: data_i[0] is the first data bit; code_o[i-1] is codeword
// position i and code_o[0] is sent first. A valid/ready handshake on each
// side; one output register, so a word accepted in cycle t is offered in
// cycle t+1, and one word per cycle is sustained.
module vt_encoder
  import bpmr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [VT_K-1:0]   data_i,
  input  logic              data_valid_i,
  output logic              data_ready_o,
  output logic [VT_N-1:0]   code_o,
  output logic              code_valid_o,
  input  logic              code_ready_i
);

  logic [VT_N-1:0] code_d;

  // Place data, accumulate the checksum of data positions, fill parity.
  always_comb begin
    int unsigned k;
    logic [7:0]  s;
    logic [7:0]  d;
    code_d = '0;
    s      = '0;
    k      = 0;
    for (int unsigned pos = 1; pos <= VT_N; pos++) begin
      if (!is_parity_pos(pos)) begin
        code_d[pos-1] = data_i[k];
        if (data_i[k]) s = s + 8'(pos);
        k++;
      end
    end
    d = 8'(VT_A) - s;
    for (int unsigned j = 0; j < VT_P; j++) code_d[(1 << j) - 1] = d[j];
  end

  assign data_ready_o = !code_valid_o || code_ready_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_valid_o <= 1'b0;
      code_o       <= '0;
    end else if (data_ready_o) begin
      code_valid_o <= data_valid_i;
      if (data_valid_i) code_o <= code_d;
    end
  end

endmodule
