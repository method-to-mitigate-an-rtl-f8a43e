// marker_encoder: turns 255-bit VT codewords into the serial recorded stream,
// appending the 5-bit marker after every codeword.
//
// Each frame is x_1..x_255 followed by m_1..m_5, so the stream is the marker
// code of rate 255/260 of the method, with the marker +1 -1 -1 -1 +1 (bits
// 1 0 0 0 1). A codeword is taken into a shift register when the previous
// frame has gone out; a 9-bit counter walks the 260 bit slots. The codeword
// is sent from position 1 (code_i[0]) upwards.
//
// Interface: valid/ready on the codeword input; bit_o with bit_valid_o and
// bit_ready_i on the output (one bit per cycle when bit_ready_i stays high).
// A codeword offered while the last marker bit of the previous frame goes
// out is taken in the same cycle, so frames follow each other with no gap.
module marker_encoder
  import bpmr_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [VT_N-1:0] code_i,
  input  logic            code_valid_i,
  output logic            code_ready_o,
  output logic            bit_o,
  output logic            bit_valid_o,
  input  logic            bit_ready_i,
  output logic            frame_start_o     // high with the first bit of a frame
);

  logic [VT_N-1:0] sreg;
  logic [8:0]      slot;        // 0..259, bit slot within the frame
  logic            busy;

  logic last_slot;
  assign last_slot    = busy && bit_ready_i && (slot == 9'(FRAME_LEN - 1));
  assign code_ready_o = !busy || last_slot;

  always_comb begin
    if (slot < 9'(VT_N)) bit_o = sreg[0];
    else                 bit_o = MARKER[MK_LEN - 1 - (int'(slot) - VT_N)];
  end
  assign bit_valid_o   = busy;
  assign frame_start_o = busy && (slot == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      slot <= '0;
      sreg <= '0;
    end else begin
      if (busy && bit_ready_i) begin
        slot <= (slot == 9'(FRAME_LEN - 1)) ? '0 : slot + 9'd1;
        if (slot < 9'(VT_N)) sreg <= sreg >> 1;
        if (last_slot) busy <= 1'b0;
      end
      if (code_valid_i && code_ready_o) begin
        sreg <= code_i;
        busy <= 1'b1;
        slot <= '0;
      end
    end
  end

endmodule
