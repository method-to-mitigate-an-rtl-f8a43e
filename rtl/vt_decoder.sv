// vt_decoder: corrects one inserted or one deleted bit in a received VT
// codeword and returns its 247 data bits.
//
// Received bits arrive serially; their count (254, 255 or 256) tells the
// decoder what to correct. While a word is written, its weight w (number of
// ones) and checksum s = sum(i * r_i) mod 256 are accumulated, i counting
// from 1. Deletion (254 bits), with D = (a - s) mod 256: if D <= w a 0 is put
// back so that D ones lie to its right, else a 1 is put back so that D-w-1
// zeros lie to its left. Insertion (256 bits), with D = (s - a) mod 256: if
// D = w the first bit is removed; if D < w a 0 with D ones to its right is
// removed; if D > w a 1 with D-w zeros to its left is removed; if no such bit
// is found the last bit goes. Each rule places the bit anywhere inside the
// run it falls in, which gives the same word. This is Levenshtein's
// single-error decoder for VT codes; the method names the VT decoder, the
// serial scan and the buffering are this design's.
//
// Two 256-bit buffers alternate: one is written while the other is scanned,
// one bit per cycle, to find the position; the corrected word is then formed
// in one cycle and the data bits (every position that is not a power of two)
// are registered on data_o with a one-cycle data_valid_o pulse. A word of
// 255 bits is passed without scan; chk_err_o flags a 255-bit word whose
// checksum is not a (an error the code detects but does not locate). A word
// of another length is passed as received, with len_err_o. Latency from the
// last bit: about len+3 cycles for a slipped word, 3 for a clean one; a
// new word may start right after the last bit of the previous one as long
// as words are at least 260 cycles apart on average. overflow_o is sticky
// and reports a word lost because both buffers were full.
module vt_decoder
  import bpmr_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start_i,     // clears the overflow flag
  input  logic            bit_i,
  input  logic            valid_i,
  input  logic            last_i,
  output logic [VT_K-1:0] data_o,
  output logic            data_valid_o,
  output insdel_e         corr_o,      // what was corrected in this word
  output logic            chk_err_o,
  output logic            len_err_o,
  output logic            overflow_o
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_FIX} scan_state_e;

  // ---------------- write side ----------------
  logic [VT_N:0] buf_q  [2];
  logic [8:0]    len_q  [2];
  logic [8:0]    wgt_q  [2];
  logic [7:0]    sum_q  [2];
  logic [1:0]    full;
  logic          wsel;
  logic [8:0]    wcnt;
  logic [8:0]    wgt;
  logic [7:0]    sum;
  logic          rsel;
  logic          rel_buf;        // scan side frees buffer rsel

  logic [8:0] wgt_n;
  logic [7:0] sum_n;
  assign wgt_n = wgt + 9'(bit_i);
  assign sum_n = sum + (bit_i ? 8'(wcnt + 9'd1) : 8'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++) begin
        buf_q[b] <= '0;
        len_q[b] <= '0;
        wgt_q[b] <= '0;
        sum_q[b] <= '0;
      end
      full       <= '0;
      wsel       <= 1'b0;
      wcnt       <= '0;
      wgt        <= '0;
      sum        <= '0;
      overflow_o <= 1'b0;
    end else begin
      if (rel_buf) full[!rsel] <= 1'b0;   // rsel has already moved on
      if (start_i) overflow_o <= 1'b0;
      if (valid_i) begin
        if (full[wsel]) begin
          overflow_o <= 1'b1;
          if (last_i) begin
            wcnt <= '0;
            wgt  <= '0;
            sum  <= '0;
          end
        end else begin
          if (wcnt <= 9'(VT_N)) buf_q[wsel][wcnt[7:0]] <= bit_i;
          if (last_i) begin
            full[wsel]  <= 1'b1;
            len_q[wsel] <= wcnt + 9'd1;
            wgt_q[wsel] <= wgt_n;
            sum_q[wsel] <= sum_n;
            wsel        <= ~wsel;
            wcnt        <= '0;
            wgt         <= '0;
            sum         <= '0;
          end else begin
            wcnt <= wcnt + 9'd1;
            wgt  <= wgt_n;
            sum  <= sum_n;
          end
        end
      end
    end
  end

  // ---------------- scan side ----------------
  scan_state_e   state;
  logic [VT_N:0] r;            // word being corrected
  logic [8:0]    len;
  logic [8:0]    idx;          // scan index
  logic [8:0]    cnt;          // ones or zeros seen before idx
  logic [8:0]    target;
  logic          tbit;         // deletion: bit put back; insertion: bit removed
  logic          cnt_ones;     // the scan counts ones (else zeros)
  logic [8:0]    pos;          // position found
  logic          found;
  insdel_e       kind;

  assign r   = buf_q[rsel];
  assign len = len_q[rsel];

  // Plan of the scan, from the stored weight and checksum.
  logic [7:0] dd_del, dd_ins;
  logic [8:0] w9;
  assign w9     = wgt_q[rsel];
  assign dd_del = 8'(VT_A) - sum_q[rsel];
  assign dd_ins = sum_q[rsel] - 8'(VT_A);

  // Corrected word and its data bits.
  logic [VT_N-1:0] c;
  logic [VT_N:0]   r_dn, r_up;   // r_dn[j] = r[j-1], r_up[j] = r[j+1]
  assign r_dn = {r[VT_N-1:0], 1'b0};
  assign r_up = {1'b0, r[VT_N:1]};
  logic [VT_K-1:0] data_c;
  always_comb begin
    int unsigned k;
    for (int unsigned j = 0; j < VT_N; j++) begin
      case (kind)
        ID_DEL:  c[j] = (9'(j) < pos) ? r[j] : ((9'(j) == pos) ? tbit : r_dn[j]);
        ID_INS:  c[j] = (9'(j) < pos) ? r[j] : r_up[j];
        default: c[j] = r[j];
      endcase
    end
    k = 0;
    data_c = '0;
    for (int unsigned p = 1; p <= VT_N; p++) begin
      if (!is_parity_pos(p)) begin
        data_c[k] = c[p-1];
        k++;
      end
    end
  end

  logic cur;
  assign cur = r[idx[7:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      rsel         <= 1'b0;
      idx          <= '0;
      cnt          <= '0;
      target       <= '0;
      tbit         <= 1'b0;
      cnt_ones     <= 1'b0;
      pos          <= '0;
      found        <= 1'b0;
      kind         <= ID_NONE;
      data_o       <= '0;
      data_valid_o <= 1'b0;
      corr_o       <= ID_NONE;
      chk_err_o    <= 1'b0;
      len_err_o    <= 1'b0;
      rel_buf      <= 1'b0;
    end else begin
      data_valid_o <= 1'b0;
      rel_buf      <= 1'b0;
      case (state)
        S_IDLE: begin
          if (full[rsel] && !rel_buf) begin
            idx   <= '0;
            cnt   <= '0;
            found <= 1'b0;
            pos   <= '0;
            if (len == 9'(VT_N - 1)) begin
              kind <= ID_DEL;
              if (9'(dd_del) <= w9) begin
                tbit <= 1'b0; cnt_ones <= 1'b1; target <= w9 - 9'(dd_del);
                if (w9 == 9'(dd_del)) found <= 1'b1;   // put back at the front
              end else begin
                tbit <= 1'b1; cnt_ones <= 1'b0; target <= 9'(dd_del) - w9 - 9'd1;
                if (9'(dd_del) == w9 + 9'd1) found <= 1'b1;
              end
              state <= S_SCAN;
            end else if (len == 9'(VT_N + 1)) begin
              kind <= ID_INS;
              if (9'(dd_ins) == w9) begin
                found <= 1'b1;                          // remove the first bit
              end else if (9'(dd_ins) < w9) begin
                tbit <= 1'b0; cnt_ones <= 1'b1; target <= w9 - 9'(dd_ins);
              end else begin
                tbit <= 1'b1; cnt_ones <= 1'b0; target <= 9'(dd_ins) - w9;
              end
              state <= S_SCAN;
            end else begin
              kind  <= ID_NONE;
              state <= S_FIX;
            end
          end
        end
        S_SCAN: begin
          if (found) begin
            state <= S_FIX;
          end else if (idx == len) begin
            pos   <= (kind == ID_DEL) ? len : len - 9'd1;   // fall back to the end
            state <= S_FIX;
          end else if (kind == ID_DEL) begin
            // put-back position is just after the target-th counted bit
            if (cur == cnt_ones) begin
              if (cnt + 9'd1 == target) begin
                found <= 1'b1;
                pos   <= idx + 9'd1;
              end
              cnt <= cnt + 9'd1;
            end
            idx <= idx + 9'd1;
          end else begin
            // removed bit is a tbit with target counted bits before it
            if (cur == tbit && cnt == target) begin
              found <= 1'b1;
              pos   <= idx;
            end else begin
              if (cur == cnt_ones) cnt <= cnt + 9'd1;
              idx <= idx + 9'd1;
            end
          end
        end
        default: begin // S_FIX
          data_o       <= data_c;
          data_valid_o <= 1'b1;
          corr_o       <= kind;
          chk_err_o    <= (kind == ID_NONE) && (len == 9'(VT_N)) && (sum_q[rsel] != 8'(VT_A));
          len_err_o    <= (len != 9'(VT_N)) && (kind == ID_NONE);
          rel_buf      <= 1'b1;
          rsel         <= ~rsel;
          state        <= S_IDLE;
        end
      endcase
    end
  end

endmodule
