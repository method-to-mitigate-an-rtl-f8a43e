// viterbi_pr2: four-state Viterbi detector for the PR2 target
// H(D) = 1 + 2D + D^2, with the path-metric-difference measurement that
// locates an insertion or deletion at a marker.
//
// Trellis: the state after bit b_t is {b_(t-1), b_t}; state index
// s = 2*b_(t-1) + b_t and the state number used by the Ins/Del rule is
// q = s + 1. A branch from {o,n} on input b has the noiseless output
// (2b-1) + 2(2n-1) + (2o-1), i.e. one of -4,-2,0,2,4, scaled by Y_UNIT. The
// branch metric is the squared error (y - e)^2, the path metrics are
// add-compare-select and are kept modulo 2^PM_W with no renormalisation:
// two metrics are compared through the sign of their difference, which is
// exact while their spread stays below 2^(PM_W-1). Survivors are kept by
// register exchange, TB bits per state; the decided bit is the oldest bit of
// the state with the smallest metric.
//
// Marker window: win_start_i comes with the first marker sample (time n+1 of
// the method) and win_end_i with the last one (time n+l). Each state carries
// the metric its survivor had at the start of the window, copied along with
// the survivor. After the last marker sample the detector forms, for every
// state j, dpsi[j] = metric(j) - metric at the window start of the survivor
// into j, which is eq. (3), and gives the state with the smallest value as
// q (eq. (4)). Ties go to the lower state.
//
// Timing: one sample per cycle when y_valid_i is high. bit_o for sample k
// appears with bit_valid_o one cycle after sample k+TB-1 was taken; nothing
// comes out for the first TB-1 samples after start_i. q_o and dpsi_o are
// valid, with q_valid_o, one cycle after the sample that carried win_end_i.
// start_i (a pulse before the first sample of a sector) clears the metrics,
// so every starting state is equally likely.
//
// The target, the trellis and the q rule follow the method; the sample
// format, TB, PM_W and the register-exchange survivor memory are this
// design's choices.
module viterbi_pr2 #(
  parameter int unsigned Y_W    = 8,    // signed sample width
  parameter int unsigned Y_UNIT = 16,   // sample value of one PR unit
  parameter int unsigned TB     = 32,   // survivor length (decision delay)
  parameter int unsigned PM_W   = 24    // path metric width (modulo)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_i,
  input  logic signed [Y_W-1:0] y_i,
  input  logic                  y_valid_i,
  input  logic                  win_start_i,
  input  logic                  win_end_i,
  output logic                  bit_o,
  output logic                  bit_valid_o,
  output logic [1:0]            q_o,        // state index, q = q_o + 1
  output logic                  q_valid_o,
  output logic [PM_W-1:0]       dpsi_o [4]
);

  localparam int unsigned D_W  = Y_W + 3;
  localparam int unsigned BM_W = 2 * D_W;

  logic [PM_W-1:0] pm   [4];
  logic [PM_W-1:0] st   [4];
  logic [TB-1:0]   sv   [4];
  logic [PM_W-1:0] pm_n [4];
  logic [PM_W-1:0] st_n [4];
  logic [TB-1:0]   sv_n [4];
  logic [PM_W-1:0] dps  [4];
  logic [$clog2(TB+1)-1:0] fill;

  // a < b for metrics kept modulo 2^PM_W
  function automatic logic pm_less(input logic [PM_W-1:0] a, input logic [PM_W-1:0] b);
    logic [PM_W-1:0] diff;
    diff = a - b;
    return diff[PM_W-1];
  endfunction

  function automatic logic [BM_W-1:0] branch_metric(input logic signed [Y_W-1:0] y,
                                                    input logic o, input logic n,
                                                    input logic b);
    logic signed [D_W-1:0] e;
    logic signed [D_W-1:0] diff;
    e    = D_W'(signed'((b ? 1 : -1) + (n ? 2 : -2) + (o ? 1 : -1)) * signed'(Y_UNIT));
    diff = D_W'(y) - e;
    return BM_W'(diff * diff);
  endfunction

  // Add-compare-select, survivor and window-start bookkeeping.
  always_comb begin
    for (int s = 0; s < 4; s++) begin
      logic n, b, sel;
      logic [PM_W-1:0] m0, m1;
      n   = s[1];
      b   = s[0];
      m0  = pm[{1'b0, n}] + PM_W'(branch_metric(y_i, 1'b0, n, b));
      m1  = pm[{1'b1, n}] + PM_W'(branch_metric(y_i, 1'b1, n, b));
      sel = pm_less(m1, m0);
      pm_n[s] = sel ? m1 : m0;
      sv_n[s] = {sv[{sel, n}][TB-2:0], b};
      st_n[s] = win_start_i ? pm[{sel, n}] : st[{sel, n}];
      dps[s]  = pm_n[s] - st_n[s];
    end
  end

  // State with the smallest new metric, and state with the smallest dpsi.
  logic [1:0] best, qmin;
  always_comb begin
    logic [1:0] a, c;
    a    = pm_less(pm_n[1], pm_n[0]) ? 2'd1 : 2'd0;
    c    = pm_less(pm_n[3], pm_n[2]) ? 2'd3 : 2'd2;
    best = pm_less(pm_n[c], pm_n[a]) ? c : a;
    qmin = 2'd0;
    for (int s = 1; s < 4; s++)
      if (dps[s] < dps[qmin]) qmin = 2'(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 4; s++) begin
        pm[s]     <= '0;
        st[s]     <= '0;
        sv[s]     <= '0;
        dpsi_o[s] <= '0;
      end
      fill        <= '0;
      bit_o       <= 1'b0;
      bit_valid_o <= 1'b0;
      q_o         <= '0;
      q_valid_o   <= 1'b0;
    end else begin
      bit_valid_o <= 1'b0;
      q_valid_o   <= 1'b0;
      if (start_i) begin
        for (int s = 0; s < 4; s++) begin
          pm[s] <= '0;
          st[s] <= '0;
        end
        fill <= '0;
      end else if (y_valid_i) begin
        for (int s = 0; s < 4; s++) begin
          pm[s] <= pm_n[s];
          st[s] <= st_n[s];
          sv[s] <= sv_n[s];
        end
        if (fill != $clog2(TB+1)'(TB)) fill <= fill + 1'b1;
        if (fill >= $clog2(TB+1)'(TB - 1)) begin
          bit_o       <= sv_n[best][TB-1];
          bit_valid_o <= 1'b1;
        end
        if (win_end_i) begin
          q_o       <= qmin;
          q_valid_o <= 1'b1;
          for (int s = 0; s < 4; s++) dpsi_o[s] <= dps[s];
        end
      end
    end
  end

endmodule
