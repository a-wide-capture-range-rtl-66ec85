// tdc: time-to-digital converter measuring the length of Up/Down.
//
// The length of the Up or Down pulse is measured in units of a harmonic of
// the loop's own DCO, counted on both of its edges, so the result is a phase
// level: 8 levels per DCO period with the 4x harmonic (acquisition), 32 with
// 16x (tracking) and 128 with 64x (phase fixing). The harmonic is formed
// digitally: every system clock adds 4*L to a fractional accumulator (L =
// levels per period, 4 because the DCO period is given in quarter system
// clocks); each time the accumulator passes the DCO period, one level tick
// has elapsed. Where the system clock is too slow for the harmonic (top
// bands at 128 levels) up to two ticks are taken per clock.
//
// At update the count is latched as count_lv (saturated at L-1) with
// up_flg/down_flg naming the direction, and lv_valid pulses for one cycle.
// Timing: lv_valid is the cycle after update. The harmonic-clock TDC and the
// three resolutions follow the document; the accumulator form of the
// harmonic clock is this design's choice.
module tdc
  import adpll_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              up,
  input  logic              down,
  input  logic              update,
  input  logic [PERQ_W-1:0] period_q,   // DCO period, quarter system clocks
  input  lv_mode_e          mode,
  output logic [LV_W-1:0]   count_lv,
  output logic              up_flg,
  output logic              down_flg,
  output logic              lv_valid
);
  logic [PERQ_W:0]   frac, frac_nxt, sum;
  logic [LV_W:0]     cnt, cnt_nxt, lmax;
  logic [1:0]        inc;
  logic              seen_dn;
  logic [PERQ_W:0]   step, per;

  always_comb begin
    step = (PERQ_W+1)'(4 * levels_of(mode));
    per  = {1'b0, period_q};
    lmax = (LV_W+1)'(levels_of(mode) - 1);
    sum  = frac + step;
    if (sum >= 2 * per) begin
      inc = 2'd2;
      frac_nxt = sum - 2 * per;
    end else if (sum >= per) begin
      inc = 2'd1;
      frac_nxt = sum - per;
    end else begin
      inc = 2'd0;
      frac_nxt = sum;
    end
    cnt_nxt = cnt + (LV_W+1)'(inc);
    if (cnt_nxt > lmax) cnt_nxt = lmax;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frac     <= '0;
      cnt      <= '0;
      seen_dn  <= 1'b0;
      count_lv <= '0;
      up_flg   <= 1'b0;
      down_flg <= 1'b0;
      lv_valid <= 1'b0;
    end else begin
      lv_valid <= update;
      if (update) begin
        count_lv <= cnt[LV_W-1:0];
        up_flg   <= !seen_dn;
        down_flg <= seen_dn;
      end
      if (up || down) begin
        seen_dn <= down;
        frac    <= update ? step : frac_nxt;   // restart when a round begins at once
        cnt     <= update ? '0 : cnt_nxt;
      end else begin
        frac <= '0;
        cnt  <= update ? '0 : cnt;
        if (update) seen_dn <= 1'b0;
      end
    end
  end
endmodule
