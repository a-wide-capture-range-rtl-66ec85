// divider_control: band selection for the two loops (Divider Control Unit).
//
// Each loop has a trigger-time accumulator and a band register div_lv
// (divide ratio 2^div_lv; a larger index is a lower frequency). During
// acquisition, after each round of loop i the trigger count of this round is
// added to that of the previous round when both rounds had the same
// direction. The two-round sum is compared with the thresholds of the band
// change rule:
//     sum > 20 : reference about 16x away      (4 octaves)
//     sum >  9 : about 8x                      (3 octaves)
//     sum >  4 : about 4x                      (2 octaves)
//     sum >  1 : about 2x                      (1 octave)
// Up rounds (reference faster) move the band up in frequency, Down rounds
// move it down. In the dual-loop system loop 0 uses only even and loop 1
// only odd bands, four each, so a loop moves in steps of two bands: the
// wanted shift of j octaves becomes floor(j/2) steps, clamped to the loop's
// bands; a single octave moves the loop one step only when its code is
// already pinned at the band edge in the wanted direction (the other loop's
// band then lies between, but is out of this loop's reach). A move pulses band_chg for the round (combinationally, in the
// strobe cycle) and clears the accumulator.
//
// After acquisition (sync high) both loops use the band of loop sel.
// Timing: strobe_i is one pulse per round with trig_cnt_i/trig_lag_i valid;
// div_lv_i is registered. The thresholds, the two-round window, the
// odd/even split and the sharing of the primary band follow the document;
// the rounding of a shift to the loop's parity is this design's reading.
module divider_control
  import adpll_pkg::*;
#(
  parameter int unsigned INIT_DIV0 = 4,   // loop 0: even bands 0,2,4,6
  parameter int unsigned INIT_DIV1 = 3    // loop 1: odd bands 1,3,5,7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              acq,          // system is in acquisition
  input  logic              sync,         // copy the band of loop sel
  input  logic              sel,
  input  logic [1:0]        strobe,
  input  logic [TRIG_W-1:0] trig_cnt [2],
  input  logic [1:0]        trig_lag,
  input  logic [CODE_W-1:0] code [2],     // current DCO codes
  output logic [DIV_W-1:0]  div_lv [2],
  output logic [1:0]        band_chg
);
  logic [TRIG_W-1:0] prev_cnt [2];
  logic [1:0]        prev_lag;
  logic [DIV_W-1:0]  div_nxt [2];

  // octaves of shift wanted for a two-round trigger sum
  function automatic int unsigned octaves(logic [TRIG_W:0] s);
    if (s > 20) return 4;
    if (s > 9)  return 3;
    if (s > 4)  return 2;
    if (s > 1)  return 1;
    return 0;
  endfunction

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      logic [TRIG_W:0] sum;
      int              steps, nd, lo, hi;
      sum = (prev_lag[i] == trig_lag[i]) ? (TRIG_W+1)'(prev_cnt[i]) + (TRIG_W+1)'(trig_cnt[i])
                                         : (TRIG_W+1)'(trig_cnt[i]);
      steps = int'(octaves(sum) / 2);
      // one octave: move only when the code is pinned at the band edge
      if (octaves(sum) == 1 &&
          (trig_lag[i] ? code[i] == '0 : code[i] == CODE_W'(CODE_LIM))) steps = 1;
      lo    = i;                              // parity of the loop
      hi    = int'(NUM_BANDS) - 2 + i;
      nd    = trig_lag[i] ? int'(div_lv[i]) + 2 * steps : int'(div_lv[i]) - 2 * steps;
      if (nd < lo) nd = lo;
      if (nd > hi) nd = hi;
      div_nxt[i]  = DIV_W'(nd);
      band_chg[i] = acq && strobe[i] && (div_nxt[i] != div_lv[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_lv[0] <= DIV_W'(INIT_DIV0);
      div_lv[1] <= DIV_W'(INIT_DIV1);
      prev_cnt[0] <= '0;
      prev_cnt[1] <= '0;
      prev_lag    <= '0;
    end else if (sync) begin
      div_lv[~sel] <= div_lv[sel];
    end else if (acq) begin
      for (int i = 0; i < 2; i++) begin
        if (strobe[i]) begin
          if (band_chg[i]) begin
            div_lv[i]   <= div_nxt[i];
            prev_cnt[i] <= '0;
            prev_lag[i] <= trig_lag[i];
          end else begin
            prev_cnt[i] <= trig_cnt[i];
            prev_lag[i] <= trig_lag[i];
          end
        end
      end
    end
  end

  initial begin
    assert (INIT_DIV0 % 2 == 0 && INIT_DIV0 < NUM_BANDS) else $error("INIT_DIV0 must be an even band");
    assert (INIT_DIV1 % 2 == 1 && INIT_DIV1 < NUM_BANDS) else $error("INIT_DIV1 must be an odd band");
  end
endmodule
