// pfd: three-state phase frequency detector with trigger counting.
//
// A synchronous rendering of the improved three-state PFD: a rising edge of
// the reference sets up_temp, a rising edge of the DCO sets down_temp, and
// when both are set the pair is cleared and a one-cycle Update pulse marks
// the end of a "round". Because both flags are cleared in the same clock,
// the short reset pulse of the asynchronous circuit never appears, so Up is
// high only while the reference leads and Down only while it lags, as the
// added gating of the improved PFD intends.
//
// While Up is high, every further rising edge of the reference is a trigger
// (the reference has gained a whole cycle on the DCO); while Down is high,
// every further DCO rising edge is one. The count of the round is latched at
// Update as trig_cnt together with its direction trig_lag, and the working
// counter is cleared whenever neither Up nor Down is high.
//
// Timing: ref_clean and dco_in are synchronous to clk. up/down are
// registered; update is high for the cycle after the closing edge, the first
// cycle in which up/down are low again; trig_cnt/trig_lag/lag are valid
// from that cycle until the next update. The set/clear behaviour and the
// trigger counting follow the document; the synchronous form is this
// design's choice, because the whole PLL runs on one system clock.
// The assertion is disabled during reset, so lint reports rst_n as both
// an asynchronous reset and a synchronous input; that is expected.
module pfd
  import adpll_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ref_clean,   // repaired reference
  input  logic              dco_in,      // divided DCO output
  output logic              up,          // reference leads
  output logic              down,        // reference lags
  output logic              update,      // one-cycle end-of-round pulse
  output logic [TRIG_W-1:0] trig_cnt,    // triggers in the last round
  output logic              trig_lag     // last round was a Down round
);
  logic ref_d, dco_d;
  logic ref_rise, dco_rise;
  logic up_temp, down_temp;
  logic set_up, set_dn;
  logic [TRIG_W-1:0] trig_run;

  assign ref_rise = ref_clean & ~ref_d;
  assign dco_rise = dco_in & ~dco_d;
  assign set_up   = up_temp | ref_rise;
  assign set_dn   = down_temp | dco_rise;
  assign up       = up_temp;
  assign down     = down_temp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_d     <= 1'b0;
      dco_d     <= 1'b0;
      up_temp   <= 1'b0;
      down_temp <= 1'b0;
      update    <= 1'b0;
      trig_run  <= '0;
      trig_cnt  <= '0;
      trig_lag  <= 1'b0;
    end else begin
      ref_d <= ref_clean;
      dco_d <= dco_in;
      if (set_up && set_dn) begin
        // both edges seen: reset the pair and close the round
        up_temp   <= 1'b0;
        down_temp <= 1'b0;
        update    <= 1'b1;
        trig_cnt  <= trig_run;
        trig_lag  <= down_temp;
        trig_run  <= '0;
      end else begin
        up_temp   <= set_up;
        down_temp <= set_dn;
        update    <= 1'b0;
        if ((up_temp && ref_rise) || (down_temp && dco_rise)) begin
          if (trig_run != '1) trig_run <= trig_run + 1'b1;
        end else if (!up_temp && !down_temp) begin
          trig_run <= '0;
        end
      end
    end
  end

  // The two flags are never high together after a clock edge.
  assert property (@(posedge clk) disable iff (!rst_n) !(up_temp && down_temp));
endmodule
