// state_control: state decision for the dual-loop PLL (State Control Unit).
//
// Four "customs" watch the per-round phase levels of the two loops. A custom
// counts how many rounds in a row its loop reported the same level in the
// same direction (Up or Down):
//   * acquisition (customs 1, 2): ACQ_N = 3 equal levels in a row on either
//     loop ends acquisition. That loop's code passes the gateway into the
//     bank and both loops continue from it in the tracking state, in its band.
//   * tracking (customs 3, 4): the first loop to see TRK_N = 5 equal levels
//     in a row becomes the primary loop. Its code is stored in the bank, the
//     primary enters the phase-fixing state from the stored code and the
//     other loop, the secondary, restarts tracking from the same code.
//   * phase fixing: the secondary keeps tracking. When it again sees TRK_N
//     levels in a row that differ by at most 1 (its fast tracking filter
//     dithers by a few codes) and its code, averaged over its last four
//     rounds, is at least 3 steps from the bank, the change is persistent,
//     not noise; that average replaces the bank code and the primary
//     restarts phase fixing from it.
// A band change of a loop in acquisition restarts its custom, since the
// phase levels of the old band mean nothing in the new one, and in every
// state so does a round with trigger edges: the phase then slipped by a whole cycle or
// more, so equal (saturated) levels do not mean convergence. Likewise in
// acquisition a loop whose code is pinned at either end of its range has not
// converged, however constant its level.
//
// Outputs: the system state, the primary loop, the bank (code and band),
// load pulses for the loop filter (ld_trk per loop, ld_fix for the
// phase-fixing integrator), the TDC resolution per loop and locked, which
// is phase lock of the primary. A decision made in a round's strobe cycle
// takes the loop's updated code one cycle later (gateway) and the loads
// follow one cycle after that. ACQ_N, TRK_N, the primary/secondary roles
// and the bank follow the document; the +-1 level tolerance, the four-round
// average and the distance of 3 codes for a refresh, and the trigger-free
// and not-pinned conditions are this design's choices.
// The assertion is disabled during reset, so lint reports rst_n as both
// an asynchronous reset and a synchronous input; that is expected.
module state_control
  import adpll_pkg::*;
#(
  parameter int unsigned ACQ_N = 3,
  parameter int unsigned TRK_N = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        lv_valid,
  input  logic [LV_W-1:0]   lv [2],
  input  logic [1:0]        lag,
  input  logic [1:0]        band_chg,
  input  logic [1:0]        trig_any,     // the round had trigger edges
  input  logic [CODE_W-1:0] code [2],
  input  logic [DIV_W-1:0]  div_lv [2],
  input  logic              phase_locked,
  output pll_state_e        state,
  output logic              primary,
  output logic [CODE_W-1:0] bank_code,
  output logic [DIV_W-1:0]  bank_div,
  output logic [1:0]        ld_trk,
  output logic              ld_fix,
  output lv_mode_e          mode [2],
  output logic              locked
);
  logic [LV_W-1:0] last_lv [2];
  logic [1:0]      last_lag;
  logic [4:0]      run [2];
  logic [4:0]      run_nxt [2];
  logic [1:0]      hit;
  logic            pend, wloop;
  logic            restart;
  logic [1:0]      pinned;     // code at a range end: the sweep is not over
  logic [CODE_W-1:0] ch [2][4];  // last four codes of each loop
  logic [CODE_W+1:0] csum [2];
  logic [CODE_W-1:0] cavg [2];
  logic [1:0]      near_lv;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      csum[i] = (CODE_W+2)'(ch[i][0]) + (CODE_W+2)'(ch[i][1]) + (CODE_W+2)'(ch[i][2]) + (CODE_W+2)'(ch[i][3]);
      cavg[i] = CODE_W'(csum[i] >> 2);
      // the monitoring secondary accepts a level within +-1 as "the same"
      near_lv[i] = (state == ST_FIX) && (lv[i] + 1'b1 == last_lv[i] || last_lv[i] + 1'b1 == lv[i]);
      run_nxt[i] = ((lv[i] == last_lv[i] || near_lv[i]) && lag[i] == last_lag[i] && run[i] != '0)
                   ? ((run[i] == '1) ? run[i] : run[i] + 1'b1) : 5'd1;
    end
    for (int i = 0; i < 2; i++)
      pinned[i] = code[i] == '0 || code[i] == CODE_W'(CODE_LIM);
    hit = '0;
    case (state)
      ST_ACQ: for (int i = 0; i < 2; i++)
                hit[i] = lv_valid[i] && !band_chg[i] && !trig_any[i] && !pinned[i]
                         && run_nxt[i] >= 5'(ACQ_N);

      ST_TRK: for (int i = 0; i < 2; i++)
                hit[i] = lv_valid[i] && !trig_any[i] && run_nxt[i] >= 5'(TRK_N);
      default: hit[~primary] = lv_valid[~primary] && !trig_any[~primary] && run_nxt[~primary] >= 5'(TRK_N);
    endcase
  end

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      if (state == ST_ACQ)                           mode[i] = LV_8;
      else if (state == ST_FIX && primary == 1'(i))  mode[i] = LV_128;
      else                                           mode[i] = LV_32;
    end
  end

  assign locked = (state == ST_FIX) && phase_locked;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_ACQ;
      primary   <= 1'b0;
      bank_code <= CODE_W'(CODE_CTR);
      bank_div  <= '0;
      ld_trk    <= '0;
      ld_fix    <= 1'b0;
      pend      <= 1'b0;
      wloop     <= 1'b0;
      restart   <= 1'b0;
      for (int i = 0; i < 2; i++) begin
        last_lv[i] <= '0;
        run[i]     <= '0;
        for (int k = 0; k < 4; k++) ch[i][k] <= CODE_W'(CODE_CTR);
      end
      last_lag <= '0;
    end else begin
      ld_trk  <= '0;
      ld_fix  <= 1'b0;
      restart <= 1'b0;
      // customs: follow the level sequence of each loop
      for (int i = 0; i < 2; i++) begin
        if (lv_valid[i]) begin
          ch[i][0] <= code[i];
          for (int k = 1; k < 4; k++) ch[i][k] <= ch[i][k-1];
        end
        if (restart || (lv_valid[i] && (band_chg[i] || trig_any[i]))) begin
          run[i] <= '0;
        end else if (lv_valid[i]) begin
          last_lv[i]  <= lv[i];
          last_lag[i] <= lag[i];
          run[i]      <= run_nxt[i];
        end
      end
      if (!pend && hit != '0) begin
        pend  <= 1'b1;
        wloop <= hit[0] ? 1'b0 : 1'b1;
      end else if (pend) begin
        // gateway: the winning loop's updated code enters the bank
        pend      <= 1'b0;
        restart   <= 1'b1;
        bank_code <= code[wloop];
        bank_div  <= div_lv[wloop];
        case (state)
          ST_ACQ: begin
            state   <= ST_TRK;
            primary <= wloop;
            ld_trk  <= 2'b11;
          end
          ST_TRK: begin
            state          <= ST_FIX;
            primary        <= wloop;
            ld_fix         <= 1'b1;
            ld_trk[~wloop] <= 1'b1;
          end
          default: begin
            // secondary has found a new frequency: refresh the bank with
            // its code averaged over four rounds
            if ((cavg[wloop] > bank_code + 8'd2) || (bank_code > cavg[wloop] + 8'd2)) begin
              bank_code <= cavg[wloop];
              ld_fix    <= 1'b1;
            end else begin
              bank_code <= bank_code;
              bank_div  <= bank_div;
            end
          end
        endcase
      end
    end
  end

  // loads are single-cycle pulses and only follow a gateway decision
  assert property (@(posedge clk) disable iff (!rst_n) ld_fix |-> $past(pend));
endmodule
