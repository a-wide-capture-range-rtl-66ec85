// loop_filter: digital loop filter of the dual-loop PLL (guide unit + mux).
//
// Holds the five integrators of the design:
//   Integrators 1, 2 (integrator_acq): acquisition filter of loop 0 / loop 1,
//     differing only in their initial code;
//   Integrators 3, 4 (integrator_trk): tracking filter of loop 0 without
//     noise treatment (aggressive) and of loop 1 with 8-point averaging
//     (conservative);
//   Integrator 5 (integrator_fix): phase-fixing filter of the primary loop.
// The guide unit sends each loop's round result (phase level, direction,
// strobe) to the integrator of that loop's current role, and the mux hands
// the matching code to the loop's DCO. In the phase-fixing state the
// secondary loop keeps tracking, and always without averaging, because it
// plays the aggressive role that follows a drifting reference quickly.
//
// Loads come from the band changes (back to the band centre, CODE_CTR) and
// from the state control's bank (ld_trk, ld_fix). Timing: integrators
// update on the strobe of their loop; codes are registered. The integrator
// roles follow the document; which loop gets the averaging filter is this
// design's choice.
module loop_filter
  import adpll_pkg::*;
#(
  parameter int unsigned INIT_CODE0 = CODE_CTR,
  parameter int unsigned INIT_CODE1 = CODE_CTR,
  parameter int unsigned ACQ_GAIN   = 4,
  parameter int unsigned TRK_GAIN   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pll_state_e        state,
  input  logic              primary,
  input  logic [1:0]        strobe,
  input  logic [LV_W-1:0]   lv [2],
  input  logic [1:0]        lag,
  input  logic [1:0]        band_chg,
  input  logic [1:0]        ld_trk,
  input  logic              ld_fix,
  input  logic [CODE_W-1:0] bank_code,
  output logic [CODE_W-1:0] dco_code [2],
  output logic              phase_locked
);
  logic [CODE_W-1:0] acq_code [2];
  logic [CODE_W-1:0] trk_code [2];
  logic [CODE_W-1:0] fix_code;
  logic [1:0]        en_acq, en_trk, avg_en;
  logic              en_fix;
  logic [LV_W-1:0]   fix_lv;
  logic              fix_lag;

  // guide unit
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      en_acq[i] = strobe[i] && state == ST_ACQ;
      en_trk[i] = strobe[i] && (state == ST_TRK || (state == ST_FIX && primary != 1'(i)));
    end
    en_fix  = strobe[primary] && state == ST_FIX;
    fix_lv  = lv[primary];
    fix_lag = lag[primary];
    avg_en  = (state == ST_TRK) ? 2'b10 : 2'b00;
  end

  // mux
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      unique case (state)
        ST_ACQ:  dco_code[i] = acq_code[i];
        ST_TRK:  dco_code[i] = trk_code[i];
        default: dco_code[i] = (primary == 1'(i)) ? fix_code : trk_code[i];
      endcase
    end
  end

  integrator_acq #(.INIT_CODE(INIT_CODE0), .GAIN(ACQ_GAIN)) u_int1 (
    .clk, .rst_n, .en(en_acq[0]), .lv(lv[0]), .lag(lag[0]),
    .load(band_chg[0]), .load_code(CODE_W'(CODE_CTR)), .dco_code(acq_code[0]));
  integrator_acq #(.INIT_CODE(INIT_CODE1), .GAIN(ACQ_GAIN)) u_int2 (
    .clk, .rst_n, .en(en_acq[1]), .lv(lv[1]), .lag(lag[1]),
    .load(band_chg[1]), .load_code(CODE_W'(CODE_CTR)), .dco_code(acq_code[1]));
  integrator_trk #(.GAIN(TRK_GAIN)) u_int3 (
    .clk, .rst_n, .en(en_trk[0]), .avg_en(avg_en[0]), .lv(lv[0]), .lag(lag[0]),
    .load(ld_trk[0]), .load_code(bank_code), .dco_code(trk_code[0]));
  integrator_trk #(.GAIN(TRK_GAIN)) u_int4 (
    .clk, .rst_n, .en(en_trk[1]), .avg_en(avg_en[1]), .lv(lv[1]), .lag(lag[1]),
    .load(ld_trk[1]), .load_code(bank_code), .dco_code(trk_code[1]));
  integrator_fix u_int5 (
    .clk, .rst_n, .en(en_fix), .lv(fix_lv), .lag(fix_lag),
    .load(ld_fix), .load_code(bank_code), .dco_code(fix_code), .phase_locked);
endmodule
