// adpll_top: dual-loop all-digital PLL with a wide capture range
// (about 3.9 kHz .. 1 MHz, codes reach up to 1.38 MHz).
//
// Everything runs on one 100 MHz system clock. The 1-bit reference, which
// may be buried in noise, is repaired by ref_noise_filter and then compared
// by two independent loops, each with its own PFD, TDC and counter DCO:
//
//   ref_in -> noise filter -+-> PFD0 -> TDC0 -+                +-> DCO0 -> dco_out[0]
//                           |                 +-> loop filter -+
//                           +-> PFD1 -> TDC1 -+   (5 integrators) +-> DCO1 -> dco_out[1]
//                                   |                 ^
//   trigger counts -> divider_control (bands)   state_control (states, bank)
//
// Acquisition: each loop searches its own four bands (loop 0 even, loop 1
// odd) by the trigger-count rule and sweeps its code with the acquisition
// filter at 8 phase levels; three equal levels in a row on either loop end
// it. Tracking: both loops continue from the winner's code and band at 32
// levels; the first loop with five equal levels in a row becomes primary.
// Phase fixing: the primary removes the remaining phase offset at 128
// levels while the secondary keeps tracking and refreshes the stored code
// when the reference frequency moves. locked reports phase lock of the
// primary loop, whose output is pll_out.
//
// The structure, the states and their rules follow the document; the
// details each block adds are described in its own file.
//
// Lint notes: each TDC's up_flg is left unused because the integrators take
// the round's sign from down_flg alone, and the bank's stored band
// (bank_div) is kept for observation only, since the loops keep their band
// through the divider control. The assertion here is disabled during reset,
// so rst_n is read both asynchronously and synchronously; that warning is
// expected.
module adpll_top
  import adpll_pkg::*;
#(
  parameter int unsigned NF_THRESH = 10,
  parameter int unsigned INIT_DIV0 = 4,
  parameter int unsigned INIT_DIV1 = 3,
  parameter int unsigned ACQ_N     = 3,
  parameter int unsigned TRK_N     = 5,
  parameter int unsigned ACQ_GAIN  = 4,
  parameter int unsigned TRK_GAIN  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ref_in,
  output logic [1:0]        dco_out,
  output logic              pll_out,
  output logic [CODE_W-1:0] dco_code [2],
  output logic [DIV_W-1:0]  div_lv [2],
  output pll_state_e        state,
  output logic              primary,
  output logic              locked
);
  logic              ref_clean;
  logic [1:0]        up, down, update, trig_lag, up_flg, down_flg, lv_valid, band_chg;
  logic [TRIG_W-1:0] trig_cnt [2];
  logic [LV_W-1:0]   count_lv [2];
  logic [PERQ_W-1:0] period_q [2];
  lv_mode_e          mode [2];
  logic [CODE_W-1:0] bank_code;
  logic [DIV_W-1:0]  bank_div;
  logic [1:0]        ld_trk;
  logic              ld_fix, phase_locked;

  ref_noise_filter #(.THRESH(NF_THRESH)) u_nf (
    .clk, .rst_n, .ref_in, .ref_clean);

  for (genvar i = 0; i < 2; i++) begin : g_loop
    pfd u_pfd (
      .clk, .rst_n, .ref_clean, .dco_in(dco_out[i]),
      .up(up[i]), .down(down[i]), .update(update[i]),
      .trig_cnt(trig_cnt[i]), .trig_lag(trig_lag[i]));
    tdc u_tdc (
      .clk, .rst_n, .up(up[i]), .down(down[i]), .update(update[i]),
      .period_q(period_q[i]), .mode(mode[i]),
      .count_lv(count_lv[i]), .up_flg(up_flg[i]), .down_flg(down_flg[i]),
      .lv_valid(lv_valid[i]));
    dco u_dco (
      .clk, .rst_n, .dco_code(dco_code[i]), .div_lv(div_lv[i]),
      .dco_out(dco_out[i]), .period_q(period_q[i]));
  end

  loop_filter #(.ACQ_GAIN(ACQ_GAIN), .TRK_GAIN(TRK_GAIN)) u_lpf (
    .clk, .rst_n, .state, .primary, .strobe(lv_valid), .lv(count_lv), .lag(down_flg),
    .band_chg, .ld_trk, .ld_fix, .bank_code, .dco_code, .phase_locked);

  divider_control #(.INIT_DIV0(INIT_DIV0), .INIT_DIV1(INIT_DIV1)) u_dvc (
    .clk, .rst_n, .acq(state == ST_ACQ), .sync(state != ST_ACQ), .sel(primary),
    .strobe(lv_valid), .trig_cnt, .trig_lag, .code(dco_code), .div_lv, .band_chg);

  state_control #(.ACQ_N(ACQ_N), .TRK_N(TRK_N)) u_sc (
    .clk, .rst_n, .lv_valid, .lv(count_lv), .lag(down_flg), .band_chg,
    .trig_any({trig_cnt[1] != '0, trig_cnt[0] != '0}),
    .code(dco_code), .div_lv, .phase_locked, .state, .primary, .bank_code, .bank_div,
    .ld_trk, .ld_fix, .mode, .locked);

  assign pll_out = dco_out[primary];
endmodule
