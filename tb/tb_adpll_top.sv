// tb_adpll_top: end-to-end test of the dual-loop PLL at its default
// parameters (100 MHz system clock, eight bands, full code range).
// A square-wave reference of a given frequency is generated from a real-
// valued phase, optionally with each sample flipped with probability
// 15.9 % (a binary signal at 0 dB SNR). For each case the PLL is reset and
// must reach phase lock within a budget of reference periods, in the band
// and within 2 codes of the ideal code 400 - 2e8/(f*2^band) worked out here,
// (the phase-fixing loop dithers by one step), and stay within 2.5 codes
// of it for 100 more periods. The last case jumps
// a locked 100 kHz reference by +4 % and expects the secondary loop to
// refresh the stored code and the primary to re-lock near the new code.
// Every mechanism of the design is counted and must occur at least once:
// band changes, trigger rounds, acquisition->tracking, tracking->phase
// fixing, phase lock, bank refresh by the secondary, repaired noise flips.
module tb_adpll_top;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 0, ref_in = 0;
  logic [1:0] dco_out;
  logic pll_out, primary, locked;
  logic [CODE_W-1:0] dco_code [2];
  logic [DIV_W-1:0] div_lv [2];
  pll_state_e state;
  int checks = 0, failures = 0;

  adpll_top dut (.*);
  always #5 clk = ~clk;

  // reference generator
  real fref = 100e3, half = 500.0, tph = 0.0, pflip = 0.0;
  logic sq = 0;
  int nref = 0;
  always @(posedge clk) begin
    tph += 1.0;
    if (tph >= half) begin
      tph -= half;
      sq = ~sq;
      if (sq) nref++;
    end
    ref_in <= (real'($urandom_range(0, 999999)) < pflip * 1.0e6) ? ~sq : sq;
  end

  // mechanism counters (observed at the top and the block boundaries)
  int n_band = 0, n_trig = 0, n_acq_end = 0, n_trk_end = 0, n_lock = 0, n_refresh = 0, n_noise = 0;
  pll_state_e st_q = ST_ACQ;
  logic lock_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.band_chg != '0) n_band++;
    if (dut.lv_valid[0] && dut.trig_cnt[0] != '0) n_trig++;
    if (st_q == ST_ACQ && state == ST_TRK) n_acq_end++;
    if (st_q == ST_TRK && state == ST_FIX) n_trk_end++;
    if (!lock_q && locked) n_lock++;
    if (state == ST_FIX && st_q == ST_FIX && dut.ld_fix) n_refresh++;
    if (ref_in != sq) n_noise++;
    st_q   <= state;
    lock_q <= locked;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int band_of(real f);
    int d;
    d = 0;
    while (d < 7 && f < 500.0e3 / (2.0 ** d)) d++;
    return d;
  endfunction
  function automatic real ideal_code(real f, int d);
    return 400.0 - 2.0e8 / (f * (2.0 ** d));
  endfunction

  function automatic bit near(int code, real ideal, real tol);
    return real'(code) >= ideal - tol && real'(code) <= ideal + tol;
  endfunction

  task automatic wait_periods(int n);
    int n0;
    n0 = nref;
    while (nref < n0 + n) @(posedge clk);
  endtask

  // run one locking case; returns after the hold period
  task automatic lock_case(real f, real p, int budget, bit do_reset);
    int n0, d;
    real ic;
    fref = f; half = 1.0e8 / f / 2.0; pflip = p;
    if (do_reset) begin
      rst_n = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
    end
    n0 = nref;
    d  = band_of(f);
    ic = ideal_code(f, d);
    while (!locked && nref < n0 + budget) @(posedge clk);
    check(locked, $sformatf("%0.0f Hz p=%0.3f: phase lock within %0d periods (state %s)", f, p, budget, state.name));
    $display("%0.0f Hz p=%0.3f: locked after %0d reference periods, band %0d code %0d (ideal band %0d code %0.2f)",
             f, p, nref - n0, div_lv[primary], dco_code[primary], d, ic);
    check(int'(div_lv[primary]) == d, $sformatf("%0.0f Hz: band %0d want %0d", f, div_lv[primary], d));
    check(near(int'(dco_code[primary]), ic, 2.0), $sformatf("%0.0f Hz: code %0d want %0.2f", f, dco_code[primary], ic));
    wait_periods(100);
    check(state == ST_FIX && near(int'(dco_code[primary]), ic, 2.5),
          $sformatf("%0.0f Hz: held code %0d want %0.2f", f, dco_code[primary], ic));
  endtask

  initial begin
    int n_ref0, n0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    lock_case(100.0e3, 0.0,   150, 1);   // initial band of loop 1
    lock_case(700.0e3, 0.0,   150, 1);   // top band
    lock_case(30.0e3,  0.159, 200, 1);   // 0 dB binary noise, band 5
    lock_case(8.0e3,   0.159, 200, 1);   // low band with noise
    lock_case(240.0e3, 0.0,   200, 1);   // band 2, overlap codes
    // frequency step of +4 % while locked at 100 kHz
    lock_case(100.0e3, 0.0,   150, 1);
    n_ref0 = n_refresh;
    fref = 104.0e3; half = 1.0e8 / fref / 2.0;
    n0 = nref;
    while (n_refresh == n_ref0 && nref < n0 + 300) begin
      @(posedge clk);
    end
    $display("stored code refreshed after %0d periods", nref - n0);
    lock_case(104.0e3, 0.0,   300, 0);
    check(n_refresh > n_ref0, "secondary loop refreshed the stored code after the step");
    // mechanisms
    $display("band changes %0d, trigger rounds %0d, acq->trk %0d, trk->fix %0d, locks %0d, refreshes %0d, noise flips %0d",
             n_band, n_trig, n_acq_end, n_trk_end, n_lock, n_refresh, n_noise);
    check(n_band > 0, "band change happened");
    check(n_trig > 0, "trigger rounds happened");
    check(n_acq_end > 0, "acquisition ended");
    check(n_trk_end > 0, "tracking ended");
    check(n_lock > 0, "phase lock happened");
    check(n_refresh > 0, "bank refresh happened");
    check(n_noise > 0, "noise was applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
