// tb_loop_filter: checks the guide unit and mux of the loop filter.
// Acquisition: a round of loop 0 moves only loop 0's code by GAIN*level, a
// band change puts a loop back to the band centre 133. Tracking: after a
// bank load both loops follow their level differences, loop 0 at once
// (+4 per level) and loop 1 averaged over 8 rounds. Phase fixing with loop
// 1 primary: loop 1 steps by one code per round from the bank code, loop 0
// keeps tracking without averaging, and a level of 0 reports phase lock.
module tb_loop_filter;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 0, primary = 0, ld_fix = 0, phase_locked;
  pll_state_e state = ST_ACQ;
  logic [1:0] strobe = '0, lag = '0, band_chg = '0, ld_trk = '0;
  logic [LV_W-1:0] lv [2];
  logic [CODE_W-1:0] bank_code = '0;
  logic [CODE_W-1:0] dco_code [2];
  int checks = 0, failures = 0;

  loop_filter dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (codes %0d %0d)", what, dco_code[0], dco_code[1]);
    end
  endtask

  task automatic round(int i, int l, bit dn);
    @(negedge clk);
    strobe[i] = 1; lv[i] = LV_W'(l); lag[i] = dn;
    @(negedge clk);
    strobe = '0;
  endtask

  task automatic pulse_trk(int code);
    @(negedge clk);
    bank_code = CODE_W'(code); ld_trk = 2'b11;
    @(negedge clk);
    ld_trk = '0;
  endtask

  initial begin
    lv[0] = '0; lv[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(dco_code[0] == 133 && dco_code[1] == 133, "initial band centres");
    round(0, 2, 0);
    check(dco_code[0] == 141 && dco_code[1] == 133, "acquisition round of loop 0 only");
    round(1, 3, 1);
    check(dco_code[1] == 121, "loop 1 Down round");
    @(negedge clk); band_chg = 2'b10; @(negedge clk); band_chg = '0;
    check(dco_code[1] == 133 && dco_code[0] == 141, "band change restores the centre");
    // tracking
    state = ST_TRK;
    pulse_trk(150);
    check(dco_code[0] == 150 && dco_code[1] == 150, "bank load into both loops");
    round(0, 5, 0); round(0, 7, 0);
    check(dco_code[0] == 158, "loop 0 follows the level difference at once");
    round(1, 5, 0); round(1, 7, 0);
    check(dco_code[1] == 151, "loop 1 averages over 8 rounds");
    repeat (7) round(1, 7, 0);
    check(dco_code[1] == 158, "loop 1 reaches the full step after 8 rounds");
    // phase fixing, loop 1 primary
    state = ST_FIX; primary = 1;
    @(negedge clk); bank_code = 160; ld_fix = 1; @(negedge clk); ld_fix = 0;
    check(dco_code[1] == 160, "fix integrator takes the bank code");
    round(1, 60, 0);
    check(dco_code[1] == 161, "primary steps +1");
    round(0, 7, 0); round(0, 9, 0);
    check(dco_code[0] == 166, "secondary tracks without averaging");
    round(1, 0, 0);
    check(dco_code[1] == 160 && phase_locked, "phase lock reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
