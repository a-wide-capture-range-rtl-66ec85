// tb_state_control: checks the state decisions, the gateway and the bank.
// Directed sequence: two equal levels then a band change do not end
// acquisition; three equal levels on loop 1 do (bank takes loop 1's code,
// both tracking integrators are loaded, TDCs go to 32 levels); four equal
// levels in tracking are not enough, five on loop 0 make it primary and
// start phase fixing (128 levels for loop 0, secondary reloaded); in phase
// fixing the secondary refreshes the bank only for a code at least 2 away;
// locked follows phase lock only in the phase-fixing state.
module tb_state_control;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 0, phase_locked = 0;
  logic [1:0] lv_valid = '0, lag = '0, band_chg = '0, trig_any = '0;
  logic [LV_W-1:0] lv [2];
  logic [CODE_W-1:0] code [2];
  logic [DIV_W-1:0] div_lv [2];
  pll_state_e state;
  logic primary, ld_fix, locked;
  logic [CODE_W-1:0] bank_code;
  logic [DIV_W-1:0] bank_div;
  logic [1:0] ld_trk;
  lv_mode_e mode [2];
  int checks = 0, failures = 0;
  int n_ld_fix = 0;
  logic [1:0] ld_trk_seen = '0;

  state_control dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (ld_fix) n_ld_fix++;
    ld_trk_seen |= ld_trk;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic round(int i, int l, bit dn, bit bc = 0);
    @(negedge clk);
    lv_valid[i] = 1; lv[i] = LV_W'(l); lag[i] = dn; band_chg[i] = bc;
    @(negedge clk);
    lv_valid = '0; band_chg = '0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    lv[0] = '0; lv[1] = '0;
    code[0] = 8'd90; code[1] = 8'd140;
    div_lv[0] = 3'd4; div_lv[1] = 3'd3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(state == ST_ACQ && mode[0] == LV_8 && mode[1] == LV_8, "start in acquisition, 8 levels");
    round(1, 3, 0); round(1, 3, 0); round(1, 3, 0, 1);
    check(state == ST_ACQ, "band change restarts the custom");
    round(1, 3, 0); round(1, 3, 0);
    check(state == ST_ACQ, "two equal levels are not enough");
    round(1, 3, 0);
    check(state == ST_TRK && primary == 1 && bank_code == 140 && bank_div == 3,
          "three equal levels end acquisition with loop 1's code");
    check(ld_trk_seen == 2'b11, "both tracking integrators loaded");
    check(mode[0] == LV_32 && mode[1] == LV_32, "tracking at 32 levels");
    ld_trk_seen = '0;
    code[0] = 8'd141;
    for (int k = 0; k < 4; k++) round(0, 10, 1);
    check(state == ST_TRK, "four equal levels are not enough");
    round(0, 10, 1);
    check(state == ST_FIX && primary == 0 && bank_code == 141, "five equal levels: loop 0 primary");
    check(n_ld_fix == 1 && ld_trk_seen == 2'b10, "fix integrator and secondary loaded");
    check(mode[0] == LV_128 && mode[1] == LV_32, "primary 128, secondary 32 levels");
    check(!locked, "not locked before phase lock");
    phase_locked = 1;
    #1 check(locked, "locked with phase lock in fixing");
    // secondary sees a 1-step different code: not a new frequency
    code[1] = 8'd142;
    for (int k = 0; k < 5; k++) round(1, 7, 0);
    check(bank_code == 141 && n_ld_fix == 1, "1-step variation ignored");
    // secondary settles 4 steps away: bank refresh
    code[1] = 8'd145;
    for (int k = 0; k < 5; k++) round(1, 9, 0);
    check(bank_code == 145 && n_ld_fix == 2 && primary == 0, "bank refreshed from secondary");
    // primary rounds never refresh the bank
    code[0] = 8'd20;
    for (int k = 0; k < 8; k++) round(0, 4, 0);
    check(bank_code == 145 && n_ld_fix == 2, "primary rounds do not change the bank");
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
