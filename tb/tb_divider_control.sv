// tb_divider_control: checks the band selection rule.
// Directed cases on loop 0 (starts at band 4, even bands only) and loop 1
// (band 3, odd bands): two-round trigger sums just at and just above the
// thresholds 1, 4, 9 and 20, both directions, clamping at the ends of a
// loop's band set, a single octave for a loop whose code is pinned at the
// band edge, and the copy of the primary band after acquisition.
// A random sequence is then compared with a model of the rule.
module tb_divider_control;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 0, acq = 1, sync = 0, sel = 0;
  logic [1:0] strobe = '0, trig_lag = '0, band_chg;
  logic [TRIG_W-1:0] trig_cnt [2];
  logic [DIV_W-1:0] div_lv [2];
  logic [CODE_W-1:0] code [2];
  int checks = 0, failures = 0;

  divider_control dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // one round of loop i; returns band_chg seen in the strobe cycle
  task automatic round(int i, int trig, bit dn, output bit chg);
    @(negedge clk);
    strobe[i] = 1; trig_cnt[i] = TRIG_W'(trig); trig_lag[i] = dn;
    #1 chg = band_chg[i];
    @(negedge clk);
    strobe = '0;
  endtask

  int m_div[2], m_prev[2];
  bit m_lag[2];
  function automatic bit model(int i, int trig, bit dn);
    int s, j, nd;
    s = (m_lag[i] == dn) ? m_prev[i] + trig : trig;
    j = s > 20 ? 4 : s > 9 ? 3 : s > 4 ? 2 : s > 1 ? 1 : 0;
    nd = dn ? m_div[i] + 2 * (j / 2) : m_div[i] - 2 * (j / 2);
    if (nd < i) nd = i;
    if (nd > 6 + i) nd = 6 + i;
    m_lag[i] = dn;
    if (nd != m_div[i]) begin
      m_div[i] = nd; m_prev[i] = 0;
      return 1;
    end
    m_prev[i] = trig;
    return 0;
  endfunction

  bit c;
  initial begin
    trig_cnt[0] = '0; trig_cnt[1] = '0;
    code[0] = 8'd100; code[1] = 8'd100;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(div_lv[0] == 4 && div_lv[1] == 3, "initial bands");
    round(0, 2, 0, c); round(0, 2, 0, c);           // sum 4: not above 4
    check(!c && div_lv[0] == 4, "sum 4 keeps band");
    round(0, 3, 0, c);                               // 2+3 = 5 > 4: 2 octaves
    @(negedge clk);
    check(c && div_lv[0] == 2, "sum 5 moves two bands up");
    round(0, 1, 0, c); round(0, 1, 0, c);            // sum 2: 1 octave -> no move for a parity loop
    check(!c && div_lv[0] == 2, "one octave ignored by a parity loop");
    code[0] = 8'd255;
    round(0, 1, 0, c);                               // same, code pinned at the top
    @(negedge clk);
    check(c && div_lv[0] == 0, "one octave moves a loop pinned at the band edge");
    code[0] = 8'd100;
    round(0, 4, 1, c); round(0, 4, 1, c);            // back down: sum 8 -> 2 octaves
    @(negedge clk);
    check(c && div_lv[0] == 2, "back to band 2");
    round(0, 10, 1, c); round(0, 11, 1, c);          // Down, sum 21 > 20: 4 octaves
    @(negedge clk);
    check(c && div_lv[0] == 6, "sum 21 moves four bands down (clamped at 6)");
    round(1, 10, 0, c);                              // loop 1 Up, sum 10 > 9: 3 octaves -> 1 step
    @(negedge clk);
    check(c && div_lv[1] == 1, "loop 1 moves to band 1");
    round(1, 20, 0, c); round(1, 20, 0, c);
    @(negedge clk);
    check(!c && div_lv[1] == 1, "clamped at the top odd band");
    // after acquisition both loops take the primary band
    @(negedge clk);
    acq = 0; sync = 1; sel = 1;
    @(negedge clk); @(negedge clk);
    check(div_lv[0] == 1 && div_lv[1] == 1, "sync copies the primary band");
    round(0, 30, 0, c);
    check(!c, "no band change outside acquisition");
    // random run against the model
    rst_n = 0; acq = 1; sync = 0;
    @(negedge clk);
    rst_n = 1;
    m_div = '{4, 3}; m_prev = '{0, 0}; m_lag = '{0, 0};
    for (int k = 0; k < 600; k++) begin
      int i, t;
      bit dn, w;
      i  = $urandom_range(0, 1);
      t  = $urandom_range(0, 12);
      dn = 1'($urandom_range(0, 1));
      round(i, t, dn, c);
      w = model(i, t, dn);
      check(c == w && int'(div_lv[0]) == m_div[0] && int'(div_lv[1]) == m_div[1],
            $sformatf("random %0d: chg %0b/%0b div %0d,%0d want %0d,%0d", k, c, w,
                      div_lv[0], div_lv[1], m_div[0], m_div[1]));
    end
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
