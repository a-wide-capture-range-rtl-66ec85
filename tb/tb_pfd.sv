// tb_pfd: checks the three-state PFD with trigger counting.
// Square waves of exact integer periods are applied and the round results
// are compared with values worked out from the waveforms:
//   1. equal frequency, reference leading by 13 clocks: Up is 13 clocks
//      long, Down never rises, no triggers, one update per period;
//   2. reference 4x the DCO: 3 triggers per round (Fig. 3.2, Table 3.1);
//   3. reference 2x the DCO: 1 trigger per round;
//   4. DCO 2x the reference: Down rounds with 1 DCO trigger each.
module tb_pfd;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 0, ref_clean = 0, dco_in = 0;
  logic up, down, update, trig_lag;
  logic [TRIG_W-1:0] trig_cnt;
  int checks = 0, failures = 0;
  int ref_per = 100, dco_per = 100, ref_off = 0, dco_off = 0, t = 0;

  pfd dut (.*);
  always #5 clk = ~clk;

  always @(negedge clk) begin
    t++;
    ref_clean = ((t + ref_off) % ref_per) < ref_per / 2;
    dco_in    = ((t + dco_off) % dco_per) < dco_per / 2;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // run n rounds and check every round's trigger count and direction
  task automatic rounds(int n, int want_trig, bit want_lag, int skip);
    int r;
    r = 0;
    while (r < n + skip) begin
      @(posedge clk);
      if (update) begin
        if (r >= skip) begin
          check(trig_cnt == TRIG_W'(want_trig), $sformatf("trig %0d want %0d", trig_cnt, want_trig));
          check(trig_lag == want_lag, $sformatf("lag %0b want %0b", trig_lag, want_lag));
        end
        r++;
      end
    end
  endtask

  int up_len, rounds_seen, down_seen, start;
  initial begin
    // case 1: same period, reference leads by 13 clocks
    ref_per = 100; dco_per = 100; ref_off = 13; dco_off = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);
    up_len = 0; rounds_seen = 0; down_seen = 0;
    start = t;
    repeat (1000) begin
      @(posedge clk);
      if (up) up_len++;
      if (down) down_seen++;
      if (update) rounds_seen++;
    end
    check(rounds_seen == 10, $sformatf("rounds %0d want 10", rounds_seen));
    check(up_len == 130, $sformatf("up length %0d want 130", up_len));
    check(down_seen == 0, "down never high");
    rounds(5, 0, 0, 1);
    // case 2: reference 4x faster
    ref_per = 40; dco_per = 160; ref_off = 5; dco_off = 0;
    rounds(8, 3, 0, 3);
    // case 3: reference 2x faster
    ref_per = 50; dco_per = 100;
    rounds(8, 1, 0, 3);
    // case 4: DCO 2x faster: Down rounds, one DCO trigger each
    ref_per = 120; dco_per = 60; ref_off = 0; dco_off = 7;
    rounds(8, 1, 1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
