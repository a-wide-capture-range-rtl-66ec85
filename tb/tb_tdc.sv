// tb_tdc: checks the time-to-digital converter.
// Up or Down pulses of random length are applied for random DCO periods and
// each of the three resolutions. The expected level is worked out directly:
// a pulse of n clocks covers n*4*L/period_q level ticks (L = 8, 32 or 128
// levels per DCO period, period_q in quarter clocks), floored and limited
// to L-1. The direction flags and the one-cycle lv_valid after update are
// checked as well.
module tb_tdc;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 0, up = 0, down = 0, update = 0;
  logic [PERQ_W-1:0] period_q;
  lv_mode_e mode;
  logic [LV_W-1:0] count_lv;
  logic up_flg, down_flg, lv_valid;
  int checks = 0, failures = 0;

  tdc dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic one(int n, bit lag_dir, int per, lv_mode_e m);
    longint want;
    int levels;
    levels   = (m == LV_8) ? 8 : (m == LV_32) ? 32 : 128;
    period_q = PERQ_W'(per);
    mode     = m;
    want     = (longint'(n) * 4 * levels) / longint'(per);
    if (want > longint'(levels) - 1) want = longint'(levels) - 1;
    @(negedge clk);
    up = !lag_dir; down = lag_dir;
    repeat (n) @(negedge clk);
    up = 0; down = 0; update = 1;
    @(negedge clk);
    update = 0;
    check(lv_valid == 1'b1, "lv_valid after update");
    check(count_lv == LV_W'(want), $sformatf("n=%0d per=%0d L=%0d: lv %0d want %0d", n, per, levels, count_lv, want));
    check(up_flg == !lag_dir && down_flg == lag_dir, "direction flags");
    @(negedge clk);
    check(lv_valid == 1'b0, "lv_valid is one cycle");
    repeat ($urandom_range(1, 5)) @(negedge clk);
  endtask

  initial begin
    period_q = 20'd800; mode = LV_8;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fixed cases: period 200 clocks (800 quarters)
    one(25, 0, 800, LV_8);     // exactly 1/8 of a period -> level 1
    one(24, 0, 800, LV_8);     // just below -> 0
    one(199, 1, 800, LV_8);    // almost a period -> 7
    one(100, 1, 800, LV_32);   // half a period -> 16
    one(300, 0, 800, LV_128);  // beyond a period -> saturate at 127
    for (int k = 0; k < 300; k++) begin
      int per, n;
      lv_mode_e m;
      m   = lv_mode_e'($urandom_range(0, 2));
      per = $urandom_range(400, 6400);
      n   = $urandom_range(1, per / 4);
      one(n, 1'($urandom_range(0, 1)), per, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
