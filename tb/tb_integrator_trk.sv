// tb_integrator_trk: checks the tracking filter against its equations.
// Without averaging: y[n] = y[n-1] + GAIN*wrap(x[n]-x[n-1]); with
// averaging: y tracks GAIN times the mean of the last 8 wrapped differences,
// kept here with exact rationals (y*8). x = +level for Up, -level for Down
// at 32 levels; the wrap is into [-16, 15]. The first round after a load
// only records x. Both modes are run over random sequences.
module tb_integrator_trk;
  import adpll_pkg::*;
  localparam int GAIN = 4;
  logic clk = 0, rst_n = 0, en = 0, avg_en = 0, lag = 0, load = 0;
  logic [LV_W-1:0] lv = '0;
  logic [CODE_W-1:0] load_code = '0, dco_code;
  int checks = 0, failures = 0;

  integrator_trk #(.GAIN(GAIN)) dut (.*);
  always #5 clk = ~clk;

  int yq, xprev, hist[8], sum8;
  bit primed;

  task automatic run(bit avg, int n);
    @(negedge clk);
    avg_en = avg;
    load = 1; load_code = 100;
    yq = 800; primed = 0; sum8 = 0;
    foreach (hist[i]) hist[i] = 0;
    @(negedge clk);
    load = 0;
    for (int k = 0; k < n; k++) begin
      int x, d;
      en  = 1;
      // slowly moving phase with random steps, as in tracking
      lv  = LV_W'($urandom_range(0, 31));
      lag = 1'($urandom_range(0, 1));
      x   = lag ? -int'(lv) : int'(lv);
      if (primed) begin
        d = x - xprev;
        if (d >= 16) d -= 32;
        else if (d < -16) d += 32;
        sum8 = sum8 + d - hist[7];
        for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = d;
        if (avg) yq += GAIN * sum8;
        else     yq += GAIN * 8 * d;
        if (yq < 0) yq = 0;
        if (yq > 2040) yq = 2040;
      end
      primed = 1; xprev = x;
      @(negedge clk);
      en = 0;
      checks++;
      if (int'(dco_code) != yq / 8) begin
        failures++;
        if (failures < 10) $display("FAIL avg=%0b round %0d: code %0d want %0d", avg, k, dco_code, yq / 8);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 300);
    run(1, 300);
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
