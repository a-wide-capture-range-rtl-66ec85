// tb_integrator_acq: checks the acquisition filter against the equation
// y[n] = GAIN*x[n] + floor((y[n-1] + y[n-2]) / 2), clamped to 0..255,
// with x = +level for Up and -level for Down, over random rounds, plus the
// load of the band centre.
module tb_integrator_acq;
  import adpll_pkg::*;
  localparam int GAIN = 4;
  logic clk = 0, rst_n = 0, en = 0, lag = 0, load = 0;
  logic [LV_W-1:0] lv = '0;
  logic [CODE_W-1:0] load_code = '0, dco_code;
  int checks = 0, failures = 0;
  int y1 = 133, y2 = 133;

  integrator_acq #(.INIT_CODE(133), .GAIN(GAIN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (dco_code != 133) failures++;
    for (int k = 0; k < 400; k++) begin
      int x, y;
      @(negedge clk);
      if (k % 37 == 36) begin
        load = 1; load_code = CODE_W'($urandom_range(0, 200));
        y1 = int'(load_code); y2 = int'(load_code);
      end else begin
        en  = 1;
        lv  = LV_W'($urandom_range(0, 7));
        lag = 1'($urandom_range(0, 1));
        x   = lag ? -int'(lv) : int'(lv);
        y   = GAIN * x + (y1 + y2) / 2;
        if (y < 0) y = 0;
        if (y > 255) y = 255;
        y2 = y1; y1 = y;
      end
      @(negedge clk);
      en = 0; load = 0;
      checks++;
      if (int'(dco_code) != y1) begin
        failures++;
        if (failures < 10) $display("FAIL round %0d: code %0d want %0d", k, dco_code, y1);
      end
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
