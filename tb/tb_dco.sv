// tb_dco: checks the counter DCO with its band divider.
// For a set of codes and bands the output period, averaged over 16 periods,
// must be 2*(400-code)/4 * 2^div_lv system clocks (the half period is
// 400-code quarter clocks), within one clock, and period_q must report
// 2*(400-code)*2^div_lv.
module tb_dco;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [CODE_W-1:0] dco_code = '0;
  logic [DIV_W-1:0]  div_lv = '0;
  logic dco_out;
  logic [PERQ_W-1:0] period_q;
  int checks = 0, failures = 0;
  longint cyc = 0;

  dco dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic measure(int code, int d);
    longint t0;
    real want, got;
    logic last;
    @(negedge clk);
    dco_code = CODE_W'(code);
    div_lv   = DIV_W'(d);
    // settle: two rising edges
    repeat (2) begin
      @(posedge dco_out);
    end
    t0 = cyc;
    repeat (16) @(posedge dco_out);
    got  = real'(cyc - t0) / 16.0;
    want = 2.0 * real'(400 - code) / 4.0 * real'(1 << d);
    checks++;
    if (got < want - 1.0 || got > want + 1.0) begin
      failures++;
      $display("FAIL: code=%0d div=%0d period %f want %f", code, d, got, want);
    end
    checks++;
    if (period_q != PERQ_W'(2 * (400 - code) * (1 << d))) begin
      failures++;
      $display("FAIL: period_q %0d", period_q);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(0, 0);     // 500 kHz
    measure(200, 0);   // 1 MHz
    measure(133, 0);   // band centre 750 kHz
    measure(150, 3);   // 100 kHz
    measure(57, 5);
    measure(199, 7);
    for (int k = 0; k < 6; k++) measure($urandom_range(0, 200), $urandom_range(0, 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
