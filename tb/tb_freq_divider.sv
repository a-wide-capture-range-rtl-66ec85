// tb_freq_divider: checks the power-of-two band divider.
// Ticks arrive every third clock; for every band index the output must
// toggle after exactly 2^div_lv ticks, measured over many output edges.
module tb_freq_divider;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0, div_out;
  logic [DIV_W-1:0] div_lv = '0;
  int checks = 0, failures = 0, ticks = 0;

  freq_divider dut (.*);
  always #5 clk = ~clk;

  int ph = 0;
  always @(negedge clk) begin
    ph = (ph + 1) % 3;
    tick = (ph == 0);
  end
  always @(posedge clk) if (tick) ticks++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < NUM_BANDS; d++) begin
      logic last;
      int t0, n;
      @(negedge clk);
      div_lv = DIV_W'(d);
      // skip the first toggle after the change, then time eight toggles
      last = div_out;
      while (div_out == last) @(posedge clk);
      t0 = ticks; n = 0; last = div_out;
      while (n < 8) begin
        @(posedge clk);
        if (div_out != last) begin
          n++;
          last = div_out;
        end
      end
      checks++;
      if (ticks - t0 != 8 * (1 << d)) begin
        failures++;
        $display("FAIL: div_lv=%0d ticks per 8 toggles %0d want %0d", d, ticks - t0, 8 * (1 << d));
      end
    end
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
