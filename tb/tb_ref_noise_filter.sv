// tb_ref_noise_filter: checks the reference noise filter.
// A clean square wave with isolated one-sample flips is applied; the output
// must equal the clean wave delayed by THRESH+3 clocks (two sampling
// registers plus THRESH+1 consecutive changes), i.e. every flip is removed
// and every real transition passes.
module tb_ref_noise_filter;
  localparam int THRESH = 10;   // the default threshold
  localparam int D = THRESH + 3;
  logic clk = 0, rst_n = 0, ref_in = 0, ref_clean;
  int checks = 0, failures = 0, cyc = 0, flips = 0;
  logic [63:0] hist = '0;   // clean input history
  logic clean = 0;

  ref_noise_filter dut (.clk, .rst_n, .ref_in, .ref_clean);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      hist <= {hist[62:0], clean};
      // compare with the clean wave D cycles ago
      if (cyc > 100) begin
        checks++;
        if (ref_clean !== hist[D-1]) begin
          failures++;
          if (failures < 5) $display("mismatch at %0d: got %0b want %0b", cyc, ref_clean, hist[D-1]);
        end
      end
    end
  end

  // clean square wave of period 80, with isolated flips away from edges
  logic flip;
  always @(negedge clk) begin
    clean = ((cyc / 40) % 2) == 1;
    flip  = (cyc % 40) > 16 && (cyc % 40) < 34 && ($urandom_range(0, 9) == 0);
    if (flip) flips++;
    ref_in = clean ^ flip;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4000) @(posedge clk);
    checks++;
    if (flips < 20) failures++;
    $display("flips applied: %0d", flips);
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
