// ref_noise_filter: noise treatment in front of the phase detector.
//
// The 1-bit reference (possibly a noisy sampled signal) is sampled by reg_1
// and delayed by reg_2 on the system clock. reg_4 holds the repaired output.
// A "change" is a sample that differs from the held output; it drives the
// sign of the accumulator reg_3: every change counts it up, every sample that
// agrees with the output counts it down (not below zero). Only when the
// accumulator exceeds THRESH does reg_4 flip and the accumulator restart.
// Isolated noise flips therefore never reach the output, while a real data
// transition, after which changes arrive continuously, passes with a delay of
// about THRESH+3 clocks. This turns noise-caused triggers into small phase
// errors, which the loops tolerate far better than false triggers.
//
// The register names, the change/accumulator idea and the up/down sign follow
// the document; the threshold value and the floor at zero are this design's
// choice (the document gives no number).
//
// Interface: ref_in asynchronous 1-bit input; ref_clean registered output.
module ref_noise_filter #(
  parameter int unsigned THRESH = 10, // net changes needed to flip the output
  parameter int unsigned ACC_W  = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_in,
  output logic ref_clean
);
  logic reg_1, reg_2;           // sample and delay
  logic [ACC_W-1:0] reg_3;      // change accumulator
  logic reg_4;                  // repaired value
  logic change;

  assign change    = reg_2 != reg_4;
  assign ref_clean = reg_4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_1 <= 1'b0;
      reg_2 <= 1'b0;
      reg_3 <= '0;
      reg_4 <= 1'b0;
    end else begin
      reg_1 <= ref_in;
      reg_2 <= reg_1;
      if (change) begin
        if (reg_3 >= ACC_W'(THRESH)) begin
          reg_4 <= ~reg_4;
          reg_3 <= '0;
        end else begin
          reg_3 <= reg_3 + 1'b1;
        end
      end else if (reg_3 != '0) begin
        reg_3 <= reg_3 - 1'b1;
      end
    end
  end

  initial assert (THRESH < (1 << ACC_W)) else $error("ACC_W too small for THRESH");
endmodule
