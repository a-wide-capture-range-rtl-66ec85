// integrator_fix: phase-fixing loop filter (Integrator 5).
//
// In the phase-fixing state the frequency is already right and only a
// constant phase offset remains. The DCO cannot simply be delayed, so the
// offset is removed indirectly: every round the code moves one step,
// y[n] = y[n-1] + 1 when the reference leads (Up) and - 1 when it lags
// (Down), so the DCO runs slightly fast or slow and slides its phase. The
// 128-level phase difference is only used as a reference, never as a gain.
//
// The code found by the tracking state is kept as stored_code and the code
// is restored from it (code recovery) when
//   * the code would move more than MAX_DEV (50) away from stored_code, or
//   * the phase level drops below the next entry of the series
//     30, 15, 7, 3, 1, 0, so the slide slows down as the phases close in.
// A level of 0 is phase lock: the code returns to stored_code and
// phase_locked rises. From then on Up/Down only count a signed accumulator
// (+1 for Up, -1 for Down) while the code is held; only when the
// accumulator reaches ACC_TH (10) in either direction does fixing resume.
// Noise, which gives Up and Down about equally often, cannot get there.
//
// load (priority over en) sets stored_code and the code and restarts the
// procedure. One update per en pulse; outputs registered. The +-1 rule, the
// code store, the limit of 50, the level series and the threshold of 10
// follow the document; what happens after the last series entry and after
// the accumulator fires (fixing restarts from the first series entry) is
// this design's reading.
module integrator_fix
  import adpll_pkg::*;
#(
  parameter int unsigned MAX_DEV = 50,
  parameter int unsigned ACC_TH  = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [LV_W-1:0]   lv,           // 128-level phase difference
  input  logic              lag,
  input  logic              load,
  input  logic [CODE_W-1:0] load_code,
  output logic [CODE_W-1:0] dco_code,
  output logic              phase_locked
);
  localparam int unsigned NSER = 6;
  localparam logic [LV_W-1:0] SERIES [NSER] = '{7'd30, 7'd15, 7'd7, 7'd3, 7'd1, 7'd0};

  logic [CODE_W-1:0]  stored, code;
  logic [2:0]         idx;
  logic signed [5:0]  acc, acc_nxt;
  logic signed [15:0] step_code, dev;

  always_comb begin
    step_code = lag ? $signed(16'(code)) - 16'sd1 : $signed(16'(code)) + 16'sd1;
    dev       = step_code - $signed(16'(stored));
    acc_nxt   = lag ? acc - 6'sd1 : acc + 6'sd1;
  end

  assign dco_code = code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stored       <= CODE_W'(CODE_CTR);
      code         <= CODE_W'(CODE_CTR);
      idx          <= '0;
      acc          <= '0;
      phase_locked <= 1'b0;
    end else if (load) begin
      stored       <= load_code;
      code         <= load_code;
      idx          <= '0;
      acc          <= '0;
      phase_locked <= 1'b0;
    end else if (en) begin
      if (lv == '0) begin
        // phases coincide: hold the stored frequency
        code         <= stored;
        phase_locked <= 1'b1;
        acc          <= '0;
      end else if (phase_locked) begin
        // locked: count requests, act only on a persistent one
        if (acc_nxt >= $signed(6'(ACC_TH)) || acc_nxt <= -$signed(6'(ACC_TH))) begin
          phase_locked <= 1'b0;
          acc          <= '0;
          idx          <= '0;
          code         <= clamp_code(step_code);
        end else begin
          acc <= acc_nxt;
        end
      end else if (idx < 3'(NSER) && lv < SERIES[idx]) begin
        // phase has closed below the next level: recover and slow down
        code <= stored;
        idx  <= idx + 1'b1;
      end else if (dev > $signed(16'(MAX_DEV)) || dev < -$signed(16'(MAX_DEV))) begin
        code <= stored;
      end else begin
        code <= clamp_code(step_code);
      end
    end
  end
endmodule
