// integrator_acq: acquisition-state loop filter (Integrators 1 and 2).
//
// Implements y[n] = x[n] + 0.5*y[n-1] + 0.5*y[n-2], where y is the DCO code
// and x the signed phase level of the round (+level when the reference
// leads, -level when it lags, 8 levels per DCO period) times GAIN. Averaging
// the two previous codes keeps the DCO from sweeping the band too fast; the
// pole at z = 1 makes it an integrator. The result is clamped to the code
// range. load (priority over en) sets both history registers to load_code,
// e.g. the band centre after a band change.
//
// Timing: one update per en pulse (one per PFD round); dco_code is
// registered. The filter equation follows the document; GAIN, the rounding
// (floor of the half sum) and the clamping are this design's choices.
// The two instances differ only in their reset code, INIT_CODE.
module integrator_acq
  import adpll_pkg::*;
#(
  parameter int unsigned INIT_CODE = CODE_CTR,
  parameter int unsigned GAIN      = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [LV_W-1:0]   lv,
  input  logic              lag,
  input  logic              load,
  input  logic [CODE_W-1:0] load_code,
  output logic [CODE_W-1:0] dco_code
);
  logic [CODE_W-1:0]   y1, y2;
  logic signed [15:0]  y;

  always_comb begin
    y = 16'(signed_lv(lv, lag)) * $signed(16'(GAIN))
      + $signed(16'((17'(y1) + 17'(y2)) >> 1));
  end

  assign dco_code = y1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= CODE_W'(INIT_CODE);
      y2 <= CODE_W'(INIT_CODE);
    end else if (load) begin
      y1 <= load_code;
      y2 <= load_code;
    end else if (en) begin
      y1 <= clamp_code(y);
      y2 <= y1;
    end
  end
endmodule
