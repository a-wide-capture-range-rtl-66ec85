// integrator_trk: tracking-state loop filter (Integrators 3 and 4).
//
// Implements y[n] = y[n-1] + GAIN*(x[n] - x[n-1]): the DCO code moves with
// the change of the phase level between rounds, which is a measure of the
// frequency error, not with the level itself, so the loop does not overshoot
// after the phase has been pulled in. x is the signed phase level at 32
// levels per DCO period; the difference is wrapped into [-16, 15] because
// the phase is only known modulo one period.
//
// With avg_en high (Integrator 4, noise treatment) the level is first
// averaged over the last 8 rounds; the difference of two successive
// 8-point averages equals the mean of the last 8 wrapped differences, which
// is what is accumulated here with three fraction bits. With avg_en low
// (Integrator 3) every difference is applied at once.
//
// load (priority over en) sets the code and clears the history; the first
// round after a load only records x. dco_code is registered; one update per
// en pulse. The equation and the 8-point average follow the document; GAIN,
// the wrap and the fixed-point form are this design's choices.
module integrator_trk
  import adpll_pkg::*;
#(
  parameter int unsigned INIT_CODE = CODE_CTR,
  parameter int unsigned GAIN      = 4,
  parameter int unsigned LEVELS    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              avg_en,
  input  logic [LV_W-1:0]   lv,
  input  logic              lag,
  input  logic              load,
  input  logic [CODE_W-1:0] load_code,
  output logic [CODE_W-1:0] dco_code
);
  localparam int unsigned NAVG = 8;
  typedef logic signed [7:0] delta_t;

  logic signed [LV_W+1:0] x, x_prev;
  logic                   primed;
  delta_t                 d;
  delta_t                 hist [NAVG];
  logic signed [10:0]     sum8, sum8_nxt;
  logic signed [18:0]     yq, yq_nxt;     // code with 3 fraction bits

  always_comb begin
    logic signed [9:0] raw;
    x   = signed_lv(lv, lag);
    raw = 10'(x) - 10'(x_prev);
    // wrap into [-LEVELS/2, LEVELS/2)
    if (raw >= $signed(10'(LEVELS / 2)))       raw = raw - 10'(LEVELS);
    else if (raw < -$signed(10'(LEVELS / 2)))  raw = raw + 10'(LEVELS);
    d        = delta_t'(raw);
    sum8_nxt = sum8 + 11'(d) - 11'(hist[NAVG-1]);
    if (avg_en) yq_nxt = yq + 19'(sum8_nxt) * $signed(19'(GAIN));
    else        yq_nxt = yq + 19'(d) * $signed(19'(GAIN * NAVG));
    // keep the code inside the legal range
    if (yq_nxt < 0) yq_nxt = '0;
    else if (yq_nxt > $signed(19'(CODE_LIM * NAVG))) yq_nxt = 19'(CODE_LIM * NAVG);
  end

  assign dco_code = CODE_W'(yq >>> 3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yq     <= 19'(INIT_CODE * NAVG);
      x_prev <= '0;
      primed <= 1'b0;
      sum8   <= '0;
      for (int i = 0; i < NAVG; i++) hist[i] <= '0;
    end else if (load) begin
      yq     <= 19'({load_code, 3'b000});
      primed <= 1'b0;
      sum8   <= '0;
      for (int i = 0; i < NAVG; i++) hist[i] <= '0;
    end else if (en) begin
      x_prev <= x;
      primed <= 1'b1;
      if (primed) begin
        yq      <= yq_nxt;
        sum8    <= sum8_nxt;
        hist[0] <= d;
        for (int i = 1; i < NAVG; i++) hist[i] <= hist[i-1];
      end
    end
  end
endmodule
