// adpll_pkg: types and constants shared by the dual-loop all-digital PLL.
//
// The PLL runs entirely on one 100 MHz system clock. Each of its two loops
// owns a counter DCO whose output is divided by 2^div_lv to select one of
// NUM_BANDS octave-wide frequency bands; inside a band the DCO code selects
// the half period in quarter-system-clock steps. The three operating states
// (acquisition, tracking, phase fixing), the 8/32/128 phase levels per DCO
// period, the band-change thresholds and the convergence counts follow the
// document. The exact DCO code mapping (HALFQ_MAX - code, 200 codes per band)
// and the loop gains are this design's own choices.
package adpll_pkg;

  // System state of the PLL (acquisition -> tracking -> phase fixing).
  typedef enum logic [1:0] {
    ST_ACQ = 2'd0,
    ST_TRK = 2'd1,
    ST_FIX = 2'd2
  } pll_state_e;

  // Phase-resolution mode of a TDC: 4x, 16x or 64x the DCO frequency,
  // counted on both edges, i.e. 8, 32 or 128 levels per DCO period.
  typedef enum logic [1:0] {
    LV_8   = 2'd0,
    LV_32  = 2'd1,
    LV_128 = 2'd2
  } lv_mode_e;

  // DCO code and band widths.
  localparam int unsigned CODE_W     = 8;    // 200 codes per band fit in 8 bits
  localparam int unsigned CODE_MAX   = 200;  // codes per octave band (N = 50..100)
  localparam int unsigned CODE_LIM   = 255;  // highest code: bands overlap above CODE_MAX
  localparam int unsigned HALFQ_MAX  = 400;  // longest half period, quarter sys clocks (N = 100)
  localparam int unsigned CODE_CTR   = 133;  // band centre: 3/4 of the band top frequency
  localparam int unsigned DIV_W      = 3;    // band index width
  localparam int unsigned NUM_BANDS  = 8;    // eight centre frequencies
  localparam int unsigned LV_W       = 7;    // up to 128 phase levels
  localparam int unsigned TRIG_W     = 8;    // trigger-count width per round
  localparam int unsigned PERQ_W     = 20;   // DCO period in quarter sys clocks

  // Number of phase levels per DCO period for a mode.
  function automatic int unsigned levels_of(lv_mode_e m);
    case (m)
      LV_8:    return 8;
      LV_32:   return 32;
      default: return 128;
    endcase
  endfunction

  // Signed phase value: + for a leading reference (Up), - for a lagging one.
  function automatic logic signed [LV_W+1:0] signed_lv(logic [LV_W-1:0] lv, logic lag);
    logic signed [LV_W+1:0] v;
    v = $signed({2'b00, lv});
    return lag ? -v : v;
  endfunction

  // Clamp a signed value into the legal DCO code range.
  function automatic logic [CODE_W-1:0] clamp_code(logic signed [15:0] v);
    if (v < 0) return '0;
    if (v > $signed(16'(CODE_LIM))) return CODE_W'(CODE_LIM);
    return v[CODE_W-1:0];
  endfunction

endpackage
