// dco: counter-based digitally controlled oscillator with band divider.
//
// A ring oscillator cannot be modelled without propagation delay, so the
// DCO is a counter on the 100 MHz system clock that inverts its output each
// time it has counted a half period. The half period is kept in quarter
// system clocks, HALFQ_MAX - dco_code = 400 - code, i.e. N = 100 down to 50
// system clocks for code 0..200. A fractional accumulator (add 4 per clock,
// subtract the half period on each toggle) makes the quarter steps exact on
// average, giving 200 codes per octave: 500 kHz (code 0) to 1 MHz (code 200)
// at the core; codes 201..255 continue up to 1.38 MHz, so neighbouring
// bands overlap and a loop near a band edge still has room to move. A
// freq_divider then divides by 2^div_lv to place the output
// in one of eight octave bands, 1 MHz/2^div_lv at the top of each band.
//
// period_q is the current output period in quarter system clocks
// (2*(400-code)*2^div_lv); the TDC uses it to form the DCO harmonics.
// The counter DCO, N = 50..100 and the divider follow the document. The
// quarter-step resolution, the code direction (larger code = higher
// frequency), the 8-bit code with 200 codes per octave and the overlap
// are this design's choices; the
// document's wider code ranges in the outermost bands are not reproduced,
// so the lowest band reaches down to 3.9 kHz rather than 1 kHz.
module dco
  import adpll_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CODE_W-1:0] dco_code,
  input  logic [DIV_W-1:0]  div_lv,
  output logic              dco_out,
  output logic [PERQ_W-1:0] period_q
);
  logic [9:0] acc, half_q, acc_nxt;
  logic       tick;

  assign half_q  = 10'(HALFQ_MAX) - 10'(dco_code);
  assign acc_nxt = acc + 10'd4;
  assign tick    = acc_nxt >= half_q;
  assign period_q = PERQ_W'({half_q, 1'b0}) << div_lv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
    end else if (tick) begin
      acc  <= acc_nxt - half_q;
    end else begin
      acc  <= acc_nxt;
    end
  end

  freq_divider u_div (
    .clk    (clk),
    .rst_n  (rst_n),
    .tick   (tick),
    .div_lv (div_lv),
    .div_out(dco_out)
  );
endmodule
