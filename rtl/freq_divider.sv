// freq_divider: power-of-two band divider behind the DCO core.
//
// The DCO core reports each of its half-period toggles as a one-cycle tick.
// The divider toggles its own output after every 2^div_lv ticks, so its
// output frequency is the core frequency divided by 2^div_lv. Adjacent bands
// are thus exactly one octave apart, as the band plan requires. When div_lv
// changes the tick count restarts, so the new band takes effect from the next
// tick. The power-of-two ratio follows the document's band plan; the
// counting scheme is this design's choice.
//
// Interface: tick and div_lv synchronous to clk; div_out registered.
module freq_divider
  import adpll_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,     // half-period toggle of the DCO core
  input  logic [DIV_W-1:0] div_lv,   // band index: divide by 2^div_lv
  output logic             div_out
);
  localparam int unsigned CW = (1 << DIV_W);  // enough for 2^(2^DIV_W - 1) ticks
  logic [CW-1:0]    cnt;
  logic [DIV_W-1:0] div_q;
  logic [CW-1:0]    last;

  assign last = (CW'(1) << div_lv) - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      div_q   <= '0;
      div_out <= 1'b0;
    end else begin
      div_q <= div_lv;
      if (div_q != div_lv) begin
        cnt <= '0;
      end else if (tick) begin
        if (cnt >= last) begin
          cnt     <= '0;
          div_out <= ~div_out;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
