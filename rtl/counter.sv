// counter: the ramp counter that steps the DAC code, with its own slow clock.
//
// The counter holds the current DAC code o. It changes only on a tick of the
// built-in clock divider (selectable_clock, fixed at the rate CLK_SEL, 1 kHz
// in the original): at a tick, reset clears it to 0, otherwise en_in adds 1
// (wrapping from all ones to 0, as the original does). tc flags the terminal
// count (all ones), done is the inverse of en_in, and clk_out / tick bring the
// divided clock out so the controller can step in the same rhythm.
//
// Follows the original counter. This version's own choices: the slow clock is
// used as a clock enable (tick) in the clk domain rather than as a clock,
// a synchronous active-high rst clears everything, and the original's second
// debouncer on reset is left out because its output drove nothing.
//
// Timing: o, tc change one clk cycle after the tick at which they were
// decided; reset and en_in are sampled only in tick cycles.
module counter #(
  parameter int unsigned CLK_HZ  = 50_000_000, // board clock frequency
  parameter int unsigned WIDTH   = 4,          // DAC / result width
  parameter logic [1:0]  CLK_SEL = 2'b11       // {s1,s0}: 1 kHz step rate
) (
  input  logic             clk,
  input  logic             rst,      // synchronous, active high
  input  logic             en_in,    // count up at each tick
  input  logic             reset,    // clear to 0 at the next tick
  output logic [WIDTH-1:0] o,        // current count (DAC code)
  output logic             tc,       // terminal count: o is all ones
  output logic             done,     // not en_in
  output logic             clk_out,  // divided clock, square wave
  output logic             tick      // one-cycle pulse per divided-clock period
);

  selectable_clock #(.CLK_HZ(CLK_HZ)) clk_div (
    .clk    (clk),
    .rst    (rst),
    .s0     (CLK_SEL[0]),
    .s1     (CLK_SEL[1]),
    .out_clk(clk_out),
    .tick   (tick)
  );

  always_ff @(posedge clk) begin
    if (rst)
      o <= '0;
    else if (tick) begin
      if (reset)
        o <= '0;
      else if (en_in)
        o <= o + 1'b1;
    end
  end

  assign tc   = (o == '1);
  assign done = ~en_in;

endmodule
