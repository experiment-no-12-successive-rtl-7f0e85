// selectable_clock: divides the board clock to one of four slow rates.
//
// A free-running cycle counter is incremented every clk edge; once the
// incremented value reaches the period N of the selected rate it is wrapped
// to 0, so the counter runs 0..N-1 and the output has a period of exactly N
// clk cycles. out_clk is high while the count is in 0..N/2 and low for the
// rest. With {s1,s0} = 00, 01, 10, 11 the rate is 0.1 Hz, 1 Hz, 10 Hz or
// 1 kHz of a CLK_HZ input clock (N = 10*CLK_HZ, CLK_HZ, CLK_HZ/10,
// CLK_HZ/1000); one counter is shared by all four rates, so on a change of
// selection a count already past the new N wraps at the next edge. All of
// this follows the original divider.
//
// Design choices of this version: a synchronous active-high reset (the
// original relies on power-up values), out_clk resets high with the count at
// 0, and besides the divided square wave the block outputs tick, a one-clk
// pulse registered together with each rising edge of out_clk. The rest of the
// converter uses tick as a clock enable in the single clk domain instead of
// clocking logic from out_clk.
//
// Timing: out_clk and tick are registered; tick is high in the cycle in which
// out_clk has just risen, once every N clk cycles.
module selectable_clock #(
  parameter int unsigned CLK_HZ = 50_000_000   // board clock frequency
) (
  input  logic clk,
  input  logic rst,       // synchronous, active high
  input  logic s0,
  input  logic s1,
  output logic out_clk,   // divided square wave
  output logic tick       // one-cycle pulse at each rising edge of out_clk
);

  localparam longint unsigned N_0P1HZ = longint'(CLK_HZ) * 10;
  localparam longint unsigned N_1HZ   = longint'(CLK_HZ);
  localparam longint unsigned N_10HZ  = longint'(CLK_HZ) / 10;
  localparam longint unsigned N_1KHZ  = longint'(CLK_HZ) / 1000;
  localparam int CW = $clog2(N_0P1HZ + 1);

  logic [CW-1:0] count;
  logic [CW-1:0] count_inc, count_next, period;
  logic          out_next;

  always_comb begin
    unique case ({s1, s0})
      2'b00:   period = CW'(N_0P1HZ);
      2'b01:   period = CW'(N_1HZ);
      2'b10:   period = CW'(N_10HZ);
      default: period = CW'(N_1KHZ);
    endcase
    count_inc  = count + 1'b1;
    count_next = (count_inc >= period) ? '0 : count_inc;
    out_next   = (count_next <= (period >> 1));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count   <= '0;
      out_clk <= 1'b1;
      tick    <= 1'b0;
    end else begin
      count   <= count_next;
      out_clk <= out_next;
      tick    <= out_next & ~out_clk;
    end
  end

endmodule
