// debounce: passes a push-button level through only once it has settled high.
//
// A counter counts consecutive clk edges at which input is high and is
// cleared by any edge at which it is low. output goes high once the count
// exceeds COUNT_MAX (more than 1,000,000 cycles, 20 ms of a 50 MHz clock, in
// the original), and drops at the first edge that samples input low. This is
// the original debouncer; this version's own choices are a synchronous
// active-high reset and a counter that saturates at COUNT_MAX+1 instead of
// growing without bound while the button is held.
//
// Timing: with input held high from edge 1, output is high after edge
// COUNT_MAX+1; it is low after the first edge with input low.
module debounce #(
  parameter int unsigned COUNT_MAX = 1_000_000   // high samples to exceed
) (
  input  logic clk,
  input  logic rst,      // synchronous, active high
  input  logic input_i,  // raw level (button)
  output logic output_o  // debounced level
);

  localparam int CW = $clog2(COUNT_MAX + 2);

  logic [CW-1:0] count, count_next;

  always_comb begin
    if (!input_i)
      count_next = '0;
    else if (count > CW'(COUNT_MAX))
      count_next = count;               // saturate at COUNT_MAX+1
    else
      count_next = count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= '0;
      output_o <= 1'b0;
    end else begin
      count    <= count_next;
      output_o <= (count_next > CW'(COUNT_MAX));
    end
  end

endmodule
