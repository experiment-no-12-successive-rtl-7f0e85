// adc: ramp (counting) analog-to-digital converter controller, FPGA top.
//
// The analog input is held on one side of an external comparator; the other
// side is fed by an external resistor-net DAC driven from da_out. To convert,
// the DAC code is cleared to 0 and raised by one step per slow-clock tick
// until the comparator output comp goes high (DAC voltage has reached the
// input) or the code reaches all ones; the code then stays on result_out and
// done goes high. A conversion is started by holding the start_in button: it
// is debounced first, and while it stays held a new conversion starts as soon
// as one ends.
//
// Controller (state register stepped at each tick, like the original):
//   IDLE : if the debounced start is high, clear the counter and go to COUNT.
//   COUNT: counter enabled. If comp or terminal count is high the counter is
//          disabled at that very tick (the code is kept) and the state
//          returns to IDLE.
// So the result is the first code whose DAC voltage makes comp high, or all
// ones if none does (an over-range input reads as full scale). A conversion
// of result k keeps the design in COUNT for k+1 ticks, 1 ms per tick at the
// default 1 kHz, so 1 to 2^WIDTH ms.
//
// This version's own choices: the original's controller outputs in COUNT are
// held latches, which would keep the counter clear asserted for the whole
// ramp; here the clear lasts a single tick, the controls are a plain function
// of state and inputs, and no latches are inferred. done is simply
// "state is IDLE": the original raises it as soon as comp or terminal count
// is seen and lowers it in IDLE while start is held; the registered version
// cannot glitch and marks the result valid for at least one tick between
// back-to-back conversions. comp comes from an analog comparator, so it
// passes a two-flop synchronizer. A synchronous active-high rst replaces
// power-up values. The slow clock is a clock enable, so the whole design runs
// on clk.
//
// Timing: state, done, result_out and da_out change one clk after a tick;
// done is low for exactly (k+1) tick periods for a result k; comp is sampled
// at ticks after two clk of synchronizer delay, so the DAC and comparator
// must settle within one tick period less three clk.
module adc
  import adc_pkg::*;
#(
  parameter int unsigned CLK_HZ         = 50_000_000, // board clock
  parameter int unsigned WIDTH          = 4,          // DAC / result width
  parameter int unsigned DEBOUNCE_COUNT = 1_000_000,  // start-button filter
  parameter logic [1:0]  CLK_SEL        = SEL_1KHZ    // ramp step rate
) (
  input  logic             clk,
  input  logic             rst,        // synchronous, active high
  input  logic             start_in,   // start button, raw
  input  logic             comp,       // comparator: 1 when DAC >= input
  output logic [WIDTH-1:0] da_out,     // code to the resistor-net DAC
  output logic [WIDTH-1:0] result_out, // conversion result
  output logic             done        // high when no conversion is running
);

  adc_state_e       state, state_next;
  logic             start, tick, tc, c_en, r;
  logic [WIDTH-1:0] result;
  logic [1:0]       comp_sync;

  debounce #(.COUNT_MAX(DEBOUNCE_COUNT)) deb_0 (
    .clk     (clk),
    .rst     (rst),
    .input_i (start_in),
    .output_o(start)
  );

  counter #(.CLK_HZ(CLK_HZ), .WIDTH(WIDTH), .CLK_SEL(CLK_SEL)) cnt_0 (
    .clk    (clk),
    .rst    (rst),
    .en_in  (c_en),
    .reset  (r),
    .o      (result),
    .tc     (tc),
    .done   (),         // done is produced by the controller
    .clk_out(),         // the controller steps on tick instead
    .tick   (tick)
  );

  always_ff @(posedge clk) begin
    if (rst) comp_sync <= '0;
    else     comp_sync <= {comp_sync[0], comp};
  end

  always_comb begin
    state_next = state;
    r          = 1'b0;
    c_en       = 1'b0;
    unique case (state)
      IDLE: begin
        if (start) begin
          r          = 1'b1;
          c_en       = 1'b1;
          state_next = COUNT;
        end
      end
      COUNT: begin
        if (comp_sync[1] || tc) begin
          state_next = IDLE;
        end else begin
          c_en = 1'b1;
        end
      end
      default: state_next = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)       state <= IDLE;
    else if (tick) state <= state_next;
  end

  assign done       = (state == IDLE);
  assign da_out     = result;
  assign result_out = result;

endmodule
