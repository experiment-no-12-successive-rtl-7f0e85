// adc_pkg: types and constants shared by the ramp (counting) A/D converter.
//
// The controller has two states, as in the original design: IDLE, where the
// conversion result is held and done is high, and COUNT, where the counter
// ramps the DAC code up one step per slow-clock tick. The clock-select
// encoding follows the divider's {s1,s0} inputs.
package adc_pkg;

  typedef enum logic {
    IDLE  = 1'b0,
    COUNT = 1'b1
  } adc_state_e;

  // {s1,s0} clock-divider selections: 0.1 Hz, 1 Hz, 10 Hz, 1 kHz.
  typedef enum logic [1:0] {
    SEL_0P1HZ = 2'b00,
    SEL_1HZ   = 2'b01,
    SEL_10HZ  = 2'b10,
    SEL_1KHZ  = 2'b11
  } clk_sel_e;

endpackage
