// resistor_dac_model: behavioural model of the resistor-network DAC.
//
// Simulation only. The real part is a resistor net driven by the FPGA's
// da_out pins; it is modelled as an ideal, instantly settling DAC whose
// output is VREF * code / (2^WIDTH - 1), so code 0 gives 0 V and all ones
// gives the 3.3 V full scale of the I/O supply.
module resistor_dac_model #(
  parameter int  WIDTH = 4,
  parameter real VREF  = 3.3
) (
  input  logic [WIDTH-1:0] code,
  output real              v_out
);
  assign v_out = VREF * real'(code) / real'((1 << WIDTH) - 1);
endmodule
