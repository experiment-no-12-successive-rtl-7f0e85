// comparator_model: behavioural model of the op-amp comparator.
//
// Simulation only. The held input voltage is on one side and the DAC output
// on the other; out is high once the DAC voltage has reached the input
// voltage. The model is ideal: no offset, no hysteresis, no delay.
module comparator_model (
  input  real  v_sample,  // held analog input
  input  real  v_dac,     // DAC output
  output logic out        // to the FPGA comp pin
);
  assign out = (v_dac >= v_sample);
endmodule
