// segmented_dac: behavioural model of the 7-bit current-steering DAC.
//
// Behavioural model, not synthesizable logic: the real part is an analog
// current-steering circuit. Three thermometer-coded coarse bits each switch 16
// units of current and four binary fine bits switch 8, 4, 2 and 1 units; the
// currents are summed into a differential output voltage with 64 levels
// (0..63 units). The segmentation and weights follow the design. The model
// reports the number of active units as an integer and the differential
// voltage as (units - 31.5) * UNIT_V, centred on zero; UNIT_V (about 3.2 mV,
// for a swing of roughly +/-100 mV) and the settling delay T_SETTLE are this
// model's choices, not figures of the real circuit.
//
// Timing: purely combinational apart from the T_SETTLE transport delay.
module segmented_dac
  import dds_pkg::*;
#(
  parameter real    UNIT_V   = 3.2e-3,  // volts per current unit
  parameter realtime T_SETTLE = 0       // output settling delay
) (
  input  dac_code_t  code,     // DAC6..DAC0
  output logic [5:0] units,    // active current units, 0..63
  output real        vout_diff // differential output voltage
);

  logic [5:0] units_now;

  assign units_now = code_units(code);

  assign #(T_SETTLE) units     = units_now;
  assign #(T_SETTLE) vout_diff = (real'(units_now) - 31.5) * UNIT_V;

endmodule
