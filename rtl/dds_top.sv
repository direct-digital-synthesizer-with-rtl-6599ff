// dds_top: ROM-less direct digital synthesizer.
//
// Chain of three stages, all on one clock:
//   phase_accumulator  8-bit single-cycle ripple-carry accumulator,
//                      phase <= phase + fcw every clock
//   phase_converter    logic-gate sine conversion of the six phase MSBs
//                      S7..S2 into a 3-bit thermometer coarse and 4-bit
//                      binary fine DAC code (registered)
//   segmented_dac      behavioural model of the 64-level current-steering DAC
// The output frequency is f_out = fcw * f_clk / 256; fcw = 1..128 gives 128
// steps up to f_clk / 2. The two lowest phase bits are dropped (truncation).
// The structure follows the design; the reset and the register after the
// converter are this implementation's choices.
//
// Ports: fcw is sampled every clock; phase, wrap (carry out of the
// accumulator, high in the cycle before the phase wraps) and dac_code are
// brought out for observation. Latency: a phase value reaches dac_code one
// clock after it appears on phase, and fcw reaches phase one clock after it is
// applied.
module dds_top
  import dds_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  phase_t     fcw,        // frequency control word
  output phase_t     phase,      // accumulator phase S7..S0
  output logic       wrap,       // accumulator carry out C(8)
  output dac_code_t  dac_code,   // DAC6..DAC0
  output logic [5:0] dac_units,  // active DAC current units, 0..63
  output real        vout_diff   // DAC differential output voltage
);

  phase_accumulator #(.WIDTH(ACC_WIDTH)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .fcw   (fcw),
    .c_in  (1'b0),
    .phase (phase),
    .c_out (wrap)
  );

  phase_converter u_conv (
    .clk      (clk),
    .rst_n    (rst_n),
    .phase    (phase[ACC_WIDTH-1 -: PHASE_BITS]),
    .dac_code (dac_code)
  );

  segmented_dac u_dac (
    .code      (dac_code),
    .units     (dac_units),
    .vout_diff (vout_diff)
  );

endmodule
