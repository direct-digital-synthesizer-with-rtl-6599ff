// dds_pkg: widths and types shared by the ROM-less direct digital synthesizer.
//
// The synthesizer adds an 8-bit frequency control word (FCW) to an 8-bit phase
// register every clock, keeps the six most significant phase bits, turns them
// into a 7-bit DAC code with plain logic gates (no lookup ROM) and converts
// that code to a differential voltage with 64 levels. The widths below are the
// design's own: 8-bit accumulator, 6 phase bits, 3 coarse and 4 fine DAC bits,
// 16 current units per coarse bit.
package dds_pkg;

  localparam int unsigned ACC_WIDTH    = 8;  // phase accumulator width
  localparam int unsigned PHASE_BITS   = 6;  // phase MSBs used for conversion (S7..S2)
  localparam int unsigned COARSE_BITS  = 3;  // thermometer-coded coarse DAC bits
  localparam int unsigned FINE_BITS    = 4;  // binary-weighted fine DAC bits
  localparam int unsigned COARSE_UNITS = 16; // current units per coarse bit

  typedef logic [ACC_WIDTH-1:0]  phase_t;   // accumulator phase / FCW
  typedef logic [PHASE_BITS-1:0] phase6_t;  // truncated phase S7..S2

  // The 7-bit word that drives the DAC: DAC6..DAC4 are the coarse bits,
  // DAC3..DAC0 the fine bits (DAC3 carries 8 units, DAC0 one unit).
  typedef struct packed {
    logic [COARSE_BITS-1:0] coarse;  // DAC6..DAC4
    logic [FINE_BITS-1:0]   fine;    // DAC3..DAC0
  } dac_code_t;

  // Number of current units a DAC code switches on (0..63).
  function automatic logic [5:0] code_units(dac_code_t code);
    logic [5:0] u;
    u = 6'(code.fine);
    for (int i = 0; i < COARSE_BITS; i++)
      if (code.coarse[i]) u = u + 6'(COARSE_UNITS);
    return u;
  endfunction

endpackage
