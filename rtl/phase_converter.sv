// phase_converter: ROM-less phase-to-sine conversion for the 7-bit DAC.
//
// Input is the truncated phase S7..S2 (the six MSBs of the accumulator). The
// conversion uses quadrant symmetry:
//   * S6 inverts the four quarter-wave address bits, A = S5^S6, B = S4^S6,
//     C = S3^S6, D = S2^S6, so the second and fourth quarters run the first
//     quarter backwards (half-wave from quarter-wave data).
//   * The quarter-wave magnitude (0..31) is split into a coarse bit
//     M = A + B*C (16 units) and a 4-bit fine part F(A,B,C,D).
//   * S7 selects the half-wave: for S7 = 0 the output is 32 + 16*M + F, for
//     S7 = 1 it is 31 - (16*M + F). The coarse bits are thermometer coded:
//       DAC6 = ~S7
//       DAC5 = ~M*S7 + ~S7
//       DAC4 =  M*~S7
//     and the fine bits are F XOR S7.
// The inverted inputs, the coarse split M = A + B*C, the coarse equations for
// DAC6 and DAC4 and the XOR of the fine bits with S7 are the design's. DAC5
// takes the complement of M in the lower half-wave so the two halves mirror
// each other exactly. The fine part F is this implementation's own: the
// rounded-down sine of the quarter-wave sample centres,
//   F(k) = min(15, floor(31.5*sin(2*pi*(k+0.5)/64)) - 16*M(k)),  k = {A,B,C,D},
// which for k = 0..15 is 1 4 7 10 13 15 2 5 7 9 11 12 13 14 15 15,
// reduced to a minimal sum of products per bit (no lookup table). Over FCW 1..127
// of an 8-bit accumulator this gives a worst-case spurious-free dynamic range of
// about 32 dBc, from phase truncation and amplitude rounding only.
//
// Timing: with OUT_REG = 1 (default) the code is registered, one clock of
// latency from phase to dac_code; with OUT_REG = 0 the block is purely
// combinational.
module phase_converter
  import dds_pkg::*;
#(
  parameter bit OUT_REG = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  phase6_t   phase,     // S7..S2
  output dac_code_t dac_code   // DAC6..DAC0
);

  logic s7, s6, a, b, c, d, m;
  logic [3:0] fine_mag;
  dac_code_t  code_comb;

  always_comb begin
    s7 = phase[5];
    s6 = phase[4];
    // inverted inputs
    a = phase[3] ^ s6;
    b = phase[2] ^ s6;
    c = phase[1] ^ s6;
    d = phase[0] ^ s6;
    // coarse magnitude bit of the quarter wave
    m = a | (b & c);

    // fine magnitude of the quarter wave, minimal sum of products of F(k)
    fine_mag[3] = (a & c) | (a & d) | (~b & c & d) | (b & ~c);
    fine_mag[2] = (~a & ~b & c & ~d) | (~a & ~c & d) | (a & b) | (a & ~c & ~d)
                | (a & c & d) | (b & ~c) | (b & d);
    fine_mag[1] = (~a & ~b & c) | (a & ~b & ~d) | (a & b & c) | (b & ~c & d) | (c & ~d);
    fine_mag[0] = (~a & b & ~c) | (a & ~b & ~c) | (a & ~d) | (~b & ~d) | (b & c & d);

    code_comb.coarse[2] = ~s7;                 // DAC6
    code_comb.coarse[1] = (~m & s7) | ~s7;     // DAC5
    code_comb.coarse[0] = m & ~s7;             // DAC4
    code_comb.fine      = fine_mag ^ {4{s7}};  // DAC3..DAC0
  end

  if (OUT_REG) begin : g_reg
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) dac_code <= '0;
      else        dac_code <= code_comb;
  end else begin : g_comb
    assign dac_code = code_comb;
  end

endmodule
