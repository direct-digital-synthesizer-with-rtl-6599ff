// phase_accumulator: 8-bit single-cycle ripple-carry phase accumulator.
//
// A row of WIDTH full_adder_reg cells, each on the same clock edge. Cell i adds
// FCW bit i and the carry from cell i-1 to its own registered sum bit, so the
// whole 8-bit addition phase <= phase + fcw + c_in completes in one clock cycle
// and the carry ripples through all cells (the speed-limiting path). The
// phase wraps modulo 2**WIDTH; c_out is the carry out of the top cell, high in
// the cycle before a wrap. Width and structure follow the design; the carry
// input (tied low in normal use) and the reset to phase 0 are this
// implementation's choices.
//
// Timing: phase is registered; a new fcw first changes phase one clock later.
module phase_accumulator #(
  parameter int unsigned WIDTH = dds_pkg::ACC_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] fcw,    // IN(0..WIDTH-1): frequency control word
  input  logic             c_in,   // C(0)
  output logic [WIDTH-1:0] phase,  // SUM(0..WIDTH-1), registered
  output logic             c_out   // C(WIDTH), combinational
);

  logic [WIDTH:0] carry;

  assign carry[0] = c_in;
  assign c_out    = carry[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder_reg u_fa (
      .clk    (clk),
      .rst_n  (rst_n),
      .in_bit (fcw[i]),
      .c_in   (carry[i]),
      .c_out  (carry[i+1]),
      .sum    (phase[i])
    );
  end

endmodule
