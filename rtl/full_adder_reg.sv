// full_adder_reg: one bit of the single-cycle ripple-carry phase accumulator.
//
// A full adder with a register built into its sum output. The registered sum
// feeds back inside the cell as one addend, the FCW bit IN(i) is the other, and
// the carry C(i) arrives from the bit below in the same clock cycle, so eight of
// these cells in a row form an accumulator with no pipeline registers in the
// carry path. This follows the cell structure of the design; the asynchronous
// active-low reset to 0 is this implementation's choice.
//
// Ports: in_bit = IN(i), c_in = C(i), c_out = C(i+1) (combinational),
// sum = SUM(i), which changes one clock edge after the inputs it depends on.
module full_adder_reg (
  input  logic clk,
  input  logic rst_n,
  input  logic in_bit,
  input  logic c_in,
  output logic c_out,
  output logic sum
);

  logic sum_next;

  always_comb begin
    sum_next = sum ^ in_bit ^ c_in;
    c_out    = (sum & in_bit) | (c_in & (sum ^ in_bit));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sum <= 1'b0;
    else        sum <= sum_next;

endmodule
