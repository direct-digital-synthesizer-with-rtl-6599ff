// tb_phase_converter: self-checking test of the ROM-less phase-to-sine logic.
// For all 64 truncated phases it works out the expected DAC code from the sine
// itself: quarter-wave address k (mirrored when S6 = 1), magnitude
// floor(31.5*sin(2*pi*(k+0.5)/64)) limited to 15 while the coarse bit
// M = A + B*C is low, then 32 + magnitude in the upper half-wave and
// 31 - magnitude in the lower one. It checks the exact coarse thermometer bits
// and fine bits, the one-clock latency of the registered converter, the
// combinational variant, and the half-wave symmetry code(p) + code(p+32) = 63.
// A watchdog ends the run if it stalls.
module tb_phase_converter;
  import dds_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n;
  phase6_t   phase;
  dac_code_t code_reg, code_comb;
  int        checks = 0, failures = 0;
  int        units_seen [64];

  phase_converter #(.OUT_REG(1'b1)) dut_reg  (.clk, .rst_n, .phase, .dac_code(code_reg));
  phase_converter #(.OUT_REG(1'b0)) dut_comb (.clk, .rst_n, .phase, .dac_code(code_comb));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what, input int p);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: phase=%0d comb=%b reg=%b", what, p, code_comb, code_reg);
    end
  endtask

  // Expected code for a 6-bit phase, computed from the sine.
  function automatic dac_code_t expected(input int p);
    int s7, s6, k, mag, m, units;
    dac_code_t e;
    s7  = (p >> 5) & 1;
    s6  = (p >> 4) & 1;
    k   = (s6 != 0) ? (15 - (p & 15)) : (p & 15);
    mag = int'($floor(31.5 * $sin(2.0 * 3.14159265358979 * (real'(k) + 0.5) / 64.0)));
    m   = ((k >> 3) & 1) | (((k >> 2) & 1) & ((k >> 1) & 1));
    if (m == 0 && mag > 15) mag = 15;
    units = (s7 != 0) ? 31 - mag : 32 + mag;
    // thermometer coarse bits: top bit first
    case (units / 16)
      0: e.coarse = 3'b000;
      1: e.coarse = 3'b010;
      2: e.coarse = 3'b110;
      default: e.coarse = 3'b111;
    endcase
    e.fine = 4'(units % 16);
    return e;
  endfunction

  initial begin
    dac_code_t prev_exp;
    rst_n = 1'b0; phase = '0;
    repeat (2) @(posedge clk);
    #1 check(code_reg == '0, "reset", 0);
    rst_n = 1'b1;
    // exhaustive, combinational variant
    for (int p = 0; p < 64; p++) begin
      phase = 6'(p);
      #1;
      check(code_comb == expected(p), "combinational code", p);
      units_seen[p] = int'(code_units(code_comb));
    end
    for (int p = 0; p < 32; p++)
      check(units_seen[p] + units_seen[p + 32] == 63, "half-wave symmetry", p);
    // registered variant: value appears one clock after the phase
    @(negedge clk);
    phase = 6'd0;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      int p;
      prev_exp = expected(int'(phase));
      p = int'($urandom_range(0, 63));
      phase = 6'(p);
      @(posedge clk);
      #1 check(code_reg == expected(p), "registered code after one clock", p);
      @(negedge clk);
    end
    // the registered code must not follow the input before the clock edge
    phase = 6'd8;
    @(posedge clk);
    @(negedge clk);
    phase = 6'd40;
    #1 check(code_reg == expected(8), "registered code holds until the edge", 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
