// tb_segmented_dac: self-checking test of the DAC model. Applies all 128
// possible 7-bit codes and checks the number of active current units (16 per
// coarse bit, 8/4/2/1 for the fine bits) and the differential voltage
// (units - 31.5) * UNIT_V. Also checks that the 64 thermometer-valid codes
// give 64 distinct levels. A watchdog ends the run if it stalls.
module tb_segmented_dac;
  import dds_pkg::*;

  localparam real UNIT = 3.2e-3;

  dac_code_t  code;
  logic [5:0] units;
  real        vout_diff;
  int         checks = 0, failures = 0;
  bit         level_hit [64];

  segmented_dac dut (.code, .units, .vout_diff);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: code=%b units=%0d vout=%f", what, code, units, vout_diff);
    end
  endtask

  initial begin
    automatic int levels = 0;
    for (int c = 0; c < 128; c++) begin
      int exp_units;
      real err;
      code = 7'(c);
      #1;
      exp_units = 16 * ((c >> 6 & 1) + (c >> 5 & 1) + (c >> 4 & 1))
                + 8 * (c >> 3 & 1) + 4 * (c >> 2 & 1) + 2 * (c >> 1 & 1) + (c & 1);
      check(int'(units) == exp_units, "units");
      err = vout_diff - (real'(exp_units) - 31.5) * UNIT;
      check(err < 1e-9 && err > -1e-9, "voltage");
      // thermometer-valid coarse codes: 000, 010, 110, 111 (as driven by the converter)
      if (code.coarse inside {3'b000, 3'b010, 3'b110, 3'b111}) level_hit[exp_units] = 1'b1;
    end
    foreach (level_hit[i]) if (level_hit[i]) levels++;
    check(levels == 64, "64 distinct levels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
