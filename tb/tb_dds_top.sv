// tb_dds_top: end-to-end self-checking test of the complete synthesizer at its
// default sizes.
//
// Every clock it predicts the accumulator phase and carry out with integer
// arithmetic and the DAC code and output level from the sine itself (quarter
// wave address, rounded-down magnitude, half-wave sign), one clock behind the
// phase. It then sweeps every frequency control word from 1 to 128, switching
// on the fly without a reset, records 256 output samples per word and takes a
// discrete Fourier transform of them to check:
//   * the output frequency: the largest spectral line is at fcw/256 of the
//     clock (50.78125 MHz per step at a 13 GHz clock), and fcw = 1 repeats
//     every 256 clocks;
//   * the spurious-free dynamic range: at least 28.4 dBc for every word from 1
//     to 127 and at least 34 dBc at fcw = 1;
//   * fcw = 128 turns the synthesizer into a divide-by-two: the output
//     alternates between two levels.
// It counts how often each mechanism occurred (accumulator wrap, mirrored
// quarter, lower half-wave, coarse-bit change, control-word change) and
// counts a failure for any that never did. A watchdog ends the run if it
// stalls.
module tb_dds_top;
  import dds_pkg::*;

  localparam real F_CLK_MHZ = 13000.0;
  localparam real PI        = 3.14159265358979;

  logic       clk = 1'b0;
  logic       rst_n;
  phase_t     fcw, phase;
  logic       wrap;
  dac_code_t  dac_code;
  logic [5:0] dac_units;
  real        vout_diff;

  int checks = 0, failures = 0;
  int n_wrap = 0, n_mirror = 0, n_lower = 0, n_coarse_change = 0, n_fcw_change = 0;
  int model_phase, prev_phase;
  int samples [256];

  dds_top dut (.clk, .rst_n, .fcw, .phase, .wrap, .dac_code, .dac_units, .vout_diff);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: fcw=%0d phase=%0d model=%0d code=%b units=%0d",
                 what, fcw, phase, model_phase, dac_code, dac_units);
    end
  endtask

  // Expected DAC level (current units) for an 8-bit phase.
  function automatic int expected_units(input int ph);
    int p, k, mag, m;
    p   = ph >> 2;                       // keep S7..S2
    k   = ((p >> 4) & 1) != 0 ? 15 - (p & 15) : (p & 15);
    mag = int'($floor(31.5 * $sin(2.0 * PI * (real'(k) + 0.5) / 64.0)));
    m   = ((k >> 3) & 1) | (((k >> 2) & 1) & ((k >> 1) & 1));
    if (m == 0 && mag > 15) mag = 15;
    return ((p >> 5) & 1) != 0 ? 31 - mag : 32 + mag;
  endfunction

  // One clock: check carry out before the edge, phase and output after it.
  task automatic step();
    int total;
    #1;
    total = model_phase + int'(fcw);
    check(wrap == (total > 255), "carry out");
    if (wrap) n_wrap++;
    @(posedge clk);
    prev_phase  = model_phase;
    model_phase = total % 256;
    #1;
    check(int'(phase) == model_phase, "phase");
    check(int'(dac_units) == expected_units(prev_phase), "DAC level");
    check(int'(code_units(dac_code)) == int'(dac_units), "DAC code vs level");
    check((vout_diff - (real'(dac_units) - 31.5) * 3.2e-3) < 1e-9 &&
          (vout_diff - (real'(dac_units) - 31.5) * 3.2e-3) > -1e-9, "DAC voltage");
    if (((prev_phase >> 6) & 1) != 0) n_mirror++;
    if (((prev_phase >> 7) & 1) != 0) n_lower++;
    @(negedge clk);
  endtask

  // Spur-free dynamic range (dB) of the recorded samples, fundamental at bin f.
  function automatic real sfdr_db(input int f, output int peak_bin);
    real mean = 0.0, fund = 0.0, spur = 0.0, peak = 0.0;
    for (int n = 0; n < 256; n++) mean += real'(samples[n]);
    mean /= 256.0;
    peak_bin = 0;
    for (int b = 1; b <= 128; b++) begin
      real re = 0.0, im = 0.0, mag2;
      for (int n = 0; n < 256; n++) begin
        re += (real'(samples[n]) - mean) * $cos(2.0 * PI * real'(b * n) / 256.0);
        im += (real'(samples[n]) - mean) * $sin(2.0 * PI * real'(b * n) / 256.0);
      end
      mag2 = re * re + im * im;
      if (mag2 > peak) begin peak = mag2; peak_bin = b; end
      if (b == f) fund = mag2;
      else if (mag2 > spur) spur = mag2;
    end
    if (spur < 1e-12) return 999.0;
    return 10.0 * $log10(fund / spur);
  endfunction

  initial begin
    int last_coarse, worst_fcw;
    automatic real worst = 999.0;
    rst_n = 1'b0; fcw = 8'd1; model_phase = 0; prev_phase = 0;
    repeat (2) @(posedge clk);
    #1 check(phase == '0 && dac_code == '0, "reset");
    @(negedge clk);
    rst_n = 1'b1;
    step();                              // first accumulation, converter fills

    // fcw = 1: output period is exactly 256 clocks
    begin
      automatic int first_rise = -1, second_rise = -1, prev_units = int'(dac_units);
      for (int n = 0; n < 600 && second_rise < 0; n++) begin
        step();
        if (prev_units < 32 && int'(dac_units) >= 32) begin
          if (first_rise < 0) first_rise = n; else second_rise = n;
        end
        prev_units = int'(dac_units);
      end
      check(second_rise - first_rise == 256, "fcw=1 output period of 256 clocks");
      $display("fcw=1: period %0d clocks, %f MHz at a %0.0f MHz clock",
               second_rise - first_rise, F_CLK_MHZ / real'(second_rise - first_rise), F_CLK_MHZ);
    end

    // sweep of every frequency control word, changed on the fly
    last_coarse = int'(dac_code.coarse);
    for (int f = 1; f <= 128; f++) begin
      int peak_bin;
      real s;
      fcw = 8'(f);
      n_fcw_change++;
      step();
      step();                            // pipeline now carries only the new word
      for (int n = 0; n < 256; n++) begin
        step();
        samples[n] = int'(dac_units);
        if (int'(dac_code.coarse) != last_coarse) n_coarse_change++;
        last_coarse = int'(dac_code.coarse);
      end
      s = sfdr_db(f, peak_bin);
      if (f < 128) begin
        check(peak_bin == f, "fundamental at fcw/256 of the clock");
        check(s >= 28.4, "SFDR of at least 28.4 dBc");
        if (s < worst) begin worst = s; worst_fcw = f; end
      end else begin
        automatic bit alternates = 1'b1;
        for (int n = 2; n < 256; n++) if (samples[n] != samples[n-2]) alternates = 1'b0;
        check(alternates && samples[0] != samples[1], "fcw=128 divides the clock by two");
      end
      if (f == 1) begin
        check(s >= 34.0, "SFDR of at least 34 dBc at fcw=1");
        $display("fcw=1: SFDR %0.2f dBc", s);
      end
      if (f == 126)
        $display("fcw=126: %0.3f MHz, SFDR %0.2f dBc", F_CLK_MHZ * 126.0 / 256.0, s);
    end
    $display("worst SFDR over fcw 1..127: %0.2f dBc at fcw=%0d", worst, worst_fcw);

    $display("mechanisms: wrap=%0d mirrored_quarter=%0d lower_half=%0d coarse_change=%0d fcw_change=%0d",
             n_wrap, n_mirror, n_lower, n_coarse_change, n_fcw_change);
    check(n_wrap > 0, "accumulator wrap happened");
    check(n_mirror > 0, "mirrored quarter happened");
    check(n_lower > 0, "lower half-wave happened");
    check(n_coarse_change > 0, "coarse bit change happened");
    check(n_fcw_change > 0, "control word change happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
