// tb_phase_accumulator: self-checking test of the 8-bit ripple-carry phase
// accumulator. Applies random and fixed frequency control words, predicts
// phase <= phase + fcw + c_in (mod 256) with ordinary integer arithmetic, and
// checks every cycle that the new sum appears after exactly one clock (the
// whole 8-bit addition in a single cycle), that the carry out matches the
// integer overflow, and that fcw = 1 returns to the start phase after 256
// clocks. A watchdog ends the run if it stalls.
module tb_phase_accumulator;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] fcw, phase;
  logic       c_in, c_out;
  int         model_phase;
  int         checks = 0, failures = 0;

  phase_accumulator dut (.clk, .rst_n, .fcw, .c_in, .phase, .c_out);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: fcw=%0d cin=%0b phase=%0d cout=%0b model=%0d",
               what, fcw, c_in, phase, c_out, model_phase);
    end
  endtask

  // One clock with the given inputs: checks the carry out before the edge and
  // the registered phase after it.
  task automatic step(input logic [7:0] f, input logic ci);
    int total;
    @(negedge clk);
    fcw = f; c_in = ci;
    #1;
    total = model_phase + int'(f) + int'(ci);
    check(c_out == (total > 255), "carry out");
    @(posedge clk);
    model_phase = total % 256;
    #1 check(int'(phase) == model_phase, "phase");
  endtask

  initial begin
    int start;
    rst_n = 1'b0; fcw = '0; c_in = 1'b0; model_phase = 0;
    repeat (2) @(posedge clk);
    #1 check(phase == 8'd0, "reset");
    rst_n = 1'b1;
    // full carry ripple: 255 + 1
    step(8'd255, 1'b0);
    step(8'd1, 1'b0);
    step(8'd128, 1'b1);
    for (int n = 0; n < 600; n++) step(8'($urandom), 1'($urandom_range(0, 7) == 0));
    // fcw = 1: one full phase cycle in 256 clocks
    start = model_phase;
    for (int n = 0; n < 256; n++) begin
      step(8'd1, 1'b0);
      if (n < 255) check(int'(phase) != start, "early return with fcw=1");
    end
    check(int'(phase) == start, "period 256 with fcw=1");
    // fcw = 128: phase alternates, period 2
    start = model_phase;
    step(8'd128, 1'b0);
    check(int'(phase) == (start + 128) % 256, "fcw=128 half step");
    step(8'd128, 1'b0);
    check(int'(phase) == start, "period 2 with fcw=128");
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
