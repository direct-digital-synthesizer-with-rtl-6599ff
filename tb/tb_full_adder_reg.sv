// tb_full_adder_reg: self-checking test of one registered full-adder cell.
// Drives random IN and carry-in bits, keeps its own copy of the sum register,
// and checks the combinational carry out before each clock edge and the
// registered sum after it. A watchdog ends the run if it stalls.
module tb_full_adder_reg;

  logic clk = 1'b0;
  logic rst_n;
  logic in_bit, c_in, c_out, sum;
  logic model_sum;
  int   checks = 0, failures = 0;

  full_adder_reg dut (.clk, .rst_n, .in_bit, .c_in, .c_out, .sum);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%0b cin=%0b sum=%0b cout=%0b model_sum=%0b",
               what, in_bit, c_in, sum, c_out, model_sum);
    end
  endtask

  initial begin
    rst_n = 1'b0; in_bit = 1'b0; c_in = 1'b0; model_sum = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(sum == 1'b0, "reset");
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      {in_bit, c_in} = 2'($urandom);
      #1;
      // carry out: majority of (sum, in, cin)
      check(c_out == ((model_sum & in_bit) | (model_sum & c_in) | (in_bit & c_in)), "carry");
      @(posedge clk);
      model_sum = model_sum ^ in_bit ^ c_in;
      #1 check(sum == model_sum, "sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
