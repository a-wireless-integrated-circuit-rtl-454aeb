// Testbench for the output stage model: x10 gain, positive (sourced) current
// in the anodic phase, negative (sunk) in the cathodic phase, zero otherwise.
module tb_output_stage;
  timeunit 1ns; timeprecision 1ps;
  logic [15:0]        i_dac_na;
  logic               source, sink;
  logic signed [19:0] i_out_na;
  int checks = 0, failures = 0;

  output_stage dut (.i_dac_na, .source, .sink, .i_out_na);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    for (int n = 0; n < 400; n++) begin
      i_dac_na = 16'($urandom_range(0, 25500));
      {source, sink} = 2'(n % 4);
      #1;
      if (source && !sink)      exp_v = 10 * int'(i_dac_na);
      else if (sink && !source) exp_v = -10 * int'(i_dac_na);
      else                      exp_v = 0;
      checks++;
      if (int'(i_out_na) != exp_v) begin
        failures++; $display("FAIL dac=%0d src=%0b snk=%0b out=%0d", i_dac_na, source, sink, i_out_na);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
