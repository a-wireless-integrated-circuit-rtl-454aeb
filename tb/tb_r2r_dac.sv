// Testbench for the R-2R DAC model: every code is compared with
// Iout = Iin * code / 256 (the closed form of the branch sum), and the
// output must be zero while the DAC is disabled.
module tb_r2r_dac;
  timeunit 1ns; timeprecision 1ps;
  logic [7:0]  code;
  logic        enable;
  logic [15:0] i_out_na;
  int checks = 0, failures = 0;

  r2r_dac dut (.code, .enable, .i_out_na);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      code = 8'(c); enable = 1'b1; #1;
      checks++;
      if (int'(i_out_na) != 25600 * c / 256) begin
        failures++; $display("FAIL code %0d: %0d nA", c, i_out_na);
      end
      enable = 1'b0; #1;
      checks++;
      if (i_out_na != 0) begin failures++; $display("FAIL disabled code %0d", c); end
    end
    // Published end points: 100 nA step, 25.5 uA full scale.
    code = 8'd1; enable = 1'b1; #1;
    checks++; if (i_out_na != 16'd100) failures++;
    code = 8'd255; #1;
    checks++; if (i_out_na != 16'd25500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
