// Testbench for the charge-recovery model: 500 kOhm behaviour for small
// electrode voltages (2 nA per mV, opposing the deviation) and a current
// limit of +-235 nA for large excursions.
module tb_charge_recovery;
  timeunit 1ns; timeprecision 1ps;
  logic signed [15:0] v_electrode_mv;
  logic signed [9:0]  i_rec_na;
  int checks = 0, failures = 0;

  charge_recovery dut (.v_electrode_mv, .i_rec_na);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_i;
    for (int v = -2500; v <= 2500; v += 7) begin
      v_electrode_mv = 16'(v); #1;
      exp_i = -2 * v;
      if (exp_i > 235) exp_i = 235;
      if (exp_i < -235) exp_i = -235;
      checks++;
      if (int'(i_rec_na) != exp_i) begin
        failures++; $display("FAIL v=%0d i=%0d exp=%0d", v, i_rec_na, exp_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
