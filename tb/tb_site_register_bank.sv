// Testbench for site_register_bank: random writes to the four registers are
// compared with a reference copy; the working copy must change only on latch.
module tb_site_register_bank;
  timeunit 1ns; timeprecision 1ps;
  import inis_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic write = 1'b0, latch = 1'b0;
  reg_sel_e sel = REG_AMPLITUDE;
  logic [DATA_W-1:0] data = '0;
  site_params_t live, work, ref_live, ref_work;
  int checks = 0, failures = 0;

  site_register_bank dut (.clk, .rst_n, .write, .sel, .data, .latch, .live, .work);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_live = '0; ref_work = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (live != '0 || work != '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      write = ($urandom_range(0, 2) != 0);
      latch = ($urandom_range(0, 4) == 0);
      sel   = reg_sel_e'($urandom_range(0, 3));
      data  = DATA_W'($urandom);
      @(posedge clk);
      if (latch) ref_work = ref_live;  // latch copies the value before this write
      if (write) begin
        case (sel)
          REG_AMPLITUDE:  ref_live.amplitude  = data[7:0];
          REG_DURATION:   ref_live.duration   = data;
          REG_INTERPHASE: ref_live.interphase = data;
          REG_REPETITION: ref_live.repetition = data;
          default: ;
        endcase
      end
      #1;
      checks++;
      if (live != ref_live) begin failures++; $display("FAIL live %h exp %h", live, ref_live); end
      checks++;
      if (work != ref_work) begin failures++; $display("FAIL work %h exp %h", work, ref_work); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
