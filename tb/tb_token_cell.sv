// Testbench for token_cell: reset state for both parameter values, capture
// from token_in, hold while pass is low, one-cycle token_out on pass.
module tb_token_cell;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tin_a, pass_a = 1'b0, has_a, tout_a;
  logic tin_b, pass_b = 1'b0, has_b, tout_b;
  int checks = 0, failures = 0;

  token_cell #(.START_WITH_TOKEN(1'b1)) dut_a (.clk, .rst_n, .token_in(tin_a), .pass(pass_a),
                                               .has_token(has_a), .token_out(tout_a));
  token_cell #(.START_WITH_TOKEN(1'b0)) dut_b (.clk, .rst_n, .token_in(tin_b), .pass(pass_b),
                                               .has_token(has_b), .token_out(tout_b));

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Two cells in a ring: b passes to a, a passes to b.
  assign tin_b = tout_a;
  assign tin_a = tout_b;

  initial begin
    repeat (2) @(posedge clk);
    #1; chk(has_a && !has_b, "reset token position");
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1; chk(has_a && !has_b && !tout_a, "token held while pass low");
    pass_a = 1'b1; #1;
    chk(tout_a, "token_out follows pass");
    @(posedge clk); #1;
    pass_a = 1'b0;
    chk(!has_a && has_b, "token moved to next cell in one cycle");
    chk(!tout_a, "no token_out without token");
    pass_a = 1'b1; #1;
    chk(!tout_a, "pass without token gives nothing");
    pass_a = 1'b0;
    repeat (4) @(posedge clk);
    #1; chk(has_b && !has_a, "second cell keeps token");
    pass_b = 1'b1;
    @(posedge clk); #1;
    pass_b = 1'b0;
    chk(has_a && !has_b, "token returned around the ring");
    rst_n = 1'b0; #1;
    chk(has_a && !has_b, "reset restores start position");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
