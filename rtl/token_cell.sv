// Token cell of one stimulation site.
//
// A single token circulates through the 100 sites; a site may fire only
// while it holds the token, so no two electrodes ever drive current at the
// same time. The cell captures the token from the previous site, holds it
// while the site FSM checks for or performs a firing, and hands it on when
// the FSM asserts pass. A site with nothing to do passes the token the cycle
// after it arrives, which gives the published one-cycle delay per idle site;
// the last site's output feeds the first site's input. After reset the token
// sits in the cell built with START_WITH_TOKEN (the first site).
//
// Ports: clk, rst_n (async, active low), token_in (from previous site),
// pass (from the site FSM), has_token, token_out (to next site, one cycle
// wide, combinational from has_token and pass).
module token_cell #(
  parameter bit START_WITH_TOKEN = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic token_in,
  input  logic pass,
  output logic has_token,
  output logic token_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        has_token <= START_WITH_TOKEN;
    else if (token_in) has_token <= 1'b1;
    else if (pass)     has_token <= 1'b0;
  end

  assign token_out = has_token && pass;

  // Only one token exists: it never arrives at a cell that still keeps it
  // (in a one-site ring it comes back in the same cycle it leaves).
  a_single_token: assert property (@(posedge clk) disable iff (!rst_n)
    !(token_in && has_token && !pass));

endmodule
