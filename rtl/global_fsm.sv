// Global FSM: routes each received command to its stimulation site.
//
// One controller serves the whole 10x10 array. It takes a decoded command
// (site address, register select, data), checks that the address names one of
// the N_SITES sites, and puts the write on the shared bus with wr_req held
// high. As published, it also acts as a handshake: it holds the bus until the
// addressed site acknowledges that the data are stored, and only then lets a
// new command through. The four-phase req/ack protocol, the rejection of
// addresses beyond the array and the dropping of a command that arrives while
// a write is still open are this design's choices.
//
// Ports: clk, rst_n (async, active low); cmd_valid/cmd from the command
// receiver; wr_req/wr_cmd to all sites; wr_ack, the OR of the sites'
// acknowledges; addr_err and overrun, one-cycle strobes for a rejected or
// dropped command; busy while a write is open.
// Timing: wr_req rises the cycle after cmd_valid, falls the cycle after
// wr_ack; with a one-cycle site acknowledge a write takes 4 cycles.
module global_fsm
  import inis_pkg::*;
#(
  parameter int unsigned N_SITES = 100
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cmd_valid,
  input  command_t cmd,
  output logic     wr_req,
  output command_t wr_cmd,
  input  logic     wr_ack,
  output logic     addr_err,
  output logic     overrun,
  output logic     busy
);

  typedef enum logic [1:0] {G_IDLE, G_REQ, G_RELEASE} g_state_e;

  g_state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= G_IDLE;
      wr_cmd   <= '0;
      addr_err <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      addr_err <= 1'b0;
      overrun  <= 1'b0;
      unique case (state)
        G_IDLE: if (cmd_valid) begin
          if (32'(cmd.addr) < N_SITES) begin
            wr_cmd <= cmd;
            state  <= G_REQ;
          end else begin
            addr_err <= 1'b1;
          end
        end
        G_REQ: begin
          overrun <= cmd_valid;
          if (wr_ack) state <= G_RELEASE;
        end
        G_RELEASE: begin
          overrun <= cmd_valid;
          if (!wr_ack) state <= G_IDLE;
        end
        default: state <= G_IDLE;
      endcase
    end
  end

  assign wr_req = (state == G_REQ);
  assign busy   = (state != G_IDLE);

  // The bus must stay stable while a request is open.
  a_stable_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    wr_req && !wr_ack |=> $stable(wr_cmd));
  // A request is withdrawn only after it has been acknowledged.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    wr_req && !wr_ack |=> wr_req);

endmodule
