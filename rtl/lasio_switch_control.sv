// lasio_switch_control: the control logic of the Lasio router (routing and
// arbitration) and its switching table.
//
// The switching table has three vectors with one entry per port:
//   available[p] - output port p is free (1) or transmitting a packet (0)
//   in_tbl[i]    - output port the packet of input port i is routed to
//                  (valid while in_valid[i])
//   out_tbl[o]   - input port whose packet output port o carries
//                  (valid while !available[o])
// The crossbar is set from these vectors.
//
// Requests are served one at a time by a four-state machine, so a routing
// request takes four clock cycles from the cycle it is seen to the cycle
// it is acknowledged:
//   S_ARB   round-robin choice among the input ports raising req
//   S_ROUTE XYZ routing of the chosen port's header flit
//   S_CHECK is the wanted output port available?  no -> back to S_ARB
//   S_GRANT table update (available cleared, in/out entries set) and ack
// A refused request stays raised by its buffer and is retried when the
// rotating priority comes back to it. An output port is freed the cycle
// after the input connected to it drops its sender line (end of packet).
//
// Follows the document: the three vectors, round-robin arbitration, XYZ
// routing, four cycles per routing request, release at packet end. This
// design's choices: the split of the four cycles into the states above and
// retrying a refused request through a new arbitration round.
module lasio_switch_control
  import lasio_pkg::*;
#(
  parameter int unsigned FLIT_W = 16,
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0,
  parameter int unsigned MY_Z   = 0
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NPORTS-1:0]             req,
  input  logic [NPORTS-1:0][FLIT_W-1:0] header,
  input  logic [NPORTS-1:0]             sender,
  output logic [NPORTS-1:0]             ack_h,
  output logic [NPORTS-1:0]             available,
  output port_e                         in_tbl  [NPORTS],
  output logic [NPORTS-1:0]             in_valid,
  output port_e                         out_tbl [NPORTS]
);

  typedef enum logic [1:0] {S_ARB, S_ROUTE, S_CHECK, S_GRANT} state_e;

  state_e state;
  port_e  sel, dest;

  logic   arb_valid;
  logic [PORT_W-1:0] arb_idx;
  port_e  route_port;

  lasio_rr_arbiter #(.N(NPORTS)) u_arbiter (
    .clk         (clk),
    .rst         (rst),
    .req         (req),
    .update      (state == S_ARB),
    .grant_valid (arb_valid),
    .grant_idx   (arb_idx)
  );

  lasio_xyz_routing #(
    .FLIT_W (FLIT_W),
    .MY_X   (MY_X),
    .MY_Y   (MY_Y),
    .MY_Z   (MY_Z)
  ) u_routing (
    .header   (header[sel]),
    .out_port (route_port)
  );

  always_comb begin
    ack_h = '0;
    if (state == S_GRANT) ack_h[sel] = 1'b1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state     <= S_ARB;
      sel       <= P_EAST;
      dest      <= P_EAST;
      available <= '1;
      in_valid  <= '0;
      for (int p = 0; p < NPORTS; p++) begin
        in_tbl[p]  <= P_EAST;
        out_tbl[p] <= P_EAST;
      end
    end else begin
      // release output ports whose packet has gone through
      for (int o = 0; o < NPORTS; o++) begin
        if (!available[o] && !sender[out_tbl[o]]) begin
          available[o]         <= 1'b1;
          in_valid[out_tbl[o]] <= 1'b0;
        end
      end

      case (state)
        S_ARB: begin
          if (arb_valid) begin
            sel   <= port_e'(arb_idx);
            state <= S_ROUTE;
          end
        end
        S_ROUTE: begin
          dest  <= route_port;
          state <= S_CHECK;
        end
        S_CHECK: begin
          state <= available[dest] ? S_GRANT : S_ARB;
        end
        S_GRANT: begin
          available[dest] <= 1'b0;
          in_tbl[sel]     <= dest;
          in_valid[sel]   <= 1'b1;
          out_tbl[dest]   <= sel;
          state           <= S_ARB;
        end
        default: state <= S_ARB;
      endcase
    end
  end

  // An output port carries at most one packet: a connection is only made
  // to a port that is available.
  assert property (@(posedge clk) disable iff (rst)
                   (state == S_GRANT) |-> available[dest])
    else $error("lasio_switch_control: grant to a busy output port");

endmodule
