// lasio_noc: the Lasio 3D mesh network-on-chip (top level).
//
// X_SIZE x Y_SIZE x Z_SIZE routers (4x4x4 = 64 by default), each with a
// processing element on its Local port. Router (x,y,z) has the address
// {x, y, z} (three 4-bit fields of the header flit) and the index
// n = x + X_SIZE*(y + Y_SIZE*z), which numbers the local ports below.
// Neighbouring routers are joined by bidirectional links: East of (x,y,z)
// to West of (x+1,y,z), North to South of (x,y+1,z), and Top to Bottom of
// (x,y,z+1). The vertical (Top/Bottom) links stand for the through-silicon
// vias between layers; they have the same one-cycle cost as links within a
// layer. Routers on the faces of the mesh are built without the ports that
// would point outside it.
//
// Local interface, one entry per router n (the PE's side of the link):
//   local_rx[n], local_data_in[n], local_credit_o[n]  - PE injects flits:
//       a flit is taken on a clock edge where local_rx[n] is high; the PE
//       may only raise it while local_credit_o[n] is high.
//   local_tx[n], local_data_out[n], local_credit_i[n] - PE receives flits:
//       a flit is delivered on an edge where local_tx[n] is high, which the
//       NoC only does while local_credit_i[n] is high.
// Packets: target address flit, size flit (payload length), payload.
//
// Timing: each hop costs 5 cycles for the header (buffer write plus four
// cycles of routing/arbitration) when nothing blocks it; body flits follow
// at one per cycle (wormhole switching).
//
// One clock and one reset drive every router. Size, flit width and the
// mesh structure follow the document; the default buffer depth of 16 flits
// is this design's choice inside the 4..1024 range the document explores.
module lasio_noc
  import lasio_pkg::*;
#(
  parameter int unsigned X_SIZE    = 4,
  parameter int unsigned Y_SIZE    = 4,
  parameter int unsigned Z_SIZE    = 4,
  parameter int unsigned FLIT_W    = 16,
  parameter int unsigned BUF_DEPTH = 16,
  localparam int unsigned NROUTERS = X_SIZE * Y_SIZE * Z_SIZE
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic [NROUTERS-1:0]             local_rx,
  input  logic [NROUTERS-1:0][FLIT_W-1:0] local_data_in,
  output logic [NROUTERS-1:0]             local_credit_o,
  output logic [NROUTERS-1:0]             local_tx,
  output logic [NROUTERS-1:0][FLIT_W-1:0] local_data_out,
  input  logic [NROUTERS-1:0]             local_credit_i
);

  // the address fields are COORD_W bits wide
  if (X_SIZE > 16 || Y_SIZE > 16 || Z_SIZE > 16 || FLIT_W < 3 * COORD_W) begin : g_bad_size
    $error("lasio_noc: each mesh dimension must fit a 4-bit coordinate and a flit must hold 12 address bits");
  end

  logic [NROUTERS-1:0][NPORTS-1:0]             r_clock_rx, r_rx, r_credit_o;
  logic [NROUTERS-1:0][NPORTS-1:0]             r_clock_tx, r_tx, r_credit_i;
  logic [NROUTERS-1:0][NPORTS-1:0][FLIT_W-1:0] r_data_in, r_data_out;

  for (genvar z = 0; z < Z_SIZE; z++) begin : g_z
    for (genvar y = 0; y < Y_SIZE; y++) begin : g_y
      for (genvar x = 0; x < X_SIZE; x++) begin : g_x
        localparam int unsigned N = x + X_SIZE * (y + Y_SIZE * z);

        // neighbour index per port, and whether it exists
        localparam logic [NPORTS-1:0] PRESENT = {
          (z < Z_SIZE - 1),          // Top
          (z > 0),                   // Bottom
          1'b1,                      // Local
          (y > 0),                   // South
          (y < Y_SIZE - 1),          // North
          (x > 0),                   // West
          (x < X_SIZE - 1)           // East
        };
        localparam int unsigned NB_E = N + 1;
        localparam int unsigned NB_W = N - 1;
        localparam int unsigned NB_N = N + X_SIZE;
        localparam int unsigned NB_S = N - X_SIZE;
        localparam int unsigned NB_T = N + X_SIZE * Y_SIZE;
        localparam int unsigned NB_B = N - X_SIZE * Y_SIZE;

        lasio_router #(
          .FLIT_W        (FLIT_W),
          .BUF_DEPTH     (BUF_DEPTH),
          .MY_X          (x),
          .MY_Y          (y),
          .MY_Z          (z),
          .PORTS_PRESENT (PRESENT)
        ) u_router (
          .clk      (clk),
          .rst      (rst),
          .clock_rx (r_clock_rx[N]),
          .rx       (r_rx[N]),
          .data_in  (r_data_in[N]),
          .credit_o (r_credit_o[N]),
          .clock_tx (r_clock_tx[N]),
          .tx       (r_tx[N]),
          .data_out (r_data_out[N]),
          .credit_i (r_credit_i[N])
        );

        // Local port: the processing element
        assign r_clock_rx[N][P_LOCAL] = clk;
        assign r_rx[N][P_LOCAL]       = local_rx[N];
        assign r_data_in[N][P_LOCAL]  = local_data_in[N];
        assign local_credit_o[N]      = r_credit_o[N][P_LOCAL];
        assign local_tx[N]            = r_tx[N][P_LOCAL];
        assign local_data_out[N]      = r_data_out[N][P_LOCAL];
        assign r_credit_i[N][P_LOCAL] = local_credit_i[N];

        // Input side of each mesh port: the opposite port of the neighbour
        if (PRESENT[P_EAST]) begin : g_e
          assign r_clock_rx[N][P_EAST] = r_clock_tx[NB_E][P_WEST];
          assign r_rx[N][P_EAST]       = r_tx[NB_E][P_WEST];
          assign r_data_in[N][P_EAST]  = r_data_out[NB_E][P_WEST];
          assign r_credit_i[N][P_EAST] = r_credit_o[NB_E][P_WEST];
        end else begin : g_e_none
          assign r_clock_rx[N][P_EAST] = 1'b0;
          assign r_rx[N][P_EAST]       = 1'b0;
          assign r_data_in[N][P_EAST]  = '0;
          assign r_credit_i[N][P_EAST] = 1'b0;
        end
        if (PRESENT[P_WEST]) begin : g_w
          assign r_clock_rx[N][P_WEST] = r_clock_tx[NB_W][P_EAST];
          assign r_rx[N][P_WEST]       = r_tx[NB_W][P_EAST];
          assign r_data_in[N][P_WEST]  = r_data_out[NB_W][P_EAST];
          assign r_credit_i[N][P_WEST] = r_credit_o[NB_W][P_EAST];
        end else begin : g_w_none
          assign r_clock_rx[N][P_WEST] = 1'b0;
          assign r_rx[N][P_WEST]       = 1'b0;
          assign r_data_in[N][P_WEST]  = '0;
          assign r_credit_i[N][P_WEST] = 1'b0;
        end
        if (PRESENT[P_NORTH]) begin : g_n
          assign r_clock_rx[N][P_NORTH] = r_clock_tx[NB_N][P_SOUTH];
          assign r_rx[N][P_NORTH]       = r_tx[NB_N][P_SOUTH];
          assign r_data_in[N][P_NORTH]  = r_data_out[NB_N][P_SOUTH];
          assign r_credit_i[N][P_NORTH] = r_credit_o[NB_N][P_SOUTH];
        end else begin : g_n_none
          assign r_clock_rx[N][P_NORTH] = 1'b0;
          assign r_rx[N][P_NORTH]       = 1'b0;
          assign r_data_in[N][P_NORTH]  = '0;
          assign r_credit_i[N][P_NORTH] = 1'b0;
        end
        if (PRESENT[P_SOUTH]) begin : g_s
          assign r_clock_rx[N][P_SOUTH] = r_clock_tx[NB_S][P_NORTH];
          assign r_rx[N][P_SOUTH]       = r_tx[NB_S][P_NORTH];
          assign r_data_in[N][P_SOUTH]  = r_data_out[NB_S][P_NORTH];
          assign r_credit_i[N][P_SOUTH] = r_credit_o[NB_S][P_NORTH];
        end else begin : g_s_none
          assign r_clock_rx[N][P_SOUTH] = 1'b0;
          assign r_rx[N][P_SOUTH]       = 1'b0;
          assign r_data_in[N][P_SOUTH]  = '0;
          assign r_credit_i[N][P_SOUTH] = 1'b0;
        end
        if (PRESENT[P_TOP]) begin : g_t
          assign r_clock_rx[N][P_TOP] = r_clock_tx[NB_T][P_BOTTOM];
          assign r_rx[N][P_TOP]       = r_tx[NB_T][P_BOTTOM];
          assign r_data_in[N][P_TOP]  = r_data_out[NB_T][P_BOTTOM];
          assign r_credit_i[N][P_TOP] = r_credit_o[NB_T][P_BOTTOM];
        end else begin : g_t_none
          assign r_clock_rx[N][P_TOP] = 1'b0;
          assign r_rx[N][P_TOP]       = 1'b0;
          assign r_data_in[N][P_TOP]  = '0;
          assign r_credit_i[N][P_TOP] = 1'b0;
        end
        if (PRESENT[P_BOTTOM]) begin : g_b
          assign r_clock_rx[N][P_BOTTOM] = r_clock_tx[NB_B][P_TOP];
          assign r_rx[N][P_BOTTOM]       = r_tx[NB_B][P_TOP];
          assign r_data_in[N][P_BOTTOM]  = r_data_out[NB_B][P_TOP];
          assign r_credit_i[N][P_BOTTOM] = r_credit_o[NB_B][P_TOP];
        end else begin : g_b_none
          assign r_clock_rx[N][P_BOTTOM] = 1'b0;
          assign r_rx[N][P_BOTTOM]       = 1'b0;
          assign r_data_in[N][P_BOTTOM]  = '0;
          assign r_credit_i[N][P_BOTTOM] = 1'b0;
        end
      end
    end
  end

endmodule
