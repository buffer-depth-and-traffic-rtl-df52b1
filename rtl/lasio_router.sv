// lasio_router: seven-port wormhole router of the Lasio 3D mesh NoC.
//
// Ports, in switching-table order: East, West, North, South (links within
// a layer), Local (the processing element), Bottom and Top (links to the
// layers below and above). Each port has an input channel with a circular
// FIFO (lasio_input_buffer) and an output channel driven by the crossbar.
// The control logic (lasio_switch_control: round-robin arbiter, XYZ
// routing, switching table) connects an input to an output for the whole
// packet; flits then stream through at one flit per clock, and a packet
// whose output is busy waits in its input buffer.
//
// Link signals per port p (see the bidirectional link of two routers):
//   output channel: clock_tx[p], tx[p], data_out[p], credit_i[p]
//   input channel:  clock_rx[p], rx[p], data_in[p],  credit_o[p]
// A flit moves on a clock edge where tx is high; the sender may raise tx
// only while the receiver's credit is high (credit-based flow control).
//
// Timing: a header needs one cycle to reach the head of the buffer and four
// cycles of routing/arbitration, so with free outputs the header leaves
// 5 cycles after it entered; each following flit leaves one cycle after
// the previous one.
//
// Routers at the edge of the mesh have fewer neighbours: PORTS_PRESENT has
// one bit per port, and a port whose bit is 0 gets no buffer and offers no
// credit. XYZ routing never sends a packet with an address inside the mesh
// towards a missing neighbour.
//
// The whole NoC runs from one clock: clock_tx[p] is this router's clk, and
// clock_rx[p] is accepted for link compatibility but not used, since the
// sending router runs from the same clock. This, the reset and the port
// order are this design's choices; the structure follows the document.
module lasio_router
  import lasio_pkg::*;
#(
  parameter int unsigned FLIT_W        = 16,
  parameter int unsigned BUF_DEPTH     = 16,
  parameter int unsigned MY_X          = 0,
  parameter int unsigned MY_Y          = 0,
  parameter int unsigned MY_Z          = 0,
  parameter logic [NPORTS-1:0] PORTS_PRESENT = '1
) (
  input  logic                          clk,
  input  logic                          rst,
  // input channels
  input  logic [NPORTS-1:0]             clock_rx,
  input  logic [NPORTS-1:0]             rx,
  input  logic [NPORTS-1:0][FLIT_W-1:0] data_in,
  output logic [NPORTS-1:0]             credit_o,
  // output channels
  output logic [NPORTS-1:0]             clock_tx,
  output logic [NPORTS-1:0]             tx,
  output logic [NPORTS-1:0][FLIT_W-1:0] data_out,
  input  logic [NPORTS-1:0]             credit_i
);

  logic [NPORTS-1:0]             h, ack_h, sender, data_av, data_ack;
  logic [NPORTS-1:0][FLIT_W-1:0] buf_data;
  logic [NPORTS-1:0]             available, in_valid;
  port_e                         in_tbl  [NPORTS];
  port_e                         out_tbl [NPORTS];

  assign clock_tx = {NPORTS{clk}};

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    if (PORTS_PRESENT[p]) begin : g_buf
      lasio_input_buffer #(
        .FLIT_W    (FLIT_W),
        .BUF_DEPTH (BUF_DEPTH)
      ) u_buffer (
        .clk      (clk),
        .rst      (rst),
        .rx       (rx[p]),
        .data_in  (data_in[p]),
        .credit_o (credit_o[p]),
        .h        (h[p]),
        .ack_h    (ack_h[p]),
        .sender   (sender[p]),
        .data_av  (data_av[p]),
        .data_out (buf_data[p]),
        .data_ack (data_ack[p])
      );
    end else begin : g_none
      assign credit_o[p] = 1'b0;
      assign h[p]        = 1'b0;
      assign sender[p]   = 1'b0;
      assign data_av[p]  = 1'b0;
      assign buf_data[p] = '0;
    end
  end

  lasio_switch_control #(
    .FLIT_W (FLIT_W),
    .MY_X   (MY_X),
    .MY_Y   (MY_Y),
    .MY_Z   (MY_Z)
  ) u_control (
    .clk       (clk),
    .rst       (rst),
    .req       (h),
    .header    (buf_data),
    .sender    (sender),
    .ack_h     (ack_h),
    .available (available),
    .in_tbl    (in_tbl),
    .in_valid  (in_valid),
    .out_tbl   (out_tbl)
  );

  lasio_crossbar #(.FLIT_W(FLIT_W)) u_crossbar (
    .in_data   (buf_data),
    .data_av   (data_av),
    .data_ack  (data_ack),
    .available (available),
    .in_tbl    (in_tbl),
    .in_valid  (in_valid),
    .out_tbl   (out_tbl),
    .tx        (tx),
    .data_out  (data_out),
    .credit_i  (credit_i)
  );

  // credit-based flow control: nothing leaves without the receiver's credit
  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (rst) tx[p] |-> credit_i[p])
      else $error("lasio_router: flit sent without credit on port %0d", p);
  end

endmodule
