// lasio_crossbar: the 7x7 crossbar of the Lasio router.
//
// Connects input buffers to output ports as the switching table says.
// For each busy output port o (available[o] low) it forwards the flit of
// input out_tbl[o]: data_out[o] is that buffer's head flit, and tx[o] is
// high when the buffer has a flit (data_av) and the receiver has a credit
// (credit_i[o]), so a flit is only sent when it will be taken. For each
// connected input i (in_valid[i]) it returns the credit of output
// in_tbl[i] as data_ack[i], so the buffer removes a flit exactly when the
// next router (or the PE) takes it. Unconnected outputs send
// nothing and unconnected inputs see no acknowledge.
//
// Purely combinational; a flit crosses the router's crossbar in the cycle
// it is offered. The document gives the crossbar's role; the multiplexer
// form is this design's.
module lasio_crossbar
  import lasio_pkg::*;
#(
  parameter int unsigned FLIT_W = 16
) (
  input  logic [NPORTS-1:0][FLIT_W-1:0] in_data,
  input  logic [NPORTS-1:0]             data_av,
  output logic [NPORTS-1:0]             data_ack,
  input  logic [NPORTS-1:0]             available,
  input  port_e                         in_tbl  [NPORTS],
  input  logic [NPORTS-1:0]             in_valid,
  input  port_e                         out_tbl [NPORTS],
  output logic [NPORTS-1:0]             tx,
  output logic [NPORTS-1:0][FLIT_W-1:0] data_out,
  input  logic [NPORTS-1:0]             credit_i
);

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      if (!available[o]) begin
        tx[o]       = data_av[out_tbl[o]] && credit_i[o];
        data_out[o] = in_data[out_tbl[o]];
      end else begin
        tx[o]       = 1'b0;
        data_out[o] = '0;
      end
    end
    for (int i = 0; i < NPORTS; i++) begin
      data_ack[i] = in_valid[i] && credit_i[in_tbl[i]];
    end
  end

endmodule
