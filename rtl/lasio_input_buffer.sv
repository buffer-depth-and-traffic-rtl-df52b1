// lasio_input_buffer: one input port of the Lasio router.
//
// A circular FIFO of BUF_DEPTH flits takes flits from the neighbour (or the
// PE) under credit-based flow control: credit_o is high while the FIFO has a
// free slot, and a flit is written in every cycle in which rx is high. The
// sender must only raise rx while it sees credit high, so no flit is lost.
//
// The read side follows the packet format: target-address flit, size flit
// (number of payload flits), payload. When a header flit reaches the head of
// the FIFO the buffer raises h to ask the switch control for a route and
// holds the header there. After ack_h the buffer is connected to an output
// port: sender goes high and every flit at the head is offered (data_av)
// and removed when the output accepts it (data_ack, the credit of the
// connected output). Once the last payload flit has left, sender drops,
// which tells the switch control to free the output port, and the next
// header can ask for a route. Flits of a blocked packet simply wait here
// (wormhole switching).
//
// Timing: a written flit is visible at the head the next cycle; one flit
// can be written and one read in the same cycle; sender rises the cycle
// after ack_h and falls the cycle after the last flit is read.
//
// Follows the document: circular FIFO with configurable depth, credit
// signal, header/size/payload framing, request per header. This design's
// choices: the credit is a "space available" level (not a counted token),
// active-high asynchronous reset, and the state machine itself.
module lasio_input_buffer #(
  parameter int unsigned FLIT_W    = 16,
  parameter int unsigned BUF_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst,
  // link side
  input  logic              rx,
  input  logic [FLIT_W-1:0] data_in,
  output logic              credit_o,
  // switch control side
  output logic              h,
  input  logic              ack_h,
  output logic              sender,
  // crossbar side
  output logic              data_av,
  output logic [FLIT_W-1:0] data_out,
  input  logic              data_ack
);

  localparam int unsigned PTR_W = (BUF_DEPTH > 1) ? $clog2(BUF_DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(BUF_DEPTH + 1);

  typedef enum logic {S_HEAD, S_SEND} state_e;
  typedef enum logic [1:0] {PH_HDR, PH_SIZE, PH_PAYLOAD} phase_e;

  logic [FLIT_W-1:0] mem [BUF_DEPTH];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic [CNT_W-1:0]  count;
  logic              empty, push, pop;

  state_e            state;
  phase_e            phase;
  logic [FLIT_W-1:0] remaining;

  assign empty    = (count == '0);
  assign credit_o = (count != CNT_W'(BUF_DEPTH));
  assign push     = rx && credit_o;
  assign data_out = mem[rd_ptr];
  assign h        = (state == S_HEAD) && !empty;
  assign sender   = (state == S_SEND);
  assign data_av  = (state == S_SEND) && !empty;
  assign pop      = data_av && data_ack;

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(BUF_DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // FIFO storage
  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= data_in;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // packet framing
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state     <= S_HEAD;
      phase     <= PH_HDR;
      remaining <= '0;
    end else begin
      case (state)
        S_HEAD: begin
          if (h && ack_h) begin
            state <= S_SEND;
            phase <= PH_HDR;
          end
        end
        S_SEND: begin
          if (pop) begin
            case (phase)
              PH_HDR: phase <= PH_SIZE;
              PH_SIZE: begin
                remaining <= data_out;
                if (data_out == '0) state <= S_HEAD;
                else                phase <= PH_PAYLOAD;
              end
              default: begin
                remaining <= remaining - 1'b1;
                if (remaining == FLIT_W'(1)) state <= S_HEAD;
              end
            endcase
          end
        end
        default: state <= S_HEAD;
      endcase
    end
  end

  // The upstream sender must respect the credit: a flit offered while the
  // FIFO is full would be lost.
  assert property (@(posedge clk) disable iff (rst) rx |-> credit_o)
    else $error("lasio_input_buffer: flit received without credit");

endmodule
