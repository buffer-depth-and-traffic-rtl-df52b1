// tb_lasio_input_buffer: self-checking test of one router input buffer.
//
// A random stream of packets (header, size 0..6, payload) is written with
// random gaps, always respecting credit_o. A stand-in for the switch
// control acknowledges requests after random delays, and a stand-in for the
// output port accepts flits at random. A cycle-by-cycle model of the FIFO
// and the packet framing, written from the buffer's specification, predicts
// credit_o, h, sender, data_av and data_out every cycle; every read flit is
// compared with the written order, and sender must fall right after the
// last flit of each packet. A small depth (4) makes the FIFO fill often.
module tb_lasio_input_buffer;

  localparam int unsigned FLIT_W = 16;
  localparam int unsigned DEPTH  = 4;
  localparam int unsigned NPKT   = 300;

  logic clk = 1'b0;
  logic rst;
  logic rx, credit_o, h, ack_h, sender, data_av, data_ack;
  logic [FLIT_W-1:0] data_in, data_out;

  int checks = 0, failures = 0;

  lasio_input_buffer #(.FLIT_W(FLIT_W), .BUF_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // source: flits of all packets, generated up front
  logic [FLIT_W-1:0] src [$];
  // model state
  logic [FLIT_W-1:0] mq [$];
  bit   mconn;
  int   midx, mrem;
  int   payload_flits = 0;
  int   pkts_done = 0, full_seen = 0, stalls = 0;
  logic [FLIT_W-1:0] f;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    for (int p = 0; p < NPKT; p++) begin
      int sz;
      sz = $urandom_range(0, 6);
      src.push_back(FLIT_W'($urandom_range(0, 16'h0333)));
      src.push_back(FLIT_W'(sz));
      for (int k = 0; k < sz; k++) src.push_back(FLIT_W'($urandom));
    end
    rst = 1'b1; rx = 1'b0; data_in = '0; ack_h = 1'b0; data_ack = 1'b0;
    mconn = 1'b0; midx = 0; mrem = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
  end

  always @(negedge clk) begin
    if (!rst) begin
      // outputs against the model
      check(credit_o == (mq.size() < DEPTH), "credit_o");
      check(h == (!mconn && mq.size() > 0), "h");
      check(sender == mconn, "sender");
      check(data_av == (mconn && mq.size() > 0), "data_av");
      if (data_av && mq.size() > 0) check(data_out == mq[0], "data_out");
      if (!credit_o) full_seen++;

      // next inputs
      rx      = credit_o && src.size() > 0 && ($urandom_range(0, 3) != 0);
      data_in = (src.size() > 0) ? src[0] : '0;
      ack_h   = h && ($urandom_range(0, 2) == 0);
      data_ack = ($urandom_range(0, 3) != 0);
      if (data_av && !data_ack) stalls++;

      // model of the coming clock edge
      if (mconn && mq.size() > 0 && data_ack) begin
        f = mq.pop_front();
        if (midx == 0) midx = 1;
        else if (midx == 1) begin
          mrem = int'(f);
          midx = 2;
          if (mrem == 0) begin mconn = 1'b0; pkts_done++; end
        end else begin
          mrem--;
          payload_flits++;
          if (mrem == 0) begin mconn = 1'b0; pkts_done++; end
        end
      end else if (!mconn && mq.size() > 0 && ack_h) begin
        mconn = 1'b1;
        midx  = 0;
      end
      if (rx) mq.push_back(src.pop_front());

      if (src.size() == 0 && mq.size() == 0 && !mconn) begin
        check(pkts_done == NPKT, "all packets forwarded");
        check(full_seen > 0, "buffer became full at least once");
        check(stalls > 0, "output stall happened");
        check(payload_flits > NPKT, "packets carried payload");
        $display("packets=%0d full_cycles=%0d stalls=%0d", pkts_done, full_seen, stalls);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
