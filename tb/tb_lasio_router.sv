// tb_lasio_router: self-checking test of one complete Lasio router.
//
// Router 121 (x=1, y=2, z=1, all seven ports present) with a 4-flit buffer.
//   1. Latency: one packet (header for 131, size 2) enters on the West
//      port of an idle router. Its header must leave on North exactly five
//      cycles after it entered (one cycle into the buffer, four cycles of
//      routing and arbitration), and the size flit and the two payload
//      flits must follow on the next three cycles, one per clock.
//   2. Traffic: every input port injects random packets (random targets in
//      a 4x4x4 mesh, 1..12 payload flits) with random gaps, respecting
//      credit_o; every output port takes flits with a random credit. Each
//      packet must come out complete and unchanged on the XYZ output port,
//      never interleaved with another packet on the same output, and the
//      packets of one input must leave in the order they entered.
// Counted and required at least once: an output refusing a flit (credit
// low), an input buffer full, two packets contending for one output.
module tb_lasio_router;
  import lasio_pkg::*;

  localparam int unsigned FLIT_W = 16;
  localparam int unsigned DEPTH  = 4;
  localparam int MX = 1, MY = 2, MZ = 1;
  localparam int NPKT = 150;   // per input port

  logic clk = 1'b0;
  logic rst;
  logic [NPORTS-1:0]             clock_rx, rx, credit_o, clock_tx, tx, credit_i;
  logic [NPORTS-1:0][FLIT_W-1:0] data_in, data_out;

  int checks = 0, failures = 0;

  lasio_router #(.FLIT_W(FLIT_W), .BUF_DEPTH(DEPTH), .MY_X(MX), .MY_Y(MY), .MY_Z(MZ)) dut (.*);

  always #5 clk = ~clk;
  assign clock_rx = {NPORTS{clk}};

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic port_e xyz(logic [FLIT_W-1:0] hd);
    int tx_ = int'(hd[11:8]), ty = int'(hd[7:4]), tz = int'(hd[3:0]);
    if (tx_ != MX) return (tx_ > MX) ? P_EAST : P_WEST;
    if (ty != MY) return (ty > MY) ? P_NORTH : P_SOUTH;
    if (tz != MZ) return (tz > MZ) ? P_TOP : P_BOTTOM;
    return P_LOCAL;
  endfunction

  typedef logic [FLIT_W-1:0] flit_q_t [$];

  // sources: flits still to send per input; packets sent per input
  flit_q_t to_send [NPORTS];
  flit_q_t sent_pkts [NPORTS][$];
  // sinks: packet being collected per output
  flit_q_t collecting [NPORTS];
  int      received = 0, credit_stalls = 0, full_cycles = 0, contention = 0;
  bit      traffic = 0;
  int      cyc = 0;

  // sources and sinks act at the falling edge
  always @(negedge clk) begin
    if (traffic) begin
      cyc++;
      for (int p = 0; p < NPORTS; p++) begin
        if (!credit_o[p]) full_cycles++;
        rx[p] = credit_o[p] && to_send[p].size() > 0 && ($urandom_range(0, 4) != 0);
        data_in[p] = (to_send[p].size() > 0) ? to_send[p][0] : '0;
        if (rx[p]) void'(to_send[p].pop_front());
        credit_i[p] = ($urandom_range(0, 3) != 0);
      end
      // contention: two inputs waiting for a route to the same output
      for (int a = 0; a < NPORTS; a++)
        for (int b = a + 1; b < NPORTS; b++)
          if (dut.h[a] && dut.h[b] && xyz(dut.buf_data[a]) == xyz(dut.buf_data[b])) contention++;
    end
  end

  // sinks sample at the rising edge
  always @(posedge clk) begin
    if (traffic) begin
      for (int o = 0; o < NPORTS; o++) begin
        if (tx[o]) begin
          check(credit_i[o], "tx only with credit");
          collecting[o].push_back(data_out[o]);
          if (collecting[o].size() >= 2 && collecting[o].size() == int'(collecting[o][1]) + 2) begin
            flit_q_t pk;
            int s;
            pk = collecting[o];
            collecting[o] = {};
            s = int'(pk[2][15:13]);
            check(o == int'(xyz(pk[0])), "packet left on its XYZ port");
            if (sent_pkts[s].size() == 0) check(1'b0, "packet nobody sent");
            else check(pk == sent_pkts[s].pop_front(), "packet intact and in order");
            received++;
          end
        end else if (!available_o(o) && !credit_i[o] && dut.data_av[dut.out_tbl[o]]) begin
          credit_stalls++;
        end
      end
    end
  end

  function automatic bit available_o(int o);
    return dut.available[o];
  endfunction

  initial begin
    int t_out;
    flit_q_t pk;
    rst = 1'b1; rx = '0; data_in = '0; credit_i = '1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (2) @(negedge clk);

    // 1. latency of an idle router
    pk = '{16'h0131, 16'd2, 16'hA001, 16'hA002};
    fork
      begin
        for (int k = 0; k < 4; k++) begin
          rx[P_WEST] = 1'b1; data_in[P_WEST] = pk[k];
          @(negedge clk);
        end
        rx[P_WEST] = 1'b0;
      end
      begin
        // edge 0 writes the header into the West buffer
        t_out = -1;
        for (int c = 0; c < 40 && t_out < 0; c++) begin
          @(posedge clk);
          if (tx[P_NORTH]) t_out = c;
        end
      end
    join
    check(t_out == 5 && data_out[P_NORTH] == 16'h0131,
          $sformatf("header leaves 5 cycles after entering (got %0d)", t_out));
    for (int k = 1; k < 4; k++) begin
      @(posedge clk);
      check(tx[P_NORTH] && data_out[P_NORTH] == pk[k], "body flit one cycle after the previous one");
    end
    repeat (5) @(posedge clk);

    // 2. random traffic on all ports
    for (int p = 0; p < NPORTS; p++)
      for (int n = 0; n < NPKT; n++) begin
        int sz;
        flit_q_t q;
        sz = $urandom_range(1, 12);
        q = {};
        q.push_back({4'h0, 4'($urandom_range(0, 3)), 4'($urandom_range(0, 3)), 4'($urandom_range(0, 3))});
        q.push_back(FLIT_W'(sz));
        q.push_back({3'(p), 13'(n)});
        for (int k = 1; k < sz; k++) q.push_back(FLIT_W'($urandom));
        sent_pkts[p].push_back(q);
        foreach (q[k]) to_send[p].push_back(q[k]);
      end
    @(negedge clk) traffic = 1;
    wait (received == NPORTS * NPKT);
    repeat (5) @(posedge clk);
    for (int p = 0; p < NPORTS; p++) check(sent_pkts[p].size() == 0, "all packets delivered");
    check(credit_stalls > 0, "an output refused a flit");
    check(full_cycles > 0, "an input buffer was full");
    check(contention > 0, "two packets contended for one output");
    $display("received=%0d credit_stalls=%0d full_cycles=%0d contention=%0d cycles=%0d",
             received, credit_stalls, full_cycles, contention, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, received=%0d", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
