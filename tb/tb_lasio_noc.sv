// tb_lasio_noc: end-to-end test of the 4x4x4 Lasio NoC at its default size.
//
// Every router's Local port gets a stand-in processing element: a source
// that injects packets at their planned times (while the router gives
// credit) and a sink that collects the flits it receives. The run has
// three phases:
//   1. Zero load: one packet from router 000 to router 333 (9 hops, 10
//      routers). Its header must reach the destination exactly 50 cycles
//      after it entered router 000: five cycles per router (buffer write
//      plus four cycles of routing/arbitration).
//   2. Complement traffic: router n sends to router 63-n, all at once,
//      8-flit packets (header, size, 6 payload flits), 4 packets each.
//   3. All-to-all traffic: in round r every router except r sends one
//      5-flit packet to router r; round r is planned r*10 cycles after the
//      start (one 5-flit packet every 10 cycles: half the link rate).
//      In the first half of this phase the sinks refuse flits one cycle
//      in eight, so delivery stalls at the destinations too.
// Every packet must arrive once, unchanged, at the router its header
// names. The test reports average network latency (accomplished injection
// to delivery of the last flit) and application latency (planned
// injection to delivery), and counts each mechanism: hops in each of the
// six mesh directions, routing requests refused because the output was
// busy, mesh input buffers running full, injection stalled by a full
// Local buffer, and deliveries refused by a sink. Each must happen.
module tb_lasio_noc;
  import lasio_pkg::*;

  localparam int X = 4, Y = 4, Z = 4;
  localparam int N = X * Y * Z;
  localparam int FLIT_W = 16;

  logic clk = 1'b0;
  logic rst;
  logic [N-1:0]             local_rx, local_credit_o, local_tx, local_credit_i;
  logic [N-1:0][FLIT_W-1:0] local_data_in, local_data_out;

  int checks = 0, failures = 0;
  int cycle = 0;

  lasio_noc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic logic [FLIT_W-1:0] addr_of(int n);
    return {4'h0, 4'(n % X), 4'((n / X) % Y), 4'(n / (X * Y))};
  endfunction

  // ---------------------------------------------------------------- PEs
  typedef logic [FLIT_W-1:0] flit_q_t [$];
  typedef struct {
    int      planned;
    flit_q_t flits;
  } pkt_t;

  pkt_t    txq [N][$];        // packets waiting per source
  int      txpos [N];         // next flit of the head packet
  int      inj_time [int];    // accomplished injection, key {src,seq}
  int      plan_time [int];
  flit_q_t expect_pkt [int];
  flit_q_t rxbuf [N];
  int      outstanding = 0;
  int      delivered = 0;
  longint  sum_noc = 0, sum_app = 0;
  int      n_lat = 0;
  int      inj_stalls = 0, sink_refusals = 0;
  bit      sink_throttle = 0;
  int      last_header_arrival = -1;
  int      seqno [N];

  function automatic int key_of(logic [FLIT_W-1:0] tag);
    return int'(tag);
  endfunction

  // queue a packet of `len` flits (len >= 3) from s to d
  task automatic add_packet(int s, int d, int len, int planned);
    pkt_t p;
    logic [FLIT_W-1:0] tag;
    p.planned = planned;
    p.flits = {};
    tag = {6'(s), 10'(seqno[s])};
    seqno[s]++;
    p.flits.push_back(addr_of(d));
    p.flits.push_back(FLIT_W'(len - 2));
    p.flits.push_back(tag);
    for (int k = 3; k < len; k++) p.flits.push_back(FLIT_W'($urandom));
    expect_pkt[key_of(tag)] = p.flits;
    plan_time[key_of(tag)]  = planned;
    txq[s].push_back(p);
    outstanding++;
  endtask

  // sources drive at the falling edge
  always @(negedge clk) begin
    if (!rst) begin
      for (int n = 0; n < N; n++) begin
        local_rx[n] = 1'b0;
        if (txq[n].size() > 0 && (txpos[n] > 0 || txq[n][0].planned <= cycle)) begin
          if (local_credit_o[n]) begin
            local_rx[n]      = 1'b1;
            local_data_in[n] = txq[n][0].flits[txpos[n]];
            // the header is taken at the coming edge, numbered `cycle`
            if (txpos[n] == 0) inj_time[key_of(txq[n][0].flits[2])] = cycle;
            txpos[n]++;
            if (txpos[n] == txq[n][0].flits.size()) begin
              void'(txq[n].pop_front());
              txpos[n] = 0;
            end
          end else inj_stalls++;
        end
        local_credit_i[n] = !(sink_throttle && ($urandom_range(0, 7) == 0));
      end
    end
  end

  // sinks sample at the rising edge (edge number `cycle`)
  always @(posedge clk) begin
    if (!rst) begin
      for (int n = 0; n < N; n++) begin
        if (!local_credit_i[n]) sink_refusals++;
        if (local_tx[n]) begin
          check(local_credit_i[n], "delivery only with sink credit");
          if (rxbuf[n].size() == 0) last_header_arrival = cycle;
          rxbuf[n].push_back(local_data_out[n]);
          if (rxbuf[n].size() >= 3 && rxbuf[n].size() == int'(rxbuf[n][1]) + 2) begin
            int k;
            k = key_of(rxbuf[n][2]);
            check(rxbuf[n][0] == addr_of(n), "packet delivered to the router it names");
            if (!expect_pkt.exists(k)) check(1'b0, "unknown or duplicated packet");
            else begin
              check(rxbuf[n] == expect_pkt[k], "packet unchanged");
              expect_pkt.delete(k);
              sum_noc += longint'(cycle - inj_time[k]);
              sum_app += longint'(cycle - plan_time[k]);
              n_lat++;
            end
            rxbuf[n] = {};
            delivered++;
            outstanding--;
          end
        end
      end
    end
  end

  // ------------------------------------------------- mechanism monitors
  int hops [NPORTS];
  int refused = 0, mesh_full = 0;

  for (genvar gz = 0; gz < Z; gz++) begin : g_mz
    for (genvar gy = 0; gy < Y; gy++) begin : g_my
      for (genvar gx = 0; gx < X; gx++) begin : g_mx
        always @(posedge clk) begin
          if (!rst) begin
            for (int p = 0; p < NPORTS; p++) begin
              if (dut.g_z[gz].g_y[gy].g_x[gx].u_router.tx[p]) hops[p]++;
              if (p != P_LOCAL && dut.g_z[gz].g_y[gy].g_x[gx].u_router.PORTS_PRESENT[p]
                  && !dut.g_z[gz].g_y[gy].g_x[gx].u_router.credit_o[p]) mesh_full++;
            end
            if (dut.g_z[gz].g_y[gy].g_x[gx].u_router.u_control.state == 2'd2 &&
                !dut.g_z[gz].g_y[gy].g_x[gx].u_router.u_control.available[
                   dut.g_z[gz].g_y[gy].g_x[gx].u_router.u_control.dest]) refused++;
          end
        end
      end
    end
  end

  task automatic wait_drained(int limit);
    int t0;
    t0 = cycle;
    while (outstanding > 0 && cycle - t0 < limit) @(posedge clk);
    check(outstanding == 0, $sformatf("all packets delivered (%0d left)", outstanding));
  endtask

  task automatic report(string name);
    if (n_lat > 0)
      $display("%s: packets=%0d avg NoC latency=%0.1f avg App latency=%0.1f cycles",
               name, n_lat, real'(sum_noc) / n_lat, real'(sum_app) / n_lat);
    sum_noc = 0; sum_app = 0; n_lat = 0;
  endtask

  initial begin
    int t0;
    rst = 1'b1;
    local_rx = '0; local_data_in = '0; local_credit_i = '1;
    for (int n = 0; n < N; n++) begin txpos[n] = 0; seqno[n] = 0; end
    for (int p = 0; p < NPORTS; p++) hops[p] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (2) @(posedge clk);

    // 1. zero-load latency, 000 -> 333
    @(negedge clk);
    t0 = cycle;                 // the header is taken at edge t0
    add_packet(0, N - 1, 5, t0);
    wait_drained(500);
    check(last_header_arrival - t0 == 50,
          $sformatf("zero-load header latency 000->333 is 50 cycles (got %0d)", last_header_arrival - t0));
    report("zero load");

    // 2. complement, 8-flit packets
    t0 = cycle + 2;
    for (int k = 0; k < 4; k++)
      for (int n = 0; n < N; n++) add_packet(n, N - 1 - n, 8, t0 + 16 * k);
    wait_drained(20000);
    report("complement 8-flit");

    // 3. all-to-all, 5-flit packets
    t0 = cycle + 2;
    sink_throttle = 1;
    for (int r = 0; r < N; r++)
      for (int n = 0; n < N; n++)
        if (n != r) add_packet(n, r, 5, t0 + 10 * r);
    while (outstanding > (N * (N - 1)) / 2) @(posedge clk);
    sink_throttle = 0;
    wait_drained(100000);
    report("all-to-all 5-flit");

    check(expect_pkt.size() == 0, "no packet lost");
    check(hops[P_EAST] > 0,   "hops East");
    check(hops[P_WEST] > 0,   "hops West");
    check(hops[P_NORTH] > 0,  "hops North");
    check(hops[P_SOUTH] > 0,  "hops South");
    check(hops[P_TOP] > 0,    "hops Top");
    check(hops[P_BOTTOM] > 0, "hops Bottom");
    check(refused > 0,        "routing request refused (output busy)");
    check(mesh_full > 0,      "mesh input buffer full");
    check(inj_stalls > 0,     "injection stalled by a full Local buffer");
    check(sink_refusals > 0,  "delivery refused by a sink");
    $display("hops E=%0d W=%0d N=%0d S=%0d B=%0d T=%0d delivered=%0d", hops[P_EAST], hops[P_WEST],
             hops[P_NORTH], hops[P_SOUTH], hops[P_BOTTOM], hops[P_TOP], delivered);
    $display("refused=%0d mesh_full=%0d inj_stalls=%0d sink_refusals=%0d cycles=%0d",
             refused, mesh_full, inj_stalls, sink_refusals, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, outstanding=%0d", outstanding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
