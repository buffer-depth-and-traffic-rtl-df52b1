// lasio_noc_harness: a Lasio NoC with stand-in processing elements, for
// workload testbenches.
//
// Instantiates lasio_noc with the given mesh size and buffer depth and
// attaches a packet source and sink to every Local port. run_workload()
// queues one traffic pattern, runs it until every packet is delivered and
// returns the measured averages:
//   network latency - accomplished injection of the header to delivery of
//                     the last flit at the destination
//   app latency     - planned injection to delivery of the last flit
//   NoC throughput  - flits delivered per cycle between the first
//                     accomplished injection and the last delivery
//   app throughput  - flits delivered per cycle between the first planned
//                     injection and the last delivery
// Patterns: complement (all_to_all = 0; router n sends to router NR-1-n)
// and all-to-all (all_to_all = 1; in round r every other router sends one
// packet to router r). A source
// plans one packet every 2*len cycles, i.e. half of a link's flit rate.
// Each packet carries {source, sequence} in its first payload flit and is
// checked flit by flit at its destination; errors and checks are counted
// in `failures` and `checks`.
module lasio_noc_harness #(
  parameter int unsigned X_SIZE    = 4,
  parameter int unsigned Y_SIZE    = 4,
  parameter int unsigned Z_SIZE    = 4,
  parameter int unsigned BUF_DEPTH = 16
) (
  input logic clk,
  input logic rst
);

  localparam int NR = X_SIZE * Y_SIZE * Z_SIZE;
  localparam int FLIT_W = 16;

  logic [NR-1:0]             local_rx, local_credit_o, local_tx, local_credit_i;
  logic [NR-1:0][FLIT_W-1:0] local_data_in, local_data_out;

  lasio_noc #(
    .X_SIZE    (X_SIZE),
    .Y_SIZE    (Y_SIZE),
    .Z_SIZE    (Z_SIZE),
    .FLIT_W    (FLIT_W),
    .BUF_DEPTH (BUF_DEPTH)
  ) u_noc (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %0t (depth %0d): %s", $time, BUF_DEPTH, what);
    end
  endtask

  function automatic logic [FLIT_W-1:0] addr_of(int n);
    return {4'h0, 4'(n % X_SIZE), 4'((n / X_SIZE) % Y_SIZE), 4'(n / (X_SIZE * Y_SIZE))};
  endfunction

  typedef logic [FLIT_W-1:0] flit_q_t [$];
  typedef struct {
    int      planned;
    int      len;
    int      dest;
    int      tag;
  } pkt_t;

  pkt_t    txq [NR][$];
  int      txpos [NR];
  int      inj_time [int];
  int      plan_time [int];
  int      exp_dest [int];
  int      exp_len [int];
  flit_q_t rxbuf [NR];
  int      outstanding = 0, seq = 0;
  longint  sum_noc, sum_app, flits_rx;
  int      n_lat, first_inj, first_plan, last_rx;

  // payload flit k of a packet is a function of its tag, so the sink can
  // check it without storing the packet
  function automatic logic [FLIT_W-1:0] flit_of(int tag, int k);
    return FLIT_W'(tag * 7 + k * 13 + 5);
  endfunction

  // flit k of the packet at the head of source n's queue
  function automatic logic [FLIT_W-1:0] tx_flit(int n, int k);
    if (k == 0) return addr_of(txq[n][0].dest);
    if (k == 1) return FLIT_W'(txq[n][0].len - 2);
    if (k == 2) return FLIT_W'(txq[n][0].tag);
    return flit_of(txq[n][0].tag, k);
  endfunction

  task automatic add_packet(int s, int d, int len, int planned);
    pkt_t p;
    p.planned = planned;
    p.len     = len;
    p.dest    = d;
    p.tag     = seq;
    plan_time[seq] = planned;
    exp_dest[seq]  = d;
    exp_len[seq]   = len;
    seq = (seq + 1) % 65536;
    txq[s].push_back(p);
    outstanding++;
  endtask

  always @(negedge clk) begin
    if (rst) begin
      local_rx = '0; local_data_in = '0; local_credit_i = '1;
    end else begin
      for (int n = 0; n < NR; n++) begin
        local_rx[n] = 1'b0;
        if (txq[n].size() > 0 && (txpos[n] > 0 || txq[n][0].planned <= cycle) && local_credit_o[n]) begin
          local_rx[n]      = 1'b1;
          local_data_in[n] = tx_flit(n, txpos[n]);
          if (txpos[n] == 0) begin
            inj_time[txq[n][0].tag] = cycle;
            if (first_inj < 0) first_inj = cycle;
          end
          txpos[n]++;
          if (txpos[n] == txq[n][0].len) begin
            void'(txq[n].pop_front());
            txpos[n] = 0;
          end
        end
      end
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      for (int n = 0; n < NR; n++) begin
        if (local_tx[n]) begin
          rxbuf[n].push_back(local_data_out[n]);
          flits_rx++;
          if (rxbuf[n].size() >= 3 && rxbuf[n].size() == int'(rxbuf[n][1]) + 2) begin
            int t;
            bit ok;
            t  = int'(rxbuf[n][2]);
            ok = exp_dest.exists(t) && exp_dest[t] == n && exp_len[t] == rxbuf[n].size()
                 && rxbuf[n][0] == addr_of(n);
            for (int k = 3; k < rxbuf[n].size(); k++) ok &= (rxbuf[n][k] == flit_of(t, k));
            check(ok, "packet delivered intact to its destination");
            if (exp_dest.exists(t)) begin
              sum_noc += longint'(cycle - inj_time[t]);
              sum_app += longint'(cycle - plan_time[t]);
              n_lat++;
              exp_dest.delete(t);
            end
            last_rx = cycle;
            rxbuf[n] = {};
            outstanding--;
          end
        end
      end
    end
  end

  initial begin
    for (int n = 0; n < NR; n++) txpos[n] = 0;
  end

  // Queue one pattern with packets of `len` flits (len >= 3), `rounds`
  // packets per source for complement, run it to the end and report.
  task automatic run_workload(bit all_to_all, int len, int rounds, int limit,
                              output real noc_lat, output real app_lat,
                              output real noc_thr, output real app_thr);
    int t0;
    sum_noc = 0; sum_app = 0; flits_rx = 0; n_lat = 0;
    first_inj = -1; last_rx = 0;
    @(negedge clk);
    t0 = cycle + 1;
    first_plan = t0;
    if (!all_to_all) begin
      for (int k = 0; k < rounds; k++)
        for (int n = 0; n < NR; n++)
          if (NR - 1 - n != n) add_packet(n, NR - 1 - n, len, t0 + 2 * len * k);
    end else begin
      for (int r = 0; r < NR; r++)
        for (int n = 0; n < NR; n++)
          if (n != r) add_packet(n, r, len, t0 + 2 * len * r);
    end
    while (outstanding > 0 && cycle - t0 < limit) @(posedge clk);
    check(outstanding == 0, $sformatf("all packets delivered (%0d left)", outstanding));
    noc_lat = (n_lat > 0) ? real'(sum_noc) / n_lat : 0.0;
    app_lat = (n_lat > 0) ? real'(sum_app) / n_lat : 0.0;
    noc_thr = real'(flits_rx) / real'(last_rx - first_inj + 1);
    app_thr = real'(flits_rx) / real'(last_rx - first_plan + 1);
    $display("%-10s depth=%4d len=%4d packets=%5d  NoC lat=%8.1f  App lat=%8.1f  NoC thr=%6.2f  App thr=%6.2f flits/cycle",
             all_to_all ? "all-to-all" : "complement", BUF_DEPTH, len, n_lat, noc_lat, app_lat, noc_thr, app_thr);
  endtask

endmodule
