// tb_lasio_workloads: the traffic experiments run on the 4x4x4 Lasio NoC.
//
// Two copies of the 4x4x4 NoC, one with 4-flit and one with 128-flit input
// buffers, run the same list of workloads side by side:
//   all-to-all with packets of 5, 8, 16, 32, 64, 256 and 1024 flits
//   complement with 8-flit packets (8 packets per router)
// Sources plan one packet every 2*len cycles (half the link rate). For
// every run the harness checks each delivered packet and reports average
// network and application latency and network and application throughput.
// This testbench checks delivery, that application latency is never below
// network latency, and that the deeper buffers lower the application
// latency of the 5-flit all-to-all run (packets wait less at the source).
module tb_lasio_workloads;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  lasio_noc_harness #(.BUF_DEPTH(4))   h_small (.clk(clk), .rst(rst));
  lasio_noc_harness #(.BUF_DEPTH(128)) h_large (.clk(clk), .rst(rst));

  int checks = 0, failures = 0;
  real app5 [2];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int NLEN = 7;
  int lens [NLEN] = '{5, 8, 16, 32, 64, 256, 1024};

  initial begin
    real nl, al, nt, at;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    fork
      begin
        for (int i = 0; i < NLEN; i++) begin
          h_small.run_workload(1'b1, lens[i], 1, 2000000, nl, al, nt, at);
          check(al >= nl, "small buffers: App latency >= NoC latency");
          if (i == 0) app5[0] = al;
        end
        h_small.run_workload(1'b0, 8, 8, 200000, nl, al, nt, at);
        check(al >= nl, "small buffers: App latency >= NoC latency (complement)");
      end
      begin
        for (int i = 0; i < NLEN; i++) begin
          h_large.run_workload(1'b1, lens[i], 1, 2000000, nl, al, nt, at);
          check(al >= nl, "large buffers: App latency >= NoC latency");
          if (i == 0) app5[1] = al;
        end
        h_large.run_workload(1'b0, 8, 8, 200000, nl, al, nt, at);
        check(al >= nl, "large buffers: App latency >= NoC latency (complement)");
      end
    join
    check(app5[1] < app5[0], "128-flit buffers lower the App latency of 5-flit all-to-all");
    checks   += h_small.checks + h_large.checks;
    failures += h_small.failures + h_large.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
