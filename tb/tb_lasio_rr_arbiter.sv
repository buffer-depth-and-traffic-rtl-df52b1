// tb_lasio_rr_arbiter: self-checking test of the round-robin arbiter.
//
// Drives random request vectors and random update strobes for N = 7 ports
// and compares grant_valid/grant_idx each cycle with a reference that scans
// the ports circularly from the one after the last granted port. It also
// keeps every port requesting for a stretch and checks that each one is
// granted exactly once in every N consecutive decisions (no starvation).
module tb_lasio_rr_arbiter;

  localparam int unsigned N = 7;

  logic clk = 1'b0;
  logic rst;
  logic [N-1:0] req;
  logic update, grant_valid;
  logic [$clog2(N)-1:0] grant_idx;

  int checks = 0, failures = 0;
  int last_ref;
  int served [N];

  lasio_rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic int ref_grant(logic [N-1:0] r, int last);
    for (int k = 1; k <= N; k++)
      if (r[(last + k) % N]) return (last + k) % N;
    return -1;
  endfunction

  initial begin
    int g;
    rst = 1'b1; req = '0; update = 1'b0;
    last_ref = N - 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // random phase
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req    = N'($urandom);
      update = $urandom_range(0, 1);
      #1;
      g = ref_grant(req, last_ref);
      check(grant_valid == (g >= 0), "grant_valid");
      if (g >= 0) check(int'(grant_idx) == g, "grant_idx");
      if (update && g >= 0) last_ref = g;
    end
    // fairness phase: all ports request, every cycle is a decision
    for (int p = 0; p < N; p++) served[p] = 0;
    for (int i = 0; i < 10 * N; i++) begin
      @(negedge clk);
      req = '1; update = 1'b1;
      #1;
      served[grant_idx]++;
      if ((i + 1) % N == 0)
        for (int p = 0; p < N; p++) check(served[p] == (i + 1) / N, "round-robin fairness");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
