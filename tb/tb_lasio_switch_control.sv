// tb_lasio_switch_control: self-checking test of the router control logic.
//
// The control logic of router 121 (x=1, y=2, z=1) is driven by seven
// stand-in input buffers.
//   1. Directed: the two connections of the switching-table example are
//      made (West -> North, then North -> Top) and the available/in/out
//      vectors are compared with the expected table. A lone request must be
//      acknowledged exactly four cycles after it is first seen. A third
//      request for the busy North output must wait, and be served after
//      the West packet ends.
//   2. Random: each stand-in buffer requests with a random target, holds
//      its connection (sender high) for a random time after the acknowledge
//      and then releases it. Every acknowledge is checked against XYZ
//      routing, against the outputs held by other inputs, and against the
//      table contents one cycle later; released outputs must become
//      available again two cycles later at the latest.
module tb_lasio_switch_control;
  import lasio_pkg::*;

  localparam int unsigned FLIT_W = 16;
  localparam int MX = 1, MY = 2, MZ = 1;

  logic clk = 1'b0;
  logic rst;
  logic [NPORTS-1:0]             req, sender, ack_h, available, in_valid;
  logic [NPORTS-1:0][FLIT_W-1:0] header;
  port_e                         in_tbl  [NPORTS];
  port_e                         out_tbl [NPORTS];

  int checks = 0, failures = 0;

  lasio_switch_control #(.FLIT_W(FLIT_W), .MY_X(MX), .MY_Y(MY), .MY_Z(MZ)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic port_e xyz(logic [FLIT_W-1:0] hd);
    int tx = int'(hd[11:8]), ty = int'(hd[7:4]), tz = int'(hd[3:0]);
    if (tx != MX) return (tx > MX) ? P_EAST : P_WEST;
    if (ty != MY) return (ty > MY) ? P_NORTH : P_SOUTH;
    if (tz != MZ) return (tz > MZ) ? P_TOP : P_BOTTOM;
    return P_LOCAL;
  endfunction

  // wait for ack_h[p]; returns the number of cycles from the request
  task automatic wait_ack(int p, output int cycles);
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
    end while (!ack_h[p] && cycles < 200);
  endtask

  // random phase state
  int   hold   [NPORTS];
  int   idle   [NPORTS];
  int   wanted [NPORTS];
  int   holder [NPORTS];   // input holding each output, -1 if none
  int   freed_at [NPORTS];
  int   grants = 0, refusals = 0, cyc = 0;
  bit   random_phase = 0;
  port_e e, pend_out;
  int    pend = -1;

  initial begin
    int c;
    rst = 1'b1; req = '0; sender = '0; header = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    @(negedge clk);

    // West input, packet for 131 -> North
    header[P_WEST] = 16'h0131;
    req[P_WEST]    = 1'b1;
    wait_ack(P_WEST, c);
    check(c == 4, $sformatf("lone request acknowledged after 4 cycles (got %0d)", c));
    @(negedge clk) req[P_WEST] = 1'b0; sender[P_WEST] = 1'b1;

    // North input, packet for 122 -> Top
    header[P_NORTH] = 16'h0122;
    req[P_NORTH]    = 1'b1;
    wait_ack(P_NORTH, c);
    check(c == 4, "second request acknowledged after 4 cycles");
    @(negedge clk) req[P_NORTH] = 1'b0; sender[P_NORTH] = 1'b1;

    // the switching table of the example
    check(available == 7'b0111011, "available: North and Top busy");
    check(in_valid  == 7'b0000110, "in entries valid for West and North");
    check(in_tbl[P_WEST] == P_NORTH, "in[West] = North");
    check(in_tbl[P_NORTH] == P_TOP, "in[North] = Top");
    check(out_tbl[P_NORTH] == P_WEST, "out[North] = West");
    check(out_tbl[P_TOP] == P_NORTH, "out[Top] = North");

    // Local input wants North too: it must wait
    header[P_LOCAL] = 16'h0131;
    req[P_LOCAL]    = 1'b1;
    repeat (20) begin
      @(posedge clk);
      check(!ack_h[P_LOCAL], "no grant to a busy output");
    end
    @(negedge clk) sender[P_WEST] = 1'b0;      // West packet ends
    @(posedge clk);
    @(negedge clk);
    check(available[P_NORTH], "North freed the cycle after sender drops");
    check(!in_valid[P_WEST], "in[West] cleared");
    wait_ack(P_LOCAL, c);
    check(c <= 10, "waiting request served once the output is free");
    @(negedge clk) req[P_LOCAL] = 1'b0; sender[P_LOCAL] = 1'b1;
    @(negedge clk);
    check(out_tbl[P_NORTH] == P_LOCAL && !available[P_NORTH], "out[North] = Local");
    sender = '0;
    repeat (3) @(negedge clk);
    check(available == '1, "all outputs free again");

    // random phase
    for (int p = 0; p < NPORTS; p++) begin
      hold[p] = 0; idle[p] = $urandom_range(0, 5); wanted[p] = -1;
      holder[p] = -1; freed_at[p] = -10;
    end
    random_phase = 1;
    repeat (20000) @(posedge clk);
    random_phase = 0;
    // drain
    req = '0;
    repeat (200) @(posedge clk);
    check(grants > 1000, $sformatf("enough grants in random phase (%0d)", grants));
    check(refusals > 0, "a request met a busy output");
    $display("grants=%0d blocked_cycles=%0d", grants, refusals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random stand-in buffers: decide at negedge, model the coming edge
  always @(negedge clk) begin
    if (random_phase) begin
      cyc++;
      // table contents one cycle after each acknowledge
      if (pend >= 0) begin
        check(in_valid[pend] && in_tbl[pend] == pend_out, "in entry = XYZ output");
        check(out_tbl[pend_out] == port_e'(pend) && !available[pend_out], "out entry = input, output busy");
        pend = -1;
      end
      check($countones(ack_h) <= 1, "one acknowledge at a time");
      for (int p = 0; p < NPORTS; p++)
        if (ack_h[p]) begin
          check(req[p], "acknowledge only to a requesting port");
          pend     = p;
          pend_out = xyz(header[p]);
        end
      for (int p = 0; p < NPORTS; p++) begin
        // outputs held must show busy with the right owner
        if (holder[p] >= 0) begin
          check(!available[p] && out_tbl[p] == port_e'(holder[p]), "held output busy with right owner");
        end else if (cyc - freed_at[p] >= 2) begin
          check(available[p], "unheld output available");
        end
      end
      for (int p = 0; p < NPORTS; p++) begin
        if (sender[p]) begin
          if (hold[p] == 0) begin
            sender[p] = 1'b0;
            for (int o = 0; o < NPORTS; o++)
              if (holder[o] == p) begin holder[o] = -1; freed_at[o] = cyc; end
            idle[p] = $urandom_range(0, 6);
          end else hold[p]--;
        end else if (req[p]) begin
          if (ack_h[p]) begin
            e = xyz(header[p]);
            grants++;
            check(holder[e] < 0, "acknowledge only for a free output");
            holder[e] = p;
            req[p]    = 1'b0;
            sender[p] = 1'b1;
            hold[p]   = $urandom_range(0, 25);
          end else begin
            for (int o = 0; o < NPORTS; o++)
              if (holder[o] >= 0 && o == int'(xyz(header[p]))) refusals++;
          end
        end else if (idle[p] == 0) begin
          // a new packet: any router of a 4x4x4 mesh
          header[p] = {4'($urandom), 4'($urandom_range(0, 3)), 4'($urandom_range(0, 3)), 4'($urandom_range(0, 3))};
          req[p]    = 1'b1;
        end else idle[p]--;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
