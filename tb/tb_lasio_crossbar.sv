// tb_lasio_crossbar: self-checking test of the router crossbar.
//
// Each step builds a random partial set of input->output connections (no
// output used twice), writes it into the available/in/out vectors the way
// the switching table holds it, and drives random head flits, data_av and
// credit_i. tx, data_out and data_ack of all seven ports are compared with
// a reference computed from the connection list.
module tb_lasio_crossbar;
  import lasio_pkg::*;

  localparam int unsigned FLIT_W = 16;

  logic [NPORTS-1:0][FLIT_W-1:0] in_data, data_out;
  logic [NPORTS-1:0]             data_av, data_ack, available, in_valid, tx, credit_i;
  port_e                         in_tbl  [NPORTS];
  port_e                         out_tbl [NPORTS];

  int checks = 0, failures = 0;
  int conn [NPORTS];   // output of each input, -1 if none
  int src  [NPORTS];   // input of each output, -1 if none
  int used_links = 0;

  lasio_crossbar #(.FLIT_W(FLIT_W)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL step: %s", what);
    end
  endtask

  initial begin
    for (int step = 0; step < 3000; step++) begin
      for (int p = 0; p < NPORTS; p++) begin conn[p] = -1; src[p] = -1; end
      for (int i = 0; i < NPORTS; i++) begin
        int o;
        o = $urandom_range(0, NPORTS - 1);
        if ($urandom_range(0, 2) != 0 && src[o] < 0) begin
          conn[i] = o; src[o] = i;
        end
      end
      for (int p = 0; p < NPORTS; p++) begin
        in_data[p]   = FLIT_W'($urandom);
        data_av[p]   = 1'($urandom);
        credit_i[p]  = 1'($urandom);
        available[p] = (src[p] < 0);
        out_tbl[p]   = (src[p] < 0) ? port_e'($urandom_range(0, NPORTS - 1)) : port_e'(src[p]);
        in_valid[p]  = (conn[p] >= 0);
        in_tbl[p]    = (conn[p] >= 0) ? port_e'(conn[p]) : port_e'($urandom_range(0, NPORTS - 1));
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        if (src[o] >= 0) begin
          used_links++;
          check(tx[o] == (data_av[src[o]] && credit_i[o]), "tx of a connected output");
          check(data_out[o] == in_data[src[o]], "data of a connected output");
        end else begin
          check(tx[o] == 1'b0, "no tx on a free output");
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        if (conn[i] >= 0) check(data_ack[i] == credit_i[conn[i]], "ack of a connected input");
        else              check(data_ack[i] == 1'b0, "no ack on an unconnected input");
      end
    end
    check(used_links > 1000, "connections exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
