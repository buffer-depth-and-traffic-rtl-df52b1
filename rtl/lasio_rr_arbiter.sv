// lasio_rr_arbiter: round-robin arbiter over the router's input ports.
//
// The router's control logic serves one routing request at a time. This
// arbiter picks which requesting input port is served next with a rotating
// priority: the search starts at the port after the one chosen last, so a
// port that keeps requesting is reached after at most N-1 others and no
// request starves.
//
// Interface: req has one bit per port. grant_valid/grant_idx are
// combinational from req and the priority pointer. When update is high and
// grant_valid is high, the pointer moves to grant_idx at the next clock
// edge. After reset the search starts at port 0.
//
// The rotating policy follows the document; the pointer update rule (move
// on every decision, granted or not) is this design's choice, so that a
// request whose output port is busy does not hold back the other ports.
module lasio_rr_arbiter #(
  parameter int unsigned N = 7
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         req,
  input  logic                 update,
  output logic                 grant_valid,
  output logic [$clog2(N)-1:0] grant_idx
);

  localparam int unsigned IDX_W = $clog2(N);

  logic [IDX_W-1:0] last;

  always_comb begin
    int unsigned cand;
    grant_valid = 1'b0;
    grant_idx   = '0;
    // scan N positions starting just after `last`; the first hit wins
    for (int unsigned k = 1; k <= N; k++) begin
      cand = (int'(last) + k) % N;
      if (!grant_valid && req[cand]) begin
        grant_valid = 1'b1;
        grant_idx   = IDX_W'(cand);
      end
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                        last <= IDX_W'(N - 1);
    else if (update && grant_valid) last <= grant_idx;
  end

endmodule
