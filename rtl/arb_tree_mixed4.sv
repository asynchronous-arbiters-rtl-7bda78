// Four-port arbiter tree approximating the mixed priority rule.
//
// A chain of three two-input arbiters: ports 3 and 4 share a ring arbiter
// (they alternate); its server handshake and port 2 feed a second arbiter;
// that one's server handshake and port 1 feed the root.  The tree shape
// follows the design.  Which rule the two upper arbiters use is this
// design's choice: linear, with the directly attached port (1, then 2)
// winning a tie, which gives port 1 precedence over all, port 2 over 3
// and 4, and 3 and 4 alternating.  It differs from the single mixed
// network in that a decision at one level is taken before requests at the
// levels above are known.  Interface and timing: see arbiter.
module arb_tree_mixed4
  import arb_pkg::*;
#(
  parameter int unsigned DECIDE_CYCLES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] req,
  output logic [3:0] ack,
  output logic       r0,
  input  logic       a0
);

  logic r34, a34, r234, a234;

  arbiter2 #(.DECIDE_CYCLES(DECIDE_CYCLES)) u_arb34 (
    .clk(clk), .rst_n(rst_n), .req(req[3:2]), .ack(ack[3:2]), .r0(r34), .a0(a34)
  );
  arbiter #(.N(2), .RULE(PRIO_LINEAR), .DECIDE_CYCLES(DECIDE_CYCLES)) u_arb234 (
    .clk(clk), .rst_n(rst_n), .req({r34, req[1]}), .ack({a34, ack[1]}), .r0(r234), .a0(a234)
  );
  arbiter #(.N(2), .RULE(PRIO_LINEAR), .DECIDE_CYCLES(DECIDE_CYCLES)) u_root (
    .clk(clk), .rst_n(rst_n), .req({r234, req[0]}), .ack({a234, ack[0]}), .r0(r0), .a0(a0)
  );

endmodule
