// Complete two-input arbiter with ring priority.
//
// Two client ports share one server; when both request at once they are
// served alternately.  The priority memory is a single flip-flop (which of
// the two ports was served last), loaded at the end of DECIDE; during
// DECIDE it clears the port that was served last if the other is also
// active.  This is the ring network with N = 2, so the block is the
// generic arbiter with N = 2 and the ring rule.  It is the building block
// of the arbiter trees.  The two-input ring arbiter and its one-bit
// memory follow the design; reusing the generic port logic and control
// for it is this design's choice.  Interface and timing: see arbiter.
module arbiter2
  import arb_pkg::*;
#(
  parameter int unsigned DECIDE_CYCLES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] req,
  output logic [1:0] ack,
  output logic       r0,
  input  logic       a0
);

  arbiter #(.N(2), .RULE(PRIO_RING), .DECIDE_CYCLES(DECIDE_CYCLES)) u_arb (
    .clk(clk), .rst_n(rst_n), .req(req), .ack(ack), .r0(r0), .a0(a0)
  );

endmodule
