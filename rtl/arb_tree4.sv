// Four-port arbiter built as a tree of three two-input ring arbiters.
//
// Ports 1 and 2 share one leaf arbiter, ports 3 and 4 the other; the two
// leaves' server handshakes (R_0 / A_0) are the two client ports of the
// root arbiter.  With all four ports requesting continuously the service
// order is 1, 3, 2, 4, 1, ...  While one leaf's client is being served,
// the other leaf runs its DECIDE, so the root always has a request waiting
// and the tree is as fast as a single four-port arbiter as long as DECIDE
// is shorter than the server's busy time.
//
// The topology follows the design.  Timing: the leaf-to-root link adds one
// clock to the acknowledge path (A_j of the root is registered).
module arb_tree4 #(
  parameter int unsigned DECIDE_CYCLES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] req,
  output logic [3:0] ack,
  output logic       r0,
  input  logic       a0
);

  logic [1:0] mid_r, mid_a;

  arbiter2 #(.DECIDE_CYCLES(DECIDE_CYCLES)) u_leaf12 (
    .clk(clk), .rst_n(rst_n), .req(req[1:0]), .ack(ack[1:0]), .r0(mid_r[0]), .a0(mid_a[0])
  );
  arbiter2 #(.DECIDE_CYCLES(DECIDE_CYCLES)) u_leaf34 (
    .clk(clk), .rst_n(rst_n), .req(req[3:2]), .ack(ack[3:2]), .r0(mid_r[1]), .a0(mid_a[1])
  );
  arbiter2 #(.DECIDE_CYCLES(DECIDE_CYCLES)) u_root (
    .clk(clk), .rst_n(rst_n), .req(mid_r), .ack(mid_a), .r0(r0), .a0(a0)
  );

endmodule
