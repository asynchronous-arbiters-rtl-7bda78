// N-port request/acknowledge arbiter.
//
// N clients share one server.  Each client port j has a four-phase
// handshake R_j / A_j; the server side has R_0 / A_0.  Any idle port may
// raise its request at any time; every request is served exactly once,
// one at a time, and the arbiter does not start on the next port until
// the server and the arbiter's state for the previous one have been fully
// reset.
//
// Structure (one instance of each per port, plus one control and one
// priority network):
//   port_buffer  R_j/A_j  <-> R'_j/A'_j
//   active_ff    ACT_j, steered acknowledge A'_j, request R''_j
//   arb_control  AWAIT, DECIDE one-shot, R_0 = OR(R''_j) & ~AWAIT & ~DECIDE
//   prio_*       PRI_j, clears all but one ACT_j during DECIDE
// RULE selects the priority network: PRIO_LINEAR (port 1 highest),
// PRIO_RING (round robin), PRIO_MIXED (N must be 4) or PRIO_RATIO (service
// ratio 3:2:1 from a six-cycle history, N must be 3).
//
// Timing, with all inputs synchronous to clk and DECIDE_CYCLES = 2:
// request at edge 0 -> ACT at edge 1 -> DECIDE over cycles 2..3 -> R_0 in
// cycle 4.  A_0 at edge t -> A_j at edge t+1, and R_0 falls with it.
// A_0 falling -> ACT_j clear one edge later -> AWAIT again one edge after.
// R_0 is combinational from R_j and arbiter state; A_j is registered.
// The clocked form, the absence of input synchronizers and the default
// sizes are this design's choices; the structure follows the design.
module arbiter
  import arb_pkg::*;
#(
  parameter int unsigned N             = 4,
  parameter prio_rule_e  RULE          = PRIO_RING,
  parameter int unsigned DECIDE_CYCLES = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,   // R_j
  output logic [N-1:0] ack,   // A_j
  output logic         r0,    // R_0 to the server
  input  logic         a0     // A_0 from the server
);

  logic [N-1:0] r_inner, a_inner, act, r_dd, pri;
  logic         await_s, decide, ack_s;

  for (genvar j = 0; j < N; j++) begin : g_port
    port_buffer u_buf (
      .clk     (clk),
      .rst_n   (rst_n),
      .r_j     (req[j]),
      .a_inner (a_inner[j]),
      .a_j     (ack[j]),
      .r_inner (r_inner[j])
    );
    active_ff u_act (
      .clk     (clk),
      .rst_n   (rst_n),
      .r_inner (r_inner[j]),
      .await_i (await_s),
      .pri     (pri[j]),
      .ack     (ack_s),
      .act     (act[j]),
      .a_inner (a_inner[j]),
      .r_dd    (r_dd[j])
    );
  end

  arb_control #(.DECIDE_CYCLES(DECIDE_CYCLES)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .act_any  (|act),
    .r_dd_any (|r_dd),
    .a0       (a0),
    .await_o  (await_s),
    .decide   (decide),
    .r0       (r0),
    .ack      (ack_s)
  );

  if (RULE == PRIO_LINEAR) begin : g_linear
    prio_linear #(.N(N)) u_prio (.act(act), .pri(pri));
  end else if (RULE == PRIO_RING) begin : g_ring
    prio_ring #(.N(N)) u_prio (
      .clk(clk), .rst_n(rst_n), .act(act), .decide(decide), .pri(pri), .ct()
    );
  end else if (RULE == PRIO_RATIO) begin : g_ratio
    if (N != 3) begin : g_bad_n
      $error("arbiter: PRIO_RATIO needs N = 3");
    end
    prio_ratio3 u_prio (
      .clk(clk), .rst_n(rst_n), .act(act[2:0]), .decide(decide), .pri(pri[2:0])
    );
  end else begin : g_mixed
    if (N != 4) begin : g_bad_n
      $error("arbiter: PRIO_MIXED needs N = 4");
    end
    prio_mixed4 u_prio (
      .clk(clk), .rst_n(rst_n), .act(act[3:0]), .decide(decide), .pri(pri[3:0]), .last3()
    );
  end

  // Once DECIDE is over and the server is being requested, exactly one
  // port is active: the acknowledge goes to one port only.
  a_one_active: assert property (@(posedge clk) disable iff (!rst_n)
    r0 |-> $onehot(act));
  // No port is active while the arbiter awaits more than one cycle.
  a_decide_one: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(decide) |-> $onehot(act));

endmodule
