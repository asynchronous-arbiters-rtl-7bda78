// Control section of the arbiter.
//
// Holds the AWAIT flip-flop and the DECIDE one-shot and forms the output
// request R_0.  One service cycle:
//   1. some ACT_j is set while AWAIT is true: AWAIT falls and DECIDE starts,
//      so no further ports can join;
//   2. during DECIDE the priority network clears all ACT_j but one;
//   3. when DECIDE ends, R_0 = OR(R''_j) & ~AWAIT & ~DECIDE is raised;
//   4. A_0 from the server is passed to the ports as ACK;
//   5. once every ACT_j is clear again, AWAIT is set.
// The sequence follows the design; the clocked form (AWAIT is a register
// that changes one clock after its condition) is this design's choice.
//
// Timing: act_any at edge k -> AWAIT low and DECIDE high from edge k+1;
// R_0 may rise in the cycle after the last DECIDE cycle.  R_0 is
// combinational from r_dd_any and the two registers.
module arb_control #(
  parameter int unsigned DECIDE_CYCLES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic act_any,    // OR of ACT_j
  input  logic r_dd_any,   // OR of R''_j
  input  logic a0,         // A_0 from the server
  output logic await_o,    // AWAIT
  output logic decide,     // DECIDE
  output logic r0,         // R_0 to the server
  output logic ack         // ACK to the port logic
);

  logic trigger;

  assign trigger = await_o & act_any;

  decide_oneshot #(.DECIDE_CYCLES(DECIDE_CYCLES)) u_oneshot (
    .clk     (clk),
    .rst_n   (rst_n),
    .trigger (trigger),
    .decide  (decide)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            await_o <= 1'b1;
    else if (trigger)                      await_o <= 1'b0;
    else if (!await_o && !decide && !act_any) await_o <= 1'b1;
  end

  assign r0  = r_dd_any & ~await_o & ~decide;
  assign ack = a0;

  // The server must not acknowledge a request that was never made.
  a_ack_after_req: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(a0) |-> (r0 || $past(r0)));

endmodule
