// Port buffer: the outer half of one port's logic.
//
// The outside world talks to the arbiter with a four-phase handshake on
// R_j / A_j (request up, acknowledge up, request down, acknowledge down).
// The buffer hands the request inward as R'_j and receives the inner
// acknowledge A'_j.  As soon as A'_j rises, A_j is raised to the port and
// R'_j is dropped, so the inner logic and the server start their reset
// while the port is still being asked to lower R_j.  A_j then stays high
// until both R_j and A'_j are low; this also keeps a request that is still
// high from starting a second service cycle.
//
//   A_j  = A'_j | (R_j & A_j)        (hold loop, a register here)
//   R'_j = R_j & ~A_j
//
// Timing: the gate equations follow the buffer circuit of the design; in
// this clocked rendition the hold loop is a flip-flop, so A_j rises one
// clock after A'_j and falls one clock after both R_j and A'_j are low.
// R'_j is combinational from R_j and that flip-flop.  Reset clears A_j
// (reset behaviour is this design's choice).
module port_buffer (
  input  logic clk,
  input  logic rst_n,
  input  logic r_j,      // R_j  from the port
  input  logic a_inner,  // A'_j from the ACTIVE logic
  output logic a_j,      // A_j  to the port
  output logic r_inner   // R'_j to the ACTIVE logic
);

  logic a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_q <= 1'b0;
    else        a_q <= a_inner | (r_j & a_q);
  end

  assign a_j     = a_q;
  assign r_inner = r_j & ~a_q;

endmodule
