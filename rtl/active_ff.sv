// ACTIVE flip-flop of one port, with its gating: the inner half of the
// port logic.
//
// ACT_j says that port j is requesting the server or being served.
//   set   : R'_j & AWAIT            (a request while the arbiter awaits one)
//   clear : PRI_j                   (a port of higher priority is chosen)
//         | ~R'_j & ~A'_j           (the port's inner handshake is idle)
//   A'_j  = ACT_j & ACK             (server acknowledge steered to this port)
//   R''_j = R'_j & ACT_j            (server is cycling for this port and the
//                                    reset request has not arrived yet)
// ACT_j stays set after R''_j falls, so that the falling A_0 still reaches
// this port; it is cleared once A'_j has fallen.
//
// The equations follow the ACTIVE flip-flop circuit of the design.  This
// design's own choices: the cross-coupled latch is a clocked register
// (ACT_j changes at the clock edge after its set or clear condition), and
// clear wins when set and clear coincide.  Reset clears ACT_j.
module active_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic r_inner,   // R'_j
  input  logic await_i,   // AWAIT
  input  logic pri,       // PRI_j
  input  logic ack,       // ACK (= A_0)
  output logic act,       // ACT_j
  output logic a_inner,   // A'_j
  output logic r_dd       // R''_j
);

  logic set_c, clr_c;

  assign a_inner = act & ack;
  assign r_dd    = r_inner & act;
  assign set_c   = r_inner & await_i;
  assign clr_c   = pri | (~r_inner & ~a_inner);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     act <= 1'b0;
    else if (clr_c) act <= 1'b0;
    else if (set_c) act <= 1'b1;
  end

endmodule
