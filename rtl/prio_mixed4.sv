// Mixed priority network for four ports.
//
// Port 1 has precedence over all others, port 2 over ports 3 and 4, and
// ports 3 and 4 alternate.  This suits a memory shared by a drum (port 1,
// cannot wait), a data channel (port 2) and two instruction processors
// (ports 3 and 4, which may wait but must not starve each other).
//   PRI_1 = 0
//   PRI_2 = ACT_1
//   PRI_3 = ACT_1 | ACT_2 | (DECIDE & ACT_4 &  last3)
//   PRI_4 = ACT_1 | ACT_2 | (DECIDE & ACT_3 & ~last3)
// last3 is a one-bit flip-flop loaded with ACT_3 at the trailing edge of
// DECIDE, so it records whether port 3 was served on the last cycle.
//
// The terms for ports 1 and 2, the flip-flop's data (ACT_3) and its
// trailing-edge clocking follow the design.  Which flip-flop output gates
// which of PRI_3 / PRI_4 is this design's reading, chosen so that 3 and 4
// alternate.  A consequence of loading ACT_3: after port 1 or 2 has been
// served, port 3 is favoured over port 4.  last3 resets to 0.
module prio_mixed4 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] act,
  input  logic       decide,
  output logic [3:0] pri,
  output logic       last3
);

  logic decide_q;

  assign pri[0] = 1'b0;
  assign pri[1] = act[0];
  assign pri[2] = act[0] | act[1] | (decide & act[3] &  last3);
  assign pri[3] = act[0] | act[1] | (decide & act[2] & ~last3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decide_q <= 1'b0;
      last3    <= 1'b0;
    end else begin
      decide_q <= decide;
      if (decide_q && !decide) last3 <= act[2];
    end
  end

endmodule
