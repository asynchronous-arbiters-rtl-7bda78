// Ring (round-robin) priority network.
//
// A binary register CT holds the index of the last port served, which is
// the lowest-priority port for the next decision; the next port around
// the ring has the highest priority.  During DECIDE the network is a
// linear chain starting at port CT+1 and wrapping round to port CT:
//   PRI_i = DECIDE & OR{ ACT_j : j comes before i in that order }.
// The PRI outputs are gated with DECIDE because the network has memory:
// priority is resolved on the current CT, and CT is loaded with the
// encoded number of the one remaining ACT at the trailing edge of DECIDE.
//
// Follows the design's binary-coded ring network (decoder, chain, encoder,
// CT register).  This design's own choices: CT resets to N-1, so port 1
// (index 0) is first in line after reset, as in the linear network; the
// trailing edge of DECIDE is detected with a delayed copy, so CT changes
// at the clock edge that ends the first cycle after DECIDE, when exactly
// one ACT is left; CT keeps its value if no ACT is set then.
module prio_ring #(
  parameter int unsigned N  = 4,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  act,
  input  logic          decide,
  output logic [N-1:0]  pri,
  output logic [CW-1:0] ct
);

  logic decide_q;

  // Chain evaluated on the doubled vector, starting just after CT.
  always_comb begin
    logic seen;
    int   idx;
    pri  = '0;
    seen = 1'b0;
    for (int k = 1; k <= N; k++) begin
      idx = (int'(ct) + k) % N;
      pri[idx] = decide & seen;
      seen     = seen | act[idx];
    end
  end

  // Encoder: index of the (single) remaining ACT.
  function automatic logic [CW-1:0] encode(input logic [N-1:0] v);
    logic [CW-1:0] r;
    r = '0;
    for (int i = 0; i < N; i++) if (v[i]) r = CW'(i);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decide_q <= 1'b0;
      ct       <= CW'(N - 1);
    end else begin
      decide_q <= decide;
      if (decide_q && !decide && (act != '0)) ct <= encode(act);
    end
  end

endmodule
