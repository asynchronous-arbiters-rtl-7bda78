// Linear priority network.
//
// Port 1 (index 0) has the highest priority, port N the lowest.  PRI_i,
// the signal that clears ACT_i, is the OR of all ACT_j with j < i, so any
// active port forces off every port below it.  PRI of port 1 is
// constant 0 and ACT of port N is not used.
//
// Purely combinational and without memory, so, as the design notes, PRI
// need not be gated by DECIDE.  The network follows the design exactly;
// it is built here as a prefix-OR chain.
module prio_linear #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] act,
  output logic [N-1:0] pri
);

  always_comb begin
    logic above;   // OR of ACT of all ports before the current one
    above = 1'b0;
    for (int i = 0; i < N; i++) begin
      pri[i] = above;
      above  = above | act[i];
    end
  end

endmodule
