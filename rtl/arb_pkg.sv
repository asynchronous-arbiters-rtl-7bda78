// Shared definitions for the request/acknowledge arbiters.
//
// prio_rule_e selects the priority network placed inside the generic
// N-port arbiter:
//   PRIO_LINEAR - fixed order, port 1 (index 0) highest, no memory.
//   PRIO_RING   - round robin; a register remembers the last port served.
//   PRIO_MIXED  - four ports only: port 1 over all, port 2 over ports 3
//                 and 4, ports 3 and 4 alternate.
//   PRIO_RATIO  - three ports only: keeps the service ratio of ports
//                 1:2:3 near 3:2:1 from a history of the last six cycles.
// Port j of the description is index j-1 in every vector of this design.
package arb_pkg;

  typedef enum logic [1:0] {
    PRIO_LINEAR = 2'd0,
    PRIO_RING   = 2'd1,
    PRIO_MIXED  = 2'd2,
    PRIO_RATIO  = 2'd3
  } prio_rule_e;

endpackage
