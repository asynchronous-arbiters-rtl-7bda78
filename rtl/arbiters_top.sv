// Arbiters for a small multiprocessor, side by side.
//
// The example system has two instruction processors, a data channel and a
// drum sharing one memory, and the two processors sharing a multiplier.
//   mem_*   : four-port mixed-priority memory arbiter
//             (1 drum, 2 data channel, 3 and 4 processors)
//   mul_*   : two-input ring arbiter in front of the multiplier
//             (1 and 2 the processors)
// Also brought out, each with its own ports, are the other arbiter forms:
//   ring_*  : N-port round-robin arbiter
//   lin_*   : N-port linear-priority arbiter
//   tree_*  : four-port tree of two-input ring arbiters
//   treem_* : four-port tree approximating the mixed rule
//   rat_*   : three-port arbiter keeping service ratios near 3:2:1
// Every handshake is four-phase: request up, acknowledge up, request
// down, acknowledge down.  The processors, channel, drum, memory and
// multiplier are outside this design.  All signals are synchronous to clk;
// rst_n is an asynchronous active-low reset.  The memory and multiplier
// arbiters and their priority rules follow the example system; gathering
// all the arbiter forms into one top, and the default N = 4, are this
// design's choices.
module arbiters_top
  import arb_pkg::*;
#(
  parameter int unsigned N             = 4,
  parameter int unsigned DECIDE_CYCLES = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  // memory arbiter
  input  logic [3:0]   mem_req,
  output logic [3:0]   mem_ack,
  output logic         mem_r0,
  input  logic         mem_a0,
  // multiplier arbiter
  input  logic [1:0]   mul_req,
  output logic [1:0]   mul_ack,
  output logic         mul_r0,
  input  logic         mul_a0,
  // N-port ring arbiter
  input  logic [N-1:0] ring_req,
  output logic [N-1:0] ring_ack,
  output logic         ring_r0,
  input  logic         ring_a0,
  // N-port linear arbiter
  input  logic [N-1:0] lin_req,
  output logic [N-1:0] lin_ack,
  output logic         lin_r0,
  input  logic         lin_a0,
  // tree of two-input ring arbiters
  input  logic [3:0]   tree_req,
  output logic [3:0]   tree_ack,
  output logic         tree_r0,
  input  logic         tree_a0,
  // tree approximating the mixed rule
  input  logic [3:0]   treem_req,
  output logic [3:0]   treem_ack,
  output logic         treem_r0,
  input  logic         treem_a0,
  // three-port ratio arbiter
  input  logic [2:0]   rat_req,
  output logic [2:0]   rat_ack,
  output logic         rat_r0,
  input  logic         rat_a0
);

  arbiter #(.N(4), .RULE(PRIO_MIXED), .DECIDE_CYCLES(DECIDE_CYCLES)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(mem_req), .ack(mem_ack), .r0(mem_r0), .a0(mem_a0)
  );
  arbiter2 #(.DECIDE_CYCLES(DECIDE_CYCLES)) u_mul (
    .clk(clk), .rst_n(rst_n), .req(mul_req), .ack(mul_ack), .r0(mul_r0), .a0(mul_a0)
  );
  arbiter #(.N(N), .RULE(PRIO_RING), .DECIDE_CYCLES(DECIDE_CYCLES)) u_ring (
    .clk(clk), .rst_n(rst_n), .req(ring_req), .ack(ring_ack), .r0(ring_r0), .a0(ring_a0)
  );
  arbiter #(.N(N), .RULE(PRIO_LINEAR), .DECIDE_CYCLES(DECIDE_CYCLES)) u_lin (
    .clk(clk), .rst_n(rst_n), .req(lin_req), .ack(lin_ack), .r0(lin_r0), .a0(lin_a0)
  );
  arb_tree4 #(.DECIDE_CYCLES(DECIDE_CYCLES)) u_tree (
    .clk(clk), .rst_n(rst_n), .req(tree_req), .ack(tree_ack), .r0(tree_r0), .a0(tree_a0)
  );
  arb_tree_mixed4 #(.DECIDE_CYCLES(DECIDE_CYCLES)) u_treem (
    .clk(clk), .rst_n(rst_n), .req(treem_req), .ack(treem_ack), .r0(treem_r0), .a0(treem_a0)
  );

  arbiter #(.N(3), .RULE(PRIO_RATIO), .DECIDE_CYCLES(DECIDE_CYCLES)) u_rat (
    .clk(clk), .rst_n(rst_n), .req(rat_req), .ack(rat_ack), .r0(rat_r0), .a0(rat_a0)
  );

endmodule
