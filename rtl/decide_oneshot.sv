// DECIDE one-shot.
//
// A trigger pulse starts DECIDE, which then stays true for DECIDE_CYCLES
// clock cycles and falls by itself.  Its rising edge is the moment the
// requests are frozen; its falling edge is the moment the priority
// decision is taken and the ring memory is updated.
//
// The design uses a one-shot whose pulse must outlast the settling of the
// priority network.  Here the pulse is counted in clock cycles; the
// default of 2 is this design's choice: one cycle for the priority clears
// to reach the ACT flip-flops and one cycle with the winner settled.
// A trigger during the pulse is ignored.
//
// Timing: trigger high at edge k -> DECIDE high from edge k to edge
// k + DECIDE_CYCLES.
module decide_oneshot #(
  parameter int unsigned DECIDE_CYCLES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trigger,
  output logic decide
);

  localparam int unsigned CW = (DECIDE_CYCLES > 1) ? $clog2(DECIDE_CYCLES) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decide <= 1'b0;
      cnt    <= '0;
    end else if (!decide) begin
      if (trigger) begin
        decide <= 1'b1;
        cnt    <= CW'(DECIDE_CYCLES - 1);
      end
    end else if (cnt == '0) begin
      decide <= 1'b0;
    end else begin
      cnt <= cnt - 1'b1;
    end
  end

  initial begin
    assert (DECIDE_CYCLES >= 1)
      else $error("decide_oneshot: DECIDE_CYCLES must be at least 1");
  end

endmodule
