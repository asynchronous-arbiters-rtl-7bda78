// Four-phase server used by the testbenches (the shared memory or
// multiplier).  It answers a request on r0 with a0 after LAT cycles and
// lowers a0 LAT cycles after r0 falls.  It counts service cycles and
// errors: a request withdrawn before it was acknowledged.
module hs_server #(
  parameter int unsigned LAT = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic r0,
  output logic a0,
  output int   cycles,
  output int   errors
);

  int unsigned cnt;
  logic r0_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a0 <= 1'b0; cycles <= 0; errors <= 0; cnt <= 0; r0_q <= 1'b0;
    end else begin
      r0_q <= r0;
      if (r0_q && !r0 && !a0) errors <= errors + 1;
      if (r0 != a0) begin
        if (cnt + 1 >= LAT) begin
          a0  <= r0;
          cnt <= 0;
          if (r0) cycles <= cycles + 1;
        end else begin
          cnt <= cnt + 1;
        end
      end else begin
        cnt <= 0;
      end
    end
  end

endmodule
