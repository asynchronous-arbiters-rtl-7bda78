// Four-phase requester used by the testbenches (a processor, channel or
// drum as seen from the arbiter).
//
// While enable is high it repeatedly: waits GAP cycles (random in
// 0..MAX_GAP), raises req, waits for ack, keeps req high for a random
// 0..MAX_HOLD cycles, drops req and waits for ack to fall.  With
// MAX_GAP = 0 the port is fully loaded.  It counts completed services and
// protocol errors (ack rising with no request, ack falling while the
// request is still up).
module hs_client #(
  parameter int unsigned MAX_GAP  = 0,
  parameter int unsigned MAX_HOLD = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic ack,
  output logic req,
  output int   served,
  output int   errors
);

  typedef enum logic [1:0] {C_GAP, C_REQ, C_HOLD, C_DROP} cstate_e;
  cstate_e st;
  int unsigned wait_c;
  logic ack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_GAP; req <= 1'b0; served <= 0; errors <= 0; ack_q <= 1'b0;
      wait_c <= 0;
    end else begin
      ack_q <= ack;
      if (ack && !ack_q && !req) errors <= errors + 1;
      if (!ack && ack_q && req)  errors <= errors + 1;
      case (st)
        C_GAP:  if (enable) begin
                  if (wait_c == 0) begin req <= 1'b1; st <= C_REQ; end
                  else wait_c <= wait_c - 1;
                end
        C_REQ:  if (ack) begin
                  served <= served + 1;
                  wait_c <= (MAX_HOLD == 0) ? 0 : $urandom_range(MAX_HOLD, 0);
                  st     <= C_HOLD;
                end
        C_HOLD: if (wait_c == 0) begin req <= 1'b0; st <= C_DROP; end
                else wait_c <= wait_c - 1;
        C_DROP: if (!ack) begin
                  wait_c <= (MAX_GAP == 0) ? 0 : $urandom_range(MAX_GAP, 0);
                  st     <= C_GAP;
                end
      endcase
    end
  end

endmodule
