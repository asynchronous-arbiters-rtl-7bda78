// Ratio priority network for three ports, with service history.
//
// Aims at service ratios port 1 : port 2 : port 3 = W1 : W2 : W3 (3:2:1)
// when all ports keep requesting.  A shift register remembers which port
// was served on each of the last HIST = W1+W2+W3 (six) cycles.  At a
// decision, the oldest entry is about to leave the window, so each port
// is scored on the newest HIST-1 entries:
//   score_k = W_k - (times port k appears there)
// and the active port with the highest score wins (lower port number on a
// tie).  Serving it moves the window's counts towards W1:W2:W3.  Like the
// ring network, PRI is gated by DECIDE and the history is updated with the
// encoded winner at the trailing edge of DECIDE.
//
// The design states only what this network must achieve (a six-cycle
// history that steers the ratios towards 3:2:1); the scoring rule, the
// tie-break and the empty history after reset (entries marked invalid)
// are this design's own choices.
module prio_ratio3 #(
  parameter int unsigned W1 = 3,
  parameter int unsigned W2 = 2,
  parameter int unsigned W3 = 1,
  localparam int unsigned HIST = W1 + W2 + W3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] act,
  input  logic       decide,
  output logic [2:0] pri
);

  typedef struct packed {
    logic       valid;
    logic [1:0] port;    // 0, 1, 2
  } hist_t;

  hist_t hist [HIST];    // hist[0] newest
  logic  decide_q;
  int    score [3];

  always_comb begin
    int cnt [3];
    cnt = '{0, 0, 0};
    for (int h = 0; h < HIST - 1; h++)
      for (int k = 0; k < 3; k++)
        if (hist[h].valid && hist[h].port == 2'(k)) cnt[k]++;
    score[0] = int'(W1) - cnt[0];
    score[1] = int'(W2) - cnt[1];
    score[2] = int'(W3) - cnt[2];
  end

  // port i is cleared when an active port j beats it
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      pri[i] = 1'b0;
      for (int j = 0; j < 3; j++)
        if (j != i && act[j] && (score[j] > score[i] || (score[j] == score[i] && j < i)))
          pri[i] = decide;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decide_q <= 1'b0;
      for (int h = 0; h < HIST; h++) hist[h] <= '0;
    end else begin
      decide_q <= decide;
      if (decide_q && !decide && (act != '0)) begin
        for (int h = HIST - 1; h > 0; h--) hist[h] <= hist[h-1];
        hist[0].valid <= 1'b1;
        hist[0].port  <= act[0] ? 2'd0 : (act[1] ? 2'd1 : 2'd2);
      end
    end
  end

endmodule
