// Testbench for arbiter: three four-port instances side by side, with
// linear, ring and mixed priority, each driven by four clients and one
// server model.
//   1. Latency: a lone request reaches R_0 DECIDE_CYCLES + 2 clocks later (one to set ACT, one to drop AWAIT and start DECIDE, then DECIDE itself).
//   2. Simultaneous requests on all ports, once each: the service order
//      must follow each rule (1,2,3,4 for all three from reset).
//   3. Ring, all ports fully loaded: round robin 1,2,3,4,1,...
//   4. Mixed, ports 3 and 4 fully loaded: they alternate.
//   5. Random traffic on all ports: every request is served exactly once,
//      one server cycle per request, no handshake errors.
module tb_arbiter;
  import arb_pkg::*;

  localparam int N = 4;
  localparam int NA = 3;      // 0 linear, 1 ring, 2 mixed
  localparam int DC = 2;      // DECIDE_CYCLES

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req [NA], ack [NA], dreq [NA], creq [NA];
  logic         r0 [NA], a0 [NA];
  logic         soak = 1'b0, cen = 1'b0;
  int           scycles [NA], serr [NA];
  int           served [NA][N], cerr [NA][N];
  int checks = 0, failures = 0;

  arbiter #(.N(N), .RULE(PRIO_LINEAR)) u_lin (.clk, .rst_n, .req(req[0]), .ack(ack[0]), .r0(r0[0]), .a0(a0[0]));
  arbiter #(.N(N), .RULE(PRIO_RING))   u_rng (.clk, .rst_n, .req(req[1]), .ack(ack[1]), .r0(r0[1]), .a0(a0[1]));
  arbiter #(.N(N), .RULE(PRIO_MIXED))  u_mix (.clk, .rst_n, .req(req[2]), .ack(ack[2]), .r0(r0[2]), .a0(a0[2]));

  for (genvar a = 0; a < NA; a++) begin : g_env
    hs_server #(.LAT(3)) u_srv (.clk, .rst_n, .r0(r0[a]), .a0(a0[a]), .cycles(scycles[a]), .errors(serr[a]));
    for (genvar j = 0; j < N; j++) begin : g_cl
      hs_client #(.MAX_GAP(12), .MAX_HOLD(4)) u_cl (
        .clk, .rst_n, .enable(cen), .ack(ack[a][j] & soak), .req(creq[a][j]),
        .served(served[a][j]), .errors(cerr[a][j]));
    end
    assign req[a] = soak ? creq[a] : dreq[a];
  end

  // service order seen at the ports
  int order [NA][$];
  int nack [NA] = '{0, 0, 0};
  logic [N-1:0] ack_q [NA];
  always_ff @(posedge clk) begin
    if (rst_n) for (int a = 0; a < NA; a++) begin
      ack_q[a] <= ack[a];
      for (int j = 0; j < N; j++)
        if (ack[a][j] && !ack_q[a][j]) begin
          order[a].push_back(j);
          nack[a]++;
        end
    end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  bit stop_loaded;

  // one four-phase transaction on port j of arbiter a, driven by hand
  task automatic txn(int a, int j);
    @(negedge clk); dreq[a][j] = 1'b1;
    wait (ack[a][j]);
    @(negedge clk); dreq[a][j] = 1'b0;
    wait (!ack[a][j]);
  endtask

  // a port that requests again as soon as its previous cycle is over
  task automatic loaded(int a, int j);
    while (!stop_loaded) txn(a, j);
  endtask

  task automatic expect_order(int a, string what, int exp[$]);
    check({what, " count"}, order[a].size(), exp.size());
    for (int i = 0; i < exp.size() && i < order[a].size(); i++)
      check($sformatf("%s #%0d", what, i), order[a][i], exp[i]);
  endtask

  int t0, base [NA];

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < NA; a++) dreq[a] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. latency from a lone request to R_0
    @(negedge clk); dreq[1][2] = 1'b1; t0 = 0;
    while (!r0[1]) begin @(posedge clk); #1; t0++; end
    check("request to R_0 latency", t0, DC + 2);
    @(negedge clk); wait (ack[1][2]); @(negedge clk); dreq[1][2] = 1'b0; wait (!ack[1][2]);
    repeat (5) @(negedge clk);
    order[1].delete();

    // 2. simultaneous requests, once each
    for (int a = 0; a < NA; a++) begin
      fork
        txn(a, 0); txn(a, 1); txn(a, 2); txn(a, 3);
      join
    end
    repeat (5) @(negedge clk);
    expect_order(0, "linear all-at-once", '{0, 1, 2, 3});
    expect_order(1, "ring all-at-once",   '{3, 0, 1, 2});   // port 3 (index 2) was served last
    expect_order(2, "mixed all-at-once",  '{0, 1, 2, 3});
    for (int a = 0; a < NA; a++) order[a].delete();

    // 3. ring, fully loaded: each port requests again as soon as it can
    stop_loaded = 0;
    fork
      loaded(1, 0); loaded(1, 1); loaded(1, 2); loaded(1, 3);
    join_none
    wait (order[1].size() >= 12);
    stop_loaded = 1;
    repeat (60) @(negedge clk);
    for (int i = 1; i < 12; i++)
      check($sformatf("ring round robin #%0d", i), order[1][i], (order[1][i-1] + 1) % N);

    // 4. mixed, processors (ports 3 and 4) fully loaded: alternate
    stop_loaded = 0;
    fork
      loaded(2, 2); loaded(2, 3);
    join_none
    wait (order[2].size() >= 10);
    stop_loaded = 1;
    repeat (60) @(negedge clk);
    $display("mixed order %p", order[2]);
    for (int i = 1; i < 10; i++)
      check($sformatf("mixed 3/4 alternate #%0d", i), order[2][i], order[2][i-1] == 2 ? 3 : 2);

    // 5. random traffic
    for (int a = 0; a < NA; a++) begin
      check("idle before soak", dreq[a], 0);
      check("one server cycle per port acknowledge", scycles[a], nack[a]);
      base[a] = nack[a];
    end
    @(negedge clk); soak = 1'b1; cen = 1'b1;
    repeat (20000) @(negedge clk);
    cen = 1'b0;
    repeat (300) @(negedge clk);
    for (int a = 0; a < NA; a++) begin
      int tot;
      tot = 0;
      for (int j = 0; j < N; j++) begin
        tot += served[a][j];
        check($sformatf("arb %0d port %0d handshake errors", a, j), cerr[a][j], 0);
        check($sformatf("arb %0d port %0d idle at end", a, j), creq[a][j] | ack[a][j], 0);
      end
      check($sformatf("arb %0d one acknowledge per request", a), nack[a] - base[a], tot);
      check($sformatf("arb %0d one server cycle per acknowledge", a), scycles[a], nack[a]);
      check($sformatf("arb %0d server errors", a), serr[a], 0);
      if (tot < 500) begin failures++; $display("FAIL arb %0d too few services %0d", a, tot); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
