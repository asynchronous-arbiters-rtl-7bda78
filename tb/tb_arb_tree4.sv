// Testbench for arb_tree4, the four-port tree of two-input ring arbiters.
//   1. All four ports fully loaded: service order 1, 3, 2, 4, 1, ...
//   2. Rate: with the server busy longer than DECIDE, the tree completes
//      fully loaded service cycles at least as fast as a single four-port
//      ring arbiter (also instantiated here) under the same load.
//   3. Random traffic: one acknowledge and one server cycle per request,
//      no handshake errors.
module tb_arb_tree4;
  import arb_pkg::*;
  localparam int LAT = 6;        // server busy time, longer than DECIDE
  localparam int NSERV = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // index 0: tree, index 1: single four-port ring arbiter
  logic [3:0] req [2], dreq [2], creq [2], ack [2];
  logic r0 [2], a0 [2];
  logic soak = 1'b0, cen = 1'b0;
  int scycles [2], serr [2], served [2][4], cerr [2][4];
  int checks = 0, failures = 0;

  arb_tree4 dut (.clk, .rst_n, .req(req[0]), .ack(ack[0]), .r0(r0[0]), .a0(a0[0]));
  arbiter #(.N(4), .RULE(PRIO_RING)) u_single (.clk, .rst_n, .req(req[1]), .ack(ack[1]), .r0(r0[1]), .a0(a0[1]));

  for (genvar a = 0; a < 2; a++) begin : g_env
    hs_server #(.LAT(LAT)) u_srv (.clk, .rst_n, .r0(r0[a]), .a0(a0[a]), .cycles(scycles[a]), .errors(serr[a]));
    for (genvar j = 0; j < 4; j++) begin : g_cl
      hs_client #(.MAX_GAP(30), .MAX_HOLD(3)) u_cl (.clk, .rst_n, .enable(cen), .ack(ack[a][j] & soak),
        .req(creq[a][j]), .served(served[a][j]), .errors(cerr[a][j]));
    end
    assign req[a] = soak ? creq[a] : dreq[a];
  end

  int order [2][$];
  int nack [2] = '{0, 0};
  int t_done [2];
  logic [3:0] ack_q [2];
  always_ff @(posedge clk)
    if (rst_n) for (int a = 0; a < 2; a++) begin
      ack_q[a] <= ack[a];
      for (int j = 0; j < 4; j++) if (ack[a][j] && !ack_q[a][j]) begin
        order[a].push_back(j); nack[a]++;
      end
    end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  bit stop_loaded = 0;
  task automatic txn(int a, int j);
    @(negedge clk); dreq[a][j] = 1'b1;
    wait (ack[a][j]);
    @(negedge clk); dreq[a][j] = 1'b0;
    wait (!ack[a][j]);
  endtask
  task automatic loaded(int a, int j);
    while (!stop_loaded) txn(a, j);
  endtask
  task automatic timer(int a);
    int t = 0;
    // steady state: from the 8th to the NSERV-th service
    while (order[a].size() < 8) @(posedge clk);
    while (order[a].size() < NSERV) begin @(posedge clk); t++; end
    t_done[a] = t;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int tot, base [2];
    int exp_order [4] = '{0, 2, 1, 3};
    dreq[0] = '0; dreq[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    fork
      loaded(0, 0); loaded(0, 1); loaded(0, 2); loaded(0, 3);
      loaded(1, 0); loaded(1, 1); loaded(1, 2); loaded(1, 3);
    join_none
    fork timer(0); timer(1); join
    stop_loaded = 1;
    repeat (100) @(negedge clk);
    $display("fully loaded: tree %0d cycles, single arbiter %0d cycles for services 8 to %0d",
             t_done[0], t_done[1], NSERV);
    for (int i = 0; i < 16; i++)
      check($sformatf("tree order 1,3,2,4 #%0d", i), order[0][i], exp_order[i % 4]);
    checks++;
    if (t_done[0] > t_done[1]) begin
      failures++; $display("FAIL tree slower than a single four-port arbiter");
    end
    for (int a = 0; a < 2; a++) begin
      check("server cycles per acknowledge", scycles[a], nack[a]);
      base[a] = nack[a];
    end
    @(negedge clk); soak = 1'b1; cen = 1'b1;
    repeat (20000) @(negedge clk);
    cen = 1'b0;
    repeat (300) @(negedge clk);
    tot = 0;
    for (int j = 0; j < 4; j++) begin
      tot += served[0][j];
      check($sformatf("port %0d errors", j), cerr[0][j], 0);
    end
    check("one acknowledge per request", nack[0] - base[0], tot);
    check("one server cycle per acknowledge", scycles[0], nack[0]);
    check("server errors", serr[0], 0);
    if (tot < 500) begin failures++; $display("FAIL too few services %0d", tot); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
