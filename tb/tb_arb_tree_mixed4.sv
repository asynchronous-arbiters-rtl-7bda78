// Testbench for arb_tree_mixed4, the tree approximating the mixed rule.
//   1. All four ports request at once: served 1, 2, 3, 4.
//   2. Ports 1 and 3 request at once: port 1 first.
//   3. Port 3 is being served while ports 1 and 2 request: when the
//      root is free both are waiting there, and port 1 goes first.
//   4. Port 1 requests continuously while port 2 waits: port 1 keeps the
//      server (as a drum would); port 2 is served once port 1 stops.
//   5. Ports 3 and 4 fully loaded: they alternate.
//   6. Random traffic: one acknowledge and one server cycle per request,
//      no handshake errors.
module tb_arb_tree_mixed4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] req, dreq, creq, ack;
  logic r0, a0, soak = 1'b0, cen = 1'b0;
  int scycles, serr, served [4], cerr [4];
  int checks = 0, failures = 0;

  arb_tree_mixed4 dut (.clk, .rst_n, .req, .ack, .r0, .a0);
  hs_server #(.LAT(4)) u_srv (.clk, .rst_n, .r0, .a0, .cycles(scycles), .errors(serr));
  for (genvar j = 0; j < 4; j++) begin : g_cl
    hs_client #(.MAX_GAP(25), .MAX_HOLD(3)) u_cl (.clk, .rst_n, .enable(cen), .ack(ack[j] & soak),
      .req(creq[j]), .served(served[j]), .errors(cerr[j]));
  end
  assign req = soak ? creq : dreq;

  int order [$];
  int nack = 0;
  logic [3:0] ack_q;
  always_ff @(posedge clk)
    if (rst_n) begin
      ack_q <= ack;
      for (int j = 0; j < 4; j++) if (ack[j] && !ack_q[j]) begin order.push_back(j); nack++; end
    end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  bit stop_loaded = 0;
  task automatic txn(int j);
    @(negedge clk); dreq[j] = 1'b1;
    wait (ack[j]);
    @(negedge clk); dreq[j] = 1'b0;
    wait (!ack[j]);
  endtask
  task automatic loaded(int j);
    while (!stop_loaded) txn(j);
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int tot, base;
    dreq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    fork txn(0); txn(1); txn(2); txn(3); join
    repeat (5) @(negedge clk);
    check("all at once: count", order.size(), 4);
    for (int i = 0; i < 4; i++) check($sformatf("all at once #%0d", i), order[i], i);
    order.delete();
    fork txn(2); txn(0); join
    repeat (5) @(negedge clk);
    check("port 1 before port 3", order[0], 0);
    check("then port 3", order[1], 2);
    order.delete();
    fork
      txn(2);
      begin
        wait (ack[2]);
        fork txn(1); txn(0); join
      end
    join
    repeat (5) @(negedge clk);
    check("busy root: count", order.size(), 3);
    check("busy root: port 3", order[0], 2);
    check("busy root: port 1 before port 2", order[1], 0);
    check("busy root: then port 2", order[2], 1);
    order.delete();
    fork loaded(0); join_none
    wait (order.size() >= 2);
    fork txn(1); join_none
    wait (order.size() >= 8);
    stop_loaded = 1;
    wait (ack[1]);
    repeat (40) @(negedge clk);
    for (int i = 0; i < 8; i++) check($sformatf("port 1 holds the server #%0d", i), order[i], 0);
    check("port 2 after port 1 stops", order[order.size() - 1], 1);
    order.delete();
    stop_loaded = 0;
    fork loaded(2); loaded(3); join_none
    wait (order.size() >= 10);
    stop_loaded = 1;
    repeat (80) @(negedge clk);
    for (int i = 1; i < 10; i++)
      check($sformatf("3/4 alternate #%0d", i), order[i], order[i-1] == 2 ? 3 : 2);
    check("server cycles per acknowledge", scycles, nack);
    base = nack;
    @(negedge clk); soak = 1'b1; cen = 1'b1;
    repeat (20000) @(negedge clk);
    cen = 1'b0;
    repeat (300) @(negedge clk);
    tot = 0;
    for (int j = 0; j < 4; j++) begin
      tot += served[j];
      check($sformatf("port %0d errors", j), cerr[j], 0);
    end
    check("one acknowledge per request", nack - base, tot);
    check("one server cycle per acknowledge", scycles, nack);
    check("server errors", serr, 0);
    if (tot < 500) begin failures++; $display("FAIL too few services %0d", tot); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
