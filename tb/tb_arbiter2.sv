// Testbench for arbiter2, the two-input ring arbiter.
//   1. Both ports request at once, repeatedly: they are served
//      alternately, 1, 2, 1, 2, ...
//   2. Both ports fully loaded (each re-requests as soon as it can):
//      still strictly alternating, neither port starves.
//   3. Only port 2 requests, several times: it is served every time.
//   4. Random traffic: one acknowledge and one server cycle per request,
//      no handshake errors.
module tb_arbiter2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] req, dreq, creq, ack;
  logic r0, a0, soak = 1'b0, cen = 1'b0;
  int scycles, serr, served [2], cerr [2];
  int checks = 0, failures = 0;

  arbiter2 dut (.clk, .rst_n, .req, .ack, .r0, .a0);
  hs_server #(.LAT(2)) u_srv (.clk, .rst_n, .r0, .a0, .cycles(scycles), .errors(serr));
  for (genvar j = 0; j < 2; j++) begin : g_cl
    hs_client #(.MAX_GAP(6), .MAX_HOLD(3)) u_cl (.clk, .rst_n, .enable(cen), .ack(ack[j] & soak),
      .req(creq[j]), .served(served[j]), .errors(cerr[j]));
  end
  assign req = soak ? creq : dreq;

  int order [$];
  int nack = 0;
  logic [1:0] ack_q;
  always_ff @(posedge clk)
    if (rst_n) begin
      ack_q <= ack;
      for (int j = 0; j < 2; j++) if (ack[j] && !ack_q[j]) begin order.push_back(j); nack++; end
    end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic txn(int j);
    @(negedge clk); dreq[j] = 1'b1;
    wait (ack[j]);
    @(negedge clk); dreq[j] = 1'b0;
    wait (!ack[j]);
  endtask

  bit stop_loaded = 0;
  task automatic loaded(int j);
    while (!stop_loaded) txn(j);
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int tot, base;
    dreq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 4; r++) begin
      fork txn(0); txn(1); join
      repeat (3) @(negedge clk);
    end
    for (int i = 0; i < 8; i++) check($sformatf("alternate #%0d", i), order[i], i % 2);
    order.delete();
    fork loaded(0); loaded(1); join_none
    wait (order.size() >= 10);
    stop_loaded = 1;
    repeat (40) @(negedge clk);
    for (int i = 1; i < 10; i++)
      check($sformatf("loaded alternate #%0d", i), order[i], 1 - order[i-1]);
    order.delete();
    repeat (3) txn(1);
    check("lone port served each time", order.size(), 3);
    foreach (order[i]) check("lone port 2", order[i], 1);
    check("server cycles so far", scycles, nack);
    base = nack;
    @(negedge clk); soak = 1'b1; cen = 1'b1;
    repeat (10000) @(negedge clk);
    cen = 1'b0;
    repeat (200) @(negedge clk);
    tot = served[0] + served[1];
    check("one acknowledge per request", nack - base, tot);
    check("one server cycle per acknowledge", scycles, nack);
    check("server errors", serr, 0);
    check("port 1 errors", cerr[0], 0);
    check("port 2 errors", cerr[1], 0);
    if (served[0] < 100 || served[1] < 100) begin
      failures++; $display("FAIL too few services %0d %0d", served[0], served[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
