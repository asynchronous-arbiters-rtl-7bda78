// End-to-end testbench for arbiters_top at its default parameters.
//
// Every arbiter of the top gets four-phase clients and a server model.
//   1. The memory scenario of the example system: both processors
//      (ports 3, 4) request; while the first is served the data channel
//      (port 2) requests; it is served before the other processor.
//   2. The multiplier: both processors request repeatedly; they alternate.
//   3. The drum (port 1) beats a waiting processor.
//   4. Both processors keep requesting memory: they alternate.
//   5. The ratio arbiter with its three ports fully loaded: over 60
//      services the ratio is exactly 3 : 2 : 1.
//   6. Random traffic on every port of every arbiter: one acknowledge and
//      one server cycle per request, no handshake errors.
// It counts how often each mechanism of the arbiter happened and fails if
// one never did: a port cleared by the priority network during DECIDE
// (per arbiter), a request that arrived while the arbiter was busy
// (not AWAIT), the buffer holding A_j for a port slow to drop R_j, the
// ring memory moving, ports 3/4 alternating in the mixed network, and a
// tree root finding a request already waiting when it becomes free.
module tb_arbiters_top;
  localparam int NA = 7;   // 0 mem, 1 mul, 2 ring, 3 lin, 4 tree, 5 treem, 6 ratio
  localparam int N  = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req [NA], dreq [NA], creq [NA], ack [NA];
  logic r0 [NA], a0 [NA];
  logic soak = 1'b0, cen = 1'b0;
  int scycles [NA], serr [NA], served [NA][N], cerr [NA][N];
  int checks = 0, failures = 0;

  arbiters_top dut (
    .clk, .rst_n,
    .mem_req  (req[0]),      .mem_ack  (ack[0]),      .mem_r0  (r0[0]), .mem_a0  (a0[0]),
    .mul_req  (req[1][1:0]), .mul_ack  (ack[1][1:0]), .mul_r0  (r0[1]), .mul_a0  (a0[1]),
    .ring_req (req[2]),      .ring_ack (ack[2]),      .ring_r0 (r0[2]), .ring_a0 (a0[2]),
    .lin_req  (req[3]),      .lin_ack  (ack[3]),      .lin_r0  (r0[3]), .lin_a0  (a0[3]),
    .tree_req (req[4]),      .tree_ack (ack[4]),      .tree_r0 (r0[4]), .tree_a0 (a0[4]),
    .treem_req(req[5]),      .treem_ack(ack[5]),      .treem_r0(r0[5]), .treem_a0(a0[5]),
    .rat_req  (req[6][2:0]), .rat_ack  (ack[6][2:0]), .rat_r0  (r0[6]), .rat_a0  (a0[6])
  );
  assign ack[1][3:2] = 2'b00;
  assign ack[6][3]   = 1'b0;

  for (genvar a = 0; a < NA; a++) begin : g_env
    hs_server #(.LAT(3 + a % 3)) u_srv (.clk, .rst_n, .r0(r0[a]), .a0(a0[a]),
      .cycles(scycles[a]), .errors(serr[a]));
    for (genvar j = 0; j < N; j++) begin : g_cl
      hs_client #(.MAX_GAP(10 + 4 * j), .MAX_HOLD(6)) u_cl (.clk, .rst_n,
        .enable(cen && (a != 1 || j < 2) && (a != 6 || j < 3)), .ack(ack[a][j] & soak),
        .req(creq[a][j]), .served(served[a][j]), .errors(cerr[a][j]));
    end
    assign req[a] = soak ? creq[a] : dreq[a];
  end

  // ---- service order and acknowledge count
  int order [NA][$];
  int nack [NA] = '{default: 0};
  logic [N-1:0] ack_q [NA];
  always_ff @(posedge clk)
    if (rst_n) for (int a = 0; a < NA; a++) begin
      ack_q[a] <= ack[a];
      for (int j = 0; j < N; j++) if (ack[a][j] && !ack_q[a][j]) begin
        order[a].push_back(j); nack[a]++;
      end
    end

  // ---- mechanism counters (probing inside the design)
  int n_clear [NA] = '{default: 0};  // cycles in which PRI cleared an ACT
  int n_busy_req = 0, n_buf_hold = 0, n_ct_move = 0, n_alt = 0, n_tree_wait = 0;
  logic [N-1:0] req_q [NA];
  logic [1:0] ct_q;
  logic [3:0] last_mem;
  logic root_await_q;
  always_ff @(posedge clk)
    if (rst_n) begin
      if (|(dut.u_mem.act & dut.u_mem.pri))                       n_clear[0]++;
      if (|(dut.u_mul.u_arb.act & dut.u_mul.u_arb.pri))           n_clear[1]++;
      if (|(dut.u_ring.act & dut.u_ring.pri))                     n_clear[2]++;
      if (|(dut.u_lin.act & dut.u_lin.pri))                       n_clear[3]++;
      if (|(dut.u_tree.u_root.u_arb.act & dut.u_tree.u_root.u_arb.pri)) n_clear[4]++;
      if (|(dut.u_treem.u_root.act & dut.u_treem.u_root.pri))    n_clear[5]++;
      if (|(dut.u_rat.act & dut.u_rat.pri))                       n_clear[6]++;
      for (int a = 0; a < NA; a++) req_q[a] <= req[a];
      if (!dut.u_ring.await_s && |(req[2] & ~req_q[2]))           n_busy_req++;
      // buffer: A_j held high by a port that still holds R_j after A'_j fell
      for (int j = 0; j < N; j++)
        if (ack[0][j] && req[0][j] && !dut.u_mem.a_inner[j])      n_buf_hold++;
      ct_q <= dut.u_ring.g_ring.u_prio.ct;
      if (ct_q != dut.u_ring.g_ring.u_prio.ct)                     n_ct_move++;
      last_mem <= last_mem;
      if (dut.u_mem.r0 && !$past(dut.u_mem.r0)) begin
        if ((dut.u_mem.act == 4'b0100 && last_mem == 4'b1000) ||
            (dut.u_mem.act == 4'b1000 && last_mem == 4'b0100))    n_alt++;
        last_mem <= dut.u_mem.act;
      end
      root_await_q <= dut.u_tree.u_root.u_arb.await_s;
      if (dut.u_tree.u_root.u_arb.await_s && !root_await_q && |dut.u_tree.mid_r)
        n_tree_wait++;
    end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic txn(int a, int j);
    @(negedge clk); dreq[a][j] = 1'b1;
    wait (ack[a][j]);
    @(negedge clk); dreq[a][j] = 1'b0;
    wait (!ack[a][j]);
  endtask

  bit stop_loaded = 0;
  task automatic loaded(int a, int j);
    while (!stop_loaded) txn(a, j);
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int tot, base [NA];
    for (int a = 0; a < NA; a++) dreq[a] = '0;
    last_mem = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. memory scenario: processors 3 and 4, then the channel
    fork
      txn(0, 2);
      txn(0, 3);
      begin
        wait (ack[0][2] || ack[0][3]);
        txn(0, 1);
      end
    join
    repeat (5) @(negedge clk);
    check("memory: three services", order[0].size(), 3);
    check("memory: channel served second", order[0][1], 1);
    check("memory: processors first and last", order[0][0] + order[0][2], 5);
    order[0].delete();

    // 3. drum beats a waiting processor
    fork txn(0, 3); txn(0, 0); join
    check("memory: drum first", order[0][0], 0);
    order[0].delete();

    // 2. multiplier shared by the processors
    for (int r = 0; r < 3; r++) fork txn(1, 0); txn(1, 1); join
    for (int i = 0; i < 6; i++) check($sformatf("multiplier alternates #%0d", i), order[1][i], i % 2);

    order[0].delete();
    stop_loaded = 0;
    fork loaded(0, 2); loaded(0, 3); join_none
    wait (order[0].size() >= 10);
    stop_loaded = 1;
    repeat (60) @(negedge clk);
    for (int i = 1; i < 10; i++)
      check($sformatf("memory processors alternate #%0d", i), order[0][i], order[0][i-1] == 2 ? 3 : 2);

    stop_loaded = 0;
    fork loaded(6, 0); loaded(6, 1); loaded(6, 2); join_none
    wait (order[6].size() >= 60);
    stop_loaded = 1;
    repeat (60) @(negedge clk);
    begin
      int cnt [3];
      cnt = '{0, 0, 0};
      for (int i = 0; i < 60; i++) cnt[order[6][i]]++;
      $display("ratio arbiter, 60 fully loaded services: %0d : %0d : %0d", cnt[0], cnt[1], cnt[2]);
      check("ratio port 1", cnt[0], 30);
      check("ratio port 2", cnt[1], 20);
      check("ratio port 3", cnt[2], 10);
    end

    for (int a = 0; a < NA; a++) begin
      check($sformatf("arb %0d directed server cycles", a), scycles[a], nack[a]);
      base[a] = nack[a];
    end

    // 4. random traffic everywhere
    @(negedge clk); soak = 1'b1; cen = 1'b1;
    repeat (40000) @(negedge clk);
    cen = 1'b0;
    repeat (400) @(negedge clk);
    for (int a = 0; a < NA; a++) begin
      tot = 0;
      for (int j = 0; j < N; j++) begin
        tot += served[a][j];
        check($sformatf("arb %0d port %0d errors", a, j), cerr[a][j], 0);
      end
      check($sformatf("arb %0d one acknowledge per request", a), nack[a] - base[a], tot);
      check($sformatf("arb %0d one server cycle per acknowledge", a), scycles[a], nack[a]);
      check($sformatf("arb %0d server errors", a), serr[a], 0);
      checks++;
      if (tot < 500) begin failures++; $display("FAIL arb %0d too few services %0d", a, tot); end
    end

    $display("mechanisms: priority clears mem=%0d mul=%0d ring=%0d lin=%0d tree=%0d treem=%0d ratio=%0d",
             n_clear[0], n_clear[1], n_clear[2], n_clear[3], n_clear[4], n_clear[5], n_clear[6]);
    $display("mechanisms: request while busy=%0d buffer hold=%0d ring CT moves=%0d 3/4 alternations=%0d tree request waiting=%0d",
             n_busy_req, n_buf_hold, n_ct_move, n_alt, n_tree_wait);
    for (int a = 0; a < NA; a++) begin
      checks++;
      if (n_clear[a] == 0) begin failures++; $display("FAIL no priority clear in arbiter %0d", a); end
    end
    checks++; if (n_busy_req  == 0) begin failures++; $display("FAIL never a request while busy"); end
    checks++; if (n_buf_hold  == 0) begin failures++; $display("FAIL buffer never held A_j"); end
    checks++; if (n_ct_move   == 0) begin failures++; $display("FAIL ring CT never moved"); end
    checks++; if (n_alt       == 0) begin failures++; $display("FAIL ports 3/4 never alternated"); end
    checks++; if (n_tree_wait == 0) begin failures++; $display("FAIL tree root never found a waiting request"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
