// Testbench for prio_ratio3.  Each round drives an ACT pattern through a
// DECIDE pulse, clears the ports named by PRI as the ACTIVE flip-flops
// would, and compares the survivor with a reference model: a queue of the
// ports served, scored as "target share minus appearances among the last
// five".  With all three ports requesting every round, 60 rounds must
// give exactly 30 : 20 : 10 services.
module tb_prio_ratio3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] act, pri; logic decide;
  int checks = 0, failures = 0;

  prio_ratio3 dut (.clk, .rst_n, .act, .decide, .pri);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  int served_q [$];          // newest last
  int tally [3];
  localparam int TARGET [3] = '{3, 2, 1};

  function automatic int ref_winner(logic [2:0] a);
    int best = -1, best_s = -100;
    for (int k = 0; k < 3; k++) begin
      int c = 0, s;
      for (int h = 0; h < 5 && h < served_q.size(); h++)
        if (served_q[served_q.size() - 1 - h] == k) c++;
      s = TARGET[k] - c;
      if (a[k] && s > best_s) begin best = k; best_s = s; end
    end
    return best;
  endfunction

  task automatic round(logic [2:0] a);
    int w;
    w = ref_winner(a);
    @(negedge clk); act = a; decide = 0; #1;
    check("no PRI outside DECIDE", pri, 0);
    @(negedge clk); decide = 1;
    @(posedge clk); act = act & ~pri;
    @(negedge clk); #1;
    check("one survivor", act, 1 << w);
    @(negedge clk); decide = 0;
    @(negedge clk);
    served_q.push_back(w);
    tally[w]++;
    @(negedge clk); act = 0;
  endtask

  initial begin
    act = 0; decide = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    tally = '{0, 0, 0};
    repeat (60) round(3'b111);
    check("fully loaded port 1", tally[0], 30);
    check("fully loaded port 2", tally[1], 20);
    check("fully loaded port 3", tally[2], 10);
    repeat (200) round(3'($urandom_range(7, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
