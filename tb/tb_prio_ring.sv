// Testbench for prio_ring (N = 4 and N = 5): outside DECIDE no port is
// cleared; during DECIDE only the first active port after CT (going round
// the ring) survives; at the end of DECIDE, CT takes the survivor's
// number.  ACT is modelled as in the arbiter: the testbench clears the
// ports named by PRI at each clock, as the ACTIVE flip-flops would.
module tb_prio_ring;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  logic [3:0] act4, pri4; logic d4; logic [1:0] ct4;
  logic [4:0] act5, pri5; logic d5; logic [2:0] ct5;
  prio_ring           u4 (.clk, .rst_n, .act(act4), .decide(d4), .pri(pri4), .ct(ct4));
  prio_ring #(.N(5))  u5 (.clk, .rst_n, .act(act5), .decide(d5), .pri(pri5), .ct(ct5));

  // expected winner: first set bit after position last, going round
  function automatic int winner(logic [7:0] a, int n, int last);
    for (int k = 1; k <= n; k++) if (a[(last + k) % n]) return (last + k) % n;
    return -1;
  endfunction

  task automatic round4(logic [3:0] a);
    int w, last;
    last = ct4;
    w = winner({4'b0, a}, 4, last);
    @(negedge clk); act4 = a; d4 = 0; #1;
    check("no PRI outside DECIDE", pri4, 0);
    @(negedge clk); d4 = 1; #1;                 // DECIDE, cycle 1
    @(posedge clk); act4 = act4 & ~pri4;        // losers cleared
    @(negedge clk); #1;                         // DECIDE, cycle 2
    check("one survivor", act4, 1 << w);
    check("settled", pri4 & act4, 0);
    @(negedge clk); d4 = 0;                     // after DECIDE
    @(negedge clk); #1;
    check("CT = winner", ct4, w);
    @(negedge clk); act4 = 0;
  endtask

  task automatic round5(logic [4:0] a);
    int w, last;
    last = ct5;
    w = winner({3'b0, a}, 5, last);
    @(negedge clk); act5 = a; d5 = 1; #1;
    @(posedge clk); act5 = act5 & ~pri5;
    @(negedge clk); #1;
    check("N5 one survivor", act5, 1 << w);
    @(negedge clk); d5 = 0;
    @(negedge clk); #1;
    check("N5 CT = winner", ct5, w);
    @(negedge clk); act5 = 0;
  endtask

  initial begin
    act4 = 0; d4 = 0; act5 = 0; d5 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check("CT reset", ct4, 3);
    // fully loaded: round robin 0,1,2,3,0
    for (int i = 0; i < 5; i++) begin
      round4(4'hF);
      check("fully loaded order", ct4, i % 4);
    end
    round4(4'b0101); round4(4'b0101); round4(4'b1000);
    repeat (60) begin
      logic [3:0] a;
      a = 4'($urandom_range(15, 1));
      round4(a);
    end
    repeat (60) round5(5'($urandom_range(31, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
