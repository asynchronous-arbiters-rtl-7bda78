// Testbench for prio_mixed4: port 1 beats all, port 2 beats 3 and 4 (with
// or without DECIDE), and during DECIDE ports 3 and 4 alternate according
// to whether port 3 was the one served last.
module tb_prio_mixed4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] act, pri; logic decide, last3;
  int checks = 0, failures = 0;

  prio_mixed4 dut (.clk, .rst_n, .act, .decide, .pri, .last3);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // expected survivor index; l3 = port 3 was served last
  function automatic int survivor(logic [3:0] a, logic l3);
    if (a[0]) return 0;
    if (a[1]) return 1;
    if (a[2] && a[3]) return l3 ? 3 : 2;
    if (a[2]) return 2;
    if (a[3]) return 3;
    return -1;
  endfunction

  int w, s3 = 0, s4 = 0;
  logic l3_model;

  task automatic round(logic [3:0] a);
    w = survivor(a, l3_model);
    @(negedge clk); act = a; decide = 1;
    @(posedge clk); act = act & ~pri;
    @(negedge clk); #1;
    check("one survivor", act, 1 << w);
    @(negedge clk); decide = 0;
    @(negedge clk); #1;
    l3_model = (w == 2);
    check("last3", last3, l3_model);
    if (w == 2) s3++;
    if (w == 3) s4++;
    @(negedge clk); act = 0;
  endtask

  initial begin
    act = 0; decide = 0; l3_model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // ungated linear part
    @(negedge clk); act = 4'b1111; #1;
    check("PRI without DECIDE", pri, 4'b1110);
    @(negedge clk); act = 4'b1100; #1;
    check("3,4 not cleared without DECIDE", pri, 0);
    // processors fully loaded: strict alternation
    for (int i = 0; i < 6; i++) round(4'b1100);
    check("alternation port 3", s3, 3);
    check("alternation port 4", s4, 3);
    round(4'b1111); round(4'b1110); round(4'b1101);
    repeat (80) round(4'($urandom_range(15, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
