// Testbench for decide_oneshot: the pulse length in cycles for the
// default (2) and a longer setting (5), and that a trigger during the
// pulse does not stretch it.
module tb_decide_oneshot;
  logic clk = 1'b0, rst_n = 1'b0;
  logic trig = 1'b0;
  logic d2, d5;
  int checks = 0, failures = 0;

  decide_oneshot               u2 (.clk, .rst_n, .trigger(trig), .decide(d2));
  decide_oneshot #(.DECIDE_CYCLES(5)) u5 (.clk, .rst_n, .trigger(trig), .decide(d5));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int len2, len5;
  always @(posedge clk) begin
    if (d2) len2++;
    if (d5) len5++;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check("idle low", d2, 0);
    for (int rep = 0; rep < 3; rep++) begin
      len2 = 0; len5 = 0;
      @(negedge clk); trig = 1;
      @(negedge clk); trig = (rep == 2);   // third round: trigger held high
      check("rises after trigger", d2, 1);
      @(negedge clk); trig = 0;
      repeat (10) @(negedge clk);
      check("pulse length 2", len2, 2);
      check("pulse length 5", len5, 5);
      check("falls", d5, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
