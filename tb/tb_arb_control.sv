// Testbench for arb_control: AWAIT falls when a port becomes active,
// DECIDE runs for its fixed length, R_0 is held off during AWAIT and
// DECIDE, ACK follows A_0, and AWAIT returns only once every ACT is clear.
module tb_arb_control;
  logic clk = 1'b0, rst_n = 1'b0;
  logic act_any = 0, r_dd_any = 0, a0 = 0;
  logic await_o, decide, r0, ack;
  int checks = 0, failures = 0;

  arb_control dut (.clk, .rst_n, .act_any, .r_dd_any, .a0, .await_o, .decide, .r0, .ack);

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic step(logic act, logic rdd, logic a);
    @(negedge clk); act_any = act; r_dd_any = rdd; a0 = a;
    @(posedge clk); #1;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    step(0, 0, 0); check("AWAIT after reset", await_o, 1); check("no DECIDE", decide, 0);
    @(negedge clk); r_dd_any = 1; #1; check("no R0 while AWAIT", r0, 0);
    // a port becomes active
    step(1, 1, 0); check("AWAIT falls", await_o, 0); check("DECIDE rises", decide, 1);
    check("no R0 during DECIDE", r0, 0);
    step(1, 1, 0); check("DECIDE 2nd cycle", decide, 1); check("no R0 during DECIDE 2", r0, 0);
    step(1, 1, 0); check("DECIDE over", decide, 0); check("R0 up", r0, 1);
    check("still not AWAIT", await_o, 0);
    @(negedge clk); a0 = 1; #1; check("ACK follows A0", ack, 1);
    step(1, 0, 1); check("R0 follows R''", r0, 0);
    step(1, 0, 0); check("ACK falls", ack, 0); check("no AWAIT while ACT", await_o, 0);
    step(0, 0, 0); check("AWAIT back", await_o, 1);
    step(0, 0, 0); check("AWAIT stays", await_o, 1); check("no DECIDE when idle", decide, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
