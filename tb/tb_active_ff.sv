// Testbench for active_ff: directed sequences for set while AWAIT, no set
// without AWAIT, clear by PRI, acknowledge steering, R'' and the clear
// after the inner handshake has returned to idle.
module tb_active_ff;
  logic clk = 1'b0, rst_n = 1'b0;
  logic r_inner = 0, await_i = 0, pri = 0, ack = 0;
  logic act, a_inner, r_dd;
  int checks = 0, failures = 0;

  active_ff dut (.clk, .rst_n, .r_inner, .await_i, .pri, .ack, .act, .a_inner, .r_dd);

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic step(logic r, logic aw, logic p, logic a);
    @(negedge clk); r_inner = r; await_i = aw; pri = p; ack = a;
    @(posedge clk); #1;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    step(0, 1, 0, 0); check("idle", act, 0);
    // request without AWAIT does not set
    step(1, 0, 0, 0); check("no set without AWAIT", act, 0);
    check("no R'' when inactive", r_dd, 0);
    // request with AWAIT sets
    step(1, 1, 0, 0); check("set", act, 1); check("R''", r_dd, 1);
    // PRI clears
    step(1, 0, 1, 0); check("PRI clears", act, 0);
    // set again, no PRI, stays through DECIDE
    step(1, 1, 0, 0); check("set again", act, 1);
    step(1, 0, 0, 0); check("holds", act, 1);
    // server acknowledges: A' steered here
    @(negedge clk); ack = 1; #1; check("A' = ACT & ACK", a_inner, 1);
    @(posedge clk); #1; check("stays while A'", act, 1);
    // R' falls (buffer saw A'), ACT stays while A_0 high
    step(0, 0, 0, 1); check("R'' falls", r_dd, 0); check("ACT kept for A0 fall", act, 1);
    check("A' still", a_inner, 1);
    // A_0 falls: A' falls, ACT clears next edge
    @(negedge clk); ack = 0; #1; check("A' falls", a_inner, 0);
    @(posedge clk); #1; check("ACT cleared when idle", act, 0);
    // ACK on an inactive port is not steered to it
    step(0, 0, 0, 1); check("no A' when inactive", a_inner, 0);
    // set and clear together: clear wins
    step(1, 1, 1, 0); check("clear wins", act, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
