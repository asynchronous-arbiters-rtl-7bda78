// Testbench for port_buffer: a directed walk through one buffered
// handshake (request, inner acknowledge, port and inner resets in both
// orders) followed by random input sequences compared with a reference
// model of the buffer's event rules.
module tb_port_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic r_j = 1'b0, a_inner = 1'b0;
  logic a_j, r_inner;
  int checks = 0, failures = 0;

  port_buffer dut (.clk, .rst_n, .r_j, .a_inner, .a_j, .r_inner);

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // drive at negedge, step one clock, look after the posedge
  task automatic step(logic r, logic ai);
    @(negedge clk); r_j = r; a_inner = ai;
    @(posedge clk); #1;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic ref_a;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Idle
    step(0, 0); check("idle A", a_j, 0); check("idle R'", r_inner, 0);
    // R_j up -> R'_j up at once
    @(negedge clk); r_j = 1; #1; check("R' follows R", r_inner, 1);
    step(1, 0); check("A low while waiting", a_j, 0);
    // A'_j up -> A_j up, R'_j down
    step(1, 1); check("A_j after A'", a_j, 1); check("R' dropped", r_inner, 0);
    // inner reset first: A'_j down while R_j still up -> A_j held
    step(1, 0); check("A held by R", a_j, 1); check("R' stays low", r_inner, 0);
    step(1, 0); check("A still held", a_j, 1);
    // port drops R_j -> A_j falls
    step(0, 0); check("A falls", a_j, 0);
    // second cycle: port resets first
    step(1, 0); check("R' again", r_inner, 1);
    step(1, 1); check("A again", a_j, 1);
    step(0, 1); check("A held by A'", a_j, 1); check("no R' when R low", r_inner, 0);
    step(0, 1); check("A held by A' 2", a_j, 1);
    step(0, 0); check("A falls after A'", a_j, 0);
    // random sequences against the reference
    ref_a = 1'b0;
    repeat (2000) begin
      logic r, ai;
      r = 1'($urandom_range(1, 0)); ai = 1'($urandom_range(1, 0));
      @(negedge clk); r_j = r; a_inner = ai; #1;
      check("rand R'", r_inner, r & ~ref_a);
      @(posedge clk); #1;
      ref_a = ai | (r & ref_a);
      check("rand A", a_j, ref_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
