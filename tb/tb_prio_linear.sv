// Testbench for prio_linear: every ACT pattern for N = 4 and random
// patterns for N = 9; the expected PRI is built from the rule "a port is
// cleared when some port with a smaller number is active".
module tb_prio_linear;
  logic [3:0] act4, pri4;
  logic [8:0] act9, pri9;
  int checks = 0, failures = 0;

  prio_linear              u4 (.act(act4), .pri(pri4));
  prio_linear #(.N(9))     u9 (.act(act9), .pri(pri9));

  function automatic logic [8:0] ref_pri(logic [8:0] a, int n);
    logic [8:0] p = '0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < i; j++)
        if (a[j]) p[i] = 1'b1;
    return p;
  endfunction

  initial begin
    for (int v = 0; v < 16; v++) begin
      act4 = 4'(v); #1;
      checks++;
      if (pri4 !== ref_pri({5'b0, act4}, 4)[3:0]) begin
        failures++; $display("FAIL N=4 act=%b pri=%b", act4, pri4);
      end
      // with any port active, exactly the first active port survives
      if (act4 != 0) begin
        checks++;
        if (!$onehot(act4 & ~pri4)) begin failures++; $display("FAIL survivor act=%b", act4); end
      end
    end
    repeat (200) begin
      act9 = 9'($urandom); #1;
      checks++;
      if (pri9 !== ref_pri(act9, 9)) begin
        failures++; $display("FAIL N=9 act=%b pri=%b", act9, pri9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
