// tb_sr16clre: random load / shift / hold / clear sequence compared with a
// reference register kept in the testbench.
module tb_sr16clre;
  logic c = 0, ce, clr = 0, l, sri;
  logic [15:0] d, q, ref_q;
  int checks = 0, failures = 0;

  sr16clre dut (.*);
  always #5 c = ~c;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 0; l = 0; sri = 0; d = '0;
    #1 clr = 1; #2 clr = 0;
    ref_q = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge c);
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL: step %0d q=%h ref=%h", i, q, ref_q); end
      ce = ($urandom % 4) != 0; l = ($urandom % 5) == 0; sri = $urandom; d = 16'($urandom);
      @(posedge c);
      if (ce) ref_q = l ? d : {sri, ref_q[15:1]};
    end
    @(negedge c); clr = 1; #1;
    checks++; if (q !== 16'h0) begin failures++; $display("FAIL: async clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
