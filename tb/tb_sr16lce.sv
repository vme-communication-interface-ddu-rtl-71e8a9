// tb_sr16lce: random shift / hold / clear sequence compared with a reference
// right-shifting register; checks that n shifted bits land in q[15:16-n].
module tb_sr16lce;
  logic c = 0, ce, clr = 0, sri;
  logic [15:0] q, ref_q;
  int checks = 0, failures = 0;

  sr16lce dut (.*);
  always #5 c = ~c;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 0; sri = 0;
    #1 clr = 1; #2 clr = 0;
    ref_q = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge c);
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL: step %0d q=%h ref=%h", i, q, ref_q); end
      ce = ($urandom % 3) != 0; sri = $urandom;
      @(posedge c);
      if (ce) ref_q = {sri, ref_q[15:1]};
    end
    // four bits 1,0,1,1 shifted after a clear end up in q[15:12] as 1101
    @(negedge c); clr = 1; #1 clr = 0;
    ce = 1;
    sri = 1; @(negedge c); sri = 0; @(negedge c); sri = 1; @(negedge c); sri = 1; @(negedge c);
    ce = 0;
    checks++; if (q !== 16'hD000) begin failures++; $display("FAIL: alignment q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
