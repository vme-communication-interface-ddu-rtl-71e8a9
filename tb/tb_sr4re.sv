// tb_sr4re: random shift / hold sequence against a reference register, and
// a check that the synchronous clear loads 0001 even with ce low.
module tb_sr4re;
  logic c = 0, ce, clr = 0, sli;
  logic [3:0] q, ref_q;
  int checks = 0, failures = 0;

  sr4re dut (.*);
  always #5 c = ~c;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 0; sli = 0;
    for (int rep = 0; rep < 4; rep++) begin
      @(negedge c);
      clr = 1; ce = 0; @(posedge c); #1; checks++; if (q !== 4'b0001) begin failures++; $display("FAIL: sync clear q=%b", q); end clr = 0;
      ref_q = 4'b0001;
      for (int i = 0; i < 60; i++) begin
        @(negedge c);
        checks++;
        if (q !== ref_q) begin failures++; $display("FAIL: step %0d q=%b ref=%b", i, q, ref_q); end
        ce = ($urandom % 3) != 0; sli = (rep == 0) ? q[3] : 1'($urandom);
        @(posedge c);
        if (ce) ref_q = {ref_q[2:0], sli};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
