// tb_clk_div: checks that SLOWCLK is MIDCLK/4 and SLOWCLK2 is MIDCLK/8
// (10 MHz -> 2.5 MHz and 1.25 MHz), that both are 50 % duty, and that they
// change only on FASTCLK rising edges.
module tb_clk_div;
  logic midclk = 0, fastclk = 0, rst_n = 1;
  logic slowclk, slowclk2;
  int checks = 0, failures = 0;
  realtime t_last1, t_last2, t_fall1;
  int n1 = 0, n2 = 0;

  clk_div dut (.*);

  always #50   midclk  = ~midclk;    // 10 MHz
  always #6.25 fastclk = ~fastclk;   // 80 MHz

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge slowclk) begin
    if (n1 > 0) check($realtime - t_last1 == 400.0, $sformatf("slowclk period %0t", $realtime - t_last1));
    check($realtime - t_fall1 == 200.0 || n1 == 0, "slowclk low time");
    t_last1 = $realtime; n1++;
  end
  always @(negedge slowclk) if (n1 > 0) begin
    check($realtime - t_last1 == 200.0, "slowclk high time");
    t_fall1 = $realtime;
  end
  always @(posedge slowclk2) begin
    if (n2 > 0) check($realtime - t_last2 == 800.0, "slowclk2 period");
    t_last2 = $realtime; n2++;
  end
  always @(slowclk or slowclk2) if (rst_n && $realtime > 400) check(fastclk == 1'b1, "output changed off a FASTCLK rising edge");

  initial begin
    #20000 failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t_fall1 = 0;
    #1 rst_n = 0;
    #333 rst_n = 1;
    wait (n2 == 10);
    check(n1 >= 19, "slowclk edge count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
