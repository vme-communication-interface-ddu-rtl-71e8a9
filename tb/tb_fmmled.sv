// tb_fmmled: steady on; blinking at half the BCLK rate while flash is held;
// a blink that is lit when flash is withdrawn still completes (LED lit
// until the next BCLK edge, then dark for good); on overrides blinking.
module tb_fmmled;
  logic clk = 0, bclk = 0, rst = 0, on, flash, led, led_n;
  int checks = 0, failures = 0;

  fmmled dut (.*);
  always #5 clk = ~clk;
  always #200 bclk = ~bclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s t=%0t", msg, $time); end
  endtask

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen_on, seen_off;
    on = 0; flash = 0;
    #1 rst = 1; #20 rst = 0;
    @(posedge bclk); @(posedge bclk); #2;
    check(!led && led_n, "dark when idle");
    on = 1; #12; check(led && !led_n, "steady on");
    repeat (3) @(posedge bclk);
    #2 check(led, "stays on");
    on = 0; #12 check(!led, "off again");
    // blinking
    flash = 1;
    @(posedge bclk); #2;
    for (int i = 0; i < 6; i++) begin
      logic prev;
      prev = led;
      @(posedge bclk); #2;
      check(led == !prev, "toggles every BCLK edge");
    end
    // withdraw flash while lit
    if (!led) begin @(posedge bclk); #2; end
    check(led, "lit before withdrawal");
    flash = 0; #50;
    check(led, "blink completes after flash withdrawn");
    @(posedge bclk); #2;
    check(!led, "dark after the blink");
    repeat (3) begin @(posedge bclk); #2 check(!led, "stays dark"); end
    // withdraw flash while dark: the started blink still lights once
    flash = 1;
    @(posedge bclk); #2;
    if (led) begin @(posedge bclk); #2; end
    check(!led, "dark before withdrawal");
    flash = 0; #50;
    @(posedge bclk); #2;
    check(led, "latched request lights the LED once more");
    @(posedge bclk); #2;
    check(!led, "dark after the last blink");
    repeat (2) begin @(posedge bclk); #2 check(!led, "stays dark"); end
    // on overrides blink
    flash = 1; on = 1;
    repeat (3) begin @(posedge bclk); #2 check(led, "on overrides blink"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
