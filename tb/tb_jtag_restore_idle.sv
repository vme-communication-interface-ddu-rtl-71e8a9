// tb_jtag_restore_idle: after each release of the active-low reset,
// RESTORE_IDLE must be high for exactly 8 SCLK rising edges and then stay low.
module tb_jtag_restore_idle;
  logic sclk = 0, njr = 1, restore_idle;
  int checks = 0, failures = 0;

  jtag_restore_idle dut (.*);
  always #50 sclk = ~sclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      #1 njr = 0;
      repeat (3) @(negedge sclk);
      check(restore_idle == 1'b1, "high during reset");
      njr = 1;
      for (int i = 0; i < 8; i++) begin
        check(restore_idle == 1'b1, $sformatf("high at cycle %0d", i));
        @(negedge sclk);
      end
      for (int i = 0; i < 20 + rep * 7; i++) begin
        check(restore_idle == 1'b0, $sformatf("low at cycle %0d", 8 + i));
        @(negedge sclk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
