// tb_vme_irq: interrupt-acknowledge daisy chain. Cases: level-1 IACK while
// requesting (claimed: my_irq set, chain not passed), another level or no
// request (chain passed on, my_irq stays low), release of the strobes
// (my_irq cleared), reset.
module tb_vme_irq;
  logic fastclk = 0, rst = 0, irq1_n, iack_in_n, as_n, ds0_n, ds1_n;
  logic [3:1] adrs;
  logic iack_out_n, my_irq;
  int checks = 0, failures = 0;

  vme_irq dut (.*);
  always #6 fastclk = ~fastclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic iack_cycle(input logic req, input logic [3:1] lvl, input bit expect_mine);
    irq1_n = ~req; adrs = lvl;
    @(negedge fastclk); as_n = 0;
    @(negedge fastclk); ds0_n = 0; ds1_n = 0;
    @(negedge fastclk); iack_in_n = 0;
    #1 check(iack_out_n == expect_mine, $sformatf("iack_out_n lvl=%0d req=%0d", lvl, req));
    repeat (3) @(negedge fastclk);
    check(my_irq == expect_mine, $sformatf("my_irq lvl=%0d req=%0d", lvl, req));
    check(iack_out_n == expect_mine, "iack_out_n held");
    ds0_n = 1; ds1_n = 1; #1;
    check(my_irq == 1'b0, "my_irq cleared by strobe release");
    @(negedge fastclk); as_n = 1; iack_in_n = 1; #1;
    check(iack_out_n == 1'b1, "chain idle");
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    irq1_n = 1; iack_in_n = 1; as_n = 1; ds0_n = 1; ds1_n = 1; adrs = 0;
    #1 rst = 1; #20 rst = 0;
    check(my_irq == 0 && iack_out_n == 1, "after reset");
    iack_cycle(1, 3'd1, 1);
    iack_cycle(0, 3'd1, 0);
    iack_cycle(1, 3'd2, 0);
    iack_cycle(1, 3'd3, 0);
    iack_cycle(1, 3'd1, 1);
    // claim then reset
    irq1_n = 0; adrs = 3'd1; as_n = 0; ds0_n = 0; ds1_n = 0; iack_in_n = 0;
    repeat (4) @(negedge fastclk);
    check(my_irq, "claimed before reset");
    rst = 1; #1; check(!my_irq, "reset clears my_irq");
    rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
