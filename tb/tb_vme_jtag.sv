// tb_vme_jtag: drives the VME-JTAG engine against a behavioural TAP.
// Checks the TAP reset (ends in Run-Test/Idle, acknowledged 12 SLOWCLK
// cycles after the command is taken), IR and DR scans with header and
// tailer (values reach the TAP's update registers, 2 SLOWCLK cycles per
// bit), a DR scan split over a header-only and a tailer-only command, the
// TDO read-back (command 05) and that other devices' commands are ignored.
module tb_vme_jtag;
  logic slowclk = 0, rst = 0, device, strobe, tdo;
  logic [9:0] command;
  logic [15:0] indata, outdata;
  logic dvcenb, outdata_en, dtack, tdi, tms, tck, load, rdtdobk, donetail;
  int checks = 0, failures = 0, cyc = 0, t_load = 0, t_ack = 0, n_tail = 0;
  logic dtack_q = 0;

  vme_jtag dut (.*);
  jtag_tap_model #(.IRLEN(8), .CAPTURE(16'hA5C3)) tap (.tck(tck), .tms(tms), .tdi(tdi), .tdo(tdo));

  always #200 slowclk = ~slowclk;
  always @(posedge slowclk) begin
    cyc++;
    if (load) t_load = cyc;
    if (donetail) n_tail++;
    if (dtack && !dtack_q) t_ack = cyc;
    dtack_q <= dtack;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one VME access; returns SLOWCLK cycles from the start pulse to dtack
  task automatic access(input logic [5:0] op, input int nbits, input logic [15:0] d,
                        output int cycles, output logic [15:0] rd);
    @(negedge slowclk);
    device = 1; command = {4'(nbits - 1), op}; indata = d; strobe = 1;
    while (!dtack) @(posedge slowclk);
    @(posedge slowclk); #1;
    cycles = t_ack - t_load;
    rd = outdata;
    check(outdata_en == (op == 6'h05), "outdata_en only for read-back");
    @(negedge slowclk); strobe = 0;
    while (dtack) @(posedge slowclk);
    device = 0;
  endtask

  initial begin
    #2000000 failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    logic [15:0] rd;
    device = 0; strobe = 0; command = 0; indata = 0;
    #1 rst = 1; #500 rst = 0;

    // reset, leave the TAP in Shift-IR, then reset it again
    access(6'h06, 1, 16'h0, c, rd);
    access(6'h0D, 4, 16'h000F, c, rd);
    check(tap.st == tap.SH_IR, "header-only IR scan stays in Shift-IR");
    access(6'h06, 1, 16'h0, c, rd);
    check(c == 12, $sformatf("reset acknowledged after 12 SLOWCLK cycles (got %0d)", c));
    check(tap.st == tap.RTI, "reset ends in Run-Test/Idle");

    // IR scan, header and tailer (command 0F), 8 bits
    access(6'h0F, 8, 16'h00C2, c, rd);
    check(tap.ir == 8'hC2, $sformatf("IR = %h", tap.ir));
    check(tap.st == tap.RTI, "IR scan ends in Run-Test/Idle");
    check(c == 2 * (4 + 8 + 2), $sformatf("IR scan cycles %0d", c));
    // command 07 is an IR scan as well
    access(6'h07, 8, 16'h003C, c, rd);
    check(tap.ir == 8'h3C, "IR via command 07");

    // DR scan, header and tailer (command 03), 16 bits
    access(6'h03, 16, 16'h1234, c, rd);
    check(tap.dr == 16'h1234, $sformatf("DR = %h", tap.dr));
    check(c == 2 * (3 + 16 + 2), $sformatf("DR scan cycles %0d", c));
    check(tap.st == tap.RTI, "DR scan ends in Run-Test/Idle");
    access(6'h05, 1, 16'h0, c, rd);
    check(rd == 16'hA5C3, $sformatf("TDO read-back %h", rd));

    // DR scan split: header only then tailer only, 8 bits each
    access(6'h01, 8, 16'h0056, c, rd);
    check(tap.st == tap.SH_DR, "header-only DR scan stays in Shift-DR");
    access(6'h02, 8, 16'h009A, c, rd);
    check(tap.dr == 16'h9A56, $sformatf("split DR = %h", tap.dr));
    access(6'h05, 1, 16'h0, c, rd);
    check(rd == 16'hA5C3, $sformatf("split TDO read-back %h", rd));
    check(n_tail == 4, $sformatf("donetail pulses %0d", n_tail));

    // no-header, no-tailer data shift of 4 bits from Shift-DR
    access(6'h01, 4, 16'h0005, c, rd);
    access(6'h00, 4, 16'h0003, c, rd);
    check(tap.st == tap.SH_DR, "command 00 stays in Shift-DR");
    access(6'h02, 8, 16'h00FF, c, rd);
    check(tap.dr == 16'hFF35, $sformatf("three-part DR = %h", tap.dr));

    // command for another device is ignored
    @(negedge slowclk); device = 0; command = {4'd15, 6'h03}; strobe = 1;
    repeat (60) @(posedge slowclk);
    check(!dtack && !dvcenb && tap.dr == 16'hFF35, "other device ignored");
    strobe = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
