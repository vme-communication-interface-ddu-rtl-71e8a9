// tb_vme_par_regs: VME-Parallel register file. Reads of the status devices
// 0-4 and 14/15, sticky histories 5/6, the input-register pipeline 0->1->2
// (device 8), reset-test registers, the GbE prescale register with its
// nibble check, the fake-L1 register, the FMM test register and FMM
// override key F0E, and soft reset clearing only the FMM test register.
module tb_vme_par_regs;
  logic sclk = 0, rst = 0, soft_rst = 0, sel, write, strobe, vme_rdy;
  logic [3:0] dev, fmm_state, fmm_out;
  logic [7:0] cmd, mode_sw;
  logic [15:0] indata, csc_busy, csc_warn, csc_sync, csc_err, outdata;
  logic [4:0][15:0] rst_test;
  logic [4:0] ga;
  logic outdata_en, dtack, slink_wait_en, fmm_override_en;
  logic [2:0][15:0] inreg;
  logic [2:0] gbe_prescale, fake_l1;
  int checks = 0, failures = 0;

  vme_par_regs dut (.*);
  always #50 sclk = ~sclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic vwrite(input logic [3:0] d, input logic [7:0] c, input logic [15:0] v);
    @(negedge sclk); sel = 1; dev = d; cmd = c; write = 1; indata = v; strobe = 1;
    while (!dtack) @(negedge sclk);
    strobe = 0; write = 0;
    while (dtack) @(negedge sclk);
  endtask

  task automatic vread(input logic [3:0] d, input logic [7:0] c, output logic [15:0] v);
    @(negedge sclk); sel = 1; dev = d; cmd = c; write = 0; strobe = 1;
    while (!dtack) @(negedge sclk);
    check(outdata_en, "outdata_en during read");
    v = outdata;
    strobe = 0;
    while (dtack) @(negedge sclk);
  endtask

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v, w0, w1, w2, bh, wh;
    sel = 0; write = 0; strobe = 0; dev = 0; cmd = 0; indata = 0;
    csc_busy = 16'h8001; csc_warn = 16'h0010; csc_sync = 16'h0200; csc_err = 16'h4000;
    for (int i = 0; i < 5; i++) rst_test[i] = 16'h1111 * (i + 1);
    mode_sw = 8'h5A; vme_rdy = 1; fmm_state = 4'b1000; ga = 5'd9;
    #1 rst = 1; soft_rst = 1; #200 rst = 0; soft_rst = 0;
    vread(0, 0, v); check(v == 16'h8001, "dev0 busy");
    vread(1, 0, v); check(v == 16'h0010, "dev1 warn");
    vread(2, 0, v); check(v == 16'h0200, "dev2 sync");
    vread(3, 0, v); check(v == 16'h4000, "dev3 err");
    vread(4, 0, v); check(v == 16'h4200, "dev4 summary");
    vread(14, 0, v); check(v == 16'hCA5A, $sformatf("dev14 %h", v));
    vread(15, 0, v); check(v == {1'b1, 4'b1000, 6'b0, 5'd9}, $sformatf("dev15 %h", v));
    // histories are sticky
    bh = 16'h8001; wh = 16'h0010;
    for (int i = 0; i < 5; i++) begin
      csc_busy = 16'($urandom); csc_warn = 16'($urandom);
      bh |= csc_busy; wh |= csc_warn;
      repeat (2) @(negedge sclk);
    end
    csc_busy = 0; csc_warn = 0;
    vread(5, 0, v); check(v == wh, "dev5 warning history");
    vread(6, 0, v); check(v == bh, "dev6 busy history");
    // input register pipeline
    w0 = 16'hBEEF; w1 = 16'h1234; w2 = 16'hC0DE;
    vwrite(8, 8'h80, w2); vwrite(8, 8'h80, w1); vwrite(8, 8'h80, w0);
    vread(8, 0, v); check(v == w0, "inreg0");
    vread(8, 1, v); check(v == w1, "inreg1");
    vread(8, 2, v); check(v == w2, "inreg2");
    check(inreg[0] == w0 && inreg[1] == w1 && inreg[2] == w2, "inreg outputs");
    for (int i = 0; i < 5; i++) begin
      vread(8, 8'(3 + i), v); check(v == 16'h1111 * (i + 1), $sformatf("reset-test reg %0d", i));
    end
    // GbE prescale register with nibble check
    vwrite(9, 8'h80, 16'h0505);       // bits 0,2 in nibbles 0 and 2, clear in 1 and 3
    check(gbe_prescale == 3'b101 && !slink_wait_en, $sformatf("prescale %b", gbe_prescale));
    vwrite(9, 8'h80, 16'h8D0D);       // bit 3 also set in nibble 3: S-Link wait refused
    check(gbe_prescale == 3'b101 && !slink_wait_en, "slink wait refused when bit 15 set");
    vwrite(9, 8'h80, 16'h0D0D);
    check(gbe_prescale == 3'b101 && slink_wait_en, $sformatf("prescale %b slink %b", gbe_prescale, slink_wait_en));
    vwrite(9, 8'h80, 16'h0055);       // bit 0,2 also set in nibble 1, nibble 2 empty
    check(gbe_prescale == 3'b000 && !slink_wait_en, "incomplete pattern rejected");
    vread(9, 8'h00, v); check(v == 16'h0055, "GbE register read");
    // fake L1
    vwrite(9, 8'h85, 16'h0006);
    check(fake_l1 == 3'b110, "fake L1 bits");
    vread(9, 8'h05, v); check(v == 16'h0006, "fake L1 read");
    // FMM test register and override
    vwrite(9, 8'h8F, 16'hF0D4);
    check(!fmm_override_en && fmm_out == 4'b1000, "wrong key, no override");
    vwrite(9, 8'h8F, 16'hF0E4);
    check(fmm_override_en && fmm_out == 4'b0100, "key F0E overrides FMM");
    vread(15, 0, v); check(v[14:11] == 4'b0100, "dev15 shows overridden FMM");
    vread(9, 8'h0F, v); check(v == 16'hF0E4, "FMM register read");
    @(negedge sclk); soft_rst = 1; @(negedge sclk); soft_rst = 0;
    check(!fmm_override_en && fmm_out == 4'b1000, "soft reset clears override");
    check(fake_l1 == 3'b110, "soft reset keeps other registers");
    // a read does not write
    vread(8, 8'h00, v); check(inreg[0] == w0, "read leaves inreg");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
