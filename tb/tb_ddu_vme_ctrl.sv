// tb_ddu_vme_ctrl: end-to-end test of the DDU VME controller at its default
// configuration. A VME master task runs A24/D16 cycles; behavioural models
// stand in for the eight JTAG chains, the serial flash and the serial ADC.
// Every mechanism is exercised and counted, and a mechanism that never
// happened counts as a failure:
//   JTAG TAP reset, IR/DR scans and TDO read-back on an FPGA chain (SCLK)
//   and a PROM chain (SLOWCLK2, 3-stated when idle); the User1/User2 access
//   sequence on the DDU_Ctrl FPGA; return of the FPGA
//   chains to Test-Logic-Reset after a hard reset; serial-ADC control write
//   and read; parallel registers incl. input-register pipeline and FMM
//   override; flash status, program, read with destination load; input-FIFO
//   direct load and read-back; auto load;
//   broadcast write; refusal of an illegal access (no DTACK); IRQ1 and its
//   IACK cycle; FMM LED blinking; diagnostic header selection (LED modes and
//   debug groups); soft reset.
module tb_ddu_vme_ctrl;
  import ddu_vme_pkg::*;
  logic fastclk = 0, sclk = 0, bclk = 0, hard_rst_n = 1, soft_rst = 0;
  logic [23:0] adr;
  logic as_n, ds0_n, ds1_n, write_n, iack_n, iack_in_n;
  logic [4:0] ga;
  logic [15:0] vme_din, vme_dout;
  logic vme_doe, dtack_n, iack_out_n, irq1_n;
  logic [7:0] mode_sw;
  logic [15:0] csc_busy, csc_warn, csc_sync, csc_err;
  logic [4:0][15:0] rst_test;
  logic [3:0] ddu_fmm, fmm_out;
  logic fmm_warn, fmm_sync, fmm_busy, fmm_set_rdy, grn_led_n, yel_led_n;
  logic [2:0] gbe_prescale, fake_l1;
  logic slink_wait_en;
  logic [15:0] la0, la1;
  logic [7:0] jtag_tdo, jtag_tck, jtag_tms, jtag_tdi, jtag_oe;
  logic adc_dout, adc_din, adc_clk, adc_cs_n;
  logic m_cs_n, m_sck, m_si, m_so, dst_sclk, dst_sdi;
  logic [7:0] dst_en;
  logic [3:0] infifo_sdo;
  logic auto_req;
  logic [11:0] chan_val [8];

  int checks = 0, failures = 0;
  // mechanism counters
  int n_tap_reset = 0, n_ir = 0, n_dr = 0, n_tdo_rd = 0, n_prom_scan = 0, n_restore = 0;
  int n_adc_wr = 0, n_adc_rd = 0, n_pipe = 0, n_override = 0, n_flash_stat = 0;
  int n_flash_prog = 0, n_flash_read = 0, n_autoload = 0, n_bcast = 0, n_refused = 0;
  int n_iack = 0, n_blink = 0, n_diag = 0, n_soft = 0, n_typical = 0;
  int n_fifo_load = 0, n_fifo_rd = 0;

  // instruction-register lengths of the chips on chains 1..8: VME PROM 8,
  // InCtrl FPGAs 14, InCtrl PROMs 8+8, S-Link 8, DDU_Ctrl PROMs 8+8,
  // output FIFO 4, DDU_Ctrl FPGA 10
  localparam int unsigned IRLEN_OF_CHAIN [8] = '{8, 14, 14, 16, 8, 16, 4, 10};

  ddu_vme_ctrl dut (.*);

  for (genvar c = 0; c < 8; c++) begin : g_tap
    jtag_tap_model #(.IRLEN(IRLEN_OF_CHAIN[c]), .CAPTURE(16'h1000 + 16'(c))) tap (
      .tck(jtag_tck[c]), .tms(jtag_tms[c]), .tdi(jtag_tdi[c]), .tdo(jtag_tdo[c]));
  end
  dataflash_model #(.STATUS(8'h8D)) flash (.cs_n(m_cs_n), .sck(m_sck), .si(m_si), .so(m_so));
  max1271_model adc (.cs_n(adc_cs_n), .sclk(adc_clk), .din(adc_din), .dout(adc_dout), .chan_val(chan_val));

  always #6.25 fastclk = ~fastclk;   // 80 MHz
  always #50   sclk    = ~sclk;      // 10 MHz
  always #1000 bclk    = ~bclk;      // blink clock, shortened for simulation

  logic [47:0] cap [8];
  int ncap [8];
  always @(posedge dst_sclk)
    for (int i = 0; i < 8; i++)
      if (dst_en[i]) begin cap[i] = {cap[i][46:0], dst_sdi}; ncap[i]++; end

  // TCK period of each chain, from its last two rising edges
  realtime tck_rise [8], tck_period [8];
  for (genvar c = 0; c < 8; c++) begin : g_tckmon
    always @(posedge jtag_tck[c]) begin
      tck_period[c] = $realtime - tck_rise[c];
      tck_rise[c]   = $realtime;
    end
  end

  // input FIFOs 0-3 present the top bit of their 32-bit offset word
  assign infifo_sdo = {cap[3][31], cap[2][31], cap[1][31], cap[0][31]};

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  function automatic logic [23:0] a_jtag(input logic [4:0] slot, input int d, input int nbits, input logic [5:0] op);
    return {slot, 3'b000, 4'(d), 4'(nbits - 1), op, 2'b00};
  endfunction
  function automatic logic [23:0] a_ser(input logic [4:0] slot, input int d, input int c);
    return {slot, 3'b100, 4'(d), 6'b0, 4'(c), 2'b00};
  endfunction
  function automatic logic [23:0] a_par(input logic [4:0] slot, input int d, input int c);
    return {slot, 3'b011, 4'(d), 2'b0, 8'(c), 2'b00};
  endfunction

  // VME cycle; ok = 0 when no DTACK came within the timeout
  task automatic vme(input logic [23:0] a, input bit wr, input logic [15:0] wd,
                     output logic [15:0] rd, output bit ok);
    int t;
    @(posedge fastclk);
    adr = a; write_n = !wr; vme_din = wd;
    #20 as_n = 0;
    #20 ds0_n = 0; ds1_n = 0;
    t = 0;
    while (dtack_n && t < 400000) begin @(posedge fastclk); t++; end
    ok = !dtack_n;
    #30 rd = vme_dout;
    if (ok && !wr) check(vme_doe, "data drivers on during read");
    ds0_n = 1; ds1_n = 1;
    #20 as_n = 1; write_n = 1;
    t = 0;
    while (!dtack_n && t < 400000) begin @(posedge fastclk); t++; end
    check(dtack_n, "DTACK released after the strobes");
  endtask

  task automatic vw(input logic [23:0] a, input logic [15:0] wd);
    logic [15:0] rd; bit ok;
    vme(a, 1, wd, rd, ok);
    check(ok, $sformatf("write %h acknowledged", a));
  endtask
  task automatic vr(input logic [23:0] a, output logic [15:0] rd);
    bit ok;
    vme(a, 0, 16'h0, rd, ok);
    check(ok, $sformatf("read %h acknowledged", a));
  endtask

  initial begin
    #50000000 failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [4:0] SLOT = 5'd11;

  initial begin
    logic [15:0] rd;
    bit ok;
    as_n = 1; ds0_n = 1; ds1_n = 1; write_n = 1; iack_n = 1; iack_in_n = 1;
    adr = '0; vme_din = '0; ga = SLOT; mode_sw = 8'h00; auto_req = 0;
    csc_busy = 16'h0003; csc_warn = 16'h0100; csc_sync = 0; csc_err = 0;
    for (int i = 0; i < 5; i++) rst_test[i] = 16'hA000 + 16'(i);
    ddu_fmm = 4'b1000; fmm_warn = 0; fmm_sync = 0; fmm_busy = 0;
    for (int i = 0; i < 8; i++) begin chan_val[i] = 12'h100 * 12'(i) + 12'h2A; cap[i] = 0; ncap[i] = 0; end
    #5 hard_rst_n = 0;
    #500 hard_rst_n = 1;
    repeat (20) @(posedge sclk);
    check(fmm_set_rdy, "ready after reset sequence");

    // ---------------- JTAG, FPGA chain (device 6 -> chain index 1) --------------
    vw(a_jtag(SLOT, 6, 1, 6'h06), 16'h0);
    check(g_tap[1].tap.in_rti, "TAP reset to Run-Test/Idle"); n_tap_reset++;
    vw(a_jtag(SLOT, 6, 14, 6'h0F), 16'h3FC3);
    check(g_tap[1].tap.ir == 14'h3FC3, "14-bit IR scan on InCtrl FPGA 0"); n_ir++;
    vw(a_jtag(SLOT, 6, 16, 6'h03), 16'h5AA5);
    check(g_tap[1].tap.dr == 16'h5AA5, "DR scan on InCtrl FPGA 0"); n_dr++;
    check(tck_period[1] == 200.0, $sformatf("InCtrl FPGA TCK period %0t (SCLK/2)", tck_period[1]));
    vr(a_jtag(SLOT, 6, 1, 6'h05), rd);
    check(rd == 16'h1001, $sformatf("TDO read-back %h", rd)); n_tdo_rd++;
    check(g_tap[2].tap.n_upd_dr == 0, "other chains untouched");

    // ---------------- typical User1/User2 access, DDU_Ctrl FPGA (device 5 -> chain 8) ---
    // IR User1, 8-bit DR "select function", IR User2, 16-bit User2 DR words,
    // IR User1, 8-bit DR "no-op", IR Bypass; every scan has header and tailer
    begin
      int unsigned ui0, ud0;
      vw(a_jtag(SLOT, 5, 1, 6'h06), 16'h0);
      ui0 = g_tap[7].tap.n_upd_ir; ud0 = g_tap[7].tap.n_upd_dr;
      vw(a_jtag(SLOT, 5, 10, 6'h0F), 16'h03C2);
      check(g_tap[7].tap.ir == 10'h3C2, "IR User1");
      vr(a_jtag(SLOT, 5, 1, 6'h05), rd);
      check(rd == 16'h0040, $sformatf("IR capture 0000000001 read back in bits 15-6: %h", rd));
      vw(a_jtag(SLOT, 5, 8, 6'h03), 16'h00A1);
      check(g_tap[7].tap.dr == 16'hA110, $sformatf("8-bit User1 DR %h", g_tap[7].tap.dr));
      vw(a_jtag(SLOT, 5, 10, 6'h0F), 16'h03C3);
      check(g_tap[7].tap.ir == 10'h3C3, "IR User2");
      for (int k = 0; k < 2; k++) begin
        vw(a_jtag(SLOT, 5, 16, 6'h03), 16'h6C00 + 16'(k));
        check(g_tap[7].tap.dr == 16'h6C00 + 16'(k), "User2 DR word");
        vr(a_jtag(SLOT, 5, 1, 6'h05), rd);
        check(rd == 16'h1007, $sformatf("User2 DR capture read back %h", rd));
      end
      vw(a_jtag(SLOT, 5, 10, 6'h0F), 16'h03C2);
      vw(a_jtag(SLOT, 5, 8, 6'h03), 16'h0000);
      check(g_tap[7].tap.dr == 16'h0010, "8-bit User1 no-op");
      vw(a_jtag(SLOT, 5, 10, 6'h0F), 16'h03FF);
      check(g_tap[7].tap.ir == 10'h3FF && g_tap[7].tap.in_rti, "IR Bypass, TAP idle");
      check(tck_period[7] == 1600.0, $sformatf("DDU_Ctrl FPGA TCK period %0t (SLOWCLK2/2)", tck_period[7]));
      check(g_tap[7].tap.n_upd_ir - ui0 == 4 && g_tap[7].tap.n_upd_dr - ud0 == 4,
            "four IR and four DR updates");
      n_typical++;
    end

    // ---------------- JTAG, PROM chain (device 2 -> chain index 0) ---------------
    check(jtag_oe[0] == 1'b0, "PROM chain 3-stated when idle");
    vw(a_jtag(SLOT, 2, 1, 6'h06), 16'h0);
    vw(a_jtag(SLOT, 2, 8, 6'h0F), 16'h00FE);
    vw(a_jtag(SLOT, 2, 16, 6'h03), 16'h0F0F);
    vr(a_jtag(SLOT, 2, 1, 6'h05), rd);
    check(g_tap[0].tap.ir == 8'hFE && g_tap[0].tap.dr == 16'h0F0F && rd == 16'h1000,
          "scans on the VME PROM chain"); n_prom_scan++;
    check(tck_period[0] == 1600.0, $sformatf("PROM TCK period %0t (SLOWCLK2/2)", tck_period[0]));

    // ---------------- restore-idle after hard reset -------------------------------
    vw(a_jtag(SLOT, 7, 1, 6'h06), 16'h0);
    vw(a_jtag(SLOT, 7, 4, 6'h0D), 16'h0);           // leave InCtrl FPGA 1 in Shift-IR
    check(g_tap[2].tap.in_shir, "chain 3 left in Shift-IR");
    hard_rst_n = 0; #300 hard_rst_n = 1;
    repeat (12) @(posedge sclk);
    check(g_tap[2].tap.in_tlr && g_tap[1].tap.in_tlr,
          "FPGA chains back in Test-Logic-Reset"); n_restore++;

    // ---------------- serial ADC (device 13) ---------------------------------------
    for (int ch = 0; ch < 8; ch += 3) begin
      vw(a_jtag(SLOT, 13, 1, 6'h00), {8'h00, 1'b1, 3'(ch), 4'b0001}); n_adc_wr++;
      vr(a_jtag(SLOT, 13, 1, 6'h01), rd); n_adc_rd++;
      check(rd == {4'h0, chan_val[ch]}, $sformatf("ADC channel %0d = %h", ch, rd));
    end

    // ---------------- parallel registers -------------------------------------------
    vr(a_par(SLOT, 0, 0), rd); check(rd == 16'h0003, "busy flags");
    vr(a_par(SLOT, 1, 0), rd); check(rd == 16'h0100, "warning flags");
    vr(a_par(SLOT, 14, 0), rd); check(rd == {8'hCA, mode_sw}, "identifier register");
    vw(a_par(SLOT, 8, 8'h80), 16'h0002);
    vw(a_par(SLOT, 8, 8'h80), 16'h1234);
    vw(a_par(SLOT, 8, 8'h80), 16'h5678);
    vr(a_par(SLOT, 8, 8'h02), rd); check(rd == 16'h0002, "input register 2"); n_pipe++;
    vr(a_par(SLOT, 8, 8'h04), rd); check(rd == 16'hA001, "reset-test register 1");
    vw(a_par(SLOT, 9, 8'h80), 16'h0C0C);
    check(gbe_prescale == 3'b100 && slink_wait_en, "GbE prescale / S-Link wait");
    vw(a_par(SLOT, 9, 8'h85), 16'h0005); check(fake_l1 == 3'b101, "fake L1 register");
    vw(a_par(SLOT, 9, 8'h8F), 16'hF0E2);
    check(fmm_out == 4'b0010, "FMM forced to lost-sync"); n_override++;
    vr(a_par(SLOT, 15, 0), rd); check(rd[14:11] == 4'b0010 && rd[4:0] == SLOT, "status register");

    // lost sync blinks both LEDs
    begin
      int tg, ty;
      logic pg, py;
      tg = 0; ty = 0;
      pg = grn_led_n; py = yel_led_n;
      repeat (8) begin @(posedge bclk); #20;
        if (grn_led_n != pg) tg++; if (yel_led_n != py) ty++; pg = grn_led_n; py = yel_led_n; end
      check(tg >= 6 && ty >= 6, $sformatf("both LEDs blink (%0d, %0d)", tg, ty)); n_blink++;
    end
    vw(a_par(SLOT, 9, 8'h8F), 16'h0000);
    check(fmm_out == 4'b1000, "override removed");
    repeat (3) @(posedge bclk); #20;
    check(!grn_led_n && yel_led_n, "ready: green on, yellow off");

    // ---------------- illegal access: write to read-only parallel device 0 ------
    vme(a_par(SLOT, 0, 8'h80), 1, 16'hFFFF, rd, ok);
    check(!ok, "write to read-only device refused"); if (!ok) n_refused++;
    // wrong slot
    vme(a_par(5'd3, 0, 0), 0, 16'h0, rd, ok);
    check(!ok, "other slot ignored"); if (!ok) n_refused++;

    // ---------------- broadcast write (slot 28) -------------------------------------
    vw(a_par(DDU_BCAST_SLOT, 9, 8'h85), 16'h0002);
    check(fake_l1 == 3'b010, "broadcast write"); n_bcast++;

    // ---------------- serial flash ----------------------------------------------------
    vr(a_ser(SLOT, 4, 0), rd); check(rd == 16'h008D, "flash status"); n_flash_stat++;
    // page 1: kill mask 0x00F1 (input registers now 0x5678, 0x1234, 0x0002 -> reload)
    vw(a_par(SLOT, 8, 8'h80), 16'h00F1);
    vw(a_ser(SLOT, 4, 9), 16'h0);
    check(flash.pdata[1][15:0] == 16'h00F1, "page 1 programmed"); n_flash_prog++;
    vw(a_par(SLOT, 8, 8'h80), 16'h0001);
    vw(a_par(SLOT, 8, 8'h80), 16'hCAFE);
    vw(a_par(SLOT, 8, 8'h80), 16'hF00D);
    vw(a_ser(SLOT, 4, 4'hD), 16'h0);
    check(flash.pdata[5][33:0] == 34'h1_CAFE_F00D, "page 5 programmed"); n_flash_prog++;
    vw(a_par(SLOT, 8, 8'h80), 16'h0B1D);
    vw(a_ser(SLOT, 4, 4'hF), 16'h0);
    check(flash.pdata[7][15:0] == 16'h0B1D, "page 7 programmed"); n_flash_prog++;
    vr(a_ser(SLOT, 4, 1), rd);
    check(rd == 16'h00F1 && ncap[5] == 16 && cap[5][15:0] == 16'h00F1, "page 1 read into DDU_Ctrl");
    n_flash_read++;
    // direct load of input FIFO 1 (serial device 9) and its read-back (device 1)
    vw(a_ser(SLOT, 9, 0), 16'h0);
    check(ncap[1] == 32 && cap[1][31:0] == 32'hF00D_0B1D, "direct load of InFIFO 1"); n_fifo_load++;
    vr(a_ser(SLOT, 1, 0), rd);
    check(rd == 16'h0B1D && ncap[1] == 64 && cap[1][31:0] == 32'hF00D_0B1D,
          $sformatf("InFIFO 1 read back %h, offsets kept", rd)); n_fifo_rd++;

    // ---------------- auto load --------------------------------------------------------
    for (int i = 0; i < 8; i++) begin cap[i] = 0; ncap[i] = 0; end
    @(posedge sclk) auto_req = 1;
    repeat (10) @(posedge sclk);
    begin
      int t;
      t = 0;
      while (ncap[4] < 34 && t < 20000) begin @(posedge sclk); t++; end
      repeat (10) @(posedge sclk);
    end
    auto_req = 0;
    check(ncap[5] == 16 && cap[5][15:0] == 16'h00F1, "auto load kill mask");
    check(ncap[6] == 16 && cap[6][15:0] == 16'h0B1D, "auto load board ID");
    check(ncap[4] == 34 && cap[4][33:0] == 34'h1_CAFE_F00D, "auto load GbE offsets");
    n_autoload++;

    // ---------------- IRQ1 and interrupt acknowledge ------------------------------------
    check(irq1_n, "no interrupt without errors");
    csc_err = 16'h0006; csc_sync = 16'h0001;
    #10 check(!irq1_n, "IRQ1 on CSC error");
    @(posedge fastclk);
    adr = 24'h000002; iack_n = 0; write_n = 1;
    #20 as_n = 0; #10 iack_in_n = 0;
    #20 ds0_n = 0; ds1_n = 0;
    begin
      int t;
      t = 0;
      while (dtack_n && t < 1000) begin @(posedge fastclk); t++; end
      check(!dtack_n, "IACK cycle acknowledged");
      #20 check(vme_dout == {8'd3, 3'b000, SLOT} && vme_doe, $sformatf("IACK status word %h", vme_dout));
      check(iack_out_n, "IACK not passed on");
    end
    ds0_n = 1; ds1_n = 1; #20 as_n = 1; iack_in_n = 1; iack_n = 1;
    #50 check(dtack_n, "IACK DTACK released"); n_iack++;
    csc_err = 0; csc_sync = 0;

    // ---------------- diagnostic headers -------------------------------------------------
    mode_sw = 8'h01;
    vw(a_jtag(SLOT, 6, 1, 6'h06), 16'h0);
    #20 check(la1[15] == 1'b0 && la1[5] == 1'b0, "JTAG debug word idle");
    // debug group select (mode bits 5-4) on LA1 in LED mode 0, checked
    // while no VME cycle is running, so only the idle parts of each word are compared
    mode_sw = 8'h10; #20 check(la1[15] == 1'b0 && la1[14] == 1'b0, "VME-Serial debug group idle");
    mode_sw = 8'h20; #20 check(la1[15] == 1'b1 && la1[14] == 1'b0, "flash debug group: chip select high, clock low");
    mode_sw = 8'h30; #20 check(la1[15:13] == 3'b000 && la1[3:0] == fmm_out, "VME-Parallel debug group shows FMM");
    mode_sw = 8'h00; #20 check(la1[3:0] == fmm_out && la1[15] == 1'b0, "standard debug group shows FMM");
    n_diag++;
    mode_sw = 8'h80; #20 check(la0 == 16'hFFFF && la1 == 16'hFFFF, "all LA bits high"); n_diag++;
    mode_sw = 8'h0E; vw(a_jtag(SLOT, 13, 1, 6'h00), 16'h0081);
    #20 check(la0[15:12] == 4'b0001, "ADC debug word on LA0"); n_diag++;
    mode_sw = 8'h00;

    // ---------------- soft reset -----------------------------------------------------
    vw(a_par(SLOT, 9, 8'h8F), 16'hF0E4);
    check(fmm_out == 4'b0100, "override set");
    @(posedge sclk) soft_rst = 1; @(posedge sclk) soft_rst = 0;
    check(fmm_out == 4'b1000, "soft reset clears FMM override"); n_soft++;

    check(n_tap_reset > 0, "mechanism: TAP reset");
    check(n_ir > 0 && n_dr > 0 && n_tdo_rd > 0, "mechanism: IR/DR scans and read-back");
    check(n_prom_scan > 0, "mechanism: PROM chain");
    check(n_typical > 0, "mechanism: typical User1/User2 sequence");
    check(n_restore > 0, "mechanism: restore idle");
    check(n_adc_wr > 0 && n_adc_rd > 0, "mechanism: ADC");
    check(n_pipe > 0 && n_override > 0, "mechanism: input pipeline / FMM override");
    check(n_flash_stat > 0 && n_flash_prog > 0 && n_flash_read > 0, "mechanism: flash");
    check(n_autoload > 0, "mechanism: auto load");
    check(n_fifo_load > 0 && n_fifo_rd > 0, "mechanism: FIFO direct load / read-back");
    check(n_bcast > 0 && n_refused > 0, "mechanism: broadcast / refusal");
    check(n_iack > 0 && n_blink > 0 && n_diag > 0 && n_soft > 0, "mechanism: IACK / blink / diag / soft reset");
    $display("mechanisms: tap_reset=%0d ir=%0d dr=%0d tdo=%0d prom=%0d typical=%0d restore=%0d adc=%0d/%0d pipe=%0d ovr=%0d",
             n_tap_reset, n_ir, n_dr, n_tdo_rd, n_prom_scan, n_typical, n_restore, n_adc_wr, n_adc_rd, n_pipe, n_override);
    $display("mechanisms: fifo_load=%0d fifo_rd=%0d", n_fifo_load, n_fifo_rd);
    $display("mechanisms: fstat=%0d fprog=%0d fread=%0d auto=%0d bcast=%0d refused=%0d iack=%0d blink=%0d diag=%0d soft=%0d",
             n_flash_stat, n_flash_prog, n_flash_read, n_autoload, n_bcast, n_refused, n_iack, n_blink, n_diag, n_soft);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
