// ddu_vme_ctrl: VME controller FPGA of the CMS CSC DDU board.
// It is a VME A24/D16 slave that gives the crate controller four services:
//  * VME-JTAG (address type 000): eight JTAG chains (PROMs, FPGAs, FIFOs,
//    S-Link) each driven by a vme_jtag engine; device number -> chain:
//    1->7 output FIFO, 2->1 VME PROM, 3->6 DDU_Ctrl PROMs, 4->4 InCtrl
//    PROMs, 5->8 DDU_Ctrl FPGA, 6->2 InCtrl FPGA 0, 7->3 InCtrl FPGA 1,
//    8->5 S-Link. PROM chains (1, 4, 6) run from SLOWCLK2 (1.25 MHz) and
//    3-state their pins when idle. The DDU_Ctrl FPGA chain (8) also runs
//    from SLOWCLK2; the other chains run from SCLK. All non-PROM chains are
//    walked to Test-Logic-Reset after a hard reset. Device 13 is the serial ADC.
//  * VME-Serial (type 100): serial flash with the board constants and the
//    serial-load ports of the FIFOs and DDU_Ctrl FPGA (vme_serial).
//  * VME-Parallel (type 011): status, history and control registers
//    (vme_par_regs), including the FMM override.
//  * Interrupt level 1, raised while any CSC has lost sync or an error;
//    the IACK cycle is answered with {count of flagged CSCs, 3'b0, slot}.
// FMM: the 4-bit FMM state (possibly overridden) goes out on fmm_out and
// to two front-panel LEDs through fmm_decode / fmmled.
// Clocks: fastclk 80 MHz, sclk 10 MHz (MIDCLK), bclk the LED blink clock;
// SLOWCLK (2.5 MHz) and SLOWCLK2 (1.25 MHz) are derived from sclk.
// VME handshake: a cycle is accepted while as_n, ds0_n, ds1_n are low, iack_n
// is high, the slot matches and the access is legal; dtack_n goes low when
// the addressed unit has finished and rises after the strobes are released.
// vme_doe enables the data drivers on reads. Reset: hard_rst_n clears all
// state; soft_rst clears all state except the clock dividers.
// The service split, device numbers and register map follow the
// controller's design notes, as does the use of mode switch bits 5-4 to
// pick the debug group (standard, VME-Serial, flash, VME-Parallel) shown on
// the headers; the signals inside each debug word, the IRQ
// condition, the IACK status word and the strobe qualification are this
// design's choices.
module ddu_vme_ctrl
  import ddu_vme_pkg::*;
(
  input  logic        fastclk,
  input  logic        sclk,
  input  logic        bclk,
  input  logic        hard_rst_n,
  input  logic        soft_rst,
  // VME bus
  input  logic [23:0] adr,
  input  logic        as_n,
  input  logic        ds0_n,
  input  logic        ds1_n,
  input  logic        write_n,
  input  logic        iack_n,
  input  logic        iack_in_n,
  input  logic [4:0]  ga,
  input  logic [15:0] vme_din,
  output logic [15:0] vme_dout,
  output logic        vme_doe,
  output logic        dtack_n,
  output logic        iack_out_n,
  output logic        irq1_n,
  // board
  input  logic [7:0]  mode_sw,
  input  logic [15:0] csc_busy,
  input  logic [15:0] csc_warn,
  input  logic [15:0] csc_sync,
  input  logic [15:0] csc_err,
  input  logic [4:0][15:0] rst_test,
  input  logic [3:0]  ddu_fmm,      // FMM state from DDU_Ctrl
  input  logic        fmm_warn,
  input  logic        fmm_sync,
  input  logic        fmm_busy,
  output logic [3:0]  fmm_out,
  output logic        fmm_set_rdy,
  output logic        grn_led_n,
  output logic        yel_led_n,
  output logic [2:0]  gbe_prescale,
  output logic        slink_wait_en,
  output logic [2:0]  fake_l1,
  output logic [15:0] la0,
  output logic [15:0] la1,
  // JTAG chains 1..8 (index 0 = chain 1)
  input  logic [7:0]  jtag_tdo,
  output logic [7:0]  jtag_tck,
  output logic [7:0]  jtag_tms,
  output logic [7:0]  jtag_tdi,
  output logic [7:0]  jtag_oe,
  // serial ADC
  input  logic        adc_dout,
  output logic        adc_din,
  output logic        adc_clk,
  output logic        adc_cs_n,
  // serial flash and serial-load ports
  output logic        m_cs_n,
  output logic        m_sck,
  output logic        m_si,
  input  logic        m_so,
  output logic        dst_sclk,
  output logic        dst_sdi,
  output logic [7:0]  dst_en,
  input  logic [3:0]  infifo_sdo,   // serial outputs of input FIFOs 0-3
  input  logic        auto_req
);
  // chain index (0-based) of JTAG device numbers 1..8
  localparam int unsigned CHAIN_OF_DEV [1:8] = '{6, 0, 5, 3, 7, 1, 2, 4};
  // chains that are PROMs: slow clock and 3-state pins
  localparam logic [7:0] PROM_CHAIN = 8'b0010_1001;
  // chains clocked from SLOWCLK2: the PROMs and the DDU_Ctrl FPGA (chain 8)
  localparam logic [7:0] SLOW_CHAIN = PROM_CHAIN | 8'b1000_0000;

  logic rst, slowclk, slowclk2, restore_idle;
  logic write, strobe;
  logic slot_hit, bcast, jtag_sel, ser_sel, par_sel, access_ok;
  logic [13:0] jtag_dev;
  logic [9:0]  jtag_cmd;
  logic [3:0]  dev, ser_cmd;
  logic [7:0]  par_cmd;

  assign rst   = ~hard_rst_n | soft_rst;
  assign write = ~write_n;

  clk_div u_clk_div (
    .midclk(sclk), .fastclk(fastclk), .rst_n(hard_rst_n),
    .slowclk(slowclk), .slowclk2(slowclk2)
  );

  jtag_restore_idle u_restore (.sclk(sclk), .njr(hard_rst_n), .restore_idle(restore_idle));

  vme_addr_decode u_dec (
    .adr(adr), .ga(ga), .write(write),
    .slot_hit(slot_hit), .bcast(bcast), .jtag_sel(jtag_sel), .jtag_dev(jtag_dev),
    .jtag_cmd(jtag_cmd), .ser_sel(ser_sel), .par_sel(par_sel), .dev(dev),
    .ser_cmd(ser_cmd), .par_cmd(par_cmd), .access_ok(access_ok)
  );

  assign strobe = ~as_n & ~ds0_n & ~ds1_n & iack_n & slot_hit & access_ok;

  // ---- JTAG chains -----------------------------------------------------
  logic [7:0]        ch_dev, ch_dvcenb, ch_tck, ch_tms, ch_tdi, ch_dtack, ch_oden;
  logic [7:0][15:0]  ch_out;
  logic [7:0]        ch_load, ch_rdtdobk, ch_donetail;

  always_comb
    for (int d = 1; d <= 8; d++)
      ch_dev[CHAIN_OF_DEV[d]] = jtag_dev[d];

  for (genvar c = 0; c < 8; c++) begin : g_chain
    logic jclk;
    assign jclk = SLOW_CHAIN[c] ? slowclk2 : sclk;

    vme_jtag u_jtag (
      .slowclk(jclk), .rst(rst), .device(ch_dev[c]), .command(jtag_cmd),
      .indata(vme_din), .strobe(strobe), .tdo(jtag_tdo[c]),
      .dvcenb(ch_dvcenb[c]), .outdata(ch_out[c]), .outdata_en(ch_oden[c]),
      .dtack(ch_dtack[c]), .tdi(ch_tdi[c]), .tms(ch_tms[c]), .tck(ch_tck[c]),
      .load(ch_load[c]), .rdtdobk(ch_rdtdobk[c]), .donetail(ch_donetail[c])
    );

    jtag_out_gate #(.TRISTATE(PROM_CHAIN[c])) u_gate (
      .dvcenb(ch_dvcenb[c]), .tck(ch_tck[c]), .tms(ch_tms[c]), .tdi(ch_tdi[c]),
      .restore_idle(restore_idle), .sclk(sclk),
      .otck(jtag_tck[c]), .otms(jtag_tms[c]), .otdi(jtag_tdi[c]), .oe(jtag_oe[c])
    );
  end

  // ---- serial ADC (JTAG-type device 13) --------------------------------
  logic [15:0] adc_out, diagadc;
  logic        adc_oden, adc_dtack, adc_led;

  seradc u_adc (
    .slowclk(slowclk), .rst(rst), .device(jtag_dev[13]), .command(jtag_cmd),
    .indata(vme_din), .strobe(strobe), .adcin(adc_dout),
    .outdata(adc_out), .outdata_en(adc_oden), .dtack(adc_dtack),
    .adcdata(adc_din), .adcclk(adc_clk), .adcena_n(adc_cs_n),
    .led(adc_led), .diagadc(diagadc)
  );

  // ---- parallel registers ----------------------------------------------
  logic [15:0]       par_out;
  logic              par_oden, par_dtack, fmm_override_en, vme_not_ready;
  logic [2:0][15:0]  inreg;

  assign vme_not_ready = restore_idle | rst;

  vme_par_regs u_par (
    .sclk(sclk), .rst(~hard_rst_n), .soft_rst(rst), .sel(par_sel & slot_hit),
    .dev(dev), .cmd(par_cmd), .write(write), .strobe(strobe), .indata(vme_din),
    .csc_busy(csc_busy), .csc_warn(csc_warn), .csc_sync(csc_sync), .csc_err(csc_err),
    .rst_test(rst_test), .mode_sw(mode_sw), .vme_rdy(~vme_not_ready),
    .fmm_state(ddu_fmm), .ga(ga),
    .outdata(par_out), .outdata_en(par_oden), .dtack(par_dtack), .inreg(inreg),
    .gbe_prescale(gbe_prescale), .slink_wait_en(slink_wait_en), .fake_l1(fake_l1),
    .fmm_override_en(fmm_override_en), .fmm_out(fmm_out)
  );

  // ---- serial flash / serial load ----------------------------------------
  logic [15:0] ser_out;
  logic        ser_oden, ser_dtack, ser_busy, auto_done;

  vme_serial u_ser (
    .sclk(sclk), .rst(rst), .sel(ser_sel & slot_hit), .dev(dev), .cmd(ser_cmd),
    .strobe(strobe), .inreg(inreg), .auto_req(auto_req), .auto_disable(mode_sw[6]),
    .m_cs_n(m_cs_n), .m_sck(m_sck), .m_si(m_si), .m_so(m_so),
    .dst_sclk(dst_sclk), .dst_sdi(dst_sdi), .dst_en(dst_en), .dst_sdo(infifo_sdo),
    .outdata(ser_out), .outdata_en(ser_oden), .dtack(ser_dtack),
    .busy(ser_busy), .auto_done(auto_done)
  );

  // ---- interrupt ---------------------------------------------------------
  logic       my_irq;
  logic [7:0] nflag;

  assign irq1_n = ~|(csc_sync | csc_err);

  always_comb begin
    nflag = '0;
    for (int i = 0; i < 16; i++) nflag += 8'(csc_sync[i] | csc_err[i]);
  end

  vme_irq u_irq (
    .fastclk(fastclk), .rst(rst), .irq1_n(irq1_n), .iack_in_n(iack_in_n),
    .as_n(as_n), .ds0_n(ds0_n), .ds1_n(ds1_n), .adrs(adr[3:1]),
    .iack_out_n(iack_out_n), .my_irq(my_irq)
  );

  // ---- FMM and LEDs --------------------------------------------------------
  logic set_warn, set_sync, set_busy, ok2fmm, grn_flash, busy2fmm, blink_yel;
  logic grn_led, yel_led;

  fmm_decode u_fmm (
    .rl_fmm(fmm_out), .fmm_warn(fmm_warn), .fmm_sync(fmm_sync), .fmm_busy(fmm_busy),
    .vme_not_ready(vme_not_ready), .set_warn(set_warn), .set_sync(set_sync),
    .set_busy(set_busy), .set_rdy(fmm_set_rdy), .ok2fmm(ok2fmm),
    .grn_flash(grn_flash), .busy2fmm(busy2fmm), .blink_yel(blink_yel)
  );

  fmmled u_grn (.clk(sclk), .bclk(bclk), .rst(rst), .on(ok2fmm), .flash(grn_flash),
                .led(grn_led), .led_n(grn_led_n));
  fmmled u_yel (.clk(sclk), .bclk(bclk), .rst(rst), .on(busy2fmm), .flash(blink_yel),
                .led(yel_led), .led_n(yel_led_n));

  // ---- diagnostics -----------------------------------------------------------
  logic [15:0] diag1, diag2;
  // mode switch bits 5-4 pick the debug group shown as diag1:
  // 00 standard VME, 01 VME-Serial, 10 flash, 11 VME-Parallel
  always_comb
    case (mode_sw[5:4])
      2'b00: diag1 = {strobe, ~dtack_n, write, jtag_sel, ser_sel, par_sel, slot_hit, my_irq,
                      set_warn, set_sync, set_busy, fmm_override_en, fmm_out};
      2'b01: diag1 = {ser_sel, ser_busy, auto_req, auto_done, dev, ser_cmd,
                      dst_sclk, dst_sdi, |dst_en, ser_dtack};
      2'b10: diag1 = {m_cs_n, m_sck, m_si, m_so, ser_busy, auto_done, ser_oden, ser_dtack,
                      ser_out[7:0]};
      default: diag1 = {par_sel, par_oden, par_dtack, fmm_override_en, par_cmd, fmm_out};
    endcase
  assign diag2 = {m_cs_n, m_sck, m_si, m_so, dst_sclk, dst_sdi, ser_busy, adc_led, dst_en};

  diag_mux u_diag (
    .fastclk(fastclk), .mode_sw(mode_sw), .diag1(diag1), .diag2(diag2), .diagadc(diagadc),
    .dvcenb(ch_dvcenb[2:0]), .tdo(jtag_tdo[2:0]), .tdi(ch_tdi[2:0]),
    .tms(ch_tms[2:0]), .tck(ch_tck[2:0]), .la0(la0), .la1(la1)
  );

  // ---- VME data and acknowledge ------------------------------------------------
  logic iack_ack;
  assign iack_ack = my_irq & ~ds0_n & ~ds1_n;

  always_comb begin
    vme_dout = '0;
    for (int c = 0; c < 8; c++)
      if (ch_oden[c]) vme_dout |= ch_out[c];
    if (adc_oden) vme_dout |= adc_out;
    if (par_oden) vme_dout |= par_out;
    if (ser_oden) vme_dout |= ser_out;
    if (iack_ack) vme_dout = {nflag, 3'b000, ga};
    vme_doe = write_n & (iack_ack | (strobe & ~bcast));
    dtack_n = ~(iack_ack | (|ch_dtack) | adc_dtack | par_dtack | ser_dtack);
  end
endmodule
