// tb_vme_serial: serial flash / serial-load controller against a behavioural
// serial flash and eight destination shift registers. Checks: status read;
// programming pages 1, 4, 5, 7 with 16/32/34/16 bits from the input
// registers (frame length 32 + N bits, 2 SCLK cycles per bit); VME page
// reads returning the low 16 bits and loading the destination; InFIFO
// read-back through the FIFO's serial output (dev 0-3, no flash); direct loads (dev 0C, 0F); the auto-load sequence (pages 1, 7,
// 5 into 0D, 0E, 0C, page 4 skipped) and its disable input.
module tb_vme_serial;
  import ddu_vme_pkg::*;
  logic sclk = 0, rst = 0, sel, strobe, auto_req, auto_disable;
  logic [3:0] dev, cmd;
  logic [2:0][15:0] inreg;
  logic m_cs_n, m_sck, m_si, m_so, dst_sclk, dst_sdi;
  logic [7:0] dst_en;
  logic [3:0] dst_sdo;
  logic [15:0] outdata;
  logic outdata_en, dtack, busy, auto_done;
  int checks = 0, failures = 0, cyc = 0, n_auto_done = 0, n_sck = 0;
  logic [47:0] cap [8];
  int ncap [8];

  vme_serial dut (.*);
  dataflash_model #(.STATUS(8'h8D)) flash (.cs_n(m_cs_n), .sck(m_sck), .si(m_si), .so(m_so));

  always #50 sclk = ~sclk;
  always @(posedge sclk) begin cyc++; if (auto_done) n_auto_done++; end
  always @(posedge m_sck) n_sck++;
  // the serial-load data line must rest high while no destination is enabled
  int sdi_low_idle = 0;
  always @(posedge sclk) if (!rst && dst_en == '0 && !dst_sdi) sdi_low_idle++;

  always @(posedge dst_sclk)
    for (int i = 0; i < 8; i++)
      if (dst_en[i]) begin cap[i] = {cap[i][46:0], dst_sdi}; ncap[i]++; end

  // input FIFOs 0-3 present the top bit of their 32-bit offset word
  assign dst_sdo = {cap[3][31], cap[2][31], cap[1][31], cap[0][31]};

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic clear_caps();
    for (int i = 0; i < 8; i++) begin cap[i] = '0; ncap[i] = 0; end
  endtask

  task automatic access(input logic [3:0] d, input logic [3:0] c, output logic [15:0] rd,
                        output int cycles);
    int t0;
    @(negedge sclk); sel = 1; dev = d; cmd = c; strobe = 1; t0 = cyc;
    while (!dtack) @(negedge sclk);
    cycles = cyc - t0;
    rd = outdata;
    strobe = 0;
    while (dtack) @(negedge sclk);
  endtask

  initial begin
    #20000000 failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rd;
    int c;
    logic [47:0] v;
    sel = 0; strobe = 0; dev = 0; cmd = 0; auto_req = 0; auto_disable = 0; inreg = '0;
    clear_caps();
    #1 rst = 1; #300 rst = 0;

    access(4'h4, 4'h0, rd, c);
    check(rd == 16'h008D, $sformatf("status read %h", rd));
    check(flash.n_stat == 1, "status opcode seen by flash");

    // program the four pages
    inreg = {16'h0000, 16'h0000, 16'hBEEF}; n_sck = 0;
    access(4'h4, 4'h9, rd, c);
    check(flash.pdata[1] == 48'hBEEF && flash.plen[1] == 16, "page 1 programmed");
    check(n_sck == 32 + 16, $sformatf("page 1 frame %0d bits", n_sck));
    check(c >= 2 * (32 + 16) && c <= 2 * (32 + 16) + 6, $sformatf("page 1 program cycles %0d", c));
    inreg = {16'h0000, 16'h8765, 16'h4321};
    access(4'h4, 4'hC, rd, c);
    check(flash.pdata[4] == 48'h8765_4321 && flash.plen[4] == 32, "page 4 programmed");
    inreg = {16'hFFFE, 16'h1234, 16'h5678};   // only 34 bits used
    access(4'h4, 4'hD, rd, c);
    check(flash.pdata[5] == 48'h2_1234_5678 && flash.plen[5] == 34, $sformatf("page 5 programmed %h", flash.pdata[5]));
    inreg = {16'h0000, 16'h0000, 16'h0D0E};
    access(4'h4, 4'hF, rd, c);
    check(flash.pdata[7] == 48'h0D0E && flash.plen[7] == 16, "page 7 programmed");
    check(flash.n_prog == 4, "four program frames");

    // VME page reads with destination load
    clear_caps(); n_sck = 0;
    access(4'h4, 4'h1, rd, c);
    check(rd == 16'hBEEF, $sformatf("page 1 read %h", rd));
    check(n_sck == 64 + 16, $sformatf("page 1 read frame %0d bits", n_sck));
    check(ncap[5] == 16 && cap[5][15:0] == 16'hBEEF, "kill mask loaded into DDU_Ctrl (0D)");
    check(ncap[6] == 0 && ncap[4] == 0, "no other destination touched");
    clear_caps();
    access(4'h4, 4'h5, rd, c);
    check(rd == 16'h5678 && ncap[4] == 34 && cap[4][33:0] == 34'h2_1234_5678, "page 5 into GbE FIFO (0C)");
    clear_caps();
    access(4'h4, 4'h4, rd, c);
    check(rd == 16'h4321, "page 4 read");
    for (int i = 0; i < 4; i++)
      check(ncap[i] == 32 && cap[i][31:0] == 32'h8765_4321, $sformatf("page 4 into InFIFO %0d", i));
    // read back InFIFO 2 through its serial output: no flash frame, the
    // offsets come round unchanged, the last 16 bits are returned
    for (int i = 0; i < 8; i++) ncap[i] = 0;
    cap[2] = 48'h0000_1357_9BDF; n_sck = 0;
    access(4'h2, 4'h0, rd, c);
    check(rd == 16'h9BDF, $sformatf("InFIFO 2 read back %h", rd));
    check(ncap[2] == 32 && ncap[0] == 0 && ncap[1] == 0 && ncap[3] == 0, "only InFIFO 2 clocked, 32 bits");
    check(cap[2][31:0] == 32'h1357_9BDF && cap[1][31:0] == 32'h8765_4321, "offsets unchanged by the read");
    check(n_sck == 0, "no flash access for a FIFO read");
    check(c >= 2 * 32 && c <= 2 * 32 + 6, $sformatf("FIFO read cycles %0d", c));

    // direct loads from the input registers
    clear_caps(); inreg = {16'h0003, 16'hAAAA, 16'h5555};
    access(4'hC, 4'h0, rd, c);
    check(ncap[4] == 34 && cap[4][33:0] == 34'h3_AAAA_5555, "direct load GbE FIFO");
    check(c >= 2 * 34 && c <= 2 * 34 + 6, $sformatf("direct load cycles %0d", c));
    clear_caps();
    access(4'hF, 4'h0, rd, c);
    for (int i = 0; i < 4; i++)
      check(ncap[i] == 32 && cap[i][31:0] == 32'hAAAA_5555, $sformatf("dev 0F loads InFIFO %0d", i));
    clear_caps();
    access(4'hE, 4'h0, rd, c);
    check(ncap[6] == 16 && cap[6][15:0] == 16'h5555, "direct load board ID");

    // auto load
    clear_caps();
    begin
      int nr0;
      nr0 = flash.n_read;
      @(negedge sclk); auto_req = 1;
      @(negedge sclk); @(negedge sclk); check(busy, "busy during auto load");
      while (n_auto_done == 0) @(negedge sclk);
      auto_req = 0;
      check(flash.n_read == nr0 + 3, $sformatf("three page reads in auto load (%0d)", flash.n_read - nr0));
      check(ncap[5] == 16 && cap[5][15:0] == 16'hBEEF, "auto: kill mask");
      check(ncap[6] == 16 && cap[6][15:0] == 16'h0D0E, "auto: board ID");
      check(ncap[4] == 34 && cap[4][33:0] == 34'h2_1234_5678, "auto: GbE offsets");
      check(ncap[0] == 0 && ncap[1] == 0 && ncap[2] == 0 && ncap[3] == 0, "auto: page 4 skipped");
      // disabled
      clear_caps(); auto_disable = 1; nr0 = flash.n_read;
      @(negedge sclk); auto_req = 1; repeat (400) @(negedge sclk); auto_req = 0;
      check(flash.n_read == nr0 && n_auto_done == 1, "auto load disabled");
    end
    check(sdi_low_idle == 0, $sformatf("serial-load data low while idle (%0d cycles)", sdi_low_idle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
