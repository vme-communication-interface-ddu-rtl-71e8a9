// tb_seradc: serial-ADC controller against a behavioural MAX1271. For each
// of the eight channels a control byte is written (command 00) and the
// 12-bit result read back (command 01) and compared with the model's value.
// Also checked: ADC clock = SLOWCLK/2, chip select low for exactly the 8
// or 12 clock pulses of a transfer, transfer lengths of 16 / 24 SLOWCLK
// cycles, and that other commands or devices are not acknowledged.
module tb_seradc;
  logic slowclk = 0, rst = 0, device, strobe, adcin;
  logic [9:0] command;
  logic [15:0] indata, outdata, diagadc;
  logic outdata_en, dtack, adcdata, adcclk, adcena_n, led;
  logic [11:0] chan_val [8];
  int checks = 0, failures = 0, cyc = 0, n_pulse = 0, cs_cycles = 0;

  seradc dut (.*);
  max1271_model adc (.cs_n(adcena_n), .sclk(adcclk), .din(adcdata), .dout(adcin), .chan_val(chan_val));

  always #200 slowclk = ~slowclk;
  always @(posedge slowclk) begin
    cyc++;
    if (!adcena_n) cs_cycles++;
  end
  always @(posedge adcclk) begin
    n_pulse++;
    if (adcena_n) begin failures++; $display("FAIL: ADC clock with chip select high"); end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic access(input logic [3:0] op, input logic [15:0] d, input int npulse,
                        input int ncs, output logic [15:0] rd);
    n_pulse = 0; cs_cycles = 0;
    @(negedge slowclk);
    device = 1; command = {6'b0, op}; indata = d; strobe = 1;
    while (!dtack) @(negedge slowclk);
    rd = outdata;
    check(n_pulse == npulse, $sformatf("ADC clock pulses %0d, expected %0d", n_pulse, npulse));
    check(cs_cycles == ncs, $sformatf("chip-select cycles %0d, expected %0d", cs_cycles, ncs));
    check(outdata_en == (op == 4'h1), "outdata_en on reads only");
    strobe = 0;
    while (dtack) @(negedge slowclk);
    device = 0;
  endtask

  initial begin
    #5000000 failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rd;
    realtime t0;
    for (int i = 0; i < 8; i++) chan_val[i] = 12'($urandom);
    device = 0; strobe = 0; command = 0; indata = 0;
    #1 rst = 1; #500 rst = 0;
    for (int ch = 0; ch < 8; ch++) begin
      access(4'h0, {8'h00, 1'b1, 3'(ch), 4'b0001}, 8, 16 + 1, rd);
      check(adc.n_ctrl == ch + 1, "control byte received");
      access(4'h1, 16'h0, 12, 24 + 1, rd);
      check(rd == {4'h0, chan_val[ch]}, $sformatf("ch %0d read %h expected %h", ch, rd, chan_val[ch]));
    end
    // ADC clock period
    @(negedge slowclk); device = 1; command = 10'h001; strobe = 1;
    @(posedge adcclk); t0 = $realtime; @(posedge adcclk);
    check($realtime - t0 == 800.0, "ADC clock = SLOWCLK/2");
    while (!dtack) @(negedge slowclk);
    strobe = 0; while (dtack) @(negedge slowclk); device = 0;
    // unused command 02 and another device
    @(negedge slowclk); device = 1; command = 10'h002; strobe = 1;
    repeat (40) @(negedge slowclk);
    check(!dtack && adcena_n, "command 02 ignored");
    strobe = 0; device = 0; command = 10'h000;
    @(negedge slowclk); strobe = 1;
    repeat (40) @(negedge slowclk);
    check(!dtack && adcena_n, "other device ignored");
    strobe = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
