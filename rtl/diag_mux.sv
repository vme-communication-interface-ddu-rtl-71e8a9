// diag_mux: selects what the two 16-bit logic-analyser / LED headers LA0 and
// LA1 show. The LED mode is the one-hot decode of mode switch bits 3-0
// (LED_MODE0..15). LED_MODE_A = mode 0 or 4 puts diag1 on LA1;
// LED_MODE_B = mode 1 or 5 puts the JTAG debug word on LA1 and diag2 on
// LA0; mode 14 puts the serial-ADC debug word, registered on FASTCLK, on
// LA0. The JTAG debug word (DIAG3OUT) is, from bit 15 down:
// OR of the three enables, then for chains 3, 2, 1: TDO, TDI, TMS, TCK,
// DVCENB (bit 10 = DVCENB3, bit 5 = DVCENB2, bit 0 = DVCENB1).
// Mode switch bit 7 forces every LA bit high. Bits nobody drives read 0.
// The selections and the DIAG3OUT bit map follow the diagnostic-output
// schematics; the decode of mode bits 3-0 into LED modes, the value of
// undriven bits and the force-high priority are this design's choices.
module diag_mux (
  input  logic        fastclk,
  input  logic [7:0]  mode_sw,
  input  logic [15:0] diag1,
  input  logic [15:0] diag2,
  input  logic [15:0] diagadc,
  input  logic [3:1]  dvcenb,
  input  logic [3:1]  tdo,
  input  logic [3:1]  tdi,
  input  logic [3:1]  tms,
  input  logic [3:1]  tck,
  output logic [15:0] la0,
  output logic [15:0] la1
);
  logic [15:0] led_mode, diag3, d_diagadc;
  logic        led_mode_a, led_mode_b;

  always_ff @(posedge fastclk) d_diagadc <= diagadc;

  always_comb begin
    led_mode   = 16'b1 << mode_sw[3:0];
    led_mode_a = led_mode[4] | led_mode[0];
    led_mode_b = led_mode[5] | led_mode[1];
    diag3 = {dvcenb[1] | dvcenb[2] | dvcenb[3],
             tdo[3], tdi[3], tms[3], tck[3], dvcenb[3],
             tdo[2], tdi[2], tms[2], tck[2], dvcenb[2],
             tdo[1], tdi[1], tms[1], tck[1], dvcenb[1]};
    la1 = led_mode_a ? diag1 : led_mode_b ? diag3 : 16'h0000;
    la0 = led_mode_b ? diag2 : led_mode[14] ? d_diagadc : 16'h0000;
    if (mode_sw[7]) begin
      la0 = 16'hFFFF;
      la1 = 16'hFFFF;
    end
  end
endmodule
