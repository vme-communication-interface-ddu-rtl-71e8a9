// jtag_out_gate: output stage of one JTAG chain driven by the VME controller.
// FPGA chains (TRISTATE=0): TCK = DVCENB&TCK | RESTORE_IDLE&SCLK,
// TMS = DVCENB&TMS | RESTORE_IDLE, TDI = DVCENB&TDI, so the chain is held
// quiet when not selected and can be walked to Test-Logic-Reset after reset.
// PROM chains (TRISTATE=1): the three outputs are 3-stated unless DVCENB is
// high, because a cable or another FPGA may also drive those lines; the
// *_oe outputs give the enable and the pins fall back to the board's
// pull-down, modelled here as 0. Purely combinational. Both variants follow
// the port schematics; the 3-state pad itself is outside this module.
module jtag_out_gate #(
  parameter bit TRISTATE = 1'b0
) (
  input  logic dvcenb,
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  input  logic restore_idle,
  input  logic sclk,
  output logic otck,
  output logic otms,
  output logic otdi,
  output logic oe
);
  always_comb begin
    if (TRISTATE) begin
      oe   = dvcenb;
      otck = dvcenb & tck;
      otms = dvcenb & tms;
      otdi = dvcenb & tdi;
    end else begin
      oe   = 1'b1;
      otck = (dvcenb & tck) | (restore_idle & sclk);
      otms = (dvcenb & tms) | restore_idle;
      otdi = dvcenb & tdi;
    end
  end
endmodule
