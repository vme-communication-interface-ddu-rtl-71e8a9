// jtag_restore_idle: after a hard reset (or the ARST push button) forces the FPGA
// JTAG chains back to Test-Logic-Reset. A 4-bit counter on SCLK, cleared by
// the active-low reset njr, counts while RESTORE_IDLE is high; RESTORE_IDLE is
// the inverse of counter bit 3, so it is high for exactly 8 SCLK cycles after
// njr is released and then stays low until the next reset. While it is high
// the JTAG output gates drive TMS high and pass SCLK onto TCK (8 TCK pulses
// with TMS=1 reach Test-Logic-Reset from any TAP state). Follows the
// schematic exactly.
module jtag_restore_idle (
  input  logic sclk,
  input  logic njr,          // active-low reset (hard reset / ARST)
  output logic restore_idle
);
  logic [3:0] cnt;

  always_ff @(posedge sclk or negedge njr)
    if (!njr)              cnt <= '0;
    else if (restore_idle) cnt <= cnt + 4'd1;

  assign restore_idle = ~cnt[3];
endmodule
