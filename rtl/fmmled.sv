// fmmled: slow-blink control for one FMM front-panel LED.
// on lights the LED steadily. flash requests blinking: the request is
// latched on CLK (LFLASH) and kept until the LED is dark, so a blink that has
// started is always completed. While LFLASH is set and on is low, a toggle
// flip-flop on the slow blink clock BCLK alternates the LED; otherwise it is
// held in reset (dark). led = on | blink, led_n its inverse for the pad.
// Follows the FMMLED schematic (FDC, FTRSE, SOP3B1A, OR2B1, OR2, INV).
module fmmled (
  input  logic clk,
  input  logic bclk,
  input  logic rst,
  input  logic on,
  input  logic flash,
  output logic led,
  output logic led_n
);
  logic lflash, loop_flash, kill_blink, blink;

  assign loop_flash = flash | (lflash & ~led);
  assign kill_blink = on | ~lflash;
  assign led        = on | blink;
  assign led_n      = ~led;

  always_ff @(posedge clk or posedge rst)
    if (rst) lflash <= 1'b0;
    else     lflash <= loop_flash;

  // FTRSE: synchronous reset has priority, toggle enable tied high
  always_ff @(posedge bclk)
    if (kill_blink) blink <= 1'b0;
    else            blink <= ~blink;
endmodule
