// clk_div: derives the slow JTAG/ADC clocks from MIDCLK (10 MHz).
// Two toggle flip-flops divide MIDCLK by 2 and by 4; the /4 output is re-timed
// once on MIDCLK and once on FASTCLK (80 MHz) before it becomes SLOWCLK
// (2.5 MHz), as in the clock-divider schematic. A third toggle stage, this
// design's addition, gives SLOWCLK2 (1.25 MHz, used for the PROM JTAG chains)
// and is re-timed the same way. rst_n clears the dividers (the schematic's
// flip-flops have no reset; a reset is added so simulation starts defined).
// Outputs change only on FASTCLK edges; SLOWCLK lags MIDCLK by one MIDCLK
// cycle plus up to one FASTCLK cycle.
module clk_div (
  input  logic midclk,
  input  logic fastclk,
  input  logic rst_n,
  output logic slowclk,
  output logic slowclk2
);
  logic div2, div4, div8;
  logic div4_m, div8_m;

  always_ff @(posedge midclk or negedge rst_n)
    if (!rst_n) div2 <= 1'b0; else div2 <= ~div2;

  always_ff @(posedge div2 or negedge rst_n)
    if (!rst_n) div4 <= 1'b0; else div4 <= ~div4;

  always_ff @(posedge div4 or negedge rst_n)
    if (!rst_n) div8 <= 1'b0; else div8 <= ~div8;

  always_ff @(posedge midclk or negedge rst_n)
    if (!rst_n) begin
      div4_m <= 1'b0;
      div8_m <= 1'b0;
    end else begin
      div4_m <= div4;
      div8_m <= div8;
    end

  always_ff @(posedge fastclk or negedge rst_n)
    if (!rst_n) begin
      slowclk  <= 1'b0;
      slowclk2 <= 1'b0;
    end else begin
      slowclk  <= div4_m;
      slowclk2 <= div8_m;
    end
endmodule
