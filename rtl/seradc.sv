// seradc: VME controller for the board's MAX1270/1271 12-bit serial ADC.
// Two commands (device line DEVICE13, command bits [9:4] must be zero):
//   00 write control byte: indata[7:0] is shifted to the ADC, MSB first;
//   01 read data back: 12 result bits are clocked out of the ADC, MSB
//      first, and returned on outdata[11:0] (outdata[15:12] = 0).
// The ADC clock is SLOWCLK/2 (1.25 MHz with SLOWCLK = 2.5 MHz, inside the
// ADC's 0.1-2 MHz range). adcena_n (chip select) is low for the whole
// transfer. Each bit takes two SLOWCLK cycles: adcclk low (DIN changes),
// then high; DOUT is sampled where adcclk rises. The sequence is a 4-step
// one-hot ring (idle, select, shift, finish) held in an SR4CE3 macro. The
// ADC is expected to present its MSB when chip select falls and each later
// bit after a falling clock edge.
// strobe is synchronised into SLOWCLK; dtack rises when the transfer is done
// and stays until strobe falls. A write takes 1 + 16 + 1 SLOWCLK cycles and
// a read 1 + 24 + 1 after the synchronised strobe edge.
// The command decode follows the serial-ADC decode schematic; the bit
// timing, the 12-bit read length and the handshake are this design's choice.
// diagadc is a debug word {step[3:0], bit counter, 4 pins, 4'b0}.
module seradc (
  input  logic        slowclk,
  input  logic        rst,
  input  logic        device,
  input  logic [9:0]  command,
  input  logic [15:0] indata,
  input  logic        strobe,
  input  logic        adcin,       // ADC DOUT
  output logic [15:0] outdata,
  output logic        outdata_en,
  output logic        dtack,
  output logic        adcdata,     // ADC DIN
  output logic        adcclk,      // ADC SCLK
  output logic        adcena_n,    // ADC chip select, active low
  output logic        led,         // transfer in progress
  output logic [15:0] diagadc
);
  logic [2:0]  strobe_sync;
  logic        start, cmdhigh, writemax, readmax;
  logic [3:0]  step;
  logic        step_ce;
  logic        is_read, ph;
  logic [3:0]  bitcnt;
  logic [7:0]  txsr;
  logic [11:0] rxsr;

  always_comb begin
    cmdhigh  = device & ~command[4] & ~command[5] &
               ~command[6] & ~command[7] & ~command[8] & ~command[9];
    writemax = cmdhigh & ~command[0] & ~command[1] & ~command[2] & ~command[3];
    readmax  = cmdhigh &  command[0] & ~command[1] & ~command[2] & ~command[3];
  end

  always_ff @(posedge slowclk or posedge rst)
    if (rst) strobe_sync <= '0;
    else     strobe_sync <= {strobe_sync[1:0], strobe & device};

  assign start = strobe_sync[1] & ~strobe_sync[2];

  // step[0] idle, step[1] select, step[2] shift, step[3] finish
  always_comb begin
    case (1'b1)
      step[0]: step_ce = start & (writemax | readmax);
      step[1]: step_ce = 1'b1;
      step[2]: step_ce = ph & (bitcnt == (is_read ? 4'd11 : 4'd7));
      step[3]: step_ce = !strobe_sync[1];
      default: step_ce = 1'b1;
    endcase
  end

  sr4ce3 u_step (.c(slowclk), .ce(step_ce), .clr(rst), .sli(step[3]), .q(step));

  always_ff @(posedge slowclk or posedge rst)
    if (rst) begin
      is_read  <= 1'b0;
      ph       <= 1'b0;
      bitcnt   <= '0;
      txsr     <= '0;
      rxsr     <= '0;
      adcclk   <= 1'b0;
      adcena_n <= 1'b1;
      dtack    <= 1'b0;
      outdata  <= '0;
      outdata_en <= 1'b0;
    end else begin
      if (step[0] && step_ce) begin
        is_read  <= readmax;
        txsr     <= readmax ? 8'h00 : indata[7:0];
        bitcnt   <= '0;
        ph       <= 1'b0;
        adcena_n <= 1'b0;
      end
      if (step[2]) begin
        ph     <= ~ph;
        adcclk <= ~ph;
        if (!ph) rxsr <= {rxsr[10:0], adcin};
        else begin
          bitcnt <= bitcnt + 4'd1;
          txsr   <= {txsr[6:0], 1'b0};
        end
      end
      if (step[2] && step_ce) begin
        adcena_n <= 1'b1;
        adcclk   <= 1'b0;
      end
      if (step[3]) begin
        dtack      <= strobe_sync[1];
        outdata_en <= strobe_sync[1] & is_read;
        if (is_read) outdata <= {4'h0, rxsr};
      end else begin
        dtack      <= 1'b0;
        outdata_en <= 1'b0;
      end
    end

  assign adcdata = txsr[7];
  assign led     = ~step[0];
  assign diagadc = {step, bitcnt, adcena_n, adcclk, adcdata, adcin, 4'h0};
endmodule
