// max1271_model: behavioural MAX1270/1271 serial ADC for the testbenches.
// While cs_n is low, DIN is read on rising SCLK. A control byte starts with
// its first 1 bit (start bit); its channel bits [6:4] select which of the
// eight values chan_val[] is converted. The 12-bit result is then shifted
// out MSB first during the next cs_n-low transfer: the MSB appears when
// cs_n falls, each following bit on a falling SCLK edge.
module max1271_model (
  input  logic       cs_n,
  input  logic       sclk,
  input  logic       din,
  output logic       dout,
  input  logic [11:0] chan_val [8]
);
  logic [7:0]  ctrl;
  int unsigned nbits;
  logic [11:0] result = '0;
  logic [11:0] outsr;
  logic        have_ctrl;
  int unsigned n_ctrl = 0;

  initial dout = 1'b0;

  always @(negedge cs_n) begin
    nbits = 0; ctrl = '0; have_ctrl = 1'b0;
    dout = result[11]; outsr = {result[10:0], 1'b0};
  end

  always @(posedge sclk) if (!cs_n) begin
    if (nbits > 0 || din) begin
      ctrl = {ctrl[6:0], din};
      nbits++;
      if (nbits == 8) begin
        have_ctrl = 1'b1;
        result = chan_val[ctrl[6:4]];
        n_ctrl++;
      end
    end
  end

  always @(negedge sclk) if (!cs_n && !have_ctrl && nbits == 0) begin
    dout  = outsr[11];
    outsr = {outsr[10:0], 1'b0};
  end
endmodule
