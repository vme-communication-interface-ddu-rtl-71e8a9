// vme_par_regs: VME-Parallel register file (address type 011), all 16 bits.
//   dev 0  R  BUSY (not ready) flags: bit 15 = DDU, bits 14-0 = DMB 14..0
//   dev 1  R  warning / near-full flags      dev 2  R  lost-sync flags
//   dev 3  R  error flags                    dev 4  R  need-reset summary
//   dev 5  R  warning history (sticky)       dev 6  R  busy history (sticky)
//   dev 8  cmd 80 W  input register 0; each write moves 0->1->2 first
//          cmd 00-02 R input registers 0-2, cmd 03-07 R reset-test regs 0-4
//   dev 9  cmd 00/80 R/W  GbE prescale / S-Link wait register
//          cmd 05/85 R/W  fake-L1A (data pass-through) register
//          cmd 0F/8F R/W  FMM test register
//   dev 14 R  {8'hCA, mode switch[7:0]}
//   dev 15 R  {VME ready, FMM state[3:0], 6'b0, slot[4:0]}
// The GbE register is written as four nibbles; output bit i (i=0..3) is
// valid only when bits i and i+8 are 1 and bits i+4 and i+12 are 0, as the
// prescale decode schematic gates it (bits 2-0 prescale, bit 3 S-Link
// wait). The FMM state is overridden by bits 3-0 of the FMM test register
// when its bits 15-4 hold F0E (schematic), and that register is cleared by
// soft reset. Writes take effect on the first SCLK edge after the
// synchronised strobe; dtack follows the synchronised strobe by one cycle.
// Register contents follow the device list; the dev 4 summary as
// sync|error, the dev 15 bit layout, the history clearing and the handshake
// are this design's choices.
module vme_par_regs (
  input  logic        sclk,
  input  logic        rst,
  input  logic        soft_rst,
  input  logic        sel,          // parallel type and slot match
  input  logic [3:0]  dev,
  input  logic [7:0]  cmd,
  input  logic        write,
  input  logic        strobe,
  input  logic [15:0] indata,
  input  logic [15:0] csc_busy,
  input  logic [15:0] csc_warn,
  input  logic [15:0] csc_sync,
  input  logic [15:0] csc_err,
  input  logic [4:0][15:0] rst_test,
  input  logic [7:0]  mode_sw,
  input  logic        vme_rdy,
  input  logic [3:0]  fmm_state,    // FMM state before override
  input  logic [4:0]  ga,
  output logic [15:0] outdata,
  output logic        outdata_en,
  output logic        dtack,
  output logic [2:0][15:0] inreg,
  output logic [2:0]  gbe_prescale,
  output logic        slink_wait_en,
  output logic [2:0]  fake_l1,
  output logic        fmm_override_en,
  output logic [3:0]  fmm_out
);
  import ddu_vme_pkg::*;

  logic [2:0]  strobe_sync;
  logic        wr_pulse;
  logic [15:0] gbe_reg, fake_reg, fmm_reg;
  logic [15:0] warn_hist, busy_hist;

  always_ff @(posedge sclk or posedge rst)
    if (rst) strobe_sync <= '0;
    else     strobe_sync <= {strobe_sync[1:0], strobe & sel};

  assign wr_pulse = strobe_sync[1] & ~strobe_sync[2] & write;

  always_ff @(posedge sclk or posedge rst)
    if (rst) begin
      inreg     <= '0;
      gbe_reg   <= '0;
      fake_reg  <= '0;
      warn_hist <= '0;
      busy_hist <= '0;
      dtack     <= 1'b0;
    end else begin
      dtack     <= strobe_sync[1];
      warn_hist <= warn_hist | csc_warn;
      busy_hist <= busy_hist | csc_busy;
      if (wr_pulse && dev == 4'd8 && cmd == 8'h80)
        inreg <= {inreg[1], inreg[0], indata};
      if (wr_pulse && dev == 4'd9 && cmd == 8'h80) gbe_reg  <= indata;
      if (wr_pulse && dev == 4'd9 && cmd == 8'h85) fake_reg <= indata;
    end

  always_ff @(posedge sclk or posedge soft_rst)
    if (soft_rst) fmm_reg <= '0;
    else if (wr_pulse && dev == 4'd9 && cmd == 8'h8F) fmm_reg <= indata;

  always_comb begin
    for (int i = 0; i < 3; i++)
      gbe_prescale[i] = gbe_reg[i] & gbe_reg[i+8] & ~gbe_reg[i+4] & ~gbe_reg[i+12];
    slink_wait_en   = gbe_reg[3] & gbe_reg[11] & ~gbe_reg[7] & ~gbe_reg[15];
    fake_l1         = fake_reg[2:0];
    fmm_override_en = (fmm_reg[15:12] == FMM_OVR_KEY[11:8]) &
                      (fmm_reg[11:8] == FMM_OVR_KEY[7:4]) &
                      (fmm_reg[7:4] == FMM_OVR_KEY[3:0]);
    fmm_out         = fmm_override_en ? fmm_reg[3:0] : fmm_state;
  end

  always_comb begin
    outdata = '0;
    unique case (dev)
      4'd0:  outdata = csc_busy;
      4'd1:  outdata = csc_warn;
      4'd2:  outdata = csc_sync;
      4'd3:  outdata = csc_err;
      4'd4:  outdata = csc_sync | csc_err;
      4'd5:  outdata = warn_hist;
      4'd6:  outdata = busy_hist;
      4'd8:  case (cmd)
               8'h00, 8'h80: outdata = inreg[0];
               8'h01:        outdata = inreg[1];
               8'h02:        outdata = inreg[2];
               8'h03, 8'h04, 8'h05, 8'h06, 8'h07:
                             outdata = rst_test[cmd[2:0] - 3'd3];
               default:      outdata = '0;
             endcase
      4'd9:  case (cmd[6:0])
               7'h00:   outdata = gbe_reg;
               7'h05:   outdata = fake_reg;
               7'h0F:   outdata = fmm_reg;
               default: outdata = '0;
             endcase
      4'd14: outdata = {VME_ID_BYTE, mode_sw};
      4'd15: outdata = {vme_rdy, fmm_out, 6'b0, ga};
      default: outdata = '0;
    endcase
    outdata_en = sel & strobe & !write;
  end
endmodule
