// vme_jtag: VME-to-JTAG engine for one JTAG chain (one per device number).
// A VME access to this device starts one command; the 10-bit COMMAND is
// bit count [9:6] (n-1, so 1..16 bits) and operation [5:0]:
//   00 shift data, 01 data with header, 02 data with tailer, 03 both,
//   05 read TDO register to VME, 06 reset the TAP,
//   07 / 0F shift instruction with header and tailer,
//   0C IR no header/tailer, 0D IR header only, 0E IR tailer only.
// Command bits [5:4] must be 0 (CMDHIGH); the decode gates follow the CFEB
// JTAG command-decode schematic. The header walks the TAP from Run-Test/Idle
// to Shift-DR (TMS 1,0,0) or Shift-IR (TMS 1,1,0,0); data bits leave LSB
// first from a loadable right shift register onto TDI, with TMS high on the
// last bit when a tailer follows; the tailer is TMS 1,0 (Update, then
// Run-Test/Idle). Without a tailer the TAP stays in Shift so a following
// command continues the same scan. TDO is collected in a right-shifting
// register: after n bits they sit in outdata[15:16-n]. The reset command
// sends TMS 1,1,1,1,1,0 (a 6-bit ring preset to 011111), ending in
// Run-Test/Idle, and acknowledges after 12 SLOWCLK cycles as the schematic's
// reset-done counter does.
// Timing: every JTAG bit takes two SLOWCLK cycles (TCK low then high), so
// TCK = SLOWCLK/2; TDO is sampled where TCK rises. strobe is synchronised
// into SLOWCLK; dtack rises when the command is done and stays until strobe
// falls. The two-phase bit timing, the strobe handshake and the header TMS
// sequences are this design's choices where the schematics are not shown.
module vme_jtag (
  input  logic        slowclk,
  input  logic        rst,
  input  logic        device,      // this chain's device line
  input  logic [9:0]  command,
  input  logic [15:0] indata,
  input  logic        strobe,      // VME data strobe qualified by address
  input  logic        tdo,
  output logic        dvcenb,      // chain driven (enables the output gate)
  output logic [15:0] outdata,
  output logic        outdata_en,  // outdata valid for VME read (cmd 05)
  output logic        dtack,
  output logic        tdi,
  output logic        tms,
  output logic        tck,
  output logic        load,        // one-cycle pulse when a command starts
  output logic        rdtdobk,     // read-TDO command in progress
  output logic        donetail     // one-cycle pulse when a tailer ends
);
  typedef enum logic [2:0] {S_IDLE, S_RESET, S_HEAD, S_DATA, S_TAIL, S_ACK} state_e;
  state_e state;

  logic [2:0] strobe_sync;
  logic       start;
  logic       cmdhigh, datashft, instshft, readtdo, rstjtag;
  logic       c_tail;
  logic       ph;
  logic [3:0] bitcnt, nbits_m1;
  logic [5:0] reset_ring;
  logic [3:0] head_tms;           // header TMS bits, sent from bit 0
  logic [2:0] head_left;
  logic [1:0] tail_tms;
  logic [3:0] rst_cnt;
  logic       sr_load, sr_shift, cap_en;
  logic [15:0] tdi_q;

  // command decode (CFEB JTAG decode schematic)
  always_comb begin
    cmdhigh  = device & ~command[4] & ~command[5];
    datashft = cmdhigh & ~command[2] & ~command[3];
    instshft = (cmdhigh & command[0] & command[1] & command[2]) |
               (cmdhigh & command[2] & command[3]);
    readtdo  = cmdhigh & command[0] & command[2] & ~command[1] & ~command[3];
    rstjtag  = cmdhigh & command[1] & command[2] & ~command[0] & ~command[3];
  end

  always_ff @(posedge slowclk or posedge rst)
    if (rst) strobe_sync <= '0;
    else     strobe_sync <= {strobe_sync[1:0], strobe & device};

  assign start = strobe_sync[1] & ~strobe_sync[2];

  // data and TDO registers (shift-register macros)
  assign sr_load  = (state == S_IDLE) & start;
  assign sr_shift = (state == S_DATA) & ph;
  assign cap_en   = (state == S_DATA) & ~ph;

  sr16clre u_tdi_sr (
    .c(slowclk), .ce(sr_load | sr_shift), .clr(rst), .l(sr_load),
    .sri(1'b0), .d(indata), .q(tdi_q)
  );

  sr16lce u_tdo_sr (
    .c(slowclk), .ce(cap_en), .clr(rst), .sri(tdo), .q(outdata)
  );

  always_ff @(posedge slowclk or posedge rst)
    if (rst) begin
      state      <= S_IDLE;
      ph         <= 1'b0;
      tck        <= 1'b0;
      tms        <= 1'b0;
      dvcenb     <= 1'b0;
      dtack      <= 1'b0;
      bitcnt     <= '0;
      nbits_m1   <= '0;
      reset_ring <= '0;
      head_tms   <= '0;
      head_left  <= '0;
      tail_tms   <= '0;
      rst_cnt    <= '0;
      c_tail     <= 1'b0;
      rdtdobk    <= 1'b0;
      load       <= 1'b0;
      donetail   <= 1'b0;
    end else begin
      load     <= 1'b0;
      donetail <= 1'b0;
      case (state)
        S_IDLE: begin
          ph  <= 1'b0;
          tck <= 1'b0;
          if (start) begin
            load     <= 1'b1;
            nbits_m1 <= command[9:6];
            bitcnt   <= '0;
            c_tail   <= command[1];
            if (rstjtag) begin
              state      <= S_RESET;
              dvcenb     <= 1'b1;
              reset_ring <= 6'b011111;
              rst_cnt    <= '0;
              tms        <= 1'b1;
            end else if (datashft || instshft) begin
              dvcenb <= 1'b1;
              if (command[0]) begin
                state     <= S_HEAD;
                head_tms  <= instshft ? 4'b0011 : 4'b0001;
                head_left <= instshft ? 3'd4 : 3'd3;
                tms       <= 1'b1;
              end else begin
                state <= S_DATA;
                tms   <= (command[9:6] == 4'd0) & command[1];
              end
            end else begin
              rdtdobk <= readtdo;
              state   <= S_ACK;
              dtack   <= 1'b1;
            end
          end
        end

        S_RESET: begin
          ph      <= ~ph;
          tck     <= ~ph;
          rst_cnt <= rst_cnt + 4'd1;
          if (ph) begin
            reset_ring <= {1'b0, reset_ring[5:1]};
            tms        <= reset_ring[1];
          end
          if (rst_cnt == 4'd11) begin   // Q2 & Q3 of the reset-done counter
            state  <= S_ACK;
            dtack  <= 1'b1;
            tck    <= 1'b0;
            tms    <= 1'b0;
            dvcenb <= 1'b0;
          end
        end

        S_HEAD: begin
          ph  <= ~ph;
          tck <= ~ph;
          if (ph) begin
            head_tms  <= {1'b0, head_tms[3:1]};
            head_left <= head_left - 3'd1;
            if (head_left == 3'd1) begin
              state <= S_DATA;
              tms   <= (nbits_m1 == 4'd0) & c_tail;
            end else
              tms <= head_tms[1];
          end
        end

        S_DATA: begin
          ph  <= ~ph;
          tck <= ~ph;
          if (ph) begin
            bitcnt <= bitcnt + 4'd1;
            if (bitcnt == nbits_m1) begin
              if (c_tail) begin
                state    <= S_TAIL;
                tail_tms <= 2'b01;
                tms      <= 1'b1;
              end else begin
                state  <= S_ACK;
                dtack  <= 1'b1;
                tms    <= 1'b0;
                dvcenb <= 1'b0;
              end
            end else
              tms <= c_tail & (bitcnt + 4'd1 == nbits_m1);
          end
        end

        S_TAIL: begin
          ph  <= ~ph;
          tck <= ~ph;
          if (ph) begin
            tail_tms <= {1'b0, tail_tms[1]};
            tms      <= 1'b0;
            if (!tail_tms[0]) begin
              state    <= S_ACK;
              dtack    <= 1'b1;
              donetail <= 1'b1;
              dvcenb   <= 1'b0;
            end
          end
        end

        S_ACK: begin
          ph  <= 1'b0;
          tck <= 1'b0;
          if (!strobe_sync[1]) begin
            state   <= S_IDLE;
            dtack   <= 1'b0;
            rdtdobk <= 1'b0;
          end
        end

        default: state <= S_IDLE;
      endcase
    end

  assign tdi        = tdi_q[0];
  assign outdata_en = rdtdobk;
endmodule
