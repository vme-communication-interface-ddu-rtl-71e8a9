// vme_serial: VME-Serial controller (address type 100) for the on-board
// serial flash and for the serial-load ports of the FIFOs and DDU_Ctrl FPGA.
// The flash keeps four pages of board constants:
//   page 1  16 bits  kill-fiber mask  -> DDU_Ctrl (serial device 0D)
//   page 4  32 bits  DDR input FIFO offsets -> input FIFOs 0-3 (08-0B, 0F)
//   page 5  34 bits  GbE output FIFO offsets -> output FIFO (0C)
//   page 7  16 bits  board ID -> DDU_Ctrl (0E)
// VME accesses (dev = address bits 15-12, cmd = bits 5-2):
//   dev 0-3   read: read back the 32-bit offset word of input FIFO <dev>
//             through its serial output, low 16 bits to VME (no flash)
//   dev 4 cmd 0      read flash status (opcode D7, 8 bits back)
//   dev 4 cmd 1,4,5,7 read page <cmd> into its destination, low 16 to VME
//   dev 4 cmd 9,C,D,F write: program page <cmd-8> from the input registers
//   dev 8-F   write: load the device directly from the input registers
// The data source for programming and direct loads is the 48-bit value
// {inreg2, inreg1, inreg0}, of which the low N bits are used (N per page or
// device). All serial data goes MSB first.
// Flash frames: status = 8-bit opcode then 8 bits in; program = 32 bits
// (opcode + 24-bit address) then N data bits; read = 64 bits (opcode,
// address, 32 don't-care bits) then N bits in. The address is
// {4'b0, page[10:0], 9'b0}. A page read that has a destination is followed
// by shifting the N bits into that device with its enable high.
// A FIFO read-back clocks the FIFO's serial-load port 32 times and feeds each
// bit from its serial output (dst_sdo) straight back into its serial input,
// so the offsets are rotated once round and left unchanged; the bits seen are
// returned, last bit in outdata[0].
// Auto load: a rising auto_req (DDU_Ctrl serial ready after reset), unless
// auto_disable is set, runs page 1 -> 0D, page 7 -> 0E, page 4 (skipped),
// page 5 -> 0C from a one-hot SR4RE sequencer; VME requests wait meanwhile.
// Timing: SCLK domain; each serial bit takes two SCLK cycles (clock low, then
// high), so M_SCK = SCLK/2; the flash samples on the rising clock and its
// output is sampled on the same edge. m_cs_n returns high for one cycle
// between the flash frame and the destination load. dtack rises when the
// whole operation is done and stays until strobe falls.
// The serial-load data line rests high between loads, as the FIFOs expect
// their serial input high whenever it is not shifting.
// The command table, page sizes, status opcode and the auto-load order are
// from the serial device notes; the program/read opcodes (82h/D2h), the
// address format, bit order, two-phase clocking and handshake are this
// design's choices. Reading the input FIFOs' own offset registers back
// through their serial outputs is not modelled.
module vme_serial
  import ddu_vme_pkg::*;
(
  input  logic        sclk,
  input  logic        rst,
  input  logic        sel,          // serial type and slot match
  input  logic [3:0]  dev,
  input  logic [3:0]  cmd,
  input  logic        strobe,
  input  logic [2:0][15:0] inreg,
  input  logic        auto_req,
  input  logic        auto_disable,
  // serial flash
  output logic        m_cs_n,
  output logic        m_sck,
  output logic        m_si,
  input  logic        m_so,
  // serial-load destinations, index = serial device number - 8
  output logic        dst_sclk,
  output logic        dst_sdi,
  input  logic [3:0]  dst_sdo,      // serial outputs of input FIFOs 0-3
  output logic [7:0]  dst_en,
  // VME side
  output logic [15:0] outdata,
  output logic        outdata_en,
  output logic        dtack,
  output logic        busy,
  output logic        auto_done     // one-cycle pulse at the end of auto load
);
  typedef enum logic [2:0] {S_IDLE, S_FLASH, S_CSHI, S_DEST, S_DONE} state_e;
  state_e state;

  logic [1:0]  strobe_sync;
  logic [1:0]  auto_sync;
  logic        vme_served, vme_op, vme_go, auto_go, auto_run, auto_step_done;
  logic [3:0]  aseq;
  logic        aseq_ce, aseq_clr;
  logic        ph;
  logic [71:0] txsr;
  logic [47:0] rxsr, dsr;
  logic [6:0]  tx_left, rx_left;
  logic [5:0]  dst_left, dst_n;
  logic [7:0]  dst_sel;
  logic        to_vme, has_dest, sread;

  // ---- request decode --------------------------------------------------
  typedef struct packed {
    logic        valid;
    logic [6:0]  tx_n;     // bits sent to the flash
    logic [6:0]  rx_n;     // bits read from the flash
    logic [71:0] tx;       // flash frame, left aligned
    logic [5:0]  dst_n;    // bits loaded into the destination
    logic [7:0]  dst;      // destination enables
    logic        from_rx;  // destination data come from the flash read
    logic        to_vme;   // result returned on VME
    logic        sread;    // read the destination back through its serial output
  } req_t;

  function automatic logic [7:0] page_dest(input logic [2:0] page);
    case (page)
      3'd1:    return 8'b0010_0000;   // 0D kill fiber
      3'd4:    return 8'b0000_1111;   // 08-0B input FIFOs
      3'd5:    return 8'b0001_0000;   // 0C GbE FIFO
      3'd7:    return 8'b0100_0000;   // 0E board ID
      default: return 8'b0;
    endcase
  endfunction

  function automatic logic [71:0] frame(input logic [7:0] op, input logic [2:0] page,
                                        input logic [47:0] data, input int unsigned n);
    logic [71:0] f;
    logic [47:0] d;
    f = {op, 4'b0, 8'b0, page, 9'b0, 40'b0};
    d = (n == 0) ? 48'b0 : (data & ((48'b1 << n) - 48'b1));
    f = f | ({24'b0, d} << (40 - n));
    return f;
  endfunction

  function automatic req_t decode(input logic [3:0] d, input logic [3:0] c,
                                  input logic [47:0] data);
    req_t r;
    r = '0;
    r.valid = 1'b1;
    if (d < 4'd4) begin                       // read back input FIFO <d>, no flash
      r.dst_n = 6'(W_DDR); r.dst = 8'b1 << d[1:0]; r.sread = 1'b1; r.to_vme = 1'b1;
    end else if (d == SDEV_FLASH) begin
      if (c == 4'h0) begin
        r.tx_n = 7'd8; r.rx_n = 7'd8;
        r.tx = {FL_OP_RDSTAT, 64'b0}; r.to_vme = 1'b1;
      end else if (page_bits(c[2:0]) != 0 && !c[3]) begin
        r.tx_n = 7'd64; r.rx_n = 7'(page_bits(c[2:0]));
        r.tx = frame(FL_OP_READ, c[2:0], 48'b0, 0);
        r.dst_n = 6'(page_bits(c[2:0])); r.dst = page_dest(c[2:0]);
        r.from_rx = 1'b1; r.to_vme = 1'b1;
      end else if (page_bits(c[2:0]) != 0 && c[3]) begin
        r.tx_n = 7'(32 + page_bits(c[2:0]));
        r.tx = frame(FL_OP_PROG, c[2:0], data, page_bits(c[2:0]));
      end else
        r.valid = 1'b0;                       // unused command: acknowledge only
    end else if (d >= 4'd8) begin
      r.dst_n = 6'(sdev_bits(d));
      r.dst   = (d == SDEV_INFIFO_ALL) ? 8'b0000_1111 : (8'b1 << d[2:0]);
    end else
      r.valid = 1'b0;
    return r;
  endfunction

  req_t vreq, areq;

  always_comb begin
    vreq = decode(dev, cmd, {inreg[2], inreg[1], inreg[0]});
    areq = '0;
    case (1'b1)
      aseq[0]: areq = decode(SDEV_FLASH, 4'h1, 48'b0);
      aseq[1]: areq = decode(SDEV_FLASH, 4'h7, 48'b0);
      aseq[3]: areq = decode(SDEV_FLASH, 4'h5, 48'b0);
      default: areq = '0;                     // step 2 (page 4) not loaded
    endcase
    areq.to_vme = 1'b0;
  end

  // ---- synchronisers and request arbitration -----------------------------
  always_ff @(posedge sclk or posedge rst)
    if (rst) begin
      strobe_sync <= '0;
      auto_sync   <= '0;
    end else begin
      strobe_sync <= {strobe_sync[0], strobe & sel};
      auto_sync   <= {auto_sync[0], auto_req};
    end

  assign auto_go = auto_sync[0] & ~auto_sync[1] & ~auto_disable & ~auto_run &
                   (state == S_IDLE);
  assign vme_go  = strobe_sync[1] & ~vme_served & ~auto_run & ~auto_go &
                   (state == S_IDLE);

  // auto-load step sequencer: one-hot, cleared to step 0 at the start
  assign aseq_clr = auto_go;
  assign aseq_ce  = auto_run & (auto_step_done | (aseq[2] & state == S_IDLE));
  sr4re u_aseq (.c(sclk), .ce(aseq_ce), .clr(aseq_clr), .sli(1'b0), .q(aseq));


  // ---- serial engine -------------------------------------------------------
  always_ff @(posedge sclk or posedge rst)
    if (rst) begin
      state      <= S_IDLE;
      vme_served <= 1'b0;
      vme_op     <= 1'b0;
      auto_run   <= 1'b0;
      auto_done  <= 1'b0;
      auto_step_done <= 1'b0;
      ph         <= 1'b0;
      txsr       <= '0;
      rxsr       <= '0;
      dsr        <= '0;
      tx_left    <= '0;
      rx_left    <= '0;
      dst_left   <= '0;
      dst_n      <= '0;
      dst_sel    <= '0;
      has_dest   <= 1'b0;
      to_vme     <= 1'b0;
      sread      <= 1'b0;
      m_cs_n     <= 1'b1;
      m_sck      <= 1'b0;
      dst_sclk   <= 1'b0;
      dst_en     <= '0;
      dtack      <= 1'b0;
      outdata    <= '0;
      outdata_en <= 1'b0;
    end else begin
      auto_done      <= 1'b0;
      auto_step_done <= 1'b0;
      if (!strobe_sync[1]) begin
        vme_served <= 1'b0;
        dtack      <= 1'b0;
        outdata_en <= 1'b0;
      end
      if (auto_go) auto_run <= 1'b1;
      if (auto_run && aseq == 4'b0000) begin
        auto_run  <= 1'b0;
        auto_done <= 1'b1;
      end

      case (state)
        S_IDLE: begin
          ph <= 1'b0;
          if (vme_go || (auto_run && !aseq[2] && aseq != 4'b0000 && !auto_step_done)) begin
            req_t r;
            r = vme_go ? vreq : areq;
            vme_op     <= vme_go;
            vme_served <= vme_go;
            txsr       <= r.tx;
            tx_left    <= r.tx_n;
            rx_left    <= r.rx_n;
            rxsr       <= '0;
            dst_n      <= r.dst_n;
            dst_sel    <= r.dst;
            has_dest   <= r.from_rx;
            to_vme     <= r.to_vme;
            sread      <= r.sread;
            if (!r.valid)
              state <= S_DONE;
            else if (r.tx_n != 0) begin
              state  <= S_FLASH;
              m_cs_n <= 1'b0;
            end else begin
              state    <= S_DEST;
              dst_left <= r.dst_n;
              dsr      <= r.sread ? {|(dst_sdo & r.dst[3:0]), 47'b0}
                                  : {inreg[2], inreg[1], inreg[0]} << (48 - r.dst_n);
              dst_en   <= r.dst;
            end
          end
        end

        S_FLASH: begin
          ph    <= ~ph;
          m_sck <= ~ph;
          if (!ph) begin
            if (tx_left == 0) rxsr <= {rxsr[46:0], m_so};
          end else begin
            if (tx_left != 0) begin
              tx_left <= tx_left - 7'd1;
              txsr    <= {txsr[70:0], 1'b0};
            end else
              rx_left <= rx_left - 7'd1;
            if ((tx_left == 7'd1 && rx_left == 0) || (tx_left == 0 && rx_left == 7'd1)) begin
              state  <= S_CSHI;
              m_cs_n <= 1'b1;
            end
          end
        end

        S_CSHI: begin
          ph <= 1'b0;
          if (has_dest && dst_n != 0) begin
            state    <= S_DEST;
            dst_left <= dst_n;
            dsr      <= rxsr << (48 - dst_n);
            dst_en   <= dst_sel;
          end else
            state <= S_DONE;
        end

        S_DEST: begin
          ph       <= ~ph;
          dst_sclk <= ~ph;
          if (ph) begin
            dst_left <= dst_left - 6'd1;
            if (sread) begin
              // the bit just sent back in is the bit read; fetch the next one
              rxsr <= {rxsr[46:0], dsr[47]};
              dsr  <= {|(dst_sdo & dst_en[3:0]), 47'b0};
            end else
              dsr  <= {dsr[46:0], 1'b0};
            if (dst_left == 6'd1) begin
              state  <= S_DONE;
              dst_en <= '0;
            end
          end
        end

        S_DONE: begin
          ph       <= 1'b0;
          dst_sclk <= 1'b0;
          if (vme_op) begin
            dtack      <= 1'b1;
            outdata    <= rxsr[15:0];
            outdata_en <= to_vme;
          end else
            auto_step_done <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end

  assign m_si    = ~m_cs_n & txsr[71] & (tx_left != 0);
  // the serial-load data line rests high whenever it is not shifting
  assign dst_sdi = (state == S_DEST) ? dsr[47] : 1'b1;
  assign busy    = (state != S_IDLE) | auto_run;
endmodule
