// ddu_vme_pkg: constants and types shared by the DDU VME controller.
// VME address layout (all access types):  slot[23:19] type[18:16] dev[15:12]
// then a type-specific command field, bits [1:0] unused.
//   type 000 VME-JTAG     : bitcnt[11:8] cmd[7:2]   (10-bit COMMAND = adr[11:2])
//   type 100 VME-Serial   : cmd[5:2]                 (only device 4 needs it)
//   type 011 VME-Parallel : cmd[9:2]                 (devices >= 8 need it, cmd>=0x80 writes)
// The serial flash opcodes for page program and page read are this design's
// choice (Atmel DataFlash style); only the status opcode 0xD7 is from the notes.
package ddu_vme_pkg;

  typedef enum logic [2:0] {
    TYP_JTAG     = 3'b000,
    TYP_PARALLEL = 3'b011,
    TYP_SERIAL   = 3'b100
  } vme_type_e;

  // Broadcast slot number answered by every DDU
  localparam logic [4:0] DDU_BCAST_SLOT = 5'd28;

  // Fixed identifier returned in the upper byte of parallel device 14
  localparam logic [7:0] VME_ID_BYTE = 8'hCA;

  // FMM override key held in FMM test register bits 15-4
  localparam logic [11:0] FMM_OVR_KEY = 12'hF0E;

  // Serial flash opcodes
  localparam logic [7:0] FL_OP_RDSTAT = 8'hD7;  // read status register (8 bits)
  localparam logic [7:0] FL_OP_PROG   = 8'h82;  // page program through buffer
  localparam logic [7:0] FL_OP_READ   = 8'hD2;  // main memory page read

  // Serial (VME-Serial type) device numbers
  localparam logic [3:0] SDEV_FLASH    = 4'h4;
  localparam logic [3:0] SDEV_GBE      = 4'hC;
  localparam logic [3:0] SDEV_KILL     = 4'hD;
  localparam logic [3:0] SDEV_BRDID    = 4'hE;
  localparam logic [3:0] SDEV_INFIFO_ALL = 4'hF;

  // Number of data bits held in each flash page / loaded into each serial device
  localparam int unsigned W_KILL  = 16;  // page 1, DDU_Ctrl kill-fiber mask
  localparam int unsigned W_DDR   = 32;  // page 4, DDR input FIFO offsets
  localparam int unsigned W_GBE   = 34;  // page 5, GbE output FIFO offsets
  localparam int unsigned W_BRDID = 16;  // page 7, board ID

  // Flash page used by a device-4 command nibble (low 3 bits of the command)
  function automatic int unsigned page_bits(input logic [2:0] page);
    case (page)
      3'd1:    return W_KILL;
      3'd4:    return W_DDR;
      3'd5:    return W_GBE;
      3'd7:    return W_BRDID;
      default: return 0;
    endcase
  endfunction

  // Bits shifted into a serial-load device 8..15
  function automatic int unsigned sdev_bits(input logic [3:0] dev);
    case (dev)
      SDEV_GBE:             return W_GBE;
      SDEV_KILL, SDEV_BRDID: return W_KILL;
      default:              return W_DDR;  // 8..B, F: DDR input FIFOs
    endcase
  endfunction

endpackage
