// vme_addr_decode: splits a VME A24 address into the fields the controller
// uses. slot[23:19] must equal the board's geographic address or the DDU
// broadcast slot 28. type[18:16] selects VME-JTAG (000), VME-Parallel (011)
// or VME-Serial (100). dev[15:12] picks the device; for JTAG it is decoded
// one-hot onto 14 device lines, enabled only when type bits 18..16 are all
// zero (the OR3/INV/D4_16E path of the decode schematic). The command field
// depends on the type (see ddu_vme_pkg). access_ok applies the read/write
// rules of the address notes: serial devices >= 8 are write only, serial
// device 4 writes for command >= 9 and reads otherwise, other serial devices
// read only; parallel devices < 8 are read only, parallel devices >= 8
// write for command >= 0x80 and read otherwise; JTAG accepts both.
// Purely combinational.
module vme_addr_decode
  import ddu_vme_pkg::*;
(
  input  logic [23:0] adr,
  input  logic [4:0]  ga,          // geographic (slot) address
  input  logic        write,       // 1 = VME write cycle
  output logic        slot_hit,
  output logic        bcast,
  output logic        jtag_sel,
  output logic [13:0] jtag_dev,    // one-hot JTAG device lines DEVICE[13:0]
  output logic [9:0]  jtag_cmd,    // bitcnt[9:6], command[5:0]
  output logic        ser_sel,
  output logic        par_sel,
  output logic [3:0]  dev,
  output logic [3:0]  ser_cmd,
  output logic [7:0]  par_cmd,
  output logic        access_ok
);
  logic adrshigh;
  logic [15:0] dec;

  always_comb begin
    bcast    = adr[23:19] == DDU_BCAST_SLOT;
    slot_hit = (adr[23:19] == ga) || bcast;
    adrshigh = adr[18] | adr[17] | adr[16];
    dev      = adr[15:12];
    dec      = adrshigh ? 16'h0000 : (16'h0001 << adr[15:12]);
    jtag_dev = dec[13:0];
    jtag_sel = !adrshigh;
    jtag_cmd = adr[11:2];
    ser_sel  = adr[18:16] == TYP_SERIAL;
    par_sel  = adr[18:16] == TYP_PARALLEL;
    ser_cmd  = adr[5:2];
    par_cmd  = adr[9:2];

    access_ok = 1'b0;
    if (jtag_sel)
      access_ok = 1'b1;
    else if (ser_sel) begin
      if (dev >= 4'd8)       access_ok = write;
      else if (dev == SDEV_FLASH)
        access_ok = (ser_cmd >= 4'd9) ? write : !write;
      else                   access_ok = !write;
    end else if (par_sel) begin
      if (dev < 4'd8)        access_ok = !write;
      else                   access_ok = par_cmd[7] ? write : !write;
    end
  end
endmodule
