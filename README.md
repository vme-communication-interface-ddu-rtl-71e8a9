# DDU VME controller

The DDU is the data-concentrator board of the CMS Cathode Strip Chamber readout. Its VME controller
is a small FPGA. Through it, a VME crate controller can reach everything on the board that has no
data path of its own:

- the JTAG chains of all PROMs, FPGAs, FIFOs and the S-Link;
- a serial flash that holds the board's constants, and the serial-load ports that receive them;
- a 12-bit serial ADC for voltage and temperature monitoring;
- status, history and control registers, including the FMM (Fast Merging Module) state sent to the
  trigger system;
- interrupt level 1, raised when a chamber loses sync or reports an error.

This repository has a synthesizable SystemVerilog model of that controller. The top module is
`ddu_vme_ctrl`. It has no parameters: every size in it is the board's own.

## Address map

The controller is a VME A24/D16 slave. Each 24-bit address is split into fields:

| bits  | field |
|-------|-------|
| 23:19 | slot. It must match the geographic address `ga`, or be the broadcast slot 28. |
| 18:16 | service: `000` JTAG, `100` serial, `011` parallel |
| 15:12 | device |
| 11:2  | command. JTAG uses 11:2 (bit count 11:8, operation 7:2). Serial uses 5:2. Parallel uses 9:2. |

Access rules are checked in `vme_addr_decode`. A cycle that breaks them gets no DTACK:

- Parallel devices 0–7 are read-only. Devices 8 and up are written when command ≥ 0x80 and read
  otherwise.
- Serial devices 8 and up are write-only. Device 4 is written when command ≥ 9.
- Any other access is a read.

Broadcast (slot 28) cycles are accepted by every board. On a broadcast read the data drivers stay
off.

A cycle is accepted when all of these hold:

- `as_n`, `ds0_n` and `ds1_n` are low;
- `iack_n` is high;
- the slot matches;
- the access is legal.

The addressed unit raises its acknowledge when it has finished. `dtack_n` is the OR of all the
units' acknowledges, and it rises again once the strobes are released. `vme_doe` enables the
board's data drivers on reads.

## VME-JTAG: one engine per chain

This is the part that needs the most care. Each of the eight chains has its own `vme_jtag` engine,
so one VME access runs one command on one chain. The JTAG device number selects the chain:

| device | chain | contents | engine clock | TCK | idle pins |
|--------|-------|----------|--------------|-----|-----------|
| 1 | 7 | output FIFO | SCLK | 5 MHz | driven |
| 2 | 1 | VME controller PROM | SLOWCLK2 | 625 kHz | 3-state |
| 3 | 6 | DDU_Ctrl PROMs | SLOWCLK2 | 625 kHz | 3-state |
| 4 | 4 | InCtrl PROMs | SLOWCLK2 | 625 kHz | 3-state |
| 5 | 8 | DDU_Ctrl FPGA | SLOWCLK2 | 625 kHz | driven |
| 6 | 2 | InCtrl FPGA 0 | SCLK | 5 MHz | driven |
| 7 | 3 | InCtrl FPGA 1 | SCLK | 5 MHz | driven |
| 8 | 5 | S-Link | SCLK | 5 MHz | driven |

The PROMs run from the slow clock because in-system programming fails at 2.5 MHz and faster. The
DDU_Ctrl FPGA chain is also on the slow clock in this revision of the board. The InCtrl FPGA
chains are on SCLK.

The 10-bit command is `{bit count − 1 [9:6], operation [5:0]}`, so one access moves 1 to 16 bits:

| op | action |
|----|--------|
| 00 | shift data, no header, no tailer |
| 01 | shift data with header |
| 02 | shift data with tailer |
| 03 | shift data with header and tailer |
| 05 | return the TDO capture register on the VME data bus |
| 06 | reset the TAP: TMS 1,1,1,1,1,0, ending in Run-Test/Idle |
| 07, 0F | shift instruction with header and tailer |
| 0C, 0D, 0E | shift instruction with no header / header only / tailer only |

The header and tailer work as follows:

- The header walks the TAP from Run-Test/Idle to Shift-DR (TMS 1,0,0) or to Shift-IR
  (TMS 1,1,0,0).
- With a tailer, TMS is high on the last data bit, and the tailer is TMS 1,0 (Update, then
  Run-Test/Idle).
- Without a tailer the TAP stays in Shift. This lets a long register be scanned over several
  16-bit accesses: the first access has a header, the middle ones have neither, and the last one
  has a tailer.

Data and timing:

- Data leaves LSB first from a loadable right-shift register.
- TDO enters the top of a second right-shift register. After n bits, the captured bits are in
  `outdata[15:16-n]`. Operation 05 reads them back.
- Every bit takes two clock cycles of the chain: TCK low, then high. TDO is sampled where TCK
  rises.
- The reset command acknowledges after 12 clock cycles.

After a hard reset, `jtag_restore_idle` holds a line high for 8 SCLK cycles. During that time the
FPGA chains see TMS = 1 with TCK pulses from SCLK, so every FPGA TAP returns to Test-Logic-Reset.
`jtag_out_gate` does this gating. When the chain is idle, it also 3-states the PROM chains (with a
pull-down on TCK).

JTAG device 13 is the serial ADC (`seradc`). It is a MAX1270/1271 type:

- Command 00 writes the 8-bit control byte, which selects the channel and range.
- Command 01 reads back the 12-bit result in `outdata[11:0]`.
- The ADC clock is SLOWCLK/2 = 1.25 MHz.
- A one-hot four-step ring (`sr4ce3`) sequences chip select, shift and completion.

## VME-Serial: flash constants and auto-load

The board keeps its constants in four pages of a serial flash:

| page | bits | meaning | sent to (serial device) |
|------|------|---------|-------------------------|
| 1 | 16 | kill-fiber mask | DDU_Ctrl (0D) |
| 4 | 32 | input-FIFO almost-full/empty offsets | input FIFOs 0–3 (08–0B, or all via 0F) |
| 5 | 34 | GbE FIFO offsets | output FIFO (0C) |
| 7 | 16 | board ID | DDU_Ctrl (0E) |

`vme_serial` handles the serial service. VME command meanings:

- Device 4 command 0 reads the flash status register (opcode D7).
- Device 4 commands 1, 4, 5 and 7 read that page, load it into its destination, and return the low
  16 bits.
- Device 4 commands 9, C, D and F program page `cmd − 8`.
- Devices 0–3 read input FIFO 0–3 back through its serial output, without the flash. The 32 bits
  read are fed straight back into the FIFO, so its offsets stay as they were. The last 16 bits go
  to VME.
- Devices 8–F load the destination directly.

Program data and direct-load data come from the 48-bit value held in parallel input registers 0–2
(see below). Only the low N bits are used.

After reset, DDU_Ctrl signals that it is ready for serial data (`auto_req`). The controller then
copies the constants by itself, in this order:

1. page 1 → kill mask;
2. page 7 → board ID;
3. page 4 (skipped);
4. page 5 → GbE FIFO.

A one-hot `sr4re` sequencer steps through this list. Mode switch 7 (`mode_sw[6]`) turns auto-load
off.

The serial clock runs at SCLK/2 and only during a transfer. All data goes MSB first. The
serial-load data line rests high between loads, which is what the FIFOs expect.

## VME-Parallel registers and FMM

`vme_par_regs` holds these registers:

| device | access | contents |
|--------|--------|----------|
| 0 | R | busy flags (bit 15 = DDU, 14–0 = DMB 14..0) |
| 1 | R | warning flags |
| 2 | R | lost-sync flags |
| 3 | R | error flags |
| 4 | R | need-reset summary |
| 5 | R | warning history (sticky) |
| 6 | R | busy history (sticky) |
| 8, cmd 80 | W | input register 0. Each write first moves register 0 → 1 → 2. |
| 8, cmd 00–02 | R | input registers 0–2 |
| 8, cmd 03–07 | R | reset-test registers 0–4 |
| 9, cmd 00 / 80 | R/W | GbE prescale (bits 2–0) and S-Link wait enable (bit 3). Each output bit is valid only when its nibble pattern is consistent: bit i = r[i] & r[i+8] & !r[i+4] & !r[i+12]. |
| 9, cmd 05 / 85 | R/W | fake-L1A / pass-through enables |
| 9, cmd 0F / 8F | R/W | FMM test register. Writing F0E in bits 15–4 forces bits 3–0 onto the FMM outputs. |
| 14 | R | `{8'hCA, mode switch}` |
| 15 | R | `{VME ready, FMM[3:0], 6'b0, slot}` |

The FMM state is a 4-bit code:

| state | value | LEDs |
|-------|-------|------|
| Busy | 0100 | yellow on |
| Ready | 1000 | green on |
| Warning | 0001 | green on, yellow blinking |
| Out of sync | 0010 | both blinking |
| Error | 1100 | yellow blinking |

`fmm_decode` turns the state into LED requests. `fmmled` makes a blink always finish once it has
started, even if the request goes away.

## Interrupt

`irq1_n` is low while any CSC sync or error flag is set. The IACK daisy chain (`vme_irq`) claims
only level-1 acknowledge cycles and passes the others on `iack_out_n`. The acknowledge status word
is `{number of flagged CSCs [7:0], 3'b0, slot}`.

## Debug headers

`diag_mux` puts debug words on the two 16-bit logic-analyser/LED headers `la0`/`la1`. The choice
depends on mode switch bits 3–0:

- Modes 0 and 4 show a debug word on `la1`. Mode switch bits 5–4 pick its group: 00 standard
  VME handshake and FMM, 01 VME-Serial, 10 flash pins, 11 VME-Parallel.
- Modes 1 and 5 show the JTAG signals of chains 2 and 3 and the serial-port word.
- Mode 14 shows the last ADC word.
- Mode switch 8 (`mode_sw[7]`) drives every header bit high.

## Clocks and reset

| clock | frequency | use |
|-------|-----------|-----|
| `fastclk` | 80 MHz | IACK logic, retiming |
| `sclk` (MIDCLK) | 10 MHz | VME-Serial, parallel registers, restore-idle, FPGA/FIFO/S-Link JTAG chains |
| SLOWCLK | 2.5 MHz | serial-ADC controller |
| SLOWCLK2 | 1.25 MHz | PROM chains, DDU_Ctrl FPGA chain |
| `bclk` | slow | LED blink |

`clk_div` derives SLOWCLK and SLOWCLK2 from `sclk` by toggle stages, then retimes them on `sclk`
and `fastclk`.

There are two resets:

- `hard_rst_n` clears everything and starts the restore-idle pulse.
- `soft_rst` clears everything except the clock dividers and the restore-idle counter.

## What follows the original design and what does not

These parts follow the board's design notes and schematics closely:

- address fields and read/write rules;
- JTAG device list and command codes;
- the 12-cycle TAP reset;
- restore-idle counter and output gating;
- IACK logic (gate for gate);
- FMM decode and LED blink circuits;
- GbE prescale decode;
- FMM override key;
- register map;
- flash page sizes, destinations and auto-load order;
- flash status opcode;
- clock frequencies.

These are this design's own choices, because the notes do not give them:

- the two-phase JTAG bit timing and the header/tailer TMS sequences (the standard IEEE 1149.1
  walk);
- how VME strobes are synchronised into each clock domain, and when DTACK is given;
- the flash program and read opcodes (82h, D2h) and the flash address format;
- the ADC framing: control byte MSB first, then 12 result bits with the MSB ready at chip select;
- the IRQ condition and the IACK status word;
- the signals inside each debug word (the groups and their switch settings are the original's);
- the dev 15 bit layout;
- the dev 4 summary (sync OR error).

Departures and omissions:

- **Restore-idle trigger.** It fires on hard reset only, as the schematic shows. A revision note
  says it should also follow a soft reset.
- **Serial-load ports.** FIFO offsets are shifted in with a plain enable per destination. The data
  line rests high between loads. The FIFO pin sequencing around a master reset (LD/SEN held high
  to select serial loading) is not modelled.
- **FIFO read-back.** Reading a FIFO back re-feeds its own bits so the read does not destroy the
  offsets. This is this design's choice.
- **Emergency PROM programming.** JTAG device 15 is not decoded.
- **Mode switch 8.** It drives the headers high but does not show the FPGA version on the LEDs.
- **Device numbering conflicts.** Two places in the original numbering disagree. Device 8 is taken
  as the S-Link chain, not the input FIFOs, and the ADC as device 13.

The chips around the controller are not part of the RTL: PROMs, FPGAs, FIFOs, flash, ADC and I/O
buffers. The testbenches model them behaviourally:

- `jtag_tap_model`: an IEEE 1149.1 TAP with an IR and a DR;
- `dataflash_model`: a DataFlash-style status/program/read device;
- `max1271_model`: the ADC.

## Simulation

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. The simulators are two-state,
so each testbench drives every reset. For example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/ddu_vme_pkg.sv \
    tb/tb_ddu_vme_ctrl.sv --top-module tb_ddu_vme_ctrl
./obj_dir/Vtb_ddu_vme_ctrl
```

`tb_ddu_vme_ctrl` runs the full top at the board clock rates (only the LED blink clock is sped up). It takes
about a minute. It does the
following and counts each mechanism, failing if any of them never happens:

- TAP resets, IR and DR scans and TDO read-back on FPGA and PROM chains, each chain model having
  its chip's IR length (4 to 16 bits);
- the TCK rate of a fast chain (5 MHz) and of the slow chains (625 kHz);
- the usual User1/User2 access on the DDU_Ctrl FPGA: select a function through User1, move data
  words through User2, then return the chip to Bypass;
- PROM chain 3-stating and restore-idle;
- ADC conversions;
- input-register pipelining and FMM override;
- flash status, program and read;
- a direct load of an input FIFO and its read-back;
- auto-load;
- broadcast and refused cycles;
- an IACK cycle;
- LED blinking;
- debug-header modes;
- soft reset.
