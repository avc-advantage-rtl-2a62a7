# AVC Advantage motherboard in SystemVerilog

The AVC Advantage is a full-face electronic voting machine built around a Z80
processor. Voters press buttons on a grid of 504 candidate switches with lamps.
Poll workers use a small operator panel and a printer. Results go to removable
battery-backed memory cartridges. Almost all of the machine's hardware is reached by
the Z80 in one of two ways: through a 64 KB memory map with two paged windows, or
through the Z80's separate 256-port I/O space.

This RTL models the motherboard as the software sees it: the memory map, every I/O
port, the NMI logic and the results cartridge. It is synthesizable, except for a
behavioural model of the ADC. It runs software-level tests cycle by cycle. Bought-in
chips stay outside as pins: the CPU, the program and configuration EPROMs, the
real-time clock, the two Z84C30 counter/timers and the two HD44780 LCD controllers.

## The bus model

The Z80 bus is a **one-cycle request** (`avc_pkg::bus_req_t`) that the board samples
on each rising clock edge:

| field | meaning |
|---|---|
| `mreq` / `iorq` | memory cycle / I/O cycle (never both) |
| `rd` / `wr` | direction (never both) |
| `m1` | opcode fetch (only with `mreq`) |
| `addr[15:0]` | memory address; for I/O, `addr[7:0]` is the port and `addr[15:8]` the Z80's upper address byte (register B, or A for `IN A,(n)`) |
| `wdata` | write data |

A write takes effect at the edge that ends its request cycle. Each device registers
its read data, so `rdata` of `avc_board` is valid **in the cycle after** the read
request. Back-to-back requests are allowed every cycle. When no device claims a
read, the board returns 0xFF, as a pulled-up bus would. Assertions in `avc_board`
flag illegal requests, and a read that two devices answer.

This is not Z80 T-state timing. The real board decodes the same address bits with
PALs during a 3- or 4-clock bus cycle. A wrapper that turns Z80 pins into one request
per machine cycle would connect the model to a real Z80 core.

Several devices use the **upper address byte of an I/O cycle as an address**:
`IN A,(n)` places A on A15..A8, and `IN r,(C)` places B there. Examples are the
configuration EPROM and the scratch SRAM data port.

## Memory map

### Program memory, 0x0000-0x7FFF (`prog_mem_map`)

`0x0000-0x3FFF` always reads the first 16 KB of EPROM 1.

`0x4000-0x7FFF` is a window, set by the byte last written to **port 0x01**. Reset
clears it to unmapped: reads give 0xFF and writes do nothing.

| map byte | window shows |
|---|---|
| `0001xxRR` | EPROM 1, 16 KB region with base `~RR << 14` (`11`->0x0000 ... `00`->0xC000) |
| `0010xxRR` | EPROM 2, same encoding |
| `0100xxRR` | EPROM 3, same encoding |
| `1000xxxS` | program SRAM, `S=1` lower 16 KB, `S=0` upper 16 KB |
| `0000xxxx` | unmapped |

A map byte with several chip bits set selects several chips at once. The model
returns the AND of their outputs, which is a guess at what the bus fight does.
Software must not do this. The 32 KB program SRAM is optional on the real board. It
is fitted here by default (`PROG_SRAM_FITTED`). The three 64 KB EPROMs share the
`eprom_addr` pins and have one chip select each.

### Data memory, 0x8000-0xFFFF (`data_mem_map`)

- `0x8000-0xFBFF` is the 32 KB battery-backed SRAM, at offset `A14..A0`.
- `0xFC00-0xFFFF` is a 1 KB window, set by the byte last written to **port 0x02**.
  Bit 7 = 1 selects 128 KB SRAM 1, page `bits 6..0`.
  - Bit 7 = 0 selects 128 KB SRAM 2 at that page, if two big SRAMs are fitted
    (`TWO_BIG_SRAMS=1`).
  - With only one big SRAM (the default, matching the usual jumper), bit 7 = 0
    shows the top 1 KB of the 32 KB SRAM, and the page bits are ignored.
- Reset clears the map byte. This puts the window where the board starts: the top
  of the 32 KB SRAM, or page 0 of SRAM 2.
- `power_fail` comes from the supply monitor and deselects every SRAM. Writes are
  dropped and reads give 0xFF.

An opcode fetch (`m1`) anywhere in 0x8000-0xFFFF raises an NMI; see below.

## I/O port map

| port | dir | device | block |
|---|---|---|---|
| 0x01 | out | program window map | `prog_mem_map` |
| 0x02 | out | data window map | `data_mem_map` |
| 0x04 | out | power control: b0 PWRON, b2 voter panel bus power, b3 voter panel lamp power, b7 watchdog input | `power_ctrl` |
| 0x05 | out | clear the fetch-NMI status bit | `nmi_ctrl` |
| 0x06 | in | b0 Print More, b1 Polls Open, b2 Polls Closed, b5 knob On, b6 AC present, b7 battery missing | `power_ctrl` |
| 0x07 | in | b1 = fetch-NMI status | `nmi_ctrl` |
| 0x10-0x13 | out/in/out/in | operator LCD: instruction write, status read, data write, data read | `lcd_port` in `op_panel` |
| 0x14, 0x15 | in | operator switches; 0x14 b7 reads back the Test LED | `op_panel` |
| 0x16, 0x17 | out | operator LEDs; 0x17 b7 = Test LED | `op_panel` |
| 0x30-0x3F | in | configuration EPROM byte at address A15..A8 | `cfg_eprom_port` |
| 0x40-0x45 / 0x48-0x4D | in/out | voter subpanels, left / right group | `voter_panel` |
| 0x46 | out | booth light (b7); reads 0 | `voter_panel` |
| 0x47 / 0x4F | out | active column, left / right group | `voter_panel` |
| 0x4E | in/out | Cast Vote lamp (out b6) and button | `voter_panel` |
| 0x50, 0x52, 0x53 | out/out/in | RTC address, write, read | `rtc_port` |
| 0x60-0x63 | out/out/in/in | ADC channel, start, result, EOC | `adc_port` |
| 0x70-0x73 | | voter LCD, same as 0x10-0x13 | `lcd_port` |
| 0x74 / 0x75 | out / in | keyboard bank select / keys | `voter_keyboard` |
| 0x90, 0x92 / 0x91 | out / in | printer data, control / status | `printer_port` |
| 0x95 / 0x96 | out / in,out | scratch SRAM page / data at A15..A8 | `scratch_sram` |
| 0xA0-0xA3, 0xA8-0xAB | | CTC0, CTC1 (outside; `ctc_ce`, `ctc_rdata`) | `avc_board` |
| 0xB0-0xB5 / 0xB8-0xBD | | cartridge slot A / slot B | `cart_slots`, `results_cartridge` |

Single ports are decoded on all eight bits. The 0x3X and 0xBX families are decoded
on the high nibble. The real PAL equations are unknown, so the real board may have
aliases that this model lacks.

## Devices with hidden state

These devices are where software most easily goes wrong, so their rules are spelled
out.

**Scratch SRAM (8 KB, not battery backed).** Port 0x95 selects a 256-byte page, with
an unusual bit order:

- value bits 2..0 become SRAM address bits 10..8;
- bit 7 becomes address bit 11;
- bit 6 becomes address bit 12;
- bits 5..3 are ignored.

Port 0x96 then reads or writes the byte at offset A15..A8 of the I/O cycle.

**Real-time clock access (`rtc_port`).** The BQ3285 has a multiplexed bus.

- `OUT (0x50)` strobes the byte in as the register address (`rtc_as`) and arms a
  one-shot flag.
- `OUT (0x52)` then writes the register, or `IN (0x53)` reads it (`rtc_ds`, with
  `rtc_rw`).
- Either access uses up the flag. Without the flag, reads give 0xFF and writes are
  dropped.
- Reset clears the flag.

Each access therefore needs its own address write.

**Results cartridge (`results_cartridge`).** 96 KB of SRAM sits behind a 17-bit
working address. Register numbers are the low three port bits.

| reg | out | in |
|---|---|---|
| 0 | address bits 7..0 | - |
| 1 | address bits 12..8 (value bits 4..0); bit 7 = address invalidator | - |
| 2 | write byte | read byte |
| 3 | address bits 16..13 (value bits 3..0); bit 6 = LED; bit 7 = auto-increment | - |
| 4 | - | ID byte 0x12 |
| 5 | arm if value bits 7..4 equal ID bits 7..4 (i.e. 0x1X) | - |

- A read returns 0xFF if the address is at or above 0x18000, or if the invalidator
  is set.
- A write also needs the arming bit.
- With auto-increment on, each register-2 command then increments **only the low
  eight** address bits. The increment wraps within the 256-byte page and happens
  even if the access was refused.
- Removing the cartridge (`cart_present` low) or resetting the board clears all of
  this state. The SRAM keeps its contents.
- Other registers read 0xFF, and an empty slot reads 0xFF.

The connector signals are this model's own (`cart_bus_t`: strobe, write, register,
data).

## Interrupts

`nmi` is a one-cycle request to the CPU, which jumps to 0x0066. `nmi_fetch` and
`nmi_wdt` show which source raised it.

- **Opcode fetch from data RAM.** An `mreq` with `m1` and A15 = 1 raises the NMI
  and sets a status bit. Port 0x07 reads that bit as bit 1, and any write to port
  0x05 clears it. Code running from the program SRAM (A15 = 0) is not affected.
- **Watchdog.** The watchdog input bit (port 0x04 bit 7) must change at least every
  1.6 s. If it stays the same for `WDT_CYCLES` clocks while PWRON is set, an NMI is
  raised. The count then restarts, so the NMI repeats every 1.6 s. The clock rate is
  not known: `WDT_CYCLES = 6_400_000` assumes 4 MHz. Scale it for another rate.
  Counting starts one clock after the bit changes.

The eight maskable interrupts come from the two CTCs, which are outside the model.
The board only provides their chip enables and CLK/TRG inputs:

| input | source |
|---|---|
| `ctc0_trg[0]` | system clock / 128 (`clk_divider`, inverts every 64 clocks); also the ADC clock |
| `ctc0_trg[2]` | RTC interrupt (`rtc_int_n`) |
| `ctc0_trg[3]` | cartridge present in slot B |
| `ctc1_trg[0]` | low during any I/O cycle to port 0x4F |
| `ctc1_trg[2]` | printer ACK |
| `ctc1_zcto1` (in) | CTC1 channel 1 output; each rising edge toggles `speaker` |

Channels CTC0/1 and CTC1/3 have no input and are tied low.

## Voter panel scanning

The 504 switches and lamps are wired as 2 groups x 6 subpanels x 6 columns x 7 rows.
Each group drives one column at a time.

- Port 0x47 (left group) or 0x4F (right group) takes a value 0-5 and selects the
  group's active column. Reset selects column 0. Values 6 and 7 select no column in
  this model.
- A subpanel port (0x40-0x45 left, 0x48-0x4D right; subpanel = port bits 2..0)
  reads the seven switches of the active column as they are at that moment.
- Writing a subpanel port stores a 7-bit lamp pattern. The pattern goes to that
  subpanel's rows (`vp_row_drv`), and `vp_col_drv` (one-hot per group) selects which
  column lights.
- The pattern stays stored when the column changes. Software therefore scans: it
  selects a column, writes all six patterns, then moves on. The lamps glow long
  enough (about 1/6 s) that every column looks lit. That persistence is a property of
  the lamps and is not modelled.

Cast Vote (port 0x4E):

- Writing bit 6 lights the button.
- While it is dark, reading gives `xxxxxx11`.
- While it is lit, reading gives `10` if pressed and `01` if released.

The booth light is bit 7 of port 0x46.

## Operator panel, LCDs, keyboard, printer

- **LCD ports (`lcd_port`).** Each of the two HD44780 LCD ports gets four ports,
  from 0x10 or 0x70:
  - even port: write;
  - odd port: read;
  - port bit 1: RS (data/instruction);
  - port bit 0: R/W.
  
  E is high during the one request cycle. An access in the wrong direction leaves E
  low. The controller's own timing is not modelled.
- **Operator panel.** Switch states are read raw: `op_sw[6:0]` appear on port 0x14
  and `op_sw[14:7]` on port 0x15. Writing port 0x16 sets `op_led[7:0]` and port 0x17
  sets `op_led[15:8]`. Which physical key or LED sits on which bit is a property of
  the panel wiring and is not encoded here.
- **Keyboard.** Port 0x74 takes a one-hot bank select (0x01-0x10), and port 0x75
  reads that bank. Positions without a key always read 0: bank 0x01 bit 7, bank 0x04
  bits 7..5, and bank 0x10 bit 7. If several banks are selected, their keys are
  ORed.
- **Printer.** Data (port 0x90) and control (port 0x92) are latches. Status (port
  0x91) reads the pins live. The bit-to-pin order used is the usual PC one, without
  inversions:
  - control bits 3..0: SELIN, INIT, AUTOFD, STROBE;
  - status bits 7..3: BUSY, ACK, PE, SELECT, ERROR.

## Voltage monitor

The ADC0808 is used as follows:

- `OUT (0x60)` pulses ALE with the channel number on data bits 2..0.
- `OUT (0x61)` pulses START.
- `IN (0x63)` returns EOC in bit 7.
- `IN (0x62)` reads the result, with OE high.

`adc0808_model` is a behavioural model: each analog input is given as an 8-bit code
(`adc_in`). It follows the converter timing:

- EOC stays high for 8 ADC clocks after START;
- it then goes low for 56 ADC clocks;
- it then returns high with the sampled channel's code ready.

The ADC clock is the system clock divided by 128, so one conversion takes about
8,200 system clocks. The model runs on the system clock and counts rising edges of
the divided clock. This lets it catch the one-cycle ALE and START pulses.

## Files

| file | content |
|---|---|
| `rtl/avc_pkg.sv` | bus request/response and cartridge connector types, port-decode helpers |
| `rtl/avc_board.sv` | top: all devices, read-data merge, CTC wiring, bus assertions |
| `rtl/prog_mem_map.sv`, `rtl/data_mem_map.sv`, `rtl/sram.sv` | memory map and SRAM arrays |
| `rtl/cfg_eprom_port.sv`, `rtl/scratch_sram.sv`, `rtl/rtc_port.sv` | on-board I/O memories |
| `rtl/cart_slots.sv`, `rtl/results_cartridge.sv` | slots and the Rev. C results cartridge |
| `rtl/nmi_ctrl.sv`, `rtl/power_ctrl.sv` | NMI sources, watchdog, switches, power latch |
| `rtl/op_panel.sv`, `rtl/lcd_port.sv`, `rtl/voter_panel.sv`, `rtl/voter_keyboard.sv`, `rtl/printer_port.sv` | panels and printer |
| `rtl/adc_port.sv`, `rtl/clk_divider.sv`, `rtl/adc0808_model.sv` | voltage monitor |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/bq3285_model.sv` | RAM-only stand-in for the real-time clock chip |

Top-level parameters of `avc_board`:

| parameter | default | meaning |
|---|---|---|
| `PROG_SRAM_FITTED` | 1 | 32 KB program SRAM present |
| `TWO_BIG_SRAMS` | 0 | second 128 KB data SRAM present |
| `WDT_CYCLES` | 6,400,000 | watchdog timeout in clocks |
| `ADC_HALF_PERIOD` | 64 | half period of the ADC clock in system clocks |

The memories add up to 392 KB of arrays: 32 + 32 + 128 KB on the board, 8 KB of
scratch SRAM, and 2 x 96 KB of cartridge SRAM. Synthesis keeps them as memory
macros.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog
ends a testbench that hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/avc_pkg.sv tb/tb_avc_board.sv --top-module tb_avc_board -Mdir obj -o sim
./obj/sim
```

Replace `tb_avc_board` with any other testbench name.

`tb_avc_board` runs the whole board at its default parameters. It acts as the
Z80 and takes about 15 s: a boot-like sequence, then a full 6.4-million-clock
watchdog timeout. It counts each mechanism as it happens and fails if any of them
never occurs:

- window paging and power-fail;
- fetch NMI and watchdog NMI;
- RTC one-shot;
- cartridge arming, auto-increment, invalidation and removal;
- panel scanning, Cast Vote, LCD strobes, speaker;
- ADC conversion time;
- CTC wiring;
- floating-bus reads.

The per-module testbenches check each rule above against values worked out
independently. A broken copy of every module fails its testbench.

## How far to trust it

The port numbers, bit assignments, window encodings, cartridge protocol, NMI rules
and ADC timing were recovered by reverse engineering the machine. The model follows
that description closely. The following are this model's own choices, not known
facts about the board:

- **Timing.** One-cycle requests with next-cycle read data.
- **Unknown clock.** 4 MHz is assumed for the watchdog.
- **Bus values.** 0xFF for unclaimed reads. AND-merging for illegal multi-chip
  program maps.
- **Address decode.** Full decode of single ports.
- **Cartridge address bits.** Cartridge address bits 12..8 come from value bits 4..0.
- **Watchdog input.** Port 0x04 bit 7 is taken as the watchdog input, and bit 6 as
  unused.
- **Cartridge connector.** The connector bundle and its empty-slot value.
- **Undefined values.** Column values 6-7 select no column. The printer's pin order
  is assumed.
- **Reset.** Latches that reset to 0 where no start value is known.
- **Power-fail scope.** `power_fail` deselects only the data-memory SRAMs.
- **Panel power.** The voter-panel power bits of port 0x04 only drive the
  `vp_bus_pwr` / `vp_light_pwr` pins. With them off, the panel logic still answers.

Not modelled:

- The Z80, the CTCs, the HD44780 controllers and the BQ3285 clock. The testbench
  model of the BQ3285 is plain RAM.
- The contents of the EPROMs.
- The board's 128 KB-EPROM option, whose wiring is not known.
- Other cartridge types.
