# Banked data memory for a PIC16F84A-style core

This is the data memory (register file) of a small microcontroller modelled on
the PIC16F84A. Besides ordinary storage it holds the special function registers
(SFRs) that control the core and its I/O pins. An instruction names a register
with only 7 address bits. A bank bit in the STATUS register extends that to
two banks, and one address, INDF, reaches any register through a pointer
register (FSR). The design answers three questions in every cycle:

- which physical register the address means, given the bank bit and INDF;
- what that register returns on a read;
- what it takes on a write.

## Memory map

| Address (bank 0) | Address (bank 1) | Register | Bits implemented | Reset value |
|---|---|---|---|---|
| 00h | 80h | INDF: no register; access goes to the address held in FSR | – | – |
| 01h, 02h | 81h, 82h | not present, read 0 | – | – |
| 03h | 83h | STATUS (same register in both banks) | 5 RP0, 2 Z, 1 DC, 0 C | 00h |
| 04h | 84h | FSR, indirect pointer (same in both banks) | 7..0 | 00h |
| 05h | 85h | PORTA / TRISA | 4..0 | latch 00h / TRISA 1Fh |
| 06h | 86h | PORTB / TRISB | 7..0 | latch 00h / TRISB FFh |
| 07h–0Bh | 87h–8Bh | not present, read 0 | – | – |
| 0Ch–4Fh | 8Ch–CFh | 68 general purpose registers (GPRs). Both banks reach the same 68 bytes | 7..0 | not reset |
| 50h–7Fh | D0h–FFh | not present, read 0 | – | – |

"Not present" means three things: a read returns 0, a write is ignored, and no
register is built. In a complete PIC16F84A, 01h, 02h and 08h–0Bh hold the
timer, program counter, EEPROM and interrupt registers. Those belong to other
parts of the core and are not in this block.

The bank bit is RP0 = STATUS<5>. Only the port addresses 05h and 06h differ
between banks. STATUS, FSR and the GPRs look the same from either bank. For
example, 0Ch and 8Ch are the same byte.

## Indirect addressing: how an address becomes a register

```
 Addr[6:0] ──┬──► (== 0?) ──sel──┐
             │                   ▼
             └──────────────► 0 ┌─────┐  eff_addr   ┌─────────┐
 FSR[6:0] ──────────────────► 1 │ mux │ ───────┬──► │ decoder │◄── RP0
                                └─────┘        │    └────┬────┘
                                               │         │ one-hot select
                                               ▼         ▼
                                             GPRs   GPRs, STATUS, FSR, PORTA,
                                                    TRISA, PORTB, TRISB
```

1. `addr_mux` compares the instruction address with 00h. If they are equal,
   it passes FSR<6:0> on as the effective address. Otherwise it passes the
   instruction address.
2. `addr_decoder` takes the effective address and RP0. It raises at most one
   select line, as shown in the map above.
3. A write strobe is the select line ANDed with `DataWrite`. The selected
   register loads `DataIn` at the next rising clock edge.
4. For a read, the select line gates the chosen register onto `DataOut`.

Three properties of this scheme are easy to miss:

- **The bank of an indirect access is RP0, not FSR<7>.** Only the low seven
  bits of FSR reach the multiplexer, and the decoder takes its bank from RP0.
  A real PIC16F84A takes the bank of an indirect access from FSR<7>. To get
  that behaviour, feed `{fsr[7], ...}` to the decoder in place of `rp0` when
  the access is indirect.
- **INDF through INDF reads 0.** If FSR points at 00h, the effective address
  is again 00h. The decoder selects nothing, so a read returns 0 and a write
  does nothing.
- **FSR is itself reachable indirectly.** If FSR holds 04h, an access to INDF
  reads or writes FSR. The new value of FSR then steers the next access.

## Registers

**GPRs (`gprs`).** A 68 × 8 array, indexed by address − 0Ch, so no storage is
spent on the SFR addresses. The read is asynchronous. A write happens at the
clock edge when `wt` is high and the address is inside 0Ch–4Fh. The module
checks the address window itself, so it is safe to use on its own. The
contents are not reset, as in an SRAM. The array can be mapped to a memory
macro with an asynchronous read port. For a synchronous-read SRAM, the read
would have to move one cycle earlier.

**FSR (`fsr_reg`).** A plain 8-bit register. Its output goes to two places:
the read bus and input 1 of the address multiplexer.

**STATUS (`status_reg`).** Holds RP0, Z, DC and C. Bits 7, 6, 4 and 3 read 0.
A flag can change in two ways:

- the ALU updates it: `C_en`/`DC_en`/`Z_en` high loads `C_in`/`DC_in`/`Z_in`;
- an instruction writes STATUS as data.

If both happen to the same flag in the same cycle, the ALU update wins. This
is the PIC rule for an instruction whose destination is STATUS and which also
sets flags. For example, `CLRF STATUS` leaves Z set. RP0 is changed only by a
data write. `C` is a top-level output because the ALU needs the carry as an
input.

**I/O ports (`io_port`, used twice).** Each port has two registers:

- an output latch, written at PORTx;
- a direction register, written at TRISx.

A TRIS bit of 1 makes the pin an input and turns its driver off. A TRIS bit of
0 drives the pin from the latch. TRIS resets to all ones, so every pin starts
as an input.

Reading PORTx returns the level on the pins: the outside level for input pins
and the latch for output pins. So a read of PORTx does not return what was last
written to it while the pins are inputs. Reading TRISx returns the direction
register. PORTA has 5 pins (RA4..RA0), PORTB has 8. The unused upper bits of
PORTA and TRISA read 0.

## Read bus

Every register drives `DataOut` through an enabled buffer (`out_bus`). The
buffers are not tri-state drivers. Each one is an AND with its select, and the
bus is the OR of all of them. With the decoder's one-hot selects this gives
exactly the value a tri-state bus would carry. When nothing is selected, it
gives 0, which is what unimplemented locations must return. An assertion
reports two selects high at once, the case that would be a drive fight on a
real tri-state bus.

## Timing and reset

- One access per clock cycle, with no handshake. `DataOut` depends
  combinationally on `Addr`, on FSR (when INDF is addressed), on RP0, on the
  register contents and, for port reads, on the input pins.
- Writes and flag updates take effect at the rising edge of `Clock`. A value
  written in one cycle can be read in the next.
- `Reset` is synchronous and active high. It sets RP0 = 0, TRISA = 1Fh and
  TRISB = FFh, which are the PIC16F84A power-on values. It also clears Z, DC,
  C, FSR and both port latches, which the PIC leaves undefined. GPRs are not
  reset.

## Interface of `DataMemory`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `Clock`, `Reset` | in | 1 | clock; synchronous active-high reset |
| `Addr` | in | 7 | file address from the instruction |
| `DataIn` | in | 8 | write data |
| `DataWrite` | in | 1 | write the addressed register at the next edge |
| `DataOut` | out | 8 | read data of the addressed register |
| `C_in`, `DC_in`, `Z_in` | in | 1 | new flag values from the ALU |
| `C_en`, `DC_en`, `Z_en` | in | 1 | update that flag at the next edge |
| `C` | out | 1 | carry flag |
| `PortA_in` / `PortA_out` / `PortA_oe` | in / out / out | 5 | RA pins: outside level, driven value, driver enable |
| `PortB_in` / `PortB_out` / `PortB_oe` | in / out / out | 8 | RB pins, likewise |

The usual interface for this block has bidirectional `PortA[4:0]` and
`PortB[7:0]`. Here each of those is split into three signals, so that the
design has no tri-state nets. A pad ring joins them again:
`assign PortA[i] = PortA_oe[i] ? PortA_out[i] : 1'bz; PortA_in = PortA;`.

## Departures from the plain PIC16F84A behaviour, and choices made here

- The bank of an indirect access is RP0, not FSR<7> (see above).
- Locations 01h, 02h and 08h–0Bh are empty in this block.
- Undefined reset values are cleared to 0.
- When a flag update and a STATUS write coincide, the flag update wins.
- The ports are split into `_in`/`_out`/`_oe`.
- The read bus is AND-OR rather than tri-state.
- The GPR array holds exactly 68 entries, not one entry for every address.
- There are no simulation delays: reads have zero delay and writes act at
  the clock edge.

## Files

| File | Contents |
|---|---|
| `rtl/dm_pkg.sv` | widths, register addresses, the `sel_t` select struct |
| `rtl/addr_mux.sv` | zero detector and direct/indirect address multiplexer |
| `rtl/addr_decoder.sv` | address + RP0 → one-hot register select |
| `rtl/gprs.sv` | 68 × 8 general purpose registers |
| `rtl/fsr_reg.sv` | FSR |
| `rtl/status_reg.sv` | STATUS with ALU flag inputs |
| `rtl/io_port.sv` | port latch, TRIS register, pin read-back (parameter `WIDTH`) |
| `rtl/out_bus.sv` | enabled-buffer read bus with contention assertion |
| `rtl/DataMemory.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_lab_sequence.sv` | six-cycle acceptance sequence, printed cycle by cycle |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`, and every testbench has
a watchdog:

- `tb_addr_mux` and `tb_addr_decoder` try every address in both banks. The
  decoder is compared with the memory map written out by hand.
- `tb_gprs` writes all 68 registers and reads back every address. It checks
  that writes with `wt` low and writes outside the window change nothing, then
  runs random traffic against a reference array.
- `tb_fsr_reg`, `tb_status_reg` and `tb_io_port` run random traffic against
  bit-level reference models. The STATUS test also makes sure that a flag
  update has coincided with a data write.
- `tb_DataMemory` runs the whole memory at its default size. It first runs
  the acceptance sequence:
  1. reset;
  2. FSR ← 13h;
  3. [13h] ← 27h;
  4. read INDF, expecting 27h;
  5. [0Fh] ← 55h;
  6. read 0Fh, expecting 55h.

  It then makes 20,000 random accesses against a reference model of the whole
  memory map. It counts how often each mechanism happened: reset, direct and
  indirect reads and writes, bank-1 accesses, GPR mirroring, RP0 switching,
  flag updates, flag updates winning over a STATUS write, port input reads,
  driven port pins, TRIS writes and unimplemented locations. A mechanism that
  never happened counts as a failure. It runs in well under a second.
- `tb_lab_sequence` runs only the six-cycle acceptance sequence and prints it
  as a table of Reset, Addr, DataIn, DataWrite and DataOut per cycle.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/dm_pkg.sv \
          tb/tb_DataMemory.sv --top-module tb_DataMemory
./obj_dir/Vtb_DataMemory
```

Replace `tb_DataMemory` with any other testbench name. The package has to come
first on the command line. Verilator finds the other modules in `rtl/` through
`-y rtl`. For a linted build, use
`verilator --lint-only -Wall -y rtl rtl/dm_pkg.sv rtl/DataMemory.sv`.
Lint reports unused constants of the package and nothing else.

To change the register map, edit the addresses in `dm_pkg.sv` and the decoder.
The GPR window is given by `A_GPR_FIRST`/`A_GPR_LAST`, and the `gprs` depth
follows from them. Adding a register means four changes:

1. a field in `sel_t`;
2. a line in the decoder;
3. a source in the `src` array of `DataMemory`;
4. the new register module.

`NUM_SRC` follows `sel_t` on its own.
