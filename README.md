# Byte-parallel ATM cell delineation by HEC validation

An ATM receiver sees an unbroken stream of bytes and must find where the
53-byte cells begin. The only structure available is the header error control
(HEC) byte: the fifth byte of every cell header is a CRC-8 over the four bytes
before it. The receiver therefore looks for five consecutive bytes that form a
valid header codeword, assumes a cell boundary there, and confirms it on the
following cells.

While the boundary is unknown (the HUNT state), this check has to be made
after **every** byte, on a window of the last five bytes that slides forward by
one byte each clock. An ordinary CRC circuit cannot do that, because it has to
be cleared at the start of each codeword. This design computes the sliding
syndrome with two free-running remainder registers whose XOR is the syndrome of
the last 40 bits. Neither register is ever cleared after power-up. Each needs
only an 8-bit XOR plane in its feedback loop. There is no wide 40-bit window
logic.

The obvious alternative keeps the last five bytes in registers and XORs the
outputs of five planes `D`, `D^2` .. `D^5`, one per register. It needs a wide
final XOR and has a large fan-out from every register, which is why it is not
used here.

Once a candidate boundary exists, a conventional per-header CRC check and a
HUNT / PRESYNC / SYNC state machine confirm or reject it.

## The two-remainder syndrome

### Notation

Bytes are row vectors `Z = [z0 .. z7]`, where `z_i` is the coefficient of
`x^i`. Bit 7 of a byte is the first bit on the line. The newest bit of the
stream therefore carries `x^0`.

All arithmetic is modulo the HEC generator `G(x) = x^8 + x^2 + x + 1`.
`R{P}` is the remainder of `P(x)` divided by `G(x)`.

The byte-parallel CRC update is

    R(t+1) = (R(t) xor Z(t)) . D

Here `D` is the 8x8 matrix whose row `i` is `x^(8+i) mod G`, so `v . D` is
`R{x^8 v(x)}`. After bytes `b0 .. bn` the register holds `R{x^8 I(x)}`, where
`I(x)` is the whole received message.

### The split

Split the message received so far into `I = M + H`:

- `H` is the last 40 bits, which are the candidate header.
- `M` is everything before them, multiplied by `x^40`.

The wanted syndrome is then

    R{x^8 H} = R{x^8 I} xor R{x^8 M}

The design keeps each term in a register of its own:

- **Upper machine.** It receives every byte `Z(t)` and holds `R{x^8 I}`.
- **Lower machine.** It receives `Z'(t) = Z(t-5) . D^5` instead of `Z(t)`.
  This is the byte that arrived five bytes ago, already multiplied by `x^40`.
  The same `(R xor Z') . D` update then accumulates exactly `R{x^8 M}`.

Each byte's share of the two registers is the same, but the lower machine
takes a byte in five bytes later. The XOR of the two registers therefore holds
only the contribution of the last five bytes.

A valid header leaves the fixed value `R{x^8 C}` in the syndrome, where `C`
is the HEC coset 0x55. That value is `8'hAC`.

For the identity to hold from the first byte on, both registers and the
five-byte delay must start equal. They are all cleared by the power-up reset,
which is the same as if the stream had been preceded by zero bytes. After that
nothing is ever cleared. Losing and regaining synchronisation does not touch
this unit.

### Timing

A byte accepted at a clock edge is included in `syndrome` and `match` right
after that edge. Both are registered values with no further latency. Clocks
with `byte_valid` low freeze everything, so the unit can sit behind a framer
that removes overhead bytes.

### Making Z': direct or progressive

`Z'(t) = Z(t-5) . D^5` can be produced in two ways. The choice is made by the
`PROGRESSIVE` parameter of `cdm_top` and `syndrome_unit`.

- **Direct** (`PROGRESSIVE = 0`, the default; `zprime_direct`). The byte goes
  unchanged through a five-stage delay buffer, and the delayed byte then passes
  one `D^5` XOR plane. This has the fewest gates: 18 two-input XORs for the
  plane. The `D^5` plane, the XOR with the lower register and the `D` plane
  then lie in one register-to-register path.
- **Progressive** (`PROGRESSIVE = 1`; `zprime_progressive`). There are five
  stages, each a `D` plane followed by a register. The byte is multiplied by
  `D` once per stage while it is delayed. `Z'` comes straight from a register,
  so the lower machine's path is as short as the upper one's. This form costs
  five `D` planes instead of one `D^5` plane, and it is the one to use at high
  byte rates.

### The XOR planes

`xor_plane_d` (`z . D`):

| out | XOR of            |
|-----|-------------------|
| r0  | z0 z6 z7          |
| r1  | z0 z1 z6          |
| r2  | z0 z1 z2 z6       |
| r3  | z1 z2 z3 z7       |
| r4  | z2 z3 z4          |
| r5  | z3 z4 z5          |
| r6  | z4 z5 z6          |
| r7  | z5 z6 z7          |

`xor_plane_d5` (`z . D^5`, row `i` = `x^(40+i) mod G`):

| out | XOR of            |
|-----|-------------------|
| r0  | z2 z3 z7          |
| r1  | z0 z2 z4 z7       |
| r2  | z1 z2 z5 z7       |
| r3  | z2 z3 z6          |
| r4  | z3 z4 z7          |
| r5  | z0 z4 z5          |
| r6  | z0 z1 z5 z6       |
| r7  | z1 z2 z6 z7       |

The `D^5` equations are the fifth power of `D`, computed from it. Equations
that circulate for this plane (for example `r0 = z0 z3 z5`) are in fact the
columns of `D^6`. With those equations the two machines no longer cancel, and
the output is not the syndrome of the last five bytes. The testbenches check
both planes against a bit-serial CRC for all 256 inputs.

## Confirming the boundary: header checker and state machine

### Header checker (`hec_checker`)

Once a boundary is assumed, each expected header is checked separately. The
checker restarts a remainder machine on the first header byte, enables it for
five bytes, and compares the result with `8'hAC`. It pulses `done` in the
clock after the fifth header byte, and `ok` is valid together with `done`.

This is the classic resettable CRC check. The sliding syndrome would give the
same answer at that moment; the separate checker is kept because it is the
usual structure for the PRESYNC and SYNC states.

### State machine and cell counter (`cdm_fsm`)

| state   | what is checked                                    | leaves when                                                   |
|---------|----------------------------------------------------|---------------------------------------------------------------|
| HUNT    | the syndrome after every byte                      | first match: the last byte was a HEC, so the next byte is position 5 → PRESYNC |
| PRESYNC | one header per cell, 53 bytes apart                | a bad header → HUNT; DELTA (6) good headers in a row → SYNC   |
| SYNC    | one header per cell                                | ALPHA (7) bad headers in a row → HUNT; a good header clears the count |

A position counter runs modulo `CELL_BYTES`. It is forced to 4 when the hunt
finds a header. In PRESYNC and SYNC it raises `cell_start` together with the
byte that should be the first header byte, and that signal starts the header
checker.

The FSM looks at `match` in the clock after each accepted byte, and at the
checker's `done` pulse. Every decision therefore refers to a known byte.
Assertions check two rules:

- `cell_start` never occurs in HUNT.
- A header check never starts while another is running.

Timing at the defaults, with one byte per clock:

- A valid header is found in the clock that follows its HEC byte.
- SYNC is reached exactly `6 × 53 = 318` bytes after the byte at which the
  hunt found the header, provided the headers in between are good.

## Top level (`cdm_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | byte clock; asynchronous active-low reset |
| `byte_valid` | in | 1 | `byte_in` is a cell-stream byte this clock (gaps allowed) |
| `byte_in` | in | 8 | received byte, bit 7 first on the line |
| `state` | out | 2 | `cdm_pkg::cdm_state_e`: HUNT, PRESYNC, SYNC |
| `cell_start` | out | 1 | this clock's `byte_in` is the first byte of a cell (PRESYNC/SYNC) |
| `cell_pos` | out | 6 | position 0..52 of the last accepted byte |
| `syndrome` | out | 8 | syndrome of the last five accepted bytes |
| `hdr_done`, `hdr_ok` | out | 1 | header check result, one clock after each expected HEC byte |
| `ev_found`, `ev_presync_fail`, `ev_sync_acq`, `ev_hdr_miss`, `ev_sync_lost` | out | 1 | one-clock event pulses |

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `PROGRESSIVE` | 0 | how `Z'` is made (see above) |
| `CELL_BYTES` | 53 | cell length in bytes |
| `DELTA` | 6 | good headers needed in PRESYNC |
| `ALPHA` | 7 | bad headers in a row that end SYNC |

The header length (5) is fixed by the `D^5` plane and lives in `cdm_pkg`.

Size after coarse synthesis at the defaults: 83 flip-flops.

- 40 of them form the delay buffer.
- 24 are the three remainder registers.
- The rest make up the counters and the state.

## Choices made in this design

The core follows the published method: the two remainder machines, the direct
and progressive forms of `Z'`, the `D` plane, HUNT/PRESYNC/SYNC, 53-byte cells
and six confirmations. The points below are this design's own:

- **HEC coset and target value.** Headers are assumed to carry the usual coset
  0x55, so the valid syndrome is `8'hAC`. Change `HEC_COSET` in `cdm_pkg` for
  a coset-free link; `SYN_VALID` follows automatically.
- **Bit order.** Bit 7 of a byte is the earliest bit and the coefficient of
  `x^7`.
- **Leaving SYNC.** Delineation is given up after `ALPHA = 7` consecutive bad
  headers.
- **Counting confirmations.** DELTA counts headers checked in PRESYNC; the
  header that the hunt found does not count.
- **`byte_valid` strobe.** Clocks without a byte are allowed, and all state
  freezes during them.
- **Outputs.** The event pulses and the `cell_start` marker are this design's
  choice.
- **Reset.** Everything is cleared by the asynchronous reset and by nothing
  else.
- **Header check.** The check done in PRESYNC/SYNC uses the separate resettable
  checker, not the sliding syndrome.

The following are not included:

- Single-bit header error correction.
- A bit-serial version for cell-based links, which would also have to recover
  byte alignment.
- The framer that delivers the bytes.

## Throughput

The delineator takes one byte per clock:

| interface | byte rate needed |
|-----------|------------------|
| STM-1 (155.52 Mbit/s) | 19.44 MHz |
| STM-4 (622.08 Mbit/s) | 77.76 MHz |
| 25.6 Mbit/s desktop ATM | 3.2 MHz |

No storage grows with the line rate. At STM-4 rates the progressive form is
preferable because its paths are shortest. Timing closure on a given target
has not been checked.

## Files

| file | contents |
|------|----------|
| `rtl/cdm_pkg.sv` | byte type, state enum, header length, coset, valid-syndrome constant |
| `rtl/xor_plane_d.sv`, `rtl/xor_plane_d5.sv` | the two XOR planes |
| `rtl/delay_buffer.sv` | five-byte shift register |
| `rtl/zprime_direct.sv`, `rtl/zprime_progressive.sv` | the two `Z'` generators |
| `rtl/remainder_machine.sv` | `R <- (R xor Z) . D`, with optional restart |
| `rtl/syndrome_unit.sv` | two machines, `Z'` generator, syndrome and match |
| `rtl/hec_checker.sv` | per-header check for PRESYNC/SYNC |
| `rtl/cdm_fsm.sv` | state machine and cell position counter |
| `rtl/cdm_top.sv` | top level |
| `tb/cdm_tb_pkg.sv` | bit-serial CRC, HEC encoder, cell generator, byte-level model of the state machine |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_cdm_top_progressive` |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The reference values come from a bit-serial
CRC and a byte-level model, never from the RTL's XOR planes.

The end-to-end test `tb_cdm_top` runs the top at its default parameters on
about 7000 bytes. The stream contains:

- random bytes before the first cell;
- clean cells;
- isolated bad HECs in SYNC;
- a burst of bad HECs that loses SYNC;
- byte slips;
- a bad HEC during PRESYNC;
- a random mixture of good and bad cells.

The test also inserts random idle clocks. It checks:

- the syndrome after every byte;
- `cell_start` for every byte;
- every event and the byte after which it came;
- that hunt-to-SYNC takes 318 bytes.

It also requires each of the five event kinds to occur at least once.
`tb_cdm_top_progressive` runs the same test with `PROGRESSIVE = 1`.

`tb_cdm_workloads` feeds clean cell streams through three `byte_valid`
patterns, each starting at a random offset into a cell:

- STM-1-like rows of 270 byte slots, of which the first 10 carry no cell bytes;
- STM-4-like rows of 1080 slots, of which the first 40 carry no cell bytes;
- no gaps at all.

For each pattern it checks that SYNC comes exactly 318 cell bytes after the
hunt match, and that every cell start in SYNC is correct.

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_cdm_top \
        -y rtl -y tb +libext+.sv rtl/cdm_pkg.sv tb/cdm_tb_pkg.sv tb/tb_cdm_top.sv
    ./obj_dir/Vtb_cdm_top

Replace `tb_cdm_top` with any other `tb_<module>` to test a single block. For
lint only:

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/cdm_pkg.sv rtl/cdm_top.sv

Verilator reports `rst_n` as used both synchronously and asynchronously. The
synchronous use comes from the assertions' `disable iff` clauses, not from
the logic.
