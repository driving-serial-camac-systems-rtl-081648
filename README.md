# VME Serial CAMAC Highway Driver

This RTL implements a Serial CAMAC highway driver that sits in a VME crate as a simple
A16/D16 I/O slave. It lets a VME processor keep running an existing Serial CAMAC loop, where
a minicomputer with its own highway driver used to do that job. The processor performs one
CAMAC access at a time by programmed I/O, in four steps:

1. It writes the command (crate SC, station SN, subaddress SA, function SF) and, for a write,
   24 data bits into a few registers.
2. The board sends a **Command message** around the loop.
3. The addressed Serial Crate Controller (SCC) answers with a **Reply message**. The Reply
   carries X, Q and error bits and, for a read, 24 data bits.
4. The board checks the Reply, sets **NBUSY** in its status register and raises the Reply
   interrupt.

Crates that need attention send **Demand messages** (graded LAMs) on their own. The board
queues them in a FIFO and raises a second interrupt.

The design supports:

- Line rates of 0.5, 1, 2.5 and 5 MHz, in bit-serial or byte-serial mode.
- Automatic space bytes in the Command message, so the crate has time to finish its Dataway
  cycle.
- Byte-parity and column-parity generation on Command messages.
- Header, length and parity checks on Reply and Demand messages.
- A Reply timeout of 320 byte times.
- Detection of a lost line clock (NOSYNC).
- A board reset by reading the last register.

## Using the board from software

Base address `$XX00`: A15..A11 come from a switch (`sw_base`), so there are 32 settings in
steps of `$800`. The board answers address modifier `$2D` (supervisor). When `sw_user` is set
it also answers `$29` (user). All registers are 16-bit words.

| addr | access | contents |
|------|--------|----------|
| `$00` | R/W | SA D15..D12, SF D10..D6, SN D4..D0 |
| `$02` | R/W | SC D4..D0 |
| `$04` | R/W | W24..W17 in D7..D0 |
| `$06` | R/W | W16..W1 |
| `$08` | R   | R24..R17 in D7..D0 |
| `$0A` | R   | R16..R1 |
| `$0C` | R   | status (below) |
| `$0E` | R   | Demand FIFO head: ERR-DM D15, SC D12..D8, SGL D4..D0. Reading removes the entry. Reads 0 when empty. |
| `$10`..`$16` | R/W | interrupter control registers: Reply (INT0), Demand (INT1), two unused |
| `$18`..`$1E` | R/W | interrupter vector registers, in the same order |
| `$20` | R   | reads 0, then resets the board |

Status register `$0C`:

| bit | name | meaning |
|-----|------|---------|
| 15 | NBUSY   | the last transaction has finished: a Reply arrived or the timeout expired |
| 14 | CERR    | OR of bits 12..8 |
| 13 | FNE     | Demand FIFO not empty |
| 12 | ERR CPL | wrong number of bytes in the Reply, or the timeout expired |
| 11 | ERR HED | wrong Reply header, or a header for another crate |
| 10 | ERR CP  | column parity error |
|  9 | ERR PB  | byte parity error (in bit-serial mode, also a missing stop bit) |
|  8 | NOSYNC  | no line clock on the Reply input (live, not latched) |
|  3..0 | DERR, SQ, SX, ERR | copied from the Reply |

What starts an access depends on the function:

- **Write (F16..F23):** load `$02` (SC), then `$00` (SA/SF/SN), then `$04` (W24..W17). Writing
  `$06` (W16..W1) starts the Command message.
- **Read (F0..F7) and control (all other functions):** load `$02`, then write `$00`. That write
  starts the message. For a read, fetch the data from `$08`/`$0A` afterwards.

Either way, then poll `$0C` until NBUSY is set, or take the Reply interrupt. A start that
arrives while a transaction is running is ignored. Software must not interleave two accesses.

Interrupter control register bits:

| bits | name | meaning |
|------|------|---------|
| 2:0 | level | interrupt level; 0 disables the interrupt |
| 3 | IRAC | clear IRE when the interrupt is acknowledged |
| 4 | IRE | interrupt enable (the mask) |
| 7 | pending | read only: a request is waiting |

Each channel drives the IRQ line of its own level, so the Reply and Demand interrupts can both
be asserted at once. During an IACK cycle at a requesting channel's level, the board returns
that channel's vector on D7..D0 and clears its pending request. If both channels use the same
level, Reply is answered first. Otherwise the board passes the acknowledge on through IACKOUT.

## Messages on the loop

The loop format below is this design's own. It follows the general shape of the Serial CAMAC
standard, but it is not a byte-exact copy of that standard. Check it against the SCCs you
connect before using the RTL with real hardware.

Every message byte holds:

- bit 7: odd parity over the whole byte;
- bits 6:5: the byte kind, one of body `00`, end-sum `01`, header `10` or Demand header `11`;
- bits 4:0: five information bits.

The all-zero byte is the space or wait byte. Its parity is even, so it can never be a message
byte, and every receiver skips it. The last byte of each message is an end-sum byte. Its
information bits are the XOR (column parity) of the information bits of all earlier bytes.

```
Command : HDR(SC) SN SF SA [W24..21 W20..16 W15..11 W10..6 W5..1] space*n END
Reply   : HDR(SC) {DERR SQ SX ERR} [R24..21 R20..16 R15..11 R10..6 R5..1] END
Demand  : DHDR(SC) SGL END
```

The data bytes appear only in a write Command and in a read Reply.

**Space bytes.** The number of space bytes n is the smallest count whose duration covers one
CAMAC Dataway cycle (`DW_NS` = 1000 ns), and n is at least 1:

| mode | 0.5 MHz | 1 MHz | 2.5 MHz | 5 MHz |
|------|---------|-------|---------|-------|
| byte serial | 1 | 1 | 3 | 5 |
| bit serial | 1 | 1 | 1 | 1 |

**Line signals.** Each direction has a line clock and data. Data change at the falling edge of
the clock and are sampled at the rising edge.

- Byte serial moves one byte per clock, on 8 parallel lines (`cmd_data`, `rep_data`).
- Bit serial moves one bit per clock (`cmd_bit`, `rep_bit`). Each byte is framed as a 0 start
  bit, 8 data bits LSB first and a 1 stop bit. The line stays at 1 when idle.

The line clock runs all the time. The differential drivers, the line coding on the cable and
the U-port adapters are outside this RTL.

## Receiving Replies and Demands

`sdvme_msg_rx` skips space bytes and then decides what kind of message has started:

- A Demand header with good parity starts a Demand message.
- Any other byte starts a Reply. If that byte is not a correct header for the crate being
  addressed, ERR HED is set.

A message ends at its end-sum byte. A message that has no end-sum byte is closed after 12
bytes. The byte count is then compared with the expected length: 3 bytes for a Reply to a
write or control function, 8 for a Reply to a read, and 3 for a Demand.

Replies that arrive when no transaction is pending are thrown away.

A Demand with any error is still queued, with ERR-DM set. Demands are dropped only when the
32-entry FIFO is full.

If a Command goes round the loop without an answer, for example because the crate does not
exist, the 320-byte-time timeout ends the transaction. It sets NBUSY, ERR CPL and the Reply
interrupt.

## Timing

The system clock (`CLK_HZ`) is 20 MHz. It must be a multiple of 10 MHz, and at least four
times the line clock, because the receivers oversample.

A VME access takes about four clocks from the data strobe to DTACK. Measured in the end-to-end
test, from the start of the VME write that launches the access to the Reply interrupt, with
the crate model answering right after the Command's end-sum byte:

| line | access | time |
|------|--------|------|
| 5 MHz byte serial, one crate | write or read | 90 clocks = 4.5 µs (18 line bytes = 3.6 µs of it) |
| 5 MHz byte serial, crate 1 of 10 | write or read | 161 clocks = 8.1 µs on average |
| 2.5 MHz bit serial, one crate | write | 1204 clocks = 60.2 µs |
| 2.5 MHz bit serial, one crate | read | 1151 clocks = 57.6 µs |
| 2.5 MHz bit serial, 10 crates | read | 1952 clocks = 97.6 µs |

Each crate model in the loop adds about one byte time, because it passes a byte on only after
receiving all of it. Real crate controllers may add less.

The published figures for the original board are "about 55 µs" per access at 2.5 Mbit/s, and
200 Kwords/s block transfers (5 µs per word, software included) at 5 Mbyte/s. The hardware
part here fits inside the second figure. At 2.5 Mbit/s it is a few microseconds slower than
the first. That gap comes from the 10-bit bit-serial frame chosen here, not from anything
measured on the original.

## Structure

```
sdvme_top
 ├─ sdvme_vme_slave   VME decode, AM check, DTACK, IACK daisy chain, reset at $20
 ├─ sdvme_regs        registers $00..$0E, start rule, status word
 ├─ sdvme_bim         interrupter: level, vector, mask for Reply and Demand
 ├─ sdvme_txn         NBUSY, 320-byte timeout, latching of Reply results
 ├─ sdvme_cmd_gen     Command message bytes, parity, space bytes
 ├─ sdvme_clkgen      line clock, 0.5/1/2.5/5 MHz
 ├─ sdvme_tx          byte- or bit-serial transmitter, byte-time strobe
 ├─ sdvme_rx          synchronising receiver, framing, NOSYNC
 ├─ sdvme_msg_rx      Reply/Demand parser and checks
 └─ sdvme_fifo        Demand FIFO (32 x 11 bits)
sdvme_pkg             shared types, message byte helpers, rate and space-byte functions
```

Top-level parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `CLK_HZ` | 20 000 000 | system clock rate |
| `TIMEOUT_BYTES` | 320 | Reply timeout, in byte times |
| `FIFO_DEPTH` | 32 | Demand FIFO entries |
| `NOSYNC_CYCLES` | 256 | system clocks without a line clock edge before NOSYNC is set |
| `DW_NS` | 1000 | Dataway cycle time used to count space bytes |

The line rate and the bit/byte mode are inputs (`sw_speed`, `sw_bit_mode`), meant to come
from board switches.

## How far to trust it, and where it departs from the original board

- **Taken from the original board's description:**
  - the register map and status bit names and positions;
  - the start sequence;
  - NBUSY behaviour and the 320-byte timeout;
  - the address range, base-address switch and address modifiers;
  - the four rates and two modes, space-byte insertion, and parity generation and checking;
  - the Demand FIFO with its own interrupt;
  - the reset at `$20`.
- **Read from the register drawing:** the bit positions of SA, SF, SN, SC and SGL inside
  their words. The drawing labels only D15, D8, D7 and D0.
- **Design choices:**
  - the message byte format, and the line framing and coding;
  - how many space bytes are sent;
  - which error bit a timeout sets (ERR CPL);
  - the FIFO depth and the overflow behaviour;
  - the synchronous VME slave;
  - the 20 MHz clock.
- **Interrupter:** the original board uses a commercial bus-interrupter chip. `sdvme_bim` keeps
  only what is described above: a level, vector and mask per channel, IRAC, priority and the
  daisy chain. Each channel drives its own IRQ line. The chip's external-vector mode and flag bits are not modelled.
- **Not included:** the line drivers and receivers, the cable and U-port adapters, and the
  crate controllers. `tb/scc_model.sv` is a behavioural crate controller that speaks this
  design's message format. It is for simulation only.

## Simulation

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…` line. Run one,
for example the end-to-end test, with:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_sdvme_top rtl/sdvme_pkg.sv tb/tb_sdvme_top.sv
./obj_dir/Vtb_sdvme_top
```

| testbench | what it exercises |
|-----------|-------------------|
| `tb_sdvme_top` | The whole board at default parameters with one crate model. Covers write, read and control accesses, all rates in both modes with their space-byte counts, the Reply and Demand interrupts and IACK, the Demand FIFO, each receive error, the timeout, NOSYNC, address decoding and the `$20` reset. It also measures the access times above and counts how often each mechanism happened. |
| `tb_sdvme_loop` | A loop of 10 crate models at 2.5 MHz bit serial. Covers a write and a read-back in every crate, Demands from all crates at once through the FIFO, a Command to an absent crate coming back as an error, and a 64-word block transfer at 5 MHz byte serial. |
| `tb_sdvme_link` | transmitter and receiver back to back, in both modes, with NOSYNC |
| `tb_sdvme_cmd_gen` | 200 random Command messages against an independently built byte list |
| `tb_sdvme_msg_rx` | random Replies, with and without faults, and Demands |
| `tb_sdvme_txn` | NBUSY, the busy lock-out and the exact 320-byte timeout |
| `tb_sdvme_regs` | the register block |
| `tb_sdvme_vme_slave` | the VME slave |
| `tb_sdvme_bim` | the interrupter |
| `tb_sdvme_fifo` | the Demand FIFO |
| `tb_sdvme_clkgen` | the line clock generator |

Line rates are set by `sw_speed`: 0 = 0.5 MHz, 1 = 1 MHz, 2 = 2.5 MHz, 3 = 5 MHz.
