# UART with BILBO built-in self-test

A serial port controller (UART) that can test itself. Two BILBO registers sit
around the transmitter and receiver: built-in logic block observers, each one
register that can act as a shift register, a pseudo-random pattern generator
(PRPG), a plain parallel register or a multiple-input signature register
(MISR). In normal mode the chip is an ordinary host-programmable UART. In test
mode the UART loops its transmitter into its receiver. Register A feeds it 255
pseudo-random bytes, and register B folds every byte that comes back into one
8-bit signature. An external tester only has to shift a seed in through one
pin (`si`) and shift the signature out through another (`so`), then compare
it with the known good value. A good chip gives `0x51` for the seed used below.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It reproduces the
register values of the published simulation exactly: the seed shifting, the
pattern sequence, the signature sequence and the final signature `0x51`. The
register map, bus timing and some UART details are not published, so they are
this design's own; they are listed at the end.

## Structure

```
            data[7:0] (host bus, tri-state)
   ┌────────────┬──────────────────────────────┬───────────────┐
   │            │                              │               │
   │      ┌─────▼──────┐   pattern    ┌────────┴─────┐   ┌─────┴────────┐
   │ si ─►│ BILBO A    ├─────────────►│ uart_tx      │   │ uart_host_if │ cs rw addr
   │      │ (z = bus)  │  (test mode) │ THR → TSR    │   │ registers,   │ ack irq
   │      └─────┬──────┘              └──────┬───────┘   │ irq, modem   │ modem pins
   │        so_a│ (1 flip-flop)        txd ◄─┤ loop      └──────────────┘
   │      ┌─────▼──────┐              ┌──────▼───────┐
   │      │ BILBO B    │◄─────────────┤ uart_rx      │◄── rxd
   │      │ (z = RHR)  │   RHR        │ RSR → RHR    │
   │      └─────┬──────┘              └──────────────┘
   │            └──► so                      ▲ tick16
   │    bist_ctrl: modes, enables,     baud_gen (hclk / divisor)
   │    pattern feed
```

| Module | Role |
|---|---|
| `uart_bist` | Top level. Pins, tri-state data bus, loopback multiplexer, and the wiring of all blocks. |
| `uart_host_if` | Host bus, register file, interrupt request, modem-control pins and modem status. |
| `baud_gen` | Divides `hclk` by a 16-bit divisor into a 16x baud tick. |
| `uart_tx` | Transmit hold register (THR), transmit shift register and framing. |
| `uart_rx` | Start-bit detection, 16x sampling, receive shift and hold registers (RSR, RHR), error flags. |
| `bilbo` | One 8-bit BILBO register. Instantiated twice, as A and B. |
| `bist_ctrl` | Derives the modes and update enables of A and B, and writes A's patterns into the THR. |
| `uart_pkg` | Register addresses, line-control and status structs, BILBO mode enum. |

Everything runs on `hclk` and resets asynchronously on `reseth` (active high).

## The BILBO register

`bilbo` has an 8-bit state `q`. It updates only in cycles where `en` is high:

| mode | name | next `q` |
|---|---|---|
| 00 | shift | `{q[6:0], si}` |
| 01 | PRPG (LFSR) | `{q[6:0], fb}` |
| 10 | normal | `z` |
| 11 | MISR | `{q[6:0], fb} ^ z` |

The feedback is `fb = q[7] ^ q[3] ^ q[2] ^ q[1]`. Data always moves from LSB
towards MSB. This polynomial is maximal: from any non-zero seed the PRPG
visits all 255 non-zero values and then returns to the seed. Examples:
`3B → 76`, and `0F → 1F → 3F → 7F → FF → FE → FC`. In MISR mode, `2A` with
input `07` gives `53`.

The serial output `so` is a **flip-flop**. It takes the outgoing `q[7]` on every
enabled update, so it is not a direct view of `q[7]`. This matters in two
places:

* **The scan chain.** B's `si` is A's `so`, so there is one extra register
  stage between the two. Starting from A = `17` (loaded after `98`) and
  B = `00`, ten shifts with `si` = 0,0,0,0,0,0,1,1,1,1 give:
  * A: `2E 5C B8 70 E0 C0 81 03 07 0F`
  * B: `01 02 04 08 11 22 45 8B 17 2E`

  This leaves the standard seeds A = `0F` and B = `2E`.
* **Scan-out.** After each shift, `so` shows the bit that just left B. The
  signature therefore comes out MSB first, one bit per `bilboen` cycle, and
  the first bit appears after the first shift.

## How the self-test runs

`bist_ctrl` maps the two `bilbo_mode` pins (B1B2) onto the two registers.
Register A takes the mode as it is. Register B takes `{B1 ^ B2, B2}`:

| pins | A | B | use |
|---|---|---|---|
| 10 | normal | normal | ordinary UART operation |
| 00 | shift | shift | seed in / signature out |
| 01 | PRPG | MISR | the self-test |
| 11 | MISR | PRPG | roles swapped (not used by the standard test) |

**Enables.** `bilboen` enables both registers. `ldareg` and `ldbreg` enable
A and B separately; hold both high for the standard test.
* In shift and normal mode, a register updates in every clock cycle in which
  its enables are high. The tester pulses `bilboen` for one cycle per bit or
  per load.
* In the two pattern/signature modes (pin B2 = 1), a register steps **once
  per character**: in the cycle the receiver completes a character
  (`rx_done`). In that one clock edge:
  * A steps to its next pattern.
  * B folds in the *current* content of the RHR, which is the previous
    character.
  * The RHR takes the new character.

**Pattern feed.** While A is in PRPG mode and enabled, `bist_ctrl` writes A's
value into the THR once as soon as the THR is empty: first the seed, right
after the mode is entered, then each new pattern after every step. The
transmitter sends characters back to back, so one step takes exactly one
frame.

If `A_k` is the k-th pattern (with `A_0` the seed), the sequence is:

```
RHR_0 = FF (reset value)     RHR_k = A_(k-1)
B_k   = lfsr(B_(k-1)) ^ RHR_(k-1)
```

**Standard test sequence.** These are the steps the top-level testbench plays
as the tester.

1. Reset, then program the UART: divisor, 8N1.
2. `bilbo_mode = 10`, `ldbreg = 0`: load A from the bus by pulsing `bilboen`
   during two host writes of `98` and `17`.
3. `bilbo_mode = 00`, `ldareg = ldbreg = 1`: ten `bilboen` pulses with `si` =
   0,0,0,0,0,0,1,1,1,1. This leaves A = `0F` and B = `2E`.
4. Set loopback (MCR bit 4), then `bilbo_mode = 01` and hold `bilboen` high.
   The UART now sends and receives the 255 patterns by itself. The tester
   has to stop after the 255th received character, before the next one
   arrives (one frame later). The testbench does this by enabling the
   receive interrupt and reading the RHR after each `irq`. The values it
   reads are the patterns `0F 1F 3F 7F FF FE FC …`.
5. Drop `bilboen`, then set `bilbo_mode = 00` and pulse `bilboen` eight
   times. `so` gives 0,1,0,1,0,0,0,1, which is signature `0x51`. A is back
   at `0F`.

The expected signature depends on every value B compresses, and that
includes the RHR's reset value `FF`. Run the test straight after reset. If the
RHR has received anything since, the good signature is different. At 40 MHz
with divisor 22, the 255 frames take 897,600 cycles (22.44 ms).

## UART

**Baud rate.** The 16-bit divisor `D` (1 to 65535; 0 acts as 1) makes a tick
every `D` cycles of `hclk`. One bit lasts 16 ticks. For 115.2 kbaud from
40 MHz the best divisor is 22. That gives 113.6 kbaud (−1.4 %) and 352 clocks
per bit. No integer divisor of a 16x clock can give the 347 clocks per bit
that an exact 115.2 kbaud would need.

**Transmitter.** A host write to address 8 fills the THR. When the shift
register is free, it takes the character and sends:
* a start bit (low);
* 5 to 8 data bits, LSB first;
* an optional parity bit, even or odd;
* one or two stop bits (high).

If the THR is refilled during a frame, the next start bit follows the last
stop bit with no gap. A frame that starts from idle begins at once, so its
start bit can be up to one tick short. LCR bit 6 holds `txd` low to send a
break. `txd` is a register output.

**Receiver.** `rxd` passes through a two-flip-flop synchroniser. A falling
edge starts a frame.
* The line is checked again 8 ticks later. If it is high, the edge was a
  false start and is dropped.
* After that, each bit is sampled 16 ticks after the previous one.
* The character moves to the RHR at the middle of the first stop bit.

Status flags:

| flag | meaning | cleared by |
|---|---|---|
| `dr` | data ready | reading the RHR |
| `oe` | overrun: a character arrived while `dr` was set; the new character overwrites the RHR | reading the LSR |
| `pe` | parity error | reading the LSR |
| `fe` | framing error: stop bit low | reading the LSR |
| `bi` | break: data, parity and stop bits all low | reading the LSR |

After a break, the receiver waits for the line to go high before it looks
for the next start bit. The RHR resets to `FF`.

**Loopback.** With MCR bit 4 set:
* The receiver hears the transmitter, and `txd` idles high.
* The modem outputs go inactive. The MSR reads RTS, DTR, OUT1, OUT2 in place
  of CTS, DSR, RI, DCD.
* A host write to the LSR sets its error bits, to simulate parity, framing,
  overrun or break errors.

Break and overrun can also be produced for real in loopback.

## Host interface

**Bus protocol.** The host drives `cs` low with `rw`, `addr` and, for a
write, `data`.
* The access happens in the first clock cycle in which `cs` is seen low. A
  long `cs` is still a single access.
* `ack` goes low one cycle later and stays low until `cs` rises.
* For a read, the value is captured in the access cycle. It is driven on
  `data` while `cs` is low and `rw` is high.

`irq` is high while any enabled interrupt source is pending.

| addr | name | access | contents |
|---|---|---|---|
| 0 | IER | rw | bit 0 receive data ready, 1 THR empty, 2 line status error, 3 modem status change |
| 1 | LCR | rw | bits 1:0 word length (5 + value), 2 two stop bits, 3 parity enable, 4 even parity, 6 break. Reset `03` (8N1). |
| 2 | MCR | rw | 0 DTR, 1 RTS, 2 OUT1, 3 OUT2, 4 loopback. The pins are the inverted bits (active low). |
| 3 / 4 | DLL / DLM | rw | baud divisor, low and high byte. Reset 1. |
| 5 | LSR | r (w in loopback) | 0 dr, 1 oe, 2 pe, 3 fe, 4 bi, 5 THR empty, 6 transmitter empty. Reading clears bits 1 to 4. |
| 6 | MSR | r | 0 ΔCTS, 1 ΔDSR, 2 ring ended, 3 ΔDCD, 4 CTS, 5 DSR, 6 RI, 7 DCD. Reading clears bits 0 to 3. |
| 7 | ISR | r | pending enabled sources, same bit order as IER |
| 8 | DATA | rw | write: THR; read: RHR (clears dr) |

The modem inputs `cts`, `dsr`, `ri` and `dcd` are active low, as are the
outputs `dtr`, `rts`, `out1` and `out2`.

## Pins of `uart_bist`

| pin | dir | meaning |
|---|---|---|
| `hclk` | in | clock; also the baud reference |
| `reseth` | in | asynchronous reset, active high |
| `cs`, `rw`, `addr[3:0]` | in | host bus; `cs` is active low, `rw` = 1 means read |
| `data[7:0]` | inout | host data bus |
| `ack`, `irq` | out | `ack` is active low; `irq` is active high |
| `cts`, `dsr`, `ri`, `dcd` | in | modem status, active low |
| `dtr`, `rts`, `out1`, `out2` | out | modem control, active low |
| `bilbo_mode[1:0]`, `bilboen`, `ldareg`, `ldbreg` | in | BILBO mode and enables |
| `si`, `so` | in / out | BILBO scan in and out |
| `rxd`, `txd` | in / out | serial line |

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Run them with Verilator 5,
for example the top level:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/uart_pkg.sv tb/tb_uart_bist.sv --top-module tb_uart_bist
./obj_dir/Vtb_uart_bist
```

For another block, replace `tb_uart_bist` with `tb_bilbo`, `tb_bist_ctrl`,
`tb_baud_gen`, `tb_uart_tx`, `tb_uart_rx` or `tb_uart_host_if`.

* **`tb_uart_bist`** runs the whole chip at its default sizes, 40 MHz and
  divisor 22, in about a second. It covers:
  * the self-test above, checking all 255 received patterns against its own
    LFSR model, the frame-exact duration and the scanned-out signature `0x51`;
  * normal transmit and receive with interrupt;
  * a false start;
  * the modem pins and modem status;
  * break, overrun and simulated errors in loopback.

  It counts how often each of these happened, and any that never happened
  counts as a failure.
* **`tb_bilbo`** checks the shift, PRPG and MISR sequences listed above, and
  the 255-step signature on two chained registers.
* The other testbenches check framing in all formats, back-to-back timing,
  sampling, error flags, register access and the mode/enable logic.

## Departures and open points

The following are this design's own choices, where the published description
gives no detail:

* **Register map** (only the data register at address 8, and OUT1/OUT2 in MCR
  bits 2 and 3, are given), the bus handshake timing, the reset values of LCR
  and the divisor, and the active-high `irq`.
* **What `ldareg` and `ldbreg` do.** They are read as per-register enables.
* **How the BILBOs are tied to the UART in test mode**: the step per received
  character, and the automatic write of each pattern into the THR. The
  resulting register values match the published traces cycle for cycle,
  character by character.
* **B's parallel input** is taken straight from the RHR. The published block
  diagram draws it from the host data bus, which carries the RHR only while
  the host reads it.
* **The registered `so` and the A-to-B link flip-flop.** They are inferred
  from the published shift traces.
* **Error simulation in loopback** is done by writing the LSR.
* **There is no separate receiver clock input.** The feature list mentions
  one, but there is no pin for it; both directions use `baud_gen`.
* **The baud rate** is 113.6 kbaud where 115.2 kbaud was asked for; see the
  Baud rate paragraph under UART.
* **The external tester and the modem** are not part of the chip. The
  top-level testbench plays both.

The original implementation targeted a small XC4000-class FPGA (about 158
flip-flops with BIST). This RTL synthesizes to about 166 flip-flops in a
generic flow. Timing and area on a particular device have not been checked.
