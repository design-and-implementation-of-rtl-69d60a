# Programmable UART with FIFOs and interrupts

A full-duplex UART meant to sit inside an FPGA next to a soft-core processor,
replacing an external UART chip. The processor sees nine 8-bit registers. It
writes bytes into a 16-byte transmit FIFO and reads received bytes from a
16-byte receive FIFO. It picks the baud rate, word length, parity and stop
bits. Four kinds of interrupt tell it when to move data, so it does not have to
poll for each byte.

The design is six blocks:

```
             host bus                                        serial
  cs rd wr addr data_in ──► interface ──► configuration ──► BRG ──tick──┬──► transmitter ──► tx
           data_out  ◄──────────────────── module (regs) ◄──status──────┤
           intr      ◄── interrupt controller ◄─────────────────────────┴─── receiver ◄──── rx
           intr_ack  ──►
```

| Block | Module | What it does |
|---|---|---|
| Interface | `uart_bus_sync` | Brings `cs`/`rd`/`wr` into the UART clock domain and turns each host access into one register strobe |
| Configuration module | `uart_regs` | The register file: THR, RHR, FCR, LCR, LSR, IER, ISR, DLL, DLH |
| Baud rate generator | `uart_brg` | Divides the clock by `{DLH,DLL}` to make the sampling tick |
| Transmitter | `uart_tx` | Tx FIFO, then the transmit shift register (TSR): start, data, parity, stop |
| Receiver | `uart_rx` | Receive shift register (RSR) with centre-of-bit sampling, then the Rx FIFO |
| Interrupt controller | `uart_intr` | Trigger-level, timeout, Tx-empty and receive-error interrupts |
| (helper) | `uart_fifo` | 16 x 8 synchronous FIFO used for both FIFOs |
| (shared) | `uart_pkg` | Register addresses, register field structs, trigger-level table |
| Top | `uart_top` | Connects everything |

All files are SystemVerilog (IEEE 1800-2017) and synthesizable. Every module is
in `rtl/<module>.sv` and has a self-checking testbench in `tb/<module>_tb.sv`.

## Register map

The addresses and access directions are part of the original design. The bit
layouts inside the registers are this implementation's own, modelled on the
16550 where the feature set matches.

| Addr | Name | Access | Contents |
|---|---|---|---|
| 0x0 | THR | W | Byte to send. A write pushes it into the Tx FIFO (dropped if full). |
| 0x1 | RHR | R | Oldest received byte. A read pops it. Reads 0 when the Rx FIFO is empty. |
| 0x2 | FCR | W | `[7:6]` Rx trigger level, `[5:4]` Tx trigger level (00=1, 01=4, 10=8, 11=14 bytes); `[2]` clear Tx FIFO, `[1]` clear Rx FIFO (one-shot) |
| 0x3 | LCR | R/W | `[1:0]` word length 5/6/7/8, `[2]` two stop bits, `[3]` parity enable, `[4]` even parity (0 = odd), `[7:5]` stored only. Reset value 0x03 = 8N1. |
| 0x4 | LSR | R | `[0]` data ready, `[1]` overrun, `[2]` parity error, `[3]` framing error, `[4]` Tx FIFO full, `[5]` Tx FIFO empty, `[6]` transmitter empty (FIFO and shift register), `[7]` any of bits 1-3 |
| 0x5 | IER | R/W | `[0]` Rx trigger, `[1]` Tx trigger, `[2]` receive error, `[3]` timeout, `[4]` Tx empty; `[7:5]` stored only |
| 0x6 | ISR | R | Same bit order as IER: which enabled interrupts are pending; `[7]` = `intr` |
| 0x7 | DLL | W | Divisor, low byte |
| 0x8 | DLH | W | Divisor, high byte |

LSR bits 1-3 are sticky: they are set by an error and cleared by reading LSR.
Write-only and unused addresses read as 0. Writes to read-only addresses are
ignored. After reset the divisor is 0, which stops the baud generator, so
software must write DLL/DLH before anything is sent or received.

## Host interface timing

The host may run on a different clock. Only `cs`, `rd` and `wr` are
synchronised, each through two flip-flops. `addr` and `data_in` are not
synchronised. They are captured at the moment the synchronised access is
seen, so **the host must hold them stable for as long as it holds `rd` or
`wr`**. The interface acts on the rising edge of the synchronised `cs & wr`
(or `cs & rd`). One access therefore gives exactly one register access,
however long it lasts.

- Hold `cs` with `rd` or `wr` high for at least 4 UART clock cycles. Then hold
  them low for at least 3 cycles before the next access.
- The register strobe comes 3 clock edges after the access is first sampled.
  Read data is on `data_out` one edge later and stays there until the next read.
- A read of RHR pops the Rx FIFO, so it must happen exactly once per byte. This
  is why a level-sensitive read would be wrong.

## Baud rate and sampling

```
divisor = f_clk / (baud rate × OVERSAMPLE)        OVERSAMPLE = 16
```

`uart_brg` gives one tick every `divisor` clock cycles. A bit lasts
`OVERSAMPLE` ticks on both transmit and receive. Transmit and receive share
the one generator, so they always run at the same rate. For example,
DLL = 18, DLH = 0 gives 57.6 kbit/s from a 16.5888 MHz clock. The
oversampling factor of 16 is this implementation's choice; the original gives
the formula but not the factor.

## Transmitter

THR writes go into the 16-entry Tx FIFO. The TSR is a five-state machine:

| State | Line | Leaves when |
|---|---|---|
| IDLE | 1 | a tick arrives and the FIFO holds a byte: the byte is popped |
| START | 0 | one bit time |
| DATA | data bits, LSB first | 5-8 bits (LCR) |
| PARITY | odd or even parity of the data bits | one bit time (only if LCR[3]) |
| STOP | 1 | one or two bit times (LCR[2]) |

The frame format is latched when the byte leaves the FIFO. Changing LCR
therefore never corrupts a frame in flight. Because frames start on a tick,
each bit is exactly `16 × divisor` clock cycles long. `tx_done` pulses as the
last stop bit ends. If the FIFO is empty at that point, the Tx-empty event
fires.

## Receiver

`rx` goes through a two-flop synchroniser. The RSR waits for a 0 on the line.
It counts 8 ticks to the middle of the start bit and checks that the line is
still 0. A shorter low pulse is a glitch and is ignored. After that it samples
once every 16 ticks, at the centre of each bit. Data bits are shifted in from
the top, so after 8 bits the first bit received is bit 0. For shorter words
the byte is right-aligned. The parity bit is compared with the received data.
The first stop bit must be 1; if it is not, this is a framing error. Only the
first of two stop bits is checked.

A byte with a parity or framing error is still stored in the Rx FIFO, and the
error is reported in LSR and as an interrupt. A byte that arrives while the Rx
FIFO is full is lost and sets the overrun bit. The receiver has no break
detection. After a frame whose stop bit was 0, a line that stays low is taken
as the start of another frame.

## Interrupts

`intr` is active high. It is the OR of the enabled pending sources, which ISR
lists.

| Source | Raised when | Cleared when |
|---|---|---|
| Rx trigger (IER[0]) | Rx FIFO holds ≥ its trigger level (1/4/8/14) | the host reads it below the level |
| Tx trigger (IER[1]) | Tx FIFO holds ≤ its trigger level | the host writes it above the level |
| Receive error (IER[2]) | a byte arrives with a parity or framing error | `intr_ack` |
| Timeout (IER[3]) | the Rx FIFO has held data for 44 bit-times with no new byte and no RHR read | a byte arrives, RHR is read, or the FIFO empties |
| Tx empty (IER[4]) | the transmitter finishes a frame and the Tx FIFO is empty | `intr_ack` |

The timeout covers the last few bytes of a burst that never reach the Rx
trigger level. Its counter counts baud ticks up to 44 × 16. It is cleared by
each received byte, by each RHR read and whenever the Rx FIFO is empty. The
two trigger-level conditions and the timeout are levels. They go away once
the host services the FIFO. Receive error and Tx empty are one-time events.
They are latched (only while enabled) until the host pulses `intr_ack`.

The original design counts four interrupt kinds: trigger level, timeout, Tx
empty and receive error. Here the trigger-level kind has separate Rx and Tx
enables. The Tx trigger level is read as an "almost empty, refill now"
threshold. Both are this implementation's interpretation.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `FIFO_DEPTH` | 16 | Entries in each FIFO (original value) |
| `OVERSAMPLE` | 16 | Ticks per bit (own choice) |
| `TIMEOUT_BITS` | 44 | Receive timeout in bit-times (original value) |

With depths other than 16, the trigger levels stay 1/4/8/14. Keep
`FIFO_DEPTH` ≥ 14 so that every level can be reached. Keep `OVERSAMPLE` even
and ≥ 4.

## What follows the original and what does not

These follow the original design:
- the six-block structure and the top-level port list
- the register names and addresses and their read/write directions
- 16-byte FIFOs, trigger levels of 1/4/8/14 bytes, the 44 bit-time timeout and the events that reset it
- the divisor formula and the 8-bit DLL/DLH latches
- the five TSR states, odd/even parity, and centre-of-bit sampling

These are this implementation's own choices:
- every bit layout inside FCR/LCR/LSR/IER/ISR
- 16× oversampling
- LSB-first bit order (consistent with the original receive waveform)
- the synchronous active-high reset and active-high `intr`
- the access handshake timing
- what `intr_ack` clears
- the split Rx/Tx trigger enables and the meaning of the Tx trigger
- 1 or 2 stop bits
- the `rx` synchroniser and the start-bit glitch check
- overrun reporting
- the FCR FIFO-clear bits and LSR[4] (Tx FIFO full)
- reads of an empty RHR returning 0

The original describes the word length as set by FCR in one place and by LCR
in another. Here it is set by LCR.

Not built:
- break detection and generation
- stick parity
- modem-control lines
- separate transmit and receive baud rates

The original describes none of these.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends any run that hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/uart_pkg.sv tb/uart_top_tb.sv --top-module uart_top_tb -o sim
./obj_dir/sim
```

Swap in any other `tb/*_tb.sv` and its module name to run that test.

| Testbench | Covers |
|---|---|
| `uart_top_tb` | Whole UART at default parameters through the host bus. Full duplex at the 57.6 kbit/s setting (sends 11100100 while receiving 11101000). Rx and Tx trigger interrupts, the timeout (timed to 44 bit-times), parity and framing errors, overrun, FIFO clear, and all 16 combinations of word length, parity and stop bits in loopback. Counts each of these and fails if one never happens. |
| `uart_tx_tb` | Every LCR format checked bit by bit by an independent line decoder. Exact frame length in cycles. The FIFO filling up, a write to a full FIFO, and clear. |
| `uart_rx_tb` | Every LCR format, good frames and frames with parity or stop-bit errors. Timing of the capture point. Glitch rejection, overrun, clear. |
| `uart_intr_tb` | Each source and its clearing, including the exact 44 × 16-tick timeout |
| `uart_regs_tb` | Read/write behaviour of every register |
| `uart_brg_tb` | Tick period for several divisors, and divisor 0 |
| `uart_bus_sync_tb` | Random accesses from an unrelated clock: one strobe per access, with the right address and data |
| `uart_fifo_tb` | Random push/pop checked against a queue model |

The whole-design test takes well under a second of simulation time on a
workstation. The design has been linted with Verilator (`-Wall`) and
elaborated with Yosys/slang. It has not been run on an FPGA. The only remaining
lint messages are for signals that are left unused on purpose: the stored-only
LCR bits, `tx_done` and the Rx FIFO `full` flag at the top level.
