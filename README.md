# miniUART: a UART with 16-byte FIFOs

A UART sits between a byte-wide processor bus and a one-wire serial line.
It turns bytes written by the CPU into asynchronous serial frames and
reassembles incoming frames into bytes. This design puts a 16-entry FIFO
on each side, so the CPU can write or read in bursts instead of serving
every character as it happens. Each received byte is stored with three
error flags: parity error, framing error and break. A programmable baud
generator sets the line rate from the system clock.

```
            +--------------------------------------------------+
 DataIn --->| TX FIFO 16x8  ---> uart_tx (TSR) ----------------|---> TxD
            |                        ^                         |
 SysClk --->| baud_gen (DLM:DLL) ----+ 16x tick                |
            |                        v                         |
 DataOut <--| RX FIFO 16x11 <--- uart_rx (RSR) <---------------|<--- RxD
            | bus decode, LCR, LSR, DLL, DLM, interrupts       |
            +--------------------------------------------------+
              Addr, CS_N, RD_N, WR_N, Reset     IntRx_N, IntTx_N
```

## Serial frame

The line idles at 1 ("mark"). A frame is one start bit (0), then 7 or 8
data bits with the least significant bit first, then an optional parity
bit, then one stop bit (1). The default is 8 data bits with no parity,
which gives a 10-bit frame. When the transmit FIFO holds more bytes,
the next start bit follows the stop bit straight away, with no idle time
between frames.

Every bit lasts 16 ticks of the baud generator. With divisor N, one bit
takes 16·N system clock cycles, and an 8N1 frame takes 160·N.

## Baud generator (`baud_gen`)

The generator is a 16-bit counter. It produces a one-cycle enable once
every N clock cycles, where N is `{DLM, DLL}`. N can be 1 to 65535; with
N = 0 the generator stops. The reset value is 260, which gives about
9600 baud (9615, +0.16 %) from a 40 MHz clock. The tick is a clock
enable, not a derived clock, so the whole design runs in one clock domain.
Both the transmitter and the receiver use the same tick.

| Clock  | Baud  | Divisor  | Actual baud |
|--------|-------|----------|-------------|
| 40 MHz | 9600  | 260      | 9615        |
| 40 MHz | 19200 | 130      | 19231       |
| 40 MHz | 20000 | 125      | 20000       |

## Transmitter (`uart_tx`)

The transmit shift register (TSR) loads a byte from the head of the
transmit FIFO when both of these hold:

- a tick arrives;
- the TSR is idle, or its stop bit is just ending.

On that tick the word length and the parity settings are also captured.
A later change to LCR therefore affects only the next frame. `busy` stays
high until the stop bit has ended. LSR.TEMT uses it to report that the
line has fallen idle.

## Receiver (`uart_rx`)

This is the hardest part of the design, because the receiver has to find
the bit boundaries of a stream with no clock.

1. RxD passes through two flip-flops that bring it into the clock domain.
2. In the idle state the receiver compares the line at each tick with its
   value at the previous tick. A 1 followed by a 0 is a start edge.
   Requiring an edge, and not just a 0 level, means that a line left low
   starts nothing. That covers a bad stop bit and a break.
3. Seven ticks after the tick that saw the edge, the receiver is near the
   middle of the start bit and checks the line again. If it reads 1, the
   edge was a glitch and the receiver goes back to idle.
4. From then on the receiver samples once every 16 ticks, near the middle
   of each bit. It shifts the data bits into the receive shift register
   (RSR) and then samples the parity bit, if enabled, and the stop bit.
5. When the stop bit has been sampled, `valid` pulses for one cycle. It
   carries the byte and three flags:
   - `pe`: the parity bit does not match;
   - `fe`: the stop bit was read as 0;
   - `bi`: the data, the parity bit and the stop bit were all 0.

The receiver sees each bit half a bit time after the bit starts. The tick
quantisation adds at most one tick of error. The sampling point therefore
tolerates a rate mismatch of a few percent. The testbench checks ±3 %.
The receiver reports `valid` about 9.5 bit times after the start edge of
an 8N1 frame, plus two clock cycles for the synchroniser.

## FIFOs (`uart_fifo`)

Both FIFOs are one module: a circular buffer with read and write pointers
one bit wider than the address. The read port is show-ahead: `rdata` is
always the head entry. A write to a full FIFO is ignored, and so is a read
from an empty one. The transmit FIFO is 16 × 8 bits. The receive FIFO is
16 × 11 bits: the byte and its `{bi, fe, pe}` flags.

## CPU interface and registers (`mini_uart`)

The top module's ports are the miniUART pins: `SysClk`, `Reset`,
`Addr[1:0]`, `DataIn[7:0]`, `DataOut[7:0]`, `CS_N`, `RD_N`, `WR_N`, `RxD`,
`TxD`, `IntRx_N` and `IntTx_N`.

| Addr | Read                          | Write                       |
|------|-------------------------------|-----------------------------|
| 0    | RBR: pop the receive FIFO     | THR: push the transmit FIFO |
| 1    | LSR: line status              | LCR: line control           |
| 2    | DLL: divisor bits 7:0         | DLL                         |
| 3    | DLM: divisor bits 15:8        | DLM                         |

LCR bits, all 0 after reset (8 data bits, no parity, interrupts off):

| Bit | Name  | Meaning                                            |
|-----|-------|----------------------------------------------------|
| 0   | WLS7  | 1: 7 data bits, 0: 8 data bits                     |
| 1   | PEN   | parity bit present                                 |
| 2   | EPS   | 1: even parity, 0: odd parity                      |
| 3   | ERBI  | enable IntRx_N                                     |
| 4   | ETBEI | enable IntTx_N                                     |

LSR bits:

| Bit | Name   | Meaning                                                   |
|-----|--------|-----------------------------------------------------------|
| 0   | DR     | the receive FIFO holds data                               |
| 1   | OE     | overrun: a byte arrived while the receive FIFO was full and was lost. Cleared when LSR is read |
| 2   | PE     | parity error on the byte at the receive FIFO head         |
| 3   | FE     | framing error on the byte at the head                     |
| 4   | BI     | break on the byte at the head                             |
| 5   | THRE   | the transmit FIFO is empty                                |
| 6   | TEMT   | the transmit FIFO is empty and the TSR is idle            |
| 7   | TXFULL | the transmit FIFO is full; a write to THR would be lost   |

PE, FE and BI belong to the byte that the next RBR read will return.
Software should read LSR before reading RBR.

**Bus timing.** The bus is synchronous to `SysClk`. An access takes effect
once, on the first rising edge at which `CS_N` and the strobe (`RD_N` or
`WR_N`) are both low. Holding the strobe low for longer does not repeat
the access. A read loads `DataOut` on that edge, and `DataOut` keeps the
value until the next read. Reading RBR while the FIFO is empty returns
0x00. An assertion flags `RD_N` and `WR_N` being low together. If a CPU's
strobes are not synchronous to `SysClk`, they need synchronisers in front
of this interface.

**Interrupts** are active low and are combinational from the register
state:

- `IntRx_N` = not (ERBI and (DR or OE))
- `IntTx_N` = not (ETBEI and THRE)

`Reset` is synchronous and active high.

## Parameters

| Module      | Parameter       | Default | Meaning                         |
|-------------|-----------------|---------|---------------------------------|
| mini_uart   | FIFO_DEPTH      | 16      | entries per FIFO (power of two) |
| mini_uart   | RESET_DIVISOR   | 260     | DLM:DLL after reset             |
| uart_fifo   | WIDTH, DEPTH    | 8, 16   | entry width and count           |

## Where this design departs from, or fills in, the original description

The original description gives the overall structure: the two FIFOs, the
transmitter and receiver logic, and a shared baud generator. It also gives
the 16-byte depth with three error bits per received byte, the 16-bit
DLL/DLM divisor producing a 16x clock, the frame format, the list of
status conditions, the miniUART pin list, and a 40 MHz / 9600 baud
operating point. The following were left open and are this design's own:

- the register map and the LCR and LSR bit layouts;
- the bus timing and the interrupt conditions;
- the reset values;
- how the receiver finds the start bit and where it samples;
- single-clock (synchronous) FIFOs. The description calls them
  "asynchronous", but the whole UART runs from one clock;
- one stop bit and odd/even parity selection.

The following are described only by name and are not built:

- modem-control lines;
- DMA signalling pins;
- a multi-channel arrangement. The number of channels and how one is
  selected are not specified, so the design here is one channel;
- the RS-232 voltage level translator. This is analog; it would sit
  outside `TxD` and `RxD`.

The published FPGA result lists 74 slice registers. This RTL synthesises
to about 128 flip-flops plus 304 bits of FIFO storage, so the two
implementations clearly differ in their internals. The pin count (27) is
the same.

## Files

| File                   | Contents                                      |
|------------------------|-----------------------------------------------|
| `rtl/uart_pkg.sv`      | register addresses, LCR/LSR/error structs, default divisor |
| `rtl/baud_gen.sv`      | baud generator                                |
| `rtl/uart_fifo.sv`     | FIFO                                          |
| `rtl/uart_tx.sv`       | transmitter                                   |
| `rtl/uart_rx.sv`       | receiver                                      |
| `rtl/mini_uart.sv`     | top level: bus interface, registers, wiring   |
| `tb/tb_*.sv`           | one self-checking testbench per module        |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
counts a failure if the testbench hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/uart_pkg.sv rtl/baud_gen.sv \
  rtl/uart_fifo.sv rtl/uart_tx.sv rtl/uart_rx.sv rtl/mini_uart.sv \
  tb/tb_mini_uart.sv --top-module tb_mini_uart
./obj_dir/Vtb_mini_uart
```

To run a single module's testbench, swap in `tb/tb_uart_rx.sv` (or
another) and its top-module name; `uart_pkg.sv` must come first.

- `tb_baud_gen` measures tick intervals for divisors 1, 2, 5, 260 and
  65535, checks that divisor 0 stops the tick, and checks a change of
  divisor while running.
- `tb_uart_fifo` runs 20,000 random push/pop cycles against a queue model,
  including pushes while full and pops while empty.
- `tb_uart_tx` decodes every frame independently and checks each bit at
  every tick in 8N1, 7N1, 8E1 and 7O1, as well as gapless back-to-back
  frames.
- `tb_uart_rx` drives frames at the nominal bit time and ±3 %. It also
  sends a parity error, a framing error, a break and a short glitch, and
  checks the delay from the start edge to `valid`.
- `tb_mini_uart` uses the default parameters: a 40 MHz clock and the
  9600-baud reset divisor. It checks:
  - the frame period of 160 × 260 cycles in a loopback;
  - reprogramming the divisor to 125 (20 kbit/s, period 160 × 125
    cycles checked) and then to 2;
  - transmit FIFO full, a dropped write and a receive overrun;
  - 7 data bits with even parity and 8 with odd parity;
  - injected parity, framing and break errors, as seen through LSR;
  - both interrupt outputs.

  It counts each of these and fails if one never happened. It takes about
  280,000 clock cycles.
