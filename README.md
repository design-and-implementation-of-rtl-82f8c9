# UART with adaptive baud-rate detection

A UART normally only works when both ends were set to the same baud rate
beforehand. This design removes that step: the receiver times the start bit of
an incoming character in clock cycles, takes that count as the bit period, and
from then on receives *and transmits* at that rate. The sender only has to
begin with a character whose first data bit is 1 (0x55 is the usual choice);
that character is itself received correctly.

The frame is the reduced RS-232 format: one start bit (0), eight data bits
least significant bit first, one stop bit (1), no parity. Transmit and receive
run independently (full duplex) from one system clock.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) with an
asynchronous active-low reset.

## Block structure

```
rs232_rx ─► rx_synchronizer ─► rx_sync ─► edge_detect ─► rx_fall, rx_rise
                                  │                          │
                                  ▼                          ▼
                               uart_rx ◄─ armed, meas_done ─ baud_detect
                                  ▲                          │
                                  └──────── baud_rate ◄──────┤
                                                             ▼
tx_start, tx_data ─────────────────────────────────────►  uart_tx ─► rs232_tx
```

Both the receiver and the detector act on `rx_fall`. The receiver reports
`rx_busy` to the detector, so only real start bits are
timed, and its framing-error pulse re-arms the detector.

| File | Module | Role |
|---|---|---|
| `rtl/uart_pkg.sv` | package | frame constants, default bit period 5208, state enums |
| `rtl/rx_synchronizer.sv` | `rx_synchronizer` | two-flop metastability filter on the serial input |
| `rtl/edge_detect.sv` | `edge_detect` | one-cycle falling/rising edge pulses |
| `rtl/baud_detect.sv` | `baud_detect` | measures the start bit, holds `baud_rate` |
| `rtl/uart_rx.sv` | `uart_rx` | receiving module |
| `rtl/uart_tx.sv` | `uart_tx` | sending module |
| `rtl/uart_top.sv` | `uart_top` | wires the above together |

## Bit periods

All timing is counted in system clock cycles per bit (`baud_rate`, 16 bits,
so 4 to 65535 cycles). After reset the value is 5208, which is 9600 baud with
a 50 MHz clock; 434 is 115200 baud and 868 is 57600 baud at the same clock.
Nothing in the RTL depends on the clock frequency.

## How the rate is detected (`baud_detect`)

This is the part that differs from an ordinary UART.

* After reset the detector is **armed** and `baud_rate` = `DEFAULT_BAUD`.
* A falling edge that the receiver takes as a start bit (receiver idle) moves
  `state` from 0 (idle) to 1 (measuring). `baud_counter` starts at 1 and counts
  every cycle the line stays low.
* At the rising edge the count is the start-bit length. If it is at least
  `MIN_BAUD` (4) it becomes `baud_rate`, the detector disarms (the UART is now
  *locked*), and `meas_done`/`meas_ok` pulse one cycle after the edge.
  A shorter pulse is treated as noise: `meas_ok` stays low, the rate is kept
  and the detector stays armed. A line held low until the counter is full
  (a break) also abandons the measurement.
* While locked, later frames do not change the rate. The detector is armed
  again by a pulse on `rearm`, or automatically when the receiver sees a
  framing error (stop bit read as 0). A sender that changes its rate without
  warning typically causes exactly that, so its next sync character sets the
  new rate.

Because the synchroniser delays both edges of the start bit equally, the
count is exact: a sender with a period of P cycles gives `baud_rate` = P.

**Requirement on the sender.** The low pulse that is timed runs from the
start bit to the first 1 on the line. It is one bit long only if data bit 0 is
1. A sync character with bit 0 = 0 would be measured as two or more bits. The
UART cannot detect that mistake.

## Receiving (`uart_rx`)

The receiver works on the synchronised line and on the falling-edge pulse.
There are two paths through the start bit:

* **Locked (normal) path.** `baud_cnt` counts to half a bit period (the
  period shifted right by one). If the line is still low there, the start bit
  is accepted; if it has gone high again, the falling edge was a glitch and
  the receiver returns to idle. From that mid-bit point every full period
  raises `bit_flag` and samples one bit, so all bits are sampled at their
  middle.
* **Measuring path.** When the detector is armed, it times this start bit.
  The receiver waits for its report. Then the start bit has just ended, so
  the receiver preloads its counter so that the first sample comes half a
  (new) period later, in the middle of data bit 0. This is how the sync
  character is received at the rate measured from its own start bit. A
  rejected measurement sends the receiver back to idle.

`bit_cnt` counts samples 0–7 (data, shifted in from the top so bit 0 ends up
in `rx_data[0]`) and 8 (stop). A stop bit of 1 copies the byte to `rx_data`
and pulses `rx_done`. A 0 pulses `rx_frame_err` and leaves `rx_data` as it
was. The receiver is idle again at the middle of the stop bit, in time for a
following start bit.

Each bit is sampled once, at its middle; there is no oversampling or
majority vote.

Timing: with period P and the synchronised line falling in cycle 0,
`rx_done` is high in cycle P/2 + 9P + 1. The line is synchronised two cycles
after the pin. The period is latched per frame, so a rate change during a
frame does not disturb that frame.

## Transmitting (`uart_tx`)

A one-cycle `tx_start` while `tx_busy` is low copies `tx_data` into a cache
register and latches the current `baud_rate`. Neither a new byte nor a new
rate then affects the frame in flight, and `tx_start` is ignored while busy.
`state` goes from 0 to 1. `baud_cnt` counts 0…P−1 and `bit_flag` marks the
last cycle of each bit. `bit_cnt` counts bits 0 (start) to 9 (stop). The flag
that ends the stop bit completes the ten bits and pulses `tx_done`. The output
is a flip-flop, so the line does not glitch, and it idles high.

Timing: if `tx_start` is high at clock edge c, the start bit is on the line
from edge c, each bit lasts exactly P cycles, and `tx_done` (with `tx_busy`
low) follows edge c + 10P. A new `tx_start` is accepted right then, so frames
can run back to back.

The transmitter uses the detected `baud_rate`, so the UART answers at the
rate it was addressed with. Before any rate is measured it sends at 5208
cycles per bit.

## Top-level interface (`uart_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `rs232_rx` | in | 1 | serial input (asynchronous) |
| `rs232_tx` | out | 1 | serial output |
| `tx_start` | in | 1 | pulse: send `tx_data` (ignored while `tx_busy`) |
| `tx_data` | in | 8 | byte to send |
| `tx_done` | out | 1 | pulse: frame sent |
| `tx_busy` | out | 1 | transmitter working |
| `rx_data` | out | 8 | last good byte received |
| `rx_done` | out | 1 | pulse: `rx_data` updated |
| `rx_frame_err` | out | 1 | pulse: frame with a 0 stop bit (also re-arms detection) |
| `rearm` | in | 1 | pulse: measure the next start bit |
| `baud_rate` | out | 16 | bit period in use, clock cycles |
| `baud_counter` | out | 16 | detector's start-bit counter |
| `baud_locked` | out | 1 | a measured rate is in use and detection is not armed |

Parameters: `BAUD_WIDTH` (16), `DEFAULT_BAUD` (5208), `MIN_BAUD` (4, at
least 4 so that mid-bit sampling works), `SYNC_STAGES` (2).

## Where this design makes its own choices

The frame format, the split into sending and receiving modules, the
two-stage synchroniser, falling-edge start detection, the counter scheme
(`baud_cnt`, `bit_flag`, `bit_cnt`, `done`), the transmit data cache, the
16-bit `baud_rate`/`baud_counter`, the 5208 default and the detector's
0 = idle / 1 = measuring state all follow the published design. The
following were not specified there and were chosen here:

* The detection method in detail: timing the first low pulse, arming and
  locking, the `rearm` port, re-arm on framing error, the `MIN_BAUD` noise
  limit and the overflow limit.
* The receiver's measuring path, the mid-start-bit glitch check, and the
  `rx_frame_err` output.
* The transmitter also uses the detected rate.
* The handshakes (single-cycle start and done pulses), the reset values,
  and the asynchronous reset.
* No parity bit, and exactly one stop bit. The general UART frame allows 5–8
  data bits, optional parity and 1, 1.5 or 2 stop bits; the simplified
  format used here drops parity and fixes 8 data bits and 1 stop bit.

Known limits: a sync character must have bit 0 = 1; rates slower than 65535
clock cycles per bit cannot be measured; after a rate change the first frame
at the new rate is lost (it produces the framing error that re-arms
detection) unless `rearm` is pulsed first.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/uart_pkg.sv tb/tb_uart_top.sv --top-module tb_uart_top -Mdir obj
./obj/Vtb_uart_top
```

(replace `tb_uart_top` with any other testbench name).

| Testbench | What it shows |
|---|---|
| `tb_rx_synchronizer` | output is the input two clocks later; reset value 1 |
| `tb_edge_detect` | fall/rise pulses against a reference model |
| `tb_uart_tx` | every output bit, cycle by cycle, for P = 1, 4, 7, 16; `done` exactly 10P after start; busy-time start and rate changes ignored |
| `tb_uart_rx` | random bytes at P = 4…32 with exact `done` timing; 3 % slow sender; glitch rejection; framing error; measuring path with an emulated detector |
| `tb_baud_detect` | reset value 5208; pulse of N cycles gives N; lock, rearm, noise rejection, busy receiver, break |
| `tb_uart_top` | whole UART at default parameters: sync at 434 cycles per bit, full-duplex traffic, glitch, rearm, noise while armed, 868, then an unannounced change to 5208 recovered through the framing error; every mechanism is counted and must occur |
| `tb_uart_rate_sweep` | whole UART re-trained to many rates in turn (9 to 5208 cycles per bit), one data byte each way per rate |

The top-level tests model the far end of the cable: they generate frames at a
chosen period and decode the transmit line with the period they expect.
