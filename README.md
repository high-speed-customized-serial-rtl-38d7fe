# CLK/DI/STB serial link for an FPGA soft-processor system

Many on-board devices (transponders, serial ADCs and DACs, custom sensors) need a
point-to-point interface that no standard processor peripheral provides. This
design adds one to an FPGA system built around a soft processor. The link has
three wires:

* **CLK**: the sending clock.
* **DI**: the data.
* **STB**: a strobe that marks the end of a transfer.

A 32-bit word leaves the FPGA as four bytes. Each bit gets one CLK period, the
bytes are separated by idle gaps, and STB pulses once the word is complete.

The processor writes the words into a small dual-port buffer and orders them
sent. Counters running from the 50 MHz system clock generate all link timing.
No extra clock or I/O standard is needed beyond three output pins.

For demonstration and testing, the design also contains two more parts:

* a receiver for the same three wires, which rebuilds the word;
* a 9600-baud UART, through which a host PC supplies the bytes of each word and
  reads back what the receiver rebuilt.

```
          RxD  +------+  bytes   (processor,  words  +-------------+
 host ───────▶ | UART | ───────▶  outside the ─────▶ | data buffer |
 PC   ◀─────── |      | ◀───────  RTL)  ───send────▶ +------+------+
          TxD  +------+              ▲         order ▼      │ RD_sDATA
                                     │       +-----------+  ▼
                                     │       | send_ctrl |─load─▶ +-----+
                                     │       +-----+-----+        | p2s |──▶ DI
                                     │             │start         +-----+
                                     │             ▼                 ▲ shift / out_en
                                     │       +-----------+           │
                                     │       | clock_gen |───────────┘
                                     │       +-----------+──▶ CLK, STB
                                     │                  │
                                     │  word  +-----+   │ CLK, DI, STB
                                     └─────── | s2p | ◀─┘
                                              +-----+
```

## The link frame

All times come from counters clocked at 50 MHz (20 ns). Every number below is
a parameter of `clock_gen` and of the top:

| quantity | time | cycles | parameter |
|---|---|---|---|
| CLK period (one bit) | 13 us | 650 | `PERIOD` |
| CLK high time (duty 3/10) | 3.9 us | 195 | `HIGH` |
| idle gap between bytes | 32 us | 1600 | `GAP` |
| last CLK falling edge to STB rise | 8 us | 400 | `STB_DELAY` |
| STB high time | 28 us | 1400 | `STB_WIDTH` |

One word takes 32 × 13 + 3 × 32 + 8 + 28 = 548 us, or 27 400 cycles.

A bit period is laid out like this (one byte shown, `~` = 455 low cycles,
`^` = 195 high cycles):

```
CLK  ___~~~~___^^^___~~~~___^^^_ ... _^^^__________ gap (1600) ________~~~~
DI   ==bit31======X==bit30=====X ... ==bit24===X 0 ...................==bit23
                  ^ DI changes one system clock after the CLK falling edge
STB  __________________________________ ... (after byte 4: 400 low, 1400 high)
```

Each bit period starts with CLK low and ends with CLK high. DI changes just
after a CLK falling edge, so it is stable for 455 cycles before the CLK rising
edge and for 195 cycles after it. A receiver therefore samples on the rising
edge. The frame and the receiver are built around these rules:

* The word goes out most significant bit first: byte 3 (bits 31..24) first,
  each byte MSB first.
* Outside the byte windows (during gaps, the STB phase and idle), DI is held
  at 0.
* CLK idles low and STB is active high.
* The 32 us gap is counted from the last CLK falling edge of one byte to the
  start of the next byte's first low phase. From one byte's last falling edge
  to the next byte's first rising edge is therefore 1600 + 455 cycles.

## Sending a word

1. The processor writes the word into `data_buffer`. The buffer is a 16 × 32
   dual-port RAM with the usual pins: `WR_DATA`, `WR_ADDR`, `WR_CLK`, `WR_EN`,
   `RD_ADDR`, `RD_EN` and `RD_CLK`. It has an asynchronous read output
   (`RD_aDATA`) and a registered one (`RD_sDATA`); the link uses the registered
   output.
2. The processor pulses `send_req` with `send_addr`. `send_ctrl` raises
   `rd_en` for one cycle.
3. One cycle later the word is on `RD_sDATA`. In the following cycle
   `send_ctrl` pulses `load` (into `p2s`) and `start` (into `clock_gen`)
   together.
4. `clock_gen` steps through the frame with one state machine:
   `CG_LOW → CG_HIGH` eight times per byte, then `CG_GAP` between bytes, then
   `CG_STB_WAIT` and `CG_STB_ON`. It emits:
   * `shift`, at each CLK falling edge;
   * `di_en`, while bytes are on the wire;
   * `CLK` and `STB`, as registered outputs.
5. `p2s` is a 32-bit shift register. It puts its MSB on DI while `di_en` is
   high and drives 0 otherwise.
6. `send_busy` stays high from the order until STB falls, and `send_done`
   pulses at that point. An order that arrives while busy is ignored and
   flagged on `send_dropped`.

## Receiving a word (`s2p`)

The receiver treats CLK, DI and STB as asynchronous inputs and passes each
through a two-flop synchroniser. It then works as follows:

* It shifts DI in at every CLK rising edge.
* It ends the word at the STB rising edge. If exactly 32 bits arrived, it
  updates `par_data` and pulses `par_valid`. Otherwise it pulses `par_err` and
  drops the bits.
* `par_valid` goes high after the third system clock edge that follows the STB
  rising edge.

In the top, the receiver listens to the design's own link pins. This shows that
a word survives the trip. The same module could sit in a peripheral at the far
end of the link.

## The UART

`uart` has four parts:

* **`uart_baud_gen`** divides 50 MHz down to one-cycle ticks:
  * the bit-rate tick `baud_clock`: 5208 cycles, 9600.6 baud;
  * the 16x tick `clock_16`: 326 cycles.
* **`uart_enable_gen`** passes bit ticks to the transmitter as `tx_enable`, but
  only when there is something to send. A request waits in a pending flag for
  the next tick, so every frame starts on the bit grid.
* **`uart_tx`** is a state machine: IDLE, START, DATA0…DATA7, PARITY (only when
  `parity_en` is set) and STOP. It moves one state per `tx_enable`. Data goes
  LSB first, the start bit is 0 and the stop bit is 1. `tx_data` is captured
  on `send_data` while `tx_busy` is low.
* **`uart_rx`** samples on the 16x tick:
  * It waits half a bit after the start edge and checks that the line is still
    low; a shorter pulse is treated as a glitch.
  * It then samples every 16 ticks: 8 data bits, the optional parity bit and
    the stop bit.
  * A good frame updates `rx_d` and pulses `data_rx_done`. A parity mismatch
    pulses `parity_err` and a low stop bit pulses `frame_err`; in both cases
    the byte is dropped.

`parity_en` and `parity_odd` stand in for a parity configuration register.
Parity is even unless `parity_odd` is set.

## What is outside the RTL

* **The soft processor and its firmware** are vendor IP. So is the
  point-to-point bus that joins the processor to the UART. Their side of each
  block is a plain port group on `serial_protocol_top`:
  * the UART byte interface (`uart_rx_*`, `uart_tx_data`, `uart_send`,
    `uart_tx_busy`);
  * the buffer write port (`buf_wr_*`);
  * the send order (`send_req`, `send_addr`, `send_busy`, `send_done`,
    `send_dropped`);
  * the received word (`par_data`, `par_valid`, `par_err`).
* **The firmware's job** is to gather four UART bytes into a word (first byte
  most significant), write it to the buffer, order the send and return the
  received word to the host as four bytes. The end-to-end testbench models
  this job.
* **The host PC and the RS232 cable** are modelled by the same testbench on
  `rxd` and `txd`.

## Choices made where the description is silent

* **Buffer depth:** 16 words, the size of one distributed-RAM primitive.
  `ADDR_W` changes it.
* **Bit and byte order:** MSB first on the link and LSB first on the UART.
* **Duty cycle:** 3/10 is read as CLK high for 30 % of the period.
* **Reset:** one clock domain with a synchronous, active-high reset. The buffer
  memory has no reset, but its registered output does.
* **Link timing:** counters and enables replace the separate link clock and the
  clock switching. In the reference shift-register code, an 8-bit register
  rotates with a 0–9 counter; here a 32-bit register is loaded once per word.
* **Error reporting:** the start-bit glitch check, the framing error and the
  link bit-count error are additions.
* **UART divisors:** both are rounded to the nearest integer. The bit-rate
  error is +0.006 %; the receive sampling rate is 0.15 % slow.

## Parameters

The top's defaults are the numbers above:

* `CLK_HZ = 50_000_000`
* `BAUD = 9600`
* `ADDR_W = 4`
* `PERIOD`, `HIGH`, `GAP`, `STB_DELAY` and `STB_WIDTH`, as in the frame table.

The shared constants and the state enums live in `rtl/serial_pkg.sv`. To scale
the link to another rate, change the five link counts together. `clock_gen`
checks at elaboration that `HIGH` lies inside `PERIOD`.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_serial_protocol_top rtl/serial_pkg.sv tb/tb_serial_protocol_top.sv
./obj_dir/Vtb_serial_protocol_top +verilator+rand+reset+2
```

Replace the top-module name to run another testbench.

`tb_serial_protocol_top` runs the whole design at its default parameters. It
simulates about 1.5 million cycles and takes a few seconds:

* Three words go from the host through the UART, buffer, link and receiver,
  then back to the host: `FF0F55AA` with parity off, `A2345678` with even
  parity and `99887766` with odd parity.
* One frame with a corrupted parity bit is injected, and one send order is
  given while the link is busy.
* It checks:
  * every CLK pulse width and period, every byte gap, and the STB delay and
    width, in cycles;
  * the word at each stage;
  * that each mechanism happened.

The unit testbenches check:

* the link timing to the cycle (`tb_clock_gen`);
* the UART bit time of 5208 cycles (`tb_uart`, `tb_uart_baud_gen`);
* the tick spacing (`tb_uart_baud_gen`);
* parity, framing and glitch handling (`tb_uart_rx`, `tb_uart_tx`);
* the buffer's write-enable and read-enable behaviour (`tb_data_buffer`);
* receiver word-length errors (`tb_s2p`).

## How far to trust it

* Every module passes Verilator lint and the slang front end.
* Every testbench passes, and each one fails when a single meaningful fault is
  put into its module.
* The design has not been run on an FPGA.
* The link timing numbers are taken as given, and each one is checked to the
  cycle.
* What the description does not fix is listed above. The points to check
  against a real peripheral are the CLK phase order, the DI edge and the STB
  polarity.
