# FPGA fully connected layer behind a UART, for a split GPU + FPGA classifier

A small MNIST classifier in the style of LeNet-5 is cut in two. A GPU runs
the floating-point front end: convolutions, ReLU and max-pooling. It
reduces a 32x32 image to a feature vector of 64 values. An FPGA runs the
last layer, a fully connected layer from 64 inputs to 10 class scores, in
16-bit fixed point, and sends the scores back. The two devices are joined
by an ordinary serial port (UART).

This repository holds the FPGA half as synthesizable SystemVerilog:

- the UART: a baud rate generator, a receiver, a transmitter and two FIFOs;
- a controller that first stores the pre-trained weights and then collects
  feature vectors;
- the weight memory and the 64 -> 10 multiply-accumulate datapath;
- an output buffer that queues the scores for sending.

The GPU side is not hardware and is not included. Neither is softmax (see
"Departures").

```
            +------------------------------ fc_accel_top -----------------------------+
  rx  ----->| uart_system: uart_rx -> RX FIFO --> input_ctrl --(weights)--> weight_mem |
            |                                        |   input buffer         |        |
            |                                        +--- x[i] ----> fc_layer <+ W[.][i]|
            |                                                          | y[0..9]        |
  tx  <-----| uart_system: uart_tx <- TX FIFO <---- result_sender <----+               |
            |               ^ baud_gen (16 ticks per bit)                               |
            +---------------------------------------------------------------------------+
```

## What travels on the wire

The link runs at 19200 baud with 8 data bits, no parity and 1 stop bit.
Select 19200 baud with `baud_sel = 3`. The framing is the usual one:

- a start bit (0);
- the data bits, LSB first;
- an optional parity bit;
- the stop bit or bits (1).

The line idles high. At 100 MHz one bit lasts 16 ticks of 326 clocks, which
is 52.16 us.

All values are signed 16-bit words, sent as two bytes, low byte first. The
host talks to the accelerator in this order:

| phase | bytes host -> FPGA | content |
|---|---|---|
| model load (after reset or `reload`) | 2 x (640 + 10) = 1300 | `W[0][0..63]`, `W[1][0..63]`, ..., `W[9][0..63]`, then `b[0..9]` |
| each inference | 2 x 64 = 128 | `x[0..63]` |
| answer, FPGA -> host | 2 x 10 = 20 | `y[0..9]` |

`weights_loaded` rises once the last bias has arrived. From then on, every
128 bytes form one feature vector, and each vector is answered with 20
bytes. A `reload` pulse throws away any half-received vector and returns to
model loading. If a layer pass is running when `reload` arrives, the reload
waits until the pass ends.

Counting framing bits, an inference costs (128 + 20) x 10 bits. At 19200
baud that is 77.1 ms of line time. The layer itself needs 66 clocks. The
serial link is therefore the whole story for throughput. A faster link would
change only `uart_system`.

## The number format and the layer arithmetic

This is the part to read before you feed the accelerator real weights.

Inputs, weights, biases and results are Q8.8 numbers: 16-bit two's
complement with 8 fraction bits. The value is `word / 256`. The format is
set by the parameter `FRAC_BITS` (default 8). For every output `j` the layer
computes

```
acc[j] = sum over i of x[i] * W[j][i]          (exact; 40-bit accumulator)
y[j]   = sat16( (acc[j] + b[j] * 2^FRAC_BITS) >>> FRAC_BITS )
```

Some consequences:

- The products carry 16 fraction bits and the biases are lined up with them
  before the add. Rescaling is a single arithmetic right shift, which rounds
  toward minus infinity, not to nearest.
- Results saturate to the range -32768 .. 32767, not wrap.
- The accumulator has `2*16 + log2(N_IN) + 2` bits, so the sum itself
  never overflows.
- Only the final scores are rounded. Worst-case error is under 1 LSB
  (1/256) per score, compared with exact arithmetic on the same Q8.8 inputs.

The host must quantize its floating-point features and weights to Q8.8
before sending, and read the scores as Q8.8. If your weights need a
different scale, change `FRAC_BITS`. The host side must agree on the new
value.

### How the datapath is organized

`fc_layer` has one multiply-accumulate lane per output neuron, so 10 lanes
at the default size. It walks the inputs one per clock:

- On clock *i* it sends `rd_row = i` to two memories: the input buffer (in
  `input_ctrl`) and `weight_mem`.
- One clock later it receives `x[i]` and the ten weights `W[0..9][i]`, and
  every lane adds its product.

`weight_mem` therefore stores the matrix as ten arrays of 64 words, one per
output neuron, all read at the same address. Each array maps to block RAM.

A pass takes `N_IN + 2` clocks from the clock that samples `start` to
`done`. At the default size that is 66 clocks. The inputs are summed one
after another, and the ten outputs are computed side by side.

## Control: two modes and one guard

`input_ctrl` reads the RX FIFO whenever it holds a byte and pairs bytes into
words. It has five states:

- **LOAD_W**: each word is written into `weight_mem`. The column index
  (output neuron) steps once per 64 words.
- **LOAD_B**: ten words go into the bias registers. Then `weights_loaded`
  rises.
- **RECV_X**: each word goes into the 64-word input buffer.
- **START**: a full vector is in. `fc_start` pulses unless the result
  sender is still busy with the previous answer. `stall` shows that wait.
  With the same baud rate in both directions it cannot happen, because a
  vector takes longer to arrive than an answer takes to queue. The guard is
  there so the output buffer can never be overwritten.
- **WAIT**: the pass runs. No bytes are taken, and any that arrive wait in
  the RX FIFO. `done` returns the controller to RECV_X.

When `done` fires, `result_sender` copies the ten scores into its output
buffer. It then writes the 20 bytes into the 16-entry TX FIFO, one per
clock while there is room. Because the FIFO fills, it waits on `tx_full`
for the rest. This back-pressure is part of normal operation.

## The UART

`uart_system` connects the parts in the classic way:

- `baud_gen` produces a tick at 16 times the baud rate. 2400, 4800, 9600
  and 19200 baud can be selected at run time. The divisor is
  `round(CLK_HZ / (16 x baud))`.
- `uart_rx` synchronizes `rx` through two flops. It confirms a start bit at
  its middle (tick 7), then samples every bit 16 ticks later, in its middle.
  It writes each word into the RX FIFO with `rx_done_tick`.
- The TX FIFO's "not empty" is the transmitter's `tx_start`.
- `uart_tx` raises `tx_done_tick` during the last clock of the stop bit.
  This signal pops the FIFO at the same edge at which the transmitter goes
  idle, so back-to-back words leave without a gap and no word is sent
  twice.

Both FIFOs are first-word fall-through, 16 entries deep. A write to a full
FIFO is dropped.

Framing is set by parameters of `uart_rx`, `uart_tx` and `uart_system`:

- `DATA_BITS`: 5 to 9;
- `PARITY`: `PAR_NONE`, `PAR_EVEN` or `PAR_ODD`;
- `STOP_HALF_BITS`: 2, 3 or 4, for 1, 1.5 or 2 stop bits.

`fc_accel_top` fixes 8N1, because its protocol is built from bytes. The
receiver flags parity errors and a low stop bit. At the top these show as
`rx_err`. The byte is still delivered, so a glitch on the line shifts the
word pairing. Use `reload` to resynchronize.

## Top-level interface (`fc_accel_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (100 MHz assumed by `CLK_HZ`), asynchronous active-low reset |
| `baud_sel` | in | 0 = 2400, 1 = 4800, 2 = 9600, 3 = 19200 baud |
| `rx`, `tx` | in/out | serial lines to and from the GPU board |
| `reload` | in | one-clock pulse: forget the model and load a new one |
| `weights_loaded` | out | a complete model is stored |
| `busy` | out | a layer pass or the queueing of its answer is in progress |
| `stall` | out | a finished vector is waiting for the previous answer to be queued |
| `rx_err` | out | one-clock pulse: a frame arrived with a parity or stop-bit error |
| `rx_overflow` | out | RX FIFO full; a byte arriving now is lost |

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 100_000_000 | clock frequency, sets the baud divisors |
| `N_IN` | 64 | feature-vector length |
| `N_OUT` | 10 | number of outputs (classes) |
| `FRAC_BITS` | 8 | fraction bits of the 16-bit fixed-point format |
| `FIFO_ADDR_W` | 4 | log2 of the FIFO depth |

Resources at the defaults, after generic synthesis:

- 10 multipliers (16 x 16);
- about 1,000 flip-flops;
- 11.5 kbit of memory: 10,240 bits of weights, 1,024 bits of input buffer
  and 256 bits of FIFOs.

This fits easily in an Artix-7 XC7A100T, which has 240 DSP slices and
1,188 kbit of block RAM.

## Departures and open points

- **Softmax is not computed.** The network ends in a softmax, but here the
  FPGA returns the ten raw scores, and the host applies softmax or
  `argmax`. Softmax needs exponentials, which belong with the rest of the
  floating-point work on the GPU.
- **Choices of this design**, where the source of the design gives nothing:
  - the Q8.8 format, rounding and saturation;
  - the byte protocol, byte order and weight order;
  - loading the weights over the same UART;
  - 16x oversampling and the 100 MHz clock;
  - FIFO depth 16;
  - the `reload`, `stall`, `rx_err` and `rx_overflow` signals.
- **Data bits.** The description of the port allows 6, 7 or 8 data bits,
  while its frame drawing leaves room for up to 9. The RTL accepts 5 to 9
  and uses 8.
- **End-to-end time.** The original measurements give 41.6 ms per image
  including the UART overhead at 19200 baud. With 16-bit words sent as
  byte pairs, this design needs 77.1 ms of line time per image. So the
  original transfer format must have been more compact than this one. That
  format is not known.
- **Not included:**
  - the GPU layers;
  - the GPU's serial port;
  - the USB-UART bridge chip of the FPGA board and the voltage level
    translation it does;
  - the host system.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:

- compares against values computed independently inside the testbench;
- has a watchdog;
- ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|---|---|
| `tb_baud_gen` | tick period for all four rates, one-clock ticks |
| `tb_uart_rx` | 8N1 and 7O1.5 frames, back to back and with gaps, +-3 % baud mismatch, parity and framing errors, glitch rejection, latency |
| `tb_uart_tx` | 8N1 and 7E2 frames decoded from the line, parity, stop bits, exact frame period back to back |
| `tb_sync_fifo` | random traffic against a queue model, full/empty flags, dropped writes |
| `tb_uart_system` | loopback, TX back-pressure, baud switch, RX overflow, `rx_err` |
| `tb_weight_mem` | every weight and bias, one-clock read |
| `tb_fc_layer` | random and full-range vectors against a 64-bit reference, saturation both ways, latency 66 clocks |
| `tb_input_ctrl` | model and vector routing, stall, no reads during a pass, reload mid-vector and during a pass |
| `tb_result_sender` | byte order, back-pressure, ignored load while busy, 20 clocks with room |
| `tb_fc_accel_top` | end to end over the pins with a scaled clock: two models, six vectors, 9600 and 19200 baud, `rx_err`, `reload`, TX FIFO full, saturation; it counts each of these and fails if one never happens |
| `tb_fc_accel_full` | defaults throughout (100 MHz, 19200 baud): full model load and two vectors, about 80 million clocks, plus the 52.16 us bit time |
| `tb_fc_feature_sizes` | the accelerator built for 16, 32 and 64 inputs: layer pass of n + 2 clocks (18, 34, 66) and correct results |

To run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fc_accel_top \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/fc_accel_pkg.sv tb/tb_fc_accel_top.sv
./obj_dir/Vtb_fc_accel_top
```

The testbenches only use two-state values. Everything the design reads is
reset. The memory contents are not reset and need not be.

`tb_fc_accel_full` takes about a minute. The others take seconds.

## Files

- `rtl/fc_accel_pkg.sv`: shared types (parity, baud select, 16-bit fixed
  point) and the divisor function.
- `rtl/baud_gen.sv`, `rtl/uart_rx.sv`, `rtl/uart_tx.sv`,
  `rtl/sync_fifo.sv`, `rtl/uart_system.sv`: the serial link.
- `rtl/input_ctrl.sv`, `rtl/weight_mem.sv`, `rtl/fc_layer.sv`,
  `rtl/result_sender.sv`: the accelerator.
- `rtl/fc_accel_top.sv`: the FPGA top level.
- `tb/`: one testbench per module, plus the full-size and feature-size
  runs.
