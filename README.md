# ETHER filtering fabric: an adaptive Kalman co-processor for a solar tracker

A two-axis solar tracker points a panel using four light sensors and two
servos. The microcontroller that runs its control loop (10 Hz) computes a
target azimuth and elevation from the sensors, but these targets are noisy.
They also jump when a cloud edge, a shadow or a reflection crosses a sensor.
This design filters them on an FPGA.

Every control period the microcontroller sends the two raw angles over a
115200-baud serial link. The FPGA answers within about 0.7 ms with two
filtered angles. Each axis has its own scalar Kalman filter, and the filter
raises its measurement noise on the fly, so that short outliers are ignored
while slow sun motion is still tracked. A processor on the same chip can read
the latest raw and filtered angles at fixed addresses for monitoring.

All arithmetic is 16-bit signed fixed point, **Q9.7**:
- 1 degree = 128 LSB;
- range −256 … +255.99°, resolution 0.0078°;
- servo range 0 … 180° = 0 … 23040.

## Data path through the fabric

```
uart_rxd ─► uart_avalon ─(Avalon-MM, 32 bit)─► ext_bus_avalon_bridge
                ▲                                     │ (external bus: address, byteenable,
                │                                     │  read, write, writedata, readdata,
uart_txd ◄──────┘                                     ▼  acknowledge)
                                             kalman_avalon_bridge
                                       raw az/el │   ▲ filtered az/el
                                angle_data_valid ▼   │ filtered_valid
                                              kalman_filter_top
                                           (kalman_scalar × 2)

hps_address/hps_read ─► avalon_interconnect ─► pio_in × 4 (az raw, el raw, az filtered, el filtered)
```

`ether_fpga_top` wires these blocks together. The processor, the PLL and the
board's level shifter are not part of the fabric:
- `clk` is the 50 MHz system clock;
- the processor's read port comes in as plain `hps_*` signals;
- `filter_enable`, `q_param` and `r_param` are inputs, shared by both axes.

## Packet protocol

Both directions use the same four-byte packet, most significant byte first:

```
[AZ_HIGH] [AZ_LOW] [EL_HIGH] [EL_LOW]      each angle Q9.7, two's complement
```

There is no header or checksum. Bytes are aligned by time:
- A packet is four bytes.
- If no byte arrives for `BUS_TIMEOUT` cycles (10 ms) in the middle of a
  packet, the bytes read so far are dropped.
- The next byte is then taken as the start of a new packet.

Timing at 115200 baud:
- a packet takes about 17,400 clock cycles to arrive;
- the answer leaves a few hundred cycles after the last stop bit.

## The Kalman-to-Avalon bridge (`kalman_avalon_bridge`)

This state machine is the only master of the UART. It never sees the serial
line, only the UART's registers, which it reads and writes through the
acknowledge-based external bus. It runs in four phases.

| phase | states | what happens |
|---|---|---|
| poll | IDLE → CHECK_RRDY → WAIT_RRDY | IDLE waits 256 cycles (`POLL_DELAY` = 255). The bridge then reads STATUS until RRDY (bit 7) is set. |
| receive | READ_BYTE → WAIT_READ → ASSEMBLE | Reads RXDATA, which pops one byte. The byte is shifted into a 32-bit buffer. This repeats until four bytes are assembled. |
| filter | TRIGGER_KALMAN → WAIT_KALMAN | The raw angles are presented and `angle_data_valid` is held high. The bridge waits for `filtered_valid`. After `KALMAN_TIMEOUT` (500,000 cycles = 10 ms) it sends the raw angles back instead and counts a fallback. |
| transmit | CHECK_TRDY → WAIT_TRDY → WRITE_BYTE → WAIT_WRITE → TRANSMIT_NEXT | For each of the four bytes, it reads STATUS until TRDY (bit 6) is set, then writes TXDATA. It then returns to IDLE. |

Every bus access waits for `acknowledge`. An access that gets no acknowledge
within `ACK_TIMEOUT` (255) cycles is abandoned, and the bridge returns to
IDLE. The same happens when a RRDY or TRDY wait lasts `BUS_TIMEOUT` cycles.
Both cases are counted in `bus_timeouts`.

A clear RRDY sends the bridge back to CHECK_RRDY, not to IDLE, so STATUS is
polled back to back. Only the bus timeout returns it to IDLE. After each
answered packet the bridge passes through IDLE and its 256-cycle delay once.

`ext_bus_avalon_bridge` converts each external-bus access into one Avalon-MM
transfer:
- the access is latched;
- the transfer is held until `waitrequest` is low;
- a one-cycle `acknowledge` is returned with the read data.

Address bit 1 selects the low or high half of the 32-bit Avalon word.

## UART registers (`uart_avalon`)

| offset | register | access | contents |
|---|---|---|---|
| 0x0 | RXDATA | read | next received byte; reading pops it |
| 0x4 | TXDATA | write | byte to send; pushed into the TX FIFO |
| 0x8 | STATUS | read | bit 7 RRDY (RX FIFO not empty), bit 6 TRDY (TX FIFO not full), bit 3 ROE (RX overrun, sticky), bit 1 FE (framing error, sticky). Writing STATUS clears the sticky bits. |
| 0xC | CONTROL | read/write | [31:16] bit time in clock cycles (reset value 434 = 50 MHz / 115200); bit 7 RRDY interrupt enable; bit 6 TRDY interrupt enable |

Details:
- Format is 8N1. The RX and TX FIFOs are 8 bytes deep (`FIFO_DEPTH`).
- Every access takes one wait state.
- The receiver samples the middle of each bit, and re-checks the start bit
  at mid-bit to reject glitches.

## The adaptive scalar filter (`kalman_scalar`)

The model is quasi-static: the sun moves about 0.0004° per sample. Each axis
therefore keeps one angle `x` and its variance `P`. One iteration with
measurement `z` is:

```
predict   P_pred = P + Q                     innov = z − x
adapt R   excess = max(0, |innov| − innov_avg)
          R_eff  = R × 640          (saturated)           if excess > 3.75°
                 = R × (1 + ((excess × 35) >> 8)²)         otherwise
gain      K      = P_pred / (P_pred + R_eff)    restoring divider, 0 ≤ K ≤ 1
update    x      = clamp(x + K × innov, 0°, 180°)
          P      = max(P_MIN, P_pred − K × P_pred)
baseline  innov_avg += (|innov| − innov_avg) / 64    only if |innov| < 1.5 × innov_avg
```

### How the noise adaptation behaves

`innov_avg` is a slow running average of the innovation size. It is the
filter's idea of how noisy the input normally is.

An innovation up to `innov_avg` uses the baseline R. Above that, R grows with
the square of the excess:
- ×1.0 at 0.5° excess (the square is below one LSB);
- ×1.07 at 2°;
- ×1.26 at 3.75°.

Beyond 3.75° of excess, the sample is treated as an outlier. R is multiplied
by 640, K drops close to zero, and the estimate coasts.

Outliers never enter the average, because of the 1.5× rule. A burst of spikes
therefore cannot teach the filter that spikes are normal. The average has a
floor of 0.125° (`INNOV_AVG_MIN`); without it, a perfectly clean input could
drive it to 0 and make every later sample an outlier.

### Consequences worth knowing

- **A real step of more than about 4° is treated as an outlier.** The estimate
  stays put while P grows by Q each sample. It follows the step only once
  P/(P + 640·R) has become large. With Q = 8 LSB and R = 2.0 (Q9.7) that takes
  hundreds of samples (157 to 214 samples to come within 2° in the
  sudden-change test). A smaller `HARD_SCALE` shortens this, at the price of
  weaker spike rejection. The integer model in `tb/kalman_ref.svh` shows the same
  behaviour, so it is how the algorithm works, not a fault of this RTL.
- **Fast ramps have the same problem.** With a small Q and a large R, the
  estimate lags a fast ramp. The lag shows up as a steadily large innovation,
  which ends up hard-rejected, and the filter stops tracking.
  - 0→180° over 5000 samples (0.036° per sample) is tracked well.
  - 180° over 1500 samples with Q = 2, R = 4.0 is not.
  - Pick Q for the fastest motion the tracker must follow.
- A clean input lets `innov_avg` decay to its floor, and every larger
  innovation then counts as excess.

### Start-up, bypass and status

- The first sample after reset sets `x = z` and `P = P_INIT` (2.0).
- `converged` is raised once at least 10 samples have been filtered and
  P ≤ 0.5.
- With `enable` low (BYPASS), the measurement is clamped to 0…180° and passed
  through. The filter state is left untouched.
- `error` flags a divider error or a saturated innovation.

### Control and timing

The FSM states are:
- IDLE;
- INIT (first sample);
- PREDICT, CALC_R, START_DIV, WAIT_DIV, UPDATE, UPDATE_P, OUTPUT;
- BYPASS.

`fp_divide_fast` computes only the fraction (the result is always between 0
and 1). It works one quotient bit per cycle over 16 bits, plus load and
finish: 18 cycles. The combinational helpers are `fp_add_sat`, `fp_sub_sat`
and `fp_multiply`:
- `fp_multiply` forms a 32-bit Q18.14 product;
- it shifts it arithmetically right by 7;
- it saturates the result.

Latency, counted from the clock edge that samples `start` to the edge that
samples `done`:

| case | edges |
|---|---|
| normal iteration | 25 |
| first sample (INIT) | 3 |
| bypass | 2 |

## The dual filter (`kalman_filter_top`)

`angle_data_valid` passes through a two-flop synchroniser and a rising-edge
detector (`sync_edge_detect`). A level held high therefore starts exactly one
iteration.

The flow is:
1. The raw pair is latched into an input buffer.
2. Both `kalman_scalar` instances are started in the same cycle.
3. `filtered_valid` pulses for one cycle once both have finished.
4. The registered outputs hold until the next result.

Latency from the edge that first samples `angle_data_valid` to the edge that
samples `filtered_valid`:

| case | edges |
|---|---|
| normal | 30 |
| first pair | 8 |
| bypass | 7 |

A timeout timer (`TIMEOUT_CYCLES`, 1024) guards against a stuck filter. On
timeout:
- `timeout_error` is raised;
- the sample is abandoned and no `filtered_valid` is produced, so the
  bridge's 10 ms watchdog answers that packet with the raw angles;
- a late result from the abandoned sample is discarded.

`filter_converged` is the AND of both axes. `filter_error` is the OR of the
two per-sample error flags (divider error or saturated innovation); it holds
until the next sample completes. At the top level it appears as
`kf_filter_error`.

## Processor view (`avalon_interconnect`, `pio_in`)

| base | register |
|---|---|
| 0x1000_0000 | azimuth raw (last packet received) |
| 0x1000_0010 | elevation raw |
| 0x1000_0020 | azimuth filtered |
| 0x1000_0030 | elevation filtered |

- Each port is 16 bits wide, zero-extended in a 32-bit word at offset 0 of a
  16-byte window. Other offsets read 0.
- Reads have no wait states.
- An address outside the four windows reads 0 and raises `m_decode_miss`.
- These are the addresses on the fabric side. A processor reaches them
  through its own bridge window, for example its lightweight bridge base plus
  the offset.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| ether_fpga_top | CLK_HZ, BAUD | 50 000 000, 115 200 | UART bit time |
| | UART_FIFO_DEPTH | 8 | RX/TX FIFO bytes |
| | POLL_DELAY | 255 | bridge idle cycles between polls |
| | KALMAN_TIMEOUT | 500 000 | 10 ms raw fallback |
| | BUS_TIMEOUT | 500 000 | RRDY/TRDY wait limit |
| | KF_TIMEOUT | 1024 | filter core timeout |
| kalman_scalar | P_INIT, P_MIN | 256, 1 | initial P (2.0), P floor |
| | HARD_THRESH, HARD_SCALE | 480, 640 | 3.75° outlier threshold, R multiplier |
| | SOFT_NUM, SOFT_SHIFT | 35, 8 | excess scaling 35/256 |
| | EMA_SHIFT | 6 | innov_avg weight 1/64 |
| | INNOV_AVG_INIT, INNOV_AVG_MIN | 128, 16 | 1.0° start, 0.125° floor |
| | CONV_P, CONV_SAMPLES | 64, 10 | convergence rule |

Q and R are run-time inputs in Q9.7. In simulation, Q = 8 (0.0625) with
R = 256 (2.0) works well for ±2° noise on slow sweeps.

## Where this design departs from, or goes beyond, its specification

- **Specified:** the four-byte packet and its byte order; the bridge's states
  and its 255-cycle idle poll; the 10 ms raw fallback; the UART register
  offsets; 115200 baud 8N1; FIFOs of 4 to 8 bytes; the PIO bases and 16-byte
  spans; Q9.7 throughout; the filter equations with the constants 640, 3.75°,
  35/256, 1/64 and 1.5×; the filter's state sequence, including INIT; the
  18-cycle restoring divider; the 25-cycle filter latency.
- **Chosen here:**
  - STATUS bit positions (RRDY 7, TRDY 6, ROE 3, FE 1) and the CONTROL
    layout; CONTROL is also readable, and parity is not implemented.
  - The external bus address width (16 bits); its 16-bit data is specified.
  - Bus and acknowledge timeouts; the filter-core timeout.
  - Initial and minimum `innov_avg`, P_MIN and the convergence rule.
  - Clamping in bypass.
  - The initial covariance value (2.0).
  - The UART is a small in-house core, not a vendor core. The Avalon
    interconnect is reduced to the read-only PIO decoder the processor
    needs.
- **Soft-scaling strength:** R grows only slightly with the formula above
  (×1.07 at 2° excess). Examples of ×1.1 at 0.5° and ×15 at 2° would need a
  different scaling. The formula is implemented as written.
- **Recovery after a legitimate jump:** a settling time of 3 to 5 samples
  after a 20–60° jump cannot come from the described hard rejection. This
  RTL implements the rejection as described, and recovers slowly (see above).

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| tb_fp_add_sat, tb_fp_sub_sat, tb_fp_multiply | corner cases and random operands against integer arithmetic, saturation flags |
| tb_fp_divide_fast | quotients against floor(num·128/den), the 18-cycle latency, error cases |
| tb_kalman_scalar | every output against the integer model `kalman_ref.svh`, the 25/3/2-edge latencies, bypass, hard/soft rejection, convergence |
| tb_kalman_filter_top | both axes against the model, the 30/8/7-edge latencies, a second instance with a short timer that must time out |
| tb_kalman_scenarios | seven 5000-sample scenarios (see below) against the model, with RMSE |
| tb_sync_edge_detect, tb_sync_fifo, tb_uart_tx, tb_uart_rx, tb_uart_avalon, tb_pio_in, tb_avalon_interconnect, tb_ext_bus_avalon_bridge | protocol, timing and data against independent models |
| tb_kalman_avalon_bridge | the bridge against a UART register model with random acknowledge delays: byte order, poll delay, raw fallback, partial-packet drop and resynchronisation, abandoned access, TRDY back-pressure |
| tb_ether_fpga_top | the whole fabric at default parameters (see below) |

`tb_ether_fpga_top` acts as the microcontroller, with its own 115200-baud
transmitter and receiver, and as the processor on the PIO port. It covers:
- 60 filtered packets over a sweep with spikes and a step;
- 8 bypass packets with angles outside 0…180° (returned clamped);
- one packet whose filter-valid pulse is suppressed (answered raw after
  10 ms);
- half a packet followed by a 12 ms pause (dropped);
- 20 more packets.

Every answer is compared with the integer model, and all four PIOs and one
unmapped address are read after each packet. It counts filtering, bypass,
clamping, hard rejection, soft scaling, convergence, fallback, the bus
timeout and PIO reads, and fails if any of them never happened. It runs
about 4.3 million cycles (86 ms of simulated time) in a few seconds.

`tb_kalman_scenarios` measures the noise reduction, `1 − RMSE_filtered /
RMSE_raw`, against the noise-free trajectory, with Q = 8 and R = 256:

| scenario | raw RMSE | filtered RMSE | reduction |
|---|---|---|---|
| 0→180° incline, ±2° uniform noise | 1.15° | 0.40° | 65 % |
| 180→0° decline, ±2° | 1.15° | 0.38° | 67 % |
| incline with 20–45° spikes every 500 samples | 1.77° | 0.40° | 78 % |
| decline with spikes | 1.84° | 0.39° | 79 % |
| incline, ±4° noise plus 3 % spikes of 10–30° | 4.08° | 1.05° | 74 % |
| decline, very noisy | 4.06° | 1.05° | 74 % |
| sudden changes (six 20–60° jumps) | 1.16° | 12.6° | none: each jump takes 157–214 samples to settle within 2° |

### Simulating

Verilator 5 with `--timing` is enough. From the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/ether_pkg.sv tb/tb_ether_fpga_top.sv --top-module tb_ether_fpga_top -o sim
./obj_dir/sim
```

Substitute any other testbench name. `tb_kalman_scenarios` accepts `+Q=<lsb>`
and `+R=<lsb>`, which makes it easy to explore filter tuning. Lint a module
on its own with
`verilator --lint-only -Wall -y rtl -Irtl rtl/ether_pkg.sv rtl/<module>.sv`.

The Verilator lint warnings that remain are of two kinds:
- unused debug outputs in the top;
- `SYNCASYNCNET` on `reset_n`. This is a side effect of the bus assertions'
  `disable iff (!reset_n)` next to the asynchronously reset flip-flops. It is
  not a circuit issue.
