# FPGA functions for a nanosatellite: GPS search, watchdog with pin hold, camera link

This repository holds synthesizable SystemVerilog for three separate jobs that an FPGA can take on
a small satellite. Each one comes from a case study of a thesis on FPGAs in nanosatellites:

1. **GPS baseband hardware.** It records 1-bit I/Q samples from a GPS RF frontend into SDRAM and
   searches the recording for satellites. The search covers 8 PRNs, 20 Doppler bins and all 1023
   code phases in one pass, with no FFT and no processor in the loop.
2. **Watchdog with pin hold.** This is a watchdog for the power-board microcontroller. It resets a
   microcontroller that stops talking to it over SPI. While the microcontroller resets and reboots,
   the FPGA keeps the power board's control pins at their last values, so no regulator or charger
   switches by accident.
3. **Camera link.** A CMOS camera sends 12-bit packets at about 320 Mbit/s on one LVDS pair, with no
   clock. Each packet holds a start bit, 10 pixel bits and a stop bit. The FPGA recovers the bits by
   4x oversampling, frames the packets and buffers the pixels. It then sends each pixel as two bytes
   on a standard UART that an ordinary microcontroller can receive.

The three designs share nothing. They sit side by side in `nanosat_fpga_top`, and each has its own
clocks and ports.

```
nanosat_fpga_top
├── gps_baseband                      (system clock + 16.384 MHz frontend clock)
│   ├── gps_data_acq_avalon           sample recorder, Avalon slave + write master
│   │   ├── async_fifo                frontend -> system clock crossing
│   │   └── gps_data_acq              Idle/Shift/Copy/Increment/Switch/Done FSM
│   ├── gps_sat_acq                   satellite search, Avalon slave + read master
│   │   ├── nco_1bit x 21             20 replica carriers + the 1.023 MHz code clock
│   │   ├── ca_code_gen x 32          one C/A generator per PRN
│   │   ├── gps_acq_channel x 8       correlate, integrate, power, keep best
│   │   └── gps_sat_acq_ctrl          search FSM and sample reader
│   └── avalon_arbiter                two masters onto the single memory port
├── wdt_fpga                          (20 MHz)
│   ├── spi_slave, wdt_cmd_decoder
│   ├── watchdog_timer
│   └── pin_monitor
└── camera_if                         (two bit-rate clocks, 90 degrees apart)
    ├── lvds_oversampler, lvds_edge_detect, lvds_deserializer
    ├── sync_fifo, pixel_byte_encoder
    └── uart_tx
```

`gps_pkg` holds the shared constants, the Avalon request and response structs (`avm_req_t`,
`avm_rsp_t`), the NCO increment function and the table of C/A code taps.

Some parts are not in this RTL. These are the Nios II processor and its UART/SPI peripherals, the
SDRAM controller, the PLLs, the MAX2769 frontend and the analog power board. They are vendor IP or
analog parts. Their signals are ports of the top instead:
- one Avalon-MM master port towards memory;
- two Avalon slave ports for the processor;
- clock inputs.

---

## 1. GPS baseband

### 1.1 Recording samples (`gps_data_acq_avalon`)

The frontend delivers one I bit and one Q bit per 61 ns (16.384 MHz). A bit value of 1 means +1.

1. **Clock crossing.** `async_fifo` moves each {I,Q} pair into the system clock domain. Its pointers
   are Gray coded, and each crosses through a 3-flop synchronizer.
2. **Byte expansion.** `gps_data_acq` takes two pairs and expands every bit to a signed byte
   (+1 → `0x01`, −1 → `0xFF`). It then writes one 32-bit word, laid out as
   `{Q(n+1), I(n+1), Q(n), I(n)}`, with I(n) in the lowest byte.
3. **State machine.** The states are Idle → Shift (twice) → Copy (held until the memory accepts) →
   Increment → Shift … At the end of a buffer the machine goes to Switch, then either Done or back to
   Shift.
4. **Buffers.** Each buffer holds `SAMPLES_PER_BUF` samples: 65536, which is 4 ms or 128 KiB.
   - *Single mode* fills one buffer at `base` and stops.
   - *Continuous mode* alternates between `base` and `base + 2*SAMPLES_PER_BUF`. Software can work on
     one buffer while the hardware fills the other.

Registers (32-bit, word addressed):

| addr | write | read |
|---|---|---|
| 0 | [0] enable (0→1 starts a recording), [1] continuous | same, plus [8] busy, [9] done, [10] buffer filled last, [11] FIFO overflow (sticky until reset) |
| 1 | base byte address | base |

Clearing enable stops continuous recording at the end of the current buffer. While the recorder is
idle, the FIFO is drained, so a new recording starts with fresh samples.

The FIFO is 8 entries deep, not the 4 of the original. Each pointer takes three system clocks to
cross, plus up to three frontend clocks. A 4-entry FIFO therefore reports full before the write side
has seen the first read, even when the reader keeps up. Eight entries leave margin for memory wait
states. The margin is bounded: the overflow bit exists because a memory that stalls for more than
about 8 samples (≈0.5 µs) loses data. The end-to-end test provokes exactly that.

### 1.2 Searching for satellites (`gps_sat_acq`)

This is the most involved part of the design. The search is a *serial* search: for each code phase
it correlates 1 ms of recorded signal with local replicas, and keeps the strongest result. Many
hypotheses are tested at once:

- **20 replica carriers.** `nco_1bit` instances at IF + (k − 10)·500 Hz, k = 0…19, with
  IF = 4.092 MHz. Each is a 16-bit phase accumulator with increment `round(f·2^16 / 16.384 MHz)`,
  advanced once per sample. Their sine and cosine are single bits: sine = NOT msb, and
  cosine = NOT (msb XOR next bit).
- **A code clock.** One more NCO at 1.023 MHz gives the chip enable for all code generators.
- **32 C/A generators.** `ca_code_gen` uses G1 = 1 + x³ + x¹⁰ and G2 = 1 + x² + x³ + x⁶ + x⁸ + x⁹ + x¹⁰.
  The output is G1₁₀ ⊕ G2_S1 ⊕ G2_S2. The tap pairs per PRN come from `gps_pkg::g2_taps`.
- **8 channels.** `gps_acq_channel` serves one PRN of the selected bank (PRNs 8b+1 … 8b+8). The
  channel multiplies by XNOR: for ±1 values encoded as 1/0, XNOR is multiplication. Per carrier k, it
  integrates `I_k += sample ⊙ cos_k ⊙ chip` and `Q_k += sample ⊙ sin_k ⊙ chip` in 16-bit signed
  accumulators.

All in all, 8 × 20 × 2 = 320 correlators run in parallel.

**The state machine** (`gps_sat_acq_ctrl`) runs one code phase p at a time:

```
IDLE ─start─> READ ─> WAIT ─> SUM ─┬─(more samples)─> READ …
                                    └─(1 ms done)─> POWER ─> COMPARE ─> INCR ─> SKIP ─> READ …
                                                                          └─(last phase)─> DONE
```

- **READ/WAIT** fetch a 32-bit word of the recording. The word holds two samples; the search uses the
  I byte of each.
- **SUM** feeds one sample per step to the channels. The next word is requested during the second
  SUM, so the loop costs **2 clocks per sample** when the memory answers at once.
- **POWER** computes I²+Q² for all 20 carriers: 40 squarings per channel, done with sign-extended
  multiplies.
- **COMPARE** keeps the largest power, its code phase and its carrier index.
- **INCR** clears the integrators, restarts the NCOs and reloads the C/A generators.
- **SKIP** advances every C/A generator by p + 1 chips at one chip per clock. The next integration
  then starts with the local code delayed by the next code phase. The NCOs restart with each phase,
  so every phase sees exactly the same carrier replicas.

Read the reported code phase as follows. Phase p means the local code starts p chips into its
sequence at the first sample of the buffer. Equivalently, the satellite's code epoch lies
1023 − p chips into the recording.

Registers:

| addr | write | read |
|---|---|---|
| 0 | [0] start, [5:4] PRN bank, [10:8] channel whose result is shown | [1] busy, [2] done |
| 1 | base byte address of the recording | base |
| 2 | — | best power of the selected channel |
| 3 | — | [9:0] code phase, [20:16] carrier index (Doppler = (index − 10)·500 Hz) |

A full search of one bank takes 1023 × 16384 × 2 ≈ 33.5 M clocks (0.67 s at 50 MHz). Memory
contention adds to that: at full size with the recorder running alongside, the search took
45.9 M clocks. All 32 PRNs take four such runs.

### 1.3 Sharing the memory (`avalon_arbiter`)

The recorder and the search share the single SDRAM port.
- The recorder (master 0) has fixed priority, because its FIFO is small. The search can always wait.
- A master that has started a transfer under `waitrequest` keeps the grant until it is accepted, as
  Avalon requires.
- Read responses are routed back through a small queue that records which master issued each read.
  It holds up to 4 outstanding reads.
- `bus_conflict` marks cycles in which both masters requested the port.

---

## 2. Watchdog with pin hold (`wdt_fpga`)

The microcontroller talks to the FPGA over SPI (mode 0, MSB first, one byte per transfer):

| byte | command |
|---|---|
| `0xA1` | ENABLE: arm the timer and clear the count |
| `0xA2` | KICK: clear the count |
| `0xA3` | STOP: disarm |

Each transfer returns the status byte `{armed, hold, 0, 0, low nibble of the last command}`. Unknown
bytes are ignored and counted.

`watchdog_timer` has four states: IDLE, COUNT, RESET and BOOT.
- **COUNT.** The counter increments every clock and clears on ENABLE or KICK. After
  `TIMEOUT_CYCLES` (2 s) without a kick, the timer enters RESET.
- **RESET.** The active-low `mcu_rst_n` is low for `RESET_CYCLES` (1 s).
- **BOOT.** The timer stays here for `HOLD_CYCLES` (0.5 s), the time the microcontroller needs to
  boot. It then returns to IDLE, and the microcontroller must send ENABLE again.
- **Power-up.** The timer starts in COUNT. So one reset always follows power-up unless the
  microcontroller sends ENABLE or KICK in time. This mirrors the original, whose controller program
  started the timer first.

`pin_monitor` copies the microcontroller's control pins every clock. During RESET and BOOT (`hold`),
it drives the board with the copy taken just before the reset, whatever the microcontroller's pins do.
The hold ends when BOOT ends, so the freshly booted firmware must have restored its pins by then.

The SPI inputs are synchronized to the 20 MHz clock and edge detected. SCK must therefore stay below
about 1/4 of the clock (5 MHz).

---

## 3. Camera link (`camera_if`)

**Oversampling.** Two PLL clocks at the bit rate, `clk0` and `clk90`, sample the line on both edges:
0°, 90°, 180° and 270°. `lvds_oversampler` moves the four samples onto `clk0`. Every `clk0` cycle
then carries four samples of one bit period.

**Choosing the phase.** `lvds_edge_detect` compares each sample with the sample a quarter bit
earlier. A difference marks a transition between those two samples. The middle of the bit is two
samples later, so the phase `sel` becomes (edge position + 2) mod 4. The phase moves only after the
same new edge position has appeared twice in a row, which keeps a single glitch from moving it.

**Framing.** `lvds_deserializer` keeps the last 48 samples (12 bits × 4) and reads the 12 bits at
phase `sel`.
- A window whose oldest bit is a start bit (1) and newest is a stop bit (0) is a candidate packet.
- Two candidates exactly 12 bits apart lock the framing.
- From then on, every 12th window is a pixel, LSB first.
- A window without its start and stop bits counts a framing error and restarts the hunt.

With random pixel data the hunt can lock on a false boundary. The next packet catches this with
probability 3/4, and the framing is found again within a few packets. The tests check that no false
lock survives ten packets. The deserializer produces one bit per `clk0` cycle, so it assumes the bit
clocks are frequency-locked to the camera. A phase step (for example after a relock) costs at most a
few packets.

**Output.** Pixels enter `sync_fifo` (512 entries). The camera cannot be paused, so a pixel that
meets a full buffer is dropped and counted in `drops`. `pixel_byte_encoder` sends each pixel as
`pixel[9:2]` (a plain 8-bit image) followed by `{000000, pixel[1:0]}`. `uart_tx` sends 8N1 with normal
polarity (start low, stop high), the opposite of the camera's own framing. This is what the
microcontroller's UART expects.

**Rates.** The camera delivers 26.6 M pixels/s. The UART at 80 clocks per bit (4 Mbaud at 320 MHz)
carries about 200 k pixels/s. The link can therefore forward a burst of up to 512 pixels whole, or a
slow subsample of the stream. A full image needs a frame buffer in external memory, which this design
does not have.

---

## 4. Parameters (defaults)

| module | parameter | default | meaning |
|---|---|---|---|
| gps_data_acq(_avalon) | SAMPLES_PER_BUF | 65536 | samples per buffer (4 ms at 16.384 MHz) |
| gps_data_acq_avalon | FIFO_DEPTH | 8 | clock-crossing FIFO entries |
| async_fifo | SYNC_STAGES | 3 | synchronizer flops per pointer bit |
| gps_sat_acq | NUM_CH / NUM_CARRIERS / STEP_HZ | 8 / 20 / 500 | channels, Doppler bins, bin spacing |
| gps_sat_acq(_ctrl) | INT_SAMPLES | 16384 | coherent integration (1 ms) |
| gps_sat_acq(_ctrl) | CODE_PHASES | 1023 | code phases searched |
| nco_1bit | N | 16 | accumulator bits |
| avalon_arbiter | MAX_PENDING | 4 | outstanding reads |
| watchdog_timer | CLK_HZ, TIMEOUT_CYCLES, RESET_CYCLES, HOLD_CYCLES | 20 MHz, 2 s, 1 s, 0.5 s | |
| pin_monitor | NUM_PINS | 8 | held control pins |
| camera_if | FIFO_DEPTH, CLKS_PER_BIT | 512, 80 | pixel buffer, UART bit time |

The top passes these on with `GPS_`, `WDT_` and `CAM_` prefixes.

## 5. Where this differs from the original design

- **Search loop.** The search's per-sample loop takes 2 clocks, against the 3 clocks (Sum/Wait/Power)
  quoted for the original. Here the power is computed once per code phase, not per sample. The
  original measured 0.86 s per PRN on its board, software included. This design needs 0.67–0.92 s
  for a bank of eight.
- **Clock-crossing FIFO depth** is 8 instead of 4 (see 1.1). The synchronizers have 3 stages.
- **Fixed command decoder.** The original watchdog ran a small soft processor (CoreABC) with an SPI
  core. Here a fixed decoder handles the three commands. The command codes, the status byte, the
  2 s timeout and the 0.5 s boot hold are choices of this design. The 1 s reset pulse is from the
  original.
- **Chosen details.** The original names the processor registers but not their bits. Its
  recording-module description mentions a 100 MHz system clock; the satellite-acquisition
  configuration runs at 50 MHz, and the tests use 50 MHz. The IF of 4.092 MHz is the usual MAX2769
  setting for 16.384 MHz sampling, and was chosen here.
- **Camera side.** The phase-selection rule, the two-packet lock, the pixel bit order, the byte split,
  the UART rate and the buffer size are choices of this design. The original describes the
  oversampling clocks, the edge detector and the 48-bit sample register, and states that pixels leave
  as pairs of bytes.
- **Pins are synthesizable; timing is not guaranteed.** The 270° capture reaches the `clk0` retiming
  flop a quarter period after it was taken. At 320 MHz that path needs placement constraints, or a
  second retiming stage. The RTL cannot promise that timing.

## 6. Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if something hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/gps_pkg.sv tb/tb_gps_sat_acq.sv \
          -y rtl --top-module tb_gps_sat_acq -Mdir obj && obj/Vtb_gps_sat_acq
```

(`-y rtl` lets Verilator find the other modules by file name.)

| testbench | what it shows |
|---|---|
| tb_nco_1bit | the increment formula, frequency, and quadrature of sine and cosine |
| tb_ca_code_gen | PRN 1, 2, 7 and 32 codes against an independent generator, the first chips in octal, and the 1023-chip period |
| tb_async_fifo | data order across unrelated clocks, and full, empty and overflow |
| tb_gps_data_acq | byte expansion, word layout, buffer switching, single and continuous mode |
| tb_gps_data_acq_avalon | registers, recording through the FIFO, and the overflow flag |
| tb_avalon_arbiter | priority, grant hold under `waitrequest`, and read data routed to the right master |
| tb_gps_acq_channel | integrator, power and best-result bookkeeping against a model |
| tb_gps_sat_acq_ctrl | state sequence, the skip counts, and the exact cycle count of a search |
| tb_gps_sat_acq | finds a synthetic satellite (PRN 3 and PRN 11, banks 0 and 1) at the right phase and Doppler bin |
| tb_gps_baseband | frontend to result: records, then searches while recording continuously |
| tb_spi_slave, tb_wdt_cmd_decoder, tb_watchdog_timer, tb_pin_monitor | the watchdog parts, with exact timeout and pulse lengths |
| tb_wdt_fpga | the board scenario over SPI: power-up reset, enable, kicks, timeout, pins held, stop |
| tb_lvds_oversampler, tb_lvds_edge_detect, tb_lvds_deserializer | sample order, phase choice, glitch immunity, lock, and one pixel per 12 clocks |
| tb_sync_fifo, tb_pixel_byte_encoder, tb_uart_tx | buffer and drops, byte pairs, and exact UART bit timing |
| tb_camera_if | the camera line with real quadrature clocks, a phase step, the UART decoded, and drops accounted for |
| tb_nanosat_fpga_top | all three designs at reduced size; counts every mechanism and fails if any never happened |
| tb_nanosat_fpga_top_full | the same scenario with every parameter at its default; the watchdog part covers the power-up timeout, reset and hold, two kicks spanning 1.5 timeouts, and STOP |

Most tests use small sizes to stay short: a few code phases, short watchdog times and a small camera
buffer. `tb_nanosat_fpga_top_full` runs the top at its defaults, as the table below shows.

| design | what the full-size run covers |
|---|---|
| GPS | 4 ms buffers; a full 1023-phase search that finds PRN 5 |
| watchdog | 20 MHz with the 2 s, 1 s and 0.5 s times, checked to the clock |
| camera | the 512-pixel buffer |

It takes several minutes in Verilator. Most of that time goes into the watchdog: it runs about 175 M clocks of its 20 MHz clock.

The synthetic GPS signal in the tests is built from the published C/A code definition, computed in
the testbench itself. It has a carrier on one Doppler bin and 10% of its bits flipped as noise.
