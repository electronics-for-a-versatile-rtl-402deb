# CubeSat retarding potential analyzer: FPGA controller

A retarding potential analyzer (RPA) is a small ion instrument for a
satellite in low Earth orbit. Ions enter through a stack of grids and land on a
collector plate. A positive voltage swept on one grid, the *retarding grid*,
turns back more and more of them. Plotting collector current against grid
voltage gives an I-V curve. Fitting that curve gives ion density, temperature
and drift speed.

This RTL is the digital half of such an instrument, built for a CubeSat. It:

- takes a five-byte command over a UART;
- reads nine housekeeping values;
- steps a 16-bit DAC through 32, 64 or 128 grid voltages;
- at each voltage, averages up to 1024 conversions of a logarithmic current
  amplifier from a 16-bit ADC;
- sends every number back over the same UART.

Each command produces one sweep, so the host sets the duty cycle by how often it
sends commands. In flight that is once per second. Everything runs from one
10 MHz clock.

The block structure, the command format, the converter timings, the FIFO sizes,
the oversampling ratios and the settle times follow the instrument's published
description. Some details are this design's own choices. Each one is listed in
[Choices made here](#choices-made-here).

## One measurement, start to finish

```
 host ──UART 115200──► uart_rx ─► RX FIFO (128 B) ─► cmd_parser ─┐
                                                                 │ go + cfg
                     ┌───────────────────────────────────────────┘
                     ▼
              hk_sampler ──(9 words)──┐        rpa_ctrl
                     │ done           ├─► byte packer ─► TX FIFO (128 B) ─► uart_tx ──► host
              sweep_engine ─(2/point)─┘
                │        │
                │        └─ smart_rom (128 x 16)
                ▼
        dac_serial ──► grid DAC        adc_serial ◄──► ADC (ch0 current, ch1 RG, ch2 suppressor, ch3 mux)
                                       mux_addr  ──► housekeeping multiplexer
```

1. **Command.** While idle, the parser reads every byte and drops everything
   except the start byte `0xAA`. After a start byte it leaves the FIFO alone until
   the FIFO count reaches four. It then reads the four command bytes and starts
   the sequence. From then until the sweep ends, incoming bytes are read and
   thrown away, start bytes included. The one exception is the reset byte.
2. **Housekeeping**, about 370 µs. The multiplexer select lines step through
   inputs 0 to 7. After each change the sampler waits 34 µs for the buffer
   behind the multiplexer to settle, then converts ADC channel 3. Last, it
   converts ADC channel 2, the suppressor grid. The nine words go to the
   downlink at once.
3. **Sweep.** For each point:
   - write the new code to DAC channel 0 (RG1);
   - write DAC channel 1 (RG2) with the same code, or with 0;
   - wait for the log amplifier to settle: 12 ms for 32 or 64 points, 6.35 ms
     for 128;
   - run OVS current conversions back to back on ADC channel 0 and add them up;
   - shift the sum right by log2(OVS) to get the average;
   - convert the grid-voltage channel once;
   - queue two words: the average current, then the grid voltage.
4. **Done.** The parser goes back to looking for a start byte.

### Command bytes

| # | Byte | Meaning |
|---|------|---------|
| 1 | `0xAA` | start |
| 2 | step[15:8] | linear: step added at every point; constant mode: the grid code |
| 3 | step[7:0] | |
| 4 | points | 32, 64 or 128 |
| 5 | mode | bits 1:0: 0 = linear, 1 = constant ("ion trap"), 2 = smart. Bit 2: 1 holds RG2 at 0 V, 0 sweeps it with RG1 |

The full-scale code `0xFFFF` is 12 V on the grid. A step of 512 spreads
128 points evenly over 0 to 12 V.

### Downlink

Each command returns `18 + 4 × points` bytes. Every 16-bit word is sent high
byte first.

| Words | Content |
|-------|---------|
| 0–7 | multiplexer inputs S1..S8: temperature 1, 2, 3, daughter-board temperature, 15 V monitor, 5 V monitor, 3.3 V monitor, RG2 voltage (all on ADC ch 3) |
| 8 | suppressor grid voltage (ADC ch 2) |
| then per point | averaged current code (ADC ch 0), then retarding-grid voltage (ADC ch 1) |

The current code is a log-amplifier reading, not a linear current. The
conversion to amperes happens on the ground.

## Sweep modes and the smart table

- **Linear:** point *k* gets the code `k × step`. The sum is 16 bits wide and
  wraps.
- **Constant ("ion trap"):** every point gets `step`. The sweep still takes all
  the points, so the result is a time series of ion current at one voltage.
- **Smart:** point *k* gets entry `k × 128/points` of a 128-entry table.
  A 64-point sweep uses every second entry and a 32-point sweep every fourth.

An I-V curve is flat at both ends and steep in the middle. The smart table
therefore places its voltages densely around mid-range. The published design
stores 128 such codes but does not give their values. `smart_rom` computes a
stand-in table at elaboration:

```
x = 2i − 127,  n = 127
code(i) = 32768 + 32767 · x · (n² + 4x²) / (5n³)      (integer division)
```

This is `0.2·u + 0.8·u³` on a normalised axis `u = x/n`. The codes run
monotonically from 1 to 65535. Neighbouring entries are about 103 codes apart
near the middle and about 1350 apart at the ends. To use real flight values,
replace the function `smart_code()`. The rest of the design does not depend on
the contents.

## Timing budget

All times are at 10 MHz.

| Item | Clocks | Time |
|------|--------|------|
| DAC command (24-bit frame) | 28 | 2.8 µs |
| ADC conversion (27 ADC clocks at 2.5 MHz) | 108 | 10.8 µs |
| Back-to-back current conversion, with hand-off | ≈110 | ≈11 µs |
| Housekeeping, 9 values | ≈3 700 | 370 µs |
| UART byte (87 clocks per bit) | 870 | 87 µs |

Per point, the time is two DAC writes, plus the settle wait, plus OVS + 1
conversions. In simulation at the default parameters:

| Points | OVS | Settle | Sweep time | Published figure |
|--------|-----|--------|------------|------------------|
| 128 | 128 | 6.35 ms | 993.96 ms | 993 ms |
| 32 | 1024 | 12 ms | 742.09 ms | 738 ms |
| 64 | 512 | 12 ms | 1126.6 ms | 947 ms |

The 64-point row is the one real inconsistency. With 512 conversions of
10.8 µs each and a 12 ms settle, a point cannot take less than 17.5 ms, so
64 points cannot take less than 1.12 s. The published 947 ms matches about 256×
oversampling. This design keeps the published settings: 512× and 12 ms. As a
result a 64-point sweep overruns a one-second command cadence. A command that
arrives during the overrun is read and ignored, so the next sweep simply starts
with the following command. If you need the 1 s cadence at 64 points, set
`OVS_64 = 256`.

The downlink is not a bottleneck. A 128-point sweep sends 530 bytes, which is
46 ms of UART time. Each point's 4 bytes leave during the next point's settle
wait. The housekeeping burst of 18 bytes fits easily in the 128-byte transmit
FIFO.

## Converter interfaces

**DAC** (`dac_serial`): a quad 16-bit DAC with a 24-bit frame
`{cmd[3:0]=0011, addr[3:0], data[15:0]}`, sent MSB first.

- `dac_sck` is the 10 MHz system clock, gated by an enable.
- `cs_n`, `sdi` and the enable all change on the falling edge of `clk`.
- The DAC therefore sees exactly 24 rising edges, each in the middle of a
  stable data bit.
- `done` follows `start` by 28 clocks.

**ADC** (`adc_serial`): a four-channel 16-bit converter clocked at `clk/4`
(2.5 MHz). One conversion is 27 ADC clock periods:

| Period | Activity |
|--------|----------|
| 0 | chip-select setup |
| 1–8 | command byte, MSB first: `{1, A2 A1 A0, 0, SGL=1, PD1 PD0}`. Channel codes are 001/101/010/110 for channels 0–3 |
| 9 | converter busy |
| 10–25 | result bits D15..D0. The ADC shifts each bit after the falling edge; the FPGA samples it at the end of the high half |
| 26 | hold |

`done` follows `start` by exactly 108 clocks. `busy` clears one clock later,
which is when the next conversion may start.

Channel roles:

| Channel | Signal |
|---------|--------|
| 0 | log-amplifier output (collector current) |
| 1 | retarding-grid voltage |
| 2 | suppressor-grid voltage |
| 3 | housekeeping multiplexer |

## Resets

The board holds `arst_n` low at power-up, for about 0.6 s, using an RC filter
and Schmitt-trigger inverters.

The reset byte `0x55` also resets the whole FPGA. It is honoured while idle and
while a sweep runs. Among the four command bytes it counts as data, so a step of
`0x55xx` is still possible.

`reset_sync` handles both sources:

- The reset output asserts at once on `arst_n`, or on the clock edge after the
  reset byte.
- The output releases two clocks after the cause goes away, in step with the
  clock.
- A reset empties both FIFOs, so bytes waiting to go down are lost.

The grids keep their last DAC value through a reset. The DAC returns to 0 V only
on its own power-on reset.

## Modules

One module per file in `rtl/`:

| File | Role |
|------|------|
| `rpa_pkg.sv` | command constants, mode and point-count enums, `sweep_cfg_t`, ADC/DAC channel numbers |
| `rpa_top.sv` | top level: pins, FIFOs, UART, converter masters, reset |
| `rpa_ctrl.sv` | sequencer: parser → housekeeping → sweep; ADC sharing; word-to-byte packer |
| `cmd_parser.sv` | start byte, wait for four bytes, decode, ignore while busy, reset byte |
| `hk_sampler.sv` | multiplexer stepping, 34 µs settle, nine conversions |
| `sweep_engine.sv` | per-point DAC/settle/oversample/average/voltage loop |
| `smart_rom.sv` | 128-entry smart-sweep table, synchronous read |
| `dac_serial.sv`, `adc_serial.sv` | converter serial masters |
| `uart_rx.sv`, `uart_tx.sv` | 8N1 UART, baud rate from `CLK_HZ`/`BAUD` |
| `sync_fifo.sv` | 128-byte show-ahead FIFO with full flag and count |
| `reset_sync.sv` | power-on and command reset merge |

Top-level parameters and their defaults:

| Parameter | Default |
|-----------|---------|
| `CLK_HZ` | 10 000 000 |
| `BAUD` | 115 200 |
| `FIFO_DEPTH` | 128 |
| `OVS_32` / `OVS_64` / `OVS_128` | 1024 / 512 / 128 (each must be a power of two) |
| `WAIT_LONG` | 120 000 clocks (12 ms) |
| `WAIT_128` | 63 500 clocks (6.35 ms) |
| `HK_SETTLE` | 340 clocks (34 µs) |

Status pins:

- `rx_fifo_full` and `tx_fifo_full`
- `sweeping`, high while a command executes
- `uart_frame_err`
- `rs422_de`, the driver enable for the isolated RS-422 transceiver, high while
  bytes are queued or on the line
- `rs422_re_n`, the receiver enable, held low so the receiver is always on

## Simulation

Each testbench in `tb/` is self-checking. It ends with a line
`TB_RESULT checks=N failures=M`, and has a watchdog. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/rpa_pkg.sv tb/tb_rpa_top.sv \
  --top-module tb_rpa_top -o sim && ./obj_dir/sim
```

| Testbench | What it covers |
|-----------|----------------|
| `tb_rpa_top` | Whole design through its pins at shortened settle and oversampling, but real UART, housekeeping and converter timing. Runs seven commands, one cut short by the reset byte, covering all modes, all point counts, RG2 swept and grounded, bytes ignored when idle and during a sweep, transmit-FIFO back-pressure, and the reset byte mid-sweep. Checks every downlink word. |
| `tb_rpa_top_full` | All defaults. Runs a 128-point smart sweep, a 32-point linear sweep and a 64-point sweep, with every word checked. Sweep times must be within 1 % of 993 ms and 738 ms. About 30 s. |
| `tb_rpa_ctrl`, `tb_sweep_engine`, `tb_hk_sampler`, `tb_cmd_parser` | Sequencing blocks with testbench converter responders |
| `tb_dac_serial`, `tb_adc_serial` | Serial frames against behavioural converter models, plus exact latencies |
| `tb_uart_rx`, `tb_uart_tx`, `tb_sync_fifo`, `tb_smart_rom`, `tb_reset_sync` | Leaf blocks |

The behavioural models in `tb/` are simulation-only:

- `adc_model.sv` answers each channel with a value supplied by the testbench. It
  can add a 0..3 ripple on channel 0, which tests the averaging.
- `dac_model.sv` decodes the 24-bit frames.
- `uart_mon.sv` decodes the transmit line.

## Choices made here

The published description leaves these open. Each has a short reason.

- **Grid-voltage ADC channel.** The description once calls the per-point
  grid-voltage sample "channel 2". Elsewhere it uses channel 2 for the
  suppressor and channel 1 for the retarding grid. This design samples channel 1
  per point and channel 2 for the suppressor.
- **Reset byte value.** `0x55` was chosen (`RESET_BYTE` in `rpa_pkg`).
- **Unsupported command values.** A points byte other than 32, 64 or 128 gives
  32 points. Mode 3 behaves as linear.
- **Linear start.** The linear sweep starts at code 0, and the sum wraps at
  2^16.
- **Word layout.** Words go high byte first. Per point, the current word comes
  before the voltage word. No header or framing bytes are sent back.
- **Grids after a sweep.** They stay at the last point's value.
- **Settle before the suppressor.** There is no multiplexer settle before the
  suppressor conversion, because it does not pass through the multiplexer.
- **Flow control.** Producers wait while the transmit FIFO is full, so no sample
  is dropped. The next point starts only after the previous point's words have
  been accepted.
- **UART.** Frames are 8N1, LSB first, sampled mid-bit. After a bad stop bit the
  receiver waits for the line to return high.
- **Converter frames.** The bit layouts come from the converter types named in
  the parts list, not from the instrument description: the DAC command code
  `0011` and the ADC control byte.
- **Parser stall.** If fewer than four bytes follow a start byte, the parser
  waits indefinitely. Only a reset clears it.
- **Smart table.** The values are the formula above, not flight values.

## Not in this RTL

The analog parts of the instrument are outside the FPGA and are not modelled
here. Apart from the converters, they have no logic function:

- the logarithmic transimpedance amplifier on the daughter board and the
  buffer/offset stage in front of the ADC;
- the grid drive amplifiers, 0 to 12 V and 0 to −12 V;
- the analog multiplexer and its buffer;
- the temperature sensors and supply monitors;
- the isolated RS-422 transceiver;
- the senpot buffer;
- power conditioning;
- the RC/Schmitt-trigger power-on reset.

The ADC and DAC chips are represented only by the testbench models. The flight
configuration fixes the suppressor grid at −12 V with a jumper. The design
therefore never writes DAC channel 2, although the suppressor voltage is still
measured.
