# Real-time digital self-interference canceller

A full-duplex radio transmits and receives on the same frequency at the same
time, so its receiver hears its own transmitter far above the signal it wants.
An analog front end removes part of this self-interference. This RTL is the
digital stage behind it. It works on 16-bit samples at 1 GSample/s, four
samples per 250 MHz clock. Each clock it:

- delays a copy of the transmitted signal (the **ideal** stream) by a
  programmable number of samples;
- moves it by a fraction of a sample, by weighting each sample with its
  neighbour;
- scales the received signal (the **non-ideal** stream);
- subtracts the two, giving the **residual**.

Software computes the three coefficients (shift index, interpolation weight,
scaler) off-line, from buffers the same hardware captures. It then loads them
into the canceller, which runs at full rate.

The design targets an FPGA board with a four-channel 1 GS/s ADC/DAC
mezzanine card. It is a set of AXI units ("stars") on one AXI4-Lite command
bus, joined by AXI-Stream routers. This repository holds:

- the stars that do the work;
- the stream fabric that joins them;
- the command-bus fan-out.

The board's own infrastructure is not here. It appears as ports of the top
level `sic_top`:

- the PCIe host interface with its DMA engine and DDR4;
- clock generation;
- the JESD204B converter link.

## The residual

For sample index `m`, with shift index `D`, weight `w` (in 1/32 sample) and
scaler `S` (gain × 1024):

```
ideal_w[m] = ( w * ideal[m-D] + (32 - w) * ideal[m-D±1] ) >>> 5   (+1: next, -1: previous neighbour)
scaled[m]  = sat16( (S * nonideal[m]) >>> 10 )
resid[m]   = sat16( ideal_w[m] - scaled[m] )
```

Why each coefficient is needed:

- **`D` alone is not enough.** At 1 GS/s a whole-sample shift can be up to
  0.5 ns wrong. At 50 MHz that leaves a residual only about 16 dB down.
- **`w` fixes the fraction.** A weight of `w` moves the ideal signal by
  `(32-w)/32` of a sample toward the chosen neighbour. This is linear
  interpolation. Finer steps give a smaller worst-case error. Measured at
  50 MHz, the worst-case error halves with each step: about 78 mV at 1/2
  sample, 39 mV at 1/4, 19 mV at 1/8, 9.8 mV at 1/16 and 5 mV at 1/32.
- **`S` matches the amplitude.** The received copy is attenuated, and it may
  be inverted. For that reason `S` is signed.

All arithmetic is integer. Multiplying by a fixed-point constant and shifting
right replaces every divide. Results are truncated (arithmetic shift) and
saturated to 16 bits.

Expected cancellation, by frequency:

- **5 MHz:** more than 70 dB.
- **50 MHz:** about 55 dB, with 1/32-sample weighting.
- **Limits:** only delay and linear gain are modelled. Non-linear distortion
  is not cancelled.

In simulation:

- The end-to-end testbench reaches 69 dB on a 5 MHz tone delayed by 7.25
  samples. In that test, the coefficients are estimated from the design's
  own captures.
- The workload testbench reaches 57.9 dB on a 50 MHz tone attenuated to 0.92
  and delayed by 3.37 samples. It gets the same result when a 46 MHz or
  49.5 MHz tone, 1/18 of the amplitude, is added to the received signal
  only. That tone leaves the canceller at its scaled input level.
- At 50 MHz, the result depends on where the true delay falls between two
  1/32-sample steps.

## DSP star (`dsp_star`)

The DSP star is the heart of the design and the hardest part to follow.

### Pipeline

The pipeline takes one beat per clock: four samples on each input, four on
the output. Each step below is one register stage.

| Clock | Step | Module |
|-------|------|--------|
| CC0 | Take one beat from both inputs; snapshot shift, scaler and weight | `dsp_star` |
| CC1 | Shift-index logic | `dsp_star` |
| CC2 | Non-ideal scaling, four parallel branches; shift-index adjust | `dsp_scaler` |
| CC3 | Ideal shift register; delay-out assignment for the 4 lanes | `dsp_delay_line` |
| CC4–CC7 | Weighting: multiply, sum, shift | `dsp_weighting` |
| CC8 | Subtract; write the residual and debug streams | `dsp_star` |

Latency, from the input handshake to the output beat:

| Weighting precision | `FRAC` | Latency (clocks) |
|---------------------|--------|------------------|
| 1/32 sample (default) | 5 | 9 |
| 1/16 sample | 4 | 7 |

The two extra clocks at 1/32 are plain delay registers in `dsp_weighting`.
The arithmetic is the same at both precisions. The extra stages reproduce the
timing of the original implementation; they are not needed for the logic.

### Delay-out assignment

Four samples enter per clock, and `D` is rarely a multiple of four. So each
output lane takes its sample from a different place in the shift register.
The shift register holds beats, newest first:

1. `dsp_delay_line` splits `D` into a beat offset `q = D/4` and a lane
   offset `r = D%4`.
2. It picks a three-beat (12-sample) window at `q`.
3. Inside that window, `r` selects the current sample and the neighbour for
   each lane.

A full 1024:1 mux per lane is never built. The cost is one 256:1 mux of whole
beats plus small 4:1 selects. `MAX_DELAY` (default 1023 samples) sets the
register depth, which is `MAX_DELAY/4 + 3` beats.

### The one-beat offset

The "next" neighbour of the newest sample has not arrived yet. To provide it,
the non-ideal path holds its beat back by one beat. Two consequences:

- `D = 0` still means "no relative shift".
- Output beat `n` carries the residual of input beat `n-1`. The first output
  beat after reset is the residual of an all-zero beat.

### Flow control

- Both inputs are taken in the same clock, and only when both are valid.
- The whole pipeline freezes while the residual output is valid but not
  ready.
- While `run` is 0, both inputs are accepted and dropped. The converters
  upstream can never be stalled this way.
- The two debug streams (aligned ideal, scaled non-ideal) share the
  residual's valid and have no ready.

### Registers

Base address 0x0500. The registers cross into the stream clock through
`cdc_bus`, about 4 stream clocks after a write.

| Offset | Name | Bits |
|--------|------|------|
| 0x00 | control | bit 0 `run` (R/W); bit 1 `busy`, samples in flight (R) |
| 0x10 | shift index | delay in samples, 0..`MAX_DELAY`; larger values clamp |
| 0x20 | scaler | signed gain × 1024, 18 bits; reads back sign-extended; reset 1024 |
| 0x30 | weight | bits 5:0 weight of the current sample, 0..32 (32 = no interpolation, the reset value); bit 8 neighbour: 0 next, 1 previous |

To change coefficients cleanly, follow this order:

1. Write `run = 0`.
2. Wait for `busy = 0`.
3. Write the coefficients.
4. Write `run = 1`.

## Coefficient flow, as software uses the hardware

1. Read the constellation ID star to find each star's base address.
2. Route ADC0 (ideal) and ADC1 (non-ideal) on the 64-bit router to the two
   capture stars.
3. Route the captures on the 256-bit router to the host FIFO or the external
   port.
4. Set the capture size, arm both captures, and pulse `trigger_in`. Both
   buffers then start at the same sample.
5. In software, find `D` by cross-correlating the buffers. Find `w` and the
   neighbour by trying each weight. Find `S` by minimising the residual.
6. Write the coefficients to the DSP star.
7. Re-route ADC0/ADC1 into the DSP star and its residual to a DAC.
8. Set `run`.

## Stream fabric

### Streams

Streams use only `tdata`, `tvalid` and `tready`, with the usual AXI-Stream
handshake. Converter streams are 64 bits: four samples, oldest in bits 15:0.
Capture and host streams are 256 bits.

### `axis_router`

Every output selects at most one input. One input may feed any number of
outputs (broadcast).

- An input beat is taken only when every output it feeds has room, and then
  goes to all of them in the same clock.
- An input that is routed nowhere is always ready, and its beats are dropped.
- Each output has a two-beat buffer. Ready therefore never depends
  combinationally on a downstream ready, and a stream may loop through
  another star and back safely.
- Latency is one clock.

Registers: one per output `o`, at `BASE + 4*o`. Bit 31 is enable; the low
bits are the input index. Everything is disabled at reset.

In `sic_top` there are two routers:

| | 64-bit router (converter clock) | 256-bit router (host clock) |
|---|---|---|
| Inputs | 0–3 ADC0–3, 4 DSP residual, 5 DSP aligned-ideal debug, 6 DSP scaled-non-ideal debug, 7 unused | 0 capture 0, 1 capture 1 |
| Outputs | 0–3 DAC0–3, 4 DSP ideal, 5 DSP non-ideal, 6 capture 0, 7 capture 1 | 0 host FIFO, 1 `m_ext` |

### `capture_star` and `axis_width_up`

`axis_width_up` packs four 64-bit beats into a 256-bit word, first beat in
the low bits. Words go into a dual-clock buffer of `MAX_SAMPLES/16` words
(2048 × 256 bits by default). The buffer is written in the converter clock
and read out in the host clock.

The capture sequence:

1. Software writes the size and arms the star.
2. The first converter clock with `trigger_in` high starts the capture. The
   beat at the star's input in that clock is stored first. The 64-bit router
   in front adds one clock, so that beat left the ADC one clock before the
   trigger.
3. When `size` samples are stored, read-out starts on its own, at one word
   per clock while `m_tready` is high.

The ADC side is always ready. Beats outside a capture are dropped.

| Offset | Name | Meaning |
|--------|------|---------|
| 0x00 | control | write bit 0 = 1 to arm |
| 0x04 | status | bit 0 armed or capturing; bit 1 captured; bit 2 read out |
| 0x08 | size | samples, clamped to 256..32768 and rounded down to a multiple of 16 |

Re-arming during a read-out overwrites the buffer being read.

### `host_fifo`

A 256 × 256-bit fall-through FIFO between the 256-bit router and the host's
PCIe DMA. When the host stops reading, it fills. After that, the capture
read-out waits.

## Command bus

- **`axil_cmd_mux`** broadcasts the host's AXI4-Lite request to every star
  and ORs the responses together. This only works because every star
  checks the address before raising a ready or valid, and drives zeros
  otherwise. `axil_slave` is the shared front end that does this:
  - each star owns a 256-byte window;
  - writes complete with address and data together;
  - one read and one write may be outstanding;
  - responses are always OKAY;
  - an address no star owns is never answered.
- **`cid_star`** is a read-only table:
  - 0x00 firmware ID;
  - 0x04 number of stars;
  - per global unit number `u`: base address at `0x10+8u`, type and stream
    count at `0x14+8u`.

  Software can then address "offset X of unit u" without knowing the map.
  Units 0–6 are CID 0x0000, router-64 0x0100, router-256 0x0200,
  capture 0 0x0300, capture 1 0x0400, DSP 0x0500 and I2C 0x0600.
- **`i2c_star`** is a byte-level I2C master for the board's configuration
  bus.
  - Register 0x00 takes a command: bit 0 START, bit 1 STOP, bit 2 WRITE,
    bit 3 READ, bit 4 NACK after a read, bits 15:8 the byte to write.
  - Register 0x04 is status: bit 0 busy, bit 1 NACK received, bits 15:8 the
    byte read.
  - Register 0x08 holds the done interrupt; write 1 to clear.
  - SCL runs at `f_aclk / (4*CLK_DIV)`, 100 kHz by default. Clock stretching
    is honoured.

## Clocks and resets

| Clock | Drives | Frequency |
|-------|--------|-----------|
| `aclk` | all registers | 100 MHz |
| `adc_clk` | converter streams, 64-bit router, DSP star, capture input side | 250 MHz |
| `host_clk` | capture read-out, 256-bit router, host FIFO | host rate |

- Register values reach the stream clocks through `cdc_bus`, a toggle
  handshake that moves the whole register set at once.
- Status bits come back through `sync_2ff`.
- Resets are asynchronous and active low, one per clock domain.
- Everything that is read is reset, except the memory arrays of the capture
  buffer and the host FIFO.

## What is outside this RTL, and choices made here

**Outside, brought out as ports:**

- the host star: PCIe, DMA, DDR4, the AXI4-Lite master;
- clock generation;
- the converter-card star: JESD204B link, converter chips, clock chip;
- the trigger source.

The host-to-DAC direction of the host FIFO is part of that host DMA path, and
is not built.

**Choices this RTL makes where the original leaves them open:**

- every register bit layout and the address map;
- the 18-bit signed scaler;
- truncation and saturation;
- `MAX_DELAY` = 1023;
- the one-beat offset of the residual;
- stall behaviour;
- the router's output buffers and its drop-when-unrouted rule;
- capture arming, and read-out starting on its own;
- the whole inside of the I2C master.

**Two points where the original is ambiguous:**

- **Sign of the residual.** One description subtracts the non-ideal from the
  ideal, another the reverse. This RTL computes ideal minus scaled
  non-ideal; the other convention only flips the sign of the output.
- **Cost of 1/32 weighting.** One statement says it costs three more clocks
  than 1/16; the timing report says two (9 against 7). The RTL follows the
  timing report.

The DSP star's "start/stop/idle" control is reduced to one `run` bit.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`.

| Testbench | What it checks |
|-----------|----------------|
| `tb_sic_top` | The whole design at default sizes, through the full flow described above: ID read, I2C command, trigger-aligned 8192-sample captures (holding the host side off until the FIFO is full), coefficient estimation, cancellation ≥ 55 dB under DAC back-pressure. It also counts that each mechanism occurred. |
| `tb_dsp_star` | Every residual and debug sample against a model, for four settings including the maximum shift, with back-pressure and input gaps; the 9-clock latency; register read-back. |
| `tb_dsp_workloads` | The DSP star at default sizes on the 50 MHz single-tone and two-tone cases, plus a second star built for 1/16 weighting. Coefficients are searched in the testbench. Cancellation (≥ 50 dB) and the level of the second tone are measured by single-bin DFT. Latency is checked at 9 and 7 clocks. |
| `tb_dsp_scaler`, `tb_dsp_delay_line`, `tb_dsp_weighting` | The datapath pieces. Weighting is checked at both 1/32 and 1/16, with their stage counts. |
| `tb_axis_router`, `tb_axis_width_up`, `tb_host_fifo`, `tb_capture_star`, `tb_axil_cmd_mux`, `tb_cid_star`, `tb_i2c_star` | The fabric and control stars. The I2C test uses a behavioural slave on an open-drain bus. |

`tb/axil_bfm.sv` is the AXI4-Lite driver the testbenches share.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sic_pkg.sv tb/tb_sic_top.sv --top-module tb_sic_top -o sim
./obj_dir/sim
```

Replace `tb_sic_top` with any testbench name. All of them finish in well
under a second of wall time. The top-level test prints the coefficients it
estimated and the cancellation it measured.

## Changing it

| Parameter | Where | Effect |
|-----------|-------|--------|
| `FRAC` | `sic_top`, `dsp_star` | 5 gives 1/32-sample weighting and 9-clock latency; 4 gives 1/16 and 7 clocks. The weight register then runs 0..16. |
| `MAX_DELAY` | `sic_top`, `dsp_star` | Longest shift index. It sizes the shift register and its beat mux. |
| `MAX_SAMPLES` | `sic_top`, `capture_star` | Capture buffer size, in samples. |
| `N_IN`, `N_OUT`, `DW` | `axis_router` | Router size. |
| `I2C_DIV` | `sic_top` | SCL rate. |

Star base addresses and the star type codes live in `rtl/sic_pkg.sv`.
