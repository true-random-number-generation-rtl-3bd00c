# SiRF PUF-TRNG: a true random number generator built on path-delay measurement

A physical unclonable function (PUF) and a true random number generator
(TRNG) both have to produce bits that look random. This design reuses the
Shift-register Reconvergent-Fanout (SiRF) PUF as a TRNG. The PUF's entropy
source is an engineered logic network. The delay of each path through it
has a fixed part, set by process variation on each device, and a part that
is measurement noise. A carry-chain time-to-digital converter (TDC)
measures those delays in steps of about 18 ps. The PUF's post-processing
then pairs the delays into differences and calibrates the differences
against global shifts, such as temperature and supply voltage. The TRNG
emits the least significant bit of each calibrated difference. That bit
mixes device-specific delay with noise. The calibration means an attacker
who heats, cools or under-volts the chip cannot bias the output.

One request returns 5120 random bytes, as 20 blocks of 256 bytes.

## Data path at a glance

```
host ──GPIO In──► 64-bit LFSR ─► vector gen ─► 32 launch FFs ─► logic network ─► path MUX
                     ▲                                                             │
                     │ reseed                                                      ▼
                seed distiller ◄─┐                                        carry chain (128 taps)
                                 │                                                 │
 host ◄─GPIO Out◄─ BitGen ◄─ GPEV ◄─ DVD ◄─ BRAM (4096 DV) ◄─ Timing Engine ◄─ TDC FFs + decoder
                                    ▲                         │
                                    └── nonce (42 bytes) ◄────┘ nonce distiller
                  Master Control sequences all of it
```

| File | Block |
|---|---|
| `rtl/sirf_trng_top.sv` | top: all blocks wired together |
| `rtl/sirf_pkg.sv` | shared sizes and types |
| `rtl/gpio_in.sv`, `rtl/gpio_out.sv` | host registers |
| `rtl/lfsr64.sv`, `rtl/vector_gen.sv` | random challenges (2-vector launch sequences) |
| `rtl/launch_ffs.sv`, `rtl/path_mux.sv` | launch flip-flops, output selection |
| `rtl/sirf_network.sv` | **behavioural model** of the logic network |
| `rtl/carry_chain.sv` | **behavioural model** of the TDC delay line |
| `rtl/tdc.sv` | thermometer flip-flops and decoder |
| `rtl/timing_engine.sv` | launch/capture sequencing, delay value (DV) |
| `rtl/xor_distiller.sv` | 12:1 XOR distillation (seed and nonce) |
| `rtl/dv_bram.sv` | 4096-entry delay-value memory |
| `rtl/dvd_module.sv`, `rtl/gpev_cal.sv`, `rtl/bitgen.sv` | post-processing |
| `rtl/master_control.sv` | flow controller |

## One request, step by step

1. **Host seed.** The host writes a 64-bit seed and raises `start`. While
   `start` is high, the LFSR loads the host seed. The flow begins on the
   falling edge of `start`. The seed is not secret: it only picks the first
   challenges, and a fixed value works.
2. **Seed run.** The Timing Engine measures 64 × 12 = 768 paths. Each bit of
   a new 64-bit seed is the XOR of the LSBs of 12 consecutive delay values.
   That seed is loaded into the LFSR. From here on, the challenges depend
   on measured delays, not on the host.
3. **Nonce run.** The Timing Engine measures 4096 paths. Every DV goes into
   the block RAM. The first 336 × 12 = 4032 DVs are also distilled into a
   42-byte (336-bit) nonce.
4. **Iterations.** There are 20 iterations. Iteration *i* takes the 32-bit
   chunk `nonce[16*i +: 32]`. The chunks overlap by 16 bits, and 20 of
   them cover the 336 nonce bits exactly. Bits [10:0] and [21:11] seed the
   two pairing LFSRs. Bits [31:22] set the GPEV mapping. The 4096 stored
   DVs are paired into 2048 differences (DVD), calibrated (DVD_c), and
   their LSBs become 256 bytes.
5. The host reads the 20 × 256 = 5120 bytes from GPIO Out.

## Measuring a path delay (Timing Engine, TDC)

This is the least obvious part of the design. A path delay is several
nanoseconds long, but the TDC covers only 128 × 18 ps ≈ 2.3 ns. The Timing
Engine therefore repeats the same launch-capture test, moving the capture
clock later, until the signal edge lands inside the carry chain:

```
clk (launch)   ─┐_____┌─────┐_____┌──      launch: launch FFs switch V1 → V2
cap_en          ______┌───────────┐____    armed for exactly the launch cycle
capture_clk     clk delayed by 500 ps + phase × 56 × 18 ps
path edge       ──────────────/ arrives after the path delay, then runs down the chain
```

For each vector pair:

- Load V1, wait 2 cycles, and record the settled path level (`old_level`).
- Launch V2. The TDC flip-flops capture the 128 taps once, on the capture
  edge in that cycle. The decoder counts the taps that differ from
  `old_level`, so rising and falling edges are handled alike.
- 3 cycles after the launch, decide:
  - The path level did not change: this pair does not excite the path.
    Ask for a new pair.
  - count = 0: the edge was not there yet. Set `phase = phase + 1` and
    repeat the test, up to phase 19.
  - 0 < count < 128: valid. `DV = phase × 56 + (128 − count)`. That is the
    arrival time in tap units, plus a constant.
  - count = 128: the edge ran past the chain. Drop the pair.

A step of 56 taps is shorter than the 128-tap chain, so every arrival time
inside the phase range falls into the chain at one phase. The capture clock
comes from outside the top (`capture_clk` input, with `phase` as output). On
an FPGA this is a phase-shifted output of a clock manager. The testbench
models it as a transport delay of `clk`. With a 20 ns clock, the largest
capture offset (19 × 1008 + 500 ps) still falls inside the launch cycle.

## Post-processing

**DVD.** Two 11-bit LFSRs (x^11 + x^9 + 1) give indices *a* and *b*.
Pair *k* computes `DV[a_k] − DV[2048 + b_k]`. The last pair uses index 0
on both sides, because a maximal 11-bit LFSR never visits 0. So in every
iteration each of the 4096 DVs is used exactly once. The nonce chunk
changes the seeds, and with them the pairing.

**GPEV calibration.** This runs in two passes over the same 2048 DVD.

- The first pass accumulates the sum, the minimum and the maximum.
- The second pass maps each DVD to a reference distribution:

  ```
  mean  = floor(sum / 2048)        range = max − min (at least 1)
  Rref  = 64 + 4·ctrl[4:0]         Mref  = signed ctrl[9:5]
  DVD_c = trunc((DVD − mean) · Rref · 16 / range) + Mref · 16
  ```

A shift or scale that affects all delays at once, such as temperature or
supply voltage, changes `mean` and `range` in the same way as the DVDs, so
it cancels. DVD_c has 4 fraction bits. The divider is a restoring divider
that produces one quotient bit per clock.

**BitGen** takes `DVD_c[0]`. It packs 8 bits per byte, first bit in bit 0,
and hands each byte to GPIO Out. GPIO Out holds one byte until the host
acknowledges it. Until then BitGen, and through it GPEV and DVD, stall.

## Host interface

| Signal | Use |
|---|---|
| `ps_wr`, `ps_addr[1:0]`, `ps_wdata[31:0]` | word 0: seed[31:0]; word 1: seed[63:32]; word 2 bit 0: `start` |
| `ps_out_data[7:0]`, `ps_out_valid`, `ps_out_ack` | next random byte; pulse `ps_out_ack` for one clock to take it |
| `busy`, `done` | request running; pulse after the last byte left BitGen |
| `chlng[63:0]` | network configuration. In TRNG mode it is held constant |
| `capture_clk`, `phase[4:0]` | phase-shifted capture clock, and the requested phase step |

Sequence: write `start=1`, write both seed words, write `start=0`, then
read 5120 bytes.

## What is modelled, not designed

- `sirf_network.sv` stands in for the shift-register LUT rows and the
  reconvergent-fanout gate network, whose netlist is not published.
  - Output *j* is the parity of a challenge-selected subset of the 32
    launch inputs.
  - Its delay after a launch is a hash of (`CHIP_ID`, `chlng`, *j*, the
    toggled inputs), spread over 1.5 to 9.5 ns. This is the fixed,
    per-device part.
  - On top of that comes uniform jitter of ±`NOISE_PS` (12 ps), the noise.

  Change `CHIP_ID` to emulate another device.
- `carry_chain.sv` is the FPGA carry primitive: 128 buffers of 18 ps each.
- Both are behavioural models with `#` delays. They simulate, and pass
  Verilator lint and slang, but they do not synthesize. On an FPGA they are
  replaced by the real netlist and by CARRY4 cells. Everything else is
  synthesizable RTL.

## Choices this implementation makes

The overall flow and its sizes come from the SiRF TRNG description:

- 32 launch flip-flops and a 128-tap TDC at about 18 ps per tap.
- 12:1 XOR distillation, a 64-bit seed, 4096 paths and a 42-byte nonce.
- Two 11-bit pairing LFSRs and 10 GPEV control bits.
- 256 bytes per iteration and 20 iterations.

The following are this design's own choices:

- **Capture search.** The Timing Engine's phase search, the step size (56
  taps), the skip rules and the DV formula. The source says only that
  launch-capture tests repeat until the TDC holds a valid code.
- **Polynomials.** The LFSR polynomials. The 64-bit LFSR steps 64 bits at
  a time, so consecutive vector pairs share no bits.
- **Vectors.** V1/V2 are the low and high halves of the LFSR state. The
  MUX output is chosen by a counter, for uniform use of the outputs. The
  network has 32 outputs.
- **Pairing and chunks.** The pairing rule (first half against second
  half, index 0 last). The chunk stride of 16 bits and the field layout of
  a chunk.
- **GPEV.** The statistics used (mean and max−min range), the mapping of
  the control bits and the fixed-point format. The source calls it a
  distribution-based compensation and leaves the rest open. Which bit
  counts as "low-order" depends on that format. Here it is the lowest of 4
  fraction bits.
- **Registers and sizes.** The register map, the GPIO handshakes, the
  16-bit DV width and the 50 MHz clock assumed by the testbench.
- **Rise/fall.** The architecture shows a "rise/fall ctrl" input on the
  network. Here the edge direction follows from V1 → V2 and is reported as
  `rise` by the Timing Engine.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/sirf_pkg.sv tb/tb_sirf_trng_top.sv --top-module tb_sirf_trng_top -o sim
obj_dir/sim
```

All files carry `` `timescale 1ps/1ps ``, because the models' delays are in
picoseconds.

`tb_sirf_trng_top` runs one complete request at the default parameters. It
takes about 1.9 M clock cycles, roughly a minute of simulation. The
testbench plays the host and the phase shifter, and records every DV the
Timing Engine produces. From those DVs it recomputes, with its own code,
the distilled seed, the nonce, the pairings, the calibration and all 5120
output bytes, and compares them byte by byte. It also checks:

- that phase retries, skipped vector pairs, rising and falling edges, the
  reseed, 20 statistics and 20 calibration passes, and a GPIO Out stall
  all occur;
- the share of ones, which must be within 45 to 55 %. About 49.5 % was
  observed;
- the output rate, which must be at least the 30 KB/s reported for the
  FPGA implementation. It simulates at about 134 KB/s at 50 MHz with the
  delay model.

Two more testbenches run whole requests through `tb/trng_host_model.sv`.
That helper plays the host and the phase shifter for one device and keeps
every byte it reads:

- `tb_trng_repeat`: one device serves two requests with the same host seed.
  A TRNG must not repeat itself. The two 5120-byte outputs must differ in
  40 to 60 % of their bits. About 49.8 % was observed. It takes about 1.5
  minutes.
- `tb_trng_devices`: two instances with different `CHIP_ID` serve one
  request each, with the same seed and the same `chlng`. Their outputs must
  differ in 40 to 60 % of their bits. About 50.0 % was observed. Each output
  must hold 45 to 55 % ones. It takes about 2.5 minutes.

A real evaluation needs more: long sequences (1 Mbit per device) through a
statistical test suite, and the Hamming distance over many physical
devices. Those results depend on the silicon. The delay model cannot stand
in for it.

## Not included

- **Host software and clock manager.** The program that supplies the seed
  and collects the bytes, and the clock manager that makes `capture_clk`,
  are outside the RTL. The testbenches play both roles.
- **Storage module.** The architecture shows a "Storage module" beside the
  master controller, but its function is not described, so it is left out.
- **PUF mode.** The architecture is shared with a PUF that regenerates
  fixed bitstrings. A mode switch turns off the PUF-only functions in TRNG
  mode. Those functions are challenge transfer, repeated sampling of each
  path, and the reliability processing for bitstring regeneration. Their
  workings are not specified, so only TRNG mode is built and there is no
  mode input.
- **Temperature and voltage.** The delay model has no such inputs. The
  GPEV testbench checks instead that a global shift and scale of all DVDs
  (DVD·2 + 37) moves at least 2000 of the 2048 DVD_c values by no more
  than one integer step (16 in DVD_c units). The low-order bit does change,
  because it carries the rounding noise.
