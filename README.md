# MMCM-based coherent-sampling TRNG for Xilinx 7-series FPGAs

This is a true random number generator (TRNG) that needs almost no logic. Its
entropy comes from the clock managers of the FPGA. Two mixed-mode clock managers
(MMCMs) make two clocks, Clk_A and Clk_B, from the same 100 MHz board clock. Their
frequencies differ very slightly. A single flip-flop samples Clk_A on every rising
edge of Clk_B, and a counter adds up the '1's it sees over a fixed number of samples.
The MMCMs add jitter to both clocks. That jitter makes the count uncertain, and the
count's least significant bit is the random bit. The bits are packed into bytes and
sent out over a UART. An AXI-Lite port lets software change the window length and
the output format at run time.

The design follows the paper "An MMCM-based high-speed true random number generator
for Xilinx FPGA". The block structure, the counting method, the parameter-selection
rules and the parameter sets are the paper's. The clock-domain crossing, the byte
formats, the register map, the UART framing and the MMCM simulation model are this
design's own choices. Each is marked below and in the file headers.

## Why counting '1's gives random bits

Take two clocks with f_A : f_B = (N+1) : N. Each Clk_B edge lands 1/N of a Clk_A
period later in Clk_A's cycle than the edge before it. After N samples the sampling
point has swept exactly one Clk_A period. With a 50 % duty cycle, about N/2 of the
samples are '1'. Without jitter the count would be the same in every window. In real
hardware, the samples taken near a Clk_A edge are decided by jitter and by
metastability, so the count scatters around N/2. The spread grows with
jitter / (t_A/N). The parity of the count (its LSB) is the output bit.

The count is the sum of '1's over a fixed window of N samples. The earlier
DCM-based design counted runs of consecutive '1's instead. When samples near an edge
flip back and forth, that method produces very short, low-entropy runs, which the sum
avoids.

### The window length is N/K, not N

The paper's main configuration is the combined method (CB). In CB, Clk_A is
multiplied by an integer K, so f_A : f_B = K(N+1) : N. Every Clk_B sample now advances
K/N of a Clk_A period, and one whole Clk_A period is swept in only N/K samples. Each
window of N/K samples is an independent count of the same waveform. This makes the
bit rate K times higher with the same spread. The hardware knows nothing about K.
Its only parameter is the window length, called N in the registers and in the code.
It is the denominator of the reduced ratio f_A/f_B:

    f_A / f_B = K + 1/WINDOW,   f = 100 MHz * M / (D * Q)

The default set, E10 in the CB method, works out as follows:

| | M | D | Q | frequency |
|---|---|---|---|---|
| Clk_A | 62 | 8 | 1 | 775 MHz |
| Clk_B | 60 | 8 | 7.75 | 96.774 MHz |

The ratio is 961/120 = 8 + 1/120. So K = 8 and the window is 120 samples. One bit
comes out every 120 Clk_B periods: 1.24 µs, or 0.806 Mbit/s. The paper reports
0.808 Mbit/s for this set.

## Choosing MMCM settings

An MMCM gives f_OUT = M/(D·Q) · f_IN. D is an integer. M and Q go in steps of 1/8.
With a 100 MHz input, an Artix-7 of speed grade -1 allows:

- 1 ≤ D ≤ 106, 2 ≤ M ≤ 64, 1 ≤ Q ≤ 128;
- PFD frequency 10–450 MHz;
- VCO frequency 600–1200 MHz;
- output frequency 4.68–800 MHz.

The paper derives its settings in three steps:

1. **NM (normal).** Take a frequency pair with ratio (N+1):N. The ported sets have
   D = 1, and Q does the dividing.
2. **JT (jittery).** Multiply M and D by the same integer, as large as possible
   (D_max = ⌊64/M⌋). The frequency stays the same, but the large divider settings
   roughly triple the MMCM's jitter. The vendor tool reports about 142 ps
   peak-to-peak for D = 1 and 427 ps for D = 8. This gives a wider spread of counts.
3. **CB (combined).** On top of JT, divide Q_A by K. The full search sets Q_A = 1
   (K equal to the old integer Q_A) and keeps 6 ≤ M ≤ 8, so D lands on 8, 9 or 10.
   The paper sorts the 319 sets it found (150 ≤ N ≤ 1000) into groups A–E by N.

The paper reports these results. About 38 % of the sets in groups B and C pass AIS-31
Procedure B. Those passing sets average 2.44 Mbit/s. That rate is why the UART here
defaults to 6 Mbit/s: 8N1 at 3 Mbit/s carries only 2.4 Mbit/s of payload.

To use another set, convert M and Q to eighths (M8 = 8·M, Q8 = 8·Q) and compute the
window from the ratio above. Then set `M8_A, D_A, Q8_A, M8_B, D_B, Q8_B` and
`N_DEFAULT` on `mmcm_trng_system`. The MMCM model refuses, at elaboration, any
setting outside the limits above.

## Block structure

```
            +-----------+ Clk_A  +-------------------- trng_module ---------------------+
clk_in -+-->| MMCM A    |------->| coherent_sampling --CNT,OE--> data_packer --OUT--> uart_tx --> txd
        |   +-----------+ Clk_B  |        ^ N                        ^ Pack_EN              |
        +-->| MMCM B    |------->|        +------ trng_axi_regs -----+   <-- AXI-Lite        |
        |   +-----------+        +------------------------------------------------------+
        +--> system clock of all TRNG blocks (reset held until both MMCMs lock)
```

| file | block |
|---|---|
| `rtl/trng_pkg.sv` | widths (10-bit counts), MMCM limits, register offsets |
| `rtl/mmcm_model.sv` | behavioural MMCM (simulation only) |
| `rtl/coherent_sampling.sv` | sampling flip-flop, window counter, hand-over to `clk` |
| `rtl/data_packer.sv` | 8 LSBs → 1 byte, or whole counts as 2 bytes; 2-byte buffer |
| `rtl/uart_tx.sv` | 8N1 transmitter with fractional baud divider |
| `rtl/trng_axi_regs.sv` | AXI4-Lite registers N and PACK_EN |
| `rtl/trng_module.sv` | the TRNG core: the four blocks above |
| `rtl/mmcm_trng_system.sv` | top: two MMCMs + TRNG core |
| `rtl/reset_sync.sv` | reset synchronizer (asynchronous assert, synchronous release) |

Without any AXI writes, the registers keep their reset values (`N_DEFAULT`,
`PACK_EN_DEFAULT`). The top then behaves like the paper's evaluation system, where
these were build-time constants. With a processor attached, it is the TRNG module of
the paper's run-time-reconfigurable prototype.

## Clock domains and the count hand-over

This is the part that needs the most care. Three clocks meet in `coherent_sampling`:

- **Clk_A** is only ever *data*. It drives the D input of the sampling flip-flop.
  That flip-flop is the entropy source. It is meant to go metastable now and then,
  and nothing else may sample Clk_A. On an FPGA, keep it as a single flip-flop fed
  directly by the clock net, and exclude that path from timing analysis.
- **Clk_B** clocks the sampling flip-flop and the counters. These are the sample
  index, the '1' counter, the window length in use, and the holding register for a
  finished count. At the last sample of a window, the count (including that last
  sample) moves to the holding register and a toggle flag flips.
- **clk** (the 100 MHz board clock) passes the toggle through two flip-flops and an
  edge detector. On each change, `cnt` takes the held count and `oe` pulses for one
  cycle, 3–4 cycles after the window closed. The held count does not change again
  for a whole window, so it is stable when it is read.

The hand-over needs a window of at least a few `clk` cycles. Windows shorter than 8
samples are raised to 8 (`trng_pkg::N_MIN`). This assumes Clk_B is no faster than
`clk`; the paper's sets use 50–100 MHz. A new N written by software is copied into
the Clk_B domain through two flip-flops. It takes effect at the next window start,
so no window is ever a mix of two lengths. N changes only when software writes it,
so briefly mixed bits in the copy do not matter.

## Output stream

- **Packed (`PACK_EN = 1`, default).** Eight consecutive LSBs form one byte. The
  first bit goes in bit 0, so an LSB-first UART sends the bits in the order they were
  generated.
- **Raw (`PACK_EN = 0`).** Each count is sent as two bytes, low byte first, then
  bits 9:8 zero-extended. This mode is for inspecting the distribution of counts.
- **Overrun.** The packer holds at most two bytes. A packed byte that finds no room,
  or a raw count that finds the buffer not empty, is dropped whole and `overrun`
  pulses. The generator never stalls. Dropping whole values does not bias the output
  stream. Raw mode easily outruns the line: 2 bytes per count at 6 Mbit/s is
  300 k counts/s, against 806 k counts/s for E10. Packed mode at 6 Mbit/s keeps up
  with any of the paper's sets.
- **UART.** 8N1, LSB first, idles high. 100 MHz / 6 Mbit/s is not an integer. A
  phase accumulator makes bits 16 or 17 cycles long with an exact average. Frames
  can follow each other with no gap.

## Software interface (AXI4-Lite, 4-bit address)

| offset | name | bits | reset |
|---|---|---|---|
| 0x0 | N | 9:0, samples per count (the window) | `N_DEFAULT` (120) |
| 0x4 | PACK_EN | 0 | `PACK_EN_DEFAULT` (1) |

Other offsets read as zero and answer SLVERR. Byte strobes apply per lane. A write
is accepted when AW and W are both valid. The response follows one cycle later.
Assertions check that B and R responses stay valid until they are taken.

Changing the MMCM settings at run time is not part of this RTL. In the paper's
prototype, a separate clock-reconfiguration IP core per MMCM did that. After
reconfiguring, software writes the matching window to N.

## The MMCM model

`mmcm_model` is for simulation only. It does not model the PLL loop. Output edge k
is placed at k·D·Q/(2M) input periods, counted from time zero, in femtoseconds. This
keeps the exact rational ratio between two instances, which coherent sampling
depends on. Each edge is then moved by an independent, uniformly distributed offset
whose full width is `JITTER_PP_PS`. LOCKED rises 64 input cycles after reset. On an
FPGA, replace it with MMCME2 primitives that have the same M, D and Q.

The jitter model is coarse. It gives count spreads of a few units, similar to what
the paper plots for the reconfigurable sets. It does not reproduce effects seen in
hardware: counts frozen on one value for some ported sets, or even counts being more
common than odd ones. The simulated counts show the mechanism and the data path
working. They say nothing about the entropy of a real device.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=… failures=…`. Each
module's testbench reads only the files it needs. A run with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mmcm_trng_system \
    -y rtl -y tb +libext+.sv -Irtl rtl/trng_pkg.sv tb/tb_mmcm_trng_system.sv
./obj_dir/Vtb_mmcm_trng_system
```

| testbench | what it shows |
|---|---|
| `tb_mmcm_model` | lock timing; exactly 7688 Clk_A periods in 960 Clk_B periods for E10; jitter within ±213.5 ps; average frequency |
| `tb_coherent_sampling` | with jitter-free clocks at 2·41:40, windows of 20 and 40 always count 10 and 20; windows of 10 come in pairs summing to 10; rate is n·T_B per count; run-time N change; minimum window |
| `tb_data_packer` | byte stream against a reference model, random stalls, overruns in both modes, mode switches |
| `tb_uart_tx` | decoded bytes, framing, 64 back-to-back frames in 10667 cycles at 6 Mbit/s |
| `tb_trng_axi_regs` | reset values, write/read-back, byte strobes, SLVERR |
| `tb_trng_module` | core with jittered testbench clocks: UART output equals the packed or raw counts; overruns in raw mode |
| `tb_mmcm_trng_system` | whole design at default parameters: lock, mean count 60, 100 counts in 12400 cycles (0.806 Mbit/s), N and PACK_EN changed over AXI, overruns, lossless raw mode at N = 480 |
| `tb_parameter_sets` | 21 of the paper's sets side by side: J01/J22/J23 (NM, JT), J01/J02/J21/J23 (CB), A01–A03, E63–E65, E10, and the integer sets D17, E25, E31, E57, E58, D63. Each set's counts average N/2, and each set's rate is exactly N·T_B per count |

All of these pass. The full-size test runs in well under a second, and the
parameter-set test in about 10 s.

## Where this differs from the paper, and what is missing

- **Size.** The paper's sampler and packer take 17 LUTs and 18 flip-flops (with N
  fixed at build time). Here they are larger. The reasons are the run-time N register
  and its copy into the Clk_B domain, the hand-over registers, the full 10-bit count
  kept for raw mode, and the two-byte output buffer.
- **MMCMs.** These are a simulation model. There is no dynamic reconfiguration port
  and no power-down mode.
- **Not included.**
  - The processor and the AXI interconnect (vendor IP). The AXI-Lite port is the
    top's boundary.
  - The clock-reconfiguration IP.
  - The debug features of the paper's UART.
  - The LFSR whitening used for the NIST tests, which the paper applied in software.
  - The ROM of precomputed MMCM settings, which the paper proposes only as future
    work.
- **Choices the paper leaves open.** The clock-domain crossing, the minimum window,
  the raw-count byte format, the drop-on-overrun policy, the register map, 8N1
  framing, the 6 Mbit/s default, and the lock-gated reset are this design's own.
