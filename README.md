# PLL-jitter true random number generator

This is a true random number generator (TRNG) for FPGA-based cryptographic
systems. It gets its randomness from the analog jitter of a clock made by the
FPGA's own PLL. It needs no ring oscillators and no deliberate metastability.
The idea is to sample one clock with another clock that is *rationally
related* to it:

* The system clock `CLK` drives an on-chip PLL.
* The PLL makes a second clock, `CLJ`, at exactly `K_M/K_D = 139/133` times
  the `CLK` frequency: 51.2 MHz from 48.99 MHz.
* A flip-flop clocked by `CLK` samples `CLJ`.

Because the ratio is exact, the sampling point steps through the `CLJ`
period by a fixed amount each cycle. After `K_D = 133` cycles it has visited
133 evenly spaced points of that period, and the pattern starts over. Most
samples land far from a `CLJ` edge and are fully predictable. A sample that
lands within a few picoseconds of an edge is decided by the PLL's jitter.
XORing all 133 samples of one window cancels the predictable part, because it
is the same in every window. What is left is one random bit per window.

The digital part is small: a sampler, an XOR decimator, a serial/parallel
converter, a data register and a status register. A control unit and an
Avalon bus slave port let a soft processor read 32-bit random words.

## Block structure

```
                 +------------------------------- trng_top ------------------------------+
 clk (CLK) ---+--|----------------------------------------------------------+            |
              |  |                                                           |            |
              +--|-> pll_model --CLJ--> delay_line --clj_taps--+             |            |
                 |   (139/(19*7),        (optional            |             |            |
                 |    16 ps jitter)       extra taps)          v             v            |
                 |   +------------------------ datapath_unit -------------------------+   |
                 |   | xor_corrector -> xor_decimator -> sp_converter -> data_register |   |
                 |   |  (N flip-flops,   (XOR of K_D      (32 bits,    (loaded by En)  |   |
                 |   |   XORed)           samples)         Ready)                      |   |
                 |   |                                  status_register  avalon_slave -|---|--> Avalon
                 |   +-----------------------------------------------------------------+   |     slave
                 |            Ready |            ^ En, run, set/clear VALID                  |
                 |                  v            |                                          |
                 |                    control_unit                                          |
                 +-------------------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `trng_top` | The whole generator: PLL, delay elements, datapath and control unit |
| `pll_model` | Behavioural analog PLL: `F_OUT = F_IN*M/(N*K)`, phase-locked, Gaussian edge jitter |
| `delay_line` | Behavioural delay elements that feed the optional extra samplers |
| `xor_corrector` | `N_SAMPLERS` flip-flops on `CLK` sample `CLJ` and its delayed copies; their outputs are XORed |
| `xor_decimator` | XORs `K_D` consecutive samples into one bit |
| `sp_converter` | Packs bits into a 32-bit word, raises `ready`, and stalls while full |
| `data_register` | Holds the word for the bus master; loaded on `en` |
| `status_register` | `VALID` and `ENABLE` bits |
| `avalon_slave` | Address decode, `readdata` multiplexer, read and write strobes |
| `control_unit` | IDLE/WAIT/LOAD/HOLD state machine |
| `trng_pkg` | Register map, bus widths, control-unit state type |

All digital logic runs on `CLK`. `CLJ` is used only as data.

## Where the randomness comes from, and when it does not

This is the part of the design that needs the most care.

**The sampling grid.** Let `T_J` be the `CLJ` period (19.53 ns). Over one
window, the 133 samples fall on a grid of step `T_J/133 = 146.8 ps` across
`T_J`. The window length is odd, so the falling edge of `CLJ` lies half a
grid step away from the rising edge. One of the two edges is therefore always
within a quarter step (36.7 ps) of a sample.

**The jitter zone.** With 16 ps RMS jitter, a sample decides randomly only if
it lies within about one or two sigma of an edge. Which samples do that
depends on the *static phase* between `CLJ` and `CLK`. A real PLL fixes this
phase by its own offsets and the board; it is not under the designer's
control. The simulation model exposes it as `PHASE_FS`:

| PLL phase against the grid | Nearest sample to an edge | Output of one sampler |
|---|---|---|
| 0 (default) | 0 ps from the rising edge | about one fair coin per window: balanced bits |
| quarter step, 36.7 ps | 36.7 ps = 2.3 sigma from both edges | almost constant (6 ones in 400 bits in simulation) |

**The XOR corrector.** Extra samplers `D2..DN` see `CLJ` through delay
elements. They sample points between the grid points, so some sampler always
lands near an edge. With four samplers spaced a quarter step (36.7 ps) apart,
the worst phase gives balanced output again (202 ones in 400 bits in
simulation). The basic configuration uses a single sampler. The extra
samplers are an option (`N_SAMPLERS`, `DELTA_FS`) for a PLL whose phase turns
out to be unfavourable.

**Without jitter** every window holds the same 133 samples, so every output
bit is equal. The testbenches use this as an exact check of the datapath.

The randomness in simulation is only as good as the jitter model. A real
device has to be checked by measurement, for example with a statistical test
suite on captured bits. Nothing in this RTL can establish that.

## Clocks and numbers

| Quantity | Value | Origin |
|---|---|---|
| `CLJ` (PLL output) | 51.2 MHz | generator spec |
| Ratio `K_M/K_D` | 139/133 | enhanced-PLL configuration of the generator |
| Jitter, RMS | 16 ps | measured for that PLL configuration |
| `CLK` (system clock, PLL input) | 51.2 MHz * 133/139 = 48.99 MHz | derived |
| PLL dividers `M`, `N`, `K` | 139, 19, 7 | own choice (`N*K = 133`); VCO = 358 MHz, inside the PLL's 300-800 MHz range |
| Decimation `K_D` | 133 | = `N*K` |
| Raw bit rate | 48.99 MHz / 133 = 368 kbit/s | derived |
| Word period | 32 * 133 = 4256 `CLK` cycles (86.9 us) | derived |

The generator is specified to deliver up to 32 kbit/s. The built datapath
produces about 11 times that. The delivered rate is set by how fast the
processor and its serial link take the words away.

## Register interface

This is an Avalon-style slave with zero wait states. `readdata` is
combinational and valid in the cycle in which `chipselect` and `read` are
high. A read or write takes effect at the `CLK` edge that ends that cycle.

| Word address | Register | Bits |
|---|---|---|
| 0 | DATA (read-only) | the last complete 32-bit random word, first generated bit in bit 31; reading it clears VALID |
| 1 | STATUS | bit 0 `VALID` (read-only): a word is waiting in DATA; bit 1 `ENABLE` (read/write, reset 1): the generator runs |

Typical driver loop: poll STATUS until `VALID` is 1, then read DATA. Writing
0 to STATUS stops the generator. The decimator and the converter are then
held empty, and a word already in DATA stays readable.

## Control and flow

`control_unit` has four states:

* **IDLE**: `ENABLE` is 0.
* **WAIT**: collect bits until the converter raises `ready`.
* **LOAD**: one cycle. `en` copies the word into DATA, empties the converter
  and sets `VALID`.
* **HOLD**: wait until the master reads DATA.

While the master is slow, the converter fills up and then stalls. Further
bits are dropped, which costs nothing but time. An unread word is never
overwritten. A read in HOLD returns to WAIT. If a complete word is already
waiting, it is loaded two cycles after the read. If the master reads within
one word period, words are loaded exactly 4256 cycles apart.

Reset is asynchronous and active-low (`rst_n`). After reset, `ENABLE` is 1 and
`VALID` is 0.

## Behavioural models

`pll_model` and `delay_line` use delays and `$urandom`, so they are for
simulation only. On an FPGA they are replaced as follows:

* The PLL becomes the vendor's PLL primitive, set to `m = 139, n = 19, k = 7`.
* The delay elements become hand-placed logic cells or routing.

How `pll_model` works:

* It measures the input period.
* On every 133rd input edge it re-anchors, so that exactly 139 output
  periods fall between anchors: the clocks stay exactly rational.
* It moves every edge by an independent Gaussian offset. The offset is clipped
  to a quarter period, and the error does not accumulate.
* Its output starts one anchor interval after lock.

Everything else is synthesizable.

## Parameters of `trng_top`

| Parameter | Default | Meaning |
|---|---|---|
| `PLL_M`, `PLL_N`, `PLL_K` | 139, 19, 7 | PLL dividers; `K_D = PLL_N*PLL_K` |
| `JITTER_FS` | 16000 | RMS jitter of the PLL model, fs |
| `PHASE_FS` | 0 | static phase of `CLJ` against the sampling grid, fs |
| `N_SAMPLERS` | 1 | number of sampling flip-flops in the XOR corrector |
| `DELTA_FS` | 50000 | delay per delay element, fs (36711 is a quarter grid step) |

The other PLL configuration that was measured, a fast PLL at ratio 12/7 with
10 ps jitter, maps to `PLL_M = 12, PLL_N = 1, PLL_K = 7` and
`JITTER_FS = 10000`. `CLJ` then runs at 84 MHz and the raw rate is one bit
every 7 cycles. `tb_trng_top_fpll` runs this configuration.

## Simulation

Every file sets its own `timescale`. Each testbench is self-checking and ends
with a `TB_RESULT checks=N failures=M` line. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/trng_pkg.sv tb/tb_trng_top.sv --top-module tb_trng_top -Mdir obj_top
./obj_top/Vtb_trng_top
```

| Testbench | What it shows |
|---|---|
| `tb_trng_top` | Default parameters, end to end. It checks that every word read matches a reference converter running on the raw bit stream, that prompt reads see a load every 4256 cycles, that `VALID` is set and cleared, the converter stall and the load two cycles after a read, the disable/enable switch, and that the bits are balanced (0.35-0.65 ones). Runs in seconds. |
| `tb_trng_top_corrector` | Worst PLL phase: one sampler gives near-constant bits, four samplers give balanced bits, and without jitter the output is constant |
| `tb_trng_top_fpll` | The 12/7 fast-PLL configuration: a bit every 7 cycles, a word every 224, and every word read matches its reference; the bits are balanced |
| `tb_datapath_unit` | Exact bit-by-bit and word-by-word comparison against a software sampler and decimator on a jitter-free `CLJ`, plus status and ENABLE over the bus |
| `tb_pll_model` | Edge grid exact to 1 fs without jitter; RMS jitter within 25 % of 16 ps; lock |
| `tb_delay_line`, `tb_xor_corrector`, `tb_xor_decimator`, `tb_sp_converter`, `tb_data_register`, `tb_status_register`, `tb_avalon_slave`, `tb_control_unit` | Unit checks against reference models, random stimulus |

Verilator has two-state simulation. Every register has a reset.

## Design choices beyond the generator's description

These parts are this implementation's own, not given by the generator's
description:

* The word width of 32 bits. It is the processor's bus width.
* The bit order within a word.
* The register map.
* The read and write strobes and the zero-wait-state timing of the bus port.
* The control unit's states and its never-overwrite policy.
* Reset values.
* The split of 133 into 19*7.
* The `PHASE_FS` and `DELTA_FS` values.
* The observation ports `rnd_bit`, `rnd_bit_valid`, `pll_locked` and
  `cu_state` on `trng_top`.

The description calls the synthesized clock "identical to the system clock".
Here it is read as *derived from* it: the two clocks are rationally related,
139/133, which the method depends on.

The decimator XORs `K_D` consecutive corrector outputs, one full period of
the sample pattern. Each corrector output is already the XOR of `N` samplers,
so one random bit combines `N*K_D` flip-flop samples.

## Not included

* **The soft processor system that reads the generator.** Its bus master side
  is the top's `av_*` ports.
* **The serial controller that forwarded bits to a host PC.** Its protocol is
  not specified.
* **A second PLL as the source of `CLK`.** This is the alternative two-PLL
  arrangement. Here `CLK` is the clock input itself, as in the one-PLL
  arrangement.
