# Flash ADC with fourth-order bubble error correction and a MUX-based encoder

A flash ADC compares its input with 2^N − 1 thresholds at once. Ideally the
comparator outputs form a *thermometer code*: every comparator whose threshold
is below the input reads 1, the rest read 0, and there is a single 1→0
transition. Comparator offsets, device mismatch and clock jitter break that
picture. A comparator just below the transition may read 0 while those below
it read 1. The resulting 0s inside the run of 1s are called *bubbles*, and a
run of k such 0s is a bubble of order k. An encoder that trusts the code can
then be far off. A binary-search encoder, like the one used here, reads only
a few bits of the code, and a bubble on one of them can flip the MSB.

This design puts a small OR-gate network, the bubble error correction (BEC)
stage, in front of a thermometer-to-binary encoder built from 2:1
multiplexers. The BEC removes every bubble of up to four consecutive 0s. The
comparators use threshold inverter quantization (TIQ): each comparator is a
pair of CMOS inverters, and its threshold is the first inverter's switching
voltage, set by transistor sizing. No resistor ladder is needed.

The default configuration is 6 bits: 63 comparators, a 63-bit BEC and a
63-to-6 encoder.

## Signal chain

```
           vos[k] (offset, per comparator)
              |
vin ──► tiq_comparator[k] ──► gain_booster[k] ──► therm_raw[k]      k = 1 .. 2^N-1
        (2 inverters,          (2 inverters,          │
         switches at Vm_k)      restores logic)       ▼
                                             ┌─────────────────┐
                                             │ bec_4th_order   │──► therm_bec
                                             └─────────────────┘
                                                      ▼
                                             ┌─────────────────┐
                                             │ mux_encoder     │──► bin[N-1:0]
                                             └─────────────────┘
                  (bec_4th_order + mux_encoder = bec_mux_encoder)
```

Everything from `therm_raw` on is synthesizable RTL with no clock: two OR
levels followed by a mux tree. The comparators and gain boosters are
behavioural models with `real` voltages. They give the digital part realistic
stimulus, including bubbles caused by offsets.

## The bubble error correction stage (`bec_4th_order`)

Bits are numbered as comparators: `T1` is the lowest threshold and `TW`
(W = 2^N − 1) the highest. The stage has two levels of OR gates:

| level | gate | equation |
|-------|------|----------|
| 1 | 4-input OR, for i ≤ W−3 | `y[i] = T[i] | T[i+1] | T[i+2] | T[i+3]` |
| 1 | 3-input OR at i = W−2, 2-input OR at i = W−1 | same, with the window cut at `TW` |
| 1 | none at i = W | `y[W] = T[W]` |
| 2 | 2-input OR, for i < W | `C[i] = y[i] | y[i+1]` |
| 2 | none at i = W | `C[W] = T[W]` |

Folding the two levels together gives

```
C[i] = T[i] | T[i+1] | T[i+2] | T[i+3] | T[i+4]      (window cut at TW)
```

The consequences:

* **Up to four 0s below a 1 are filled.** Any 0 that has a 1 within the four
  bits above it becomes 1, so a bubble of order 1 to 4 vanishes. A valid
  thermometer code passes unchanged.
* **A fifth-order bubble is not repaired.** One 0 survives, and the
  testbenches check that this limit holds.
* **A stray 1 above the transition is kept.** The stage treats it as the top
  of the code and fills up to four 0s below it. The correction is one-sided:
  a comparator that wrongly reads 1 moves the output up, never down.
* **Cost.** At 6 bits the stage has 60 four-input, 1 three-input and
  1 + 62 two-input ORs, two gate levels deep.

Example, with a 15-bit code written T15…T1. Each corrected code below is the
ideal one:

| raw | corrected | level |
|-----|-----------|-------|
| `000001111011111` | `000001111111111` | 10 |
| `000011001111111` | `000011111111111` | 11 |
| `000001111100011` | `000001111111111` | 10 |

The level-1 equations follow the source description. The level-2 wiring,
where each 2-input gate joins its own level-1 output with the one above, is
read from a 7-bit gate-level schematic. Treating those 2-input gates as ORs
is this design's reading, and it is what yields fourth-order correction. If
they were meant as something else, only the `g_level2` loop changes.

## The MUX-based encoder (`mux_encoder`)

The encoder is a binary search over the corrected code, built from 2:1 muxes
only:

* `bin[N-1] = T[2^(N-1)]`. The centre bit of the code is 1 exactly when more
  than half of the comparators read 1.
* Bit k is the centre bit of whichever part of the code the bits above it
  selected. In other words, it is `T[{bin[N-1:k+1], 1, k zeros}]`.
* In hardware, bit k is a mux tree over the candidates `T[(2m+1)·2^k]`. Its
  first level is steered by the MSB, the next by `bin[N-2]`, and so on down to
  `bin[k+1]`.
* Bit k needs 2^(N−1−k) − 1 muxes, for Σᵢ (2^(N−i) − 1) in total: 57 muxes
  at 6 bits.

For 3 bits the encoder reduces to three muxes:

```
B2 = T4
B1 = B2 ? T6 : T2
B0 = B1 ? (B2 ? T7 : T3) : (B2 ? T5 : T1)
```

Delay grows bit by bit: the MSB is a wire, and each lower bit waits for the
bits above it to settle its mux selects. The encoder is correct only for a
clean thermometer code. This is why the BEC stage sits in front of it. Over
the bubbled codes tried in the `bec_mux_encoder` testbench (15-bit and 63-bit
versions together), a bare encoder gets 146 of the first-order cases wrong and
396 of the fourth-order ones.

## The TIQ front end (behavioural)

* **`tiq_comparator`.** Two inverters of equal sizing, each modelled as a
  clipped straight line of slope −`GAIN` through (Vm, Vm). An input above Vm
  drives `vout` towards VDD, and an input below drives it towards 0. The
  `voffset` input shifts the threshold to model mismatch.
* **`tiq_vm()`** (in `flash_adc_pkg`). Returns the square-law switching
  voltage `Vm = (r·(VDD−|VTP|) + VTN)/(1+r)`, with `r = sqrt(kp/kn)`. Use it
  to turn a sizing ratio into a threshold.
* **`gain_booster`.** Two more inverters, both switching at VDD/2. Its `dout`
  is the thermometer bit.
* **`tiq_flash_adc`.** Sets comparator k to switch at
  `Vm_k = VM_LO + (k−1)·(VM_HI−VM_LO)/(2^N−2)`, so adjacent thresholds are one
  LSB apart.

The supply (1.8 V), the threshold range (0.5 V to 1.3 V, 12.9 mV per LSB
at 6 bits) and the inverter gain (40) are this design's own choices. The
models are static and have no delays.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `tiq_flash_adc`, `bec_mux_encoder`, `mux_encoder` | `N_BITS` | 6 | resolution; the code has 2^N_BITS − 1 bits |
| `bec_4th_order` | `WIDTH` | 63 | thermometer code width |
| `tiq_flash_adc` | `VM_LO`, `VM_HI`, `VDD` | 0.5, 1.3, 1.8 | threshold range and supply, volts |
| `tiq_comparator` | `VM`, `GAIN`, `VDD` | 0.9, 40, 1.8 | switching voltage, inverter gain, supply |
| `gain_booster` | `GAIN`, `VDD` | 40, 1.8 | inverter gain, supply |

`N_BITS` must be at least 2 for the top, because the threshold spacing
divides by 2^N − 2. The digital blocks accept any `N_BITS` ≥ 1.

## How far to trust it, and where it departs

* The BEC stage has been checked exhaustively at 7 and 15 bits. At 63 bits
  it has been checked, alone and together with the encoder, for every level
  combined with every bubble of order 1 to 4 at every position, plus random
  words against a five-bit-window reference. The 3-bit encoder has been checked against the
  three-mux equations for all 128 inputs, valid or not.
* The second BEC level is an interpretation of a schematic, as explained
  above. The claimed fourth-order correction holds under that reading.
* The analog models are first-order sketches. They ignore noise, kickback,
  delay, metastability and power, and their voltages are not from any
  process.
* There is no sampling clock or output register. If you need a pipelined
  converter, add a register stage around `bec_mux_encoder`.
* Transistor counts are not modelled. A 2:1 mux is priced at 4 transistors
  in one costing of this encoder and at 6 in another; the RTL simply uses
  57 `mux2` cells.

## Files

| file | contents |
|------|----------|
| `rtl/flash_adc_pkg.sv` | defaults, `tiq_vm()`, inverter transfer curve, threshold spacing |
| `rtl/tiq_comparator.sv` | TIQ comparator model (behavioural) |
| `rtl/gain_booster.sv` | gain booster model (behavioural) |
| `rtl/bec_4th_order.sv` | fourth-order bubble error correction (RTL) |
| `rtl/mux2.sv` | 2:1 multiplexer cell |
| `rtl/mux_encoder.sv` | MUX-based thermometer-to-binary encoder (RTL) |
| `rtl/bec_mux_encoder.sv` | BEC followed by the encoder (RTL) |
| `rtl/tiq_flash_adc.sv` | complete converter (top) |
| `tb/tb_*.sv` | self-checking testbench for each module above |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, to run the full 6-bit converter end to end (ideal sweep, bubbles of
order 1 to 4 made by comparator offsets, and the fifth-order limit):

```
verilator --binary --timing -Wno-fatal --top-module tb_tiq_flash_adc \
    -y rtl rtl/flash_adc_pkg.sv tb/tb_tiq_flash_adc.sv -o sim
./obj_dir/sim
```

`-y rtl` lets verilator find each module in `rtl/` by its file name. The
package is named explicitly so that it is read first. Replace `tb_tiq_flash_adc` with `tb_bec_4th_order`,
`tb_mux_encoder`, `tb_bec_mux_encoder`, `tb_tiq_comparator` or
`tb_gain_booster` to run the other testbenches. Each one runs in well under a
second.

Only `bec_4th_order`, `mux2`, `mux_encoder` and `bec_mux_encoder` are meant
for synthesis. The other modules have `real` ports.
