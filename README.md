# Signal-processing-driven low-power receivers and inference: RTL

The idea behind this design is to let signal processing decide how much
hardware work is done, so that energy-starved sensor nodes spend only what
the signal requires. It contains the digital parts of three such designs.
They are independent and sit side by side in one top module:

1. **Adaptive-sampling IEEE 802.15.4 receiver baseband (`zb_*`).** A 2.4 GHz
   O-QPSK receiver learns, from the packet preamble, which sample positions
   of a chip pulse carry the most energy. When the link is good, it processes
   only 25 %, 50 % or 75 % of the samples on the Nyquist grid.
2. **Factor-operation accelerator for Bayesian inference (`bn_*`).** A small
   engine for clique-tree message passing works on discrete probability
   tables ("factors") in a 6-bit log domain. It computes factor products,
   marginals, reductions by an observation, and normalisation.
3. **Controller of a compressed-sensing Walsh-Hadamard front end (`wht_*`).**
   A switched-capacitor front end correlates a UWB input with randomly
   chosen 64-point Walsh rows and delivers only K = 26 of the 64
   coefficients. This RTL is the digital sequencer that drives its
   sample-and-holds, integrators, summing amplifier and ADC.

The analog circuits are not part of this RTL: mixers, filters, flash ADC,
sample-and-hold network, integrators and calibration DAC. Their digital
inputs and outputs appear as ports of the top module, `spdic_top`.

---

## 1. Adaptive-sampling 802.15.4 baseband

### Signal on the input

Each rail (I and Q) delivers one half-sine pulse per chip. The chip rate is
2 Mchip/s, shared between the rails, and each rail is sampled at 4 MS/s, so
every pulse is seen by four samples at positions 0..3 (0-based). Position 0
falls on the zero of the half-sine. The Q rail lags I by half a chip, which
is two samples. One data symbol is 32 chips, which makes 64 samples.

The samples arrive as the 31-bit thermometer codes of two 5-bit flash
ADCs. `zb_therm2bin` counts the ones in each code, which makes it immune to
isolated bubbles. It turns the count into a signed sample, 2·count − 31.

### Receive chain (`zb_dbb`)

```
therm → zb_therm2bin → zb_energy_detect
                    └→ zb_timing_sync → zb_phase_corr → zb_chan_est
                                                     └→ zb_chip_demod → zb_despreader → zb_dbb_ctrl
```

The controller `zb_dbb_ctrl` steps through the following states:

| state | what happens |
|-------|--------------|
| IDLE | Waits until `start` is high. |
| DETECT | The energy detector sums \|I\|+\|Q\| over 16 samples. It fires on the first rising crossing of `ed_threshold`. |
| SYNC | `zb_timing_sync` correlates the last 64 sample signs with the template of preamble symbol 0, for one symbol. Phase-0 samples are left out because they carry no energy. The best match fixes the symbol phase (`pos`, 0..63) and the sign of each rail. Its metric \|sI\|+\|sQ\| (at most 96) is the **link quality**. |
| CHEST | `zb_chan_est` accumulates the energy of each of the four pulse positions over two preamble symbols, on both rails. It then ranks the positions. |
| SFD | Chips are decoded until the symbol pair 7, A appears. That pair is the start-of-frame octet 0xA7, sent low nibble first. |
| PHR | Two symbols give the 7-bit frame length. |
| PAYLOAD | Octets are assembled from two symbols each, low nibble first. After `frame_len` octets the detector is rearmed. |

`zb_phase_corr` inverts a rail when the preamble correlation found it
negated. The design assumes no carrier frequency error.

### Choosing the samples

The number of kept positions per pulse, `nsel`, is chosen from the link
quality:

| link quality | nsel | share of samples |
|--------------|------|------------------|
| ≥ `thr_25` | 1 | 25 % |
| ≥ `thr_50` | 2 | 50 % |
| ≥ `thr_75` | 3 | 75 % |
| otherwise | 4 | 100 % |

The `nsel` positions with the most preamble energy are kept. With the
half-sine, these are positions 2, then 1, then 3. So at 50 % the second and
third samples of each pulse are kept (mask `0110`).

A non-zero `rate_force` (1..4) overrides the automatic choice.

During SFD, PHR and payload, `sample_en` shows the mask: the samples the
analog side and the ADC need to deliver. `samples_used` counts the samples
that really enter a chip decision.

### Decisions

`zb_chip_demod` adds the selected samples of each pulse and takes the sign:
hard decisions. `zb_despreader` then picks the 4-bit symbol whose 32-chip
sequence has the smallest Hamming distance to the received chips. The 16
sequences are generated in `zb_pkg::chip_seq`:

- symbol k < 8 is symbol 0 rotated by 4k chips;
- symbols 8..15 are symbols 0..7 with every odd chip inverted.

Symbol 0 is `1101 1001 1100 0011 0101 0010 0010 1110`, chip c0 first.

### Receive-forever mode

With `rx_infinite` high, the controller skips the length field and delivers
octets until `start` drops. This is meant for bit-error-rate measurement with
an endless test pattern. It is this design's addition.

---

## 2. Log-domain factor accelerator (`bn_accel`)

### Number format

A probability p is stored as a 6-bit cost u = round(−4·log2 p): quarter-bit
steps, with 63 meaning "zero or too small".

- **Product.** A product of probabilities is the saturating sum of the
  costs (`bn_product_unit`).
- **Sum.** A sum of probabilities uses a small table (`bn_logadd_lut`):
  `a ⊕ b = min(a,b) − g(|a−b|)`, where `g(d) = round(4·log2(1 + 2^(−d/4)))`.
  So g is 4 for d = 0..1, 3 for 2..3, 2 for 4..7, 1 for 8..13, and 0 from 14
  on.

### Memory, table and scan chain

All factors live flattened in one 4K × 6 memory (`bn_factor_mem`), which
has two read ports and one write port. Before an operation the
configuration table (`bn_config_table`, 24 words of 24 bits) is filled in:

| word | content |
|------|---------|
| 0 | mode: 0 product, 1 marginal / reduction, 2 normalise |
| 1, 2, 3 | base address of input A, input B and result O |
| 4..23 | one row per variable (up to 20), as a packed `var_cfg_t`: `card[20:13]` (0 means 256), `pin_val[12:5]`, `pinned[4]`, `elim[3]`, `in_a[2]`, `in_b[1]`, `in_o[0]` |

The host reaches the memory and the table only through the scan chain
(`bn_scan_chain`). It shifts in a 38-bit frame, LSB first: data[23:0], then
address[36:24], where bit 36 selects the table, then the write flag at
bit 37. It then pulses `scan_update` with `scan_en` low.

A read returns its word in the data field of the *next* frame shifted out.
`tb_bn_accel` shows the whole protocol.

### Indexing: strides and cascaded counters

Variable 0 changes fastest. For factor F, the stride of variable i is the
product of the cardinalities of the variables j < i in F's scope, and zero
outside the scope. An entry's address is `base + Σ assignment[i]·stride[i]`.

In the classic A(3), B(2), C(2) example, list C first. The strides are then
C = 1, B = 2, A = 4, and a fourth variable D would get stride 12.

`bn_stride_calc` computes all strides serially, one variable per clock, in
NV + 1 clocks. For each variable it also computes the wrap step,
(card − 1)·stride, and the address offset of pinned (observed) variables.

`bn_assign_counters` is a chain of 20 counters that walks every
assignment of the free variables. It updates the three addresses
incrementally: the advancing counter adds its stride, and every counter
that wraps subtracts its wrap step. So no multiplier sits in the loop.

### Operations (`bn_ctrl`)

Each operation runs `go → STRIDE → LOAD → (RD, EX) per assignment → DONE`,
two clocks per assignment:

- **Product.** O[idx_O] = A[idx_A] + B[idx_B]. The scope of O is the union
  of the scopes of A and B.
- **Marginal.** Variables with `elim` set are summed out. Port B reads back
  the partial sum of the result entry, and the new entry is written
  partial ⊕ A. The first visit, when all eliminated variables are 0
  (`grp_first`), just copies A. The eliminated variables can be in any
  position.
- **Reduction.** Set `pinned` and `pin_val` on the observed variable in a
  marginal operation. The counters hold that variable fixed, so only
  consistent entries are copied.
- **Normalise.** The first pass log-adds all entries of A into a total. The
  second pass writes A − total, clamped to 0..63.

Run time in clocks, counted from `go` to `done`:

- product and marginal: 1 + 1 + (NV + 1) + 1 + 2E;
- normalise: that plus 1 + 2E;

where E is the number of assignments. `result_entries` gives the size of
the result. `too_large` flags a result of more than 1K entries, the intended
largest factor.

---

## 3. Walsh-Hadamard front-end controller (`wht_ctrl`)

For each coefficient the sequence is:

1. A 6-bit LFSR (`wht_lfsr`, x^6 + x^5 + 1, period 63) picks a random row.
2. `wht_walsh_gen` produces that row in sequency order: row k has k sign
   changes, and element n is parity(bitrev(gray(k)) & n).
3. `wht_channel_fsm` steers sample n of the 64-sample window to one of 12
   sample-and-holds: S/H n mod 4 of channel (n div 4) mod 3. The sample is
   taken straight or crossed according to the code (`sh_neg`).
4. After its four sampling clocks, a channel integrates its held charge for
   8 clocks, the next two four-clock slots, while the other two channels
   sample in turn. So the three channels rotate with a 12-clock period.
5. After sample 63 the three channel outputs drive the summing amplifier
   (`sum_en`) for 32 settling clocks.
6. One clock of `adc_conv` / `int_reset` digitises the coefficient and
   clears the integrators.

One coefficient therefore takes 64 + 8 + 32 + 1 = 105 clocks. K
coefficients (default 26, set with `k_coefs`) are computed in series while
the input repeats. `coef_row` tells the receiver which row each coefficient
belongs to.

`cal_dac_code` is a register for the 7-bit integrator overshoot-calibration
DAC. It is loaded from outside with `cal_load`, and the DAC is enabled
(`cal_dac_en`) while the channels integrate.

---

## Top module `spdic_top`

The top instantiates `zb_dbb` (`u_zb`), `bn_accel` (`u_bn`) and
`wht_ctrl` (`u_wht`). Each has its own clock and reset, and its ports carry
the prefix `zb_`, `bn_` or `wht_`.

At the defaults, yosys maps the top to about 2k word-level cells plus the
4K × 6 memory.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb rtl/zb_pkg.sv rtl/bn_pkg.sv \
  tb/tb_spdic_top.sv --top-module tb_spdic_top
./obj_dir/Vtb_spdic_top
```

`tb_spdic_top` runs the whole top at its default parameters:

- four 802.15.4 packets:
  - clean, automatic rate (25 %);
  - noisy with both rails inverted, forced 100 %;
  - 50 % with one rail inverted;
  - receive-forever mode;
- a product, a marginal, two reductions and a normalisation on the
  accelerator, loaded and read back through the scan chain;
- 26 WHT coefficients, compared with exact Walsh-Hadamard inner products
  through a behavioural model of the switched-capacitor channels.

It counts each mechanism and fails if any of them never happens. The
mechanisms are detection, lock, inversion, each sampling rate, SFD,
receive-forever octets, each accelerator operation, coefficients and row
changes.

Two testbenches run the evaluated workloads at full size:

- `tb_zb_max_frame` receives a frame with the largest payload, 127 random
  octets. It checks the 250 kb/s octet rate and that only 25 % of the
  samples are processed.
- `tb_bn_alarm_clique` runs one message-passing step at the size of the
  largest ALARM clique: five variables and 144 entries. The step is a
  product into the clique potential, a marginal onto a two-variable sepset,
  and renormalisation.

`tb/zb_tx_pkg.sv` is the test transmitter. It builds the PPDU (8 preamble
symbols, SFD, length, payload), the half-sine I/Q waveforms, noise and the
thermometer codes. `tb/bn_tb_model.svh` holds the reference log-add and
stride arithmetic.

## Where this RTL makes its own choices

The RTL follows the original design where that design is described. These
points are this implementation's own choices:

**802.15.4 baseband**
- The sample format.
- The energy window (16 samples).
- Correlation on sign bits, with phase-0 samples left out.
- A link-quality measure taken from the correlation peak, compared with
  programmable thresholds.
- Channel estimation over two preamble symbols.
- The SFD timeout of 16 symbols.
- Receive-forever mode.

**Factor accelerator**
- The cost scale, quarter-bit steps.
- The log-add table.
- The 4K-word memory with two read ports.
- The scan frame format.
- The layout of the configuration table.
- The serial stride computation.
- The read-modify-write marginalisation.
- The two-pass normalisation.
- All FSM states.

**WHT controller**
- The LFSR polynomial.
- The sequency-order construction.
- The single conversion / reset clock.

**Limits**
- Only the digital parts are built. The RF and analog front end, the flash
  ADC, the S/H network, the integrators, the summing amplifier, the
  sub-Nyquist ADC and the offline clique-tree compiler and signal recovery
  are outside this RTL.
- The receiver corrects only sign flips of the rails. A real carrier
  frequency offset would need more.
- Only hard chip decisions are made.
- The accelerator does not check that a factor fits in its 1K-entry budget.
  It only flags it with `too_large`.
- Costs are clamped to 0..63, so entries much smaller than the largest one
  in a factor read as zero after normalisation.
