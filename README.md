# BPSK / QPSK modulator core

This core turns a bit stream into a digitally sampled carrier whose phase
carries the data. In BPSK each bit sends one carrier, at 0° for a 1 and at
180° for a 0. In QPSK each symbol carries two bits. One bit modulates a cosine
and the other a sine, and their sum is a carrier at 45°, 135°, 225° or 315°.
The output is one signed 12-bit sample per clock, ready for a DAC.

The main idea is economy. One numerically controlled oscillator (NCO) makes
both the cosine and the sine from a single table. The table holds only the
first quarter of a sine wave, as 9-bit numbers. The data never needs a real
multiplier: each data level is +1 or −1, so the only product needed is 2 bits
by 9 bits.

A 3-bit control word picks the operating mode at run time:

| bit | 0 | 1 |
|-----|---|---|
| `control[0]` | external data (`ext_i`, `ext_q`) | internal PN test data |
| `control[1]` | BPSK | QPSK |
| `control[2]` | differential encoding off | differential encoding on |

In the RTL the control word is the packed struct `psk_pkg::ctrl_t`, with the fields
`{diff_on, qpsk, internal}`, so `3'b101` means BPSK of internal data with
differential encoding, and `3'b011` means QPSK of internal data without it.

## Data path

```
 test_data_gen ─┐
 (PN, I/Q split)├─ mux ─ diff_encoder ─ unipolar_to_polar ─┬─ mult_2x9 (× cos) ─┐
 ext_i, ext_q ──┘ ctrl[0]   ctrl[2]        (I and Q)       └─ mult_2x9 (× sin) ─┴─ psk_output ─ psk_out
                                                                 ▲    ▲            ctrl[1]: I or I+Q
                                                  nco ── cos ────┘    │
                                                      └── sin ────────┘
```

| module | job |
|---|---|
| `psk_modulator` | top level: wiring, symbol timing, control sampling, alignment of the pipeline |
| `test_data_gen` | 9-bit LFSR pseudo-noise source; in QPSK mode it takes two bits per symbol, the first for I and the second for Q |
| `diff_encoder` | per channel `d[k] = b[k] XOR d[k-1]`, or pass-through |
| `unipolar_to_polar` | bit 1 → +1, bit 0 → −1 (2-bit two's complement) |
| `nco` | phase accumulator and quarter-wave lookup, giving a cosine and a sine |
| `quarter_sine_rom` | the 0°–90° table with two read ports, computed at elaboration |
| `mult_2x9` | registered signed 2 × 9 multiplier |
| `psk_output` | BPSK: I product; QPSK: I product + Q product; registered |
| `psk_pkg` | the control struct, widths and sample types |

## Symbols, carrier periods and the timing of a change

The sample rate is the clock rate. The carrier frequency is
`f_clk · FTW / 2^PHASE_W`. At the defaults that is 1024 / 65536, so there are
64 samples per carrier period.

A symbol lasts a whole number of carrier periods, `CYCLES_PER_SYMBOL` (default 2,
so 128 samples per symbol). The NCO flags the last sample of every carrier period.
The top level counts these flags, and each symbol therefore starts at carrier phase 0.
That is why the waveform shows clean phase jumps at symbol edges.

On the clock edge that ends a symbol, `data_take` is high, and the next symbol
is loaded all at once:

* The control word is sampled. A change of mode, data source or encoding made
  in the middle of a symbol takes effect at the next symbol boundary, never
  within a symbol.
* The internal generator steps by one bit in BPSK or two bits in QPSK. It only
  steps while internal data is selected, so its sequence carries on where it
  stopped.
* `ext_i` / `ext_q` are taken. An external source should change them after
  `data_take` and keep them stable until the next `data_take`.
* The differential encoder register takes the new bits.

Latency and flags:

* The phase accumulator holds sample *j* at clock *j*. The NCO's registered
  table output, the multipliers and the output register follow. `i_mod` and
  `q_mod` show sample *j* two clocks later, and `psk_out` three clocks later.
* After `rst_n` is released, `out_valid` rises with the third rising edge.
  `sym_start` marks the first sample of each symbol on `psk_out`.
* The first symbol after reset carries the bits 0/0, so it sends −1 on both
  channels. With differential encoding on, this symbol is the reference for the
  decoder. With internal data, the first PN bit goes out in the second symbol.

## The NCO and its single quarter-wave table

The top `LUT_AW + 2` phase bits form a sample index *i* (256 steps per period
at the defaults). The two upper bits of *i* give the quadrant. Quadrants 1 and 3
read the table with the address bits inverted, and quadrants 2 and 3 negate the
word. The cosine is the same lookup at *i* + 64 (one quadrant ahead), through
the table's second read port. The table is

```
rom[k] = round(255 · sin((k + 0.5) · (π/2) / 64)),   k = 0 … 63
```

The table is sampled at the middle of each step, not at its start. This makes
the mirrored quadrants exactly symmetric, so the carrier has no DC offset and no
repeated sample at 90°. It also means the carrier never outputs exactly 0; its
smallest magnitude is 3. The amplitude is 255, not 511, so that −255 still fits
a 9-bit signed sample. The table words are 9 bits wide with a zero top bit,
which synthesis drops, leaving 64 × 8 ROM bits.

The formula is evaluated at elaboration (`$sin` in a constant function), so
changing `LUT_AW` or the amplitude needs no data file.

## Output format

| signal | type | range at ±1 data |
|---|---|---|
| carrier (`sin`, `cos`) | 9-bit signed | −255 … 255 |
| `i_mod`, `q_mod` | 11-bit signed | −255 … 255 |
| `psk_out` | 12-bit signed | BPSK −255 … 255, QPSK −510 … 510 |

In QPSK the output is `I·cos + Q·sin`. Its peak is √2 × 255 ≈ 361. Its phase,
read as the constellation angle atan2(Q, I), is 45° for bits (1,1), 135° for
(0,1), 225° for (0,0) and 315° for (1,0). The mapping is Gray coded: neighbouring
phases differ in one bit. The widths keep the full product and the full sum, so
nothing saturates or wraps.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `psk_modulator` | `PHASE_W` | 16 | phase accumulator width |
| | `LUT_AW` | 6 | quarter table address bits (64 words) |
| | `FTW` | 1024 | tuning word (64 samples per carrier period) |
| | `CYCLES_PER_SYMBOL` | 2 | carrier periods per symbol |
| `test_data_gen` | `LFSR_W`, `TAP_MASK`, `SEED` | 9, taps 0 and 4, all ones | PN sequence `a[n+9] = a[n] ^ a[n+4]`, period 511 |
| `psk_pkg` | `CARRIER_W`, `POLAR_W` | 9, 2 | carrier and data widths |

For exact symbol timing, `2^PHASE_W` should be a multiple of `FTW`. Otherwise
the carrier still runs and symbols still span whole periods, but a period is a
sample longer or shorter now and then, and symbols no longer start exactly at
phase 0.

## What is fixed and what is chosen

These parts come from the architecture this core implements:

* the chain of blocks;
* the 3-bit control word and its meaning;
* the 9-bit 0°–90° table that serves both sine and cosine;
* the signed 2 × 9 product written with `*`;
* I on the cosine, Q on the 90°-shifted carrier, and an adder for QPSK;
* odd-numbered bits on I and even-numbered bits on Q;
* a carrier frequency that is an integer multiple of the symbol rate.

The following are this implementation's choices:

* all sizes: accumulator, table depth, tuning word, periods per symbol and amplitude;
* the PN polynomial and seed;
* the XOR rule of the differential encoder, applied to each channel on its own;
* the register after each stage;
* the asynchronous active-low reset;
* sampling the control word at symbol boundaries;
* the `data_take` handshake for external data.

BPSK uses the cosine on the I channel only. The Q product is still computed but
left out of the sum.

The core is a plain digital sample generator. It has no interpolation filter, no
pulse shaping and no DAC interface. The output changes phase abruptly at symbol
edges, which is the textbook PSK waveform.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_unipolar_to_polar` | both mappings |
| `tb_mult_2x9` | all 2048 operand pairs, latency 1 |
| `tb_psk_output` | random and extreme products in both modes, latency 1 |
| `tb_diff_encoder` | against a reference encoder; decoding gives back the source bits |
| `tb_test_data_gen` | against the recurrence, in BPSK and QPSK stepping; period 511 |
| `tb_nco` | every sample against real-valued sin/cos for several tuning words; the wrap flag; full amplitude reached |
| `tb_psk_modulator` | the whole core at default parameters, clock by clock, through the five phases below; every output sample and flag is compared with an independent reference |
| `tb_psk_workloads` | BPSK/internal/encoded and QPSK/internal/unencoded runs; each symbol is demodulated by correlation, then its phase (0°/180°, or 45°/135°/225°/315°) and the recovered PN bits are checked |

`tb_psk_modulator` runs these five phases:

1. internal BPSK with encoding on;
2. internal QPSK with encoding off;
3. external BPSK;
4. external QPSK with encoding on;
5. random control changes, including changes inside a symbol.

It counts each mechanism and fails if one never occurs.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/psk_pkg.sv tb/tb_psk_modulator.sv \
          --top-module tb_psk_modulator -o sim
./obj_dir/sim
```

Replace the testbench name to run another. Every testbench finishes in well
under a second. The simulator is two-state, so every register that is read is
reset, and testbenches do not rely on X values.
