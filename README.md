# Dual-channel Galileo E1 tracking unit with a 51-correlator bank

Satellite navigation receivers in cities suffer from multipath: reflected
copies of the satellite signal bias the measured time of arrival by tens of
metres. Maximum-likelihood multipath estimation fixes much of that error,
but it is far too expensive to run on the raw sample stream (more than
650,000 complex samples per 40 ms). Complexity-reduced multipath mitigation
(CRMM) first compresses the stream with a bank of correlators and runs the
estimator only on the few tens of correlator outputs. The price is paid in
the tracking hardware: instead of the usual early/prompt/late triple, every
channel needs **51 correlators**, each integrating over a full 4 ms code
period at the sample rate.

This RTL is that tracking hardware for one dual-channel receiver: the
Galileo E1B (data) and E1C (pilot) signals of one satellite. It takes
complex 3-bit ADC samples at 16.8 Msps, in a 100 MHz clock domain, and
delivers every 4 ms a set of 2 channels x 2 components (I, Q) x 51
correlations of 23 bits. The loops that close around it (PLL, DLL) and the
multipath estimator are not part of it: the correlations go out, and
carrier and code phase corrections come back in.

## Signal flow

```
              carr_freq, carr_err                      code_freq, code_err
                     |                                        |
 i_in,q_in  +--------v---------+   6-bit I,Q    +------------v-------------+
 (3 bit) -->| cwo              |--------------->|                          |
 sample_    | carrier wipe-off |                | dual_channel_correlator  |
 valid      +------------------+                |  E1B: int_dump(I) (Q)    |--> result[2][2][51]
    |       +------------------+  replica_b[51] |  E1C: int_dump(I) (Q)    |    result_valid (250 Hz)
    +------>| code_nco_prn     |--------------->|                          |
            | code NCO + PRN   |  replica_c[51] |                          |
            |                  |--- epoch ----->| trigger                  |
            +------------------+                +--------------------------+
```

| Module | Role |
|---|---|
| `gnss_pkg` | shared widths and constants, the carrier table, correlator spacing |
| `cwo` | carrier NCO and mixer: 3-bit complex samples in, 6-bit I/Q out |
| `code_nco_prn` | code NCO, 51-tap correlator bank, E1B/E1C code storage, replica words |
| `int_dump` | 51 parallel accumulators with shadow storage for one sample stream |
| `dual_channel_correlator` | four `int_dump` units: E1B I/Q and E1C I/Q |
| `tracking_unit` | top: the three units wired together |

All three units see the same `sample_valid` strobe. The wipe-off and the
replica generator each register their output once, so the wiped-off sample
and the 51-bit replica words of the same sample reach the correlators in the
same clock. Nothing in the data path stalls or back-pressures: one sample
can be accepted on every clock, far more than the 16.8 Msps (one sample in
5.95 clocks on average) needed.

## The code NCO and the three-chip trick

This is the least obvious part of the design and the one that keeps the
51-correlator bank cheap.

**Code phase.** The phase register is a pair {chip index 0..4091, 32-bit
chip fraction}. `code_freq` is added to the fraction on every 100 MHz clock,
so one LSB is 100e6/2^32 = 0.023 Hz of chip rate; 1.023 Mchip/s is
`code_freq = 43937515` (`gnss_pkg::CODE_FREQ_1023K`). Each carry out of the
fraction steps the chip index modulo 4092. That modulo-4092 count is the
"divide by 4092" of the code NCO: its wrap marks the start of a code period,
once every 400,000 clocks (4 ms, 250 Hz). A second register accumulates the
DLL's corrections (`code_err`, signed, in 2^-20 chip, so up to +-2048 chips
per step) and is added to the running phase to give the prompt code phase.

**Correlator bank.** Tap k (0..50) looks at the prompt phase plus a constant
offset `(k-25) * TAP_SPACING`, with `TAP_SPACING = floor(2^32/25)`, i.e.
1/25 chip. The taps thus cover just under -1..+1 chip around the prompt.
Because the span stays below two chips, the integer part of any tap phase is
always the prompt chip minus one, the prompt chip, or the prompt chip plus
one. The design therefore reads the code storage at only those **three**
addresses per sample and lets each tap pick one of the three results from
the carry of its own offset addition. Fifty-one independent code look-ups
would cost seventeen times as much.

**Half-chip inversion.** The tap's chip fraction also decides whether the
code bit is inverted: in the second half of each chip the replica is
inverted. This is the square BOC(1,1) subcarrier of the E1 signals, made
from the same phase word at no cost.

**Codes.** The E1B and E1C primary codes (4092 chips each) are not part of
the design. They are written once through `code_wr_en/addr/data`
(bit 0 = E1B chip, bit 1 = E1C chip, 1 meaning chip value -1). The storage
is a 4092 x 2-bit array with one write and three asynchronous read ports.

**Outputs.** With each sample, one clock later: `replica_b[50:0]`,
`replica_c[50:0]` (bit k for tap k, 1 = -1), `prompt_chip`, and `epoch` = 1
on the first sample of a new code period. `epoch` is a wrap of the prompt
chip index by more than half a code, so a small backward DLL correction
does not fake a period start.

## Carrier wipe-off

`carr_freq` is added to a 32-bit phase accumulator on every clock (0.023 Hz
per LSB), PLL corrections (`carr_err`, 2^-32 cycle) are summed in a second
register, and the two are added. The top three bits address an 8-entry table
of 3-bit cosine and sine values of amplitude 3: 3, 2, 0, -2, -3, -2, 0, 2
for the cosine, the sine two entries behind. Two 3x3-bit multipliers form
`i_out = i_in * cos` and `q_out = q_in * sin` (component by component, two
multipliers, no cross terms), each a 6-bit signed result.

## Integrate and dump

Each `int_dump` holds 51 accumulators of 23 bits. A valid sample is added to
accumulator k if replica bit k is 0 and subtracted if it is 1; the
"multiply" of the correlation is only this sign choice. On `trigger` the
accumulators are copied into a second bank, the shadow storage, and restart
at once with the sample of that clock (if any), so no sample is lost while
the loops read the previous period. `result_valid` pulses one clock after
the trigger and the shadow bank holds its values until the next trigger.

Width: a period has 16.8e6 / 250 = 67,200 samples; at the largest sample
magnitude of 32 the sum reaches 2,150,400 < 2^22, so 23 signed bits hold it.

In the top, the trigger is `epoch` qualified by the replica valid, so every
result set covers exactly one code period. `result_valid` rises on the
second rising clock edge after the first sample of the next period is
presented, and `result[ch][comp][tap]` uses ch 0 = E1B, 1 = E1C and
comp 0 = I, 1 = Q.

## Top-level interface (`tracking_unit`)

| Port | Width | Meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | 100 MHz clock, synchronous active-low reset |
| `carr_freq`, `code_freq` | 32 | NCO steps per clock, from acquisition |
| `carr_err_valid`, `carr_err` | 1, 32 | carrier phase correction (signed, 2^-32 cycle) |
| `code_err_valid`, `code_err` | 1, 32 | code phase correction (signed, 2^-20 chip) |
| `code_wr_en/addr/data` | 1, 12, 2 | code storage load |
| `sample_valid`, `i_in`, `q_in` | 1, 3, 3 | ADC samples, signed |
| `result_valid`, `result` | 1, 2x2x51x23 | correlations, every 4 ms |
| `prompt_chip` | 12 | chip index of the prompt replica |

Parameters: `N` (correlators, 51) and `LEN` (code length, 4092). The
widths and constants are in `gnss_pkg`.

## What is outside, and where this RTL makes its own choices

Not included, because only their names or a resource estimate exist for
them: the PLL and DLL discriminators and loop filters (they run every 4 ms
and suit a small processor), the control FSM and glue logic, the
acquisition unit, the ADC, and the contents of the Galileo codes. Their
signals are the top's ports. Also not built are two cheaper variants of the
correlator (a "curled-up" form with 11 adders time-shared over five clocks
and a RAM-based form) and a time-shared carrier wipe-off: the straight,
fully parallel form is the reference design here.

Choices made in this RTL where no detail was available, all of which can be
changed locally:

* correlator spacing of 1/25 chip (any spacing keeping all taps within less
  than one chip of the prompt keeps the three-read-port structure);
* the half-chip inversion read as a BOC(1,1) subcarrier;
* component-wise mixing with two multipliers, rather than a full complex
  product with four;
* LUT amplitude 3 and truncated phase addressing;
* formats of the correction inputs, the replica bit encoding, the code load
  port, epoch detection, the trigger taken from the code epoch;
* a single carrier and a single code correction input for both channels;
* synchronous active-low reset of all registers except the code storage.

## Resource picture

After generic synthesis, one receiver has about 4,970 flip-flop bits
(almost all in the four 51 x 23-bit accumulator and shadow banks) and
14,072 memory bits (the code storage plus accumulator arrays kept as
memories). The accumulators dominate, as expected: four units x two banks x
51 x 23 bits = 9,384 bits when both banks are counted as registers. The
carrier wipe-off is tiny (77 flip-flops).

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_cwo` | every output against a real-valued cos/sin model of the NCO, with random frequencies and PLL corrections |
| `tb_code_nco_prn` | all 51 E1B/E1C replica bits of every sample against a direct 64-bit phase model, with random codes and DLL corrections; 67,200 samples / 400,000 clocks per code period |
| `tb_int_dump` | all 51 sums after each trigger, triggers with and without a sample, one full 67,200-sample period at maximum magnitude |
| `tb_dual_channel_correlator` | all 4 x 51 sums with independent I/Q and E1B/E1C stimulus |
| `tb_tracking_unit` | the whole unit at full size: reference model of the chain, latency, 4 ms period, correlation peak 2*3*67200 = 403,200 at the prompt tap, peak moving five taps after a +0.2-chip code correction, sign flip after a +90 degree carrier correction, two periods with a 1 kHz carrier offset |

Run one with Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  rtl/gnss_pkg.sv tb/tb_tracking_unit.sv --top-module tb_tracking_unit -o sim
./obj_dir/sim
```

The full-size end-to-end run simulates six 4 ms periods (about 2.4 million
clocks) in a few seconds. The tests use no files; codes and samples are
generated with `$urandom`.
