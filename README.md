# Slot-layered LDPC decoder with a per-iteration supply schedule

Iterative LDPC decoding corrects its own mistakes: an error that enters the decoder in an
early iteration is usually washed out by the later ones. This design uses that to save
energy. The decoder's only SRAM, the memory holding the a-posteriori (APP) value of every
code bit, is supplied from a voltage that is chosen anew for every decoding iteration. Early
iterations run the memory at a low voltage (cheap, but with a noticeable bit-error rate);
later iterations raise the voltage so that the final result is read from an almost
error-free memory. Because the level only ever rises within one codeword, K levels cost at
most K-1 supply switches per codeword.

The decoder itself is a slot-layered, partially parallel min-sum decoder for the
672-bit, rate-13/16 LDPC code of IEEE 802.11ad (126 parity checks, check degrees 14-16,
bit degrees 1-3). Everything is SystemVerilog in `rtl/`; the testbenches in `tb/` are
self-checking.

The published design this RTL follows reports its ASIC results (28 nm FD-SOI, 0.142 mm²,
up to 600 MHz at 1.0 V, 9.89 pJ/bit/iteration at 1.0 V falling to 4.82 at 0.7 V) and an
increase in energy efficiency of up to 40 % from the supply schedule. None of these numbers can be reproduced
from RTL; what the RTL gives is the logic that makes such a schedule possible, and a
simulation model of the memory errors to try schedules against.

## The code, seen through 21x21 circulants

The standard writes the parity-check matrix H as 3 x 16 blocks, each a 42x42 cyclically
shifted identity (or zero). The decoder processes 21 checks at a time, so it works with
21x21 blocks instead. Reordering the rows and the columns of every 42-block into even and
odd indices turns a 42-circulant with shift `s` into two 21-circulants:

* block row `2i + r` (r = 0 for even rows, 1 for odd rows) connects to block column
  `2j + ((r + s) mod 2)`
* with shift `floor((r + s) / 2) mod 21`.

The result is 6 *layers* of 21 checks and 32 *block columns* of 21 bits. The two layers made
from one 42-row touch disjoint block columns. A layer has 14, 15 or 16 non-zero blocks
(its check degree `dc`). Code bit `b` of block column `c` is codeword position `c*21 + b`,
and this is the order used at the decoder's ports. To decode codewords in the standard's
bit order, apply the same even/odd permutation outside the decoder.

`ldpc_pkg.sv` holds the 3x16 base matrix (`BASE42`) and the functions that derive the
21-form from it (`layer_dc`, `layer_cycles`, `layer_entry`). The controller's schedule comes
from these functions, so changing `BASE42` changes the code.

**Caution:** the shift values in `BASE42` are placeholders. The zero/non-zero pattern
matches the degree profile of the standard's rate-13/16 code, but the shift values are not
the standard's. Put the standard's table in `BASE42` before decoding real 802.11ad traffic.

## Datapath

```
             +-------------------- APP RAM (32 words x 21 x 7 bit) ----------------+
 in_llr ---> | port 0 (load)         port 0           port 1           port 2      |
             +-------------------------+----------------+----------------+---------+
                                       |                |                |
                          [bit-flip model, simulation only, per supply level]
                                       |                |                |
                                 barrel shifter   barrel shifter   barrel shifter
                                       |                |                |
                                 element i of each slot -> CNB i   (i = 0..20)
                                       |                |                |
                             new APP values, written back unrotated, same ports
```

* **Slots.** Each cycle, three *slots* each handle one non-zero block of the current
  layer. Entry `e` of a layer (blocks in increasing column order) goes to slot `e mod 3` in
  cycle `e / 3`, so a layer takes `ceil(dc/3)` = 5 or 6 cycles per phase.
* **Offset shifts (one network only).** Only the read side has a rotation network. When a
  layer writes a block column back, the column stays rotated, so element `a` holds bit
  `(a + s) mod 21`. The controller records that rotation `s` per column (`rot[]`). A later
  read that needs shift `s'` rotates by `(s' - rot) mod 21`. The final readout rotates by
  `(21 - rot) mod 21`, which restores natural order. Loading writes natural order (rotation 0).
* **Check node blocks (CNBs).** CNB `i` handles check `i` of the layer. It combines the
  variable-node update and the check-node update in two phases:
  * *read phase:* `Q = APP - R_old`. It also accumulates the two smallest `|Q|`
    (limited to 15), the position of the smallest, the product of the signs, and the parity
    of the hard decisions it read.
  * *write phase:* `R_new = sign * (min2 if this is the minimum's position, else min1)`
    and `APP_new = sat63(Q + R_new)`.

  The layer's `Q` values wait in a 16-entry buffer between the two phases. Each CNB keeps
  its check messages for all 6 layers in compressed form (min1, min2, index, 16 signs), in
  flip-flops. The APP RAM is the only SRAM in the design. This is plain min-sum, with no
  offset or scaling.
* **Word widths.** Check messages are 5-bit two's complement (|R| <= 15). APP values are
  7 bits (+-63, saturating). Channel LLRs are 5 bits; a positive LLR favours bit 0.

## Schedule and timing

Per layer: `ceil(dc/3)` read cycles, 1 cycle for the last read data to reach the CNBs, then
`ceil(dc/3)` write cycles. The first write cycle commits the layer's new messages.
Adding one request cycle and one end-of-iteration cycle gives

    cycles per iteration = sum over layers (2*ceil(dc/3) + 1) + 2 = 72

plus `SWITCH_CYC` (default 2) for every supply change. A codeword takes 32 load cycles,
72 cycles per iteration, and 33 cycles to read out. The first output beat arrives
`72*iterations + 2*switches + 3` clock edges after the last input beat. Loading, decoding
and readout do not overlap. At 10 iterations and 600 MHz this is about 514 Mbit/s of code
bits. The published design reaches 790 Mbit/s with a more overlapped schedule that is not
described.

## Stopping rule

Decoding stops after the first iteration in which
1. every check of every layer had even parity on the APP signs that were read, and
2. no write changed the sign of an APP value,

or after `L_MAX` = 15 iterations. When both hold, the hard decisions did not change during
the iteration, so they satisfy every check: the stopping test is an exact syndrome check
that costs no extra pass. `dec_converged` reports which way decoding ended, and `dec_iters`
reports how many iterations it took.

This guarantee holds only for an error-free memory. If a read returns a wrong sign, one
layer can see the flipped value while the others see the correct one, and the rule can
then stop on a word that is not a codeword.

## Supply schedule (`dvs_ctrl`)

Levels are coded 0..4 = 0.70, 0.75, 0.80, 0.90, 1.00 V (`vdd_level_e`). A 15-entry table,
written through `cfg_we/cfg_iter/cfg_level`, gives the level for iterations 1..15. After
reset every entry is 1.0 V, which gives a conventional decoder. Before each iteration the
controller asks for a level:

* For iteration 1, the level is the table entry.
* After that, the level is `max(table entry, current level)`, so the level only rises
  within a codeword.
* When the level changes, `vdd_sel` changes at once and the decoder waits `SWITCH_CYC`
  cycles for the supply to settle. `dvs_stall` is high during the wait, and `switch_cnt`
  counts the changes.

`vdd_sel` leaves the chip boundary of this RTL to drive the supply switches, which are
analog and not part of the RTL.

The table is meant to be filled off-line. The method behind the published schedules is a
greedy search over density-evolution predictions of the message error rate, trading
memory error rate against energy per iteration. For the 802.11ad code it chose 0.75 V for
the first one or two iterations and 0.80 V after, for 3.3-4.3 dB SNR. That is
`{1, 2, 2, ...}` or `{1, 1, 2, ...}` in this table.

## Memory error model (`sram_fault_model`, simulation only)

With `MODEL_MEM_ERRORS = 1` the top inserts a behavioural model on the RAM read data. Every
bit of a read is inverted independently with probability `rho(vdd_sel)` (a binary symmetric
channel). The model uses `$urandom`, so it cannot be synthesized. With the default
`MODEL_MEM_ERRORS = 0` the top is synthesizable and the memory is error free.

The default rates (`FLIP_THR_DEFAULT` in `ldpc_pkg`, stored as rho * 2^64) are the per-access
read/write error rates:

| level | 1.00 V | 0.90 V | 0.80 V | 0.75 V | 0.70 V |
|-------|--------|--------|--------|--------|--------|
| rho   | 1.0e-11 | 8.0e-13 | 3.7e-11 | 3.3e-7 (assumed) | 3.0e-3 |

* Soft-error rates (2.2e-11 to 1.5e-10 per second) are negligible over the less than one
  microsecond a value stays in the RAM.
* No rate was published for 0.75 V. The value here is the geometric mean of its two
  neighbours.
* The non-monotonic 0.9 V / 1.0 V pair is kept as published.

### Errors persist in the APP memory

In a layered decoder the APP memory holds the running sum, not the channel value. A
flipped high-order bit (for example +5 read as -59) therefore shifts that bit's intrinsic
information for good. The three check messages of a degree-3 bit (at most 3 x 15) cannot
pull it back.

In simulation, 0.70 V in iterations 1-2 (about 40 flips per iteration at 3e-3) leaves
every test codeword undecoded (`tb_ldpc_uep_workload` reports this in its last pass). This matches the published schedules, which never use
0.70 V. At a rate of 1e-4, roughly two out of three codewords that see flips still decode.

## Files

| file | contents |
|------|----------|
| `rtl/ldpc_pkg.sv` | code, widths, base matrix and schedule functions, level enum, default error rates |
| `rtl/ldpc_decoder_top.sv` | top: wiring of everything below |
| `rtl/decoder_ctrl.sv` | load / iterate / read-out sequencer, rotation bookkeeping, stopping rule |
| `rtl/cnb.sv` | check node block (x21) |
| `rtl/barrel_shifter.sv` | 21-element cyclic rotator (x3) |
| `rtl/app_ram.sv` | APP memory, 32 x 147 bit, 3 ports |
| `rtl/dvs_ctrl.sv` | per-iteration supply level and switch stall |
| `rtl/ldpc_io_if.sv` | codeword load and hard-decision readout |
| `rtl/sram_fault_model.sv` | behavioural bit-flip model of the APP SRAM |

Top-level ports:
* `in_valid/in_ready/in_llr[21]`: 32 beats per codeword, block column `c` in beat `c`.
* `out_valid/out_col/out_last/out_bits[21]`: 32 beats, with no back-pressure.
* `dec_done`: pulses after the last output beat.

Reset is asynchronous and active low.

## Verification

Each module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_barrel_shifter` | all 21 shifts against a direct rotation |
| `tb_app_ram` | random 3-port traffic against a reference array, read latency, read-during-write |
| `tb_cnb` | several iterations over layers of degree 14-16 against a textbook min-sum (minimum over the *other* entries), saturation, parity, sign-change flag, clear |
| `tb_dvs_ctrl` | random schedules: level per iteration, rising-only rule, stall length, switch count |
| `tb_sram_fault_model` | flip probabilities 0, 1/2, 1 and the nominal rate, pattern hold, flip counter |
| `tb_ldpc_io_if` | load addresses and sign extension, readout order and timing, hard decisions |
| `tb_decoder_ctrl` | per-layer read/write structure, shifter offsets against an independently tracked rotation, 72 cycles per iteration, stopping rule |
| `tb_ldpc_decoder_top` | end to end with the error model |
| `tb_ldpc_decoder_full` | the top with all defaults: noiseless and noisy codewords, and a 0.75/0.80 V schedule |
| `tb_ldpc_uep_workload` | supply schedules over an AWGN channel, against a 1.0 V reference on the same noise |

How `tb_ldpc_decoder_top` works:
* It generates random codewords by Gaussian elimination on H, independently of the decoder.
* It adds channel errors and checks the decoded bits, their syndrome and the exact latency.
* It runs a random word to `L_MAX`, and uses the 0.75/0.80 V schedule.
* It also runs 0.70 V with a raised error rate of 1e-4, where codewords must still decode
  through memory flips.
* It requires every mechanism to occur at least once: early stop, multi-iteration decode,
  `L_MAX` stop, supply switch, and decoding through bit flips.

`tb_ldpc_uep_workload` sends 12 random codewords per channel SNR through the decoder.
* Modulation is BPSK and the SNR is Eb/N0 = 3.3, 3.7 and 4.3 dB. Channel LLRs are
  `2y/sigma^2`, rounded and limited to +-15.
* Each codeword runs twice, on the same LLRs and with the memory error model at its
  default rates: once at 1.0 V throughout, and once with the schedule for its SNR.
* Any run that saw no bit flip must match the reference exactly.
* The testbench prints frame errors and average iterations for both runs. It also prints
  an energy estimate from the published energy per bit and iteration of each supply level
  (0.75 V assumed halfway between 0.7 and 0.8 V).

A typical run:

| SNR | frame errors (1.0 V / schedule) | average iterations | estimated energy, pJ/bit |
|-----|------|------|------|
| 3.3 dB | 4/12 / 4/12 | 7.7 | 75.8 vs 45.6 |
| 3.7 dB | 0/12 / 0/12 | 4.1 | 40.4 vs 24.3 |
| 4.3 dB | 0/12 / 0/12 | 2.3 | 23.1 vs 13.6 |

That is about 40 % less energy for the same decoding result. At the 0.75 V error rate
assumed here, memory flips are rare enough that none occurred in this run.
A last pass uses 0.70 V for iterations 1-2 on four of the 4.3 dB codewords. It sees about
300 bit flips, and none of the four decodes.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/ldpc_pkg.sv tb/ldpc_tb_pkg.sv \
        rtl/*.sv tb/tb_ldpc_decoder_top.sv --top-module tb_ldpc_decoder_top
    ./obj_dir/Vtb_ldpc_decoder_top

Building and running one testbench takes seconds. Unit testbenches need only their module and
`ldpc_pkg.sv`.

## Where this RTL departs from, or goes beyond, the published design

* **Code shifts.** The `BASE42` shift values are placeholders, not the standard's (see
  above).
* **Word widths, storage and arithmetic.** These are this design's own choices: APP
  7 bits, LLR 5 bits, the compressed message storage, the Q buffer, and plain min-sum with
  no correction. The 5-bit message width follows the example used in the error analysis.
* **Schedule.** Layers run without any overlap, and load, decode and readout do not
  overlap either. The result is 72 cycles per iteration and a lower throughput than the
  published figure.
* **APP RAM.** It is modelled as one array with three ports. The real SRAM organisation
  was not published.
* **Interface.** Beat format and handshake are this design's own.
* **Where errors are injected.** Bit flips are applied to the 7-bit APP words as they are
  read. The analysis used to choose schedules models flips on b-bit variable-to-check
  messages instead. In this datapath those messages (`APP - R`) are formed from the APP
  value just read, so a flipped APP bit reaches them as well. Unlike the analysis, it also
  persists into later iterations (see above).
* **Levels.** Error rates and energies were published for 1.0, 0.9, 0.8 and 0.7 V only.
  0.75 V, which the published schedules use, has an assumed error rate here.
* **Schedule computation.** The off-line algorithm that computes the schedule is not
  hardware and is not included. Neither are the supply switches or regulators, nor any
  energy or timing figures.
