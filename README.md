# W-CDMA initial cell search receiver with cyclic synchronisation codes

When a W-CDMA handset is switched on it knows neither where the base
station's slots and frames begin nor which of the 512 downlink scrambling
codes the cell uses. This receiver finds all three in three stages:

1. **Slot boundary.** The primary synchronisation code (P-SCH) is the same in
   every cell and every slot. A matched filter finds it, and its energy is
   accumulated per chip position over several slots.
2. **Code group and slot number.** The secondary burst (S-SCH), sent with
   the P-SCH, tells which of 32 code groups the cell belongs to and which of
   the 15 slots of the frame it is. Here each group's burst is built from one
   *cyclic* 16-chip code word, and the slot number is a cyclic rotation of
   that word. So group and slot come out of a **single** 256-chip burst. A
   decoder on a clock five times the chip rate finishes before the next slot
   arrives.
3. **Scrambling code.** The group holds 16 candidate codes. **One** LFSR pair
   with 33 masking functions generates all 16 at once. Sixteen descramblers
   measure the pilot (CPICH) energy of each candidate, and the strongest
   candidate of each pilot symbol gets a vote. The search ends when a vote
   counter passes a threshold set by the wanted false-alarm rate: 28 for
   P_FA = 1e-3 and 37 for P_FA = 1e-4.

Stage 2 needs one slot. A scheme that uses comma-free code sequences needs
at least three. Acquisition is therefore faster, and stage 2 costs less
memory (a 32 x 16 code ROM).

## Air interface assumed

| quantity | value |
|---|---|
| frame | 38400 chips = 15 slots of 2560 chips (10 ms at 3.84 Mchip/s) |
| P-SCH / S-SCH | first 256 chips of every slot, sent together |
| CPICH | whole slot, 10 pilot symbols of 256 chips, symbol value (1+j) |
| codes | 512 primary scrambling codes, 32 groups of 16 |
| input | 4-bit signed I and Q samples, one per chip |

The primary synchronisation code and the scrambling codes are those of the
W-CDMA standard (3GPP TS 25.213):

- P-SCH: a 16 x 16 hierarchical code, inner code
  a = <1,1,1,1,1,1,-1,-1,1,-1,1,-1,1,-1,-1,1> and outer pattern
  <a,a,a,-a,-a,a,-a,-a,a,a,a,-a,a,-a,a,a>.
- Scrambling code n: z(i) = x(i+n) + y(i). x uses X^18+X^7+1 and starts
  from x(0)=1, all other bits 0. y uses X^18+X^10+X^7+X^5+1 and starts from
  all ones. The Q chip is the same sequence 131072 chips later.
- Group g holds primary codes 16g .. 16g+15, which are code numbers
  n = 256g + 16k.

The S-SCH code words are this design's own (see stage 2). A transmitter must
use the same words.

## Stage 1: slot boundary (`psch_matched_filter`, `noncoherent_detect`, `slot_accumulator`)

The P-SCH is hierarchical, so the 256-tap correlator is built as two 16-tap
ones. Shift register 1 holds the last 16 chips, and adder tree 1 adds them
with the inner signs. Shift register 2 keeps 241 of these partial sums, and
adder tree 2 adds every 16th of them with the outer signs. That is 32
additions per chip instead of 256. The I and Q phases each have a filter. The
non-coherent detector forms I² + Q², so the carrier phase does not matter.

`slot_accumulator` keeps one running sum per chip position of the slot, a
2560-entry memory of 30-bit words. The first slot writes it, and later slots
read, add and write back. During the last of `N_SLOTS` slots a comparator
tracks the largest sum. Its position, corrected for the two-chip filter
latency, is the slot boundary: the index within the slot of the **last** chip
of the P-SCH.

## Stage 2: cyclic-code burst and its decoder (`sch_sampler`, `cyclic_code_rom`, `ssc_matched_filter`, `ssc_decoder`)

**Burst format.** Let c_g(k) = ±1 be bit k of group g's 16-bit ROM word
(1 means −1). In slot s, chip 16m+i of the 256-chip burst is

    c_g(i) · c_g((m + s) mod 16)

The inner code is the word, and the outer code is the same word rotated by
the slot number. The 32 words were chosen by a search for three properties,
all checked by `tb_cyclic_code_rom`:

- every word is orthogonal to the P-SCH inner code, so the P-SCH sent at the
  same time gives zero in the first adder tree;
- periodic autocorrelation sidelobes are at most 4 of 16, so wrong slot
  numbers of the right group reach at most 64 of 256;
- any two of the 480 group/slot bursts correlate to at most 96 of 256.

**Capture.** The sampling counter in `sch_sampler` counts chip positions the
same way stage 1 does. A 256-deep buffer follows the input. When stage 1 is
done, the buffer freezes right after the chip at the slot-boundary position
enters it. It then holds exactly one burst, and the slot that follows can
keep arriving without disturbing it.

**Search.** `ssc_decoder` runs on the fast clock. For each group it:

1. loads the group's word into both code registers of the I and Q matched
   filters;
2. shifts the 256 buffered chips through matched filter 1, one per cycle.
   Every 16 chips the partial sum moves into shift register 2;
3. rotates code register 2 by one chip per cycle. Each rotation is the next
   slot hypothesis, and matched filter 1 does not run again. Each hypothesis
   goes through I² + Q² and a comparator that keeps the best group/slot pair.

This takes 1 + 256 + 1 + 15 = 273 cycles per group and 8739 cycles from start
to done for 32 groups. At 5 fast cycles per chip that is 1748 chips. The next
slot starts 2305 chips after the end of the burst, so the result is ready in
time. The decoder would need about 8700 cycles at the chip rate, and a slot
has only 2560 chips. That is why the fast clock is needed.

## Stage 3: scrambling code (`frame_timer`, `scr_phase_rom`, `scr_code_gen`, `descrambler`, `vote_counter`, `code_decision`)

**Timing.** The burst ended at chip B of slot s, so slot s started at
B − 255. `frame_timer` counts later slot starts from s, flags slot 0 as the
frame start, and starts stage 3 at the first slot start after stage 2. From
then on it marks the first and last chip of every 256-chip pilot symbol.

**One generator for 16 codes.** `scr_phase_rom` holds, for each group, the
x-register state 256·g chips into the x sequence. It is computed at
elaboration as x(d) = coefficient 0 of X^d mod (X^18+X^7+1). A masking
function ANDs the register with a constant and reduces it with XOR. Mask
X^d mod p(X) gives the sequence d chips ahead. `scr_code_gen` uses:

- masks X^(16k) for the I chip of code k;
- masks X^(16k+131072) for its Q chip;
- mask X^131072 on y, for Q.

That is 33 masks, one pair of 18-bit registers, and a 32 x 18 ROM. Sixteen
separate generators would need 16 times the registers and a 512 x 18 ROM.

**Starting mid-frame.** A scrambling code starts at chip 0 of each frame.
Stage 3 starts at the next slot, not the next frame. On `load` the generator
takes the frame-start state. It then applies a constant "advance 2560 chips"
matrix (18 masks per register) once per slot number, one per fast-clock cycle.
After at most 14 cycles it holds the state for the first chip of the slot
where stage 3 begins. An assertion in the top checks that the jump has ended
when stage 3 starts. At every later frame start the generator reloads from
the ROM.

**Descrambling and voting.** Each descrambler multiplies the chips by the
conjugate of its candidate code:

    I' = rI·ci + rQ·cq
    Q' = rQ·ci − rI·cq

It integrates I' and Q' over a 256-chip pilot symbol and outputs I'² + Q'².
The right code gives 2·(512·A)² for pilot amplitude A. A comparator tree
(16 → 8 → 4 → 2 → 1) picks the strongest candidate of each symbol, and its
counter is incremented. A second tree finds the largest counter. When that
counter exceeds `THRESHOLD`, `code_found` rises and `long_code` = 16·group +
index is latched. Ties go to the lower index everywhere.

## Acquisition time

A search takes about `N_SLOTS` slots for stage 1, at most one slot until the
burst, one slot for stage 2 and the stage-3 start, and `THRESHOLD`+1 pilot
symbols. Simulated with a clean signal (sparse ±1 noise, random code, offset and
90° carrier rotation, `tb_acquisition_sweep`):

| stage-1 slots | threshold 28 (P_FA 1e-3) | threshold 37 (P_FA 1e-4) |
|---|---|---|
| 2  | 3.91 ms | 4.51 ms |
| 4  | 5.25 ms | 5.85 ms |
| 8  | 7.91 ms | 8.51 ms |
| 15 | 12.58 ms | 13.18 ms |

These are close to the values published for this architecture: about
3.8 / 6.0 / 8.0 / 13.6 ms and 4.3 / 7.2 / 8.6 / 14.2 ms, measured in AWGN.
The exact figures here depend on where in the slot the receiver starts.

## Top level (`cell_search_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | fast clock (5 × chip rate in the reference design) |
| rst_n | in | 1 | asynchronous reset, active low |
| enable | in | 1 | search enable; gates the chip strobe |
| chip_valid | in | 1 | one pulse per chip |
| din | in | iq_t (2 × 4) | signed I and Q sample of the chip |
| stage1_done, slot_boundary | out | 1, 12 | slot boundary found; last P-SCH chip position in the slot |
| stage2_done, code_group, slot_id | out | 1, 5, 4 | group and slot number of the captured burst |
| frame_sync | out | 1 | stage 3 running with frame timing |
| code_found, long_code | out | 1, 9 | primary scrambling code 0..511 |

| parameter | default | meaning |
|---|---|---|
| N_SLOTS | 15 | slots accumulated in stage 1 (2, 4, 8 and 15 were evaluated) |
| THRESHOLD | 28 | votes to exceed: 28 for P_FA = 1e-3, 37 for P_FA = 1e-4 |

The published design uses two clocks, the chip-rate system clock and a 5×
clock. Here there is one clock, the fast one, and `chip_valid` acts as the
system-clock enable. That removes the clock-domain crossing, and the timing
budget is the same. `chip_valid` must be at most one cycle in five, because
stage 2 relies on that ratio. The search runs once after reset: a failed
stage 3 does not restart stages 1 and 2.

## What is this design's own

The architecture follows the published design: stage structure, block
partitioning, hierarchical matched filters, ROM sizes, masking-function code
generator, descramblers, two comparator blocks, thresholds, 4-bit input, and
15-slot accumulation. These parts are this design's own:

- the 32 cyclic code words and the burst format built from them;
- the serial decoder schedule;
- the slot-jump matrix in the code generator, which lets stage 3 start at
  the next slot;
- one vote per 256-chip pilot symbol, after coherent integration over the
  symbol;
- all widths, latencies, tie rules and reset behaviour;
- the single-clock-with-enable clocking.

Where this RTL departs from the published design, or goes beyond what it
states:

- **Masks.** The published design names sixteen masking functions. Sixteen
  are enough for the real parts of the 16 codes. The imaginary parts need 16
  more on x and one on y, so there are 33 here, plus the jump matrix.
- **Threshold.** The published thresholds come from P_FA = exp(−T/V), where V
  is twice the noise variance per component. They are then compared with the
  vote counter. This RTL does the same: `THRESHOLD` is a vote count, and a
  count above it ends the search. The noise power is not estimated in
  hardware, so for another channel `THRESHOLD` must be recomputed and set
  as a parameter.
- **Noise.** The published acquisition times were measured in AWGN at high
  SNR. The testbenches add sparse noise of ±1 LSB (a quarter of the samples on
  each component) to a clipped 4-bit signal.
  Detection under real noise levels has not been characterised.
- **Size.** The published FPGA mapping (Virtex-E XCV1000E: 9086 slice
  registers, 7354 LUTs, 22 MHz) has not been repeated. Generic synthesis of
  this RTL gives about 8300 flip-flop bits and 78 kbit of memory. Most of the
  memory is the 2560 x 30 stage-1 accumulator, which an FPGA would put in
  block RAM.
- **Retries.** The published design does not say what happens after a
  failed search. Here the search runs once. Pulse `rst_n` to start again.

The comparison scheme with comma-free codes and a Fast Hadamard Transformer
in stage 2 is not included. Its acquisition-time curves therefore have no
counterpart here.

## Files

- `rtl/csd_pkg.sv` – constants, the sample types and GF(2) constant functions.
- `rtl/*.sv` – one module per file, named as above.
- `tb/csd_ref_pkg.sv` – independent reference models: chip-by-chip codes,
  brute-force LFSR sequences and a transmitter model.
- `tb/tb_<module>.sv` – a self-checking testbench per module.
- `tb/tb_cell_search_top.sv` – end to end with 3 stage-1 slots.
- `tb/tb_cell_search_full.sv` – end to end with all defaults.
- `tb/tb_acquisition_sweep.sv` – the table above.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator 5:

    verilator --binary --timing --assert --top-module tb_cell_search_full \
      -y rtl -y tb +libext+.sv rtl/csd_pkg.sv tb/csd_ref_pkg.sv \
      tb/tb_cell_search_full.sv -o sim
    ./obj_dir/sim

Run from the directory that holds `rtl/` and `tb/`. The full-size test
simulates under 100,000 chips (five clocks each) and takes seconds.
