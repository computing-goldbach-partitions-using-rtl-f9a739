# Goldbach partition co-processor: a systolic array with carry-free counters

The binary Goldbach partition G2(K) of an even number K is the number of
ordered pairs of primes (p1, p2) with p1 + p2 = K. For example G2(22) = 5:
3+19, 5+17, 11+11, 17+5 and 19+3. Counting G2 for every even number up to
10^8 means about 10^15 prime-pair tests, which takes years in software.

This RTL computes G2 for N = 256 consecutive even numbers at once. It uses a
linear systolic array of N identical cells. Each cell needs only:

- two 1-bit stream registers and one delay register;
- an AND gate;
- a 27-bit event counter.

The counter is not a binary adder. It is built from two pseudo-random bit
generators (PRBGs), so it has no carry chain. The clock period is set by one
small per-bit function, whatever the counter's width. In exchange the count
comes out in a coded form, which the host decodes after the run.

The host side sits behind a plain word interface:

- the host streams two bit vectors (prime flags) into the array;
- it requests read-back;
- it receives the 256 coded counts as 16-bit words.

## How the array pairs the primes

The host computes prime flags for odd numbers and sends two streams, one bit
of each per systolic step:

    V1 = prime(1), prime(3), prime(5), ...                      (ascending)
    V2 = prime(P+2N-3), prime(P+2N-5), ..., prime(3), prime(1)  (descending)

Each stream is L = (P+2N-2)/2 bits long, and zeros follow. The two streams
move at different speeds:

- V1 moves right through two registers per cell;
- V2 moves right through one register per cell, so it travels twice as fast.

A descending stream that overtakes an ascending one at twice its speed meets
it at a fixed place for a fixed sum. Cell j (0 = leftmost) always holds a
pair of odd numbers (x1, x2) with

    x1 + x2 = K_j = P + 2N - 2 - 2j

On every step it sees a new pair, x1 = 1, 3, 5, ... in turn. The cell
increments its counter when both flags are 1. When the streams have passed,
cell 0 holds G2(P+2N-2) and cell N-1 holds G2(P). Cell j sees every ordered
pair, not only half, so no doubling or middle-term correction is needed.

Timing of a pass:

- L steps of data, then 2N steps of zeros to flush the pipeline (the last
  pair the rightmost cell needs arrives about 2N steps after the data ends);
- in total (P+2N-2)/2 + 2N steps, that is about P/2 steps for P >> N;
- one step is one clock when the host keeps up.

A pass needs about P/2 steps for N results. A processor evaluating G2
directly needs about P/4 tests per result, even when it uses the symmetry of
the pairs. The array therefore gains a factor of about N/2 in steps. To cover
all even numbers up to M, the host runs passes over
[P, P+2N-2] = [4, 514], [516, 1026], and so on.

## The carry-free counter

Each counter (`prbg_counter`) steps through the sequence of the recurrence

    x = MSB(c);  c = c << 1;  if (x == 0) c = c ^ KEY;

from c = 0. The n-th state of this sequence stands for the count n. Written
bit by bit, bit i takes its next value only from bit i-1, the MSB and its key
bit:

| key bit | next c_i while counting | next c_i in read-back |
|---------|-------------------------|-----------------------|
| 0       | c_(i-1)                 | c_(i-1)               |
| 1       | x ? c_(i-1) : ~c_(i-1)  | c_(i-1)               |

In count mode c_(-1) is 0. In read-back mode it is the serial input. The
state holds when neither `inc` nor `readback` is asserted. The key is fixed,
so each bit is generated as one of the two functions above. The design has
no XOR with a key register.

A single 27-bit generator would need a 2^27-entry table to turn a state back
into a count. The cell therefore uses two short generators that step
together:

| generator | width | key | period from 0 |
|-----------|-------|-----|---------------|
| A         | 13    | 9   | 8001          |
| B         | 14    | 7   | 16382         |

The two periods are coprime. The pair of states therefore identifies every
count below 8001 × 16382 = 131,072,382, which covers every count that can
occur for numbers up to 1.28 × 10^8.

To decode a cell:

1. Look up n1 = the position of state A in A's sequence (8001 entries) and
   n2 = the position of state B in B's sequence (16382 entries).
2. Combine them by the Chinese remainder theorem:
   `G = n1 + 8001 * (((n2 - n1) * u) mod 16382)`, where u is the inverse of
   8001 mod 16382.

The testbench package `goldbach_tb_pkg` does exactly this. The periods are
not built into the hardware. They follow from the keys and are recorded in
`goldbach_pkg` as `PERIOD_A` and `PERIOD_B` for reference.

## Read-back chain

The counters are unloaded through their own shift capability. With
`readback` high, every counter bit copies its right-hand neighbour. The
counters of all cells then form one shift register of N × 27 = 6912 bits:

    (0 at the rightmost cell) -> cell N-1 -> ... -> cell 0 -> rb_out
    inside a cell:  rb_in -> A[0] .. A[12] -> B[0] .. B[13] -> rb_out

`rb_out` shows the next bit before each shift, so the stream is, in order:

1. cell 0: B[13] down to B[0];
2. cell 0: A[12] down to A[0];
3. cell 1: B[13] down to B[0], and so on.

Zeros enter at the far end, so a complete read-back leaves every counter at
zero, ready for the next pass. Read-back does not move the V1/V2 registers.
These are zero anyway once a pass has been flushed.

## Host interface

`host_interface` is a three-mode automaton (compute, drain, read-back).

**Input.** The host sends 16-bit sub-vector words over `in_valid`/`in_ready`,
alternately a V1 word and a V2 word, V1 first. Bit 0 of each word is used
first. A complete pair is staged while the previous pair shifts, so a host
that keeps up gets one array step per clock. Whenever no pair is ready,
`step` is low and the whole array freezes. This stall must be array-wide:
V1 and V2 travel at different speeds, so a bubble inserted into only the
input would misalign them. The host must end each pass with zero words
covering at least 2N steps.

**Read-back.** A pulse on `rb_req` moves the automaton to drain mode:

1. A half-sent pair may still be completed, and the staged bits enter the
   array.
2. The automaton shifts the chain 6912 times, packing the bits into 16-bit
   words (first bit in bit 0; 6912 bits make exactly 432 words).
3. The words go out over `out_valid`/`out_ready`, with `out_last` on the
   final word. Shifting stalls while the host holds off `out_ready`.
4. The automaton returns to compute mode.

Two assertions guard the interface:

- the array never counts and shifts in the same clock;
- an output word that has been offered stays unchanged until it is taken.

## Files

| file | contents |
|------|----------|
| `rtl/goldbach_pkg.sv` | sizes, keys, periods, the automaton's mode type |
| `rtl/prbg_counter.sv` | PRBG counter with read-back shifting |
| `rtl/goldbach_cell.sv` | one systolic cell: stream registers, AND, two counters |
| `rtl/systolic_array.sv` | chain of N cells, stream and read-back wiring |
| `rtl/host_interface.sv` | deserializer, serializer, automaton |
| `rtl/goldbach_top.sv` | host interface plus array (top level) |
| `tb/goldbach_tb_pkg.sv` | sieve, G2 reference, stream bits, state decoding |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus a full-size run |

Parameters of the top (defaults): `N` = 256 cells, `WA` = 13, `KEY_A` = 9,
`WB` = 14, `KEY_B` = 7, `W` = 16. The RTL contains no chip-specific
primitives. The reset is synchronous and active high, and clears every
register.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>`. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      rtl/goldbach_pkg.sv tb/goldbach_tb_pkg.sv tb/tb_goldbach_top_full.sv \
      --top-module tb_goldbach_top_full -o sim && ./obj_dir/sim

| testbench | what it shows |
|-----------|---------------|
| `tb_prbg_counter` | states match the recurrence under random inc/read-back; periods 8001, 16382, and 6 for a 4-bit key-5 generator |
| `tb_goldbach_cell` | stream delays of 1 and 2 registers, coincidence counting and chain order against a cycle model, for the full-size cell and a 9-bit cell (4-bit and 5-bit generators, key 5) |
| `tb_systolic_array` | 8 cells, three passes (P = 4, 100 with random stalls, 10000); all decoded counts equal sieve counts; read-back clears |
| `tb_host_interface` | bit order, one step per clock, stalls, packing and padding of read-back words, back-pressure, drain before read-back |
| `tb_goldbach_top` | 8 cells end to end through the word interface, three passes; counts stalls, read-back stalls, mode switches and coincidences |
| `tb_goldbach_top_full` | default 256-cell top, one complete pass for P = 999,490, so G2(999,490) .. G2(1,000,000); checks all 256 counts and the step rate; about 6 s |
| `tb_goldbach_workload` | default top, the first 30 passes of a sweep (G2(4) .. G2(15362)) back to back without reset, then the last pass of the run up to 5 × 10^6; 8030 checks, about 45 s |

## Departures and choices

These points follow from the structure rather than from an explicit
specification:

- **Which stream is slowed.** The extra register per cell is on V1, the
  ascending stream. This is the only arrangement in which the leftmost cell
  gets the largest K.
- **F1 function.** A key-1 bit takes `x ? c_(i-1) : ~c_(i-1)`, derived
  directly from the recurrence.
- **Generator mapping.** The 14-bit, key-7 generator is B, the wider one,
  and sits nearer the cell's serial output.
- **Host interface.** The protocol described above is this design's own:
  handshakes, word order, bit order, read-back request, stall and flush by
  zero words. Only the alternating 16-bit sub-vectors are given.
- **Stall.** `step` is a global enable. An FPGA build might gate the clock
  instead.
- **Prime flags are host data.** The testbenches treat 1 as not prime. A host
  that flags 1 as prime would count the pair (1, K-1) as well.
- **Scope.** The host computer, its bus, the board and the decoding software
  are outside this RTL. The top exposes the valid/ready word port in their
  place.
- **Cascading.** The far-end stream outputs (`v1_tail`, `v2_tail`) are
  brought out so that arrays split across devices can be cascaded. The
  design itself is one chain of N cells.

## Scale

The design uses 30 flip-flops per cell, 7807 in all at N = 256. A run over
all even numbers up to M needs M/512 passes.

- Every count is below M/2 + 512. This stays under the 131,072,382 limit of
  the counter pair for all M up to 1.28 × 10^8.
- Summed over all passes, the steps come to about M²/2048. For M = 10^8
  that is about 4.9 × 10^12 steps, or about 45 hours at 30 MHz, if the host
  can feed one step per clock.
- The host link, which must carry two bits per step, usually sets the real
  speed.
- The largest pass simulated is P = 5 × 10^6 - 510, about 2.5 million
  steps. A pass near 1.28 × 10^8 takes 6.4 × 10^7 steps, which is too long
  for routine simulation.
