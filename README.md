# Sliding-window log-MAP decoder with OACS recursion units

This is synthesizable SystemVerilog for a real-time soft-output decoder of a rate-1/2
recursive systematic convolutional code. It takes a continuous stream of received soft values,
one symbol per clock, and returns for every information bit its log-likelihood ratio (LLR), in
natural order, after a fixed delay. Five decoders are provided, on five different schedules,
plus a pair of the fifth kind that share their memory. The top module runs them side by side on
the same input:

| decoder | recursion units | stored state vectors | delay (clocks) |
|---|---|---|---|
| `map_decoder_nb2` | 3 | L (plus an L-entry LLR buffer) | 4L + 1 |
| `map_decoder_nb3` | 4 | L/2 | 3L + 1 |
| `map_decoder_pt` | 4 | 3 + L/4 | 4L + 1 |
| `map_decoder_na2` | 3 + 1 simplified | L/2 (plus L decisions/offsets, L/2 LLRs) | 4L + 1 |
| `map_decoder_mab` | 3 (and 2 LLR units) | L/2 A + L/2 B (plus an L-entry LLR buffer) | 4L + 1 |
| `map_decoder_mab_pair` | 2 × 3 (two streams) | L/2 A + L/2 B for both decoders | 4L + 1 |

Two ideas make them practical in hardware:

* **Sliding window with several backward units.** The backward recursion of the MAP
  (forward-backward, BCJR) algorithm would normally need the whole block first. Instead, a
  backward recursion started from an arbitrary (all-zero) vector reaches the true backward
  metrics, up to a common constant that cancels in the LLR, after L steps. L is the
  *convergence length*. Backward units keep restarting on short stretches of the stream, so
  that converged backward metrics are always available for the LLR.
* **Offset-Add-Compare-Select (OACS) kernel.** The recursion step is an add-MAX* operation,
  MAX*(x, y) = max(x, y) + ln(1 + e^-|x-y|). The usual ordering adds the correction term at the end
  of the step. That puts two carry-propagate additions in the feedback loop. Here the register
  sits before the correction is added. The correction is then added at the start of the next
  step, so the loop holds one carry-propagate adder.

The schedules are the (n_A = 1, n_B = 2, M_A), (n_A = 1, n_B = 3, M_B), pointer-based
(n_A = 1, n_B = 3, M_B, Pt_B), (n_A = 2, n_B = 2, M_B) and (n_A = 1, n_B = 2, M_(A+B)/2)
organisations described by Boutillon, Gross and Gulak in "VLSI Architectures for the MAP Algorithm" (IEEE
Trans. Commun., 2003). n_A and n_B count the forward and backward units; M_A or M_B says whether
the forward or the backward vectors are stored, and Pt_B that some backward vectors are kept
only as restart points ("pointers") and recomputed. That paper is the source of the schedules, the
kernel, the correction table and the state-metric bound used for the widths. The section "Choices made here" lists what it does not fix.

## The code and the numbers

The code is the 4-state recursive systematic code with feedback polynomial 7 and parity
polynomial 5 (octal). Encoder state `s = {r1, r2}`, where r1 is the newer register bit. For
input u the feedback node is `a = u ^ r1 ^ r2`, the code bits are `c0 = u` and `c1 = a ^ r2`,
and the next state is `{a, r1}`. Code bit 1 is sent as +1 and code bit 0 as −1.

Every soft value is two's complement with 3 fraction bits (one quantum = 0.125):

| quantity | width | range |
|---|---|---|
| input y^i/σ² (`y0`, `y1`) | 7 | −7.875 … 7.875 |
| branch metric G' = y0·c0 + y1·c1 | 8 | −15.75 … 15.75 |
| state metric, LLR | `NSM` = 12 | modulo 4096 quanta |
| MAX* correction | 3 | 0 … 0.75 |

Terms common to all branches are dropped from the branch metric, because MAX* is shift
invariant: MAX*(x+z, y+z) = MAX*(x, y) + z. A punctured component gets c = 0, so its term is
dropped. The `punct` input flags it.

**Modulo state metrics.** State metrics are never rescaled. They wrap around modulo 2^NSM, and
every comparison uses the wrapped difference of two metrics. This is exact while the true
difference of any two compared quantities stays below 2^(NSM−1) = 2048 quanta.

For this code, take the all-zero path received at maximum reliability (y0 = y1 = −7.875).
That drives the spread between the largest and smallest state metric to its limit: 47.25 = 378
quanta. The stationary forward vector is (47.25, 0, 15.75, 0). The largest difference the LLR
unit compares is two spreads plus two branch metrics: 2·378 + 2·126 = 1008 quanta. Twelve bits
cover that with a margin of two. They also cover the cruder bound (2M + ln 2)·ν = 64.375.

**MAX* correction.** `maxstar_lut` returns round(8·ln(1 + e^(−d/8))) for d = |x−y| in quanta.
A zero flag forces 0 once d ≥ 32 (|x−y| ≥ 4.0). Below that, the five low bits of d address a
32-entry table of 3-bit words: 6, 5, 5, 4, 4, 3, 3, 3, 3, 2, 2, 2, 2, then 1 for d = 13…21 and
0 above. With this rounding, the recursion reproduces the published eight-step state-metric
table of the all-zero example exactly. `tb_recursion_unit` checks this.

## The first schedule: two backward units (`map_decoder_nb2`)

Time is cut into segments of L enabled cycles. Symbols are grouped into blocks of L. During
segment T the incoming block is block T. One symbol y_k arrives per cycle. Index conventions:
A_k is the forward vector before symbol k, and B_{k+1} is the backward vector after it. So

    A_{k+1}(s) = MAX*_{s'} (A_k(s') + G_k(s',s))
    B_k(s')    = MAX*_{s}  (B_{k+1}(s) + G_k(s',s))
    L(u_k)     = MAX*_{u=1}(A_k(s') + G_k(s',s) + B_{k+1}(s)) − MAX*_{u=0}(same)

| unit | works in segment T on | direction | starts from |
|---|---|---|---|
| symbol buffer write | block T | — | — |
| RU_B1 (convergence) | block T−1 | backwards | all-zero vector, every segment |
| RU_A (forward) | block T−2 | forwards | its own vector (A_INIT once, at block 0) |
| RU_B2 (decoding) | block T−3 | backwards | RU_B1's registers at the end of segment T−1 |
| LLR unit | block T−3, reverse order | — | A from the SVM, B from RU_B2 |
| LLR output | block T−4, natural order | — | read back from the LLR reversal memory |

The hand-over works like this. In segment T−1, RU_B1 runs over block T−2, from its last symbol
down to its first. It ends holding the vector at the start of block T−2, which is also the
vector at the end of block T−3. That is exactly where RU_B2 must start in segment T. At the
first step of a segment, RU_B1 is loading its own zero vector. Its *registers* still hold the
converged vector, and RU_B2 loads from them (`sm_reg`).

**Order reversal without dual-port memories.** RU_A writes A_k in increasing k. RU_B2 needs
them in decreasing k one segment later. The state vector memory (SVM) has L words of 4·12 bits.
Each cycle it reads and writes the same address. A single counter produces that address: it
counts 0…L−1 in one segment and L−1…0 in the next. So each read returns the word written L−1−j
steps earlier, and the new word takes its place. The LLRs come out of the LLR unit in reverse
order, and a second memory of the same kind, L words of 12 bits, reverses them back.

**Symbol storage.** The memory stores the received symbols, not branch metrics. There are 4
banks of L symbols: one bank is written, and the other three are read, one per recursion unit.
Each unit computes its own branch metrics. The bank roles rotate every segment, so each bank has
one access per cycle.

**Fill.** After reset the controller counts segments. RU_A loads A_INIT at the start of segment
2. By default A_INIT is the stationary vector, so the first symbol is decoded as starting in
state 0, and the metric spread never exceeds its bound. The LLR path starts in segment 3, and
`out_valid` first rises in segment 4.

**Cost of this organisation.**
* 3 recursion units: 12 OACS elements.
* L state vectors of storage.
* 4L symbols of storage.
* L LLRs of storage.
* Latency 4L.
* 3 recursion steps per decoded bit.

## The second schedule: three backward units (`map_decoder_nb3`)

Adding a backward unit shortens both the delay and the vector memory. Time is now cut into
half-segments of H = L/2 enabled cycles, and symbols into half-blocks of H. Every half-segment
one backward unit restarts from the all-zero vector and runs for 3H = L + L/2 steps: L steps of
convergence and then H steps whose vectors are used. The three units take turns, so in
half-segment S unit u is in phase p = (S − u) mod 3 and works backwards on half-block S − 1 − 2p:

| phase | half-block | what the unit does |
|---|---|---|
| 0 | S − 1 | restarts from zero, converges |
| 1 | S − 3 | converges (L steps over phases 0 and 1) |
| 2 | S − 5 | writes B_{k+1} of every symbol into the B memory |
| RU_A | S − 6 | runs forwards, reads B back, LLR unit computes L(u_k) |

Because the backward vectors are the ones stored, and the forward unit runs in natural order,
the LLRs come out of the LLR unit in natural order and need no reversal. The B memory holds H
vectors and uses the same single-address, up/down trick as the SVM above: the phase-2 unit
writes B in decreasing k, and RU_A reads them one half-segment later in increasing k while the
next half-block's vectors take their place.

The symbol memory has 8 banks of H: one is written, and four are read (three backward units and
RU_A); the oldest is 6 half-blocks back. RU_A loads A_INIT once, at half-segment 6, which is also
when `out_valid` first rises.

**Cost of this organisation.**
* 4 recursion units: 16 OACS elements.
* L/2 state vectors of storage and no LLR memory.
* 4L symbols of storage.
* Latency 3L.
* 4 recursion steps per decoded bit.

## The third schedule: recomputing from pointers (`map_decoder_pt`)

This decoder keeps the first schedule's two backward units and its 4L delay, but replaces the
L-vector memory with 3 saved vectors and a memory of only Q = L/4 vectors. A third backward
unit recomputes backward metrics shortly before they are needed, starting from vectors that
were saved earlier on the way down. Those saved vectors are the pointers.

In segment T (quarters qq = 0…3 of Q cycles each):

| unit | works on | what it does |
|---|---|---|
| RU_B1 | block T−1, backwards | converges from the all-zero vector |
| RU_B2 | block T−3, backwards | starts from RU_B1's vector; at j = 0, Q, 2Q saves B at the top of quarters 3, 2, 1 as pointers; in quarter 3 it processes quarter 0 and writes those B vectors to the B memory |
| RU_B3 | block T−4, backwards | in quarter qq < 3, restarts from the pointer of quarter qq + 1 and writes that quarter's B vectors to the B memory |
| RU_A + LLR | block T−4, forwards | in quarter qq reads the B vectors of quarter qq, written in the quarter before |

So each quarter's backward vectors are produced, in decreasing order, exactly one quarter
before the forward unit consumes them in increasing order. The single-address up/down memory of
Q words reverses them, its direction changing every quarter. The LLRs come out in natural order.

A restart loads the full metric with a zero offset, so RU_B3 repeats RU_B2's computation
exactly. The LLRs are bit-identical to those of `map_decoder_nb2`.

**Three pointer registers.** Pointers of block T−4 are consumed in quarter order 1, 2, 3, at
j = 0, Q, 2Q of segment T. At those same steps, RU_B2 saves the pointers of block T−3 for
quarters 3, 2, 1. Each step therefore frees one register and fills one. The register read at
that step is overwritten with the new pointer at the same clock edge. The quarter-2 pointer
always lives in register 1. Registers 0 and 2 swap roles every segment: the register that held
the old quarter-1 pointer receives the new quarter-3 pointer, and vice versa.

Symbols are kept in 5 banks of L (one written, four read).

**Cost of this organisation.**
* 4 recursion units (RU_B3 is idle one quarter in four).
* 3 + L/4 state vectors of storage, small enough for flip-flops instead of a RAM.
* 5L symbols of storage.
* Latency 4L.

## The fourth schedule: two forward units that meet the backward unit (`map_decoder_na2`)

Here the second backward unit RU_B2 and a forward unit RU_A1 sweep the same block at the same
time, in opposite directions, and cross in the middle. In segment T, RU_B1 converges over block
T−1 as before, and RU_B2 (seeded by RU_B1) and RU_A1 both work on block T−3:

* **Upper half of the block.** RU_B2 passes it first, in the lower half of the segment, and its
  B vectors are stored. RU_A1 reaches the same symbols in the upper half of the segment, and the
  LLR unit combines the stored B with RU_A1's A immediately.
* **Lower half of the block.** RU_A1 passes it before RU_B2 does, so its A vectors are gone by
  the time B is available. Instead of storing them, a second forward unit RU_A2 recomputes them
  one segment later, while the stored B vectors of that half wait.

Both halves share one B memory of L/2 vectors with the single-address, up/down scheme, whose
direction changes every half-segment. Each half-block is written in decreasing order and read
back in increasing order in the next half-segment.

**Replaying a forward recursion.** RU_A2 repeats RU_A1's computation exactly, L cycles later. So
it does not need to compare anything: RU_A1's decision (which predecessor won) and correction
offset, per state and step, are kept for L cycles (L words of 4 + 4·3 bits). RU_A2 is a
`forward_copy_unit` of `simplified_acso_unit` elements. The decision selects the predecessor
metric and its branch metric; those are added, the stored offset is added, and the result is
registered. It has no subtractor and no correction table, roughly half an element. Started from
the same A_INIT, it reproduces RU_A1's metrics bit for bit.

**Output order.** The one LLR unit serves RU_A2 (lower half of block T−4) in the first half of
each segment and RU_A1 (upper half of block T−3) in the second. The upper-half LLRs are held
for one segment in an L/2-word delay memory. So the output carries block T−4 in natural order,
4L after the input, with the same values as the first decoder.

**Cost of this organisation.**
* 3 full recursion units and 1 simplified unit.
* L/2 state vectors, plus L × 16 bits of decisions and offsets and L/2 LLRs.
* 5L symbols of storage.
* Latency 4L.

## The fifth schedule: half forward, half backward vectors (`map_decoder_mab`)

This decoder has the same three units as the first, and also lets RU_B2 and RU_A cross. In
segment T, RU_B1 converges over block T−1, and RU_B2 (seeded by RU_B1) and RU_A sweep block T−3
in opposite directions:

* **Lower half of the segment.** RU_B2 passes the upper half of the block and stores its B
  vectors. RU_A passes the lower half and stores its A vectors. Each goes into its own memory of
  L/2 vectors.
* **Upper half of the segment.** Each unit now reaches the symbols whose partner vector was
  stored. Two LLR units work at once:
  * one combines RU_A's A with the stored B, for the upper half of the block in increasing
    order;
  * the other combines the stored A with RU_B2's B, for the lower half in decreasing order.

So all L LLRs of a block come out in the last L/2 cycles of a segment. Each LLR unit writes its
own L/2-word output memory, and the next segment reads both in natural order. This gives the
same 4L latency and the same LLR values as the first decoder.

Both state memories use the single-address up/down scheme, with the direction changing every
half-segment. Reads and writes of the two halves never overlap in time. The decoder shares its
controller with the fourth decoder, since the unit roles are the same up to the fourth decoder's
replay unit. It keeps that controller's 5-bank symbol rotation, although only four banks are
used.

**Cost of this organisation.**
* 3 recursion units and 2 LLR units.
* L/2 A vectors plus L/2 B vectors.
* An L-entry LLR buffer.
* Latency 4L.

**Two decoders sharing the memories (`map_decoder_mab_pair`).** The source proposes this
schedule mainly for two decoders working in parallel on two streams. A decoder writes its state
memories only in the lower half of a segment and reads them only in the upper half. So if the
second decoder runs half a segment behind the first, their halves alternate. In every cycle,
the word at the common up/down address is read for one decoder and overwritten by the other.
The two L/2 memories then serve both decoders, which halves the state memory per decoder.

In the pair, stream 0 is taken from reset. Stream 1 is taken once `in1_accept` rises, after
the first L/2 enabled cycles. `in_valid` is shared, so a stall holds both streams. Each stream
gets its LLRs 4L enabled cycles after its symbols. The two LLR output memories stay private to
each decoder.

## How the decoders differ in their LLRs

The backward units of the second decoder start at half-block boundaries, so each LLR uses a
convergence length between L and L + L/2 − 1 steps. The other decoders' is between
L and 2L − 1. The second decoder therefore gives slightly different LLRs for the same input
than the others, which agree with each other exactly. Each decoder is checked against a reference that models its own windows.

## The OACS element

`oacs_unit` keeps two registers per state: `m = A_k(s) − offset` and `offset` (3 bits). One
step works like this:

1. Add each predecessor's offset to its `m` (the only carry-propagate addition in the loop).
2. Add the branch metric.
3. Subtract the two sums. The sign bit selects the larger sum into `m`.
4. Look up the magnitude of the difference in the correction table. The result goes into
   `offset`.

The full metric is `m + offset`. `recursion_unit` forms it outside the loop for the SVM, the LLR
unit and the seed hand-over. The cost is three offset flip-flops per state. The element also
outputs the decision and offset of each step, which the fourth decoder stores for its replay
unit.

## Interfaces

`map_decoder_nb2`, `map_decoder_nb3`, `map_decoder_pt`, `map_decoder_na2` and
`map_decoder_mab` have the same ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `in_valid` | in | 1 | a symbol is present; when low, the whole decoder holds for that cycle |
| `y0`, `y1` | in | 7 | systematic and parity soft values y/σ², 3 fraction bits |
| `punct` | in | 2 | bit i set: component i was punctured |
| `out_valid` | out | 1 | `llr`/`bit_out` carry the next decoded bit (natural order) |
| `llr` | out | 12 | L(u_k), signed, 3 fraction bits; positive means bit 1 |
| `bit_out` | out | 1 | hard decision, `llr > 0` |

`map_decoder_top` shares the inputs between all of them and renames the outputs `nb2_valid`,
`nb2_llr`, `nb2_bit`, `mab_valid`, `mab_llr`, `mab_bit`, `pair0_valid`, `pair0_llr`,
`pair0_bit`, `pair1_valid`, `pair1_llr`, `pair1_bit`, `nb3_valid`, `nb3_llr`, `nb3_bit`, `pt_valid`, `pt_llr`, `pt_bit` and
`na2_valid`, `na2_llr`, `na2_bit`. The pair's second stream enters on `pair1_y0`, `pair1_y1`
and `pair1_punct` while `pair1_accept` is high. Use one decoder on its own if you need only one.

Timing: the symbol accepted in enabled cycle n produces its result with `out_valid` high in
the clock after enabled cycle n + 4L (all but the second decoder) or n + 3L (second decoder). The stream is continuous and has no block boundaries. To
flush the last bits, feed about 4L (or 3L) more symbols. Each output needs the block after it for
convergence.

Parameters: `L` (default 64) and `A_INIT`. The code, widths and polynomials are in `map_pkg`.
The trellis wiring of the recursion units and of the LLR trees is derived there from `NU`,
`FB_POLY` and `FF_POLY`. If you change the code, also change `A_INIT`. Also re-derive the spread
bound before shrinking `NSM`.

## Files

| file | contents |
|---|---|
| `rtl/map_pkg.sv` | widths, types, trellis functions, schedule control struct |
| `rtl/map_decoder_top.sv` | all decoders on one input stream |
| `rtl/map_decoder_nb2.sv` | first decoder: three units, SVM, LLR reversal memory |
| `rtl/map_decoder_nb3.sv` | second decoder: four units, B memory |
| `rtl/map_decoder_pt.sv` | third decoder: four units, pointer registers, quarter-size B memory |
| `rtl/map_decoder_na2.sv` | fourth decoder: two forward units, half-size B memory, LLR delay |
| `rtl/map_decoder_mab.sv` | fifth decoder: half-size A and B memories, two LLR units |
| `rtl/map_decoder_mab_pair.sv` | two fifth-kind decoders on two streams sharing the A and B memories |
| `rtl/schedule_controller.sv` | first decoder's segment counters, bank rotation, up/down address, fill flags |
| `rtl/schedule_controller_nb3.sv` | second decoder's half-segment counters and unit phases |
| `rtl/schedule_controller_pt.sv` | third decoder's segment and quarter counters, pointer register allocation |
| `rtl/schedule_controller_na2.sv` | fourth and fifth decoders' segment and half-segment counters |
| `rtl/forward_copy_unit.sv`, `rtl/simplified_acso_unit.sv` | replay forward unit and its element |
| `rtl/symbol_buffer.sv` | banks of received symbols, 1 write and several read ports |
| `rtl/branch_metric_unit.sv` | G' for the four code words, with puncturing |
| `rtl/recursion_unit.sv` | forward or backward unit of 2^NU OACS elements |
| `rtl/oacs_unit.sv` | one OACS element |
| `rtl/maxstar.sv`, `rtl/maxstar_lut.sv` | two-input MAX* and its correction table |
| `rtl/llr_unit.sv` | branch sums, two MAX* trees and the final subtraction |
| `rtl/reversal_memory.sv` | L-word read-and-write memory for order reversal |

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_map_decoder_top`: all decoders at default size on one stream of 28 blocks of 64
  symbols at three noise levels, with random stalls and punctured parity. An integer reference
  decoder (`tb/map_ref_pkg.sv`) computes each LLR with unbounded integers over the same window
  each schedule uses. Its trellis is written out independently of the RTL functions. Every LLR
  of every decoder must match bit for bit, and every output must arrive after exactly 4L or 3L
  enabled cycles. Hard decisions at high SNR must be error-free. The test also confirms that each
  of these happened: stalls, segment changes, both directions of every reversal memory, seed
  hand-overs, restarts and B-vector writes by each of the three backward units, writes to each
  pointer register, RU_B3 restarts, LLRs from both forward units of the fourth decoder,
  both LLR units of the fifth decoder working together, memory accesses shared by the pair
  (whose second stream repeats the first, half a segment later), puncturing and metric
  wrap-around.
  `tb_map_decoder_nb2`, `tb_map_decoder_nb3`, `tb_map_decoder_pt`, `tb_map_decoder_na2` and
  `tb_map_decoder_mab` do the same for one decoder. `tb_map_decoder_mab_pair` does it for the
  pair, with two independent streams.
* `tb_workload_allzero`: the worst-case dynamic-range input through all the decoders. The
  forward spread must sit exactly at 378 quanta on every step, the backward spreads must never
  exceed it, and every LLR must equal the value computed from the stationary vectors (−621).
* Unit tests:
  * the correction table, exhaustively;
  * MAX* with wrapping operands;
  * the branch metrics, exhaustively;
  * OACS;
  * both recursion directions, including the published eight-step table;
  * the LLR unit;
  * both memories;
  * the replay unit against a recorded forward recursion, and its element;
  * the four schedule controllers, under random stalls (the pointer controller's test also tracks which
    pointer each register holds).

To run one with Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv rtl/map_pkg.sv \
        tb/map_ref_pkg.sv tb/tb_map_decoder_top.sv --top-module tb_map_decoder_top -o sim
    ./obj_dir/sim

Each simulation finishes in well under a second.

## Choices made here

These choices are this design's own. The source architecture leaves them open.

* `NSM` = 12 and modulo arithmetic. The source gives the spread bound but no metric width. It
  offers both rescaling and modulo arithmetic; modulo is used here.
* L = 64. The source quotes this value from other work for a code with constraint length 5; for
  the 4-state code a smaller L would probably suffice.
* The correction table uses round-to-nearest. It reproduces the published state-metric table.
* The LLR trees pair leaves in increasing order of the starting state.
* Four symbol banks in the first decoder. The source counts the three that are read; the fourth
  receives the block being acquired. The source does not describe the second decoder's symbol
  storage; it has 8 half-size banks here.
* The third decoder's pointer register allocation, its 5 symbol banks and its quarter-wise
  up/down B memory. The source is not consistent about the unit count of this schedule (its
  summary table counts the third backward unit as half a unit); here it is a full recursion
  unit.
* The fourth decoder's LLR delay memory: the source gives its latency of 4L but not how its
  outputs are put back in order. Also its shared LLR unit, its decision/offset memory
  organisation and its 5 symbol banks.
* The fifth decoder's two LLR output memories (the source gives the 4L latency, not the
  reordering) and its 5 symbol banks. For the pair, the offset of half a segment (the source
  shows the interleaving in a drawing but gives no number) and the accept flag of stream 1.
* The up/down B memory of the second decoder and the single A_INIT load of its forward unit.
  The source gives the restart period, the run length, the unit count, the memory size and the
  3L delay; the addressing is carried over from the first decoder.
* Asynchronous-read memories. A single read-and-write access per cycle, as the source
  prescribes. Synchronous RAM macros would need one extra pipeline stage on the read side.
* The `in_valid` stall, the reset, the output register and the hard-decision output.

Not included: the source's other schedules. These are pointer schedules with a different
number of pointers; pointer memories shared by two decoders; and a variant that runs the units at twice the
symbol rate. Also not included: the classical
ACSO element, which OACS replaces; a-priori (extrinsic) inputs for use inside an iterative
turbo decoder; and any carry-save variant of the kernel.
