# Viterbi decoding by m-stage transforms

A Viterbi decoder for a rate-1/n convolutional code with memory m normally
walks the trellis one stage at a time: each stage, every state chooses the
better of its two predecessors. This design merges m stages into one. Over m
stages, every state can reach every other state along exactly one path, so the
merged trellis is a complete bipartite graph between the 2^m states. One
merged step takes m received code words at once. It compares, for every
destination state, the 2^m candidate paths from all source states, and then
yields m decoded bits. Each branch's m code words come from a single
matrix product over GF(2) of the two state codes with a stacked generator
matrix. Half of that product depends only on the source state and half only on
the destination state. The hardware therefore computes two small tables and
combines them with one XOR per branch. No trellis wiring and no branch-code
memory is needed.

Two processors are provided for the same step:

* a **systolic processor** (`vt_systolic_decoder`): two triangular arrays
  of generator cells produce the source and destination halves. A linear array
  of 2^(m+1) processing elements, with the two streams flowing in opposite
  directions, forms all 2^(2m) branch metrics of a step. It takes one step
  every 2^(m+1) clocks.
* a **single-chip processor** (`sc_vt_processor`): a serial design for
  small m. Two ROMs hold the halves, and one XOR/bit-count/add/compare path
  handles one branch per clock. It takes one step every 2^m(2^m+1)+2^m+1 clocks.

`vt_top` puts both side by side, each with its own ports. The defaults are the
(2,1,4) code (n = 2 outputs, m = 4, 16 states) with generators 23 and 35
(octal).

## The merged step

### State codes and bit order

The state reached after inputs u(t-m+1) … u(t) is numbered j. Its **state
code** C(j) is a list of m bits. Bit 0 is u(t), the newest input, and bit m-1
is the oldest. A step from source i to destination j feeds the encoder, in
state i, with the m inputs of C(j), oldest first. The m code words it emits
are the branch code W(i,j).

All vectors of m code words, such as W, A, T, B and R below, are packed as m
blocks of n bits:

* block 0 (the low n bits) is the word of the **newest** stage;
* block m-1 is the oldest;
* inside a block, bit k is encoder output k+1.

### Splitting the generator matrix

Let G_0 … G_m be the n-bit generator rows: G_r holds the taps on the input r
stages old. Block b of W(i,j) is the XOR of the G_r over every input bit that
lies r stages behind stage b. The inputs that produce block b come either from
the destination code (the inputs of this step) or from the source code (the
inputs already in the encoder). The product therefore splits:

    T(j)  block b = XOR over l >= b   of C(j)[l] & G_(l-b)      (upper triangle)
    A(i)  block b = XOR over k <= b   of C(i)[k] & G_(m+k-b)    (lower triangle)
    W(i,j) = A(i) xor T(j)

With the received vector R(t), the branch metric is

    BM(i,j) = popcount(A(i) xor T(j) xor R(t)) = popcount(A(i) xor B(j)),
    B(j) = T(j) xor R(t).

Both T and A are triangular: each uses only m(m+1)/2 of the m x m generator
positions. This is why both halves fit in triangular cell arrays.

### Metrics, survivors and decoded bits

For every destination j the step computes

    Sm(j) = min over i of ( Sm(i) + BM(i,j) )

Metrics are Hamming distances, so smaller is better. On a tie the smallest
source index i wins. This rule is fixed and the testbench models follow it.

Survivor paths use **register exchange**: the path of j is the winner's path
shifted up by one group of m bits, with C(j) in the low group. A path holds
`HIST` groups (default 6, i.e. 24 decoded bits). The oldest group of the best
state's path is put out as the m decoded bits of the step. `dec_bits[0]` is
the earliest information bit. No traceback is used.

**Frame start.** A word flagged `rx_sof` begins a new frame from the all-zero
encoder state. State 0 then starts with metric 0 and every other state with
m*n+1, a value larger than any single branch metric. Its paths start empty.

**Normalisation.** Metrics must stay bounded. The two processors do this
differently:

* **Systolic processor:** subtracts the metric of state 0 of the step from
  every stored metric. `dec_sm` is the best metric relative to state 0 of the
  step before.
* **Single-chip processor:** subtracts the step's minimum, in the update
  phase. `dec_sm` is the best metric relative to the best metric of the step
  before.

In both cases the stored metrics lie within ±(m*n+1), so the metric width is
`vt_pkg::metric_width(m,n) = clog2(2mn+3)+1` bits, signed. At the defaults
that is 6 bits.

## The systolic processor

```
 rx_word ─► sequencer ─┬─ C(j),R(t) ─► Block 2 (T = C(j)·Gm_u) ─► EOR ─► B(j) ──►┐
                       │                                                        │ left end
                       └─ C(i) ──────► Block 1 (A = C(i)·Gm_L) ─┐               ▼
                                         Sm(i),U(i) from store ─┴─► A(i) ─► [PE2 x 2N] ◄── right end
                                                                               │ survivors leave right
                                             survivor store ◄──────────────────┤
                                             COM (best, decoded bits) ◄────────┘
```

### Sequencer (`vt_sequencer`)

A step lasts 2N clocks (N = 2^m). The sequencer issues C(j) = 0 … N-1 to
Block 2 in even clocks and C(i) = 0 … N-1 to Block 1 in odd clocks. It takes a
new received vector on the last clock of a step, so steps follow each other
with no gap. `rx_ready` is high when the processor is idle or in the last
clock of a step.

### Generator cells and the two triangles (`vt_gcell`, `vt_gm_upper_array`, `vt_gm_lower_array`)

Each cell stores one generator row. It registers `d xor (e & G)`: it passes
a partial code word on and adds its row when its state-code bit is set. A
triangle has m pipeline stages. Stage s holds the cells that use code bit s.
Code bit s is delayed by s clocks before it enters, so the partial sums of
all blocks meet their bits at the right time. Every result comes out m clocks
after its code went in, one per clock.

* Block 2 builds T(j), using G_(s-b) in block b ≤ s. The EOR stage then forms
  B(j).
* Block 1 builds A(i), using G_(m+s-b) in block b ≥ s.

The generator rows are an input port (`gen`), so one build serves any code of
its size.

### Linear array and the meeting rule (`vt_linear_array`, `vt_pe2`)

This is the part to understand first. The array is a chain of L = 2N
processing elements with one register stage each.

* B packets enter at the left end and move right one element per clock.
  Each packet carries B(j), a running metric starting at "infinity", the
  winning source and the winning path.
* A packets enter at the right end and move left. Each carries A(i), Sm(i)
  and U(i).

B(j) enters at clock 2j and A(i) at clock 2i+1, so the two streams approach
each other at a combined speed of two elements per clock. B(j) and A(i) then
meet in element N+i-j: exactly once, and always inside the array, since
0 ≤ N+i-j ≤ 2N-1. A packet leaves the array only after it has met every packet
of the other stream in the same step.

When a B packet and an A packet of the same step share an element, the
element does three things:

1. XORs the two vectors and counts the ones.
2. Adds Sm(i).
3. Replaces the packet's metric, source and path with the candidate if the
   candidate is strictly smaller.

Sources arrive in increasing i, so "strictly smaller" gives ties to the
smallest i.

Each packet carries a one-bit **step tag**. An element combines two packets
only if their tags are equal. This lets the first B packets of step s+1 enter
while the last A packets of step s are still in the array. Two steps overlap,
and the array is never drained between steps.

### Survivor store and COM (`vt_sm_store`, `vt_com`)

B packets leave on the right as finished survivors, with state 0 first.

**Store.** The store writes the survivor's metric minus that of state 0, and
its path with C(j) appended. Block 1 reads the store when it issues source i
for the next step. The write of state i always comes before that read. At
frame start the read returns the start values instead.

**COM.** COM watches the same stream. It keeps the best state, which goes to
state 0 and then to any strictly smaller metric. After state N-1 it registers
the result: `dec_state`, `dec_sm`, `dec_path` and `dec_bits`.

### Timing

| | clocks |
|---|---|
| step period (back to back) | 2N = 32 |
| accepting edge → `dec_valid` | m + 4N = 68 |

`dec_valid` is a one-clock strobe per step. The unused outputs of internal
blocks are the step tag and source index of survivors leaving the array, the
top group of the path entering the store (it is shifted out), and the busy
flag. Lint reports them as unused.

## The single-chip processor

This processor handles one branch per clock with a single datapath.

| unit | module | does |
|---|---|---|
| CUN1, CUN2 and control | `sc_control` | source counter i, destination counter j, phase sequence |
| ROM1, ROM2 | `sc_branch_rom` | A(i) and T(j), computed from `GEN` at elaboration |
| exclusive-OR gates and PLA | `sc_hamming` | popcount(A xor T xor R) |
| adder, MIN BLOCK1, SM TEMP | `sc_acs` | Sm(i)+BM; running minimum over i; `latch` on a new minimum |
| RAM1 and normalising subtractor | `sc_sm_ram` | metrics of the last step; new metrics held apart until the update |
| MIN BLOCK2, BUF2 | `sc_min2` | best new metric of the step and its state |
| path recording | `sc_path_record` | BUF1 (winning source), PATH HEAD RAM and TEMP, BUF3 (best path), update counter Y |

### Schedule of a step

| phase | clocks | what happens |
|---|---|---|
| RUN | N per destination | i = 0 … N-1. The branch metric is formed, the sum Sm(i)+BM is compared, and BUF1 takes i on each new minimum. |
| COMMIT | 1 per destination | The new Sm(j) goes to the new-metric bank and to MIN BLOCK2. The new path (path of BUF1 plus C(j)) goes to PATH HEAD TEMP. |
| RESTART | 1 | BUF3 takes the new path of the best state (BUF2). |
| UPDATE | N | Y = 0 … N-1. RAM1[Y] takes new metric − step minimum, and PATH HEAD RAM[Y] takes TEMP[Y]. |

The PATH HEAD TEMP address is:

* C(j) in RUN and COMMIT;
* BUF2 in RESTART;
* Y in UPDATE.

A new word is taken in the last update clock, or any time while idle.

| | clocks |
|---|---|
| step period (back to back) | N(N+1)+N+1 = 289 |
| accepting edge → `dec_valid` | N(N+1)+2 = 274 |

The code is a parameter (`GEN`), because the ROMs are fixed tables.

## Ports

Both processors use the same stream interface.

| port | dir | width | meaning |
|---|---|---|---|
| `rx_valid`, `rx_ready` | in/out | 1 | word transfer on a rising edge with both high |
| `rx_sof` | in | 1 | this word starts a frame (encoder started from state 0) |
| `rx_word` | in | m·n | received R(t): block 0 = newest stage |
| `dec_valid` | out | 1 | one-clock strobe per step |
| `dec_state` | out | m | best state of the step |
| `dec_sm` | out | signed `metric_width` | its metric, normalised as described above |
| `dec_path` | out | HIST·m | its survivor path, newest group in the low bits |
| `dec_bits` | out | m | decoded bits, `dec_bits[0]` earliest |

Both processors also have `clk` and an active-low asynchronous `rst_n`. The
systolic processor also has `gen[m:0][n-1:0]`, with one generator row per
delay. In `vt_top` the ports carry the prefixes `sys_` and `sc_`.

Parameters:

* `M`, memory (default 4);
* `NOUT`, n (default 2);
* `HIST`, path groups (default 6);
* for the single-chip processor, `GEN`. Its default `{2'd3,2'd1,2'd2,2'd2,2'd3}`
  gives G_4 … G_0 for 23/35 octal.

The systolic processor has been built and simulated at M = 2, 4 and 8.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=… failures=…`. `tb/vt_ref_pkg.sv` is a behavioural
reference containing:

* a convolutional encoder;
* the branch code W(i,j) written directly from the encoder definition, not
  from the split matrix;
* a full m-stage add-compare-select with the same tie rule, start values and
  register-exchange paths.

The main tests:

* `tb_vt_top`: both processors at the default parameters, fed the same
  random frames. The frames are one with channel errors, one with idle gaps,
  and one error-free. Each result is checked against the reference, the two
  processors against each other, and the error-free frame against the
  information bits sent. The test also checks step periods and latencies. It
  counts the overlapped systolic steps, the words taken back to back in the
  single-chip update phase, the gaps, the frame restarts and the errors, and
  fails if any of these never happens.
* `tb_vt_systolic_decoder`, `tb_sc_vt_processor`: the same checks for each
  processor alone, with longer frames.
* `tb_vt_worked_example`: a (3,1,2) code with G_0 = 110, G_1 = 011 and
  G_2 = 101. It decodes a 30-bit received sequence containing channel
  errors, in five merged steps of m = 2. The sequence is the encoding of
  0100100100. The test checks:
  * the survivor metrics after the first step (4, 2, 4, 4 for states 0–3);
  * the best survivor paths after steps 2 and 4;
  * the final distance, 9.

  Another path ties with 0100100100 at distance 9. The tie rule picks that
  other path, so the test checks the distance rather than the bits.
* `tb_vt_systolic_218`: the (2,1,8) code (generators 561/753 octal): 256
  states and 512 processing elements.

To run one with Verilator:

    verilator --binary --timing -y rtl -y tb rtl/vt_pkg.sv tb/vt_ref_pkg.sv \
        tb/tb_vt_top.sv --top-module tb_vt_top -Mdir obj_tb_vt_top
    ./obj_tb_vt_top/Vtb_vt_top

The default-size end-to-end test runs in well under a second. The (2,1,8)
test compiles in about half a minute.

## Departures and choices

* **Generator values** are not part of the design: any (n,1,m) code of the
  built size works. 23/35 octal is only the default and test code.
* **Minimum, not maximum.** The metric is a distance, so the survivor is the
  minimum and the best state is the smallest metric.
* **Frame start** from state 0, with the other states penalised, rather than
  all metrics starting equal. This matches a worked decode of the example
  code.
* **Overlapped steps and step tags**, the handshake, the schedule of the
  streams and the metric normalisation of the systolic processor are choices
  of this design.
* **Register-exchange paths** of fixed length stand in for a path memory
  with unstated length.
* **Folded (2,1,8) modules are not built.** A larger code can be folded into
  several copies of the (2,1,4) cell arrays, but how the folded partial
  results would be combined is not worked out. The systolic RTL is
  parameterised instead and builds the (2,1,8) decoder directly with M = 8.
* **Single-chip processor.** The separate new-metric bank, the phase
  schedule, and the use of the step minimum for normalisation are choices
  of this design. The PLA is written as a bit count.
* **Memories are not reset.** The metric and path memories have no reset.
  The first word after reset always starts a frame, even without `rx_sof`.
  That step writes every location before the next step reads it.
