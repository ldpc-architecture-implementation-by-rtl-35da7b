# Layered LDPC decoder with Channel-RAM bypassing and a deduplicating state memory

A layered LDPC decoder spends much of its memory traffic moving posterior
values in and out of a Channel RAM. It reads the value of every column a layer
touches, updates it, and writes it back, even when the very next layer will
read the same value again straight away. This design removes that round trip.
When two consecutive layers share a column, the updated value goes from the
adder straight to the next layer and never touches the RAM. For the small code
used here, half of all Channel RAM accesses disappear.

The second part of the design treats the decoder as a finite state machine.
Each check node it processes is a state, and each state produces an output
word. A state memory that stores those words keeps each distinct word only
once. States with the same output share one memory word and point to it by
address.

Everything is SystemVerilog-2017, synthesizable, and small. The default
configuration has 164 flip-flops and 492 memory bits after synthesis.

## The code

The decoder is built for one fixed parity-check matrix with 3 checks and 7
bits:

```
         column  0 1 2 3 4 5 6
 row 0 (check 1)  1 1 1 0 0 1 0
 row 1 (check 2)  1 0 1 1 1 0 0
 row 2 (check 3)  1 1 0 1 0 0 1
```

Every row has four ones (row weight DC = 4), which gives 12 edges between
check nodes and variable nodes. Codewords satisfy
`c5 = c0^c1^c2`, `c4 = c0^c2^c3` and `c6 = c0^c1^c3`.

The matrix is `H_ROWS` in `rtl/ldpc_pkg.sv`. The column list of each row,
`COLS`, is derived from it by a constant function.

## Layered decoding

The input is one log-likelihood ratio (LLR) λn per bit. A positive LLR means
bit 0. The decoder keeps a posterior Λn for each column and a check-to-variable
message R(m,n) for each edge. Initially Λn = λn and all R are 0.

One iteration visits the rows in order 0, 1, 2. Each row is one *layer*, and
for row m the decoder does the following:

1. For each column n of the row, it forms the variable-to-check message
   Γn = Λn − R(m,n)old.
2. The check node computes a new message for each edge from the other three
   edges of the row:
   * **Sign:** the product of their signs.
   * **Magnitude:** Φ(Σ Φ(|Γj|)), summed over the other edges, where
     Φ(x) = −ln(tanh(x/2)). Φ is its own inverse.
3. It updates Λn = Γn + R(m,n)new and stores R(m,n)new for the next
   iteration.

Because each layer sees the posteriors already updated by the layers before
it, layered decoding converges in fewer iterations than flooding. Flooding
updates all checks first and all bits after.

After each iteration the hard decisions (the signs of Λ) are checked against
all three parity checks. Decoding stops when all of them hold, or after
`MAX_ITER` iterations (default 10). `success` tells which of the two happened.

## Datapath and schedule

```
read engine, layer m+1 (edge e = column n):
    Λ     ← add-array output if layer m produces column n in this cycle,
            else bypass register[n] if valid, else Channel RAM[n]
    R_old ← message RAM[e]            (0 in the first iteration)
    Γ     = Λ − R_old                 → gamma_fifo and check_node_unit
write engine, layer m (same cycle):
    Γ     ← gamma_fifo
    R_new ← check_node_unit(Γ)
    Λ     = Γ + R_new                 → forwarded / bypass register[n] if
                                        layer m+1 uses n, else Channel RAM[n]
    message RAM[e] ← R_new
```

The decoder handles one edge per clock in each of two engines that work on
consecutive layers at the same time:

* **Read engine.** It works on layer m+1 and forms Γ for each edge. Γ goes
  into the FIFO and into the check node unit's accumulator, which adds up the
  Φ-sum and the sign parity of the row.
* **Write engine.** It works on layer m. It pops Γ from the FIFO in the same
  order and gets R_new from the check node unit, which removes that edge's own
  contribution from the row total of layer m. It then forms the new Λ and
  writes R_new to the message RAM.

In steady state the Channel RAM and the FIFO are therefore read and written in
the same cycle.

Three interlocks keep this exact, so the results are bit-identical to
processing the layers strictly one after another:

* **Pending columns.** The write engine holds a set of its layer's columns
  that it has not yet produced. When the read engine wants one of them, the
  value is forwarded straight from the adder if it is being produced in that
  same cycle. Otherwise the read engine stalls for a cycle.
* **Handing over a row.** The check node unit has two register sets: the
  accumulator and the row total of the layer being written. The read engine
  finishes its layer, which copies the accumulator into the output registers,
  only when the write engine is free to start that layer in the next cycle.
* **Iteration boundary.** The read engine does not start the next iteration
  until the parity check of the current one is done. No speculative work is
  ever thrown away.

For this matrix, rows 0 and 1 share column 2, but row 0 produces it one
position later than row 1 wants it. That costs one stall per iteration. The
last layer's writes and the check cycle cannot overlap with anything. One
iteration therefore takes 12 read cycles, 1 stall, 4 writes and 1 check, which
is 18 cycles.

With one LLR per clock, `done` rises 2N + 18·I + 1 clock edges after the edge
that samples `start`, where I is the number of iterations run. Loading and the
final flush take N = 7 cycles each. A one-iteration decoding takes 33 cycles
in total.

## Memory bypassing

The rule is this: **when the next layer also has a one in column n, the updated
Λn is not written to the Channel RAM. It is held in a bypass register, and the
next layer takes it from there instead of reading the RAM.** Each bypass saves
one write and one read. The layer after row 2 is row 0 of the next iteration.

For this matrix, consecutive layers share these columns:

| from layer | to layer | shared columns |
|-----------:|---------:|:---------------|
| 0          | 1        | 0, 2           |
| 1          | 2        | 0, 3           |
| 2          | 0 (next iteration) | 0, 1 |

That makes 6 of the 12 column accesses per iteration bypassed. Without
bypassing, each iteration makes 12 reads and 12 writes. With bypassing it makes
6 reads and 6 writes. The first iteration differs: layer 0 has no predecessor,
so it reads all four of its columns from the RAM. Over I iterations the
counters therefore show:

* `bypasses` = 6I − 2
* `ram_reads` = 6I + 2
* `ram_writes` = 6I + 2

The writes include the flush described next.

The bypass has one end case. When decoding stops after row 2, columns 0 and 1
are still held in bypass registers for a row 0 that will never run. The FLUSH
phase writes them to the Channel RAM. After `done`, the RAM holds the final
posterior of every column, and `soft_addr` / `soft_data` read it.

A bypassed value reaches the next layer in one of two ways:

* **Forwarding.** If the read engine wants the value in the same cycle it is
  produced, the adder output goes straight to it.
* **Bypass register.** Otherwise the value waits in a bypass register. The
  registers are indexed by column, with one valid bit each. A valid bit is set
  when the write engine parks a value and cleared when the next layer
  consumes it. An assertion checks that nothing is left over apart from
what row 0 will read.

## Check-node arithmetic and number formats

Soft values (λ, Λ, Γ) are 8-bit two's complement with two fraction bits, so
they range over ±32 in steps of 0.25. The adders saturate instead of wrapping.
Messages R are 6 bits with a magnitude of at most 31 (7.75).

Φ is a 32-entry table over 5-bit magnitudes (`phi` in `ldpc_pkg`):

```
phi(m) = min(31, round(4·Φ(m/4))),  phi(0) = 31 (stands for infinity)
```

The check node unit keeps S = Σ phi(sat(|Γ|)) over the whole row. For each
edge it returns phi(min(31, S − phi(sat(|Γ|own)))), with the sign set to the
parity of the other edges' signs. This is the exact Φ-domain update, not the
min-sum approximation. A zero input forces the other edges' messages to zero,
as Φ(0) = ∞ would.

## The decoder as a state machine, and the deduplicating state memory

`ldpc_top` connects the decoder to `node_state_recorder` as follows:

* Finishing layer m moves the machine into state s(m+1). States s1, s2 and s3
  are the three check nodes.
* The end of decoding returns the machine to s0.
* Each state's output word is the decoder's 7-bit hard-decision vector at that
  moment, zero-extended to 8 bits.

For each transition the recorder reports:

* `rec_pres_state`: the state just left.
* `rec_next_state`: the state entered.
* `rec_curr_state`: the address of the entered state's output word in the
  state memory.

The state memory (`dedup_mem`) compares each new word with every stored word
in parallel. On a match it returns the existing address and writes nothing.
Otherwise it appends the word at the next free address. Addresses start at 1,
and 0 means "not stored". Take three states s1, s2, s3 with outputs 01010101,
01011101, 01010101:

* A conventional one-word-per-state memory stores three words.
* This memory stores two words and records the addresses as 1, 2, 1.

Once the decoder has converged, its decisions stop changing, so most layer
states share a word. `rec_saved` counts the transitions that reused a word.
If a new word arrives while all `REC_DEPTH` words (default 4) are in use, it
is dropped, `rec_curr_state` is 0 and the sticky flag `rec_overflow` is set.
`start` clears the recorder together with the decoder.

## Top-level interface (`ldpc_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | begin a codeword (ignored while `busy`) |
| `in_valid`, `in_llr` | in | 1, 8 | intrinsic LLRs, column 0 first, accepted while `in_ready` |
| `in_ready`, `busy` | out | 1 | loading; decoder not idle |
| `done` | out | 1 | one-cycle pulse at the end of decoding |
| `success` | out | 1 | the final hard decisions satisfy every check |
| `hard_out` | out | 7 | hard decisions (bit n = column n); also valid between layers |
| `iterations` | out | 4 | iterations run |
| `soft_addr`, `soft_data` | in, out | 3, 8 | read a final posterior (combinational) |
| `ram_reads`, `ram_writes`, `bypasses` | out | 16 | Channel RAM traffic of the last decoding |
| `rec_valid` | out | 1 | a state record is valid this cycle |
| `rec_pres_state`, `rec_next_state` | out | 3 | state left and state entered |
| `rec_curr_state`, `rec_new` | out | 3, 1 | address of the state's output word; word newly stored |
| `rec_used`, `rec_overflow` | out | 3, 1 | words in use; sticky overflow |
| `rec_visits`, `rec_saved` | out | 16 | transitions recorded; of which reused a stored word |
| `rec_rd_addr`, `rec_rd_data` | in, out | 3, 8 | read a stored output word |

Parameters: `MAX_ITER` (10) and `REC_DEPTH` (4). The code size, formats and Φ
table are in `ldpc_pkg`.

## Modules

| file | role |
|------|------|
| `ldpc_pkg.sv` | matrix, derived column lists, widths, types, Φ table, syndrome |
| `ldpc_top.sv` | decoder plus state recorder |
| `layered_decoder.sv` | read and write engines, pending-column interlock, forwarding, bypass registers, LOAD / RUN / FLUSH control, counters |
| `channel_ram.sv` | posterior store, 1 async read + 1 sync write port |
| `msg_ram.sv` | one message per edge, addressed layer·DC + position |
| `gamma_fifo.sv` | first-word-fall-through FIFO, one row deep, with overflow/underflow assertions |
| `check_node_unit.sv` | serial Φ-domain check update with accumulate and output register sets |
| `add_array.sv` | saturating Λ − R_old and Γ + R_new |
| `dedup_mem.sv` | pattern-matching memory that stores each distinct word once |
| `node_state_recorder.sv` | present / next / current state registers around `dedup_mem` |

## Design choices and limits

These parts follow the design this RTL implements:

* the update equations
* the Channel RAM / FIFO / add-array structure
* the bypass rule and its 6-of-12 saving
* the three-state example of the state memory and its present / next /
  current fields

The following are choices made here:

* **Soft decoding.** The decoder uses soft messages and produces hard
  decisions at the output. It does not use a purely hard-decision algorithm.
* **No cyclic shifter.** Quasi-cyclic decoders rotate blocks of soft values
  between the Channel RAM and the check nodes. This matrix is plain binary
  (sub-matrix size 1), so there is nothing to rotate, and no shifter is built.
  For a quasi-cyclic code the datapath would have to become Z lanes wide, with
  a rotator on the read path.
* **Schedule.** The overlapped two-engine schedule, its stall interlock and
  the wait at iteration boundaries are choices made here (see *Datapath and
  schedule*). A reordering of the columns inside each row would remove the
  stall. The decoder keeps the natural column order.
* **Formats and limits.** The number formats, the Φ quantisation, the stopping
  rule, `MAX_ITER`, `REC_DEPTH`, zero initial messages and the synchronous
  reset are all choices made here.
* **State output word.** Using the hard-decision vector as each state's output
  word is a choice made here. The recorder and `dedup_mem` accept any 8-bit
  word.
* **Flush on stop.** Values still held in bypass registers are flushed to the
  RAM when decoding stops.

Limits to keep in mind:

* The decoder handles one codeword at a time. `start` is ignored until the
  previous one is done.
* The matrix is fixed at elaboration. `H_ROWS`, `M`, `N` and `DC` in the
  package must agree, and every row must have exactly DC ones.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.
`tb/ldpc_ref_pkg.sv` is an independent reference decoder. It uses integer
arithmetic with Φ computed in floating point (`$ln`, `$tanh`), the same layered
schedule, and its own copy of the matrix. It also counts the RAM reads, writes
and bypasses the bypass rule implies.

| testbench | what it checks |
|-----------|----------------|
| `tb_channel_ram`, `tb_msg_ram` | random read/write traffic against an array model, including read-during-write |
| `tb_gamma_fifo` | random push/pop against a queue; order, empty, full |
| `tb_add_array` | exhaustive sweep of both adders with saturation |
| `tb_check_node_unit` | 3000 rows of four messages (zero and saturated values included), each row output while the next one accumulates, against the floating-point update |
| `tb_layered_decoder` | about 64 codewords: a corrected single weak error, noisy random codewords, and inputs that hit the iteration limit. For each one it compares every layer's decisions, final soft and hard outputs, iterations, success, RAM counts (including 6I − 2 bypasses) and latency |
| `tb_dedup_mem` | the 01010101 / 01011101 / 01010101 example (addresses 1, 2, 1), then random words with hits, new words, overflow and clear |
| `tb_node_state_recorder` | the s1, s2, s3 example with present / next / current states (0,1,1), (1,2,2), (2,3,1), then random walks |
| `tb_ldpc_top` | end to end at default parameters. About 125 decodings plus inputs searched to overflow the state memory; every decoder output and every state record is checked. It counts bypass, forwarding, read stall, flush, early stop, iteration-limit stop, shared word, new word and overflow, and fails if any of them never occurred |

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_ldpc_top rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_top.sv \
    --Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_ldpc_top` with any other testbench name to run that one. The
simulator needs the packages listed before the testbench and finds the other
modules through `-y`. Every testbench finishes in well under a second.
