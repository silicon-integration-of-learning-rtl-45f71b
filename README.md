# A 64-neuron feedback network that learns, checks and anneals on chip

This is synthesizable SystemVerilog for a digital Hopfield-type associative
memory. It has 64 binary neurons, fully connected with feedback, and all
neurons update in parallel and in step. Three features make the chip
autonomous, so a host only supplies patterns and commands:

* **On-chip learning.** The synaptic matrix is learnt inside the neurons
  with the Widrow-Hoff rule in integer arithmetic. The rule is local: neuron
  *i* needs only its own potential and the other neurons' one-bit states to
  update row *i*. With the matrix cleared to zero, repeated presentations of
  the prototypes converge towards the projection matrix. 9-bit coefficients
  are enough for good recall with 16 prototypes.
* **Self-identification.** Each stored vector is 58 information bits plus a
  6-bit label, the cyclic code of those bits under g(x) = x^6 + x + 1.
  After a relaxation the chip recodes the information field of the state it
  reached and compares the result with the label field. `code_valid` is high
  when they agree, which means the network almost certainly settled on a
  prototype rather than on a spurious attractor.
* **Pseudo-annealing.** When a cold relaxation ends on a state the label
  rejects, the chip can retry on its own. It reloads the stimulus and relaxes
  again, flipping a fixed number of randomly chosen neuron states (two by
  default) in every updating cycle for a few cycles. At most three retries
  are made.

## Architecture: a linear systolic ring

A fully connected network of 64 neurons needs 4096 weighted connections. The
design avoids the wiring by time-multiplexing, and no coefficient is ever
addressed:

```
            +--------------------- state ring, 64 bits ----------------------+
 DATAin --> CODE --> mux --> [N64] -> ... -> [N2] -> [N1] --+--> DECODE --> code_valid
 (4x16 bit)           ^                                     |
                      +---------- XOR <---------------------+   RANDOM --> XOR
 each stage k is read by neuron k:  +-------------+
                                    | 64 x 9 bit  |  circular coefficient ring
                                    | shift reg.  |  (synaptic_memory)
                                    +------+------+
                                           | head J[k][j]
                                 12-bit saturating ALU, potential, flags
```

* The network state is a 64-bit ring (`state_ring`). In each *basic cycle*
  (one clock) the ring moves one place. Each neuron reads the state bit that
  sits in its own stage at that moment. The bit that leaves stage N1 goes
  back into stage N64 through an XOR with the random generator's output.
* Each neuron keeps row *i* of the matrix in its own 64-word x 9-bit circular
  shift register (`synaptic_memory`). This ring rotates in step with the
  state ring. In basic cycle *s*, neuron *i* sees the state of neuron
  (*i* − *s*) mod 64 and, at the head of its own ring, the matching
  coefficient J[i][(i − s) mod 64]. After 64 basic cycles, one **updating
  cycle**, every neuron has formed its potential
  h_i = Σ_j J[i][j]·σ_j and both rings are back in their starting alignment.
  Coefficients are read, and rewritten if needed, as they pass the head.
* At the end of a relaxation cycle every neuron's new state, the sign of
  h_i, is written into the ring in parallel. A zero potential gives +1.
* State bit 1 means +1 and 0 means −1. A product J·σ is therefore an add or a
  subtract.

An updating cycle takes 64 clocks whatever the operation. With a 100 ns
basic cycle (10 MHz), that is 6.4 µs.

### The neuron (`neuron_cell`, `neuron_alu`)

All arithmetic is 12-bit two's complement and saturates instead of
overflowing. Coefficients are 9-bit and also saturate. Each cell has:

* the accumulator for h_i;
* a one-bit register holding the neuron's own state at the start of the
  cycle;
* a register holding the current increment;
* a convergence flag.

The flags of all 64 cells are chained through OR gates (`cnv_in` →
`cnv_out`). The end of the chain is **low when the whole network is
stable**. On the last basic cycle of an updating cycle each cell puts the
flag it is computing onto the chain directly, so the controller can decide
in that same clock.

**Relaxation.** Each cell compares its new state with the state it held at
the start of the cycle. A relaxation ends with the first updating cycle in
which no neuron changes. That last cycle only confirms convergence, and the
label check takes place during it.

**Learning** (one presentation = two updating cycles = 128 clocks). The
weights are held as integers J = M·C, with M = 256 (β = log2 M + 1 = 9 bits).

1. *Potential and increment cycle.* The cell accumulates h_i for the
   prototype now in the ring. It then computes the error
   e = sat12(M·σ_i − h_i) and the increment δ_i = e / 64, truncated toward
   zero. Its flag is set when δ_i ≠ 0. On the 12-bit magnitude of e, this
   is the OR of the six most significant bits; the six bits below them are
   lost in the division anyway.
2. *Update cycle.* As each coefficient passes the head it is rewritten as
   J[i][j] ← sat9(J[i][j] + δ_i·σ_j).

A presentation with a null increment in every neuron changes nothing. When a
whole epoch of presentations is null, learning is complete. At that point
every potential on a prototype equals ±M.

### Label coding (`cyclic_coder`, `label_checker`)

Words on the data pins use bits 63..6 for the information field. The coder
sends these 58 bits serially into the ring, most significant first, and
feeds them to a 6-bit Galois LFSR with taps x + 1. It then sends the 6
remainder bits. The ring therefore ends up holding `{info, label}`, with the
label in bits 5..0; bits 5..0 of DATAin are ignored.

The checker reads the bit leaving stage N1 during each relaxation cycle. It
runs the same LFSR over the 58 information bits and then compares the
remainder with the 6 label bits. A stimulus goes through the coder too, so
a noisy stimulus carries the label of its own (noisy) information bits, not
the prototype's label.

### Random flips (`noise_gen`)

Each annealed updating cycle takes a fresh 64-bit string holding exactly
`T_FLIPS` ones, and shifts it out serially into the XOR on the recycling
path. The next string is built in the background during the current cycle:

* a 16-bit LFSR draws a candidate place;
* if the place is already taken, the next place is tried instead;
* this repeats until `T_FLIPS` places are set.

An elaboration check keeps `T_FLIPS` small enough that a string always
completes within one updating cycle. Places are drawn among 0..62 only,
because in basic cycle 63 the ring is overwritten with the new states and a
flip there would be lost.

A flipped bit is seen by the neurons it passes *after* the XOR. The
neurons it passed earlier in the same cycle saw its original value. This
gives a crude, state-independent perturbation of the neurons' inputs. It
does not flip the committed states themselves.

## Commands and pins (`net_control`, `fbnn_chip`)

Commands use a four-phase handshake:

1. The host puts a code on `cmd[2:0]` and raises `cmd_req`.
2. The chip takes the command when idle and raises `cmd_ack`.
3. The host drops `cmd_req`, and the chip then drops `cmd_ack`.

Taking a command costs one clock. `busy` stays high while the command runs.

| code | command | what happens | clocks after acceptance |
|---|---|---|---|
| 0 | NOP | nothing | 0 |
| 1 | LOAD | DATAin word coded and shifted into the ring | 64 |
| 2 | RELAX | cold updating cycles until none changes a neuron | 64 × cycles |
| 3 | ANNEAL | `ANNEAL_ITERS` cycles with flips, then as RELAX | 64 × (4 + cycles) |
| 4 | LEARN | one Widrow-Hoff presentation of the ring contents | 128 |
| 5 | CLEAR | zeros written into every coefficient | 64 |
| 6 | EPOCH | start a new epoch for `end_learn` | 0 |
| 7 | RECALL | LOAD, RELAX; while `code_valid` is low, up to `MAX_RETRY` times: LOAD again and ANNEAL | varies |

Status outputs:

* `net_ready` rises at the end of a relaxation and falls when the next
  command that uses the network is taken.
* `code_valid` is the label verdict on the last relaxed state.
* `end_learn` is high once at least one LEARN has run since the last EPOCH
  and every LEARN since then had only null increments.
* `timeout` is set when a relaxation stops at `MAX_ITER` cycles without
  settling. `code_valid` is then low.
* `retries` holds the number of annealed retries the last RECALL made.
* `state` shows the ring, for observation.

Data pins:

* **`wr_n[3:0]`** (active low) writes the 16-bit blocks of `data_in`, so a
  16-bit host can fill the word in four writes.
* **`rd_n[3:0]`** (active low) enables the blocks of `data_out`. The chip
  copies the ring into an output register at the end of LOAD, LEARN and
  every relaxation. A disabled block reads as zero. `data_out_oe` tells the
  pad cells which blocks to drive; on the real chip the others would be at
  high impedance.

A typical host sequence:

```
CLEAR
repeat  EPOCH; for each prototype: write it, LOAD, LEARN   until end_learn
write stimulus; RECALL; wait for net_ready; read data_out and code_valid
```

The chip stores no prototypes; the host presents them in every epoch. A
stimulus that fails recall can be learnt later by writing it, then LOAD
and LEARN.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 64 | neurons; a power of two (the increment divides by N with a shift) |
| `W_BITS` | 9 | coefficient width, sign included |
| `ACC_BITS` | 12 | neuron arithmetic width |
| `M_SCALE` | 256 | M in J = M·C, 2^(W_BITS−1) |
| `T_FLIPS` | 2 | neuron states flipped per annealed cycle |
| `ANNEAL_ITERS` | 4 | noisy cycles in ANNEAL before settling cold |
| `MAX_ITER` | 32 | bound on cold cycles in one relaxation |
| `MAX_RETRY` | 3 | annealed retries in RECALL |

The shared constants and the command and phase encodings are in
`rtl/fbnn_pkg.sv`.

## Where this RTL departs from the published chip, or fills gaps

* **Clocking.** One clock is one basic cycle. The original splits a 100 ns
  basic cycle into 75 ns of accumulation and 25 ns of shifting, from an
  on-chip clock block whose circuit is not described. That block is not
  modelled.
* **Defined here, not in the original.** The command codes, the command
  set, the handshake, the reset behaviour and the debug outputs `busy`,
  `timeout`, `retries` and `state`. Only the pin functions are published.
* **Bounds chosen here.** The number of noisy cycles in an annealed retry
  (`ANNEAL_ITERS`) and the relaxation bound `MAX_ITER` are not published.
  Annealing here is a fixed number of noisy cycles followed by a cold
  relaxation, so a retry always ends on a true fixed point.
* **Noise flips.** How the serial XOR interacts with the parallel update is
  this design's reading, described under *Random flips*.
* **End of learning.** The epoch rule for `end_learn` is this design's.
* **Label position.** The label sits in the low bits of the word. The
  original drawing shows it ahead of the information field.
* **Memory circuit.** The coefficient store is an ordinary register ring.
  The original is a custom semi-static tristate shift register, which is a
  layout matter.
* **Output pads.** High-impedance outputs are replaced by zeros plus
  `data_out_oe`.
* **Not built.** The cascadable 16-neuron chip for 256-neuron networks is
  only outlined in the original. The multilayer variants are only mentioned
  there. So are two uses of `code_valid` at system level: a classifier made
  of several chips wired to the same inputs, each trained on variants of one
  symbol, whose `code_valid` bits form the output; and keeping stimuli that
  were not recognised for a later `LEARN`. Both live outside the chip and
  can be built by a host from the pins above.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_synaptic_memory` | rotation, write in passing, hold, realignment after 64 shifts |
| `tb_neuron_alu` | 20 000 random vectors and corner cases against an integer model, including every saturation |
| `tb_neuron_cell` | clear, 12 epochs of learning and relaxation of one cell against a model that sums in ring order |
| `tb_state_ring`, `tb_cyclic_coder`, `tb_label_checker`, `tb_noise_gen`, `tb_data_in_port`, `tb_data_out_port` | each block against an independent model; the code by polynomial long division; the noise by counting ones per cycle |
| `tb_net_control` | clock count, phases and status of every command, including retries and timeout |
| `tb_fbnn_chip` | whole chip at default parameters: learning of 8 prototypes; relaxation; RECALL; ANNEAL |
| `tb_workload_retrieval` | the pseudo-annealing experiment: p = 8, 16, 24 prototypes, 100 noisy stimuli per row, cold recall against annealed recall with 2 and 4 flips |

In `tb_fbnn_chip`:

* **Learning:** the chip's `end_learn` must match, presentation by
  presentation, a bit-exact integer model of the rule.
* **Relaxation:** the final state, the clock count, `net_ready` and
  `code_valid` must match the model.
* **RECALL:** the final state must be a fixed point, `code_valid` must equal
  the label check, and a recall with no retry must give the cold result.
* **ANNEAL:** the run must end on a fixed point with a consistent
  `code_valid`, and at least one run must end somewhere other than the cold
  result.

`tb_workload_retrieval` drives two copies of the chip in lock-step, one
at the default `T_FLIPS = 2` and one at `T_FLIPS = 4`. Both learn the same
prototypes, so their matrices are identical. The testbench then measures
exact-retrieval rates over 100 noisy stimuli per row. The published
pseudo-annealing results are in brackets:

| p | Hi | cold (t = 0) | annealed, t = 2 | annealed, t = 4 |
|---|---|---|---|---|
| 8 | 16 | 86 % (78.8) | 94 % (93.4) | 98 % (94.2) |
| 8 | 20 | 43 % (36.5) | 67 % (63.8) | 67 % (65.0) |
| 16 | 10 | 79 % (67.3) | 90 % (88.9) | 94 % (89.0) |
| 16 | 14 | 39 % (28.2) | 58 % (53.9) | 63 % (52.6) |
| 24 | 6 | 46 % (38.3) | 72 % (60.6) | 83 % (56.3) |

The trend is the published one: annealed retries recover a large part of
the failed cold recalls. The published results find that four flips are no
better than two, and worse at high load. Here four flips still help. A
likely reason is that a flip on the serial path reaches only the neurons
downstream of the XOR, so the perturbation is weaker than flipping whole
neuron states. Cold recall also scores higher here than in the original.
This is probably because the stimulus label is recomputed, and Hi counts
only information bits. Learning ends after 6 to 8 epochs. The label check
misjudges 0 to 1 % of the relaxed states.

To run a testbench with Verilator (the package first):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_fbnn_chip rtl/fbnn_pkg.sv tb/tb_fbnn_chip.sv
./obj_dir/Vtb_fbnn_chip
```

The full-chip test simulates in well under a minute. Every register that the
logic reads is reset, except the coefficient rings, which CLEAR zeroes.
Simulations are therefore reproducible under two-state simulation with
random initial values.
