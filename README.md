# Active hardware metering: a boosted FSM that locks every die

A foundry that holds a design's masks can make more chips than it was paid
for. Active metering makes every manufactured die useless until the design
owner has unlocked it, one die at a time, and lets the owner disable a die
later.

The lock lives in the design's own controller. Its state register is widened
with extra flip-flops, and the state graph gains a large added part. At
power-up the whole register is loaded from a random, die-specific ID. With
overwhelming probability the die therefore starts somewhere in the added graph
and is **locked**. Leaving the added graph needs a specific input sequence,
the **key**. Only someone who knows the graph can compute the key, and the key
differs from die to die. The foundry reads the power-up state out of the
flip-flops and sends it to the owner. The owner returns the key, and the key
is stored on the die and replayed at every power-up. **Black-hole** states,
which have no way out, catch random guessing and serve as a remote kill
switch.

This repository is synthesizable SystemVerilog for that scheme, wrapped around
a small five-state example controller. The random-ID cells are behavioural
models.

## Block diagram

```
               rst_n                         in / in_valid (user)
                 |                                 |
          +------v-------+  key words  +-----------v-----------+
          | key_sequencer|<------------|       key_store        |<-- prog_* (test floor)
          | EVAL LOAD    |             | key[KEY_MAX], key_len, |
          | PLAY RUN     |             | saved ID, perm. record |
          +--+----+---+--+             +----^--------------+----+
     rub_eval|    |load|play/x_key           | bh_enter    | saved ID
          +--v--+ |   |                      |             |
          | rub |-+---|------ ID -------------|-------------+--> load_val
          +--+--+     |                      |
   6 ID bits |  +-----v----------------------+-------------------+
          +--v--------+  bfsm                                    |
          | rub_group |  added_stg (N_MOD x stg_module3)         |
          +-----+-----+  sffsm (original FSM + 2 replicas)       |---> functional, q_idx,
                |group   obf_glue (dummy states)                 |     locked, disabled
                +------> black_hole                              |
                         +------------------+--------------------+
          attack_detector -- trip --^        | all flip-flops
          remote_disable ---------->         v
                                       scan_readout ---> scan_out
```

## Life of a die

1. **Power-up.** `rst_n` low means the die is off. The ID cells are held in
   evaluation while `rst_n` is low and for one cycle after it rises (EVAL). In
   the next cycle (LOAD) the boosted FSM takes its power-up value. That value
   is the saved ID if one is stored, otherwise the live ID.
2. **Read-out.** `scan_capture` copies all FSM flip-flops into a shadow
   register. `scan_shift` then moves them out on `scan_out`, least significant
   bit first: `{black hole active, black hole state, original FFs, added FFs}`,
   22 bits at the default size. The FSM keeps running.
3. **Key computation** is done off-chip by the owner. It is a shortest-path
   search in the added graph, from the read-out state to the exit, that never
   takes a trap edge. `tb/tb_ref_pkg.sv` contains one (`find_key`). At the
   default size every state has a key of at most 11 inputs.
4. **Programming.** The key words, the key length and, optionally, the
   power-up value are written into `key_store` through the `prog_*` port.
   The key can also be left out of the store and used as a password instead.
   The user then applies it through `in`/`in_valid` after `ready`, and it
   counts toward the attempt limit.
   Storing the power-up value makes the lock immune to ID bits that drift
   later. The replica check below still reads the live ID.
5. **Every later power-up.** In PLAY the sequencer applies the stored key, one
   word per clock, and then enters RUN. `ready` rises **2 + key_len** clock
   edges after `rst_n` rises. At that moment `functional=1` and `q_idx=0`.
   From then on `in`/`in_valid` drive the original FSM.

## The boosted FSM (`bfsm`)

### State layout

| field | width (default) | role |
|---|---|---|
| `a` | 3*N_MOD = 15 | added state graph; value 0 means "unlocked" |
| `orig` | 5 | original FSM: `{replica[1:0], code[2:0]}` |
| black hole | 1 + log2(BH_STATES) | active flag and state |

When `a` is 0 the die runs the original FSM and `a` stays 0. Every flip-flop
is then a fixed function of the replica group and the original state. Two
unlocked dies in the same group therefore show identical flip-flop activity
for the same inputs. Dies in different groups differ only by a fixed XOR mask
on `orig`. This is the price of the replicas: the rule that all unlocked dies
behave alike is followed within a group, and the replicas override it between
groups. When `a`
is not 0 the die is locked. Each applied input moves `a` through the added
graph, and a transition whose result is 0 puts `orig` into the reset state q0.
The state only changes on clocks with `x_valid`. Loading `a = 0` at power-up
happens with probability 2^-15 and unlocks the die by chance. The size of `a`
sets that probability.

### The added graph (`stg_module3`, `added_stg`)

The added graph is built from 3-bit modules. Each module is an eight-state
graph made from a ring counter:

| u | edge taken from state s |
|---|---|
| 0 | ring: 0->2, 1->2, 2->3, 3->4, 4->5, 5->6, 6->7, 7->0 (q1 is taken out of the ring) |
| 1 | extra edges 2->2, 4->1, 7->3; ring edge elsewhere |
| 2 | 7->7; hold elsewhere |
| 3 | hold |

Each module's 2-bit selector mixes input bits with the state of the previous
module (the module before module 0 is the last one):

    u_i = {x[(2i+1) % IN_W], x[(2i) % IN_W]} ^ a_(i-1)[1:0] ^ i[1:0]

Because of this coupling, the meaning of an input depends on the whole state.
With 3 input bits, the 8 possible inputs can only reach a small part of the
4^5 selector combinations, so the modules cannot be steered one by one. This
coupling was chosen by an exhaustive search over 12- and 15-flip-flop graphs
with 3 and 8 inputs. The search confirmed that from **every** added state some
input sequence reaches 0 without using the trap edge. The longest shortest key
is 11 inputs. If `N_MOD` or the coupling changes, repeat that check:
`tb_added_stg` checks sampled states, not all of them.

A die does not have just one key. Any input sequence that ends in state 0
without touching a trap edge unlocks it. `tb_bfsm` checks this on every other
die by unlocking with a second, longer key. That key starts with a detour input
and then continues with the shortest key from where the detour lands.

### Original FSM and its replicas (`sffsm`, `rub_group`)

The protected controller is a five-state machine with one input bit (`x[0]`):

| state | x=0 | x=1 |
|---|---|---|
| q0 | q0 | q4 |
| q1 | q0 | q1 |
| q2 | q4 | q0 |
| q3 | q1 | q2 |
| q4 | q3 | q4 |

Three entries are this design's choice: q0 on 0, q1 on 1 and q4 on 1 hold the
state. The codes are q0..q4 = 000, 001, 010, 100, 111. The controller exists
in three copies with the same behaviour but different codes:

- Replica r stores state q as `{r, code(q) ^ MASK[r]}`, with MASK = 000, 101,
  011.
- The replica of a die is chosen by its **RUB group**. Two group bits are each
  the majority of three ID bits, so one unstable bit per triple is tolerated.
  The value 3 folds onto group 0.
- A functional value of `orig` whose replica field is not the die's own group,
  or whose code is not a state, sends the die into the black hole.

This defeats copying the reset state, or the power-up state plus key, of an
unlocked die into a die of another group.

### Dummy states (`obf_glue`)

While the die is locked, `orig` never rests. Its code bits step through the
three unused codes 011, 101 and 110 (dummy states q5\*, q6\*, q7\*). Its
replica bits are scrambled. Both follow XOR folds of `a`, the input and six
ID bits. Because of the ID bits, two dies in the same added state with the
same input show different patterns. Across
the dummy group every bit takes both values, so flip-flop activity does not
tell added flip-flops from original ones.

### Black hole (`black_hole`)

The black hole is a group of `BH_STATES` states (default 2) that cycle
regardless of input and have no exit. It is entered by:

- the **trap edge**: the top module in state 6 with the all-ones input
  applied. Random guessing hits it after about 80 to 3400 guesses (see below);
- **remote disable** (`remote_disable`) or the **attack detector**
  (`attack_detector`), which trips after `LIMIT` = 4096 user inputs while
  locked. Both act only after the key sequence has finished;
- an invalid original-FSM value, as described above.

A power-up load always starts outside the black hole. The only exception: with
`PERMANENT=1`, every entry sets a record in `key_store`, and the die then
powers up inside the black hole again. `prog_clr` (factory erase) clears the
record.

Two options, both off by default:

- `N_BH=2` adds a second black hole with its own trap edge: module 0 in state
  5 with the all-zero input. The exhaustive search also covered this case:
  every added state still has a key that avoids both traps.
- `TD_LEN > 0` turns the holes into **trapdoors** ("gray holes"). While
  inside, the secret sequence `TD_SEQ` leads out to q0. `TD_SEQ` holds up to
  16 words; word k sits in bits `[8k +: IN_W]`, and the words must be applied
  on consecutive valid inputs. A wrong word restarts the match, and idle cycles
  do not break it.

## Random ID model (`rub_cell`, `rub`)

Each ID bit models a pair of cross-coupled NOR gates:

- Both sides are pulled low while `eval` is high.
- On the falling edge the latch settles according to transistor mismatch.

The model derives a fixed value from a hash of the die seed (`CHIP_SEED` on
the top) and the bit index. About 4 % of the bits have too little mismatch
and settle pseudo-randomly at each evaluation. These models are not hardware.
Replace them with the real cell on silicon. The ID is `3*N_MOD + 11` bits:
the power-up value of `a` and `orig`, and six group bits.

## Parameters (`active_meter_top`)

| parameter | default | meaning |
|---|---|---|
| `N_MOD` | 5 | number of 3-bit modules; added flip-flops = 3*N_MOD (12, 15 and 18 were evaluated for the scheme) |
| `IN_W` | 3 | input width (3..8 evaluated) |
| `BH_STATES` | 2 | states in the black hole |
| `KEY_MAX` | 32 | key store depth |
| `LIMIT` | 4096 | user inputs allowed while locked before disabling |
| `CHIP_SEED` | 1 | stands for the die's process variation |
| `N_BH` | 1 | number of black holes (1 or 2) |
| `TD_LEN`, `TD_SEQ` | 0 | trapdoor sequence length and words; 0 = true black holes |

The testbenches exercise `N_MOD` 4 to 6 and `IN_W` 3 and 8; other values compile but are untested.

## Files

`rtl/`: `metering_pkg` (encodings and transition functions), `stg_module3`,
`added_stg`, `sffsm`, `rub_group`, `obf_glue`, `black_hole`, `bfsm`,
`key_store`, `key_sequencer`, `attack_detector`, `scan_readout`, `rub_cell`,
`rub`, and the top `active_meter_top`.

`tb/`: one self-checking testbench per module (`tb_<module>`; `tb_rub` covers
both ID models), `tb_metering_pkg`, and `tb_ref_pkg`, an independent reference
model with the key search. `tb_active_meter_top` is the end-to-end test at
default sizes. `tb_bruteforce` runs the guessing attack.

## Simulating

From the repository root, with Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_active_meter_top \
        -y rtl -y tb +libext+.sv rtl/metering_pkg.sv tb/tb_ref_pkg.sv \
        tb/tb_active_meter_top.sv -o sim && ./obj_dir/sim

Every testbench ends with `TB_RESULT checks=<n> failures=<m>` and has a
watchdog. The end-to-end test covers one die's whole life:

- locked power-up and read-out;
- key computation and programming;
- four unlocks, each in exactly 2 + key_len cycles, followed by 40 cycles of
  normal operation checked against the reference;
- dummy-state activity while locked;
- remote disable and the permanent record;
- a brute-force attack stopped at the attempt limit;
- the trap edge;
- rejection of another group's reset state.

It counts each of these and fails if one never happened. It runs in well under
a second.

`tb_bruteforce` applies random guesses from random locked states, 40 runs per
configuration with a budget of 1,000,000 guesses each. No run unlocked a die.
Every run ended in the black hole, after these average numbers of guesses:

| added flip-flops | 3 inputs | 8 inputs |
|---|---|---|
| 12 | 77 | 3367 |
| 15 | 93 | 1970 |
| 18 | 104 | - |
| 12, two black holes | 45 | - |

## Where this departs from the scheme, and what is missing

- **Graph synthesis.** In the original method the added graph is chosen by
  synthesising many random sparse variants and keeping those with the lowest
  area, and a synthesis tool assigns the state codes. Here one fixed module
  graph and one fixed coupling are written out, and `a` uses plain binary
  codes.
- **Protected controller.** The scheme was evaluated on ISCAS'89 benchmark
  circuits. Here it protects a five-state example controller. To protect
  another FSM, replace `orig_next`, the codes and `code_to_idx` in
  `metering_pkg`, and widen `orig` if needed.
- **Sizes.** 15 added flip-flops give 32768 states. That is enough to show the
  mechanism, not to resist a determined attacker: the key search in the
  testbench solves it in milliseconds. Practical use calls for about 100
  added flip-flops (`N_MOD=34`). The testbench key search cannot handle that
  size.
- **ID injection.** The ID enters the state register through a load
  multiplexer, for one cycle at power-up. The dummy states of the original
  FSM are not themselves used as a black hole; the black holes have their own
  flip-flops.
- **Read-out obfuscation.** The added flip-flops are read out in plain
  binary. Two dies in the same added state therefore show the same code
  there. Only the original-FSM flip-flops differ between them, through the
  ID-salted dummy pattern.
- **Black holes.** There are at most two black holes, each entered by a
  single trap edge. A real design would scatter many trap edges through the
  added graph.
- **Key store.** It is plain registers, a stand-in for non-volatile memory.
  The stored key is not encoded.
- **Not built:** merging the lock with test or debug FSMs, error-correcting
  codes on the ID, and detection of brute-force attacks from outside the chip.
  The owner's statistical screening of dies and the key computation are
  off-chip work.
- **Own choices.** All encodings are this design's choice: the replica masks,
  the dummy-state mixing, the trap edge, the attempt limit, the power-up phase
  timing, and holding state when no input is applied.
