# Speculation in synchronous elastic circuits

A synchronous elastic circuit replaces every register by an *elastic buffer*
and every wire bundle by a *channel* with a valid/stop handshake, so that any
stage may take a variable number of cycles without breaking the computation.
This RTL adds speculation to such circuits using only local, reusable control
primitives:

* an **early-evaluation multiplexor** fires as soon as its select and the
  selected data are there, and cancels the data it did not need by sending an
  **anti-token** backwards on the other inputs;
* a block that sat after the multiplexor is moved in front of it and its
  copies are merged into one **shared module**, whose **scheduler** guesses
  which input will be selected and lets that input use the block first.

If the guess is right the multiplexor fires at once and the other input's
token is cancelled. If it is wrong the multiplexor stops the guessed data, the
scheduler notices and serves the right input in the next cycle. No central
controller decides anything: correctness comes from the handshakes, so any
scheduler that never starves a channel gives the same output stream as the
non-speculative circuit; only the cycle count depends on how good the guesses
are.

Three circuits are built from these primitives and sit side by side in
`spec_elastic_top`:

| circuit | what is speculated | cost of a wrong guess |
|---|---|---|
| `spec_loop` | which input of a loop multiplexor the shared block should process, while the select is still being computed | 1 cycle |
| `varlat_alu` | that an 8-bit ALU's fast approximate result is exact | 1 cycle |
| `resilient_adder` | that two 64-bit operands protected by SECDED carry no soft error | 1 cycle |

## Channels, tokens and anti-tokens

Each channel has data plus four control bits:

| bit | direction | meaning |
|---|---|---|
| `vp` | forward | a token (valid data) is offered |
| `sp` | backward | the receiver stops (does not take) the token |
| `vn` | backward | an anti-token is offered |
| `sn` | forward | the sender stops the anti-token |

A token moves in a cycle with `vp & !sp` (transfer); `vp & sp` is a retry and
the sender must keep the token (and its data) until it moves. Anti-tokens
follow the same rules in the other direction. When `vp` and `vn` are high
together the token and the anti-token cancel each other: both are consumed.
No side may stop and kill at once: `sp & vn` and `vp & sn` never occur. Every
module keeps these rules, and most carry assertions for them.

Two elastic streams are equivalent when they carry the same data in the same
order, whatever the cycles between transfers; all testbenches check results
this way, and check cycle counts separately where a latency or rate is
claimed.

## The primitives

### `elastic_buffer` (forward latency 1, backward latency 1, capacity 2)

The buffer keeps one signed count `k`: `k > 0` tokens or `-k` anti-tokens.
Tokens are stored in a two-entry FIFO. `out_vp = k > 0`, `in_sp = k == 2`,
`in_vn = k < 0`, `out_sn = k == -2`, all straight from registers, so neither
direction has a combinational path through the buffer. An anti-token arriving
at the output kills the token offered there; a stored anti-token offered at
the input kills the sender's token. Two slots are needed because the sender
learns about a stop one cycle late. `INIT_TOKEN = 1` makes the buffer start
with one token (it then behaves like a register); `INIT_TOKEN = 0` gives an
empty buffer, a *bubble*.

### `elastic_buffer_zbl` (forward latency 1, backward latency 0, capacity 1)

Only the valid bit and the data are registered. Stop and kill pass
combinationally: when it is empty an anti-token from the receiver goes
straight on to the sender, and a full buffer can take a new token in the same
cycle the old one leaves. It is used after the shared block in the replay
designs so that cancelled results are removed without delay. Chains of these
make long combinational control paths.

### `elastic_fork` (helper)

Eager fork: the input token is offered to every branch that has not taken it
yet, and is consumed when all branches have taken it or killed it. An
anti-token arriving on a branch with nothing on offer waits there for the
next token; the fork never sends anti-tokens to its own sender.

### `ee_mux`: the early-evaluation multiplexor

The multiplexor fires when the select token and the token on the selected
input are valid and the output can take a token. Firing consumes both and
gives every other input one anti-token. Each input has a small counter
(`PEND_W` bits) of anti-tokens not yet delivered: one is delivered by
killing the token waiting on that input, by handing it to the sender, or it
stays in the counter while the sender stops it. A token that arrives on an
input whose counter is not zero is killed, never used. The multiplexor cannot
fire while a counter it would increment is full.

If the select names an input that has no token (the upstream guess was
wrong), nothing fires and the tokens on the other inputs are stopped; this
stop is what the round-robin scheduler reads as a misprediction.

Anti-tokens arriving at the output are not passed further back: the
multiplexor holds `out_sn` high while it offers no token, so the anti-token
waits and cancels the next output token.

A useful way to see the bookkeeping: firing *k* uses up slot *k* of every
input. The selected input's *k*-th token becomes output *k*; the others'
*k*-th tokens are cancelled, whenever they arrive.

### `shared_module` and `spec_scheduler`

The shared module serves N channels with one combinational block outside it
(`f_arg` out, `f_res` in). Per cycle the scheduler picks one channel
(`sched`); the module multiplexes that channel's data into the block and
drives the result on all outputs. Control:

* the scheduled channel: `out_vp = in_vp`, its stop passes back;
* every other channel: `out_vp = 0`, and its input is stopped unless an
  anti-token is killing it at that moment;
* anti-tokens pass through combinationally in both directions.

Since the scheduler may change its choice after a stopped cycle, the
*outputs* of a shared module are not persistent (a retried token may
disappear); its inputs and every buffer after it are, which is enough to keep
order and lose nothing. Add a buffer after a shared module before anything
that relies on persistence.

The scheduler only ever picks a channel with a valid token if there is one
(rotating from its preferred channel). Two policies (`spec_pkg::sched_policy_e`):

* `SCHED_RR`: after a channel offered a token, transferred or stopped, the
  preference moves to the next channel. A stop on the chosen channel (a wrong
  guess) is thus corrected in the next cycle, and a waiting channel is served
  within N cycles. In the loop below this policy yields the alternating
  prediction sequence 0, 1, 0, 1, ... whenever both inputs are waiting.
* `SCHED_PRIMARY`: prefer channel 0, the speculative path. When a token
  issued on channel 0 arrives with `hint = 1` (its guess is known to be
  wrong), prefer channel `REPLAY_CH` until a token is issued there. `hint`
  only feeds a register, so the scheduler stays off the critical path.

## The circuits

### `spec_loop`

State: one `elastic_buffer` holding `x`, starting at `INIT_DATA`. Every
iteration computes

    x' = F(G(x) ? x + OFFSET : x),   F(y) = y + STEP,   G(x) = parity(x & G_MASK)

which can be read as a program counter: `G` decides whether a branch is taken,
`x + OFFSET` is the taken target. In the plain circuit the critical cycle runs
through G, the multiplexor select and F. Here F has been moved in front of the
multiplexor and shared between its two inputs, so F works in parallel with G,
and the round-robin scheduler guesses which input F should process. There are
no buffers between the shared module and the multiplexor. An eager fork
splits the state into the two F inputs, G and an output port, so `out_*`
shows every state value. One iteration takes 1 cycle after a right guess, 2
after a wrong one; after each iteration the scheduler prefers the input that
was *not* selected, which matters for how often G's pattern is guessed.

### `spec_replay` (helper), `varlat_alu`, `resilient_adder`

Both replay designs share one skeleton, `spec_replay`. Each input token brings
a fast operand, a slow but correct replay operand and a `wrong` flag:

```
            +--> fast operand ------------------------------> ch0 \
 in --fork--+--> replay operand --> [EB, empty] -------------> ch1  shared G --> [ZBL EB] ch0 \
            +--> wrong flag ------> [EB] -------------------------------------------------- sel  ee_mux --> [EB] --> out
                                                                                  [ZBL EB] ch1 /
```

The scheduler (`SCHED_PRIMARY`) sends the fast operand through the shared
block at once. If `wrong` was set, it serves the replay operand in the next
cycle; the multiplexor, selected by the buffered flag, takes the replayed
result and kills the speculative one still waiting on the other input. If
`wrong` was clear, the multiplexor takes the fast result and an anti-token
removes the replay operand from its bubble buffer. The flag never reaches
control logic of the same cycle: only the select buffer and the scheduler
register see it.

Timing, checked by the testbenches: a back-to-back stream of *n* operations
of which *e* were guessed wrong produces its last result
`(n - 1) + e + 2` cycles after the first input transfer (latency 2 from input
transfer to `out_vp`), so a right guess costs nothing and a wrong one exactly
one cycle.

`varlat_alu` (W = 8): add, sub, and, or, xor. The exact result has a full
carry chain; the approximate one splits the adder in two halves and assumes
no carry between them, and `F_err` is the carry out of the lower half for add
and sub (logic ops are always exact). The shared stage G appends zero and
negative flags to the result.

`resilient_adder`: each operand is a 72-bit codeword, 64 data bits and 8
check bits. The raw data bits go to the shared 64-bit adder (`prefix_adder`,
Kogge-Stone) at once; two `secded_decoder`s check and correct both operands in
the same cycle and the corrected pair waits in the bubble buffer. Any
detected error triggers the replay. A double error cannot be corrected: the
replayed sum is then the sum of the data bits as received and carries
`out_ded = 1`.

### `secded_decoder`

Extended Hamming code: codeword bit *p* (1..71) is Hamming position *p*;
check bit *j* sits at position 2^*j* (1, 2, 4, ..., 64) and covers all
positions with bit *j* set; the 64 data bits fill the remaining positions in
increasing order; bit 0 is even parity over the whole word. The decoder
computes the 7-bit syndrome (XOR of the positions of all set bits) and the
overall parity: parity wrong means a single error at position *syndrome*
(corrected, `sec`), parity right with a non-zero syndrome means a double
error (`ded`). Combinational.

## Where this RTL departs from or adds to the published design

* The capacity-2 elastic buffer is built from flip-flops with an occupancy
  counter and a two-entry FIFO, not from transparent latches.
* The zero-backward-latency buffer uses one valid flip-flop and a data
  register.
* The internals of the early-evaluation multiplexor (per-input anti-token
  counters, passive anti-tokens at the output) and of the eager fork are this
  design's own.
* The two scheduler policies are choices; any policy that only predicts
  valid channels and eventually serves every waiting token would do.
* F, G, widths and constants of `spec_loop`, the ALU operation set, the
  half-width approximate adder, the flags computed by G, the SECDED bit
  layout, the Kogge-Stone network and the double-error flag are choices.
* In the replay designs, the results after the shared block go through
  zero-backward-latency buffers and the select flag through an ordinary
  elastic buffer.
* Not built: the non-speculative baselines the examples are compared with,
  the formal verification models, and any area or timing figures, which
  belong to a specific cell library.

## Files

`rtl/` (one module or package per file):

| file | contents |
|---|---|
| `spec_pkg.sv` | scheduler policy enum, ALU operation enum, SECDED sizes and bit placement |
| `elastic_buffer.sv`, `elastic_buffer_zbl.sv`, `elastic_fork.sv` | channel primitives |
| `ee_mux.sv`, `spec_scheduler.sv`, `shared_module.sv` | speculation primitives |
| `spec_replay.sv` | replay skeleton used by the ALU and the adder |
| `spec_loop.sv`, `varlat_alu.sv`, `resilient_adder.sv` | the three circuits |
| `secded_decoder.sv`, `prefix_adder.sv` | datapath of the resilient adder |
| `spec_elastic_top.sv` | top: the three circuits side by side |

All sequential logic resets asynchronously on `rst_n` low.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_table1_trace.sv`, which replays the seven-cycle example trace of the
speculative loop on a shared module, a multiplexor and a buffer and checks
the scheduler's choice and the buffer input in every cycle.
`tb_secded_model.svh` is a reference encoder used by the adder testbenches.
Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
after a fixed number of cycles if the design hangs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    --top-module tb_spec_elastic_top rtl/spec_pkg.sv tb/tb_spec_elastic_top.sv
./obj_dir/Vtb_spec_elastic_top
```

Replace the module name to run another testbench. `tb_spec_elastic_top`
runs the whole top at its default sizes: 600 loop iterations and 800
operations through each replay design, with random input gaps, output
stalls, 0/1/2-bit errors, and cycle-exact checks of the error-free and
wrong-guess costs. It finishes in well under a second. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/spec_pkg.sv rtl/<file>.sv`.

## Changing it

* Another shared function: instantiate `shared_module`, connect the block
  between `f_arg` and `f_res`, feed its outputs (through buffers if the
  consumer needs persistent inputs) to an `ee_mux`.
* More than two channels: `shared_module`, `spec_scheduler` and `ee_mux` take
  `N`; the select is `$clog2(N)` bits.
* Another prediction scheme: add a value to `sched_policy_e` and a branch in
  `spec_scheduler`. Correctness does not depend on it as long as every
  waiting token is eventually chosen.
