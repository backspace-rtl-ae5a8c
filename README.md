# BackSpace debug hardware

When first silicon fails deep into a long test (seconds into booting an
operating system, say), the state at the failure can be scanned out, but the
cycles that led to it are lost: they are far too many to simulate from reset,
and a trace buffer only records a few signals. BackSpace recovers that history
one cycle at a time, working backwards from the failure. The chip runs at full
speed and carries two small additions: a **signature**, a few recorded bits of
the previous cycle's state, and a **breakpoint** that freezes the chip when its
state matches a programmed value. Each step back works like this:

1. Stop the chip in the "crash" state and read out its state and signature.
2. Off chip, formal analysis (a SAT solver on the RTL) lists every state that
   can reach the crash state in one clock *and* agrees with the signature.
   That list is the pre-image. A good signature keeps it short.
3. Load one candidate into the breakpoint, reset the chip and run the same
   test again. If the chip stops at the breakpoint, that candidate really
   happened: it becomes the new crash state. If not, try the next candidate.

Each step moves the trace back one cycle. Repeating it gives a trace of real
execution, as long as needed, right up to the failure.

This repository holds the on-chip half of that loop as synthesizable
SystemVerilog. It is sized for a 32-bit, 5-stage RISC core with 3007 state
flip-flops, of which 1276 are recorded as the signature. The processor core
itself is not included. The design wraps the core's state flip-flops and
connects to its logic through a narrow port.

## Structure

```
             host commands, CSR bits in, state dump out, signature read-out
                                   |
                           +---------------+
                           |    bs_ctrl    |  reset / run / run-to-break /
                           +---------------+  load / dump sequencing, cycle counter
              cud_en,scan  |   |bp_arm,     | sig_clear, sig_wr
                           |   |csr shift   |
   cud_next_state   +-------------+   |     |
  ----------------->| bs_scan_reg |   |     |
   (core logic)     | N_STATE FFs |   v     v
  <-----------------|  full scan  |--+--> bs_breakpoint --hit--> bs_sig_collect --> sig_rd_data
   cud_state        +-------------+  |    (target, mask)          (trace buffer)
                                     |                                 ^
                                     +--> bs_sig_create ---------------+
                                          (N_MON of N_STATE bits)
```

| Module | Role |
|---|---|
| `bs_top` | Wires the blocks together. Has the host port and the core port. |
| `bs_scan_reg` | The core's N_STATE state flip-flops as mux-D scan flops. They load the next state when `func_en` is high, shift when `scan_en` is high, and hold otherwise. |
| `bs_breakpoint` | Target and mask registers loaded as one serial chain. Raises a combinational `hit` when every unmasked bit equals the target. |
| `bs_sig_create` | Picks the N_MON monitored bits out of the state with the constant mask `MON_MASK`. No compression. |
| `bs_sig_collect` | Trace buffer of TB_DEPTH signatures (one by default). Collection stops on the breakpoint. |
| `bs_ctrl` | Command controller: reset, run, load, dump, plus the stop conditions. |
| `bs_pkg` | Command and status enums, default sizes. |

## The one-cycle relationship

The trace is only correct if the hardware captures exactly the right cycle, so
the timing matters most.

- The state register advances only on clocks with `cud_en` high. Call the
  state after k such clocks (since the end of reset) `S[k]`. `cycle_count`
  then reads k.
- On each of those clocks the trace buffer also writes the signature of the
  state being left, `sel(S[k-1])`. After the clock, the newest signature
  therefore belongs to the **predecessor** of the present state. The pre-image
  computation needs exactly that.
- The breakpoint compares the *present* state and drives `hit`
  combinationally. During an armed run, `hit` pulls `cud_en` low in the same
  cycle. The matching state stays in the flip-flops, and the clock that would
  leave it never happens. For the same reason, no signature is written in that
  cycle, and the buffer freezes until the next reset.
- So after a run that stopped at the breakpoint, the same pair a crash gives
  is available: the state `S[k]` and the signature `sel(S[k-1])`. The loop can
  carry straight on from there. `cycle_count` says at which cycle the match
  happened. If the chip is deterministic, a match one cycle earlier than the
  previous crash state confirms the step.
- A run to a cycle target stops with `cycle_count == target`. If the target is
  already behind the count, the run ends at once. A run with the breakpoint
  armed uses the target as a time-out, so a candidate the chip never reaches
  costs a bounded run.
- If the state already matches when an armed run starts, the run ends at once
  with no clock.

## Host interface

All signals are synchronous to `clk`. `rst_n` resets the debug logic
asynchronously; it does not touch the core's state.

A command is accepted on a clock with `cmd_valid && cmd_ready`. `cmd_ready`
is high only while the controller is idle. `done` pulses for one clock when
the command ends. `busy` is high in between.

| `cmd_op` | Action | Length |
|---|---|---|
| `CMD_RESET` | Drives `cud_rst` and `cud_en` high so the core's own reset logic sets its state. Clears `cycle_count`, `stop_reason` and the trace buffer. | `RST_CYCLES` clocks |
| `CMD_RUN` | Runs until `cycle_count` reaches `cmd_arg`. The breakpoint is ignored. `stop_reason = STOP_LIMIT`. | one clock per core cycle |
| `CMD_RUN_BP` | Same, but also stops at the first matching state (`STOP_BREAK`). | as above |
| `CMD_LOAD` | Takes 2·N_STATE bits on `csr_valid`/`csr_bit` while `csr_ready` is high. Gaps are allowed. | one clock per bit |
| `CMD_DUMP` | Sends the state out on `dump_bit` with `dump_valid`, MSB first. The chain is fed back into itself, so the state is the same afterwards. | N_STATE clocks |

Breakpoint bit order: the first bit sent is mask bit N_STATE-1 and the last is
target bit 0, so the chain holds `{mask, target}`. A mask bit of 1 drops that
state bit from the comparison. An all-zero mask asks for an exact match. A mask
covering everything except a few fields gives a partial breakpoint, for
example "stop when the program counter equals X".

The signature is read through its own port, at any time:
`sig_rd_addr = 0` is the newest entry and `sig_count` the number of valid
entries. Reading is combinational. With a TB_DEPTH above one, addresses 1, 2…
give older cycles, so several cycles can be traced back per run.

## Connecting a core

- Take the core's state flip-flops out of it. `cud_state` is their value.
  Return the core's next-state logic on `cud_next_state`.
- Fold reset into the next state, selected by `cud_rst`.
- Treat `cud_en` as the core's clock enable. Anything outside that talks to
  the core, such as memory, must respect it, because while `cud_en` is low the
  core is frozen.
- Set `MON_MASK` to the flip-flops worth monitoring. It must have exactly
  `N_MON` bits set, and an initial assertion checks this. Monitored bits
  appear in the signature in ascending order. The default simply takes bits
  0 to 1275. Choose bits that tell apart the likely predecessors of a state,
  such as datapath registers and control state, so that the pre-images stay
  small.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_STATE` | 3007 | State flip-flops of the core. All of them are scanned and compared by the breakpoint. |
| `N_MON` | 1276 | Monitored bits, which is also the signature width. |
| `TB_DEPTH` | 1 | Signatures kept in the trace buffer. |
| `CNT_W` | 32 | Width of the cycle counter and targets. This is enough for crash states hundreds of thousands of cycles deep. |
| `RST_CYCLES` | 4 | Clocks of core reset. |
| `MON_MASK` | bits 0…N_MON-1 | Which state bits are monitored. |

At the defaults, synthesis gives about 9,100 flip-flops: 3007 core state,
2 × 3007 breakpoint target and mask, and the controller. The trace buffer adds
1276 memory bits.

## What follows the described system and what is chosen here

These come from the system this design follows:

- the split into breakpoint, signature creation and signature collection
  circuits;
- full scan of the core state;
- a breakpoint on all state bits, with bits that can be masked off, loaded by
  shifting in control bits;
- a signature made of a hand-picked subset of 1276 of the 3007 flip-flops,
  with no hashing;
- one signature per run;
- collection that stops on the breakpoint;
- the reset / run / load / dump commands, and stopping the run at a cycle
  count.

These are this design's own choices:

- the command encoding and handshakes;
- the bit orders of the chains;
- the mask polarity;
- the combinational breakpoint that freezes the core in the matching cycle;
- stopping the core by clock enable;
- reading the signature out through a port rather than the scan chain;
- the reset length;
- which 1276 bits the default mask takes.

In the system this follows, a supervising processor relayed the commands and
counted cycles in software. Here the cycle counting and stopping are done by
`bs_ctrl` in hardware.

These parts are not included:

- the processor core;
- its UART;
- the board's processor, memory, buses and PCI link;
- the host software that computes pre-images.

The options of making the monitored set programmable (a concentrator network)
or hashing the whole state into the signature are not built either.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_bs_scan_reg` | Load, hold, MSB-first shifting, restoration after a full rotation, and that scan wins over load. |
| `tb_bs_breakpoint` | Random targets and masks, exact and masked matches, single-bit misses, disarm, and chain order. |
| `tb_bs_sig_create` | The default mask at full size, and a sparse custom mask. |
| `tb_bs_sig_collect` | A 4-deep buffer against a reference: newest-first reads, wrap-around, stop, clear. Also the 1-deep default. |
| `tb_bs_ctrl` | Reset length, exact run lengths, already-passed targets, armed and disarmed breakpoints, time-outs, load bit count, and dump. |
| `tb_bs_top` | Full default size, end to end. Uses a stand-in core with a cycle counter and a feedback shift register. Crashes at cycle 60 and backs up 6 cycles. Each step tries a decoy candidate (it matches the signature and differs in an unmonitored bit, so it is never reached and must time out) before the true one. Then it tests a masked breakpoint on the counter field and a plain run past an exact breakpoint. It counts every mechanism: reset, stop at target, stop at breakpoint, unreached candidate, masked match, disarmed breakpoint, load, dump, signature read. |
| `tb_bs_gcd` | Full default size. The stand-in core computes a GCD by repeated subtraction. The testbench works out each pre-image analytically, in the same way the SAT solver would. Only one bit of the GCD registers is monitored, so two candidates always pass the signature. It crashes the run 30,000 cycles after reset and backs up 500 cycles, trying candidates in random order. It checks each reconstructed state against an independent forward computation, and checks that each hit comes exactly one cycle before the previous one. |
| `tb_bs_sieve` | Full default size. The stand-in core runs a Sieve of Eratosthenes over 1600 flags. The loop registers are monitored and the flags are not. A step that clears a flag leaves two candidates, because the flag's earlier value is unknown; a step that moves to the next prime leaves one. It crashes the run 3,000 cycles after reset and backs up 500 cycles, with the same checks as `tb_bs_gcd`. |
| `tb_bs_gcd_nondet` | Full default size. The same GCD, but the stand-in core sometimes spends a clock in a wait state at random, like a core waiting on memory of varying latency. A state may therefore be reached at a different cycle in each re-run, or not at all, and candidates are re-run until one is hit. The trace is checked for validity: each state found must be a legal predecessor of the one after it and must agree with its signature. It backs up 200 cycles. |
| `tb_bs_top_depth` | Reduced size with a 4-entry trace buffer. Checks that one stop yields the signatures of the four preceding cycles, that the count is right for short runs, and that the buffer stays frozen after a breakpoint. |

Run any of them with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  --top-module tb_bs_gcd rtl/bs_pkg.sv tb/tb_bs_gcd.sv
./obj_dir/Vtb_bs_gcd
```

Each full-size testbench finishes within a minute. A 500-step backspace takes
about 750 chip runs.

## Limits

- The hardware needs nothing extra for a chip that does not behave the same way on every run. It only costs re-runs, because the host retries each candidate until one is hit, and `tb_bs_gcd_nondet` shows this. With such a chip, `cycle_count` at a hit no longer tells how far back the trace has reached.
- The breakpoint adds a 3007-bit compare and AND-reduce in front of the core's
  clock enable. At high clock rates, register `hit` and stop the core one
  cycle later, then account for that cycle on the host side.
- Breakpoint and signature loading are serial. Loading 6014 bits takes 6014
  clocks per candidate. This is small next to a re-run.
