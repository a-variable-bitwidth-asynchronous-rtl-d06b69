# MADD: a multiplier-free, variable-length dot product unit

This unit computes a dot product S = Σ wᵢ·aᵢ without a multiplier. The
multiplier operand w is never stored as a number. It is the *address* at which
the multiplicand a is kept. Two adders then walk that array from the top down.
The number of clocks a computation takes equals the largest w present, not a
fixed worst case. Small or sparse weights finish early. Because the latency
depends on the data, the unit reports completion on a request/acknowledge
handshake rather than after a fixed number of cycles. That is the
"asynchronous" in its description: the logic itself is synchronous and
single-clock.

The default configuration has 8-bit operands on both sides: a 256-entry array
(entries 1..255 used) of 8-bit multiplicands, which can stand in for an 8×8
multiply-accumulate.

## Multiplication by position

Each tuple (w, a) is added into entry[w]. Tuples that share a w add up in the
same entry. Index 0 contributes nothing and is dropped. After loading, the
array holds e[j] = Σ{aᵢ : wᵢ = j}, and the dot product is Σⱼ j·e[j].

The loop (called MADD, "multiplicative add") starts at i = MAXVAL, the largest
index loaded, and runs while i > 0:

```
height <- height + e[i]
acc    <- acc + height
i      <- i - 1
```

After visiting index j, `height` holds the sum of all entries at indices ≥ j.
`acc` adds one such height per step, so an entry at index j is added into
`acc` once for each of the steps j, j-1, …, 1. That is exactly j times.

Example with the tuples (3,4), (1,7) and (3,2): e[3] = 6, e[1] = 7, MAXVAL = 3.

| i | e[i] | height | acc |
|---|------|--------|-----|
| 3 | 6    | 6      | 6   |
| 2 | 0    | 6      | 12  |
| 1 | 7    | 13     | 25  |

The result is 25 = 3·6 + 1·7, reached in MAXVAL = 3 steps.

The multiplier is therefore traded for memory: an n-bit w needs a 2ⁿ-entry
array. The width of w is variable at run time, because a data set whose
largest w is 20 costs 20 steps whatever the array size.

## The shift-register array (`madd_array`)

The array is a shift register of `2^W_BITS` entries of `ENTRY_BITS` each.

* **Loading.** A write adds `a` into `entry[w]` through one adder at the write
  port. The largest index written is kept in a register as MAXVAL. A guard bit
  on the adder detects an entry wrapping modulo 2^ENTRY_BITS. This raises the
  sticky `ovf` flag, and the result of that operation is then wrong. `ovf`
  stays valid until the first write of the next operation.
* **Reading.** `start` copies MAXVAL into a *tap* register and clears MAXVAL.
  Each `shift` moves every entry one place up (entry[k] ← entry[k-1], with zero
  into entry[1]). The entry read is always the one at the tap. It therefore
  shows e[MAXVAL], e[MAXVAL-1], …, e[1] on consecutive clocks, which is the
  descending walk of the loop. The read port is a mux that is set once per
  operation, not an address that changes every clock.
* **Self-clearing.** On every shift, the entry just above the tap takes zero
  instead of the value leaving the tap. Without this, values already read
  would climb above MAXVAL and corrupt the next operation. Entries above
  MAXVAL were zero before the shift. After MAXVAL shifts the whole array is
  zero again, so the next operation needs no clear cycle.

Writes and shifts never happen in the same clock. The controller accepts
tuples only while idle, and an assertion checks this.

## The two adders (`madd_datapath`)

`height` is `ENTRY_BITS + W_BITS` bits wide and `acc` is
`ENTRY_BITS + 2·W_BITS − 1` bits wide (16 and 23 bits by default). With every
entry at its maximum E, the largest values are E·(2^W−1) and
E·(2^W−1)·2^W/2, so neither register can overflow. The widths are computed by
functions in `madd_pkg`.

The parameter `HEIGHT_TAP` chooses what the accumulator adds:

* `0` (default): the output of the first adder, `height + e[i]`, as in the
  loop above. The critical path is two adders in series. The result is final
  after MAXVAL steps.
* `1`: the `height` register. The path is one adder, but `acc` always lags one
  height behind. One extra accumulate-only clock (the *drain* clock) is needed
  at the end.

## Control and completion (`madd_control`)

The controller has four states: IDLE, RUN, DRAIN (only with `HEIGHT_TAP = 1`)
and DONE. It signals completion on a four-phase handshake:

```
req  ____/~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~\______
ack  _________________________/~~~~~~~~~~~~\___
         |<- 1 + MAXVAL clocks ->|
```

* In IDLE, a sampled `req` pulses `start`. This clears `height` and `acc`,
  loads the tap, and sets the loop counter i ← MAXVAL.
* RUN issues one `step` per clock: one height/accumulate update and one array
  shift. It decrements i and leaves after the step with i = 1.
* MAXVAL = 0 (nothing loaded) skips RUN. `ack` then rises the next clock with
  result 0.
* DONE holds `ack` and the result until `req` falls. `ack` drops one clock
  later.

From the clock edge that samples `req` to `ack`, the unit takes 1 + MAXVAL
clocks, or 2 + MAXVAL with `HEIGHT_TAP = 1`. The loop itself is MAXVAL clocks.
The extra clock is the request being sampled.

Assertions in the controller check the handshake rules:

* `req` falls only while `ack` is high.
* `req` rises only while `ack` is low.
* `ack` holds while `req` is high.
* No step runs with i = 0.

## Top level (`madd_dot_product`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of every register, the array included |
| `in_valid`, `in_ready` | in/out | 1 | tuple handshake; `in_ready` is high only while idle with no request pending |
| `in_w` | in | W_BITS | index operand (multiplier) |
| `in_a` | in | A_BITS | multiplicand |
| `req`, `ack` | in/out | 1 | four-phase compute handshake |
| `result` | out | ENTRY_BITS+2·W_BITS−1 | dot product, valid while `ack` is high and until the next request |
| `maxval` | out | W_BITS | largest index loaded so far, i.e. the length of the next computation |
| `ovf` | out | 1 | an entry wrapped while loading |

The tuple port accepts one tuple per clock.

| parameter | default | meaning |
|-----------|---------|---------|
| `W_BITS` | 8 | index width; the array has 2^W_BITS entries, 1..2^W_BITS−1 used |
| `A_BITS` | 8 | multiplicand width at the port |
| `ENTRY_BITS` | 8 | array entry width, must be ≥ A_BITS; make it wider to let repeated indices add up without wrapping |
| `HEIGHT_TAP` | 0 | 1 selects the shorter-path accumulator with one drain clock |

A typical sequence:

1. Offer tuples while `in_ready` is high.
2. Raise `req` and wait for `ack`.
3. Read `result` and `ovf`.
4. Drop `req`.

The next load can start as soon as `ack` has fallen.

Synthesized by default, the unit is 2048 bits of array storage (256 × 8), 68
other flip-flops, and a 256:1 read mux. Entry 0 is never written.

## Where this design makes its own choices

The algorithm, the shift-register array of 2ⁿ entries, the MAXVAL-dependent
loop with a completion signal, and the optional height-register tap are the
published design. The following are choices of this implementation:

* **Repeated indices accumulate.** A repeated index adds into its entry.
  Overwriting would also fit a one-tuple-per-index use. Accumulating gives
  the same result in that case and stays correct when indices repeat.
* **Entry width.** It defaults to the multiplicand width, and wrap-around is
  flagged rather than prevented.
* **Shift direction, fixed tap and self-clearing.** How the shift register is
  read out is not specified; the scheme described above is this design's own.
* **Protocols.** The four-phase req/ack protocol, the valid/ready tuple port
  and loading only while idle.
* **Reset.** It is synchronous, and so are the register widths.
* **Clock domain.** The completion signal is in the unit's own clock domain.
  A receiver in another domain must synchronise `ack`.

Power and delay figures for a 90 nm synthesis exist for this architecture.
They have no counterpart here. Nothing in this RTL targets a process.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
values computed independently with ordinary multiplication, and ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `madd_array_tb` | accumulate-on-write, index 0 dropped, MAXVAL, wrap flag, read-out order, array empty after each read-out |
| `madd_datapath_tb` | both `HEIGHT_TAP` settings step by step against a model, final sums against Σ j·e[j], including a full array of maximum values |
| `madd_control_tb` | step count, loop index order, drain clock, exact ack latency, handshake release, for MAXVAL = 0, 1, 2, 255 and random |
| `madd_dot_product_tb` | end to end, default and `HEIGHT_TAP = 1` units side by side (see below) |
| `madd_dot_product_full_tb` | one complete 255-index operation on the default unit, result and 256-clock latency |
| `madd_workloads_tb` | see below |

`madd_dot_product_tb` also counts, and requires at least once, each of these
events:

* an empty operation
* a repeated index
* a w = 0 tuple
* an entry wrap
* a tuple refused while busy
* a drain clock
* a full-length operation
* back-to-back operations

`madd_workloads_tb` runs the evaluated workloads:

* ten random 8-term dot products on 6-, 7- and 8-bit square units (n-bit w
  and a, 2ⁿ-entry array)
* a full array for each of those units
* 10, 100, 200 and 255 distinct-index tuples on the 8-bit unit

All of these fit the default unit. The 6- and 7-bit cases also run on units
built at those widths.

To simulate with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/madd_pkg.sv \
    tb/madd_dot_product_tb.sv --top-module madd_dot_product_tb -o sim
./obj_dir/sim
```

Substitute any other testbench name. The package must be given first; the
modules are found through `-Irtl`. Every testbench runs in well under a second.
