# Concurrent error detection with Bose-Lin codes

This is synthesizable SystemVerilog for two circuits that detect their own
errors while they run (concurrent error detection, CED):

- a **self-checking combinational circuit**;
- a **self-checking sequential machine** in which a single checker watches
  both the state flip-flops and the outputs.

Both use a Bose-Lin code. The outputs of the protected logic carry a few
check bits: the number of ones in the outputs, taken modulo 2^R. A checker
recounts the ones in the outputs it receives and raises an error when its
count disagrees with the check bits. Two properties make the code cheap:

- It is *separable*. The functional outputs pass through unchanged, and the
  check bits are simply added next to them.
- The number of check bits is *fixed*. R = 2 bits are enough for any number
  of outputs. A Berger code, by contrast, needs about log2(n) check bits.

The cost is coverage. A modulo-4 count detects every *unidirectional* error
of up to t = 2 bits, where unidirectional means that all flipped bits go
0→1, or all go 1→0. It does not detect arbitrary errors. A circuit is
therefore protected only if every fault inside it can cause at most such an
error. Two structural rules give that guarantee:

1. **Inverter-free logic.** Inverters may sit only at the primary inputs.
   Every internal path is then non-inverting, so a stuck node pushes all the
   outputs it reaches in the same direction.
2. **Limited reach.** No internal node may have a path to more than t
   outputs, and the check-bit outputs count among them.

These rules belong to the gate-level netlist, which a fan-out-constrained
algebraic synthesis produces. RTL cannot express them (see
[How far to trust it](#how-far-to-trust-it)). The RTL here provides the
code, the checkers, and the CED architecture around an arbitrary functional
block.

## The code as implemented

For an N-bit word `d`, the R check bits are

    chk = ~( popcount(d) mod 2^R )        (bit-wise complement)

The complement matters. Suppose the check bits held the plain count. Then a
0→1 error on one data bit plus a 0→1 error on one check bit raises the count
and the check value by one each, and the result is a code word again. That
is a double unidirectional error the code would miss. With the complemented
count, a unidirectional error moves the data count and the encoded count in
opposite directions. An exhaustive test on 8-bit words confirms both halves
of this:

| R | detects every unidirectional error of | first undetected error |
|---|---------------------------------------|------------------------|
| 2 (modulo 4) | 1 or 2 bits | 3 bits (e.g. across data and check bits), or 4 data bits |
| 3 (modulo 8) | 1, 2 or 3 bits | 4 bits |

R = 2 is the default. R = 3 is also supported. Larger R needs the modified
counting rule of the general Bose-Lin construction, which is not
implemented. An assertion rejects such values.

The checker's counter never forms a full population count. It is an R-bit
running sum, and each addition simply drops the carries above bit R-1
(`bl_ones_count`).

## The checker and its two-rail output

`bl_checker` recounts the ones of the received word modulo 2^R. It then
pairs bit i of the count with bit i of the received check bits. For a code
word, the check bits are exactly the complement of the count, so each pair
`(count[i], chk[i])` is a valid *two-rail* signal: its two wires differ. A
chain of standard two-rail checker cells (`bl_trc`) reduces the R pairs to
one pair, `err_rail`:

| `err_rail` | meaning |
|------------|---------|
| `2'b01`, `2'b10` | code word, no error |
| `2'b00`, `2'b11` | non-code word, error detected |

Two wires instead of one mean that a stuck error line is itself detectable.
`bl_pkg::rail_ok()` decodes the pair. The checker is purely combinational,
so an error shows in the same evaluation as the word that carries it.

## The self-checking combinational circuit

`bl_comb_ced` = `bl_comb_logic` + `bl_checker`.

`bl_comb_logic` holds the protected function as a truth table, the parameter
`TABLE`. Row `x`, at bits `[x*NO +: NO]`, is the output word for input `x`.
The check bits `c` come from a **second table** that is derived from `TABLE`
at elaboration (`bl_pkg::check_table`). They are therefore independent
functions of the primary inputs, not a count of the outputs `y`. This is the
point of CED. Check bits computed from `y` would copy any error in `y`, and
the checker would never see it. In the gate-level view, the check-bit
functions are extra outputs synthesized alongside the function, under the
same structural rules.

Default sizes: 5 inputs and 28 outputs. These are the dimensions of the MCNC
benchmark *bw*, the circuit with the most outputs in the evaluation, which
is where a fixed-size code pays off most. The default table contents are an
**example function** from a seeded xorshift generator, not *bw* itself.
Replace `TABLE`, or the module body, with the logic you want to protect.

## The self-checking sequential machine

This is the part that is new compared with earlier schemes. Those encode the
state with an m-out-of-n code and the outputs with a Berger code, and they
need two checkers. They also cannot see faults in the flip-flops, because
the state is checked *before* it is stored. Here, one checker covers state,
outputs and flip-flops:

```
           x ──┬──────────────────────────────┐
               ▼                              ▼
        ┌─────────────┐  NS, NS_c  ┌───────┐  PS  ┌──────────────┐  Z, Z_c
        │ bl_ns_logic │───────────▶│ state │─────▶│ bl_out_logic │─────────┐
        └─────────────┘            │  reg  │      └──────────────┘         │
               ▲                   └───────┘─PS_c──────────────┐           │
               └──────────── PS ───────┘                       ▼           ▼
                                                        ┌────────────────────┐
                                                        │   bl_seq_checker   │─▶ err_rail
                                                        └────────────────────┘
```

The signals (all check values in the complemented form above):

| signal | width | content |
|--------|-------|---------|
| NS   | NSB | next state, from `bl_ns_logic` |
| NS_c | R | check bits of NS: count of ones in NS mod 2^R, generated as separate functions of `{x, PS}` |
| PS, PS_c | NSB, R | NS and NS_c after the rising clock edge (`bl_state_reg`) |
| Z    | NO | outputs, functions of `{x, PS}` (Mealy) |
| Z_c  | R | count of ones in **Z and PS together**, mod 2^R |

The single checker computes

    sum = popcount(Z) mod 2^R  +  count held in PS_c   (mod 2^R; that count is ~PS_c)

and compares `sum` with Z_c as R two-rail pairs. Fault-free, the count in
PS_c equals popcount(PS). The sum then equals the count that Z_c encodes, so
the outputs and the stored state are checked against each other in one step.
Z_c can be seen as encoding the machine's input space (PS) and output space
(Z) together.

When each error is caught (all verified in simulation):

| error location | flagged |
|----------------|---------|
| Z or Z_c | in the same cycle |
| NS or NS_c | not in its own cycle; in the **next** cycle, after the edge stores it and PS disagrees with PS_c |
| one NS bit and one Z bit (a node reaching two outputs) | Z part at once, NS part one cycle later |
| a PS or PS_c flip-flop holding a wrong value | while it holds it |

Flip-flop faults are covered because the checker looks at PS, the output of
the flip-flops, and not at NS. A PS bit may fan out to many outputs, but a
wrong PS bit is still a wrong state word that the separately stored PS_c
does not match. The state encoding is unconstrained, because the code is
separable. Any state assignment works, and data registers can be protected
the same way as control state.

Default sizes: 3 inputs, 5 outputs, and 7 states in 3 flip-flops (the
dimensions of the MCNC machine *dk14*). The next-state and output tables are
example contents (`bl_pkg::example_table`, seeds 2 and 3), not *dk14*.

Reset: the asynchronous active-low `rst_n` loads `RESET_STATE` (default 0)
together with its check bits. The machine therefore leaves reset in a code
word.

## Top level

`bl_ced_top` places the two designs side by side. They share only the
parameter `R`. Ports:

| port | dir | width | |
|------|-----|-------|-|
| `comb_x` | in | COMB_NI (5) | combinational circuit inputs |
| `comb_y`, `comb_c` | out | COMB_NO (28), R | its outputs and check bits |
| `comb_err_rail` | out | 2 | its two-rail error output |
| `clk`, `rst_n` | in | 1 | machine clock (rising edge) and async reset (active low) |
| `seq_x` | in | SEQ_NI (3) | machine inputs |
| `seq_z`, `seq_z_c` | out | SEQ_NO (5), R | outputs Z, check bits Z_c |
| `seq_ps`, `seq_ps_c` | out | SEQ_NSB (3), R | present state and its check bits |
| `seq_err_rail` | out | 2 | the single checker's two-rail output |

To protect your own logic, override `COMB_TABLE`, `SEQ_NS_TABLE` and
`SEQ_Z_TABLE`, together with the size parameters. The table helpers in
`bl_pkg` handle tables of up to 8192 bits with rows of up to 32 bits. For
larger circuits, replace the table modules with real logic that keeps the
same ports.

## How far to trust it

- **Structural guarantee not enforced.** Every *internal* single fault is
  detected only when the functional and check-bit logic is an inverter-free
  netlist in which no node reaches more than t outputs. A truth table in RTL,
  synthesized by an ordinary tool, will share logic freely and use
  inverters, so it does not meet this. What the RTL does guarantee is the
  detection of every unidirectional error of up to t bits that appears *at
  the outputs* of the protected blocks, and of every single-bit error in the
  state flip-flops.
  The testbenches inject exactly those.
- **Complemented check bits.** Each check value holds the count bit-wise
  complemented, for the reason given above. Adopting the plain count would
  weaken double-error detection.
- **Checker internals.** The checker does compute a modulo-2^R count and
  compare it, but its counter is a plain adder chain. It has not been
  designed or verified to be totally self-checking, meaning that it would
  itself reveal every one of its own internal faults under normal inputs.
  Only the two-rail reduction `bl_trc` has that classic property.
- **Example functions.** The default tables are arbitrary. No benchmark
  function is reproduced, so the end-to-end test checks the CED mechanism,
  not any particular application.
- **Own choices:** the complemented check form, the two-rail comparison back
  end, Mealy outputs, the asynchronous active-low reset and reset state 0, and
  the serial accumulation order of the counter.

## Benchmark sizes and the default configuration

The evaluation uses MCNC benchmarks. Against the defaults:

- Combinational circuits with at most 5 inputs and 28 outputs fit the
  default table, with unused inputs tied off: bw, dc1, wim, p82.
- The others need larger parameters. m1, inc, 5xp1, clip, dc2, luc and sa02
  still fit the 8192-bit helper limit as tables. apla, br1, b10 and in0 are
  larger than that. vg2 (25 inputs) and x6dn (39 inputs) need real logic
  rather than a table.
- Of the machines, dk14 and dk15 fit the defaults. dk16, planet and styr
  need more state bits or inputs.
- The checker alone is simulated at 8, 16, 24 and 32 information bits, the
  sizes of the literal-count comparison for checkers
  (`tb_bl_checker_sizes`).

## Files

| file | role |
|------|------|
| `rtl/bl_pkg.sv` | shared constants, `rail_t`, elaboration-time table helpers |
| `rtl/bl_ones_count.sv` | modulo-2^R counter of ones |
| `rtl/bl_trc.sv` | two-rail checker chain |
| `rtl/bl_checker.sv` | Bose-Lin checker |
| `rtl/bl_seq_checker.sv` | combined state/output checker of the machine |
| `rtl/bl_comb_logic.sv`, `rtl/bl_comb_ced.sv` | self-checking combinational circuit |
| `rtl/bl_ns_logic.sv`, `rtl/bl_out_logic.sv`, `rtl/bl_state_reg.sv`, `rtl/bl_seq_ced.sv` | self-checking sequential machine |
| `rtl/bl_ced_top.sv` | top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_bl_checker_sizes.sv` | the checker at 8, 16, 24 and 32 information bits |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a cycle
watchdog. Example, for the end-to-end test at default sizes:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/bl_pkg.sv tb/tb_bl_ced_top.sv --top-module tb_bl_ced_top
./obj_dir/Vtb_bl_ced_top
```

Replace `tb_bl_ced_top` with any other testbench name. Errors are injected
with `force` on internal signals, so the testbenches rely on the instance
names `u_logic`, `u_ns`, `u_out` and `u_state`.

What the testbenches cover:

- `tb_bl_checker` walks every 8-bit code word through every unidirectional
  error of 1 and 2 bits (R = 2), and of 1 to 3 bits (R = 3). It also shows
  the missed 4-bit case and exercises a 32-bit checker.
- `tb_bl_comb_ced` and `tb_bl_seq_ced` inject output, check-bit, next-state
  and flip-flop errors. They check the cycle in which each error is flagged.
- `tb_bl_ced_top` runs both designs at their default sizes. It counts each
  detection mechanism and fails if any of them never occurred.
