# Low-power destination address generator for a DMA controller

A DMA controller moves data from a source port to a destination port without
the CPU. Each side needs an address generator that tells the memory where the
next word goes. This is the destination side. It is a small register that
either starts a new run at a given address or moves on from the last address
by a fixed stride of 1, 2, 4 or 8.

The design is the low-power version of this generator. A conventional
generator passes a full 32-bit step word into a general 32 + 32-bit adder. This
one saves power and area in two ways:

* **The step is a 2-bit code.** The code drives the select input of a 4:1
  multiplexer whose data inputs are the constants 1, 2, 4 and 8. Only two
  wires carry the step into the block.
* **The adder is reduced.** The step is at most 8, so only the low four bits
  need full adders. The upper bits only pass on a carry, so they are built as
  an incrementer.

## Behaviour

On every rising clock edge where `enable_i` is high:

```
addr_o <= (setaddr_i ? addr_i : addr_o) + STEP[step_i]      STEP = {1, 2, 4, 8}
```

| `step_i` | step |
|----------|------|
| `00`     | 1    |
| `01`     | 2    |
| `10`     | 4    |
| `11`     | 8    |

* With `setaddr_i` high, a new run starts. The first address out is
  `addr_i + step`, not `addr_i` itself. Loading 9 with step code `00` gives 10.
* With `setaddr_i` low, the generator continues from its own output.
* With `enable_i` low, `addr_o` holds, whatever the other inputs do.
* The address wraps modulo 2^`ADDR_W`. No carry-out or overflow flag exists.
* The generator counts no words. The controller's transaction FSM decides when
  a transfer ends, and it drives `enable_i`, `setaddr_i`, `step_i` and `addr_i`.

Reference sequence (checked in `tb_dest_addr_gen`). Each row is one enabled
or disabled clock edge.

| enable | setaddr | step | addr_i     | addr_o after the edge |
|--------|---------|------|------------|-----------------------|
| 1      | 1       | 00   | 9          | 10                    |
| 1      | 0       | 00   | –          | 11, 12, 13, 14        |
| 0      | x       | x    | x          | 14 (held)             |
| 1      | 1       | 00   | 1522275410 | 1522275411            |
| 1      | 0       | 11   | –          | 1522275419            |

## Structure

```
            step_i[1:0] ──► dag_step_mux ──(4-bit step)──┐
                                                         ▼
 addr_i ──► dag_addr_mux ──(base)──────────────► dag_step_adder ──► dag_addr_reg ──► addr_o
            ▲  setaddr_i                                            ▲ enable_i │
            └──────────────────────────────────────────────────────────────────┘
```

| File | Role |
|------|------|
| `rtl/dag_pkg.sv` | `ADDR_W_DEFAULT` (32), `STEP_W` (4), enum `step_code_e` |
| `rtl/dag_step_mux.sv` | 4:1 mux from step code to step size |
| `rtl/dag_addr_mux.sv` | 2:1 mux from `addr_i` or fed-back `addr_o` to the base address |
| `rtl/dag_step_adder.sv` | reduced adder: base + step |
| `rtl/dag_addr_reg.sv` | enabled D flip-flop register holding `addr_o`, with asynchronous reset and an assertion that it holds while disabled |
| `rtl/dest_addr_gen.sv` | top level: wires the four parts together |

### The reduced adder

This is the only part whose inner structure is not obvious. The base address
has `ADDR_W` bits and the step has `STEP_W` = 4 bits. So the adder is split in
two parts:

* bits `0 … STEP_W-1` form a ripple chain of full adders: sum = a ⊕ b ⊕ c, carry = ab + c(a ⊕ b);
* bits `STEP_W … ADDR_W-1` form a chain of half adders: sum = a ⊕ c, carry = a·c.

At 32 bits that makes 4 full adders and 28 half adders. A general adder would
need 32 full adders. The final carry is dropped, which gives the wrap. The
adder does not rely on the step being a power of two. It adds any 4-bit
value, so widening the step table only needs a larger `STEP_W`.

The low-power design is known to use a dedicated addition routine in place of
the `+` operator. How that routine is built inside is not known. The
full-adder/half-adder split described here is this implementation's own
choice, made to fit the narrow step operand.

### Timing

The design has one clock, `clk_i`. The inputs are sampled on a rising edge,
and `addr_o` shows the new address right after that edge: a latency of one
cycle and one address per cycle. The critical path runs from the `addr_o`
register, through the base multiplexer and the carry chain, back to the
register. The carry chain is about `ADDR_W` gates long.

## Interface

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk_i` | in | 1 | clock |
| `rst_ni` | in | 1 | asynchronous active-low reset; clears `addr_o` to 0 |
| `step_i` | in | 2 (`step_code_e`) | step code, see table above |
| `enable_i` | in | 1 | 1: compute and register the next address; 0: hold |
| `setaddr_i` | in | 1 | 1: start from `addr_i`; 0: continue from `addr_o` |
| `addr_i` | in | `ADDR_W` | start address |
| `addr_o` | out | `ADDR_W` | current destination address (registered) |

Parameter: `ADDR_W` (default 32). The widths 8 and 16 have also been
evaluated for this design, and both work; `ADDR_W` must be larger than
`STEP_W`.

## Where this implementation departs from or adds to the original design

* **Reset.** The original port list has no reset. `rst_ni` was added so the
  address register never starts from an undefined value. Hold it high (or
  drive it once) if you do not need it.
* **Adder internals.** See above. The function is fixed by the behaviour; the
  gate structure is this implementation's own.
* **Enable flip-flop.** The original design says a D flip-flop enables the
  generator. Here it is the output register with a clock enable. A variant
  that first registers `enable_i` would add one cycle of latency. Nothing in
  the published waveform calls for that extra cycle.
* **Step codes `01` and `10`.** The published material only shows code `00`
  as step 1 and code `11` in use. The mapping 01→2 and 10→4 follows the
  order in which the step sizes are listed.
* **Not included.** The rest of the DMA controller is not included: the
  transaction FSM, the source address generator with its word counter, and
  the source and destination decoders. The original design only names them.
  Their connections to this block are its input ports. The published power
  (−38 %), area (−15 %) and timing figures come from a 180 nm standard-cell
  synthesis flow, and these RTL files do not reproduce them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|-----------|----------------|
| `tb_dag_step_mux` | all four codes against 2^code |
| `tb_dag_addr_mux` | 200 random selections |
| `tb_dag_step_adder` | carry into the half-adder chain, wrap at 2^32, 500 random sums against `+` |
| `tb_dag_addr_reg` | reset, load on enable, hold without enable |
| `tb_dest_addr_gen` | top at default parameters: the reference sequence, wraps, 5000 random cycles against a model, reset mid-run, one-cycle latency; counts loads, continues, holds, wraps and each step size, and fails if one never happened |
| `tb_dest_addr_gen_widths` | 8-, 16- and 32-bit instances on one random stream, each against its own modulo-2^W model, with wraps at each width |

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dag_pkg.sv \
    tb/tb_dest_addr_gen.sv --top-module tb_dest_addr_gen -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run the others. Each one finishes in well under
a second.
