# FLINT+ style timing emulation in SystemVerilog

Circuits that are clocked faster than their critical path, on purpose, produce
wrong results now and then, and the rate and size of those errors depend on the
timing corner: temperature, supply voltage and the cell library. Measuring this
with SDF gate-level simulation is slow, and every new corner needs a new
simulation campaign.

This RTL runs the gate-level netlist on an FPGA instead, with each gate's
propagation delay emulated in hardware. Time is quantized. One cycle of a fast
reference clock `clk_ref` stands for one time quantum (for example 1 ps, 10 ps
or 100 ps of ASIC time). Every instrumented gate holds its delays as counter
presets. On an input change it counts down the matching preset and only then
lets its output follow. The slow system clock of the emulated circuit,
`sys_clk_ff`, is an integer number of reference cycles. Shortening it makes the
emulated registers capture values that have not settled, which is exactly a
timing error.

The delays are not fixed when the FPGA design is built. All presets sit in a
long shift chain that runs through every instrumented cell. Loading a new
corner is a matter of shifting in a new stream of words, so one FPGA build can
cover any number of timing corners.

The repository contains:

* the instrumented combinational and sequential cells;
* three evaluation netlists built from them: a ripple-carry adder, a
  ripple-carry array multiplier and a non-restoring array divider;
* the emulation framework around the netlist: memories, control FSM, register
  file, clock generator and I/O bus;
* a 32-bit CORDIC unit with exact or approximate (ETA2-M) adders, the
  case-study circuit.

## 1. The instrumented combinational cell (`instr_comb_cell`)

An `N_IN`-input gate is given by its truth table `TRUTH` (bit `k` is the output
for input vector `k`). Its zero-delay output `q_int` is computed every
reference cycle. The instrumentation around it decides when `q` may take that
value.

```
 a ──►[in_r]──►[7-stage SRG]──┐                   (old input values)
        │                     ├─► address generator ─► parameter store (4n words)
        └─► TRUTH ─► q_int ─►[q_r]─┬─►[4-stage SRG]─┐         │ selected word
                                   │                ▼         ▼
                                   │        XOR with q ─► preset register
                                   │                           │
                                   └─►[2-stage SRG]─► XOR with q ─► count trigger
                                                               │
                     decrementer (DELAY_W+1 bits) ◄────────────┘
                        MSB set = idle ─► enables output flop q <= q_int (delayed)
```

Step by step:

1. **Address.** The registered inputs are compared with their copies seven
   cycles old. The first input (lowest index) that changed, together with the
   direction of that change and the direction the output will take, selects
   one of `4·N_IN` parameters. The order per input `i` matches the SDF IOPATH
   listing:

   | Word | Input edge | Output edge |
   |---|---|---|
   | `4i+0` | rising | rising |
   | `4i+1` | rising | falling |
   | `4i+2` | falling | rising |
   | `4i+3` | falling | falling |

   Input 0 has the highest priority when several inputs change together.
2. **Preset.** Four cycles after `q_int` changed, the preset register takes
   the addressed word, provided the pending value differs from `q`.
3. **Count.** Two cycles later the count trigger fires and the decrementer,
   which is one bit wider than a parameter, starts counting down from the
   preset.
4. **Output.** When it wraps past zero its MSB sets, counting stops, and the
   output flop copies the (equally delayed) `q_int`.

A running count is never restarted by later input changes. The output then
takes whatever `q_int` is when the count ends.

**Latency.** A parameter value `P` puts the output transition exactly `P + 9`
reference cycles after the input transition. Nine cycles is the pipeline
minimum (`flint_pkg::MIN_LATENCY`), so an SDF delay `d` is loaded as
`round(d / quantum) - 9`. Gates faster than nine quanta cannot be represented
exactly; they are clamped to 0.

With `INSTRUMENTED = 0` the cell is the plain gate, and the configuration chain
passes straight through it. That is how a partial instrumentation leaves gates
on short paths untouched.

## 2. The instrumented flip-flop (`instr_seq_cell`)

This is a D flip-flop with active-low reset `RN`, clocked by `sys_clk_ff`. It
uses the same pipeline as the combinational cell but has only three
parameters:

| Word | Delay |
|---|---|
| 0 | clock-to-Q, rising |
| 1 | clock-to-Q, falling |
| 2 | reset to Q |

The reset acts on the internal value at once, so its delayed effect also
appears after `P + 9` cycles. Setup and hold violations are not modelled: a
flip-flop that captures a changing input simply takes the value present in
that reference cycle.

Both cells use `flint_delay_core`, which holds the parameter shift register,
the preset register, the decrementer and the output flop.

## 3. The configuration chain and the parameter stream

Each cell stores its parameters in a small shift register. The cells are
chained in netlist order. The chain moves one word per `clk_load_en` pulse
while `load_en` is high.

The first word shifted in travels furthest. The stream therefore lists cells
from the **end** of the chain back to its start, and each cell's words in
index order (word 0 first). Within a cell, word `j` lands in `par[NPAR-1-j]`.
After a complete load, `load_out` of the last cell shows the very first word.
The framework brings this out as `chain_out` so that the chain length can be
checked.

Chain order and stream length per netlist:

| Netlist | Chain order (`load_in` side first) | Words |
|---|---|---|
| `rca_netlist` | `a_reg`, `b_reg`, gates by index, result registers | 3·(3W+1) + 8·(instrumented gates); 763 for W=16 |
| `mul_netlist` | `a_reg`, `b_reg`, W² AND2 cells, W-1 adder rows, 2W product registers | 3·4W + 8·(W² + (W-1)(5W-3)); 11480 for W=16 |
| `div_netlist` | `a_reg`, `b_reg`, W rows, W quotient registers | 9W + W·(8·(6W+5) + 4); 13136 for W=16 |

Each module's header gives the gate numbering.

## 4. The evaluation netlists

All three are register to register: operand registers, a combinational array
of 2-input cells, and result registers. The gate structures are textbook ones,
chosen here:

* **Adder:**
  * Bit 0 is a half adder.
  * Every other bit is `x = a^b`, `s = x^c`, `g = a&b`, `p = x&c`, `c' = g|p`.
  * `GATE_INSTR` selects which of its gates are instrumented.
* **Multiplier:**
  * Partial products `a[j] & b[r]`.
  * Row `r` adds the previous row (shifted right by one) to partial-product
    row `r` with a ripple-carry adder.
  * Low product bits leave the array one per row.
* **Divider:** non-restoring, with a (W+1)-bit partial remainder.
  * Each row shifts in the next dividend bit.
  * It then adds or subtracts the divisor, depending on the previous sign:
    XNOR cells invert the divisor, and the carry-in is the previous quotient
    bit.
  * An inverter turns the new sign into the quotient bit.
  * Division by zero returns whatever the array produces.

## 5. The emulation framework (`flint_top`)

```
            ┌──────────── I/O bus (io_bus_decoder) ─────────────┐
 host ◄────►│ regs │ parameter mem │ operand A │ operand B │ results │
            └──┬───────────┬──────────────┬──────────┬──────────▲──┘
               │ start     │ words         │ a        │ b        │ result
          control FSM ─────┴──► load chain ─►  instrumented netlist
               │  run                             ▲ sys_clk_ff, clk_load_en
          clock_gen ─────────────────────────────┘
```

The netlist is chosen when the design is built: `NETLIST = NL_ADD` (the
default), `NL_MUL` or `NL_DIV`, each `WIDTH` bits wide. The CORDIC unit sits
beside the framework with its own `cordic_*` ports.

### Bus

The bus is word-addressed with a 21-bit address:

* bits `[20:18]` select the region: 0 registers, 1 parameter memory,
  2 operand A, 3 operand B, 4 results;
* bits `[17:0]` give the word.

Writes take effect in their cycle. Read data and `bus_rvalid` appear one cycle
after `bus_re`. `bus_we` and `bus_re` must not be high together (this is
asserted).

### Registers

| Offset | Name | Meaning |
|---|---|---|
| 0 | CTRL | write: bit0 start, bit1 = load parameters before running |
| 1 | STATUS | bit0 done, bit1 busy |
| 2 | NUM_PARAMS | words to shift into the chain |
| 3 | NUM_OPS | operand pairs to apply |
| 4 | SYS_PERIOD | system clock period in reference cycles (reset 100) |
| 5 | LOAD_DIV | reference cycles per load pulse (reset 4) |
| 6 | OP_COUNT | results stored by the last run |

### Run sequence

1. The host writes the parameter stream, operands A and B, NUM_PARAMS,
   NUM_OPS and SYS_PERIOD, then writes CTRL = 3.
2. **LOAD:** the FSM reads the parameter memory and shifts one word into the
   chain per `clk_load_en` pulse. The load rate is deliberately slow, so that
   the wide chain need not meet `clk_ref` timing on a real FPGA.
3. **RUN:** `clock_gen` starts `sys_clk_ff`. Operand pair `k` is applied for
   system pulse `k`, captured by the operand registers at that pulse, and
   evaluated by the netlist. The result is captured at pulse `k+1` and written
   to result word `k` at pulse `k+2`. A run of `n` operations takes `n + 2`
   system periods.
4. **DONE:** the done flag is set. The host reads the results and compares
   them with the exact ones.

A run started with CTRL = 1 skips loading and reuses the loaded corner, for
example to sweep SYS_PERIOD.

The clocks are single-cycle enables on `clk_ref` (`sys_clk_ff`, `clk_load_en`)
rather than separate clock nets. That keeps the whole design in one clock
domain.

## 6. CORDIC with approximate adders (`cordic_unit`, `eta2m_adder`)

The CORDIC is an iterative 32-bit unit with three registers X, Y and Z.

**Datapath.**

* Each register is loaded from its preset input or fed back.
* X and Y are shifted by the iteration index and cross into each other's
  add/subtract unit; Z adds or subtracts an angle from a ROM.
* A subtraction inverts the second operand and sets the carry-in.

**Number format and schedule.**

* Numbers are Q3.29 two's complement.
* There are 32 iterations.
* The hyperbolic mode starts at i = 1 and repeats i = 4, 13 and 40.
* `cordic_rom` computes `atan(2^-i)` and `atanh(2^-i)` at elaboration.

**Using the unit.**

* sine/cosine: rotation, circular, with `x = 1/K`, `y = 0`, `z = θ`.
* square root of `v`: vectoring, hyperbolic, with `x = v + 1/4`,
  `y = v − 1/4`; the result is `X / K_h`.
* `e^z`: rotation, hyperbolic, with `x = 1/K_h`, `y = 0`; the result is
  `X + Y`.
* `done` rises 32 cycles after `start`.

**Adders.** Each of the three adders is either exact (`*_BLK = 0`, ripple
carry) or an ETA2-M adder ETAa-b (`*_BLK = a`, `*_EXT = b`):

* The word is cut into blocks of `a` bits.
* Each block has a sum generator (a ripple-carry adder) and a carry generator
  (a carry chain without sums).
* Sum generator `k` takes its carry-in from carry generator `k−1`.
* The carry generators of the `b` blocks below the top sum generator are
  chained to each other; all others start from 0.
* So carries cross at most `b+1` block boundaries, which shortens the critical
  path at the price of occasional large errors.

Configurations such as ETA8-1, ETA8-0 and ETA4-1 are parameter settings.

## 7. Departures and limits

* **Single clock domain.** The reference, system and load clocks are
  realised as enables on one clock. The parameter "latch" of each cell is an
  enabled register.
* **Parameter width.** Parameter words are 16 bits. That is 65.5 ns of gate
  delay at 1 ps, or 6.5 µs at 100 ps. A narrower `DELAY_W` saves FPGA
  resources at coarse quanta.
* **Memory sizes.**
  * The parameter memory holds 65536 words, enough for the chain of an
    896-bit adder (43883 words).
  * The operand and result memories hold 2^17 entries, enough for
    10^5-operation sets.
* **Your own netlists.** The evaluation netlists are generic 2-input-cell
  structures, not the output of a synthesis tool. Using your own netlist means
  replacing each cell instance with `instr_comb_cell` / `instr_seq_cell` of
  the same truth table, and chaining them in netlist order.
* **Partial instrumentation.** Choosing which gates to instrument needs an
  offline critical-path analysis. Its result is given to the adder as the
  `GATE_INSTR` mask. The multiplier and divider are always fully
  instrumented.
* **CORDIC.** The CORDIC unit is a functional design. It is not itself
  instrumented, so its timing-error behaviour is not emulated here.
* **Host link.** The host side (an Ethernet link and the software that
  creates operands and checks results) is not part of the RTL. The I/O bus is
  brought out as ports of `flint_top`.

## 8. Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
through a watchdog. Build any of them with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/flint_pkg.sv tb/tb_flint_top.sv --top-module tb_flint_top -Mdir obj_top
./obj_top/Vtb_flint_top
```

| Testbench | What it shows |
|---|---|
| `tb_instr_comb_cell`, `tb_instr_seq_cell` | P+9 latency per parameter slot, input priority, no restart while counting, reset delay |
| `tb_rca_netlist` (W=4) | chain length; exact limit period of one path; errors below the critical path; full vs. uninstrumented gates |
| `tb_mul_netlist`, `tb_div_netlist` (W=4) | chain length; exact products/quotients at a long period; errors at a short one; the fast corner repairs them |
| `tb_flint_top` (all defaults, 16-bit adder) | host-side flow: load a slow corner, exact run, rerun at a short period with errors, switch to a fast corner, CORDIC sine |
| `tb_flint_top_mul`, `tb_flint_top_div` | the same flow with the 16-bit multiplier and divider |
| `tb_eta2m_adder` | ETA2-M results against a bit-level model for several `a`/`b` settings |
| `tb_cordic_unit` | all sine, square-root and exponential arguments of the case study against real-valued references; an ETA8-1 configuration |
| others | one per framework block (clock generator, memories, bus, registers, FSM) |

The builds take from a few seconds up to about two minutes for the 16-bit
multiplier and divider tops. Each simulation runs in seconds.
