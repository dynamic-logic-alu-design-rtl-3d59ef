# LSDL ALU: an 8-bit ALU with limited switch dynamic logic

A conventional dynamic (domino) gate precharges its output node high in
every clock cycle and discharges it again whenever the pull-down network
conducts. Two successive "0" results therefore cost a full discharge and
recharge, even though the logical output never changed. Limited switch
dynamic logic (LSDL) puts a small clocked static latch behind the dynamic
node. The latch captures the evaluated value and holds it through the
next precharge, so the gate's output toggles only when its value changes.
The result behaves like static logic at the output while the gate keeps
the speed and compactness of dynamic logic.

This repository holds synthesizable SystemVerilog for an 8-bit ALU
organised around that idea. It follows the paper *Dynamic Logic ALU
Design with Reduced Switching Power*, which designs the ALU in three
circuit styles: simple dynamic, modified dual-V<sub>T</sub> domino and
LSDL. The paper reports that the LSDL version uses about half the
dynamic power. This RTL models the LSDL version at logic level. It
captures the gate's clocking behaviour and the ALU's organisation. It
does not model transistors, V<sub>T</sub> choices or power.

## The LSDL gate (`rtl/lsdl_gate.sv`)

The gate has three nodes:

| node  | drives it | behaviour in the model |
|-------|-----------|------------------------|
| `o1`  | precharge PMOS, pull-down network (PDN), clocked footer | forced to 1 while `clk = 0`; during `clk = 1` it falls to 0 if the PDN conducts, and it stays at 0 until the next precharge |
| `o2`  | latch: one PMOS driven by `o1`, an NMOS stack of `o1` and `clk`, keepers driven by `out` | follows `~o1` while `clk = 1`; holds while `clk = 0` |
| `out` | inverter on `o2` | `~o2`, which is NOT(PDN function) |

While `clk` is low the clocked NMOS in the latch is off. The keepers
hold `o2`, so precharging `o1` cannot reach the output. The dynamic node
still switches every cycle. The output, which carries the large load,
switches only when the evaluated value changes. The model writes `o1` and
`o2` as level-sensitive processes, so synthesis infers two latches per
gate. Those latches are intended: they stand for the dynamic node and the
static latch of the circuit.

The PDN topology is a parameter (`alu_pkg::pdn_e`):

* `PDN_SERIES`: all inputs in series, so `out` is NAND.
* `PDN_PARALLEL`: all inputs in parallel, so `out` is NOR.
* `PDN_AO22`: two series pairs in parallel.

The caller supplies complemented inputs where a function needs them.

**Timing rule.** Inputs may change only while `clk = 0`. `out` is valid
at the end of the evaluate phase and stays put until the next evaluate
phase. A discharged `o1` cannot recover within the same phase, so an
input that changes during evaluate gives a stale result. This is the
"one evaluation per cycle" property of dynamic logic.

## ALU organisation (`rtl/lsdl_alu.sv`)

```
 instr[7:0] --> instruction unit --+--> [7:4] op-code ---> decoder a --> 16 unit-enable lines
                                   |
                                   +--> [3:0] reg field -> decoder b --> 16 register-pair strobes
 din_a, din_b --> register pairs (A_k, B_k), k = 0..15 --> qa, qb
 qa, qb --> MUL | ADD/SUB | DIV | LOGIC (LSDL) --> result mux --> accumulator
 control unit: start -> select -> execute -> done
```

| op-code | decoder a line | unit | accumulator |
|---------|----------------|------|-------------|
| 0000 | 1  | multiplier | `a * b` (16 bits) |
| 0001 | 2  | adder-subtractor, M = 0 | `{7'b0, carry, a + b}` |
| 0010 | 3  | divider | `{a % b, a / b}` |
| 0011 | 4  | AND  | `{8'h00, a & b}` |
| 0100 | 5  | OR   | `{8'h00, a \| b}` |
| 0101 | 6  | NOT  | `{8'h00, ~a}` |
| 0110 | 7  | NAND | `{8'h00, ~(a & b)}` |
| 0111 | 8  | NOR  | `{8'h00, ~(a \| b)}` |
| 1000 | 9  | XOR  | `{8'h00, a ^ b}` |
| 1001 | 10 | XNOR | `{8'h00, ~(a ^ b)}` |
| 1010 | 11 | adder-subtractor, M = 1 | `{7'b0, carry, a - b}` |
| 1011-1111 | 12-16 | none | `0` |

The order of lines 1 to 10 and the 4 + 4 split of the instruction follow
the paper. Worked example: instruction `0001_0000` with A = `1011_1010`
and B = `1100_1001` gives `1_1000_0011` (186 + 201 = 387). Subtraction
has no op-code of its own in the paper. This design gives it the first
free line.

`carry` and `overflow` are the adder-subtractor's carry out (UO) and
two's-complement overflow (SO = carry into the top bit XOR carry out).
Any other operation clears both flags. For a subtraction, `carry = 1`
means no borrow. Division by zero is not trapped: the quotient is
`8'hFF` and the remainder is the dividend.

### Register pairs

Decoder b's line *k* selects register pair *k*. In the SELECT cycle the
control unit strobes that pair's enable, and it loads `din_a` into A and
`din_b` into B. In the EXECUTE cycle the pair drives the units. The paper
draws only the pair on line 1 and says the register count follows from
the decoder width. This design therefore has 16 pairs
(`register_bank #(.NPAIRS(16))`).

### Unit enables and operand isolation

A unit enable is decoder a's line ANDed with the EXECUTE state. A
disabled unit receives all-zero operands, so its gates do not switch. A
one-hot AND-OR multiplexer then picks the enabled unit's result. In the
logic unit, a disabled operation's LSDL gates keep evaluating the same
constant, so their outputs stay still.

### Clocking

There is one clock, and all flip-flops trigger on its rising edge. Reset
is active low and synchronous. The LSDL gates in the logic unit run on
`~clk`:

* While `clk` is high, the LSDL gates precharge. During this time the
  register pair and the enables, which changed at the rising edge,
  settle.
* While `clk` is low, the LSDL gates evaluate on stable inputs.
* At the next rising edge the accumulator samples the LSDL outputs,
  which are being held.

So the gates' timing rule holds without extra latches.

### Control sequence (`rtl/control_unit.sv`)

| state   | what happens | strobes |
|---------|--------------|---------|
| IDLE    | waits for `start`, and the instruction unit captures `instr` | `ir_load` |
| SELECT  | the selected register pair loads `din_a`/`din_b` | `reg_load`, `busy` |
| EXECUTE | the selected unit computes, and the accumulator loads at the end of the cycle | `exec`, `acc_load`, `busy` |
| DONE    | the result is valid | `done`, `busy` |

`done` rises with the second rising edge after the edge that samples
`start`. Back-to-back operations take four cycles each. `start` is
ignored while `busy` is high. `din_a`/`din_b` are sampled one cycle after
`start` and must be valid then.

## Arithmetic units

* **Adder-subtractor** (`add_sub`). Each Y bit goes through an XOR with
  the mode bit M, M is also the carry into bit 0, and a ripple chain of
  full adders does the addition. This is the structure the paper draws
  for 4 bits, widened to `WIDTH = 8`.
* **Multiplier** (`wallace_mult`). AND gates form the partial products.
  Rows of full adders then reduce them in carry-save form: each row adds
  one new partial-product row to the previous row's sums and carries,
  three bits per column. The first row uses half adders. A final ripple
  row, with a half adder at its low end, merges the last sums and
  carries. The result is 8 x 8 to 16 bits, matching the paper's full/half
  adder array with outputs P0 to P15. The exact placement of each half
  adder in the paper's drawing is not reproduced.
* **Divider** (`array_divider`). The paper only names a division unit.
  This is a plain combinational restoring array divider, one
  trial-subtraction row per quotient bit.

## Logic unit (`rtl/logic_unit.sv`)

Each result bit is one LSDL gate whose PDN implements the complement of
the wanted function:

* NAND uses `a`, `b` in series.
* NOR uses `a`, `b` in parallel.
* AND uses `~a`, `~b` in parallel.
* OR uses `~a`, `~b` in series.
* NOT uses `a` alone.
* XOR uses `a·b + ~a·~b`.
* XNOR uses `a·~b + ~a·b`.

That is 7 x 8 = 56 gates. The paper lists AND, OR, NOT, NAND, NOR and
XOR, and its ALU diagram adds an XNOR unit.

## Where this design departs from or goes beyond the paper

* Only the LSDL style is modelled. The simple dynamic and dual-V<sub>T</sub>
  domino versions serve only as the paper's baselines.
* The arithmetic units are written as ordinary static gate-level logic
  with the same function. Only the logic unit is built from LSDL gate
  models. Power, transistor sizing and the 45 nm process are outside RTL.
* The following are this design's choices:
  * the subtract op-code
  * 16 register pairs with `din_a`/`din_b` load ports
  * the accumulator width and layout
  * the start/busy/done handshake and the four-state sequence
  * the divider's structure and its divide-by-zero result
  * synchronous reset
  * the PDN topologies
* The paper's generic 3-to-8 decoder example conflicts with its ALU
  example. This design follows the ALU example: code *k* raises line *k*,
  counting from 0.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_lsdl_alu \
  -y rtl -y tb +libext+.sv -Irtl rtl/alu_pkg.sv tb/tb_lsdl_alu.sv
./obj_dir/Vtb_lsdl_alu
```

Replace `tb_lsdl_alu` with any of the testbenches below.

| testbench | what it checks |
|-----------|----------------|
| `tb_lsdl_alu` | End to end at the default size. Runs the worked example, every op-code on every register pair, and 3000 random operations against an integer model. Checks latency, flag values, result holding and ignored `start`, and counts how often each mechanism occurs. |
| `tb_lsdl_gate` | Output equals NOT(PDN) after evaluate, holds through precharge, one evaluation per cycle, and does not toggle under constant inputs while the dynamic node toggles every cycle. |
| `tb_logic_unit` | All 7 operations exhaustively over 8-bit operands, including holding during precharge. |
| `tb_switching_activity` | Output transitions of each logic operation on a random stream with repeated operands, against a conventional dynamic gate's count for the same stream. LSDL typically needs 12-38 % of the conventional transitions. |
| `tb_add_sub`, `tb_wallace_mult`, `tb_array_divider` | Exhaustive over 8-bit operands. |
| `tb_decoder`, `tb_instruction_unit`, `tb_register_bank`, `tb_control_unit` | Unit behaviour and strobe timing. |

All testbenches run in well under a minute. To change the operand width,
set `lsdl_alu #(.WIDTH(n))`. The instruction format and the unit count
are fixed by `alu_pkg`.
