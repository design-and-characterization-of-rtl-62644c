# Clockless 4-bit ALUs in NULL Convention Logic

This repository holds a family of 4-bit, 8-operation arithmetic logic units
with no clock. They are built in NULL Convention Logic (NCL), a
delay-insensitive asynchronous style. Every signal says by itself whether
it is valid. Every stage tells its neighbours when it has taken new data,
so a result is produced as fast as the gates allow, whatever their delays.

Nine architectures are provided. All compute the same function and differ
in speed and area:

| | dual-rail | quad-rail |
|---|---|---|
| non-pipelined | `ncl_alu_dr` (`EMBED=0`) | `ncl_qr_alu` (`EMBED=0`) |
| non-pipelined, embedded registration | `ncl_alu_dr` (`EMBED=1`) | `ncl_qr_alu` (`EMBED=1`) |
| pipelined | `ncl_alu_drp` | `ncl_alu_qrp` |
| NULL Cycle Reduction (NCR) | `ncl_alu_ncr` (`EMBED=0`) | `ncl_qr_alu_ncr` (`EMBED=0`) |
| NCR, embedded registration | `ncl_alu_ncr` (`EMBED=1`, default) | `ncl_qr_alu_ncr` (`EMBED=1`, default) |

`ncl_alu_suite` instantiates all ten side by side, each with its own
ports. Use it for testing and comparison.

The design follows the NCL ALU architectures characterised by Bandapati and
Smith ("Design and Characterization of NULL Convention Arithmetic Logic
Units"). Their transistor-level results rank the dual-rail NCR ALU with
embedded registration as the fastest. Its average cycle is about 1.7 times
faster than the plain non-pipelined ALU, for about 2.3 times the area. It
is the one to pick if you need a single ALU.

## The operation

The select `S = S2 S1 S0` chooses one of eight operations. `F` is the 4-bit
result. `Cout/Bout` is the carry or borrow out.

| S | F | Cout/Bout |
|---|---|---|
| 0 | A OR B | 0 |
| 1 | A AND B | 0 |
| 2 | A XOR B | 0 |
| 3 | NOT A | 0 |
| 4 | shift right: F = {Cin, A3, A2, A1} | A0 |
| 5 | shift left: F = {A2, A1, A0, Cin} | A3 |
| 6 | A - B - 1 + Bin, computed as A + NOT B + Bin | Bout (carry of that sum) |
| 7 | A + B + Cin | Cout |

`ncl_pkg::alu_ref` is an arithmetic model of this table. The testbenches
use it.

## NCL in brief

### Encoding: DATA and NULL

A *dual-rail* bit uses two wires, `r0` and `r1`:

- `r0=1` is DATA0;
- `r1=1` is DATA1;
- both low is NULL, meaning "no data";
- both high never occurs.

A *quad-rail* signal carries two bits on four wires. Exactly one wire is
high for DATA: wire k high means the value k. All four low is NULL. In the
quad-rail ALU, A, B and F are two quad-rail digits each (digit 0 holds bits
1:0). The select is the dual-rail S2 plus a quad-rail S(1:0). Cin and Cout
stay dual-rail. `dr_t` and `qr_t` in `ncl_pkg` are these types.

Every operation is a *DATA wavefront* followed by a *NULL wavefront*:

1. The inputs go from NULL to complete DATA, and the outputs follow.
2. The inputs return to NULL, and the outputs follow.

The time from one DATA to the next (T_DD) is the cycle time.

### Threshold gates with hysteresis

All logic is built from THmn gates. The output of a THmn gate rises once at
least m of its n inputs are high, and falls only when *all* inputs are low.
Between those two conditions it keeps its value. Some gates have weighted
inputs: in TH34w2, for example, one input counts twice.

Resettable versions, which reset to 0 or to 1, form the registers.
`ncl_gate` is the one place where this hysteresis is modelled: an
`always_latch` that sets on a set function and clears when all inputs are
low. `ncl_th` puts a weighted threshold in front of it. A few modules pass
`ncl_gate` other set functions (sums of products). This is why synthesis
reports latches and combinational loops throughout: they are the circuit,
not mistakes.

### Registers, completion and the handshake

- **Registers.** An NCL register bit is a pair of resettable TH22 gates.
  Each rail is combined with the request `ki` from the next stage, so DATA
  passes only while `ki` is high and NULL only while `ki` is low.
- **Completion.** A completion component (`ncl_comp`, a tree of THnn gates)
  merges the per-bit "is NULL" signals into one acknowledge `ko`. `ko` is
  low once every bit holds DATA, and high once every bit is NULL.
- **The loop.** The `ko` of one stage is the `ki` of the stage before it.

At each ALU's ports:

- `ko` high asks the producer for DATA; `ko` low asks for NULL.
- The consumer raises `ki` to accept DATA and lowers it to accept NULL.
- `rst` (active high) returns every register to NULL. This puts `ko` high.

### Input-completeness, and why it shapes the ALU

A stage may signal "done" only when *all* its inputs have arrived.
Otherwise a late input could be mistaken for part of the next operation.
Likewise, the outputs may all return to NULL only after all inputs have.

This is easy when every output depends on every input. Here it does not.
NOT and the shifts ignore B, and operations 0-3 ignore Cin. The design
therefore adds gates whose only job is to wait:

- **Dual-rail non-pipelined ALU.** For operations 3-5 the demultiplexer
  passes A through TH34 gates. Their other inputs are the select rail and
  both rails of the matching B bit, so A cannot reach those functions before
  B is DATA. For operations 0-3, the carry logic (`ncl_carry_logic`) makes
  Cout = DATA0 only once Cin has arrived and S2 = 0.
- **Pipelined and quad-rail ALUs.** A TH34 gate has no room for the extra
  request input that embedded registration needs. In the quad-rail case it
  would also need more than four inputs. So B goes to all eight functions,
  and NOT and the shifts wait for B themselves (`ncl_unary_bc`, and
  `ncl_qr_func`). In the pipelined ALU, the wait for Cin moves into the
  Carry MEAG register (`ncl_carry_meag_reg`).

The testbenches check input-completeness directly. They hold back one input
bit or digit and require `ko` to stay high until it arrives.

## The non-pipelined ALU (`ncl_alu_dr`)

The input registers feed the following chain:

1. A 9-bit register holds A, B and Cin; a 3-bit register holds S.
2. The select is converted to eight one-hot rails, the MEAG (mutually
   exclusive assertion group), by TH33 gates.
3. A demultiplexer sends the operands to the selected function only. The
   other seven see NULL.
4. The functions:
   - OR, AND and XOR are input-complete one-gate-level functions.
   - NOT and the shifts are pure renaming of wires.
   - Subtract and add are ripple chains of four full adders.
5. Two multiplexers merge the results. Each is an OR tree of TH14/TH12 per
   rail: one for F (eight sources), one for the carries of operations 4-7.
6. The carry logic and a 5-bit output register follow. The output
   register's completion is the request `ki` of both input registers.

Around the whole ALU there is only one register-to-register loop, so the
DATA-to-DATA cycle is the full forward delay plus the completion delay,
taken twice.

**Embedded registration (`EMBED=1`)** merges registers into logic by giving
the request `ki` to logic gates:

- The select conversion (TH44 with `ki`) replaces the 3-bit select register.
- The F multiplexer's final gates and the carry logic replace the 5-bit
  output register.

This removes a gate level and two registers, which makes a faster cycle.
The carry logic still needs "S2 = 0". With the S register gone, that is
recovered as the OR of select rails 0-3.

## The pipelined ALU (`ncl_alu_drp`)

Register stages are placed inside the ALU, so several operations can be in
flight. The stages:

1. The input register, plus the select conversion as an embedded register.
2. The demultiplexer register (TH33 gates: request, select rail, data rail).
   Alongside it, the Carry MEAG register, which also waits for Cin for
   operations 0-3.
3. The functions, and two further MEAG registers.
4. One Select register per function. It latches only when its function's
   MEAG rail is high.
5. The multiplexer register, which produces F and Cout. Cout = 0 for
   operations 0-3 is made from the selected function's F0, so no separate
   carry multiplexer is needed.

Subtract and add are pipelined internally (`ncl_pipe_adder`). They have two
register stages between the full adders (FA0-FA1 | FA2 | FA3). They
therefore take more stages than the other functions.

Three points need explaining:

- **Special completion.** In a one-hot stage only one of the eight output
  sets carries DATA. An ordinary completion tree, which waits for every
  bit, would never finish. `ncl_comp_special` instead reports DATA when
  *any one* set is complete, and NULL when all are. This OR over the sets
  is the slow part that limits the pipelined ALU's gain.
- **Keeping results in order.** A fast operation issued right behind a
  subtract would otherwise overtake it. The select rails travel in a
  separate MEAG pipeline: the Carry MEAG register, then two MEAG registers.
  That pipeline's last stage enables the Select registers. A Select register
  may latch only when its operation's select wavefront reaches that point,
  and those wavefronts keep their order. So results leave in the order
  operands arrived.
- **Requests.** Each function set of the demultiplexer register gets its own
  request. For functions 0-5 it comes from that function's Select register;
  for subtract and add it comes from the adder's first internal register.

## NULL Cycle Reduction (`ncl_alu_ncr`, `ncl_qr_alu_ncr`)

In a non-pipelined NCL circuit, half of each cycle is spent passing NULL.
NCR hides that half. Two copies of the ALU take turns: while one copy
clears itself with NULL, the other already computes the next DATA. Outside,
the pair looks like one ALU with one four-phase channel.

The turn keeping is in `ncl_ncr_ctrl` and is the subtle part of the design.

- **Input turn.** A set/reset latch `t1` says which copy receives
  operands. AND gates on every input wire block the other copy.
  - A C-element records that copy k has taken DATA in its turn:
    `d_k = C(t_k, !ko_k)`.
  - Once copy k has also taken the following NULL (`ko_k` high again while
    `d_k` is set), `t1` flips.
  - The outside acknowledge is `ko = (t0 & ko_0 & !d_0) | (t1 & ko_1 & !d_1)`.
    The producer is asked for new DATA only by the copy whose turn it is and
    only before that copy took its DATA.
- **Output turn.** A second latch `o1` says which copy may deliver.
  - Each copy's output completion `done_k` (a THnn over its output signals)
    shows whether its outputs are all DATA or all NULL.
  - `v_k = C(o_k, done_k)` records that copy k delivered DATA in its turn.
  - The copy's request is `ki_k = o_k & ki & !(v_k & !done_k)`. It follows
    the consumer only during the copy's turn, and it stays low after the
    copy's DATA has been consumed and returned to NULL.
  - That return to NULL flips `o1`. The other copy is held off until then,
    even if it finished first, so results never overtake.
- **Merge.** The two copies' outputs are ORed wire by wire (TH12). An
  assertion in `ncl_ncr_ctrl` checks that both copies never drive DATA at
  once.

Both turn latches are reset to copy 0.

## Quad-rail ALU (`ncl_qr_alu`)

The structure is the same as the dual-rail non-pipelined ALU, with these
differences:

- Quad-rail registers are one TH22-with-request per wire (`ncl_meag_reg`).
- The select conversion is a TH22 of an S2 rail and an S(1:0) rail.
- The adder and subtractor are two quad-rail digit adders each
  (`ncl_qr_adder_digit`: two digits plus a dual-rail carry give a digit and
  a dual-rail carry).
- Each function output wire (`ncl_qr_func`) is one NCL gate. Its set
  function is the OR of the input-wire combinations that produce that
  output. NOT and the shifts also wait for their B digit.
- The dual-rail carry multiplexer and carry logic are reused unchanged.

The pipelined quad-rail ALU (`ncl_alu_qrp`) has the same five stages as
the dual-rail one. The quad-rail demultiplexer register (`ncl_qr_demux_reg`)
is one TH33-with-request per wire. The subtractor and adder
(`ncl_qr_pipe_adder`) hold one register between their two digit adders.
The select registers (`ncl_wire_sel_reg`) are one TH33 of request, MEAG
rail and wire per wire. The dual-rail Carry MEAG register, MEAG registers,
special completion and carry multiplexer are reused.

Only one wire switches per two bits, where dual-rail switches two, so
quad-rail is the lower-power encoding. In the published results it is
slower and larger than dual-rail.

## Files

| file | role |
|---|---|
| `ncl_pkg.sv` | types (`dr_t`, `qr_t`, operation and architecture enums), encode/check helpers, reference model |
| `ncl_gate.sv`, `ncl_th.sv` | hysteresis core, THmn gate with weights and reset |
| `ncl_dr_reg.sv`, `ncl_meag_reg.sv`, `ncl_comp.sv`, `ncl_comp_special.sv` | registers and completion |
| `ncl_meag_conv.sv`, `ncl_demux.sv`, `ncl_bitwise.sv`, `ncl_full_adder.sv`, `ncl_ripple_adder.sv`, `ncl_mux.sv`, `ncl_carry_logic.sv` | dual-rail non-pipelined parts |
| `ncl_alu_dr.sv` | dual-rail non-pipelined ALU, `EMBED` selects embedded registration |
| `ncl_carry_meag_reg.sv`, `ncl_demux_reg.sv`, `ncl_unary_bc.sv`, `ncl_pipe_adder.sv`, `ncl_sel_reg.sv`, `ncl_mux_reg.sv` | pipelined parts |
| `ncl_alu_drp.sv` | dual-rail pipelined ALU |
| `ncl_ncr_ctrl.sv`, `ncl_alu_ncr.sv` | NCR turn keeping, dual-rail NCR ALU |
| `ncl_qr_meag_conv.sv`, `ncl_qr_demux.sv`, `ncl_qr_func.sv`, `ncl_qr_adder_digit.sv`, `ncl_qr_mux.sv` | quad-rail parts |
| `ncl_qr_alu.sv`, `ncl_qr_alu_ncr.sv` | quad-rail non-pipelined and NCR ALUs |
| `ncl_qr_demux_reg.sv`, `ncl_qr_pipe_adder.sv`, `ncl_wire_sel_reg.sv` | quad-rail pipelined parts |
| `ncl_alu_qrp.sv` | quad-rail pipelined ALU |
| `ncl_alu_suite.sv` | all ten architectures side by side |

Every module has a testbench `tb/tb_<module>.sv`, except these:

- `ncl_gate` and `ncl_ncr_ctrl` are tested through their users.
- `ncl_th` is tested by `tb_ncl_th`.

## Simulating

Verilator 5 with `--timing` runs every testbench. Compile the package first,
and let Verilator find the other modules through `-y`:

```
verilator --binary --timing -Wno-fatal -y rtl -Irtl rtl/ncl_pkg.sv \
    tb/tb_ncl_alu_suite.sv --top tb_ncl_alu_suite -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` at the end and has a
watchdog that fails a hung test.

| test | what it runs |
|---|---|
| `tb_ncl_alu_suite` | The full design at default parameters. All ten architectures run concurrently. Each gets all 4096 combinations of S, A, B and Cin in its own random order, with a randomly slow producer and consumer. Every result is compared in order. A quarter of the operations hold one input back to check completeness. It counts and requires: every operation 512 times; up to three operations in flight in both pipelined ALUs; a one-stage operation issued behind a subtract or add; both NCR copies used; two operations overlapping in every NCR ALU. It stops early after ten failures. It takes under a minute. |
| `tb_ncl_alu_dr`, `tb_ncl_alu_drp`, `tb_ncl_alu_ncr`, `tb_ncl_qr_alu`, `tb_ncl_qr_alu_ncr`, `tb_ncl_alu_qrp` | Each ALU form alone over all 4096 operand sets. |
| the other `tb_ncl_*` | Unit tests of each part: exhaustive where the inputs are few, random otherwise. They check DATA, hold and NULL behaviour, and completeness. |

Simulation has zero gate delay, so the tests check function, ordering and
handshake behaviour, not timing. The hysteresis latches and handshake loops
make Verilator print `UNOPTFLAT` warnings. Those are expected: the loops
settle within a time step.

## Where this RTL departs from the published design

- **Gate-level model.** Gates are logic-level models. Nothing here
  reproduces the published cycle times or transistor counts. Those come
  from transistor-level simulation in a 0.25 µm process.
- **Quad-rail functions.** These are written as one gate per output wire
  with a sum-of-products set function. That often exceeds four inputs,
  which the published gate library does not allow. They are functionally
  and completeness-wise equivalent, but their gate counts are not
  comparable.
- **Pipelined adder.** The published adder uses bit-wise completion between
  its internal stages. Here each internal register has one completion over
  all its bits, which is simpler and still delay-insensitive but slower.
  Its first internal register holds 7 dual-rail signals (the two sum bits,
  the carry and the A/B bits still to be added).
- **Choices made here.** The following are not fixed by the published
  description; each is this design's own choice, documented in the module
  concerned:
  - the pipelined ALUs' request wiring and MEAG-pipeline ordering;
  - the position of the register inside the quad-rail pipelined adder;
  - the special completion circuit;
  - the B-completeness gates in NOT and the shifts;
  - all of the NCR steering and turn logic;
  - recovering "S2 = 0" from the select rails in the embedded forms.

## Synthesis

All modules are synthesizable. There are no flip-flops. State is held only
in the latches that model NCL hysteresis and in the two NCR turn latches.
A logic synthesizer maps each gate to a latch with a set function. It will
report combinational loops through the handshakes. For a real NCL
implementation, map `ncl_th`/`ncl_gate` to an NCL threshold-gate cell
library instead.

As a rough size, generic synthesis of the dual-rail non-pipelined ALU gives
about 240 latches, one per gate. The published count for that ALU is 260
gates.
