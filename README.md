# Two-cycle arbitrary 64-bit bit permutations: BFLY/IBFLY units for an ASIP

Bit permutations are common in block ciphers (DES, Serpent, Twofish and
others) and slow on ordinary processors. Software takes dozens of
instructions, or table lookups. Earlier permutation instructions (GRP, CROSS,
OMFLIP) still need log2(64) = 6 instructions that depend on each other, so
they take 6 cycles.

This design does any permutation of a 64-bit word in **two instructions and
two cycles**. It rests on two observations:

1. A Benes network can produce every one of the 64! permutations. It is a
   6-stage **butterfly** network followed by a 6-stage **inverse butterfly**
   network. Each half is only six rows of 2:1 multiplexers, which is shallower
   than a 64-bit adder. So one half fits in one ALU cycle. `BFLY` runs the
   butterfly half and `IBFLY` runs the inverse half.
2. Each half needs 6 x 32 = 192 configuration bits, which is three 64-bit
   registers. With the data register, that makes **four 64-bit source
   operands** per instruction. The hard part of the design is delivering four
   operands when normal instructions read only two.

The RTL builds four machines. They share the networks and differ in how the
four operands reach them:

* **VLIW datapath (main design).** Each long instruction word has two
  ordinary slots. The two slots together read four registers through a
  four-port register file. A permutation instruction is split into a pair
  that is issued in the same word:
  `{ BFLY.ct1 Rc1,Rc2 ; BFLY Rd,Rs,Rc3 }`. Two ALUs use the same four buses
  when no permutation is running. This is the simplest control for the
  best speed, and the one the rest of this document centres on. A second
  instance issues two long words per cycle, for one permutation per cycle.
* **2-way superscalar.** The same datapath, but the instructions arrive one
  by one and issue logic pairs them at run time.
* **Single issue with four read ports.** One ALU, a four-port register file,
  and a front end that takes the four operands from register pairs, from a
  longer instruction format, or from two consecutive instructions held in a
  buffer.
* **LdState.** An ordinary two-read-port processor. Each permutation unit
  keeps the configuration of its first four stages in two internal
  registers (C1/C2 for the butterfly unit, C4/C5 for the inverse unit).
  These are loaded by an `LdState` instruction and read back by
  `MovePUtoGR`, for example on a context switch. The permuting instruction
  then needs only two operands: the data and the last two stages'
  configuration.

## The permutation networks (`bfly_net`, `ibfly_net`)

Both networks have log2(N) stages, and each stage is N/2 swap switches. A
switch swaps its two bits when its control bit is 1 and passes them when it
is 0. Stage *p* counts from the input side (p = 0..5):

| network | stage p exchanges bits at distance | first stage | last stage |
|---|---|---|---|
| butterfly (`BFLY`) | 32 >> p | 32 | 1 |
| inverse butterfly (`IBFLY`) | 1 << p | 1 | 32 |

**Configuration layout.** Three 64-bit operands configure a network. Each
operand covers two consecutive stages:

| operand | stages | bits [31:0] | bits [63:32] |
|---|---|---|---|
| Rc1 (`cfg_i[0]`) | 0, 1 | stage 0 | stage 1 |
| Rc2 (`cfg_i[1]`) | 2, 3 | stage 2 | stage 3 |
| Rc3 (`cfg_i[2]`) | 4, 5 | stage 4 | stage 5 |

In a stage with distance d, switch j joins bits i = (j / d)·2d + j mod d and
i + d. Bit 0 is the least significant bit everywhere.

These are design choices of this RTL, not a standard:

* grouping the stages in pairs per operand, in network order;
* which half of an operand drives which stage;
* the switch numbering.

Software that computes configurations must use the same conventions.

**Where the configuration comes from.** For a wanted permutation
`out[k] = in[src[k]]`, the classic looping algorithm gives the six operands.
It treats the BFLY/IBFLY pair as a Benes network whose outer stages are
butterfly stage L and inverse stage 5-L:

1. Take level L = 0..5, with distance d = 32 >> L.
2. Give each input one of two sides. The two inputs of a switch must take
   different sides, and the two outputs of a switch must be fed from
   different sides. Following the chain input → its output → that output's
   partner → the input that feeds it settles every assignment.
3. A butterfly switch crosses when its lower input goes to side 1. An inverse
   switch crosses when its lower output is fed from side 1.
4. Repeat at the next level, inside each half.

`tb/perm_tb_pkg.sv` (`benes_route`) implements this algorithm. The
testbenches use it to route random permutations and the DES initial and
final permutations.

Both networks are purely combinational. Their cost is 384 two-input muxes
each, with no storage.

## VLIW datapath (`vliw_datapath`)

```
            mem_* ──►┌──────────────────────────┐◄── write-back (2 slots)
                     │ register file 32 x 64    │
                     │ 4 read ports, 3 write    │
                     └──┬──────┬──────┬──────┬──┘
         bypass from    │s0.rs1│s0.rs2│s1.rs1│s1.rs2     (4 source buses)
         write-back ───►▼      ▼      ▼      ▼
                     ┌ALU1─────────┐ ┌ALU2─────────┐
                     └─────────────┘ └─────────────┘
                     ┌ butterfly / inverse butterfly, fed from all 4 ┐
                     └───────────────────────────────────────────────┘
                            │ per-slot result select
                            ▼
                     write-back stage (wb_*_o) ──► register file, bypass
```

**Instruction slots.** A long word is `slot_t [1:0]`, and each slot has
`{op, rd, rs1, rs2}` (`perm_pkg`). The operations are:

| op | meaning |
|---|---|
| `OP_ADD`, `OP_SUB`, `OP_AND`, `OP_OR`, `OP_XOR` | rd = rs1 op rs2 |
| `OP_SLL`, `OP_SRL`, `OP_ROL`, `OP_ROR` | shift / rotate rs1 by rs2[5:0] |
| `OP_BFLY_CT` | `BFLY.ct1 Rc1=rs1, Rc2=rs2`; writes nothing |
| `OP_BFLY` | `BFLY Rd=rd, Rs=rs1, Rc3=rs2`; needs `OP_BFLY_CT` in the other slot |
| `OP_IBFLY_CT`, `OP_IBFLY` | the same for the inverse butterfly |
| `OP_NOP` | nothing |

The slots are decoded already. No fetch unit or binary instruction format is
built.

**Pairing rules.** A word that holds `OP_BFLY` must hold `OP_BFLY_CT` in the
other slot, and likewise for `IBFLY`. The pair may be in either slot order.
Any other word that contains a permutation operation is illegal:

* an unpaired `.ct1`;
* a BFLY with an IBFLY.ct1;
* two `.ct1`s.

An illegal word raises `bundle_err_o` in the same cycle and is dropped: it
writes no register. An assertion checks that it is dropped.

**Timing.**

* A word is read and executed in the cycle it is presented on `bundle_i`.
* Its results sit in the write-back stage during the next cycle. They are
  visible on `wb_valid_o`/`wb_rd_o`/`wb_data_o` then, and are written into
  the register file at the following edge.
* The bypass forwards write-back results to all four source buses, so each
  word sees the results of the word just before it. Slot 1 takes priority
  when both slots wrote the same register.
* A permutation is therefore:

  ```
  cycle c   : { BFLY.ct1  R11,R12 ; BFLY  R1,R1,R13 }
  cycle c+1 : { IBFLY.ct1 R14,R15 ; IBFLY R1,R1,R16 }   (reads R1 through the bypass)
  cycle c+2 : permuted R1 on wb_data_o
  ```

* With two slots, each word carries one BFLY or IBFLY pair. So the datapath
  completes **one permutation every two cycles**, while the ALUs run in the
  words that hold no permutation.

**Two long words per cycle (`NSLOT = 4`).** The parameter `NSLOT` sets the
slots issued per cycle. The default is 2. With 4 slots:

* slots 0–1 and 2–3 are two long words;
* the register file has eight read ports, and each slot has its own ALU;
* each long word must pair its own BFLY or IBFLY;
* at most one long word may use each network, or the word is illegal.

The IBFLY pair of one permutation can then run beside the BFLY pair of the
next, and a stream of permutations completes one per cycle:

```
cycle 1: { -                                  ; BFLY.ct1 R11,R12  BFLY R1,R1,R13 }
cycle 2: { IBFLY.ct1 R14,R15  IBFLY R1,R1,R16 ; BFLY.ct1 R11,R12  BFLY R2,R2,R13 }
cycle 3: { IBFLY ... R2                       ; BFLY ... R3 }
cycle 4: { IBFLY ... R3                       ; BFLY ... R4 }
cycle 5: { IBFLY ... R4                       ; -                                }
```

R1 is finished on the write-back bus in cycle 3, and R2, R3 and R4 in the
three cycles after it.

**Register file (`regfile`).** It has 32 registers of 64 bits, four
combinational read ports and three write ports (slot 0, slot 1, memory).
The port counts are parameters: 2·NSLOT read ports and NSLOT + 1 write
ports. A
write becomes visible after its clock edge. On a conflict the
highest-numbered port wins, which means slot 1 over slot 0 over memory.
Reset clears every register.

**ALU (`alu`).** It does add, subtract, AND, OR, XOR, logical shifts and
rotates, which are the word operations block ciphers use. Multiply is not
included.

## Single-issue machine (`si_frontend`, `si_datapath`)

`si_datapath` is a one-ALU datapath with a four-port register file and the
two networks. It takes one decoded four-source operation per cycle
(`op4_t`: `op`, `rd`, `rs[0..3]`). The ALU uses `rs[0]` and `rs[1]`. A
permutation takes its data from `rs[0]` and Rc1, Rc2, Rc3 from
`rs[1..3]`. The timing is that of the VLIW datapath: one write-back stage,
with a bypass to all four buses.

`si_frontend` turns the fetched instruction (`finstr_t`, with up to five
register fields) into that operation. The parameter `METHOD` selects the
operand scheme:

| `METHOD` | permutation instruction | operands read |
|---|---|---|
| `M_REGPAIR` | `BFLY Rd, Rs1, Rs2` | data R[s1], config R[s2], R[s2+1], R[s1+1] (indices wrap at 32) |
| `M_TWOLEN1` (default) | `BFLY Rd, Rs, Rc1, Rc2, Rc3` | as named |
| `M_TWOLEN2` | `BFLY Rd, Rc1, Rc2, Rc3` | data R[d], permuted in place |
| `M_BUNDLED` | `BFLY.ct1 Rc1, Rc2` then `BFLY Rd, Rs, Rc3` | the `.ct1` waits in a one-entry buffer until its partner arrives |

* In `M_BUNDLED` only one instruction is fetched per cycle. So a
  permutation takes four cycles: four instructions, and the pair executes
  when its second half arrives. `pending_o` is high while a `.ct1` waits.
* Errors set `err_o` and issue nothing:
  * a `.ct1` in any other method;
  * a `BFLY`/`IBFLY` with no matching `.ct1` buffered;
  * a buffered `.ct1` followed by anything but its partner. The buffered
    half is dropped too.

## Superscalar issue (`ss_issue`)

`ss_issue` looks at the two oldest fetched instructions (`inst_i[0]` is
the older) and builds a `slot_t [1:0]` word for a `vliw_datapath`:

* `X.ct1` followed by `X` issues as a pair.
* A `.ct1` whose partner has not arrived waits: nothing issues (`take_o = 0`).
* Two ALU instructions issue together when the younger reads neither
  source from the older one's destination. Results from earlier cycles come
  through the bypass. When both write one register, the datapath's
  slot-1-wins priority keeps program order.
* Anything else issues alone in slot 0.
* A `.ct1` followed by the wrong instruction, or a lone `BFLY`/`IBFLY`, is
  dropped with `err_o`.

`take_o` (0, 1 or 2) tells the fetch buffer how many instructions were
consumed. The block is purely combinational. It never produces an illegal
word, and an assertion in the top checks that.

## LdState machine (`ls_datapath`, `ldstate_pu`)

`ldstate_pu` is one permutation unit with its two internal registers. It
has two 64-bit input buses, as a two-read-port processor supplies:
`a_i` (data or Rc1) and `b_i` (Rc3 or Rc2).

| `op_i` | instruction | effect |
|---|---|---|
| `PU_LD` | `LdState Rc1, Rc2` | C1 ← a_i, C2 ← b_i at the clock edge |
| `PU_PERM` | `BFLY`/`IBFLY Rd, Rs, Rc3` | res_o = network(a_i) with stages 0–3 from C1, C2 and stages 4–5 from b_i |
| `PU_MV` | `MovePUtoGR` | res_o = C1 (mv_sel_i = 0) or C2 (mv_sel_i = 1) |
| `PU_NONE` | — | res_o = 0 |

* `INVERSE = 1` gives the inverse butterfly unit. Its registers play the
  roles of C4 and C5.
* The internal registers reset to zero, so every stored stage passes
  straight through.

`ls_datapath` puts one unit of each kind into a single-issue datapath. It
has a two-read-port register file, one ALU, and the same write-back stage
and bypass as the other machines. An instruction is an `ls_instr_t`:

| `kind` | meaning |
|---|---|
| `LS_ALU` | rd = alu_op(rs1, rs2) |
| `LS_LDSTATE` | load C1/C2 (`inv` = 0) or C4/C5 (`inv` = 1) from rs1, rs2 |
| `LS_PERM` | `BFLY` (`inv` = 0) or `IBFLY` (`inv` = 1): rd = network(rs1), last two stages from rs2 |
| `LS_MOVE` | `MovePUtoGR`: rd = C1/C2 or C4/C5, chosen by `inv` and `sel` |

* A new permutation takes four instructions and four cycles: `LdState.bfly`,
  `BFLY`, `LdState.ibfly`, `IBFLY`. An `LdState` takes effect for the very
  next instruction.
* Repeating the same permutation takes only `BFLY` and `IBFLY`, because the
  state stays in the units.
* Saving a context takes four `MovePUtoGR` (C1, C2, C4, C5). Restoring it
  takes two `LdState`.

## The top (`perm_asip_top`)

The top places the machines side by side. Each has its own ports, and
they share only the clock and reset:

| instance | machine | ports |
|---|---|---|
| `u_vliw` | VLIW datapath | `bundle_i`, `bundle_err_o`, `mem_*`, `wb_*` |
| `u_vliw_tp` | VLIW datapath, `NSLOT = 4` | `tp_*` |
| `u_ss_issue` + `u_ss_dp` | superscalar | `ss_*` |
| `u_si_fe` + `u_si_dp` | single issue, `SI_METHOD` (default `M_TWOLEN1`) | `si_*` |
| `u_ls` | LdState | `ls_*` |

The memory that loads registers is not part of the design. Each machine's
write path from it is its `*mem_*` port. All results leave through the
`*wb_*` ports one cycle after issue. Sizes come from `perm_pkg` (64-bit
words, 32 registers).

## Files

| file | contents |
|---|---|
| `rtl/perm_pkg.sv` | widths, operation enums, `slot_t`, helper functions |
| `rtl/bfly_net.sv`, `rtl/ibfly_net.sv` | the two networks, parameter `N` (default 64) |
| `rtl/alu.sv`, `rtl/regfile.sv` | ALU; 32 x 64 register file, 4R/3W |
| `rtl/vliw_datapath.sv` | two-slot VLIW datapath (also the superscalar datapath) |
| `rtl/ss_issue.sv` | superscalar pairing logic |
| `rtl/si_datapath.sv`, `rtl/si_frontend.sv` | single-issue datapath and its operand front end |
| `rtl/ldstate_pu.sv`, `rtl/ls_datapath.sv` | unit with internal configuration registers; the LdState datapath |
| `rtl/perm_asip_top.sv` | top |
| `tb/perm_tb_pkg.sv` | reference models: network stages, Benes routing, one-word architectural model |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/perm_pkg.sv tb/perm_tb_pkg.sv $(ls rtl/*.sv | grep -v perm_pkg) \
    tb/tb_perm_asip_top.sv --top-module tb_perm_asip_top
./obj_dir/Vtb_perm_asip_top
```

Every testbench ends with `TB_RESULT checks=<n> failures=<m>` and stops
itself after a fixed number of cycles if it hangs.

| testbench | what it checks |
|---|---|
| `tb_bfly_net`, `tb_ibfly_net` | identity, single switches in every stage, all-crossed network, 500 random vectors, against a bit-arithmetic model |
| `tb_alu` | all operations with corner and random operands |
| `tb_regfile` | reset, writes through every port, write timing, conflict priority, random traffic |
| `tb_ldstate_pu` | load, permute, read-back, random mixes, routed permutations in four and in two instructions |
| `tb_ls_datapath` | the LdState machine against a sequential model: ALU and bypass, LdState then an immediate permutation, MovePUtoGR, routed permutations in four and two instructions, a write-back/memory conflict |
| `tb_vliw_datapath` | ALU pairs, bypass chains, permutations in both slot orders with their two-cycle latency, illegal words, 600 random words; a second instance with `NSLOT = 4`: the R1..R4 schedule with one completion per cycle, unit conflicts, 400 random words |
| `tb_si_datapath` | ALU and permutation operations against a model, bypass on all four buses, two-cycle BFLY+IBFLY |
| `tb_si_frontend` | one instance per `METHOD`: operand mapping, the bundle buffer, every error case |
| `tb_ss_issue` | pairing, waiting for a partner, dependency checks, errors, random instruction pairs |
| `tb_perm_asip_top` | the whole design at default size: VLIW permutations with their latency, four back-to-back permutations, DES IP/FP, illegal words; a superscalar program checked against a sequential model (four permutations in 8 cycles); a single-issue program; the four-slot R1..R4 schedule; LdState programs with a context save/restore. Each mechanism is counted, and the test fails if one never occurs |

To check the routing, the testbenches build the DES initial permutation from
its closed form: output row r, column c takes DES bit 8(7−c) + s(r), with
s(r) = 2r+2 for r < 4 and 2(r−4)+1 otherwise, where DES bits are numbered
1..64 from the MSB. The final permutation FP is its inverse. The tests check
that FP(IP(x)) = x.

## What is this design's own, and what is not built

How far it has been checked: every module has been simulated with Verilator
against independent models (above), and the RTL passes Verilator lint and
Yosys synthesis. It has not been timed against a cell library, so the
claim that one network fits in one ALU cycle is not verified here.

Taken from the design idea:

* the network structure and stage order;
* three configuration operands per network, each covering two stages;
* the four read ports, bypass paths and memory path of the four-port
  datapaths, with one ALU (single issue) or two (VLIW, superscalar);
* the BFLY.ct1/BFLY pairing in one long word, and the pairing of the two
  halves by the superscalar issue logic;
* the register-pair, long-format and bundled operand schemes;
* the LdState internal registers, their load and read-back instructions,
  and the two-read-port machine around them.

Chosen here:

* the bit layout inside configuration operands and the switch numbering;
* the operation list and the instruction field layouts;
* one ALU per slot, and one network per long word, when `NSLOT = 4`;
* the one-stage write-back pipeline;
* dropping illegal words and malformed pairs, and waiting for a missing
  partner;
* the superscalar dependency rule;
* write priorities;
* reset values;
* the MovePUtoGR select bit;
* wrap-around of R[s+1] for register pairs.

Not built:

* **Instruction fetch and decode.** Instructions arrive decoded, and the
  superscalar fetch buffer is outside (`take_o` tells it what was used).
* **Load/store addressing.** Only a write port from memory exists. So whole
  programs such as a DES encryption cannot be timed on this RTL.
* **One permutation per cycle outside VLIW.** Only the VLIW datapath has
  the wide configuration (`NSLOT = 4`). A 4-way superscalar issue stage, and
  a two-issue LdState machine with four read ports, are not built.
* **Two-instruction fetch for bundles.** With it, a bundled permutation
  would take two cycles instead of four.
