# NON-VON: a tree of tiny SIMD processing elements

NON-VON is a machine for database and other symbolic work. Its core is the
Primary Processing Subsystem (PPS): a very large number of deliberately small
processing elements (PEs), each holding a few dozen bytes of data in local
RAM, connected as a complete binary tree. A conventional control processor
(CP) sits above the root and broadcasts one instruction at a time; every
enabled PE executes it on its own data. Instead of moving data to a
processor, the query goes to where the data already is: a relational
selection, for example, is one short instruction sequence that all PEs run
at once on the records they hold.

A few mechanisms make this tree more than a broadcast network:

* **Enable flags** let the CP switch PEs off and on from their own data, so
  one instruction stream can act on a data-dependent subset of PEs.
* **REPORT** sends a value from the enabled PEs up the tree to the CP.
* **RESOLVE** picks exactly one PE out of a set of candidates, so the CP can
  enumerate matching records one at a time.
* **Neighbour transfers** move bytes or bits between a PE and its father or
  sons, or along a linear ordering of all PEs laid over the tree, so records
  longer than one PE's RAM can span several PEs.
* **Intelligent Head Units (IHUs)** sit on the tree edges at one level of the
  tree. Each connects a disk head to the subtree below it and can take that
  subtree over, so several subtrees run independent programs.

This repository holds a synthesizable SystemVerilog model of the PPS with
its IHUs, built from PEs following the NON-VON 1 prototype, and a
self-checking testbench for each part.

## Structure of the tree

At the default parameters the machine has 63 PEs (a complete tree of depth 6)
and four IHUs:

```
                         CP (outside: cp_valid/cp_byte in, report/r1 out)
                          |
                        PE level 0                        \
                    /          \                           | upper tree,
              PE level 1        PE level 1                 | free PEs of boards
             /     \            /      \                  /
          [IHU0] [IHU1]      [IHU2]  [IHU3]     <- disk-side ports per IHU
            |      |           |       |
         board0  board1     board2   board3     each: 15-PE subtree (level 2 root)
```

The tree is physically built the way the prototype is packaged:

* **`pps_chip`** holds 2**C PEs (C = 3, eight PEs). 2**C - 1 of them form a
  complete subtree reached through port **T**; the remaining one is an
  "interior" PE with its own father port **F** and son ports **L** and
  **R**. Two chips combine into a bigger subtree by making one chip's
  interior PE the father of both chips' subtrees; what remains is again "a
  subtree plus one free PE", so the construction repeats.
* **`pps_board`** applies that repetition to 2**M chips (M = 1 by default)
  and has the same T/F/L/R ports as a chip. Inside, the combining PE of group
  `(j, i)` (level j, index i) is the interior PE of chip `i*2**j + 2**(j-1) - 1`;
  the last chip's interior PE is left for the board's F/L/R ports.
* **`nonvon_top`** combines 2**K boards the same way (K = 2): the boards'
  free PEs form the top K levels, each board's T port hangs below an IHU,
  and the free PE of the last board is unused (its ports idle). The tree
  has 2**(K+M+C) - 1 working PEs.

Every tree edge carries two packed structs, defined in `nonvon_pkg`:

| bundle | direction | contents |
|---|---|---|
| `down_t` | father to son | broadcast byte and valid, RESOLVE `kill`, `is_left` (which son this is), the father's latches, the latches of the PE just before and just after the subtree in linear order |
| `up_t` | son to father | `present`, OR of A8 over enabled PEs (`report`), "some enabled PE has A1 = 1" (`any`), the son's own latches, latches of the subtree's first and last PE in linear order |

"Latches" (`nbr_t`) are a PE's IO8, IO1 and EN1 plus a `present` bit;
absent sons are tied to `UP_NONE`.

## The processing element

`pe` is the same for every node; a leaf is a PE with its son links tied
off. It has

* `pe_ram`: 64 x 8 local RAM, addressed only through the MAR register,
  asynchronous read, clocked write;
* `pe_byte_regs`: A8, B8, C8, X8, Y8, Z8, IO8, MAR (A8 and B8 are the
  accumulators, IO8 is the byte latch used for transfers);
* `pe_flag_regs`: A1, B1, C1, X1, Y1, Z1, IO1, EN1 (A1 and B1 are the bit
  accumulators, C1 the carry, IO1 the bit latch, EN1 the enable flag);
* `pe_acu`: byte comparator giving A8 = B8 and A8 > B8 (unsigned);
* `pe_alu`: one-bit ALU: any of the 16 functions of (A1, B1) into A1, and a
  full adder/subtractor on A1, B1 and carry C1 for bit-serial arithmetic;
* `pe_io_switch`: all of the PE's tree wiring (below);
* `pe_pla`: the instruction decoder with a two-state control for the one
  instruction that takes a data byte.

Every instruction takes one clock. The CP puts one byte per clock on the
broadcast bus; the byte reaches every PE combinationally in the same cycle
(no pipeline registers along the tree) and is executed at the next clock
edge. A PE with EN1 = 0 ignores everything except ENABLE, but still decodes
every byte so that it stays in step with the stream.

### Instruction set

| group | instructions | effect |
|---|---|---|
| register transfer | `LOADA8 r`, `LOADB8 r`, `STOREA8 r`, `STOREB8 r` | A8/B8 <- r, r <- A8/B8 |
| | `LOADA1 f`, `LOADB1 f`, `STOREA1 f`, `STOREB1 f` | same for flags |
| memory | `READRAM`, `WRITERAM` | A8 <- RAM[MAR], RAM[MAR] <- A8 |
| arithmetic | `ADD1`, `SUB1` | A1, C1 <- A1 + B1 + C1 (or A1 - B1 with borrow in C1) |
| | `ROTRA`, `ROTLA`, `ROTRB`, `ROTLB` | rotate A8 through A1 (B8 through B1) as a 9-bit ring |
| logic | `LOGICAL f` | A1 <- f(A1, B1), f any 4-bit truth table |
| control | `ENABLE` | EN1 <- 1 in every PE |
| | `COMPARE` | A1 <- (A8 = B8), B1 <- (A8 > B8) |
| | `RESOLVE` | A1 stays 1 only in the first candidate |
| | `REPORT` | A8 of the enabled PEs goes to the CP |
| | `BROADCAST8 d` | A8 <- d (two bus bytes) |
| transfer | `SEND8 p`, `RECV8 p`, `SEND1 p`, `RECV1 p` | IO8 / IO1 moved between neighbours, p = P, LC, RC, LN, RN |

A PE disables itself by storing a flag into EN1 (`STOREA1 EN1`): a typical
selection is "compare, then store the result into EN1", after which only the
matching PEs act.

Encoding (8 bits, defined with builder functions in `nonvon_pkg`):

```
00 ooo rrr   register transfer; ooo = LOADA8 LOADB8 STOREA8 STOREB8
             LOADA1 LOADB1 STOREA1 STOREB1, rrr = register / flag number
0100 ffff    LOGICAL: A1 <- ffff[{A1,B1}]   (e.g. AND = 1000, OR = 1110)
0101 d ppp   SEND8 (d=0) / RECV8 (d=1); ppp = P LC RC LN RN = 0..4
0110 d ppp   SEND1 / RECV1
0x70..0x75   ADD1 SUB1 ROTRA ROTLA ROTRB ROTLB
0x80, 0x81   READRAM, WRITERAM
0x90..0x93   ENABLE COMPARE RESOLVE REPORT
0xA0         BROADCAST8, the next bus byte is its data
other        no operation
```

Register numbers follow the order A8 B8 C8 X8 Y8 Z8 IO8 MAR and A1 B1 C1 X1
Y1 Z1 IO1 EN1. The instruction list and semantics are those of the NON-VON 1
PE; the bit encoding is this design's own.

## RESOLVE and the linear order

The hardest part of the design is `pe_io_switch`, which carries everything
that crosses a tree edge. It is purely combinational and every output
depends only on registers, so the full tree settles in one cycle with no
combinational loops.

**Linear order.** PEs are numbered in inorder: the left subtree, then the
node, then the right subtree. For a 15-PE tree the root is 8, its sons 4 and
12, the leaves 1, 3, 5, ... 15. Inorder puts every node next to a node in
the neighbouring subtree, so each linear neighbour is reached through the
tree edges alone. Each subtree reports upward the latches of its first and
last PE in inorder (`up_t.first/last`); each father passes downward the
latches of the PE just before and after the son's subtree
(`down_t.pred/succ`). A PE then finds:

* LN (left neighbour) = last PE of its left subtree, or, for a PE without a
  left son, the `pred` it received from above;
* RN (right neighbour) = first PE of its right subtree, or `succ` from above.

**RESOLVE** keeps A1 only in the enabled candidate (A1 = 1) with the lowest
inorder number. Each switch passes `any` (this subtree has a candidate) up,
and `kill` (a lower-numbered candidate exists) down. A PE is killed by its
father's kill or a candidate in its left subtree; its right son receives
kill if any of those holds or the PE itself is a candidate. The root's `any`
is R1, which tells the CP whether a candidate existed before the RESOLVE.
The usual enumeration loop is: mark candidates in A1, then repeatedly
RESOLVE, enable the survivor (`STOREA1 EN1`), REPORT its data, clear its
mark, re-enable all.

**SEND/RECV.** RECV p copies neighbour p's IO8 (or IO1) into the receiver's
IO8 (IO1) whether p is enabled or not. If p does not exist (the sons of a
leaf, the father of the root, the neighbours beyond the two ends of the
linear order) the receiver latches 0. That gives every PE a constant-time
way to learn whether it is a leaf: set IO1 = 1 everywhere, RECV1 LC, and
only the leaves now hold 0. SEND p is decided at the receiver: a
PE latches the value from the neighbour that named it as target, only if
that sender is enabled. Both require the receiver to be enabled, so a SEND
to a disabled PE transfers nothing. SEND to P is not allowed (two sons would
drive one father) and does nothing.

**REPORT** is the bitwise OR of A8 over all enabled PEs, formed on the way
up; it equals a PE's A8 when that PE is the only one enabled, the normal
use after RESOLVE.

## Intelligent Head Units

`ihu` is placed on the edge between each PE of level K and its father.

* Passive: both bundles pass unchanged; the tree behaves as if the IHU were
  absent.
* Active: the IHU's local port (`ihu_valid`, `ihu_byte` on the top) drives
  the subtree's broadcast bus, so each subtree runs its own program. The
  subtree is isolated: no kill, neighbour data or report crosses the IHU,
  and the father sees a present but silent subtree.

The mode is a register loaded every clock from `ihu_active`, so it changes
one cycle after the request. In both modes the IHU sees its subtree's report
bus and RESOLVE line (`ihu_report`, `ihu_any`). All subtrees share the
clock; "independent" means separate instruction streams, not separate
clocks.

## Top-level interface (`nonvon_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cp_valid`, `cp_byte` | in | 1, 8 | one byte per clock on the global broadcast bus |
| `report` | out | 8 | OR of A8 over enabled PEs |
| `r1` | out | 1 | some enabled PE has A1 = 1 |
| `ihu_active` | in | 2**K | mode request per IHU |
| `ihu_is_active` | out | 2**K | current mode |
| `ihu_valid`, `ihu_byte` | in | 2**K, 2**K x 8 | local broadcast bus per IHU |
| `ihu_report`, `ihu_any` | out | 2**K x 8, 2**K | per-subtree report and RESOLVE lines |

`report` and `r1` are combinational from registers: sample them in the
cycle in which the REPORT or RESOLVE byte is on the bus (before that clock
edge RESOLVE has not yet cleared the losers; R1 is the "any candidate"
value).

Parameters: `K` (IHU level, 2), `BOARD_M` (log2 chips per board, 1), `C`
(log2 PEs per chip, 3), `RAM_WORDS` (bytes per PE, 64). After reset every
register and flag is 0 and every PE is enabled (EN1 = 1); RAM contents are
not reset.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv` which prints
`TB_RESULT checks=N failures=M` and stops; a watchdog stops it if it hangs.
With plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/nonvon_pkg.sv tb/tb_nonvon_top.sv --top-module tb_nonvon_top -o sim
./obj_dir/sim
```

* `tb_pe_acu`, `tb_pe_alu`, `tb_pe_ram`, `tb_pe_byte_regs`,
  `tb_pe_flag_regs`, `tb_pe_pla`: exhaustive or randomized checks against
  simple reference expressions.
* `tb_pe_io_switch`: random registers and link values against a reference
  of the routing, kill and receive rules.
* `tb_pe`: a single PE (as a leaf) against an instruction-level reference
  model, with random instruction streams.
* `tb_pps_chip`, `tb_pps_board`: check that the wiring forms the expected
  tree: every PE is tagged with its inorder number, then the testbench
  verifies father, sons, linear neighbours, RESOLVE order and REPORT
  against the inorder formulas (for rank r with t trailing zeros the sons
  are r -/+ 2**(t-1) and the father r +/- 2**t).
* `tb_ihu`: pass-through in passive mode, local drive and isolation in
  active mode, mode-change timing.
* `tb_nonvon_top`: the whole 63-PE machine at default parameters driven by
  a CP model. It tags PEs, loads records into RAM, runs an associative
  search for a five-character field, enumerates the matches with
  RESOLVE/REPORT, checks tree and linear transfers, blocked SENDs to
  disabled PEs, bit-serial addition and subtraction, rotates, logical
  functions, and lets the four IHUs run separate programs in active mode.
  It counts how often each of these mechanisms happened and fails if one
  never did.
* `tb_workload_spanned`: records three PEs long, first laid out along the
  linear order (record k in PEs 3k+1..3k+3), then as 21 three-PE "bushes"
  (segment B at a bush root on tree level 0, 2 or 4, A and C as its sons).
  The query marks department "SALES" and gives those employees a raise:
  the match on the first two letters travels to the next segment with
  SEND1 RN (linear) or RECV1 LC / SEND1 RC (bush), the last segment adds
  one eighth of the salary bit-serially. The bush layout's salaries are
  then totalled as a quaternary tree of bushes: in each of three bush
  steps, the A and C segments collect the totals of the bushes below
  them, and then B collects A and C.
* `tb_workload_treesum`: one salary per PE, summed over the tree in five
  steps: leaves are found with the RECV1 LC trick above, then each level's
  PEs fetch their sons' 16-bit running sums with RECV8 LC/RC and add them
  with ADD1; the root's total is read with REPORT and every PE's partial
  sum is checked. The same steps with COMPARE in place of addition give
  the highest salary. A selective version totals only the employees of
  department "C" with 3 to 5 years of service; every other PE contributes
  0. A second pass, adding 1 per chosen employee, gives the head count,
  so the mean follows.
* `tb_workload_packed`: 15-byte records packed four to a PE (starting at
  RAM locations 1, 16, 31 and 46, so 252 records in all). Each operation is
  issued once per slice with that slice's addresses: a byte move inside
  every record, a key match that keeps one flag per slice, and an
  enumeration of each slice's matches with RESOLVE/REPORT. Finally one
  field is totalled over all 252 records. Each PE first adds its four
  slices, and then the one-per-PE tree sum runs unchanged.
* `tb_workload_setintersect`: intersection of a 15-element set with a
  48-element set, one element per PE. The small set is enumerated with
  RESOLVE. Each element's value is read with REPORT and broadcast back as a
  probe to every element of the large set at once. R1 from a second
  RESOLVE says whether any element matched, and matching elements of the
  small set are flagged. The run takes 15 steps, however large the other
  set is. The difference (small-set elements left unflagged) is then
  enumerated the same way, which also gives the size of the union.

## Departures and limits

* **Links are wide.** The prototype chip brings each of its four ports out
  as a 9-bit bus (8 data bits plus a control bit) and multiplexes all
  functions on it; that multiplexing is not described, so here each edge is
  the full `down_t`/`up_t` bundle (about 60 wires each way).
* **Linear transfers take one cycle**, using separate wires for the
  inorder predecessor and successor paths, instead of a two-phase cycle on
  shared wires.
* **Instruction encoding** is this design's own; only the instruction list
  and meanings are taken from NON-VON 1.
* **READRAM/WRITERAM use MAR**, set beforehand with `STOREA8 MAR`; an
  assembler form `READRAM 17` is shorthand for that sequence.
* **BROADCAST8 loads A8**, and REPORT sends A8; with several PEs enabled the
  CP receives their OR.
* **Resets** (all registers 0, EN1 = 1) are this design's choice.
* **IHU** covers the mode switch and the bus behaviour only. Reading disk
  tracks, filtering records on the fly and hash coding are not modelled;
  their control enters through the IHU ports. Active mode shares the global
  clock.
* **Not included:** the control processor (a conventional computer; a model
  of it lives in the testbenches), the disks and sense amplifiers, the
  head-level filter logic, and the alternative "bounded neighbourhood"
  embedding of the linear order.
* **Size.** The default tree has 63 PEs; a full machine of hundreds of
  thousands of PEs is a matter of K and BOARD_M but cannot be simulated.
  Long records spanning several PEs and tree-wide sums are programs for the
  CP, not hardware; the two workload testbenches show how they run.
* The PE's assertion checks that a BROADCAST8 data byte is never decoded as
  an instruction.
