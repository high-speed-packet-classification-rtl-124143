# Pipelined bit-vector packet classifier with dynamic updates

This is a packet classification engine for FPGA-style hardware. Each packet
header is compared against a table of prioritized rules, and the engine reports
the best rule that matches. A rule is a ternary string over the header bits:
each digit is `0`, `1` or `*` (don't care), so prefix rules and exact-match
rules are both possible. The engine has two goals:

* **Throughput that does not depend on the rule set.** Every rule's match is
  worked out by table lookups and ANDs. The work per packet is the same
  whatever the rules are, and two packets enter in every clock cycle.
* **Rules can change while traffic runs.** A rule can be inserted, modified
  or deleted in a few cycles without stopping the lookup pipeline.

The design is written in SystemVerilog (IEEE 1800-2017) and is synthesizable.
Its default size is the one it was characterised at: 4-bit headers, a 2-bit
stride and 8 rules. All of these are parameters.

## The core idea: bit vectors per subfield

Cut the L-bit header into subfields of S bits. For one subfield and one
possible value `k` of it (0 … 2^S−1), a *bit vector* (BV) has one bit per
rule. The bit is 1 when the rule's ternary digits in that subfield accept
`k`. A lookup reads, for each subfield, the BV selected by the packet's bits
and ANDs all of them together. The rules whose bits survive are the ones
that match the whole header.

Here is an example with S = 2 and three rules, `R0 = 00`, `R1 = 01` and
`R2 = 11` in this subfield:

| k    | 00 | 01 | 10 | 11 |
|------|----|----|----|----|
| R0   | 1  | 0  | 0  | 0  |
| R1   | 0  | 1  | 0  | 0  |
| R2   | 0  | 0  | 0  | 1  |

Rewriting R2 as `1*` changes only R2's row, to `0 0 1 1`. Each bit is stored
in its own memory entry. So an update touches only the 2^S bits of one rule
in each subfield and leaves every other rule alone.

## The grid and its three pipelines

Long bit vectors need long wires. To avoid that, the rules are not kept in
one wide memory per subfield. They are spread over a grid of small
*modular processing elements* (PEs):

```
             col 0 (hdr bits L-1..L-S)   col 1        ...   col C-1
               |                          |                   |
   row 0   PE[0,0]  --BV-->  PE[0,1]  --BV-->  ...  PE[0,C-1] --> valid --> PrEnc 0
               |                          |                   |                 |
   row 1   PE[1,0]  --BV-->  PE[1,1]  --BV-->  ...  PE[1,C-1] --> valid --> PrEnc 1
               |                          |                   |                 |
   ...                                                                        ...
   row R-1 PE[R-1,0] ...                                 PE[R-1,C-1] --> valid --> PrEnc R-1 --> result
```

* The grid has **C = L/S columns**, one per header subfield. It has
  **R = N/RPE rows**, one per group of RPE rules. Row `l` holds rule slots
  `l*RPE … l*RPE+RPE−1`.
* **Vertical pipeline.** A column's header bits pass down through the input
  register of each PE. Each PE uses them and hands them on a cycle later.
* **Horizontal pipeline.** The BV of a row's rules moves right through the
  output register of each PE. Each PE ANDs in its own subfield's BV.
* **Priority encoder pipeline.** At the end of a row, the BV is ANDed with
  the row's *valid bits* and goes to the row's priority encoder. That
  encoder picks the row's best matching rule and merges it with the result
  from the row above. The merged result is registered and passed down. The
  last encoder gives the final answer.

Packet P reaches PE[l,j] in cycle `t+l+j`. The vertical links give the `l`
and the horizontal links give the `j`. For this to work, the header bits
of column `j` are delayed by `j` cycles before they enter row 0. A result
comes out **R + C cycles** after its packet goes in. At the default size
that is 4 + 2 = 6 cycles. A new pair of packets can enter in every cycle.

Every wire in the grid is local. Its length depends on S and RPE, not on N.
Adding rules adds rows, and adding header bits adds columns.

## Inside a modular PE

Each PE (`modular_pe`) works on one S-bit subfield of RPE rules, for two
packets at once (lanes 0 and 1):

* **Data memory.** It has 2^S words of RPE bits, one write port and two read
  ports. The packet's S header bits are the read address, with no decoding.
* **AND and non-zero detect.** Each lane's word is ANDed with the incoming
  BV. A non-zero detector turns the result into `en_out`. Once a packet's BV
  is all zero, no rule of this row can match it any more. The following PEs
  of the row then skip their memory read for that packet and pass zeros on.
* **Parity generators.** A parity bit travels with every BV. Each PE works
  out the parity of the BV it receives and compares it with that bit. Each
  memory word also has a stored parity bit. It is written together with
  the word and checked each time the word is read. Any mismatch sets the
  packet's error flag, which comes out as `res_err`. In correct operation
  `res_err` is never set. The flag is a data-integrity check: it never
  decides whether a rule matches.
* **Rule decoder** (`rule_decoder`). It rewrites one rule's bits in this
  subfield. For k = 0 … 2^S−1 it writes bit `((k ^ value) & ~wildcard) == 0`
  into word k. That is one bit per cycle, so always 2^S cycles, through the
  single write port. Both read ports keep serving packets meanwhile.

## Dynamic updates

All updates go through one command port, driven by `update_ctrl`. Each rule
has a rule ID (RID). The controller first does an **RID check**: it
compares the command's RID with the RIDs of all valid slots at once.

| command      | RID found                                          | RID not found |
|--------------|----------------------------------------------------|---------------|
| `UPD_WRITE`  | **modify**: rewrite the rule's BVs in every column of its row (in parallel, 2^S cycles) and its priority register | **insert**: do the *validity check*, i.e. take the lowest slot whose valid bit is 0; write it like a modification; *then* set its valid bit and record the RID. If every slot is valid, respond `ST_FULL` |
| `UPD_DELETE` | **delete**: clear the valid bit                    | respond `ST_NOT_FOUND` |

Deletion never touches the memories: a rule with valid bit 0 is masked at
the end of its row. Insertion reuses the memory of an invalid rule. The
valid bit is set only after all its bits are written, so a half-written
new rule never matches.

Latency, counted from the cycle in which the command is accepted to the response
pulse:

* deletion: 2 cycles;
* modification: 2^S + 3 cycles;
* insertion: 2^S + 4 cycles.

**What a packet sees during an update.** Lookups never stop. A packet
already in the grid while slot X is being rewritten may see X's old bits
in some columns and its new bits in others. It may also see either X's old
or its new priority. The result for every other rule is exact. For a
modification, the rule in X can briefly match as a mix of its old and new
forms. If traffic needs atomic modifications, delete the rule and insert
it again under a fresh RID.

## Priority

Each row's priority encoder (`prio_enc`) holds a PRI_W-bit priority for
each of its rules. A lower number wins. When two rules have the same
priority, the lower slot wins. Inside a row the choice is made by a binary
tree of comparators, clog2(RPE) levels deep. Because rows further up hold lower slots,
the result from the row above wins a tie. Changing a priority is a single
register write, done as part of a modify or insert.

## Interface (`packet_classifier`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset, which empties the rule set |
| `pkt_vld[1:0]`, `pkt_hdr[1:0]` | in | 2, 2×L | two packets per cycle |
| `res_vld`, `res_hit` | out | 2 | result present, some valid rule matched |
| `res_slot`, `res_rid`, `res_pri` | out | 2×clog2(N), 2×RID_W, 2×PRI_W | the winning rule |
| `res_err` | out | 2 | parity mismatch along the packet's path |
| `cmd_valid`/`cmd_ready` | in/out | 1 | command handshake; one command at a time |
| `cmd_op` | in | `upd_op_e` | `UPD_WRITE` or `UPD_DELETE` |
| `cmd_rid`, `cmd_pri` | in | RID_W, PRI_W | rule ID, priority |
| `cmd_value`, `cmd_wc` | in | L | ternary rule: `cmd_wc` bit 1 = `*`, else the digit is `cmd_value`'s bit |
| `rsp_valid`, `rsp_status`, `rsp_slot` | out | 1, `upd_status_e`, clog2(N) | one-cycle response |

Header bit L−1 is the first digit of the rule string. Column 0 works on
bits `[L-1 -: S]`.

Parameters and defaults: `L = 4` header bits, `S = 2` stride, `N = 8`
rules, `RPE = 2` rules per PE (giving a 4 × 2 grid), `RID_W = 8`,
`PRI_W = 4`. L must be a multiple of S, and N a multiple of RPE. The
number of lanes (2) is fixed in `pc_pkg`.

## How far this follows the original architecture

These parts follow the architecture the engine was described with:

* the 2-D grid of modular PEs with vertical header and horizontal BV
  pipelines;
* the dual-read-port PE with AND, non-zero enable and output registers;
* one memory entry per BV bit, with single-ported writes in a fixed 2^S
  cycles;
* the RID check, validity check, valid-bit deletion and slot reuse on
  insertion;
* one priority encoder per row, chained down the rows;
* the characterised size S = 2, L = 4, N = 8.

These are choices of this implementation:

* **Rules per PE.** RPE = 2 is used at the default size.
* **Header skew.** The column header skew is an addition.
* **Widths and encodings.** The RID and priority widths, the command and
  response encodings, and the reset behaviour.
* **Priority updates.** Priorities are stored in registers. The original
  describes a dynamic priority tree updated in O(log N) but does not detail
  it. Here a priority update takes one cycle.
* **Parity.** The role of the parity bits is an interpretation. The
  original puts parity generators on the BV inputs and parity on the memory
  contents, and credits them with faster search. No mechanism for that is
  given. Here they check data integrity. The saving in work comes from the
  non-zero enable, which skips memory reads once a packet can no longer
  match in a row.
* **Valid-bit masking.** Invalid rules are masked with one AND per row,
  after the row's last PE. The original shows this as a reset from the rule
  decoder into the PE output register.
* **Not built.** The original also mentions comparing a header field
  against lower and upper bounds per rule. That is not built: no structure
  for it is given.

No clock rate is claimed. The published numbers come from FPGA place and
route (about 81 MHz at the default size, for the version with parity).
RTL simulation does not reproduce them.

## Files

| file | contents |
|------|----------|
| `rtl/pc_pkg.sv` | lane count, update command/status enums |
| `rtl/packet_classifier.sv` | top: header skew, PE grid, valid bits, priority chain, update controller |
| `rtl/modular_pe.sv` | one PE: data memory, two lanes, parity checks, rule decoder |
| `rtl/rule_decoder.sv` | writes one rule's BV bits in one subfield |
| `rtl/parity_gen.sv` | XOR of a bit vector |
| `rtl/valid_bits.sv` | valid bits of one row, masking the row's BVs |
| `rtl/prio_enc.sv` | one row's priority registers and encoder |
| `rtl/update_ctrl.sv` | RID check, validity check, update sequencing |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_classifier_grid4x3.sv` | the full engine as a 4 × 3 grid of 1-bit, 1-rule PEs (L=3, S=1, N=4) |

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`.

* **`tb_packet_classifier`** runs the engine at its default parameters. It
  sends random packets on both lanes in almost every cycle and interleaves
  300 random updates, including refused ones. A behavioural model of the
  rule set predicts every result.
  * It checks that each result arrives exactly R + C cycles after its
    packet.
  * Packets that see no update in flight must match the model exactly.
  * Packets that overlap an update are checked against every rule except
    the one being changed.
  * It counts the mechanisms and fails if any never happens: insert,
    modify, delete, set full, unknown RID, dual-lane cycles, lookups cut
    short by an all-zero BV, lookups during updates, multiple matches,
    priority overriding slot order, and no match.
* **`tb_classifier_grid4x3`** runs the same test on the L=3, S=1, N=4
  grid.
* **The block testbenches** replay the worked examples above: the valid
  bits go 1,1,0 → 1,0,0 on a delete and 1,1,0 → 1,1,1 on an insert. They
  also check exact cycle counts of the rule decoder and the controller.
  In the PE test, a wrong parity bit on one lane must raise that lane's error flag only.

To simulate one testbench with Verilator, run from the repository root:

```
verilator --binary --timing --assert -y rtl rtl/pc_pkg.sv tb/tb_packet_classifier.sv \
          --top-module tb_packet_classifier -o sim && ./obj_dir/sim
```

Replace the testbench name to run another one. Each run takes well under a
second.
