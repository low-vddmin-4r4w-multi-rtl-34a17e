# Low-voltage multi-port memories: a 4R4W multi-thread register file and a 2R2W SRAM

This is RTL for two low-voltage, multi-port on-chip memories from a 40 nm test-chip design:

* **`rf4r4w`**: a 2 Kbit register file with four read ports, four write ports and four hardware threads.
  It is built from only two 2R2W banks. The port count doubles because each bank is used twice per
  clock cycle ("double pumping": slot S0, then slot S1). Conflicts between ports are not
  left to the software. A two-level detector resolves them in hardware:
  1. Fixed port priority.
  2. A read-over-write check. It can swap the two write slots of a cycle (the *data slot
     conflict switch*, DSCS) so that a write blocked in S0 still completes in S1.
* **`sram2r2w`**: an 8 Kbit SRAM with two read ports and two write ports. It uses 8:1 bit interleaving and read-over-write
  conflict detection. A write that collides with a read of the same word is stalled.

The two memories are separate macros. `lvmin_top` places them side by side, together with a behavioural
model of the register file's self-timed slot pulses (`rf_slot_timer`). They share only the clock and reset.

The analog parts of the silicon have no logic function here: bit cells, replica bit lines, sense amplifiers, the negative-VVSS
capacitors, and power gating. Where such a part is controlled by logic, the RTL produces the
control signals as outputs: the capacitor enables, the bank enables, and the slot pulses of the behavioural
model.

---

## 1. Register file organisation

| Item | Value |
|---|---|
| Capacity | 2048 bits = 64 words x 32 bits |
| Banks | 2 x 1 Kbit, each with 2 read + 2 write intra-ports (A and B) |
| Threads | 4 (16 registers each: 8 in bank 0, 8 in bank 1) |
| Slots per cycle | 2 (S0, S1), or 1 in low-power mode |
| Bit interleaving | 2:1 |
| External ports | 4 read + 4 write, each issuing one request per slot |

### Address of a request (`rf_pkg::raddr_t`, 7 bits)

```
 [6]   bank    which bank (0/1)
 [5]   ab      which intra-port of that bank (A=0, B=1)
 [4:3] thread  0..3
 [2:0] rnum    register 0..7 inside the bank
```

A request is `req_t = {en, raddr_t}`. The bank bit and the A/B bit together choose one of four
**intra-ports**. So four ports can all be served in one slot only if they name four different
{bank, ab} pairs. The A/B bit is a port-routing bit, not storage: bank *b*'s word
{thread, rnum} is the same word whether it is reached through A or B. The storage address is therefore 6 bits (bank,
thread, rnum). The original chip specifies a 9-bit address per slot. Its two extra bits are not
described, so they are not modelled.

### Inside a bank

Each bit cell holds **two subcells**: subcell 0 stores threads 0/1, subcell 1 stores threads 2/3.
`thread[0]` and `rnum` select the row and column; `thread[1]` selects the subcell. After the bit lines of both subcells are
read, the **column thread switch** (`rf_thread_switch`) picks one by `thread[1]`.

The array has 8 rows x 64 physical columns per subcell. The word index `{thread[0], rnum}` splits into
row `{thread[0], rnum[2:1]}` and column select *c* = `rnum[0]`; bit *b* of the word sits in physical column `2*b + c`. This is the 2:1 interleave: adjacent cells
in a row belong to different words, so a particle strike that flips two neighbours corrupts two words by one
bit each, not one word by two bits.

---

## 2. Two-level conflict detection

Four ports share four intra-ports, and reads and writes of one bank share its cells. Two
kinds of conflict must be removed before anything reaches the array.

### Level 1: port priority (`rf_port_arbiter`)

There are four arbiters: read S0, read S1, write S0 and write S1. Each one walks the ports in the order
**Port0 > Port1 > Port2 > Port3** and gives each {bank, ab} intra-port to the first port that asks for it.
A port that loses raises its conflict flag (`rd_conflict` / `wr_conflict`) and is not served this cycle.
Winners are stored in a register at the rising edge, together with their write data and their source
port number. The rest of the design therefore sees at most one read and one write per intra-port and slot.

### Level 2: read over write, with data slot switching (`rf_dscs`)

A read does not disturb a cell, but a write changes it. So when a read and a write of one bank address the
same word in the same slot, **the read always wins**. The DSCS of one write path (intra-port A or B of a
bank) looks at its S0 write `w0` and S1 write `w1`. It compares each with the bank's reads (A and B) in the
same slot:

| Case | S0 write vs S0 reads | S1 write vs S1 reads | Action | `state` | `wchange` |
|---|---|---|---|---|---|
| 1 | no conflict | no conflict | both writes as requested | S0 | 0 |
| 5 | no conflict | conflict | S1 write dropped, no switch | S0 | 0 |
| 4 | conflict | (no S1 write) | S0 write dropped | S3 | 0 |
| 2 | conflict | any | swap: `w1` in S0, `w0` in S1; no conflict after the swap → both written | S2 | 1 |
| 3 | conflict | any | swap, but a conflict remains → **both** dropped | S3 | 1 |

In the swap (cases 2/3), the write data moves with the addresses. This is the "data switch" driven
by `WChange`. After the swap, `w1` is checked against the S0 reads and `w0` against the S1 reads. The
state names follow the original controller's state machine. Its transient state S1 ("switching") is
not visible at cycle level, so it never appears on `dscs_state`.

Why switch rather than simply retry later? A write that conflicts with an S0 read very often does
not conflict with the S1 read. Moving it there completes it in the same cycle, so no replay is needed.

### A and B writing the same word

After level 2, intra-ports A and B of one bank may still write the same word in one slot. For example, port 0 uses
bank 0/A and port 1 uses bank 0/B for the same register. The cell cannot take two writes, so **A is kept
and B is dropped** (`wr_dropped`). The original design does not say how it handles this. This rule
is this design's own.

### What each port is told

For every external port and requested slot, the RTL reports the following flags one cycle after the request was registered:

* `rd_valid`: the read was performed, with `rd_data`.
* `rd_conflict`: the read lost the port priority.
* `wr_done`: the write was performed, in the requested slot or the swapped one.
* `wr_conflict`: the write lost the port priority.
* `wr_dropped`: the write lost to a read at level 2, or to intra-port A.

`wchange[bank][ab]` and `dscs_state[bank][ab]` show what the DSCS did.

---

## 3. Slots and timing

### Cycle-level view (the RTL)

```
 cycle k-1 : ports present rd_req/wr_req/wr_data/cen (level-1 arbitration is combinational)
 edge  k   : grants, data and CEN registered
 cycle k   : level 2 (DSCS, A/B check), slot S0 reads+writes, then slot S1 reads+writes
 edge  k+1 : writes committed, read data and all flags registered -> visible in cycle k+1
```

Within cycle k, **S1 reads see S0's writes of the same cycle**. S0 reads see the state before the cycle. This
order follows the silicon: the second pulse always waits for the first slot to finish, so a write in S1
can never disturb a read in S0.

`dual_slot = 0` selects the low-power single-access mode. The S1 requests are then ignored (no arbitration, no
flags) and only S0 runs. `cen[b] = 0` puts bank *b* to sleep. Its requests are ignored, and granted requests
get neither `wr_done` nor `rd_valid`.

### Self-timed view (`rf_slot_timer`, behavioural)

In silicon the two slots are not clocked by a double-rate clock. A **replica** column times them. At each rising
edge, a short `Reset_Sig` clears the slot flags and the word-line pulse `R_WP` starts slot S0. When the replica
column finishes its worst-case access it returns `R_W_OK`, which sets `TS1` and ends `R_WP`. If the second
slot is enabled (`WEN_S1`), `R_WP` fires again after a short gap, and its `R_W_OK` sets `TS2`.

`rf_slot_timer` reproduces this sequence with delay parameters in place of the analog delays:
`T_RST`, `T_REPLICA`, `T_OK` and `T_GAP`. The values are placeholders, not measured numbers. A clock
edge that arrives before the sequence has ended is counted in `overruns`. In `lvmin_top`, `WEN_S1` is the
register file's `dual_slot` input. The model is not synthesizable and drives no logic.

---

## 4. Negative-VVSS write assist (`rf_neg_vvss_ctrl`)

The cell writes single-ended, and writing a 1 is its weak case. To help it, the column's virtual ground (VVSS) is
pulled below 0 V by coupling capacitors. Writing 1 from both ports into one column loads the write bit line
more, so a second capacitor is added for that case:

| WEN | data A | data B | Cap 1 | Cap 2 |
|---|---|---|---|---|
| 0 | x | x | off | off |
| 1 | 0 | 0 | off | off |
| 1 | 0 | 1 | on | off |
| 1 | 1 | 0 | on | off |
| 1 | 1 | 1 | on | on |

The control is evaluated per bank, per slot and per physical column. It is exported as
`neg_cap1` / `neg_cap2`. The capacitors themselves are analog and are not modelled.

---

## 5. The 2R2W SRAM (`sram2r2w`)

| Item | Value |
|---|---|
| Capacity | 8192 bits = 512 words x 16 bits |
| Array | 2 banks of 64 rows x 64 columns |
| Interleave | 8:1 (bit *b* of column select *y* in physical column `8*b + y`) |
| Address (`sram_pkg::saddr_t`, 9 bits) | `{row[5:0], ysel[2:0]}` |
| Ports | read A, read B, write A, write B, all usable every cycle |

Bank 0 holds the low byte and bank 1 the high byte of each word, at the same row and column. This split is
this design's choice. All inputs pass through DFFs at the rising edge. During the following cycle,
`sram_conflict_detect` compares each write address with both read addresses. A write that hits a read is
**stalled**: it is not performed, and `stall_a`/`stall_b` report it one cycle later. If both writes name
one word, A is written and B stalled. The surviving writes are committed at the next edge, and the read words are
captured in `q_out_a/b` at the same edge. A read returns the word as it was before its own cycle's writes. `q_out` holds its
value until the next read on that port.

`neg` is the negative-VVSS enable per bit and column: high while a 1 is written there by a performed
write. `cen = 0` makes the SRAM ignore all inputs.

Interfaces, register-file side: `rf_pkg` holds the sizes and the `req_t`, `ireq_t` (request after
arbitration, with its source port) and `dscs_state_e` types. SRAM side: `sram_pkg` holds its sizes and `saddr_t`.

---

## 6. Module map

```
lvmin_top
├── rf4r4w                      4R4W register file
│   ├── rf_port_arbiter x4      level 1 (read/write x S0/S1), registered
│   └── rf_bank x2              one 2R2W bank
│       ├── rf_dscs x2          level 2 per intra-port write path
│       ├── rf_neg_vvss_ctrl x2 capacitor enables per slot
│       └── rf_bank_array       storage, two slots, interleave, subcells
│           └── rf_thread_switch (per slot and read port)
├── rf_slot_timer               behavioural replica slot pulses
└── sram2r2w                    2R2W SRAM
    ├── sram_conflict_detect
    ├── sram_neg_vvss_sel
    └── sram_bank_array x2
```

All modules are synthesizable except `rf_slot_timer`. The register-file storage is
an array of flip-flops written from `always_ff`. A real implementation would replace `rf_bank_array` and
`sram_bank_array` with the custom cell arrays.

---

## 7. Departures and how far to trust this

These points come from the original design:

* The sizes and port counts.
* The two-bank double-pumped structure.
* The priority order Port0 > Port1 > Port2 > Port3.
* Read over write.
* Slot switching and its five cases.
* The S0/S2/S3 states.
* The one-slot/two-slot mode and the per-bank CEN.
* The grouping of threads into subcells and the column thread switch.
* The negative-VVSS table.
* The replica pulse order (Reset_Sig, R_WP, R_W_OK, TS1, TS2, with S1 waiting for S0).
* For the SRAM: its size, banks, interleave and stall-on-conflict rule.

These are this design's own choices:

* **Address layout**: the register-file and SRAM bit orders. The original register file names a 9-bit address; only
  the 7 bits that map to storage and routing are implemented. The SRAM uses 9 bits, which its 512 words require.
* **Latency**: results one cycle after the requests are registered. The original only says that
  requests are arbitrated before the edge, registered at it, and checked by level 2 after it.
* **Case 4** reports state S3. Case 3 drops both writes. A beats B on a same-word write collision,
  in both memories.
* **Flags**: the conflict, dropped, done and stall flags, and their alignment.
* **CEN polarity**: high means active.
* **Interleave order**: the exact physical column order of the interleave.
* **SRAM byte split**: which byte of a word each SRAM bank holds.
* **Reset**: a synchronous active-low reset of the control registers. The memory arrays are not reset.
* **Slot timer delays**: all delay values in the slot timer.

Circuit-level techniques have no RTL counterpart and are out of scope:

* Shared read/write bit lines.
* Feedback cut-off (X_Cut/Y_Cut).
* Keeping RWL high in standby.
* Sense-amplifier floating and power gating.
* Test-chip scan and I/O pins.

---

## 8. Simulation

Each testbench in `tb/` is self-checking. It prints `TB_RESULT checks=<n> failures=<n>` and ends with `$finish`.
A watchdog stops it if it hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl rtl/rf_pkg.sv rtl/sram_pkg.sv \
    tb/rf_ref_pkg.sv tb/sram_ref_pkg.sv -y rtl -y tb tb/lvmin_top_tb.sv \
    --top-module lvmin_top_tb -Mdir obj_top
./obj_top/Vlvmin_top_tb
```

Replace `lvmin_top_tb` with any other testbench name.

| Testbench | What it shows |
|---|---|
| `lvmin_top_tb` | Whole design at default sizes. Random traffic on both memories is compared every cycle with independent reference models (`rf_ref_pkg`, `sram_ref_pkg`). It counts every mechanism and fails if one never happened: port conflicts, cases 2–5, A/B collisions, sleep, single slot, both subcells, S1 reading S0's write, both capacitors, both SRAM stall kinds, SRAM negative VVSS, TS1/TS2 pulses |
| `rf4r4w_tb` | Register file alone against `rf_ref_pkg`, about 150k checks |
| `rf_test_pattern_tb` | The register file's five-cycle functional pattern: single write, double write with read, double read, W/R conflict, slot switch. Also checks the one-cycle latency |
| `sram_test_pattern_tb` | The SRAM's seven-cycle pattern: 1W, 1R, 1W1R, 2W, 2R, 2W2R, conflict |
| `sram2r2w_tb` | SRAM against `sram_ref_pkg`, including the latency and hold of `q_out` |
| `rf_bank_tb`, `rf_dscs_tb`, `rf_port_arbiter_tb`, `rf_bank_array_tb`, `rf_thread_switch_tb`, `rf_neg_vvss_ctrl_tb`, `rf_slot_timer_tb`, `sram_conflict_detect_tb`, `sram_bank_array_tb`, `sram_neg_vvss_sel_tb` | Unit tests. These include all five DSCS cases, the interleave placement, the capacitor truth table, and the slot-pulse times |

The simulator is two-state. Arrays that are never reset start with arbitrary contents, and the
reference models only compare words that have been written.
