# Fault management and test access over IEEE 1687 (IJTAG) networks

On-chip instruments (sensors, BIST engines, monitors) are reached through an
IEEE 1687 scan network: a chain of registers whose length changes at run time
because Segment Insertion Bits (SIBs) and scan multiplexers splice sub-chains
in or out. This repository holds synthesizable SystemVerilog for three related
pieces of hardware built around such networks:

1. **A fault management subsystem.** An *instrument manager* sits between
   system software and an IJTAG network. Software asks it to read or write an
   instrument register by a plain address; the manager works out which SIBs to
   open, shifts the network itself, and returns the data. Instruments also
   raise fault flags that travel through the SIBs *without* any scanning; the
   manager interrupts the CPU and, on its own, walks down the hierarchy to find
   the instrument that raised an uncorrected fault.
2. **A wrapped core with logic BIST.** An isolation wrapper built from ordinary
   scan flip-flops, whose test modes (internal test, external test, safe
   outputs) come only from how the two wrapper chains' scan enables are driven,
   plus a logic BIST controller that can test the core through the wrapper in
   the field.
3. **Structural test of IJTAG networks.** Standard SIBs, a ScanMux with its
   control register, six small example networks, and a hardware sequencer
   that runs the test phase of a network test session (does the path that was
   configured really have the expected length?). One of the networks shows
   why the shortest access to an instrument is not always the one with the
   fewest scan operations.

`bastion_top` places the three side by side; they share only clock and reset.

---

## 1. The fault management subsystem

### 1.1 FCX-SIB: a SIB that also carries fault flags

`fcx_sib` extends a SIB with four scan bits, in scan order from `si`:
**S** (open/closed), **X** (mask), **C** (corrected), **F** (fault) → `so`.
S and X are written by the update stage; F and C are only captured. Besides the
scan path every SIB has an asynchronous flag path:

```
f_out = f_prev | (f_child & ~X)        c_out = c_prev & (c_child | X)
```

`f_child/c_child` are the flags of the SIB's own segment (an instrument, or the
`f_out/c_out` of the last SIB inside it); `f_prev/c_prev` come from the SIB
before it on the same level. The network's top flags therefore report
"some unmasked instrument has a fault" (F) and "all faults are corrected" (C)
at any time, even while every SIB is closed. No fault is `F=0, C=1`; an
uncorrected fault is `F=1, C=0`. The captured child flags pass a two-flop
synchronizer (`sync2`), so an instrument may be in another clock domain.

When closed, the SIB contributes 4 bits to the chain; when open, its child
segment is inserted between `si` and its S bit.

### 1.2 The network map ROM and status RAM

The manager knows the network only through a ROM with one 10-bit word per
node, listed from the scan-output end:

| bits  | meaning |
|-------|---------|
| [1:0] | node type: `00` SIB, `01` register, `11` end of map |
| [9:2] | register: length in bits. SIB: jump offset = number of words in its subtree + 1, i.e. the address of the next node on the same level |

A node's address is its word number. The example network (`fmi_network`) is

```
si -> SIB1[ R1 ] -> SIB2[ SIB3[ R2 ] -> SIB4[ R3 ] ] -> so
```

| word | node | field |
|------|------|-------|
| 0 | SIB2 | offset 5 |
| 1 | SIB4 | offset 2 |
| 2 | R3   | 32 bits |
| 3 | SIB3 | offset 2 |
| 4 | R2   | 16 bits |
| 5 | SIB1 | offset 2 |
| 6 | R1   | 32 bits |
| 7 | end  |  |

So R1, R2 and R3 are instrument addresses 6, 4 and 2. The status RAM
(`im_ram`) keeps S, X, C, F for every word; the manager reads the S bits of
all words in parallel to know the present configuration.

### 1.3 How one access is performed (the hardest part)

Each capture-shift-update sequence (CSU) is a walk through the ROM starting at
word 0. Because word 0 is the node nearest `so`, the manager can start driving
`si` immediately: the bits for the last node go in first.

* **SIB, currently closed or open:** 4 shift cycles. Out of `so` come its
  captured F and C (stored in the RAM); into `si` go F=0, C=0, the new X and
  the new S. If the SIB is open *in this CSU*, the walk continues at the next
  word (its child segment is in the chain); if closed, it jumps by the offset.
* **Register:** `length` shift cycles, least significant bit first. The write
  target receives `IM_DATA`; other registers receive zeros. The read target's
  output bits are collected into `IM_DATA`.
* **End word:** the walk stops, `update` is pulsed.

The new S of each SIB is decided as the walk passes it:

| mode | new S |
|------|-------|
| access (read/write/open) | 1 if the target address lies strictly between the SIB's address and address + offset, else 0 |
| localization | 1 if the SIB's captured flags are F=1, C=0 and it is not masked |
| close-all | 1 only while some SIB in its subtree is still open (deepest first) |

A target that is hidden needs several CSUs, one per hierarchy level. The cost
of one CSU is exactly

```
1 (capture) + nodes visited + bits shifted + 1 (end word) + 1 (update)  cycles
```

Example: reading R2 from reset takes three CSUs, 13 + 23 + 40 = 76 cycles.
After each update the manager decides: done (the target was visited), another
CSU, abort (an uncorrected fault appeared before the target was reached), or
error (after `MAX_CSU` = 16 CSUs, or nothing left to open).

### 1.4 Fault reaction

* `irq_hi` rises when the top flags show an uncorrected fault.
* `irq_lo` rises on a corrected fault and when a command finishes.
* Both stay high until software writes the matching ACK bit.
* While idle with an uncorrected fault pending, the manager *localizes* it:
  CSUs in which each flagged, unmasked SIB is opened, until a CSU opens
  nothing new. It reports the first register under the deepest flagged SIB
  in `LOC_ADDR` with `LOC_VALID`. It does not start again until `ACK_HI`.
* A fault that appears during an access aborts it at the end of the current
  CSU (`ABORTED`), and localization starts from the configuration reached.
* `SET_X` sets a SIB's mask bit, which removes its subtree from the flag
  network.

### 1.5 Software interface

Two 32-bit registers: `bus_addr = 0` is `IM_CMD`, `1` is `IM_DATA`.
Writes take effect on the clock edge; reads are combinational.

| IM_CMD write bits | meaning |
|---|---|
| [7:0] | instrument address IA |
| [10:8] | op: 0 NOP, 1 READ, 2 WRITE, 3 OPEN, 4 SET_X (IM_DATA[0] is the new X of the SIB at IA), 5 CLOSE_ALL |
| 11 | CLOSE_AFTER: close every SIB after the access |
| 12 | START (ignored while a command is pending or running) |
| 13, 14 | ACK_HI, ACK_LO |

| IM_CMD read bits | meaning |
|---|---|
| 16 | BUSY |
| 17, 18, 19 | DONE, ABORTED, ERROR of the last command |
| 20 | LOC_VALID |
| 21, 22 | top-level F and C |
| 23 | localization running |
| [31:24] | LOC_ADDR |

`IM_DATA` is written by software only while the manager is idle. Registers
longer than 32 bits exchange only their low 32 bits.

---

## 2. Wrapped core and logic BIST

### 2.1 Wrapper cells

Three cell styles are provided:

* `dedicated_wrapper_cell`: its own flip-flop. A multiplexer chooses between
  the functional input and the flip-flop (`capture_en`). A safe multiplexer can
  force `cfo` to `safe_value`.
* `shared_wrapper_cell`: reuses a functional flip-flop. The flip-flop loads
  `cfi` when `capture_en = 0`, otherwise it shifts (`shift_en = 1`) or holds.
* `opt_wrapper_cell`: just a scan flip-flop (`D = cfi`, `SI = cti`,
  `SE = shift_en`). It has no hold mode, so no `capture_en`. With `SAFE = 1`,
  `safe_ctrl` forces `cfo` to 1.

### 2.2 Core wrapper

`core_wrapper` places `N_IN` optimized cells between the surrounding logic and
the core (input chain) and `N_OUT` cells between the core and the surrounding
logic (output chain). The defaults are 645 and 4,596 cells, one chain per
side. All cells are plain scan flip-flops, so the modes come only from the
scan enables:

| mode | input chain `se_i` | output chain `se_o` | effect |
|---|---|---|---|
| functional (`test_en=0`) | `scan_en` | `scan_en` | cells are ordinary pipeline flops |
| INTEST (`extest_en=0`) | 1 | `scan_en` | core fed only from the input chain; output chain captures core responses; `safe_en` forces all outputs to 1 |
| EXTEST (`extest_en=1`) | `scan_en` | 1 | output chain drives the surrounding logic; input chain captures it |

### 2.3 Logic BIST

`lbist` holds a 32-bit pattern generator (a Galois LFSR with polynomial
x^32 + x^22 + x^2 + x + 1), a MISR with the same polynomial, and a controller.
The settings are seed, number of patterns, shift length and golden signature.
A run takes `shift_len` load cycles. Then, for each pattern, it takes one
capture cycle and `shift_len` unload/load cycles. In total that is
`(n + 1) * shift_len + n` cycles. `pass` is `signature == golden`. In
`bastion_top` the BIST takes over the wrapper while busy. It forces INTEST
with safe outputs, feeds PRPG bits 0 and 1 into the input and output chains,
and compacts both chain outputs.

---

## 3. Structural test of IJTAG networks

* `sib`: standard SIB, one shift cell S and one update cell U. When U = 1,
  the child segment is inserted in front of S.
* `scan_mux_ctrl`: an N-input ScanMux followed by its shift/update control
  register. It has clog2(N) cells, so 2 cells for the default N = 4. Only the
  selected segment gets the control signals.
* Example networks. TAP-side enables are ports; there is no TAP controller.

| module | structure | longest path |
|---|---|---|
| `net_fig28a` (#1) | SIB1[TDR1 3b] → SIB2[TDR2 4b] | 9 |
| `net_fig28b` (#2) | SIB1[TDR1, SIB2[TDR2]] → SIB3[TDR3], lengths 3/4/5 | 15 |
| `net_fig30` (#3) | TDR1 ∥ TDR2 → ScanMux → S, lengths 3/4 | 5 |
| `net_fig26` | SIB1[TDR1, SIB2[TDR2 → TDR3∣TDR4 → ScanMux → S]] → SIB3[TDR5], lengths 4..8 | 28 |

**A test session** first configures a path, then checks its length.
`session_tester` does the second half in hardware. It drives `shift_en`/`tdi`
for `L` cycles of 0, where `L` is the longest path of the network, so even a
wrongly configured path ends up all zero. Then it drives `l + 2` cycles of
alternating 1, 0, 1, …. While it does, `tdo` must read 0 for `l` cycles, then
1, then 0. The test phase lasts `L + l + 2` cycles. For network #1 with SIB1
open that is `9 + 5 + 2 = 16`. A stuck or mis-steered SIB or ScanMux changes
the path length, so the first 1 shows up at the wrong time.

**Access cost in a multiplexed network.** `net_fig34` has six instrument registers
I0..I5 (lengths 20/50/100/20/20/5 by default; I0 is always on the path) and
four control registers. The source calls it a network of five instruments
but lists and draws six. A 4-input ScanMux feeds the 2-bit register C0,
then I0, then `tdo`. C0 chooses one of four branches:

| C0 | branch (from `tdi`) |
|---|---|
| 00 | C3 |
| 01 | I2 (or bypass if C2 = 1) → I3 (or bypass if C3 = 1) → I4 |
| 10 | I1 (or bypass if C1 = 1) → C2 → I5 |
| 11 | C1 |

One access costs 1 capture + path bits + 1 update cycle. Starting from all
control bits 0, reaching I4 by just setting C0 = 01 costs 25 + 164 = 189
cycles. Setting C3 = 1 in the same first access (I3 off the path) costs 169.
Spending extra accesses to bypass I2 (via branch 10 and C2) gives 149, and
also bypassing I1 first (via branch 11 and C1) gives 124 over four accesses.
More scan operations can therefore mean a shorter total time, but not
always: with I0 = 50 every extra access also pays for I0, and the same four
sequences cost 249, 229, 239 and 244, so two accesses win. With I2 = 70 they
cost 159, 139, 149 and 124: three accesses are worse than two, four are best.
The lengths are parameters, and the testbench measures all twelve totals.

**A network as a state machine.** `net_fig37` has three one-bit controllers
and four 20-bit instruments; C2C1C0 is its state:

| C0 | C1 | C2 | active path from `tdo` | bits |
|---|---|---|---|---|
| 0 | x | x | I1, C0, C1, I2 | 42 |
| 1 | 0 | x | I1, C0 | 21 |
| 1 | 1 | 0 | I1, C0, C2, I3 | 42 |
| 1 | 1 | 1 | I1, C0, C2, I4 | 42 |

One access can change only the controllers on the current path, so some
states take several accesses to reach (101 to 000 takes four). Its
testbench finds every one-access transition by driving the hardware, then
searches for the cheapest way between each pair of states. Among equally
cheap ways it takes the one with the fewest accesses. The access counts
must match a known 8 × 8 table. The largest is 4. So a retargeting tool
never needs to plan more than four accesses ahead to find the fastest way
between two configurations of this network.

---

## 4. Where this design departs from, or adds to, its source description

* **SIB flag bits.** The description offers two variants: four scan bits
  (S, X, C, F), or two shared bits (F/S, C/X). The access procedure and
  timing it gives count four bits, so four are built.
* **ROM offset.** It is the subtree word count + 1, as in the map example, and
  not the plain word count.
* **No TAP in the manager's path.** The manager drives capture/shift/update
  directly, one bit per clock. The per-CSU TAP state overhead (6 TCK in the
  source's timing estimates) is absent, so its access and localization times
  are shorter than the source's TCK counts.
* **Manager FSM.** The source describes a 15-state FSM. This one has 10 states
  (idle, capture, node fetch, four SIB bits, register write/read, update) and
  does the same walk.
* **Own choices in the manager:** the `IM_CMD` layout, aborting only at a CSU
  boundary, the CSU limit, and localization opening a flagged SIB in the same
  CSU that reads its flags.
* **Network reset.** Resetting the network as a cheaper alternative to
  re-scanning is not built. `CLOSE_ALL` reaches the same state by scanning.
* **Wrapper.** Only optimized cells are used inside `core_wrapper`, with one
  chain per side. The dedicated and shared cells appear in the top as single
  cells on their own ports.
* **Not built:** the test-data decompressor and compactor.
* **LBIST internals are not specified** by the source. The polynomial, widths,
  schedule and lack of masking are this design's own.
* **`session_tester`** is an addition. The source runs the test phase from
  the tester.
* **Example networks.** Only network #1 and the multi-branch network have
  given register lengths. The other lengths are chosen so that alternative
  paths differ. The multi-branch network loops each instrument's update
  value back into its capture stage; only I4 has a port.
* **Not hardware:** the session-selection heuristic and the retargeting /
  upper-bound algorithms of the source are software and are not included.
* **Reset.** Resets are asynchronous and active-low. Wrapper cells have no
  reset, like scan flip-flops.

## 5. Verification

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. Highlights:

* `tb_instrument_manager` checks the cycle count of each access against the
  CSU formula above. It also checks masking, localization, abort,
  interrupts, close-after and two simultaneous faults.
* `tb_net_*` reach every configuration and check the data in every CSU. They
  measure each path with the session procedure. `tb_net_fig34` checks the
  cycle totals of the three length sets, plus random accesses against a
  model. `tb_net_fig37` rebuilds the state machine of its network and
  checks the pairwise access counts.
* `tb_bastion_top` runs the whole top at its default sizes (645/4,596 wrapper
  cells). It counts every mechanism and fails if one never occurred. It takes
  about 30 s of simulation.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/ijtag_pkg.sv tb/tb_bastion_top.sv \
  --top-module tb_bastion_top -o sim && ./obj_dir/sim
```

Lint warnings that remain are unused package constants, and the F/C fields of
the status RAM word, which the manager writes but does not read back. That is
explained in `instrument_manager.sv`.
