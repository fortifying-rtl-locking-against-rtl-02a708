# RTL locking fortified with functional mode isolation

Logic locking hides part of a design's meaning behind a secret key. Without the
key the chip computes wrong results, so a foundry that reverse-engineers the
layout learns neither the design's constants nor its exact behaviour. Locking
done at the behavioural RTL level, before synthesis, leaves no structural
traces for netlist-analysis attacks. It does not stop an attacker who holds a
working, unlocked chip (an *oracle*). Through the scan chains that attacker can
set the internal state, run one clock with the real key, read the state back,
and recover the key with SAT-style or model-checking queries.

This design closes that gap. It combines two independent layers:

* **Behavioural semantics obfuscation (BSO).** The confidential constant, one
  arithmetic operation and one branch condition of the protected logic are
  rewritten so that they depend on key bits.
* **Functional mode isolation (FMI).** The key does not go straight from the
  tamper-proof memory (TPM) into the logic. It passes through a *key
  register* whose cells are ordinary members of the scan chains. A small state
  machine loads the secret key only right after a chip reset with scan idle.
  The moment it sees scan-enable activity, it wipes the key register and locks
  the chip in test mode until the next chip reset. Scan stays fully usable for
  manufacturing test, but never together with the secret key.

The RTL is written in SystemVerilog (IEEE 1800-2017), is synthesizable, and
has a self-checking testbench for every module.

## Block overview

```
             tpm_key (from the tamper-proof memory, outside this RTL)
                 |
   se ---> fmi_controller --key_clear/key_load/key_scan_en--> key_register
                                                                 | key
   a, b ----------------------------------------------------> locked_design ---> c1, c2, c3
                                                                 |  (scan cells)
   scan_in -> scan_decompressor -> 3 chains through design + key cells -> scan_compactor -> scan_out
```

| File | Role |
|------|------|
| `rtl/fortified_top.sv` | Top: wiring, chain stitching and key-cell placement |
| `rtl/fmi_pkg.sv` | FMI state type |
| `rtl/fmi_controller.sv` | FMI state machine |
| `rtl/key_register.sv` | Key scan cells with clear, TPM load, scan shift and masked scan outputs |
| `rtl/locked_design.sv` | Protected example datapath with scan flip-flops |
| `rtl/bso_const_lock.sv` | Constant obfuscation, `out = in + k_c` |
| `rtl/bso_op_lock.sv` | Operation obfuscation, `out = k_o ? a - b : a + b` |
| `rtl/bso_branch_lock.sv` | Branch obfuscation, `cond = (a <= b) ^ k_b` |
| `rtl/scan_decompressor.sv` | XOR scan-in spreader |
| `rtl/scan_compactor.sv` | XOR scan-out compactor |

## The locked datapath

`locked_design` registers the primary inputs `a` and `b`. It computes three
results from the registered values and registers them onto the outputs:

| Output | RTL as written | With the correct key | Key bits |
|--------|----------------|----------------------|----------|
| `c1` | `a + k_c` | `a + 8'b11101001` | `k_c`, 8 bits, the constant itself |
| `c2` | `k_o ? (a - b) : (a + b)` | `a + b` (`k_o = 0`) | `k_o`, 1 bit |
| `c3` | `(a <= b) ^ k_b` | `a > b` (`k_b = 1`) | `k_b`, 1 bit |

The key is `{k_b, k_o, k_c}`, `DATA_W + 2` = 10 bits. The correct value is
`10'b1_0_11101001`. The constant `8'b11101001` never appears in the RTL: it
exists only in the key. For the operation and the branch, the netlist contains
both alternatives, and only the key says which one is meant. Any change to
`k_c` changes `c1` for every input. A wrong `k_o` turns every sum into a
difference, which differs whenever `b != 0`. A wrong `k_b` inverts `c3` for
every input.

**Timing.** `a` and `b` are sampled at a rising edge, and `c1`..`c3` show the
result after the next rising edge. The locking adds no cycle, so the latency
equals that of the same datapath without locking. Every flip-flop is a mux-D
scan cell. With `se` high it loads its scan input instead of its functional
value. All flip-flops reset asynchronously to 0 on `chip_rst`.

The width is a parameter (`DATA_W`, default 8). The correct `k_c` then has
`DATA_W` bits, and the key has `DATA_W + 2` bits.

## Functional mode isolation

`fmi_controller` is a four-state machine. State `FMI_RESET` is where it sits
while `chip_rst` is high.

| State | Meaning | Key register at the next edge | Next state |
|-------|---------|-------------------------------|------------|
| `FMI_RESET` | chip reset held or just released | `se=0`: load from TPM; `se=1`: scan shift | `se ? FMI_TEST : FMI_FUNC` |
| `FMI_FUNC` | functional mode, secret key in use | `se=0`: hold; `se=1`: **clear** | `se ? FMI_CLEAR : FMI_FUNC` |
| `FMI_CLEAR` | key being wiped | clear | `se ? FMI_TEST : FMI_CLEAR` |
| `FMI_TEST` | test mode, key only from scan | `se=1`: scan shift; `se=0`: hold | `FMI_TEST` |

The only way back to `FMI_FUNC` is another `chip_rst`.

### The edge on which scan starts

This is the subtle part of the design. Suppose `se` rises during functional
mode. The first rising edge that sees `se` high is also the first shift edge
for every design flip-flop in the chains. Clearing the key register on that
edge is not enough by itself. On the same edge, the flip-flop that follows a
key cell in its chain would capture the secret key bit, and the next shifts
would carry it out to the scan pins.

Two measures close this:

1. `key_clear` is combinational. It is high in the `FMI_FUNC` cycle in which
   `se` is first high, so the key register is already zero after that edge.
2. The key cells' scan outputs are masked. `key_register` drives
   `scan_so = scan_en ? key : 0`, and `key_scan_en` is high only in
   `FMI_RESET` and `FMI_TEST`. In functional mode the chains see zeros where
   the key cells sit, so the shift edge moves nothing secret. The key itself
   still drives the locked logic directly.

The end-to-end testbench checks this directly. It runs the attack with two
secret keys that differ in one key bit that no design flip-flop reflects. The
scan-out streams must be identical. Without the mask they differ.

### Test and debug

Structural test does not need the correct key. After `chip_rst` is released
with `se` high, the chip starts in test mode. The key register holds its
cleared value and can be given any value by scan shifting.

A trusted user who knows the key can shift the correct key into the key
register and run the logic correctly in test mode. The key cells are placed so
that this is always possible (see below).

## Scan structure

Two scan-in pins feed three internal chains, and the three chains fold onto
two scan-out pins. Both networks are combinational XOR codes. Chain `i` is
tied to the pins whose bits are set in `i + 1`:

* decompressor: `chain0 = si0`, `chain1 = si1`, `chain2 = si0 ^ si1`
* compactor: `so0 = chain0 ^ chain2`, `so1 = chain1 ^ chain2`

Each chain has a distinct non-zero code. An error in any single chain
therefore always reaches the scan-out pins. The number of chains may be at
most `2**pins - 1`.

**Chain stitching.** The 33 design cells and the 10 key cells occupy 43
*slots*. Slot `j` is in chain `j % 3`, at position `j / 3`. Position 0 is fed
by the decompressor, and the last position feeds the compactor. With the
defaults the chains hold 15, 14 and 14 cells.

**Key-cell placement.** Only chains 0 and 1 are driven by a single pin.
Chain 2 always receives the XOR of chains 0 and 1 at the same shift step, so
its cells cannot be loaded independently. The key cells therefore take the
middle rows of the single-pin chains: slots 15, 16, 18, 19, 21, 22, 24, 25,
27 and 28, in bit order. Design cells fill the remaining slots in the order
`{c3, c2, c1, b, a}`, bit 0 first.

For other sizes the rule is the same. The single-pin chains are those whose
code `i + 1` is a power of two (chains 0, 1, 3, 7, ...). The key occupies the
`ceil(KEY_W / single-pin chains)` central rows. The slot map is computed at
elaboration by constant functions in `fortified_top`.

## Top-level interface

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, all flip-flops on the rising edge |
| `chip_rst` | in | 1 | global reset, active high, asynchronous |
| `se` | in | 1 | scan enable |
| `tpm_key` | in | `DATA_W+2` | content of the tamper-proof key memory |
| `a`, `b` | in | `DATA_W` | primary inputs |
| `scan_in` | in | `N_SCAN_IN` | scan-in pins |
| `scan_out` | out | `N_SCAN_OUT` | scan-out pins, combinational from the chain tails |
| `c1`, `c2` | out | `DATA_W` | primary outputs |
| `c3` | out | 1 | primary output (branch condition) |
| `functional_mode` | out | 1 | FMI controller is in functional mode |

Parameters: `DATA_W` = 8, `N_SCAN_IN` = 2, `N_CHAINS` = 3, `N_SCAN_OUT` = 2.
`key_register` on its own defaults to 128 bits, the key size of a 128-bit
locked processor. The top sets it to `DATA_W + 2`.

## What follows the source scheme and what is this design's own

Taken from the scheme:

* The three locking rewrites, including the 8-bit example constant
  `8'b11101001`.
* The key register in the scan chains, cleared on scan activity.
* The FMI states and transitions.
* Loading the key from the TPM after reset with scan idle, or from scan-in
  after reset with scan active.
* Returning to functional mode only through a chip reset.
* Scan decompression and compression stages around the chains.

Choices made here:

* **Operand order of the operation lock.** The scheme's sources show the same
  lock written both ways. This RTL uses `k_o ? (a - b) : (a + b)`. The two
  forms are the same hardware with `k_o` inverted, and here the correct
  `k_o` is 0.
* **Flip-flops and latency.** Input and output registers, giving a two-edge
  latency.
* **Key layout and reset.** The key is `{k_b, k_o, k_c}`. Everything resets
  asynchronously to zero.
* **Clear state.** `FMI_CLEAR` waits for `se` before entering test mode.
* **Scan-output masking.** The masking of the key cells' scan outputs
  (`key_scan_en`) is added here. It is needed to make "cleared before any
  shift" hold at the flip-flop level.
* **Scan networks and placement.** The XOR codes, the pin and chain counts,
  and the key-cell placement rule.
* **Status output.** The `functional_mode` output.

Not included:

* The tamper-proof memory itself. It is a non-volatile macro, and its content
  enters as `tpm_key`.
* Any of the larger benchmark designs that the scheme was evaluated on, or the
  processor case study. The key register and FMI controller are independent
  of the protected logic and scale with `KEY_W`. Protecting another design
  means:
  1. rewriting its constants, operations and branches the same way;
  2. widening the key;
  3. putting its flip-flops into the cell vector.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. Each also has a cycle watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb_fmi_controller` | Every row of the operation table with directed steps, including the same-cycle clear and the stickiness of test mode. Then 5000 random cycles against a state-diagram model. |
| `tb_key_register` | Random command mixes at 128 bits against a priority model. Scan outputs are zero whenever `scan_en` is low. |
| `tb_bso_const_lock` | Exhaustive at 8 bits. Every one of the 255 wrong constants corrupts every output. |
| `tb_bso_op_lock`, `tb_bso_branch_lock` | Exhaustive at 8 bits. |
| `tb_scan_decompressor`, `tb_scan_compactor` | Exhaustive, at 2/3 and at 3/7 pins/chains. Expected values are written out by hand. |
| `tb_locked_design` | Original function and two-edge latency with the correct key. Then wrong keys and random scan activity against a model. |
| `tb_fortified_top` | The whole design at its default parameters, against a cycle-accurate model of outputs and scan pins, and per mechanism. |
| `tb_fortified_top_wide` | The same checks with a size-generic model: 32-bit key, 3 pins and 7 chains (153 scan cells). Set `DATA_W = 126` in it for a 128-bit key. That also passes, but Verilator needs several minutes to build it. |

`tb_fortified_top` counts each mechanism and fails if any count is zero:

* functional operation with the original results;
* the attack, where scan in functional mode gives a key-independent unload;
* test mode sticking while `se` is low;
* reset into test mode;
* debug with the correct key shifted in;
* corruption by wrong user keys;
* scan shifts.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fmi_pkg.sv tb/tb_fortified_top.sv \
          --top-module tb_fortified_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other one. `fmi_pkg.sv` must come
first, because other files import it. The SYNCASYNCNET warning that
Verilator's `-Wall` lint reports is expected. It arises because `chip_rst` is
both the asynchronous reset and the `disable iff` condition of the
controller's assertions.

## Assertions

`fortified_top` asserts that the key cells present only zeros to the scan
chains while the controller is in functional mode or clearing the key.
`fmi_controller` asserts two rules:

* At most one key-register command (clear, load, shift) is active in any
  cycle.
* Once the controller has left functional mode, it never returns there
  without a chip reset.
