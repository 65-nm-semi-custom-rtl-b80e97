# Sub-threshold standard-cell memory (4 kbit latch array)

Memories for ultra-low-voltage systems such as biomedical implants and sensor
nodes must hold data at supply voltages below the transistor threshold, leak
as little as possible in standby, and need not be fast. Compiled 6T SRAM
does not work reliably there. The alternative built here is a
**standard-cell memory (SCM)**: an array of latches with ordinary digital
peripherals, so that it can be produced by a normal synthesis and
place-and-route flow. Three choices fit the sub-threshold regime:

* **Storage is latches, not flip-flops.** A latch array is smaller. The cost
  is a longer setup time for the write address.
* **Writing uses one clock gate per row.** A gated clock opens exactly one row
  of latches. This is smaller and uses less power than a write-enable
  multiplexer in front of every bit.
* **Reading uses 3-state buffers, not a multiplexer tree.** Every storage
  cell has a 3-state output onto a read bitline shared by its column. The
  read decoder switches on one row's buffers. This leaks less than a mux
  tree. The buffer is part of the storage cell, which makes it a single
  custom cell. That cell is the only non-library cell in the memory.

This RTL describes that memory at the logic level (128 words × 32 bits =
4096 bits). It wraps the memory in the scan-chain test interface of a test
chip. Transistor-level properties cannot be expressed in RTL: leakage, noise
margin, minimum supply and device sizing are not modelled.

## Hierarchy

```
scm_testchip                 top: scan interface + memory
├── scm_scan_if              scan chain holding one access; exec / capture control
└── scm_macro                the 4 kbit memory, 1 write port + 1 read port
    ├── scm_write_logic      write address decoder
    │   └── clock_gate ×128  one latch-based clock gate per row
    ├── scm_read_logic       read address decoder → 3-state enables per row
    └── scm_latch_array      128 × 32 storage cells, per-column read bitlines
        └── lowleak_latch ×4096   D-latch with built-in 3-state read output
scm_pkg                      default sizes (WORDS = 128, WIDTH = 32)
```

## Write path: clock gates and clock phases

This is the least obvious part of the design. The latches are
level-sensitive, so the write data must stay stable for the whole time a
row is transparent. The row must then close before that data changes.

1. On the rising edge of `clk`, `scm_macro` registers `we`, `waddr` and
   `wdata` in flip-flops.
2. `scm_write_logic` decodes the registered address one-hot. The decoded
   enable goes to the row's `clock_gate`.
3. Each `clock_gate` has an enable latch that is transparent while `clk` is
   high. The decoder output may settle, and even glitch, during the high
   phase without effect. The gate's output is `gclk = ~clk & en_latched`.
4. So the addressed row gets one high pulse during the **low phase** of the
   cycle. Its 32 latches are transparent during that pulse and copy
   `wdata_q`.
5. The pulse ends exactly at the next rising edge. At that moment the
   latches close, just as the data register may change. Because the closing
   edge and the register's launch edge are the same clock edge, the hold
   margin is the register's clock-to-output delay. In silicon this is why
   the write path of a latch array needs careful timing.

```
clk        ‾‾‾‾\____/‾‾‾‾\____/‾‾‾‾\____/‾‾‾
request    ====A======X====B=====X======
wdata_q    =========X====A====X====B=====
gclk[A]                  /‾‾‾‾\
gclk[B]                            /‾‾‾‾\
```

A write presented before edge k is stored by edge k+1. With `we` low no
row pulses. Addresses outside `0..WORDS-1` write nothing.

## Read path: 3-state bitlines

`scm_read_logic` decodes the registered read address into one enable per
row (`rd_en`, one-hot, or all zero when `re` is low). An assertion checks
the one-hot property. The enabled row's cells put their bits on the column
read bitlines (`rbl`), and those bitlines are the memory's `rdata` output.
No clock is involved after the address register.

**How the 3-state bus is modelled.** Each cell output `rbl_drv` is
`rd_en & q`: a cell that is switched off drives 0. A column bitline is the
OR of all its cells. At most one row is ever enabled, so the OR equals the
value of the single active 3-state driver. With no row enabled the bitline
reads 0. In silicon that bitline would float or be held by a keeper. This
keeps the design two-valued, synthesizable and free of multi-driver nets.
To get real `tri` nets back, replace the OR in `scm_latch_array` and the
AND in `lowleak_latch`.

**Read timing.** A read presented before edge k is valid after edge k and
is sampled at edge k+1: one cycle of latency. If one request reads and
writes the same address, the value sampled at edge k+1 is the **new** word.
The row is transparent in the low phase, so the new data reaches the
bitline before the edge (write-through). Early in the high phase the old
word is still visible.

**Segmented bitlines (`RBL_SEGMENTS`).** A long bitline with many 3-state
drivers is slow at low voltage. The proposed improvement splits each
bitline into segments of fewer cells and joins them with a static CMOS
multiplexer. `scm_latch_array` supports this through `RBL_SEGMENTS`, which
must divide `WORDS`. Each segment of `WORDS/RBL_SEGMENTS` rows has its own
OR-resolved bitline. An AND-OR multiplexer then selects the segment that
holds the enabled row. Its select signals come from the row enables, not
from address bits. The logic function and the cycle timing do not change.
The default of 1 is the unsegmented test-chip memory.

## The storage cell

`lowleak_latch` is a static D-latch that is transparent while its row clock
is high, plus the read output described above. The real cell is built for
minimum leakage: few supply-to-ground paths, at most two transistors
stacked, and channels stretched to 1.5 times the minimum length. These
measures have no logic meaning. The cell has no reset: memory contents are
undefined after power-up.

## Scan test interface

On the test chip the memory is reached only through a scan chain
(`scm_scan_if`). The chain is `SCAN_LEN = 2·ADDR_W + WIDTH + 2` bits, 48 by
default, and holds one access:

| bits (default) | field   | meaning                                        |
|----------------|---------|------------------------------------------------|
| 47             | `we`    | write this access                              |
| 46:40          | `waddr` | write address                                  |
| 39:8           | `data`  | write data in; read data out                   |
| 7              | `re`    | read this access                               |
| 6:0            | `raddr` | read address                                   |

Protocol (all inputs sampled at the rising edge of `clk`):

1. **Shift.** While `scan_en` is high the chain moves one place towards
   bit 0 per cycle. `scan_in` enters at bit 47 and `scan_out` is bit 0. A
   vector is therefore shifted in LSB first, and the previous contents come
   out LSB first at the same time.
2. **Exec.** Hold `scan_en` low and pulse `exec` for one cycle. In that
   cycle the memory sees `we`/`re` from the chain, so the access is issued
   exactly once.
3. **Capture.** In the next cycle `busy` is high. At its end the data field
   is loaded with the memory's read data, but only if `re` was set.
   Otherwise the chain keeps what was shifted in. `exec` and `scan_en` are
   ignored while `busy` is high, and `exec` is also ignored while shifting.
4. Shift the result out, overlapped with shifting in the next vector.

One access costs `SCAN_LEN + 3` cycles (51 by default) when shifts overlap.
The end-to-end testbench checks this count.

## Parameters

| parameter      | default | where                          | note |
|----------------|---------|--------------------------------|------|
| `WORDS`        | 128     | all                            | 4 kbit total is fixed by the design; the 128 × 32 split is a choice |
| `WIDTH`        | 32      | all                            | word width |
| `ADDR_W`       | 7       | derived, `$clog2(WORDS)`       | |
| `RBL_SEGMENTS` | 1       | `scm_testchip`, `scm_macro`, `scm_latch_array` | read-bitline segments; must divide `WORDS` |
| `SCAN_LEN`     | 48      | derived in `scm_scan_if`       | |

Reset (`rst_n`, active low, asynchronous) clears the request registers and
the scan chain. It does not clear the array.

## Architecture versus implementation choices

Taken from the architecture: latch storage, clock-gated rows for writing,
3-state read buffers inside the storage cell, 4 kbit capacity, a scan-chain
test interface, checkerboard and random write/read tests, and segmented
bitlines as an option.

Implementation choices of this RTL: the 128 × 32 organisation;
separate write and read ports; the rising-edge request registers and the
low-phase write pulse; one-cycle read latency and write-through on
same-address accesses; an undriven bitline reading 0; the scan-chain
layout and exec/capture protocol; the segment mux selected by row enables.

Not modelled: anything electrical. This covers the sub-threshold supply
range, leakage, retention voltage, noise margins, access energy, and the
column-wise read failures seen at low supply. There is also no on-chip
pattern generator: the test patterns come from the testbench.

## Latches

`lowleak_latch` and `clock_gate` contain latches (`always_latch`). Synthesis
reports 4096 + 128 latch bits for the full memory. They are intentional: the
latches are the storage and the glitch-free clock gates. Static timing
analysis of this design must treat `gclk` as a generated clock.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_lowleak_latch`   | transparency, hold, 3-state release |
| `tb_clock_gate`      | pulse only in the low phase, no glitch from late enable changes |
| `tb_scm_write_logic` | every row pulses only on its own address, nothing when `we` is low |
| `tb_scm_read_logic`  | exhaustive decode, one-hot |
| `tb_scm_latch_array` | random writes and reads against a reference, single and 4-segment bitlines |
| `tb_scm_macro`       | full size: checkerboard and inverse, 3000 random accesses, same-address write-through, `re` low reads 0, one-cycle latency; an 8-segment copy runs alongside |
| `tb_scm_scan_if`     | field mapping, one-cycle exec, conditional capture, ignored exec, shift-out |
| `tb_scm_testchip`    | full size, end to end through the scan chain: checkerboard, inverse checkerboard, 600 random accesses; counts writes, reads, write-through, read-disabled accesses and ignored execs (each must occur) and checks the total cycle count |

With Verilator 5, for example:

```
verilator --binary --timing -Irtl rtl/scm_pkg.sv tb/tb_scm_testchip.sv \
    -y rtl +libext+.sv --top-module tb_scm_testchip
./obj_dir/Vtb_scm_testchip
```

The full-size end-to-end run takes a few seconds. The simulator is
two-state. The testbenches write every word before reading it, because
unwritten latches start at arbitrary values.
