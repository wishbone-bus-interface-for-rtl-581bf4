# NISC WISHBONE coprocessor interface

A No-Instruction-Set Computer (NISC) core is a custom datapath driven directly by
compiler-generated control words. It can run a C function much faster than a
general-purpose CPU because it can do several RISC-equivalent operations per
cycle. But a generated core has no bus port. It has a reset input, a halt
output, a few external input and output ports, and a private data memory.

This RTL wraps such a core so that a host processor can use it as a
memory-mapped, loosely coupled coprocessor on a 32-bit WISHBONE bus. The core
itself needs no changes. Two ideas carry the design:

* **Reset and halt are the whole control protocol.** The host holds the core in
  reset while it loads inputs, starts it by releasing reset, and learns that it
  has finished when the core raises halt. It learns this by polling or through
  an interrupt.
* **Ownership of the data memory follows the same two signals.** While the core
  is in reset or halted, the host owns the core's data memory and can read or
  write it over the bus. While the core runs, the core owns it.

## Blocks

| module | role |
|---|---|
| `nisc_wb_pkg` | shared types: data-memory request struct, access-type codes, SEL decoding |
| `nisc_wb_basic` | WISHBONE slave: control register, interrupt enable, result and argument registers, INT_O |
| `nisc_wb_dmem` | WISHBONE slave: maps the core's data memory into the host's address space |
| `nisc_dmem_mux` | arbitrates the data-memory controller between the core and the bus |
| `nisc_wb_coprocessor` | top: the three above, wired together |

Both slaves support WISHBONE classic SINGLE READ/WRITE cycles with 32-bit data and
32-bit granularity. Everything runs on one clock (`clk_i`), which the core shares.

```
            s1 (wb_*) ──► nisc_wb_basic ──► nisc_reset_o, nisc_ext_in_o[]
                              ▲  ▲
          int_o ◄─────────────┘  └──── nisc_halt_i, nisc_ext_out_i[]
            s2 (mem_*) ─► nisc_wb_dmem ──► nisc_dmem_mux ──► mc_* (memory controller)
                                               ▲   │
                        nisc_mem_req/wdata_i ──┘   └──► nisc_mem_rdata_o
```

The core (controller, datapath and control memory) is generated by the NISC
tool flow, and so is its data-memory controller with its block RAM. Neither is
part of this RTL: their signals are ports of `nisc_wb_coprocessor`.

## Using it from host software

One coprocessor call:

1. Write 1 to `CTRL`. The core is held in reset, and the host now owns the
   argument registers and the data memory.
2. Write scalar arguments to the `ARG` registers. Write arrays and structs into
   the data memory through the s2 port.
3. Write 0 to `CTRL`. The core starts from the beginning of its program.
4. Poll `CTRL` until bit 0 (HALT) is 1. Alternatively, set `INT_EN` beforehand
   and wait for `int_o`.
5. Read the return value from `RESULT` and any by-reference results from the
   data memory.

### Register map of the basic slave (s1)

Byte offsets, one 32-bit register per word. The values shown are for the defaults
`N_RESULTS = 1` and `N_ARGS = 2`.

| offset | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | write | bit 0 = RESET: 1 stops the core, 0 starts it |
| 0x00 | CTRL | read | bit 0 = HALT, the halt output of the core, registered |
| 0x04 | INT_EN | read/write | bit 0: 1 enables `int_o` |
| 0x08 | RESULT | read | the core's external output port |
| 0x0C | ARG1 | read/write | drives the core's external input port 1 |
| 0x10 | ARG2 | read/write | drives the core's external input port 2 |

With more results, `RESULT1..N` come first, from 0x08 on, and the arguments
follow them. Unused addresses read as zero. The result registers are
registers inside the generated core (its output ports), so the slave only
routes them to its read multiplexer, and writes to them are ignored. The
argument registers are in the slave, because a NISC input port is only a
wire into the datapath.

## Timing and handshakes

**Basic slave.** `ACK_O = CYC_I & STB_I`: every access completes in the cycle it
is presented, and a write takes effect at the edge that ends it. The core's halt
is sampled into a register, so `CTRL` reads and `int_o` see it one cycle late.

**Data-memory slave.** The data memory is a synchronous RAM with one cycle of read
latency, so the slave adds exactly one wait state.
1. First cycle: the request goes to the memory controller. The write enable is
   raised in this cycle only.
2. Second cycle: the read data is back, and `ACK_O` is high.

A delay register samples `CYC_I & STB_I`, and `ACK_O` is `CYC_I & STB_I & delay`.
The register is cleared in the ACK cycle. A master that keeps `STB_I` high for
back-to-back accesses therefore still gets one wait state on each access, and
never gets stale data.

**Interrupt.** `int_o = INT_EN & HALT & ~RESET`. It rises one cycle after the core
halts, if interrupts are enabled. It falls when the host writes 1 to `CTRL`
(which every call does first) or clears `INT_EN`. Writing 0 to `CTRL` while the
core is already halted and `CTRL` is already 0 does not restart the core, and it
leaves `int_o` high. To run the core again, write 1 and then 0.

**Reset.** `rst_i` resets the core as well (`nisc_reset_o = rst_i | RESET`). It
sets RESET to 1, so the core stays stopped until the host starts it. It clears
`INT_EN` and the arguments.

## The data-memory path

The hard part of the data-memory slave is the mismatch between the two sides:

* WISHBONE addresses 32-bit words and marks the active bytes with `SEL_I`. Each
  byte stays on its own lane of the data bus.
* The NISC memory controller takes a byte address that need not be aligned and
  a type code (byte, half-word, word). Sub-word data is carried in the low bits.

`nisc_wb_dmem` translates between the two:

| `SEL_I` | type | address low bits | write data sent | read data returned |
|---|---|---|---|---|
| `1111` | WORD (2) | 00 | `DAT_I` | controller data |
| `0011` / `1100` | HALF (1) | 00 / 10 | lane moved to bits 15:0 | bits 15:0 moved back to the lane |
| `0001` `0010` `0100` `1000` | BYTE (0) | 00 / 01 / 10 / 11 | lane moved to bits 7:0 | bits 7:0 moved back to the lane |

In every case, the upper address bits come straight from `ADR_I` (16 bits:
a 64 KiB window), and read-data lanes that were not selected are zero. Lane 0
(`DAT[7:0]`) is the lowest byte address: the lane order is little-endian. Any
other `SEL_I` pattern is handled as a word access.

The write and read enables come from `WE_I` and `~WE_I`. Both are also gated
with `CYC_I & STB_I`, so traffic to other slaves never reaches the memory.

`nisc_dmem_mux` is purely combinational:

| core state | who drives the memory controller | host reads via s2 | host writes via s2 |
|---|---|---|---|
| reset or halted | host (s2) | memory data | performed |
| running | core | zero | lost |

The core's read data is always wired straight from the controller. The
selection uses the current state, so avoid reading s2 in the cycle the core
halts: that read returns zero. Polling HALT first avoids this.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N_ARGS` | 2 | `nisc_wb_basic`, top | argument registers / core input ports |
| `N_RESULTS` | 1 | `nisc_wb_basic`, top | result registers / core output ports |
| `ADDR_W` | 5 | `nisc_wb_basic`, top | byte-address bits of s1; must cover `4*(2+N_RESULTS+N_ARGS)` bytes |
| `DMEM_AW` | 16 | `nisc_wb_pkg` | byte-address bits of the data memory |
| `DATA_W` | 32 | `nisc_wb_pkg` | bus width (fixed) |

`DMEM_AW` is a package constant because the request struct shared by the
multiplexer's three ports depends on it.

## Where this implementation makes its own choices

The original interface description fixes the structure: the registers, the
two slaves, the multiplexer and the ownership rule. It leaves these details open:

* The numeric type codes and little-endian lane order of the data-memory path.
* The reset value 1 of RESET.
* Which input of the INT_O gate is inverted. It is taken to be RESET. The
  original register description calls writing 0 to CTRL the interrupt
  acknowledge. Here, writing 0 clears the interrupt only as part of a
  1-then-0 restart sequence.
* Gating the data-memory enables with the strobe, and the ACK-cycle clear of the
  delay register. The original draws `WE_I` straight to the enables and
  `CYC_I & STB_I` straight into the delay register.
* The width of the s1 address field.
* `SEL_I` on the basic slave is ignored.

## Verification

The testbenches in `tb/` are self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `nisc_wb_basic_tb` | register map, zero-wait ACK, reset values, registered halt, INT_O masking by INT_EN and RESET, 400 random accesses against a reference model |
| `nisc_wb_basic_param_tb` | the same slave at three arguments and two results: the register map shifts, and every port lands at its own address |
| `nisc_wb_dmem_tb` | request address/type/data for every SEL pattern, lane placement of read data, ACK in exactly the second cycle (also back-to-back), 1500 random accesses against a byte-array reference |
| `nisc_dmem_mux_tb` | ownership rule over 2000 random inputs, and lost and landing writes with a memory behind it |
| `nisc_wb_coprocessor_tb` | the top at its default parameters: four complete coprocessor calls (arrays of 4 to 200 words), by polling and by interrupt |

The end-to-end testbench checks the results and the run time of the core
(3 cycles per element + 2). It also counts each mechanism and fails if any
never happens:
* the core held in reset;
* argument writes;
* host reads and writes of the data memory, including byte and half-word accesses;
* a host read returning zero and a host write lost while the core runs;
* completion seen by polling, and by interrupt;
* the interrupt cleared.

Two behavioural models in `tb/` stand in for the parts this RTL does not
contain:
* `nisc_core_model` is a "core" that sums an array, doubles it in place and
  returns the sum.
* `nisc_dmem_model` is a byte-addressed memory controller with one cycle of
  read latency.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/nisc_wb_pkg.sv rtl/nisc_wb_basic.sv rtl/nisc_wb_dmem.sv rtl/nisc_dmem_mux.sv \
    rtl/nisc_wb_coprocessor.sv tb/nisc_dmem_model.sv tb/nisc_core_model.sv \
    tb/nisc_wb_coprocessor_tb.sv --top-module nisc_wb_coprocessor_tb
./obj_dir/Vnisc_wb_coprocessor_tb
```

For the unit testbenches, give the package, the module under test, the
testbench and (for `nisc_wb_dmem_tb` and `nisc_dmem_mux_tb`) `tb/nisc_dmem_model.sv`.
All testbenches finish in well under a second.

Not covered: the real generated NISC core and memory controller, whose exact
protocol encoding will differ from the model's; WISHBONE interconnect decoding
in front of the two slaves; block and read-modify-write cycles, which the
slaves do not support.
