# Dynamic scan routing for multicore SoC test with embedded compression

A large SoC holds many cores, and each core has its own EDT (embedded
deterministic test) decompressor on its scan inputs and its own response
compactor on its outputs. Added together, the cores need far more compressed
scan channels than the chip has test pins. Testing one core at a time wastes
the tester. Giving each core a fixed share of pins wastes it in another way:
patterns differ in how many channels they need, and some cores have many
more patterns than others.

This RTL puts a small switching network, the **dynamic scan router (DSR)**,
between the tester (ATE) channels and the cores. The test patterns of every
core are grouped into classes. All patterns in a class use the same number
of EDT input channels and observe the same outputs. Before each class is
applied, the router's address registers are rewritten, so that the same pins
serve different cores, and different numbers of channels per core, over the
course of the test. Several cores can be tested in parallel whenever their
channel needs fit into the pins.

The router is only useful if its address registers can be loaded cheaply and
at the right moment. The design therefore comes with three ways of getting
control data onto the chip:

| variant | ports | control data travel | cost of a new configuration |
|---|---|---|---|
| IJTAG | `tck tms tdi tdo trst_n`, `ij_*` | JTAG TAP, IEEE 1687 SIBs and TDRs | one JTAG scan on the slow TAP clock |
| control chain | `clk rst cc_*` | the scan channels, into dedicated control chains, selected by a flag | one extra scan vector |
| pipeline | `clk rst pl_*` | the scan channels, as a few extra bits at the end of every pattern | none extra; every pattern carries its bits |

`soc_test_top` holds the router three times, once per variant, side by side,
so all three can be compared and simulated together. A chip would use one of them.

## The router

The reference configuration has 3 ATE input channels (IC1..IC3), 5 cores
(C1..C5) and 4 ATE output channels (OC1..OC4). C1 and C3 have two EDT inputs.
C2, C4 and C5 have one each. C1, C3 and C5 have two compactor output streams;
C2 and C4 have one.

**Input side (`in_dsr`).** Each input channel goes to a 1-to-4
demultiplexer (`chan_demux`) with a 2-bit address. Outputs that are not
selected are held at 0. An EDT input that two channels can reach is driven by
a 2-input OR gate. The first EDT input of each core is the one most patterns
use, so that is where the OR gates sit. The n EDT inputs of a core always hang
on n different channels, and each channel reaches four core inputs:

| address | IC1 drives | IC2 drives | IC3 drives |
|---|---|---|---|
| 0 | C1.in0 (OR) | C1.in0 (OR) | C1.in1 |
| 1 | C2.in0 (OR) | C2.in0 (OR) | C3.in0 (OR) |
| 2 | C3.in0 (OR) | C3.in1 | C4.in0 (OR) |
| 3 | C4.in0 (OR) | C5.in0 (OR) | C5.in0 (OR) |

Two channels can drive the same OR gate at once. The schedule must not let
that happen, because the two streams would be merged.

**Output side (`out_dsr`).** Each output channel has a 4-to-1 multiplexer
(`chan_mux`) with a 2-bit address. Every core output stream fans out to two
multiplexers, so the schedule can choose which pin observes it:

| address | OC1 and OC2 observe | OC3 and OC4 observe |
|---|---|---|
| 0 | C1.o0 | C1.o1 |
| 1 | C2.o0 | C3.o1 |
| 2 | C3.o0 | C4.o0 |
| 3 | C5.o0 | C5.o1 |

Both sides are purely combinational. The address must only change between
scan loads.

**Address word.** All seven addresses form one 14-bit word
(`dsr_pkg::dsr_addr_t`). The low 6 bits are `is[0..2]`, the addresses of the
IC1..IC3 demultiplexers. The high 8 bits are `os[0..3]`, the addresses of the
OC1..OC4 multiplexers. Both wiring tables are in `dsr_pkg` (`IN_MAP`,
`OUT_MAP`). A router of another shape needs only new tables and new counts.

**Example.** The end-to-end test uses two configurations.

* A: IC1 feeds C1, IC2 feeds C3 (second input), IC3 feeds C5. The output
  channels observe C1.o0, C3.o0, C5.o1 and C1.o1. Address word:
  `is = {3, 2, 0}`, `os = {0, 3, 2, 0}`, listed from IC3 down to IC1 and
  from OC4 down to OC1.
* B: IC1 feeds C4, IC2 feeds C1 through the second input of its OR gate,
  and IC3 feeds C3 through the second input of its OR gate. OC2 observes
  C1.o0 through the second fan-out branch. Address word: `is = {1, 0, 3}`,
  `os = {1, 2, 0, 2}`.

Each configuration tests three cores at once on three pins.

## Loading the router

### IJTAG (`soc_ijtag`)

An IEEE 1149.1 TAP (`tap_controller`) has a 4-bit instruction register.
Instruction `1000` (IJTAG) places an IEEE 1687 network between `tdi` and
`tdo`. Any other value, including the reset value `1111`, selects BYPASS.
The network is a chain of three segment insertion bits (`sib`):

    tdi -> SIB(C1) -> SIB(C2) -> SIB(DSR) -> tdo

Each SIB hosts one test data register (`tdr`). While a SIB's update bit is
0, the SIB is a single bit on the path. After a 1 has been shifted into the
SIB and updated, the SIB's TDR is spliced into the path just in front of it.
The DSR's TDR is 14 bits wide and holds the address word. The two core TDRs
are 8 bits wide; they stand for core instrument registers and are brought
out as ports.

A TDR has a shift stage and a separate update register, and only the update
register drives the router. The next configuration can therefore be shifted
in while patterns are still being applied. It takes effect at Update-DR.

To configure the router after reset:

1. Load IR = `1000`.
2. Do a 3-bit DR scan of `1,0,0` (first bit shifted first). This opens SIB(DSR).
3. Do a 17-bit DR scan: a 1 to keep SIB(DSR) open, then address bits 0..13,
   then 0 for SIB(C2) and 0 for SIB(C1).

The first bit shifted always ends farthest from `tdi`. A capture in a later
scan reads the current address word back.

The TAP clock is usually 10 to 20 times slower than the scan clock, so this
variant suits tests with few configurations.

### Dedicated control chains (`soc_ctrl_chain`)

Each input channel ends in a 1:2 switch. In data mode the channel feeds its
demultiplexer. In configuration mode it feeds a short control chain, and the
demultiplexer input is held at 0, so the cores see only zeros.

The chain of channel i holds the address of demultiplexer i, then the
addresses of the output multiplexers that channel owns:

| channel | chain bits | contents |
|---|---|---|
| IC1 | 4 | is[0], then os[0] |
| IC2 | 4 | is[1], then os[1] |
| IC3 | 6 | is[2], then os[2], then os[3] |

A bit enters the chain at the top of the demultiplexer field and moves
toward the last multiplexer field.

The mode comes from a flag. CF is a flip-flop in series with IC1. When a
load ends (`se` falls), its shadow CFS takes the value in CF, which is the
last bit the ATE sent on IC1 in that load. CFS sets the mode of the
following load. A tester using this variant:

* ends each data vector's IC1 stream with 0 to stay in data mode, or with 1
  to make the next vector a configuration vector;
* in a configuration vector, places each chain's bits last in that channel's
  stream, the bit bound for the far end first, and ends the IC1 stream with
  one extra 0 so that the following vector is data again;
* allows for IC1 data arriving one shift cycle later than IC2 and IC3 (the
  delay through CF); the first bit of every IC1 load is the flag left over
  from the previous load.

Test vectors carry no control bits. Only a change of configuration costs a vector.

### Pipelined control bits (`soc_pipeline`)

Here the same control fields (same lengths, same order) are built as
pipeline flip-flops in series with each channel (`pipe_ctrl_stage`). All
test data pass through them. At the end of each load, the last 4, 4 and 6
bits sent on IC1, IC2 and IC3 stay in these flops. When `se` falls, they are
copied into shadow registers, which drive the router during the next pattern.
The shadows keep the configuration steady while test data move through the
flops.

So the tester appends the next pattern's control bits to every pattern, and
the first vector of a test is a setup vector only. Test data reach the
decompressors 4, 4 and 6 shift cycles after leaving the tester. The encoded
patterns must account for that delay, just as they account for the control bits.

Any number of configurations is possible. The cost is a few bits per
pattern, which is small against the shift length.

## Timing summary

* The router is combinational: `ic` to `edt_in` and `core_out` to `oc`.
* The control-chain and pipeline variants run on `clk` with a synchronous
  active-high `rst`. After reset the address word is 0 and the control-chain
  variant is in data mode. A load is the span during which `se` is high. The
  end of a load is seen one clock after `se` falls, and the new
  configuration is in force from that clock edge on.
* The IJTAG variant runs on `tck`. `trst_n` resets the TAP asynchronously.
  Test-Logic-Reset then clears the SIBs and TDRs on the next `tck` edge.
  Capture, shift and update act on rising `tck` edges; `tdo` changes on
  falling edges.

## Design choices and limits

These points are this implementation's own decisions where the underlying
description gives no detail:

* **Wiring.** The wiring tables were read from a connection diagram that
  does not label its lines. They follow the two stated rules: the n inputs of
  a core go to n different channels, and the channels are evenly loaded. The
  code that each address value stands for (topmost input = 0) is a choice.
* **OC4.** The control-chain and pipeline variants attach the OC4
  multiplexer address to IC3's chain, since there are more output channels
  than input channels.
* **Control-chain protocol.** The flag protocol is this design's reading of
  a block diagram that shows only CF, CFS and the channel switches: the
  last IC1 bit of a load sets the mode of the next load, and the cores get
  zeros during a configuration vector.
* **End of load.** The end of a pattern upload is taken as the falling edge
  of scan enable `se`.
* **TAP details.** The instruction codes, the IR width and the update on the
  rising edge of Update-DR (the standard uses the falling edge) are choices.
* **Broadcast not built.** Broadcasting one channel to several identical
  cores is mentioned as possible but not built. Each demultiplexer output
  reaches exactly one core input.
* **Unload under the next setting.** In the two scan-channel variants, a
  pattern's responses are unloaded while the next pattern is loaded, so they
  leave under the output multiplexer setting of the next pattern. The
  schedule has to keep observation points steady across such a boundary.
* **Schedule rules not enforced in hardware.** Two channels addressing the
  same OR gate, and a tested core whose outputs are not all observed, are
  errors of the schedule; the router does not detect them. Assertions check two
  rules. The pipeline variant's address word must not change while a load
  is shifting. The control-chain variant's address word must not change in
  data mode, and no channel data may reach the router while it configures.
* **Outside the design.** The cores, their EDT decompressors, their
  X-masking compactors and their wrappers are not part of this RTL; their
  pins are ports of the top. The scheduling algorithm that picks the
  configurations is software run before test.

Synthesised size of `soc_test_top` (generic cells, all three variants):
about 220 cells and 138 flip-flop bits.

## Verification

Every module has a self-checking testbench. Each testbench compares the
module's outputs with values computed independently; for the router, that is
a pin-by-pin model written separately from the wiring tables. Every
testbench was also shown to fail on a deliberately broken copy of its module.
The faults tried include removed OR gates, a wrong shift direction, a
shadow update on the wrong edge of `se`, and a skipped TAP state.

The end-to-end test runs the top at its default sizes. It checks about 2000
output bits of all three variants against the input bits that should have
produced them. It also counts each mechanism: reconfiguration in every
variant, SIB opening, configuration vectors, OR-gate second inputs, second
fan-out branches and parallel testing of three cores.

The test does not cover the cores themselves. It uses a simple behavioural
core instead, so real EDT decompression and compaction are untested.

## Files

`rtl/`, leaf modules first:

| file | role |
|---|---|
| `dsr_pkg.sv` | counts, address word type, wiring tables, chain-length helpers |
| `chan_demux.sv`, `chan_mux.sv` | one channel demultiplexer / multiplexer |
| `in_dsr.sv`, `out_dsr.sv`, `dsr_network.sv` | input router, output router, both together |
| `tap_controller.sv`, `sib.sv`, `tdr.sv`, `soc_ijtag.sv` | IJTAG variant |
| `soc_ctrl_chain.sv` | control-chain variant |
| `pipe_ctrl_stage.sv`, `soc_pipeline.sv` | pipeline variant |
| `soc_test_top.sv` | the three variants side by side |

`tb/` holds one self-checking testbench per module, plus:

* `tb_ref_pkg.sv`, a reference model of the router written pin by pin,
  independent of the tables in `dsr_pkg`;
* `core_model.sv`, a behavioural core stand-in: one scan chain fed by the
  XOR of the core's EDT inputs, whose second output is the inverse of the first;
* `tb_soc_test_top.sv`, the end-to-end test at default sizes. It takes each
  variant through two configurations and back. The second configuration uses
  the second OR-gate inputs and the second fan-out multiplexers. For every
  shift cycle it checks that each output pin carries the input bit sent the
  right number of cycles earlier, through the right core.
* `tb_reference_config.sv`, which applies one fixed configuration, taken
  from a reference simulation of this router, through all three variants and
  checks where every channel goes. The demux addresses for IC1..IC3 are
  01, 10, 01. The mux addresses for OC1..OC4 are 00, 10, 01, 01.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/dsr_pkg.sv tb/tb_ref_pkg.sv tb/tb_soc_test_top.sv \
        --top-module tb_soc_test_top
    ./obj_dir/Vtb_soc_test_top

Any other testbench runs the same way with its own name. Each one prints
`TB_RESULT checks=N failures=M` and stops. The end-to-end test also prints
how many times each mechanism was exercised.
