# Self-reconfigurable BIST platform (ERACE-style) in SystemVerilog

Checking a test method for digital circuits usually means long fault
simulations in software. This design does it in hardware instead. A small
circuit under test (CUT) sits in a region of an FPGA whose logic is held in
look-up tables (LUTs). To model a stuck-at fault, the platform rewrites the
16-bit configuration vector of one LUT while the chip runs. It then applies a
set of test patterns and counts whether the fault shows at the outputs.
After each fault it puts the original vector back. One run over every fault
of the CUT is called a campaign. At the end you have the number of faults,
how many were detected, and how many pattern/fault pairs disagreed.

The target device is a Virtex-II XC2V2000. All sizes below are that device's:

- a frame of 584 bytes;
- 22 frames per CLB column;
- a column of 448 LUTs.

The CUT is the ISCAS-85 benchmark C17.

## The two sides

The platform is split in two halves that talk only through two one-way FIFOs
(Fast Simplex Links, FSL).

**Application side** (`bist_engine`, bus `OPB_A`). It runs the test.

1. Light the active module's LED through GPIO3, then read the hardware block ID through GPIO1. The ID is 17 for C17.
2. Apply every pattern once with no fault present and keep the 7-bit responses as the golden signature.
3. For each fault:
   - send `INJECT(fault)` and wait for `DONE`;
   - apply all patterns (GPIO2 drives the CUT inputs, GPIO1 returns the outputs);
   - count mismatches;
   - write one record to the shared memory OMA.
4. Send `INJECT(none)` to undo the last fault, then turn the LED off.

**Reconfiguration side** (`rcfg_engine`, bus `OPB_R`). It changes the
circuit. On each `INJECT` it first restores the LUT hit by the previous fault
from a saved copy. Then it writes the faulty vector into the new target LUT.
Each change is one frame read-modify-write through the HWICAP (below). While
a fault is in place it lights its own LED (GPIO_R). When it has finished it
answers `DONE`.

Both sides can reach the 8 KB OMA (`opb_bram_dual`). Its records are
`{detections[15:0], first detecting pattern[7:0], 7'b0, detected}` at
`OMA + 4*fault_number`.

## Rewriting a LUT: the read-modify-write path

This is the least obvious part of the design. Configuration memory is
reached only one frame at a time, through an 8-bit configuration port.

```
rcfg_engine --OPB--> opb_hwicap --(I,O,CE,WRITE,BUSY)--> icap_virtex2 --> cfg_memory --> LUT vectors --> hw_block
                       |  hwicap_opb_ctrl : registers, buffer window
                       |  hwicap_icap_ctrl: byte mover buffer <-> port
                       |  hwicap_bram     : 2048x8 / 512x32 dual-port buffer
```

One LUT change runs these steps:

1. Put a 4-byte READ header in the buffer. Start a configure transfer of 4 bytes.
2. Start a readback of 584 bytes into buffer offset 4. The frame then sits after the header.
3. Read the buffer word that holds the LUT, replace its 16 bits, and write it back.
4. Turn the header into a WRITE header. Send header plus frame (588 bytes).

HWICAP registers, relative to 0x60000:

| Offset | Register | Meaning |
|---|---|---|
| 0x000-0x7FF | buffer | storage buffer |
| 0x1000 | SIZE | bytes to move |
| 0x1004 | OFFSET | buffer byte to start at |
| 0x1008 | RNC | writing it starts a transfer: 1 = readback, 0 = configure |
| 0x100C | STATUS | bit 0 = done, bit 1 = busy |

The engine polls STATUS until done is set.

Header format and timing of the configuration port (`icap_virtex2`):

- The header is `{cmd, frame[15:8], frame[7:0], 0}`.
- `cmd` is 0x01 to write the following frame and 0x02 to read a frame back.
- After a write, BUSY stays high for 584 cycles while the frame is committed.
- After a read header, BUSY stays high for 8 cycles (the `READ_SETUP` parameter).
- The byte mover holds CE off while BUSY is high.
- It moves one byte every two cycles.

One read-modify-write therefore takes 2·(4+584+588) + 8 + 584 = 2944 cycles,
plus a few bus handshakes. The end-to-end test checks this.

How LUT bits sit in a frame is not public. This design's own layout puts
LUT *j* in frame *j*/292, at bytes 2·(*j* mod 292) and the next one, high byte
first. `cfg_memory` decodes all 448 LUT vectors from that layout every cycle.

## Fault models (`lut_fault_inject`)

Take a LUT with vector *v*, where bit *n* is the output for inputs *n*.

| Fault | New vector |
|---|---|
| input *k* stuck-at-0 | bit *n* becomes *v*[*n* with bit *k* cleared] |
| input *k* stuck-at-1 | bit *n* becomes *v*[*n* with bit *k* set] |
| output stuck-at-0 | 0000 |
| output stuck-at-1 | FFFF |
| contents fault | one bit of *v* inverted |

For each LUT the test covers input faults on the pins that are used, then
the two output faults. It adds the contents faults only when the
`contents_faults` input is set.

For C17 that gives 30 faults without contents faults and 58 with them. All of
them are detectable.

## The circuit under test

`c17_cut` builds C17's six NAND gates as four LUTs. Internal nets 16 and 19
are LUT pins, so faults on them can be injected.

| LUT | Computes | Pins (I2, I1, I0) | Vector |
|---|---|---|---|
| LUT0 | n16 | in2, in6, in3 | 8F8F |
| LUT1 | out22 | n16, in1, in3 | 8F8F |
| LUT2 | n19 | in7, in6, in3 | 8F8F |
| LUT3 | out23 | I1 = n19, I0 = n16 | 7777 |

Unused LUT inputs are tied to 0.

`hw_block` wraps the CUT in the fixed active-module interface:

- `InBus[0:39]` in. in1, in2, in3, in6 and in7 sit on bits 0 to 4, and the LED follows bit 39.
- `OutBus[0:6]` out. out22 and out23 sit on bits 0 and 1.
- `IDBus[0:8]` out, which carries 17.
- `Led1_out`.

## Test pattern sources (`tpg`)

`tpg_mode` selects the source:

| Mode | Source | Patterns |
|---|---|---|
| 0 | exhaustive counter | 32 |
| 1 | LFSR x⁵+x³+1 from seed 1 | 31 |
| 2 | stored deterministic set | 12 |

The stored set was chosen by a greedy search over a fault simulation of
C17. It is the smallest set found that detects all 58 faults.

Reference results (also checked by the testbenches):

| Mode | Contents faults | Faults | Detected | Detections |
|---|---|---|---|---|
| 0 | no | 30 | 30 | 261 |
| 1 | no | 30 | 30 | 252 |
| 2 | no | 30 | 30 | 101 |
| 2 | yes | 58 | 58 | 145 |
| 0 | yes | 58 | 58 | 375 |

## Top level (`erace_top`)

**Inputs.**
- `clk`, `rst_n`.
- `start`: pulse it to run a campaign.
- `tpg_mode`, `contents_faults`.

**Outputs.**
- `busy`, `done`, `hb_id`.
- `faults_injected`, `faults_detected`, `detections`.
- `rmw_count`: frame read-modify-writes done.
- `led_r`, `led_active`.
- `fault_active`.
- `opb_timeout`: a bus transfer went unanswered for 16 cycles.
- `icap_sel`, `icap_wr`, `icap_stall`: configuration port activity, for observation.

**Parameters.**
- `FRAME_BYTES` = 584, `NUM_FRAMES` = 22, `NUM_LUTS` = 448: the device's sizes.
- `READ_SETUP` = 8: this design's own choice.

**Memory map.**

| Side | Peripheral | Address |
|---|---|---|
| application | GPIO1 (input) | 0x30200 |
| application | GPIO2 | 0x30800 |
| application | GPIO3 | 0x30A00 |
| application | OMA | 0x50000 |
| reconfiguration | GPIO_R | 0x30200 |
| reconfiguration | OMA | 0x50000 |
| reconfiguration | HWICAP | 0x60000 |

`erace_pkg` holds the shared types and constants: the bus structs, the
addresses, the fault type and the message codes.

**Bus.** The OPB here is a single-master, single-beat bus. The master holds
`select` until `xfer_ack`, each slave acknowledges one cycle later, and the
slave responses are ORed.

**FSL messages.** Bits 31:28 carry the type: 1 = INJECT, 2 = DONE. Bits 15:0
carry the fault as `{kind[2:0], lut[8:0], idx[3:0]}`.

## Where this departs from the original platform

- The original runs the two halves' flows as software on two soft processors. Here the processors are replaced by two state machines that perform the same flows. Processor memories, timers, the interrupt controller, the UART, the debug module, the profiler, the CompactFlash controller and the clock manager are left out. Nothing in the test path needs them.
- In the original flow, the reconfiguration side first loads the active module through the configuration port and signals the application side that it is ready. Here the configuration memory holds the C17 configuration from power-up, and a campaign starts on the `start` input.
- Bus macros are plain wires.
- The configuration port and configuration memory are behavioural models. The real packet format and the LUT-to-frame bit map are not public, so the header format, the BUSY timing and the LUT layout are this design's own.
- Only C17 is built as a CUT. The active module's interface (40 inputs, 7 outputs) and the 448-LUT column are sized for the larger C432 (36 inputs, 7 outputs, about 82 LUTs). No C432 netlist is included.
- The original evaluation used input and output faults only. Contents faults are optional here.
- An earlier two-LUT mapping of C17 (vectors B8F8 and 3F2A) is not used; the four-LUT mapping above is.
- The OPB and FSL are simplified: single beats, no bursts, no arbitration, a FIFO depth of 16.

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. The shared helpers are:

- `c17_ref_pkg`: a reference model that computes the expected counts by fault simulation;
- `tb_opb_tasks.svh`: bus read and write tasks.

Example with verilator:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
          rtl/erace_pkg.sv tb/c17_ref_pkg.sv tb/tb_erace_top.sv \
          --top-module tb_erace_top -o sim
./obj_dir/sim
```

`-y` lets verilator find each module in the file of the same name. The
packages are named first so that they compile before the modules that use
them. `-Wno-fatal` keeps the run going past style warnings, such as the
ascending `[0:n]` numbering of the active-module buses, which is intended.
Swap `tb_erace_top` for any other testbench name to run that one.

`tb_erace_top` runs the whole platform at full size through five campaigns:
about 1.2 million cycles and a few seconds of run time. It checks:

- the counts against the reference;
- the exact byte and BUSY-cycle totals on the configuration port;
- the campaign length.

It also counts the mechanisms it saw: injections, restores, frame writes,
readbacks, both kinds of BUSY stall, both LEDs, every pattern mode and
contents faults. A mechanism that never occurred counts as a failure.

The other testbenches (`tb_<module>`) each test one module against an
independent model.
