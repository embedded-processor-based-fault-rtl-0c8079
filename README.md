# Embedded fault and SEU injection for SRAM-based FPGAs

An SRAM FPGA's function lives in its configuration memory, so a stuck-at fault
or a single-event upset (SEU) in the device can be emulated by changing one
configuration bit. Doing that from outside the chip means one full or partial
download per fault over a slow configuration interface. That is hours of
download time for a few hundred faults. This design moves the work inside the
FPGA. A small controller next to the internal configuration access port
(ICAP) takes faults from a list in block RAM. For each fault it reads the
affected configuration frame back, changes one bit and writes the frame back,
all at the ICAP's clock rate and 32 bits per clock.

Its main use is to check built-in self-test (BIST) configurations: how many
configuration faults does a given test actually detect? The repository
therefore also contains the BIST circuitry for the FPGA's logic blocks (CLBs):
accumulator pattern generators, comparison-based analysers with an
iterative-OR result chain, and a block-RAM March Y generator for the LUT RAMs.

The RTL targets the Virtex-4/Virtex-5 organisation: 41-word frames, a 36-bit
block RAM fault list, and Virtex-5 configuration packets.

## Structure

```
                         +-------------------------------+
 GO ------------------->|                               |---> EOF, PAUSED
                        |      fi_controller            |
  fault_list_bram  36   |      (micro-ROM + FSM)        | 32  +-----------+    +------+
  1024 x 36  --------->|                               |---->| icap_mux  |--->| ICAP |--+
       ^  <-----------|  10                            |     +-----------+    +------+  |
       |               |                               |  15       ^ 32                  | 32
  bscan_if  (optional, |                               |-----> frame_rmw_bram <----------+
  scan clock)          +-------------------------------+<----- (one frame)
```

| module | role |
|---|---|
| `fi_pkg` | fault-list word layout, delimiter and fault-code enums, ICAP packet constants |
| `fault_list_bram` | dual-port 1024 x 36 fault list. Port A: controller. Port B: scan interface |
| `frame_rmw_bram` | 32-bit frame buffer with a 15-bit block-RAM address (word = bits 14:5) |
| `icap_mux` | ICAP data input: command word or frame word |
| `fi_controller` | the injection sequencer ("ROM & FSM") |
| `bscan_if` | boundary-scan user register that writes and reads the fault list in system |
| `fltinject` | the fault injection core (all of the above) |
| `acc_tpg` | DSP-style accumulator test pattern generator (adds 0xCA6691) |
| `ora_cell` | comparison analyser: sticky pass flag plus iterative-OR chain stage |
| `slicel_bist` | TPGs, row-circular analysers and result chain for logic-block BIST |
| `march_tpg` | block-RAM TPG holding the 8N-operation March Y test |
| `slicem_bist` | March TPGs, column-circular analysers and chain for LUT-RAM BIST |
| `fi_bist_top` | the injection core beside both BIST circuits |

The ICAP, the configuration memory, the boundary-scan primitive and the CLBs
under test belong to the FPGA itself. They are not in `rtl/`, and their
signals are ports of `fltinject` and `fi_bist_top`. `tb/icap_model.sv` is a
behavioural model of the ICAP and of a small configuration memory, for
simulation.

## The fault list

Each entry is one 36-bit word. The four "parity" bits of the block RAM word
carry the control fields:

| bits | field | encoding |
|---|---|---|
| 35:34 | delimiter | `00` continue with the next entry, `01` pause after this entry, `1x` end of list |
| 33:32 | fault code | `00` stuck-at-0, `01` stuck-at-1, `1x` bit flip (SEU) |
| 31:21 | bit index | 0 to 1311. The bit is in frame word `idx/32` at position `idx%32`; word 0 is the first word read back |
| 20:0 | frame address | written into the FAR register unchanged (zero-extended) |

Entries are grouped by their delimiters. One GO pulse injects every entry up
to and including the next "pause" or "end of list" entry, so several faults
can be present at once. The end-of-list entry lets a list of any length up
to the RAM size be used. An entry in the last RAM word also ends the list.

A stuck-at fault is written once and stays in place until the bit is
rewritten, because nothing else writes the frame. To remove a fault, follow
it in the list with an entry that sets the bit back to its original value,
or with a second flip.

## The injection sequence

`fi_controller` runs one pass per entry:

1. **Fetch**: read the entry addressed by the list pointer (2 clocks).
2. **Read frame**: send the readback command sequence from the micro-ROM:
   dummy word, sync word `AA995566`, NOOP, `CMD = RCFG`, NOOP, `FAR = frame`,
   FDRO type-1 read header, type-2 read of 41 words, two NOOPs. Then turn the
   port to read mode and store the 41 returned words in the frame RAM. Then
   send `CMD = DESYNC` and a NOOP.
3. **Modify bit**: read the addressed frame word, apply the fault code to the
   addressed bit, write the word back (2 clocks).
4. **Write frame**: dummy, sync, NOOP, `CMD = WCFG`, NOOP, `FAR = frame`, FDRI
   type-1 header, type-2 write of 41 words, the 41 frame words back to back
   from the frame RAM, then `CMD = DESYNC` and a NOOP.
5. **Check**:
   - "continue": advance the pointer and start again at 1.
   - "pause": advance the pointer, set PAUSED and go idle.
   - "end of list": rewind the pointer to 0, set EOF and PAUSED, and go idle.

   The next GO clears both flags.

The ROM is a function of a 5-bit index (`rom_word`). Each entry is a literal
word or a slot that the FSM fills in: the frame address, the type-2 word
counts, or the readback and write data phases.

### ICAP timing contract

- All ICAP outputs come from registers.
- A write-mode word is transferred in every clock with `icap_ce_n = 0` and
  `icap_write_n = 0`.
- The port is turned around only while `icap_ce_n = 1`; an assertion checks
  this.
- In read mode a word is taken in every clock where `icap_busy = 0`. While
  BUSY is high the controller waits, so read latency and stalls of any length
  are tolerated.
- `PAD_WORDS` (default 0) drops that many leading readback words and appends
  that many zero words after the frame on a write. Use it for devices that
  pipeline a pad frame.
- The bit order inside ICAP words is taken as-is. Devices that bit-swap ICAP
  data need the swap added at the `icap_i` / `icap_o` boundary.

With no stalls, one fault costs `42 + L + 2*(41 + PAD_WORDS)` clocks, where L
is the ICAP read latency. That is 127 clocks at L = 3, or 1.27 µs at the
ICAP's 100 MHz maximum. Frame data moves at 32 bits per clock. A 50 MHz
boundary-scan port moves one bit per clock, so the data rate is 64 times
higher. The per-fault command overhead is small against the external
download that each fault would otherwise need.

### Loading the list through boundary scan

`bscan_if` is a `1 + 10 + 36`-bit user data register on the scan clock,
shifted LSB first:

- bits 35:0: data
- bits 45:36: address
- bit 46: write flag

UPDATE latches the address, and writes the data into the list when the write
flag is set. CAPTURE loads the word stored at the last updated address. So a
read takes two scans: the first sets the address, the second shifts the word
out. The list can also be preloaded from a `$readmemh` image (`INIT_FILE`),
like a block RAM initialised in the bitstream.

## BIST circuitry

**Pattern generator (`acc_tpg`).** An accumulator adds the odd constant
0xCA6691 every clock. The low 12 bits run through all 4096 values in 4096
clocks, and the pattern MSB toggles 3361 times in those 4096 clocks (a binary
counter's MSB toggles twice). Two or more identical generators drive alternating BUT columns,
so a faulty generator shows up as a mismatch and need not be assumed good.

**Analyser (`ora_cell`).** Each cell compares two outputs each of two
identically configured BUTs. Its pass flag is set to 1 at the start of a
phase and latches 0 on the first mismatch. The cells are chained so that
`chain_out = chain_in | ~pass`. One bit at the end of the chain reports
whether any cell failed, and the individual flags give the location, as a
configuration readback would in the device.

**SliceL array (`slicel_bist`).** Analyser (r,c) compares BUT (r,c) with BUT
(r,(c+1) mod COLS): a circular comparison along each row. A phase is a start
pulse followed by 4096 pattern clocks. The CLB array of the device swaps the
BUT and analyser roles between two sessions (East and West). In this model,
where the BUTs are external, that swap does not change which pairs are
compared.

**LUT-RAM BIST (`march_tpg`, `slicem_bist`).** A 2048 x 18 ROM, computed at
initialisation, holds March Y for a 256 x 1 RAM:

```
(w0)  up(r0,w1,r1)  down(r1,w0,r0)  (r0)      = 8N = 2048 operations
```

Each vector is `[7:0]` address, `[8]` write, `[9]` data or expected value,
`[10]` read check, `[12:11]` operation within the element and `[14:13]` element number. Each
generator drives one row of RAMs. Analyser (r,c) compares RAM (r,c) with RAM
((r+1) mod ROWS, c) on every read: a circular comparison along each column.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `FL_AW` | 10 | fault-list address bits: 1024 entries (Virtex-5 36 Kb RAM). 9 gives the Virtex-4 512 entries |
| `FR_AW` | 15 | frame RAM block-RAM address bits |
| `FRAME_WORDS` | 41 | words per configuration frame |
| `PAD_WORDS` | 0 | pad words around the frame data (see above) |
| `PAT_W`, `ACC_W`, `INC` | 12, 24, 0xCA6691 | TPG pattern width, accumulator width, increment |
| `ROWS`, `COLS`, `NTPG` | 3, 4, 2 (SliceL); 2, 4, 2 (SliceM) | BIST array sizes, as in the example arrays |
| `N_AW` | 8 | LUT RAM under test: 256 x 1 |

## Where this RTL departs from the original design or fills gaps

- The original core is about 950 lines of VHDL with a `DEVICE` string
  generic that selects a Virtex-4 or Virtex-5 build. Here the sizes that
  generic implies are numeric parameters.
- The original core has no reset port. A synchronous active-high `rst` and a
  `busy` status output are added.
- The exact ICAP command sequence, the read/write turnaround, the use of BUSY
  and the pad-word handling are not specified by the original description.
  They follow Virtex-5 practice. Check them against your device's
  configuration guide before using them on silicon.
- After a "pause" entry the pointer advances, so the next GO continues with
  the next entry. PAUSED is also raised at the end of the list.
- The boundary-scan register layout and protocol are this design's own.
- The TPG pattern comes from the accumulator's low 12 bits, the choice that
  makes 4096 clocks exhaustive. The top 12 bits of a 24-bit accumulator would
  give only 3737 distinct values.
- Only March Y is generated. A dual-port March test that shares the same
  block RAM in the original is not included, because its elements are not
  known.
- The BIST arrays are small example sizes, not the device's 25,920 CLBs. The
  carry-out multiplexer that links analyser chains in the device is not
  modelled.
- The AT94K variant, in which the SoC's hard 8-bit AVR processor writes the
  configuration memory in software, is not part of this RTL.

## Simulation

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  --top-module tb_fi_bist_top rtl/fi_pkg.sv tb/tb_fi_bist_top.sv
./obj_dir/Vtb_fi_bist_top
```

| testbench | what it shows |
|---|---|
| `tb_fi_bist_top` | End to end, at the default sizes. Faults in configuration frames that define each SliceL BUT's look-up tables are injected and removed one by one. A BIST phase follows each change, and its verdict must match whether a used table bit changed. Faults in unused bits, and stuck-at faults equal to the bit's value, must go undetected. Also covers a multi-fault group, EOF, random ICAP stalls, scan readback, and SliceM BIST with a stuck cell |
| `tb_fault_campaign` | A 614-fault campaign. Each fault forces a used table bit to its opposite value, and a second entry restores it. The 1228 entries take two list loads: the first fills all 1024 entries and ends at the last RAM word, the second ends with EOF. The test expects 614 of 614 faults detected and every fault removed. This is the coverage of the modelled tables, not of a real CLB. About 2.7 M clocks |
| `tb_fltinject` | Stuck-at-0, stuck-at-1 and flip results against a reference copy of the memory; pause and EOF behaviour; 127 busy clocks per fault; a 41-word back-to-back FDRI burst; correct results under ICAP stalls |
| `tb_fltinject_v4` | the same checks with the Virtex-4 sizing (512-entry list, 46-bit scan register), two pad words per frame transfer and an ICAP read latency of 5 |
| `tb_fault_list_init` | a fault list preloaded from `tb/fault_list_init.hex` through `INIT_FILE` |
| `tb_fault_list_bram`, `tb_frame_rmw_bram`, `tb_icap_mux`, `tb_bscan_if` | the memories, the multiplexer and the scan register |
| `tb_acc_tpg` | every pattern is k·0xCA6691 mod 4096, 4096 distinct values, MSB activity, hold and clear |
| `tb_ora_cell` | sticky flags and chain OR against a reference model |
| `tb_slicel_bist`, `tb_slicem_bist` | fault-free arrays pass; one faulty BUT/RAM fails exactly the analysers that compare it; a stuck pattern-generator bit is caught; phase lengths |
| `tb_march_tpg` | the 2048-vector March Y order, and detection of stuck cells in a RAM model |

Verilator is a two-state simulator: every testbench resets or initialises
what the design reads.
