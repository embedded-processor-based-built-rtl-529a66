# Self-test of FPGA logic and memory by circular comparison

An FPGA can test itself. An on-chip processor reconfigures part of the device into test circuits and lets them run. It then reads the pass/fail flip-flops back through the configuration port and works out which resource is broken. This RTL models that scheme for one half of a Virtex-4-class device. It covers the logic blocks (PLBs), the LUT RAMs, the 18 Kbit block RAMs and the DSP slices, and follows a published Virtex-4 case study.

The whole scheme rests on one structure, the **circular comparison ring**:

```
        TPG0 ─────┬───────────────┬───────────────┐
        TPG1 ─────│───────┬───────│───────┬───────│───────┐
                  ▼       ▼       ▼       ▼       ▼       ▼
   ┌──> ORA5 ─ RUT0 ─ ORA0 ─ RUT1 ─ ORA1 ─ RUT2 ─ ... ─ RUT5 ──┐
   └───────────────────────────────────────────────────────────┘
   ORA j compares RUT j with RUT j+1 (mod N)
```

The resources under test (RUTs) are identically configured and get identical stimulus. Two identical test pattern generators (TPGs) drive alternate RUTs. Each output response analyser (ORA) compares two neighbouring RUTs bit by bit and latches any mismatch. There is no golden reference. A fault-free ring therefore reads all zeros, and a faulty RUT makes the two ORAs on either side of it fail.

Because every RUT is seen by two ORAs, the pattern of failing ORAs can be decoded into faulty and fault-free RUTs. A fault in one TPG makes every ORA fail: each ORA sees one RUT from each TPG. Such a fault cannot escape, though no RUT can then be judged.

## What is built

| Ring | RUT model | TPG | ORA bits per RUT | Configurations | Run length |
|---|---|---|---|---|---|
| PLB (`plb_bist_array`) | 4 slices = 8 LUT4s + 8 FFs (`plb_rut`) | DSP accumulating `0x691` (`dsp_tpg`) | 8 | 12, in each of two sessions | 4096 patterns |
| LUT RAM (`lutram_bist_array`) | 64x1 SP, 32x1 SP, 16x2 DP (`lutram_rut`) | DSP counter + ROM with March Y (`lutram_tpg`) | 2 | 3 | 8n steps |
| Block RAM (`bram_bist_array`) | 512x36 array, 6 aspect ratios, dual port, FIFO with 4 flags (`bram_rut`) | March engine (`bram_march_tpg`) | 76 | 8 | 14A, 10A or 6A cycles |
| DSP (`dsp_bist_array`) | 18x18 multiplier + 48-bit add/sub/accumulate (`dsp_slice`) | LFSR + OPMODE schedule (`dsp_bist_tpg`) | 48 | 4 | 4096 patterns |

Each ring has `N_RUT = 6` RUTs and six ORAs, which is the size used in the source's figures and diagnosis example. The other parts are:

- `bist_controller`: the sequencer, which stands in for the program the embedded processor would run.
- `diag_engine`: the diagnosis, which decodes the ORA results into a verdict for each RUT.
- `fpga_bist_top`: ties everything together.
- `bist_pkg`: shared types, plus the tables that stand in for configuration bitstreams: PLB truth tables, March Y step lists, the block RAM test list and the DSP attribute sets.

## PLB sessions: who tests whom

In the PLB ring the ORAs are PLBs as well. The 12 cells alternate between RUT and ORA roles (`plb_cell`). Half of the PLBs are therefore idle as RUTs at any time, so the test runs twice:

- In **session 0**, the even cells are under test.
- In **session 1**, the roles are swapped and the odd cells are under test.

In session `s`, RUT `j` is cell `2j+s`. Its ORA is cell `2j+1+s`, which compares RUT `j` with RUT `j+1`.

The wiring from TPG to RUT and from RUT to ORA never changes between configurations. Only the mode of the RUTs changes: their LUT contents and whether each output goes through its flip-flop. This is the property that lets a small processor program reconfigure the array algorithmically.

LUT `k` of a PLB reads TPG bits `k, k+3, k+6, k+9` (mod 12). The TPG is a DSP accumulator adding the odd constant `0x691`, so its 12-bit state visits all 4096 values. Every LUT therefore sees each of its 16 input combinations many times.

## The sequencer

`bist_controller` runs five sessions in this order: PLB 0, PLB 1, LUT RAM, block RAM, DSP. Within a session, each configuration goes through these states:

```
RECONF (1 cycle: TPGs restart, RUT registers reset, new mode applied)
RUN    (PATTERNS cycles, or until the ring's TPG raises done, + 1)
DRAIN  (1 cycle, ORAs still enabled, for registered outputs)
[DIAG] (retrieval: diag_start, wait for diag_done, result_valid pulse)
```

**ORA clearing.** The ORAs are cleared only when a session starts, which stands for the fresh download of a BIST configuration. Reconfiguring the RUTs leaves them alone, so failures accumulate over the configurations of a session.

**When results are read.** The `defer` input selects between two retrieval policies:

- `defer = 0`: results are read after every configuration. This costs 39 retrievals per run, and a failure can be tied to the configuration, and so the mode, that caused it.
- `defer = 1`: results are read once at the end of each session. This costs 5 retrievals. The faulty RUT is still found, but not the mode that failed.

**Sanity check.** With `sanity_en` set, each PLB session starts with an extra configuration. It flips one truth-table bit in the first RUT, standing for a corrupted configuration-memory bit, and checks that some ORA fails. The result goes to `sanity_ok[session]`, and the ORAs are cleared again before the real configurations.

**Results.** After each `result_valid` pulse, the top's `diag_*` outputs and the ring's ORA outputs describe the `result_res`, `result_session` and `result_cfg` just finished.

## Diagnosis

`diag_engine` fills in a table for the ring. Every RUT starts *unknown*. Then:

1. Two consecutive passing ORAs mark the three RUTs they observe as **fault-free**.
2. A known RUT and the ORA next to it decide the RUT beyond that ORA, if it is still unknown:
   - a fault-free RUT beside a failing ORA makes it **faulty**;
   - a faulty RUT beside a passing ORA also makes it **faulty**, because the two share the same (equivalent) fault.

   This step is repeated until nothing changes.
3. A failing ORA between two fault-free RUTs is an **inconsistency**:
   - exactly one points to a faulty ORA or to faulty routing;
   - more than one can mean three or more neighbouring RUTs with the same fault. Such RUTs agree with each other, so the ORAs between them pass.
4. The diagnosis is **unique** if no RUT is left unknown. `reorder` is raised when the comparison order should be changed and the test repeated: when RUTs are unknown, or when there is more than one inconsistency.

Worked example. The ORAs (between RUTs 6-1, 1-2, 2-3, 3-4, 4-5, 5-6) read `0 0 1 0 1 0`:

- Step 1 marks RUTs 6, 1 and 2 fault-free, and also RUT 5.
- Step 2 then gives RUT 3 faulty (fault-free RUT 2, failing ORA 2-3).
- Repeating step 2 gives RUT 4 faulty (faulty RUT 3, passing ORA 3-4).

The diagnosis is unique: two neighbouring RUTs with equivalent faults. The engine needs at most `N + 4` cycles.

## Memories and DSPs

**LUT RAMs.** The TPG is a DSP slice used as a counter. It addresses a 1K x 18 block RAM used as a ROM, and each ROM word is one March step: write enable, data and both addresses. The ROM contents for the three modes are computed in SystemVerilog (`lr_march_y`).

March Y is `⇕(w0); ⇑(r0,w1,r1); ⇓(r1,w0,r0); ⇕(r0)`, which is 8n steps. In the 16x2 dual-port mode, the second read port reads the next address at every step. The ORAs compare only on read steps. On a write step, the asynchronous read shows the word while it is being overwritten.

**Block RAMs.** `bram_march_tpg` works through a table of March elements, one operation per clock, so a k-operation algorithm takes exactly k x A cycles. It implements:

- MATS+ through port A and then port B, 2 x 5A.
- March LR, 14A.
- March s2pf-, 14A, a two-port test: `⇕(w0); ⇑(r0:r0, r0:-, w1:r0); ⇑(r1:r1, r1:-, w0:r1); ⇓(r0:r0, r0:-, w1:r0); ⇓(r1:r1, r1:-, w0:r1); ⇕(r0)`, where `x:y` is operation x on port A and, in the same clock and on the same cell, operation y on port B. Port B's reads during a port A write return the old word, which a read-first port guarantees.
- A FIFO March Y, 6A: fill with 0, drain, fill with 1, drain, fill with 0, drain. The filling and draining exercise Full and Empty and both "almost" flags.

The eight configurations are:

| # | Algorithm | Mode |
|---|---|---|
| 1 | March LR | 512x36 |
| 2 | MATS+ | 8Kx2 |
| 3 | MATS+ | 16Kx1 |
| 4 | March s2pf- | 512x36 |
| 5 | FIFO March Y | 4Kx4 |
| 6 | FIFO March Y | 2Kx9 |
| 7 | FIFO March Y | 1Kx18 |
| 8 | FIFO March Y | 512x36 |

The RAM model stores 512 x 36 bits whatever the aspect ratio, the way the real array does. A narrow word is a slice of a row.

The RAM-mode configurations also cover the three write modes, which set what a port's output shows during a write: March LR and March s2pf- run read-first (the old word), 8Kx2 write-first (the new word) and 16Kx1 no-change (the last read). In read-first and FIFO mode, a write shows the old word. After power-up that word is unknown and differs from RAM to RAM. For that reason the ORAs skip a port's data after such a write but compare it after every read and after write-first or no-change writes. The four FIFO flags are compared on every cycle.

**DSPs.** The four DSP configurations change only attributes that are configuration bits:

- input registers A and B;
- the multiplier pipeline register M;
- clock-enable polarity;
- reset polarity.

Everything else is driven at run time by the TPG. It supplies the operands from a 32-bit LFSR. It cycles eight OPMODEs, including multiply-accumulate and accumulate-constant, in both add and subtract form. It also turns off the clock enable now and then and pulses the reset.

While accumulating, the DSP compacts its own response. The ORAs still compare P on every cycle, so errors are latched as soon as they appear and cannot cancel out later.

## Emulating faults

The top has a fault input for each ring. Each one selects which RUTs carry the fault (a mask) and what the fault is:

- **PLB:** a flipped truth-table bit.
- **LUT RAM:** a stuck-at cell.
- **Block RAM:** a stuck-at bit at a given row and column.
- **DSP:** one of four defects:
  - a P bit stuck at 0;
  - a product bit stuck at 1;
  - an A-register bit stuck at 1, visible only when that register is in use;
  - an M-register bit stuck at 0, visible only when that register is in use.

Putting the same fault into several RUTs models equivalent faults. In addition, each ring has an input that corrupts TPG 1's pattern.

## Departures from the source method

- **No processor and no configuration memory.** A state machine plays the processor's program. A "reconfiguration" is a change of mode inputs plus a one-cycle restart. A "readback" is a direct look at the ORA flip-flops. So frame counts, download times and processor sizes do not appear here.
- **One half-array.** The swap of processor and BIST halves would be a second run of the same hardware. Each resource type has one ring of 6. A real device repeats such rings every four PLB rows: a Virtex-4 LX25 half-array has roughly 670 PLB RUTs per session. `N_RUT` is a parameter.
- **PLB model.** LUTs and flip-flops only. Carry chains, wide multiplexers and the shift-register modes of a real slice are not modelled. The 12 configurations are computed (`plb_cfg_for`), not taken from real bitstreams.
- **LUT RAM dual-port algorithm.** The source uses a dedicated dual-port algorithm that it does not spell out. March Y with a second read port is used instead.
- **Block RAM.** Eight of the ten source configurations are built. The following are missing:
  - the background data sequences of configuration 1 (58A in the source, 14A here);
  - the second two-port test, March d2pf (configuration 5);
  - the ECC-mode FIFO test (configuration 10);
  - output-register options, and clock, enable and reset polarities of the RAM. Of the read/write options, only the three write modes are modelled.
- **DSP.** Active clock edge and cascade connections are not modelled. The OPMODE encoding is this design's own. The TPG's pattern choice is this design's own as well.
- **Diagnosis** runs in hardware rather than as processor software. It signals when a new comparison order is needed but does not choose one.

## Simulating

Every block has a self-checking testbench, `tb/tb_<block>.sv`. Each prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. `bist_pkg.sv` must come first on the command line:

```
verilator --binary --timing -Irtl -y rtl rtl/bist_pkg.sv tb/tb_fpga_bist_top.sv \
          --top-module tb_fpga_bist_top && obj_dir/Vtb_fpga_bist_top
```

`tb_fpga_bist_top` runs the complete system at its default size in five scenarios:

1. fault-free, with per-configuration retrieval and the sanity check;
2. one faulty RUT per ring, with deferred retrieval;
3. two neighbouring RUTs with equivalent faults;
4. three such RUTs, which gives inconsistencies and a reorder request;
5. TPG faults.

Each scenario is checked against independently computed ORA vectors and diagnoses. The testbench counts each mechanism, such as the session swap, both retrieval policies, the sanity check, unique and equivalent-fault diagnosis, reorder requests and TPG faults, and fails if any of them never happened. The run takes about half a minute in Verilator.

The testbenches use `$urandom` and do not depend on four-state values.
