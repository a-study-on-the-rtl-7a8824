# Built-in self-test for the AC parameters of an embedded SDRAM

A DRAM core merged onto a logic chip has no pins of its own. Testing it
through multiplexers to the package pins needs many pins, and the pad
delays distort exactly the timing you want to measure. A conventional memory
BIST avoids both but answers only "pass" or "fail". That says neither which
cell to repair nor which AC timing parameter lacks margin.

This RTL is a BIST that runs the memory at its real clock through a short
decision flow, so a failing memory gets a diagnosis:

* **good**: passes a march test with both banks interleaved at minimum timing;
* **fails only interleaved**: each bank passes on its own at minimum timing;
* **not usable at rated speed**: fails even with every timing relaxed by a clock;
* **parameter-limited**: passes relaxed timing, and the parameters named in a
  5-bit mask (tRC, tRAS, tRCD, tRP, tCCD) make it fail when set alone to
  their minimum.

The BIST also records the clock number and address of the first failures.
It sends the verdict and these records out serially on one pin (RED) for
redundancy repair. A second pin (ERR) flags any failure. The tester needs
only the test clock TCLKT, BIST_ON, MODS, ERR and RED.

## The memory under test

A dual-bank 16 Mbit SDRAM core, built for embedding:

| item | value |
|---|---|
| organisation | 2 banks x 512 rows x 256 columns x 64 bits |
| address | non-multiplexed: ROWADDR[8:0] and COLADDR[7:0] together |
| data | separate DIN[63:0] and DOUT[63:0] |
| control | per bank: RASB, CASB, WEB (active low) |
| CAS latency / burst length | 2 / 1 |
| clock | 100 MHz |
| refresh | 1024 refreshes per 16 ms, 512 per bank |

Each bank has its own strobes, so every command names its bank by the strobe
it uses. The three-strobe encoding is the usual SDRAM one (`bist_pkg`):

| command | RASB CASB WEB |
|---|---|
| ACT (activate row) | 0 1 1 |
| READ | 1 0 1 |
| WRITE | 1 0 0 |
| PRE (precharge) | 0 1 0 |
| REF (auto refresh) | 0 0 1 |

The AC parameters, converted to cycles of the 100 MHz clock, are the
minimum timing (`bist_pkg::TM_MIN`). "Relaxed" timing adds `MARGIN` = 1 cycle
to each of them.

| parameter | meaning | ns | cycles |
|---|---|---|---|
| tRC | ACT to ACT, same bank | 90 | 9 |
| tRAS | ACT to PRE | 60 | 6 |
| tRCD | ACT to READ/WRITE | 30 | 3 |
| tRP | PRE to ACT | 30 | 3 |
| tCCD | column command to column command | 10 | 1 |
| tRRD | ACT to ACT, other bank | 20 | 2 |
| tCDL | last data in to next column command | 10 | 1 |

## The test flow

`bist_controller` runs up to eight phases. Each phase is a complete march
test. The outcome of each phase, taken from `error_type_analyzer`, decides
what runs next:

```
PH_INTLV      both banks interleaved, minimum timing
   pass -> GOOD
   fail -> PH_BANK_MIN   bank A then bank B, minimum timing
              pass -> INTERLEAVE          (only fails interleaved)
              fail -> PH_BANK_MAX   failing banks only, all timings +1
                         fail -> NOT_AT_RATE
                         pass -> PH_PARAM x5   failing banks only:
                                   tRC, tRAS, tRCD, tRP, tCCD in turn at
                                   minimum, every other timing +1
                                 -> PARAM, mask bit set for each
                                    parameter whose phase failed
```

The logic is that of a margin search. A memory that passes at relaxed timing
and fails at minimum timing has at least one parameter without margin. Each
PH_PARAM phase tightens one parameter alone, so a failure points at that
parameter. All five PH_PARAM phases always run, so the mask can name more
than one parameter.

**Where each parameter binds.** A PH_PARAM phase finds a weakness only if
the tightened parameter actually sets some gap. tRCD and tRP set a gap in
every group. tCCD sets the gap between the read and the write of the
read-then-write groups (march stages 1 and 2). tRAS sets the ACT-to-PRE gap
of the single-operation groups (march stages 0 and 3). There the precharge
follows the column command after the relaxed tCDL, at cycle 6, which is
exactly tRAS.

tRC is the weakest case. With tRAS and tRP relaxed, ACT to ACT of the same
bank is already 7 + 4 = 11 cycles, more than tRC = 9. The only gap that tRC
alone bounds is a refresh followed by an activation of the same bank. So
the tRC phase exercises tRC only in the groups right after a refresh, about
one group in 140 to 170 at full size. A tRC weakness that shows only at
some rows can therefore escape the tRC phase. The memory then still gets
`RES_PARAM`, with bit 0 clear.

The end-to-end testbench shows both sides. A memory that is tRC-weak in a
whole bank is named correctly, and so is one that is tRAS-weak. A memory
that is tRC-weak in one row only is caught, and its address is logged. But
it ends as `RES_PARAM` with an empty mask. Read an empty mask as "most
likely tRC". Making tRC bind would need tRAS and tRP at their minimum in
the tRC phase. That breaks the rule of one tightened parameter per phase,
so it is not done.

### The march test

One phase runs this march on every address of the bank(s) under test, twice:

| stage | order | operations per address |
|---|---|---|
| 0 | ascending | write D |
| 1 | ascending | read D, write ~D |
| 2 | descending | read ~D, write D |
| 3 | ascending | read D |

That is 6 operations per word per pass, 12 for the two passes. D is a
checkerboard of the words 0x5555... and 0xAAAA... chosen by
`row[0] ^ col[0]`. The second pass uses the complementary checkerboard, so
every cell is written and read with both values next to both values of its
neighbours (`sdram_data_gen`). The column is the fast address and the row
the slow one.

## Command scheduling: how the timing is held exactly

`rw_ctrl_gen` turns one request ("group") into commands. For an interleaved
group it issues, one command per cycle at most:

```
ACT A, ACT B, op0 A, op0 B, [op1 A, op1 B,] PRE A, PRE B
```

For a single bank it issues `ACT, op0, [op1,] PRE`. A refresh group is a
single `REF` to one bank. One column is accessed per activation, since the
burst length is 1.

Each command waits only for its own timing rules. Saturating counters hold
the cycles since the last ACT, PRE and column command of each bank. Two more
counters hold the cycles since the last ACT and the last column command of
either bank.

| command | issues when |
|---|---|
| ACT b | since PRE(b) >= tRP, since ACT(b) >= tRC, since any ACT >= tRRD |
| READ/WRITE b | since ACT(b) >= tRCD, since any column command >= tCCD (and >= tCDL after a write) |
| PRE b | since ACT(b) >= tRAS, since column command(b) >= tCDL |
| REF b | since PRE(b) >= tRP, since ACT(b) >= tRC; restarts the tRC wait |

The counters run across groups. `rw_ctrl_gen` also holds one request in a
queue, so the controller works one group ahead and the memory sees no idle
cycles between groups. Every gap at the memory is then the programmed
minimum and never more than the rules force. This matters because a gap
made longer by handshake delays would hide a tRP or tRC weakness. At
minimum timing an interleaved read-then-write group looks like this (cycles
relative to the first ACT, checked in `tb_rw_ctrl_gen`):

```
cycle  0  2  3  5  6  7  8  9 | 11 ...
       AA BA AR BR AW BW AP BP| AA (next group: tRP after AP)
```

The read data comes back `RD_LAT` cycles after the READ leaves the BIST.
`RD_LAT` is the CAS latency plus one register stage each way in the interface
buffer, so 4 in the chip top. `dout_comparator` delays a small tag per read
(bank, row, column, pass, polarity) by `RD_LAT` stages. A second data
generator rebuilds the expected word from that tag, so the BIST never stores
64-bit words.

Refresh: `stage_refresh_counter` raises a request every `REF_INT` = 1562
cycles (16 ms / 1024 at 100 MHz). Its timer does not wait for the
acknowledgement, so the rate is exact. The controller puts the refresh in
front of the next access group. Refreshes alternate between bank A and
bank B.

## Results: ERR and RED

ERR goes high with the first mismatch of a test and stays high until the next
test. When the flow ends, BIST_DONE goes high. From the next cycle RED sends
this frame, one bit per TCLKT cycle, most significant bit first:

```
1 | result[1:0] | param_mask[4:0] | bank_mask[1:0] | count[2:0] | entry[3] | entry[2] | entry[1] | entry[0]
entry = { clock_number[31:0], phase[2:0], param[2:0], bank, row[8:0], col[7:0] }   (56 bits)
```

The frame is 237 bits at the default size.

* `result`: 0 GOOD, 1 INTERLEAVE, 2 NOT_AT_RATE, 3 PARAM.
* `param_mask`: bit 0 is tRC, then tRAS, tRCD, tRP, and bit 4 is tCCD.
* `bank_mask`: the banks that failed at minimum timing in the bank-by-bank
  phase.
* `count`: how many of the `FAIL_DEPTH` = 4 entries hold a failure.
  Entries fill from entry[0]; later failures are not stored.
* `clock_number`: the cycle, counted from the start, at which the failing
  read was compared. Together with the known test sequence it places the
  failure in time.
* `phase`/`param`: the test condition of the failure.

RED is low when idle. The leading 1 marks the start of the frame.

## Chip integration

```
              +------------------ mml_sdram_bist_top ------------------+
TCLKT,BIST_ON |  bist_core --+                                         |
ERR,RED <-----|              +--> mux_array_2x1 --> sdram_if_buffer ---|--> SDRAM core
              |  logic part -+    (MODS selects;    (1 register stage  |
              |  (lg_* ports)     also TCLKL/TCLKT)  each way)         |<-- DOUT
              +--------------------------------------------------------+
```

* `mux_array_2x1` gives the memory either the logic part's controller
  signals and clock TCLKL (MODS = 0) or the BIST's signals and TCLKT
  (MODS = 1). It has one 2:1 multiplexer per signal, including the clock.
  Change MODS only while the memory is idle: the clock multiplexer is plain
  logic and can glitch.
* `sdram_if_buffer` registers everything going into the memory and DOUT
  coming back, on the selected memory clock.
* The logic part's memory controller and the SDRAM core itself are not part
  of this RTL. Their signals are the `lg_*` and `mem_*` ports.
* BIST_ON is synchronised into TCLKT (`bist_clock_gen`). A test starts on its
  rising edge, in the third TCLKT cycle after BIST_ON rises. BIST_ON must fall
  and rise again before another test. The BIST runs on TCLKT with an enable
  rather than a gated clock.

## Modules

| module | role |
|---|---|
| `bist_pkg` | geometry, timing struct and minimum timing, command encoding, march table, phase/result enums |
| `mml_sdram_bist_top` | chip-level top: BIST, multiplexer array, interface buffer |
| `bist_core` | the BIST; wires the blocks below |
| `bist_controller` | test flow and march sequencing |
| `rw_ctrl_gen` | command scheduler with AC timing, one-deep request queue |
| `row_addr_gen`, `col_addr_gen` | up/down address counters (column carries into row) |
| `stage_refresh_counter` | march stage and pass; refresh timer, bank and count |
| `sdram_data_gen` | 5/A checkerboard data word |
| `dout_comparator` | read-tag delay line and compare |
| `error_type_analyzer` | per-phase failure record and verdict |
| `bist_clock_counter` | cycle counter (clock number) |
| `clock_number_gen` | store of the first failures |
| `bist_out_if` | ERR register, RED serialiser |
| `bist_clock_gen` | BIST_ON synchroniser, start and run |
| `mux_array_2x1`, `sdram_if_buffer` | memory-side switch and registers |

Top-level parameters: `ROW_W` = 9, `COL_W` = 8, `DATA_W` = 64 (must be even),
`TM` (timing struct, minimum values) and `REF_INT` = 1562.
`bist_core` also takes `MARGIN`, `RD_LAT` and `FAIL_DEPTH`. For another
clock rate, recompute `TM` and `REF_INT` in cycles of the new clock; fields
are 5 bits wide.

## Performance and size

At the default size, a defect-free memory finishes the interleave phase in
10,544,671 TCLKT cycles, about 105 ms at 100 MHz. That run does 1,572,864
reads and 1,572,864 writes and 6,750 refreshes. An interleaved
read-and-write group takes 11 cycles (tRP after the precharge bounds it) and
a single-operation group 9 cycles (tRC).

The flow for a failing memory runs up to seven more phases. Each
bank-by-bank phase takes about as long per bank as the interleave phase
takes for both. A full-size memory whose bank B is tRCD-weak goes through
all eight phases in 99,423,984 cycles (about 1 s at 100 MHz) with 63,651
refreshes. After coarse synthesis the whole top has about 940
flip-flops.

The published description of this method uses a longer march ("14N") and
quotes about 200 ms for the interleaved test of a good memory. It also quotes about 4,500 gates for
its BIST. This implementation's 12N march is shorter. Its 4-entry failure
store and 64-bit datapath are larger than that gate count suggests.

## Where this RTL departs from, or fills in, the method it implements

Decided here because the source description leaves them open:

* the three-strobe command encoding;
* the march elements beyond the four stages listed above, and with them the
  "14N" count (this design runs 12N);
* the column as the fast address;
* both banks using the same address in an interleaved group;
* the 5/A checkerboard rule;
* tCDL used as write recovery before PRE;
* tRC used as the refresh cycle time;
* the number of stored failures (4) and the RED frame format;
* the BIST_DONE pin;
* MODS as the mode select and BIST_ON as the start;
* one register stage in the interface buffer;
* restricting the relaxed and per-parameter phases to the banks that failed;
* the order of the parameter phases.

Differences in behaviour that a user should know about:

* Only tRC, tRAS, tRCD, tRP and tCCD get a per-parameter phase. tRRD is
  exercised only in the interleave phase, since the bank-by-bank phases never
  activate both banks together. tCDL has no phase of its own. It is at
  minimum in the first two phases and at minimum+1 in the rest.
* The relaxed margin is `MARGIN` cycles, 1 by default. The method allows
  "1 or more".
* Only the first `FAIL_DEPTH` failures of the whole flow are kept. A memory
  with many bad cells needs a deeper store, or several runs, to map them
  all for repair.
* The BIST issues no power-up sequence. The memory must already have had
  its initial pause (20 us after power-up) and reset before BIST_ON rises.

The end of the flow follows the written description. After "bank-by-bank at
minimum timing passes", the flow stops with the verdict "fails only
interleaved"; it does not run a further interleaved test.

## Simulation

All testbenches are self-checking. Each ends with
`TB_RESULT checks=N failures=M`. Build any of them with Verilator 5, for
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bist_pkg.sv tb/tb_mml_sdram_bist_top.sv --top-module tb_mml_sdram_bist_top
./obj_dir/Vtb_mml_sdram_bist_top
```

* `tb_mml_sdram_bist_top`: the end-to-end test. It runs ten small memories
  (16 x 8 words per bank) side by side: a good one, tRCD-, tRP-, tCCD-, tRC-
  and tRAS-weak ones, one tRC-weak in a single row, one that fails even
  relaxed, one that fails only interleaved, and one with a stuck-at cell. It checks each verdict, mask,
  ERR, stored address and the memory-side timing. It also counts that every
  verdict, refresh, the descending stage, the bank-by-bank and relaxed
  phases, and failure logging all occurred.
* `tb_full_size`: complete runs at the default size. A good memory runs
  beside one whose bank B is tRCD-weak, and that one goes through the whole
  flow. About 75 s in Verilator.
* `tb_<module>`: one per module.

The memory model `tb/sdram16m_model.sv` is behavioural, for simulation
only. It checks the protocol and measures every gap between commands. A
command that comes earlier than the model's own (per-bank, configurable)
timing fails, the way a cell array without margin would:

* a bad ACT spoils its row until PRE;
* a failing write is lost;
* a failing read returns the complement;
* an early PRE corrupts the last word written.

The model can also hold a stuck-at bit.
