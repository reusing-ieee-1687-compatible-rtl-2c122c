# Sharing IEEE 1687 instruments over a system bus

Embedded instruments such as BIST engines, sensors and monitors are usually
reached through the chip's JTAG port and an IEEE 1687 (IJTAG) scan network.
Standard tools drive them: a retargeter turns instrument-level read/write
procedures into JTAG scan vectors, using a description of the network.
In a fielded product it is often easier to reach the on-chip processor over
a network than to get at the JTAG port. So the same instruments should
also be reachable over the system bus.

The obvious way is a multiplexer in front of every instrument, choosing
between its TDR and a bus register. That does not scale, because every
instrument needs its own bus port or long parallel wires.

This RTL builds the two alternatives. In both, the instruments move to the
far side of the system bus. The 1687 network still looks, to the JTAG port
and to the retargeter, exactly as if they were wired directly to their TDRs:

* **Parallel Transfer.** The TDRs stay in the scan network. Only their
  parallel data ports are carried over the bus: the TDR update contents go
  one way, and the instrument outputs go back to the TDR capture inputs.
* **Serial Transfer.** A whole network segment, with its TDRs, muxes and
  control bits, moves across the bus. Only four scan signals cross it,
  sampled and replayed: TCK, a gated TMS, SI and SO. A local copy of the
  TAP state machine next to the segment regenerates the segment's
  capture/shift/update controls.

Both schemes work only if the system clock is fast enough compared with
TCK. The bus round trip must fit inside the time the JTAG tools allow
between an update and the next capture. The ratio K = f_clk / f_TCK is the
key design parameter; see [Timing: the clock ratio K](#timing-the-clock-ratio-k).

## The example network

Both chips use the same small 1687 network behind an IEEE 1149.1 TAP.
Every TDR is 16 bits, and every instrument is 16 inverters: what is written
comes back inverted.

```
TDI ─ TDR1(Inst1) ─┬─ mux/C1 ─┬────────────── segment S ───────────────┬─ mux/C4 ─ TDO
                   └─(bypass)─┘ TDR2(Inst2) ─ mux/C2 ─ TDR3(Inst3) ─ mux/C3 └─(bypass)─┘
```

* Each mux is followed by its 1-bit control register C.
* C = 0 keeps the guarded path (a TDR, or all of S for C4) on the chain.
  C = 1 bypasses it.
* All registers reset to 0, so after reset the full chain is active: TDR 1, C1, TDR 2, C2, TDR 3,
  C3, C4, 52 bits.
* A TDR reacts to the DR controls only while it is on the active path.
  For example, TDR 2 is selected when the network is selected, C4 = 0 and
  C2 = 0.
* The segment boundaries (into and out of S) each have a lock-up stage
  clocked on the falling edge of TCK. Scan data crossing them therefore
  changes on the falling edge, like TMS and TDI from the tester. The serial
  scheme relies on this.

The TAP has a 2-bit instruction register:

| Code | Instruction | Effect |
| --- | --- | --- |
| `10` | `IJTAG` | Puts the network between TDI and TDO. |
| `11` | `BYPASS` | Puts a 1-bit bypass register there. This is the reset value. |
| `00`, `01` | — | Also select bypass. |

The IR captures `01`.

## Parallel Transfer (`par_transfer_chip`)

TDR 2 and TDR 3 stay in the scan chain, but Inst 2 and Inst 3 sit behind the
bus. The two 16-bit update stages form one 32-bit word: TDR 2 is in bits
15:0 and TDR 3 in bits 31:16. That word is what crosses the bus in each
direction.

**TAP to instrument (`cdc_update`, `tap_side_logic`).** TCK is not free
running, so the clock crossing is driven entirely from the system clock:

1. On the falling TCK edge in Update-DR, the TDR update stages load. On the
   same edge, a TCK-side flip-flop registers the Update-DR decode.
2. That flag goes through a two-flip-flop synchroniser into the clk domain.
3. The synchronised flag becomes the clock enable of a bank of "S"
   flip-flops that copy the 32-bit update word. When the enable arrives,
   the update stages have been stable for at least two clk cycles, so the
   copy is coherent.
4. The enable may stay high for several clk cycles, and the same word is
   copied repeatedly. That is harmless: the TAP-side Logic compares the S
   word with the last word it sent every cycle, and writes only on a change.

The write is one AXI4-Lite transaction to the DATA register of the
Shared-side Logic. That register drives the instrument inputs directly.

**Instrument to TAP (polling).** The TAP-side Logic issues a read of DATA
every `POLL_PERIOD` = 17 clk cycles. The Shared-side Logic samples the
instrument outputs in the cycle it accepts the read address. The returned
word is held on the capture inputs of TDR 2 and TDR 3 until the next poll
returns. The next Capture-DR takes whatever the latest poll brought back.

Polling cannot be synchronised to the tester. A write followed by a read of
the same TDR is therefore only correct if the update-to-capture time covers
three things in sequence: the write reaching the instrument, a whole poll
period, and the returned data reaching the TDR. This is the condition that
sets K.

A TDR that is bypassed keeps its contents. The same old value is then
simply sent again, or not sent at all, because nothing changed.

## Serial Transfer (`ser_transfer_chip`)

Here the whole segment S moves across the bus, together with a **Local TAP
Controller**. This is the same `tap_fsm` as the chip TAP, clocked by the
replayed TCK. S has no instruction register; only the FSM is needed.

**What crosses the bus.**

* Towards the segment: TCK, G-TMS and SI.
  * G-TMS = TMS AND (network selected and C4 = 0), i.e. TMS gated by the
    select of segment S.
  * SI is the lock-up output of the network in front of S.
  * The three bits pass through a two-flip-flop synchroniser
    (`sync_2ff`). The TAP-side Logic writes every change of the 3-bit
    sample to DATA.
  * The Shared-side Logic's DATA register drives L-TCK, L-TMS and L-TDI
    directly.
* Back from the segment: L-TDO, the lock-up output of S, is polled every
  17 clk cycles. It drives SO, which feeds mux C4.

**Keeping the two state machines in step.**

* While S is not selected, G-TMS is 0, so the local FSM walks to
  Run-Test/Idle and parks there.
* S can only become selected on the falling TCK edge of an Update state:
  * Update-DR, when C4 is set to 0.
  * Update-IR, when the IJTAG instruction is loaded.

  At that moment the chip FSM sits in Update-DR or Update-IR, and the local
  FSM in Run-Test/Idle. All three states have the same TMS arcs (1 to
  Select-DR-Scan, 0 to Run-Test/Idle), so from the next rising edge on the
  two FSMs move together.
* S is deselected the same way, on an update or by the chip TAP's reset.
  The local FSM then falls back to Run-Test/Idle.
* An IR scan while S is selected takes the local FSM through the IR branch
  in step with the chip. With no IR on the local side, nothing happens
  there.
* Segment S is reset by the system reset and whenever the local FSM is in
  Test-Logic-Reset.

**Why the edge count matters.** TMS, TDI, SI and SO all change on the
falling TCK edge, and the FSMs and shift registers act on the rising edge.
Each TCK period therefore holds exactly two events to replay: the falling
edge with its new data, then the rising edge. Each replay is a bus write.
The rising edge must not overtake the data change, and L-TDO must be back
before the chip's next rising edge. Because every change is a separate
write, and a write is sent only when the previous one has finished, the
order is kept.

The tester moves TMS/TDI a little after the falling edge. A falling edge can
then be sampled as two changes and sent as two writes. That costs one extra
write time, and the measured delays below include it.

## The system bus

* **Protocol.** AXI4-Lite with 32-bit address and data (`axil_pkg`:
  `axil_req_t` / `axil_rsp_t`).
* **Shared-side register map.**
  * `0x0` DATA: a write drives the instruments or L-TCK/L-TMS/L-TDI; a read
    samples the instrument outputs or L-TDO.
  * `0x4` SCRATCH: absorbs the background traffic.
  * Anything else answers SLVERR.
* **Interconnect (`axil_interconnect`).** Two managers share one
  subordinate through one address channel ("shared address, multiple
  data").
  * Arbitration is fixed priority: Manager 1 write, Manager 1 read,
    Manager 2 write, Manager 2 read.
  * The winner holds the address channel until the subordinate accepts.
  * A write and a read can be in flight together.
  * Manager 1, the TAP-side Logic, has priority, but must still wait when
    Manager 2 already holds the address channel. That is the bus contention
    the timing analysis has to cover; `m1_wait` flags it.
* **Manager 2 (`axil_traffic_gen`).** Writes an incrementing word to
  SCRATCH and reads it back, looping with 3 idle cycles between
  transactions. `tg_err` latches any mismatch.

## Timing: the clock ratio K

The delay model follows a write and a poll through the design, counting
system clock cycles:

| Delay | From | To |
| --- | --- | --- |
| wt1 | Update-DR falling edge (parallel), or TCK edge (serial) | TAP-side Logic issues the write |
| wt2 | Write issued | Shared-side Logic accepts it (word on its outputs) |
| wt3 | Word on the Shared-side outputs | Instrument (or local TAP) inputs |
| wt4 | Instrument inputs | Immediate instrument response |
| pt1 | Poll issued | Shared-side Logic accepts the read |
| pt2 | Read accepted | Instrument outputs sampled |
| pt3 | Outputs sampled | Response offered on the read data channel |
| pt4 | Response offered | Word stored by the TAP-side Logic |

The conditions assume no extra wait cycles in the test procedure (T_L = 0).
In the 1687 procedure language, PDL, those wait cycles are an `iRunLoop`
between two groups of reads and writes. T_P is the poll period.

| Condition | Case |
| --- | --- |
| T_P ≥ pt1+pt2+pt3+pt4 | A poll finishes within one period. |
| 2K > Σwt + T_P + pt3 + pt4 | Write then read of the same TDR (the binding one). |
| 5K > Σwt | Write then write. |
| 5K > T_P + pt3 + pt4 | Read then read. |
| K > 2 (wt1+wt2+wt3 + T_P + pt3 + pt4) | Serial scheme: two replayed samples per TCK period. |

The write-then-read condition: the shortest update-to-capture path through
the TAP FSM (Update-DR → Select-DR-Scan → Capture-DR) is 2 TCK periods.
Inside it, the write must land, one full poll period must pass, and the
answer must come back.

`tb_bus_timing` measures these delays on this RTL. It runs with bus
contention from Manager 2, keeps the worst case of each delay and checks
the conditions:

| | wt1 | wt2 | wt3 | wt4 | pt1 | pt2 | pt3 | pt4 | smallest K allowed |
| --- | --- | --- | --- | --- | --- | --- | --- | --- | --- |
| Parallel, this RTL | 4 | 4 | 0 | 0 | 4 | 0 | 1 | 0 | 14 |
| Serial, this RTL | 8 | 4 | 0 | – | 4 | 0 | 1 | 0 | 61 |
| Parallel, published FPGA build (AXI Interconnect IP) | 7 | 7 | 2 | 0 | 9 | 1 | 1 | 6 | 21 (K > 20) |
| Serial, published FPGA build | 6 | 7 | 2 | – | 9 | 1 | 1 | 6 | 79 (K > 78) |

This RTL's own interconnect and subordinate are faster than a commercial
AXI interconnect, so its bounds are lower. The testbenches still run the
chips just above the published bounds: K = 21 for Parallel and K = 80 for
Serial.

A sweep of the chip testbenches over K shows the analysis is
conservative, with real margin:

* **Parallel.** Passes at K = 10, fails at K = 8.
* **Serial.** Passes at K = 50, fails at K = 40.

The poll period stays at the published 17 cycles. Polling faster lowers K
but loads the bus more.

`tb_clock_ratio` keeps both sides of the bound under test:

* At exactly the bound (K = 14 and K = 61), the chips run the whole
  procedure without a mismatch.
* Well below it (K = 6 and K = 30), they read stale or shifted data.
* The parallel chip at K = 6 passes again once the test procedure idles
  3 TCK cycles after each scan. The write-then-read condition becomes
  (2 + T_L)·K > 26, and 5·6 = 30 > 26. Wait cycles in the procedure are
  the alternative to a faster system clock. They cost test time only where
  they are inserted.

To repeat other points of the sweep, change `K` in
`tb/tb_par_transfer_chip.sv` or `tb/tb_ser_transfer_chip.sv`.

## Module map

```
shared_instr_top
├── par_transfer_chip                 Parallel Transfer
│   ├── jtag_tap ── tap_fsm           chip TAP, 2-bit IR, bypass
│   ├── ijtag_network                 TDR1+Inst1, C1, C4, lock-up into S
│   │   ├── ijtag_tdr, inverter_instrument
│   │   └── ijtag_mux_ctrl (x2)
│   ├── subnetwork_s                  TDR2, C2, TDR3, C3, lock-up out of S
│   ├── cdc_update                    Update-DR crossing, S flip-flops
│   ├── tap_side_logic                change-triggered writes, polling (Manager 1)
│   ├── axil_traffic_gen              Manager 2
│   ├── axil_interconnect             shared address channel, M1 priority
│   ├── shared_side_logic             AXI subordinate, DATA/SCRATCH
│   └── inverter_instrument (x2)      Inst 2, Inst 3 behind the bus
└── ser_transfer_chip                 Serial Transfer
    ├── jtag_tap, ijtag_network       as above, S replaced by the bus link
    ├── sync_2ff                      TCK, G-TMS, SI into clk domain
    ├── tap_side_logic, axil_traffic_gen, axil_interconnect, shared_side_logic
    ├── tap_fsm (u_local_tap)         Local TAP Controller on L-TCK/L-TMS
    └── subnetwork_s + inverter_instrument (x2)
```

Packages: `jtag_pkg` (TAP states, IR codes) and `axil_pkg` (bus structs,
register offsets, responses).

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself, and has a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/jtag_pkg.sv rtl/axil_pkg.sv tb/tb_shared_instr_top.sv \
  --top-module tb_shared_instr_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. The packages must come first;
the other modules are found through `-I`.

| Testbench | What it shows |
| --- | --- |
| `tb_shared_instr_top` | The whole design at default sizes. Both chips run the inverter test procedure 200 times with bus traffic. |
| `tb_bus_timing` | Measures the delay table above and checks every timing condition against the clock ratios used. |
| `tb_clock_ratio` | Runs each chip at its computed bound (must pass) and well below it (must fail). Also runs the parallel chip below its bound with wait cycles added (must pass). |
| `tb_par_transfer_chip`, `tb_ser_transfer_chip` | One chip each, same procedure. |
| `tb_<module>` | One per module, checked against values computed independently in the testbench. |

In `tb_shared_instr_top`:

* The inverter test procedure on TDR 2 and TDR 3 together:
  * Write AAAA then read it back, expecting 5555.
  * Then 5757, 1234 and 0000.
  * The first read expects FFFF, since TDRs reset to 0.
* Also exercised: the C4 segment bypass, the C2 TDR bypass and the BYPASS
  instruction.
* It also counts each mechanism and fails if one never happened: CDC
  transfers, bus writes, polls, bus contention, L-TCK replay, local FSM
  parking, and the three bypass modes.

It runs in a few seconds.

`tb/jtag_bfm.sv` is the JTAG driver: a reset, IR and DR scans, moving
TMS/TDI just after the falling TCK edge. `tb/ijtag_seq.sv` is the test
procedure, written as explicit scan vectors, the form a retargeter would
produce. The expected TDO bits are computed in the testbench from the
network layout.

## Where this RTL departs from the published design

* **Bus.** The published build used an AXI interconnect IP in shared-address
  mode and a traffic-generator IP. Here both are small AXI4-Lite modules of
  this design's own. The shared address channel and Manager 1 priority are
  kept, but the register map and handshake timing are its own. Bus delays
  are therefore shorter; see the table above.
* **Widths.** 32-bit bus data is this design's choice. It holds both
  16-bit TDRs, so one write or one poll moves the whole shared word. A
  wider shared segment would need a wider bus word or several registers.
* **TAP.** The instruction register (2 bits, codes above) is this design's
  own. Only the fact that an instruction selects the 1687 network is given.
* **Lock-up stages** are falling-edge flip-flops rather than latches. They
  give the same falling-edge timing. Between two rising-edge stages they add
  no bit to the scan length, just as a latch would not. Segment S tested on
  its own is the exception: its output stage feeds the TAP's falling-edge
  TDO flip-flop directly, which adds one bit, and `tb_subnetwork_s`
  accounts for that.
* **Synchronisers.** Two flip-flops deep, in both schemes.
* **TAP-side Logic.**
  * A change seen while a write is still in flight is sent by the next
    write; intermediate values are merged.
  * A poll that falls due while the previous read is outstanding is
    skipped.
* **Not built.**
  * The external JTAG controller and the retargeting software; the
    testbench driver stands in for them.
  * The on-chip processor; Manager 2 takes its place on the bus.
  * The simple mux-per-instrument arrangement the two schemes are compared
    against.

## Changing the design

* **`W`** (TDR length, default 16): a parameter of the chips and network
  modules. For Parallel Transfer, 2·W must fit the 32-bit bus word.
* **`POLL_PERIOD`** (default 17): sets T_P. Lower values tighten K but load
  the bus more.
* **A different bus.** It only has to reach `tap_side_logic` and
  `shared_side_logic`. Re-measure with `tb_bus_timing`, then check the
  conditions above for the K you intend to run at.
