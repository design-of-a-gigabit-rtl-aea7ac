# Gigabit ATM switch with recycling multicast

This is synthesizable SystemVerilog for an 8-port ATM switch. Its main ideas are these:

- **A shared-buffer switch element.** Each element has eight ports and a 40-cell buffer. Several elements can be combined into a multistage (Beneš) network.
- **Cell recycling for multicast.** Each pass through the switch makes at most two copies of a cell. A copy can be sent back ("recycled") to its port's input. There it is looked up again and copied again. A connection with *f* destinations therefore needs about log2 *f* passes. The per-port routing tables stay small and do not depend on the fan-out.

Each port has an input port processor (IPP) and an output port processor (OPP), connected by the switch element. The IPP frames link cells, buffers them, translates their VPI/VCI and sends them into the switch. The OPP puts cells back in order, queues them by traffic class and drops whole frames when congested. It then either transmits each cell or recycles it into its own IPP.

```
 link in ──► IPP ─┬──────────────► switch element ───────────────► OPP ──► link out
 (32-bit words)   │  RFRAMER→RCB─┐    (4 bit-slice planes,             RSQ→XMIT─┬─►XMB→XFRAMER
                  │  CYCB ──────►RCV→VXT→stage   40-cell buffer)                  │
                  └──────────── recycling path (OPP i → IPP i) ◄──────────────────┘
```

The top level, `wugs_switch`, is by default the 8-port system: one switch element and eight port-processor pairs. With `NPORTS = 64`, each plane becomes a three-stage Beneš network of 24 elements (`wugs_benes`). A single clock drives everything, and every part follows the same 16-tick cell cycle.

## Internal cell and the cell cycle

Inside the switch a cell is 16 words of 36 bits, one word per clock tick. At 120 MHz that is 3.84 Gb/s of data per port, or roughly 1.3 times the cell rate of a 2.4 Gb/s link. The layout is defined in `wugs_pkg.sv`:

| word | bits 35:32 (address column) | bits 31:0 (data) |
|---|---|---|
| 0 | BI (busy), RC (routing control) | STG (source trunk group), D, CYC[1:0], CS, BR, UD, PT, CLP |
| 1 | CI, ADR1 digit 3 | VXI1 (new VPI/VCI of copy 1), BDI1 |
| 2 | ADR1 digit 2 | VXI2, BDI2 |
| 3–4 | ADR1 digits 1, 0 | payload |
| 5–8 | ADR2 digits 3..0 | payload |
| 9–11 | 0 | payload |
| 12–14 | TS (time stamp) nibbles | payload |
| 15 | 0 | 0 |

The switch is built as four identical planes. Every plane sees the whole address column and one byte of the data. Because each plane works only from the address column, the four planes make the same decisions in lockstep. The OPP puts the cell back together without any coordination between planes.

Port numbers have 12 bits: four base-8 digits, enough for 4096 ports. A stage routes on one digit, set by `cfg_digit`. The 8-port top uses digit 0.

RC selects one of three routing modes:

- **Unicast:** send the cell to ADR1.
- **Copy-by-two:** send a copy to ADR1 and a copy to ADR2. If both addresses have the same digit at this stage, only one copy is made.
- **Copy-range:** send a copy to every output between the ADR1 and ADR2 digits.

When a cell is copied, the header modification circuit rewrites each copy's address pair, so that later stages route each copy as an ordinary cell. The second copy also gets CI = 1. CI tells the OPP which of the two VXI/BDI pairs, and which of the two recycle bits, belongs to that copy.

## Switch element (`wugs_se`, one plane)

Timing is relative to the cell cycle, tick 0–15:

1. **Skew compensation (`wugs_skuc`).** Each input is delayed by `MAX_SKEW − cfg_skew` ticks (`MAX_SKEW` = 2 ticks, about 16 ns). All inputs then line up at the internal phase `rtick = tick − 2`.
2. **Input crossbar.** At rtick 0, every input with BI set takes the lowest free buffer row. The rest of the cell is written into that row, one word per tick.
3. **Buffer control (BCC).** At rtick 15 the row's output mask is computed from RC and the address pair, or from the distribution circuit (`wugs_dstc`) in load-balancing mode. The row then becomes eligible.
4. **Output crossbar (`wugs_oxbar_arb`).** At tick 15, each output whose downstream grant `dg` is high picks the eligible row that has waited longest. The search compares waiting times one bit at a time, starting from the most significant bit. A row keeps competing for each output it still needs. It is freed in the cycle after its last copy has left.
5. **Header modification (`wugs_hmc`).** Copies are rewritten as the words stream out. Output words are registered, which adds one tick of skew to each downstream link.
6. **Grant generation (`wugs_ggc`).** At tick 14, as many upstream grants `ug` are raised as there are free rows. The grants start at a pointer that rotates, so no input is starved when the buffer is nearly full.

A cell spends at least two cell cycles in the element. The element loses no cells as long as senders obey `ug`. `drop_cnt` counts cells that arrived without a free row, and it stays at zero in all the tests.

## Three-stage network (`wugs_benes`, 64 ports)

Eight-port elements make an *N*^k-port network in 2k−1 stages. Here k = 2, giving three stages:

- **Stage 1** runs in distribution mode. Each element spreads the cells arriving in a cycle over its eight outputs, with a rotating start. Any traffic pattern is thus spread evenly over the eight middle elements.
- **Stage 2** routes on base-8 digit 1 of the port number, which picks the last-stage element.
- **Stage 3** routes on digit 0, which picks the output of that element.

A copy-by-two cell is copied in the first routing stage where its two addresses differ.

Wiring: output *j* of element *i* feeds input *i* of element *j* in the next stage. Grants travel back along the same links. Every inner link carries one tick of skew.

An unloaded cell crosses in six cell cycles, two per stage. Cells of one connection can take different middle elements, so under load they reach the output out of order. The output port's resequencer restores the order, provided the age threshold covers the worst delay through the network.

Only the k = 2 network is built. Larger systems (512 or 4096 ports) would need the recursive wiring of more stages.

## Input port processor (`wugs_ipp`)

- **RFRAMER** gathers 13 link words into a cell: the header word, then 12 payload words.
- **RCB** is a 32-cell receive buffer for link cells. **CYCB** is a 16-cell buffer for recycled cells.
- **RCV** alternates between the two buffers when both hold a cell. It also runs input congestion control. While the RCB holds `cfg_rcb_thresh` cells or more, a timer is reloaded with `cfg_disc_time` clocks. While the timer runs, cells with CLP = 1 or CS = 0 are dropped.
- **VXT** is a 1024-entry translation table, split by the bounds register `cfg_bound`:
  - The VPI selects a path entry.
  - If that entry's VPT bit is clear, it routes the cell and the VCI is kept. This is a switched virtual path.
  - If VPT is set, the entry at `cfg_bound + VCI` routes the cell.
  - An entry with BI = 0 is an error.
  - An entry marked RCO (recycled cells only) is also an error when the cell came from the link.
  - SC forces CLP to 1, and every use of an entry increments its 32-bit cell count.
- **Staging.** A translated cell waits in a staging register until the switch grants it at tick 15. At that moment its time stamp is set to the current cell time. It is then serialized into 16 words.

STG is the IPP's port number for cells from the link. A recycled cell keeps the STG it first entered with.

## Output port processor (`wugs_opp`)

- **Deserializer.** Collects the 16 words of a cell from the switch element's registered outputs.
- **RSQ** is a 128-slot resequencer. It releases the oldest cell whose age (`now − TS`) has reached `cfg_age_thresh`, at most one per cell cycle. 64 cell times is the intended setting. Cells that took different paths or waited different times leave in the order they entered the switch. `dg` toward the switch is high while at least two slots are free.
- **XMIT** processes each cell as follows:
  - The cell's CI picks its VXI (new VPI/VCI), its BDI and its recycle bit `CYC[CI]`.
  - A copy with its recycle bit set goes to the IPP's CYCB.
  - Otherwise, if UD is set and STG equals this port, the copy is dropped. This is upstream discard: a many-to-many connection does not echo traffic back to its sender.
  - Otherwise the copy goes to the XMB.
- **XMB** holds a 32-cell queue for continuous-stream traffic (CS = 1) and a 64-cell queue for discrete-stream traffic. The continuous queue has strict priority. It applies two discard rules:
  - **CLP discard.** A discrete cell with CLP = 1 is dropped once the discrete queue holds `cfg_clp` cells.
  - **Block discard** is early packet discard with hysteresis. A congestion flag rises when the discrete queue reaches `cfg_hi` cells and falls when it drops to `cfg_lo`. Each non-zero BDI has one state bit, which samples the flag only at the end of an AAL-5 frame. So a frame is either sent whole or dropped whole.
- **XFRAMER** sends 13 words per cell. It advances only while `tx_ready` is high.

## Multicast by recycling: a worked example

The end-to-end test programs port 3's table as follows:

1. A cell on port 3 is copied by two: one copy to output 0, the other to output 7.
2. The copy for output 7 has its recycle bit set, so OPP 7 hands it back to IPP 7, with its new VCI 0x71.
3. Port 7's entry for that VCI is marked recycled-only. It copies the cell to outputs 1 and 4, each copy with its own new VPI/VCI.

So one arriving cell leaves on three links in two passes, and nothing goes out on link 7.

## Host access

In the original design, remote control reads and writes the tables through control cells (VPI 0, VCI 32). Their payload format is not published. Instead, this top has a host port that reads and writes whole VXT entries of the port chosen by `h_port`:

| Operation | Signals | Timing |
|---|---|---|
| Write | `h_we`, `h_addr`, `h_wdata` | one clock |
| Read | `h_re` | result on `h_rdata` one clock later |

The counters are brought out as ports:

- cells sent and received
- translation errors
- congestion, upstream, block, CLP and overflow discards
- cells lost in each plane

## Parameters and configuration

| Parameter (module) | Default | Meaning |
|---|---|---|
| `NPORTS` (`wugs_switch`) | 8 | 8: one element; 64: three-stage network per plane |
| `SLOTS` / `SE_SLOTS` | 40 | cell buffer rows per switch element |
| `MAX_SKEW` (`wugs_se`) | 2 | ticks of link skew absorbed |
| `AGE_W` (`wugs_se`) | 8 | waiting-time counter per row |
| `VXT_ENTRIES` | 1024 | translation table size |
| `RCB_DEPTH`, `CYCB_DEPTH` | 32, 16 | IPP buffers |
| `RSQ_SLOTS` | 128 | resequencer slots |
| `CS_DEPTH`, `DS_DEPTH` | 32, 64 | XMB queues |

Configuration inputs of the top:

- `cfg_skew` per input
- `cfg_bound` (typically 256)
- `cfg_rcb_thresh` and `cfg_disc_time`
- `cfg_age_thresh` (64)
- `cfg_xmb_hi`, `cfg_xmb_lo` and `cfg_xmb_clp`

The link side is 32-bit words: one header word `{GFC, VPI, VCI, PT, CLP}` followed by 12 payload words. `rx_soc` and `tx_soc` mark the first word of a cell.

## What follows the original design and what does not

These parts follow the original design:

- the 16 × 36-bit cell with its field names
- four planes with 12-bit paths
- the 40-cell shared buffer with oldest-first output arbitration
- base-8 digit routing with copy-by-two and copy-range
- recycling multicast with two copies per pass
- the VXT with its bounds register and the BI, VPT, SC, RCO and CC fields
- upstream discard by STG and UD
- time-stamp resequencing
- the continuous and discrete queues
- frame-level block discard with hysteresis
- RCB-threshold congestion discard

These details are this design's own choices:

- bit positions inside the cell's control groups, and the CI flag
- all buffer depths except the 40-cell element buffer
- the table size
- the slot allocation order and grant rotation
- the header rewrite rules for copies
- the distribution algorithm
- the two-cell minimum latency of the element
- the link word format and `tx_ready` flow control
- the host port

These features are not included:

- **Transitional time stamping.** This mechanism reorders cells around a multicast reconfiguration, and its rule is not published.
- **Control-cell decoding.** The host port replaces it.
- **Physical interfaces:** Utopia, G-link and dual G-link.
- **Link parity** in the switch element.
- **HEC handling.**
- **Systems beyond 64 ports.** Only the three-stage network is built, so 512-port and 4096-port systems cannot be configured.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -Itb rtl/wugs_pkg.sv tb/tb_wugs_switch.sv --top-module tb_wugs_switch
./obj_dir/Vtb_wugs_switch
```

The testbenches are written for a two-state simulator. They reset or initialize everything they read.

`tb_wugs_switch` runs the top at its default parameters and takes about 20 s. It clears and programs all eight tables, then sends these flows:

- a translated unicast circuit
- a switched virtual path
- a copy-by-two multicast
- the two-pass recycled multicast described above
- a many-to-many flow with upstream discard
- an unprogrammed circuit
- an overload of four inputs onto one output whose link accepts only one word in three

For every cell it checks the output port, the new header, the payload and the per-flow order. It also checks that block-discarded frames never arrive in part.

It counts each mechanism and fails if any of them never happened:

- copies
- recycling
- upstream discards
- translation errors
- output contention
- withheld grants at the input
- input congestion discards
- CLP discards
- block discards

`tb_wugs_switch64` runs the 64-port configuration and takes several minutes. Port 0 sends a flow to port 63 while fifteen other inputs overload the same last-stage element. The test requires that cells of port 0's flow reach the output port processor out of order, and that they leave it in order. It also covers multicast copies made in the middle and last stages, and a recycled multicast. `tb_wugs_benes` tests one network plane on its own, including its six-cycle latency.
