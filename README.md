# Smart Memory Cube logic base: AXI interconnect and vault controllers

A Hybrid Memory Cube (HMC) stacks DRAM dies on a logic die. The logic die
holds serial link controllers at the front and one DRAM controller per
vertical slice ("vault") at the back. The link-to-vault interconnect on that
die is left open by the HMC standard.

This design fills that gap with a high-bandwidth, low-latency AXI4
interconnect. It also gives one extra AXI master port to a
processor-in-memory (PIM) device on the same die. Arbitration ensures that
the PIM only gets bandwidth the links leave unused. The SystemVerilog
covers:

- the interconnect;
- the sixteen vault controllers, down to the DDR command and data pins of
  each vault.

The serial link controllers, the PIM itself and the DRAM dies are outside
the RTL:

- The link and PIM ports are plain AXI4 ports on the top module.
- Each vault's DRAM bus is a set of top-level pins.

The reference configuration is the 2011 HMC demonstrator, and every default
parameter matches it:

| Item | Value |
|---|---|
| Link ports | 4 |
| PIM ports | 1 |
| Vaults | 16 |
| Banks per vault | 8 |
| Row (page) size | 256 bytes |
| Memory | 4 MB per bank, 512 MB in total |
| Vault DRAM data bus | 32 bits, DDR, at 1.25 GHz (10 GB/s per vault) |
| Interconnect | 256-bit data, 1 GHz |

## Block structure

```
smc_top
├── log_interconnect                  (interconnect clock)
│   ├── per master port m = 0..4:  issue_logic → addr_remapper (AR), addr_remapper (AW) → master_block
│   └── per vault port  v = 0..15: slave_block (hier_arbiter ×2 → rr_arbiter)
└── vault_controller ×16              (interconnect clock | DRAM clock)
    ├── vc_axi_if                     AW/AR round-robin into CMDQ, W into WData, R/B out of RData
    ├── async_fifo ×3                 CMDQ, WData FIFO, RData FIFO (dual clock)
    └── vc_master_fsm                 (DRAM clock)
        ├── bank_fsm ×8               one read-write FSM per bank
        └── dram_mgmt_fsm             power-up, refresh, power-down
```

`smc_pkg` holds the shared constants and types:

- the AXI channel structs `axi_req_t` and `axi_rsp_t`;
- the vault-internal FIFO entry types;
- the DRAM command struct and the `{RAS#, CAS#, WE#}` encode and decode
  functions.

## The interconnect

The interconnect is a logarithmic interconnect, a full crossbar built as
arbitration trees. Each slave port has a tree and each master port has a
response tree. It has been widened to the five AXI channels. Requests and
responses are combinational from port to port. Only these hold state:

- the arbiter pointers;
- the write and read-burst locks;
- the outstanding-transaction counters.

An accepted request therefore reaches the vault controller's FIFOs in the
same cycle.

**Issue logic.** Each master port counts its outstanding transactions.
- A read counts from AR acceptance until the R beat with RLAST.
- A write counts from AW acceptance until its B response.
- No new AR or AW enters while MoT (maximum outstanding transactions, `MOT`,
  default 32) are outstanding.
- If only one slot is left and both channels want it, AR wins.

MoT is what keeps the network short of saturation. Its value is a tuning
knob, not an architectural constant. 32 was chosen as follows:

- With 32, four ports streaming random 256-byte reads get about 88 GB/s.
- With 16, they get about 80 GB/s.

**Address remapping.** The vault controllers see addresses in the canonical
order `[RC | BA | VA | OF]`:

| Field | Width | Meaning |
|---|---|---|
| OF | 8 bits | offset in the 256-byte row |
| VA | 4 bits | vault |
| BA | 3 bits | bank |
| RC | 14 bits | row |

`remap_mode_i` selects the order in which the master's address holds RC,
BA and VA above OF:

| Mode | Order |
|---|---|
| 0 | RC-BA-VA (HMC default) |
| 1 | RC-VA-BA |
| 2 | BA-RC-VA |
| 3 | BA-VA-RC |
| 4 | VA-RC-BA |
| 5 | VA-BA-RC |
| 6, 7 | same as 0 |

The remapper only rewires bits. Which mode is best depends on the access
pattern: streaming workloads prefer the default, while pointer-chasing ones
may gain from spreading rows over vaults. The mode is one static input
shared by all ports. Changing it remaps memory, so data written under one
mode must be read under the same mode.

**Master block.** Each master port has one. It:
- decodes the vault from the remapped address bits VA;
- raises AR or AW valid only at that vault's slave block;
- treats a write as one packet. After the AW is accepted, the W beats follow
  to the same vault, and no new AW leaves until WLAST. W must not precede
  its AW.

On the way back, R and B responses from all vaults are arbitrated
round-robin for this master. An R burst keeps the grant until RLAST, so
beats of different bursts never interleave on a port.

**Slave block (HPP/LPP).** Each vault port arbitrates AR and AW separately
in two stages:

1. A round-robin among the main link ports, and separately a round-robin
   among the PIM ports.
2. A fixed-priority stage: any main request beats any PIM request.

The main ports are the high-priority ports (HPP) and the PIM ports the
low-priority ones (LPP). The PIM thus only receives cycles that no link
wanted. Other details:

- A write that wins AW locks the W multiplexer to its master until WLAST.
  The next AW is not granted before then.
- The slave block writes the winning master's index into ID bits [7:4], so
  master IDs may use only bits [3:0].
- R and B responses are routed back by those bits. The master block clears
  them again before the response leaves the interconnect.
- `pim_lost_o` flags cycles in which a PIM request lost to a main request.

## The vault controller

A vault controller bridges two clock domains:
- its AXI slave port runs on the interconnect clock;
- the DRAM side runs on the DRAM clock (tCK 0.8 ns).

Three dual-clock FIFOs with Gray-coded pointers and two-flop synchronisers
sit at the boundary:

| FIFO | Entries | Contents |
|---|---|---|
| CMDQ | 8 | commands |
| WData FIFO | 16 | write beats |
| RData FIFO | 32 | read beats and write responses, tagged |

Each FIFO is first-word-fall-through. `vc_axi_if` round-robins between AW
and AR when pushing into the CMDQ. Because the CMDQ holds writes in arrival
order, the WData FIFO holds their data in the same order.

### Master FSM: in-order service with one command of look-ahead

`vc_master_fsm` serves the CMDQ strictly in order.

**Column accesses.** An AXI burst (1 to 8 beats of 256 bits, never crossing
its 256-byte row) becomes column accesses. Each access is a BL16 burst of
the 32-bit bus: 64 bytes, two beats, 8 DRAM clocks. The column address is
the beat index times 8.

**Command choice.** At most one command is issued per clock. The choice, in
order:

1. The management FSM, whenever it holds the bus (refresh, power-down exit,
   initialisation).
2. For the head command: RD or WR if its row is open and all of these allow
   it: tRCD, tCCD, the read/write turnaround, write data present in the
   WData FIFO, and response-FIFO space. Otherwise PRE if another row is open
   (open page), or ACT if the bank is idle.
3. Latency hiding: if the head command has nothing to issue this clock, the
   bank of the *next* CMDQ entry (when it is a different bank) gets its ACT,
   or in open page its PRE on a row miss. The next burst's tRCD thus
   overlaps the current data transfer, which is what keeps a vault streaming
   random closed-page traffic.

**Page policies.** `open_page_i` selects the policy for all vaults:

- **Closed page** (the HMC policy, `open_page_i = 0`): the last column access
  of each transaction carries auto-precharge (A10).
- **Open page:** rows stay open until a miss or a refresh.

**Response-FIFO credit.** A RD or the final WR is only issued if the
response FIFO is guaranteed to have room for everything in flight:

    level + reads in flight + write responses pending + beats of this access ≤ RESP_DEPTH

The DRAM side therefore never drops data, even when the interconnect stalls
a vault's R channel. This happens when that master is receiving a burst
from another vault.

**Bank FSMs.** Each `bank_fsm` tracks idle / open (row) / auto-precharge
pending / precharging. It enforces, with down-counters:

- tRCD (ACT to column);
- tRAS (ACT to PRE);
- write recovery (tWR after the last write data);
- read to precharge (BL/2);
- tRP.

The master FSM only asks each bank whether an ACT, a column command or a
PRE is legal now.

### Pins and data timing

Commands leave a register one clock after the decision, as
`{CKE, CS#, RAS#, CAS#, WE#, BA, A}` with the JEDEC encodings:

| Command | {RAS#, CAS#, WE#} |
|---|---|
| ACT | 011 |
| RD | 101 |
| WR | 100 |
| PRE | 010 |
| REF | 001 |
| MRS | 000 |

A10 means auto-precharge on RD/WR and "all banks" on PRE.

Each pin-level DRAM clock carries 64 bits of data: the rising-edge and
falling-edge words of the 32-bit DDR bus, rising edge in the low half.
Two delay lines align the data with the commands:

- **Writes:** the WR's data words are placed into a write line of
  T_WL + BL/2 slots. Word *i* of a column access appears on `dq_o` T_WL + *i*
  clocks after the WR is on the pins, with `dq_oe_o` high.
- **Reads:** a capture line marks the clocks T_CL + *i* after each RD.
  Captured words are assembled four at a time into 256-bit beats.

A small queue of reads in flight (four entries) supplies the ID, beat count
and RLAST of each captured access. A write response is pushed once the final
WR of the write has been issued, in a clock with no read beat to push.

Defaults in DRAM clocks (tCK = 0.8 ns):

| Parameter | Clocks | Source |
|---|---|---|
| tRCD | 18 | published HMC value |
| tRP | 18 | published HMC value |
| tCL | 18 | published HMC value |
| tRAS | 35 | published HMC value |
| tWR | 19 | published HMC value |
| tCCD | 7 | published HMC value |
| BL | 16 | this design's choice |
| T_WL | 1 | this design's choice |
| tWTR | 2 | this design's choice |

The published values are the ns figures rounded up to whole clocks.

### Management FSM

`dram_mgmt_fsm` takes the command bus for four jobs:

- **Power-up:** CKE low for T_INIT clocks, then precharge-all, two REF,
  then MRS.
- **Refresh:** every T_REFI = 9750 clocks (7.8 µs). It waits until the
  banks may be precharged, precharges all open banks, waits until all are
  idle, issues REF and waits tRFC = 138 clocks.
- **Power-down:** CKE drops after PD_IDLE = 64 idle clocks with all banks
  closed.
- **Power-down exit:** when work arrives or a refresh falls due, with tXP
  before the next command.

T_INIT is 200 clocks, far shorter than a real device needs, so that
simulations reach traffic quickly.

## Timing and performance

These are measured figures from the included testbenches, at the defaults.

| Measurement | Result |
|---|---|
| Unloaded read, idle bank, closed page (DRAM side) | 41 DRAM clocks from CMDQ head to first beat in the response FIFO: 1 (command register) + 18 (tRCD) + 1 + 18 (tCL) + 3 (beat assembly) |
| Unloaded read, end to end (AR accepted to RLAST) | about 40 ns for one beat; about 60 ns for a full 8-beat burst |
| Random 256-byte reads from all four link ports, closed page | about 88 GB/s while all ports are busy (requirement: 80 GB/s) |
| Same-row stream into one vault, open page | 100 % of the 10 GB/s bus between refreshes |
| Random reads with zero row bits (all row hits), open page | about 88 GB/s |
| 8 link ports, 32 vaults (`NMAIN=8, NVAULT=32`), same random stream | about 174 GB/s (requirement: 160 GB/s) |
| Links at about 58 GB/s of random reads, plus a PIM read stream | links keep 58 GB/s; PIM receives about 27 GB/s; average link read latency rises from about 82 ns to about 140 ns |

Per-cycle event outputs count what happened:

- `mot_stall_o`: MoT stall;
- `pim_lost_o`: PIM loss;
- `vault_ev_o` = {power-down, refresh, row-miss precharge, look-ahead
  activation}.

## Parameters and scaling

- **`smc_top`:** `NMAIN`, `NPIM`, `NVAULT` (power of two; VA_W =
  log2 NVAULT), `MOT`, `T_REFI`.
  - `NMAIN=8, NVAULT=32` is the larger 8-link, 32-vault cube. The address
    is then 30 bits.
  - Up to 16 master ports fit the 4-bit master field of the ID.
- **`vault_controller`:** FIFO depths, every DRAM timing in clocks, and
  PD_IDLE.
- **`smc_pkg` constants** (change them there):
  - AXI data width (256);
  - DRAM data width (32 per edge);
  - banks per vault (8);
  - row and column widths.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -Irtl -y rtl -y tb +libext+.sv rtl/smc_pkg.sv tb/tb_smc_top.sv \
        --top-module tb_smc_top
    obj_dir/Vtb_smc_top

### Block testbenches

Each block has `tb/tb_<block>.sv`.

### End-to-end test: `tb_smc_top`

`tb_smc_top` runs the whole top at its default parameters against sixteen
DRAM models, in three phases:

1. Closed page, mapping 0. All five ports write random bursts and read them
   back.
2. Open page, mapping 2. The same with new data.
3. A closed-page random-read stream with bandwidth measurement.

Between phases the cube idles long enough to power down and refresh. The
test checks:

- every read beat;
- zero DRAM timing violations;
- the bandwidth;
- that each mechanism occurred: MoT stall, PIM loss, refresh, power-down,
  auto-precharge, look-ahead activation, row-miss precharge, and a change
  of mapping.

### Workload tests

- `tb_smc_top_8link`: the 8-link, 32-vault cube under the random-read
  stream. It checks the data and at least 160 GB/s.
- `tb_smc_top_masked`: open page, row-hit reads. It checks the data and
  at least 80 GB/s.
- `tb_smc_top_pim`: link traffic at a moderate rate, first alone and then
  with a PIM read stream. It checks that the links lose less than 5 % of
  their bandwidth and that the PIM gets at least 20 GB/s.

### Testbench-only models

- `dram_model`: a behavioural DDR vault. It has sparse storage and checks
  tRCD, tRP, tRAS, tWR, tCCD and tRFC, command legality per bank state, and
  that write data is driven when due. It counts every command type and the
  clocks spent with CKE low.
- `axi_traffic_master`: a random AXI4 master that checks its own read data.
- `axi_mem_slave`: a simple AXI memory.

## Departures and assumptions

- **In-order vault service.** Apart from the one-entry look-ahead, there is
  no reordering across CMDQ entries.
- **AXI subset.**
  - Bursts are INCR only, full 256-bit beats, and must not cross a 256-byte
    row.
  - There are no SIZE, BURST, LOCK, CACHE, PROT, QOS or RESP fields.
  - Strobes are carried to the DRAM data mask.
  - IDs are 8 bits, of which a master may use 4.
  - The interconnect does not enforce ordering between same-ID transactions
    to different vaults. A master needing order must use distinct IDs, or
    send same-ID traffic to one vault.
- **Width conversion location.** Conversion between 256-bit beats and the
  DDR bus is done in the master FSM, on the DRAM side of the FIFOs.
- **Write responses.** B responses share the RData FIFO with read data. A
  write is acknowledged only once its last WR command has gone to the DRAM,
  not when it has been buffered. The original design reports a zero-load
  write latency of 13 ns, which suggests it acknowledges earlier. Here the
  B response arrives a few tens of ns after the data. Zero-load read latency
  is about 60 ns for a full 256-byte burst; the original reports 76 ns at
  its master ports.
- **DRAM rules not enforced.** tRRD, tFAW and per-bank refresh are not
  modelled. tWTR, BL, write latency, refresh interval, tRFC, power-down
  threshold and FIFO depths are this design's choices.
- **MoT value.** MoT = 32 and RData depth 32 were chosen to meet the 80 GB/s
  random-read requirement. With MoT 16 and RData depth 16, the same stream
  delivers roughly 70–80 GB/s.
- **Row-hit bandwidth.** With all accesses hitting open rows, four ports
  get about 88 GB/s, against 110 GB/s reported for the original. A vault
  returns responses in order through one R channel. When the head response
  belongs to a master port that is busy with another vault's burst, the
  vault waits. A 64-entry RData FIFO (`RESP_DEPTH`) raises this to about
  97 GB/s.
- **Not reproduced.** The bandwidth sweeps over flit width, TSV count, bank
  count, timing scale, PIM request rate and PARSEC traces. The RTL can be
  configured for most of these through parameters or `smc_pkg`.
