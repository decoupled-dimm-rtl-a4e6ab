# Decoupled DIMM memory system in SystemVerilog

A DDR channel normally runs at the data rate of its slowest DRAM chips. The decoupled DIMM breaks
that link. Each DIMM carries a small relay chip, the **sync-buffer**. On one side it talks to the
channel at the full bus rate. On the other side it talks to the DIMM's ranks over a private
**rank bus** at 1/M of that rate. Cheap, slow DRAM (DDR3-1066 here) can then fill a fast channel
(2133 MT/s here). This works because several DIMMs and ranks stream data in parallel, each on its
own rank bus. The cost is a little idle latency: one device clock to relay a command and one to
relay the data.

This RTL implements the main configuration, **D1066-B2133** (devices at 1066 MT/s, channel at
2133 MT/s, M = 2), with:

- 2 channels;
- 2 DIMMs per channel;
- 2 ranks per DIMM;
- 8 banks per rank;
- DDR3-1066 timing 8-8-8 (CL, tRCD and tRP in device clocks).

There are two pieces:

- the sync-buffer, which lives on the DIMM;
- the memory controller, whose scheduler has to know about the two bus levels.

## Clocks and the data model

The design has one clock, the bus clock (1066 MHz for 2133 MT/s). Each sync-buffer derives the
device clock from it with a one-hot ring of M flip-flops (`syb_clk_div`). The ring also yields
`dev_tick`, which is high in the last bus clock before each device-clock rising edge. Everything
on the device side is updated on that tick, so no second clock domain exists in the RTL.

A DDR beat is 64 bits, and two beats fit in one clock. The RTL therefore moves data as 128-bit
**chunks**, one per clock:

- On the channel, one chunk passes per bus clock.
- On a rank bus, one chunk passes per device clock, i.e. it is held for M bus clocks.
- A cache line is one BL8 burst: 64 bytes, or 4 chunks (`ddr_pkg::line_t`).

ECC devices, strobes, DBI and electrical details are not modelled.

## The sync-buffer (`sync_buffer`)

The sync-buffer has the components of the original proposal. Each is its own module:

| Module | Role |
|---|---|
| `syb_bus_ctrl_if` | Takes command/address words off the channel for this DIMM's ranks and builds a command entry. It also follows CKE and ODT. |
| `syb_cmd_buffer` | Holds one 32-bit command entry. 23 bits are used: BA, A0-A13, RAS/CAS/WE, CKE, ODT, CS, plus a 2-bit rank number. |
| `syb_dev_ctrl_if` | Puts the entry on the rank bus at the next device-clock edge and holds it for one device clock. It emits read/write events. |
| `syb_dev_data_if` | Samples read chunks from the ranks and drives write chunks to them. |
| `syb_data_buffer` | One 64-byte read entry and one 64-byte write entry. |
| `syb_bus_data_if` | Drives read chunks onto the channel and captures write chunks from it. |
| `syb_clk_div` | The 1:M divider. |

The delay-locked loop of the original chip is taken as ideal, i.e. zero skew.

There is no arbitration inside the sync-buffer. The controller guarantees that at most one read
and one write burst use the buffer at any time, and that a new command never arrives before the
previous one has gone out. The command buffer has a sticky `cmd_overflow` flag and an assertion
in case that promise is broken.

### Timing of a relayed access (M = 2, CL = 8, CWL = 6)

All times are in bus clocks and are measured from **Tc**, the first bus clock in which the rank
bus shows the command.

- **Command.** A command sent on the channel in bus clock t is captured at the end of t. It leaves
  at the next device-clock edge, so Tc − t is 2 or 3 bus clocks, depending on the phase. In
  general Tc = M·(⌊(t+1)/M⌋ + 1).
- **Read data.** The rank drives chunk k during device clock CL+k after the command. That is bus
  clocks Tc + CL·M + k·M … +M−1. The sync-buffer samples each chunk in the last of those bus
  clocks.
  - The channel burst is placed so that its last chunk leaves one device clock after the last
    chunk arrived.
  - Channel chunk j is therefore driven in bus clock **Tc + CL·M + 5M − 4 + j** (Tc+22 … Tc+25
    here).
  - Because of this rule, chunks can be sent before the whole line is in the buffer, with no
    underrun.
- **Write data.** The write is the reverse. The channel must deliver chunk k in bus clock
  **Tc + CWL·M − 2 + k**. The sync-buffer drives it to the rank for device clock CWL+k.
  - This is the earliest-safe cut-through: chunk 0 arrives two bus clocks before the rank bus
    needs it.
  - The "last chunk one device clock later" rule cannot hold here without delaying the device
    write. This part is this design's own choice.

Put together, an idle read to an awake, precharged rank costs one device clock more for the
command and about one device clock more for the data than a direct DDR3-1066 access. This matches
the two-device-clock overhead the design is known for.

## The memory controller (`mem_ctrl`)

There is one controller per channel. It schedules as if every rank sat directly on the fast
channel, with all timings scaled to bus clocks and the relay delays included. It adds one rule
for the rank buses. For each DIMM:

- two commands must be at least one device clock (M bus clocks) apart;
- two data bursts on its rank bus must not overlap.

With this rule, a schedule without conflicts on the channel has none on any rank bus either.

- **Request buffer.** The buffer has 64 entries. Each request is one 64-byte line, with a
  valid/ready handshake, an 8-bit id, a read response and a write acknowledgement. The controller
  does not keep order between two requests to the same line. A caller must not have two such
  requests outstanding at once, and the tests never do.
- **Page policy.** Close page. Each request becomes an ACT, then a RD or WR with auto-precharge
  (A10). The bank is closed again after tRAS and after the burst (reads) or write recovery
  (writes). No explicit PRE and no refresh are issued.
- **Priorities.**
  - Column commands go before activations.
  - Reads go before writes, unless the controller is in write-drain mode.
  - Write-drain mode turns on when more than half the buffer holds writes. It turns off when
    fewer than a quarter do.
  - Ties go to the oldest request.
- **Bus reservation.**
  - Each bus clock, the controller computes the device-clock edge each possible command would
    reach, and from it the exact channel clocks its data would occupy (see the formulas above).
  - A bit vector `busres` reserves those channel clocks.
  - Per-DIMM "rank bus free from" times enforce the rank-bus rule.
  - Slot tables indexed by time say when to collect a read line and when to start sending write
    data.
- **Power-down.**
  - A rank with no queued request and nothing in flight for 8 bus clocks (7.5 ns) has CKE
    dropped.
  - Waking it costs 12 bus clocks (11.25 ns) before its next command.
- **Events.** The `ev` output pulses for:
  - ACT, RD and WR;
  - a stall on the rank-bus rule;
  - a stall on the channel reservation;
  - entry into drain mode;
  - power-down entry and exit.

The address map (`addr_map`) interleaves cache lines. From the least significant bit of the line
address, the fields are:

- channel, DIMM, rank and bank;
- 7 bits of line index within a 1K-column row;
- 14 row bits.

The bank index is XORed with the low row bits, to spread row conflicts.

## Top level (`decoupled_dimm_top`)

The top routes each request to its channel by address and holds one `mem_ctrl` per channel. Each
channel has one `sync_buffer` per DIMM; both ranks of a DIMM share its sync-buffer.

- **Channel data bus.** It is modelled as per-source output buses with enables, combined by OR.
  `bus_conflict` is a sticky flag that rises if two sources drive it at once.
- **Rank buses.** The DRAM ranks are not part of the RTL. Each rank bus is brought out as ports:
  `dev_clk`, `dev_ca`, `dev_cs_n`, `dev_cke`, `dev_odt` and the data buses.

## Parameters

Defaults are the main configuration:

| Parameter | Default | Notes |
|---|---|---|
| `M` | 2 | Integer 1:M ratio only. A non-integer ratio would need a PLL, which is not built. |
| `N_CH`, `N_DIMM`, `N_RANK`, `N_BANK` | 2, 2, 2, 8 | |
| `QDEPTH` | 64 | Request buffer entries. |
| `CL`, `T_RCD`, `T_RP` | 8, 8, 8 | DDR3-1066, device clocks. |
| `CWL`, `T_RAS`, `T_WR` | 6, 20, 8 | Usual DDR3-1066 values. These are this design's choice. |
| `PD_IDLE`, `T_XP` | 8, 12 | Bus clocks: 7.5 ns and 11.25 ns at 1066 MHz. |

Other configurations need only different parameters:

- **Other DDR3 speed grades.** Change the timings. For example, D1333-B2667 uses CL, tRCD and tRP
  of 10, PD_IDLE of 10 and T_XP of 15.
- **Other channel counts.** Use `N_CH` = 1 or 4.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **Data-interface and sync-buffer benches.** They check the exact bus-clock timing given above.
- **`tb_mem_ctrl`.** It runs one controller with two real sync-buffers and behavioural DDR3 ranks
  (`tb/dram_rank_model.sv`), and checks:
  - the idle read latency;
  - the tRCD and auto-precharge rules;
  - the one-device-clock command spacing per DIMM;
  - data integrity.
- **`tb_decoupled_dimm_top`.** It runs the whole system at its default parameters:
  - idle read latencies, with the rank asleep and awake, in both device-clock phases. These give
    46–47 bus clocks awake and 58 asleep, and are checked against the formula above.
  - a 256-read stream, whose channel utilisation must exceed 1/M. It measures about 0.9, which
    one rank bus alone could not supply.
  - a long random read/write mix with write bursts and idle gaps, checked against a reference
    memory.
  - a final check that every scheduler event happened, and that there were no DRAM timing
    violations, no bus or rank-bus collision and no command overwrite.

The rank model checks the ACT/RD/WR timing (tRCD, tRAS, tRP, tWR, power-down exit) at the device
clock. It also checks that read data is stored and returned correctly.

To run a bench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ddr_pkg.sv tb/tb_dram_pkg.sv \
    tb/tb_decoupled_dimm_top.sv --top-module tb_decoupled_dimm_top
./obj_dir/Vtb_decoupled_dimm_top
```

## Where this RTL departs from, or goes beyond, the original design

- **Write data.** It is relayed with the earliest-safe cut-through, not with the
  "one device clock after the incoming burst" pipelining used for reads.
- **Rank-bus rule.** The rule the controller adds is spelled out here (M bus clocks between
  commands, no overlapping bursts per DIMM). The original only says such a rule exists.
- **Refresh.** Not implemented.
- **Controller overhead.** The 15 ns controller overhead of the original evaluation is not
  modelled.
- **Bit layouts.** The command-entry bit layout, the request/response handshake and the exact XOR
  bank function are this design's own choices.
- **Sync-buffers per DIMM.** One sync-buffer per DIMM. Two per DIMM, also possible in the
  original, is not built.
- **Performance numbers.** The processor workloads used to evaluate the original are CPU
  simulations and are not reproduced. The testbenches use synthetic traffic.
