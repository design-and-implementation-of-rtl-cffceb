# DDR SDRAM controller for an embedded processor

A DDR SDRAM moves two data beats per clock, one on each edge, and an
embedded processor does not want to deal with that. It also does not want to
deal with row opening, CAS latency, refresh or the power-up ritual. This
controller sits between the two. The processor sees a simple single-rate
port: a 4-bit command, a 24-bit address and 8-bit data words, all on one
clock. The memory sees a correct DDR command stream on CS#/RAS#/CAS#/WE#,
with a 4-bit DQ bus and a DQS strobe running at double data rate.

Each user word is 8 bits, twice the DQ width. Every user-side cycle therefore
carries exactly one clock's worth of DDR data: a low nibble on one edge and a
high nibble on the other. That width ratio is the whole trick. It lets the
user side run at the memory clock frequency with no FIFOs.

Every access is a complete closed-page transaction:
ACTIVE → READ/WRITE → burst → PRECHARGE (all banks).
The controller never keeps a row open between requests. It refreshes on its
own at a fixed interval.

## Block structure

```
                 +-----------------------------------------------------+
 u_clk, u_clk_fb |  clk_dll   fpga_clk, fpga_clk2x, ddr_clk/ddr_clkb   |
 ---------------->  (model)   locked -> reset synchroniser             |
                 |                                                     |
 u_cmd, u_addr   |  ctrl_if ----req----> cmd_fsm ---CS#/RAS#/CAS#/WE#--> DDR
 ---------------->  (decode,  <-accept--  (init_seq, Rcd/Cslt/Brst/     |
 <-- u_cmd_ack   |   arbiter,             recovery counters)            |
 <-- u_ref_ack   |   refresh_unit)          | ad_sel, lat_load          |
                 |                          v                           |
                 |                     addr_latch --------BA, A[12:0]---> DDR
                 |                     (row/col split, mode register)   |
 u_data_i  ------>  data_path <------wr_accept, wr_window, burst_len    |
 <-- u_data_o    |  (write buffer, DDR serializer, read capture) <-DQ/DQS-> DDR
 <-- u_data_valid|                                                      |
                 +-----------------------------------------------------+
```

| File | Module | Role |
|---|---|---|
| `rtl/ddr_pkg.sv` | package | Command encodings, request and state types, mode-register decode functions |
| `rtl/ddr_ctrl.sv` | top | Wires the blocks together and synchronises the reset to DLL lock |
| `rtl/ctrl_if.sv` | control interface | Decodes user commands and arbitrates between the user and refresh |
| `rtl/refresh_unit.sv` | refresh timer | Periodic refresh request with a small backlog count |
| `rtl/cmd_fsm.sv` | command FSM | The state machine that issues every DDR command |
| `rtl/init_seq.sv` | power-up sequencer | The JEDEC-style initialisation, run inside the command FSM |
| `rtl/ddr_cntr.sv` | timing counter | A loadable down counter that stops at zero, used four times |
| `rtl/addr_latch.sv` | address latch | Row/column/bank split, A-bus multiplexer, mode register copy |
| `rtl/data_path.sv` | data path | Write buffer and DDR serializer, read capture and word assembly |
| `rtl/clk_dll.sv` | clock model | Behavioural stand-in for the FPGA DLLs (not synthesizable) |

## User interface

Everything on the user side is synchronous to `fpga_clk`. That is an output
of the controller, produced from `u_clk` by the clock block.

| `u_cmd` | Operation |
|---|---|
| 0 | no operation |
| 1 | LOAD MODE REGISTER. `u_addr[12:0]` is the value. `u_addr[23:22]` selects the register: 00 = mode register, 01 = extended mode register |
| 2 | AUTO REFRESH |
| 3 | PRECHARGE all banks |
| 6 | READ one burst |
| 7 | WRITE one burst |

Other codes are ignored.

**Handshake.** Drive `u_cmd`/`u_addr` and hold them until a rising edge of
`fpga_clk` at which `u_cmd_ack` is high. `u_cmd_ack` is combinational. It is
high only when the command FSM is idle with all recovery times met, power-up
has finished, and no refresh is pending. A pending refresh always wins over a
user command. `u_ref_ack` pulses for one cycle for every refresh that the
controller starts on its own.

**Write data.** Call the acknowledge cycle A. The burst's BL/2 words go on
`u_data_i`, one per cycle, in cycles A+1 … A+BL/2. That is 1, 2 or 4 words
for burst length 2, 4 or 8. They are latched there, so the user needs no
other flow control.

**Read data.** The BL/2 words come back on `u_data_o`, each marked by one
cycle of `u_data_valid`, in consecutive cycles. With the default timing
(tRCD = 2, CAS latency 2) the first word is valid 7 cycles after the
acknowledge cycle. In general the delay is tRCD + ceil(CL) + 3 cycles.

**Address split.** The 24-bit byte-free address is cut as
`u_addr[23:22]` = bank, `u_addr[21:11]` = column (11 bits) and
`u_addr[10:0]` = row (11 bits). On the A bus the column appears as
A9..A0 = col[9:0] and A11 = col[10], with A10 low (no auto-precharge).
As an example, address 0x2F4D3B opens row 0x53B of bank 0, then reads or
writes from column 0x5E9.

## Command FSM

`cmd_fsm` is a Moore machine. Each state drives one fixed pattern on
CS#/RAS#/CAS#/WE#. The encodings follow the standard DDR command truth
table:

| Command | CS# RAS# CAS# WE# |
|---|---|
| NOP | L H H H |
| ACTIVE | L L H H |
| READ | L H L H |
| WRITE | L H L L |
| PRECHARGE | L L H L |
| AUTO REFRESH | L L L H |
| LOAD MODE REGISTER | L L L L |

IDLE and all wait states drive NOP. The state graph:

```
IDLE --> PRECHARGE --> IDLE
IDLE --> REFRESH   --> IDLE
IDLE --> LOAD_MR   --> IDLE
IDLE --> ACT --> ACT_WAIT --(rcd_end)--> READ  --> READ_WAIT --(cas_lat_end)--> DATA --(burst_end)--> IDLE
                                     \-> WRITE --> WRITE_DATA --(burst_end)--> IDLE
```

Burst length changes the graph:

* BL 2: READ_WAIT returns to IDLE directly, and so does WRITE.
* BL 4: DATA and WRITE_DATA last one cycle.
* BL 8: DATA and WRITE_DATA run until the burst counter reaches zero.

After every read or write burst, IDLE first issues PRECHARGE with A10 high,
which closes every bank. Only then does it take the next request.

Four `ddr_cntr` instances time the machine:

| Counter | Loaded when | Value | Ends |
|---|---|---|---|
| Rcd | ACT | T_RCD-1 | ACT_WAIT (tRCD) |
| Cslt | READ | floor(CL)+1 | READ_WAIT. The cycle it ends is the cycle of the first read word |
| Brst | READ_WAIT/WRITE | BL/2-2 | DATA / WRITE_DATA |
| recovery | PRECHARGE, REFRESH, LOAD_MR, end of write | T_RP-1, T_RFC-1, T_MRD-1, T_WR+1 | Blocks IDLE until the bus is free |

The recovery counter has one more role. With it, a PRECHARGE, REFRESH or
LOAD MODE command can never be followed by a new command too early. The
device model in the testbenches checks this on every command.

## Double-data-rate data path

This is the least obvious part of the design. Two clocks are involved, both
from the clock block:

* `fpga_clk`: the controller clock, with the same frequency and phase as
  `ddr_clk`.
* `fpga_clk2x`: twice the frequency, with a rising edge on every edge of
  `fpga_clk`. The clock model makes both clocks in one process, so their
  edges land in the same time step.

**Writes.** Say the command FSM is in the WRITE state in cycle W. The
device samples the WRITE at the rising edge that ends W. DDR requires the
first DQS rising edge about one clock later (tDQSS). So `wr_window`, which
is high for the BL/2 cycles of WRITE and WRITE_DATA, is delayed one
`fpga_clk` cycle inside the data path. Then:

* DQS is driven low as a preamble from the middle of cycle W+1.
* DQS then toggles on each `fpga_clk2x` rising edge, which is every clock
  edge: BL edges in total.
* DQ changes on the `fpga_clk2x` falling edges, half-way between DQS edges,
  so the strobe is centred in each data eye as the device expects.
* Each 8-bit word goes out as two nibbles, low nibble first.
* DM stays low, because there is no byte masking.

The 4-word write buffer decouples the user's word timing from this
schedule.

**Reads.** The device drives DQS edge-aligned with the data. The data path
samples DQ and DQS together on every `fpga_clk2x` falling edge, which is the
middle of a beat. A beat sampled while DQS is high is the first (low) nibble
of a word. The next beat, sampled while DQS is low, completes the word.
Completed words cross back to `fpga_clk` through a toggle flag and leave on
`u_data_o` with `u_data_valid`. The capture is driven by DQS itself, so it
needs no knowledge of the CAS latency. The command FSM's Cslt counter only
decides when the FSM leaves READ_WAIT.

On the chip, the DQ and DQS pads are split into `*_o`, `*_oe` and `*_i`
signals. The bidirectional pad cell and any delay on the read strobe belong
to the FPGA I/O and are outside this RTL.

## Mode register and address latch

`addr_latch` captures the request address when the FSM starts a request. It
then drives the A/BA bus according to the FSM's select:

* the row for ACTIVE;
* the column for READ/WRITE;
* the 13-bit value for LOAD MODE;
* A10 high for PRECHARGE all banks.

It also keeps a copy of the mode register. The burst length and CAS latency
decoded from that copy steer the FSM and the data path, so a LOAD MODE
command changes the controller's behaviour on the next access.

| Field | Bits | Codes decoded |
|---|---|---|
| Burst length | A2..A0 | 001 = 2, 010 = 4, 011 = 8 |
| Burst type | A3 | kept, not used by the controller (it only affects the order inside the device) |
| CAS latency | A6..A4 | 010 = 2, 110 = 2.5, 011 = 3 |
| Operating mode | A8 | DLL reset |

The default value is 0x023: burst length 8, sequential, CAS latency 2. For
CAS latency 2.5 the FSM waits as for 2. The read capture adapts by itself,
because it follows DQS.

## Power-up and refresh

`init_seq` runs inside the command FSM. Until it is done, the FSM takes
requests from it instead of from the user port. The sequence is:

1. CKE held low for `INIT_WAIT` cycles (20000, i.e. 200 µs at 100 MHz).
2. PRECHARGE all.
3. Extended mode register = 0, which enables the DLL.
4. Mode register = `INIT_MODE` with DLL reset.
5. PRECHARGE all.
6. Two AUTO REFRESH.
7. Mode register = `INIT_MODE`.
8. `DLL_WAIT` = 200 cycles before the user port opens.

`refresh_unit` raises a request every `REF_INTERVAL` cycles. The default,
780, gives 7.8 µs at 100 MHz. If the controller is busy, up to eight owed
refreshes are counted and then issued back to back.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `DQ_W` | 4 | DQ width. User words are `2*DQ_W` bits |
| `T_RCD`, `T_RP`, `T_RFC`, `T_MRD`, `T_WR` | 2, 2, 8, 2, 2 | DDR timing in controller clocks |
| `REF_INTERVAL` | 780 | Clocks between refreshes |
| `INIT_WAIT`, `DLL_WAIT` | 20000, 200 | Power-up delays in clocks |
| `INIT_MODE` | 13'h023 | Mode register written at power-up |

## Where this design departs from, or goes beyond, its source

The source design gives the four-block split (control interface, command
FSM, address latch, data path), the refresh unit, the command table, the
mode register fields, the FSM's states and counter conditions, and the
example waveforms with 8-bit user data on a 4-bit DQ. The following are this
implementation's own choices, or differ from the source:

* **Burst terminate.** BURST TERMINATE is in the command table but is never
  issued. Every burst runs to its full length and ends with PRECHARGE.
* **IDLE pattern.** The command table's IDLE row leaves RAS#/CAS#/WE# as
  don't-care. Here IDLE drives NOP.
* **Acknowledge.** The `u_cmd_ack` handshake and the fixed word timing on
  `u_data_i` were added. The source only shows commands and data appearing
  on the user bus.
* **Refresh placement.** The refresh unit sits inside the control interface,
  as the text describes. A synthesized schematic of the source shows it at
  the top level. The function is the same either way.
* **Address split.** The split (row in the low bits, column above, bank on
  top) and the command codes 6 = READ and 7 = WRITE were deduced from the
  example waveforms. The codes 1, 2 and 3 are this design's own.
* **Data width.** The source's text says the data path turns n-bit data into
  2n-bit data. The waveforms show the user side as the wide one (8 bits) and
  DQ as the narrow one (4 bits), and that is what is built.
* **Timing values.** The source gives no numbers for tRCD, tRP, tRFC, tMRD,
  tWR, the refresh interval or the power-up delays. The defaults are typical
  DDR-200/266 values at 100 MHz.
* **Controller clock.** The controller clock, the doubled clock and the
  lock-gated reset come from a behavioural DLL model. On an FPGA, replace
  `clk_dll` with the vendor's clock primitives and keep its ports.
* **Not built.** The user-side traffic generator and the DDR device itself
  are outside the controller and are not built as RTL. A behavioural DDR
  device, `tb/ddr_sdram_model.sv`, is used for verification only.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog.

* **`tb_ddr_cntr`, `tb_refresh_unit`, `tb_ctrl_if`, `tb_init_seq`,
  `tb_addr_latch`, `tb_data_path`, `tb_clk_dll`.** Unit tests against
  independently computed expectations. Among other things they cover the
  refresh interval and backlog, the arbitration priority, every step of the
  power-up sequence, the address split for random addresses, the mode-field
  decode, DQS/DQ edge placement and nibble order, and the clock ratios.
* **`tb_cmd_fsm`.** Drives requests and compares the exact command stream,
  cycle by cycle, for every burst length and CAS latency.
* **`tb_ddr_ctrl`.** The end-to-end test, with short power-up and refresh
  intervals. It connects the controller to `ddr_sdram_model`, a behavioural
  DDR device with four banks. The device checks tRCD, tRP, tRFC, tMRD, bank
  state, CKE and write-strobe placement on every command. The test runs
  random writes and reads under six mode-register settings (BL 2/4/8, CL
  2/2.5/3, both burst types). It compares every read word with a reference
  memory and checks the read latency. It also counts that each mechanism
  happened at least once:
  * the power-up sequence;
  * refresh pre-empting a waiting user command;
  * user-issued refresh, precharge and mode loads;
  * extended mode register writes;
  * the automatic precharge after each burst.
* **`tb_ddr_ctrl_full`.** Runs the controller with every parameter at its
  default, including the full 20000-cycle power-up wait, through a write and
  a read-back.
* **`tb_fig_waveforms`.** Replays the reference write and read examples at
  default parameters. Words 0A..0D are written to address 0x2F4D3B. The test
  checks the row and column on the A bus and the nibble sequence
  A,0,B,0,C,0,D,0 on DQ. It then reads back a burst.

To run one testbench with plain Verilator, from the project root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb rtl/ddr_pkg.sv tb/tb_ddr_ctrl.sv \
  --top-module tb_ddr_ctrl -o sim
./obj_dir/sim
```

`-y` lets Verilator find each module in the file of the same name. For a
unit test, use the same command with that testbench file and its
`--top-module`. The remaining warnings are about unused package constants
and counter outputs, and about the delays in the clock model. The simulator must support `--timing`, because the clock
model and the testbenches use delays. Every module except `clk_dll` and
the testbench models is synthesizable.
