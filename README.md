# DDR SDRAM controller with two banks in flight

A 64-bit DDR SDRAM controller reaches one bank at a time: it opens a row with
ACTIVE, moves one burst, and closes the row again before it can start the next
access. This design gets a wider, faster memory port without changing that
controller. It puts two complete 64-bit controllers side by side in one
module. The result is a 128-bit controller whose two halves open and access
two banks in the same clock cycles.

Each 64-bit controller has the classic three-part structure:

```
              +-------------------- ddr_top (one 64-bit half) --------------------+
 sys_DLY_100US|  ddr_ctrl (main control)                                          |
 sys_ADSn  -->|   ddr_init_fsm --iState--+                                        |
 sys_R_Wn  -->|        | sys_INIT_DONE   +--> ddr_sig ----> CKE CSn RASn CASn WEn |
 sys_REF_REQ->|   ddr_cmd_fsm  --cState--+        ^          BA  A (row/col mux)  |
              |        ^ endOf_* flags   |        | sys_A                         |
              |   ddr_counter (clkCNT,   +--> ddr_data <--> DQ, DQM, DQS          |
              |    refresh interval)              ^ sys_D / sys_Q, sys_D_VALID    |
              +-------------------------------------------------------------------+
```

`ddr_top_128` holds two of these (`NCTRL = 2`). Only the clock, the reset and
the power-up flag are shared.

## Files

| file | what it is |
|---|---|
| `rtl/ddr_pkg.sv` | state and command encodings, geometry, default timing |
| `rtl/ddr_init_fsm.sv` | power-up sequence state machine (iState) |
| `rtl/ddr_cmd_fsm.sv` | refresh/read/write state machine (cState) |
| `rtl/ddr_counter.sv` | state-time counter, delay flags, refresh interval counter |
| `rtl/ddr_ctrl.sv` | main control: the two FSMs and the counter |
| `rtl/ddr_sig.sv` | command pins and multiplexed address bus |
| `rtl/ddr_data.sv` | write and read data registers, output enable, mask, strobe |
| `rtl/ddr_top.sv` | one 64-bit controller |
| `rtl/ddr_top_128.sv` | the 128-bit controller (top) |
| `tb/ddr_sdram_model.sv` | behavioural 8-bank DDR SDRAM with protocol checks (simulation only) |
| `tb/ddr_bus_master.sv` | bus master with a scoreboard (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Timing is counted in states

The hardest part to follow is how the design meets the SDRAM's minimum delays.
No timer is armed for a delay. Each FSM has a wait state after every command,
and `ddr_counter` reports how long the machines have been in their current
state:

* `clkCNT` is 0 in the first cycle of any new state of either FSM. It then
  counts up by one per cycle and saturates.
* A delay D between two commands is met by a wait state of D-1 cycles. Its
  flag `endOf_x` is `clkCNT >= D-2`. If D is 1 or less, the FSM takes the
  direct arc and skips the wait state.
* C_RDATA lasts BL cycles, so `endOf_Read_Burst` is `clkCNT >= BL-1`.
* C_WDATA lasts BL-1 cycles, because the C_WRITEA cycle carries the first
  write beat. C_TDAL lasts tDAL cycles.

The delay flags are combinational, decoded from registers. A state holds its
command for exactly one cycle.

### One access, cycle by cycle (defaults: tRCD 3, CL 2, BL 4, tDAL 5)

Cycle 0 is the first cycle in which the FSM is out of C_IDLE. Command pins lag
the state by one cycle, because `ddr_sig` registers its outputs.

| cycle | read: state | read: pins / data | write: state | write: pins / data |
|---|---|---|---|---|
| 0 | C_ACTIVE | | C_ACTIVE | |
| 1-2 | C_TRCD | ACTIVE in 1 | C_TRCD | ACTIVE in 1 |
| 3 | C_READA | | C_WRITEA, `sys_D_REQ` (beat 0) | |
| 4 | C_CL | READ in 4 | C_WDATA (beats 1-3 in 4-6) | WRITE in 4 |
| 5-8 | C_RDATA | SDRAM drives beats in 6-9 | C_WDATA to 6, C_TDAL 7-11 | DQ beats in 5-8 |
| 8 / 11 | last state, `sys_CYC_END` | | last C_TDAL, `sys_CYC_END` | |
| 9-12 | C_IDLE | `sys_Q` beats, `sys_D_VALID` | C_IDLE | |

In general, and measured by the testbenches:

* A read ends after tRCD+CL+BL cycles. Its first beat is on `sys_Q`
  tRCD+CL+4 clock edges after the edge that accepted `sys_ADSn`.
* A write ends after tRCD+BL+tDAL cycles.
* Power-up takes tRP+2·tRFC+tMRD+1 cycles, counted from the edge that sees
  `sys_DLY_100US` high to `sys_INIT_DONE`.

Every access uses READA/WRITEA, i.e. A10 set (auto precharge). The bank is
therefore closed again when the access ends, and each access pays for its own
ACTIVE. There is no open-row policy.

## Power-up sequence (`ddr_init_fsm`)

| state | what happens |
|---|---|
| I_IDLE | Held in reset; CKE low, chip deselected. |
| I_NOP | NOP commands with CKE high, until the bus master raises `sys_DLY_100US` (the stabilization delay, timed outside the controller). |
| I_PRE | PRECHARGE ALL (A10 high), then I_TRP. |
| I_AR1, I_AR2 | AUTO REFRESH, each followed by its tRFC wait (I_TRFC1, I_TRFC2). |
| I_MRS | LOAD MODE REGISTER with `{CL in A[6:4], sequential, BL in A[2:0]}`, then I_TMRD. |
| I_READY | Stays here; `sys_INIT_DONE` is high. |

No extended-mode-register or DLL-reset step is issued. A real DDR part may
need one added before I_MRS.

## Command machine (`ddr_cmd_fsm`)

The command machine waits in C_IDLE until `sys_INIT_DONE`. After that:

* A pending refresh comes first. `latch_ref_req` is set by a `sys_REF_REQ`
  pulse or by the refresh counter. Either one leads to C_AR (AUTO REFRESH,
  `sys_REF_ACK` high for that cycle), then C_TRFC, then C_IDLE. The latch
  clears when C_AR is entered.
* Otherwise `sys_ADSn` low starts an access. The path is C_ACTIVE, then
  C_TRCD. From there `sys_R_Wn` selects one of two branches:
  * read: C_READA, C_CL, C_RDATA
  * write: C_WRITEA, C_WDATA, C_TDAL

  Both return to C_IDLE.

A request that arrives while a refresh is pending waits until the refresh is
done. The refresh counter (`REF_INT`, default 1040 cycles, which is 7.8 µs at
133 MHz) starts counting when initialization finishes.

## Bus-master interface (per half)

* `sys_A = {bank[2:0], row[12:0], column[9:0]}`. Bursts are sequential and
  wrap inside a BL-aligned group of columns.
* Request: drive `sys_ADSn` low with `sys_A` and `sys_R_Wn` (1 = read). Hold
  all three until the cycle in which `sys_CYC_END` is high, then release
  them. The controller reads them directly and does not latch them.
* Write data: in each cycle with `sys_D_REQ` high, put one beat on `sys_D`,
  and its byte mask on `sys_DMSEL` (1 = do not write that byte). There are BL
  such cycles. `sys_D_REQ` comes straight from the state register, so the
  beat can be supplied in the same cycle.
* Read data: one beat on `sys_Q` in each cycle with `sys_D_VALID` high. These
  beats arrive up to three cycles after `sys_CYC_END`.
* `sys_RDYn` is an active-low data-ready strobe. It is low in every cycle
  with `sys_D_REQ` or `sys_D_VALID` high, for a master that wants a single
  "data now" signal for both directions.
* `sys_REF_REQ` is a one-cycle pulse. `sys_REF_ACK` marks the AUTO REFRESH
  command.
* `sys_RESET` is active high and synchronous.

## Data path (`ddr_data`)

The data path is two registers per direction. On the write side, `sys_D`
passes two registers and then the output driver, which is enabled by
`ddr_DQ_oe`. Each beat therefore reaches the pins two cycles after it was
taken, one cycle after the WRITE command (write latency 1). `ddr_DQM` and
`ddr_DQS_oe` follow the same pipeline. `ddr_DQS_o` toggles once per beat.

On the read side, `ddr_DQ_i` passes two registers to `sys_Q`.
`sys_D_VALID` is C_RDATA delayed by three cycles: one for the command
register and two for the capture registers.

The bidirectional DQ bus is split into `_o`, `_oe` and `_i`. Join them in a
pad or I/O cell outside the controller.

## The 128-bit controller (`ddr_top_128`)

Every per-half port is a vector indexed by half, with half 0 in the low bits.
Data is `sys_D[127:0]`, bank address `ddr_BA[1:0][2:0]` and address
`ddr_A[1:0][12:0]`. Each half has its own command pins, so each half needs its
own SDRAM device, or its own chip select and 64 data lines on a 128-bit
module. The two banks that are busy at the same time sit in different devices.
The halves are not synchronized to each other. If both masters issue requests
on the same edge, the two halves run in lock-step, and every beat moves
128 bits.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NCTRL` (top) | 2 | number of 64-bit halves |
| `DW` | 64 | data bits per half |
| `TRP`, `TRFC`, `TMRD` | 3, 10, 2 | PRECHARGE, AUTO REFRESH and LOAD MODE REGISTER to the next command (cycles) |
| `TRCD` | 3 | ACTIVE to READ/WRITE |
| `TDAL` | 5 | last write beat to the next ACTIVE (tWR + tRP) |
| `CL` | 2 | CAS latency, 2 or 3 |
| `BL` | 4 | burst length, 2, 4 or 8 |
| `REF_INT` | 1040 | cycles between automatic refreshes |

The geometry (3 bank bits, 13 row bits, 10 column bits, a 13-bit address bus)
is set in `ddr_pkg`. The top passes every timing parameter unchanged to both
halves, so the two halves always run with the same timing.

## How far to trust it, and where it departs from the original

The following parts follow the original design closely:

* the three-module split
* the state names and orders of both FSMs, including the direct arcs that
  skip a wait state
* the two-register data path
* the 8 banks and 64 bits per controller
* building the 128-bit controller from two unchanged 64-bit ones

The following are this implementation's own choices:

* **Timing values.** All delays, CL, BL and the refresh interval are typical
  DDR-266 numbers, not taken from the original.
* **Handshake.** Holding `sys_ADSn` until `sys_CYC_END`, and the added
  `sys_D_REQ` output that paces write data. The original names a ready
  output, `sys_RDYn`, but gives no timing for it; here it is simply the
  inverse of "write beat taken or read beat delivered".
* **Single data rate at the pins.** One beat moves per clock on both the bus
  side and the DQ side. The double-edge transfer of a real DDR interface
  (two beats per clock on DQ, captured with DQS) belongs to I/O cells that
  are not modelled here. Read data is captured with the controller clock.
* **DQM.** It follows `sys_DMSEL` during write beats. The original drew it as
  tied to a constant, which would mask every write.
* **No PLL.** `sys_CLK` clocks everything directly. `ddr_CK` and `ddr_CKn`
  are `sys_CLK` and its inverse.
* **Refresh.** Both user-requested and automatic refresh share one latch.
* **No extended mode register or DLL reset** in the power-up sequence.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. A
watchdog ends any run that hangs. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/ddr_pkg.sv tb/tb_ddr_top_128.sv --top-module tb_ddr_top_128 -o sim
./obj_dir/sim
```

### Unit testbenches

| testbench | what it checks |
|---|---|
| `tb_ddr_init_fsm` | Power-up state order and length. A second instance with one-cycle delays must take the direct arcs. |
| `tb_ddr_cmd_fsm` | State sequence and the time spent in each state, for: refresh, read, write, and refresh-before-access. Also that requests are ignored before init. |
| `tb_ddr_counter` | Behaviour of `clkCNT`, the cycle in which each delay flag rises, and the refresh pulse period. |
| `tb_ddr_ctrl` | The same sequences with the real counter, including automatic refreshes. |
| `tb_ddr_sig` | Command, bank and address for every state, with random addresses. |
| `tb_ddr_data` | Cycle-by-cycle write and read pipeline latency, output enable, mask, strobe and valid. |

### End-to-end testbenches

* `tb_ddr_top` runs one 64-bit controller against `ddr_sdram_model`. It uses
  random traffic over all 8 banks, with masked writes, requested and automatic
  refreshes, and an access held back by a refresh.
* `tb_ddr_top_128` runs the top at its default parameters, with two models and
  two masters. It also counts the cycles in which both halves opened a bank
  together, and the 128-bit read and write beats.

Each end-to-end run checks every read against a scoreboard and checks the
cycle counts above. The SDRAM model must report no protocol violation: it
checks initialization order, tRP, tRFC, tMRD, tRCD, tDAL, and no access to a
closed bank.

The SDRAM model is cycle-based and shares the one-beat-per-clock view of the
pins. It checks the controller's command sequencing and timing, but not
electrical DDR behaviour.
