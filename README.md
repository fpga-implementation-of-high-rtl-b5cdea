# Pipelined DDR SDRAM controller

A DDR SDRAM is awkward to drive directly. Before first use it needs a fixed
power-up ritual. Every access must open a row, wait, issue the column command
and then close the row again. Data moves on both edges of the clock, and the
array must be refreshed regularly. This controller sits between a simple bus
master and one x16 DDR SDRAM and hides all of that. The master asks for a
burst read or write at a 22-bit address, or for a refresh. The controller
does the rest.

The controller is built from three modules, named after the architecture it
follows:

| module      | role |
|-------------|------|
| `main_ctrl` | the two state machines: `init_fsm` (power-up sequence) and `cmd_fsm` (read, write and refresh cycles), each timed by a `clk_counter` |
| `sig_gen`   | turns the two 4-bit state vectors *iState* and *cState* into the DDR command, bank and address pins |
| `data_path` | moves the burst between the 16-bit system bus and the 16-bit DDR bus at double data rate |

`ddr_ctrl` is the top level that wires them together. `ddr_pkg` holds the
shared state encodings, the command encoding, the address geometry and the
default timing.

The controller is *pipelined*. At the end of a burst, the next request is
issued at once if its bank does not need recovery time. The controller does
not first return to idle or wait for the previous bank's precharge.

## Interfaces

### System side (bus master)

| signal | dir | meaning |
|---|---|---|
| `sys_clk`, `sys_clk2x` | in | controller clock, and a clock at twice its frequency with rising edges aligned to it |
| `sys_reset` | in | asynchronous, active high |
| `sys_dly_200us` | in | the master raises it once the 200 µs power-up delay has passed |
| `sys_init_done` | out | initialization finished; requests are served from now on |
| `sys_add[21:0]` | in | `{bank[1:0], row[11:0], column[7:0]}` |
| `sys_adsn`, `sys_r_wn` | in | request strobe (active low) and direction (1 = read) |
| `sys_ack` | out | one-cycle pulse: the request was taken |
| `sys_ref_req` / `sys_ref_ack` | in / out | refresh request, and the refresh cycle in progress |
| `sys_cyc_end` | out | last cycle of a read, write or refresh cycle |
| `sys_pipe_issue` | out | a request was issued in the pipeline slot (status) |
| `sys_d_i`, `sys_dmsel[1:0]` | in | write word and its byte mask (1 = byte not written) |
| `sys_d_o`, `sys_data_valid` | out | read word and its strobe |
| `sys_rdyn` | out | low while a data word moves, in either direction |

**Request handshake.** The master drives `sys_add` and `sys_r_wn`, and holds
`sys_adsn` low until it sees `sys_ack`. The address is latched inside when
the request is taken. From then on the master may present the next request.

**Refresh handshake.** Hold `sys_ref_req` high until `sys_ref_ack` rises,
then drop it. A request still high when the refresh ends starts a second
refresh. Refresh has priority over a waiting read or write. No request is
taken while `sys_ref_ack` is high.

**Data handshake** (in the `sys_clk2x` domain, one word per `sys_clk2x`
cycle):

- **Write.** `sys_rdyn` goes low with `sys_data_valid` low for BL cycles.
  When the master samples this at a rising `sys_clk2x` edge, it drives the
  next word on `sys_d_i`, with its mask on `sys_dmsel`, from that edge on.
- **Read.** Each word appears on `sys_d_o` for one cycle, with
  `sys_data_valid` high and `sys_rdyn` low.

Words move in request order. Reads and writes are never reordered.

### DDR side

`ddr_clk`/`ddr_clkn` (this is `sys_clk`), `ddr_cke`, `ddr_csn`, `ddr_rasn`,
`ddr_casn`, `ddr_wen`, `ddr_ba[1:0]`, `ddr_add[11:0]`, `ddr_dqm[1:0]`. The
bidirectional DQ and DQS are split into separate ports:
`ddr_dq_o`/`ddr_dq_i`/`ddr_dq_oe` and `ddr_dqs_o`/`ddr_dqs_oe`. The tri-state
pads, and the quarter-cycle DQS shift a real board needs, belong in the
FPGA's I/O cells around this RTL.

## Initialization (`init_fsm`)

After reset, the FSM waits in `I_IDLE` with CKE low until `sys_dly_200us`
rises. It then issues the JEDEC DDR power-up sequence. Each command state
lasts one cycle and is followed by a wait state timed by the counter:

```
I_NOP -> I_PRE -> I_TRP -> I_EMRS -> I_TMRD -> I_MRS(DLL reset) -> I_TMRD
      -> I_PRE -> I_TRP -> I_AR1 -> I_TRFC1 -> I_AR2 -> I_TRFC2
      -> I_MRS -> I_TMRD -> I_READY
```

The two passes through `I_PRE`/`I_TRP` and `I_MRS` are told apart by two
flags: `dll_rst_done` and `load_mrs_done`. The first mode register load sets
the DLL-reset bit (A8). The mode word is `{A8 = DLL reset, A6..A4 = CL,
A3 = 0 (sequential), A2..A0 = BL code}`. The extended mode register load is
BA = 01 with A = 0, which enables the DLL.

A wait state keeps the next command exactly tRP, tMRD or tRFC cycles after
the previous one. From `sys_dly_200us` to `sys_init_done` takes
`2 + 2·tRP + 3·tMRD + 2·tRFC` cycles: 34 at the defaults.

## Command cycles and the pipeline slot (`cmd_fsm`)

Every read or write opens the row with ACTIVE. After tRCD it issues READ or
WRITE *with auto precharge* (A10 = 1), so the bank closes by itself after the
burst. All banks are therefore idle between cycles, which is also what
AUTO REFRESH requires. The controller never tracks open rows.

States and their lengths, at the defaults in brackets:

| cycle | states |
|---|---|
| read | `C_ACTIVE` 1, `C_TRCD` tRCD−1 (2), `C_READA` 1, `C_CL` CL (2), `C_RDATA` BL/2 (2) |
| write | `C_ACTIVE` 1, `C_TRCD` tRCD−1 (2), `C_WRITEA` 1, `C_WDATA` BL/2 (2), then `C_TDAL` tWR+tRP (5) unless pipelined |
| refresh | `C_AR` 1, `C_TRFC` tRFC−1 (9) |

`sig_gen` registers the pins, so each command reaches the device one clock
after its state is entered.

**The pipeline slot.** The last cycle of `C_RDATA` or `C_WDATA` is the slot.
There the FSM samples the next request, just as it would in `C_IDLE`. It
issues the request immediately, going straight to `C_ACTIVE`, when all of
these hold:

- a request is waiting and no refresh is requested;
- the request goes to a different bank, **or** the burst just finished was a
  read whose auto precharge is already over. For a read that holds when
  `CL + 1 ≥ tRP`, which is true at the defaults.

The new ACTIVE then overlaps the previous bank's write recovery and
precharge. A write followed by an access to the same bank goes through
`C_TDAL`, for tWR + tRP cycles after the last cycle of the burst. Likewise,
a write followed by a refresh. When `CL + 1 < tRP`, reads wait
`tRP − CL − 1` cycles there too.

Issue interval at the defaults, from one ACTIVE to the next:

| sequence | cycles |
|---|---|
| read → any read or write | 8 |
| write → other bank | 6 |
| write → same bank | 12 (through `C_TDAL` and `C_IDLE`) |
| non-pipelined cycle, for comparison | 9 (read), 12 (write) |

A burst of BL = 4 words occupies the DDR bus for 2 clocks. Requests are
still executed one at a time, and the pipelining removes only the turnaround
between them. A second request never overlaps the data phase of the first.

## Double-data-rate data path (`data_path`)

The system and DDR buses are both 16 bits wide. The DDR bus carries a word
on each clock edge. The system side therefore runs on `sys_clk2x` and moves
one word per `sys_clk2x` cycle. Each `sys_clk2x` rising edge is one edge of
the DDR clock, so the whole data path can be written with ordinary
single-edge flip-flops.

The data path does not receive a separate start signal. It watches *cState*.
The first `sys_clk2x` edge that sees `C_READA` or `C_WRITEA` shifts a 1 into
a shift register. Fixed taps then time every word. Let e be the `sys_clk2x`
edge on which the READA/WRITEA state began:

| event | `sys_clk2x` cycle |
|---|---|
| READ sampled by the device | e + 4 |
| device drives read word i | e + 4 + 2·CL + i |
| read word i on `sys_d_o`, `sys_data_valid` high | e + 5 + 2·CL + i |
| `sys_rdyn` low asking for write word j | e + 3 + j |
| master drives write word j | e + 4 + j |
| write word j on `ddr_dq_o`, `ddr_dq_oe` high | e + 5 + j (device samples it one clock after WRITE, plus j/2) |

`ddr_dqs_o` is high for even words and low for odd ones, with one low
preamble cycle. Read data is captured with `sys_clk2x`, not with the DQS
strobe from the device. This works in simulation and at modest clock rates.
A fast board needs DQS-based capture in the I/O cells.

From `sys_ack` to the first read word is `2·tRCD + 3 + 2·CL` `sys_clk2x`
cycles. At the defaults that is 13, or 6.5 controller clocks.

## Parameters

All parameters are `int unsigned` on `ddr_ctrl` and are passed down. The
timing values are in `sys_clk` cycles.

| parameter | default | meaning |
|---|---|---|
| `CL` | 2 | CAS latency; 2 or 3 (2.5 is not supported) |
| `BL` | 4 | burst length in words (2, 4 or 8) |
| `TRP` | 3 | precharge period |
| `TRCD` | 3 | ACTIVE to READ/WRITE |
| `TMRD` | 2 | mode register set cycle |
| `TRFC` | 10 | auto refresh period |
| `TWR` | 2 | write recovery |

The defaults suit a DDR-266 device at 133 MHz (7.5 ns). The geometry is in
`ddr_pkg`: 4 banks × 4096 rows × 256 columns × 16 bits = 64 Mbit. The wait
states need tRP, tRCD, tMRD and tRFC of at least 2. Elaboration-time
assertions check this.

## What follows the source and what is this design's own

Taken from the architecture this design implements:

- the three-module split, and INIT_FSM/CMD_FSM producing 4-bit iState and
  cState with a clock counter;
- the system and DDR signal names and the 22-bit address, 2-bit bank and
  16-bit data widths;
- the initialization state names and the `load_mrs_done` flag;
- auto precharge on every access;
- the refresh request/acknowledge rules, and `c_idle` waiting for
  `sys_init_done`;
- the data path's dependence on cState;
- the idea of pipelining requests to different memory locations.

This design's own choices:

- the command FSM states other than `C_IDLE` and `C_AR`;
- the exact pipelining rule (the slot at the end of a burst);
- the `sys_ack` request handshake and the write-data handshake on
  `sys_rdyn`;
- the `sys_clk2x` data path timing;
- the address split `{bank, row, column}`;
- all timing values, CL = 2 and BL = 4;
- registered command outputs;
- the clocks each block uses. The source's block diagrams give both clocks
  to the signal generator and to the data path. Here `sig_gen` runs on
  `sys_clk` only and `data_path` on `sys_clk2x` only.

Known limits:

- **DLL wait.** The 200-clock wait after DLL reset before the first READ is
  not enforced. After `sys_init_done`, the master should wait about 200
  clocks before its first read if the device requires it.
- **tRAS.** This is not checked. With auto precharge, ACTIVE→precharge is
  tRCD + BL/2 = 5 cycles at the defaults. Devices that need tRAS > 37.5 ns
  at 133 MHz need a larger `TRCD`.
- **Refresh interval.** The controller has no refresh interval timer. The
  master must raise `sys_ref_req`, for example every 7.8 µs.
- **No row-hit reuse.** Every access pays ACTIVE and precharge.
- **Resources.** Generic synthesis gives about 138 flip-flop bits and two
  counters. The reference implementation reported 98 registers and two
  counters on a Zynq device. Clock speed and power were not measured here.

## Simulating

Every file in `rtl/` and `tb/` holds one module or package, named after the
file. Load `rtl/ddr_pkg.sv` first and let Verilator find the rest:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ddr_ctrl \
  -Irtl -y rtl -y tb +libext+.sv rtl/ddr_pkg.sv tb/tb_ddr_ctrl.sv
./obj_dir/Vtb_ddr_ctrl
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_ddr_ctrl` | the whole controller at its default parameters against a DDR SDRAM model. Covers a real 200 µs power-up and 1000 random reads and writes with byte masks, over the same and different banks, back to back and with gaps. A refresh is requested every 7.8 µs. Every read word is compared with a shadow memory, and the read latency is checked. It counts pipelined issues, write-recovery waits, refreshes (also ones that won over a waiting request) and masked writes, and fails if any of them never happened. Runs in about 20 s of wall time under Verilator. |
| `tb_demo_readback` | board-style bring-up: nothing happens while reset is held with a write requested; then `8'b10011001` is written and read back |
| `tb_main_ctrl` | hand-over from INIT_FSM to CMD_FSM, refresh priority after init, the same-bank write-recovery wait |
| `tb_init_fsm` | the exact power-up command sequence, with the length of each wait, and the DLL-reset flag |
| `tb_cmd_fsm` | state sequences for pipelined and non-pipelined issue, refresh, refresh winning the slot, `sys_ack`, the latched address and `sys_cyc_end` |
| `tb_sig_gen` | the command truth table, address split and mode register word for every state |
| `tb_data_path` | cycle-exact read capture and write launch, `sys_rdyn`, DQS and masks |
| `tb_clk_counter` | counter reload, count-down and reset |

`tb/ddr_sdram_model.sv` is a behavioural device model and is not
synthesizable. It checks the power-up order, tRP, tRCD, tRFC, tMRD, tWR,
commands to open or closed banks, refresh with a busy bank and bus
conflicts, and it counts every violation.
