# Dual-exchange time switch with caller ID

Two small telephone exchanges, 16 subscribers each, share one digital time
switch. Every subscriber talks to the switch through a single 32-bit word, the
*opcode*. The opcode says whether the subscriber wants to call, whom it wants to
reach, whether that party is in its own or the other exchange, and which 16 data
bits to send. Once per frame the switch reads all 32 opcodes into memory in
order. It then fills every outlet from memory in an order set by a connection
map. This is the classic "sequential write, random read" time switch. A called
subscriber receives the caller's data and also the caller's number: that is the
caller ID.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable and written at
the published sizes: 2 exchanges, 16 subscribers each, 32-bit opcodes, a 16 x 17
data memory and a 16-entry control memory.

## The opcode

```
 31  30  29..26  25..22  21..16  15..........0
 E   I   D       S       000000  data
```

| field | meaning |
|-------|---------|
| `E`    | subscriber enabled. 1 means "I am calling"; 0 means "I am free to be called". |
| `I`    | 1 = inter-exchange call (the destination is in the other exchange); 0 = intra-exchange. |
| `D`    | destination subscriber number, 0-15, inside the exchange chosen by `I`. |
| `S`    | the caller's own number. It is what the called party sees as caller ID. |
| `data` | 16 bits carried to the called subscriber. |

`switch_pkg::opcode_t` is this layout as a packed struct.

A call goes through only when the caller has `E = 1` and the called subscriber
has `E = 0`. An enabled subscriber counts as busy.

## One frame

Both exchanges are handled in parallel, in lock-step. All counts below are clock
cycles with `en` high.

```
            |<------- scan: 16 clocks ------->|<------- read: 16 clocks ------->|
inlet  ctr   0   1   2  ...  15
outlet ctr                                      0   1   2  ...  15
frame_done                                                         ^ (last read clock)
```

**Scan (sequential write).** The inlet-side modular counter steps `k` from 0 to 15. In
each exchange the *in gate* puts subscriber `k`'s opcode on the memory data
path. The MDR is the gated word and the MAR is the counter value. At the end of
the clock:

* the exchange's **data memory** stores `{E, data}` at address `k`. That is 17 bits.
* the exchange's **caller ID memory**, source half, stores `S` at address `k`.
* if `E = 1`, the caller *claims* outlet `D` in the **control memory** of the
  exchange chosen by `I`: its own exchange if `I = 0`, the other one if `I = 1`.
  The entry records the caller's inlet number, which is its exchange plus `k`.

So 32 subscribers are scanned in 16 clocks.

**Read (random read).** The outlet-side modular counter steps `j` from 0 to 15.
In each exchange `y`:

* control memory entry `j` names the caller, if there is one. The caller's data
  word and caller number are read at the caller's address, from the memories of
  whichever exchange the caller belongs to. This is the random read. It crosses
  between exchanges for inter-exchange calls.
* subscriber `j`'s own data memory word supplies its `E` bit. The call is
  delivered only if `E = 0`.
* the **out gate** loads outlet register `j`:
  * call delivered: `{E=0, I=(caller in other exchange), D=j, S=caller number, 0, caller's data}`.
  * otherwise: `{own E, I=0, D=j, own S, 0, own data}`.
* the caller ID memory's destination half records the caller's number for
  outlet `j`, with a valid flag.

`frame_done` is high during the last read clock. After that edge every outlet
holds the result of the frame. The control memory is cleared on that same clock,
so each frame's connections come only from that frame's opcodes. Frames follow
one another with no gap. When `en` is low, every counter and memory holds its
value and no data moves.

### Who wins an outlet

Several callers can name the same outlet. These rules are this design's own:

1. The first caller in scan order (lowest `k`) keeps the outlet for the frame.
2. The two exchanges scan at the same time, so two claims can arrive on the same
   clock. In that case the caller from the called subscriber's own exchange
   wins. `control_memory` applies its `LOCAL` write port last.
3. The losers get no indication. They see only that nobody received their data.

## Serial subscriber lines (`SERIAL = 1`)

By default each subscriber line is a parallel 32-bit port (`line_in`,
`line_out`). Subscriber lines in a switching system are normally serial. Setting
`SERIAL = 1` puts a `serial_to_parallel` converter on every inlet and a
`parallel_to_serial` converter on every outlet. It also starts each frame with a
32-clock **load** phase. During that phase:

* `line_shift` is high, and each inlet converter takes one bit of `ser_in`,
  MSB first.
* each outlet converter sends the previous frame's outlet word on `ser_out`,
  MSB first. Bit 31 appears in the first load clock.

A serial frame is therefore 64 clocks: load 32, scan 16, read 16. The results of
frame *n* leave the switch during the load phase of frame *n + 1*. The
converters are instantiated in both modes. With `SERIAL = 0` they stay idle.

## Ports of `switching_system`

| port | dir | type | meaning |
|------|-----|------|---------|
| `clk`, `rst`, `en` | in | 1 | clock; synchronous active-high reset; run enable |
| `line_in[2][16]`  | in  | `opcode_t` | subscriber opcodes. `[0]` = exchange 1, `[1]` = exchange 2 |
| `line_out[2][16]` | out | `opcode_t` | outlet words (see above) |
| `ser_in[2][16]`, `ser_out[2][16]` | in/out | 1 | serial lines, used when `SERIAL = 1` |
| `line_shift` | out | 1 | a serial bit is taken and presented this clock |
| `phase` | out | `phase_e` | `PH_IDLE`, `PH_LOAD`, `PH_SCAN`, `PH_READ` |
| `frame_done` | out | 1 | last read clock of a frame |
| `called[2][16]` | out | 1 | the outlet received a call in the last frame |
| `caller_id[2][16]`, `caller_id_valid[2][16]` | out | 4, 1 | number of the caller of each outlet |

Reset clears the outlets, the call flags, the caller ID destination half, the
control memory and the sequencer. The data memory and the caller ID source half
are not reset. They are always written by a scan before anything reads them.
The first edge with `en` high after reset leaves `PH_IDLE`.

## Modules

| file | block |
|------|-------|
| `rtl/switch_pkg.sv` | opcode, data-memory word, inlet number, control-memory entry, phase types |
| `rtl/switching_system.sv` | top: both exchanges, the claim logic, the random-read path, the outlet word |
| `rtl/switch_ctrl.sv` | phase sequencer, holding the inlet counter, the outlet counter and the serial bit counter |
| `rtl/mod_counter.sv` | modulo-N counter; its count is the memory address register |
| `rtl/in_gate.sv` | 16:1 inlet selector |
| `rtl/data_memory.sv` | 16 x 17 memory, one write port, 3 combinational read ports |
| `rtl/control_memory.sv` | 16-entry connection map, one claim port per exchange, clear |
| `rtl/caller_id_memory.sv` | 16 source + 16 destination caller numbers |
| `rtl/out_gate.sv` | outlet decoder and 16 outlet registers with call flags |
| `rtl/serial_to_parallel.sv`, `rtl/parallel_to_serial.sv` | line converters |

Each exchange has its own data memory, control memory, caller ID memory, in gate
and out gate. The sequencer and its counters are shared.

The memories have combinational read ports. That way the scan writes and the
read-phase lookups each finish in one clock, which gives the 16-clock phases. A
memory compiler with synchronous reads would need one more pipeline stage in the
read phase.

## How far it follows the original design, and where it departs

The following come from the published description:

* two exchanges of 16 users each
* the opcode layout and the meaning of `E` and `I`
* the sizes of the data memory (16 x 17) and the control memory (16 entries)
* the 16 + 16 caller ID locations
* the 16-clock sequential scan of all 32 subscribers, then a random read steered
  by the control memory
* the rule "caller enabled, called disabled"
* overwriting the called subscriber's data bits and its bits 25:22 with the
  caller's data and number
* the block structure: in gate, S/P, data memory, data out, P/S, out gate, two
  modular counters, MAR, MDR, control memory
* the clock/reset/enable behaviour

The following are choices made here. The source does not settle them:

* **Control memory indexed by outlet.** Each entry holds the inlet that feeds
  that outlet. The source describes it both this way and as "the entry of inlet
  `k` holds the destination". Both deliver the same data. The outlet-indexed
  form lets the read phase walk the outlets in order.
* **Contention rules** (see "Who wins an outlet").
* **The word shown on an outlet that received no call.** The memories keep only
  `E`, `S` and the data of a subscriber. Its own `I` and `D` bits are not kept,
  so they are shown as 0 and as the outlet number.
* **17th data memory bit = the subscriber's enable.**
* **The read phase is 16 clocks, one outlet per clock.**
* **Serial framing** (MSB first, a 32-clock load phase) and keeping parallel
  lines as the default. The published top level has parallel 32-bit buses, and
  its 16-clock scan of 32 subscribers would not be possible with bit-serial
  inlets.
* **Synchronous reset.**
* **The published simulation.** It calls the outlet that receives data "the 6th
  address" both for destination `0110` and for destination `0101`. Here data
  always goes to the outlet numbered by `D`.

Not built:

* the other two control schemes, random write / sequential read and random
  in / random out
* trunk (transit) connections between exchanges beyond the two joined here

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/switch_pkg.sv tb/switch_model_pkg.sv tb/tb_switching_system.sv \
    --top-module tb_switching_system
./obj_dir/Vtb_switching_system
```

Use the same command for any other `tb/tb_<block>.sv`. The block-level benches
do not need `switch_model_pkg.sv`.

* `tb_switching_system`: end-to-end test. It runs a parallel-line switch and a
  serial-line switch side by side against the frame model in
  `tb/switch_model_pkg.sv`. That model is written from the switching rules above,
  not from the RTL. The test covers the two published calls: exchange 1
  subscriber 5 to exchange 2 subscriber 6, and exchange 1 subscriber 6 to
  subscriber 5, both carrying `16'hAD01`. It then runs random traffic with random
  enable gaps and a reset in the middle of a scan. It counts inter- and
  intra-exchange calls, disabled callers, busy called subscribers, contended
  outlets, enable holds, resets and serial frames, and fails if any never
  occurred. It also checks the frame lengths: 32 clocks with 16 of them scanning
  (parallel), and 64 clocks (serial).
* `tb_switching_system_full`: the top with no parameter overrides. It runs the
  two published calls and one fully loaded random frame.
* `tb_switch_ctrl`, `tb_mod_counter`, `tb_in_gate`, `tb_data_memory`,
  `tb_control_memory`, `tb_caller_id_memory`, `tb_out_gate`,
  `tb_serial_to_parallel`, `tb_parallel_to_serial`: one per block. Each compares
  the block with a reference model under random stimulus.

Verilator is two-state. The testbenches reset or write everything they read.

## Changing it

* `N` in `switching_system` sets the subscribers per exchange. The opcode's
  4-bit `D` and `S` fields (see `switch_pkg`) limit it to 16. The number of
  exchanges, `N_EXCH`, is fixed at 2 by the 1-bit `I` flag.
* To change the contention policy, edit the write loop in `control_memory`.
* To change what an outlet shows, edit the `always_comb` that builds `out_word`
  in `switching_system`.
