# OpenPET Scope-mode firmware in SystemVerilog

This is a synthesizable model of the OpenPET Standard System firmware.
The system has eight detector units of eight 16-channel Detector Boards, 1024 channels in all.
It is built for the Scope (raw data) mode.
Everything below the analog front end and above the USB module is logic:
- ADC capture, triggering, buffering and formatting on each Detector Board;
- round-robin block multiplexing on the Support Boards;
- the 16-bit data links;
- the clock-domain crossing to the USB side;
- the whole command tree, with SPI between the boards.

## Structure

```
openpet_top
 ├─ reset_ctrl, slice_gen              uppermost-node reset, Slice/startup
 ├─ 8 x detector unit
 │   ├─ sb_node (DUC)                  Support Board: 2 IO FPGAs + Main FPGA
 │   │   ├─ link_rx x8, rr_mux x2 (IO FPGAs), link_tx/rx (IO -> Main)
 │   │   ├─ rr_mux (Main FPGA), link_tx (uplink)
 │   │   └─ spi_slave, cmd_child (parent side), cmd_parent + spi_master (children)
 │   └─ 8 x db_node                    Detector Board FPGA
 │       ├─ ddio_rx per channel, scope_acq, link_tx
 │       └─ spi_slave, cmd_child, pio_master, sw_fw_if, db_regs
 ├─ sb_node (CUC, uppermost)           merges the 8 units, takes host commands
 └─ async_fifo                         main clock -> USB clock, 16 bits
```

`block_fifo` (used by `rr_mux`) and `pio_master` (used by `db_node`) are helper modules.
Shared types live in `rtl/openpet_pkg.sv`:
- the 80-bit command;
- the address map;
- the Scope settings word;
- the three packet formats;
- the command codes.

## Commands

A command is 80 bits: a 16-bit cmd_id, 16-bit source, 16-bit destination and 32-bit payload.
The MSB of cmd_id is the c/r flag.

Destination address bits:

| Bit | Meaning |
|-----|---------|
| 15 | broadcast |
| 14 | host PC |
| 12 | MBC |
| 11 | CDUC |
| 10 | CUC |
| 9 | DUC |
| 8:6 | Multiplexer Board |
| 5:3 | detector unit |
| 2:0 | Detector Board |

How a command travels:
- The host hands a command to the coincidence unit controller over a valid/ready port.
- A controller runs the command itself if its own flag is set (CUC for the top node, DUC for a unit). Only PING is handled locally; it returns the number of dropped blocks.
- Otherwise the controller relays the command to the child slot named by the address field: bits 5:3 at the top, bits 2:0 in a unit.
- With the broadcast flag set, the command goes to every slot instead.

Parent to child is SPI, 32 bits per transaction, mode 0, MSB first.

**Write.** The parent sends two words: first {cmd_id, dst}, then the payload. The child's answer to the second word decides the outcome:

| Child's answer | Meaning |
|----------------|---------|
| echo of the first word | accepted (0) |
| all ones (empty slot, pulled-up MISO) or all zeros | dead (2) |
| anything else | busy (1) |

**Read.** The parent waits `RESPONSE_SLEEP` clocks, then reads by sending zeros. The first word it gets back tells it what to do:

| First word read | What the parent does |
|-----------------|----------------------|
| cmd_id with the c/r flag toggled | reads the payload next |
| `CMD_STDCMD_UNKNOWN` (0xFFFE) or `CMD_STDCMD_TIMEDOUT` (0xFFFD) | passes it on as the answer |
| anything else (zeros) | waits again; gives up after `RESPONSE_RETRIES` tries with TIMEDOUT |

A broadcast reply carries a mask of the slots that succeeded.

Commands sent with the c/r flag already set are non-blocking:
- The board acknowledges at once and then runs the command.
- A command that arrives while the board is still busy gets the previous reply back. The parent sees this as busy.

On a Detector Board, the processor's job is done by small state machines.
`pio_master` passes each command over the 16-bit PIO bus with a valid strobe.
`sw_fw_if` reassembles the command for the firmware registers (`db_regs`).

Command codes:

| Code | Command | Payload |
|------|---------|---------|
| 0x01 | PING | none; returns the event count |
| 0x10 | SET_SYS_DATA_MODE | 1 = Scope |
| 0x11 | SET_SYS_DATA_MODE_SETTINGS | settings word |
| 0x12 | SET_SYS_DATA_MODE_ACTION | 1 = run |
| 0x13 | SET_TRIGGER_MASK | trigger mask |
| 0x14 | SET_FW_THRESHOLD | firmware threshold |

Settings word layout:

| Bits | Field |
|------|-------|
| [3:0] | data format |
| [12:4] | number of samples |
| [16:13] | samples before the trigger |
| [20:17] | trigger window |

## Data path (Scope mode)

Each ADC channel arrives on 6 DDR lines, which gives one 12-bit sample per clock.

`scope_acq` keeps a ring buffer per channel. An event starts when either of these happens on an enabled channel:
- its comparator input goes high;
- its sample exceeds the firmware threshold.

Hits within the trigger window are flagged. The block that is read out contains:
- one Detector Board header (PID 4);
- for each channel, a channel header (PID 3: TDC value, hardware/firmware hit, channel number) followed by N samples (PID 1).

The samples start `pre_samples` before the trigger.

Links carry 32-bit packets as two 16-bit words, high half first. Slice is high while a block is being sent, so one run of Slice high is one block.

Each `rr_mux` stores whole blocks per input and sends them in round-robin order. A block that does not fit in its input buffer is dropped whole and counted.

At the top, the stream enters a 16-bit dual-clock FIFO read in the USB clock domain. When the FIFO is almost full the uplink pauses. The buffers behind it then fill, and blocks are dropped upstream. This is how the system behaves when the boards produce more than USB can carry.

## Differences from the described hardware

- All FPGAs share one clock. PLLs, clock-distribution chips and link clock-out pins are not modelled; a `pll_locked` input drives the reset logic.
- Slice is generated as a signal in the uppermost node's clock domain (CLK/8 or CLK/16, selected by `div16`). It is not distributed as a separate clock.
- Coincidence Interface and passive Multiplexer Boards are plain wires.
- The host reply port returns cmd_id and payload only. Source and destination addresses are not echoed back.
- A broadcast sleeps once before polling the first child, then polls the other children directly. Its reply payload is a mask of the slots that succeeded.
- Only Scope mode is built. The singles and coincidence modes need event-word formats and coincidence processing that are not specified.
- The processor, ADCs, comparators/DACs, TDC, configuration flash and USB/Ethernet hardware are outside the model. Their signals are ports.
- Numeric command codes, the settings bit positions, buffer depths, the SPI clock (CLK/16), and the sleep/retry counts are this design's choices. The sleep/retry defaults are 1 ms and 200, giving a 200 ms timeout.

## Simulation

Every block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. Example with plain verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_rr_mux \
    rtl/openpet_pkg.sv tb/tb_rr_mux.sv -o sim && obj_dir/sim
```

The RTL lints clean with verilator's default warnings. Some testbenches compare narrow fields with integer constants, which verilator reports as width warnings; `-Wno-fatal` keeps them from stopping the build.

The end-to-end tests share `tb/tb_openpet_body.svh`:
- `tb_openpet_top`: 2 units x 2 boards x 4 channels with short timeouts and small buffers; it also reaches empty slots and an empty unit.
- `tb_openpet_full`: the full 1024-channel system at default parameters, about 2.5 minutes to build and run.

Both tests:
- configure every board by broadcast;
- exercise unicast, unknown-command, busy and non-blocking cases (empty slots only in the reduced test, since the full system has none);
- fire triggers on all boards while the USB side is slow;
- check every delivered block against the ADC ramp;
- check that delivered plus dropped blocks equal the blocks sent.

The unit testbenches cover the points above at module level. Examples:
- the SPI write/read race in `cmd_child`;
- dead, busy, silent and unknown children in `cmd_parent`;
- drop accounting in `rr_mux`;
- gray-code crossing at unrelated clock rates in `async_fifo`.
