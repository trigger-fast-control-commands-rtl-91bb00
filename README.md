# Trigger-board Fast Control front end

Every trigger board in the crate (TSF, BLT, PTD, GLT, ZPD) is driven by one
serial command line, the **CLINK**, and answers on one serial data line, the
**DLINK**. The Fast Control (FC) section described here is the part of the board
firmware that is the same on all boards. It does four things:

* decodes the 12-bit CLINK commands and the variable-length payloads of the
  configuration commands;
* runs the trigger-time protocol: an *L1 Accept* stores an event in one of four
  DAQ buffers, and a *Read Event* sends the oldest stored event to the readout
  module;
* gives the crate controller register and memory access: control/status
  registers (CSRs), a 32-bit address, single-word and variable-size block reads
  and writes of the board memories;
* starts and sequences the play/record diagnostic memories.

The logic behind the board memories, the event data and the GLINK is specific
to each board. It sits outside this RTL and connects through ports of `fc_top`.

## Serial formats

Both lines carry one bit per clock, least significant bit of every field first.

**CLINK command header (12 bits):** a `0`, a start bit `1`, five op-code bits,
then five data / sub-command bits. Run-time commands (op-codes `0x00`–`0x0B`)
end here, and their five data bits carry, for example, the trigger tag of an
L1 Accept. Configuration commands (op-codes `0x11`–`0x1E`) use the five bits as
a sub-command and may be followed by a payload:

| op | command | sub-command | payload after the header |
|----|---------|-------------|--------------------------|
| 1E | User Reset | – | – |
| 1D | Read CSR | CSR address | – |
| 1C | Write CSR | CSR address | 16-bit value |
| 1B | Write Block Address | – | 16-bit high address half |
| 1A | Write Address | – | 16-bit low address half |
| 19 | Read Memory | bit0: 0 = 16 bit, 1 = 32 bit | – |
| 18 | Read Memory & increment | 16/32 | – |
| 17 | Write Memory | 16/32 | 16-bit address, 16/32-bit data |
| 16 | old fixed block write | – | not executed; 512 × 32 bits are skipped |
| 15 | old fixed block read | – | not executed |
| 14 | TSF Reframing | – | – |
| 13 | Block Write (variable) | 16/32 | 16-bit start, 16-bit count N, N words |
| 12 | Block Read (variable) | 16/32 | – (uses the setup of 11) |
| 11 | Block Read Setup | 16/32 | 16-bit start, 16-bit count N |

Run-time op-codes: `1` Clear Readout, `2` Sync, `3` L1 Accept (data = tag),
`4` Read Event, `5` Calibration Strobe (no action on trigger boards),
`6` Start Playback. `0` and `7`–`B` do nothing.

**DLINK event frame:** a 32-bit header, then `DAQ_NWORDS` 16-bit words.

| header bits | content |
|-------------|---------|
| 0 | start bit, 1 |
| 1 | 1 = event data |
| 6:2 | trigger tag, tag bit 0 at bit 2 |
| 12:8 | local clock counter at L1 Accept |
| 14:13 | DAQ buffer number, **most significant bit first** (bit 13 = number bit 1) |
| 31:16 | CSR1 summary, **most significant bit first** (bit 16 = CSR1 bit 15) |

The reversed order of the last two fields is a historic feature of the board
firmware that the readout side expects. `fc_pkg::event_header` builds this
header.

**DLINK register frame:** a 16-bit header (bit 0 start = 1, bit 1 = 0, bits
6:2 the op-code, bits 12:8 the sub-command), then the data words. Read CSR
sends one 16-bit word. Read Memory sends one 16- or 32-bit word. Block Read
sends N words.

Frames start with their start bit. The line idles at 0 between frames.

## The address and the block transfers

The FC address is 32 bits: the *block address* (high half, command 1B, read
back as CSR4) and the *current address* (low half, command 1A, read back as
CSR3). Addresses count memory words. Every access that steps the address adds
one to the full 32-bit value, so a carry out of the low half enters the block
address.

* `17` loads its payload address into the current address, then writes there.
* `18` reads, then steps the address. `19` reads and leaves the address alone.
* `13` loads the start address, then writes N words at successive addresses.
  It leaves the address at start + N. The word count is in 16-bit words for
  16-bit transfers and in 32-bit words for 32-bit transfers. 16-bit transfers
  run at full rate with no padding.
* A read command cannot carry a payload. A block read therefore takes two
  commands: `11` sets the start address and count, then `12` sends the block.
  The width comes from the sub-command of `12`, which the host must set equal
  to that of `11`. The address ends at start + N.
* The readout module buffers at most 512 long words per transfer (513 with the
  start address). This RTL does not enforce that limit: the host must split
  larger transfers.

The old boards used a fixed 512-word block write, op-code `16`. The new FC does
not implement it. Its payload, sent by mistake, would be taken for commands and
could reconfigure the board. So after a `16` header the receiver ignores the
line for 512 × 32 bit times (`GUARD_BITS`), and `guard_active` is high while it
does.

## The trigger-time path

`fc_daq_buffer` holds four event buffers in a ring, one for each value of the
2-bit buffer number. On L1 Accept, the `DAQ_NWORDS` words on `event_data` are
copied into the next free buffer. The trigger tag, the local clock counter and
the CSR1 summary of that cycle are stored with them. Read Event claims the
oldest unclaimed event, which goes out on the DLINK as soon as the line is
free. The DLINK gives the event port priority, but it never cuts a register
frame short. Read Events that come in while a frame is still going out are
counted and served in order. The buffer is freed when its last word has been
handed to the serializer. Clear Readout (and User Reset) reset the ring.

Two corner cases have no defined behaviour in the protocol. Here they are
handled as follows, and both are reported on ports:

* An L1 Accept that finds all four buffers full is dropped (`daq_overflow`).
* A Read Event with nothing left to claim is ignored (`daq_rd_empty`).

Run-time commands are executed only when CSR1 bit 0 (run mode) is set.
Otherwise they pulse `runcmd_ignored`. Configuration commands are always
accepted. Otherwise Write CSR would be refused in run mode, and run mode could
never be left.

`fc_clock_counter` is the 5-bit local clock counter whose value goes into the
event header. Its `clk_en[k]` outputs are one-cycle enables at 1/2^(k+1) of
the clock, from which the board derives its slower clocks. Sync and TSF
Reframing restart the counter at 0, so that boards receiving the same command
stay in phase. TSF Reframing also pulses `tsf_fifo_clear`.

## Registers

Write addresses (sub-command of `1C`):

| CSR | bits | meaning |
|-----|------|---------|
| 1 | 0 | run mode; bit 1 spare; bit 2 not writable |
| 2 | 1:0 | DAQ format number (board defined) |
| 3 | 0,2 / 1,3 | enable / play(1)-record(0) of mem(0), mem(1) |
| 3 | 5:4 / 9:6 | enable lines 2, 3 / play-record of mem(2)..mem(5) |
| 4 | 0 | 0 = cyclic, 1 = single-shot play/record |
| 5 | 3:0 | software LEDs |

Read addresses (sub-command of `1D`) mean something else:

| CSR | content |
|-----|---------|
| 1 | summary: 0 run, 1 spare, 2 board ID bit 2, 4:3 DAQ format, 5–8 enable/play of mem(0), mem(1), 9 single-shot, 10 GLINK ready, 11 GLINK synchronized, 12–13 mem(0)/mem(1) active, 14–15 board ID bits 0, 1 |
| 2 | LEDs |
| 3 | current address |
| 4 | block address |
| 5 | 1:0 enable lines 2–3, 5:2 play/record mem(2)..mem(5), 6 mem(2) active, 7 = 1 (new-system flag) |

Board IDs: 0 old TSF, 1 BLT, 2 PTD, 3 GLT, 4 TSF-X, 5 TSF-Y, 6 ZPD. The 3-bit
ID is split across bits 2, 14 and 15 of the summary so that old software still
finds its 2-bit ID in bits 14–15.

## Diagnostic memories

Six memories have a play/record select each, but there are only four enable
lines. mem(0) and mem(1) have lines 0 and 1. The algorithm memories share the
other two in pairs: mem(2) and mem(3) use line 2, mem(4) and mem(5) use line 3.
The protocol says only that memories may share enable lines, so this pairing
is a choice of this design.

Start Playback activates every memory whose line is enabled. A shared address
counter then sweeps 0 .. `PB_DEPTH`−1, one address per clock. Each active
memory gets a read enable (`pb_re`, play) or a write enable (`pb_we`, record)
at every address. In single-shot mode the sweep stops after one pass. In
cyclic mode it wraps, and a memory stops when its enable line is cleared or
on User Reset.

## Modules

| file | role |
|------|------|
| `rtl/fc_pkg.sv` | op-codes, CSR addresses, board IDs, header builders |
| `rtl/fc_clink_rx.sv` | CLINK deserializer, payload framing, guard for op-code 16 |
| `rtl/fc_run_decode.sv` | run-time command strobes, gated by run mode |
| `rtl/fc_mem_ctrl.sv` | configuration commands: address registers, memory port, CSR access, readout requests |
| `rtl/fc_csr.sv` | CSR write decode and read-back map |
| `rtl/fc_clock_counter.sv` | local clock counter, Sync, slow-clock enables |
| `rtl/fc_daq_buffer.sv` | four DAQ event buffers |
| `rtl/fc_dlink_tx.sv` | DLINK serializer with event/register arbitration |
| `rtl/fc_playback_ctrl.sv` | play/record sequencer |
| `rtl/fc_top.sv` | the complete FC section |

Top-level parameters (defaults): `DAQ_NBUF = 4`, `DAQ_NWORDS = 8`,
`NMEM = 6`, `PB_DEPTH = 256`, `GUARD_BITS = 16384`.

**Board memory port.** `mem_req` starts a single-cycle access with `mem_we`,
`mem_wide`, `mem_addr` (32 bits) and `mem_wdata`. For a read, `mem_rdata` must
hold the data in the next cycle.

**Timing.** A command header is decoded one cycle after its last bit. A
register frame starts on the DLINK a few cycles after the read command's
header. A frame with H header bits and N words of W bits takes H + N·W cycles.

## What is this design's own, and what departs from the protocol

The protocol defines the formats, the op-codes, the CSR layouts and what each
command does. The following are choices made here:

* The event data arrives as a parallel snapshot of `DAQ_NWORDS` = 8 words. The
  real count depends on the board and its DAQ format.
* The event readout has its own buffer pointers. On the original boards it
  borrowed the FC address registers, so CSR3/CSR4 read back wrong after a Read
  Event until the host rewrote them. Here they stay valid, and a host that
  rewrites them anyway loses nothing.
* The DLINK priority, the one-cycle memory latency, the depth of the
  play/record sweep, the ratios of the slow clocks, and the behaviour on DAQ
  overflow and empty reads.
* The command table says `1A` sets the "upper 16 bit". CSR3 and `1B` show that
  `1A` sets the lower half, which is what is built.
* User Reset clears the address registers, the block-read count, the DAQ ring
  and the play/record sequencer. The CSRs are cleared only by `rst_n`.
* Only the new-system register layout is built. The old boards' input/output
  memory layout is not.

The host must keep to these rules:

* Do not overlap a memory write payload with a memory read frame that is still
  going out. An assertion in `fc_mem_ctrl` flags this.
* Wait for a register frame to finish before sending the next read command. A
  new read command that arrives before the pending frame has started replaces
  it.

## Simulating

Each testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a run that hangs.
Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fc_pkg.sv tb/tb_fc_top.sv --top-module tb_fc_top
./obj_dir/Vtb_fc_top
```

Each `tb_fc_<block>.sv` tests one module. `tb_fc_top.sv` runs the whole FC at
its default parameters and takes it through one complete operation:

* configuration and CSR read-back;
* single and block memory traffic;
* a run with buffer overflow, an empty read, and a Read Event waiting behind
  a register frame;
* Sync, Reframing, a play/record sweep, the op-code 16 guard and User Reset.

Each DLINK frame is compared bit for bit with a frame built from the header
definitions. The testbench also counts that each of these mechanisms actually
happened. Simulation takes under a second.

`tb_fc_block_transfer.sv` runs the largest transfers the readout side accepts
through `fc_top`: 512 32-bit words, and 1024 16-bit words that cross a block
boundary. Each is written with a variable block write and read back with
Block Read Setup + Block Read. The test checks every word, the DLINK frame
bit for bit, the one-bit-per-clock rate with no gaps, and the final address.
