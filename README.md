# AXI4-Lite command slave for a DNN accelerator NoC

A host processor controls a deep-neural-network accelerator by sending it
commands. The accelerator's processing clusters sit behind a network-on-chip
(NoC) that takes a command as one 128-bit word and sends back 8-bit status
bytes. The host only has a 32-bit AXI4-Lite bus. This RTL is the bridge
between the two: a memory-mapped AXI4-Lite slave. Four 32-bit writes build one
128-bit command, and one register read returns the next status byte.

The design aims at full bus throughput: it accepts one write and one read
every clock, at the same time. It does this with skid buffers on the
address and data channels, which keep every AXI READY output coming straight
from a flip-flop.

## Register map

| Address | Access | Meaning |
|---------|--------|---------|
| `0x60`  | R/W | command word 0, packet bits `[31:0]` |
| `0x64`  | R/W | command word 1, packet bits `[63:32]` |
| `0x68`  | R/W | command word 2, packet bits `[95:64]` |
| `0x6c`  | R/W | command word 3, packet bits `[127:96]`; **writing it sends the command** |
| `0x70`  | R   | next status byte from the NoC in bits `[7:0]`, upper 24 bits zero; `0` when none is pending; reading it consumes the byte |

Every other address is ignored. A write to it changes nothing. A read of it
returns 0. Both still get a normal response. `BRESP` and `RRESP` are always
`00` (OKAY). Word 0..2 may be written in any order and any number of times.
Word 3 must come last, because writing it packs whatever the four registers
hold at that moment. Reading 0x60..0x6c returns the words last written.

## How a command travels

```
 AXI AW ──► skid ─┐                          ┌──────────── noc_interface ───────────┐
                  ├─ write ─► decoder ─► reg_0..reg_3 ─► {reg_3,reg_2,reg_1,reg_0} ─► GPP_CMD_data[127:0]
 AXI W  ──► skid ─┘   fire          └─► last_word (0x6c) = Acc_cmd_valid ──►      GPP_CMD_Flag ──► NoC
 AXI B  ◄── BVALID (one clock after the write)     Acc_cmd_ready ◄──             NOC_CMD_ACK ◄── NoC

 AXI AR ──► skid ─► decoder ─► read mux ─► RDATA/RVALID (one clock later)
                                  ▲  status_bit / Acc_status_valid ◄── status reg ◄── NOC_CMD_data/Flag
                                  └─ Acc_status_ready (on a 0x70 read) ──►           GPP_CMD_ACK ──► NoC
```

1. **Writer (`axil_writer`).** AW and W each pass through their own skid
   buffer, so the host may send address and data in either order, or in
   different cycles. A write *fires* in the cycle when all of these hold:
   - both buffers present a beat;
   - the response slot is free (`BVALID` low, or `BREADY` high);
   - no finished command is stuck waiting for the NoC interface.

   The decoder turns the address into `enable_0..enable_3`, and the data
   goes into that register. A write to 0x6c also sets the `last_word`
   register. That register is `Acc_cmd_valid`, and it stays high until
   `Acc_cmd_ready` is seen.
2. **NoC interface (`noc_interface`).** When `Acc_cmd_valid` and
   `Acc_cmd_ready` are both high, it copies the four words into a 128-bit
   output register and raises `GPP_CMD_Flag`. Flag and data are frozen until
   the NoC answers `NOC_CMD_ACK`. `Acc_cmd_ready` is "output register empty,
   or being acknowledged in this clock", so back-to-back commands leave
   without a gap.
3. **Back-pressure.** Suppose the NoC holds off `NOC_CMD_ACK`, and a second
   command is complete and waiting. The writer then stops executing writes,
   so the registers cannot change under the waiting command. The skid
   buffers fill, and after one more beat `AWREADY`/`WREADY` drop. Nothing is
   lost, and the host simply sees the bus stall.

The status path is the mirror image. The NoC offers a byte with
`NOC_CMD_Flag`. It is taken when `GPP_CMD_ACK` is high, meaning no byte is
held. It is held on `status_bit` with `Acc_status_valid`. A host read of
0x70 returns it and pulses `Acc_status_ready`, which frees the register for
the next byte.

## The skid buffer

`skid_buffer` is the part that makes full throughput legal under the AXI
rules. It has to solve two problems at once:

- An AXI slave must not lose a beat it has accepted.
- Its READY should not be a combinational function of what happens further
  downstream, because that makes long timing paths across modules.

The buffer has a single spare register with a full flag:

- **Pass-through (register empty).** `M_data = S_data`,
  `M_valid = S_valid`, and `S_ready = 1`. A word goes through in the same
  clock.
- **Skid.** A word is accepted (`S_valid && S_ready`) while the output
  stalls (`!M_ready`). The word is copied into the register and the full
  flag is set. From the next clock the register drives the output, and
  `S_ready` is low.
- **Drain.** When `M_ready` returns, the stored word leaves, the flag clears
  and `S_ready` rises again.

`S_ready` is simply `!full`, a flip-flop output. The upstream side can keep
sending until the register is full, which is why a stall costs no data and no
throughput. The writer uses two instances (AW, W). The reader uses one (AR).
The read data channel needs none: the read result is itself a register, and
a new read fires only when that register is free or being emptied.

## Timing

- Write: with empty skid buffers, a write fires in the same clock in which
  its second beat (AW or W) arrives. A beat parked in a skid buffer fires
  once the stall clears. `BVALID` rises the clock after the write fires.
  With `BREADY` high, one write completes every clock.
- Command: `Acc_cmd_valid` rises at the clock edge that executes the 0x6c
  write. `GPP_CMD_Flag` rises one edge later, if the interface is free.
  With `NOC_CMD_ACK` held high, a new 128-bit packet leaves every 4 clocks,
  which is the bus limit.
- Read: `RVALID`/`RDATA` are registered and appear one clock after the read
  fires. With `RREADY` high, one read completes every clock, in parallel with
  writes.
- Status: a byte offered by the NoC is visible at 0x70 one clock later. The
  status register accepts at most one byte every two clocks.
- Reset: `rstn` is active low and synchronous. It empties all buffers and
  clears all registers, flags and responses.

## Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| `axil_noc_wrapper`, `axil_writer`, `axil_reader` | `ADDR_W` | 32 | AXI address width |
| same | `DATA_W` | 32 | AXI data width |
| `axil_noc_wrapper`, `noc_interface` | `CMD_W` | 128 | NoC command width (four data words) |
| `axil_noc_wrapper`, `axil_reader`, `noc_interface` | `STATUS_W` | 8 | NoC status width |
| `skid_buffer` | `DW` | 32 | payload width |

The register addresses, widths and the response-code enum live in
`axil_pkg`. The decoder compares all 32 address bits.

## Files

| File | Contents |
|------|----------|
| `rtl/axil_pkg.sv` | widths, register addresses, response and register-index enums |
| `rtl/skid_buffer.sv` | one-entry valid/ready skid buffer |
| `rtl/axil_addr_decoder.sv` | address to one-hot register enable |
| `rtl/axil_writer.sv` | AW/W/B channels, command registers, `last_word` |
| `rtl/axil_reader.sv` | AR/R channels, read mux, status consumption |
| `rtl/noc_interface.sv` | 128-bit packet register and status register with their handshakes |
| `rtl/axil_noc_wrapper.sv` | top level: writer + reader + NoC interface, plain ports |
| `tb/axil_if.sv` | AXI4-Lite bundle with master driver tasks and handshake assertions |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Where this design departs from its description, or fills a gap

It follows the original description in these points:
- the register addresses, the order the words are packed in, and 0x6c
  completing the command;
- skid buffers on AW, W and AR only;
- BRESP and RRESP fixed at OKAY;
- the status byte zero-extended to 32 bits;
- the valid-held-until-acknowledged rule on the NoC side;
- every port name.

These choices are this implementation's own:

- **Unmapped addresses are answered.** The original description says an
  unmapped address gets no response. Taken literally, that would hang any
  AXI master, so here it only means that nothing is stored or sent. The bus
  transaction still completes with OKAY, and reads return 0.
- **Read-back of the command words.** Reads of 0x60..0x6c return the
  registers. The reader's block diagram shows only a generic data input.
- **When the status byte is consumed.** A 0x70 read consumes it, and a 0x70
  read with nothing pending returns 0. Because of that, the NoC should not
  send a status value of 0 if software must tell it apart from "none".
- **Write stalling.** Writes stall while a finished command waits for the
  NoC interface, so a waiting command cannot be corrupted.
- **Missing bus signals.** There is no `WSTRB` and no `AWPROT`/`ARPROT`.
  Every write stores the full 32-bit word.
- **Reset.** Synchronous, active low.

The original work reports FPGA results for its own implementation: setup
timing met from a 2.69 ns clock on a Zynq-7020, 616 slice registers and
284 bonded I/Os. This RTL has exactly 284 top-level port bits. It holds about
400 flip-flop bits: 128 command-register bits, 128 packet bits, 3 x 32-bit
skid registers, the 32-bit read-data register, and the status and flag
bits. The original figure of 616 shows that the original registered more,
but it does not say where. Timing has not been measured for this RTL.

Outside this RTL: the NoC, the accelerator clusters, the host processor, the
AXI4 data master and DDR arbiter of the accelerator, and the vendor AXI
converters used for an FPGA test setup.

## Verification

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and stops through a cycle-count watchdog
if the design hangs.

- `tb_skid_buffer`: 2000 random words under random back-pressure. Checks
  order and loss, that the output is held during stalls, and that `S_ready`
  does not depend on `M_ready` within a clock. Also checks one word per
  clock and that a stalled word is parked.
- `tb_axil_addr_decoder`: every mapped address, its neighbours and
  upper-bit aliases, and 4000 random addresses.
- `tb_axil_writer`: 150 commands with random word order, random AW/W skew,
  unmapped writes, and random `BREADY` and `Acc_cmd_ready`. A reference
  model predicts every command. Also checks 16 writes in 16 clocks.
- `tb_axil_reader`: 1500 random reads under `RREADY` back-pressure, status
  consumption, an empty status read, and 16 reads in 16 clocks.
- `tb_noc_interface`: 500 packets and 500 status bytes under random
  acknowledge delays. Checks packing order, that the packet is held until
  acknowledged, and one packet per clock with the NoC always ready.
- `tb_axil_noc_wrapper`: end to end, with the top at its default
  parameters. A host model writes 200 commands while it polls status on the
  read channel. A NoC model acknowledges late and sends 150 status bytes.
  Then come read-back and a full-rate phase (8 packets, one every 4 clocks).
  It counts and requires each of these events:
  - AW and W skid stalls;
  - both AW/W arrival orders;
  - NoC command and status back-pressure;
  - a read and a write completing in the same clock;
  - unmapped writes and reads;
  - status reads with and without a byte pending.

`tb/axil_if.sv` adds concurrent assertions: VALID must stay high, with a
stable payload, until READY, on all five channels. Simulate with
`--assert` to enable them.

## Simulating

Verilator 5 with timing support. List the package first:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/axil_pkg.sv rtl/skid_buffer.sv rtl/axil_addr_decoder.sv \
  rtl/axil_writer.sv rtl/axil_reader.sv rtl/noc_interface.sv rtl/axil_noc_wrapper.sv \
  tb/axil_if.sv tb/tb_axil_noc_wrapper.sv --top-module tb_axil_noc_wrapper
./obj_dir/Vtb_axil_noc_wrapper
```

To run another testbench, swap in its file and top module. Every testbench
finishes in well under a second.
