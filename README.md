# SHA-2 input preprocessing unit

Before a SHA-2 hash engine can compress a message, the message has to be cut
into 512-bit blocks and padded: a single `1` bit is appended after the last
message bit, then zeros, and the final 64 bits of the last block carry the
message length in bits. This unit does that work in hardware, in a stream.
A message deliverer hands it one 64-bit packet per clock cycle. The unit
collects eight packets into a 512-bit block, announces every full block to
the hash engine, and generates the padding and the length field itself once
the last packet has arrived.

The unit is a small, classic controller/datapath pair: a Mealy state machine
(`ipu_ctrl`) steering a datapath (`ipu_datapath`) that holds an 8-entry
register file, a modulo-8 index counter and a message-length register. It
also shows the simplest of the data-transfer handshakes: the link towards the
hash engine carries a *valid* signal only, and the link from the deliverer
carries no handshake at all.

## Interfaces and handshakes

| Port      | Dir | Width | Meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | clock, all state changes on the rising edge |
| `rst_b`   | in  | 1     | active-low asynchronous reset |
| `pkt`     | in  | 64    | current message packet |
| `lst_pkt` | in  | 1     | `pkt` is the last packet of the message |
| `blk`     | out | 512   | current block; packet 0 of the block in `blk[511:448]`, packet 7 in `blk[63:0]` |
| `blk_val` | out | 1     | `blk` holds a new, complete block (one cycle) |
| `msg_end` | out | 1     | the block on `blk` is the last of the message; only together with `blk_val` |

**Deliverer side, no handshake.** The unit accepts one packet in every cycle
from the first cycle after its START cycle up to and including the cycle in
which `lst_pkt` is high. It cannot stall the deliverer and never needs to:
it stores one packet per cycle. `pkt` and `lst_pkt` are ignored in every
other cycle.

**Hash-engine side, valid only.** `blk_val` is high for exactly one cycle per
block. The engine must capture `blk` on the rising edge that ends that cycle;
from that edge on, the register file starts to be overwritten by the next
block. There is no `ready`: an engine that cannot keep up with one block per
eight cycles needs its own buffer. (In the general producer/consumer setting
a `ready` signal from the consumer, or both `valid` and `ready` with a
transfer on every edge where both are high, would be used instead; this unit
does not need one because the engine is assumed to be at least as fast as the
deliverer.)

## How a message is laid out

With `n` message packets, the unit writes, in order, into register-file slots
`0, 1, ..., 7, 0, 1, ...`:

1. the `n` message packets;
2. one padding packet `64'h8000_0000_0000_0000` (a 1 followed by 63 zeros);
3. zero packets until the next slot to be written is slot 7; there are
   `z = (6 - n) mod 8` of them, so between 0 and 7;
4. the length packet, `64 * n`, always in slot 7, i.e. in `blk[63:0]` of the
   last block.

The message therefore fills `(n + 2 + z) / 8` blocks. Two boundary cases are
worth knowing. When `n mod 8 = 6`, the padding packet lands in slot 6 and the
length follows immediately, with no zero packet. When `n mod 8 = 7`, the
padding packet closes a block on its own and the length needs one more block
of seven zero packets plus the length.

The message is counted in whole packets: lengths are always multiples of 64
bits. Full SHA-2 allows any number of bits, with the `1` bit placed right
after the last message bit; that byte- or bit-granular case is not handled
here. The 64-bit length field and the 512-bit block are those of SHA-224 and
SHA-256.

## The control unit

`ipu_ctrl` has seven states and drives six datapath commands, bundled in the
packed struct `ipu_pkg::ipu_ctl_t`:

| Command    | Effect in the datapath |
|------------|------------------------|
| `clr`      | clear the index counter and the length register |
| `c_up`     | index <- index + 1 (mod 8) |
| `st_pkt`   | write `pkt` at the index; length += 64 |
| `pad_pkt`  | write the padding packet at the index |
| `zero_pkt` | write zero at the index |
| `mgln_pkt` | write the length register at the index |

| State     | Commands           | Next state |
|-----------|--------------------|------------|
| `START`   | `clr`              | `RX_PKT` |
| `RX_PKT`  | `st_pkt`, `c_up`   | `PAD` if `lst_pkt`, else `RX_PKT` |
| `PAD`     | `pad_pkt`, `c_up`  | `MGLN` if index = 6, else `ZERO` |
| `ZERO`    | `zero_pkt`, `c_up` | `MGLN` if index = 6, else `ZERO` |
| `MGLN`    | `mgln_pkt`         | `MSG_END` |
| `MSG_END` | (`msg_end`)        | `STOP` |
| `STOP`    | none               | `STOP` until reset |

The machine is Mealy because `RX_PKT`, `PAD` and `ZERO` decide their
successor from `lst_pkt` and the current index in the same cycle in which
they write. The index the machine looks at is the slot being written *now*:
leaving `PAD`/`ZERO` when the index is 6 means the next slot, 7, goes to the
length.

### When `blk_val` rises

This is the part that takes care to read. A block is complete when any packet
(message, padding, zero or length) is written into slot 7. That write happens
on a rising edge, so the register file only shows the complete block in the
*following* cycle. `blk_val` is therefore the "write into slot 7" condition
delayed by one flip-flop. For the last block the slot-7 write is the length
packet in `MGLN`, so its `blk_val` falls in `MSG_END`, exactly where
`msg_end` is raised: both leave the unit in the same cycle, as required.

Counting cycles from reset release (cycle 0 is `START`), packet `k`
(`k = 0 .. n-1`) is written in cycle `k + 1`, and block `j` is announced in
cycle `8 j + 9`. Example, `n = 3`:

| Cycle | State     | Written (slot)   | `blk_val` | `msg_end` |
|-------|-----------|------------------|-----------|-----------|
| 0     | `START`   | -                | 0 | 0 |
| 1-3   | `RX_PKT`  | packets 0-2 (0-2) | 0 | 0 |
| 4     | `PAD`     | padding (3)      | 0 | 0 |
| 5-7   | `ZERO`    | zeros (4-6)      | 0 | 0 |
| 8     | `MGLN`    | 192 (7)          | 0 | 0 |
| 9     | `MSG_END` | -                | 1 | 1 |
| 10... | `STOP`    | -                | 0 | 0 |

While packets stream in, a block is announced every eight cycles. After
`msg_end` the unit does nothing until `rst_b` is asserted again; each reset
processes one message.

## The datapath

`ipu_datapath` holds:

- `ipu_idx_counter`: a 3-bit counter that wraps from 7 to 0; `clr` wins over
  `c_up`.
- `ipu_msglen_reg`: a 64-bit register that adds 64 on every `st_pkt`; `clr`
  wins. The length packet written in `MGLN` is its value at that time, which
  already includes the last message packet.
- `ipu_regfile`: eight 64-bit registers, one write port addressed by the
  index, and all eight read at once as `blk` (slot 0 in the top bits). It
  has no reset: every slot is written before a block is announced.
- a write multiplexer choosing `pkt`, the padding constant, zero or the
  length, according to which of the four write commands is high.

Two assertions guard the design: the length packet is only ever written into
slot 7 (`ipu_ctrl`), and `msg_end` never appears without `blk_val` (`ipu`).

## Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| `ipu`, `ipu_datapath` | `PKT_W` | 64 | packet width, also the width of the length field and the length step |
| `ipu`, `ipu_datapath` | `BLK_PKTS` | 8 | packets per block; must be a power of two |
| `ipu_ctrl`, `ipu_idx_counter` | `IDX_W` | 3 | index width, `log2(BLK_PKTS)` |
| `ipu_msglen_reg` | `LEN_W`, `INC` | 64, 64 | register width, step per packet |
| `ipu_regfile` | `WORD_W`, `DEPTH` | 64, 8 | word width, number of words |

Only the defaults give SHA-2 blocks. Other values keep the same scheme
(padding word `1` followed by zeros, length in the last slot) and are
verified only at the defaults.

## Departures and design choices

- The reset is active low and asynchronous. It puts the control unit in
  `START` and also clears the counter and length register; `START` then
  clears them once more with `clr`, which is the documented way.
- `START` lasts exactly one cycle, so the first packet is expected in the
  second cycle after reset release. A deliverer that starts in the first
  cycle loses that packet.
- `blk_val` is registered (see above) rather than a purely combinational
  Mealy output, so the block and its valid flag appear together.
- A block is announced every 8 cycles while packets arrive: 512 / 64 = 8.
- Only whole 64-bit packets; one message per reset; no back-pressure from the
  hash engine.
- The message deliverer and the hash engine are outside the unit and not
  included; testbenches play the deliverer and check what an engine would
  receive.

## Files

| File | Contents |
|------|----------|
| `rtl/ipu_pkg.sv` | command struct and state type |
| `rtl/ipu.sv` | top: control unit plus datapath |
| `rtl/ipu_ctrl.sv` | control state machine, `blk_val`, `msg_end` |
| `rtl/ipu_datapath.sv` | write multiplexer and the three storage blocks |
| `rtl/ipu_idx_counter.sv` | modulo-8 index counter |
| `rtl/ipu_msglen_reg.sv` | message length register |
| `rtl/ipu_regfile.sv` | 8 x 64-bit register file read as one block |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Verification

Every testbench compares against a model written independently inside the
testbench and ends with a line `TB_RESULT checks=N failures=M`.

- `ipu_tb` (full design, default parameters): every message length from 1 to
  40 packets and 30 random lengths up to 200 packets, with random packet
  data. It builds the expected padded message, checks each block's contents,
  that block `j` is announced exactly in cycle `8 j + 9`, that `msg_end` comes
  only with the last block, and that nothing follows it. It also counts that
  each case occurred: blocks of message packets only, a padding packet
  closing a block, no zero packets (`n mod 8 = 6`), zero packets, a final
  block of padding only, and multi-block messages.
- `ipu_ctrl_tb`: the state machine's full command vector, `blk_val` and
  `msg_end`, cycle by cycle, for message lengths 1 to 24, with random
  `lst_pkt` after the message.
- `ipu_datapath_tb`: 2000 cycles of random commands against a model of
  the register file, index and length.
- `ipu_idx_counter_tb`, `ipu_msglen_reg_tb`, `ipu_regfile_tb`: random
  stimulus against reference models.

Each testbench has been shown to fail on a deliberately broken copy of its
module (for example a padding bit in the wrong position, a wrong state
transition, reversed word order).

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module ipu_tb \
    -y rtl -y tb +libext+.sv rtl/ipu_pkg.sv tb/ipu_tb.sv
./obj_dir/Vipu_tb
```

Replace `ipu_tb` by any other testbench name. The package file must come
first on the command line; the other modules are found through `-y`.
Signals that nothing initialises start at random values under Verilator's
two-state simulation, so the testbenches reset everything they read.
