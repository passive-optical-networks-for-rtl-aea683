# Passive optical network for fixed-latency trigger and command distribution

This is the FPGA logic of a small passive optical network (PON). One Optical
Line Terminal (OLT) feeds many Optical Network Units (ONUs) through a passive
splitter. It is built for particle-physics timing, trigger and control:

- **Downstream (OLT to all ONUs), 1.6 Gb/s.** The OLT broadcasts a trigger
  byte every 25 ns, one per 40 MHz bunch crossing. The latency is fixed and
  known. The same stream carries commands, either addressed to one ONU or
  broadcast to all.
- **Upstream (ONUs to OLT), 800 Mb/s.** One fibre is shared by time
  division. Once per superframe the OLT names the ONU that may send next.
  That ONU switches its laser on and sends one burst.

Both directions use 8b/10b line coding. The protocol can address 64 ONUs.
The top level builds two, as in the original two-ONU demonstrator.

The serializers, clock-data-recovery circuits, PLLs and optics are not part
of this RTL. The top-level ports are the parallel sides of those
transceivers.

## The downstream superframe

Everything downstream is timed by a 260-character superframe:

```
K | T F D1 D2 | T F D1 D2 | ... (64 subframes) ... | T F D1 D2 | T F R
```

| char | meaning |
|------|---------|
| K    | K28.5 comma. It marks the start of the superframe. |
| T    | Trigger byte of this bunch crossing. |
| F    | Auxiliary byte, for extending or protecting T. |
| D1 D2 | Command slot. D1[7]=1: an individual command for the ONU whose address equals the slot number (1..64). D1[7]=0: a broadcast. The 15-bit payload is {D1[6:0], D2}, and 0 means "no command". |
| R    | Address of the ONU that sends the next upstream burst. 0 means nobody. |

A subframe T F D1 D2 is 4 characters, which is 40 line bits or 25 ns at
1.6 Gb/s, so one subframe is one bunch crossing. The last subframe has only
3 characters (T F R). Adding the single K gives 260 characters, exactly 65
bunch crossings (1.625 µs). This keeps the T characters exactly 25 ns apart
across superframe boundaries as well.

The logic moves 2 characters (20 line bits) per 80 MHz cycle:

- A superframe is 130 words.
- `bx_o` is high on every other cycle, when the OLT samples `trig_i` and
  `aux_i`.
- Character 0 of a word sits in bits [7:0] before encoding and in bits
  [9:0] after encoding. It goes on the line first.
- Within a 10-bit group, bit 0 (8b/10b bit "a") is sent first.

## Why the latency is fixed, and where it is not

**OLT transmitter** (`olt_tx`):

- The frame generator (`olt_frame_gen`) feeds two chained 8b/10b encoders,
  and one register stage follows.
- A trigger sampled at a clock edge is in `tx_word_o[19:10]` after the next
  edge. This is one cycle and it never varies.
- No elastic buffer is used between the logic and the serializer. The
  serializer's clock must instead be phase-aligned to `clk_tx` by its own
  PLL. An elastic FIFO would add a latency that changes from reset to reset.

**ONU receiver** (`onu_barrel_shifter`):

- The receiver's divide-by-10 parallel clock can start on any of 20
  positions of the serial bit stream. Each 20-bit deserializer word
  therefore starts at an unknown bit offset.
- The barrel shifter keeps the previous and the current word. In that
  window it looks for K28.5 at each of the 20 offsets.
- It stores the offset where K28.5 is found and shifts every following word
  by it, so K always lands in bits [9:0].
- The offset goes out as `onu_bs_pos_o` (0..19). One step is one serial bit,
  625 ps.
- The output word lags the input by one to two cycles, depending on the
  offset.

**What varies between resets:**

- The recovered clock itself still carries the random phase of the divider.
  `onu_bs_pos_o` measures that phase, and a PLL could use it to shift the
  ONU clock back.
- That correction PLL is not built here. The original design also leaves it
  as future work.
- Within one lock, the latency from `trig_i` to `onu_trig_o` stays constant.
  The end-to-end testbench checks this to the picosecond.
- The latency does differ between ONUs, by their fibre delay and their
  barrel-shifter offset.

**ONU frame parser** (`onu_frame_rx`):

- The parser locks when K appears in character 0 of a word.
- It stays locked while K returns every 130 words. A missing or misplaced K
  drops the lock and raises `sync_err_o`; it then relocks on the next K.
- Once locked, it outputs:
  - T in the cycle its word arrives (every 25 ns);
  - F one cycle later;
  - commands for its own slot, or broadcasts;
  - a grant pulse when R carries its own address.

## Upstream: one burst per superframe

The upstream burst is sent one 10-bit group per cycle of the ONU's recovered
80 MHz clock, which gives 800 Mb/s:

```
laser on | 2 settle | 32 x 0x55 | K28.5 0xD5 | 0x00 addr | 90 data bytes | laser off
```

- **Preamble.** The preamble byte 0x55 encodes to D21.2 (`1010100101` in
  either disparity). The burst-mode receiver uses its transitions to set its
  threshold and sampling phase.
- **Start-of-frame delimiter (SFD).** A comma followed by 0xD5 marks the
  start of the frame and aligns the characters.
- **Address and data.** A 2-byte address follows, then 90 bytes that the
  ONU's user logic supplies through `pl_data_i`/`pl_rd_o`.

A burst takes `LASER_ON_CYCLES` + 126 = 128 of the 130 cycles of one
superframe:

- The burst starts right after the granting R.
- The laser is off for the last 2 cycles (25 ns). This is the interframe gap
  (IFG) between bursts from different ONUs.
- The gap seen at the OLT also depends on how well the ONUs' fibre delays
  match. Ranging (measuring and compensating each ONU's delay) is not done.
- `onu_burst_tx` contains an assertion that the burst fits the superframe.
  If you lengthen the settling time or the frame, keep them within 130
  cycles.

The OLT's arbiter (`olt_bw_alloc`) chooses R by round robin over the ONUs
whose bit is set in `onu_enable_i`. Bit i stands for ONU address i+1. Each
enabled ONU therefore sends once every N superframes. This gives 1.625 µs ×
N between two bursts of one ONU: 3.25 µs for 2 ONUs and 104 µs for 64. The
original system's allocation is only described as "statistical
multiplexing". Round robin is the simplest policy that fits the R mechanism.
Replace this block to change the policy.

## The burst-mode receiver

Bursts from different ONUs arrive with unrelated phases. A PLL would take
too long to lock on each one, so the OLT samples the line blindly at 5× the
bit rate. The oversampling deserializer provides 20 samples, or 4 bits, per
200 MHz cycle (`olt_samples_i`, sample 0 earliest).

**Bit recovery** (`olt_oversampler`):

- Each sample that differs from the one before it counts a transition into
  one of 5 phase bins (sample index mod 5).
- Every `WIN` = 16 cycles (64 bits), the bin with the most transitions is
  taken as the bit boundary. This is the majority vote.
- From then on the sample two after the boundary, nearest the bit centre,
  gives the bit. The bins are then cleared.
- On a tie, the current choice wins, so jitter that splits an edge between
  two bins does not make the choice flicker.
- A window without transitions, such as laser off, keeps the old phase.
- A new burst's preamble moves the phase within one or two windows, long
  before its SFD.
- The transmitters are assumed to run at the same frequency as the OLT.
  This holds in a system where all clocks come from the downstream. So
  exactly 4 bits come per cycle.
- When the phase changes during a preamble, one preamble bit may be repeated
  or lost. The comma alignment that follows absorbs this.

**Character alignment** (`comma_aligner`):

- Keeps the last 14 bits.
- Looks for K28.5 (either disparity) in the 4 newest 10-bit windows.
- When it finds one, it realigns its group boundary there. Otherwise it
  emits a group each time 10 more bits have arrived.

**Decoding and framing** (`olt_rx`, `olt_burst_rx`):

- The groups are decoded (`dec8b10b`).
- `olt_burst_rx` follows the frame: it waits for K28.5 then 0xD5, then reads
  the 2 address bytes and the 90 data bytes.
- The data bytes come out on `up_data_*` with their index. The address and
  an error-free flag come out at the end (`up_frame_*`).
- A K inside a frame restarts the search.

## Module map

```
pon_top
├── olt_tx               OLT transmit path, clk_tx
│   ├── olt_frame_gen    superframe builder, command mailboxes
│   │   └── olt_bw_alloc round-robin choice of R
│   └── enc8b10b x2
├── olt_rx               OLT burst receiver, clk_os
│   ├── olt_oversampler  5x blind oversampling, majority vote
│   ├── comma_aligner    10-bit group alignment
│   ├── dec8b10b
│   └── olt_burst_rx     upstream frame parser
└── onu x N_ONU          one per ONU, onu_clk[i]
    ├── onu_barrel_shifter
    ├── dec8b10b x2
    ├── onu_frame_rx     superframe parser
    └── onu_burst_tx     upstream burst, with enc8b10b
```

`pon_pkg` holds the shared constants: frame sizes, the characters, and the
comma code groups.

Each file begins with a comment on what the module does and its timing.
That comment also says which parts follow the original system and which
are choices made here.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `N_ONU` | 2 | pon_top | ONU instances (the protocol addresses up to 64) |
| `LASER_ON_CYCLES` | 2 | pon_top, onu, onu_burst_tx | laser settling time in 12.5 ns cycles |
| `OS` | 5 | pon_top, olt_rx, olt_oversampler | samples per upstream bit |
| `NB` | 4 | pon_top, olt_rx, olt_oversampler, comma_aligner | bits per oversampling clock |
| `WIN` | 16 | pon_top, olt_rx, olt_oversampler | cycles per phase vote |
| `N_SLOTS` etc. | 64 | pon_pkg | subframes per superframe, frame sizes |

## Choices made here, not taken from the original system

- **Characters:**
  - K28.5 is the superframe comma.
  - The SFD is K28.5 followed by 0xD5.
  - The upstream address field is {0x00, address}.
  - The command payload value 0 means "no command".
- **Command mailboxes.** There is one mailbox per ONU plus one broadcast
  mailbox. A pending broadcast takes the next slot.
- **Round-robin allocation**, described above.
- **Laser settling time** of 2 cycles.
- **Lock and relock rules** of the barrel shifter and the frame parser.
- **Vote details** of the oversampler: the transition histogram, the 16-cycle
  window and the tie rule.
- **One transmit clock.** The original transmitter builds the 4-character
  subframe in a 40 MHz domain and converts it to 2 characters per 80 MHz
  cycle in a gearbox. Here the frame generator runs entirely at 80 MHz and
  marks the 40 MHz bunch crossing with `bx_o`. The line output is the same,
  and the design needs no clock-domain crossing.
- **Single reset.** There is one synchronous reset for all clock domains.
- **Not built:**
  - the correcting PLL for the ONU clock phase;
  - ranging;
  - forward error correction in F. F is passed through.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. The testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_pon_top` runs the whole system at its default size: one OLT, two ONUs
and 24 superframes (about 39 µs). It models the channel:

- **Downstream:** each ONU reads the OLT's bit stream with its own delay in
  bits, so the two barrel shifters see different offsets.
- **Upstream:** each ONU's bits are expanded to 5 samples and gated by its
  laser. They are delayed by an ONU-specific number of samples and merged
  on one line.
- **Clocks:** the ONU clocks have their own phases.

It checks:

- trigger order and 25 ns spacing;
- a constant trigger latency per ONU;
- aux bytes;
- individual and broadcast command delivery;
- upstream bursts from each ONU with the right address and data;
- no overlap of lasers.

It also counts each mechanism (grants, bursts, phase changes, command
back-pressure, nonzero barrel-shifter offsets, broadcasts). A mechanism that
never happens is an error.

`tb_pon_64` runs the same checks at the protocol's full size, with 64 ONUs
over 80 superframes (130 µs). Every ONU gets one burst in turn. It takes
about a minute to build and ten seconds to run.

To run a testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps --top-module tb_pon_top \
    -Irtl -y rtl -y tb \
    rtl/pon_pkg.sv tb/tb_pon_top.sv
./obj_dir/Vtb_pon_top +verilator+seed+7
```

Replace `tb_pon_top` with any other testbench name. The testbenches use
`$urandom`, so different seeds give different delays, phases and data.

## Limits

- **Waiting time between bursts.** With one burst per 1.625 µs superframe,
  an ONU of 64 waits 104 µs between bursts. Shorter waiting times need
  shorter bursts or several bursts per superframe. That would change
  `onu_burst_tx`, the R rule in `olt_frame_gen` and `onu_frame_rx`.
- **Receive clock alignment.** The OLT receive path assumes the
  oversampling clock is frequency-locked to the ONU transmit clocks. Real
  hardware with free-running clocks would need bit stuffing or an elastic
  stage after `olt_oversampler`.
- **Frame lock.** An ONU's frame parser trusts the first comma it sees.
  Before the first real superframe, line noise that happens to look like a
  comma can produce wrong outputs until the next true K, at most one
  superframe later. Encoded 8b/10b data itself cannot form a comma.
- **Clock domains.** The clock domains (`clk_tx`, `clk_os`, each
  `onu_clk`) do not exchange signals inside `pon_top`. There are therefore
  no synchronizers.
