# HSn: fast block-lock recovery for a 64b/66b receive lane

A 64b/66b link sends 66-bit blocks: a 2-bit sync header that always holds a
transition (`01` for data, `10` for control) followed by 64 scrambled payload
bits. The receiver finds the block boundary by looking for a bit pair that
shows a transition every 66 bits. In a radiation environment a single event
effect on the receive clock can add or drop bits. The boundary then sits at a
different one of the 66 bit positions, and everything is lost until the
receiver finds it again.

The usual recovery is slow for three reasons:

- it tests one position at a time;
- it tests one header per received block (about 8 clocks);
- it waits through a dead time of 16 blocks before it gives up a position.

This RTL implements the HSn scheme from *Rapid Synchronization Recovery from
Single Event Effects in the Aurora 64b/66b Protocol* (Martynyuk, Cai, Hauck,
Heim, Hsu, Jones). It changes all three:

- **Parallelism.** N *head seekers* each own a share of the 66 positions.
- **Fast search.** Every seeker reads the header bits straight out of the
  gearbox, so it can test a new position on every clock, not once per block.
- **Fail-fast.** One illegal header is enough to drop a position.

A position is declared locked after 16 legal headers in a row. The chance that
scrambled data fakes that is 2^-16. The default build has N = 8 (HS8), the
configuration the scheme recommends. Any N from 1 to 66 is a parameter away.

## Data path

```
 word_i[31:0] ──► gearbox_32b66b ──► hs_frame_window ──────────────► hs_block_aligner ──► descrambler_64b66b ──► header_o, data_o
  (1 per 4 clk)   128-bit buffer      {prev, cur} frame   window            │   block at the        1+x^39+x^58
                  66-bit frames       hdr_ok[65:0] ──► hs_sync ────────────┘   winning position
                  every 8 or 12 clk                    N × hs_seeker
                                                       hs_select_tree + winner register
```

There is one clock. The deserializer in front of the lane is a vendor
primitive and is not part of this RTL. It is a 1:8 DDR input SERDES whose bytes
are gathered into 32-bit words, so the lane expects one 32-bit word every four
clocks. In every word, frame and block the most significant bit is the first
on the line.

### Gearbox (`gearbox_32b66b`)

Words are appended behind the unread bits of a 128-bit buffer. When 66 or more
bits are held, the oldest 66 leave as a frame and the rest shift up.

- A frame takes 66 = 2·32 + 2 bits, so the cut point moves two bits per frame.
- 33 words make 16 frames.
- At one word per four clocks, frames come 8 clocks apart, with a 12-clock gap
  once every 16 frames (8.25 clocks on average).
- The gearbox never slips. Its frame boundary is arbitrary; finding the true
  boundary is the seekers' job.

### Header positions and the sniffing window (`hs_frame_window`)

This is the key idea. The window is the previous frame and the current frame
side by side: 132 bits, bit 131 first on the line.

- **Position p** (0…65) is the block that starts p bits into the previous
  frame.
- Its header is window bits 131−p and 130−p.
- The block is window bits 131−p down to 66−p.

All 66 candidate blocks are inside the window, so the legality of every
candidate header is one 66-bit vector, `hdr_ok[p]`. A seeker needs only a
multiplexer into that vector to test any position. A new window appears with
each frame, and `new_frame` marks its first clock.

When bits are **dropped**, later blocks start earlier, so the boundary moves
from p to p−d (mod 66). **Added** bits move it to p+d.

## Head seekers (`hs_seeker`)

Seeker i of N owns positions i, i+N, i+2N, … below 66 (8 or 9 positions each
for N = 8). It holds one position, a valid-header counter, and a flag that says
whether the current frame has been tested yet. On each clock where the frame
is untested:

| header at its position | action |
|---|---|
| illegal | clear the counter, drop lock, move to the next position, test that one on the **next clock against the same frame** |
| legal | count it (saturating at 16) and wait for the next frame |

`locked_o` is high while the counter is at 16. A locked seeker keeps testing
its position on every frame. Its first illegal header unlocks it, and it
carries on searching from its next position.

**Visiting order.** The positions are visited in descending order: p, p−N,
p−2N, … then wrapping to the seeker's highest position. After d dropped bits,
the seeker that held the lock therefore reaches the new boundary after about
d/N failed tests, when d is a multiple of N. Any other drop lands on a seeker
that has been searching freely, and that seeker needs a time independent of d.
This is the saw-tooth recovery profile the scheme is known for (see the
measurements below).

A legal header at a wrong position happens half the time in scrambled data.
It costs the seeker a wait for the next frame, which is the only reason a
search is not one position per clock throughout.

## Choosing the winner (`hs_sync`, `hs_select_tree`)

Several seekers can be locked at once. During normal running, a seeker at a
wrong position fakes 16 headers about once in 65k blocks. Two rules settle it:

1. The current winner stays the winner until its own seeker sees an illegal
   header.
2. With no winner, the lowest-numbered locked seeker takes over. A binary
   tree of two-input nodes finds it, with ceil(log2 N) levels.

Handover is seamless. If the winner fails while another seeker is locked, the
lock passes over in the same clock, and `locked_o` does not drop. The winner
index is registered. `locked_o`, `lock_pos_o` and `winner_o` are
combinational from registered state and reflect every test up to the last
clock edge.

## Delivering blocks (`hs_block_aligner`, `descrambler_64b66b`)

One clock after each new frame, every seeker has tested that frame. If a
winner is still locked, the aligner cuts the block at the winning position out
of the window.

- It flags **restart** when this block does not directly follow the previous
  delivered block at the same position.
- The descrambler is self-synchronising: d(n) = s(n) ⊕ s(n−39) ⊕ s(n−58). It
  keeps the last 58 scrambled bits and handles all 64 bits in one clock.
- A restart block only refills that history, so the first block after a new
  lock is not marked valid.

Two limits come with the line code, not with this RTL:

- Between a bit slip and its detection, the old position still shows a legal
  header half the time. About two corrupted blocks per event therefore leave
  with `data_valid_o` set (measured: 8540 in 4290 events).
- A seeker at a wrong position can fake a lock about once in 2^16 blocks. While
  the true winner stays locked, that changes nothing.

## Timing

| event | clocks |
|---|---|
| word in → frame out of the gearbox | 1 |
| frame → window and `hdr_ok` | 1 |
| candidate positions tested per seeker | 1 per clock while failing; 1 per frame while legal |
| 16th legal header → `locked_o` | 1 (first lock: with the 17th frame after reset; the window is complete with the 2nd frame, the first one tested) |
| new window → aligned block | 2 |
| aligned block → `data_valid_o` | 1 |
| block spacing while locked | 8, or 12 once per 16 blocks |

Reset (`rst`) is synchronous and active high. It empties the gearbox, clears
the window, and puts seeker i at position i with its counter at 0.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N` | 8 | top, `hs_sync`, `hs_seeker`, `hs_select_tree` | number of head seekers, 1…66 |
| `LOCK_HEADERS` | 16 | top, `hs_sync`, `hs_seeker` | legal headers in a row that declare a lock |
| `INDEX` | 0 | `hs_seeker` | which position class the seeker owns |

Fixed by the line format (in `aurora_pkg`): 66-bit block, 64-bit payload,
32-bit word, 66 positions, 128-bit gearbox buffer.

## Measured recovery

The same stream is fed to lanes with 1, 2, 8, 11, 33 and 66 seekers
(`tb/tb_hsn_variants.sv`). Each drop of 1 to 65 bits is applied 66 times,
4290 events per lane. A block counts as lost from the slip up to the first
correct block delivered.

| lane | average blocks lost | relative to HS1 |
|---|---|---|
| HS1  | 50.3 | 100 % |
| HS2  | 33.5 | 67 % |
| HS8  | 20.4 | 41 % |
| HS11 | 19.3 | 38 % |
| HS33 | 16.7 | 33 % |
| HS66 | 16.0 | 32 % |

What the sweep shows:

- HS1's loss grows linearly with the bits dropped, from about 18 blocks at d = 1
  to 83 at d = 65.
- HS2's loss grows on even drops (21 → 47 blocks) and stays flat on odd drops
  (about 33).
- HS66's loss is flat at the floor of 16 headers plus detection.
- The HS8/HS1 ratio (0.41) is close to the ratio of the published losses of
  the two variants (1.01 % and 2.28 % of the original scheme's loss, 0.44).

These results come from these testbenches. FPGA resource figures are not
reproduced here. A generic synthesis of the N = 8 lane gives about 650
flip-flop bits.

## What is not here

- **The deserializer.** The ISERDESE2 input SERDES and the gathering of its
  bytes into 32-bit words are vendor logic. The lane starts at the 32-bit word.
- **The slip-based baseline recovery.** The scheme replaces it and the lane
  never needs it: no SERDES bitslip, no gearbox freeze, no 32-header count.

## Choices made here

These points are left open by the HSn scheme and were decided in this RTL:

- Line bit order: MSB first everywhere.
- The two-frame window as the sniffing point, and the position numbering above.
- The descending visiting order. The scheme lists a seeker's positions as
  i, i+N, i+2N… and describes the loss growing with the bits dropped. The
  descending order gives that growth for dropped bits in this numbering.
- The seeker starts at position i after reset.
- Ties go to the lowest index.
- The scrambler polynomial: the standard 64b/66b one.
- The first block after a new lock is held back to prime the descrambler.
- A 32-bit word every four clocks, and synchronous active-high reset.

## Files

| file | contents |
|---|---|
| `rtl/aurora_pkg.sv` | shared constants, `pos_t`/`block_t` types, header legality |
| `rtl/gearbox_32b66b.sv` | 32b → 66b gearbox |
| `rtl/hs_frame_window.sv` | two-frame window, per-position header legality |
| `rtl/hs_seeker.sv` | one head seeker |
| `rtl/hs_select_tree.sv` | binary tree choosing a locked seeker |
| `rtl/hs_sync.sv` | N seekers, winner rules |
| `rtl/hs_block_aligner.sv` | block at the winning position, restart flag |
| `rtl/descrambler_64b66b.sv` | 64-bit parallel self-synchronising descrambler |
| `rtl/aurora_rx_lane_hsn.sv` | the lane (top) |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_aurora_rx_lane_hsn.sv` | end-to-end test at the default N = 8: start-up tie, winner hold, 65 drops and 65 insertions |
| `tb/tb_hsn_variants.sv` | recovery sweep over HS1…HS66 |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aurora_pkg.sv tb/tb_aurora_rx_lane_hsn.sv --top-module tb_aurora_rx_lane_hsn
./obj_dir/Vtb_aurora_rx_lane_hsn
```

Change the testbench file and the top module name to run another test. The
end-to-end test runs in well under a second. The variant sweep takes about
20 seconds.

To use the lane:

- Drive `word_i`/`word_valid_i` from your deserializer.
- Take `header_o`/`data_o` when `data_valid_o` is high.
- Watch `locked_o`. It falls when the lane has lost the boundary and no other
  seeker holds a lock.
