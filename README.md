# Swap and Rotate: bit-serial permutation layers

Bit-serial block cipher hardware keeps its 64-bit state in a ring of 64
flip-flops. The ring moves one position per clock, and the single datapath bit
goes through key addition and the S-box. The hard part is the bit permutation
(the linear layer). If the ring can only rotate, moving every bit to its
permuted position costs many extra cycles, or a wide multiplexer network.

This design adds a few **swap pairs** to the ring. A swap pair (x, y) is two
scan flip-flops, i.e. two 2:1 multiplexers, in front of positions x+1 and y+1.
When the pair is enabled in a cycle, the bits in positions x and y trade places
as the ring shifts ("swap-then-rotate"). A bit travelling round the ring passes
every swap position in turn. So a fixed per-cycle schedule of swap enables can
take a chosen bit out of the stream, hold it back, and put it back at a later
position. With six pairs and the right schedule, every bit leaves the ring at
exactly the position the cipher's bit permutation sends it to. The permutation
then costs **no cycles at all**: key addition, S-box and permutation all run in
the same 64 cycles per round, and each round is one trip of the data round the
ring.

The RTL contains three circuits built on this idea. They are independent and sit
side by side in one top module:

| Circuit | Cipher | Swap pairs | Cycles |
|---|---|---|---|
| `present_core` | PRESENT-80, encryption and decryption | 6 | 2128 per 64-bit block |
| `gift_core` | GIFT-64-128, encryption and decryption | 8 (6 per direction) | 1920 per block (encryption), 1984 (decryption) |
| `flip_shuffle_lin` + `flip_filter` | FLIP(42,128,8×Δ9) stream cipher, linear-time shuffle | – | 530 per keystream bit |
| `flip_shuffle_quad` + `flip_filter` | same, rotate-only register | – | about 2^17 per keystream bit |

## How one pass permutes the state

Take the ring positions to be 0..63. In normal operation the bit in position p
moves to p+1, and the bit in 63 wraps to 0, or leaves the ring. A swap pair
(x, y) that is enabled in cycle c sends the bit in x to y+1 and the bit in y to
x+1.

The schedule for each cipher is a table of cycle numbers (0..63 within the
pass), one list per swap pair. In `present_pkg::swap_enables` and
`gift_pkg::gift_swap_enables` it is written as `inside` sets.

Each pair actually has **two** lists. While round r's bits are still leaving the
ring, round r+1's bits are already entering behind them. This is because a bit
is processed and re-enters in the same cycle it leaves. So at any moment the ring
holds the tail of one round and the head of the next, and a swap can act on
either:

- one list acts on bits that entered in the current pass;
- the other acts on bits that entered in the previous pass.

In the first pass after loading, the previous-pass list is off: the loaded state
must not be permuted before the first S-box. In the last pass, the current-pass
list is off, because nothing new enters.

The swap pairs used are:

| | Pairs (x, y) |
|---|---|
| PRESENT | (20,5) (34,4) (48,3) (60,57) (61,55) (62,53) |
| GIFT encryption | (24,12) (37,13) (50,14) (61,45) (62,30) (63,15) |
| GIFT decryption | (56,44) (55,31) (50,14) (61,45) (62,30) (63,15) |

PRESENT uses the same six pairs for encryption and decryption. Only the schedule,
and the positions where bits enter and leave, change:

- **encryption:** bits enter at 0 and leave at 63;
- **decryption:** bits enter at 53 and leave at 52.

GIFT cannot reuse all of its encryption pairs in decryption. Two more pairs,
(56,44) and (55,31), bring the combined circuit to eight. Four pairs are shared.
GIFT decryption enters at 61 and leaves at 60.

The schedules were checked with a bit-accurate model of the ring against the
PRESENT and GIFT-64 permutations and their inverses. The testbenches
`tb_present_state_pipe` and `tb_gift_perm_pipe` repeat that check on the RTL.

## PRESENT-80 core (`present_core`)

Sub-blocks:

- `present_state_pipe`: the 64-bit ring with six swap pairs and a nibble write port.
- `present_key_reg`: the 80-bit serial key register.
- `present_sbox`: one S-box or inverse S-box, shared by state and key.
- `present_ctrl`: a 12-bit Round&Count counter. Its upper six bits are the pass
  number and its lower six bits the cycle within the pass. Every control signal
  is decoded from it.

**Timing.** A block takes 2128 cycles:

1. **Load, 80 cycles.** Key and data are shifted in together. The key comes over
   all 80 cycles; the data comes during the last 64.
2. **31 rounds of 64 cycles.**
3. **One final pass of 64 cycles.** It adds the last round key while the result
   streams out.

**Encryption.** Each cycle:

- the bit at position 63 leaves;
- it is XORed with one round-key bit;
- it re-enters at position 0.

Every fourth cycle (count mod 4 = 3) a whole nibble has just entered. The S-box
output then overwrites positions 3..0.

**Decryption.** The same ring runs backwards through the rounds:

- Bits enter at 53 and leave at 52, least significant bit first.
- The inverse S-box is applied to the nibble at positions 49..52 just before its
  first bit leaves (count mod 4 = 0). Its lowest output bit leaves in that
  cycle; the other three are written back.
- Then the round key is added.

**Key register.** The 80-bit key register shifts one position in each of cycles
0..60 of a round and holds in cycles 61..63. 61 shifts per round are exactly the
61-bit rotation of the PRESENT key schedule. During the three held cycles, the
round-key bit is taken from one or two positions below the top through a small
multiplexer.

The key S-box (on the top nibble) and the round-counter XOR use the shared
S-box. They happen in a cycle where the state does not need it:

| | State S-box | Key S-box | Counter XOR |
|---|---|---|---|
| Encryption | count mod 4 = 3 | count 0 | count 63 |
| Decryption | count mod 4 = 0 | count 63 | count 63 |

Assertions in `present_core` check that the two never collide.

**Interface** (one bit per clock, all on the rising edge):

- **Start.** Pulse `start` with `dec` set. Hold `dec` for the whole block.
- **Key.** While `key_take` is high (80 cycles), drive `kin`:
  - encryption: k79 first;
  - decryption: k0 first.
- **Data.** While `data_take` is high (the last 64 of those cycles), drive `din`:
  - encryption: plaintext bit 63 first;
  - decryption: ciphertext bit 0 first.
- **Result.** It appears on `dout` while `dout_valid` is high, in the same bit
  order as the input. `done` pulses with the last bit.

**Decryption key.** Decryption must be given the key register value *after the
last encryption round*, not the user key. That value is the user key put through
the 31 PRESENT key updates: rotate left by 61, S-box the top nibble, and XOR the
round counter into bits 19..15. The testbench function
`present_ref_pkg::ref_last_key` computes it. A device that decrypts often would
store it once.

## GIFT-64-128 core (`gift_core`)

The state side works like the PRESENT core, with its own swap pairs. Both
directions stream most significant bit first. Encryption enters at 0 and leaves
at 63; decryption enters at 61 and leaves at 60. One S-box with a forward/inverse
select serves both.

**Encryption timing.** A block takes 1920 cycles:

- **Load, 128 cycles.** The key is loaded over all 128 cycles, k127 first.
- The plaintext enters in the last 64 of those cycles. It passes the first S-box
  layer as it enters.
- **28 passes of 64 cycles.**
  - In passes 1..27, a leaving bit receives:
    - its round-key bit;
    - its round-constant bit: the fixed 1 for bit 63, and c5..c0 for bits 23, 19, …, 3;
    - then, once its nibble is complete, the next S-box.
  - In pass 28 the ciphertext streams out as round key 28 and its constant are
    added. No S-box follows.

**Decryption timing.** A block takes 1984 cycles, one pass more, because the last
inverse S-box layer needs its own pass:

- **Load, 128 cycles.** The key enters over all 128 cycles, k127 first. It must be
  the key state of round 28: the user key after 27 key updates.
  `gift_ref_pkg::g_last_key` computes it.
- The ciphertext enters in the last 64 of those cycles, with no S-box.
- **Pass 1** adds round key 28 and its constant and applies the inverse
  permutation.
- **Passes 2..28.** Each nibble goes through the inverse S-box just before it
  leaves. Round key r and its constant are then added, for r = 27 down to 1, and
  the inverse permutation is applied.
- **Pass 29** applies the last inverse S-box while the plaintext streams out.

The round constant runs backwards, starting from the value of round 28.

The interface is the same as PRESENT's: `dec` is set with `start` and must be
held for the whole block.

### Column key schedule (`gift_key_sched`)

The GIFT key update rotates 16-bit columns internally by 2 and 12 bits, and moves
32-bit blocks round by 32 positions. Blocks never mix, so the 128-bit register is
kept as eight separate 16-bit columns. Each column has its own enable and can
rotate by one. In silicon this enable is a gated clock; here it is a clock enable.

- **Block selection.** Block M_m (columns 2m+1 and 2m) supplies the round key
  every fourth round. A 4:1 multiplexer picks the block for the current round.
  This replaces the 32-bit block rotation: no data moves.
- **Supplying key bits.** During its round, the block's two columns rotate by one
  every four cycles. The next key pair therefore always sits in the two top
  flip-flops: U for state bit 4i+1, V for state bit 4i. After 16 nibbles the
  columns are back where they started.
- **Updating.** In the round after a block was used, its columns are rotated to
  perform the update. U rotates by 14 single steps, the same as rotating right by
  2; V rotates by 4, the same as rotating right by 12. Three rounds remain before
  the block is needed again.
- **Decryption.** The blocks are visited in reverse order. Before a block is used,
  the previous round's update is undone: U rotates by 2 and V by 12 single steps.

The round constant is the standard GIFT 6-bit LFSR, starting from 0x01.

## FLIP key shuffling

FLIP keeps a secret key of 530 bits. For every keystream bit it applies a fresh
random permutation to the key register and outputs a Boolean function F of the
result.

This design composes the permutations: each shuffle is applied to the previous
state rather than to the original key. The register is therefore never reloaded
between keystream bits. Each permutation is a Knuth shuffle: for i = 529 down to
1, swap b_i with b_j for a random j ≤ i.

The random indices j come from outside (ports `fl_i`/`fl_j` and `fq_j`). A
keyed generator for them (IV and a pseudo-random permutation in counter mode) is
not part of this design.

### Linear time: one swap per cycle (`flip_shuffle_lin`)

Swapping two bits only matters when they differ. When they do, the swap is the
same as inverting both. So the circuit works like this:

- Two 530:1 multiplexers read b_i and b_j, and c = b_i XOR b_j.
- Flip-flop t is enabled when it is selected by exactly one of the two index
  decoders and c = 1.
- An enabled flip-flop loads its own inverted output.
- During `load`, every flip-flop loads its key bit instead.

One shuffle is 529 swap cycles; with the load cycle, that is 530 cycles per
keystream bit. The `step` input lets the register idle between swaps.

### Quadratic time: only rotations (`flip_shuffle_quad`)

This register has no random access. Each flip-flop has a 2:1 multiplexer that
picks its left or its right neighbour, and the two end flip-flops have one more
multiplexer each. That gives three moves:

- `r`: rotate up by one;
- `v`: rotate up, but b_529 stays and b_528 wraps to b_0;
- `u`: rotate down, but b_0 stays.

With Δ = i − j, step i of the shuffle is v^Δ then u^(Δ−1). If Δ = 0 it is a
single r. One final r after step 1 completes the shuffle. Step i costs
max(1, 2Δ − 1) cycles, about 1.4·10^5 (≈ 2^17) cycles per keystream bit on
average.

The built-in sequencer works as follows:

- `start` begins a shuffle.
- Whenever `j_ready` is high, it takes `j` (with `j_valid`) for the index shown
  on `i_cur`, and starts that step in the same cycle.
- `done` pulses in the cycle of the final r.

An assertion checks j ≤ i.

### Filter (`flip_filter`)

F is the XOR of three parts:

- a linear function of 42 bits;
- a quadratic bent function of 128 bits, taken as the inner product
  x_a·x_{a+1} ⊕ x_{a+2}·x_{a+3} ⊕ …;
- eight triangular functions of degree 9, each on 45 bits. A triangular function
  is y_0 ⊕ y_1·y_2 ⊕ y_3·y_4·y_5 ⊕ …, one monomial of each degree 1..9.

The register bits are assigned in order:

| Register bits | Part |
|---|---|
| 0..41 | linear |
| 42..169 | quadratic, in pairs |
| 170..529 | the triangular functions, one after another |

It is combinational; the keystream bit is `fl_z` / `fq_z`.

## Top level (`swap_rotate_top`)

The four circuits share only `clk` and `rst_n`. Their ports are brought out with
these prefixes:

- `pr_*`: PRESENT;
- `gf_*`: GIFT;
- `fl_*`: FLIP linear-time register and its filter;
- `fq_*`: FLIP rotate-based register and its filter.

Parameters are the FLIP filter sizes: `FLIP_NL`, `FLIP_NQ`, `FLIP_NT`, `FLIP_KT`
(defaults 42, 128, 8, 9). The register length follows from them.

`rst_n` is an asynchronous active-low reset of the control state only. The data
registers are always fully written by a load before they are read.

Synthesised with yosys at the default sizes, the whole top is about 6700 generic
cells and 1460 flip-flop bits. Most of it is the two 530-bit FLIP registers and
the index decoders and multiplexers of the linear-time shuffle.

## Where this departs from the original description

- **PRESENT key register in decryption.** In the reference circuit, both
  directions use the same key positions: the S-box on the top nibble and the
  counter XOR into bits 19..15. Decryption there uses a bit-reversed round
  counter and holds the key in cycles 60..62. Here the key register holds in
  cycles 61..63 in both directions. Because the decryption key is stored in
  reverse order, the inverse S-box acts on positions 61..64 and the counter
  (32 minus the pass number) on positions 41..45. The result is the same PRESENT
  key schedule, checked against a software decryption. Encryption reads its
  round-key bit in the three held cycles from positions 79, 78 and 77.
- **PRESENT decryption key.** The decryption key input is the final round-key
  register, computed outside (see above).
- **GIFT decryption.**
  - The overview table gives the combined GIFT circuit 6 swap pairs, while the
    permutation section and its schedule table give 8. The circuit uses 8.
  - Where bits enter and leave in decryption (61 and 60) is not stated; those
    positions were chosen here to fit the published schedule.
  - The key input is the round-28 key state, computed outside. The column key
    register runs backwards from it, as the original's column scheme allows. The
    original does not say which key decryption starts from. It also sketches a
    second way that starts from the user key and rotates whole blocks in long
    runs of cycles; that way is not used.
- **FLIP.**
  - The index generator is outside the design.
  - The key is loaded in parallel.
  - The first, cubic-time FLIP circuit (one swap by repeated full rotations,
    about 2^25 cycles per bit) is not built.
- **Not built.** The earlier circuits with a single swap pair (two scan
  flip-flops), which take about 47760 cycles per block, are not built either. The
  six-pair cores here compute the same ciphers.
- **Choices not fixed by the description:**
  - the interfaces and handshakes;
  - which filter variable is which register bit;
  - the S-box sharing slots;
  - the reset.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models are
written independently of the RTL, at word level:

- `present_ref_pkg`: PRESENT encryption, decryption and key schedule;
- `gift_ref_pkg`: GIFT-64 encryption, decryption and key schedule;
- `flip_ref_pkg`: the FLIP filter, computed from monomial offsets.

What the testbenches check:

- **Published vectors.** PRESENT-80 (four), GIFT-64-128 (three), plus random
  blocks. Decryption of every ciphertext is checked as well.
- **Exact cycle counts.**
  - PRESENT: 2128 in both directions.
  - GIFT: 1920 (encryption) and 1984 (decryption).
  - FLIP linear shuffle: 530 including the load. 64 chained keystream bits take
    1 + 64 × 529 = 33857.
  - FLIP rotate-based shuffle: its operation count.
- **FLIP keystream workload.** `tb_flip_keystream` loads one key of weight 265
  into both FLIP registers. It then produces 64 chained keystream bits on each,
  from the same indices, and checks every bit against the reference. The
  linear-time register takes 33857 cycles, the rotate-based one about 9 million
  (about 1.4·10^5 per bit). The simulation takes about 1.5 minutes.
- **FLIP shuffles.** They are compared with a reference shuffle after every swap
  (linear) or per shuffle (rotate-based). The index cases are covered: i = j,
  equal bits, differing bits, Δ = 0, Δ = 1, Δ > 1, and `j_valid` withheld.

`tb_swap_rotate_top` runs all four circuits at once at the default sizes, with no
parameter overrides. It counts every mechanism and fails if one never occurs.
It takes a few seconds in verilator.

To run a testbench with plain verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  rtl/present_pkg.sv rtl/gift_pkg.sv \
  tb/present_ref_pkg.sv tb/gift_ref_pkg.sv tb/flip_ref_pkg.sv \
  tb/tb_swap_rotate_top.sv --top-module tb_swap_rotate_top -o sim
./obj_dir/sim
```

Replace the testbench file and top module name to run another one, e.g.
`tb_present_core`, `tb_gift_key_sched` or `tb_flip_shuffle_quad`.
