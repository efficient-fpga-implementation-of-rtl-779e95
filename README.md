# Compact SHA3-512 for FPGAs: a slice-folded Keccak core, with unfolded references

SHA-3 has a 1600-bit state that 24 rounds of the Keccak-f[1600] permutation
transform. A straightforward core computes one round per clock cycle. That
means 1600 bits of round logic and a 1600-bit state register, which is large
for a small FPGA. The main design here, `sha3_folded`, processes a quarter of
the state per cycle instead: 16 of the 64 *slices*, each a 5x5 bit plane
that shares one z coordinate. A round therefore takes 4 cycles and a 576-bit
SHA3-512 block takes 96. The state lives in small distributed RAMs rather
than flip-flops. Two problems make slice folding hard:

* **rho** rotates each lane along z. Bits therefore move between folds.
* **theta** mixes each slice with the slice below it. Fold 0 therefore needs
  slice 63, which a naive schedule computes last.

This design handles rho in the memory addressing. It handles theta by
computing the needed parities of slice 63 one pass early ("F0S0
pre-processing"). Neither fix costs an extra cycle.

Two unfolded cores are included as points of comparison:

* `sha3_basic`: one round per cycle, 24 cycles per block.
* `sha3_pipelined`: one pipeline register inside the round and two messages
  in flight. Each message takes 48 cycles per block, so the two together
  finish one block per 24 cycles.

`sha3_top` puts the three cores side by side, each with its own ports.

All three cores compute SHA3-512 by default: a rate of 9 lanes (576 bits)
and a digest of 8 lanes. Padding is the host's job. The host sends padded
blocks and marks the last block of each message.

## Notation

* The state is 25 lanes of 64 bits. Lane `l = x + 5y` holds bits `z = 0..63`.
* A *slice* is the 25 bits that share one `z`.
* A *fold* is 16 consecutive slices. Fold `f` holds `z = 16f .. 16f+15`.
* A *pass* is 4 cycles. In cycle `f` of a pass, fold `f` is processed.

In the RTL, a fold is the type `fold_t`: `[24:0][15:0]`, lane-major. The full
state is `state_t`: `[24:0][63:0]`. Both live in `sha3_pkg`, along with the
rho offsets, the round constants and the slice function `slice_pci`
(pi, chi and iota on one 25-bit slice).

## The folded core

### Rescheduled round

A Keccak round is `iota o chi o pi o rho o theta`. The folded core cuts the
rounds differently. It computes `theta o iota o chi o pi o rho` as one unit,
so each pass ends with theta. The pass splits into two pieces of logic:

* **RF2** (`keccak_rf2_pci`) is pi, chi and iota. These act within a slice,
  so 16 slices are 16 independent copies of `slice_pci`.
* **RF1** (`keccak_rf1_theta`) is theta. It needs the column parities of the
  slice below each slice.
* **rho** is not logic at all. It is folded into where RF1's output is
  written in the state memory (next section).

One cycle therefore goes:

```
state RAM read (rho applied) -> RF2 -> mux -> RF1 -> state RAM write
```

The mux chooses what RF1 sees:

* the RF2 output, for a round inside a block;
* the message block alone, for the first block of a message;
* the RF2 output XOR the block, to absorb a further block of the same
  message.

Cutting the rounds this way moves theta of round 0 to the front and leaves
pi, chi and iota of round 23 at the end: 25 pieces instead of 24. The core
hides the extra pass. The RF2 half of round 23 runs in the same pass as the
RF1 of the next block's round 0, because the mux above XORs them. The tail
of a message's last block is the only extra work. It becomes a 4-cycle
*digest pass*, which itself overlaps the first pass of the next message
when that message's block is already waiting. So back-to-back single-block
messages come out every 96 cycles.

### rho by addressing (`sha3_folded_state`)

Every lane has its own 16x16 simple-dual-port distributed RAM
(`dist_ram_sdp`). Word `a` of the RAM holds fold `a` of the lane. Two
copies of the state are kept:

* instance 0 at addresses 0-3;
* instance 1 at addresses 4-7.

A pass reads one instance and writes the other. Reads and writes never
collide, so no extra buffering is needed.

Rho rotates lane `l` by `r = 16q + s`. A fold written in cycle `f`
therefore belongs partly to fold `f+q` and partly to fold `f+q+1` of the
rotated lane. The write side does the following:

* It rotates the 16-bit word by `s`.
* It writes the word to the fold that receives the majority of its bits:
  `f+q` if `s <= 8`, otherwise `f+q+1`.
* It writes the other fewer-than-8 bits in the same cycle to a narrow
  (16x8) *companion RAM* of the lane, at the address of the adjacent fold.

A read merges the main RAM and the companion RAM with a mask that depends
only on `s`. The word read at address `f` is then exactly fold `f` of the
rotated lane. Lane 0 has `r = 0` and no companion RAM. All offsets are
elaboration-time constants, so the "addressing" is only adders on 2-bit
fold numbers and fixed wiring.

### theta across folds and the F0S0 pre-processing (`sha3_f0s0_pre`)

Theta at slice `z` needs the column parities of slice `z-1`. Within a fold,
RF1 has that slice. For folds 1-3, the parities of the previous fold's top
slice are kept in a 5-bit register (`par_q`). Fold 0 is the problem: its
slice 0 needs slice 63 of the *same* pass's RF1 input, which a naive
schedule produces only in the fourth cycle.

The fix is to compute that slice one pass early. While a pass writes its
theta output, `sha3_f0s0_pre` picks 25 bits out of it: for each lane `l`,
bit `(63 - r_l) mod 64`. After rho, these are exactly the 25 bits that make
up slice 63 of the next pass's RF2 input. The bits sit in a 25-bit register.

At fold 0 of the next pass, the unit applies `slice_pci` to the register,
using bit 63 of the round constant, and takes the 5 column parities. If a
message block enters RF1 in that pass, the parities of the block's own
slice 63 are XORed in. Theta is linear, so this matches the parities of
"RF2 output XOR block". The block's slice 63 is bit 15 of fold 3 of each
rate lane. The input buffer keeps those 9 bits aside as the block is
loaded.

So the parities for fold 0 come from one of two places:

* from the input buffer, in a block's first round;
* from the round logic, in every other round.

This costs one extra copy of the 25-bit slice function and 25+5 flip-flops.
Fold 0 needs no extra cycle.

### Pass scheduling (`sha3_folded_ctrl`)

The controller decides each pass at its fold 0 and holds that decision for
folds 1-3. The decision table:

| state | pass | RF1 input | writes state |
|---|---|---|---|
| idle, block waiting | first round of a message | block | yes |
| rounds 1-23 of a block | round `nr` | RF2 (constant `nr-1`) | yes |
| round 24 done, message continues | absorb | RF2 (constant 23) XOR block | yes (waits for the block) |
| round 24 done, last block | digest | RF2 (constant 23) to the digest register; a waiting block of the next message goes to RF1 | only if a block was waiting |

Read and write instances swap after every writing pass. The controller also
releases input buffer banks and signals `digest_done`.

### Host interface and timing (`sha3_io_buffer`, `sha3_folded`)

Input is 16 bits per accepted word (`in_valid && in_ready`). The word order
is lane 0 folds 0..3, then lane 1 folds 0..3, and so on. Message bytes `2k`
and `2k+1` of a block go in bits 7:0 and 15:8 of word `k`. This is the
byte order of FIPS 202, so a byte stream needs no reordering. A block is
36 words. `in_last` goes with the final word of the last block.

The buffer is one 16x16 single-port RAM per rate lane, with two block
banks. The host can load the next block while the core works on the
current one. Because the RAMs are single-port, `in_ready` is low during
the 4 cycles of a pass that reads the buffer.

On the output side:

* `digest_valid` pulses for one cycle.
* `digest[64i+63:64i]` is lane `i`.
* The digest register is filled fold by fold during the digest pass. It
  stays stable until the next message's digest pass, at least 96 cycles
  later.
* There is no back-pressure on the output.
* From the edge that takes the last word of a one-block message to
  `digest_valid` is 100 cycles: 24 passes plus the digest pass.

## The unfolded cores

`keccak_theta`, `keccak_rpci` and `keccak_round` compute theta, then
rho/pi/chi/iota, then the whole round, over the full 1600-bit state.
`keccak_rc_rom` is a table of the 24 round constants, indexed by the round
counter. Both unfolded cores take 64-bit lanes from the host, lane 0 first,
in FIPS 202 byte order. Their input buffers present a whole 9-lane block in
parallel to the round logic.

**`sha3_basic`** runs one round per cycle.

* Its input buffer, `sha3_lane_fifo`, is a flip-flop FIFO holding one
  block.
* In round 0, the round logic's input is the block, or the state XOR the
  block for a continuing block. Absorbing therefore costs no cycle, and a
  block takes 24 cycles.
* The digest is copied to an output register after round 23 of a last
  block. A new message can start at once.

**`sha3_pipelined`** splits the round with a register after theta.

* Two messages (channels 0 and 1, chosen by `in_ch`) are in flight at
  once.
* `sha3_pipe_buffer` keeps one block per channel. The two blocks sit at two
  addresses of one 64-bit-wide distributed RAM per rate lane. The RAM is
  read at the channel that is in the first pipeline stage.
* The two messages alternate between the two stages, so each advances one
  round per 2 cycles: 48 cycles per block per channel, or one block per 24
  cycles overall.
* If a channel's continuing block has not arrived, its state passes
  through both stages unchanged (a *hold*) until it does.
* `digest_ch` tags each digest with its channel.

## Departures and own choices

| Topic | This design's choice |
|---|---|
| Rho spill bits | Go to 24 narrow companion RAMs. The original scheme packs them into spare bits of other lanes' RAMs; that packing is not reproduced. |
| Extra round from rescheduling | Merged into the next block's first pass, or into a digest pass that overlaps the next message. This keeps 96 cycles per block. |
| Lane RAM size | 16x16 per lane, as the state needs. Addresses 8-15 are unused. |
| Host interfaces | The widths (16 bits folded, 64 bits unfolded), the word order, the two pipelined channels and the digest registers are this design's own. No bit-reordering logic is needed. |
| Padding | Outside the core. The testbenches use SHA-3 padding (`0x06 ... 0x80`). The cores work equally with Keccak's pad10*1. |
| Pipelined missing block | Handled by the hold. |
| Reset | Asynchronous, active low, on control registers only. RAMs and datapath registers are written before they are read. |

Other SHA-3 variants are set with parameters: `RATE_LANES` (for example 17
for SHA3-256) and `DIGEST_LANES`. They have not been simulated; only the
SHA3-512 defaults are verified.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Expected values come from
`tb/sha3_ref_pkg.sv`, an independent Keccak model:

* rho offsets from the `(t+1)(t+2)/2` rule;
* round constants from the LFSR definition;
* SHA3-512 over a byte queue.

Known-answer checks against the standard SHA3-512 digests of `""` and
`"abc"` pin down byte order and padding.

The testbenches also check timing:

* the folded core: 96 cycles per block and a 100-cycle single-block
  latency;
* `sha3_basic`: 24 cycles per block;
* `sha3_pipelined`: 48 cycles per block per channel.

`tb_sha3_top` runs all three cores at their default parameters on the same
messages: 35 messages of 0 to 289 bytes, hashed one after another, with
and without idle gaps in the input. It checks every digest and the block
rates. It also counts how often each mechanism happened, and fails if one
never did:

* folded: new message, absorb, digest with an overlapped new message,
  digest alone, waiting for a block, host stalled by a buffer read;
* basic: new message, absorb, wait;
* pipelined: new message, absorb, hold.

All testbenches pass.

## Simulating

With Verilator 5, list the packages first and let `-y` find the modules:

```
verilator --binary --timing --top-module tb_sha3_top -y rtl -y tb +libext+.sv \
          rtl/sha3_pkg.sv tb/sha3_ref_pkg.sv tb/tb_sha3_top.sv
./obj_dir/Vtb_sha3_top
```

Any other testbench runs the same way. Testbenches of the `keccak_*` and
`sha3_*` blocks need `tb/sha3_ref_pkg.sv`. The end-to-end run takes well
under a second.

## Files

| File | Contents |
|---|---|
| `rtl/sha3_pkg.sv` | Types, rho offsets, round constants, slice function |
| `rtl/sha3_top.sv` | The three cores side by side |
| `rtl/sha3_folded.sv` | Folded core |
| `rtl/sha3_folded_ctrl.sv` | Folded core's pass control |
| `rtl/sha3_folded_state.sv` | Folded core's state RAMs |
| `rtl/sha3_f0s0_pre.sv` | F0S0 pre-processing |
| `rtl/sha3_io_buffer.sv` | Folded core's input buffer |
| `rtl/keccak_rf1_theta.sv` | RF1 (theta on a fold) |
| `rtl/keccak_rf2_pci.sv` | RF2 (pi, chi, iota on a fold) |
| `rtl/dist_ram_sdp.sv`, `rtl/dist_ram_sp.sv` | Distributed RAM models |
| `rtl/sha3_basic.sv` | Basic core |
| `rtl/sha3_pipelined.sv` | Pipelined core |
| `rtl/sha3_lane_fifo.sv` | Input FIFO of the basic core |
| `rtl/sha3_pipe_buffer.sv` | Two-channel input buffer of the pipelined core |
| `rtl/keccak_theta.sv`, `rtl/keccak_rpci.sv`, `rtl/keccak_round.sv` | Full-state round logic |
| `rtl/keccak_rc_rom.sv` | Round constant table |
