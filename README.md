# Loop-folded Twofish block cipher core

This is a hardware implementation of the Twofish block cipher: 128-bit blocks,
a 128-bit key by default and 192- or 256-bit keys as build options, encryption
and decryption. The hardware computes only one of Twofish's 16 Feistel rounds.
Blocks loop through that round 16 times. The round's F function is a four-stage
pipeline, and the same F unit also generates the round subkeys from the session
key while the blocks run. No table of 40 subkeys is stored, and no separate
key-schedule datapath exists. The S-boxes are combinational logic, not ROM.

The architecture follows a published ASIC design of this kind. That design is a
0.35 µm chip with about 35,000 gates, reported at 200 Mb/s with a 66 MHz clock.
Its block diagrams fix the main structure:

- a one-round loop with a feedback register and a multiplexer;
- four-stage shift registers beside a pipelined F function;
- an F unit reused for subkey generation, with two round-subkey registers;
- logic-only q-boxes, a two-level MDS network and a two-adder PHT.

The scheduling, the interfaces and the buffering are choices made in this RTL.
The section [Departures](#departures-from-the-reference-architecture) lists
where this RTL differs from that design.

## What the hardware computes

A block is four little-endian 32-bit words R0..R3.

1. **Input whitening.** R_i ^= K_i, for i = 0..3.
2. **16 rounds.** Each round does the following:
   - T0 = g(R0) and T1 = g(ROL(R1, 8)), where g(X) = h(X, S).
   - The PHT gives T0+T1 and T0+2·T1. Subkeys K(2r+8) and K(2r+9) are added to give F0 and F1.
   - R2 becomes ROR(R2 ^ F0, 1) and R3 becomes ROL(R3, 1) ^ F1.
   - The halves swap: (R0,R1,R2,R3) ← (R2',R3',R0,R1).
3. **Output.** The last swap is undone, and the words are whitened with K4..K7.

**h(X, L)** splits X into four bytes. Each byte goes through a key-dependent
S-box: a chain of fixed byte permutations q0/q1, with a byte of each key word
L_j XORed in between. The four S-box bytes are then multiplied by the MDS matrix
over GF(2^8):

    01 EF 5B 5B
    5B EF EF 01
    EF 5B 01 EF
    EF 01 EF 5B

**Subkeys.** These formulas come from the Twofish key schedule:
A_i = h(2i·0x01010101, Me) and B_i = ROL(h((2i+1)·0x01010101, Mo), 8).
Then K(2i) = A_i + B_i and K(2i+1) = ROL(A_i + 2·B_i, 9). Me and Mo are the even
and odd key words. S is the Reed-Solomon code of the key.

A subkey pair is therefore one more evaluation of two h functions and a PHT,
which is exactly what the F unit already does. That is the reason the unit can
be shared.

**Decryption** runs the same loop. Three things change:
- the subkey pairs are used in reverse order (pair 19−r in round r);
- the rotations become R2' = ROL(R2,1) ^ F0 and R3' = ROR(R3 ^ F1, 1);
- the two whitening sets trade places (K4..K7 at the input, K0..K3 at the output).

With these changes, the swap and the output unswap stay exactly as they are.

## The folded loop: four slots, one round per four cycles

The central idea, and the part that takes the most care, is the timing of the
loop in `twofish_core`.

The F unit (`twofish_ffunc`) accepts one pass per cycle and returns its result
four cycles later. Beside it runs a four-stage shift register, `st[1..4]`, which
carries each block's full 128-bit state and a tag (valid, last round). When a
block's state leaves stage 4, its F0/F1 leave the F unit in the same cycle. The
round is finished right there:
1. the rotate and XOR;
2. the swap;
3. the head multiplexer, which puts the new state straight back into stage 1
   and into the F unit.

So the loop has four slots, and each slot gets one round every four cycles.

The slots are used like this:

| cycle in each 4-cycle period | slot use |
|---|---|
| 0 | **subkey pass** for this round: computes K(2r+8), K(2r+9) (or pair 19−r when decrypting) into the round-subkey registers |
| 1, 2, 3 | **data passes** of up to three blocks |

A subkey pass issued at cycle 4r writes the round-subkey registers at the end of
cycle 4r+3. The data passes issued at 4r+1, 4r+2 and 4r+3 add those subkeys in
their fourth pipeline cycle: 4r+4, 4r+5 and 4r+6. The next subkey pass rewrites
the registers only at the end of 4r+7. So a single pair of round-subkey
registers serves all three blocks, and no subkey is ever stored for more than
one round.

A **batch** is 16 such periods: 64 cycles.

- Blocks are loaded from the input buffer in cycles 1..3 of period 0. They are
  whitened on the way in.
- They leave the loop in cycles 1..3 of the following batch. There they are
  unswapped, whitened and pushed into the output buffer.
- In those same cycles, the slots can already load the next batch's blocks.
  Batches therefore follow each other with no gap.

The controller decides each batch's size in the batch's last cycle. The size is
as many waiting blocks as it can take, up to three. It is also limited so that
the output buffer can always accept what the loop produces. The loop itself
therefore never stalls. Back-pressure acts only on when a batch starts and how
many blocks it takes.

## The F-function pipeline

| stage (registered at end of cycle) | contents | built from |
|---|---|---|
| issue cycle c | input multiplexers. Data pass: x0 = R0, x1 = ROL(R1,8), L = S for both h. Subkey pass: x0 = 2i·ρ, x1 = (2i+1)·ρ, L = Me / Mo | `twofish_ffunc` |
| c | eight S-box bytes (two h units × four S-boxes) | `twofish_sbox` → `twofish_qbox` |
| c+1 | MDS first level: per h, eight partial sums, each the XOR of two products | `twofish_mds` |
| c+2 | MDS results T0, T1 | `twofish_mds` |
| c+3 | PHT, then either F0/F1 = PHT + round subkeys (data pass) or round-subkey registers ← (A+B, ROL(A+2B, 9)) (subkey pass) | `twofish_pht`, `twofish_cla32` |

**q-boxes** (`twofish_qbox`). Each q-box has two half-rounds of nibble mixing,
followed by 4×4-bit tables t0..t3. With a 128-bit key, each S-box is three
q-boxes with two key-byte XORs. Each extra 64 bits of key add one more q column
in front.

**MDS** (`twofish_mds`). Each input byte feeds one ×5B and one ×EF network.
These are written as shift-and-reduce with the polynomial x^8+x^6+x^5+x^3+1.

**PHT and adders.** The PHT is two chained carry-lookahead adders,
out2 = (in1+in2)+in2. In subkey passes, a hard-wired rotate-by-8 is selected on
input 2. The subkey adders are two more adders of the same kind. Each adder uses
4-bit groups with a second lookahead level.

The F unit's pipeline registers have no reset. Their contents only matter when
a valid tag travels with them, and the tags are reset.

## Key setup

Key setup starts when `key_valid` and `key_ready` are both high.

1. `twofish_keydep` registers the key words Me and Mo, and the Reed-Solomon
   words S. The RS words are computed combinationally from the key input, in
   GF(2^8) with polynomial x^8+x^6+x^3+x^2+1.
2. The controller issues four subkey passes, for indices 0..3.
3. Their results are captured as the eight whitening subkeys K0..K7.
4. Setup takes 8 cycles after the key is taken. The core accepts blocks from
   then on.
5. `decrypt` is sampled together with the key. It holds until the next key.
6. A new key is accepted only while no block is in flight.

The 32 round subkeys are never stored. They are recomputed in every batch, one
pair per period.

## Interface (`twofish_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `key_valid` / `key_ready` | in / out | 1 | key handshake |
| `key` | in | KEY_BITS | session key, byte 0 in the most significant bits |
| `decrypt` | in | 1 | 0 = encrypt, 1 = decrypt; taken with the key |
| `in_valid` / `in_ready` / `in_data` | in / out / in | 1/1/128 | input blocks, byte 0 in bits 127:120 |
| `out_valid` / `out_ready` / `out_data` | out / in / out | 1/1/128 | results, in input order |
| `busy` | out | 1 | key setup running or blocks in flight |

Byte order is that of the usual Twofish test vectors. A block or key written as
a hex string maps straight onto the port. For example, with the all-zero
128-bit key, the all-zero block encrypts to `9F589F5CF6122C32B6BFEC2F2AE8C35A`.

**Timing**

- Key setup takes 8 cycles.
- A lone block appears on `out_valid` 67 cycles after the clock edge that
  accepted it.
- With a steady supply, the core completes 3 blocks every 64 cycles
  (6 bits per cycle).

**Parameters.** `KEY_BITS` can be 128 (the default), 192 or 256. It is the only
parameter of the top. The depth of the loop and the number of data slots are
package constants, in `twofish_pkg`.

## Performance against the reference chip

The reference chip reports 200 Mb/s at 66 MHz, which is about 42 cycles per
block. This RTL reaches about 21.3 cycles per block, or 396 Mb/s at 66 MHz.

How the reference chip shares its F unit between subkey passes and data passes
is not known. It may generate subkeys per block, or hold fewer blocks in
flight. The schedule here is one reasonable way to use the described structure.
It keeps the same "subkeys on the fly" property.

No timing analysis has been done: whether this RTL closes timing at 66 MHz
in a given process is not known. The critical path is in stage 4: two adders in
series in the PHT, then the subkey adder, then the rotate/XOR/swap and the head
multiplexer into stage 1.

## Departures from the reference architecture

- **Scheduling and throughput.** The slot schedule is this design's own. So are
  the batch rule and the resulting rate. See the section above.
- **PHT rotation direction.** The reference drawing labels the hard-wired
  rotation on PHT input 2 as "ROR8". Twofish needs a left rotation by 8
  (B = ROL(h(...), 8)), and that is what is built. Under a different byte
  numbering, the two may describe the same wiring.
- **MDS row 0.** The matrix is built as printed above. One worked example for
  z0 in the reference text reads `y0·01 ⊕ y1·EF ⊕ y2·5B ⊕ y3·EF`. That
  disagrees with the matrix, with the register description next to it, and
  with Twofish. The matrix is followed.
- **Two h units.** One drawing of the F unit shows a single h block fed through
  an input multiplexer ("sbox and MDS reuse"). The data-flow and
  pipeline drawings show two h paths. Two h units are built, so one full pass
  can be issued every cycle.
- **Whitening subkeys.** K0..K7 are computed once per key and kept in eight
  registers. The 32 round subkeys are produced on the fly.
- **Tables and key material not given by the architecture.** These come from
  the Twofish specification:
  - the contents of the q-box tables t0..t3;
  - the q0/q1 order of the S-box columns after the first;
  - both field polynomials;
  - the Reed-Solomon key code.

  The design is correct Twofish. The known-answer vectors below confirm it.
- **Buffers.** The input and output buffers (3 and 6 blocks), the valid/ready
  handshakes and the reset are this design's choices. They stand in for the
  reference chip's "input cache / input buffer registers / output cache".
- **Not built.**
  - The I/O pad ring of the chip: foundry library cells.
  - Power, area and gate-count figures. These belong to that chip's process and
    cannot be compared with this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model,
`tb/twofish_ref_pkg.sv`, is written directly from the cipher definition:
- q-boxes are evaluated nibble by nibble;
- GF(2^8) products use a generic multiply loop;
- additions use plain `+`.

It shares no code with the RTL.

| testbench | what it checks |
|---|---|
| `tb_twofish_qbox` | all 256 inputs of q0 and q1, known first/last entries, bijectivity |
| `tb_twofish_sbox` | S-box chain at all byte positions (128-bit), plus 192/256-bit chains |
| `tb_twofish_mds` | MDS products, two-cycle latency, hold on `en` low |
| `tb_twofish_cla32` | adder on carry-chain corner cases and random operands |
| `tb_twofish_pht` | both PHT modes |
| `tb_twofish_h` | pipelined h function, three-cycle latency |
| `tb_twofish_ffunc` | all 20 subkey pairs for random keys; data passes with on-the-fly subkeys; four-cycle latency |
| `tb_twofish_keydep` | key words and RS words for 128- and 256-bit keys |
| `tb_twofish_buffer` | FIFO order, flags and count against a queue model |
| `tb_twofish_control` | setup passes, subkey index per period (encrypt and decrypt), load and last-round cycles, back-to-back batches, batch cut by output room, key refused while busy |
| `tb_twofish_core` | the datapath driven by a testbench sequencer: encryption of three blocks including the zero-key vector, decryption of two blocks, exact 64-cycle loop time |
| `tb_twofish_top` | end to end at default parameters (details below) |
| `tb_twofish_top_keylen` | 192- and 256-bit builds: known-answer vectors, random encrypt and decrypt round trips |

`tb_twofish_top` runs the following:
- the Twofish 49-step known-answer chain, which reloads the key for every block
  and must end in `5D9D4EEFFA9151575524F115815A12E0`;
- the lone-block latency;
- the steady-state rate of 3 blocks per 64 cycles;
- a 64-block random stream under random input gaps and output back-pressure;
- a decryption pass over the resulting ciphertexts.

It also counts how often each mechanism occurs: key setup, full batch, partial
batch, back-to-back batches, a batch cut by output room, input back-pressure,
output back-pressure, decrypt batches and subkey passes. A mechanism that never
occurs counts as a failure.

Assertions in `twofish_core` and `twofish_top` check three rules:
- a subkey pass and a block never share a slot;
- F results arrive aligned with their block;
- a pop or push happens only when the buffer can take it.

### Running a testbench with Verilator

From the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_twofish_top \
        -y rtl -y tb -Irtl rtl/twofish_pkg.sv tb/twofish_ref_pkg.sv tb/tb_twofish_top.sv
    ./obj_dir/Vtb_twofish_top

Replace the top module and the file to run any other testbench. Packages have to
come first on the command line. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/twofish_pkg.sv rtl/<module>.sv`.

## Files

| file | role |
|---|---|
| `rtl/twofish_pkg.sv` | types (`slot_t`, `words4_t`), q tables, loop constants, rotate and byte-order helpers |
| `rtl/twofish_top.sv` | top: key unit, input and output buffers, controller, core |
| `rtl/twofish_control.sv` | setup sequence, batch schedule, subkey indices |
| `rtl/twofish_core.sv` | folded round loop, shift registers, whitening, feedback |
| `rtl/twofish_ffunc.sv` | shared F unit with round-subkey registers |
| `rtl/twofish_h.sv` | h function (S-boxes + MDS), three stages |
| `rtl/twofish_sbox.sv`, `rtl/twofish_qbox.sv` | key-dependent S-box, q permutation |
| `rtl/twofish_mds.sv` | two-stage MDS multiplier |
| `rtl/twofish_pht.sv`, `rtl/twofish_cla32.sv` | PHT, carry-lookahead adder |
| `rtl/twofish_keydep.sv` | key register, key words, Reed-Solomon S words |
| `rtl/twofish_buffer.sv` | block FIFO |
