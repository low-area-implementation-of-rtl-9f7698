# Small-area AES in counter mode: four iterative AES cores side by side

This is synthesizable SystemVerilog for an AES-CTR encryption engine built to be small. It keeps no
pipeline: each AES core holds a single 128-bit state register and runs one full round per clock,
so an AES-128 block takes 11 cycles. Counter mode (NIST SP 800-38A) is added around four such
cores. The cores run in lock step on four consecutive counter blocks, so a 512-bit text is
encrypted in the same 11 cycles. Counter mode only ever uses the forward cipher, so the same
engine also decrypts: feed it the ciphertext and you get the plaintext back.

The architecture follows the design published as *"Low Area Implementation of the Advanced
Encryption Standard (AES) with Counter Mode (CTR) for System-On-Chip (SoC) - Field-Programable
Gate Array (FPGA)"* (Ortiz Niño, Paipilla Arenas, Paz Penagos). That design was written in VHDL
and measured on Xilinx Zynq-7000 and Kintex-7 parts. This is an independent SystemVerilog
implementation of it. Where the publication leaves something open, the choice made here is
marked below.

## The round loop

One AES core (`aes_core`) is a single loop around one register:

```
            +--------------------------------------------------+
            v                                                  |
   Reg --> SubBytes --> ShiftRows --+--> MixColumns --+        |
                                    |                 |        |
   input block ---------------------|-----------------|--+     |
                                    v                 v  v     |
                                   [        Sel 1        ]     |
                                              |                |
   round key ---------------------------> AddRoundKey ---> Reg
```

- **Sel 1** picks the AddRoundKey input:
  - the input block, on the start edge (the initial AddRoundKey);
  - the MixColumns output, in rounds 1 to Nr-1;
  - the ShiftRows output, in the final round, which has no MixColumns.
- **Sel 2** picks the round key:
  - the cipher key itself, on the start edge;
  - the key-schedule register, from then on.
- **`aes_control`** does the sequencing. It is a two-state machine (IDLE, RUN) with a round
  counter. It makes Sel 1 and Sel 2 and the register enable, and it raises `busy`.

The transformations are all combinational:

- `aes_sub_bytes` is sixteen copies of `aes_sbox`. The S-box is a fixed 256-entry table.
- `aes_shift_rows` is only wiring.
- `aes_mix_columns` uses the fixed GF(2^8) doubling `xtime`.
- `aes_add_round_key` is an XOR.

A whole round therefore sits between two clock edges. That is the critical path, and it sets the
clock rate.

## Key expansion on the fly (`aes_sub_key`)

There is no stored key schedule. Next to the state register, a key register holds a **window of
Nk words** of the FIPS-197 key schedule. Nk is 4, 6 or 8 for 128-, 192- or 256-bit keys. In
round r the window holds words w[4r] to w[4r+Nk-1], and its top four words are the round key of
round r. Each clock, `aes_sub_key` computes the next four schedule words and slides the window
on by four words, using the KeyExpansion recurrence:

```
w[k] = w[k-Nk] ^ f(w[k-1])
f    = SubWord(RotWord(x)) ^ Rcon[k/Nk]   if k mod Nk == 0
       SubWord(x)                          if Nk == 8 and k mod Nk == 4
       x                                   otherwise
```

The index k of the first new word is kept in a 7-bit register (`widx_q`), which steps by 4 each
cycle. `k mod Nk` and `k / Nk` divide by a constant, and the Rcon values come from a fixed table.

Why a window of Nk words, not just the last round key?

- For a 128-bit key the two are the same thing.
- For 192- and 256-bit keys, a round key is not a function of the previous round key alone.
  Keeping Nk words makes every round key available exactly when its round needs it, so longer
  keys cost only their extra rounds.

Which new word positions need an S-box?

- Position 0 needs one for every key size. For Nk = 4 and Nk = 8, four-word steps always start
  on a multiple of 4.
- For Nk = 6, the four-word steps drift across the six-word period, so a RotWord/SubWord can also
  fall on position 2.
- Only those positions get S-boxes: four S-boxes per core for 128- and 256-bit keys, eight for
  192-bit keys.

The four new words are chained combinationally (w[k+1] needs w[k]). This chain runs in parallel
with the round datapath.

## Counter mode around four cores (`aes_ctr`, `aes_ctr_counter`)

`aes_ctr_counter` derives the BLOCKS counter blocks from two 128-bit inputs, the IV and the
*IV-base-step*:

```
counter[b] = IV + (b+1) * step   (mod 2^128),   b = 0 .. BLOCKS-1
```

It is built as a chain of 128-bit adders, each adding the step once more. With step = 1 and
IV = f0f1...fcfdfefe, this yields the SP 800-38A example counters f0f1...fcfdfeff, ...ff00,
...ff01 and ...ff02.

`iv_overflow` is the OR of the carries out of those adders. It is set when any counter of the
operation wrapped past 2^128, which would repeat counter blocks under the same key. The flag is
registered on the start edge and stays valid until the next start. The core only reports the
wrap. Choosing a fresh IV or key is left to the user.

Each `aes_core` encrypts its counter block under the common key. The text is then XORed with the
keystream. Block 0 (counter IV+step) is in the most significant 128 bits of `plaintext` and
`ciphertext`.

Each core keeps its own key register and key expansion, as in the original design. Sharing one
schedule between the four cores would save area, but it is not done here.

## Interface and timing

Top module `aes_ctr`, parameters `KEY_BITS` (128, 192 or 256; default 128) and `BLOCKS` (default 4).

| port          | dir | width        | meaning |
|---------------|-----|--------------|---------|
| `clk`         | in  | 1            | clock; everything is on the rising edge |
| `rst`         | in  | 1            | synchronous, active high; aborts a running operation |
| `start`       | in  | 1            | start an operation; ignored while `busy` |
| `key`         | in  | 256          | cipher key, right-aligned: bits [KEY_BITS-1:0] |
| `iv`          | in  | 128          | initialization vector |
| `iv_step`     | in  | 128          | increment between counter blocks |
| `plaintext`   | in  | 128*BLOCKS   | text to encrypt or decrypt, block 0 on top |
| `ciphertext`  | out | 128*BLOCKS   | `plaintext` XOR keystream |
| `busy`        | out | 1            | high while the rounds run |
| `iv_overflow` | out | 1            | a counter of the last started operation wrapped |

The timing of one operation:

- **Edge 0.** `start` is seen while idle. `key`, `iv` and `iv_step` are sampled, and the initial
  AddRoundKey is done. Only this edge reads these inputs.
- **Edges 1 to Nr.** `busy` is high. The key inputs may change.
- **After edge Nr.** `busy` falls. From then on, `ciphertext` is valid for as long as `plaintext`
  is held.

The XOR with the text has no register behind it, which saves 512 flip-flops. That is why
`plaintext` must be held while the result is read.

The result appears Nr+1 cycles after the start edge:

- 11 cycles for 128-bit keys;
- 13 cycles for 192-bit keys;
- 15 cycles for 256-bit keys.

A new `start` may come in the first cycle that `busy` is low, so back-to-back operations run
every Nr+1 cycles.

`aes_core` can also be used on its own as a plain AES-128/192/256 block encryptor. It has the
same `key_i` convention. `block_o` holds the ciphertext after `busy_o` falls, and keeps it until
the next start.

Throughput per clock is 512 bits / 11 cycles ≈ 46.5 bit/cycle for AES-128 with four blocks. The
original design reports Fmax values of 164.9 MHz (xc7z020) and 238.7 MHz (xc7k325t). With these,
that gives 7.67 and 11.11 Gbit/s, the figures quoted for it.

## Parameters

| parameter  | module(s)                       | default | notes |
|------------|---------------------------------|---------|-------|
| `KEY_BITS` | `aes_ctr`, `aes_core`, `aes_sub_key` | 128 | 192 and 256 supported; rounds Nr = KEY_BITS/32 + 6 |
| `BLOCKS`   | `aes_ctr`, `aes_ctr_counter`    | 4       | number of parallel cores; text width 128*BLOCKS |
| `NR`       | `aes_control`                   | 10      | set by `aes_core` from `KEY_BITS` |

Shared types live in `rtl/aes_pkg.sv`:

- the block and word types;
- the `sel1_e` and `sel2_e` multiplexer encodings;
- the `xtime` function and the Rcon table.

## Choices made where the original design is silent, and known differences

- **Start of the counter sequence.** The first counter block is IV + step, not IV. The original
  design describes the step input as setting "the starting value" of the IV. Its CTR simulation
  shows IV f0f1...fcfdfefe with step 1 producing the SP 800-38A output for counter
  f0f1...fcfdfeff. The implementation follows that reading. To start at IV itself, pass IV − step.
- **Latency.** 11 cycles per block for AES-128. The original quotes 11 cycles, and its throughput
  figures work out with 11. One of its simulation delays (about 60.8 ns at a 6.065 ns clock)
  would instead be nearer 10 cycles. The 192- and 256-bit latencies (13, 15) are this design's.
  The original says only that these key sizes need additional cycles.
- **ready/busy.** It is a single `busy` output, high while the rounds run. Its polarity and exact
  timing are chosen here.
- **Reset.** Reset is synchronous and active high, and clears only control state. The data
  registers are not reset. The key and state registers are only read after a completed run.
- **Key port.** The key port is 256 bits wide for every key size, with shorter keys in the low
  bits. This matches the original's 256-bit cipher-key input.
- **Byte order.** The FIPS-197 order is used: byte 0 of a block is in bits [127:120].
- **Output.** `ciphertext` is combinational from `plaintext` (see above), and `iv_overflow` is
  registered on start. Both are this design's choices.
- **Not covered.** The FPGA results of the original (clock rate, power, LUT and register counts)
  are not reproduced. The AXI4 bus and processor connection it mentions as future work are not
  part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Expected values are computed by
`tb/aes_ref_pkg.sv`, a behavioural AES model written separately from the RTL:

- its S-box is computed from the GF(2^8) inverse and the affine map, not read from a table;
- it runs the full KeyExpansion into an array.

The testbenches and what they check:

| testbench | what it checks |
|-----------|----------------|
| `tb_aes_sbox` | all 256 entries |
| `tb_aes_sub_bytes`, `tb_aes_shift_rows`, `tb_aes_mix_columns`, `tb_aes_add_round_key` | FIPS-197 Appendix B round-1 values and random states |
| `tb_aes_sub_key` | every window step of full schedules for 128/192/256-bit keys (FIPS-197 and random keys) |
| `tb_aes_control` | select/enable sequence cycle by cycle for 10, 12 and 14 rounds; start while busy ignored; reset mid-run |
| `tb_aes_core` | FIPS-197 C.1/C.2/C.3 and B vectors plus random blocks and keys; exact 11/13/15-cycle latency; result held |
| `tb_aes_ctr_counter` | SP 800-38A counter sequence, random IVs and steps, overflow exactly at the 2^128 wrap, 4 and 7 blocks |
| `tb_aes_ctr` | default configuration end to end: SP 800-38A F.5.1 encryption and decryption, random operations, 11-cycle latency, and that overflow, step ≠ 1, start while busy, reset mid-operation and back-to-back operations each occur |
| `tb_aes_ctr_keysizes` | SP 800-38A F.5.3 (AES-192) and F.5.5 (AES-256) plus random operations, 13/15-cycle latency |

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. Each also has a watchdog.
To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_ctr.sv --top-module tb_aes_ctr -o sim
./obj_dir/sim
```

Replace `tb_aes_ctr` with any other testbench name. Each runs in well under a second.

Assertions in the RTL check that:

- the controller always leaves RUN after the final round;
- MixColumns is bypassed in the final round and only there;
- the four cores stay in lock step.

## Files

- `rtl/aes_pkg.sv`: shared types, encodings, `xtime`, Rcon.
- `rtl/aes_sbox.sv`: the S-box table.
- `rtl/aes_sub_bytes.sv`, `rtl/aes_shift_rows.sv`, `rtl/aes_mix_columns.sv`,
  `rtl/aes_add_round_key.sv`: the round transformations.
- `rtl/aes_sub_key.sv`: one key-expansion step (four words).
- `rtl/aes_control.sv`: the round controller.
- `rtl/aes_core.sv`: the iterative AES core.
- `rtl/aes_ctr_counter.sv`: counter blocks and overflow detection.
- `rtl/aes_ctr.sv`: the AES-CTR top level.
- `tb/`: the reference model package and the testbenches listed above.
