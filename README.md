# Lightweight security coprocessor for RISC-V (Ascon-based)

This coprocessor gives a small RV32 core four security services. It is
reached through custom instructions of the core's coprocessor port:

- **confidentiality and integrity**: Ascon-128 authenticated encryption and decryption;
- **hashing**: Ascon-Hash, with a 256-bit digest;
- **randomness**: a reseedable sponge generator. It runs on the Ascon permutation and takes its seed from a 64-bit-wide Trivium;
- **key management**: key generation, storage in slots, export as an encrypted key, import, and deletion.

All four services are built from one Ascon permutation. It computes two
rounds per clock, so p^12 takes 6 clocks and p^6 takes 3. The main idea is
that every service is a different way of feeding data into that one
permutation and reading data out of it.

Software never moves data through the core's registers. It passes buffer
addresses and byte lengths with "Set" instructions. Then an "Init" or
action instruction runs the operation. The coprocessor reads its inputs
from memory and writes its results to memory through the data-cache port.
It returns one result word to the instruction's `rd`.

## Block structure

```
            lw_coprocessor (top)
  cmd/resp ──► instr_decoder ──► mode_ctrl ──► starts one unit, answers rd
                                   │  shares ▼
        ┌────────────┬─────────────┼───────────────┬─────────────┐
   ascon_aead    ascon_hash    ascon_prng(+trivium64)   kmu
        └────── perm_if ──────► ascon_p (one instance) ◄─┘
        └────── blk_if  ──────► mem_fsm ──► 32-bit data-cache port
```

| file | role |
|---|---|
| `lwc_pkg.sv` | state type, IVs, funct7 codes, operand structs, byte-mask helpers |
| `blk_if.sv`, `perm_if.sv` | the two recurring bundles: block port to memory, request port to the permutation |
| `ascon_p.sv` | permutation, two rounds per clock |
| `ascon_aead.sv` | Ascon-128 encrypt / decrypt sequencer |
| `ascon_hash.sv` | Ascon-Hash sequencer |
| `ascon_prng.sv` | sponge random generator with its own state register |
| `trivium64.sv` | Trivium, 64 keystream bits per clock, the seed source |
| `kmu.sv` | key slots, new key, encrypted export and import, delete |
| `instr_decoder.sv` | funct7 decoding and operand registers |
| `mem_fsm.sv` | turns 64-bit block transfers into 32-bit cache accesses |
| `mode_ctrl.sv` | command acceptance, unit start, response, and sharing of `ascon_p` and `mem_fsm` |
| `lw_coprocessor.sv` | top |

## Instruction set

`funct7[6:4]` selects the module and `funct7[3:0]` the operation. `[X]` means
the address of buffer X. Lengths are in bytes.

| module (funct7[6:4]) | op | name | rs1 | rs2 | rd |
|---|---|---|---|---|---|
| 1 AEAD encrypt | 1 | Set P | [P] | \|P\| | – |
| | 2 | Set AD | [AD] | \|AD\| | – |
| | 3 | Set C Tag | [C] | [Tag] | – |
| | 4 | Set Nonce | [Nonce] | – | – |
| | 5 | Use Key | key ID | – | – |
| | 6 | Init Enc | – | – | finish (1) |
| 2 AEAD decrypt | 1 | Set C | [C] | \|C\| | – |
| | 2 | Set AD | [AD] | \|AD\| | – |
| | 3 | Set D Tag | [Dec] | [Tag*] | – |
| | 4 | Set Nonce | [Nonce] | – | – |
| | 5 | Use Key | key ID | – | – |
| | 6 | Init Dec | – | – | valid (tag matched) |
| 3 Hash | 1 | Set M | [M] | \|M\| | – |
| | 2 | Set Hash | [Hash] (32 bytes) | – | – |
| | 3 | Init Hash | – | – | valid (1) |
| 4 Rand | 1 | Seed | – | – | – |
| | 2 | Get Rand | [Rand] (8 bytes) | – | word counter |
| 5 KMU | 1 | Set New key | ID | – | – |
| | 2 | Get key | ID | [Key] (16 bytes, encrypted) | – |
| | 3 | Send key | ID | [Key] (16 bytes, encrypted) | – |
| | 4 | Delete key | ID | – | – |

The encrypt and decrypt sides keep separate operand registers, and the
registers keep their values between operations. To decrypt the same
buffers again, only `Init Dec` has to be issued. The key never appears on the
instruction port: `Use Key` names a KMU slot, and the AEAD unit reads the key
directly from the KMU. An unknown code starts nothing. If it asks for `rd`,
it gets 0.

A command that asks for a result register (`xd` = 1) gets exactly one
response. Set instructions respond in the clock after they are accepted.
Action instructions respond when the operation ends. A command without `xd`
gets no response. `cmd_ready` is low and `busy` is high from acceptance until
the operation and its response are complete, so the core stalls on the next
coprocessor instruction.

## How each service drives the permutation

The state is five 64-bit words x0..x4. The 64-bit rate is x0 and the
capacity is 256 bits.

**Ascon-128 (`ascon_aead`).**
1. The unit reads the 16-byte nonce and loads `IV || K || N`, with IV `80400c0600000000`. It runs p^12 and XORs K into x3,x4.
2. It absorbs the associated data in 8-byte blocks with p^6 after each one. The last block is padded with `0x80 00..`, and a padding-only block is added when |AD| is a multiple of 8. Empty AD is skipped entirely.
3. It XORs 1 into the last bit of x4.
4. It processes the text 8 bytes at a time, with p^6 between full blocks.
   - Encryption: x0 ^= P, and C = x0.
   - Decryption: P = x0 ^ C, and x0 = C.
   The last block is partial or empty. It is padded in the state, truncated on output, and not followed by a permutation.
5. It XORs K into x1,x2 and runs p^12. The tag is {x3,x4} ^ K. Encryption writes the tag. Decryption reads the expected tag and compares it, which gives `valid`.

**Ascon-Hash (`ascon_hash`).** The unit loads IV `00400c0000000100` followed
by zeros and runs p^12. It absorbs the message with p^12 after every block,
padded as above. Then it squeezes four rate words with p^12 between them and
writes them as a 32-byte digest.

**Random generator (`ascon_prng`).**
- Its 320-bit state is separate from the other units' state, so it survives encryptions.
- It starts at zero and gets one p^12 before the first seed.
- A Seed absorbs `SEED_WORDS` 64-bit words from `trivium64`, each followed by p^12. A reseed absorbs into the running state; it does not restart.
- Each random word is the current rate, followed by p^12.
- The Get Rand result is the number of words given out since the last seed.
- A request made before any Seed seeds first.

**Trivium (`trivium64`).** This is the standard 288-bit Trivium. Its taps are
at least 64 positions from each register's input, so 64 single-bit updates
collapse into one clock. Update j reads the original bit at `tap - j`. Key
and IV load, followed by the 4×288 warm-up, takes 18 clocks. The key and IV
are parameters. As a seed source it is a placeholder for a true random
number generator.

**Key management (`kmu`).** Keys live in `NKEYS` slots of 128 bits. The ID
is taken modulo `NKEYS`.
- *Set New key* asks the generator for two words.
- *Delete key* writes zero.
- *Get key* exports the encrypted key Ke. It runs the start of an Ascon-128 encryption under the device key `MASTER_KEY`, with nonce = ID (zero-extended) and no AD:
  - Ke1 = K[127:64] ^ x0, then x0 = Ke1, then p^6;
  - Ke2 = K[63:0] ^ x0.
- *Send key* runs the same duplex in the decrypt direction.

As a result, Ke is the Ascon-128 ciphertext of the key, and it can be
imported only under the ID it was exported from. No tag is produced, so an
altered Ke imports a wrong key without any error.

## Memory port and byte order

`mem_fsm` serves one block request at a time. A block is 1 to 8 bytes. The
FSM issues one or two 32-bit accesses on the request/response port:
`mem_req_valid/ready`, address, `we`, data and a 4-bit byte mask. Each
request, load or store, returns one `mem_resp_valid`.

Inside the coprocessor, a block is a 64-bit word whose **most significant
byte is the byte at the lowest address**. This is Ascon's byte order, so a
byte string in little-endian RV32 memory gives the standard Ascon results.
Reads clear the bytes past the length. Writes mask them, so partial final
blocks never overwrite memory past the buffer.

**Buffers must be 4-byte aligned.**

## Timing

| step | clocks |
|---|---|
| p^12 / p^6 | 6 / 3 after the start is sampled, plus 2 for the hand-off |
| 8-byte block transfer | 2 cache accesses plus memory latency |
| Trivium warm-up | 18, once, at the first seed |
| Set instruction | accepted in 1 clock; with `xd` set, the response follows in the next |

An encryption of |AD| = a and |P| = p bytes makes 2 + ⌈a/8⌉ + 2·⌈p/8⌉ + 2
block transfers: nonce, AD, text in and out, and tag. It also makes
2 + ⌊p/8⌋ permutation calls, plus ⌊a/8⌋ + 1 more when a > 0.

## Where this RTL departs from, or adds to, the original design

Followed from the original design:
- the block set: AEAD, Hash, Rand, KMU, Ascon-p, mode controller, and the interface controller with its instruction decoder and memory FSM;
- the instruction encoding and operand slots;
- a = 12, b = 6, r = 64, c = 256;
- the two-round unrolled permutation;
- the reseedable sponge generator seeded by a 64-bit Trivium;
- a separate state register for the generator;
- the command/response/busy/interrupt and load/store/response grouping of the ports.

Choices of this RTL, where the original gives no detail:
- the 32-bit memory protocol, the aligned-buffer rule and the byte order;
- lengths counted in bytes;
- the meaning of the Get Rand counter, `SEED_WORDS = 2` and the automatic first seed;
- the Trivium key and IV values;
- `NKEYS = 8`, the key-wrapping scheme and `MASTER_KEY`;
- all FSMs and handshakes;
- unknown codes returning 0.

Known differences:
- **State registers.** The original datapath has one shared 320-bit state register plus the generator's register. Here the AEAD, Hash and KMU units each keep their own 320-bit register and take turns on the permutation. This costs about 960 extra flip-flops. The design has about 4600 flip-flop bits after synthesis, against roughly 1100 FFs reported for the original on an FPGA. The 8-slot key store adds another 1024 bits.
- **Interrupt.** `irq` is always low because no operation raises it.
- **Trivium tap.** In the third Trivium register, the feedback tap is s264 (index 263), as in the Trivium specification. One drawing of the original shows index 253 at that place; that would not be Trivium.
- **Key export.** The exported key carries no authentication tag.

## Verification

Each block has a self-checking testbench in `tb/`. The testbenches compare
against the reference models in `tb/ascon_ref_pkg.sv`:
- a table-driven S-box permutation, written independently of the bit-sliced RTL;
- Ascon-128 and Ascon-Hash over byte queues;
- a bit-serial Trivium.

The published vectors are checked too:
- Ascon-128 with key = nonce = 00..0F and empty AD and P gives tag `E355159F292911F794CB1432A0103A8A`;
- Ascon-Hash of the empty message gives `7346BC14…251F91`.

`tb_lw_coprocessor` runs the whole coprocessor at its default parameters,
driving it instruction by instruction against a behavioural memory
(`tb/mem_model.sv`, with random latencies). It covers random AD and text
lengths, including empty, partial and whole-block endings, tag rejection,
hashing, seeding and reseeding, every KMU operation, export and import of a
generated key, stalls on a busy coprocessor, and held responses. It counts
each of these mechanisms and fails if any one never occurred.

Not verified:
- behaviour with unaligned buffers, which are not supported;
- back-to-back commands from a real core's coprocessor port.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/lwc_pkg.sv tb/ascon_ref_pkg.sv tb/tb_lw_coprocessor.sv --top-module tb_lw_coprocessor
./obj_dir/Vtb_lw_coprocessor
```

Replace the testbench name to run another block's test: `tb_ascon_p`,
`tb_trivium64`, `tb_mem_fsm`, `tb_ascon_aead`, `tb_ascon_hash`,
`tb_ascon_prng`, `tb_kmu`, `tb_instr_decoder` or `tb_mode_ctrl`. Each test
prints `TB_RESULT checks=N failures=M`. The whole-design test takes a few
seconds.

To change the key slots, the master key, the seed length or the Trivium
key/IV, use the parameters of `lw_coprocessor`. The testbench reference has
its own copy of these values in its `localparam`s, so update them there too.
