# PLD001 cryptoprocessor in SystemVerilog

PLD001 is a small cryptoprocessor that does two kinds of work with one arithmetic unit:

- public-key work (RSA-style modular exponentiation on 768-bit numbers), used to exchange a session key;
- IDEA block encryption of the data stream (64-bit blocks, 128-bit key).

The RSA side needs long modular multiplication. IDEA needs 16-bit multiplication modulo 2^16+1. Both come down to multiply-and-add, so a single ALU made of four 24-bit multiplier/adder units can serve both. It is switched between two set-ups:

- two 16x16 modular multipliers for IDEA;
- one 8x96-bit multiplier with a 96-bit adder/negator for long numbers.

This RTL rebuilds the datapath and the hardware controllers of the original chip. That chip ran at 25 MHz in a 1.0 µm process. The microcode level that drove it is not included. Its command inputs are brought out as ports of the top module `pld001`.

## Data registers and datapath

All long data are 768-bit registers, stored as eight 96-bit words with the least significant word first.

| storage | size | role |
|---|---|---|
| RAM8 (`pld_ram`, depth 8) | 1 register | accumulator of every long command (called R8 below) |
| RAM128 (`pld_ram`, depth 128) | 16 registers, R0..R15 | operands, results and IDEA key sets; word *w* of register *k* is at address 8k+w |
| ER (`er_reg`) | 24 bits | source of multiplier digits; loaded from any 24-bit field of a RAM128 word |

Each RAM has one asynchronous read port and one synchronous write port. In every cycle the sequencer can therefore read a word from each RAM, pass both through the ALU and write the result back. Long operations run one 96-bit word per cycle. ER feeds the ALU either a 6-bit digit (for modular multiply) or an 8-bit digit (for `MULD`).

The index unit (`index_calc`) has four 8-bit index registers X0..X3. Each one addresses a piece of a 768-bit register:

| bits | selects |
|---|---|
| 6..4 | one of 8 words |
| 3..2 | one of 4 24-bit fields |
| 1..0 | one of 4 digits |

Bit 7 is not used as an address. The index registers take immediate and ER-based operations: load, add, and, or, xor, and moves to and from ER[7:0]. On the top module, `er_ld_valid` loads ER from the field that index register `ix_rd_sel` points at, in register `er_ld_reg`. That index register's digit number also picks the 8-bit digit that `MULD` uses.

## The shared ALU (`pld_alu`, `alu24`)

Each `alu24` unit computes `x + y + z ± (a·b << 0 or 8)`:

- `a` is 8 bits and `b` is 24 bits;
- `x`, `y` and `z` are 36-bit signed addends.

It stands for an 8-argument carry-save tree with a carry-look-ahead adder at its end.

**IDEA mode** (`idea_mode=1`). Units 1+3 form multiplier pair 0, and units 2+4 form pair 1. One multiplication modulo F4 = 2^16+1 takes two cycles with the low-high algorithm:

1. Multiply cycle (`i_mul=1`). Unit 1 forms A[7:0]·B. Unit 3 adds A[15:8]·B·2^8 to it. The product D goes into registers T1..T4.
2. Reduce cycle. Unit 1 computes D.lo − D.hi, and unit 3 computes D.lo − D.hi + F4. The sign of unit 1 picks the result.

Pair 1 can also add a 16-bit addend during its reduce cycle (`iadd_en`). That turns "multiply, then add" into the same two cycles. In that case both pairs get the same operands, and the sign from unit 1 selects the result.

IDEA treats the subblock 0 as 2^16. Here B is widened to 17 bits, and for A = 0 the term 2^16·B is added in unit 3. With that, the low-high step needs no special case. Results are taken mod 2^16, so 2^16 comes out as 0, as IDEA requires.

**Long mode** (`idea_mode=0`). The four units are chained by bit position into one 96-bit slice:

    full = la + (lneg ? −ld·lb : ld·lb) + carry
    lsum = full mod 2^96,  lcout = full >>> 96

The carry is signed and held in a 12-bit carry register. Running this over the eight words gives:

| command | operand set-up |
|---|---|
| add | `ld=1` |
| subtract | `ld=1`, `lneg=1` |
| negate | `la=0`, `ld=1`, `lneg=1` |
| transfer | `ld=0` |
| multiply-accumulate by a digit | `ld` = the digit |

## Long commands (`alu_seq`)

| command | effect | cycles |
|---|---|---|
| `SEQ_LOAD8` | R8 := Ra | 9 |
| `SEQ_STORE8` | Ra := R8 | 9 |
| `SEQ_ADD` / `SEQ_SUB` | R8 := R8 ± Ra | 9 |
| `SEQ_NEG` | R8 := −Ra | 9 |
| `SEQ_MULD` | R8 := R8 + digit·Ra | 9 |
| `SEQ_MODMUL` | R8 := Ra·Rb mod Rc | 93 per 24-bit field of Ra, + 1, + 8 per full compare |

For the simple commands, `cmd_carry` holds the bits above 768 (signed). `done` pulses once at the end of every command.

### How the modular multiply works

This is the hardest part of the design. `SEQ_MODMUL` is an interleaved multiply with reduction in radix 2^6. It scans the multiplier A from its top 24-bit field downwards. `cmd_len` gives the number of fields, 32 for a full 768-bit A. Each field is loaded into ER and used as four 6-bit digits, most significant first. R8 starts at 0, and B and C stay in RAM128.

For each digit *d* there are three phases:

1. **Multiply** (8 cycles): R8 := 64·R8 + d·B, word by word. The 6 bits shifted out of each word enter the next word. What is left over above the top word is kept in a small guard value *g*.
2. **Binary search** (7 cycles): find the largest 7-bit *m* with R8 − m·C ≥ 0. Since R8 < C and B < C, the new R8 is below 127·C, so 7 bits are enough. Trial values are tried from the top bit down. Each trial looks at the top word only, D = g·2^96 + R8[7] − t·C[7]. The lower words can change the true difference by less than 127·2^672. So the trial is:
   - rejected if D < 0;
   - accepted if D ≥ 127;
   - otherwise (the two numbers are almost equal) decided by a full compare over all eight words, which takes 8 more cycles.

   For random 768-bit operands a full compare is needed with probability about 2^−89. A modulus whose top word is tiny triggers full compares often. The testbenches use such a modulus to exercise this path. `ev_fullcmp` pulses once for each full compare.
3. **Reduce** (8 cycles): R8 := R8 − m·C. The ALU negates the product, so C is not modified. After this step 0 ≤ R8 < C exactly, and an assertion checks that the guard value has returned to zero.

ER is then shifted by 6 bits. Loading ER for a new field costs one cycle.

A full 768-bit multiply therefore takes 32·(1 + 4·23) + 1 = 2977 cycles. That is about 8400 multiplications per second at 25 MHz. The original count of 2944 cycles leaves out the ER loads. Here they cost a cycle because RAM128's single read port is busy in every other cycle.

The command requires Rb < Rc, and Rc must be non-zero. Ra may be any value that fits the register, because each step keeps R8 below Rc as long as Rb < Rc. This makes the operand reduction A := A mod C a single command: `MODMUL` with Rb holding 1 (`tb_alu_seq` checks this with A far larger than C). To reduce B, write 1 into a register and run the same command with B in Ra.

RSA exponentiation is a sequence of these commands. For example, the left-to-right binary method uses `MODMUL` followed by `STORE8` for each squaring and each multiplication. `tb_pld001` computes M^23 mod N this way. `tb_rsa768` runs a full 768-bit exponent: it first reduces the message with a `MODMUL` by 1, then needs 767 squarings and, for its random exponent, 380 multiplications. That comes to 3,427,946 cycles, or 0.137 s at 25 MHz. This is well inside the half second quoted for a 768-bit key exchange, which also covers work of the command level that is not part of this RTL.

## IDEA (`idea_ctrl`, `idea_keysched`, `idea_io`)

One transform takes 50 cycles: 8 rounds of 6 cycles each, then an output transform of 2 cycles. A round follows this schedule:

| step | ALU | alongside |
|---|---|---|
| 0 | T := I1·K1 (pair 0), I4·K4 (pair 1) | A1 := I2+K2, A2 := I3+K3 |
| 1 | M1, M2 reduced | |
| 2 | T := X1·K5 on both pairs, X1 = M1⊕A2 | |
| 3 | M3, and A3 = M3 + X2 with X2 = A1⊕M2 | |
| 4 | T := A3·K6 on both pairs | |
| 5 | M4, and A4 = M4 + M3 | next input = (M1⊕M4, A2⊕M4, A1⊕A4, M2⊕A4) |

The output transform is steps 0 and 1 with the last four subkeys:

    Y1 = I1·Z1,  Y2 = I3+Z2,  Y3 = I2+Z3,  Y4 = I4·Z4

It swaps the middle pair back, which every round had exchanged.

Round *r* reads its six subkeys from the RAM128 word at `key_base + r`. Subkey Zk sits in bits 16k−1..16k−16. Nine words make a key set, so RAM128 can hold several key sets.

- **Encryption keys.** `idea_keysched` expands a 128-bit key into the 52 subkeys and writes the nine words at `ks_base`. It rotates the key left by 25 bits after every 8 subkeys. It takes 52 cycles, and `done` pulses with the last write.
- **Decryption keys.** Decryption runs the same engine with `key_base` pointing at a decryption key set. That set needs multiplicative inverses mod 2^16+1 and additive inverses mod 2^16, and the long-number side computes both. The multiplicative inverse of x is x^65535 mod 65537, by Fermat's little theorem, with 0 standing for 2^16. It takes fifteen squarings and fifteen multiplications, each a `MODMUL` with Rc = 65537 and `cmd_len` = 1, because the multiplier fits in one 24-bit field. The additive inverse is the low 16 bits of `NEG`. Because the modulus's top word is zero, every trial of the binary search takes the full compare, so one `MODMUL` takes about 320 cycles. A whole decryption key set (18 inverses and 18 negations) takes 177,066 command cycles, about 7 ms at 25 MHz. Placing the 16-bit results into the key words is left to the host, and so is the choice of the sequence of commands. `tb_keyinv` runs all of this and then decrypts with the result.

`idea_io` double-buffers blocks in block encryption mode:

- The host writes four 16-bit words, X1 first.
- The transform starts by itself, and the input registers are free again at once.
- When it finishes, the result goes into the output registers and `idio_rdy` rises. The host reads Y1..Y4 with `io_rd`.

The next block can therefore be written while the current one is being encrypted. The engine accepts a new block in the last cycle of a transform (its `ready` output), so a continuous stream starts one block every 50 cycles with no gap. If the output registers are still unread when a new result arrives, the result waits in the engine. No new transform starts until the outputs have been read.

At 64 bits per 50 cycles the engine gives 32 Mbit/s at 25 MHz. `tb_idea_ctrl` and `tb_idea_io` check the 50-cycle spacing of a stream. `tb_idea_io` also runs the stream over a single shared bus where every read or write takes 4 cycles. That adds up to 4·4·2 = 32 bus cycles per block, which fits inside the transform, so the spacing stays at 50 cycles.

## Access rules and self-test

- With `wait_mode` high, every RAM word, RAM8 and ER can be read through `host_*`. This corresponds to the chip stopped by a WAIT command.
- Otherwise only registers R14 and R15 read back. Everything else reads as 0, so key material cannot leak.
- `selftest` hashes the state codes of the sequencer, the IDEA control, the I/O control and a status byte every cycle. Each goes into its own 8-bit MISR (x^8+x^4+x^3+x^2+1).
- After 255 states the four bytes are shifted into a 32-bit MISR using the CRC-32 polynomial. The result `st_sig` is visible only in `test_mode`.
- A controller that has been tampered with or is faulty goes through a different sequence of states and so produces a different signature.

## Not included

- **The microcode level.** This covers the command fetcher, the external code ROM and the decoder of the 32 high-level commands with their jump tables. Their instruction formats and programs are not available. The top module exposes the commands they would issue instead.
- **The built-in test PRNG.** Its structure is unknown.
- **Division support.** ER is said to help with right shifts in divide operations, but the divide operation itself is not described, so there is no right shift of ER and no divide command. The bit operations between ER and the index registers are built.
- **I/O transfer modes.** Byte-parallel and serial transfer, and the 4-cycle external bus operation, are not built. Only 16-bit word transfers exist.
- **Command programs.** Key inversion and operand reduction were microcode programs on the original chip. Here the host issues the same commands itself: `MODMUL` and `NEG` for key inversion, and `MODMUL` by 1 for reduction. It also moves the 16-bit inverses into the key words.

## Choices made in this RTL

The original description does not fix these points:

- the command and operation encodings (`pld_pkg`);
- the key-word layout;
- the signed carry representation;
- the handling of the zero subblock;
- the MISR polynomials;
- the digit numbering in ER;
- the arbitration between units sharing a RAM port.

For arbitration, RAM128 writes go to the key schedule first, then the sequencer, then the host. The read port belongs to the IDEA control in `mode_idea`, otherwise to the busy sequencer, then to an ER load, then to the host. Host commands should be issued only while the unit they use is idle.

Three points depart on purpose from the original description of the modular multiply:

- The original step list loads B into RAM8 and multiplies RAM8 by each digit. Here RAM8 holds the running sum instead, and B stays in RAM128. This follows the interleaved method the algorithm is built on, where the sum, not B, is shifted and reduced.
- The original negates C once before the loop. Here the ALU subtracts m·C by negating the product, which gives the same sum and leaves C unchanged.
- The multiply takes 2977 cycles rather than 2944, because of the 32 one-cycle ER loads and the done cycle.

## Files

- `rtl/pld_pkg.sv`: sizes, `F4`, command and index-operation enums.
- `rtl/alu24.sv`, `rtl/pld_alu.sv`: ALU.
- `rtl/pld_ram.sv`, `rtl/er_reg.sv`, `rtl/index_calc.sv`: storage and addressing.
- `rtl/alu_seq.sv`: long commands and modular multiply.
- `rtl/idea_ctrl.sv`, `rtl/idea_keysched.sv`, `rtl/idea_io.sv`: IDEA.
- `rtl/selftest.sv`: signature analysers.
- `rtl/pld001.sv`: top level.
- `tb/tb_<module>.sv`: one self-checking testbench per module, plus `tb/idea_ref_pkg.sv`, an independent IDEA reference model.
- `tb/tb_rsa768.sv`: a full 768-bit RSA exponentiation on the top level.
- `tb/tb_keyinv.sv`: IDEA decryption keys computed with the top level's integer commands.

The parameter `REG_WORDS_P` (default 8, giving 768 bits) sets the register length in 96-bit words.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Example with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/pld_pkg.sv tb/idea_ref_pkg.sv \
        rtl/*.sv tb/tb_pld001.sv --top-module tb_pld001
    ./obj_dir/Vtb_pld001

For a single block, list only the files it uses, for example:

    verilator --binary --timing --assert rtl/pld_pkg.sv tb/idea_ref_pkg.sv rtl/alu24.sv \
        rtl/pld_alu.sv rtl/pld_ram.sv rtl/idea_ctrl.sv tb/tb_idea_ctrl.sv --top-module tb_idea_ctrl

What the testbenches check:

- **`tb_idea_ctrl`**:
  - the published IDEA test vector: key 0001 0002 … 0008, plaintext 0000 0001 0002 0003 encrypts to 11FB ED2B 0198 6DE5;
  - random keys and blocks, plus their decryption;
  - the 50-cycle busy time, and a back-to-back stream with one result every 50 cycles.
- **`tb_alu_seq`**:
  - every long command against wide integer arithmetic;
  - modular multiplies of random 768-bit operands, including forced full compares, with their exact cycle counts;
  - the reduction A mod C as a multiply by 1, with A larger than C.
- **`tb_pld001`**, the whole chip at full size, in about ten seconds:
  - key schedule, IDEA streaming encryption and decryption, an RSA exponentiation, an ER load through an index register, `MULD`, the I/O-mode read protection and the self-test readout;
  - it counts how often each mechanism occurred: I/O overlapped with a transform, a result held for a slow reader, a block started right behind the previous one, a full compare, a mode switch.
- **`tb_rsa768`**, a 768-bit RSA exponentiation on the whole chip at full size, in a few seconds. It checks the accumulator every 96 exponent bits, the exact cycle count of every `MODMUL`, and the total time.
- **`tb_keyinv`**, IDEA key inversion on the whole chip at full size. It checks all 52 decryption subkeys against the reference model, including the inverse of a zero subkey, and then checks that blocks encrypted on the chip decrypt back to the plaintext with that key set.
