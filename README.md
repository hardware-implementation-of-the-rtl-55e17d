# Salsa20 and Phelix stream-cipher cores

This is synthesizable SystemVerilog for two eSTREAM stream ciphers. Both are
built only from 32-bit additions, XORs and fixed rotations. There is one
**Phelix** core and four **Salsa20** cores. The four Salsa20 cores trade area
for speed in different ways:

| core | module | idea | cost per 512-bit block |
|---|---|---|---|
| compact ASIC | `salsa20_compact` | one sequential quarterround; two 16-word memories | 1157 cycles |
| basic iterative ASIC | `salsa20_iterative` | four quarterrounds in parallel, then a transpose | 40 cycles |
| fast ASIC | `salsa20_fast` | 20 pipeline stages, one round each | 1 block per cycle |
| compact FPGA | `salsa20_fpga` | block RAMs, one shared adder, microprogrammed controller | 1362 cycles |
| Phelix compact ASIC | `phelix_compact` | one H function shared by key set-up and encryption | 26 cycles per 32-bit word |

The five cores do not depend on each other. `salsa20_phelix_top` puts them
side by side on one clock and reset. Each core keeps its own ports, prefixed
`cs_`, `it_`, `fs_`, `fp_` and `ph_`.

All cores use one clock and a synchronous, active-high reset `rst`. They
follow a published architecture study of the two ciphers: its block
diagrams, block names, memory sizes and cycle counts. Where that study is
silent, this design makes its own choices. Those choices are listed near
the end of this file and in each file's header comment.

## Salsa20 in one page

A Salsa20 block is a 4×4 matrix of 32-bit words. Here it is a 512-bit vector
with word *i* in bits `32i+31:32i`. With a 128-bit key the input matrix is:

```
 c0  k0  k1  k2        c = "expand 16-byte k"
 k3  c1  n0  n1        k = key, n = nonce (64 bit)
 b0  b1  c2  k0        b = block counter (64 bit)
 k1  k2  k3  c3
```

The **quarterround** maps four words (y0, y1, y2, y3) to (z0, z1, z2, z3):

```
z1 = y1 ^ ((y0 + y3) <<< 7)     z2 = y2 ^ ((z1 + y0) <<< 9)
z3 = y3 ^ ((z2 + z1) <<< 13)    z0 = y0 ^ ((z3 + z2) <<< 18)
```

A **column round** applies it to the four columns. Each column starts at its
diagonal word and walks down: (0,4,8,12), (5,9,13,1), (10,14,2,6),
(15,3,7,11). A **row round** does the same along the rows: (0,1,2,3),
(5,6,7,4), (10,11,8,9), (15,12,13,14). There are 20 rounds, column and row
alternating. The output is the final matrix plus the input matrix, word by
word: the feed-forward addition.

**The transpose trick.** A row round is a column round applied to the
transposed matrix. The iterative and pipelined cores therefore contain only
column-round hardware and transpose the matrix between rounds. After 20
transposes the matrix is back in its original orientation, so the
feed-forward needs no correction. `salsa20_pkg` holds `column_round`,
`transpose` and the group index functions (`col_idx`, `row_idx`, `grp_idx`)
that the other cores use.

## Compact ASIC Salsa20 (`salsa20_compact`)

This core uses five blocks:

- **`salsa20_qr_seq`**: one quarterround unit. It has four registers, one
  adder with a 4:1 operand multiplexer on each input, a 4:1 multiplexer
  choosing the rotation, and one XOR. Each step computes one output word
  and writes it back to its register, in the order z1, z2, z3, z0.
- **Mem0**: a `salsa20_cmem` instance holding the working matrix.
- **Mem1**: a second `salsa20_cmem` instance holding the untouched input.
- **`salsa20_compact_ctrl`**: the controller.
- **Output adder**: one 32-bit adder on the two memories' single-word
  outputs.

The quarterround unit runs at half the system rate because it is much faster
than the memory. Here this is a clock enable (`qr_ce`) that toggles every
cycle, not a second clock.

`salsa20_cmem` has four access modes, selected when `start` is high:

| mode | effect |
|---|---|
| `load_all` | write the 128-bit `din` into row `addr[1:0]` and rewind the serial pointer |
| `we` | write `din` into quarterround group `addr`: 0–3 are columns, 4–7 rows |
| `serial` | `dout_single <= word[ptr]`, then increment `ptr` |
| none | read group `addr` onto `dout` |

Every access completes one cycle later and `done` pulses.

The controller runs one block in three phases:

1. **Load.** Four `din_valid`/`din_ready` beats, one 128-bit row each (word
   4r in the low bits). Each row goes into both memories.
2. **Rounds.** 80 operations. Each reads a group, starts the quarterround,
   waits for `quarter_done` and writes the group back. Even rounds use
   groups 0–3, odd rounds groups 4–7.
3. **Output.** 16 serial reads of both memories. `ks_valid` marks each sum,
   word 0 first. `done` follows the last word.

## Basic iterative ASIC Salsa20 (`salsa20_iterative`)

The datapath (`salsa20_round`) is four combinational quarterrounds. A counter
and a comparator against 40 control it:

- Odd cycles apply the column round.
- Even cycles transpose the matrix.
- The start cycle already performs the first column round.
- On the 40th cycle the comparator's `equal` output loads the keystream
  register with the final matrix plus the input, and raises `ready`.

`keystream` is the whole 512-bit block.

## Fast pipelined ASIC Salsa20 (`salsa20_fast`)

Salsa20 blocks are independent, so the rounds unroll into a pipeline:

- `STAGES` (default 20) registered stages, each a column round followed by a
  transpose.
- The input matrix travels down the pipeline beside the working matrix.
- A final registered stage does the feed-forward addition.
- Throughput is one block per clock. Latency is `STAGES + 1` cycles.

A smaller `STAGES` that divides 20 packs 20/`STAGES` rounds into each stage.
Throughput stays one block per clock, with a longer combinational path.

## Compact FPGA Salsa20 (`salsa20_fpga`, `salsa20_ucode_ctrl`, `salsa20_ucode_pkg`)

This core is the hardest to follow because the control lives in a
microprogram.

**Datapath.** Everything shares one 32-bit adder:

- A 4:1 input multiplexer picks a constant from a four-word ROM, a key/IV
  word, or the result register.
- Its output feeds two 32-word × 32-bit RAMs with registered reads, like FPGA
  block RAMs.
- Two operand registers (`reg_a` from RAM0, `reg_b` from RAM1) feed the
  adder.
- A rotation multiplexer and an XOR with RAM1's read data feed the result
  register. The adder also feeds the keystream register.

**Address map.** Both RAMs hold the working matrix at addresses 0–15, so two
operands can be read per cycle. RAM1 also keeps the original matrix at 16–31
for the feed-forward.

**Controller.** An FSM and a micro-program counter address a ROM. The
addressed word is loaded into an instruction register, whose fields drive the
datapath for that cycle.

**Microinstruction fields** (`uinst_t`):

| field | meaning |
|---|---|
| `src`, `idx` | input-multiplexer source and which constant or key/IV word |
| `a0`, `a1`, `we0`, `we1` | RAM addresses and write enables |
| `ld_a`, `ld_b` | load the operand registers |
| `ld_res`, `rsel` | load the result register with `((a+b) <<< r) ^ RAM1`, r = 7, 9, 13 or 18 for rsel = 0..3 |
| `ld_ks` | load the keystream register with `a+b` |
| `loop_end`, `halt` | sequencing flags |

**Program.** `ucode()` computes it, so the ROM is fixed at elaboration:

| addresses | part |
|---|---|
| 0–31 | load: write each matrix word to RAM0[w] and RAM1[w], then to RAM1[16+w] |
| 32–159 | one double round: 8 quarterrounds × 4 steps × 4 cycles |
| 160–207 | output: read RAM0[w] and RAM1[16+w], load operands, add into the keystream register |
| 208 | halt |

A quarterround step z_b = y_b ^ ((y_a + y_c) <<< r) takes four cycles:

1. Read y_a and y_c.
2. Load the operand registers and read y_b.
3. Compute into the result register.
4. Write z_b into both RAMs.

The FSM watches the word it is fetching. At `loop_end` it jumps back to
address 32 until the loop has run 10 times.

**Timing.** One run issues 1361 words. A block takes 1362 cycles from `start`
to `done`. `ks_valid` pulses every three cycles during the output phase, and
the last pulse coincides with `done`.

## Phelix compact ASIC (`phelix_compact`)

Phelix keeps a state of five words. Each encrypted 32-bit word costs two
calls of the half-block function **H**(w0..w4, K0, K1). H has ten lines; each
line updates one word with an add or an XOR and rotates another word. Four
old state words take part in the output.

This core has one H unit, `phelix_h_func`. It runs one line per cycle, 10
cycles per call, and every part of the core shares it.

**Set-up after `start`:**

1. `phelix_n_expand` turns the 128-bit nonce N0..N3 into eight words, with
   N_j = (j mod 4) − N_(j−4) for j = 4..7.
2. `phelix_key_mix` turns the key, zero-padded to 32 bytes, into the 256-bit
   working key. The padded key gives K32..K39. For k = 7 down to 0:

   ```
   (K_4k .. K_4k+3) = H(K_4k+4 .. K_4k+7, len+64; K0 = K1 = 0)[w0..w3]
                      ^ (K_4k+8 .. K_4k+11)
   ```

   K0..K7 is the working key. This takes eight H calls through the shared
   unit.
3. `phelix_ini_dp` forms the initial state K3^N0, K4^N1, K5^N2, K6^N3, K7.
4. Eight initialisation blocks i = −8..−1 run with zero plaintext, and their
   keystream is discarded. `phelix_counter` is a 64-bit counter cleared to
   −8. Then `ready` rises.

**Each block i.** The core waits for one plaintext word
(`pt_valid`/`pt_ready`), then:

1. `phelix_subkey_gen` makes the two subkeys X_i,0 and X_i,1:
   - X_i,0 = K_(i mod 8)
   - X_i,1 = K_((i+4) mod 8) + N_(i mod 8) + X'_i + i + 8
   - X'_i is 4·len when i mod 4 = 1, bits 62:31 of i when i mod 4 = 3, and
     0 otherwise.
2. H(Z, 0, X_i,0) gives Y.
3. The keystream word is Y.w4 plus the w4 of the state that entered block
   i−4. `phelix_fifo`, a four-entry FIFO, holds those old words; each block
   pops the oldest and pushes its own input w4.
4. H(Y, plaintext, X_i,1) gives the next state.

`keystream` and `ct = pt ^ keystream` come with `ks_valid`, 13 cycles after
the plaintext is accepted. A block takes 26 cycles. `start` is accepted in
any state and begins a new key and nonce.

## How far to trust it

**Salsa20.** All four cores are checked against a reference model that is
written independently of the RTL. They are also checked against a
known-answer block computed separately from the cipher definition, and
against the two quarterround examples in the Salsa20 specification.

**Phelix.** The H function follows the cipher definition exactly. The other
Phelix details — nonce expansion, key mixing, subkeys, initial state and the
keystream rule — follow the Phelix specification as recalled. The testbench
model uses the same equations. No published Phelix test vector was available
to check against. Treat the Phelix key schedule as unverified against the
official cipher until it is run against official vectors. The Phelix
message authentication code (tag generation at the end of a message) is
not built.

**Performance against the published figures** (cycles from simulation; the
published figures give rates, not cycle counts):

| core | this design | published |
|---|---|---|
| compact ASIC Salsa20 | 1157 cycles, 110 Mbit/s at 250 MHz | 71.2 Mbit/s |
| basic iterative Salsa20 | 40 cycles, the published count | 255 Mbit/s |
| fast Salsa20 | one block per clock | 4.8 Gbit/s (9.4 MHz would be enough) |
| compact FPGA Salsa20 | 38 Mbit/s needs about 101 MHz; four memories (two RAMs, microprogram ROM, constant ROM) | 38 Mbit/s, 194 slices + 4 block RAMs |
| Phelix | 176 Mbit/s at a 7 ns clock | 260 Mbit/s |

**Choices this design made where the source is silent:**

- Every handshake: `din_valid`/`din_ready`, `pt_valid`/`pt_ready`, and the
  start/done pulses.
- The memory access modes and the one-cycle memory latency.
- The clock enable in place of a divided clock.
- One H line per cycle.
- The microinstruction format and program.
- RAM depth 32 on the FPGA core, to keep the original matrix.
- Salsa20 inputs: the ASIC cores take the ready-made 16-word input matrix
  (see `salsa20_pkg::input_matrix`). The FPGA core builds it from key,
  nonce and counter.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/salsa20_pkg.sv rtl/salsa20_ucode_pkg.sv rtl/phelix_pkg.sv \
  tb/salsa20_ref_pkg.sv tb/phelix_ref_pkg.sv tb/tb_salsa20_phelix_top.sv \
  --top-module tb_salsa20_phelix_top --Mdir obj
obj/Vtb_salsa20_phelix_top
```

Swap in any other `tb/tb_<module>.sv` to test one module.

`tb_salsa20_phelix_top` runs all five cores at once at their default sizes
and checks every output word. It also fails if any of these never happens:

- a quarterround run or half-rate step (compact)
- a transpose (iterative)
- a full pipeline (fast)
- a microcode loop jump (FPGA)
- a key-mixing H call, a discarded initialisation block, a FIFO push-with-pop
  or a plaintext stall (Phelix)

It takes a few seconds. `tb_cipher_throughput` runs each core on back-to-back
work and checks the steady-state cycle counts quoted above (1157, 40, 1,
1362 and 26), printing the resulting rates.

## Files

- `rtl/salsa20_pkg.sv`: Salsa20 types, quarterround, index and matrix
  functions.
- `rtl/salsa20_qr_seq.sv`, `rtl/salsa20_cmem.sv`,
  `rtl/salsa20_compact_ctrl.sv`, `rtl/salsa20_compact.sv`: compact ASIC
  core.
- `rtl/salsa20_round.sv`, `rtl/salsa20_iterative.sv`: iterative core.
- `rtl/salsa20_fast.sv`: pipelined core.
- `rtl/salsa20_ucode_pkg.sv`, `rtl/salsa20_ucode_ctrl.sv`,
  `rtl/salsa20_fpga.sv`: FPGA core.
- `rtl/phelix_pkg.sv`, `rtl/phelix_h_func.sv`, `rtl/phelix_n_expand.sv`,
  `rtl/phelix_key_mix.sv`, `rtl/phelix_subkey_gen.sv`,
  `rtl/phelix_counter.sv`, `rtl/phelix_ini_dp.sv`, `rtl/phelix_fifo.sv`,
  `rtl/phelix_compact.sv`: Phelix core.
- `rtl/salsa20_phelix_top.sv`: the five cores side by side.
- `tb/`: one testbench per module plus the reference models
  `salsa20_ref_pkg` and `phelix_ref_pkg`.
