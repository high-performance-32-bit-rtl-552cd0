# A 32-bit AES-128 core for a wireless-router chip

This design encrypts and decrypts 128-bit blocks with AES-128. It is meant to
sit on a router chip, where a full 128-bit AES datapath costs too much area and
a byte-serial one is too slow. The state moves through the core one 32-bit
column per clock. One block takes 44 cycles, and encryption and decryption
share almost all of the hardware.

Four ideas keep the core small and keep the round loop at four cycles per round:

* **ShiftRows as a shift register.** The sixteen state bytes live in four
  byte-wide shift chains, one per state row. Those chains are also the
  pipeline. The row rotations of ShiftRows and InvShiftRows come from five
  8-bit 2:1 multiplexers and from letting some registers hold for a cycle.
  No separate 128-bit buffer is used.
* **One MixColumn for both directions.** InvMixColumn is computed as
  MixColumn followed by a small second stage. Encryption uses only the first
  part. Decryption uses both parts.
* **A falling-edge register between the two MixColumn parts.** This breaks
  the long combinational path but adds no cycle to the round loop.
* **Rcon without a table.** The round constant is a single register. It
  steps forward with xtime (multiply by {02}) and backward with inverse xtime
  (divide by {02}). The backward run gives the decryption order without
  storing ten constants.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It is written
for verilator and for yosys with the slang front end.

## Module map

```
aes_router_chip              bus-attached subsystem (top)
 ├─ aes_regfile              register map, bus decoding
 ├─ aes_mem_ctrl             moves blocks: input memory -> core -> output memory
 ├─ aes_dpram  (x2)          input and output buffer memories, 16 x 32 bit each
 └─ aes_core                 the AES engine, 44 cycles per block
     ├─ aes_shiftrows        reg1..reg16, ShiftRows / InvShiftRows, 4 stages
     ├─ aes_sbox32           4 x SubBytes + 4 x InvSubBytes on one column
     ├─ aes_mixcolumn        part 1, reg17..reg20 (falling edge), part 2
     └─ aes_key_expand       on-the-fly key schedule, one word per cycle
         ├─ aes_rcon         Rcon register, xtime / inverse xtime
         └─ aes_sbox32       the key schedule's own S-box column
aes_pkg                      types, xtime / inv_xtime, S-box table generation
```

A column is one 32-bit word. Row 0 is in bits [31:24] and row 3 in bits
[7:0]. A 128-bit block or key has column 0 in bits [127:96], which is the
byte order of FIPS-197.

## The round loop

```
 text ─⊕─┐                                       ┌──────────── loop ───────────────┐
  key ─┘ │ ld                                     │                                  │
         ▼                                        │                                  │
      ┌─mux─┐   reg1..reg16      S-boxes          │   part 1     reg17..20           │
 ─────┤     ├──► ShiftRows ──► Sub / InvSub ─(⊕ key: dec)─► MixColumn ─► (falling) ─┬─(⊕ key: enc)──┤
      └─────┘   (rising edge)                                  bypass in             │                │
                                                               last round            └─► part 2 ─(dec)┘
```

* **Encryption:** ShiftRows → SubBytes → MixColumn (part 1) → register →
  XOR the round key → back to the input.
* **Decryption:** InvShiftRows → InvSubBytes → XOR the round key → part 1
  → register → part 2 → back to the input. Together, part 1 and part 2 give
  InvMixColumn. This is the standard inverse cipher: AddRoundKey comes
  before InvMixColumn.
* **Last round:** a multiplexer bypasses part 1. When decrypting, part 2 is
  also skipped.

The only rising-edge registers in the loop are the four stages of the
shift-row chains. A column leaves reg13..reg16 and passes the S-box and
part 1 in the first half of the cycle. It reaches the input of reg1..reg4
again in the second half of the same cycle. So round *r+1* can take column *j*
exactly four cycles after round *r* took it, and a round lasts four cycles.

### Block schedule

Count the cycle after the start strobe as cycle 0.

| cycles | what happens | round key word on `word_o` |
|---|---|---|
| 0..3 | text column j ⊕ key word enters the chains (`ld`) | enc: w[0..3]; dec: round key 10 |
| 4r..4r+3, r = 1..9 | round r, column j = cycle mod 4 | enc: w[4r+j]; dec: round key 10−r |
| 40..43 | round 10 without MixColumn; result column j is on `dout_o` | enc: w[40..43]; dec: round key 0 |

That makes 4 + 10 × 4 = 44 cycles. The core raises `ready_o` again in
cycle 43, so queued blocks run every 44 cycles with no gap. At a clock *f*,
throughput is 128 bits × *f* / 44. At 114 MHz that is 331.6 Mbit/s. The
clock rate is a property of the target process, not of this RTL.

## ShiftRows in a shift register (`aes_shiftrows`)

This is the least obvious part. Each state row has a chain of four 8-bit
registers:

```
row 0: reg1 → reg5 → reg9  → reg13        plain 4-cycle delay
row 1: reg2 → reg6 → reg10 → reg14        mux after reg2, mux before reg14
row 2: reg3 → reg7 → reg11 → reg15        mux before reg11
row 3: reg4 → reg8 → reg12 → reg16        mux after reg4, mux before reg16
```

Column j of a state enters in phase j = 0..3. Row 0 then leaves in the same
order, four cycles later. The other rows must leave in rotated order, and they
get there by either waiting or taking a shortcut. Take a row whose bytes
x0..x3 enter in phases 0..3.

* **Rotate left by one** (row 1 when encrypting, row 3 when decrypting).
  Output x1 x2 x3 x0.
  * x0 stays in the first register (reg2 or reg4).
  * x1..x3 bypass that register through the mux, so they see only three
    stages.
  * At the next phase 0, x0 moves on, while the first register takes x0 of
    the next state.
* **Rotate right by one** (row 1 when decrypting, row 3 when encrypting).
  Output x3 x0 x1 x2.
  * In phase 3, x3 goes straight into the last register (reg14 or reg16).
  * During that same cycle the first three registers hold, so x0..x2 arrive
    one cycle late.
* **Rotate by two** (row 2, the same in both directions). Output
  x2 x3 x0 x1.
  * x0 and x1 stop in reg3 and reg7 during phases 2 and 3.
  * x2 and x3 go straight into reg11.

The result is that column j of the rotated state leaves reg13..reg16 four
cycles after column j of the input state entered. The direction can change
from one state to the next without disturbing the bytes still in flight
(`tb_aes_shiftrows` checks this). The chains need only the 2-bit column
phase and the mode. The phase is the low two bits of the block cycle counter.

## MixColumn and InvMixColumn (`aes_mixcolumn`)

Part 1 is the ordinary MixColumn. It uses one shared sum
t = a0⊕a1⊕a2⊕a3, and then for each byte:

    b_i = a_i ⊕ t ⊕ xtime(a_i ⊕ a_(i+1))        (= 2a_i + 3a_(i+1) + a_(i+2) + a_(i+3))

Part 2 uses a property of the matrices. The InvMixColumn matrix equals the
MixColumn matrix times circ(05, 00, 04, 00). Both matrices are circulant, so
the order of the two products does not matter. Multiplying by
circ(05, 00, 04, 00) needs only four xtime blocks:

    u = xtime(xtime(b0 ⊕ b2)):  c0 = b0 ⊕ u,  c2 = b2 ⊕ u
    v = xtime(xtime(b1 ⊕ b3)):  c1 = b1 ⊕ v,  c3 = b3 ⊕ v

The four 8-bit registers between the parts (reg17..reg20) capture on the
falling clock edge. Timing analysis must treat the loop as two half-cycle
paths:

* **First half:** reg13..16 → S-box → (key XOR) → part 1 → reg17..20.
* **Second half:** reg17..20 → key XOR or part 2 → input mux →
  reg1..4 / bypass paths.

The core depends on this mixed-edge timing by design.

## Key schedule (`aes_key_expand`, `aes_rcon`)

The round keys are never stored as a table. A 4-word shift register holds the
current round key. Each cycle, `word_o` (the word in position 0) is used by
the column being processed, and the next word is shifted in at the other end.

* **Forward (encryption):**
  w[i] = w[i−4] ⊕ w[i−1], or w[i−4] ⊕ SubWord(RotWord(w[i−1])) ⊕ Rcon when
  i mod 4 = 0.
* **Backward (decryption):**
  w[i−4] = w[i] ⊕ w[i−1], or w[i] ⊕ SubWord(RotWord(w[i+3] ⊕ w[i+2])) ⊕ Rcon
  for the first word of a round key. The backward step keeps the word just
  shifted out in one extra 32-bit register.

SubWord has its own 32-bit S-box, so the text and the key are substituted in
the same cycle.

Rcon is one 8-bit register. It is preset to 01 and advanced with xtime
(01, 02, … 80, 1b, 36). For decryption it is preset to 36 and stepped back
with inverse xtime:

    inv_xtime(b) = (b >> 1) ⊕ (b0 ? 8d : 00)

Decryption has to start from the last round key. After every key load the unit
spends 40 cycles running the schedule forward (`key_busy_o` is high), and it
keeps the result. Both the original key and this last round key stay in
128-bit registers, so a block in either direction can start at once. This
costs 256 flip-flops. A leaner variant would repeat the 40-cycle forward run
before each decryption.

## The subsystem (`aes_router_chip`)

The rest of the router (its controller and packet logic) is not part of this
RTL. It connects through a small synchronous register bus: word addresses,
one access per cycle, and read data with `rvalid_o` one cycle after `rd_i`.

| addr | name | write | read |
|---|---|---|---|
| 0 | CTRL | bit0 mode (1 = decrypt), bit1 load key (strobe), bit2 clear error flags (strobe) | bit0 mode |
| 1 | STATUS | – | bit0 key preparation busy, bit1 core busy, bit2 input overflow, bit3 output underflow, bit4 output stall, [15:8] input words, [23:16] output words |
| 2 | DATA | push a text word (column order) | pop a result word |
| 4..7 | KEY | key words 0..3 | key words 0..3 |

To load a key, write KEY0..KEY3, then write CTRL with bit1 set.

`aes_mem_ctrl` runs the two 16-word memories as FIFOs. It starts a block
only when all of these hold:

* the input memory holds a whole block (4 words);
* the output memory has room for one, counting results still in flight;
* the core is ready.

While the output memory is full, a waiting block stalls. The memory read is
registered, so the controller reads each column one cycle ahead of the core's
`din_req_o`. The block's mode is the CTRL mode bit at the moment the block
starts. Software that changes the mode should therefore wait until the
blocks already queued have started. A write to a full input memory is
dropped, and so is a read from an empty output memory; each sets a sticky
flag. `irq_o` is high while at least one whole result block is waiting.

### Core interface (`aes_core`)

| signal | timing |
|---|---|
| `key_load_i`, `key_i` | only between blocks (asserted); `key_busy_o` for 40 cycles |
| `start_i`, `dec_i` | accepted when `ready_o`; the next cycle is cycle 0 |
| `din_req_o` | cycles 0..3; `din_i` must carry text column 0..3 in that cycle |
| `dout_valid_o`, `dout_o` | cycles 40..43, column 0..3; `dout_o` settles after the falling edge and is sampled at the closing rising edge |
| `done_o` | cycle 43 |

## What is this design's own

These parts follow the architecture as described:

* the loop structure;
* the register layout of the shift-row chains and the number of
  multiplexers;
* the two-part MixColumn with the falling-edge register;
* the xtime / inverse-xtime Rcon;
* the placement of the three key XORs;
* the 44-cycle block.

These parts were filled in here because the architecture does not specify
them:

* the exact hold and bypass sequencing of the shift-row chains (derived from
  where each byte has to end up);
* the word-serial key schedule, and the storage of the original key and the
  last round key;
* the point where the decryption result is taken: the loop feedback point,
  which gives the same value in the same cycle as taking it before part 1;
* all interfaces, the reset (asynchronous, active low), the register map, the
  bus, the memory depth and the memory control;
* the S-box tables, which are computed at elaboration from the GF(2^8)
  definition (`aes_pkg::gen_sbox`) rather than typed in. The tables come from
  walking the multiplicative group with generator {03} while tracking the
  inverse, followed by the affine map s = q ⊕ rotl(q,1..4) ⊕ 63.

Only 128-bit keys are supported. Blocks do not overlap: the next block's load
could in principle share cycles 40..43 with the previous block's last round,
but the key schedule would then need a second word output.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model
`tb/aes_ref_pkg.sv` is independent of the RTL: it finds the S-box by
brute-force inversion and runs FIPS-197 round by round. The testbenches also
check the FIPS-197 example vectors directly.

| testbench | covers |
|---|---|
| `tb_aes_pkg` | xtime, inverse xtime, generated S-box tables |
| `tb_aes_sbox32` | all bytes in all lanes, both directions |
| `tb_aes_shiftrows` | 40 states back to back with random direction changes; 4-stage timing |
| `tb_aes_mixcolumn` | MixColumn, InvMixColumn, bypass, falling-edge capture |
| `tb_aes_rcon` | both sequences, hold, forward-then-backward |
| `tb_aes_key_expand` | word stream against the reference expansion both ways; 40-cycle preparation |
| `tb_aes_core` | FIPS-197 vectors, random back-to-back blocks in mixed modes; 44-cycle latency, no gap |
| `tb_aes_dpram` | random dual-port traffic, read timing |
| `tb_aes_regfile` | register map, strobes, read timing |
| `tb_aes_mem_ctrl` | stall, overflow, underflow, mode switch, back-to-back starts |
| `tb_aes_router_chip` | the whole subsystem through the bus at default parameters; counts each mechanism and fails if one never happened |

To run one, for example the full subsystem:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_router_chip.sv \
    --top-module tb_aes_router_chip -o sim
./obj_dir/sim
```

Each testbench runs in well under a second. For a lint check of a module:
`verilator --lint-only -Wall -y rtl rtl/aes_pkg.sv rtl/<module>.sv --top-module <module>`.
