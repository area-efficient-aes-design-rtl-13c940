# nano-AES: an 8-bit AES-128 encryption core for area-constrained devices

This is a small AES-128 encryption core for sensor nodes and microcontroller-class chips.
Area matters more than speed there. The core encrypts a 16-byte block in 334 clock cycles
and moves one byte per cycle through a single 8-bit datapath. It saves area in four ways:

* **Shift-Rows costs no logic.** The 16-byte state is a byte-wide shift register, and
  Shift-Rows is extra wiring plus a 2:1 mux in front of twelve of its bytes. It takes
  one clock cycle.
* **One S-box for everything.** A single combinational S-box serves the state bytes and
  the key expansion. It is built with composite-field arithmetic, not a 256-entry table.
  A mapping into GF(((2²)²)²) is followed by an inversion there. A final 8×8 XOR network
  ("gamma") then does two jobs at once: it maps back to GF(2⁸) and applies the AES affine
  transform.
* **Column-serial Mix-Columns.** Four byte registers collect one column, and a single
  output equation produces its four result bytes one per cycle.
* **On-the-fly key expansion.** The round key is expanded one byte per cycle, in step with
  Add-Round-Key. No round keys are stored: the 16-byte key register always holds the round
  key in use.

The register groups of the state register change only in certain phases, and each group
gets its clock through its own clock gate. The global `EN` input freezes the whole core.

Encryption only. There is no decryption mode and no AES-192/256.

## Interface and timing (`nano_aes`)

| port | dir | width | meaning |
|---|---|---|---|
| `CLK`, `RSTn` | in | 1 | clock; asynchronous active-low reset |
| `EN` | in | 1 | enable; while low the core holds every register |
| `Kin`, `Krdy` | in | 128, 1 | key and its strobe |
| `Kvld` | out | 1 | one-cycle pulse after a key was taken |
| `Din`, `Drdy` | in | 128, 1 | plaintext and its start strobe |
| `BSY` | out | 1 | encryption in progress |
| `Dout`, `Dvld` | out | 128, 1 | ciphertext and its one-cycle valid pulse |
| `sel` | out | 1 | high while the key expansion is using the shared S-box |

Byte 0 of a block or key is bits 127:120, as in FIPS-197.

* **Key.** `Krdy` is honoured only while `BSY` is low. `Kin` is copied into a 128-bit
  holding register, and `Kvld` pulses in the next cycle. The held key is reloaded into
  the core at the start of every block, so one `Krdy` serves any number of blocks.
* **Data.** `Drdy` while idle starts an encryption. The core reads `Din` one byte per
  cycle during the 16 cycles after the start edge, so `Din` must stay stable for those
  cycles. An assertion in `aes_composite_enc` checks this.
* **Result.** `BSY` is high for 334 cycles. On the 334th clock edge after the one that
  sampled `Drdy`, `BSY` falls and `Dvld` rises for one cycle. `Dout` is the state
  register itself, so it holds the ciphertext until the next `Drdy`.
* **Ignored strobes.** `Drdy` and `Krdy` are ignored while busy.
* **Stalls.** Each cycle with `EN` low stretches the run by one cycle and changes nothing.

## The byte schedule

### Register layout and control word

Everything is organised around the state register `RS0..RS15` (`aes_state_register`).
Byte `RS(4c+r)` is row `r` of column `c`: `RS0..RS3` is the first column and
`RS12..RS15` the last. The datapath only ever writes into `RS15`. The only byte it ever
reads is `RS0`.

Four control signals `{CS3,CS2,CS1,CS0}` select what the register does in a cycle:

| CS3..CS0 | mode | effect |
|---|---|---|
| `1111` | shift all | `RS(i) <- RS(i+1)`, `RS15 <- din` |
| `1100` | Shift-Rows | row `r` rotates left by `r` columns. Row 0 (`RS0,RS4,RS8,RS12`) holds |
| `1110` | store column | only the last column shifts (`RS12 <- RS13 <- RS14 <- RS15 <- din`) |
| other | hold | nothing changes |

### One encryption

The byte written into `RS15` is always "something XOR a round-key byte". That "something"
depends on the phase:

| phase | cycles | state register | into `RS15` |
|---|---|---|---|
| LOAD | 16 | shift all | `Din` byte *i* ⊕ key byte *i* (first Add-Round-Key done while loading) |
| *rounds 1–9:* SROWS | 1 | Shift-Rows | – |
| FEED (×4 columns) | 4 | shift all: `RS0..RS3` leave through the S-box into `RM0..RM3` | don't care |
| STORE (×4 columns) | 4 | store column | Mix-Columns byte ⊕ new round-key byte |
| *round 10:* SROWS | 1 | Shift-Rows | – |
| KPRE | 4 | hold: the S-box computes the key word's SubWord into `RM0..RM3` | – |
| LAST | 16 | shift all: `RS0` goes through the S-box | S-box byte ⊕ new round-key byte |

This gives 16 + 9·33 + 21 = **334 cycles** per block. Round 1 is complete 49 cycles after
the start edge, and each later round 33 cycles after the previous one.

### Why feed and store put the column back in place

During one FEED/STORE pair the whole state moves one column towards `RS0`.

1. **FEED.** For four cycles the state shifts as a whole. Column 0 leaves through `RS0`, row
   0 first, into the Mix-Columns registers. Columns 1–3 move down to positions 0–2.
2. **STORE.** For four cycles only the last column shifts. The four result bytes enter at
   `RS15`, so they end in `RS12..RS15` in row order.

After four such pairs every column has been processed and has moved all the way round.
Column 0's results are back in `RS0..RS3`. No separate Shift-Rows or column buffer exists.

### Mix-Columns (`aes_mixcolumns`)

`RM0..RM3` is a 4-byte shift register. Every cycle it outputs
`mc_out = 2·RM0 ⊕ 3·RM1 ⊕ RM2 ⊕ RM3`. During FEED the S-box output is shifted in at
`RM3`. During STORE the registers rotate. Rotating makes the same equation produce output
rows 0, 1, 2, 3 in turn.

## Key expansion and sharing the S-box

The key register `K0..K15` (`aes_key_register`) is a second byte shift register. It
shifts only in cycles that use a round-key byte: the 16 LOAD cycles, the 16 STORE cycles
of a round, and the 16 LAST cycles. In each of those cycles it computes new key byte *i*
of the next round key:

```
new_i = K0 ^ ( i < 4 ? SubWord(RotWord(w3))_i ^ (i == 0 ? rcon : 0)
             :         K12 )
```

`new_i` is used for Add-Round-Key in the same cycle and is written back into `K15`. This
works because of the order in which bytes move through the register:

* Old byte *i* is always in `K0` when it is needed.
* New byte *i−4* has moved down to exactly `K12` four shifts after it was written.
* For the first word, the RotWord bytes 13, 14, 15, 12 of the old key are found at
  `K13, K13, K13, K9` while the register is mid-update.

The round constant comes from `aes_rcon`, an 8-bit register that starts at `01` and is
multiplied by *x* after each round. Its output is gated, so it is added only to byte 0.

**Rounds 1–9.** SubWord needs the S-box four times per round. In these rounds the S-box is
idle during STORE, because the state bytes then come from Mix-Columns, not from the S-box.
So the key uses the S-box in the four STORE cycles of column 0, and `sel` is high in those
cycles.

**Round 10.** In the last round every state cycle needs the S-box. The control unit
therefore inserts KPRE: four cycles with the state held. In them the S-box computes the
four SubWord bytes into `RM0..RM3`, which the last round does not otherwise need. LAST then
takes those bytes from `RM0` as `RM` rotates. This costs 4 cycles per block and no extra
registers.

Because the key register ends a block holding round key 10, the cipher key is reloaded from
the holding register in `nano_aes` at every start.

## The composite-field S-box (`aes_sbox`, `aes_gamma`)

`S(a) = gamma( inv( delta(a) ) )`:

1. **`delta` (8×8 over GF(2)).** Maps `a` into GF(((2²)²)²). The result `q = qH·y + qL`
   has two 4-bit halves. The fields are:
   * GF(2²) with `x²+x+1`;
   * GF((2²)²) with `y²+y+φ`, where `φ = {10}`;
   * the top extension with constant `λ = {1100}`.

   The rows of `delta`, output bit 7 first:
   `q7=a7^a5`, `q6=a7^a6^a4^a3^a2^a1`, `q5=a7^a5^a3^a2`, `q4=a7^a5^a3^a2^a1`,
   `q3=a7^a6^a2^a1`, `q2=a7^a4^a3^a2^a1`, `q1=a6^a4^a1`, `q0=a6^a1^a0`.
2. **Inversion.** `d = λ·qH² ⊕ qH·qL ⊕ qL²`. The inverse is
   `(qH·d⁻¹)·y + (qH⊕qL)·d⁻¹`. The 4-bit inverse `d⁻¹` is computed as `d¹⁴`. The GF helper
   functions are in `aes_pkg`.
3. **`gamma`.** This is `AT × delta⁻¹`, followed by XOR with `63h`. Here `delta⁻¹` is the
   inverse mapping and `AT` the AES affine matrix, so one XOR network replaces two:

   ```
   g7 = x7^x3^x2            g3 = x2^x1^x0
   g6 = ~(x7^x6^x5^x4)      g2 = x6^x5^x4^x3^x2^x0
   g5 = ~(x7^x2)            g1 = ~(x7^x0)
   g4 = x7^x4^x1^x0         g0 = ~(x7^x6^x2^x1^x0)
   ```

`aes_gamma` builds these eight bits from seven shared XOR terms, 16 gates in all.

The two matrices and gamma were checked exhaustively: together they give the AES S-box
for all 256 inputs. The testbenches repeat that check in simulation.

## Clock gating and `EN`

The state register's 16 bytes fall into four groups by the modes in which they change:

* row 0 of columns 0–2 (shift-all only);
* rows 1–3 of columns 0–2 (shift-all and Shift-Rows);
* `RS12` (shift-all and store);
* `RS13..RS15` (all three modes).

Each group is clocked through its own clock gate (`aes_clock_gate`: a latch that is
transparent while the clock is low, then an AND). The gate's enable is decoded from `CS`.
A group that keeps its value gets no clock edge at all. In a STORE cycle 12 of the 16
bytes are unclocked, in a Shift-Rows cycle 4 are, and in KPRE or an `EN` stall all 16
are. The other registers (key, Mix-Columns, control) use ordinary clock enables, which a
synthesis clock-gating pass can convert in the same way.

The group enables come from registered control signals and settle long before the next
rising edge. That is the timing a clock gate needs. For static timing, constrain the four
gated clocks as generated clocks of `CLK`. In simulation the reset must have a real
falling edge: a register that holds gets no clock, so only the edge of the asynchronous
reset clears it.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | shared types, control codes, cycle constants, GF helper functions |
| `rtl/nano_aes.sv` | top: key holding register, `Kvld`, core instance |
| `rtl/aes_composite_enc.sv` | the 8-bit core: datapath muxes and XORs, instances of all blocks |
| `rtl/aes_control.sv` | phase/counter FSM, CS codes and every select |
| `rtl/aes_state_register.sv` | `RS0..RS15` with Shift-Rows wiring and four clock-gated groups |
| `rtl/aes_clock_gate.sv` | latch-based clock gate |
| `rtl/aes_key_register.sv` | `K0..K15` and its taps |
| `rtl/aes_sbox.sv`, `rtl/aes_gamma.sv` | composite-field S-box |
| `rtl/aes_mixcolumns.sv` | `RM0..RM3` and the column equation |
| `rtl/aes_rcon.sv` | round constants |
| `tb/aes_ref_pkg.sv` | independent AES-128 reference model for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

After synthesis to generic cells the core has 310 flip-flops:

* 128 in the state register;
* 128 in the key register;
* 32 in Mix-Columns;
* 8 in the round-constant register;
* 14 in the control unit.

The top adds the 128-bit key holding register and `Kvld`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog fails it if the
run hangs. For example, the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_nano_aes.sv --top-module tb_nano_aes -o sim
./obj_dir/sim
```

What the testbenches establish:

* **`tb_nano_aes`** (full design, default configuration) checks:
  * the FIPS-197 C.1 vector;
  * nine random blocks under three keys, with the key reused across blocks;
  * the `Kvld` pulse;
  * `Drdy`/`Krdy` ignored while busy;
  * random `EN` stalls.

  It counts each mechanism: Shift-Rows, Mix-Columns stores, last-round bytes, key use of
  the S-box, clock-gated cycles, stalls, ignored strobes and key reuse. It fails if any
  of them never happens.
* **`tb_aes_composite_enc`** checks both FIPS-197 vectors and random blocks. It compares
  the state with the reference model at fixed cycles: after the load, after the first
  Shift-Rows, after the first stored column, and after every round (cycle 16 + 33·r). It
  also checks the 334-cycle latency and the one-cycle `Dvld`.
* **The block testbenches**:
  * the S-box and gamma exhaustively, against a brute-force GF(2⁸) inverse plus affine map
    and against the matrix product;
  * Mix-Columns against the reference column transform;
  * the clock gate with an enable that moves in both clock phases (no glitches, no
    lost pulses);
  * the state and key registers against byte-array models under random control;
  * the control unit's cycle counts, and the cycle positions of the round constant and of
    key use of the S-box.

## What follows the published architecture, and what is this design's own

This RTL implements a published 8-bit "nano-AES" architecture. The following are taken
from it:

* the state register of 16 byte registers, fed at `RS15` and shifting towards `RS0`;
* Shift-Rows wired into that register;
* the four control signals and their three working codes;
* the schedule: 16 load cycles, one Shift-Rows cycle, four columns of 4 feed plus 4
  store cycles, so round 1 ends 49 cycles after the start;
* the `delta` matrix and the `gamma` equations of the S-box;
* clock gating as the power technique;
* the port names of the top level.

The architecture describes, but this RTL does not build:

* **Decryption.** The register would shift in the opposite direction for decryption,
  but the rest of that datapath is not described. Only encryption is provided.
* **A 16-cycle last round.** The last round takes 21 cycles here, not 16, because of
  the KPRE phase described below.

The points below are this design's own. Change them freely:

* **First Add-Round-Key merged with loading.** The first Add-Round-Key happens while the
  plaintext loads, so the first Shift-Rows comes 16 cycles after the start.
* **KPRE phase.** The 4-cycle KPRE phase in the last round is how the single S-box is
  shared there. A variant that stores the SubWord bytes earlier would save the 4 cycles
  but need more registers.
* **Unused control codes.** The handling of CS codes other than the three working ones
  (they hold) is this design's.
* **Parallel result.** The ciphertext is read in parallel from the state register. The
  datapath has no byte-wide output port.
* **Top-level protocol.** Key holding register, idle-only `Krdy`, `Kvld` one cycle after
  `Krdy`, `Dout` taken straight from the state register, and `sel` as the S-box select.
* **Reset.** Asynchronous active-low reset of every register to zero; the round-constant
  register resets to `01`.
* **S-box inverter.** The GF(2⁴) inverter is written as an exponentiation. A hand-built
  gate-level inverter would be smaller.
* **Gamma network.** The gamma network is written with the published gate budget of 12
  two-input XOR, 3 XNOR and 1 NOT gate. The particular sharing of sub-terms is this
  design's, not a copy of the published wiring.
* **Clock-gate placement.** The clock-gate groups, and the use of gates only on the state
  register, are this design's. The published gate network was not reproduced.
