# Small-area AES-128 co-processor for low-frequency RFID tags

A passive tag running at 125 kHz has a few hundred clocks to answer a
reader and a power budget of microamps, so this AES-128 core trades speed for
area: the State lives in a 4x4 array of byte registers, and instead of
sixteen column mixers and a full round of S-boxes it has **four S-boxes and
one MixColumn unit**, through which the State is *shifted*. Round keys are
computed on the fly, one per clock, and the key schedule borrows the same four
S-boxes when the State is not using them. An encryption takes 93 clocks and
a decryption 103 clocks (0.74 ms and 0.82 ms at 125 kHz).

The target figures of the original ASIC are about 7,200 gate equivalents in
0.13 µm CMOS, 6 µA at 1.5 V and 125 kHz, and 130 Mbit/s at the maximum clock.
None of those can be checked from RTL. What this RTL does reproduce is the
architecture, the six-state controller and the cycle counts.

## Block structure

```
              +--------------------- aes_top ----------------------+
 start,dcryp->|  aes_control --load_din,shf_h,shf_v,add_k,sub_k,--> |
 din -------->|     |          msel,dcryp,state_word                |
              |     |                         data_unit             |
              |     +--load_key,en,dcryp,rcon--> key_gen            |
 key -------->|-------------------------------> key_gen             |
              |  key_gen --round key (128)------> data_unit          |
              |  key_gen --RotWord (32)---------> data_unit S-boxes  |
              |  data_unit --SubWord (32)-------> key_gen            |
 dout <-------|  data_unit State                                    |
 done <-------|  aes_control                                        |
              +-----------------------------------------------------+
```

| Module        | Role |
|---------------|------|
| `aes_pkg`     | Shared types, controller state encoding, GF(2^8) helpers (`xtime`, `gf_mul`, `rcon`), cycle budgets |
| `aes_top`     | Wires the three units together |
| `aes_control` | Six-state sequencer: IDLE, LOAD, ADD_RKEY, SUBBYTE_SHFROW, MIXCOL, DONE |
| `data_unit`   | 16 `data_cell`s, 4 `sbox`es, 1 `mcol`, and the shift paths between them |
| `data_cell`   | One State byte: load from the right, load from above, or XOR the key byte |
| `sbox`        | Forward/inverse S-box computed as a field inverse plus affine transform, no table |
| `mcol`        | MixColumn / InvMixColumn of one column, built from multiply-by-2 stages |
| `key_gen`     | Four 32-bit key registers stepping one round forward or backward per clock |

## How the State moves

Cell (r, c) holds State byte s[r][c]. Byte k of a 128-bit block (bit 127
down) is s[k mod 4][k div 4], as in FIPS-197, for din, dout and the key.
Each clock the Data Unit does at most one of four things:

* **Load** (`shf_h`, `load_din`): every row shifts one cell left and the
  right column takes the 32-bit word `state_in`. Four clocks load a block.
  The first word sent (din[127:96]) ends in column 0.
* **MixColumn** (`shf_h`, not `load_din`): column 0 goes through `mcol`, the
  mixed column enters column 3 and the rest shift left. After four clocks
  every column has been mixed once and is back where it started.
* **SubByte + ShiftRow** (`shf_v`): rows shift down. Row 3 passes through
  the four S-boxes and re-enters at row 0. On the way in it is rotated by
  `msel` (row 0 cell c takes S-box output (c + msel) mod 4). In clock k
  (k = 0..3) the row in row 3 is original row 3 − k. The controller
  sets `msel` to that row's ShiftRow amount: 3 − k to the left when
  encrypting, 3 − k to the right (as the left rotation k + 1) when
  decrypting. After four clocks every row has been substituted and rotated
  once and sits in its own place again.
* **AddRoundKey** (`add_k`): every cell XORs its byte of the current round
  key. Cell (r, c) takes key bits [127 − 8(4c + r) −: 8].

Because SubBytes works byte by byte, doing ShiftRows as each row comes back
in gives the same result as ShiftRows followed by SubBytes.

## Round schedule and cycle budget

```
encrypt: LOAD(4)  ADD  9 x [SUB(4) MIX(4) ADD]  SUB(4) ADD  DONE
decrypt: LOAD(14) ADD  SUB(4) ADD  9 x [MIX(4) SUB(4) ADD]  DONE
```

Decryption uses the standard inverse cipher order: the initial AddRoundKey
uses key 10, and each later round is InvShiftRows/InvSubBytes, then
AddRoundKey, then InvMixColumns. A normal round is 9 clocks. The core is
idle for one clock when start is first seen and shows done one clock after
the last AddRoundKey. Counting both of those clocks:

| | IDLE | LOAD | rounds | DONE | total |
|---|---|---|---|---|---|
| encrypt | 1 | 4  | ADD 1 + 9 x 9 + SUB 4 + ADD 1 = 87 | 1 | **93** |
| decrypt | 1 | 14 | ADD 1 + SUB 4 + ADD 1 + 9 x 9 = 87 | 1 | **103** |

The decryption LOAD is longer because the key generator has to reach round
key 10 before the first AddRoundKey. It loads the cipher key in LOAD
clocks 0–2 and steps forward in clocks 3–12 (ten steps, using the S-boxes,
which loading does not need). In clock 13 it switches to backward mode.

## Round keys and the shared S-boxes

`key_gen` holds the current round key in W0..W3. One enabled clock moves it
one round:

* forward: w0' = W0 ^ SubWord(RotWord(W3)) ^ Rcon, then
  w1' = W1 ^ w0', w2' = W2 ^ w1', w3' = W3 ^ w2'.
* backward: w3' = W3 ^ W2, w2' = W2 ^ W1, w1' = W1 ^ W0, then
  w0' = W0 ^ SubWord(RotWord(w3')) ^ Rcon.

`key_gen` has no S-box of its own. It sends the rotated word out on
`key_sub_out`, the Data Unit passes it through its four S-boxes when `sub_k`
is high, and the result comes back on `key_sub_in` in the same clock. The
S-boxes always run forward for the key, even while decrypting. The controller
supplies Rcon from the round counter: RC[i] is {02} raised to the power i−1,
giving 01, 02, 04, 08, 10, 20, 40, 80, 1b, 36.

The key step must therefore fall in a clock where the State is not
shifting through the S-boxes. Normally that is the first MIXCOL clock. Two
rounds have no MIXCOL between the key's last use and its next one: the last
encryption round, and the first round after the initial AddRoundKey when
decrypting. For these two, the step is taken in the ADD_RKEY clock before
them. In that clock the S-boxes are idle, and the data cells capture
State ^ old key at the same edge at which the key registers move on. The
order is unusual but correct, and it leaves every cycle count unchanged.
Assertions in `aes_control` and `data_unit` check that `sub_k` and `shf_v`
are never high together, and that at most one State operation runs per
clock.

## S-box and MixColumn arithmetic

`sbox` places one multiplicative-inverse unit between two 2:1 multiplexers.
Encryption: inverse, then the affine transform (b_i = a_i ^ a_{i+4} ^ a_{i+5}
^ a_{i+6} ^ a_{i+7} ^ 0x63_i). Decryption: inverse affine transform (b_i =
a_{i+2} ^ a_{i+5} ^ a_{i+7} ^ 0x05_i), then the inverse. The inverse is
computed as a^254 = a^240 · a^14, which maps 0 to 0 as AES requires. It uses
squarings and a few general multiplications (`gf_mul` in `aes_pkg`). This
inversion circuit is one correct choice, not an area-optimised one. A
composite-field (GF((2^4)^2)) inverter would be smaller, and could replace it
behind the same ports.

`mcol` builds every constant product from `xtime` (multiply by {02}: a
one-bit left shift plus three XORs), x4 = xtime(x2) and x8 = xtime(x4):
{03} = x2^s, {09} = x8^s, {0b} = x8^x2^s, {0d} = x8^x4^s, {0e} = x8^x4^x2.
The unit is combinational and handles one column per clock.

## Interface and timing

| Port | Dir | Width | |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `reset` | in | 1 | synchronous, active high; returns the controller to IDLE |
| `dcryp` | in | 1 | 0 encrypt, 1 decrypt; latched when start is accepted |
| `start` | in | 1 | raise and **hold** until done |
| `din` | in | 128 | plain or cipher text; read during the 4 load clocks |
| `key` | in | 128 | cipher key (also for decryption); read during LOAD |
| `dout` | out | 128 | the State; the result is valid while done is high |
| `done` | out | 1 | high from the end of processing until start is dropped |

Hold din and key stable from the clock start is raised until LOAD ends
(4 clocks for encryption, 14 for decryption). After that they may change.
When start drops in DONE, the core returns to IDLE on the next clock.
The data and key registers have no reset, because every operation loads them
first. Only the controller is reset.

## Where this RTL goes its own way

* **Two key steps are moved** from SUBBYTE_SHFROW into the preceding
  ADD_RKEY clock, as described above, to avoid an S-box conflict.
* The controller **does not register `din`, `key` or `dout`**. The key goes
  straight to `key_gen`, and `dout` is the Data Unit's State.
* The **inversion circuit inside `sbox`** is a plain exponentiation (see
  above).
* The **start/done handshake**, reset polarity, the msel encoding, the
  data-cell priority, and latching `dcryp` at start are choices made here.
* The original tag also has an 8-bit microcontroller that runs AES in
  software. Its instruction set is proprietary and undescribed, so it is not
  part of this RTL. That includes the proposed `mix` instruction, which would
  reuse `mcol`.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. `aes_ref_pkg` is an
independent software AES: a carry-less multiply, an S-box found by exhaustive
inverse search, and a byte-array cipher.

* `sbox_tb`: all 256 inputs in both directions, plus literal table entries.
* `mcol_tb`: known columns, 500 random columns in both directions,
  round trip.
* `data_cell_tb`: 1000 random operations.
* `key_gen_tb`: ten forward and ten backward steps for 21 keys. Every round
  key is checked, including the FIPS-197 last round key of 2b7e…4f3c.
* `data_unit_tb`: full encryption and decryption schedules driven operation
  by operation, with the whole State checked after each one. Also checks the
  FIPS-197 C.1 ciphertext, the four-clock duration of SUB, the `sout` of
  every MixColumn clock, and the key S-box path.
* `aes_control_tb`: the state sequence clock by clock, the load columns, the
  ShiftRow rotations, the Rcon sequence and key direction, the 93/103-clock
  latencies, the done handshake, and reset during an operation.
* `aes_top_tb`: the whole core at its only configuration. It runs the
  FIPS-197 Appendix B and C.1 vectors, then 40 random keys × (encrypt,
  decrypt the result, decrypt random data), all against the reference. It
  checks both latencies, that dout holds while start is high, and reset in
  mid-operation. It also counts every mechanism (loads, decryption key
  pre-run, AddRoundKey, shift-down, shift-left, forward and backward key
  steps, key steps inside ADD_RKEY) and fails if any never ran.

All pass. The top-level run takes well under a second.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/aes_top_tb.sv --top-module aes_top_tb
./obj_dir/Vaes_top_tb
```

Replace `aes_top_tb` with any other testbench name to run that block alone.
The RTL has no parameters. The design is fixed at AES-128; the key width,
10 rounds and Rcon sequence live in `aes_pkg`.
