# Time-shared SubBytes and MixColumns for AES-128

A small AES round stage that uses **one S-box and one MixColumns unit** for the
whole 128-bit state instead of sixteen S-boxes and four MixColumns units. The
state is fed through them one byte per clock, in sixteen time slots. Three ideas
make this cheap and fast:

* **ShiftRows disappears.** ShiftRows only moves bytes, and SubBytes works byte
  by byte, so the bytes can be moved *before* substitution: the Add Round Key
  output is wired out directly in ShiftRows order. No 128-bit register is needed
  between SubBytes and ShiftRows.
* **MixColumns works byte by byte.** Each S-box byte is taken once, multiplied
  in the same clock by the four matrix coefficients of its row, and XORed into
  four column accumulators. After four bytes a column is finished; the four
  columns of a state leave one after another.
* **The S-box is computed, not looked up.** It inverts in the composite field
  GF((2^4)^2), pipelined in two stages, shares the inverter between SubBytes and
  InvSubBytes, and XORs a fixed mask byte into every value it emits, so the
  plain table value never appears on its output.

The stage computes

    out_state = MixColumns(ShiftRows(SubBytes(state_in ^ round_key)))

which is the AddRoundKey of one AES round followed by SubBytes, ShiftRows and
MixColumns of the next. Round iteration, the final round (which has no
MixColumns) and the key schedule are **not** part of this RTL.

## Block diagram and dataflow

```
state_in, round_key (128 + 128)
        |
  ark_rearrange      XOR, bytes placed in ShiftRows order      (combinational)
        |
  time_slot_ctrl     holds the 128-bit state, slot counter 0..15
        |  slot ----------------------------------------------+
  byte_mux16         16:1, picks byte <slot>                  |
        |  8 bits                                             |
  sbox_cf            composite-field S-box, masked output     | slot rides along
        |  8 bits, 3 clocks later                             | as a tag
  mc_timeshare       4 accumulators, one column per 4 bytes <-+
        |  32-bit column, col_idx
  state_combiner     joins 4 columns
        |
out_state (128)
```

All modules are in `rtl/`, one per file; `aes_pkg` holds the shared types
and field helpers.

### Byte layout and slot order

A 128-bit block holds bytes b0..b15 with b0 in bits [127:120]. Byte bk is the
state element at row k mod 4, column k div 4, as in the AES standard. Slot k
feeds byte k of the *rearranged* state, so the S-box sees column 0 rows 0..3,
then column 1, and so on. Byte (row r, column c) of the rearranged state is
byte (row r, column (c + r) mod 4) of `state_in ^ round_key`. For the AES
standard example, the S-box therefore emits d4, bf, 5d, 30, e0, b4, ... which is
column 0 of the state after SubBytes and ShiftRows.

### Timing

One time slot is one clock. For a state accepted on clock edge 0:

| event | clock edge |
|---|---|
| byte k on the multiplexer output | after edge k (k = 0..15) |
| S-box result for byte k | edge k + 3 |
| `col_valid` for column c | edge 7 + 4c |
| `out_valid` with the whole state | edge 20 |

`in_ready` is high when the stage is idle and in slot 15, so a continuous
stream is accepted every 16 clocks with no empty slot. There is no
back-pressure on the output: `out_state` is valid for one clock with
`out_valid` and then holds its value until the next state completes, 16 clocks
later at full rate. Reset is asynchronous and active low.

## The composite-field S-box (`sbox_cf`)

A byte a of GF(2^8) (modulus x^8+x^4+x^3+x+1) is mapped by an 8x8 bit matrix to
ah·y + al, with ah and al in GF(2^4) (modulus x^4+x+1) and y^2 + y + λ = 0,
λ = {1110}. Its inverse is

    d      = λ·ah² ⊕ ah·al ⊕ al²          (in GF(2^4))
    a^-1   = (ah·d^-1)·y + (ah ⊕ al)·d^-1

so the only non-linear pieces are a 4-bit inverter and three 4-bit multipliers.

Pipeline:

1. input register (`din`, `inv`, valid, tag);
2. optional inverse affine map (InvSubBytes), the map into GF((2^4)^2), the
   products and squares forming d, and the 4-bit inversion; register d^-1,
   ah ⊕ al and ah;
3. the two output multipliers, the map back to GF(2^8), the affine map
   (SubBytes only), XOR with the mask; output register.

The output is `S(din) ^ MASK` (or `InvS(din) ^ MASK` with `inv = 1`) three
clocks after `din`. In the top, `inv` is tied to 0, because a forward MixColumns
follows. The field polynomials and λ follow the S-box design this stage is
modelled on. The two mapping matrices are the localparams `MAP_ROWS` and
`IMAP_ROWS` in `sbox_cf`. They were chosen for this RTL: they come from one root of x^4+x+1
and one root of y^2+y+λ inside GF(2^8). Any valid pair of roots gives the same
S-box.

### Masking, and why MixColumns can remove it

The mask is a single fixed byte, `MASK` (default `8'hA5`; the value is this
design's choice). MixColumns is linear, and a column of four equal bytes m maps
to itself, because 02 ⊕ 03 ⊕ 01 ⊕ 01 = 01. So `mc_timeshare` simply works on
masked bytes and XORs `MASK` into each byte of the finished column. Set
`MASK = 8'h00` to turn masking off. This is a fixed mask, not a randomised
masking scheme: it changes which values appear on the S-box output wires, and
nothing more.

## The time-shared MixColumns (`mc_timeshare`)

Byte s(r,c) contributes M[i][r]·s(r,c) to output row i, where M is the
MixColumns matrix with rows (02 03 01 01), (01 02 03 01), (01 01 02 03) and
(03 01 01 02). This gives M[i][r] = (02, 03, 01, 01)[(r − i) mod 4]. Per clock
the unit forms x, {02}x and {03}x once and routes them to the four
accumulators. A row-0 byte loads the accumulators; a row-3 byte completes the
column, which is registered with its column index (`slot[3:2]`) and unmasked.
Bytes of a column must arrive in row order. That is guaranteed by the slot
counter, and a new row-0 byte always restarts a column.

## Top level (`top_pipe`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (one time slot), asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | handshake on `state_in`, `round_key` |
| `state_in`, `round_key` | in | 128 | state before Add Round Key, and the round key |
| `col_valid`, `col_idx`, `col_out` | out | 1, 2, 32 | each finished column (row 0 in [31:24]) |
| `out_valid`, `out_state` | out | 1, 128 | finished state |

Parameter: `MASK` (byte, default `8'hA5`).

## Where this RTL follows its source and where it chooses

Taken from the architecture it implements:
* the rearranged Add Round Key (column c, row r from column (c + r) mod 4);
* the 16:1 multiplexer with a 4-bit, clock-driven select;
* one shared S-box and one shared MixColumns unit;
* the byte order implied by the first S-box outputs (d4, then bf);
* the composite-field S-box structure with λ = {1110} and two pipeline stages;
* sharing the inverter between SubBytes and InvSubBytes through an enable;
* a fixed XOR mask on the S-box values;
* MixColumns computed from each byte the moment it arrives.

Choices made here:
* the valid/ready handshake, the reset and the holding register for the state;
* the value of `MASK`, and removing the mask at the MixColumns output;
* the mapping matrices;
* the slot tag carried through the S-box pipeline;
* the column-stream port (the original shows four separate 32-bit MixColumns
  outputs);
* including Add Round Key with its own round-key input in the top. This makes
  the top 424 pins wide. Without the column port it would be 389 pins, which
  fits a 404-I/O package.

Departures worth knowing:
* The prose of the original architecture puts the pipeline register between the
  multiplicative inverse and the affine map, while its block diagram puts it
  directly after the 4-bit inversion. The RTL follows the diagram.
* The original waveform shows the first S-box result one slot after the start. Here the
  S-box has an input, a middle and an output register, so the first result
  comes three clocks after the first slot.
* The original FPGA implementation reports 176 storage elements. This RTL has 464
  flip-flop bits, mostly the 128-bit state holding register, the 128-bit output
  register and the 96-bit column buffer, which keep the stream free of bubbles
  and the output stable between states.

Not provided: iterating the ten AES rounds, the final round and the key
expansion. InvMixColumns and InvShiftRows are also missing, so the S-box's
inverse mode is usable on its own but not for decryption in this top.

## Verification

Each block has a self-checking testbench in `tb/`. Reference values come from
`tb/aes_ref_pkg.sv`, which computes the S-box by brute-force inversion in
GF(2^8) and MixColumns by the plain matrix product, independent of the RTL.

| testbench | what it checks |
|---|---|
| `tb_ark_rearrange` | standard example and 1000 random state/key pairs against XOR + ShiftRows |
| `tb_byte_mux16` | all 16 selects on 200 random states |
| `tb_time_slot_ctrl` | slot sequence, held state, `in_ready`, back-to-back and idle acceptance |
| `tb_sbox_cf` | all 256 bytes, forward, inverse and mixed per clock; mask and unmasked instance; 3-clock latency; tag |
| `tb_mc_timeshare` | 101 states with and without idle clocks, aborted column, column timing |
| `tb_state_combiner` | 200 states with random column spacing; output held between states |
| `tb_top_pipe` | standard AES-128 example (output 04 66 81 e5 e0 cb 19 9a 48 f8 d3 7a 28 06 26 4c, S-box bytes d4 and bf masked); 200 states back to back and 200 with gaps; every column and state checked, plus latency (7 + 4c and 20 clocks) and full-rate spacing of 16 clocks |
| `tb_aes128_rounds` | a whole AES-128 encryption: the stage does rounds 1 to 9 for three interleaved blocks, the testbench supplies the round keys and the final round; the standard example must give ciphertext 39 25 84 1d 02 dc 09 fb dc 11 85 97 19 6a 0b 32, and two random blocks must match a reference encryption |

`tb_top_pipe` runs the top at its default parameters. It counts back-to-back
acceptances, acceptances from idle, held-off offers, masked S-box bytes and
column outputs, and fails if any of them never happens.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_top_pipe.sv --top-module tb_top_pipe
./obj_dir/Vtb_top_pipe
```

Not verified: timing closure at a 5 ns slot clock, FPGA resource use, and
resistance to power analysis of the masked S-box.
