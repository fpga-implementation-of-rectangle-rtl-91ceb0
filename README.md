# RECTANGLE-80 encryption core

RECTANGLE is a lightweight block cipher built for bit-slicing: a 64-bit
block is treated as a 4 x 16 array of bits, and every operation works on
whole 16-bit rows or on 4-bit columns. This makes the hardware small and
regular. Sixteen identical 4-bit S-boxes work on the columns, and three
fixed row rotations do the permutation, so that layer is only wiring.

This RTL is a round-iterative RECTANGLE encryption core with an 80-bit key.
It has a 64-bit datapath and computes one full round per clock. A 64-bit
plaintext and an 80-bit key are loaded in one cycle. The 64-bit ciphertext
is ready 25 clock cycles later. The design holds exactly 149 flip-flops:

- 64 for the cipher state;
- 80 for the key state;
- 5 for the round-constant LFSR, which is also the round counter.

The core encrypts only. It has no decryption and no 128-bit-key variant.

## The 4 x 16 bit array

It is easiest to follow the design once the bit numbering is clear.

| array row | state bits (`plaintext`) | key bits (`key`) |
|-----------|--------------------------|------------------|
| row 0     | 15 .. 0                  | 15 .. 0          |
| row 1     | 31 .. 16                 | 31 .. 16         |
| row 2     | 47 .. 32                 | 47 .. 32         |
| row 3     | 63 .. 48                 | 63 .. 48         |
| row 4     | -                        | 79 .. 64         |

- Within a row, bit `j` is column `j`. Column 0 is the rightmost column and
  column 15 the leftmost.
- A column is the 4-bit value `{row3[j], row2[j], row1[j], row0[j]}`. Row 0
  is its least significant bit.
- "Left rotation" means moving bits towards higher column numbers.

In the RTL both arrays are packed arrays of 16-bit rows (`state_t`,
`key_t` in `rectangle_pkg`). So `state[r][c]` is row `r`, column `c`, and
the flat 64-bit or 80-bit word is exactly the port value.

The round subkey is the top four rows of the key state, which is key
bits 63..0.

## One round

Each clock cycle, when the core is not loading, it computes:

1. **AddRoundKey.** XOR the 64-bit state with the subkey (key bits 63..0).
2. **SubColumn.** Pass each of the 16 columns through the S-box, all 16 in
   parallel.
3. **ShiftRow.** Rotate row 1 left by 1, row 2 left by 12 and row 3 left
   by 13. Row 0 stays where it is.

The S-box is the RECTANGLE 4-bit S-box:

    in : 0 1 2 3 4 5 6 7 8 9 A B C D E F
    out: 6 5 C A 1 E 7 9 B 0 3 D 8 F 4 2

`rectangle_sbox` does not use a lookup table. It computes the S-box with the
cipher's 12-operation bit-sliced sequence. Here `X0..X3` are the input bits
(row 0 to row 3) and `Y0..Y3` are the output bits:

    T1 = ~X1        T2 = X0 & T1    T3 = X2 ^ X3    Y0 = T2 ^ T3
    T5 = X3 | T1    T6 = X0 ^ T5    Y1 = X2 ^ T6    T8 = X1 ^ X2
    T9 = T3 & T6    Y3 = T8 ^ T9    T11 = Y0 | T8   Y2 = T6 ^ T11

The testbench checks this sequence against the table for all 16 inputs.

After 25 rounds, one more AddRoundKey with the 26th subkey `K25` gives the
ciphertext. The core has no separate stage for this step. The AddRoundKey
XOR already sits at the register output. Its value is brought out as
`ciphertext` directly, and after round 25 the key register holds `K25`.
While `done` is high, `ciphertext` is therefore the result. At other times
`ciphertext` shows intermediate values and should be ignored.

## Key schedule

The key schedule runs in parallel with the rounds, one step per clock
(`rectangle_key_update`). Each step does three things:

1. **S-boxes.** The four rightmost columns (0..3) of rows 0..3 go through
   four S-boxes. Row 4 and columns 4..15 are unchanged.
2. **Feistel step on the rows.** The rows are mixed as follows (`<<<` is
   left rotation within 16 bits):

       row0' = (row0 <<< 8)  ^ row1
       row1' = row2
       row2' = row3
       row3' = (row3 <<< 12) ^ row4
       row4' = row0

3. **Round constant.** The 5-bit round constant `RC_i` is XORed into bits
   4..0 of the new row 0.

There are two descriptions of this step that disagree. In one, `row3'` is
formed from `row0 <<< 12`. In the other, the datapath drawing, it comes from
`row3 <<< 12`. This design uses `row3 <<< 12`, for two reasons:

- It is the standard RECTANGLE key schedule.
- It reproduces the reference ciphertext of the published implementation,
  listed below.

The `row0` version gives a different cipher.

## Round constants and completion

`rectangle_round_counter` is a 5-bit LFSR. Its update is

    (rc4, rc3, rc2, rc1, rc0) -> (rc3, rc2, rc1, rc0, rc4 ^ rc2)

Starting from `0x01`, it steps through the 25 round constants:

    01 02 04 09 12 05 0B 16 0C 19 13 07 0F 1F 1E 1C 18 11 03 06 0D 1B 17 0E 1D

The next value, `0x1A`, is not one of these constants. The core uses it as
the "finished" state:

- `done` is simply `rc == 0x1A`, so no separate counter is needed.
- This keeps the register count at 149.
- When `done` is high, the LFSR, the state register and the key register
  all hold their values until the next load.

## Interface and timing

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | clock; all registers use its rising edge |
| `load`       | in  | 1     | Read/Iteration select. At 1, capture `plaintext` and `key` and restart from round 0. At 0, iterate |
| `plaintext`  | in  | 64    | block to encrypt, sampled only on a load edge |
| `key`        | in  | 80    | key, sampled only on a load edge |
| `ciphertext` | out | 64    | result, valid while `done` is 1 |
| `done`       | out | 1     | 25 rounds completed |

The sequence of one encryption:

    edge 0      : load=1  -> state <= plaintext, key <= key, rc <= 0x01
    edges 1..25 : load=0  -> one round and one key-schedule step per edge
    after edge 25          done = 1, ciphertext valid, everything holds
    next load              starts a new encryption (also legal mid-run)

The timing in numbers:

- Latency is 25 clock cycles from the load edge to `done`.
- A new block can be loaded on the cycle after `done` rises, so
  throughput is one 64-bit block per 26 cycles.
- There is no reset input. The first load initialises every register. Until
  then, `done` and `ciphertext` are meaningless.
- The core has 211 pins: 1 + 1 + 64 + 80 + 64 + 1.

## Known-answer vectors

The core gives these results:

| plaintext          | key                    | ciphertext         |
|--------------------|------------------------|--------------------|
| `0000000000000000` | `00000000000000000000` | `0874e8b1e3542d96` |
| `ffffffffffffffff` | `00000000000000000000` | `4b123cd03f482fd5` |
| `0000000012153524` | `ffffffffffffc0895e81` | `ba682b7526516f3d` |

- Row 1 is the standard RECTANGLE-80 all-zero vector. It is usually printed
  with row 0 first, as `2D96E354E8B10874`: the same four 16-bit words in
  reverse order.
- Row 2 matches the ciphertext shown in the simulation results of the
  published FPGA implementation.
- For row 3, that publication shows different ciphertext values. Its
  waveform has `done` low at the point where they are read, so they cannot
  be taken as a final result. The testbench checks this vector only against
  the reference model.

## Design choices and departures

- **Datapath width.** The implementation also describes a 16-bit-at-a-time
  variant of the round (16 state bits XORed with the key per cycle, four
  S-boxes). That variant conflicts with the main datapath (all 64 bits, 16
  S-boxes, one round per clock) and with the reported 149 registers, so it is
  not built here.
- **Rotations.** "Shift" in the round and the key schedule is read as
  rotation.
- **Hold after completion.** Freezing the registers once `done` is high is
  this design's own choice. It keeps `ciphertext` stable.
- **Load polarity and name.** `load = 1` means Read. The polarity and the
  port name are this design's own choices.
- **Reported results.** The reference implementation was reported on a
  Cyclone IV E FPGA:
  - 259 logic elements;
  - 149 registers;
  - 211 pins;
  - up to 150 MHz.

  The register and pin counts match this RTL exactly. The logic-element
  count and clock rate depend on the FPGA tools and have not been reproduced.

## Modules

| file | contents |
|------|----------|
| `rtl/rectangle_pkg.sv` | row and array types, sizes, `RC_INIT`, `RC_DONE`, 16-bit rotate |
| `rtl/rectangle_sbox.sv` | bit-sliced 4-bit S-box |
| `rtl/rectangle_sub_column.sv` | S-boxes on columns `0..NCOLS-1` (16 for the round, 4 for the key schedule) |
| `rtl/rectangle_shift_row.sv` | row rotations 0/1/12/13 |
| `rtl/rectangle_round_transform.sv` | AddRoundKey + SubColumn + ShiftRow, plus the whitened output |
| `rtl/rectangle_key_update.sv` | one key-schedule step |
| `rtl/rectangle_round_counter.sv` | round-constant LFSR and `done` |
| `rtl/rectangle_load_register.sv` | register behind the Read/Iteration 2:1 multiplexer, `WIDTH` bits |
| `rtl/rectangle_top.sv` | the core |

Everything except the two registers and the LFSR is combinational. The
longest path runs from the registers through the AddRoundKey XOR, one
S-box (at most five operations deep) and the load multiplexer back to the
state register. The key-schedule path (S-box, two XORs, multiplexer) is
about as long.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. The testbenches compare against
`tb/rectangle_ref_pkg.sv`, a reference model written independently of the
RTL:

- it works on flat vectors with explicit bit-index arithmetic;
- it uses the S-box lookup table instead of the Boolean sequence;
- it uses the listed round constants instead of an LFSR.

What each testbench covers:

- **`tb_rectangle_top`:** the two fixed vectors above, 200 random
  encryptions and 5 restarts in the middle of a run. For every encryption
  it checks that `done` rises exactly 25 cycles after the load, and that the
  result holds afterwards. It counts how many times load, iteration, hold
  and restart each happen, and counts a failure if any of them never does.
  It runs at the core's default configuration.
- **`tb_rectangle_round_counter`:** all 25 round constants, the position of
  `done`, holding after completion, and restart.
- **Other testbenches:** each one checks its module against the reference
  model with exhaustive, walking-one or random inputs.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/rectangle_pkg.sv tb/rectangle_ref_pkg.sv tb/tb_rectangle_top.sv \
        --top-module tb_rectangle_top
    ./obj_dir/Vtb_rectangle_top

Replace `tb_rectangle_top` with any other testbench name to run that one.
Each testbench finishes in well under a second.
