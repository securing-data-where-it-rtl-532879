# Secbit: encrypting DRAM contents inside the DRAM

Memory encryption is normally done by a crypto engine that sits between the processor
and the memory: every word has to be read out through a narrow (8-bit) data path,
encrypted and written back. This design does the opposite. It adds a few special rows and
wordlines to each DRAM subarray so that the array itself can copy, invert, AND and OR
*whole rows* of 8192 bits in a handful of activate/precharge cycles, and then runs the
SIMON-32/64 block cipher as a program of such row operations. Because a row operation
works on every bitline at once, one run encrypts 8192 blocks side by side, and the data
never leaves the array.

The RTL is a cycle-level digital model of such a DRAM (1 Gb: 8 banks x 32 subarrays x
512 rows x 8192 bits, 8-bit data path) together with the controller logic that drives it.

## The extra rows

Every subarray gets five application-specific rows next to its ordinary rows. All cells
of a column share one bitline and one sense amplifier.

| row | wordlines | special connection | role |
|-----|-----------|--------------------|------|
| SR  | SX        | none               | first operand / scratch |
| TR  | TX        | none               | second operand / scratch |
| AR  | AX, AP    | AP ties the cell to ground | third cell of an AND |
| OR  | OX, OP    | OP ties the cell to VDD    | third cell of an OR |
| IR  | IX, IP    | IP ties the cell to the complementary bitline | inversion |

The physics the model reproduces:

* **Row copy.** Raise the source wordline, fire the sense amplifiers (the bitlines go to
  full swing), then raise the destination wordline: the destination cells are written
  with the sensed value. Then precharge. Time: 2 tRAS + tRP.
* **Inversion.** Same as a copy, but the destination is IR reached through IP, which
  hangs on the complementary bitline, so IR receives the inverse.
* **AND / OR by triple activation.** With SR = a, TR = b and AR discharged (AP), raising
  SX, TX and AX together makes each bitline settle to the majority of three cells,
  maj(a, b, 0) = a & b. With OR charged (OP) instead, maj(a, b, 1) = a | b. The sense
  amplifiers then write the result back into all three rows.

`secbit_subarray` models this at the level of commands: `SA_ACT` raises a set of
wordlines, `SA_SENSE` resolves each bitline to the majority of the connected cells (IR via
IP counted inverted) and writes it back to them, a wordline raised while the amplifiers are
on copies the bitline into its cells, `SA_PRE` lowers everything. AP and OP are pulses
that force AR to 0 or OR to 1 and win over a bitline connection of the same cell.
Sensing an even number of cells is an error (assertion), since a bitline could stay at
VDD/2.

## Row operations

`secbit_rowop_ctrl` is the memory-controller extension. It takes one operation at a time
and emits the command sequence, built from steps of 2 tRAS + tRP cycles (activate source,
sense one cycle later, activate destination at tRAS, precharge at 2 tRAS). Defaults are
tRAS = 3 and tRP = 2 cycles, i.e. 30 ns and 20 ns at a 10 ns clock, which gives an 80 ns
row copy and a 110 ns row clear.

| op | meaning | steps | cycles |
|----|---------|-------|--------|
| RCP a,b | b <- a | copy | 8 |
| RIV a | IR <- ~a | copy to IP | 8 |
| RAN a,b | SR,TR,AR <- a & b | SR<-a; TR<-b with AP; SX+TX+AX | 24 |
| ROR a,b | SR,TR,OR <- a \| b | SR<-a; TR<-b with OP; SX+TX+OX | 24 |
| RXR a,b | SR,TR,OR <- a ^ b | 11 steps, below | 88 |
| RCL a | a <- 0 | AP pulse (tRAS); copy AR to a | 11 |
| RST a | a <- 1 | OP pulse (tRAS); copy OR to a | 11 |

There is no direct XOR. RXR computes (~a & b) | (a & ~b) with the rows alone:
IR <- ~a, SR <- IR, TR <- b while AR is cleared, triple activation (~a & b), OR <- AR;
IR <- ~b, SR <- IR, TR <- a while AR is cleared, triple activation (a & ~b);
TR <- OR while OR is set to 1, and a final triple activation of SR, TR and OR.
The sources a and b are left intact. The step lists live in `secbit_pkg::rop_phase`.

`op_ready` is high in an operation's last cycle, so a stream of operations has no gaps.

## SIMON-32/64 as a row program

SIMON has no additions, only AND, XOR and rotations, which is why it fits. A round is

    x' = y ^ ((x <<< 1) & (x <<< 8)) ^ (x <<< 2) ^ k,   y' = x

Rotations are impossible on rows, so the cipher is bit-sliced: a group of 32 rows holds
the state, one 32-bit block per column. Row base+i holds bit 15-i of the left word, row
base+16+i bit 15-i of the right word. With that ordering, bit i of x <<< j is row
(i + j) mod 16, so a rotation is just a different row index.

`simon_bitslice_seq` issues, for each output bit i of a round (T_i is one of 16 temporary
rows, K a key row):

    RCL or RST  K               K <- the round key's bit as an all-0/all-1 row
    RAN  L(i+1), L(i+8)         RCP  AR -> T_i
    RXR  T_i, L(i+2)            RCP  OR -> T_i
    RXR  T_i, R(i)              RCP  OR -> T_i
    RXR  T_i, K                 RCP  OR -> T_i

and after all 16 bits copies T_0..T_15 over the right word. The new left word now sits
where the right word was, so the next round simply swaps which half is "left"; after 32
rounds everything is back in place. Setting K with RCL or RST for every bit, whatever the
key bit, keeps the run time independent of the key. The round keys stay inside the
engine; they never appear in the array except as those all-0/all-1 rows.

Decryption runs the same program with the halves swapped and the round keys in reverse
order, which inverts a Feistel cipher.

Cost per output bit: 11 + 24 + 4 x 8 + 3 x 88 = 331 cycles; per round 16 x 331 + 16 x 8 =
5424; for 32 rounds 173568 cycles (1.74 ms at 10 ns), plus 3 cycles of start and done
handshake. That covers 8192 blocks (256 Kb) per bank, and all banks can run at once.

### Row layout of a subarray (defaults)

| rows | use |
|------|-----|
| 0 .. 479 | data: 15 groups of 32 rows (any 32-row window below 495 can be used) |
| 495 | key row (`KEY_ROW`) |
| 496 .. 511 | temporary rows T_0..T_15 (`TEMP_BASE`) |

17 of 512 rows are reserved, and 15 rows below the key row do not fill a whole group,
so about 94 % of the array can be encrypted in place.

## The device: banks and the host port

`secbit_bank` holds 32 subarrays. The upper 5 bits of a 14-bit row address are the
subarray ID; each subarray compares it with its own number and ignores commands meant for
another, so only one subarray per bank works at a time. Reads return through a mux
selected by the subarray of the last read.

`secbit_dram` (the top) gives each of the 8 banks its own row controller and SIMON
program. A single host port (`h_valid`/`h_ready`) carries:

| `h_op` | action |
|--------|--------|
| `H_ACT` | open row `h_row` of bank `h_bank` (activate, then sense: port busy 2 cycles) |
| `H_RD` / `H_WR` | move the 8-bit word `h_col` of the open row; read data on `h_rdata` with `h_rvalid` one cycle later |
| `H_PRE` | close the row |
| `H_ROWOP` | run `h_rowop` (operation + two rows local to subarray `h_row[13:9]`) |
| `H_ENC` / `H_DEC` | encrypt / decrypt the 32-row group starting at `h_row` |
| `H_KEY` | write round key `h_key` at index `h_key_idx` into the bank's key store |

While a bank's engine runs, the array belongs to it; a host command to that bank is held
off (`h_ready` low) until the bank is free. Other banks keep serving the host and can run
their own jobs at the same time. `bank_busy` shows which banks are working, and
`bank_done` pulses when a job ends.

## Where this RTL departs from, or adds to, the source design

* **Digital model of an analog array.** Charge sharing and sense amplification are
  reduced to "majority of the connected cells"; there is no analog timing inside the
  model, the controller enforces tRAS/tRP by waiting. The analog cell, the sense
  amplifier and the pads are not modelled.
* **Timing.** tRAS/tRP in cycles and the 10 ns clock are this design's choice, fitted
  to the 80 ns row copy and 110 ns row clear. RXR, done step by step as its recipe
  prescribes, costs 11 steps (880 ns). A simpler accounting of 640 ns per XOR gives the
  1.31 ms per group often quoted for this scheme; this RTL takes 1.74 ms, also because
  it spends 110 ns per output bit to write the key row.
* **Key row.** One extra reserved row (495) carries the key bit; the key schedule is not
  implemented: round keys are loaded precomputed through `H_KEY`.
* **Own choices:** the host command set and encodings, the two-cycle activate, per-bank
  key stores, the stall rule, the decryption mode, the placement of the reserved rows,
  and that AP/OP override a bitline connection of the same cell (needed where OR is both
  the copy source and being charged).
* **Full-memory encryption** is done group by group by the host issuing `H_ENC` per
  group; there is no automatic sweep over a whole bank.

## Files

| file | content |
|------|---------|
| `rtl/secbit_pkg.sv` | types (wordline sets, commands, row operands, operations) and the step lists of every row operation |
| `rtl/secbit_subarray.sv` | subarray with the five extra rows |
| `rtl/secbit_rowop_ctrl.sv` | row-operation sequencer |
| `rtl/simon_bitslice_seq.sv` | SIMON-32/64 row program and key store |
| `rtl/secbit_bank.sv` | 32 subarrays with ID compare |
| `rtl/secbit_dram.sv` | top: 8 banks, engines, host port |
| `tb/simon_ref_pkg.sv` | word-level SIMON-32/64 reference with key schedule |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself (with a watchdog).
With Verilator 5, from the project root:

    verilator --binary --timing --assert --top-module tb_secbit_dram \
        rtl/secbit_pkg.sv tb/simon_ref_pkg.sv rtl/secbit_subarray.sv rtl/secbit_bank.sv \
        rtl/secbit_rowop_ctrl.sv rtl/simon_bitslice_seq.sv rtl/secbit_dram.sv \
        tb/tb_secbit_dram.sv -o sim
    obj_dir/sim

The two packages must come first. Swap the
testbench name for `tb_secbit_subarray`, `tb_secbit_bank`, `tb_secbit_rowop_ctrl` or
`tb_simon_bitslice_seq` to test a single block.

What the testbenches check:

* `tb_secbit_subarray`: column write/read, copy, inversion via IP, AND/OR by triple
  activation, majority of three rows, AP/OP, untouched rows.
* `tb_secbit_rowop_ctrl`: every row operation on random rows against bitwise results, and
  the cycle count of each (8/24/88/11).
* `tb_simon_bitslice_seq`: 32 blocks encrypted in a 64-row x 32-bit subarray, compared with
  the word-level reference and the published test vector (key 1918 1110 0908 0100,
  plaintext 6565 6877, ciphertext c69b e9bb); decryption back to plaintext; exact run
  length 173571 cycles.
* `tb_secbit_bank`: subarray isolation and the read path.
* `tb_secbit_dram`: the whole device at 2 banks x 2 subarrays x 64 rows x 32 bits with
  the full cipher: two banks encrypting in parallel, a host access stalled by a busy
  bank, decryption, host row operations back to back; each of these is counted and must
  occur.
* `tb_secbit_dram_mid`: the same sequence with full-size subarrays (512 rows x 8192 bits,
  8192 blocks per group) in 2 banks x 2 subarrays; about 8 s of simulation after a build
  of a minute or two. This is the largest configuration verified end to end. The full
  default device (8 banks x 32 subarrays, 1 Gb of cells) compiles and lints, but Verilator
  expands the array once per subarray instance: its build takes about 18 minutes and
  12 GB, and a full encryption run takes well over ten minutes more, so no testbench at
  the full default size is included.

To change sizes, override the parameters of `secbit_dram` (`NBANKS`, `NSUB`, `ROWS`,
`COLS`, `T_RAS`, `T_RP`, `TEMP_BASE`, `KEY_ROW`); `TEMP_BASE + 16` must not exceed the
row count, and the data group must lie below `KEY_ROW`.
