# Address-seeded data randomizer for MLC NAND flash

Multilevel NAND flash wears out and loses read margin fastest when it stores
regular data. A page of identical bytes puts every cell into the same
threshold-voltage state. A pattern of alternating states (PV1 next to PV3)
gives the largest floating-gate coupling between neighbouring cells. This
RTL removes such patterns on chip. Every byte written to the array is XORed
with a pseudorandom value (RV). Every byte read back is XORed with the same
RV, which restores the user data. The RV depends only on the byte's column
address and page address. No extra state has to be stored, and any byte can
be randomized or restored on its own.

The scheme is the one published by J. Cha and S. Kang, "Data Randomization
Scheme for Endurance Enhancement and Interference Mitigation of Multilevel
Flash Memory Devices". The RTL here is an independent implementation. The
section "Where this RTL makes its own choices" lists what it adds to the
published description.

## Structure

```
 col_addr ─┐  ┌────────────────────────┐ seed[7:0] ┌────────┐ rv[7:0]
           ├─►│ seed_location_decoder  ├──────────►│ lfsr8  ├──────┬──► rv
 page_addr ┘  │ (c + p) mod 255 → ROM  │   load ──►│ (RST)  │      │
              └────────────────────────┘ din_valid►│(Enable)│      ▼
                                                   └────────┘ ┌──────────────┐
 din[7:0] ───────────────────────────────────────────────────►│data_scrambler├─► dout
                                                              └──────────────┘
```

| File | Role |
|---|---|
| `rtl/flash_rand_pkg.sv` | Polynomial, start value and period. LFSR step function, seed-table builder and mod-255 folding. |
| `rtl/seed_location_decoder.sv` | Combinational: (column + page) mod 255, then the table lookup that gives the seed. |
| `rtl/lfsr8.sv` | 8-bit maximal-length LFSR. Loads the seed and steps once per data byte. |
| `rtl/data_scrambler.sv` | `dout = din ^ rv`. |
| `rtl/data_randomizer.sv` | Top module. Wires the three blocks together. |

## The random sequence

`lfsr8` is a Fibonacci LFSR that shifts towards the MSB. Its feedback bit is
`s[7] ^ s[5] ^ s[4] ^ s[3]`, which is the polynomial x^8 + x^6 + x^5 + x^4 + 1
(tap mask `8'hB8`). The polynomial is primitive, so the register cycles
through all 255 nonzero bytes before it repeats. Location *k* of the
sequence is the state after *k* steps from `FFh`:

| location | 0 | 1 | 2 | 3 | 4 | … | 252 | 253 | 254 | 255 = 0 |
|---|---|---|---|---|---|---|---|---|---|---|
| RV | FF | FE | FC | F8 | F0 | … | 9F | 3F | 7F | FF |

The published description gives the width, the period and these example
values, but not the polynomial. Locations 0–3 and 252–254 match the published
values. Only two 8-bit maximal-length tap sets of this kind produce those
values: B8h and B4h. B8h is the usual textbook choice for 8 bits. The
published example shows E0h at location 4. A register that shifts one bit per
step cannot reach E0h from F8h in one step. This design gives F0h there.

## Seed location: the hardest part to see

Each page is a row of byte columns, and the RV sequence runs along it.
Page *p* starts the sequence *p* places further on than page 0:

```
RV(column c, page p) = LFSR state at location (c + p) mod 255
```

This has two effects:

* **Along a word line (row).** Consecutive bytes of a page get consecutive
  LFSR states. A constant pattern becomes a 255-byte pseudorandom run.
* **Across pages (column direction).** The byte at column *c* of page *p+1*
  gets the RV that page *p* uses at column *c+1*. Equal data in
  vertically adjacent cells therefore also becomes uncorrelated. This gives
  the diagonal RV arrangement: interference is reduced in both directions,
  not only along the bit line.

Example: column 248 of page 4 is location 252, and its seed is `9Fh`.

The decoder computes the residue without a divider. Because 256 ≡ 1
(mod 255), `x mod 255` is the sum of the bytes of `x`, folded twice with
end-around carry, with 255 mapped to 0 (`mod255()` in the package). The
seed table has 255 entries of 8 bits. A constant function builds it at
elaboration by stepping the LFSR. No data file is read. The table is
`SEED_ROM[k] = lfsr_next^k(FFh)`.

The LFSR's period equals the modulus. Streaming *n* bytes from a loaded
column *c* therefore gives the same RV as loading column *c+n* directly.
Sequential transfers and random column access (a jump to a new column)
agree byte for byte. The testbench checks this equivalence.

## Interface and timing of `data_randomizer`

Parameters: `COL_W = 14` (column address bits, enough for 16 KB pages
including spare) and `PAGE_W = 8` (up to 256 pages per block).

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `load` | in | 1 | load the seed for `col_addr`/`page_addr` |
| `col_addr` | in | COL_W | start column of the transfer |
| `page_addr` | in | PAGE_W | page address |
| `din_valid` | in | 1 | `din` holds a byte; the RV advances after it |
| `din` | in | 8 | data byte (user data on program, array data on read) |
| `dout_valid` | out | 1 | same as `din_valid` |
| `dout` | out | 8 | `din ^ rv`, in the same cycle |
| `location` | out | 8 | (col_addr + page_addr) mod 255 |
| `rv` | out | 8 | RV applied to the current byte |

| cycle | load | din_valid | rv | dout |
|---|---|---|---|---|
| 1 | 1 | 0 | (old) | – |
| 2 | 0 | 1 | R0 = seed | d0 ^ R0 |
| 3 | 0 | 1 | R1 | d1 ^ R1 |
| 4 | 0 | 0 | R2 (held) | – |
| 5 | 0 | 1 | R2 | d2 ^ R2 |
| 6 | 0 | 0 | R3 | – |

* A transfer starts with one `load` cycle. The first byte can follow in the
  next cycle. An assertion flags `load` and `din_valid` high in the same
  cycle.
* The path adds no latency: `dout` is combinational from `din` and the
  registered RV. The block handles one byte per clock.
* During gaps in `din_valid` the RV holds.
* The register has no separate reset. Its contents are undefined until the
  first `load`. The decoder never produces the lock-up seed 00h, and an
  assertion in `lfsr8` checks this.

The `lfsr8` ports match the published block diagram: Seed[7:0], Enable,
Clock, RST and RV[7:0]. Here RST is a synchronous, active-high load of the
seed. With this reading the register starts each transfer from the
address-dependent seed.

## What the randomization achieves

A 2-bit MLC cell takes one bit from an LSB page and one from an MSB page.
`tb/tb_uniformity_table1.sv` writes a pattern to page 0 (LSB) and page 1
(MSB) over 255 columns. It maps (MSB, LSB) = 11/10/00/01 to
Erase/PV1/PV2/PV3 and counts the cells in each state:

| pattern | Erase | PV1 | PV2 | PV3 | variance | std. dev. | score |
|---|---|---|---|---|---|---|---|
| all 00h | 25.1 | 25.1 | 24.7 | 25.1 | 0.028 | 0.169 | 99.6 |
| all FFh | 24.7 | 25.1 | 25.1 | 25.1 | 0.028 | 0.169 | 99.6 |
| all AAh | 24.9 | 25.1 | 24.9 | 25.1 | 0.009 | 0.098 | 99.8 |
| all 55h | 24.9 | 25.1 | 24.9 | 25.1 | 0.009 | 0.098 | 99.8 |

The score is 100 · (43.3 − σ) / 43.3, where 43.3 is σ when every cell is in
one state. These values equal the published uniformity figures for these
patterns. The small deviation from 25 % comes from the period: the LFSR never
produces the byte 00h, so the cells that this missing RV would have set are
absent. That is 8 of 2040 cells, falling on one state for all-00h and
all-FFh and split over two states for AAh and 55h. Two published rows are not reproduced:
the logical checkerboard, whose byte layout is not specified, and a
software-random pattern.

The endurance and bit-error-rate results of the published work are
measurements of 4x-nm and 2x-nm silicon. They cannot be simulated at this
level.

## Where this RTL makes its own choices

* The combining operation is XOR. The published description speaks only of
  transforming the data with the RV. XOR reproduces the uniformity figures
  above and makes reading the same operation as writing.
* The polynomial is x^8+x^6+x^5+x^4+1, chosen as described above.
* The decoder is built as mod-255 folding plus a 255-entry table.
* The address widths (14/8 bits) and the `load`/`din_valid` handshake.
* RST is read as a synchronous load of the seed.

The NAND array itself is outside this RTL.

## Testbenches and simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_lfsr8` | A full period against a bit-level model. All 255 states occur once. The published example values. Hold while `en` is low. `rst` has priority over `en`. |
| `tb_seed_location_decoder` | The column 248 / page 4 example. Every page × a sweep of 443 columns, plus 5000 random addresses, against `%` and a stepped LFSR. |
| `tb_data_scrambler` | All 65,536 (data, RV) pairs, bit by bit. Round trip through two instances. |
| `tb_data_randomizer` | End to end at default parameters. Four full 16 KB pages at one byte per clock, with the cycle count checked. The diagonal relation between pages. Random transfers with gaps, then read-back to the original data. Column jumps mid-transfer. Location wrap. Each mechanism is counted, and a failure is counted if it never occurs. |
| `tb_uniformity_table1` | The uniformity table above. |

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/flash_rand_pkg.sv \
    tb/tb_data_randomizer.sv --top-module tb_data_randomizer -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one. Each testbench finishes in
well under a second.
