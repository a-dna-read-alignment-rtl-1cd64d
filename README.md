# BWA-CRAM: exact DNA read alignment inside computational RAM

This is a SystemVerilog model of an accelerator for BWT-based short-read alignment (the backward search used by BWA-style aligners). Its distinguishing idea is that the work is done *inside the memory that stores the index*. The Burrows-Wheeler transform (BWT) of the reference and a sampled occurrence table are kept in tiles of computational RAM (CRAM). A small controller next to each group of tiles issues in-array logic operations: the tiles compare characters, count matches and add the count to the stored occurrence value, all within one column of the array. Only the resulting 32-bit index leaves the memory.

The RTL covers the whole datapath and control:

- the CRAM tile, modelled at the level of its logic function (`cram_tile`)
- the processing element, with its local micro-sequencer (`pe`, `pe_ctrl`)
- the suffix-vector tiles (`sv_unit`) and the sampled suffix array (`ssa_unit`)
- the global controller, with read contexts and a runtime scheduler (`bwa_ctrl`)
- the top level (`bwa_cram_top`)

The spintronic cell itself (an SHE-MTJ) is analog and is not modelled. Only its logical behaviour is, and that is described next.

## 1. Alignment in a nutshell

Let `BWT` be the last column of the sorted rotations of `reference$`, and let `Occ'(c, i)` be `C(c)` plus the number of `c` in `BWT[0..i-1]`. Here `C(c)` is the number of characters smaller than `c`, counting `$`. A read is matched from its last base to its first, keeping an interval `[l, h]` of BWT rows:

```
l = 0 ; h = len(BWT) - 1
for each base c of the read, last to first:
    l' = Occ'(c, l)            # matches strictly before row l
    h' = Occ'(c, h + 1) - 1    # matches up to and including row h
    if l' > h': no alignment
```

Each row of the final interval is one occurrence. The text position of row `l` is then found with a *sampled* suffix array. If row `j` is not sampled, one LF step `j <- Occ'(BWT[j], j + 1) - 1` moves to the row of the preceding text position. After `k` steps a sampled row is reached, and the answer is `SSA(j) + k`.

Storing `Occ'` only once every 512 BWT characters keeps the table small. The missing part, the matches between the sample and the row, is computed on demand. That computation is what the CRAM does.

## 2. Computing in a CRAM tile (`cram_tile`)

A tile is a `ROWS x COLS` bit array (128 x 128). It works in two modes:

* **Memory mode.** `OP_WRITE` writes a row, but only in the enabled columns. `OP_READ` returns a whole row on `rdata` one clock later.
* **Logic mode.** `OP_GATE` joins up to five input rows to one output row in every enabled column at once.
  - The current through the input cells grows with the number of inputs that hold 0.
  - If that number reaches the gate's threshold, the output cell switches to the complement of its preset value. Otherwise it keeps what it held.
  - So a gate only computes its function if the output row was first written with the right **preset** value.

| gate | inputs | switches when #zeros >= | preset | result |
|------|--------|-------------------------|--------|--------|
| NAND | 2 | 1 | 0 | ~(a&b) |
| NOR  | 2 | 2 | 0 | ~(a\|b) |
| AND  | 2 | 1 | 1 | a&b |
| COPY | 1 | 1 | 1 | a |
| INV  | 1 | 1 | 0 | ~a |
| MAJ3 | 3 | 2 | 1 | majority |
| MAJ5 | 5 | 3 | 1 | majority |
| TH   | 4 | 3 | 0 | 1 if at least 3 inputs are 0 |

Two composite operations are built from these gates:

* **XOR** takes 4 gates: `T1 = NOR(a,b)`, then `T2 = T3 = COPY(T1)`, then `out = TH(a,b,T2,T3)`.
* **Full adder** takes 4 gates: `Cout = MAJ3(a,b,cin)`, then `S1 = S2 = INV(Cout)`, then `Sum = MAJ5(a,b,cin,S1,S2)`.

Every gate is preceded by its preset write, so each composite takes 8 tile commands.

The `cmd` bundle (`bwa_pkg::cram_cmd_t`) holds the operation, the gate, five input row numbers, five "external" flags and the output row. An input flagged external is taken from `ext_in`, which holds the rows of another tile. This models the transistors that join the columns of neighbouring tiles. Assertions check two rules: a gate fires only on a preset output row, and the output row is never also one of its inputs.

The threshold/preset description is this model's reading of the device behaviour. Voltages, energies and device latencies are not modelled: one command takes one clock.

## 3. The processing element (`pe`, `pe_ctrl`)

A PE holds 65,536 BWT characters in 16 BWT tiles. It also has one Occ tile and one work tile, 18 tiles of 128 x 128 in all. Characters are stored **column-major**, so a PE column runs through all 16 BWT tiles:

```
BWT index g  ->  PE = g / 65536,  column = (g % 65536) / 512,  offset = g % 512
offset       ->  tile = offset / 32, slot = offset % 32
```

Each column therefore holds exactly one Occ sample interval of 512 characters. Column `c` of the Occ tile holds the four 32-bit values `Occ'(A..T, first character of the column)`, with `C(c)` already added.

Row map of a BWT tile (defaults):

| rows | use |
|------|-----|
| 0-63 | 32 characters, slot k in rows 2k (high bit) and 2k+1 |
| 64-71 | alphabet A, C, G, T (2 rows each); row 64 (A, high bit) doubles as an all-zero row |
| 72-103 | Score: one match bit per slot |
| 104-113, 114-123 | two ping-pong accumulator banks (bank 1 also serves as XOR scratch) |
| 124-125 | carries |
| 126-127 | adder scratch (`S1`, `S2`) |

Occ tile: rows `32*c .. 32*c+31` hold `Occ'(c)`, LSB first. Work tile: count in rows 0-9, a zero row, carries and scratch, and the 32-bit result in rows 32-63.

For one request, `pe_ctrl` enables a single column (the one holding the index) and runs these steps, one tile command per clock:

| step | what | commands (default) |
|------|------|--------------------|
| GETCH | LF requests only: read the 2 bits of `BWT[idx]` | 3 |
| CMP | per slot: XOR both bits with the queried base's alphabet rows, then NOR them into the slot's Score row. All 16 tiles work in parallel. The final NOR is enabled only in tiles whose slot lies before the index (or at it, for inclusive ranks). | 32 x 18 |
| CLR | clear both accumulator banks and the work tile's zero row | 21 |
| PCNT | add each Score bit into a 6-bit accumulator with a ripple of in-memory full adders, in all tiles at once | 32 x 6 x 8 |
| RED | 4-level tree: tile t adds the count of tile t+d over the column links | 4 x 10 x 8 |
| MOVE | copy the 10-bit PE count into the work tile | 20 |
| ADD | 32-bit add of the count to `Occ'(c)` from the Occ tile | 32 x 8 |
| READ | read the 32 result rows | 33 |

One request takes **2,762 clocks** (2,765 for LF), counted from acceptance to `resp_valid`. A PE serves one request at a time. Request kinds:

* `PQ_LOW` returns `Occ'(c) + matches in [column start, idx)`.
* `PQ_HIGH` returns the same with `idx` included.
* `PQ_LF` first reads the character at `idx`, then works like `PQ_HIGH` with that character, which is also returned.

The row map, the serial popcount and the reduction tree are choices of this implementation. The scheme itself is the accelerator's: compare against stored alphabet rows into Score rows, count in memory, and add the count to the Count-augmented Occ sample.

## 4. Finding the text position (`sv_unit`, `ssa_unit`)

The **suffix vector** (SV) has one bit per BWT row, set when the suffix-array value of that row is a multiple of 32. It is stored as 128-bit vectors, 126 per CRAM tile. Each tile's last two rows are the query row and the result row. To check row `j`, `sv_unit`:

1. writes a one-hot query row,
2. presets the result row to 1,
3. runs `AND(vector row, query row)`,
4. reads the result row (hit = OR of its bits),
5. reads the vector row itself.

The answer comes 7 clocks after the request.

The **SSA** (`ssa_unit`) holds the sampled suffix-array values in row order. The address of row `j` is `base[j/128]` plus the number of set SV bits below `j` in its vector. `base[]` is a small host-generated table giving the number of sampled rows before each vector. The unit returns `SSA[address] + steps` two clocks after the request. SV and SSA accesses are serialised.

## 5. The global controller (`bwa_ctrl`)

The controller holds a batch of up to `NCTX` reads (1000 by default). Each read's context holds:

- its bases and its id
- the number of bases left
- `l` and `h`
- the two pending results and four issue/return flags
- the LF step count and its result

It runs the batch in four phases, which do not overlap (`phase` output):

1. **LOAD.** Accept reads until the batch is full or `go` is pulsed.
2. **ALIGN.** A pointer visits one context per clock, round robin.
   - For the current base it issues the `PQ_LOW` request, then the `PQ_HIGH` request, each to the PE that stores the index, at most one request per clock.
   - If that PE is busy, this is counted as a **conflict** and the pointer moves on. This is how many reads keep many PEs busy.
   - When both results are back, the context takes the new interval. It stops with "no alignment" if `l' > h'`, or moves to LOCATE after its first base.
3. **LOCATE.** For each aligned read, starting at `j = l`:
   - check the SV;
   - on a miss, issue a `PQ_LF` to the PE holding `j` and set `j = result - 1`, `steps + 1`;
   - on a hit, read the SSA.

   LF steps of different reads run in parallel on the PEs.
4. **DRAIN.** Return one result per read, in context order: `res_found`, `res_pos` (text position of row `l`) and `res_hits` (number of rows in the interval).

PE responses are accepted one per clock, lowest PE first.

**`$` handling.** `$` has no 2-bit code, so it is stored as A. When the queried character is A and the `$` row (`primary`) lies inside the counted part of the column, the controller subtracts 1 from the PE result. Counters `stat_*` report:

- interval requests and scheduler conflicts
- reads without a match
- LF steps and SV hits
- `$` corrections
- completed batches

## 6. Preparing and loading a reference

Everything stored is computed off-line for a reference and written through the top's load ports. `bwa_tb_env.sv` does exactly this in SystemVerilog and can serve as the reference implementation. The steps:

1. Build the suffix array `SA` of `reference$`. Then `BWT[i] = ref[SA[i]-1]`, or `$` when `SA[i] = 0`; that row is `primary`. `bwt_len = len + 1`.
2. PE `q`, tile `t < 16`, row `r`, column `c`:
   - rows `2k`/`2k+1` hold the code of `BWT[q*65536 + c*512 + t*32 + k]`, with A=0, C=1, G=2, T=3 and `$` written as A;
   - rows 64-71 hold the alphabet codes in every column;
   - other rows are don't-care.
3. Occ tile (tile 16), column `c`, rows `32a..32a+31`: `C(a) + count of a in BWT[0 .. q*65536 + c*512 - 1]`, excluding `$`.
4. SV vector `v`, bit `b`: 1 if `SA[128v+b] % 32 == 0`. `base[v]` is the number of such rows before vector `v`. SSA entries hold `SA[j]` of those rows, in row order.

Loading takes one row (PE tile, SV vector, SSA entry or base) per clock. PEs accept rows only while idle.

## 7. Parameters and how far the model goes

| parameter | default | meaning |
|-----------|---------|---------|
| `NPE` | 16 | processing elements. A 3·10⁹-base genome needs 45,777 PEs; at about 295 kbit of state each, that is far beyond what a simulator or synthesis tool can hold, so the default is 16 (1,048,576 BWT rows). |
| `NBT`, `SLOTS`, `COLS` | 16, 32, 128 | BWT tiles per PE, characters per tile column, tile columns (65,536 characters per PE, Occ sampled every 512) |
| `OCC_W` | 32 | Occ entry width |
| `NCTX` | 1000 | reads in flight |
| `RLEN` | 100 | read length |
| `SA_STEP` | 32 | SA sampling step |

Where this model differs from the accelerator as described:

* **Exact alignment only.** Mismatches and gaps are not supported.
* **The two non-BWT tiles.** A PE has 16 BWT tiles and two further tiles. Here one holds the Occ samples. The other is the work tile in which the column count meets the 32-bit sample and the sum is formed.
* **One interval per PE at a time.** Each PE computes in one column only. The multi-column optimisation, and several SV checks at once, are not built.
* **No CRAM for the step count or the final addition.** The LF step count and the final `SSA + steps` addition use ordinary registers and an adder, not a CRAM counting tile.
* **Host interface.** Only plain load ports and valid/ready streams are provided; the host-side programming interface is not modelled.
* **Timing.** It is in clocks, one tile command each, not device latencies. Energy is not modelled.
* **Own choices.** The `$` correction, the SSA addressing through `base[]`, the row maps and the scheduler's round-robin policy are choices of this design.

## 8. Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog:

| testbench | what it covers |
|-----------|----------------|
| `tb_cram_tile` | all gate truth tables, column/tile enables, linked inputs, read latency, XOR and full-adder sequences |
| `tb_pe` | one full-size PE: random BWT, LOW/HIGH/LF requests against a software rank, and latency |
| `tb_sv_unit` | SV membership and read-back over three tiles, latency |
| `tb_ssa_unit` | SSA addressing and `+ steps`, latency |
| `tb_bwa_cram_top` | end to end at a reduced size (8 PEs of 128 characters, 16 contexts, 12-base reads, 900-base reference, 60 reads). It checks every result against a software search and requires conflicts, empty intervals, LF steps, SV hits, `$` corrections and several batches to occur. |
| `tb_bwa_cram_full` | the same at the top's default parameters (no overrides), with a 70,000-base reference spread over two PEs and 4 reads of 100 bases. About 2.0 million clocks; about 9 minutes of Verilator time. |

Example with plain Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bwa_pkg.sv tb/tb_bwa_cram_top.sv --top-module tb_bwa_cram_top -o sim
./obj_dir/sim
```

The reduced end-to-end run takes about a second. The full-size run takes minutes: about 2,760 clocks per interval, and 100-base reads need about 200 intervals each.

The controllers issue no tile command while `rst_n` is low. This matters because the tile model checks its preset rule with an assertion: a state register that powers up at a random value must not produce a stray gate command before reset is seen.
