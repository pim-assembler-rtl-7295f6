# In-DRAM genome-assembly accelerator (PIM-Assembler architecture)

De novo genome assembly spends most of its time on two simple operations
repeated over huge tables: comparing a k-mer (a short DNA substring) with
stored k-mers, and adding small integers (k-mer frequencies, vertex
degrees). This design runs both operations inside DRAM sub-arrays. No data
crosses a memory bus for them.

- A comparison is one **two-row activation**. Two rows share charge on each
  bit-line. A reconfigurable sense amplifier turns the resulting voltage
  into XNOR2 of the two cells, on all 256 bit-lines at once, in one memory
  cycle.
- An addition is done **bit-serially**. For each bit position, a
  triple-row activation gives the carry, the majority of three cells, which
  is kept in a latch in every sense amplifier. A two-row activation then
  gives the sum, `a ^ b ^ carry`. An m-bit addition takes 2·m computing
  activations, and every bit-line computes its own addition in parallel.

The RTL models the whole memory hierarchy at the cycle level: chip → banks →
MATs → computational sub-arrays → the sense-amplifier row. It takes the
platform's three ACTIVATE-ACTIVATE-PRECHARGE (AAP) instruction types from a
host. The analog circuit (cell charge, shifted-threshold inverters) is
replaced by its exact digital outcome.

## 1. How a sense amplifier computes

Raising C cells on one bit-line leaves it at `n/C · Vdd`, where n is the
number of raised cells that hold '1'. Three inverters read that level. Each
switches at a different point:

| inverter | switches at | with C = 2 it gives | with C = 3 |
|---|---|---|---|
| low-Vs  | Vdd/4  | NOR2 (only n = 0 reads high) | – |
| normal  | Vdd/2  | (tie, not used) | majority (n ≥ 2) |
| high-Vs | 3Vdd/4 | NAND2 (n ≤ 1 reads high) | – |

`recfg_sa` applies these thresholds exactly to the count n: `4n < C`,
`2n > C` and `4n < 3C`. From the inverter outputs it forms
`XOR2 = NAND2 & ~NOR2`, the AND gate with one inverted input. An XOR gate
then forms `sum = XOR2 ^ carry_latch`. Five enables plus a latch enable
steer a 4:1 multiplexer onto the bit-line:

| function | En_m | En_x | En_mux | En_c1 | En_c2 | Latch_En | bit-line gets |
|---|---|---|---|---|---|---|---|
| read / write / copy | 1 | 1 | 0 | – | – | 0 | the cell (normal sensing) |
| XNOR2 (2 rows)      | 0 | 1 | 1 | 1 | 0 | 0 | `~(a ^ b)` |
| carry (3 rows, TRA) | 1 | 1 | 1 | 1 | 1 | 1 | `maj(a, b, c)`, also loaded into the latch |
| sum (2 rows)        | 1 | 1 | 1 | 0 | 0 | 1 | `a ^ b ^ latch` |

`pim_pkg::sa_enables()` holds this table. This design makes the following
choices:

- The latch loads only in carry mode. In sum mode it holds its value and
  feeds the XOR gate.
- Mux code `c1c2 = 01` falls back to regular sensing.
- A command (`CMD_LRST`) clears the latches before an addition starts.

## 2. The computational sub-array

`compute_subarray` has 1024 rows of 256 bit-lines:

| rows | region | reached through |
|---|---|---|
| 0–3 | temp: query k-mer, scratch | regular row decoder (`row_decoder`) |
| 4–983 | k-mer table (one k-mer per row, up to 128 bases at 2 bits) | regular row decoder |
| 984–1015 | value region: 32 rows | regular row decoder |
| 1016–1023 | computation rows x1..x8 | modified 3:8 decoder (`mrd`), up to three at once |

Bases are coded A = 00, T = 01, C = 10, G = 11. Base i of a k-mer sits in
bits `[2i+1:2i]` of its row.

The sub-array takes one command per clock:

- **ACT on precharged bit-lines.** The raised cells share charge and the
  sense-amplifier row resolves them using the current enable set. The result
  is written back into **every raised cell**, because opening a DRAM row
  overwrites it. An XNOR of x1 and x2 therefore leaves XNOR in both x1 and
  x2. Operands are always copied into the computation rows first.
- **ACT while rows are open.** Nothing is sensed. The newly raised row takes
  the bit-line value. This is RowClone, an in-array row copy.
- **WR** drives write data onto the bit-lines and into the open rows: the
  data row opened last, and any open computation rows.
- **PRE** closes everything.
- **LRST** clears the carry latches.

An ACT raises either one data row or one to three computation rows. The
hardware cannot raise several data rows at once, and an assertion enforces
this.

## 3. Instructions and the sub-array controller

`pim_ctrl` expands each instruction into commands, one per clock:

| instruction | commands per row | use |
|---|---|---|
| `OP_AAP1 (src1, des, size)` | ACT src · ACT des · PRE | copy |
| `OP_AAP2 (src1, src2, des, size, func)` | ACT {src1,src2} in XNOR2 or sum mode · ACT des · PRE | compare, sum |
| `OP_AAP3 (src1, src2, src3, des, size)` | ACT {src1,src2,src3} in carry mode · ACT des · PRE | carry |
| `OP_WRITE (des)` + row | ACT des · WR · PRE | host write |
| `OP_READ (src1)` | ACT src1 · PRE | host read |
| `OP_LRST` | LRST | clear carry latches |

`size` repeats the sequence over consecutive rows, with every address
stepping by one. An AAP of size s keeps the controller busy for exactly 3·s
clocks.

## 4. MAT, bank and chip

- **MAT (`pim_mat`).** Eight sub-arrays, each with its own controller. The
  global row decoder (`grd`) picks one sub-array, or all of them. The global
  row buffer (`grb`) returns read rows. The DPU (`dpu`) ANDs the 256 XNOR
  outputs of each sub-array into one **match flag** per sub-array. That flag
  decides whether a k-mer is new.
- **Bank (`pim_bank`).** 4 × 4 MATs. The bank controller routes an
  instruction by MAT address and scope, and the bank has its own row buffer.
- **Chip (`pim_chip`, top).** 8 banks, a one-entry I/O buffer and a chip
  controller. That makes 1024 sub-arrays and 32 MiB of cells.

Each instruction carries a **scope**. It runs in one sub-array (`SC_SUB`),
in every sub-array of a MAT (`SC_MAT`), of a bank (`SC_BANK`) or of the chip
(`SC_CHIP`). This is one way to use the parallelism of the design: the
same compare or add runs on different data in many sub-arrays at once.

The other way is to address sub-arrays one by one. The chip takes a new
command as soon as the sub-arrays it names are idle, even while other
sub-arrays are still working. A host that sends each instruction first to
sub-array 0 and then to sub-array 1 runs the two in parallel, two clocks
apart. This gives a parallelism degree of 2 or 4, which no scope reaches
in one step.

Chip handshake:

- `cmd_ready` is high when the I/O buffer is empty and none of the
  sub-arrays addressed by the presented command (scope, bank, MAT and
  sub-array fields) is busy. It therefore depends on those fields: drive
  them together with `cmd_valid` and keep them until the command is taken.
- At most one command is accepted every two clocks.
- A command is taken on a clock edge with `cmd_valid && cmd_ready`, and is
  issued one clock later.
- An AAP of size s is accepted, and the chip is ready again, after 3·s + 2
  clocks.
- A read row is valid at a bank's output five clocks after the bank takes
  the read (ACT, PRE, controller register, MAT buffer, bank buffer). The
  chip adds two clocks, for its I/O buffer and its output register.
- The DPU flag of bank b, MAT m, sub-array s is
  `match[(b*16 + m)*8 + s]`. It updates one clock after the XNOR sense, and
  `match_valid` marks the update.

## 5. Running the assembly kernels

The host sequences these kernels. The testbench module `tb/tb_host.sv`
implements them and can serve as a worked reference.

**In-memory addition** `D = A + B`, bit-serial over rows. A zero row is
kept in the array.

```
LRST;  AAP1(zero -> x3)
for each bit i (LSB first):
    AAP1(A_i -> x1); AAP1(B_i -> x2); AAP2 sum(x1, x2 -> x4)     # a ^ b ^ c_(i-1)
    AAP1(A_i -> x1); AAP1(B_i -> x2); AAP3(x1, x2, x3 -> x3)     # c_i into latch and x3
    AAP1(x4 -> D_i)
carry out: AAP1(x3 -> D_m)
```

The sum comes before the carry, because the carry activation replaces the
latched carry. Both steps need a fresh copy of the operands, because every
activation overwrites the rows it raises.

**k-mer counting (hash-table build).**

1. Write the query k-mer to temp row 0.
2. For each stored slot j: `AAP1(slot j -> x1)`, `AAP1(temp -> x2)`,
   `AAP2 XNOR(x1, x2 -> x3)`, then read the DPU flag.
3. On a miss, copy the query into the next free slot (`AAP1`).
4. In both cases, add 1 to the slot's frequency. Frequencies are stored
   vertically: slot j's 32-bit count is column j of the 32 value rows, bit
   b in value row b. Incrementing is an in-memory addition of the value
   rows and a one-hot row. With this layout a sub-array counts at most 256
   distinct k-mers, even though the k-mer region has 980 rows.

**Vertex degree (graph traversal).**

1. Store the adjacency matrix one row per source vertex; each bit-line is
   one destination vertex.
2. Reduce three rows at a time with a full adder:
   - Preload the latch with the third row: a triple activation of two
     copies of that row and the zero row gives the row itself.
   - A sum activation gives S.
   - A triple activation gives C.
3. Add the resulting 2-bit words bit-serially.

For the 6-vertex example graph in the tests this gives degrees
4 3 3 2 3 1.

## 6. Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `pim_chip` | `NBANK` | 8 | banks per chip |
| `pim_chip`, `pim_bank` | `NMAT` | 16 | MATs per bank (4 × 4) |
| `pim_chip`, `pim_bank`, `pim_mat` | `NSUB` | 8 | sub-arrays per MAT (this design's choice) |
| all | `NROWS` / `NCOLS` | 1024 / 256 | sub-array size |
| `compute_subarray` | `NCOMP` | 8 | computation rows |

The derived address widths (`BAW`, `MAW`, `SAW`, `NFLAG`) follow from
these. Row-region bases and constants are in `rtl/pim_pkg.sv`.

## 7. Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pim_pkg.sv tb/tb_pim_chip.sv \
          --top-module tb_pim_chip -Mdir obj_chip
./obj_chip/Vtb_pim_chip
```

| testbench | what it checks |
|---|---|
| `tb_recfg_sa` | read / XNOR2 / majority / sum against values computed from the cells; latch load, hold and reset |
| `tb_mrd`, `tb_row_decoder`, `tb_grd` | exhaustive decoding |
| `tb_compute_subarray` | write/read, RowClone, XNOR2 with overwrite of the sources, carry then sum, latch reset (full 1024 × 256 size) |
| `tb_pim_ctrl` | exact command/enable sequence and 3·s cycle count of every instruction type |
| `tb_dpu`, `tb_grb` | AND reduction with XNOR-only strobes; row buffer capture and hold |
| `tb_pim_mat` | broadcast k-mer compare in four sub-arrays gives the right per-sub-array flags; reads through the GRB |
| `tb_pim_bank` | routing of every scope; 5-clock read latency at the bank |
| `tb_pim_chip` | end to end, 2 × 2 × 2 sub-arrays: k-mer counting of `CGTGCGTGCTT` with k = 5 (CGTGC ×2, five others ×1) and, on random reads, with k = 16, 22, 26 and 32, degree of the example graph and of random graphs in parallel sub-arrays, AAP latency, and a count of each mechanism (match, mismatch, copy, sum, carry, latch reset, broadcast, write, read, stall, overlap), and two sub-arrays comparing rows in parallel |
| `tb_pim_chip_full` | the chip at its default size (8 banks × 16 MATs × 8 sub-arrays): the k = 5 example, the example graph and random graphs in the eight sub-arrays of one MAT, two sub-arrays in parallel; the k sweep is left out to keep the run short |

Uninitialised cells start random in Verilator
(`+verilator+rand+reset+2`). The kernels write every row they read.

## 8. Limits and departures

- **Analog behaviour is abstracted away.** Voltages, bit-line coupling
  noise, process variation and error rates are not modelled. The sense
  amplifier is an exact threshold function.
- **The scaffolding stage is not covered**, and neither is the host
  software: de Bruijn graph construction, Euler-path search and the Fleury
  traversal. The host decides which instruction to issue next from the DPU
  flag.
- **Timing is one DRAM command per clock.** Real ACT/PRE timings (tRCD,
  tRAS, tRP), refresh and the DRAM command bus are not modelled.
- **Addressing is this design's choice.** The instruction encoding, the
  scope field, the computation-row addresses 1016–1023, the write/read/
  latch-reset instructions and the valid/ready handshake are all local
  choices. So are eight sub-arrays per MAT and eight banks per chip.
- **All MATs can compute at once.** A normal DRAM access opens one MAT row
  and column at a time. Broadcast instructions here activate all selected
  sub-arrays together.
- **Capacity.** One chip holds 32 MiB of cells, and 31.75 MiB of that are
  data rows. A full human-chromosome read set (about 9.2 GB) needs hundreds
  of such chips. The operand vectors of the 2^27–2^29-bit throughput
  micro-benchmarks (2 × 16 MiB and larger) do not fit in one chip either.
- **Parallelism degree.** A scope reaches 1, 8, 128 or 1024 sub-arrays
  at once. For 2 or 4 replicated sub-arrays, the host sends every
  instruction to each replica in turn, two clocks apart. The replicas
  overlap but do not start on the same clock.
- **One chip, not a memory group.** The evaluated system groups 16 × 16
  banks; this top is one chip of 8 banks. A group is 32 such chips, each
  with its own command port.
- **Addition cost.** Each sum bit takes two computing activations (sum,
  then carry), i.e. 2·m activations for m bits, matching the original
  count. The operand copies before each activation and the copy of the
  result add five RowClone steps per bit, each 3 clocks here.
- **k-mer slots.** The counters are vertical, one per bit-line, so a
  sub-array counts at most 256 distinct k-mers although 980 rows are set
  aside for them.
