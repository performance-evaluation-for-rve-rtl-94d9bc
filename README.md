# Smith-Waterman alignment on a linear array of RVE blocks

This design computes the Smith-Waterman local alignment of a short query
sequence against a database sequence. The whole similarity matrix H is
computed in hardware, along with the best alignment score.

    H(i,0) = H(0,j) = 0
    H(i,j) = max( 0,
                  H(i-1,j-1) + s(db_i, q_j),     s = MATCH if equal, else MISMATCH
                  H(i-1,j)   - d,                 d = linear gap penalty
                  H(i,j-1)   - d )
    score  = max over all H(i,j)

Row `i` runs over the database and column `j` over the query.

A conventional accelerator uses a linear systolic array. Each cell keeps one
query character. The database characters stream through the cells, one cell
per clock, so every cell computes one H value per cycle.

This design applies *recursive variable expansion* (RVE) to that array. Each
processing element is an RVE block that keeps `BF_C` query characters. Every
cycle it takes a chunk of `BF_R` database characters and computes the whole
`BF_R x BF_C` tile of H. Inside a tile, the recurrence is expanded into one
combinational network between registers, so the tile takes a single cycle.
`BF_R x BF_C` is called the *blocking factor*. The default is 2x2 with 18
blocks. That aligns a 36-character query and updates 72 cells per clock.
Blocking factor 1x1 is the plain systolic array.

## Files

| file | role |
|---|---|
| `rtl/sw_pkg.sv` | widths (2-bit characters, 16-bit scores), types, default scores, controller states |
| `rtl/seq_cmp.sv` | similarity score of two characters |
| `rtl/sw_cell_core.sv` | combinational update of one H cell |
| `rtl/rve_block.sv` | one RVE block: a `BF_R x BF_C` tile per cycle, plus the Ns, corner and maximum registers |
| `rtl/rve_array.sv` | `N_BLOCKS` RVE blocks chained into a linear array |
| `rtl/query_mem.sv` | query store: register file with all entries read in parallel |
| `rtl/db_mem.sv` | database store: `BF_R` characters per synchronous read |
| `rtl/hout_mem.sv` | result store: one bank per block, random read of any H(row,col) |
| `rtl/sw_rve_top.sv` | top level: the memories, the array, the run controller and the host ports |
| `tb/` | self-checking testbenches; `sw_ref.sv` is the integer reference model they share |

## How the tiles flow through the array

This section explains the part that is hardest to see from the code.

Block `b` owns query columns `b*BF_C ... b*BF_C+BF_C-1`. Database chunk `p`
holds rows `p*BF_R ... p*BF_R+BF_R-1`. It enters block 0 in cycle `p` and
moves one block to the right per cycle, so block `b` computes tile `(p, b)`
in cycle `p+b`. All tiles on one anti-diagonal are computed in the same
cycle. A tile needs three kinds of input:

* **Left column.** These are the last-column values of tile `(p, b-1)`. The
  left neighbour computed them one cycle earlier, so they come straight from
  its output registers (`h_left_in`).
* **Row above.** These are the bottom-row values of tile `(p-1, b)`. The
  block computed them itself in the previous cycle, so its own output
  registers feed back into it. In the 2x2 case these are the feedback wires
  H(i-2,j) and H(i-2,j-1).
* **Corner.** This is the bottom-right value of tile `(p-1, b-1)`. It is two
  cycles old. The block takes its left neighbour's bottom-right output
  (`h_diag_in`) and delays it by one cycle in a register (`diag_q`).

Inside the block, the tile is written as a `BF_R x BF_C` grid of
`sw_cell_core` instances. The grid is equivalent to the expanded formulas,
and synthesis flattens and restructures it. The register outputs are H, the
database chunk and its valid bits for the next block, and the running
maximum.

The maximum follows the basic cell's scheme. Each block registers the
largest of three values:

* its own previous maximum
* the maximum arriving from the left neighbour
* its registered tile of the previous cycle

The best score therefore ripples to the last block, `max_out` of the array.

**Valid bits.** Each database character carries a valid bit. A row whose
bit is low is forced to H = 0. This has three uses:

* The last chunk of an odd-length database can be half filled (valid rows
  must come first in a chunk).
* An empty cycle between two database sequences restarts the recurrence.
* The array is all zeros after reset, however long it has been idle.

**Timing.** A chunk crosses the array in `N_BLOCKS` cycles, one per block.
A database of `P` chunks is finished `P + N_BLOCKS - 1` cycles after its
first chunk enters. The final maximum is available two cycles later: one
cycle to compare the last tile and one to pass it through the chain. In
steady state the array updates `N_BLOCKS * BF_R * BF_C` cells per cycle.

## The accelerator around the array (`sw_rve_top`)

The host sees plain ports:

1. Write the query, one character per cycle (`q_we`, `q_addr`, `q_data`).
   The query length is fixed at `N_BLOCKS*BF_C`.
2. Write the database (`db_we`, `db_addr`, `db_data`), up to `DB_MAX`
   characters.
3. Pulse `start` with `db_len` (1..`DB_MAX`) and `gap_d`. `busy` rises. The
   controller steps through these states:
   * `CLEAR`: one cycle. It resets the array and the write pointers of the
     result memory, so nothing carries over from the previous run.
   * `RUN`: one database chunk per cycle, `ceil(db_len/BF_R)` cycles.
   * `DRAIN`: `N_BLOCKS+1` cycles, until the last tile is stored and the
     maximum has reached the last block.
4. `done` rises and stays high until the next `start`. `max_score` holds the
   best score. `run_cycles` equals `ceil(db_len/BF_R) + N_BLOCKS + 3`
   (36 + 18 + 3 = 57 for a 72-character database at the defaults).
5. Read any H(row, col) with `h_rd_row` / `h_rd_col`. `h_rd_data` follows one
   cycle later.

The result memory has one bank per block, and each bank has its own write
port. The skewed tiles of all blocks are therefore stored in the cycle they
appear. Bank `b`, row `p` holds tile `(p, b)`.

The query length is fixed. A shorter query can still be aligned: column `j`
of H depends only on columns `<= j`, so the first columns of the result
memory are exact. The best score must then be taken from those columns,
because `max_score` also covers the unused ones.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_BLOCKS` | 18 | RVE blocks in the array (the published 2x2 evaluation used 18 for a 36-character query; other published sizes were 2, 5 and 100, with up to 106 blocks on the device) |
| `BF_R` | 2 | database characters per block per cycle (first factor of the blocking factor) |
| `BF_C` | 2 | query characters per block (second factor) |
| `DB_MAX` | 256 | database store size (own choice) |
| `MATCH`, `MISMATCH` | +2, -1 | similarity scores (own choice) |
| `CHAR_W`, `SCORE_W` | 2, 16 | in `sw_pkg` (own choice) |

`DB_MAX` must be a multiple of `BF_R`. H values are not saturated. Keep
`MATCH * query length` below 2^16.

## How far it follows the published design, and where it departs

The following are taken from the source design:

* **Cell datapath.** The operator structure of the basic cell: the
  similarity score, an adder and a comparator against zero on the diagonal,
  two gap adders and their comparator, the final comparator, and the
  running-maximum comparison on registered values. The diagonal, H, Ns and
  Max registers are kept too.
* **Block ports.** The ports of the 2x2 RVE block.
* **Chaining and timing.** Blocks are chained like a systolic array, one
  block per cycle, so the latency equals the number of blocks.
* **Throughput.** The array updates (blocks x blocking factor) cells per
  cycle.
* **System.** The system has a query store, a database store, the array, a
  result memory and a host.

The following are this design's own choices:

* **Blocking factor orientation.** The published configurations use 36
  blocks for 2x1 and 12 blocks for 4x3 with a 36-character query. The second
  factor is therefore read as query characters per block.
* **Generic tile network.** The tile is a generic grid of cell datapaths,
  not hand-expanded formulas for each blocking factor. The values are
  identical. The logic depth after synthesis can differ from a
  hand-expanded version.
* **Corner input.** The block takes the neighbour's bottom-right output and
  delays it internally. It does not receive an already-delayed H(i-2,j-2).
* **Unspecified details.** The valid bits, the run controller, the host
  ports, the memory layouts and sizes, the score values, the character
  coding and the widths were not specified. The reset is synchronous and
  active high.
* **Query store.** It is a register file, not a block RAM, because every
  block reads its characters at the same time.
* **Not modelled.** The host computer and its link are outside the RTL. So
  are the published clock rates and slice counts (Virtex-II Pro).
  Simulation checks cycle counts, not frequency.
* **Fixed query length.** A query longer than `N_BLOCKS*BF_C` needs a larger
  array. There is no multi-pass mode.

## Verification

Every testbench compares against values it computes itself. Most use
`tb/sw_ref.sv`, a direct integer evaluation of the recurrence. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it runs |
|---|---|
| `tb_seq_cmp` | all character pairs, two score sets |
| `tb_sw_cell_core` | 7000 random and corner cases. The zero, diagonal, left-gap and up-gap results must all occur. |
| `tb_rve_block` | 2x2 and 3x2 blocks with random tile inputs every cycle against a cycle model (corner buffer, feedback, masked rows, maximum, reset) |
| `tb_rve_array` | full alignments on arrays of 18x(2x2), 2x(2x2), 4x(1x1), 36x(2x1), 12x(4x3), 9x(4x4). Every tile is checked, plus a restart after an empty cycle, a reset, the maximum, the N-cycle latency and one chunk per cycle. |
| `tb_workloads` | the published sizes: 2-, 5- and 100-block 2x2 arrays, 4-, 10- and 200-cell systolic arrays, and all ten blocking factors for a 36-character query |
| `tb_sw_rve_top_configs` | the complete top at 36x(2x1), 12x(3x3), 9x(4x4) and 4x(1x1), with smaller database stores, through the same host sequence |
| `tb_sw_rve_top` | the top at its default size, five runs through the host ports (odd length, full 256-character store, 1 character, back-to-back runs). All of H is read back, and `max_score` and `run_cycles` are checked. It counts the half-filled chunks, full-store runs, clears and zero/diagonal/gap cells, and fails if any of them never occurs. |

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/sw_pkg.sv tb/sw_ref.sv tb/tb_sw_rve_top.sv --top-module tb_sw_rve_top
    ./obj_dir/Vtb_sw_rve_top

`tb_workloads` builds 16 arrays, some with 100 or 200 blocks, so it takes a
couple of minutes to compile. It then runs in well under a second.
