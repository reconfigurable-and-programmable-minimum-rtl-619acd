# RP-MDSE: a reconfigurable minimum distance search engine

Video coders spend much of their power searching for the stored vector
closest to an input. Motion estimation searches for the best-matching block
in the previous frame. Vector quantisation searches for the nearest
code-vector in a code-book. This engine does both searches on one array of
small processing elements (PEs). Each PE's storage cell is an ordinary SRAM
word, with absolute-difference and add logic placed right next to it.
Because the data stays where it is computed on, power is saved. Under
command the same array works as one of three machines:

| mode | what the array does | control lines `reset cfg1 cfg2` |
|------|---------------------|-------------------------------|
| SRAM | every storage cell of the array is a 6-bit word on a data bus; used to load reference blocks or code-books | 1 0 0 |
| VQ   | full-search vector quantisation: finds the stored code-vector with the least L1 distance to an input vector | 0 1 0 |
| ME   | full-search block motion estimation: finds the displacement (m,n), -p..p, whose search-area block has the least sum of absolute differences to the stored reference block | 0 0 1 |

The mode set, the three control lines and their values, the array
organisation and the block list come from the published RP-MDSE chip.
The default size matches its fabricated prototype:

- a 4 x 4 array of 6-bit PEs;
- shift latch arrays programmable up to a maximum displacement of 2;
- a 4-entry winner-take-all.

The register-level timing, the interfaces and every width not listed above
are this implementation's own.

## Block structure

```
              cs, cmd, start, psel                addr/req/wr/din         dout
                     |                                 |                    ^
              +--------------+   word lines    +--------------+  bit lines  |
              | global_ctrl  |---------------->| addr_decoder |    +-----------+
              | mode machine |                 +--------------+    |  sram_io  |
              | ME scan, VQ  |                        |            +-----------+
              | column seq.  |          +-------------v----------------+  |
              +--------------+   sin -->|  pe_array: N x N  pe        |<-+
                 |  me_en, vq_col       |  + (N-1) sla rows           |
                 |                      +------------------------------+
                 |                       col_sum[N] |        | row_ad[N]
                 |                      +-----------v-+   +--v---------------+
                 |                      | adder_chain |   | row_accumulators |
                 |                      +-------------+   +------------------+
                 |                             | sad                | acc[N]
                 |   mvc_valid          +------v------+   +---------v--------+
                 +--------------------->|     mvc     |   |     dam_wtac     |
                                        +-------------+   +------------------+
                                          mv_m, mv_n,       found_addr,
                                          min_sad           found_dist
```

| file | role |
|------|------|
| `rtl/rp_mdse_pkg.sv` | command and mode enums, the `cfg_t` struct of the control lines |
| `rtl/rp_mdse.sv` | top level |
| `rtl/global_ctrl.sv` | mode machine; sequences the ME scan and the VQ columns |
| `rtl/pe.sv` | one PE: stored word, search-data stage, partial-sum register, VQ difference |
| `rtl/sla.sv` | one programmable shift latch array (SLA) row between PE rows |
| `rtl/pe_array.sv` | N x N PEs plus N-1 SLA rows, search-data serpentine, bit lines |
| `rtl/adder_chain.sv` | serial adder chain: column sums to block distance |
| `rtl/mvc.sv` | motion vector calculator (running minimum) |
| `rtl/row_accumulators.sv` | one accumulator per PE row for VQ |
| `rtl/dam_wtac.sv` | winner-take-all (arg-min) over the row accumulators |
| `rtl/addr_decoder.sv` | word-line decoder |
| `rtl/sram_io.sv` | write drivers and read register (sense amplifier stand-in) |

## Motion estimation: how the systolic array lines up

This is the hardest part of the design to follow.

The reference block x(i,j) (N x N pels) is first written into the PEs'
stored words. The search area is (N+2p) x (N+2p) pels. It is
streamed into the bottom-right PE in raster order: top line first, left to
right, one pel per clock with `sin_valid` high. Let W = N+2p.

**Search-data path.** Within a row, pels move one PE to the left per clock.
From the left end of a row they enter an SLA row and come out at the right
end of the row above. The whole array is thus one long shift register that
winds back and forth across the rows.

**Why the SLA is 2p-1 stages long.** Each PE adds its |x - y| to the partial
sum coming down from the PE above and registers the result. A column's
sum for one displacement therefore needs row r+1 to see its pel one clock
after row r sees its own. The pel row r+1 needs is one search-area line
(W pels) later in the stream. It must reach row r+1 one clock after row r,
so the path from row r+1 up to row r is W-1 stages long. N of those stages
are PEs, so the SLA row has W-1-N = 2p-1 stages. The SLA is built with
2*PMAX-1 stages and tapped after 2p-1, so p can be chosen from 1 to PMAX at
run time (`psel`, latched at start). p = 0 cannot be built this way and is
treated as PMAX.

**Column sums.** Take the pel that completes a candidate window, i.e. the
window's bottom-right pel, with line index >= N-1 and column index >= N-1.
One enabled clock after that pel enters, column c leaves the array with

    col_sum[c] = sum over i of |x(i,c) - y(r0+i, c0+c)|

for that window's top-left corner (r0,c0). All N columns refer to the same
window in the same clock.

**Serial adder chain.** The chain starts from zero at column 0. Each stage
adds one column and registers the sum, so the total moves one column per
clock. Column c therefore passes through c alignment registers first. The
block distance comes out N clocks after the column sums.

**Valid pipeline and MVC.** `global_ctrl` raises a flag for each pel that
completes a window. The flag travels N+2 enabled clocks alongside the data
and marks the distance as a real candidate. There are (2p+1)^2 candidates,
in raster order of (m,n) = (r0-p, c0-p). The MVC counts them and keeps the
first strictly smallest one. Its `done` follows the last candidate.

**Stalls and flush.** A clock with `sin_valid` low stops every shift and
partial-sum register together, so gaps in the input stream change nothing
but timing. After the last pel, the controller applies N+2 more shifts to
empty the pipeline.

**Timing.** With no stalls, `done` and `mv_done` rise (N+2p)^2 + N + 2
clocks after the first pel: 70 clocks for N=4, p=2 and 38 for p=1. The
original quotes about (N+2p)^2 clocks per motion vector.

## Vector quantisation

In VQ mode row k of the array holds code-vector k, and column j holds its
component j. The array therefore stores N code-vectors of N components.
The input vector arrives one component per `vin_valid` clock. For
component j the controller selects column j. Every row then puts
|x(k,j) - v_j| on its row line, and the row accumulators add it. After N
components the winner-take-all registers the index of the smallest
accumulated distance (the lowest index on a tie) on `found_addr`, with the
distance on `found_dist`. `found_valid` and `done` pulse N+1 clocks after
the first component when nothing stalls. The accumulators, the partial sums and
the adder chain are cleared by the `reset` control line, which is high
whenever the engine is in SRAM mode. The SRAM cells themselves are not
cleared by it: stored words, search-data cells and SLA stages.

## Command interface and modes

- Reset puts the engine in IDLE.
- `cs` high moves it to SRAM; `cs` low returns it to IDLE.
- In SRAM mode, `req` performs one access per clock:
  - `wr`=1 writes `din` to word `addr`;
  - `wr`=0 reads, with `dout` and `dout_valid` valid the next clock.
- The address map has 41 words at the defaults:

  | words | cells |
  |-------|-------|
  | 0 .. N*N-1 | stored word of PE(r,c) at r*N+c (reference pel or code-vector component) |
  | N*N .. 2*N*N-1 | search-data cell of PE(r,c) at N*N + r*N+c |
  | 2*N*N .. | stage k of the SLA row feeding PE row r at 2*N*N + r*(2*PMAX-1) + k |

  The search-data and SLA cells can be read after a search, for example
  for test. A search does not need them loaded: every candidate window is
  built only from pels streamed in during that search.
- `start` with `cmd` = `CMD_VQ` or `CMD_ME` launches one search. When the
  search finishes, the engine returns to SRAM with a one-clock `done`.
- SRAM accesses are ignored while a search runs.

The results (`mv_m`, `mv_n`, `min_sad`, `found_addr`, `found_dist`) hold
until the next search of the same kind starts.

Widths at the defaults:

| signal | width | meaning |
|--------|-------|---------|
| `addr` | 6 | word address, 41 words |
| `din`, `dout`, `sin`, `vin` | 6 | pels / components (B) |
| `col_sum` | 8 | B + clog2(N) |
| `min_sad` | 10 | B + clog2(N*N), never overflows |
| `found_dist` | 8 | B + clog2(N) |
| `mv_m`, `mv_n` | 3, signed | -PMAX..PMAX |

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 4 | array is N x N; ME block size N x N; VQ holds N code-vectors of N components |
| `B` | 6 | pel / component width |
| `PMAX` | 2 | largest programmable displacement; p = 1..PMAX at run time |

The estimated larger chips correspond to other settings: N=8, PMAX=4 for
8x8 blocks with p=4, and N=16, PMAX=8 for 16x16 blocks with p=8.

## Where this RTL departs from the original chip

- **Clocking.** The original alternates P-type and N-type PEs in a
  checkerboard. The N-type PEs work on the opposite clock phase, and the
  search data and the adder chain use static latches on both phases. Here
  everything is an edge-triggered flip-flop on one clock. The skews that
  the half-clock offsets provide are rebuilt instead: a one-clock row skew
  through the SLA length, and alignment registers in the adder chain. As a
  result, the SLA length (2p-1 stages) is derived for this timing, not
  taken from the original latch count.
- **Winner-take-all.** The original is a mixed digital/analog circuit with
  6-bit inputs. Here it is a digital arg-min, and its inputs are widened to
  the 8-bit accumulator width so that no distance saturates.
- **Sense amplifiers and bit lines** are represented by a read register and
  an OR of word-line-gated words.
- **Distance.** ME uses the unnormalised sum of absolute differences;
  dividing by N*N to get a mean would not change the minimum. VQ also uses
  the L1 distance, the only operation the PE logic performs.
- **VQ capacity.** The original reports its small-array VQ results for
  16-dimensional code-vectors. This RTL keeps the square array layout
  instead: N code-vectors of N components.
- **SRAM cells per PE.** The original PE holds several more bit cells per
  bit (for the difference and the sum). Only the stored word and the
  search-data cell are mapped as SRAM words here.
- **Buses.** Separate input ports stand for the single shared data bus
  that carries code-vectors, input vectors, reference blocks and search
  areas.
- The power-estimation baselines of the original are not part of this
  design: a memory-plus-datapath processor and a generic systolic
  processor with external frame memories.

## Simulating

Each block has a self-checking testbench in `tb/<block>_tb.sv`. Each one
prints `TB_RESULT checks=<n> failures=<n>` and ends with `$finish`. The
package must be read first:

```
verilator --binary --timing --assert -Irtl rtl/rp_mdse_pkg.sv tb/rp_mdse_tb.sv \
          --top-module rp_mdse_tb -o sim && ./obj_dir/sim
```

`tb/rp_mdse_tb.sv` runs the top at its default size. It:

- loads and reads back all 16 words;
- runs motion estimations with p=2 and p=1;
- checks the cycle count against (N+2p)^2+N+2;
- runs further motion estimations with random gaps in the search-area
  stream;
- runs vector quantisations with and without gaps;
- deselects the chip.

Motion vectors, distances and winners are checked against a direct
computation inside the testbench. It also counts every mechanism (each
mode change, SRAM reads and writes, ME and VQ stalls, both SLA lengths)
and fails if one never happened. Two workload testbenches go further:

- `tb/me_frame_tb.sv` estimates the motion of all 36 interior 4 x 4 blocks
  of a 32 x 32 picture moved by a known displacement. Each block must
  report that displacement with distance 0. A block takes 88 clocks
  including its reference load. A 352 x 288 picture at 30 frames/s would
  therefore need about 16.7 MHz.
- `tb/rp_mdse_scaled_tb.sv` runs the larger estimated configurations
  (N=8, PMAX=4 and N=16, PMAX=8) through motion estimation and, at N=16,
  vector quantisation with 16-dimensional code-vectors. It uses the
  parameterised sequence in `tb/rp_mdse_run.sv`, and needs
  `-Itb` besides `-Irtl`.

The unit testbenches check:

- the PE arithmetic;
- every SLA length;
- column sums against window sums for every candidate (`pe_array_tb`);
- adder-chain latency under stalls;
- MVC tie-breaking;
- the controller's strobes, cycle by cycle.
