# Partitioned on-chip memory with register reuse chains for pipelined stencil loops

A pipelined image-processing loop wants every memory reference of one
iteration in the same clock cycle. For a 3x3 neighbourhood that is eight
reads per cycle out of one array. The usual answer is to split the array
into as many block-RAM banks as there are references, arranged so that the
references of one iteration always land in different banks. That costs one
bank per reference: 8 banks for a 3x3 window, 25 for a 5x5 one, plus
address logic for each of them.

This design needs far fewer banks because consecutive iterations overlap.
When the inner loop index `i1` advances by one, the 3x3 window slides one
column to the right. Each row of the window only needs one new element, at
its right-hand end. The other elements of that row were read in earlier
iterations. So the design reads only that right-most element of each row
(the **head**) from memory. A short shift register per row (a **reuse
chain**) keeps the last few heads and supplies the rest of the row. For the
3x3 case that is three memory reads per cycle instead of eight. The three
heads sit in three consecutive array rows, so placing array row `x0` in
bank `x0 mod 3` puts them in three different banks. That gives three banks
where the per-reference scheme needs eight or nine.

The default configuration is a 1920 x 1080 array of 32-bit words. The loop
nest is

```
for (i0 = 0; i0 < 1918; i0++)
  for (i1 = 0; i1 < 1078; i1++)
    body(A[i0+r][i1+c] for every (r,c) of the pattern)
```

The pattern is the eight neighbours of `A[i0+1][i1+1]`, i.e. offsets
(0,0) (0,1) (0,2) (1,0) (1,2) (2,0) (2,1) (2,2). The design delivers each
iteration's eight values together, one iteration per clock cycle. The loop
body itself, the computation applied to the window, is left to the user: the
window is an output port.

## Where the data comes from: heads and reuse chains

Take one row `r` of the pattern, with referenced columns between `cmin` and
`cmax`. In iteration `(i0, i1)`, the head reference reads
`A[i0+r][i1+cmax]`. The reference `k` columns to its left needs
`A[i0+r][i1+cmax-k]`, which is what the head read `k` iterations earlier.
The row's chain therefore has `cmax - cmin` registers and shifts once per
iteration. Tap `k` (the head delayed by `k` iterations) feeds the reference
at column `cmax - k`. Positions between two references that the pattern
skips still take a register, because the data must be delayed by the full
distance. For the default pattern:

| pattern row | references  | head read from memory | chain registers | taps used |
|-------------|-------------|-----------------------|-----------------|-----------|
| 0           | c = 0, 1, 2 | A[i0][i1+2]           | 2               | 0, 1, 2   |
| 1           | c = 0, 2    | A[i0+1][i1+2]         | 2               | 0, 2      |
| 2           | c = 0, 1, 2 | A[i0+2][i1+2]         | 2               | 0, 1, 2   |

This only works along the inner loop. When `i0` advances, a new set of rows
comes in and the chains hold stale data. So each outer iteration sweeps all
W1 columns. The first `PC-1` steps (PC = pattern width) only fill the chains
and produce no window (**warm-up**). A sweep takes `(W0-PR+1) * W1` cycles
for `(W0-PR+1) * (W1-PC+1)` windows, where PR is the pattern height. At the
default size that is 2,071,440 cycles for 2,067,604 windows, an efficiency
of 99.8 %.

## Bank mapping and offsets

The heads of one iteration lie in rows `i0+r` for the used pattern rows `r`.
The design uses the linear mapping `bank = (alpha . x) mod N` with
partition vector `alpha = (1,0)`, i.e. `bank = x0 mod N`. Two heads collide
only if their row offsets are congruent modulo N. `N` is the smallest bank
count with no such pair (`reuse_pkg::min_banks`):

| pattern        | references | used rows | N |
|----------------|------------|-----------|---|
| BICUBIC        | 4          | 0, 2      | 3 |
| DENOISE        | 4          | 0, 1, 2   | 3 |
| MOTION_LH      | 6          | 0         | 1 |
| DECONV         | 5          | 0, 1, 2   | 3 |
| PREWITT (default) | 8       | 0, 1, 2   | 3 |
| SOBEL          | 9          | 0, 1, 2   | 3 |
| LOG            | 13         | 0 .. 4    | 5 |
| CANNY          | 25         | 0 .. 4    | 5 |

BICUBIC needs 3 banks, not 2, because rows 0 and 2 are congruent modulo 2.

Inside a bank, element `(x0, x1)` sits at offset `F = floor(x0/N) * W1 + x1`.
Bank `b` holds exactly the rows `b, b+N, b+2N, ...`. Each bank is sized to
its own row count, `ceil((W0-b)/N) * W1` words, so no word is wasted even
when N does not divide the row count. At the default size each of the three
banks holds 640 rows, 691,200 words.

`bank_mapper` also implements the general 2-D form of the offset rule:

- The dimensions with a non-zero alpha component are ordered first.
- The last of those dimensions is divided by N.
- For `alpha = (0,a1)` this gives `F = floor(x1/N) * W0 + x0`.
- For both components non-zero it gives the classic padded layout,
  `F = x0 * ceil(W1/N) + floor(x1/N)`.

The top level only uses `alpha = (1,0)`. The layout is conflict-free only
when the alpha component of the divided dimension is coprime to N, and
`bank_mapper` refuses other combinations at elaboration.

## Blocks and timing

```
start -> access_ctrl --(head x0,x1 per row)--> bank_mapper x PR --(bank, offset)--> bank_xbar
              |                                                                        |
              | step info, delayed one cycle                                 per-bank read ports
              v                                                                        v
      win_valid, win_i0, win_i1          wr_* (host) ----------------------------> part_mem
                                                                              (N x mem_bank)
                                                                                       |
      win_data <-- reuse_chain x PR <-- head data per row <-- bank_xbar <-- per-bank data
```

| file | role |
|------|------|
| `reuse_pkg.sv` | pattern type `pattern_t` (bit `[r][c]` = offset (r,c) referenced), the eight benchmark patterns, elaboration-time functions (head/tail column per row, chain lengths, `min_banks`, bank depths) |
| `access_ctrl.sv` | runs the loop nest, one step per cycle; per used row it gives the head coordinates, skipping reads whose column would be negative during warm-up |
| `bank_mapper.sv` | combinational `(x0,x1) -> (bank, offset)` |
| `bank_xbar.sv` | sends each row's request to its bank and returns that bank's data to the row one cycle later; asserts that no two rows ask for the same bank in one cycle |
| `part_mem.sv` | the N banks plus the host write port, which maps array coordinates itself |
| `mem_bank.sv` | one simple dual-port RAM: registered read (one cycle), read-first, no reset |
| `reuse_chain.sv` | the per-row shift register with taps 0..LEN |
| `reuse_mem_top.sv` | connects the blocks and assembles `win_data` |

Interface of `reuse_mem_top`:

1. After reset, load the array through `wr_en / wr_x0 / wr_x1 / wr_data`,
   one word per cycle, in any order.
2. Pulse `start`. `busy` rises in the next cycle.
3. Windows come out in loop order, `i0` outer and `i1` inner. In a cycle
   with `win_valid`, `win_data[r][c]` holds `A[win_i0+r][win_i1+c]` for
   every referenced `(r,c)`, and zero in positions the pattern does not use.
4. The first window is presented in the (PC+1)-th cycle after the `start`
   cycle: one cycle to leave idle, PC-1 warm-up steps, and one cycle of bank
   latency. That is the 4th cycle for the default pattern.
5. `done` pulses together with the last window.
6. `bank_reads` shows which banks were read in a cycle.

Writing while `busy` is high is not allowed; an assertion flags it. Reset
(`rst_n`) is synchronous and active low. It clears the control state and
the chain registers, but not the RAM contents.

Parameters of the top: `W0`, `W1`, `DATA_W`, `PATTERN` (any
`reuse_pkg::pattern_t` up to 8x8, pushed to row 0 and column 0), and `N`,
which defaults to `min_banks(PATTERN)`. An elaboration check rejects an `N`
that would map two used rows to one bank.

## Simulating

All testbenches check themselves and end with a line
`TB_RESULT checks=<n> failures=<n>`. They use plain Verilator 5. The
package has to be listed first; the other files are found through `-y`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/reuse_pkg.sv tb/tb_reuse_mem_top.sv --top-module tb_reuse_mem_top
./obj_dir/Vtb_reuse_mem_top
```

| testbench | what it runs |
|-----------|--------------|
| `tb_reuse_mem_top` | an 11 x 14 array, default pattern, two sweeps back to back. It checks every window, its order, the first-window and sweep latencies and the total bank reads. It also checks that chain reuse, warm-up, parallel multi-bank reads and every bank-rotation phase (`i0 mod N`) actually occur. 11 rows leave the banks unequal (4, 4, 3 rows). |
| `tb_reuse_mem_full` | the default 1920 x 1080 configuration with no parameter overrides: 2,073,600 writes, then a full sweep with every one of 2,067,604 windows checked (a few seconds) |
| `tb_benchmarks` | all eight benchmark patterns on 1920 x 1080, side by side. It checks each pattern's bank count and that the banks hold exactly the array, with no overhead. |
| `tb_image_sizes` | the default pattern and LOG on images of 720x480, 1280x720, 1920x1080, 2560x1600 and 3840x2160 |
| `tb_access_ctrl`, `tb_bank_mapper`, `tb_bank_xbar`, `tb_part_mem`, `tb_mem_bank`, `tb_reuse_chain` | unit tests against independent models |

`stencil_harness.sv` and `bench_run.sv` in `tb/` are the shared drivers and
checkers. The array contents are a hash of the coordinates, so the expected
value of every reference is computed independently of the design.

Results at the default size, from `tb_reuse_mem_full`: 6,214,320 bank reads
serve 16,540,832 references, and 10,338,020 of those references come from
the chain registers.

## How far it follows the method, and where it departs

Taken from the method:

- Only heads are read from memory, and register chains hold the reused data.
- The chain lengths follow from the reuse distance along the move (0,1).
- The mapping is `bank = x0 mod N`, i.e. `alpha = (1,0)`.
- The bank counts in the table above.
- The offset rule of dividing the last dimension with a non-zero alpha
  component by N.
- The 1920 x 1080 array and the 1918 x 1078 loop bounds of the running
  example.

This design's own choices, with nothing in the method to go by:

- The 32-bit word width. It matches the method's reported flip-flop counts:
  32 bits per chain register for BICUBIC (4 registers), LOG (8) and CANNY (20).
- One iteration per clock cycle.
- The one-cycle RAM latency and the read-first collision rule.
- The full-row warm-up at every outer iteration.
- The split into controller, mappers, crossbar and banks.
- The host write port and the start/busy/done handshake.
- Reset behaviour.
- Sizing each bank to its own row count. The method says no padding is
  needed in this case; its general overhead formula would count the unequal
  last rows as waste.

Not built:

- **The loop body.** Its function is never specified, so the window is an
  output port.
- **The 3-D case.** The method sketches a 3-D pattern with `alpha = (1,3,0)`
  and `N = 9`, and a 3-D move. There are also 3-D variants of LOG and SOBEL.
  Their patterns and sizes are not known, so only 2-D arrays are supported.
- **Moves other than (0,1)** and reference coefficient matrices other than
  the identity.
- **The baseline partitioning schemes** the method is compared against.

Cycle-level results, not resource numbers, are what the testbenches
establish. LUT, flip-flop and DSP counts depend on the FPGA flow and were
not reproduced.
