# 4x4 forward Hadamard transform of H.264/AVC in eight pipeline shapes

In an H.264/AVC encoder, a macroblock coded in intra 16x16 mode leaves the
4x4 integer DCT with sixteen DC coefficients, one per 4x4 sub-block. These
sixteen values form a 4x4 block `W` that is transformed once more:

```
Y = H * W * H / 2        H = |1  1  1  1|
                             |1  1 -1 -1|
                             |1 -1 -1  1|
                             |1 -1  1 -1|
```

The transform sits inside the intra prediction loop. The next block cannot be
predicted until the current one has gone through transform, quantization and
their inverses, so the transform's **latency** holds up the whole encoder. Its
**throughput** matters as well, because a frame has many blocks to push through.
This RTL implements eight hardware architectures for the transform. They make
different trade-offs between samples per cycle, pipeline depth and adder count:

| Module              | Name      | Samples/cycle | Register barriers | Adders in series per stage | Latency (cycles) | Cycles per block |
|---------------------|-----------|---------------|-------------------|----------------------------|------------------|------------------|
| `hadamard_1p16s`    | 1P16S     | 16            | none              | 4                          | 0 (combinational)| 1                |
| `hadamard_2p16s`    | 2P16S     | 16            | W, b              | 2 + 2                      | 2                | 1                |
| `hadamard_4p16s`    | 4P16S     | 16            | W, a, b, c        | 1 + 1 + 1 + 1              | 4                | 1                |
| `hadamard_4p4s`     | 4P4S      | 4             | W, a, b, c        | 1 + 1 + 1 + 1              | 16               | 4                |
| `hadamard_2p4s_2p2` | 2P4S-2+2  | 4             | W, b              | 2 + 2                      | 8                | 4                |
| `hadamard_2p4s_3p1` | 2P4S-3+1  | 4             | W, c              | 3 + 1                      | 8                | 4                |
| `hadamard_2p4s_1p3` | 2P4S-1+3  | 4             | W, a              | 1 + 3                      | 8                | 4                |
| `hadamard_2p2s`     | 2P2S      | 2             | W, b              | 2 + 2                      | 16               | 8                |

The name gives the number of pipeline stages and then the samples per cycle.
Latency is the number of cycles from the first input of a block to its first
result. For the intra loop, 1P16S (no pipeline) and 2P16S (two stages) give
the best balance of latency and throughput. 4P16S has the highest throughput
for streaming. The 4- and 2-sample versions need fewer adders but more
registers. `hadamard_top` places all eight side by side.

## The arithmetic: four layers of sixteen adders

The two matrix products are not computed as separate row and column passes.
The transform is instead written as four layers of sixteen two-input
additions or subtractions. Samples are numbered row-major: `Wk` and `Sk` are
row `k/4`, column `k%4`.

| Layer | Results | Operands (from the layer before)                                          |
|-------|---------|---------------------------------------------------------------------------|
| a     | a0..a7  | `a[2c+r] = W[c+8r] + W[c+4+8r]` (pairs of rows 0/1 and 2/3 in column c)    |
|       | a8..a15 | `a[8+2c+r] = W[c+8r] - W[c+4+8r]`                                          |
| b     | b0..b3  | `b[m] = a[2m] + a[2m+1]`                                                   |
|       | b4..b7  | `b[4+m] = a[2m] - a[2m+1]`                                                 |
|       | b8..b11 | `b[8+m] = a[8+2m] - a[9+2m]`                                               |
|       | b12..b15| `b[12+m] = a[8+2m] + a[9+2m]`                                              |
| c     | c[4g+m] | m=0: `b[4g]+b[4g+1]`, 1: `b[4g+2]+b[4g+3]`, 2: `b[4g]-b[4g+1]`, 3: `b[4g+2]-b[4g+3]` |
| S     | S[4g+m] | m=0: `(c[4g]+c[4g+1])/2`, 1: `(c[4g]-c[4g+1])/2`, 2: `(c[4g+2]-c[4g+3])/2`, 3: `(c[4g+2]+c[4g+3])/2` |

After layer b, group `g = 0..3` holds the column sums weighted by row `g` of `H`.
Layers c and S then apply `H` along the columns. `S[4i+j]` is exactly
`Y[i][j]`. The division by two is an arithmetic shift right by one, which
rounds towards minus infinity.

The package `hadamard_pkg` holds this table as two functions, `table1_src()`
(the operand positions) and `table1_sub()` (add or subtract). Every
architecture builds its adders from these two functions, so all eight share
one definition of the arithmetic.

## 16-sample architectures

`hadamard_parallel` builds all four layers at full width: 64 adders in all,
plus the final shift. The parameter `REGS` puts a register on the output of
W, a, b or c. A `valid` flag follows the data through the same registers. A
new block can enter every cycle, and results appear as many cycles later as
there are registers:

* **1P16S** (`REGS = 0000`) has no register at all. A block presented in one
  cycle produces its results in the same cycle, through four adders in
  series. Its `clk` and `rst_n` ports are unused.
* **2P16S** (`REGS = 0101`) registers the input block and layer b. That gives
  two stages of two adders each.
* **4P16S** (`REGS = 1111`) registers the input and layers a, b and c. Each
  stage has one adder in series; the last stage is layer S, which drives the
  outputs.

## 4- and 2-sample architectures: ping-pong barriers

These versions take a block in pieces: one row per cycle with four lanes,
half a row with two. Each stage has only `LANES` adders per layer, so it
spends `N = 16/LANES` cycles on a block. This needs storage between the
stages, because an adder may need an operand that arrived three cycles ago,
or that will arrive next cycle.

**Barrier (`hadamard_pingpong`).** A barrier holds one block of sixteen words
in each of two banks. The producer writes `LANES` words per cycle into one
bank, each word at its own position (0..15). The consumer sees the whole
other bank at once, so a multiplexer in front of each adder input can pick
any word. `swap` exchanges the banks at the end of the cycle that writes the
last words of a block. With four lanes a bank has four slots of four words;
with two lanes it has eight slots of two.

**Stages (`hadamard_serial`).** The parameter `REGS` chooses which layer
outputs get a barrier. W always has one. Each barrier starts a stage, which
is the chain of adder layers up to the next barrier, or up to the output.
A stage's cycle counter starts when its barrier swaps in a full block and
runs for `N` cycles. In cycle `j`, lane `k` of each of its layers computes
one result, given by `sched(REGS, LANES, layer, j, k)` in the package. At the
end of the run the next barrier swaps, and the following stage starts on the
next cycle. Layer S, shifted right by one, drives `out_data`.

**Timeline of 4P4S for one block that arrives without gaps** (cycle 0 =
first input row):

```
cycle      0  1  2  3 | 4  5  6  7 | 8  9 10 11 | 12 13 14 15 | 16 17 18 19
barrier W  fill rows  |            |            |             |
layer a               | 4 adders   |            |             |
layer b               |            | 4 adders   |             |
layer c               |            |            | 4 adders    |
layer S               |            |            |             | out rows 0..3
```

The first result comes out at cycle 16 and the block is done after 20
cycles. Because every stage uses its two banks alternately, the next block
can start at cycle 4 and leaves 4 cycles after the first one. In general an
unbroken block leaves `N * B` cycles after its first beat, where `B` is the
number of barriers. This is 16 for 4P4S, 8 for the 2P4S versions and 16 for
2P2S. Input beats may have idle cycles between them: a block then starts
moving when its last beat arrives, and its first result leaves
`N * (B - 1) + 1` cycles after that beat. The input is always accepted.
Each stage takes exactly `N` cycles per block, and a block cannot arrive in
fewer than `N`, so a barrier is never overwritten while in use. An assertion
checks this.

**Order of operations.** When layers follow one another inside a stage with
no barrier between them, a later layer can only use what the earlier layer's
lanes produce in the same cycle. The order in which each layer produces its
sixteen results therefore has to be chosen so that every lane finds its
operands in the lanes of the layer before. The orders used:

| Case                                   | Layer a (lanes per cycle j)     | Layer b                          | Layer c                          | Layer S   |
|----------------------------------------|---------------------------------|----------------------------------|----------------------------------|-----------|
| a, b in one stage (2P4S-2+2)           | `2j, 2j+1, 8+2j, 9+2j`          | `j, 4+j, 8+j, 12+j`              | row order (`4j..4j+3`)           | row order |
| a, b, c in one stage (2P4S-3+1)        | `4j..4j+3`                      | `8s+2j0+{0,1,4,5}`               | `4(2s+k/2)+2(k%2)+j0`            | row order |
| b, c, S in one stage (2P4S-1+3)        | as 2P4S-2+2                     | row order                        | row order                        | row order |
| every layer alone (4P4S)               | as 2P4S-2+2                     | row order                        | row order                        | row order |
| 2 lanes, a+b and c+S (2P2S)            | `8s+2col+{0,1}`, s=j%2, col=j/2 | `8s+col`, `8s+4+col`             | `2j, 2j+1`                       | `2j, 2j+1`|

Here `s = j/2` and `j0 = j%2` unless stated otherwise. In every case except
2P4S-3+1, the first half of the layer-a lanes always adds and the second half
always subtracts. The package function `sched_ok()` checks at elaboration,
cycle by cycle, that every fused layer finds its operands. An unsupported
`LANES`/`REGS` combination stops elaboration with an error.

## Interfaces

All modules: `clk` (rising edge) and `rst_n` (asynchronous, active low).
Only the valid flags, counters and bank selects are reset; the data
registers are not. Default `IN_W = 13`. Outputs are `IN_W+3` bits, two's
complement.

16-sample versions:

| Port        | Dir | Width            | Meaning                                   |
|-------------|-----|------------------|-------------------------------------------|
| `in_valid`  | in  | 1                | `in_w` holds a block                      |
| `in_w`      | in  | 16 x `IN_W`      | `in_w[k]` = Wk                            |
| `out_valid` | out | 1                | `out_s` holds a result block              |
| `out_s`     | out | 16 x (`IN_W`+3)  | `out_s[k]` = Sk                           |

4- and 2-sample versions (`LANES` = 4 or 2):

| Port        | Dir | Width                | Meaning                                               |
|-------------|-----|----------------------|-------------------------------------------------------|
| `in_valid`  | in  | 1                    | `in_data` holds the next beat of the current block    |
| `in_data`   | in  | `LANES` x `IN_W`     | beat `j` carries `W[LANES*j + k]` in lane `k`          |
| `out_valid` | out | 1                    | `out_data` holds a result beat                        |
| `out_last`  | out | 1                    | last beat of a block                                  |
| `out_data`  | out | `LANES` x (`IN_W`+3) | beat `j` carries `S[LANES*j + k]` in lane `k`          |

Neither kind can stall its output; a consumer must take results as they
come. In `hadamard_top` the ports of each architecture carry a prefix: `p1_`,
`p2_`, `p4_` for 1P16S, 2P16S, 4P16S; `s44_`, `s22_`, `s31_`, `s13_` for
4P4S and the three 2P4S; `s2_` for 2P2S.

## Number formats

Each input is a DC coefficient of the 4x4 integer DCT. For 9-bit residuals
its magnitude is at most 16 x 255 = 4080, so it fits in 13 bits. The sum of
sixteen inputs needs four more bits, so every internal value and barrier word
is `IN_W+4` bits wide. That width cannot overflow, even for the extreme input
blocks the testbenches use. After the halving, results fit in `IN_W+3` bits.
To process wider inputs, change `IN_W`; everything else follows from it.

## Size

Coarse generic synthesis at the defaults (word-level cells, where an adder is
one cell; flip-flop bits):

| Module       | Cells | FF bits |
|--------------|-------|---------|
| 1P16S        | 64    | 0       |
| 2P16S        | 98    | 482     |
| 4P16S        | 132   | 1028    |
| 4P4S         | 641   | 2194    |
| 2P4S-2+2     | 884   | 1098    |
| 2P4S-3+1     | 1311  | 1098    |
| 2P4S-1+3     | 749   | 1098    |
| 2P2S         | 372   | 1101    |

In the serial versions most cells are multiplexers in front of the adders.
Each barrier costs 2 x 16 x 17 = 544 flip-flops.

## Where this RTL departs from the published architectures

* **Latency of 1P16S.** The published tables give 1P16S a latency of one
  cycle, but the architecture has no registers. This RTL delivers the result
  combinationally in the same cycle, which is within one clock period, and
  calls that latency 0.
* **Register barriers hold two banks.** The published register counts for
  the 4- and 2-sample versions (about 500 to 550 for the two-barrier
  versions, 1052 for 4P4S) are close to one 16-word bank per barrier. How a
  single bank could be written and read at once is not described, so this
  RTL uses a true double buffer, with about twice the flip-flops.
* **Uniform word width.** The originals probably let each layer grow by one
  bit. Here every internal value is `IN_W+4` bits.
* **Choices the source leaves open:**
  * the order of operations within a block (see above);
  * the input and output order (row-major beats);
  * the barrier placement of 2P16S (W and b);
  * the 2+2 split of 2P2S;
  * the valid/last handshake and the reset.

  The first adder row of 4P4S is fixed as two adders and two subtractors, as
  the published diagram draws it. The other layers switch between adding and
  subtracting from cycle to cycle.
* **Not included:** the rest of the encoder (DCT, 2x2 chroma Hadamard,
  quantization, intra prediction). The clock frequencies and FPGA resource
  figures published for these architectures are results of one FPGA flow.
  They are not reproduced here.

## Files

* `rtl/hadamard_pkg.sv`: default width, the layer table, the schedules.
* `rtl/hadamard_parallel.sv`: 16-sample datapath with selectable registers.
* `rtl/hadamard_pingpong.sv`: double-banked barrier.
* `rtl/hadamard_serial.sv`: 4- or 2-sample datapath built from barriers.
* `rtl/hadamard_1p16s.sv` ... `rtl/hadamard_2p2s.sv`: the eight
  architectures, one module each.
* `rtl/hadamard_top.sv`: all eight side by side.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_hadamard_qhdtv.sv`: frame-level workload (below).

## Simulation

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl +libext+.sv \
    rtl/hadamard_pkg.sv tb/tb_hadamard_top.sv --top-module tb_hadamard_top
./obj_dir/Vtb_hadamard_top
```

Replace `tb_hadamard_top` with any other testbench. Each prints
`TB_RESULT checks=N failures=M` and finishes.

The testbenches never use the layer table. They compute the reference
directly as the matrix product `H*W*H`, then shift right by one. The inputs
are random blocks plus corner cases: all maximum, all minimum, a
checkerboard of both, a single 1, and all -1. The testbenches check:

* every output value;
* the exact cycle of every result, which covers latency and block rate;
* `out_last` on the serial versions.

They also count how often each traffic case occurred, and fail if one never
did:

* blocks back to back;
* idle gaps between blocks;
* idle cycles inside a block (serial versions only).

* `tb_hadamard_top` runs all eight architectures together.
* `tb_hadamard_pingpong` checks that the read bank never changes while the
  other bank is being written.
* `tb_hadamard_qhdtv` feeds each architecture the 30,720 DC blocks of one
  3840x2048 frame in which every macroblock is intra 16x16 (491,520
  samples). It checks:
  * the frame's cycle count, from which it derives the lowest clock that
    gives 30 frames/s: 0.92, 3.69 and 7.37 MHz for 16, 4 and 2 samples per
    cycle;
  * a closed-loop run in which each block waits for the previous result, as
    in the intra loop. Each block then takes 1, 3 and 5 cycles on the
    16-sample versions, 20 on 4P4S, 12 on the 2P4S versions and 24 on 2P2S.
