# Lifting-scheme 2-D wavelet transform unit

This is a hardware unit that computes a multi-level, two-dimensional discrete wavelet transform of a picture held in on-chip memory, together with its exact inverse. It uses the lifting scheme with polynomial-interpolation filters. Each level splits a line into even samples (λ, the coarse signal) and odd samples (γ, the detail):

* **Predict** replaces every γ by its difference from an N-tap interpolation of the neighbouring λs.
* **Update** adds to the λs an Ñ-tap combination of the new γs, which preserves the signal's moments.

Both steps run in integer arithmetic. The inverse transform undoes them in reverse order with the signs flipped, so reconstruction is bit-exact.

The unit is meant to be a custom functional unit next to a processor. The host loads a picture and the filter tables, starts a forward or inverse transform, and reads the result back. The architecture follows the FLWT accelerator of the 2002 Delft MSc thesis "Micro-codable Discrete Wavelet Transform". That design targeted a Xilinx Virtex II at 50 MHz, but the RTL here is written from scratch in generic SystemVerilog. Where it had to fill gaps or chose differently, this is listed under "Design choices and departures" below.

The default configuration is a 64 x 32 picture with a 4-tap predict filter and a 4-tap update filter (N = Ñ = 4). All four values are parameters of the top module `dwt_transform`.

## What is computed

For a line of C samples at one level, the samples alternate λ, γ, λ, γ, … starting with a λ. There are nG = floor(C/2) γs.

**Predict.** For each γ at position 2g+1:

```
P = (sum_j  λ[s+j] * F[r][j] + 2^13) >>> 14
forward: γ ← γ − P        inverse: γ ← γ + P
```

* The window start s and filter row r depend on where the γ lies.
* In the middle of the line, the window is centred on the γ and row N/2 is used. This is the symmetric interpolation, e.g. −1/16, 9/16, 9/16, −1/16 for N = 4.
* Near the ends, the window cannot be centred. The N/2−1 first γs keep the window at the line start and use rows 1 … N/2−1.
* The last ones keep it at the line end and use rows N/2+1 … N. The number of γs in the middle is nG − N + 1 + (C mod 2).
* Row r holds the Lagrange weights that interpolate, at position 2r−1, the polynomial through λs at 0, 2, …, 2N−2. Row 0 extrapolates to the left.
* Rows N/2+1 … N are mirror images of rows N/2−1 … 0, so only rows 0 … N/2 are stored.

**Update.** For each γ g, the Ñ λs of its window are corrected:

```
forward: λ[s+j] ← λ[s+j] + (γ * L[g][j] + 2^13) >>> 14
inverse: λ[s+j] ← λ[s+j] − (γ * L[g][j] + 2^13) >>> 14
```

* The window placement is the same as for predict, with Ñ taps.
* The lifting coefficients L depend on the γ, the level and the direction. They are computed off-line, and are simply a table to the hardware. They are chosen so that every wavelet gets Ñ vanishing moments. See "Computing the lifting table" below.

**2-D.** The transform runs in place in the picture memory.

* The number of levels is computed separately per direction: nX = floor(log2((W−1)/(max(N,Ñ)−1))), and nY likewise from H.
* At level l, every 2^l-th row and column takes part. Each such line has stride 2^l (rows) or W·2^l (columns) and ceil(L/2^l) samples.
* The forward order is rows of level 0, columns of level 0, rows of level 1, and so on. A direction is skipped once it has run out of levels.
* The inverse runs the same passes backwards.
* For example, 128 x 32 with N = Ñ = 4 gives 5 row levels and 3 column levels. The forward order is R0 C0 R1 C1 R2 C2 R3 R4, and the inverse order is R4 R3 C2 R2 C1 R1 C0 R0.

**Number formats.**

* Samples are 16-bit two's complement. An 8-bit picture grows beyond 8 bits after the transform.
* Coefficients are 18-bit two's complement with 14 fraction bits, so their range is [−8, 8).
* Products are kept at full width. The only rounding is the final scaling: add 2^13, then shift right arithmetically by 14. This rounds to nearest, with halves rounded up. Results wrap to 16 bits.
* Forward and inverse compute the same rounded terms and add them with opposite signs. Reconstruction is therefore exact for any picture and any coefficients, even when intermediate values wrap.
* The rounding makes the forward result differ from the exact real-valued transform. On random 8-bit pictures, the mean absolute difference is 0.79 at 64 x 32 with the 4-4 filter, and 0.50-0.65 at the larger sizes below. With truncation instead of rounding, it would be about 1.2.

## Block structure

```
                 +-------------------- dwt_transform ---------------------+
 ext port  ----->| mux  --> picture_ram (2 ports x 2 accesses per cycle)  |
 coef port ----->| filter_ram (predict, N banks)  filter_ram (update, Ñ)  |
 start/fw  ----->| dwt_control --line commands--> lifting_1d             |
                 |        predict_seq, update_seq, predict, update,       |
                 |        λ data_fifo, γ data_fifo, coef_multiplier       |
                 +--------------------------------------------------------+
```

| module | role |
|---|---|
| `dwt_pkg` | widths, scale factors, the level/length/lifting-table formulas |
| `coef_multiplier` | signed 16 x 18 multiplier |
| `filter_ram` | banked coefficient RAM: all taps of a row in one read |
| `data_fifo` | first-word-fall-through FIFO (λ FIFO and γ FIFO) |
| `picture_ram` | dual-port picture memory, double-pumped |
| `predict` | N-register λ window, N multipliers, adder, scale, ± |
| `update` | Ñ λ registers each with multiplier and adder; fill / in-place / shift / empty |
| `predict_seq`, `update_seq` | per-line operation sequencers (boundary cases, addresses, filter rows) |
| `lifting_1d` | one line: both modules running concurrently, the FIFOs and multiplexers |
| `dwt_control` | 2-D state machine issuing line commands |
| `dwt_transform` | top level |

## The 1-D engine: predict and update at the same time

This is the core of the design and the part that takes the most care to follow. A line of C samples would normally take two sweeps: all predicts, then all updates. Here both modules work on the same line at once, and each produces one result per cycle once its pipeline is full. A line therefore costs about C/2 cycles plus a fixed overhead.

**Reusing λs through a register window.** Consecutive middle γs use windows shifted by one λ. The predict module keeps its N λs in a shift register and reads only one new λ per γ. Boundary γs keep the window still and switch the filter row.

The update module likewise keeps Ñ λ registers, each followed by an adder. Four configurations cover a line:

* **fill**: shift in λs with γ forced to 0.
* **in-place**: a boundary γ updates the same Ñ λs again.
* **shift**: results move one register on, the leftmost λ leaves as a final value, and a new λ enters.
* **empty**: flush the remaining λs with γ forced to 0.

The λs only leave the update module when no later γ can touch them, so each λ is read and written exactly once per level.

**Data dependency.** In the forward direction update needs the new γs. In the inverse direction predict needs the restored λs. One module is therefore the *first stage* and the other the *second*:

* **Forward.** Predict is the first stage and reads λ and γ from the picture RAM. Every λ it reads is also pushed into the λ FIFO, and every γ it computes is written back and pushed into the γ FIFO. Update reads only from the two FIFOs and writes the final λs.
* **Inverse.** Update is the first stage and reads λ and γ from the RAM. Every γ it reads goes to the γ FIFO, and every λ it outputs is written back and pushed into the λ FIFO. Predict reads only from the FIFOs.

This reduces the memory traffic to two reads and two writes per cycle.

**Flow control.**

* The first stage holds (`stall_first`) while either FIFO contains DEPTH−4 words or more, so that words already in flight always find room.
* The second stage waits (`wait_second`) while a FIFO it needs is empty. This happens at the start of a line and while the first stage works on boundary cases.
* The default depth is 2(N+Ñ) = 16 words.
* Assertions check that neither FIFO ever fills and that no FIFO is popped while empty.

**Pipeline timing.** Each sequencer issues one operation per cycle:

* **Cycle t:** picture RAM read addresses and filter RAM addresses go out, and FIFO words are popped into registers.
* **Cycle t+1:** the data is present and the module computes.
* **Cycle t+2:** the registered result is written to the picture RAM.

Predict results use RAM port A and update results port B. `done` pulses once both sequencers are finished and the last write has happened. The control unit starts the next line only then.

## Picture memory: four accesses per system cycle

The engine needs two reads and two writes every cycle, but a dual-port RAM gives two accesses per clock. The picture RAM therefore runs on `ram_clk` at twice the system clock `clk`, with one rising edge in each half of `clk`:

* **High half of `clk`:** each port performs its write, if requested. The address multiplexer selects the write address.
* **Low half of `clk`:** each port performs its read. The read data is captured and copied to `ra_data` / `rb_data` on the next rising `clk`, so it is stable for a whole system cycle.

Because writes come first, a read sees a write made in the same system cycle. `ram_clk` drives nothing but the RAM. In simulation, a `clk` with period 20 and a `ram_clk` with period 10, shifted by 5, satisfy the phase requirement.

## Using the unit

The ports of `dwt_transform` are described in detail in the header of `rtl/dwt_transform.sv`. The usage sequence is:

1. **Reset.** Assert `rst_n` low (asynchronous, active low). The RAM contents are not cleared.
2. **Load the predict filter.** For rows r = 0 … N/2 and taps j = 0 … N−1, write with `coef_sel = 0`, `coef_bank = j`, `coef_addr = r` and `coef_wdata = round(w_r,j · 2^14)`. Here w_r,j is the Lagrange weight of node 2j at position 2r−1. Tap 0 is the leftmost λ of the window.
3. **Load the lifting table.** Compute the table as described in the next section. Write with `coef_sel = 1`, `coef_bank = j` (the j-th λ of the update window) and `coef_addr = lift_base + g`. For row lines at level l, `lift_base = Σ_{k<l} floor(ceil(W/2^k)/2)`. Column lines follow after all row levels: `lift_base = Σ_{k<nX} floor(ceil(W/2^k)/2) + Σ_{k<l} floor(ceil(H/2^k)/2)`. The function `dwt_pkg::lift_base` computes this. The table is the same for every row, or every column, of a level. Filter tables need loading only once.
4. **Load the picture.** Keep `start` low. Each `ext_we` cycle writes two consecutive row-major pixels, `ext_wdata[0]` to address 2·`ext_addr` and `ext_wdata[1]` to 2·`ext_addr`+1.
5. **Transform.** Pulse `start` with `fw = 1` (forward) or `fw = 0` (inverse). `busy` stays high until `done` pulses. `pass_level` / `pass_cols` show progress.
6. **Read back.** While idle, `ext_rdata` returns the pair at `ext_raddr` one cycle later.

After a forward transform the picture holds the usual in-place (interleaved) layout:

* The sample at (x, y) is a coarse coefficient of the last level where both coordinates are multiples of its step.
* Every other position holds the detail produced at the level where it first became odd.
* Address 0 holds the coarsest λ.

### Computing the lifting table

The lifting table is computed from moments, separately for the row direction (line length W) and the column direction (line length H):

1. Give every sample k of the line the moment vector m(k) = (1, k, k², …, k^(Ñ−1)).
2. At each level, with the λ and γ positions of that level:
   * Every λ first takes over the moments of the γs predicted from it: m′(λ_j) = m(λ_j) + Σ_g F[g][j]·m(γ_g). Here F[g][j] is the predict weight of λ_j for γ_g, and is zero where λ_j is outside γ_g's window.
   * For every γ g with update window start s, solve the Ñ x Ñ system Σ_j L[g][j]·m′_i(λ_(s+j)) = m_i(γ_g), for i = 0 … Ñ−1.
   * Carry m′ to the next level.
3. Round each coefficient to 14 fraction bits.

For a 16-sample line this gives, for example, 0.4/0.2 for the first γ and 0.25/0.25 in the middle with Ñ = 2. It is implemented in the reference model (`make_lifting` in `tb/dwt_ref_pkg.sv`).

## Speed

A forward transform costs about one cycle per two samples of every line processed, plus roughly 20 cycles of overhead per line. Measured forward transform cycles are shown below, compared with the counts reported for the original hardware, which used the same picture sizes and filters. The measurements were taken with random pictures and the sizes set by parameters:

| picture, filter | this RTL | original | cycles/pixel |
|---|---|---|---|
| 64 x 32, 4-4 (default) | 5 638 | – | 2.75 |
| 176 x 144, 4-4 | 44 301 | 46 000 | 1.75 |
| 352 x 288, 2-2 | 151 777 | 152 000 | 1.50 |
| 352 x 288, 4-4 | 156 559 | 160 000 | 1.54 |
| 720 x 560, 4-4 | 580 772 | 586 000 | 1.44 |

Short lines are dominated by the per-line overhead, which is why the small default picture costs more per pixel. The inverse transform takes about 10 % longer at 64 x 32. Its first stage, update, holds more often while the boundary λs are corrected.

## Design choices and departures

These points are this implementation's own, not taken from the original design:

* **Number formats.** The 16-bit samples and 14-bit coefficient precision match the original. The 18-bit coefficient width is chosen to fit 18 x 18 hardware multipliers.
* **Rounding.** Round-to-nearest and the wrap-around on overflow are this design's choices.
* **Filter range.** The [−8, 8) coefficient range is enough for the 4-4 tables. For example, the largest coefficient for a 16-sample line is about 1.87. The 2-2 table has a coefficient of exactly 8 on 4-sample lines. It saturates to 8 − 2^−14, which the accuracy checks tolerate. The extrapolating boundary rows of an 8-tap predict filter reach about 15.7, so an 8-8 filter needs `COEF_W` ≥ 19 in `dwt_pkg`.
* **Levels.** The number of levels is computed per direction, as in the worked 128 x 32 example. The original pseudo-code used a single count from max(W, H) for both.
* **Line lengths.** Lengths per level use ceil(L/2^l), so odd lengths keep their last λ.
* **Control split.** The original control unit was one block of state machines. Here it is split into the 2-D state machine (`dwt_control`) and two per-line sequencers inside `lifting_1d`.
* **Line handshake.** Lines are processed one after another with a `line_start` / `line_done` handshake, and lines never overlap.
* **FIFO hold rule.** The DEPTH−4 hold threshold is this design's own. The original only sized the FIFOs.
* **Picture RAM output.** The picture RAM has an extra output register on the system clock. The original used a generated block RAM.
* **External port.** Two pixels per access, matching a 32-bit host bus. The host can access the RAM only while the unit is idle.
* **Filter loading.** A single coefficient write port serves both filter RAMs. Coefficient generation, the host processor, the external memory and its DMA are outside this RTL.
* **Other filters.** Only the 2-D acceleration scheme is built. The alternative of moving one line at a time in and out of the unit is not. Filters that need more than one predict/update pair per level, such as the Daubechies 9-7, are also not supported.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=… failures=…` and ends with `$finish`. `tb/dwt_ref_pkg.sv` holds the reference model: a class that performs the same integer lifting transform line by line in software, with its own placement and filter-weight functions.

| testbench | what it checks |
|---|---|
| `tb_dwt_pkg` | level counts and lengths against worked examples; predict weights and moment-derived lifting coefficients against the published tables (2- and 4-tap, 16-sample line) |
| `tb_coef_multiplier` | corner and random products |
| `tb_filter_ram` | banked writes and whole-row reads |
| `tb_data_fifo` | against a queue model, including simultaneous push and pop |
| `tb_picture_ram` | two writes and two reads per cycle, read-after-write in the same cycle |
| `tb_predict`, `tb_update` | against arithmetic models in all configurations and both directions |
| `tb_lifting_1d` | lines of several lengths, strides and offsets against the model, forward and inverse; line rate |
| `tb_dwt_control` | every line command for 64 x 32 and 128 x 32, including the pass order above |
| `tb_dwt_transform` | default-size end to end (see below) |
| `tb_dwt_workloads` | the four larger sizes of the speed table: model-exact, mean error below 1, reconstructing, and within 5 % of the original cycle counts |

`tb_dwt_transform` runs the top at its default parameters:

* It checks a constant picture, which must give only the constant or zeros.
* It compares a random picture bit for bit with the model, then inverts it and requires the original back.
* It requires a mean error below 1 against the exact real-valued transform.
* It repeats the random-picture test with a pseudo-random lifting table.
* It counts how often each mechanism occurs: the four update configurations, held predict windows, mirrored filter rows, FIFO waits, skipped column passes, cycles with two writes and two reads, and forward and inverse runs. A mechanism that never occurs counts as a failure.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv \
    tb/tb_dwt_transform.sv --top-module tb_dwt_transform -Mdir obj -o sim
./obj/sim
```

Replace `tb_dwt_transform` with any other testbench name. Modules are found through `-Irtl -Itb`. `tb_dwt_workloads` needs about half a minute, and the others a few seconds. To change the picture size or filter lengths, override `WIDTH`, `HEIGHT`, `N` and `NT` on `dwt_transform`. The address widths and RAM depths follow from these parameters.
