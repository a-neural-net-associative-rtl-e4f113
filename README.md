# Hopfield associative memory on a bit-serial processor array

An associative memory returns a stored pattern when given a damaged or
partial copy of it. A Hopfield network does this by iteration: with M
stored ±1 patterns x^s of N elements, the weights are

    t_ij = sum_s x_i^s x_j^s   (i != j),   t_jj = 0

and, starting from the probe u(0) = y, every node is updated at once:

    u_j(k+1) = +1 if sum_i t_ij u_i(k) >= 0, else -1

until no node changes. This RTL runs that search on an array of tiny
bit-serial processing elements (PEs), **one PE per network node**. Each PE
has four one-bit latches, a full adder and a 128 x 1 bit memory, and is
wired to its four mesh neighbours; 72 PEs
form one array chip, and chips are cascaded until there is a PE for every
node. All PEs execute the same micro-instruction every clock, so the N
sums of products are computed in parallel, one bit at a time. The weights
are computed off-line by a host computer and shifted into the array as
*bit planes* (one bit for every PE) over a host bus of 32 data lines.

The default build is a 120-node network (a 12 x 10 pixel image) storing 8
patterns: two chips, 144 PEs, 17,718 clocks per iteration (1.8 ms at the
array's 10 MHz clock).

## What a PE holds: weights in segments

Node values are coded as sign bits: **0 means +1, 1 means -1**. Every PE j
needs, for every i, the weight t_ij and the node value u_i. A weight needs

    w = ceil(log2(M+1)) + 1   bits (signed magnitude)

and the accumulated sum

    p = ceil(log2(N*M+1)) + 1  bits (two's complement).

N weights do not fit in 128 bits for any useful network, so the weights go
in *segments* of

    D = min(floor((B - p) / (w + 1)), N)     B = 128
    S = ceil(N / D) segments per iteration.

PE memory layout (address 0 at the top):

| addresses                | contents                                              |
|--------------------------|-------------------------------------------------------|
| d(w+1) .. d(w+1)+w-2     | slot d: magnitude of t_ij, LSB first                  |
| d(w+1)+w-1               | slot d: sign of t_ij (later: the product's sign)      |
| d(w+1)+w                 | slot d: node value u_i, i = seg*D + d                 |
| B-p .. B-1               | running sum, LSB first; address B-1 is its sign      |

For the default network w = 5, p = 11, D = 19, S = 7, so 125 of the 128
bits are used. The last segment is padded with zero weights (7 x 19 = 133 slots,
so the slots for i = 120..132 hold zeros), and the 24 PEs past node 119
get zero weights and never change.

## One iteration, step by step

`hop_seq` broadcasts one micro-instruction per clock. A PE can load each
latch from its RAM bit, a constant or the adder (SM = NS^EW^C, carry CY,
borrow BW of NS-EW-C), write SM or CM to RAM, and shift CM. At most one
latch takes the RAM bit in a cycle. For every segment:

1. **Download** D(w+1) bit planes: the w weight bits of t_ij and the
   broadcast node bit u_i for each slot. A plane takes C clocks (below).
2. **Multiply**, 3 clocks per weight. u_i is ±1, so the product only flips
   the weight's sign: NS := node bit, C := 0; EW := sign; sign := SM.
3. **Convert to two's complement**, 4w-1 clocks per weight, in place.
   EW := sign; C := sign (the +1 of negation rides in as carry); then per
   magnitude bit k: NS := bit; bit := NS^s^c and NS := that result, EW := 0;
   C := BW (which equals (bit^s)&c); EW := sign again. A last clock writes
   s^c over the sign bit, so a "-0" (sign 1, magnitude 0) becomes 0.
4. **Accumulate**, 3p clocks per weight: for every sum bit k, NS := sum
   bit (or 0 for the very first weight of the iteration, which clears the
   sum for free), EW := weight bit min(k, w-1) (sign extension), sum bit
   := SM, C := CY.

After the last segment:

5. **Own value**: one more plane gives each PE its own old value u_j, in
   slot 0's node bit (free by then).
6. **Convergence test**, 4 clocks: C := u_j XOR new sign; the array ORs
   all C latches; in the fourth clock the sequencer samples that global
   OR and CM := new sign.
7. **Upload** the new signs through the data lines (C-1 clocks). The host
   uses them as the node plane of the next iteration.

If the global OR was 1 and fewer than `MAX_ITER` iterations have run, the
next iteration starts at once; otherwise `done` rises, with `converged`
telling which way it ended.

## Moving bit planes: the array edge

The array is 12 rows tall and 6n columns wide (n chips side by side, each
12 x 6). The CM latches of a column form a shift chain from the south edge
to the north edge. With L data lines the columns are served in
G = ceil(6n/L) groups of L; only the selected group shifts. A plane moves
in with 12 shifts per group and one RAM write:

    C = 12 * ceil(6n / L) + 1    clocks per plane (13 for the default build)

and out with one RAM-to-CM copy (folded into the test step) and 12 clocks
per group. PE (row r, column k) is node j = r*6n + k.

## Iteration time

    T = S*D*[C(w+1) + 3(p+1) + (4w-1)] + 4 + 2C - 1   clocks

The classic analysis of this mapping counts the 4-clock convergence test
once per segment, giving 4S instead of 4; this engine tests once per
iteration and is 4(S-1) clocks faster. Examples (32 lines, M =
floor(0.15N) except for the default):

| network              | w  | p  | D  | S  | chips | C  | T (clocks) | at 10 MHz |
|----------------------|----|----|----|----|-------|----|-----------:|----------:|
| 120 nodes, M = 8     | 5  | 11 | 19 | 7  | 2     | 13 | 17,718     | 1.77 ms   |
| 72 nodes, M = 10     | 5  | 11 | 19 | 4  | 1     | 13 | 10,137     | 1.01 ms   |
| 216 nodes, M = 32    | 7  | 14 | 14 | 16 | 3     | 13 | 39,453     | 3.95 ms   |
| 360 nodes, M = 54    | 7  | 16 | 14 | 26 | 5     | 13 | 66,277     | 6.63 ms   |

The testbenches check every one of these counts clock for clock.

## Host interface

The host is not part of the RTL (a behavioural model is in
`tb/hop_host_model.sv`). It owns the patterns, computes t_ij, and keeps
the node values. The protocol, all synchronous to `clk`:

* `start` (one clock) begins a search from the node values the host holds.
* While `pl_valid` is high the host drives `bus_in` **in the same clock**
  with row `pl_row`, column group `grp` of the requested plane:
  `pl_kind` = `PL_WEIGHT` (bit `pl_bit` of t_ij in signed magnitude, with
  i = `pl_node` and j the PE's node), `PL_NODE` (u_i for every PE), or
  `PL_OWN` (each PE's own u_j). Nodes past N-1 get 0.
* While `up_valid` is high `bus_out` holds row `up_row` of group `grp` of
  the new node values; `iter_done` pulses one clock after the last one.
* `busy`, `done`, `converged`, `changed` (last global OR) and
  `iter_count` report progress.

## Modules

| file                     | what it is                                              |
|--------------------------|---------------------------------------------------------|
| `rtl/hop_pkg.sv`         | micro-instruction struct, plane kinds, size formulas    |
| `rtl/pe_ram.sv`          | 128 x 1 PE memory, asynchronous read                    |
| `rtl/gapp_pe.sv`         | PE: NS, EW, C, CM latches, full adder, RAM, neighbour moves |
| `rtl/gapp_chip.sv`       | 12 x 6 PEs, mesh links and edges, CM shift chains, OR of C latches |
| `rtl/gapp_array.sv`      | cascaded chips, column groups on the data lines, global OR |
| `rtl/hop_seq.sv`         | the search-phase sequencer (schedule above)             |
| `rtl/hopfield_gapp_top.sv` | sequencer + array; the top                            |

Top parameters: `NODES` (120), `EXEMPLARS` (8), `RAM_BITS` (128),
`LINES` (32), `MAX_ITER` (16). Everything else (w, p, D, S, chip count,
column groups) is derived in `hop_pkg`. `RAM_BITS` may go up to 256.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=F`. For example:

    verilator --binary --timing --assert -Irtl -Itb rtl/hop_pkg.sv \
        tb/tb_hopfield_full.sv --top-module tb_hopfield_full
    ./obj_dir/Vtb_hopfield_full

| testbench               | what it shows                                           |
|-------------------------|---------------------------------------------------------|
| `tb_pe_ram`             | memory against an array model                           |
| `tb_gapp_pe`            | 20,000 random micro-instructions against an arithmetic model |
| `tb_gapp_chip`          | planes in and out through the edges, partial-column shifts, mesh moves in four directions, global OR |
| `tb_gapp_array`         | 3 chips on 4 lines (5 column groups), EW moves across chip borders, global OR per chip |
| `tb_hop_seq`            | schedule counts, convergence and MAX_ITER exits         |
| `tb_hopfield_gapp_top`  | four engines: default, 3 column groups, MAX_ITER stop, zero sums |
| `tb_hopfield_full`      | the default build, no overrides, three recalls          |
| `tb_hopfield_fig3`      | 72, 216, 360 nodes with M = 0.15N; 360-node timing      |

The system tests (`hop_tb_harness`) draw random patterns, add noise,
run a software Hopfield model alongside, and compare every uploaded node
value, every `changed` flag and every iteration's clock count.

## How far to trust it, and where it is its own design

Verified in simulation: every node value of every iteration for networks
of 24 to 360 nodes, against an independent model; the iteration time
formula above; multi-group bus transfers; zero sums (which must give +1);
"-0" products; both ways a search ends. Not synthesised for timing.

What follows the original mapping: one node per PE, 72-PE chips cascaded,
128-bit PE memories, weights computed off-line and downloaded in signed
magnitude as bit planes, segmentation with w, p, D and S as above,
multiplication by XOR into the sign plane, conversion to two's
complement, bit-serial summation, the sign of the sum as the new value,
the global OR convergence test, the per-plane transfer time C, and the
per-step clock counts 3, 4w-1, 3p and 4.

This design's own choices:

* The PE's instruction set. The original chip's instruction set is not
  reproduced; the micro-sequences were chosen to meet the step clock
  counts above. The four-neighbour mesh moves are given to NS
  (north/south) and EW (east/west); the Hopfield schedule never uses them,
  it moves data only through the CM chain.
* The array orientation (12 rows in the shift direction) and the
  column-group reading of C.
* The memory layout, the node coding (0 = +1), the own-value plane and its
  place in the schedule, and the convergence test once per iteration.
* New values are uploaded in every iteration, including the last, so the
  host always ends up with the answer.
* `MAX_ITER`: a synchronous Hopfield net can oscillate between two states.
* The same-clock host handshake.
* 8 stored patterns for the 120-node default.

Large arrays (1,760 chips, 126,720 PEs) are reachable through `NODES` but
have not been simulated.
