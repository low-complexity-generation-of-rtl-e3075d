# SCCSS correlator with on-the-fly coefficient generation

A scalable complete complementary set of sequences (SCCSS) of order 2^n is a
family of 2^n binary spreading codes, each 4^n chips long. Their aperiodic
auto-correlation is zero at every non-zero shift that is a multiple of 2^n.
So is the cross-correlation of any two different codes in the set, at every
shift that is a multiple of 2^n, including zero. A receiver for such codes
needs a 4^n-tap correlator, and switching between codes usually means storing
2^n x 4^n coefficient bits in a ROM. That is 32 kbit for the 1024-chip set.

This design stores nothing. The correlator's adder tree is steered by a
*modified* coefficient per cell. For an SCCSS, that coefficient is a one- or
two-gate function of the tap index and the code index. A small generator, made
of a chip counter and that function, produces the coefficients of any code in
4^n clocks. A single filter can therefore be shared by every code of the set.

The default configuration is order 8 (n = 3): 8 codes of 64 chips, a 64-tap
correlator and 8-bit signed samples.

## The codes

Write a chip index t (2n bits) as t = i + 2^n j. Here i is its low half (the
row) and j its high half (the column). Chip t of code k is

    c_k(t) = (-1)^G,   G = XOR over r = 0..n-2 of (j[r+1] ^ i[r] ^ k[r]) & j[r]
                          ^ (i[n-1] ^ k[n-1]) & j[n-1]

Each code is one of 2^n mutually orthogonal "Golay-paired" Hadamard matrices of
size 2^n x 2^n, read row-major. The set of order 2^n contains the sets of all
smaller orders, which is what makes it scalable.

## The adder/subtractor tree and its modified coefficients

This is the part that takes the most thought.

A correlator computes y = sum_t d(t) c(t), with c(t) = +1 or -1. Built as a
tree, it needs N - 1 two-input cells over log2 N levels. Each cell computes
either A + B or A - B, and only B is ever negated. One bit per cell, c_hat,
chooses between the two. Cells and coefficients are matched by tap index:

* The cell steered by c_hat(t) is at level l, where l is the lowest set bit of
  t. Operand A is the partial sum of taps [t - 2^l, t). Operand B is the
  partial sum of taps [t, t + 2^l). At level 0, c_hat(1) joins d(0) and d(1),
  and c_hat(3) joins d(2) and d(3). At level 1, c_hat(2) joins taps 0..1 with
  taps 2..3. At the top level, c_hat(N/2) joins the two halves.
* c_hat(0) has no cell. It sets the sign of the final sum.

Tap t therefore enters y with the sign (-1)^(c_hat(t) ^ c_hat(m1) ^ c_hat(m2) ^
... ^ c_hat(0)). Here m1 is t with its lowest set bit cleared, m2 is m1 with
its lowest set bit cleared, and so on down to 0. For example, tap 7 gets
c_hat(7) ^ c_hat(6) ^ c_hat(4) ^ c_hat(0). Going the other way, the modified
coefficients of any +/-1 filter are

    c_hat(0) = [c(0) = -1],    c_hat(t) = [c(t) c(m1) = -1]  for t > 0.

For an SCCSS, this product of two chips collapses to one bit. Let l be the
lowest set bit of t:

| lowest set bit l of t | c_hat(t)          |
|-----------------------|-------------------|
| t = 0                 | 0                 |
| 0 <= l <= n-1         | t[l+n]            |
| n <= l <= 2n-2        | t[l+1] xor k[l-n] |
| l = 2n-1              | k[n-1]            |

Worked example, order 8: tap t = 34 = 100010b of code k = 5. The lowest set bit
is l = 1, so c_hat = t[4] = 0.

When l is in the low half of t, the result does not depend on the code at all.
When l is in the high half, the result is a single code bit, possibly inverted.
A parallel correlator with a fixed t per cell therefore needs at most one XOR
per tap to follow the code index. c_hat(0) is always 0, so the root sign stage
never negates for these codes. It is still built, and tested with arbitrary
coefficients, so that the tree remains a general +/-1 correlator.

## Blocks

```
             load, k_sel                       s_valid, s_data
                 |                                   |
        +--------v---------+                +--------v---------+
        | sccss_seq_gen    |                | sccss_tap_delay  |  64 x 8-bit
        |  chip counter t  |                |  d(0)=oldest ..  |
        |  code register k |                |  d(63)=newest    |
        |  sccss_coeff_gen |                +--------+---------+
        +--------+---------+                         | d[0..63]
                 | c_hat, one per clock              |
        +--------v---------+  chat[0..63]  +---------v---------+
        | coefficient      |-------------->| sccss_addsub_tree |  6 levels of
        | shift register   |               |  sccss_addsub x63 |  sccss_addsub
        +------------------+               |  + root sign      |  + sign stage
                                           +---------+---------+
                                                     | y, y_valid
```

| file | role |
|---|---|
| `rtl/sccss_pkg.sv` | the c_hat rule as a function, for any order up to 2^16 |
| `rtl/sccss_coeff_gen.sv` | c_hat(t) for code k, one output register, no other state |
| `rtl/sccss_seq_gen.sv` | chip counter, code register and coefficient generator: c_hat(0..4^n-1) of one code, one per clock |
| `rtl/sccss_addsub.sv` | one registered cell, A + B or A - B |
| `rtl/sccss_addsub_tree.sv` | log2 N levels of cells plus the root sign, all registered |
| `rtl/sccss_tap_delay.sv` | the sample delay line |
| `rtl/sccss_correlator.sv` | top level: code loading, coefficient register, datapath, valid tracking |

## Top-level interface and timing (`sccss_correlator`)

Parameters: `N_ORD` (default 3) and the sample width `DW` (default 8). The
derived sizes are TAPS = 4^N_ORD and output width DW + 2·N_ORD + 1. The reset
`rst_n` is synchronous and active low.

* **Loading a code.** Raise `load` with `k_sel` for one clock while `cfg_busy`
  is low. From the next clock `cfg_busy` is high for TAPS clocks, and
  `coef_ready` is low. The generator shifts c_hat(0) ... c_hat(TAPS-1) into the
  coefficient register. `coef_ready` rises TAPS + 1 clocks after the accepting
  edge, which is 65 clocks at the default size. `code` shows the code being
  loaded, or the code already loaded. A `load` while `cfg_busy` is high is
  ignored.
* **Samples.** At most one sample per clock, with `s_valid` high. Samples always
  enter the delay line, including during a load and before the first load.
* **Results.** Every sample accepted while `coef_ready` is high produces one
  result. y = sum_t d(t) c_k(t), where d(0) is the oldest of the last TAPS
  samples. The result comes with `y_valid` exactly 2·N_ORD + 1 clocks after the
  edge that accepted the sample: one clock per tree level plus the sign stage.
  The filter takes a new sample every clock. Accepting a new load discards all
  results still inside the tree.

After a code of TAPS chips has been sent chip 0 first, chip t sits in d(t). The
aligned auto-correlation then equals TAPS times the chip amplitude.

## Cost

The serial generator has a 2n-bit chip counter, an n-bit code register and a
1-bit output register: 3n + 1 flip-flops, or 10, 13 and 16 for 64-, 256- and
1024-chip codes. It adds three flip-flops for its handshake (busy, valid,
last). The coefficient logic is a priority encoder on t, a multiplexer and one
XOR. There is no table of any size.

At the default size, the whole correlator synthesises (generic coarse
synthesis) to about 360 word-level cells and 1240 flip-flop bits. Most of
these are the 512 delay-line bits and the tree's pipeline registers.

## What is this design's own choice

The code construction, the c_hat rule, the tree structure and the generator
(a counter plus logic, with a registered output) follow the published scheme.
The scheme leaves the following open; this design chooses:

* The coefficients reach the shared filter through a TAPS-bit shift register
  that is loaded serially. A fully parallel alternative would give each cell
  its own fixed-t copy of the rule, with k wired to all of them. That costs at
  most one XOR per tap and switches code in one clock. It is not built here.
* The handshake: load, busy, ready, the ignored load, the flushing of in-flight
  results, and the valid pipeline.
* Sample width (8-bit signed), the growth of the result by one bit per level,
  and a registered cell at every level.
* The order of the taps in time: d(0) is the oldest sample.
* Synchronous reset of the control state and the delay line. The arithmetic
  registers have no reset; `y_valid` tells when `y` means something.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=... failures=...`
line. Every testbench also has a watchdog. The reference model
`tb/tb_sccss_ref_pkg.sv` builds chips from the closed form above and derives
c_hat from chip products. It never uses the c_hat table that the RTL
implements.

| testbench | what it checks |
|---|---|
| `tb_sccss_coeff_gen` | every (t, k) pair for orders 4, 8, 16 and 32, and the worked example |
| `tb_sccss_seq_gen` | all 8 codes: 64 values, first value 2 clocks after start, `c_last`, a second start ignored |
| `tb_sccss_addsub` | corner and random operands |
| `tb_sccss_tap_delay` | random samples with gaps against a queue model, and reset |
| `tb_sccss_addsub_tree` | random coefficient bits against the sign-chain formula, and real codes against direct correlation, 7-clock latency |
| `tb_sccss_correlator` | the top at its default size: 9 loads, bursts of each code framed by zeros, random data with idle clocks, loads during traffic; every output, its latency, the load time, and the zero/peak correlation properties |
| `tb_sccss_workloads` | the top at 64, 256 and 1024 chips (all 64 code pairs at 64 chips, a sample of pairs at the larger sizes); prints the worst-case side-lobes |

At the default size, the worst off-grid auto-correlation side-lobe seen is 11
and the worst cross-correlation is 35, out of a peak of 64. Every shift that is
a multiple of 8 gives exactly 0.

Simulating with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/sccss_pkg.sv tb/tb_sccss_ref_pkg.sv tb/tb_sccss_correlator.sv \
    --top-module tb_sccss_correlator
./obj_dir/Vtb_sccss_correlator
```

To run another testbench, replace the testbench file and the top module name.
Each testbench that uses the reference package needs `tb/tb_sccss_ref_pkg.sv`
listed before it. To try another order, set `N_ORD` on `sccss_correlator`. Its
own testbench is written for the default order; `tb/sccss_sweep_bench.sv` takes
the order as a parameter.
