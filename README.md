# Prime-length DFT from adders only: cyclic convolution with shared constant multipliers

This is synthesizable SystemVerilog for a discrete Fourier transform engine that has no
multipliers at all. It is written after the architecture in the paper *Hardware-Efficient DFT Designs with
Cyclic Convolution and Subexpression Sharing*. For a prime length N, the transform is rearranged
so that every output uses the same short list of constant coefficients. Each constant
multiplication then becomes a handful of shifts and additions, and the additions are shared
between constants. The cosine/sine symmetry of the kernel is used twice. It halves the number
of constants. It also lets one pass produce the outputs for frequency k and N−k together. So a
complete N-point transform leaves the engine every (N−1)/2 clock cycles. Four more adders turn
the same intermediate results into the discrete Hartley transform, which is output alongside.

The default build is the source's headline configuration. That is N = 61, with 16-bit input samples
(real and imaginary) and 16-bit coefficients. N, the input width and the coefficient width
are parameters. Any prime N ≥ 5 works, and all tables are computed at elaboration.

A small separate design sits beside the DFT in the top module. It is the four-tap FIR filter
the source uses to introduce common subexpression sharing (`cse_fir_example`).

## 1. The index permutation: from DFT to cyclic convolution

Let g be a primitive root of the prime N and a_t = g^t mod N. As t runs over 0 … N−2, a_t
visits every non-zero index exactly once. If the non-zero inputs are reordered as
x(a_0), x(a_1), …, and the non-zero outputs likewise, then

    Y(a_l) = x(0) + Σ_t x(a_t) · W^(a_t · a_l),   and a_t · a_l = a_(t+l)  (mod N)

The kernel now depends only on t + l. This is a cyclic convolution, so every output is
computed by the same filter. Y(0) is not part of it. It is a plain sum, done by a separate
accumulator.

For N = 5 and g = 2, the order is a = 1, 2, 4, 3. For the default N = 61, g = 2 as well. The RTL
picks the smallest primitive root itself.

**Even/odd split.** Because g^M = −1 (mod N) with M = (N−1)/2, we have a_(t+M) = N − a_t. Samples are
therefore taken in pairs (x(a_t), x(N−a_t)) and split into

    u_t = x(a_t) + x(N−a_t)     (feeds only the cosine part)
    v_t = x(a_t) − x(N−a_t)     (feeds only the sine part)

Then, with C_l = Σ_t u_t · cos(2π a_(t+l)/N) and S_l = Σ_t v_t · sin(2π a_(t+l)/N):

    Y(a_l)   = x(0) + C_l − j·S_l
    Y(N−a_l) = x(0) + C_l + j·S_l

There are only M products per input pair, and each pass gives two outputs. In real and
imaginary parts, with Cr = R(C)+R(x0), Ci = I(C)+I(x0), Sr = I(S), Si = R(S):

    R(Y(k)) = Cr + Sr    I(Y(k)) = Ci − Si    R(Y(N−k)) = Cr − Sr    I(Y(N−k)) = Ci + Si

## 2. The filter stage ring (the part that needs care)

Each of the four filter stages (cosine for R(u) and I(u), sine for R(v) and I(v)) is a
transposed-form filter closed into a ring:

```
          m(t) ─► adder network ─► m·h_0   m·h_1   …   m·h_(M-1)
                                     │       │            │
      ┌──(0 in first cycle)──► (+) ─►[R0]─► (+) ─►[R1]─ … (+) ─►[R(M-1)]──┐
      │        ±                                                          │
      └───────────────────────────── feedback ────────────────────────────┘
        adder outputs p_0 … p_(M-1) ──(parallel load, last cycle)──► PISO ──► out
```

One input word enters per cycle. Tap j adds m·h_j to the sum arriving from tap j−1, and the
last tap's sum is routed back to tap 0. In the first cycle of a block, every arriving partial sum
is taken as zero. After M cycles, tap j holds the convolution output for l = j + 1. For N = 5
the first block runs like this, with c_r = cos(2πr/5), h_0 = c_4 and h_1 = c_2:

| cycle | input m | tap 0 adder (p)         | tap 1 adder (q)         |
|-------|---------|-------------------------|-------------------------|
| 1     | u(1)    | u(1)·c4                 | u(1)·c2                 |
| 2     | u(2)    | u(1)·c2 + u(2)·c4       | u(1)·c4 + u(2)·c2       |

At the last cycle of the block, all tap sums are copied in parallel into a parallel-in
serial-out register (PISO). The ring starts the next block in the very next cycle, so blocks
follow one another without a gap. The PISO shifts the finished sums out, last tap first,
while the ring works on the next block. The cosine stages add x(0)·2^(CW−1) behind the PISO.

**Sine stages negate the feedback.** The cosine sequence cos(2π a_k/N) repeats with period M in k,
because a_(k+M) = N − a_k and cosine is even. The sine sequence changes sign after M steps
instead. So the sine convolution is *negacyclic*: a partial sum that wraps from the last tap back
to the first must change sign. The sine stages therefore negate the fed-back sum and use
the constants h_k = −sin(2π a_k/N). With that choice, tap j delivers S_(j+1) exactly. The
published block diagram draws the sine stage exactly like the cosine stage, with no sign on the
feedback. Built literally, that would give wrong Y(N−k) values. This has been checked: a copy of
the RTL with the plain feedback fails the filter-stage test.

**Which outputs come out when.** PISO slot s = 0 … M−1 of a block carries l = M − s. Slot s
therefore produces Y(a_(M−s)) and Y(N − a_(M−s)). Slot 0 is always the pair (N−1, 1). The top
module outputs the two indices with the data (`out_k_a`, `out_k_b`), so a consumer never
needs the table.

## 3. Constant multipliers from shifts and adds

`adder_network` multiplies one input word by all M constants of a stage. Each constant is
round(2^(CW−1) · cos(…)) or −round(2^(CW−1) · sin(…)), rounded half away from zero, and
written in canonical signed digits (CSD). The network first forms a few shared
subexpressions of the input: (x≪d)+x and (x≪d)−x for d = 2, 3. Each constant then walks its
CSD digits from the top. Two non-zero digits at most three places apart are taken as one
shifted, signed copy of a shared subexpression. A digit with no partner is a shifted copy of x.

This greedy two-digit rule is this implementation's own choice. The source leaves the sharing
algorithm to the literature. At N = 61 and CW = 16, one cosine network plus one sine network
take 142 adders plus 8 shared subexpressions. Plain CSD would take 265. The four stages of
a complex transform use two such pairs. The published cost table assumes a better sharing
optimiser, so these counts are higher than its estimate.

All products are exact: shifts go left, nothing is truncated.

## 4. Pipeline, interface and timing

```
 input pairs ─► perm_stage ─► uv_preadder ─┬─► filter_stage (cos) R(u) ─► Cr ─┐
 (x(n),x(N-n))  4 RAM banks                 ├─► filter_stage (cos) I(u) ─► Ci ─┤
                ping-pong                   ├─► filter_stage (sin) I(v) ─► Sr ─┼─► output_combiner ─► Y(k), Y(N-k)
                                            ├─► filter_stage (sin) R(v) ─► Si ─┴─► dht_combiner ────► H(k), H(N-k)
                                            └─► y0_accumulator (R, I) ───────────────────────────► Y(0)
```

**Three sections.** Each section holds one block of M cycles:

- **Write.** The permutation stage stores the arriving block into one pair of RAM banks.
- **Filter.** The other pair is read in cyclic order and feeds the filter rings and the Y(0)
  accumulator. This section runs one cycle behind the write section, because the banks have a
  registered read port.
- **Output.** The PISOs shift the finished block out, two outputs per cycle.

The bank pairs swap roles at every block boundary. A bank holds x(a_t) (bank A) or x(N−a_t)
(bank B) at address t. The address generator puts each arriving pair in its place from a
discrete-logarithm table.

**Input.** While `in_ready` is high, each cycle with `in_valid` high delivers `in_xn` = x(n) and
`in_xnn` = x(N−n), for n = 1, 2, …, M in that order. `in_x0` = x(0) goes with the first pair.
Samples are signed IW-bit numbers, real and imaginary.

**Output.** Each `out_valid` pulse gives Y(`out_k_a`) on `out_a_*` and Y(`out_k_b`) = Y(N−k) on
`out_b_*`. In the same cycle, the Hartley outputs H(k) and H(N−k) are on `out_ha_*` and
`out_hb_*`. There are M pulses per transform. `out_y0_valid` marks the first of them and carries
Y(0) on `out_y0_*`. There is no output back-pressure.

**Rate and latency.** With a steady input, one transform goes in and one comes out every
M cycles. The first output of a block appears 2M + 2 cycles after its first input pair was
presented: 62 cycles at N = 61.

**Stalls and draining.** A single enable moves every datapath register. If `in_valid` drops
inside a block, the whole pipeline freezes. If no input is waiting at a block start while blocks
are still in flight, the controller runs an empty block without input, and `in_ready` is low
while it does. This lets the last real blocks leave the pipeline. After the input stops, three
such blocks drain everything and the engine goes idle.

**Reset.** The synchronous active-low `rst_n` clears the control state only. Datapath registers
never need a reset, because every block starts from zeroed partial sums.

## 5. Number format

Outputs Y(k), k ≠ 0, are the exact integer result of the DFT sum with the rounded integer
coefficients above. They are scaled by 2^(CW−1), which includes x(0). They are IW + CW +
⌈log2 M⌉ + 4 bits wide (41 bits at the default), so nothing can overflow. Y(0) is the plain sum
of the samples, IW + ⌈log2 N⌉ + 1 bits wide. To get the true DFT, divide by 2^(CW−1). The
only error is then the coefficient rounding.

### 5a. Hartley transform output

The Hartley transform H(k) = Σ x(n)·[cos(2πnk/N) + sin(2πnk/N)] uses the same two sums as the
DFT. If C and S are the cosine and sine sums, then Y(k) = C − jS, H(k) = C + S and
H(N−k) = C − S. With Cr, Ci from the cosine stages, Si = R(S) and Sr = I(S):

    R(H(k)) = Cr + Si    I(H(k)) = Ci + Sr    R(H(N−k)) = Cr − Si    I(H(N−k)) = Ci − Sr

For real input, H(k) = R(Y(k)) − I(Y(k)) = R(Y(k)) + I(Y(N−k)). For complex input, the result
is the Hartley transform of the real and the imaginary parts, taken separately. H(0) = Y(0).
The scaling and widths are the same as for Y(k).

## 6. Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `dft_top` | `N` | 61 | transform length, prime ≥ 5 (elaboration error otherwise) |
| | `IW` | 16 | input word width |
| | `CW` | 16 | coefficient word width |
| | `FW` | 16 | FIR example word width |
| | `REAL_IN` | 0 | 1 builds the real-input variant (see below) |
| `dft_pkg` | `SUBEXPR_MAXD` | 3 | widest digit gap a shared subexpression spans |

The widths of all internal signals follow from these.

**Real-input variant.** With `REAL_IN = 1`, the imaginary parts of u, v and x(0) are known to
be zero. So the two stages that would filter them, I(u) through a cosine stage and I(v) through
a sine stage, are not built, and neither is the imaginary Y(0) accumulator. The banks store real
parts only. That halves the datapath and the memory. The `in_*_im` ports are ignored, and the
outputs keep their format: R(Y(k)) = Cr and I(Y(k)) = −Si.

## 7. Files

| file | role |
|---|---|
| `rtl/dft_pkg.sv` | primitive root, power and log tables, coefficients, CSD-to-term decomposition (all elaboration-time functions); shared types |
| `rtl/dft_top.sv` | top: wiring, output index table and output registers, FIR example instance |
| `rtl/dft_controller.sv` | block phase counters, bank ping-pong, stall/drain flow control |
| `rtl/perm_stage.sv` | four RAM banks plus x(0) buffer, read/write pairing |
| `rtl/ram_bank.sv` | one bank: one write port, registered read port |
| `rtl/perm_addr_gen.sv` | pair index → bank address and bank swap |
| `rtl/uv_preadder.sv` | u = a + b, v = a − b |
| `rtl/adder_network.sv` | shift-and-add multiplication by all constants of a stage |
| `rtl/filter_stage.sv` | convolution ring, PISO, x(0) addition |
| `rtl/piso.sv` | parallel-in serial-out chain |
| `rtl/y0_accumulator.sv` | Y(0) accumulator with first-cycle multiplexer |
| `rtl/output_combiner.sv` | the four output adders |
| `rtl/dht_combiner.sv` | the four Hartley output adders |
| `rtl/cse_fir_example.sv` | four-tap FIR: y = w[0] − w[0]≫2 + w[2]≫1 − x[3]≫4 with w[i] = x[i] − x[i+1]≫1 (four adders instead of six), output scaled by 16 to stay exact |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_dft_lengths` |
| `tb/dft_scoreboard.sv`, `tb/dft_len_harness.sv`, `tb/filter_stage_harness.sv` | shared stimulus and reference models |

## 8. Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with `$finish`. To run one
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/dft_pkg.sv tb/tb_dft_top.sv --top-module tb_dft_top
./obj_dir/Vtb_dft_top
```

Replace `tb_dft_top` with any other testbench name. The testbenches use only `$urandom` and
plain arrays, and compute their reference values themselves.

- `tb_dft_top` runs the default N = 61 engine end to end on twelve transforms. They are a
  full-scale block, an impulse and random data. The first six go back to back, to check the
  2M + 2 latency and the M-cycle spacing. The rest have random stalls and gaps. Every output is
  compared with a direct DFT sum, and every Hartley output with a direct Hartley sum. The test also counts stalls, drain blocks, overlapped blocks
  and Y(0) outputs, and fails if any of them never happened. It checks the FIR example too.
- `tb_dft_lengths` runs lengths 5, 7, 11, 17, 31, 37, 61, 67, 127 and 131 at 8-bit and 16-bit
  word widths (N = 61 at 16 bits is `tb_dft_top`). It also runs the real-input variant at N = 61
  with 16-bit words. These are the transform lengths of the
  source's area comparison. It takes a few minutes to compile.
- `tb_filter_stage` also checks the N = 5 tap sums against the table in section 2.

## 9. How this relates to the published architecture

These parts follow the source:

- the cyclic-convolution reformulation;
- the u/v split;
- four filter stages, each an adder network, a transposed-form ring with feedback of the last
  tap, and a PISO;
- the x(0) addition behind the cosine PISO;
- the separate Y(0) accumulator with a first-cycle multiplexer;
- four RAM banks in two ping-pong pairs with an address generator;
- the output adders;
- one transform per (N−1)/2 cycles.

These points are this implementation's own, or differ from the source:

- **Sine feedback.** It is negated, and the sine constants are −sin (section 2). The published
  drawing shows neither.
- **Input format.** One pair (x(n), x(N−n)) arrives per cycle, plus x(0). The source draws a
  single input stream and does not define the port.
- **Bank multiplexers.** The source says the banks give the right order without multiplexers.
  This design uses a swap multiplexer on the write side and a pair-select multiplexer on the read
  side.
- **RAM read.** The read is registered. That adds one cycle of latency, and the u/v pre-adder
  sits in the same clock cycle as the adder network. The source's cycle-time estimate counts
  only the adder network, one addition and the flip-flop.
- **Added logic.** The stall and drain handshake, the index outputs and the output registers are
  additions.
- **Sharing.** The subexpression sharing is a simple greedy rule, not an optimiser.
- **Precision.** Outputs are full precision. The source does not say how results are rounded.
- **Hartley output.** The source says only that adding real and imaginary DFT outputs gives the
  DHT. Here it is formed from the stage results instead (section 5a). For real input that is
  the same sum, and it also holds for complex input.

Not built:

- Interleaving the real and imaginary parts through one cosine stage and one sine stage. The
  source mentions this as a further saving.
- Chirp-z pre- and post-multipliers for non-prime lengths. The source mentions these only as an
  alternative.
