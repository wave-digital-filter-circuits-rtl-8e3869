# Wave-digital 4-D depth filters for raster-scanned light fields

A light field records a scene from a grid of cameras: a 4-D array `w(n_s, n_t, n_u, n_v)`.
Here `(n_s, n_t)` picks the camera and `(n_u, n_v)` picks the pixel. A flat object at depth
`z0` shows up in the 4-D spectrum on a plane whose slope depends only on `z0`. A filter whose
passband is that plane keeps the object at that depth and blurs or suppresses everything
else. That gives refocusing, occlusion removal and depth-based enhancement.

This RTL builds such filters as **wave-digital filters (WDFs)**. Each filter starts from a
passive circuit: a source resistor `R` and a load resistor `R`, with one inductor per
dimension in series between them. Its transmission is

    t(s) = 2R / (2R + Ls*s_s + Lt*s_t + Lu*s_u + Lv*s_v)

This is 1 on the hyperplane `sum Lk*tan(w_k/2) = 0` and falls off away from it. The ratios
of the inductances set the orientation of the plane, and with it the depth. In the
wave-digital form, every circuit element becomes a small digital block that exchanges
"waves" with its neighbours:

- each series junction becomes a **series adapter** (adders and one or two multipliers);
- each inductor becomes a **delay along its own dimension, times -1**.

Doubly terminated lossless circuits are insensitive to small component errors at their
passband. The WDF keeps that structure, so 13-bit multipliers are enough.

Two filters are built. Both run side by side in the top `lf_wdf_top`:

| filter | structure | adapters | inductor delays |
|---|---|---|---|
| non-separable (`wdf_ns_filter`) | two 4-D hyperplanar sections in cascade (`wdf_ns_section`) | per section: 3 reflection-free + 1 unconstrained | per section: s, t, u, v |
| partially separable (`wdf_ps_filter`) | 2-D section in (s,u), then 2-D section in (t,v) (`wdf_2d_section`) | per section: 1 reflection-free + 1 unconstrained | s, u, then t, v |

The cascade of two hyperplanar passbands is a plane in 4-D. When each hyperplane depends
on only two dimensions, the partially separable form gives the same kind of plane with
about half the arithmetic.

## Raster scan and multidimensional delays

The light field enters as one 8-bit pixel per clock in raster order:

    k = n_s + n_t*N_S + n_u*N_S*N_T + n_v*N_S*N_T*N_U

So `n_s` changes fastest and `n_v` slowest. In this order, one step back along a dimension
is a fixed number of samples back in the stream:

| dimension | delay in samples | default (11 x 11 x 128 x 128) |
|---|---|---|
| s | 1 | 1 (a register) |
| t | N_S | 11 |
| u | N_S*N_T | 121 |
| v | N_S*N_T*N_U | 15,488 |

`delay_line` is such a delay. It is a circular buffer that is written once and read one
sample ahead into an output register, so it maps onto block RAM. It advances only on
accepted samples.

**Zero initial conditions (ZIC).** A recursion must not reach across an edge of the grid.
For example, the sample before `n_s = 0` in the stream belongs to the previous row of
cameras. `scan_counter` tracks `(n_s, n_t, n_u, n_v)`. Where the index of a dimension is 0,
the inductor for that dimension feeds the adapter a zero instead of the delayed wave.
`sdp` ("spatial delay processor") combines the delay, the -1 and this multiplexer.

The v dimension is treated as unbounded. It is masked only in the first light field after
reset, which amounts to a buffer that starts at zero. Each later light field continues the
v recursion from the end of the previous one. **To filter light fields independently,
assert `rst` between them.** s, t and u are masked in every light field.

The scan formula above determines the delays. Another common order scans the pixel axes
fastest: buffers of 1, 128, 128*128 and 128*128*11 samples. You get that order by setting
`N_S=128, N_T=128, N_U=11` (and relabelling the axes). The RTL does not change.

## How one sample flows through a section (the delay-free loop)

Adapters in a chain are joined without delays. A naive evaluation would therefore be a
combinational loop: adapter A needs B's reflected wave, and B needs A's. The loop is broken
with **reflection-free (matched) ports**. The resistance of a matched port equals the sum
of the resistances of the adapter's other two ports. The wave it sends out then does not
depend on the wave coming in:

    series adapter, a0 = a1 + a2 + a3
    unconstrained:    b1 = a1 - g1*a0,  b3 = a3 - g3*a0,  b2 = -(a0 + b1 + b3)
    reflection-free:  b1 = a1 - g1*a0,  b3 = -(a1 + a2),  b2 = -(a0 + b1 + b3)

(Port 2 is always the inductor. `b2` is formed from the other outputs so that a
reflection-free adapter needs only one multiplier and an unconstrained adapter only two.)

Non-separable section (`wdf_ns_section`), adapters in chain order:

    x -> [A1 g1 | Ls] -> [A2 g2 | Lt] -> [A3 g3,g4 | Lu] <- [A4 g5 | Lv] <- 0 (load)
                                                               \-> y

1. Forward waves come out of the matched ports. A1 sends `-(x + aLs)` to A2. A2 sends
   `-(that + aLt)` to A3. A4, whose load sends in 0, sends `-aLv` to A3.
2. A3, the only unconstrained adapter, now has all three inputs. It computes its
   reflections and the new wave for Lu.
3. Backward waves: A4 gives the output `y` (the wave into the load) and the new Lv wave.
   A2 and then A1 give the new Lt and Ls waves. A1's reflection into the source is
   discarded.

The unconstrained adapter sits in the middle of the chain. This keeps the longest chain of
adders and multipliers short. The whole chain is combinational within one clock, and the
section output is registered. The s recursion has a delay of one sample, so it has to
close within one clock anyway.

The 2-D section (`wdf_2d_section`) is the two-adapter version of the same flow. A
reflection-free adapter (`g_src`, inductor L1) feeds an unconstrained adapter (`g_in`,
`g_load`, inductor L2) whose third port is the load. `PAIR_SU` uses delays 1 and N_S*N_T;
`PAIR_TV` uses N_S and N_S*N_T*N_U.

## Coefficients

The multipliers come from the port resistances (R = source = load resistance):

- **Non-separable.** `R1 = R + Ls`, `R2 = R1 + Lt`, `R3 = R + Lv`, and
  `g1 = R/R1`, `g2 = R1/R2`, `g3 = 2*R2/(R2+Lu+R3)`, `g4 = 2*R3/(R2+Lu+R3)`, `g5 = R/R3`.
- **2-D section (s,u).** `R1 = R + Ls`, and `g_src = R/R1`, `g_in = 2*R1/(R1+Lu+R)`,
  `g_load = 2*R/(R1+Lu+R)`. The (t,v) section uses the same formulas with Lt and Lv.

The multipliers are **input ports** (`ns_coef_t`, `ps_coef_t` in `wdf_pkg`). You can
retune to another depth between light fields without rebuilding. `wdf_pkg` holds the
example sets, rounded to Q2.11:

| set | values | Q2.11 |
|---|---|---|
| `NS_COEF_EXAMPLE` (g1..g5) | 0.5556, 0.72, 1.087, 0.652, 0.75 | 1138, 1475, 2226, 1335, 1536 |
| `SEC2D_COEF_EXAMPLE` (g_src, g_in, g_load) | 0.5556, 1.0588, 0.5882 | 1138, 2168, 1205 |

Two things to know about the example sets:

- **The non-separable set is not exactly consistent with the formulas.** `g3` and `g4`
  imply `R3 = 1.5`, so `g5` should be 0.667, not 0.75. As a result its DC gain is about
  1.06 instead of 1. The set is used as published. A set computed from the formulas gives
  unity gain on the passband.
- **Which port gets which multiplier.** In the 2-D section, `g_in` (1.0588) belongs to the
  port toward the first adapter and `g_load` (0.5882) to the load. This is the assignment
  for which the two values have the ratio R1/R = 1.8.

## Number formats and arithmetic

| quantity | format |
|---|---|
| input pixel | 8-bit unsigned `p`, entering as the wave `p/256` |
| waves | 15-bit signed, 13 fraction bits (Q2.13, range [-2, 2)) |
| multipliers | 13-bit signed, 11 fraction bits (Q2.11) |
| adapter sums | 20-bit accumulator |

- **Products are truncated toward zero** (magnitude truncation). Floor and
  round-to-nearest both leave a permanent ±1 LSB offset that keeps circulating through the
  recursions after the input has stopped. Magnitude truncation lets the impulse response
  decay to exactly zero.
- **Every wave that leaves an adapter saturates** to Q2.13, and so does the -1 of an
  inductor.

The word lengths are the published ones. The rounding and saturation rules are this
design's own choices.

## Interfaces and timing

`lf_wdf_top` (parameters `N_S=11, N_T=11, N_U=128, N_V=128`; each must be at least 2):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `ns_coef1`, `ns_coef2` | in | 65 | multipliers of the two non-separable sections |
| `ps_coef` | in | 78 | multipliers of the (s,u) and (t,v) sections |
| `in_valid`, `in_pix` | in | 1, 8 | one raster-scanned pixel |
| `ns_valid`, `ns_data`, `ns_last` | out | 1, 15, 1 | non-separable output (Q2.13), last sample of a light field |
| `ps_valid`, `ps_data`, `ps_last` | out | 1, 15, 1 | partially separable output |

Timing:

- **Throughput** is one sample per clock. A light field takes `N_S*N_T*N_U*N_V` clocks:
  1,982,464 at the default size, or 16.8 light fields/s at 33.35 MHz. A colour light field
  is three gray-scale passes, with a reset between them.
- **Latency** is two clocks from `in_valid` to the matching `*_valid` (one register per
  section).
- **Gaps:** when `in_valid` is low, all state holds. The stream does not have to be
  continuous.
- **Reset** clears the counters, pointers and output registers. The buffer memories are
  not cleared; the ZIC masks cover them.

The critical path is one full section: the adapter chain, including up to three multipliers
in series for the non-separable section. No timing closure has been done for any
particular technology.

## Files

`rtl/`:

| file | role |
|---|---|
| `wdf_pkg.sv` | formats, saturation and product helpers, coefficient structs, example sets |
| `scan_counter.sv` | raster position, ZIC flags, end of light field |
| `delay_line.sv` | valid-gated delay of DELAY samples |
| `sdp.sv` | inductor: delay, times -1, ZIC multiplexer |
| `series_adapter_rf.sv` | reflection-free 3-port series adapter (1 multiplier) |
| `series_adapter_un.sv` | unconstrained 3-port series adapter (2 multipliers) |
| `wdf_ns_section.sv` | first-order 4-D hyperplanar WDF |
| `wdf_ns_filter.sv` | two such sections in cascade |
| `wdf_2d_section.sv` | first-order 2-D WDF on (s,u) or (t,v) |
| `wdf_ps_filter.sv` | (s,u) section then (t,v) section |
| `lf_wdf_top.sv` | both filters on one pixel stream |

`tb/`:

- One self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `wdf_ref_pkg.sv` is the reference model. It evaluates the same adapter equations with
  integers, and takes each delay by indexing the light field at its coordinates. It
  therefore checks the delay lines and ZIC logic as well as the arithmetic. A
  double-precision version is included for accuracy measurements.
- `tb_lf_wdf_top` runs four small light fields with random gaps: an impulse, random data
  and a constant. It checks both outputs bit for bit and checks the latency. It also
  confirms that every mechanism was exercised: the s, t, u and v edges, v carried across
  light fields, gaps, and end-of-light-field marks.
- `tb_lf_wdf_top_full` runs a full 11 x 11 x 128 x 128 synthetic scene at default
  parameters. It checks every sample and the exact clock count.
- `tb_lf_wdf_impulse_full` runs the full-size impulse response of both filters. It checks
  the response bit for bit, checks that it dies out to exactly zero, and measures the SNR
  against the double-precision model. The measured SNR is about 23 dB for the
  non-separable filter and 33 dB for the partially separable one. The response spreads
  over a very large number of samples of only a few LSBs, so rounding dominates. The
  published FPGA results were about 61 dB and 60 dB. The reference and rounding behind
  those numbers are not known, so this difference is open.
- `tb_lf_wdf_depth_select` shows depth selectivity and retuning at full size. Two scenes
  each hold a textured plane at one depth (0.25 or 1.0 pixel shift per camera). Both
  filters are tuned to one depth with multipliers computed from the closed-form design
  equations, then retuned to the other. In each case the plane at the tuned depth keeps
  2.8 to 3.4 times the output variance of the other plane. The passband plane is
  Ls*tan(w_s/2) + Lu*tan(w_u/2) = 0, so the inductances are prewarped for the texture
  frequency. Every output is also checked bit for bit.

To simulate with Verilator:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/wdf_pkg.sv tb/wdf_ref_pkg.sv tb/tb_lf_wdf_top_full.sv \
        --top-module tb_lf_wdf_top_full -o sim && ./obj_dir/sim

The full-size runs take a few seconds and about 0.4 GB of memory.

## Departures and open points

- The published FPGA build held only one of the two non-separable sections. This RTL
  builds both, and each has its own coefficients.
- The published text mentions parallel adapters and zero-phase filtering (running the
  filter again over the flipped output). Neither is part of the described data paths, and
  neither is built.
- The published data-path word length is 15 bits. One place gives 13 fraction bits, another
  12. This design uses 13 (two integer bits).
- The input/output handshake, reset, the v-edge handling across successive light fields,
  rounding and saturation are this design's own choices (see above).
- The host-side co-simulation link and the camera hardware are outside the design. The
  pixel stream and coefficient ports are the boundary.
