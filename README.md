# Fully pipelined jumping-window decoder for spatially coupled serially concatenated codes

This design is a turbo-style decoder for spatially coupled serially concatenated codes (SC-SCC), built so that one complete code block is decoded on every clock cycle.

A serially concatenated code chains two convolutional encoders: the outer encoder, an interleaver, and the inner encoder. Spatial coupling then spreads each block's interleaved outer output over the inner code words of the next m blocks. This makes the code stronger without longer blocks. The catch is that a block can no longer be decoded on its own: its bits are mixed into its neighbours.

The usual way to decode such a stream is window decoding. A window of W blocks is iterated, and then the window moves on by one block. That schedule does not map well onto a fully pipelined, iteration-unrolled decoder:

- Short blocks need large windows.
- The iterations per window position become fractional or fall below one.
- The pipeline would have to change shape with the block size.

The decoder here uses a *jumping window*. The number of iterations per window position stays fixed, and the window moves by several blocks at a time. In hardware this becomes a fixed chain of half-iteration stages through which many independent coupled streams flow, one block per clock.

The repository also contains the matching encoder, so that an encode → channel → decode loop can be built from one top.

## The code

The component code is the rate-1/2 recursive systematic convolutional code (1, 5/7):

- Two delay elements, four states.
- Feedback node `a[k] = u[k] ^ a[k-1] ^ a[k-2]`.
- Parity `p[k] = a[k] ^ a[k-2]`.

Both the outer and the inner encoder use it.

For block t of a stream (`rtl/scscc_encoder.sv`):

1. The outer encoder maps the K information bits `u_t` to K parity bits `p^O_t`.
2. Π1 interleaves `(u_t, p^O_t)` into a 2K-bit sequence `q_t`.
3. `q_t` is split into m+1 subsequences of length 2K/(m+1).
4. The inner encoder's input is `(q_{t,0}, q_{t-1,1}, …, q_{t-m,m})`. That is: subsequence 0 of this block, subsequence 1 of the previous block, and so on. This is the coupling. The input is interleaved by Π2.
5. The inner encoder produces 2K parity bits. Only the even-indexed ones are sent, so the rate is 1/3: `v_t = (u_t, p^O_t, p^I_t[0,2,4,…])`.

Neither encoder is terminated. The final trellis states of block t are the start states of block t+1. Each stream starts from zero states and zero history.

## The decoder pipeline

`rtl/scscc_jwd_decoder.sv` is a chain of n_HI = 2·I_EFF half-iteration (HI) stages:

- Even positions are inner decoders (`inner_hi_stage`).
- Odd positions are outer decoders (`outer_hi_stage`).
- Every block therefore receives I_EFF full iterations.
- The final outer stage gives the hard decisions.

Each HI stage is a complete max-log-MAP decoder, unrolled in space (`mlm_hi`). Every trellis step has its own hardware:

- branch metric units (`bmu`);
- radix-4 add-compare-select recursion units (`mlm_ru`), separate for the forward and backward directions;
- a soft output unit (`sou`).

The recursions run from both ends of the block at once, advancing SPS trellis steps per pipeline stage. One more stage computes the soft outputs. An HI stage therefore has a latency of LAT = N/SPS + 2 cycles for N trellis steps.

The inner trellis is 2K steps long and the outer one K steps. The inner stages run twice as many steps per pipeline stage, so both stage types have the same latency LAT = K/SPS + 2.

The two stage types differ in their soft outputs:

- Outer stages produce extrinsic values for both the information and the parity bits. Both of these feed the inner code.
- Inner stages produce extrinsic values only for their systematic input.

Interleaving is pure wiring (`qpp_perm`) and costs no cycles.

### Streams and the moving window

A block cannot leave stage j until its coupled neighbours have been through the stages it depends on. The decoder therefore does not feed consecutive blocks of one stream in consecutive cycles. Instead it serves **NSTREAMS = LAT independent coupled streams**, interleaved block by block: the block entering in cycle c belongs to stream c mod LAT.

One HI time (LAT cycles) after block t of a stream enters stage 0, block t+1 of the same stream enters stage 0 and block t moves on to stage 1. At any moment one stream therefore holds consecutive blocks t, t-1, …, t-n_HI+1 in stages 0 … n_HI-1. Each block is at a different stage of convergence.

This is the decoding window: n_HI blocks wide. Every HI time it jumps forward by one block per stage, which is two blocks per full iteration. The schedule is fixed by the hardware. It does not depend on how K and m are chosen, which was the point of jumping-window decoding.

### Coupling links

Through the coupling, the inner code of block b also covers subsequence d of block b-d, for d = 1…m.

**Inner stage j.** It needs the freshest outer estimate of block b-d. That block is d stages further down the chain, so it is:

- the output of outer stage j+d-1, which is a feedback connection to a later stage; or
- when that position is an inner stage or lies past the end, the output of the next earlier outer stage. That output is held in a `delay_line` for the missing HI times.

**Outer stage j.** It needs the inner extrinsic of block b+d, which is d stages behind. That is the output of inner stage j-d-1, or of an earlier inner stage delayed in the same way. If block b+d has not reached any inner stage yet, the contribution is zero.

**What the links carry:**

- Outer to inner: channel LLR plus outer extrinsic.
- Inner to outer: the inner extrinsic only.

**Block tags.** Every block travels with a 16-bit sequence number within its stream. A link's data are used only if the sequence numbers differ by exactly d. This covers pipeline fill, stream starts and restarts without any separate control logic. Before a stream's first block, the missing bits are known zeros: the encoder starts from zero history, so the decoder feeds the maximum positive LLR.

### Trellis boundaries

Blocks are not terminated, so every recursion starts from the neighbour's metrics:

- **Forward recursion of block b** starts from the final forward metrics of block b-1. Those came out of the *same* stage one HI time earlier.
- **Backward recursion** starts from the first backward metrics of block b+1. Those came out of stage j-2, where block b+1 is at that moment.
- **First block of a stream** starts in the known state 0.

## Timing and throughput

| quantity | value at defaults (K = 32, M = 15, I_EFF = 8, SPS = 2) |
|---|---|
| HI stage latency LAT | K/SPS + 2 = 18 cycles |
| stages n_HI | 2·I_EFF = 16 |
| coupled streams | 18 |
| decoder latency | 1 + n_HI·LAT = 289 cycles |
| throughput | one 32-bit information block per clock |
| encoder latency | 1 cycle, one block per clock |

At 800 MHz, one 32-bit block per clock is 25.6 Gbit/s. With K = 256 it would be 204.8 Gbit/s.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| top, decoder, encoder | `K` | 32 | information bits per block |
| top, decoder, encoder | `M` | 15 | coupling memory m (2K must be divisible by m+1) |
| top, decoder | `I_EFF` | 8 | iterations; number of HI stages is 2·I_EFF |
| top, decoder | `SPS` | 2 | outer trellis steps per pipeline stage (even; the inner stages use 2·SPS) |

The default is the latency-1024 scenario with K = 32, window W = 32, m = W/2 - 1 = 15 and 8 iterations. Larger blocks (K = 64 … 256, with m = 7, 3, 1 at the same latency) only need the parameters changed.

The package `rtl/scscc_pkg.sv` sets:

- LLR width: 8 bits, saturating at ±127.
- State metric width: 14 bits, renormalised to state 0 after every radix-4 step.
- Sequence tag width: 16 bits.
- Interleaver coefficients.

## Where this design makes its own choices

The published architecture is conceptual. The following points are fixed by this design, not taken from it:

- **Interleavers.** Π1 and Π2 are quadratic permutation polynomials π(i) = (F1·i + F2·i²) mod 2K, with (7, 16) and (11, 6). They need no tables. Π1 takes x = (u, p^O) with u first.
- **Puncturing.** The even-indexed inner parity bits are kept. Punctured positions enter the decoder as LLR 0.
- **Word widths, metric normalisation, the LLR sign convention** (positive means 0), and the sum-of-zero-bit-LLRs branch metric.
- **Inner-first order.** The stage sequence starts with an inner stage, and the decisions come from the a-posteriori LLR of the last outer stage.
- **Link and boundary rules.** The rules for where each coupling link and boundary metric is taken from, and the use of sequence tags to validate them.
- **Window position.** The window moves one block per HI time, following the stream ordering. The published scenarios describe windows of W blocks moving by Δ = W/4·K bits. This decoder holds n_HI = 16 blocks and moves two blocks per iteration, rather than reproducing those W/Δ pairs literally.
- **Stream restarts.** Streams are assumed to deliver blocks without gaps once started. A new stream starts with `in_first`.
- **FIFOs.** The buffering that the area model calls FIFOs is built from plain shift-register delay lines.

Not covered:

- The channel, demodulation and LLR scaling in front of the decoder.
- Area, power or frequency: there is no technology library here.

The published area and BER results were not reproduced.

## Files

| file | contents |
|---|---|
| `rtl/scscc_pkg.sv` | types, widths, trellis functions, QPP index |
| `rtl/scscc_jwd_top.sv` | encoder and decoder side by side |
| `rtl/scscc_jwd_decoder.sv` | the HI-stage chain, coupling links, streams |
| `rtl/inner_hi_stage.sv`, `rtl/outer_hi_stage.sv` | HI stages with their interleavers |
| `rtl/mlm_hi.sv` | pipelined max-log-MAP core |
| `rtl/bmu.sv`, `rtl/mlm_ru.sv`, `rtl/sou.sv` | branch metric, radix-4 recursion, soft output units |
| `rtl/qpp_perm.sv` | interleaver / deinterleaver wiring |
| `rtl/delay_line.sv` | fixed delay used on links and beside each stage |
| `rtl/scscc_encoder.sv`, `rtl/rsc_encoder.sv` | multi-stream SC-SCC encoder, block-parallel RSC encoder |
| `tb/scscc_ref_pkg.sv` | reference models: bit-serial RSC, textbook max-log-MAP, SC-SCC encoder, Gaussian channel |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench compares its module against the reference models in `tb/scscc_ref_pkg.sv`. The models are written independently of the RTL structure: a serial RSC encoder, and a whole-array max-log-MAP without normalisation. Each testbench prints `TB_RESULT checks=… failures=…`.

- **`tb_mlm_hi`** checks every output against the reference max-log-MAP for two SPS values. It also checks the latency.
- **`tb_scscc_jwd_decoder`** (K = 16, m = 1, I_EFF = 3) decodes noiseless and noisy streams. It checks the 1 + n_HI·LAT latency and block order.
- **`tb_scscc_jwd_top`** (K = 8, m = 3, I_EFF = 3) runs the full loop: encoder, then a BPSK Gaussian channel with 8-bit LLRs, then the decoder. It counts each decoder mechanism and fails if any of them never happens:
  - coupled data accepted at inner and outer stages;
  - a feedback link;
  - boundary metrics from both neighbours;
  - a stream start and a restart;
  - idle slots;
  - corrected channel errors.
- **`tb_scscc_jwd_full`** runs the same loop on the top at its default parameters: K = 32, m = 15, 16 stages, 18 streams, 20 blocks per stream in each of a noiseless and a noisy phase. Compiling it takes several minutes. The simulation itself takes under a second.

Stages that contain interleavers are tested at K = 16 or more. At 16 elements both QPP permutations used here are their own inverses, so a smaller test could not tell an interleaver from its deinterleaver.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/scscc_pkg.sv tb/scscc_ref_pkg.sv rtl/*.sv tb/tb_scscc_jwd_top.sv \
    --top-module tb_scscc_jwd_top -Mdir obj_top -o sim
./obj_top/sim
```

The same command works for any `tb/tb_<name>.sv`. Change the `localparam`s at the top of a testbench to try other sizes.
