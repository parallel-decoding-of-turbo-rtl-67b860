# Parallel turbo decoding with multi-point trellis termination

A turbo decoder spends most of its time in the forward and backward
recursions of its soft-in soft-out (SISO) decoders, and both recursions run
over the whole frame: a 1000-bit frame means about 1000 sequential trellis
steps per half-iteration. This design removes that bottleneck at the encoder.
Both constituent encoders are driven back to the all-zero state not only at
the end of the frame but at Q points, every K = N/Q bits. Every sub-block then
starts and ends in a known state and is an independent trellis, so Q SISOs
can decode the Q sub-blocks side by side. A half-iteration shrinks from about
N + 3 steps to K + 3 steps. The price is 12 extra tail bits per termination
point: the code rate becomes N / (3N + 12Q).

Running Q SISOs in parallel only pays off if their memory accesses never
collide. This design uses a collision-free interleaver: at every trellis step
the Q SISOs address Q different memory banks at one common address, in both
the interleaved and the natural order.

The RTL holds both ends of the link:

* `turbo_encoder_mpt`: the multi-point terminated turbo encoder.
* `turbo_decoder_mpt`: the parallel decoder, with Q Log-MAP SISOs, banked
  memories and the collision-free (de)interleaving network.
* `turbo_codec_top`: both of them side by side.

The channel between the two is not part of the design.

Default configuration: N = 1000, Q = 5 (K = 200), 6 iterations and 8-state
RSC constituent codes with polynomials (13,15) octal (the UMTS code). Each
SISO then works on 203 trellis steps instead of 1003, about 80 % less
decoding time per half-iteration. Q = 2 (K = 500) is the other evaluated
configuration and needs only a change of parameters.

## The code and the frame

Constituent encoder (`rsc_encoder`): the state is three bits
`{s1,s2,s3}`, with s1 the newest.

* Feedback: `a = u ^ s2 ^ s3` (polynomial 13 octal).
* Parity: `p = a ^ s1 ^ s3` (polynomial 15 octal).
* Next state: `{a, s1, s2}`.
* Termination: the input is set to `s2 ^ s3`, which makes `a = 0`. Three such
  steps empty the register. The input bit `t` and the parity bit `z` of each
  of those steps are sent.

Frame layout, for sub-block j = 0..Q-1:

```
C_{jK} ... C_{jK+K-1}   T_j   T'_j
C_k  = (X_k, P1_k, P2_k)                   data symbol
T_j  = (t0,z0) (t1,z1) (t2,z2) of encoder 1  3 tail symbols
T'_j = the same for encoder 2                3 tail symbols
```

So there are Q(K+6) symbols and 3N + 12Q bits. P2_k is the parity that
encoder 2 produces for the k-th bit of the interleaved frame X'. Encoder 2 is
also terminated after every K bits of X', so each sub-block of X' is an
independent trellis too.

## The collision-free interleaver

The frame is kept in Q banks of K words, with bank b holding sub-block b.
Interleaved position jK + t, which is step t of sub-block j for decoder 2,
takes the natural-order bit at

```
bank    = (j + t) mod Q
address = g(t) = (F1*t + F2*t^2) mod K        (quadratic permutation polynomial)
```

At a given step t, every SISO j uses the same address g(t). The banks differ
from SISO to SISO, because `(j + t) mod Q` takes each value once as j runs
over the Q SISOs. The bank network therefore reduces to a rotation by
`t mod Q` (`cf_crossbar`). For the mapping to be a permutation, g must be one
on 0..K-1: every prime factor of K must divide F2, and F1 must be coprime to
K. The defaults F1 = 13, F2 = 50 satisfy this for K = 200; F1 = 3, F2 = 10
does for K = 500.

`cf_interleaver` produces g(t) and `t mod Q` without a multiplier. It uses
second differences, `g(t+1) = g(t) + d(t)` and `d(t+1) = d(t) + 2*F2`, with
`d(0) = F1 + F2`, all mod K. The generator steps up during the forward
recursion and down during the backward recursion, so its output always
belongs to the current step.

The same property holds in the other direction. Natural position
(bank j, address t) is interleaved position j'K + t' with t' = g^-1(t) and
j' = (j - t') mod Q. So when the Q SISOs of decoder 1 sit at step t, their
values belong at one common address g^-1(t) in Q different banks of an
interleaved-order memory, and the network is again a rotation, now by
g^-1(t) mod Q. `cf_interleaver` also outputs g^-1(t) and g^-1(t) mod Q. It
looks them up in two K-entry constant tables that it computes from the
polynomial at elaboration time.

The architecture only needs the collision-free property. Any interleaver
with that property can replace this one by changing `cf_interleaver` (and,
for a non-rotational bank mapping, `cf_crossbar`). The choice affects error
rates: this interleaver is not the UMTS one.

## Decoder architecture

```
 soft symbols ──► rx_buffer: systematic / parity-1 / parity-2, Q banks each, + tails
                     │ sys (common addr g(t) or t)      │ parity (addr t, bank j)
                     ▼                                  ▼
               cf_crossbar (rotate by t mod Q) ──► SISO 0 .. SISO Q-1 ──► cf_crossbar (inverse)
                     ▲                                       │ Le, decision
     extrinsic banks, natural order     (Q x K x 8 bit) ◄── decoder 2 ─┤
     extrinsic banks, interleaved order (Q x K x 8 bit) ◄── decoder 1 ─┘
       (SISO j reads bank j at address t from the memory the other decoder wrote)
     decision banks  (Q x K x 1 bit)                ──► serial output
                 turbo_dec_ctrl + cf_interleaver sequence all of it
```

* **Half-iterations.** Decoder 1 (`hi = 0`) works in natural order: SISO j
  uses bank j at address t and parity 1. Decoder 2 (`hi = 1`) works in
  interleaved order: SISO j reads its systematic value from bank
  `(j+t) mod Q` at address g(t), and parity 2 from bank j at address t. One
  set of Q SISOs serves both decoders in alternate half-iterations.
* **Two extrinsic memories, one per reading order.** Each extrinsic value is
  written straight into the order in which the other decoder will read it,
  so every SISO reads its a-priori values linearly: bank j, address t.
  Decoder 2 writes into the natural-order memory at address g(t), rotated by
  `t mod Q` (deinterleaving). Decoder 1 writes into the interleaved-order
  memory at address g^-1(t), rotated by g^-1(t) mod Q (interleaving). A
  half-iteration only reads one memory and only writes the other. The first
  half-iteration forces the a-priori input to zero, so neither memory needs
  clearing between frames.
* **Tail steps.** Steps K..K+2 of each sub-block take the stored tail values
  of the active encoder, with an a-priori input of zero. They produce no
  extrinsic output.
* **Decisions.** In the last half-iteration the sign of decoder 2's
  a-posteriori LLR is written, deinterleaved, into the decision banks. The
  banks are then streamed out in natural order.

### The Log-MAP SISO (`siso_logmap`)

Each SISO decodes one terminated sub-block of L = K + 3 steps in 2L cycles:

1. `init`: alpha and beta are set to (0, -inf, ..., -inf). The sub-block
   starts and ends in the zero state.
2. Forward pass, t = 0..L-1: alpha_t goes into a local memory of L x 8
   metrics, and alpha_{t+1} is computed.
3. Backward pass, t = L-1..0: from alpha_t, the branch metrics and
   beta_{t+1}, the SISO outputs the a-posteriori LLR, the extrinsic value
   `Le = LLR - Ls - La` and the decision of step t, all combinationally. It
   then updates beta.

Arithmetic:

* Branch metric: `gamma = u*(Ls + La) + p*Lp`, with bits u and p valued 0/1.
  This equals the usual ±1 form up to a per-step constant, which cancels.
* Path sums use `max*(a,b) = max(a,b) + ln(1 + e^-|a-b|)`, which is exact
  Log-MAP apart from quantisation. The correction term comes from a small
  table (3, 2, 1, 0 for |a-b| = 0, 1-3, 4-8, 9 and more LSBs).
* State metrics are 12 bits. Every step subtracts the maximum from them and
  saturates them at the bottom.
* Fixed point: one LSB is 0.25 in natural-log units.
  * Channel LLRs: 6 bits.
  * Extrinsic LLRs: 8 bits, saturated.
  * A-posteriori LLRs: 14 bits.
* A positive LLR means bit 1.

## Timing

| operation | cycles (defaults) |
|---|---|
| encoder: load a frame | N = 1000 |
| encoder: emit a frame | Q(K+6) = 1030, starting one cycle after the last input bit |
| decoder: receive a frame | Q(K+6) = 1030, one symbol per cycle |
| decoder: one half-iteration | 2(K+3) + 1 = 407 |
| decoder: last symbol in → first decision out | 2 + 2·ITER·(2(K+3)+1) = 4886 |
| decoder: stream decisions | N = 1000 |

For comparison, a single terminated block of K = 1000 (Q = 1, the same RTL
with other parameters) needs 2007 cycles per half-iteration. The 407 cycles at Q = 5 are 79.7 % less, and
Q = 2 takes 1007 cycles, 49.8 % less.

The decoder has a single frame buffer. It refuses input (`in_ready` low)
from the last symbol of a frame until that frame's decisions have left. The
encoder likewise does not load a new frame while it is emitting one.

## Interfaces

Shared types and constants are in `rtl/turbo_pkg.sv`:

* `enc_sym_t`: a coded symbol. `kind` is DATA, TAIL1 or TAIL2. `bits` is
  `{P2,P1,X}` for a data symbol and `{0,z,t}` for a tail symbol.
* `soft_sym_t`: the same symbol as three 6-bit channel LLRs `s0,s1,s2`.

`turbo_codec_top` ports:

* Encoder side:
  * Input: `enc_in_valid` and `enc_in_bit`, accepted while `enc_in_ready` is
    high.
  * Output: `enc_out_valid`, `enc_out_sym` and `enc_out_last`, with no
    back-pressure.
* Decoder side:
  * Input: `dec_in_valid` and `dec_in_sym`, in transmission order, accepted
    while `dec_in_ready` is high.
  * Output: `dec_out_valid`, `dec_out_bit` and `dec_out_last`.
  * Status: `dec_busy`.
* Reset: `rst_n`, asynchronous and active low. It clears the control state
  but not the memories.

Parameters: `Q`, `K`, `ITER`, `F1` and `F2`. `N = Q*K` follows from them.

## Files

| file | content |
|---|---|
| `rtl/turbo_pkg.sv` | constants, types, trellis functions, max* |
| `rtl/rsc_encoder.sv` | (13,15) RSC encoder with termination |
| `rtl/cf_interleaver.sv` | collision-free interleaver address generator |
| `rtl/cf_crossbar.sv` | bank rotator (interleave / deinterleave network) |
| `rtl/bank_ram.sv` | one memory bank |
| `rtl/turbo_encoder_mpt.sv` | multi-point terminated turbo encoder |
| `rtl/rx_buffer.sv` | banked received-value memories and tail registers |
| `rtl/siso_logmap.sv` | Log-MAP SISO for one sub-block |
| `rtl/turbo_dec_ctrl.sv` | iteration / half-iteration sequencer |
| `rtl/turbo_decoder_mpt.sv` | parallel decoder |
| `rtl/turbo_codec_top.sv` | encoder and decoder side by side |
| `tb/turbo_ref_pkg.sv` | reference models (encoder, interleaver, Log-MAP, channel) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the configuration tests `tb_codec_2point`, `tb_time_saving`, `tb_ber_awgn` and `tb_ber_sweep` |

## Verification

Every testbench checks its results and ends with a line
`TB_RESULT checks=N failures=M`. A watchdog stops any run that hangs.

The reference models in `tb/turbo_ref_pkg.sv` are written independently of
the RTL:

* The encoder is a delay line evaluating the two polynomials.
* The interleaver uses its closed form.
* The decoder is a whole-array Log-MAP whose max* correction is computed in
  floating point from `round(4 ln(1 + e^(-d/4)))`. Its normalisation is the
  same as the hardware's, so the results must agree bit for bit.

What the testbenches check:

* `tb_siso_logmap` compares every extrinsic value, LLR and decision of
  noisy sub-blocks.
* `tb_turbo_decoder_mpt` compares every decision of whole noisy frames with
  the reference turbo decoder. It also checks that all raw channel errors
  are corrected at the chosen noise level, and checks the latency.
* `tb_turbo_codec_top` runs the full-size link end to end:
  encoder → noisy channel model → decoder.
* `tb_codec_2point` does the same with Q = 2, K = 500.
* `tb_time_saving` builds the decoder for Q = 1, 2 and 5 on a 1000-bit
  frame and measures the decoding time: 24 086, 12 086 and 4 886 cycles.
  Against the single block that is a saving of 49.8 % for two termination
  points and 79.7 % for five.
* `tb_ber_awgn` measures error rates over BPSK/AWGN at Eb/N0 = 0.75 dB. It
  uses exact channel LLRs quantised to the 6-bit input, and sends 1000 frames
  of 1000 bits through each of three decoder builds with 6 iterations:

  | termination | build | BER | FER |
  |---|---|---|---|
  | 5 points | Q = 5, K = 200 (default) | 1.17e-3 | 0.047 |
  | 2 points | Q = 2, K = 500 | 6.4e-4 | 0.033 |
  | single block | Q = 1, K = 1000 | 6.5e-4 | 0.033 |

  The raw channel BER is 0.19. Two termination points cost almost nothing;
  five cost a visible loss. More termination points mean more tail bits,
  and tail bits are protected by one constituent code only, not by both.
  The test fails if a rate is more than twice a reference figure reported
  for this scheme with the same termination and a UMTS-style interleaver
  (BER / FER 1.5e-3 / 0.179 for 5 points, 0.88e-3 / 0.024 for 2 points,
  0.77e-3 / 0.037 for a single block). It takes about two minutes.
* `tb_ber_sweep` runs the same three builds at Eb/N0 = 0, 0.25 and 0.5 dB,
  200 frames per point. The BER is about 7e-2 at 0 dB, 3e-2 at 0.25 dB and
  7e-3 to 9e-3 at 0.5 dB. At each point the three builds are within about
  35 % of each other.
  It checks that the BER falls with rising Eb/N0, and that the terminated
  builds stay close to the single block. It takes about 80 seconds.

The top-level tests also confirm that several mechanisms occur:

* inner terminations of both encoders;
* rotated interleaver accesses;
* SISO tail steps;
* input stalls while the decoder is busy;
* corrected channel errors.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_turbo_codec_top \
  rtl/turbo_pkg.sv tb/turbo_ref_pkg.sv $(ls rtl/*.sv | grep -v turbo_pkg) \
  tb/tb_turbo_codec_top.sv -o sim
./obj_dir/sim
```

The full-size link test decodes three 1000-bit frames in about ten seconds
of simulation.

## Where the design makes its own choices

These points are specific to this implementation and could reasonably be
done differently:

* **Interleaver.** The architecture needs a collision-free interleaver but
  none is fixed, so the rotation-plus-QPP form above is this design's. Error
  rates therefore differ from those of a UMTS interleaver. Apart from the
  short AWGN run under Verification, error-rate curves have not been
  measured.
* **Extrinsic storage.** Writing each value into the order the next
  half-iteration reads follows the architecture. Doing it with two memories,
  and with a table for g^-1, is this design's choice. One memory in natural
  order, which decoder 2 reads and rewrites through the interleaver, would
  halve the extrinsic storage. It would be equally free of collisions.
* **SISO schedule.** The SISO does a full forward pass with stored metrics,
  then a backward pass (no sliding window), because a sub-block is short.
  Widths, fixed-point scale and normalisation are also this design's.
* **Control.** The iteration count is fixed. There is no early stopping.
* **Buffering.** Each end has a single frame buffer.
* **Not implemented: on-the-fly decoding.** Sub-blocks could be decoded
  while later ones are still arriving, with the decoding clock lowered for
  the early sub-blocks (f/Q for the first up to f for the last) to save
  power. That needs clock generation outside this RTL. With an interleaver
  that spans all sub-blocks, decoder 2 also cannot start before the whole
  frame has arrived.
