# Threshold-controlled min-sum LDPC decoder

This is a small, fully parallel decoder for a low-density parity-check (LDPC) code. It
follows the architecture of "VLSI Implementation of a Rate Decoder for Structural LDPC
Channel Codes" (Procedia Computer Science 79, 2016). Noisy soft values of a received word
arrive serially. The decoder runs the min-sum message-passing algorithm between one unit
per code bit and one unit per parity check, and sends out the corrected word serially.

The main idea is **threshold control**. A bit whose reliability has grown large will say
the same thing in every later iteration. The decoder therefore declares that bit
*stationary*: it fixes the bit's value and stops computing for it. The check units then
work with a reduced parity-check matrix in which that column no longer takes part in the
minimum search.

That description gives the block diagram, the example code, the 4-bit input width and the
stationary-node principle. It gives no equations, threshold, iteration limit, number
format, handshake or timing. Everything of that kind in this RTL is a choice made here; each
choice is marked in the opening comment of its file and listed under
[Departures and open points](#departures-and-open-points).

## The code

The decoder is built for the 5 x 7 parity-check matrix H below. Rows are checks CN1..CN5.
Columns are code bits VN1..VN7.

```
        VN1 VN2 VN3 VN4 VN5 VN6 VN7
  CN1    1   1   1   0   1   0   0
  CN2    1   1   0   1   0   1   0
  CN3    1   0   1   1   0   0   1
  CN4    0   0   0   1   1   1   1
  CN5    0   0   1   0   1   1   1
```

- Every check has 4 bits. Every bit is in 3 checks, except VN2, which is in 2.
- H has 20 ones. Each one is an edge of the Tanner graph and carries one message in each
  direction.
- Over GF(2), H has rank 5. The code therefore has only 4 code words:
  0000000, 0100110, 1011001 and 1111111, written VN1 first.

H and every size derived from it live in `rtl/ldpc_pkg.sv`:

- the degrees of each row and column, DV_MAX = 3, DC_MAX = 4 and E = 20;
- functions that map "k-th edge of node x" to a global edge number, with edges numbered
  row by row.

The node units, the routing and the parity check are all generated from these functions.
Changing `N`, `M` and `H_ROWS` is enough to build a decoder for another matrix.

## Numbers

| quantity | format | range |
|---|---|---|
| channel LLR `din` | 4-bit two's complement; positive means bit 0 is more likely | -8..7; -8 is clipped to -7 on entry |
| edge messages, both directions | 4-bit two's complement | saturated to -7..7 |
| a posteriori total of a bit | 6-bit two's complement | -28..28, cannot overflow: 7 + 3 x 7 |

The messages saturate symmetrically, so negating one never overflows. A stationary bit
sends its fixed value at full confidence on every edge: +7 for a 0, -7 for a 1.

## One iteration, clock by clock

The schedule is flooding: all bit units update, then all check units. Each half is one
clock, and `decoder_ctrl` sequences it.

| state | what happens at the end of the clock |
|---|---|
| IDLE | A full frame is waiting in `channel_in`. It is copied into `intrinsic_mem`. The check-to-bit registers, the stationary flags and the decision are cleared. |
| VPH | Each `vnfu` has formed total = channel LLR + incoming check messages. The bit-to-check messages (total minus the message on that edge) are latched into `perm_net`, together with whether the bit was stationary. `stationary_unit` marks new stationary bits. `decision_unit` registers the hard decisions and their syndrome. |
| CPH | If the registered syndrome is zero, or MAX_ITER = 10 check passes have been made, the controller goes to DONE. Otherwise each `bnfu` result is latched into `perm_net` and the next VPH follows. |
| DONE | Once `codeword_out` is idle, the word is handed over. `word_iters` and `word_ok` are updated. |

The first VPH sees all check messages at zero, so its decision is the plain channel
decision. A word that is already a code word leaves after 0 check passes. A frame that
stops after *i* check passes takes **2(i+1)+1 clocks** from the clock that takes it to the
clock that hands its word over. If the output stage is still sending the previous word,
the extra clocks are added to that.

While a frame is being decoded, the input stage can collect the next one. The output stage
can send the previous one at the same time. Input, decoding and output therefore overlap.

## Threshold control (stationary bits)

This is the part that differs from a textbook min-sum decoder. It involves three blocks.

1. **`stationary_unit`.** After every bit-node pass it compares each bit's total with the
   threshold: |total| >= STAT_THRESH = 14, twice the largest channel magnitude. A bit that
   reaches it becomes stationary for the rest of the frame. The sign of its total at that
   moment is stored as its final value.
2. **`vnfu` with `freeze`.** A stationary bit no longer sends extrinsic messages. It sends
   its stored value at full confidence. In hardware, its adder results are simply not
   used.
3. **`bnfu` with `stat`.** The permutation network stores, per edge, whether the message
   came from a stationary bit.
   - The check still includes that message's sign, because the parity must still hold with
     that bit fixed.
   - The check leaves the message's magnitude out of the minimum search. This is the
     "reduced H": the column has left the minimum computation.
   - If every other edge of a check is stationary, the check answers with full confidence
     (7).

The stored flag travels with the message it belongs to. So in one check pass, the check
node excludes exactly the messages that were produced as frozen values. A bit that becomes
stationary in a given VPH still sends one last normal message in that VPH and freezes from
the next one on.

`decision_unit` takes the stored value for stationary bits and the sign of the total for
the others. Once stationary, a bit can no longer be flipped by later iterations. That is
the cost of the saving, and the threshold controls the trade-off.

Because frozen messages are already at the saturation value 7, leaving them out of the
minimum does not change any result at this message width. The benefit is the computation
that is skipped, not a different answer.

## Blocks and files

| block in the architecture | file | role |
|---|---|---|
| input / channel stage | `rtl/channel_in.sv` | 4-bit serial input with valid/ready; holds one frame |
| intrinsic memory | `rtl/intrinsic_mem.sv` | channel LLRs of the frame being decoded, read in parallel |
| VNFU 1..7 | `rtl/vnfu.sv` | bit-node update; freezes when stationary |
| permutation network | `rtl/perm_net.sv` | routes the 20 edges both ways and holds the per-edge pipeline registers |
| BNFU 1..5 (check units) | `rtl/bnfu.sv` | min-sum check update using min1/min2/index; skips stationary magnitudes |
| stationary unit | `rtl/stationary_unit.sv` | threshold test and sticky per-frame flags |
| decision unit | `rtl/decision_unit.sv` | hard decision, syndrome and the `ok` early-stop flag |
| decoded codeword | `rtl/codeword_out.sv` | serial output, VN1 first |
| (schedule) | `rtl/decoder_ctrl.sv` | IDLE / VPH / CPH / DONE state machine |
| top | `rtl/min_sum.sv` | wires everything together |
| shared | `rtl/ldpc_pkg.sv` | H, sizes, edge maps and types |

The architecture also draws a second "channel" box, fed from the bit units, whose purpose
is not described. It is not built. The a posteriori LLRs it would receive are available on
the `app_llr` port.

## Top-level interface (`min_sum`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous reset, active low |
| din, din_valid, din_ready | in/in/out | 4/1/1 | channel LLRs, VN1 first; a value is accepted in a clock where valid and ready are both high |
| dout, dout_valid | out | 1/1 | decoded bits, VN1 first, 7 consecutive clocks per word |
| word_ok | out | 1 | the word on dout satisfies every parity check |
| word_iters | out | 4 | check passes used for that word (0..10) |
| busy | out | 1 | a frame is being decoded |
| stat_mask | out | 7 | stationary bits of the frame in progress |
| syndrome | out | 5 | failed checks of the latest estimate |
| app_llr | out | 7 x 6 | a posteriori LLR of every bit |

`din_ready` drops when a full frame is waiting and the decoder has not yet taken it.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the block's outputs
with values computed in the testbench from the definitions, not from the RTL's structure.
For example, the permutation-network test finds the pairing of edges by scanning H itself.
Each testbench prints one line `TB_RESULT checks=N failures=F`, and each has a watchdog.

`tb/min_sum_tb.sv` runs the whole decoder at its default parameters:

- It sends 3000 frames: random code words over BPSK with noise of random strength,
  quantised to 4 bits.
- It compares every output word, `word_iters` and `word_ok` with a loop-based reference
  model of the same algorithm.
- It checks the take-to-handover latency against the formula above.
- It requires each mechanism to occur at least once and prints how often each did: early
  stop, stop at the iteration limit, a bit becoming stationary, a check pass with
  stationary edges, input back-pressure, the output stage delaying a finished word,
  clipping of -8, and frames whose channel errors were corrected.

To run one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ldpc_pkg.sv tb/min_sum_tb.sv \
          --top-module min_sum_tb -Mdir obj_min_sum
./obj_min_sum/Vmin_sum_tb
```

The other testbenches work the same way; use `tb/<block>_tb.sv` and `--top-module
<block>_tb`. The package must come first on the command line. `-Irtl` lets Verilator find
the other modules by their file names. The full test runs in well under a second.

## Departures and open points

- **Algorithm details are this design's own.** The published description names the
  algorithm ("threshold controlled min-sum") and the stationary-node idea, but prints no
  update equations, threshold, normalisation or offset. This RTL uses:
  - plain min-sum, with no scaling or offset;
  - a threshold of 14;
  - a sticky per-frame stationary flag;
  - at most 10 check passes;
  - early stop on a zero syndrome.
- **Two-clock flooding iteration.** The architecture is called "systolic and fully
  parallel". This RTL reads that as one unit per node, with a register stage on each side
  of the permutation network. It does not overlap two frames inside the message-passing
  core.
- **Interface.** The published top level has the pins `din(3:0)`, `clk` and a single
  output, 6 I/Os in total. This RTL keeps the 4-bit serial input and the 1-bit serial
  output. It adds a reset, valid/ready handshakes and status ports.
- **Size and speed are not those reported.** The published figures are 11 LUTs and 6
  slices on a Spartan-3 xc3s200, and 890 Mbps. They were not reproduced and could not
  describe a complete decoder for even this small code. This RTL synthesises to about 270
  flip-flops. It moves at most one code bit per clock: a frame needs 7 input clocks and
  2i+4 decoder clocks.
- **Only the example code is built.** The published text says the architecture can decode
  any structured or unstructured code. Here, another code means new constants in
  `ldpc_pkg`. Large codes would need a partly serial architecture, which is not described.
- **Figure labels.** The check-side units are drawn as "BNFU 1..n", with the same n as the
  bit units. They are built here as the 5 check units of H.
