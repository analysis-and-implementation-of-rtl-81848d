# OVSF wake-up address decoder

A wake-up receiver keeps a sensor node's main radio asleep until a packet for that node
arrives. After the receiver has found a packet's preamble, it must decide from the
following address bits whether the packet is addressed to this node. Bit errors make
that decision probabilistic: a decoder that demands an exact match misses packets
(low detection probability), one that tolerates too many errors wakes the wrong nodes
(false alarms), and every false wake-up costs the sleeping node an acknowledgement and
a radio mode switch.

This design encodes the addresses with an OVSF (orthogonal variable spreading factor)
code and decodes them with two small counters and a comparator, without storing or
shifting the received bits. With code length L = 16, each node accepts its own
code word with up to `L/4 - 1 - T` bit errors, where the 2-bit input `T` sets the error
tolerance at run time. The whole decoder has 8 flip-flops.

## Why the threshold is L/4 - 1 - T

The L code words are the rows of an L x L binary matrix built by doubling:

    H2 = | 1 1 |      H2n = | Hn   Hn |
         | 1 0 |            | Hn  ~Hn |

Any two rows differ in exactly L/2 positions. The positions where two words `s_i` and `s_j`
differ are called distinguishable, and the other L/2 are shared. Suppose the word `s_i` is
sent and arrives with `N_e` errors, `N_ed` of them in distinguishable positions and `N_en`
in shared ones. Then its distance from the other word `s_j` is

    N_eij = N_en + L/2 - N_ed

Node j wakes falsely when that distance is within its tolerance. Two facts follow from the
triangle inequality (distance 8 between any two words when L = 16):

* With tolerance `L/4 - 1` (3 errors for L = 16), no received sequence is within tolerance
  of two code words. So a packet can never wake two nodes at once. With tolerance `L/4`
  (4 errors), a sequence exactly halfway between two words wakes both. This is why the
  tolerance stops one short of L/4.
* Every step of `T` moves the tolerance one error lower. Fewer packets are detected, but
  the false-alarm probability falls much faster. `T = L/4 - 1` and above
  (`T = 3` for L = 16) disables wake-up altogether. The decoder enforces this through the
  legality condition `T <= L/4 - 2`.

| T | errors accepted (L = 16) | sequences that wake a node | p_s at p_b = 0.1 | p_(i->j) at p_b = 0.1 |
|---|---|---|---|---|
| 0 | 0..3 | 697 | 0.932 | 1.9e-4 |
| 1 | 0..2 | 137 | 0.789 | 1.0e-5 |
| 2 | 0..1 | 17  | 0.515 | 3.2e-7 |
| 3 | none | 0   | 0     | 0      |

`p_s` is the probability that a packet is detected by its target. `p_(i->j)` is the
probability that a packet for node i wakes one given other node j, and in a network of
`N_S` sleeping nodes the false-alarm probability is `(N_S - 1) * p_(i->j)`. These values
come from the exhaustive simulation in `tb_ovsf_network_sweep`. It weights the count of
sequences with `N_e` errors by `p_b^N_e (1 - p_b)^(L - N_e)`.

## Structure

All blocks share `clk` and `rst_n`; the two counters are the only state.

                     x[3:0] (INDEX)                    y (mismatch)
    bit counter ─────────────────────> bit compare ───────────────> error counter
    0..16, holds      x[4] ──> ENB      ^       ^                    0..4, holds
         │                              d       addr                      │
         │ x[4] (EN)                                                       │ n_eij (NE)
         └──────────────────────────> activation logic <──────────────────┘
                                         ^ t         └──> q

| module | function |
|---|---|
| `ovsf_bit_counter` | 5-bit counter, counts every clock from 0 up to 16 and holds. `x[3:0]` is the index of the bit expected now. `x[4]` is 0 while bits are being received and 1 afterwards. |
| `ovsf_bit_compare` | Computes the expected code bit from `addr` and `x[3:0]` and raises `y` when the received bit `d` differs. Disabled while `x[4] = 1`. Combinational. |
| `ovsf_error_counter` | 3-bit counter of mismatches `n_eij`, holds at 4 (`L/4`). Four or more errors are rejected for every T, so larger counts are never needed. |
| `ovsf_activation_logic` | When `x[4] = 1`: `q = (n_eij <= L/4 - 1 - T) && (T <= L/4 - 2)`. Otherwise `q = 0`. Combinational. |
| `ovsf_address_decoder` | Top level. Wires the four blocks as drawn above. |
| `ovsf_pkg` | Default code length and the code-bit function. |

### The code bit needs no table

Row `r`, column `c` of the doubled matrix is 1 exactly when `r & c` has an even number of
one bits: `code_bit = ~^(addr & index)`. Each doubling step adds one address bit and one
index bit, and the lower-right quadrant inverts the parity. So the comparator is a 4-input
AND array and a parity tree, and the node's address is just its row number on `addr`.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | bit clock. One received bit per rising edge (200 Hz for 200 bit/s) |
| `rst_n` | in | 1 | asynchronous, active low. Clears both counters and starts a new address |
| `d` | in | 1 | received address bit |
| `addr` | in | `log2(L)` = 4 | this node's address, the row of its code word |
| `t` | in | 2 | tolerance offset T |
| `q` | out | 1 | wake-up: 1 if the received word was this node's |

Operation, per packet:

1. Pulse `rst_n` low once the preamble has been found.
2. Present address bit `i` (bit 0 first) so that it is stable at rising edge `i + 1`,
   for `i = 0 .. L-1`.
3. After rising edge L (16), `q` is valid. It stays constant, whatever `d` does, until
   the next reset.

The latency is therefore L bit periods: 80 ms at 200 bit/s. `q` is a level that
lasts from the end of the address to the next reset. To get a short wake-up pulse per
packet, reset the decoder soon after the evaluation.

Parameters of `ovsf_address_decoder`: `L` (code length, a power of two of at least 4,
default 16) and `T_W` (width of `t`, default 2). The counter widths and limits follow
from `L`: the bit counter has `log2(L) + 1` bits and stops at L, and the error counter
stops at L/4.

## Design choices

The four blocks and the way they connect follow the published counter-based design, as
do its widths and limits: a 5-bit bit counter stopping at 16, a 3-bit error counter
stopping at 4, a 4-bit address and a 2-bit `T`. The acceptance rule is also taken from it.
The following are this implementation's own decisions:

* The reset is asynchronous and active low. Both counters hold at their maximum instead
  of wrapping, so the decoder waits in the evaluation phase until it is reset. The source
  does not say how the decoder is restarted between packets. Here the reset does it.
* The bit compare's enable is active low (`ENB`), driven by `x[4]`, so it is disabled
  during evaluation.
* Bit 0 of the code word (column 0 of the matrix) is received first.
* The code bit is computed as a parity (see above), not read from a table.
* `q` is combinational from the counters and `t`. It is not registered.

Preamble detection, the RF front end and the main radio are outside this design. The
decoder takes their outputs as its `d` and `rst_n` inputs, and `q` is the signal that
would wake the radio.

## Verification

Each testbench checks against values it works out independently. It does not reuse the
design's parity formula: the testbenches build the code matrix by the doubling recursion.
Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ovsf_bit_counter` | The count after every edge against a model, under random enable and asynchronous resets. The count climbs to 16 and holds there. |
| `tb_ovsf_error_counter` | The same for the error counter, which must hold at 4. |
| `tb_ovsf_bit_compare` | All address/index/bit/enable combinations. Also checks that all 120 pairs of code words differ in 8 positions. |
| `tb_ovsf_activation_logic` | All inputs for L = 16 and L = 8. The number of accepted error counts per T must be 4, 3, 2 and 0. |
| `tb_ovsf_address_decoder` | End-to-end test at the default parameters. It repeats the characteristic sweep of 0..4 errors for T = 0..3, which must give 4, 3, 2 and 0 wake-ups. It then sends 400 random packets: own word with errors, other nodes' words corrupted towards this node, and noise. It checks the 16-cycle latency, that `q` holds, and that each mechanism occurs at least once: error counting, evaluation, error-counter saturation, illegal T, detection, false alarm and rejection. |
| `tb_ovsf_network_sweep` (with `ovsf_sweep_harness`) | 16 decoders, one per address, each receiving all 65,536 16-bit sequences for T = 0..3, plus the same for L = 8 with 8 decoders. Every output is checked against the Hamming-distance rule, and no sequence may wake two nodes. A sequence whose error count from any word lies in `L/4-T .. L/4+T` or `3L/4-T .. L` must wake no node at all. Per number of errors `N_e`, the counts of detecting and false-alarm sequences must equal the closed forms below. The testbench also prints `p_s` and `p_fa` for `p_b` = 0.01 and 0.1. |

Closed forms used by the sweep, per target and per ordered pair of nodes:

* detections with `N_e` errors: `C(L, N_e)` for `N_e <= L/4 - 1 - T`;
* false alarms with `N_e` errors: the sum over `N_en` of `C(L/2, N_en) * C(L/2, N_e - N_en)`.
  Here `L/4 + 1 + T <= N_e <= 3L/4 - 1 - T`, and `N_en` runs from `max(0, N_e - L/2)` to
  `floor((N_e - L/4 - 1 - T) / 2)`. The upper bound comes from requiring
  `N_eij = 2 N_en + L/2 - N_e <= L/4 - 1 - T`, and the same bound holds at `N_e = L/2`.

All testbenches pass. The sweep takes a few seconds.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wall -Wno-fatal -o sim \
        --top-module tb_ovsf_address_decoder -y rtl -y tb +libext+.sv \
        rtl/ovsf_pkg.sv tb/tb_ovsf_address_decoder.sv
    ./obj_dir/sim

Replace the top module and file with any other testbench, for example
`tb_ovsf_network_sweep`. The package must always be listed first, and `-y` lets Verilator
find the other modules by file name. The testbenches initialise everything they read,
so they do not depend on X handling.

To use a different code length, set `L` on `ovsf_address_decoder` to a power of two.
`L/4 - 2` is then the largest legal T, so widen `T_W` if you need a larger T.
