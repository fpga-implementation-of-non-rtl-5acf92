# Stochastic decoder for a GF(4) LDPC code of length 504

This is a fully parallel, stochastic-computing decoder for a non-binary LDPC
code over GF(4): 504 symbols of 2 bits, 252 parity checks, rate 1/2.
Every edge of the code graph carries one random GF(4) symbol per clock in
each direction instead of a multi-bit probability message. The probability of
a value is how often that symbol appears in the stream. The arithmetic of
belief propagation then collapses to almost nothing:

* **Check node:** a sum over GF(4) is a bitwise XOR of the 2-bit symbols. For
  one bit, the XOR of two independent streams with probabilities p_a and p_b
  is 1 with probability p_a(1-p_b) + p_b(1-p_a). That is exactly the
  probability of the parity of the two bits.
* **Variable node:** the product of the incoming distributions (channel
  times the other check messages, normalised) is obtained by keeping only
  the clock cycles in which all those inputs show the same symbol.

The cost of this simplicity is time. A decision needs many clock cycles of
samples, and the streams can "latch": around short cycles of the graph,
correlated streams can hold a group of nodes in a fixed state. The variable
nodes therefore keep an *edge memory* of recent agreeing symbols and replay
one of them at random when their inputs disagree.

## Data path

```
 chan_prob[v] --> nb2stoch --ch_sym--> vnu (DV edge memories) --vn_out--> [graph] --> cnu (XOR) --+
                    ^                    ^       |                                                 |
                  lfsr ----------- rd_addr       +--dec_valid/dec_sym--> stoch2nb --> dec[v]      |
                                         ^-------------------- vn_in <-- [graph] <-----------------+
                                 dec[] --> syndrome_check --> dec_ctrl (start/done, windows)
```

Each of the 504 variable-node slices holds:

| module      | role |
|-------------|------|
| `lfsr`      | 32-bit maximal-length LFSR (taps 32, 22, 2, 1). It advances 32 steps per clock, so all 32 bits are new every cycle. Each slice has its own seed. |
| `nb2stoch`  | Non-binary to stochastic converter (see below). |
| `vnu`       | Variable node unit with `DV` = 3 edges, one `edge_memory` per edge. |
| `stoch2nb`  | Decision counter: turns the node's decision stream back into a symbol. |

The design also has one `cnu` per check (252 of them, degree 6), a
combinational `syndrome_check`, and the sequencer `dec_ctrl`. The shared type
`sym_t` and the graph wiring functions are in `nb_ldpc_pkg`.

### From probabilities to a symbol stream (`nb2stoch`)

The channel supplies, for each symbol, one probability per bit:
g_b = P(bit b = 1). It is a W = 8-bit unsigned fraction of 256. Each clock,
the converter compares one fresh random byte per bit with g_b and sets the
bit when the byte is smaller. Symbol a therefore appears with probability

    f(a) = prod_b  g_b^(a_b) * (1 - g_b)^(1 - a_b)

This is the usual product-form initialisation of a non-binary decoder from
bit likelihoods. A probability of 0 never gives a 1, and 255 gives a 1 with
probability 255/256.

### The variable node and its edge memories (`vnu`, `edge_memory`)

The message on edge i depends on the channel symbol and the *other* DV-1
check messages:

* If they all agree, the message is *regenerative*. The unit sends the
  common symbol and pushes it into edge memory i. The equality test is
  built from gates: a per-bit XNOR against the channel symbol, then an AND
  over the bits and over the inputs.
* If they disagree, the unit reads edge memory i at a random address and
  sends that stored symbol.

The edge memory is a 32-deep shift register of 2-bit symbols. It always
holds the 32 most recent regenerative symbols of that edge, so a random read
samples the edge's recent output distribution. This is what breaks latching:
when inputs disagree, the node does not hold its last output. It sends a
fresh sample of what it has been sending.

Before decoding, the controller raises `init` for `EM_DEPTH` cycles. During
that time every edge sends the channel symbol and stores it, so the memories
start full of channel samples rather than zeros.

The decision stream uses all DV check messages plus the channel symbol. When
they all agree, `dec_valid` is set with that symbol. The distribution of
these samples is the normalised product f(a) * prod R(a), the tentative
posterior of the symbol.

Registers: the check node and variable node outputs are both registered, so
a message takes two clocks to go around the VN -> CN -> VN loop.

### Back to a symbol (`stoch2nb`)

Four saturating counters (one per GF(4) value) count the decision samples of
the current window. At the end of the window the symbol with the highest
count becomes the decoded symbol, and the counters restart. Ties go to the
lowest value. A window with no samples keeps the previous decision. Before
decoding starts, the counter is loaded with the channel hard decision (each
bit set where g_b >= 1/2).

### The code graph (`nb_ldpc_pkg`, `syndrome_check`)

H is a 3 x 6 array of 84 x 84 circulant permutation matrices. Block (i, j)
is the identity shifted by (i*j) mod 84, and every non-zero entry is 1.

* Variable node v = 84*j + k connects, on its edge i, to check
  84*i + ((k - i*j) mod 84). The edge arrives on socket j of that check.
* `cn_of_vn` and `vn_of_cn` compute this at elaboration time. The top-level
  wiring and the syndrome test share these functions.
* With shifts i*j, a 4-cycle would need (i1-i2)(j1-j2) = 0 mod 84. The
  product is at most 2*5 = 10, so the graph has no 4-cycles.

Because the coefficients are 1, each bit of the symbols forms a binary LDPC
code of its own, under the same H. One simple family of codewords: a
constant symbol per block column, with the six constants XORing to zero.

The syndrome test XORs the decided symbols of each check. It reports `ok`
(H x = 0) and the number of unsatisfied checks.

## A decoding run (`dec_ctrl`)

| state  | cycles     | what happens |
|--------|------------|--------------|
| LOAD   | 1          | Counters take the hard decisions. Converters draw their first symbols. |
| INIT   | EM_DEPTH   | Edge memories are filled with channel symbols. |
| DECODE | WINDOW     | Stochastic message passing. The last cycle (`win_end`) updates the decisions. |
| CHECK  | 1          | Nodes hold. If H x = 0, the run ends with `success`. After MAX_ITER windows, the run ends as a failure. Otherwise it goes back to DECODE. |
| DONE   | until `start` | `done`, `success` and `iters` are held. |

One window of `WINDOW` clocks plays the part of one decoding iteration. The
latency from the clock edge that samples `start` to the first cycle with
`done` high is

    2 + EM_DEPTH + iters * (WINDOW + 1)  cycles

At the defaults, that is 164 cycles when one or two windows suffice, and at
most 4,194 cycles. `chan_prob` must stay stable from `start` until `done`.

## Top level: `nb_ldpc_decoder`

| port        | dir | width      | meaning |
|-------------|-----|------------|---------|
| `clk`, `rst`| in  | 1          | Clock. Synchronous active-high reset. |
| `start`     | in  | 1          | Starts a run (from idle or from done). |
| `chan_prob` | in  | [504][2] x 8 | P(bit b of symbol v = 1). |
| `dec`       | out | [504] x 2  | Decoded word. |
| `busy`, `done`, `success` | out | 1 | Run status. |
| `iters`     | out | 7          | Windows used. |
| `n_unsat`   | out | 8          | Unsatisfied checks of `dec`. |

| parameter  | default | meaning |
|------------|---------|---------|
| `Z`        | 84  | Circulant size. N = 6Z symbols, M = 3Z checks. |
| `DV`, `DC` | 3, 6 | Variable and check node degrees. |
| `W`        | 8   | Probability resolution in bits. |
| `EM_DEPTH` | 32  | Edge memory depth (power of two). |
| `WINDOW`   | 64  | Clocks per decoding window. |
| `MAX_ITER` | 64  | Maximum windows. |
| `CNT_W`    | 8   | Decision counter width. |

The random bits needed per slice (2*W + DV*log2(EM_DEPTH) = 31) must fit in
the 32-bit LFSR. Elaboration stops with an error if they do not. Any
`Z` > 10 keeps the graph free of 4-cycles at DV = 3, DC = 6.

The design synthesises (generic, before technology mapping) to about 41,900
flip-flops plus 96,768 edge-memory bits. Nearly all of that is the 1,512
edge memories.

## Where this design decides on its own

The block structure follows a published architecture:
* converter, LFSR random source, XOR check node, XNOR/AND variable node with
  a randomly addressed memory, counter-based output
* code length 504 over GF(4)
* stop when H x = 0 or after a maximum number of iterations

That description gives no parity check matrix, no node degrees, no widths,
no edge-memory depth and no interface. Everything below is this design's
own choice:

* **The code.** The quasi-cyclic H above, with degrees 3/6 and all-one
  coefficients. The check node does GF(4) addition only. A code with
  general GF(4) coefficients would need a multiplication (a fixed symbol
  permutation) on each edge. That is not included.
* **Channel input.** Per-bit probabilities on one wide parallel port
  (8,064 input bits). A board-level design would load them serially. The
  reference implementation this follows reports 177 I/O pins, and this port
  does not attempt to match that.
* **Decision rule.** Per-symbol counters and argmax over a window, in place
  of a single counter of ones.
* **Windows as iterations,** the initial fill of the edge memories, and the
  per-node LFSRs advanced 32 steps per clock.

The reference implementation's reported FPGA figures (a handful of
registers and LUTs, 2.7 W) describe a much smaller circuit than a full
504-symbol parallel decoder. They cannot be compared with this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog.

| testbench | checks |
|-----------|--------|
| `tb_lfsr` | Bit-exact against a model. Full period 65,535 for a 16-bit instance. Holds when disabled. |
| `tb_nb2stoch` | Every output against the comparison rule. Symbol frequencies against the product form. |
| `tb_cnu` | Outputs against a GF(4) addition table. XOR probability rule on random streams. |
| `tb_edge_memory` | Reads against a queue model. Random-address frequencies. |
| `tb_vnu` | Edge outputs, edge-memory contents and the decision stream against a reference model, including the initial fill. |
| `tb_stoch2nb` | Counts, argmax, ties, empty windows, saturation, load. |
| `tb_syndrome_check` | Against an explicitly built H: random words, codewords, single errors, at Z = 7 and at full size. |
| `tb_dec_ctrl` | State sequence, window count, success and limit stops, exact cycle counts. |
| `tb_nb_ldpc_decoder` | End to end on a 72-symbol instance (Z = 12). |
| `tb_nb_ldpc_decoder_full` | The same test at the full 504-symbol defaults. |

The two end-to-end tests decode several noisy frames: codewords with up to 6%
of symbols pushed to a wrong hard decision. For each frame they check:
* the decoded word equals the codeword, with success
* the reported syndrome is zero
* the exact cycle count

A pure-noise frame must stop at the iteration limit. The tests also count,
and require at least once, each of these mechanisms:
* edge-memory fill
* regenerative outputs
* edge-memory reads
* decision samples
* corrected channel errors
* both kinds of stop

At full size, frames with 5 to 37 hard-decision errors decode in 2 to 4
windows (164 to 294 cycles).

These tests show that the decoder works. They do not measure its error
rate: no BER/FER curve against SNR has been run.

Simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/nb_ldpc_pkg.sv tb/tb_nb_ldpc_decoder.sv --top-module tb_nb_ldpc_decoder
./obj_dir/Vtb_nb_ldpc_decoder
```

The full-size test elaborates 504 slices. Its C++ build takes several
minutes; the simulation itself takes about a second.
