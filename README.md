# Coded global bus against inductive and capacitive crosstalk

On a long on-chip bus, how long a wire takes to switch depends on what its
neighbours do in the same cycle. With capacitive coupling the slowest
case is a wire rising while its neighbours fall. With inductive coupling,
which grows with clock frequency and wire size, the slowest case is every
wire switching the same way. Which patterns are slow therefore depends
on the geometry, the frequency and the delay budget of the particular bus.

This design does not try to make every pattern fast. It sends n data
bits over m > n wires and only ever drives 2^n of the 2^m possible
words. That subset is the **valid code set**. It is chosen so that a
change from any member to any other member meets the delay constraint.
Choosing the set is an offline job. On chip, all that remains is a fixed
one-to-one table at each end of the bus.

## The worked example built here

The default configuration is a 2-bit bus with a 30 ps delay budget. On
two plain wires the delays of the four kinds of transition are:

| wires (R rise, F fall, - stable) | delay (ps) |
|---|---|
| `-R` | 27.208 |
| `R-` | 27.198 |
| `RF` (one rises, the other falls) | **38.728** |
| `RR` | 11.965 |

`RF` breaks the budget. The fix adds a third wire and uses only the
words `000, 001, 100, 101`. The middle wire never moves, and the data
bits travel on the two outer wires, which are no longer neighbours:

| data | code on wires [2:0] |
|---|---|
| 00 | 000 |
| 01 | 001 |
| 10 | 100 |
| 11 | 101 |

The transitions that can occur on the 3-wire bus are then:

| wires [2:0] | delay (ps) |
|---|---|
| `--R` | 24.611 |
| `R--` | 24.580 |
| `R-F` | 29.237 |
| `R-R` | 19.691 |

All of them are under 30 ps, at the cost of one extra wire. A pattern
and its sign mirror (every rise swapped for a fall) have the same delay,
because the wire network is linear.

## Structure

```
            transmit side                            receive side
 data_in  +---------+  tx_code  +-------+  bus_tx         bus_rx  +-------+  rx_code  +---------+  data_out
 --N----->| encoder |----M----->| latch |----M---> wires ---M---->| latch |----M----->| decoder |----N----->
          +---------+           +-------+   (analog, not in RTL)  +-------+           +---------+  code_ok
                                    ^                                 ^
 clk -------------------------------+---------------------------------+
```

| module | file | role |
|---|---|---|
| `coded_bus_link` | `rtl/coded_bus_link.sv` | top: the chain above |
| `bus_encoder` | `rtl/bus_encoder.sv` | combinational table lookup, data to codeword |
| `bus_latch` | `rtl/bus_latch.sv` | register at each end of the wires |
| `bus_decoder` | `rtl/bus_decoder.sv` | parallel compare against the table, codeword to data |
| `bus_code_pkg` | `rtl/bus_code_pkg.sv` | default sizes and the default code set |

The wires are not logic, so the top brings both of their ends out:
`bus_tx` drives the near end and `bus_rx` is the far end. Connect them
directly, or through a delay model as the main testbench does.

### Timing

Both latches run on one clock, so every wire of the bus switches at the
same instant. That is why the transition pattern, and so the delay, is
well defined. A word on `data_in` before rising edge *k* is driven onto
the wires after edge *k* and captured from `bus_rx` at edge *k+1*. It
appears on `data_out` right after that edge. Latency is two edges, and
the link carries one word per cycle. The clock period can be as short as
the delay constraint the code set was chosen for.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 2 | data bits |
| `M` | 3 | wires |
| `CODEBOOK` | `{3'b101, 3'b100, 3'b001, 3'b000}` | `logic [2**N-1:0][M-1:0]`; entry *d* is the codeword of data *d* |

To use the link on another bus, put the code set found for that bus in
`CODEBOOK`. The encoder and decoder are generic in `N` and `M`. The
encoder is a `2**N`-entry multiplexer. The decoder uses `2**N` M-bit
comparators and a one-hot-to-binary encoder. Both grow with `2**N`, so
they suit the small bus widths this technique targets (up to roughly
9 to 10 data bits). At the defaults, synthesis gives 16 word-level cells
and 6 flip-flops.

### Words outside the code set

A correct link never delivers a word outside the code set. If a wire
fault or a timing failure delivers one, the decoder outputs 0 and drops
`code_ok`. An assertion in `bus_encoder` checks at start-up that the
codebook entries are distinct. An assertion in `bus_decoder` checks that
at most one entry matches. An assertion in `coded_bus_link` checks that,
out of reset, only members of the code set reach `bus_tx`.

### Reset

`rst_n` is asynchronous and active low. Both latches reset to
`CODEBOOK[0]`, the code of data 0, so the decoder sees a valid word, and
`data_out` is 0, from reset on.

## Where a code set comes from

The RTL only applies a code set. The set itself comes from an offline
flow:

1. Extract the resistance, capacitance and self and mutual inductance of
   the wires for the given length, width, height, pitch and supply/ground
   lines. Build a lumped RLC circuit of the bus.
2. Simulate only one switching wire at a time (n circuit simulations for
   n wires). The network is linear, so the response to any transition
   pattern is the sum of these single-wire responses: a stable wire
   contributes nothing, and a falling wire is the negative of a rising
   one. This gives the delay of all 4^n patterns without simulating each.
3. Build a graph with one vertex per word and an edge wherever the
   transition between two words meets the delay constraint.
4. A valid code set is a clique of this graph. A greedy heuristic finds
   a large one. It repeatedly deletes the vertex of smallest degree until
   the remaining vertices form a clique. It then tries to add back each
   deleted vertex that is adjacent to every member.
5. If the clique has fewer than 2^n words, add a wire and start again.

The same flow can also search for the longest wire that still meets a
given clock period with a given number of extra wires. It fits the
worst-case delay as a quadratic in wire length to predict the next
length to try.

Published results of this approach show how strongly the answer depends
on the bus. A 4-bit bus needs 4 wires at a 26 ps budget, but 9 wires at
17 ps. A 3-bit bus needs one extra wire up to 3.2 GHz and none at
6.4 GHz, where inductive coupling changes which patterns are slow. A
6-bit bus at a 56 ps budget needs 7 wires, on which a 73-word valid set
was found. Only the 2-bit set above is known in full. For other buses,
the codebook has to come from running the flow.

## Verification

| testbench | what it does |
|---|---|
| `tb/tb_bus_encoder.sv` | all data values, default table and a 3-to-4-bit table |
| `tb/tb_bus_decoder.sv` | every possible word: members decode, non-members are flagged |
| `tb/tb_bus_latch.sv` | reset value, capture at the edge, hold, asynchronous reset |
| `tb/tb_coded_bus_link.sv` | whole link at default parameters, through a timed wire model |
| `tb/tb_coded_bus_link_fig19.sv` | whole link loaded with another 3-bit code set, `{010,100,101,110}` |
| `tb/tb_coded_bus_link_sizes.sv` | links of 6→7, 4→9 and 9→13 bits with placeholder code sets |

`tb/tb_coded_bus_link.sv` is the main test. `tb/rlc_bus_model.sv` models
the three wires by their timing alone. When the near end changes, the far
end follows after the delay of that pattern from the 3-wire table above,
found through `tb/bus_delay_pkg.sv`. A pattern that is not in the table
(one that moves the middle wire) gets 45 ps. The clock period is the
30 ps budget, so any word that was slow to arrive would be captured
wrong. The test sends all 16 data-to-data transitions and 4000 random
words. It checks every word out against the word sent two cycles
earlier. It also requires that:

- each of the four switching classes occurs;
- the largest wire delay seen stays under 30 ps (it is 29.237 ps);
- data transitions that would have been the 38.7 ps `RF` case on two
  plain wires do occur, and still arrive correctly;
- a word forced outside the code set is flagged by `code_ok`;
- reset, at start and in mid-traffic, returns `data_out` to 0.

The set in `tb_coded_bus_link_fig19.sv` was found for a different
example 3-bit bus. No delays for that bus are available, so that test
joins the wires directly. Which data value goes with which of its four
words is this design's choice (ascending order). The sizes test uses
placeholder code sets (code = data followed by zeros). It only shows that
the logic and the latency hold at those widths. It does not show delay
behaviour.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/bus_code_pkg.sv tb/bus_delay_pkg.sv tb/tb_coded_bus_link.sv \
  --top-module tb_coded_bus_link
./obj_dir/Vtb_coded_bus_link
```

Swap in another `tb_*.sv` and top-module name for the other tests. Each
prints `TB_RESULT checks=<n> failures=<n>`. `-Wno-fatal` is needed only
for the wire model: Verilator warns about its delay, which is computed
at run time.

## Choices of this design

- **Bit order.** The leftmost digit of a written codeword is wire `M-1`.
- **Encoder and decoder structure.** Only the mapping is specified, so
  each is the simplest generic table: a lookup, and a parallel compare.
- **Latches.** Positive-edge flip-flops with an asynchronous active-low
  reset to the code of data 0. The requirement is only that both ends
  are synchronous.
- **`code_ok`.** The flag and the "decode to 0" rule for words outside
  the code set are added here.
- **Clock period in the main test.** It equals the delay constraint.
- **Timing model.** Each pattern is given one delay that applies to all
  its switching wires. Per-wire delays are not modelled.

## Not included

- The wires, drivers and receivers are analog. They exist only as the
  timing model in the testbench.
- The offline flow (extraction, simulation, graph, clique search,
  length search) is software. It is described above but not provided.
- Code sets for buses other than the 2-bit example are not available.
