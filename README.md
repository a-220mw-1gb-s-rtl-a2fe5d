# Fully parallel soft-decision LDPC decoder, 1024 bits, rate 1/2

This design decodes a 1024-bit, rate-1/2 low-density parity-check (LDPC) code by building the
code's whole Tanner graph in logic. Each of the 1024 columns of the parity-check matrix H is a
variable node. Each of the 512 rows is a check node. Each of the 3328 ones in H is a pair of
4-bit wires between the two nodes. Every node updates at once, so one clock cycle is one full
iteration of the message-passing algorithm. A packet gets 64 iterations in 64 cycles. Packets
enter and leave through 16 scan chains. With one packet every 64 cycles, 16 bits leave per clock:
1.024 Gb/s at 64 MHz.

Because the messages stop changing once a packet has converged, most wires are quiet most of the
time. That is what keeps the power of this architecture low. The price is area and
wiring: about 26,000 message wires run between the node arrays.

## The algorithm as built

Messages are sign-magnitude: a sign bit and a 3-bit reliability (0..7). The sign bit is the bit
the message votes for: 1 means bit one, that is, a negative log-likelihood ratio. A received
sample uses the same format. It is taken as the channel log-likelihood ratio, scaled and clipped
to ±7.

One iteration (one clock cycle):

1. **Check nodes** (`check_node`, combinational) read the latched variable messages of their row.
   - *Parity*: the row parity is the XOR of all incoming signs. Output sign i is that parity
     XOR incoming sign i: the bit that the other variables of the row imply for variable i.
   - *Reliability*: every magnitude m becomes an 8-bit log-domain value f(m) = 2^(7−m). The
     values are summed. For output i the node subtracts its own term and takes the
     leading-zeros count of the 8-bit difference. A difference of 256 or more gives 0, and
     eight leading zeros saturate at 7. The result is about −log2 Σ_{j≠i} 2^(−m_j). That is
     the smallest other magnitude, lowered when several others are equally weak. It plays the
     role of the exact rule φ(Σ φ(m_j)) with φ(x) = −ln tanh(x/2). Hardware-wise, the log is a
     3-to-8 decoder and the exp is a priority encoder.
2. **Variable nodes** (`var_node`) convert the held received value and their t incoming check
   messages to two's complement and add them.
   - The sign of the sum is the current bit decision.
   - Outgoing message i is the sum minus incoming message i, converted back to sign-magnitude
     with the magnitude clipped to 7.
   - The outgoing messages are latched at the clock edge.
   - If the sum, or an outgoing value, is exactly zero, its sign is taken from the received
     sample.

In the first iteration of a packet, every outgoing message of a variable node is simply its
received sample. After 64 check-node passes, the decision of the last pass is latched into the
output scan chain. The OR of all 512 row parities of that pass becomes the packet error flag.
A failed check means the decoded word is not a codeword. A packet with all checks satisfied is
almost always decoded correctly, but this is not guaranteed: the test is made on the messages,
not on the decoded bits.

## The code

The published decoder gives only the degree profile of its code:

- columns of weight 3, 6, 7 and 8, averaging 3.25;
- 256 rows of weight 6 and 256 rows of weight 7.

It does not give the matrix. `ldpc_pkg` defines a matrix with exactly this profile, in closed
form, so that the wiring is computed at elaboration time and no table is needed.

- Variable v sits in scan group g = v mod 16 at chain position k = v div 16.
- Column weight depends on k only: k = 0 has weight 8, k = 1 and 2 weight 7, k = 3 weight 6,
  and every other position weight 3. That is 16 × 8 + 32 × 7 + 16 × 6 + 960 × 3 = 3328 edges,
  and all 16 scan groups are identical.
- Edges 0..2 of every column form three layers. Row c takes two columns from each layer L:
  π_L(2c) and π_L(2c+1), where
  - π0(x) = x,
  - π1(x) = (545x + 326) mod 1024,
  - π2(x) = (393x + 565) mod 1024.
  These are the row's slots 0..5.
- The 256 extra edges of columns 0..63 are numbered p = 0..255:
  - p < 192 is edge 3 + p div 64 of column p mod 64;
  - 192 ≤ p < 240 is edge 6 of column p − 192;
  - p ≥ 240 is edge 7 of column p − 240.

  Row 256 + r takes extra edge p = (191r + 199) mod 256 as its slot 6.

No row contains a column twice. The graph has ten length-4 cycles, and the matrix has full rank
512. Because the code differs from the published one, its error rates differ too. To use
another code with the same degree profile, change `edge_col`/`edge_idx` (and `col_weight` /
`row_weight` if the weights move). The hardware follows them.

## Packet pipeline and scan-chain timing

Three packets are in flight at any time. Packet f is shifted in during frame f, decoded during
frame f + 1 and shifted out during frame f + 2. A frame is 64 cycles.

`decoder_ctrl` is a modulo-64 counter that runs from reset. `pkt_start` is high when its
value `slot` is 0, and the first cycle after reset is slot 0.

The chain of group g holds variables g, g+16, …, g+63·16, in that order. Samples enter at the
head of the chain, so the **first** sample of a frame ends at the **last** position. In
terms of the top-level ports:

| what | when | which variable |
|---|---|---|
| `rx_in[g]` sample of packet f | slot s of frame f | g + 16·(63 − s) |
| messages loaded with the received samples | edge ending slot 0 of frame f+1 | all |
| decisions latched, `pkt_error` of packet f updated | edge ending slot 0 of frame f+2 | all |
| `pkt_error` of packet f | slot 1 of frame f+2 to slot 0 of frame f+3 | – |
| `dec_out[g]` bit of packet f | slot s = 2..63 of frame f+2, slots 0 and 1 of frame f+3 | g + 16·((65 − s) mod 64) |

The two cycles of offset on the output come from the decoded-bit latch in each node and the
single output register at the end of every chain. Both are part of the published scan-group
structure. The input and the output both arrive in descending variable order.

## Modules

| module | what it is |
|---|---|
| `ldpc_pkg` | sizes, the `msg_t` message type, and the code: `col_weight`, `row_weight`, `edge_col`, `edge_idx` |
| `check_node` | one row: parity and reliability update; parameter `K` (6 or 7) |
| `var_node` | one column: adder tree, subtractors, message latches, received and decoded scan latches; parameter `T` (3, 6, 7 or 8) |
| `var_group` | one scan group of 64 variable nodes and its output register (the "vgrp" macro) |
| `decoder_ctrl` | frame counter that produces `pkt_start` |
| `pkt_error_detect` | OR of all row parities, registered at `pkt_start` |
| `ldpc_decoder` | top: 16 groups, 512 check nodes, the message interconnect, control and error flag |

Top-level ports of `ldpc_decoder`: `clk`, `rst_n` (asynchronous, active low), `rx_in[16]`
(`msg_t`), `dec_out[15:0]`, `pkt_start`, `slot[5:0]` and `pkt_error`.

## Where this design departs from, or adds to, the published decoder

- **Parity-check matrix**: the matrix and the split of column weights (960 × 3, 16 × 6,
  32 × 7, 16 × 8) are this design's own; only the degree profile is the published one.
- **Check-node log/exp maps**: the published node uses "a few gates" for the logarithm and a
  leading-zeros count for the exponential, over 8-bit intermediate values. The particular map
  f(m) = 2^(7−m) is chosen here. The adder is wider than 8 bits so that subtracting a node's
  own term is exact.
- **Sign polarity**: a sign bit of 1 means bit one. The published text does not fix the
  polarity.
- **Control**: the control block is only named in the published layout. Here it is a free-running
  counter with no external start, stall or iteration-count input. The number of iterations
  equals the scan depth, as published.
- **Reset**: every register is reset asynchronously to zero.
- **Packet error timing**: the flag is registered at the start of the packet's output frame and
  leads its first output bit by one cycle.
- **Not in the RTL**: pad ring, clock tree and the buffers inserted on long routes of the
  0.16 µm chip. These are physical-design items. The published power figures (220 mW average,
  500 mW worst case at 64 MHz) and the 7.5 mm × 7.0 mm area describe that chip, not this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_check_node` | weights 6 and 7 against an integer model of the parity and the −log2 Σ 2^(−m) rule; directed and random vectors |
| `tb_var_node` | weights 3 and 8, cycle by cycle, against an integer model. Covers zero-sum ties, saturation and packet starts |
| `tb_var_group` | full 64-deep group: loading order, first iteration, decoded-bit order and latency, unused edges tied to zero |
| `tb_decoder_ctrl` | `pkt_start` period and `slot` count, including a reset in mid-frame |
| `tb_pkt_error_detect` | flag = OR of the row parities at `pkt_start`, held in between |
| `tb_ldpc_decoder` | full-size decoder, 10 packets back to back, against a packet-level reference model (see below) |
| `tb_ebn0_sweep` | full-size decoder on a Gaussian channel at 1.0–3.0 dB Eb/N0, 16 packets per point: bit and packet errors, `pkt_error`, message switching activity |

`tb_ldpc_decoder` builds H from the package functions. It row-reduces H to draw random
codewords, then sends four kinds of packets:

- a strong all-zero word;
- noiseless random codewords;
- noisy codewords at several noise levels;
- pure noise.

A reference decoder written in the testbench, working on the edge list with integers, predicts
every output bit and every `pkt_error`. The hardware must match it bit for bit, at the latencies
of the table above. The testbench also counts each mechanism of the design and fails if one
never occurs. The mechanisms are: packet starts, overlapped load/decode/unload, flagged and
clean packets, corrected channel errors, zero-sum ties, and check outputs of zero magnitude. It
prints the message switching activity per packet:

- below 2% for packets that converge;
- 13–17% for packets that do not.

That is the behaviour behind the low average power.

Result of one `tb_ebn0_sweep` run, with 16 packets per point (a single short run, so the rates
are coarse):

| Eb/N0 | channel bit errors | decoded bit errors | packets in error | message switching activity |
|---|---|---|---|---|
| 1.0 dB | 1544 | 1431 | 15 / 16 | 11.9% |
| 1.5 dB | 1273 | 421 | 6 / 16 | 10.2% |
| 2.0 dB | 1029 | 0 | 0 / 16 | 3.4% |
| 2.5 dB | 889 | 0 | 0 / 16 | 2.6% |
| 3.0 dB | 763 | 0 | 0 / 16 | 2.3% |

The switching activity counts how often the latched variable-to-check message bits toggle,
per bit and per iteration, while a packet is decoded. It is read from the hardware's message
latches. It falls steeply once packets start to converge, which is why the average power is
far below the worst case. The exact percentages depend on the code, the quantisation scale
(2.5 steps per unit amplitude here) and the channel.

The test flagged every packet that had errors. 16 packets per point cannot show error rates
below about 6%.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -j 4 -Mdir obj -y rtl rtl/ldpc_pkg.sv tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder
obj/Vtb_ldpc_decoder
```

Replace `tb_ldpc_decoder` with any other testbench name. The full decoder takes about 1.5
minutes to compile. It then simulates a packet in a few milliseconds. Sizes and the code live in `ldpc_pkg`. The
code functions there are written for N = 1024, W = 16 and D = 64. Other sizes need new
`edge_col`/`edge_idx`/`col_weight` definitions with W·D = N.
