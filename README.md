# Smart links for an eight-direction NoC router

On a network-on-chip, the wires between routers switch a large share of the
power. This design attacks that in three ways, each built as a variant of the
same router:

* **Link Design I: shorter paths and gated outputs.** Besides north, south,
  east and west, the router has four diagonal ports (NW, NE, SW, SE). In a
  mesh, a diagonal hop replaces two straight hops: a route that needs five
  hops in a plain 4x4 mesh needs three when diagonals are used. Each output is
  an 8:1 multiplexer that is connected to one input for a fixed time and then
  released. The output register loads only when a flit passes, so idle links
  do not toggle. This is the "MUX gating".
* **Link Design II: Gray and transition coding.** An 8-bit payload is sent in
  Gray code. Six of its bits are sent as the XOR of the new bit with the bit
  already on the line, and the six are inverted as a group when Gray bits 4
  and 5 are both 1. No extra wire is needed.
* **Link Design III: choose the cheapest of eight codes.** Each word is
  transformed eight ways: rotate right or left, rotate right or left then
  invert, swap halves, invert all, invert the even lines, invert the odd
  lines. A tree of Hamming-distance comparators picks the version that changes
  the fewest lines against the word already on the bus.

All RTL is SystemVerilog-2017 and synthesizable. Every block has a
self-checking testbench; the small helpers (`bin2gray`, `gray2bin`,
`hd_compare`) are tested through the coders that use them.

## Flits, ports and directions

A link is 11 bits wide. The design fixes the width. The field layout is this
implementation's own choice:

| bits   | meaning                                                      |
|--------|--------------------------------------------------------------|
| [10:8] | output direction the flit asks for at this router            |
| [7:0]  | payload (the part Link Design II codes)                      |

Direction numbers (`link_pkg::dir_e`) double as port indices:

| 0 | 1 | 2 | 3 | 4  | 5  | 6  | 7  |
|---|---|---|---|----|----|----|----|
| S | N | W | E | NW | NE | SW | SE |

All port buses are packed arrays indexed by this number. For example,
`in_data[2]` is the link arriving from the west.

There is no local (processor) port. The design shows only the eight
neighbour directions. A flit carries only the direction for the current
router, not a destination address. So the router is a switch driven by its
neighbours, and no routing algorithm is built in.

## The connection mechanism (`link1_router`)

This is the part with the most behaviour. Each output `o` has:

* `conn_q[o]`: the output is connected; `out_free[o] = !conn_q[o]`.
* `src_q[o]`: the input it is connected to. This is the multiplexer select.
* `timer_q[o]`: cycles left in the connection.
* `rr_q[o]`: the round-robin start point for the next choice.

Each input uses a valid/ack handshake. An input holds `in_data` and `in_valid`
until it sees `in_ack` high in a cycle. An assertion in the router checks this
rule. In each cycle:

1. **Free output, one or more requests:** the round-robin pointer picks one
   requester. Its flit passes in this same cycle (`in_ack` high). The output
   is then connected to that input for `HOLD_CYCLES` cycles.
2. **Connected output:** only the connected input may send. Each flit it
   offers for this output passes at once, one per cycle. Other inputs asking
   for the output wait.
3. **Release:** after `HOLD_CYCLES` cycles the output disconnects, whether or
   not traffic is pending, and is free again. The length is counted from the
   grant, not from the last flit.

A flit acknowledged in cycle *t* is in `out_data` with `out_valid` high in
cycle *t+1*. `out_data` keeps its value in every cycle without a flit.

`out_free` is still high in the grant cycle. A steady stream through one
output is therefore re-arbitrated every `HOLD_CYCLES + 1` cycles, and no
cycle is lost. With `HOLD_CYCLES = 1`, no connection is held and every flit is arbitrated
on its own.

## Link Design II coder (`link2_encoder`, `link2_decoder`)

Encoder, with `g = gray(din)` and `s = g[4] & g[5]`:

```
bus[5:4]            <= g[5:4]                              (sent plain)
bus[7,6,3,2,1,0]    <= g[7,6,3,2,1,0] ^ bus[7,6,3,2,1,0] ^ {6{s}}
```

Decoder: `s = bus[4] & bus[5]`. It keeps the coded bits of the previous word
in a register and does the following:

```
g[7,6,3,2,1,0] = bus[...] ^ prev[...] ^ {6{s}};  g[5:4] = bus[5:4];  dout = binary(g)
```

Both ends reset to zero. Both must step once per word. The encoder steps on
`en`. The decoder stores the word on `en`, which `link2_router` drives from
the router's acknowledge. The decoder output is combinational.

Two readings here are this design's own:

* Bits 4 and 5 stay plain so that the receiver can rebuild the select.
* The decoder register holds the previous *received* word. A register on the
  decoded value would not undo this encoder.

## Link Design III coder (`link3_encoder`, `hd_compare`)

`code` numbers the transforms as follows:

| code | transform              | code | transform                 |
|------|------------------------|------|---------------------------|
| 0    | rotate right 1         | 4    | swap lower/upper W/2 bits (middle bit stays for odd W) |
| 1    | rotate left 1          | 5    | invert all                |
| 2    | rotate right 1, invert | 6    | invert bits 0, 2, 4, ...  |
| 3    | rotate left 1, invert  | 7    | invert bits 1, 3, 5, ...  |

The comparators work in stages:

1. Four `hd_compare` instances judge the pairs 0/1, 2/3, 4/5 and 6/7.
2. Two more judge the four pair winners two at a time.
3. A last one picks the overall winner.

Each comparator keeps the candidate with the smaller Hamming distance to the
current bus word. On a tie it keeps the lower code. The winner and its code
are registered on `en`.

The raw word is never one of the candidates, so a word always goes out in
one of the eight transformed forms. A receiver needs `code` to undo the
transform, so `code` is a separate 3-bit output. The eight bus lines alone
are not enough. No Link III decoder is part of the design. The testbenches
undo the transform with a reference function.

## What the coders buy: measured transitions

`link_transitions_tb` sends 4000 words, one per cycle, from the west input to
the north output of all three routers. It counts line transitions on the
north output link. Link I and Link III are counted over all 11 lines. Link II
is counted over its 8 payload lines; its direction field does not change in
this stream. The table gives transitions per word:

| payload | Link I | Link II | Link III (data) | Link III code lines |
|---------|-------:|--------:|----------------:|--------------------:|
| random 8-bit | 3.99 | 3.99 | 2.90 | 1.18 |
| counter 0,1,2,... | 1.99 | 3.05 | 1.71 | 0.35 |
| sparse (1-2 bits set) | 2.04 | 3.09 | 1.98 | 0.10 |

Link III reduces data-line activity on random data by about 27%. If the
3-bit code has to travel on wires of its own, those wires take the gain
back: 4.08 in total on random data, and 2.06 on the counter.

The Link II coder as built makes each of its six coded lines toggle once for
every 1 in the Gray word, after the optional group inversion. So it saves
transitions only when those Gray words are mostly zero. On the patterns above
it does not save any, and on correlated data it costs more than sending the
payload plainly. Bear this in mind before using it. The alternative is to
feed back the previous Gray input instead of the stored output. That would
be a different coder, and its decoder would change with it.

## Module map

| module           | role |
|------------------|------|
| `link_pkg`       | widths, `dir_e`, `flit_dir()` |
| `link1_router`   | Link Design I router (8 ports, gated outputs, timed connections) |
| `bin2gray`, `gray2bin` | code converters used by the Link II coder |
| `link2_encoder`, `link2_decoder` | Link II coder, 8-bit payload |
| `link2_router`   | router + a decoder on every input + an encoder on every output; output latency 2 |
| `hd_compare`     | Hamming-distance comparator |
| `link3_encoder`  | Link III coder, `W` = 11 by default |
| `link3_router`   | router + a Link III encoder on every output, `out_code` per output; output latency 2 |
| `smart_link_top` | the three routers side by side, ports `l1_*`, `l2_*`, `l3_*`, shared clock and reset |

Parameters: `HOLD_CYCLES` (default 8) on every router and on the top. The
link width, payload width and port count are package constants: 11, 8
and 8.

Cost at the defaults, after generic synthesis of the whole top: about 4300
word-level cells and 792 flip-flops for the three routers together.

## Simulating

Each testbench in `tb/` prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. For example:

```
verilator --binary --timing --assert --top-module smart_link_top_tb \
    -y rtl -y tb +libext+.sv rtl/link_pkg.sv tb/smart_link_top_tb.sv
./obj_dir/Vsmart_link_top_tb
```

| testbench | what it checks |
|-----------|----------------|
| `link1_router_tb` | An independent connection model. It checks free flags, exactly one grant per free output, only the connected input served, latency 1, idle outputs unchanged, all flits delivered in order. It also requires that connections, waits, arbitration, releases and diagonal traffic all occur. |
| `link2_encoder_tb`, `link2_decoder_tb` | Compare with a reference model of the coding rule over all 256 values and random streams. They require both multiplexer settings. |
| `link3_encoder_tb` | Compares with a reference that evaluates all eight transforms. It checks minimum distance, lowest code on ties, that the word can be decoded, and that the bus holds while idle. It requires every code to be used. |
| `link2_router_tb`, `link3_router_tb` | End to end, latency 2. For Link II the sources code their flits with a reference coder and the outputs are decoded with a reference decoder; for Link III the outputs are decoded with the inverse transforms. `link3_router_tb` also checks that the word sent changes the fewest possible lines. |
| `smart_link_top_tb` | Runs at the top's defaults. The same traffic goes through all three routers. Their acks and free flags must match cycle by cycle, and every output is checked. It requires every mechanism above. |
| `link_transitions_tb` | The transition measurement above. It checks every word after decoding, the rate of one word per cycle, and that the connection is renewed every `HOLD_CYCLES + 1` cycles. |

All tests run in well under a second.

## Where this departs from or goes beyond the source design

* **Chosen here:** the flit layout, the direction numbering, the handshake,
  round-robin arbitration, the `HOLD_CYCLES` value, asynchronous active-low
  reset, and all latencies.
* **Link III code output:** the encoder is described as needing no extra bus
  line. Here it has a 3-bit `code` output, because without it the receiver
  cannot decode.
* **Link II decoder register:** it stores the received coded word, as
  explained above.
* **Not built:**
  * input FIFOs, which the source waveforms hint at but whose depth and
    position are not given;
  * a mesh of these routers with a routing algorithm;
  * an uncoded baseline router.
