# Odd-bit-inversion coding for Network-on-Chip links

On-chip network links are long, wide buses. Much of their energy goes into
wire toggling. Some also goes into *coupling*: switching between neighbouring
wires that move relative to each other. This design lowers that activity
without touching the routers or the links. The source network interface
(NI) encodes each body flit of a packet before the flit enters the network.
The destination NI decodes it. Wormhole switching sends the flits of a packet
in order over every hop, so all hops see the same coded sequence.

The code is **odd-bit inversion**. For each body flit the encoder chooses
between sending the data as they are and sending them with every odd-indexed
bit (1, 3, 5, ...) complemented. One extra wire carries the choice. Header
flits are never encoded, because routers must read them.

## Transition types

The encoder compares the new flit with the flit the link is carrying now,
one pair of adjacent wires at a time. It sorts each pair's change into one of
four types:

| Type | Pair change (previous -> new)              | Example           |
|------|--------------------------------------------|-------------------|
| 1    | exactly one of the two wires switches      | 00 -> 01, 11 -> 10 |
| 2    | both switch, in opposite directions        | 01 -> 10          |
| 3    | both switch, in the same direction         | 00 -> 11          |
| 4    | neither switches                           | 01 -> 01          |

Every pair (i, i+1) holds one even and one odd wire. Odd inversion therefore
flips exactly one wire of every pair, and it turns a pair's transition into a
different type. For example, Type 2 (01 -> 10) becomes Type 1 (01 -> 11), and
Type 1 becomes Type 2, 3 or 4.

`transition_block` implements this classification as a one-hot output.
There is one instance per wire pair.

Where the definitions disagree, the code uses the written ones. The published
4-input truth table lists 01->01 and 10->10 as Type 3 and 00->11 as Type 4,
which contradicts them. This code treats every unchanged pair as Type 4 and
both 00<->11 changes as Type 3. The Type 1 and Type 2 rows are used as
published.

## The encoder (`odd_invert_encoder`)

The link is `W` wires wide. The default is 9: 8 data bits plus one flag bit,
`W-1`. The encoder works in four steps:

1. The candidate word is `X = {0, data}`. Its flag position is 0.
2. `W-1` pair classifiers compare `X[i+1:i]` with `Y[i+1:i]`, for
   i = 0..W-2. `Y` is the encoded flit already on the link. The pair that
   includes the flag wire is counted too.
3. From each classifier the encoder takes the bit for the type it was built
   for, the parameter `TYPE`. `majority_voter` counts these bits. It asks for
   inversion when the count is a strict majority: `count > (W-1)/2`.
4. `odd_bit_inverter` complements the odd data bits when inversion is asked
   for. It writes the decision into the flag bit.

A header flit goes out as `{0, data}` without being encoded. It still
becomes the next `Y`, because it is what the link last carried.

The choice of `TYPE` gives four encoder variants:

* `TYPE1` is the reference setting and the top's default.
* `TYPE2`, `TYPE3` and `TYPE4` are the other variants.

The rule is the same for all four: invert when most pairs would make a
transition of the chosen type. This rule does **not** guarantee fewer
transitions. It only does what it says. The results section below shows what
each variant does to link activity.

Timing: the output register is the link driver and also the feedback `Y`. A
flit offered with `in_valid` appears on `out_flit` one clock later. While no
flit is offered, the register holds its value, so the wires stay still. There
is no back-pressure.

## The decoder (`odd_invert_decoder`)

Odd inversion undoes itself, so decoding is simple. For a body flit with the
flag set, the decoder complements the odd data bits again and drops the flag.
Headers and unflagged body flits pass through unchanged. The decoder has one
cycle of latency and a registered output.

## The top (`noc_odd_invert_top`)

The top contains the source NI encoder and the destination NI decoder. The
network between them is not part of this design: the scheme uses routers
and links unchanged. The top brings the network out as two ports:

* `link_tx` carries the coded flit into the network as
  `{valid, head, flag, data[W-2:0]}`.
* `link_rx` is where the flit returns at the destination.

End-to-end latency is 2 cycles plus the network's latency. `inv_taken` shows
the flag of the flit now on `link_tx`.

Parameters: `W` (link width including the flag, default 9) and `TYPE`
(`noc_enc_pkg::trans_type_e`, default `TYPE1`). The odd-bit mask function is 64 bits wide, so `W` can be at most 65
(64 data bits plus the flag).

## Files

| File                         | Contents                                            |
|------------------------------|-----------------------------------------------------|
| `rtl/noc_enc_pkg.sv`         | transition-type enum, odd-bit mask function         |
| `rtl/transition_block.sv`    | pair transition classifier                          |
| `rtl/majority_voter.sv`      | population count and strict-majority compare        |
| `rtl/odd_bit_inverter.sv`    | conditional odd-bit complement and flag             |
| `rtl/odd_invert_encoder.sv`  | encoder                                             |
| `rtl/odd_invert_decoder.sv`  | decoder                                             |
| `rtl/noc_odd_invert_top.sv`  | source encoder plus destination decoder             |
| `tb/odd_invert_ref_pkg.sv`   | table-driven reference encoder, transition counters |
| `tb/noc_path_model.sv`       | network model: N register hops, order-preserving    |
| `tb/tb_*.sv`                 | self-checking testbenches                           |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
Each also has a watchdog. To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/noc_enc_pkg.sv tb/odd_invert_ref_pkg.sv tb/tb_noc_odd_invert_top.sv \
  --top-module tb_noc_odd_invert_top
./obj_dir/Vtb_noc_odd_invert_top
```

* `tb_transition_block` tries all 16 pair transitions.
* `tb_majority_voter` tries every input for N = 8 and N = 7.
* `tb_odd_bit_inverter` tries all 512 input combinations.
* `tb_odd_invert_decoder` checks random flits, the header pass-through,
  latency and the hold behaviour.
* `tb_odd_invert_encoder` runs four encoders (Types 1-4) on one random stream
  with headers and idle cycles. It checks every link word against the
  reference model.
* `tb_noc_odd_invert_top` runs the default top (W=9, Type 1) with a 3-hop
  network. It sends 300 random packets and checks that every flit arrives
  intact, in order and exactly 5 cycles later. It counts header bypasses,
  inversions, plain body flits and idle holds, and fails if any of them never
  happened.
* `tb_type_comparison` runs four complete paths, one per type. It reports
  link self transitions and coupling transitions next to those of the uncoded
  flits. Coupling is counted as 1 per Type 1 pair and 2 per Type 2 pair.

## What the type comparison shows

These counts come from `tb_type_comparison` with W=9 and 500 packets per
pattern:

| Traffic                   | Uncoded self / coupling | Type 1        | Type 2        | Type 3        | Type 4        |
|---------------------------|-------------------------|---------------|---------------|---------------|---------------|
| random payload            | 12066 / 17221           | 13176 / 16697 | 12058 / 17197 | 12068 / 17313 | 13070 / 18375 |
| 1-2 bit changes per flit  | 5475 / 9039             | 5475 / 9039   | 5475 / 9039   | 5475 / 9039   | 13833 / 19637 |

* On random data the Type 1 variant removes about 3 % of the coupling
  transitions, at the cost of more self transitions.
* Types 2 and 3 rarely reach a majority, so they seldom invert.
* The Type 4 variant inverts when most pairs *stay still*, which adds
  activity. It behaves that way by construction.

These are transition counts, not power figures. Power needs a gate-level
model of the target technology.

## Choices made where the scheme leaves them open

* The flag is the top wire, `W-1`. The "odd" bits are the odd-indexed data
  bits, counted from bit 0.
* The pair between the flag wire and the top data bit is included in the
  count, which gives `W-1` classifiers.
* The majority threshold is strict: `2*count > W-1`.
* The encoder and decoder registers, the valid/head side-band and the
  synchronous active-low reset to zero are this design's choices. After
  reset the "previous flit" is all zeros.
* A header flit updates the encoder's previous-flit register.
* There is no flow control. A real NI would place these stages in its flit
  path, behind its own buffers and credit logic.
* The routers and the network are outside the design. Testbenches model
  them as a chain of register stages.
