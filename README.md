# Crosstalk-avoiding bus codec for a 16-bit AMBA AHB data path

On long, tightly packed on-chip buses, most of the switching energy goes into
the coupling capacitance between neighbouring wires, not into the wire's
capacitance to the substrate. The worst case is three adjacent wires switching
against each other: in a transition such as `101 -> 010` the centre wire sees
four times the coupling of a lone switching wire, and so four times the delay
and coupling energy. This codec re-encodes the data so that the worst
patterns never appear on the wires, and so that fewer wires switch in opposite
directions. It costs some extra wires and one clock of latency. It needs no
prior knowledge of the data statistics.

The RTL covers the whole codec: the 4-bit cluster encoder and decoder, the
8-bit and 16-bit segment encoders and decoders, and a top level
(`ahb_xtalk_codec`) that sits on the lower 16 bits of an AHB write-data bus.
The AHB fabric, masters and slaves are not included.

## Crosstalk types

Look at three adjacent wires and how each one moves (rise, fall or quiet)
from one bus word to the next. The centre wire's coupling load, in units of
one neighbour's coupling capacitance, gives the type:

| type | centre wire and neighbours | example | centre coupling |
|------|----------------------------|---------|-----------------|
| 4 | all three toggle; centre opposite to both | `101 -> 010` | 4 C |
| 3 | centre toggles; one neighbour opposite, the other quiet | `101 -> 110` | 3 C |
| 2 | all three toggle; centre opposite to one, same as the other | `001 -> 110` | 2 C |
| 1 | only one of the three wires toggles | `110 -> 111` | 1 C |

Types 4, 3 and 2 count as worst-case crosstalk. This codec removes type-4 and
type-2 completely, cuts type-3 down sharply, and accepts more type-1.

## The cluster encoder (`encoder4`)

The data is handled in 4-bit clusters. Each cluster is sent in one of two forms:

- `x_z1 = d ^ 0101`
- `x_z2 = d ^ 1010`

A decode bit says which form was sent. These two forms are bitwise
complements, so any wire that toggles in one does not toggle in the other.
A type-4 or type-2 pattern needs three adjacent wires that all toggle. So if
one form has such a pattern, the other form toggles at most one wire in that
window and is clean.

Each form is checked against the word now on the bus, `x(n-1)`, by two detectors:

- **`n4_count`** flags a type-4 pattern in window 0-2 or window 1-3.
  A window is flagged when all three wires toggle and the centre wire ends
  up different from both neighbours.
- **`n2_count`** counts the adjacent pairs (0-1, 1-2, 2-3) whose two wires
  toggle in opposite directions. The count is 0 to 3, held in 2 bits.

`n2_compare` tells whether the count for `x_z1` is strictly greater than the
count for `x_z2`. The form to send is then chosen by these rules, in priority
order:

1. If `x_z1` has a type-4 pattern, send `x_z2` with decode bit 1.
2. Otherwise, if `x_z2` has a type-4 pattern, send `x_z1` with decode bit 0.
3. Otherwise, if `x_z1` has more opposite pairs, send `x_z2` with decode bit 1.
4. Otherwise (a tie included), send `x_z1` with decode bit 0.

The chosen word and its decode bit go into a register on the rising edge.
The register drives the bus wires and also holds `x(n-1)` for the next word.
All the checking takes one cycle. The decoder (`decoder4`) is only an XOR
with `0101` or `1010`, chosen by the decode bit.

Why rule 3 removes type-2: a type-2 pattern in one form means that form has
at least one opposite pair. The other form toggles at most one wire in that
window, so it has fewer opposite pairs and is chosen. The testbenches check
on every cycle that no type-4 or type-2 pattern appears on any window of the
bus.

## Bus layout and the decode code

An 8-bit transfer uses two clusters and 13 wires (`encoder8`, `decoder8`):

```
bus[3:0]   cluster 0 (data[3:0])
bus[4]     shield (0)
bus[8:5]   cluster 1 (data[7:4])
bus[9]     shield (0)
bus[12:10] decode info
```

The grounded shield wires stop worst-case patterns across the cluster
boundaries. The two decode bits are not sent raw. They travel as a 3-bit code
that never switches in an alternating pattern:

| cluster 0 | cluster 1 | code |
|-----------|-----------|------|
| Z1 | Z1 | 000 |
| Z1 | Z2 | 001 |
| Z2 | Z1 | 011 |
| Z2 | Z2 | 111 |

Encoding: `code = {s0 & s1, s0, s0 | s1}`.
Decoding: `s0 = code[1]` and `s1 = code[2] | (code[0] & ~code[1])`.
Both are in `xtalk_pkg`. `encoder8` has assertions for two rules: the shields
stay low, and only these four codes appear.

A 16-bit transfer uses two 13-wire segments with a shield between them, 27
wires in all (`encoder16`, `decoder16`):

```
bus[12:0]  byte lane 0 segment
bus[13]    shield (0)
bus[26:14] byte lane 1 segment
```

For a single 4-bit cluster on its own, the equivalent bus is 6 wires: 4 coded
wires, a shield and the decode bit. That is simply `encoder4`'s `coded` and
`dbit` with a grounded wire between them.

## Byte lanes and the AHB side (`ahb_xtalk_codec`)

The top takes `hwdata[15:0]` and the 4-bit AHB byte lane enables. Each of
lanes 0 and 1 is encoded only when its enable is set. A disabled lane's 13
wires are grounded: they go to 0 and stay quiet. An 8-bit transfer on lane 0
therefore uses only the lower segment. When the lane is enabled again, its
encoders compare against the grounded state, which is the true state of its
wires. Lanes 2 and 3 are ignored, because the codec covers 16 bits.

The lane enables are registered with the data (`bus_lane`). The decoder thus
gets the enables of the word it is decoding. The decoded `rdata` shows 0 in
disabled lanes.

Timing:

- `hwdata` and `byte_lane` are sampled on every rising edge.
- `bus`, `bus_lane` and `rdata` show that word from the same edge on.
- Latency is one clock. Throughput is one word per clock.
- `rst_n` is an asynchronous, active-low reset. It clears the bus to 0.

## Where this RTL departs from the original description, or fills gaps

- **Type-4 detector.** The original type-4 counter is drawn with the four
  toggle terms and one neighbour-difference term (`x1 ^ x2`) feeding two AND
  gates and an OR. Here each window also requires its outer neighbour
  difference (`x0 ^ x1`, `x2 ^ x3`), which matches the type-4 definition
  exactly. The encoder's guarantee holds with either version.
- **Opposite-pair counter.** Each pair term is read as an AND of both
  toggles and the difference of the new values.
- **Design choices.** These were not specified and are chosen here:
  - bit positions on the bus;
  - which nibble is the "first" cluster;
  - bit order of the decode code;
  - Z1 = `0101` read with the leftmost digit as bit 3;
  - reset to 0;
  - the `ground` input of the encoders;
  - grounding each byte lane separately;
  - carrying the lane enables with the bus.
- **Shield wires** appear as constant-0 bits of `bus`.
- **Not covered.** A variant without shield wires (25% redundancy, type-4
  only made rare) is described as an alternative and is not built. Nor are
  32-bit transfers.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The shared
`tb/xtalk_ref_pkg.sv` holds the reference models, which are written
independently of the RTL. It contains:

- a wire-by-wire crosstalk classifier;
- a reference cluster encoder;
- the lumped-model bus energy:
  `E_i / (C_L Vdd^2) = V_i(final) * ((1 + k_i*lambda) dV_i - lambda * sum of neighbour dV)`,
  with `lambda = 3.2` for minimum-spaced wires in 0.18 um CMOS;
- generators for synthetic correlated data.

The testbenches cover:

- `n4_count`, `n2_count`, `n2_compare`, `decoder4` and `decoder8` are tested
  exhaustively.
- `encoder4`, `encoder8` and `encoder16` are compared with the reference
  encoder wire for wire over 20 000 words.
- `tb_ahb_xtalk_codec` runs the top at its default size with six workloads:
  random, image-like and biosignal-like data, as 8-bit and as 16-bit
  transfers. It checks, on every cycle, the exact bus, the decoded data one
  edge later, and that no type-4 or type-2 pattern appears. It also requires
  each of these to happen at least once: all four selection rules, a grounded
  lane, and a switch between 8-bit and 16-bit transfers.

Results of the top-level run. The data is synthetic: the sample counts match
the published evaluation, but the data sets themselves are not available. The
counts in the middle columns are for the coded bus.

| workload | samples | N4 | N2 | N3 (coded / uncoded) | energy saving |
|----------|---------|----|----|----------------------|---------------|
| random 8-bit | 10000 | 0 | 0 | 1101 / 7489 | 16.1 % |
| image-like 8-bit | 65535 | 0 | 0 | 2125 / 30556 | 27.7 % |
| bio-like 8-bit | 14644 | 0 | 0 | 944 / 8743 | 20.3 % |
| random 16-bit | 10000 | 0 | 0 | 2330 / 17556 | 19.3 % |
| image-like 16-bit | 65535 | 0 | 0 | 6364 / 86835 | 22.0 % |
| bio-like 16-bit | 14644 | 0 | 0 | 2961 / 23615 | 22.7 % |

The published savings on real data are about 23-35%. The shape of the
results agrees: type-4 and type-2 are gone, type-3 drops to roughly a tenth,
type-1 roughly doubles, and correlated data saves the most. The exact
percentages depend on the data.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/xtalk_pkg.sv tb/xtalk_ref_pkg.sv tb/tb_ahb_xtalk_codec.sv \
  --top-module tb_ahb_xtalk_codec -o sim && ./obj_dir/sim
```

Replace the testbench name to run another block's test. The full top-level
run takes a few seconds.

To change the basis words, override `Z1` and `Z2` on `encoder4` and
`decoder4`. The defaults are in `xtalk_pkg`. The type-4 guarantee relies on
`Z2 == ~Z1`.

## Files

| file | content |
|------|---------|
| `rtl/xtalk_pkg.sv` | basis words, bus widths, decode-code functions |
| `rtl/n4_count.sv` | type-4 detector |
| `rtl/n2_count.sv` | opposite-pair counter |
| `rtl/n2_compare.sv` | 2-bit comparator |
| `rtl/encoder4.sv`, `rtl/decoder4.sv` | 4-bit cluster encoder and decoder |
| `rtl/encoder8.sv`, `rtl/decoder8.sv` | 8-bit, 13-wire segment |
| `rtl/encoder16.sv`, `rtl/decoder16.sv` | 16-bit, 27-wire bus with byte lanes |
| `rtl/ahb_xtalk_codec.sv` | top: encoder, bus, decoder |
| `tb/xtalk_ref_pkg.sv` | reference models and data generators |
| `tb/tb_*.sv` | one testbench per module |
