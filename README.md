# Modified carry skip adder (16-bit, one ripple adder per group)

A carry-select adder splits the word into groups. It computes every upper
group twice, once assuming a carry-in of 0 and once assuming 1, and picks the
right result with a multiplexer when the real carry arrives. The carry then
crosses a group through one multiplexer instead of rippling through four full
adders. The price is area: the textbook version needs two ripple carry adders
(RCAs) per group.

This adder, called a *Modified Carry Skip Adder* (MCSA), keeps the
selection but drops the second RCA. Each upper group has one RCA with its
carry-in tied to 0. A small **binary to excess-1 converter (BEC)** adds one to
that RCA's 5-bit result `{carry, sum[3:0]}`, which gives exactly the result
for a carry-in of 1. An incrementer on five bits is far smaller than a second
4-bit RCA. The converter sits after the RCA, so the carry-in-1 result arrives
a little later than it would from a parallel RCA. The design accepts that
small loss of speed for the area saving.

Despite its name, the circuit has no skip (bypass) logic. It is a carry-select
adder, and "skip" is kept here only as its given name.

## Structure at the default size

```
            a[15:12] b[15:12]    a[11:8] b[11:8]     a[7:4] b[7:4]      a[3:0] b[3:0]
                |                   |                   |                  |
            RCA (cin=0)         RCA (cin=0)         RCA (cin=0)        RCA  <-- cin
              |  \                |  \                |  \               |   |
              |  BEC3             |  BEC2             |  BEC1         sum[3:0] r1c
              |   |               |   |               |   |                  |
            MUX3 (10:5) <-m2c-- MUX2 (10:5) <-m1c-- MUX1 (10:5) <-----------+
              |                   |                   |
  carry <-----+  sum[15:12]       sum[11:8]           sum[7:4]
```

- **Group 0 (bits 3:0)** is a plain 4-bit RCA fed by the external `cin`. Its
  carry out (`r1c`) is the first multiplexer select.
- **Groups 1..3** each hold:
  - an RCA with carry-in 0, giving `{rc, rsum}`;
  - a 5-bit BEC, giving `{rc, rsum} + 1`;
  - a 10:5 multiplexer. It has two 5-bit data inputs `{carry, sum}` and
    passes one of them through, chosen by the carry out of the group below.
- The multiplexer's carry output selects the next group's multiplexer. The
  last multiplexer's carry output is the adder's `carry`.

The internal names in `rtl/mcsa.sv` map onto the names used for the original
16-bit circuit as follows. `gc[0]` is `r1c`. `gc[1]` and `gc[2]` are the
multiplexer carries `m1c` and `m2c`. In group *k*, `rsum`/`rc` are
`r(k+1)sum`/`r(k+1)c`. `becres` holds `becsum`/`becc` (groups 2 and 3 use
`becsum1`/`becc1` and `becsum2`/`becc2`).

## Why the converter is enough

With a carry-in of 0, a group's 4-bit operands sum to at most 30, that is
`1_1110`. The result with a carry-in of 1 is always that value plus one. So a
5-bit incrementer produces it exactly, with no overflow: the BEC's input
never reaches `1_1111`. The BEC in `rtl/bec.sv` uses the usual
toggle-if-all-lower-bits-are-one form:

```
x[0] = ~b[0]
x[i] =  b[i] ^ (b[0] & b[1] & ... & b[i-1])      i = 1..4
```

Bit 4 of the BEC output is the group's carry for a carry-in of 1. The
converter can create that carry itself, when the RCA gives `0_1111`.

## Timing

All of the logic is combinational: there is no clock, no register and no
reset. Every RCA starts at the same moment. The worst-case path runs through:

1. the group-0 ripple (four full adders);
2. one multiplexer per upper group (three).

The carry-in-1 path through an upper group is one RCA plus the BEC. It only
has to settle before that group's select arrives. For wider versions it is
hidden behind the multiplexer chain.

The original design was compared with the two-RCA version on an FPGA in
area and maximum frequency. No area or delay numbers come with this RTL. The
`synth` flow of yosys gives 86 word-level cells for the 16-bit default.

## Files and parameters

| file | module | what it is | parameters (default) |
|---|---|---|---|
| `rtl/full_adder.sv` | `full_adder` | 1-bit full adder | none |
| `rtl/rca.sv` | `rca` | ripple chain of `full_adder` | `WIDTH` (4) |
| `rtl/bec.sv` | `bec` | binary to excess-1 converter, output = input + 1 | `WIDTH` (5) |
| `rtl/mux10to5.sv` | `mux10to5` | 2-way select of `{carry, sum}` | `WIDTH` (5) |
| `rtl/mcsa.sv` | `mcsa` (top) | the adder | `WIDTH` (16), `GROUP_WIDTH` (4) |

Top-level ports of `mcsa`:

- inputs: `a[WIDTH-1:0]`, `b[WIDTH-1:0]`, `cin`;
- outputs: `sum[WIDTH-1:0]`, `carry`.

The 8-, 32- and 64-bit variants are `mcsa #(.WIDTH(8))`, `#(.WIDTH(32))` and
`#(.WIDTH(64))`. They keep uniform 4-bit groups, so the multiplexer chain grows
to 1, 7 and 15 stages. `WIDTH` must be a non-zero multiple of
`GROUP_WIDTH`; anything else stops elaboration with an error. Changing
`GROUP_WIDTH` resizes the RCAs, converters and multiplexers together.

## Where this RTL makes its own choices

The block structure, the 16-bit width, the 4-bit groups and the
5-bit/10:5 sizes of the converter and multiplexer all follow the original
design. The following are this implementation's own choices:

- The gate form of the full adder and of the BEC. The original gives their
  function, not their gates.
- The multiplexer polarity: select 0 passes the RCA result, select 1 the BEC
  result. This follows from what the circuit has to compute.
- The `WIDTH` parameter, which makes the 8/32/64-bit versions generated rather
  than separately drawn. For those versions, the group size of 4 is assumed.
- No pipelining or registers at the ports. The original shows none.

Not included is the conventional carry-select adder with two RCAs per group.
It appears in the original only as the comparison baseline.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
also has a watchdog that counts a failure if the run hangs.

| testbench | what it checks |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_rca` | all 512 combinations of a 4-bit RCA |
| `tb_bec` | all 32 inputs, including the wrap from 31 to 0 |
| `tb_mux10to5` | all 2048 combinations of select and data |
| `tb_mcsa` | the 16-bit default; see below |
| `tb_mcsa_fig7` | the original design's reference simulation, at internal group signals (`r2sum = 1111`, `becsum = 0000`, `m1c`, ...) as well as at the ports |
| `tb_mcsa_sizes` | 8-, 32- and 64-bit instances: corners and 20,000 random vectors each |

`tb_mcsa` runs the 16-bit default with no parameter overrides. Its stimulus:

- the reference vectors with their recorded results, for example
  `B6C9 + 7776 + 1 = 1_2E40`;
- directed corners;
- 200,000 random vectors, each checked against `a + b + cin`.

It also counts how often each mechanism occurs and fails if any count stays
at zero:

- each multiplexer picks the RCA input;
- each multiplexer picks the BEC input;
- the BEC creates a group carry;
- the carry out is 0, and it is 1;
- a carry ripples from `cin` through every group.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_mcsa tb/tb_mcsa.sv
./obj_dir/Vtb_mcsa
```

Replace `tb_mcsa` with any other testbench name. Each one runs in well under
a second.
