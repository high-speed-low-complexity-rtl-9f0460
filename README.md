# XOR-free convolutional encoder with a reduced ROM

A convolutional encoder normally computes each output bit as the XOR
(modulo-2 sum) of the current input bit and some of the shift-register cells.
This design computes the same code symbols with **no XOR gates in the
datapath**. It uses two multiplexers over precomputed constants and an
eight-word ROM. That ROM is half the size of the four-row table an earlier
XOR-free encoder needed: the missing rows are the complements of the stored
ones, and a multiplexer reaches them by picking a different address.

The code is the cdma2000 (3GPP2) rate-1/2 code with constraint length
K = 9:

    c0 = u + s1 + s2 + s3 + s5 + s7 + s8      g0 = 753 (octal)
    c1 = u + s2 + s3 + s4 + s8                g1 = 561 (octal)

Here `u` is the information bit, `s1` is the newest of the eight delay cells
and `s8` the oldest. The encoder takes one bit per clock and gives one 2-bit
symbol `{c0, c1}` per clock, one clock later.

## How a symbol is formed

The eight state cells are split by position:

| cells        | role                                   | goes to                  |
|--------------|----------------------------------------|--------------------------|
| s1 ... s5    | "isomorphic state", 5 bits             | select of the 32:1 mux   |
| s6           | tapped by neither generator            | unused                   |
| s7, s8       | column tag (CT), 2 bits                | data of the 8:1 mux      |

**Step 1: 32:1 multiplexer (`isostate_mux32`).** Its 32 constant inputs
hold, for every value of s1..s5, the 2-bit partial code word those five
cells contribute. The input bit is taken as 0. The multiplexer output `z`
is called the *new row tag*.

**Step 2: 8:1 restoring multiplexer (`restore_mux8`).** The whole symbol is
`p XOR f(CT)`, where:

- `p` is the partial word of `u` and s1..s5. Since both generators tap `u`,
  `p` is `z` with both bits inverted when `u = 1`.
- `f(CT)` is the contribution of s7 and s8.

`p` takes four values, so the full table has four rows: one per value of
`p`, each with four column-tag columns. Row `10` is row `00` with c0
inverted. Rows `11` and `01` are the complements of rows `00` and `10`. The
ROM keeps only rows `00` and `10`, which the design calls row 0 and row 1.

A complemented row is reached by **inverting the column-tag LSB**. That bit
is s8, which both generators tap, so inverting it inverts both output bits.
The multiplexer is selected by `{u, z}`. Each of its eight inputs is a fixed
address of the form `{row, s7, s8 or ~s8}`:

| p = {p0,p1} | row tag | column tag sent | ROM word read          |
|-------------|---------|-----------------|------------------------|
| 00          | 0       | {s7, s8}        | f(CT)                  |
| 10          | 1       | {s7, s8}        | f(CT) with c0 inverted |
| 11          | 0       | {s7, ~s8}       | ~f(CT)                 |
| 01          | 1       | {s7, ~s8}       | ~f(CT), c0 inverted    |

The row tag is `p0 XOR p1` and the inversion flag is `p1`. The design
computes both while the parameters are elaborated. The hardware is only the
multiplexer and one inverter.

**Step 3: reduced ROM (`reduced_rom`).** Eight 2-bit words at address
`{row, CT}`:

| address | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---------|-----|-----|-----|-----|-----|-----|-----|-----|
| word    | 00  | 11  | 10  | 01  | 10  | 01  | 00  | 11  |

Row 0 is `f(CT)`: s7 contributes `10` and s8 contributes `11`. Row 1 is row
0 with c0 inverted. The ROM output is registered, with an enable and an
asynchronous clear. These two flip-flops are the output register.

Worked example: state s1..s8 = 1,0,1,0,1,0,1,0 with `u = 1`.

1. The five cells give `z = 11`.
2. Since `u = 1`, `p = 00`: row 0, no inversion, address `010`.
3. The ROM returns `10`, which equals the XOR encoder's `{c0, c1}`.

## Modules

| module                 | what it is                                                                  |
|------------------------|-----------------------------------------------------------------------------|
| `xorfree_pkg`          | widths, default generators, elaboration-time table functions                |
| `isostate_mux32`       | 32:1 mux, five newest cells to the 2-bit new row tag                        |
| `restore_mux8`         | 8:1 mux, `{u, z}` and the column tag to the 3-bit ROM address               |
| `reduced_rom`          | 8 x 2-bit ROM with registered output (`clk`, `rst`, `rw`)                   |
| `state_shift_reg`      | eight-cell state register; the input enters the MSB                         |
| `xorfree_encoder_core` | steps 1-3 chained: state word `d[7:0]` and bit `u` in, `eop[1:0]` out       |
| `xorfree_conv_encoder` | top: shift register plus core, serial bit stream in, symbol stream out      |

### Top-level interface (`xorfree_conv_encoder`)

| port        | dir | width | meaning                                                    |
|-------------|-----|-------|------------------------------------------------------------|
| `clk`       | in  | 1     | clock, rising edge                                         |
| `rst`       | in  | 1     | asynchronous reset, active high: state and output to zero  |
| `in_valid`  | in  | 1     | encode `in_bit` on this clock edge                         |
| `in_bit`    | in  | 1     | information bit                                            |
| `out_valid` | out | 1     | `out_sym` holds the symbol of the bit accepted last clock  |
| `out_sym`   | out | 2     | `{c0, c1}`                                                 |

Timing:

- A bit presented with `in_valid = 1` is encoded against the state as it was
  before that bit. On the same edge the bit is shifted in.
- Its symbol appears after that edge, together with `out_valid = 1`.
- One bit is accepted per clock, with no bubbles.
- With `in_valid = 0` the state and `out_sym` hold and `out_valid` is 0.
- To terminate a frame, feed eight zero tail bits. This returns the encoder
  to the all-zero state.

### Other generators

`G0` and `G1` (9-bit, octal notation, tap on the input bit in bit 8) are
parameters of every module but the shift register. The 32:1 table, the restore mapping and the ROM
contents are all computed from them. The split into five, one and two cells
is fixed, so a generator pair must:

- tap s8 in both generators, and
- tap s6 in neither.

Elaboration stops with an error otherwise. The cdma2000 pair meets both
rules. Codes with another constraint length or rate, such as the LTE rate-1/3
K = 7 code, do not fit this structure.

## Where this design departs from the published architecture, or fills gaps

- **Generators.** The publication targets "3GPP2 and LTE" but prints no
  polynomials. 753/561 were chosen because they reproduce its printed ROM
  table exactly. They also leave the sixth cell untapped, which matches the
  cell grouping it draws.
- **32:1 table contents** are not published. They are computed as described
  above. The select order (sel[0] = newest cell) was chosen so that the one
  published example holds: select `10110` gives `10`.
- **8:1 multiplexer wiring** is not published. The row/inversion mapping
  above is this design's reading of the "find isomorphs" and "restore"
  steps. It agrees with the published example of that block (new row tag
  `01`, column tag `01`, input 1 gives address `101`). The select port here
  is `{u, z}`, whereas the published block has separate `a` and `sl`
  inputs, whose values do not map onto this layout.
- **Input bit and state register.** The published top takes the 8-bit state
  word as an input and has no separate information-bit port. Here the core
  has a `u` input, and the top adds the shift register so that it encodes a
  serial stream. The valid handshake and the `out_valid` flop are also
  additions. The published synthesis counts only 2 flip-flops, the output
  register. This design has 2 + 8 (state) + 1 (valid).
- **Published internal signal values.** For the published end-to-end
  example (state `10101010`), this design gives the published address `010`
  and output `10` with `u = 1`. Some other intermediate values shown there
  do not correspond to nets of this design. The published netlist also
  shows only five of the eight state bits reaching logic. That is not
  followed: the code needs all seven tapped cells.
- **Reset and enable.** The polarity and the asynchronous clear of `rst`
  and `rw` are choices. They are consistent with the output flip-flop type
  of the published netlist (enable plus clear).
- **Not built:** the conventional XOR encoder and the earlier four-row
  XOR-free encoder, which are only baselines. The testbenches use an XOR
  shift-register model as their reference. The published frequency and
  encoding time were measured on an FPGA for an unstated workload; they
  are not reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_isostate_mux32`: all 32 selects against the tap lists, plus the
  published example.
- `tb_restore_mux8`: all 32 cases. The chosen address must hit the printed
  ROM word that equals the wanted symbol. Also the published example.
- `tb_reduced_rom`: the printed contents, one-clock latency, hold while
  `rw = 0`, asynchronous clear.
- `tb_state_shift_reg`: random bits with enable gaps against a model; reset.
- `tb_xorfree_encoder_core`: all 256 states times both input bits against an
  XOR encoder, plus the published example and the hold behaviour.
- `tb_xorfree_conv_encoder` runs at the default parameters, in two parts:
  - 2000 random bits with idle cycles and a reset in mid-stream.
  - One 192-bit cdma2000 frame: 184 data bits plus 8 tail bits, 384
    symbols. After the tail, the encoder must be back in the zero state.

  It counts every fold case, input ones, stalls and resets, and fails if
  one never occurs.

Running a testbench with Verilator 5:

    verilator --binary --timing --assert rtl/xorfree_pkg.sv -y rtl \
        tb/tb_xorfree_conv_encoder.sv --top-module tb_xorfree_conv_encoder \
        -Mdir obj -o sim && ./obj/sim

The package is named first; `-y rtl` lets Verilator find the modules by
file name. Replace the testbench name to run another one.
