# A multi-FPGA image-filter board and its component library, in SystemVerilog

This RTL models a small reconfigurable computing system built for teaching
digital design. A host PC hands work that suits hardware, here image
filtering, to a PCI add-in board that carries four FPGAs. A PCI bridge chip
turns the PCI bus into a simple local bus to one "main" FPGA. The host splits
an image into four quarters and gives one quarter to each FPGA. Each FPGA then
filters its quarter on its own: it slides a 3x3 ("nine-cell") window over
every pixel and feeds the window to one of four small filter circuits.

Students build such filters from a library of reusable components: adders,
counters, multipliers, coders and so on. That library is also here, one
module per component.

The design follows a published description of such a teaching system. That
description gives the board's structure, the four filter circuits and a list
of library components. It does not give the interfaces between the chips, the
memories, the border handling, or the insides of most library parts. Those
are this design's own choices, and they are marked as such below and in the
opening comment of every file.

## The system at a glance

```
 host (PCI) ── PCI bridge chip ── local bus (16-bit data) ──┐
                                                            │
                     rcs_top                                │
  ┌─────────────────────────────────────────────────────────┼────┐
  │ pci_mfcu                                                ▼    │
  │   local_bus_bridge ──link──> fpga_node 0 (main FPGA's share) │
  │                    ──link──> fpga_node 1                     │
  │                    ──link──> fpga_node 2                     │
  │                    ──link──> fpga_node 3                     │
  │       each fpga_node: input RAM ─> window_scan ─> result RAM │
  │                       window_scan: edge_enhance, image_expand│
  │                                    image_erosion,            │
  │                                    image_negative            │
  │ ip_library: one instance of every library component         │
  └──────────────────────────────────────────────────────────────┘
```

`rcs_top` holds two independent designs side by side:

- `pci_mfcu` is the board: the bridge plus four image nodes.
- `ip_library` is the component library, with its own ports.

The library's inputs and outputs are gathered into two packed structs,
`lib_in_t` and `lib_out_t`, declared in `ip_lib_pkg`. The two designs share
only the clock and reset.

## The nine-cell window and the four filters

Pixels are 8-bit gray levels: 0 is black and 255 is white. A colour image is
filtered as three separate planes. The window around pixel P5 is laid out like
this:

```
P1 P2 P3
P4 P5 P6
P7 P8 P9
```

In `mfcu_pkg::window_t`, element k holds P(k+1).

Each filter is purely combinational, so it produces one result per clock.

| Module | Result | Structure |
|---|---|---|
| `edge_enhance` | Gx + Gy, limited to 0..255 | Gx = (P7+2·P8+P9) − (P1+2·P2+P3); Gy = (P3+2·P6+P9) − (P1+2·P4+P7). Each doubling is a one-place shift. Each sum uses two library adders. One subtractor per gradient, one adder, then a comparator with 255. |
| `image_expand` | sum of the 8 neighbours; 255 when the sum is 256 or more | A tree of 8-, 9- and 10-bit library adders, then a comparator with 256. |
| `image_erosion` | bitwise AND of all nine pixels | A tree of AND stages. |
| `image_negative` | 255 − value on each channel | One subtractor per channel. There are 3 channels (R, G, B) by default; the node uses 1. |

Points where the published description is ambiguous, and how this RTL reads
them:

- **Edge enhancement.** Only Gx is given as an equation; Gy comes from the
  block diagram. A negative Gx+Gy is not covered, and this RTL outputs 0 for
  it. P5 is not used.
- **Expansion.** The equation includes P5, but the diagram and the prose use
  only the eight neighbours. This RTL uses the eight neighbours. The
  comparator with 256 is read as saturation to 255.
- **Erosion.** The equation includes P5, and so does the published pin count
  of 80 (nine 8-bit inputs and an 8-bit output). The diagram omits P5. This
  RTL includes P5.

## Scanning a quarter: `window_scan`

The node stores its quarter in a block-RAM-style memory with one read port
and a read latency of one cycle. `window_scan` handles one pixel at a time:

1. It reads the nine window pixels, one per cycle.
2. It waits one cycle for the last data.
3. It writes the result of the selected filter to the result memory.

One pixel therefore takes 11 cycles, and a QW×QH quarter takes 11·QW·QH
cycles after the start pulse. The testbenches check this count exactly.

Window cells that fall outside the quarter take the nearest pixel inside it.
This is edge replication, so no data crosses a quarter boundary. The original
system filters each quarter independently; the border rule is this design's
choice.

The serial fetch is the simplest scheme that fits a single memory port. A
faster node would keep two line buffers and take one new pixel per clock; the
filters would not change.

## Talking to the board: the local-bus registers

The host sees four 16-bit registers, selected by `lb_addr`:

| Addr | Name | Write | Read |
|---|---|---|---|
| 0 | PTR | [15:14] node, [11:0] link address | same |
| 1 | DATA | [7:0] to the selected node at PTR, then PTR += 1 | [7:0] from the selected node at PTR, then PTR += 1 |
| 2 | CTRL | [1:0] filter mode, [7:4] start pulse, one bit per node | [1:0] last mode written |
| 3 | STATUS | — | [3:0] done per node, [7:4] busy per node |

The filter modes are 0 edge enhancement, 1 expansion, 2 erosion and
3 negative.

A link address with bit 11 clear selects the node's input memory. With bit 11
set, it selects the result memory. The low bits are row·QW + column.

An access is a one-cycle pulse of `lb_cs` together with `lb_wr` or `lb_rd`.
`lb_ready` pulses when the access completes:

- one cycle later for most accesses;
- three cycles later for a DATA read, which goes out over the link and back.

The host issues the next access only after `lb_ready`. An assertion in the
bridge checks this.

A typical host session:

1. For each node, write PTR = node<<14 and stream its 64 pixels into DATA.
2. Write CTRL = 0x00F0 | mode. All four nodes start together.
3. Poll STATUS until bits [3:0] read 0xF.
4. For each node, write PTR = (node<<14) | 0x800 and read 64 results from
   DATA.

The register map, the handshake and the link between FPGAs are this design's
choices. The original board gives only the line counts:

- 16 data lines plus 10 other lines between the PCI bridge and the main FPGA;
- 32 lines between FPGAs.

The link structs carry these signals:

- request: req, we, 12-bit address, 8-bit data, start, 2-bit mode;
- response: rvalid, 8-bit data, busy, done.

The address field is 12 bits wide so that larger quarters fit. At the default
size a node uses only 7 of those bits: the 6-bit pixel index and the
memory-select bit. The link then needs 31 wires, within the 32 of the board.

While a node is busy, its scanner owns the input memory's read port. The host
must not access the input memory of a busy node; assertions in `fpga_node`
check this.

## The component library

Each library component is one module. Its width parameter gives the 8-, 16-,
32- and parameterised variants of the original list, for example `ip_and`
with WIDTH 8, 16 or 32. The original list gives little more than names. Each
module is the plainest circuit that does what its name says, and its opening
comment states the choices made.

| Module | Component |
|---|---|
| `ip_adder` | adder with carry in/out (ports and default width 8 as in its data sheet) |
| `ip_and`, `ip_or`, `ip_xor`, `ip_not` | bitwise logic |
| `bin_up_cntr` | binary up counter with enable and clear |
| `ip_bigger`, `equal_checker` | unsigned A > B; A == B |
| `booth_mult` | signed multiplier, radix-2 Booth recoding |
| `ip_div` | unsigned restoring divider (division by 0: Q = all ones, R = N) |
| `barrel_shifter` | 16-bit shift or rotate, either direction |
| `ip_encoder` | priority encoder, highest bit wins, with a valid flag |
| `cla_adder`, `ripple_adder` (+ `full_adder`) | carry look-ahead (Kogge-Stone prefix; WIDTH 64 gives the 64-bit version) and ripple-carry adders |
| `ip_fifo` | 8-bit FIFO, 16 deep, first-word fall-through |
| `ip_lfsr` | Fibonacci LFSR, maximal-length taps for 4, 8, 16 and 32 bits |
| `decoder_3to8`, `ip_mux` | decoder with enable; N-input multiplexer (N = 2, 4, 8) |
| `hamming_enc`, `hamming_dec` | (7,4) Hamming code with single-error correction |
| `parallel_dwn_cntr`, `uni_cntr` | loadable down counter that stops at 0; up/down counter with terminal count |
| `three_major_voter` | majority of three |
| `ttl374`, `oct_bus_trans` | the 74374 octal register and the 74245 transceiver |

The two 74-series parts have three-state outputs. Inside a chip, each such
output is represented by a data output and a separate drive-enable output.

Two listed components are not included:

- the gray-conversion filter, because its colour weights are not given;
- a "crossing controller", whose function is not described.

## Outside the RTL

These board parts are chips or wiring with no logic to design, so they are
not modelled:

- the PCI bridge chip, represented by the `lb_*` ports;
- the configuration PROM and EEPROM;
- the 16 MHz and 20 MHz oscillators, represented by `clk`;
- the power supply;
- JTAG configuration;
- the direct links between neighbouring FPGAs and the extension headers.

## Sizes

| Parameter | Default | Meaning |
|---|---|---|
| `NODES` | 4 | image nodes (FPGAs), 1..4 |
| `QW`, `QH` | 8, 8 | quarter size, giving a 16×16 image, the example size of the original |

The quarter may be at most 2048 pixels, because the link address has 11 bits
below the memory-select bit. A node's memories take 2·QW·QH bytes.

## Simulating

Every testbench in `tb/` checks its own results. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The whole system at its
default size is tested by `tb_rcs_top`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mfcu_pkg.sv rtl/ip_lib_pkg.sv tb/tb_ref_pkg.sv tb/tb_rcs_top.sv \
    --top-module tb_rcs_top -Mdir obj && obj/Vtb_rcs_top
```

This run does the following:

- It drives every library component against its arithmetic definition.
- It runs the Hamming pair as encode, flip one bit, decode.
- It fills the FIFO past full and drains it.
- It runs all four filters on a 16×16 image through the local bus.
- It counts each mechanism and requires every one to occur: each mode, all
  nodes busy at once, both edge clamps, expansion saturation, border
  replication, read wait states, FIFO full and Hamming correction.

`tb_color_image` runs a 16×16 24-bit colour image through the board. It
filters the red, green and blue planes in turn with each filter. It also
checks the negative planes against the three-channel `image_negative`.

Other testbenches follow the same pattern, `tb/tb_<module>.sv` for each
module. Compile them with the packages they import:

- `mfcu_pkg` for the image modules;
- `tb_ref_pkg`, which holds the reference filters written directly from the
  formulas.

The simulations are two-state; every register that is read is reset.
