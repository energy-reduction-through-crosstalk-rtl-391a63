# Crosstalk-avoidance-coded mesh network on chip

On long on-chip links the coupling capacitance between neighbouring wires
dominates. A wire whose two neighbours switch the opposite way sees up to
`(1 + 4λ)·C_L` of switched capacitance, where λ is the coupling-to-bulk
capacitance ratio. Crosstalk avoidance codes (CACs) restrict which codeword
may follow which, so that this worst case cannot occur. They use fewer
extra wires than shielding every line.

This RTL builds a packet-switched network on chip whose inter-switch links
carry CAC-coded flits. Coding costs energy in the encoders and decoders, so
the network uses a **modified flit structure**:

- Only the header flit carries routing information.
- Payload flits are encoded once at the source and decoded once at the
  destination.
- Every switch on the way forwards payload flits without decoding them. It
  ties each payload flit to its packet by comparing the *coded* packet-id
  wires.
- Header flits are decoded, routed and re-encoded in every switch.

The default configuration is an 8 × 8 mesh of 64 cores with 32-bit flits,
the FPC code (52 wires per link), 5-port switches, 2-flit input buffers and
16-flit messages.

## The three link codes

Each code works on a small sub-channel. A 32-bit flit is split into
sub-channels whose codewords sit side by side on the link. The sub-channel
encoders are fixed sum-of-products equations, found in `cac_pkg`
(`foc45_enc`, `ftc34_enc`, `fpc45_enc`).

| code | rule on the wires | worst coupling | sub-channel | how sub-channels are joined | link width for 32 bits |
|---|---|---|---|---|---|
| FOC (forbidden overlap) | no three adjacent wires go 010 → 101 or 101 → 010 | (1+3λ) | 4 → 5 | abutted, no extra wire | 40 |
| FTC (forbidden transition) | no two adjacent wires switch in opposite directions | (1+2λ) | 3 → 4 | one grounded shield wire between sub-channels | 53 |
| FPC (forbidden pattern) | no codeword contains 010 or 101 | (1+2λ) | 4 → 5 | top data bit of one sub-channel is also the bottom input of the next | 52 |

Wire layout, with bit 0 at the bottom of the link:

- **FOC** (`foc_encoder`): data `[4k+3:4k]` → wires `[5k+4:5k]`, for
  k = 0..7.
- **FTC** (`ftc_encoder`): data `[3k+2:3k]` → wires `[5k+3:5k]`, and wire
  `5k+4` is a shield tied to 0.
  - 32 bits is ten 3-bit groups plus 2 bits.
  - Those last 2 bits go through the same 3-4 code with the third input at
    0. Its top output is then always 0 and is dropped, leaving wires
    `[52:50]`.
- **FPC** (`fpc_encoder`): sub-channel k codes data `[3k+3:3k]` → wires
  `[5k+4:5k]`.
  - The code passes its lowest and highest input bits straight through.
    So the two wires that meet at each boundary always carry the same bit.
    Two equal adjacent wires can never form 010 or 101 across a boundary.
  - Ten sub-channels cover data bits 0..30.
  - Bit 31 becomes a 2-wire tail: bit 30 repeated on wire 50, then bit 31
    on wire 51. This is a truncated sub-channel codeword, so it still
    contains no forbidden pattern.

The way the odd tail bits are handled is this design's own choice, made so
that the link widths come out at 40, 53 and 52.

The decoders (`*_decoder`) invert the code one sub-channel at a time by
searching the 8- or 16-entry code book that the encoder equations generate.
A word that is not a codeword decodes to 0. All codes map the all-zero flit
to all-zero wires, which is also the idle value after reset.

`cac_encoder` / `cac_decoder` pick one of the three by the `SCHEME`
parameter (`CAC_FOC`, `CAC_FTC`, `CAC_FPC`). The width follows from
`cac_pkg::code_w(SCHEME, 32)`.

## Packet format

Bits are listed from the top (`noc_pkg`):

```
header : pktid[31:24] | flit_count[23:18] | addr_len[17:12] | src[11:6] | dst[5:0]
payload: pktid[31:24] | data[23:0]
```

- `flit_count` is the number of payload flits that follow the header. A
  16-flit message is one header plus 15 payload flits.
- There is no type field. A switch tells headers from payloads by counting.
- `addr_len` is carried but not used.
- A node address is `y * MESH_X + x`.

The field order is the published one. The widths are this design's choice.
The 8-bit `pktid` starts at bit 24, which is a sub-channel boundary for all
three codes (24 = 6·4 = 8·3). Because of that, the link wires above that
boundary depend on `pktid` alone:

| code | coded pktid wires |
|---|---|
| FOC | 39..30 |
| FTC | 52..40 |
| FPC | 51..40 |

These wires are what a switch compares. `cac_pkg::code_lsb_of_bit` gives
the boundary.

## Inside a switch (`cac_switch`)

```
            ┌──────── header path (uncoded inside the switch) ────────┐
link ─► input buffer ─► CAC decoder ─► XY route ─► output arbiter ─► crossbar ─► CAC encoder ─► output reg ─► link
  (coded, 2 flits)  └──────────── payload path (stays coded) ───────────► crossbar ─────────────► output reg
```

Each input port moves through three states:

1. **ROUTE**: the word at the buffer head is a header.
   - It is decoded, and `xy_route` picks an output: first correct x
     (East/West), then y (South/North), then Local.
   - The input requests that output. Each free output grants one request
     per cycle with a round-robin arbiter (`rr_arbiter`).
   - On the grant, the input stores the output it won, `flit_count` and the
     header's coded pktid wires.
2. **HEAD**: the decoded header is re-encoded and moved into the output
   register.
   - With `flit_count = 0`, the output is released at this point.
3. **BODY**: each payload flit at the buffer head is checked.
   - If its coded pktid wires equal the stored ones, it is copied
     unchanged into the output register and the count goes down by one.
   - The last payload flit releases the output.
   - A payload flit whose coded pktid differs is removed from the buffer,
     is not forwarded, and pulses `ev_pktid_drop`. The packet goes on with
     the next matching flit.

There are no virtual channels. An input therefore holds one packet at a
time, and the stored packet id is a single register per input. An output
stays owned by one packet from header to last payload (wormhole
switching).

**Flow control.** Each link is `valid` + `ready` + the coded word. `ready`
is the downstream buffer's "not full" flag, a register, so no combinational
path crosses a link. The output register takes a new flit when it is empty
or its word is being accepted. It keeps its last codeword while idle, so the
link wires only ever move from one codeword to another, which is what the
codes assume.

**Timing.** The decoder and encoder sit inside the switch-traversal cycle
and add no pipeline stage. This is the "codec merged into the link stage"
arrangement that gives coding no latency penalty. An unblocked hop costs:

- **Header**: 3 cycles (buffer write, grant, output register).
- **Payload**: 2 cycles (buffer write, output register), then one flit per
  cycle per port.

End to end on an idle mesh, a header reaches the destination core after
`1 + 3·(hops + 1)` cycles. The 1 is the network-interface register, and
`hops + 1` switches are crossed. Payload flits arrive on the following
cycles, one per cycle. From corner to corner of the 8 × 8 mesh that is 46
cycles for the header, and the last payload flit arrives 15 cycles after
it.

## Network interface and mesh

`cac_ni` sits between a core and its switch's local port:

- **Transmit**: it encodes each flit the core offers (`tx_valid`, `tx_flit`,
  `tx_ready`) into a link register that feeds the local input buffer, with
  one cycle of latency.
- **Receive**: it decodes every flit the local output delivers
  (`rx_valid`, `rx_flit`, `rx_ready`), combinationally.

This is where payload flits are coded and decoded, once each. The core
builds whole packets itself: a header, then `flit_count` payload flits
carrying the same `pktid`.

`cac_noc_mesh` is the top. It has one switch and one NI per node, and
neighbouring switches are joined by one coded link in each direction. Ports
on the mesh edge are tied off: nothing comes in, and outputs are always
ready. XY routing never uses them. The per-node, per-input-port pulses
`ev_header`, `ev_payload` and `ev_pktid_drop` count, respectively:

- flits that took the decode/encode path;
- flits that bypassed the codecs;
- payload flits that were dropped.

| parameter | default | meaning |
|---|---|---|
| `SCHEME` | `CAC_FPC` | link code (`CAC_FOC` 40 wires, `CAC_FTC` 53, `CAC_FPC` 52) |
| `MESH_X`, `MESH_Y` | 8, 8 | mesh size; `MESH_X·MESH_Y ≤ 64` (6-bit addresses) |
| `BUF_DEPTH` | 2 | input buffer depth in flits |

FPC is the default because it gives the largest energy savings of the
three. FTC is close behind, and FOC is clearly lower.

## Simulating

All files are plain SystemVerilog. The packages must come first on the
command line:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_cac_noc_mesh \
    rtl/cac_pkg.sv rtl/noc_pkg.sv tb/tb_cac_noc_mesh.sv
./obj_dir/Vtb_cac_noc_mesh
```

The other testbenches build the same way; add `tb/tb_ref_pkg.sv` for
`tb_cac_switch` and `tb_cac_ni`. Each prints
`TB_RESULT checks=N failures=M`. Building the full 64-node mesh takes a few
minutes. The simulation itself takes under a second.

| testbench | what it establishes |
|---|---|
| `tb_foc_codec`, `tb_ftc_codec`, `tb_fpc_codec` | Covers the encoder and decoder of each code: the published truth-table rows, the encoder against an independently written reference on random flits, decoder round trip, and the code's crosstalk rule over whole random word sequences (all 52/53/40 wires, boundaries included). |
| `tb_flit_fifo` | Order, full/empty flags, and push and pop in the same cycle. |
| `tb_xy_route` | All 64 × 64 pairs, each route walked to its destination in Manhattan distance. |
| `tb_rr_arbiter` | Grant against a model pointer, and fair share under full load. |
| `tb_cac_ni` | Coded flits on the local link, no loss or overwrite under refusal, and the decode path. |
| `tb_cac_switch` | Header and payload latency (3 and 2 edges), one flit per cycle, payload words with non-codeword data wires passed bit-exact (proof that they are not decoded), pktid-mismatch drop, contention, and random traffic with backpressure. |
| `tb_noc_schemes` | Two 4 × 4 meshes, one using FOC and one using FTC, under random traffic with backpressure. Every message is delivered intact, and every inter-switch link word keeps its code's rule relative to the word before it. |
| `tb_cac_noc_mesh` | Full 8 × 8 default network. Corner-to-corner latency against the formula above; 384 random 16-flit messages with receiver backpressure, each flit checked for destination, packet order, pktid and data; one stray payload flit dropped; every link word checked to be an FPC codeword. It counts, and requires, header switching, payload bypass, output contention, link and receiver backpressure, and the drop. |

## What is not here, and where this design departs

- **Folded-torus and butterfly-fat-tree networks** are not built. The same
  codes and flit structure are also evaluated on them, but their switches,
  wrap-around links and deadlock handling are not specified. Only the mesh
  is provided.
- **Separate codec pipeline stages**, where the encoder and decoder each
  get a stage of their own, are not built. Neither is the original flit
  structure, which decodes every flit in every switch. Both are only the
  baselines that the chosen arrangement is compared with.
- **Input arbitration among virtual channels** is absent. There are no
  virtual channels; the switch pipeline is reduced to buffer, grant and
  traversal.
- **Energy, area and delay figures** are outside what RTL can show:
  - link energy as a function of λ and wire length;
  - codec gate counts of roughly 650 / 770 / 1000 NAND2 equivalents;
  - codec delays of 0.25–4.25 FO4.

  Nothing in this RTL was sized or timed against them. The decoders here
  are code-book lookups, written for clarity rather than to match those
  gate counts.
- **This design's own choices**: field widths, tail coding, decoder
  structure, valid/ready flow control, round-robin arbitration, the drop
  on a pktid mismatch, port numbering, the placement of the codecs in a
  network interface beside the switch, and the asynchronous active-low
  reset.
