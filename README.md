# A serial switching matrix for programmable time-division multiplexing

Programmable Time-Division Multiplexing (PTDM) is a switching discipline for
data networks that share their trunks with a digital telephone network. The
trunks carry fixed-format TDM frames. A PTDM switch moves bits from time slots
of incoming frames to time slots of outgoing frames, like a TDM circuit switch.
Unlike a circuit switch, the assignment of slots to a call can be changed
frame by frame. A call can therefore get a fixed bandwidth (circuit
switching), a burst of high bandwidth followed by zero (packet switching), or
anything in between. The switch's processor is only involved when a call's
bandwidth changes. In steady state the matrix switches every frame on its own.

This repository holds synthesizable SystemVerilog for the **serial switching
matrix** at the heart of such a switch. Its default size is 10 incoming and 10
outgoing lines with 200-bit frames, about ten T-1 carriers in and out.

## The idea: ROUTE, then PERMUTE, then OR

For outgoing line `k`, the matrix computes

    O(k) = OR over all inputs i of  P(i,k)[ R(i,k)[ I(i) ] ]

- **ROUTE** `R(i,k)` picks the bits of input frame `I(i)` that go to output
  line `k`. Each picked bit keeps its position, and every other bit becomes 0.
  The result is a *partial frame*, held in the Partial Frame Register
  `PFR(i,k)`. This is space-division switching, one bit at a time.
- **PERMUTE** `P(i,k)` moves each bit of that partial frame to its outgoing
  time slot: bit `j` goes to position `P(j)`. This is time-slot interchange.
- **OR**: the `I` permuted partial frames of line `k` are ORed into its Frame
  Assembly Register `FAR(k)`. The calls on one output line use disjoint slots,
  so nothing collides.

The permutation must come before the OR. If it came after, bits from
different inputs that share a position would collide.

Every step is serial: one bit per clock. The configuration lives in
*rotating* shift registers that return to their starting position after each
frame. So the matrix needs no processor action from frame to frame. A call
change rewrites one `XPTR(i,k)` word and a few control-store words.

## Data path, stage by stage

```
 line i ──► FICR pair ──vertical──► crosspoint k ──► PFR(i,k) ──► permuter (i,k) ──bus──► FAR(k) ──► FOCR ──► line k
            (swap on    (1 bit)     AND XPTR(i,k)    (F bits)     store + decoder   (F)    OR of I     on Master
             framing)                bit                                                   permuters   Output Event
```

### Frame input copy registers (`ficr_pair`)

Each incoming line ends in a pair of F-bit shift registers. One fills from the
line. The other holds the previous complete frame while it is routed. The
framing pulse swaps them. The pulse comes with bit 1 of the new frame, and
that bit already goes into the freshly emptied register.

### Routing column (`route_column`): the R primitive of one input

After a swap, a *routing pass* shifts the full FICR onto the column's
"vertical" wire for F clocks. At the same time it rotates the column's O
crosspoint registers `XPTR(i,1..O)`, one bit per clock. Crosspoint `k` is an
AND gate of the vertical and the output bit of `XPTR(i,k)`. Its output shifts
into `PFR(i,k)`. So `XPTR(i,k)` bit `j` = 1 means "frame bit `j` of line `i`
goes to output `k`". A counter ends the pass after F shifts and pulses
`data_present` to the column's permuters.

The XPTRs rotate end-around, so after a pass they hold the same route again.

### Permuter (`permuter`, `rotating_store`): the P primitive

Each `(i,k)` pair has its own permuter, 100 at the default size. A permuter
holds:

- `PFR(i,k)`;
- a control store of F words of `W = ceil(log2 F)` bits, where word `j` holds
  `P(j)`. It is built as W end-around shift registers of F bits each;
- a one-out-of-F decoder;
- F AND gates that drive a bus to `FAR(k)`.

Each clock, bit `j` leaves the PFR and word `j` comes to the head of the
store. The decoder raises bus line `P(j)`, and its AND gate passes bit `j`
onto that line. After F steps the store is back at word 1.

Stored values are 0-based: word `j-1` holds `P(j)-1`. A word of F or more
(possible because 2^8 > 200) selects no bus line. The bit behind it is
dropped. Because non-routed PFR bits are 0, store words for unused positions
do not matter.

### Frame assembly and output (`far_output`)

`FAR(k)` ORs in the buses of its `I` permuters every clock. It keeps one
*finished* flag per permuter. When all `I` are set, the FAR has *data
present*. The **Master Output Event** (`moe`, one pulse per frame time,
supplied from outside) then copies the FAR into an output copy register
(FOCR). The event also clears the FAR and its flags. The FOCR is shifted out
on the line, bit 1 first, one bit per `out_bit_en` strobe. `out_frame` marks
bit 1.

## Flow control between the stages

The design's nominal timing makes these cases rare. Each one is still defined
and reported:

| situation | what happens | visible as |
|---|---|---|
| a permuter finishes frame n+1 before `FAR(k)` has sent frame n | the permuter waits with its data (state `PERM_DP`) until the event clears the FAR | `far_free` low |
| a frame is complete, but a PFR of the column still holds the previous frame | the routing pass waits; the frame stays in the full FICR | — |
| a framing pulse arrives while a frame is still waiting | the waiting frame is lost | `overrun[i]` |
| a framing pulse arrives during a pass (not its last clock) | the pass finishes, to keep the XPTRs aligned, but its data is discarded; the new frame is lost too | `overrun[i]` |
| the event finds no complete frame in `FAR(k)` | nothing new is sent (the line carries zeros), and the FAR keeps collecting | `slip[k]` |
| the processor writes an XPTR during a pass | the write waits until the pass ends | `xptr_ready` low |
| the processor writes a store word while that permuter runs | the write waits | `pst_ready` low |

Every input line must carry frames. A FAR only becomes complete when all `I`
permuters homing on it have finished. Each permuter runs once per input frame,
even when its partial frame is all zeros.

## Timing

Everything runs on one clock, at one shift per clock. Line bits arrive on
strobes (`in_bit_en`, `out_bit_en`) that must be slower than the clock. Counted
from a framing pulse:

- the routing pass takes F+2 clocks, ending with `data_present`;
- the permutation takes F+2 clocks, including the start;
- FAR data present is therefore raised **2F+4 clocks** after the framing pulse
  of the last line, 404 clocks at F = 200.

With 200-bit MOS shift registers clocked at 5 MHz, 404 clocks are 81 µs. A
T-1-rate frame takes 133 µs. For no frames to be lost, a frame must last
longer than about 2F+4 clocks. At F = 200 that means just over 2 clocks per
line bit. At 5 MHz a T-1 line gives about 3.3.

Outgoing frame n leaves on the first Master Output Event after all inputs'
frame n has been permuted. The output therefore lags the input by about one
frame time, depending on where the event falls.

## Changing a call

The control processor is not part of this RTL. Its interface on
`ptdm_serial_matrix` is:

- `xptr_we, xptr_i, xptr_k, xptr_data[F-1:0]` → `xptr_ready`: loads all of
  `XPTR(i,k)`. Bit `j-1` set routes frame bit `j`.
- `pst_we, pst_i, pst_k, pst_addr, pst_data` → `pst_ready`: loads word
  `pst_addr` of permuter `(i,k)`'s store with `P-1`.

A write is taken in the cycle where `*_we` and `*_ready` are both high. A
bandwidth change on `(i,k)` that touches `m` bits costs `m` store writes and
one XPTR write. Make them while the permuter and column are idle, i.e. between
the end of a frame's permutation and the next framing pulse. Otherwise the new
values take effect one frame later than intended.

## Files

| file | contents |
|---|---|
| `rtl/ptdm_pkg.sv` | default sizes (`FRAME_BITS = 200`, `NUM_IN = NUM_OUT = 10`) and the permuter state type |
| `rtl/ficr_pair.sv` | swinging pair of input copy registers |
| `rtl/route_column.sv` | R primitive of one input: FICR pair, XPTRs, crosspoints, shift counter |
| `rtl/rotating_store.sv` | permuter control store |
| `rtl/permuter.sv` | P primitive: PFR, store, decoder, selection gates |
| `rtl/far_output.sv` | FAR, data-present logic, output copy register |
| `rtl/ptdm_serial_matrix.sv` | top: `NI` columns, `NI x NO` permuters, `NO` output units |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ptdm_call_modes` |

Parameters: `F`, `NI` and `NO` on the top, with `W = $clog2(F)` derived.
Nothing else needs changing to resize the matrix.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a run that hangs. With Verilator 5, list the package first:

```
verilator --binary --timing --assert --top-module tb_ptdm_serial_matrix \
    rtl/ptdm_pkg.sv rtl/ficr_pair.sv rtl/route_column.sv rtl/rotating_store.sv \
    rtl/permuter.sv rtl/far_output.sv rtl/ptdm_serial_matrix.sv \
    tb/tb_ptdm_serial_matrix.sv
./obj_dir/Vtb_ptdm_serial_matrix
```

The module testbenches (`tb_ficr_pair`, `tb_route_column`,
`tb_rotating_store`, `tb_permuter`, `tb_far_output`) build the same way with
their own file and top. Each compares the module with values the testbench
works out on its own: routed partial frames, permuted frames, assembled
outgoing frames, and cycle counts.

`tb_ptdm_serial_matrix` runs the full default size, 10 × 10 lines of 200-bit
frames:

- It loads a random one-to-one map of about 70 % of the input bits onto
  output slots.
- It runs nine frames on all lines. Each outgoing frame is compared with a
  reference computed directly from the map.
- It changes a call's bandwidth between frames, and checks the 2F+4-clock
  latency.
- At the end it stops the Master Output Event, to force waiting permuters,
  stalled routing passes and overruns.

It counts each of these mechanisms and fails if any of them never happened.
Building it takes about half a minute, and running it takes seconds.

`tb_ptdm_call_modes` runs a small matrix: 16-bit frames, 3 inputs and 2
outputs. It carries three kinds of call side by side:

- a fixed-bandwidth (circuit) call;
- a packet-style call that is idle, gets the whole frame for one frame, and
  drops back to zero;
- a call whose bandwidth is raised and later torn down.

It checks every outgoing frame against the call map in force for that frame.

## Where this RTL goes beyond, or departs from, the source design

The design this follows specifies the structure: FICR pairs, XPTR crosspoint
registers, one permuter per partial frame with a rotating store and decoder,
FARs with a data-present bit, the Master Output Event, and the 200/10/10
example sizes. These details are this implementation's own choices:

- one clock, one shift per clock, and line strobes;
- the framing-pulse convention, and 0-based store values;
- end-around XPTRs;
- the output copy register on the serial matrix's output side, borrowed from
  the source's parallel matrix;
- all flow control and loss handling in the table above, and the `out_frame`
  marker;
- the processor write ports (write-only; no read-back) and the reset values:
  no routes, and identity permutations.

Not included:

- the frame detection logic (the framing pattern is not specified), so framing
  pulses are inputs;
- line termination;
- the timing source for the Master Output Event;
- the control processor and its inter-switch signalling;
- the *parallel* switching matrix, a full crosspoint array. It was considered
  for the same job and rejected as far too large (about 4 × 10^6 crosspoint
  bits at the example size).
