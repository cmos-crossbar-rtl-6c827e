# Pipelined-MUX CMOS crossbar switch, 256 x 256 at 2 Gb/s per port

A crossbar switch connects any input port to any set of output ports. The
classic array of crosspoints has to charge the full length of both an input
line and an output line through every switch, which limits its speed for
large port counts. This design instead gives every output its own
256-to-1 multiplexer tree: only the input lines see a large load, and each
output needs just 8 select bits (256 x 8 bits of configuration instead of
256 x 256). The MUX trees are cut into pipeline stages so that the core can
run at 1 GHz, and because the core is clocked at 1 GHz, two bit-slices are
enough to carry a 2 Gb/s serial line per port.

The RTL here covers the digital part of such a switch chip:

* the 256 x 256, 2-bit-wide, three-stage pipelined MUX crossbar core,
  built from four 128 x 128 sub-crossbars;
* the control path that takes one configuration byte out of every
  incoming frame and applies it to the right MUX at the right stage;
* the per-port receive front end: a half-rate bang-bang phase detector,
  the digital filter of the clock-recovery loop, and a FIFO that moves the
  recovered data onto the core clock.

The analog clocking (PLL, DLL, phase interpolators, clock tree) is not
modelled; its clocks are inputs of the top module and the phase code that
steers the interpolators is an output.

## Frames: how a port configures an output

Every port carries a continuous stream of 72-bit frames. At 2 bits per
1 GHz cycle a frame lasts 36 core cycles:

| frame cycle | content on each port                                  |
|-------------|-------------------------------------------------------|
| 0..3        | control byte, bits [7:6] first, then [5:4], [3:2], [1:0] |
| 4..35       | 64 payload bits, bits [1:0] first, bits [63:62] last  |

In each 2-bit word, bit 1 is the bit that arrived first on the line.

All ports are frame-aligned: one counter (`frame_counter`, counting 0..35
from reset, exported as `frame_cnt`) paces the frame demultiplexers of all
256 ports. The control byte received on port *o* is the number of the
input whose payload output *o* carries during that same frame. So:

* any permutation is one frame of control bytes;
* multicast is free: several ports may name the same input;
* the switch configuration changes every frame, with no dead cycles
  beyond the 4 control cycles that every frame carries anyway.

The line cards are responsible for frame alignment: the first control word
of a frame must reach the frame demultiplexer when `frame_cnt` is 0.

## The pipelined MUX core

### Splitting the core into quarters

A 256-to-1 MUX whose inputs are spread over a 256-cell input line cannot
settle within 1 ns: the line is too long and too heavily loaded even with
repeaters. The core therefore uses four 128 x 128 sub-crossbars, so that
each input line drives only 128 MUX cells, and adds a flip-flop on the
long wire that carries inputs across to the farther sub-crossbar.

```
                 inputs 0..127                 inputs 128..255
                /             \               /               \
     near: sub-crossbar 0   far: sub-crossbar 1   near: sub-crossbar 2   far: sub-crossbar 3
     (outputs 0..63,        (outputs 64..191)     (outputs 64..191)      (outputs 0..63,
      192..255)                                                           192..255)
```

Each output is served by exactly two sub-crossbars, one for each half of
the inputs: outputs 0..63 and 192..255 by sub-crossbars 0 and 3, outputs
64..191 by sub-crossbars 1 and 2. In every output pair one sub-crossbar is
near (its inputs arrive one cycle after the core input register) and the
other far (its inputs went through the long-wire flip-flop first). An
embedded-MUX flip-flop per output (2-to-1 MUX in front of a register)
picks the near or the far result.

### Where the registers sit

Counting clock edges from the moment `din` and `sel` are applied:

| edge | near sub-crossbar (0, 2)                    | far sub-crossbar (1, 3)                     |
|------|---------------------------------------------|---------------------------------------------|
| 1    | core input register                         | core input register                         |
| 2    | 2-to-1 + 4-to-1 MUX into flip-flops (8:1)   | long-wire flip-flop                         |
| 3    | 4-to-1, 4-to-1 (16:1) into a register       | 2-to-1 + 4-to-1 MUX into flip-flops (8:1)   |
| 4    | output flip-flop with 2-to-1 MUX            | 4-to-1, 4-to-1 (16:1) straight into the output flip-flop with 2-to-1 MUX |

Both paths have the same latency of 4 edges, so the two halves stay in
step. 8 x 16 x 2 = 256: the three MUX levels together select one of 256
inputs. Inside a sub-crossbar the first level (static 2-to-1 then a 4-to-1
embedded in the flip-flop) chooses within a group of 8 neighbouring
inputs, using select bits [2:0]; the second level (two static 4-to-1 MUXes)
chooses among the 16 groups with bits [6:3]; bit 7 chooses the half.

### Select pipeline

The select word travels through the core next to the data. `sel` is
registered with `din` at the core input; each MUX level uses the select
bits that belong to the word it is switching at that moment (the far
sub-crossbars get a select that went through the long-wire register too,
and stage-B and stage-3 select bits are delayed once more). As a result
the core accepts a new select for every output in every cycle, not only at
frame boundaries, which `tb_crossbar_core` exercises.

`crossbar_core` timing: `dout[o]` = `din[sel[o]]` of 4 cycles earlier,
one word per output per cycle.

## Control path around the core

`frame_dmux` (one per port) shifts the 4 control words into an 8-bit
register and passes the 32 payload words on, registered, with a valid
flag (payload is forced to 0 during control cycles).

`crossbar_controller` holds the frame counter and one 8-bit select
register per output. One cycle after the last control cycle all DMUXes
hold their new control byte; the controller copies byte *o* into select
register *o*. That is exactly the cycle in which the first payload word
leaves the DMUXes, so select and data enter the core together, and the
select stays put for the 32 payload cycles. The payload flag, delayed by
the 4 core cycles, becomes `tx_valid`.

End to end: a payload word that is at a DMUX input in frame cycle *c*
appears on `tx_data` 5 core cycles later. The first payload word of a
frame (cycle 4) therefore leaves while `frame_cnt` shows 9, and the 32
payload words of a frame leave on consecutive cycles.

## Receive front end

Each port has its own loop that recovers the clock phase of its line:

* `bbpd`: a half-rate bang-bang (Alexander) detector. Four 1 GHz clocks
  90 degrees apart sample the 2 Gb/s line twice at the bit centres (bits A
  and B) and twice at the bit boundaries. After retiming into the `clk_0`
  domain, it outputs the 2-bit word {A, B} and, for each of the two
  boundaries that saw a data transition, an early or a late vote: a
  boundary sample equal to the bit before it means the clocks sit early.
* `cdr_fsm`: the loop filter. It sums +1 per late and -1 per early vote;
  at +4 it steps the phase code down, at -4 up, and clears the sum. The
  6-bit code wraps around the clock period; its top 2 bits are meant to
  choose a pair of DLL phases and its low 4 bits an interpolation step.
* `resync`: the recovered clock has the core frequency but its own phase.
  A 4-entry FIFO with Gray-coded pointers takes one word per recovered
  clock edge, starts reading when 2 words are in, and then reads one word
  per core cycle, so it runs half full and absorbs roughly one cycle of
  phase wander in either direction. `rx_ready` shows that a port has
  started; `rx_slip` is a sticky flag that the FIFO ever ran empty.

The latency from line to DMUX depends on the phase relation of the
recovered clock and the core clock, but is fixed at start-up by the FIFO.
With recovered clocks 300 ps behind the core clock (the case simulated in
`tb_crossbar_chip`), a word whose first bit is sampled by `clk_0` reaches
the DMUX 3 core cycles after that edge, counted in that testbench's
conventions. Line cards must align their frames to `frame_cnt` with this
in mind.

## Not modelled

* PLL that multiplies the 250 MHz system clock by 4 to give the 1 GHz
  core clock; the clock tree.
* The shared analog DLL that produces the reference phases, and each
  port's phase selector and interpolator that turns `rx_phase_code` into
  the four sampling clocks `rx_clk[p]`.
  `tb/phase_interp_model.sv` stands in for the interpolator in simulation.
* The inverter chains that drive the input lines; in RTL they are wires.
* A transmitter: the switched data leave as 2-bit words per output per
  core cycle on `tx_data`.

## Choices this RTL makes

The following are not fixed by the architecture and were chosen here;
change them freely:

* Meaning of the control byte: byte on port *o* = source input of
  output *o*. An alternative is a destination address per input, which
  would need a conflict-free translation into per-output selects.
* Bit order inside frames and words (see the frame table).
* One frame counter for all ports, starting at reset; no frame-sync
  detection on the lines.
* Select bits [2:0] to the first MUX level, [6:3] to the second, [7] to
  the final 2-to-1.
* The detector's sampling arrangement, the loop filter (threshold 4,
  6-bit code) and its step direction (late votes reduce the code).
* The FIFO re-synchroniser, its depth (4) and start fill (2).
* One asynchronous active-low reset for every clock domain; no reset on
  the crossbar datapath (validity is tracked by the controller).

Embedded-MUX flip-flops are written as a MUX in front of an ordinary
flip-flop. The synthesized result is logically identical but says nothing
about meeting 1 GHz, which in the original circuit depends on custom
dynamic flip-flops and a floor plan that keeps each input line at 128
cells.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/xbar_pkg.sv` | `xbar_pkg` | port count, slices, frame geometry, core latency, phase enum |
| `rtl/sub_crossbar.sv` | `sub_crossbar` | 128 x 128 quarter: 8:1 registered, 16:1 static, optional output register |
| `rtl/crossbar_core.sv` | `crossbar_core` | four quarters, long-wire registers, select pipeline, output 2:1 flip-flops |
| `rtl/frame_counter.sv` | `frame_counter` | 0..35 frame counter, control/payload phase |
| `rtl/frame_dmux.sv` | `frame_dmux` | per-port control/payload split |
| `rtl/crossbar_controller.sv` | `crossbar_controller` | frame counter, select registers, output valid |
| `rtl/bbpd.sv` | `bbpd` | half-rate bang-bang phase detector |
| `rtl/cdr_fsm.sv` | `cdr_fsm` | clock-recovery loop filter, phase code |
| `rtl/resync.sv` | `resync` | recovered-clock to core-clock FIFO |
| `rtl/crossbar_chip.sv` | `crossbar_chip` | top: 256 receive front ends, DMUXes, controller, core |

Parameters default to the full-size design (256 ports, 2 slices). The
sub-crossbar's 8:1/16:1 split fixes its size at 128 inputs, and hence the
core at 256 ports.

## Simulating

Every testbench in `tb/` is self-checking, stops itself with a watchdog,
and ends with a line `TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/xbar_pkg.sv tb/tb_crossbar_core.sv \
          --top-module tb_crossbar_core -Mdir obj_core
./obj_core/Vtb_crossbar_core
```

Replace the testbench name for the others. `-Wno-fatal` keeps the
expected warnings (testbench timescales, package constants a module does
not use) from stopping the build.

| testbench | what it shows |
|-----------|---------------|
| `tb_sub_crossbar` | near and far quarter against a reference, random selects every cycle, latency 2 / 1 |
| `tb_crossbar_core` | full core, every output every cycle, random, broadcast and reversal patterns, latency 4, all four quarters used |
| `tb_frame_dmux` | control byte assembly, payload pass-through and flag |
| `tb_crossbar_controller` | frame count sequence, select load timing, output valid delay |
| `tb_bbpd` | recovered data, early-only votes with data 100 ps late, late-only votes with data 100 ps early, no vote without a transition |
| `tb_cdr_fsm` | phase code against a reference model under biased random votes, steps both ways, wrap-around |
| `tb_resync` | in-order delivery across a 300 ps phase offset and 600 ps of drift, slip when the write clock stops |
| `tb_cdr_loop` | closed clock-recovery loop of one port with a behavioural interpolator (`tb/phase_interp_model.sv`, an ideal delay of code x 1 ns / 64): locks within 3 interpolator steps of the bit centre for three data phases and recovers the stream without error |
| `tb_crossbar_chip` | whole chip at full size: 256 serial lines, 4 frames (random, multicast, reversal, random), every output word checked, `tx_valid` timing, phase codes of every port stepping the right way |

The full-chip test compiles in about two minutes and simulates in well
under a second of wall time.
