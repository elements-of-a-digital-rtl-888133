# A bit-serial dataflow fragment of a digital photonic computer

A digital photonic computer (DPC) is built to run its logic at about 1 THz. That is a thousand
times faster than RAM can deliver data. Nothing in the machine is wider than one bit:

- every operand travels as a **bit-serial stream** on a single line, one bit per clock;
- a computation is a fixed **pipeline of functional devices** (adders, multipliers, dividers);
- before the run, static switches wire the devices into the shape of the formula, and the data
  then flows through that structure.

Two problems follow from this, and this RTL models both:

1. **Feeding the machine.** One 1-bit terahertz line carries as much as 64 DDR-class RAM chips
   with 16-bit channels at 1 GHz. The interface systems serialize and time-multiplex those chips
   onto one line, and do the reverse on the way out.
2. **Keeping operands in step.** A device combines its two inputs bit by bit, so the bits must
   arrive together. Devices have different latencies, and streams come from different parts of
   the structure. Each device therefore has an **operand block** in front of it. The block
   measures how far apart its two streams are and delays the leading one. A short delay uses
   an on-chip shift register; a long one goes through external memory. The operand block can
   also pair a stream with a stored constant.

The operand block is the core of this design and is described in most detail below.

Everything is ordinary synchronous SystemVerilog on one clock. Each flip-flop stands for one
photonic trigger and each clock for one terahertz cycle. The RTL describes the logic, not
photonic devices: the optical converters and the RAM chips are outside it.

## Data format

A channel is `dpc_pkg::stream_t`, holding a data bit `d` and a marker `m`.

- The marker is high while a stream is present. Its rising edge marks the first bit of the
  stream.
- Numbers are IEEE-754 binary64, sent least-significant bit first.
- A word therefore takes 64 clocks, and words follow each other with no gaps.
- Since the marker says where a stream starts, every block can find word boundaries by
  counting clocks.

At one word per 64 clocks per device, three devices working in parallel at 1 THz give
3 × 10^12 / 64 = 46.875 × 10^9 floating-point operations per second.

## Structure

```
 RAM words ─► emis_in ─┐                      ┌─► emis_out ─► RAM words
 RAM words ─► emis_in ─┤        SW2           ├─► emis_out ─► RAM words
                       │ (second level)       ├─► emis_out ─► RAM words
                       └──┬──────┬──────┬─────┘
                     4 down│ 3 up │      │
                        SW1.0  SW1.1  SW1.2      (first level, one per group)
                        │ ▲     │ ▲     │ ▲
                     3 × (OB ─► FD)  per group: group 0 adders, 1 multipliers, 2 dividers
```

`dpc_top` holds:

- two input and three output interface systems;
- the second-level switch SW2;
- three groups. Each group has a first-level switch SW1.g and three operand-block/device
  pairs. The device kind depends on g mod 3: adders, multipliers, then dividers.

SW1.g feeds the x and y inputs of its three operand blocks. Its sources are the four lanes that
SW2 sends down and the results of its own devices. It also sends up to three streams back to SW2.
SW2 routes the input systems and everything coming up from the groups to the groups and to the
output systems. The channel numbering is listed in the header of `rtl/dpc_top.sv`.

**Static switches** (`static_switch`) are combinational multiplexers. Each output has one select
register, and a select value of `N_IN` means "not connected" (this is the reset state). One
input may drive several outputs. The switches are written through `cfg_we/cfg_sw/cfg_out/cfg_sel`
before a run and are not meant to change during it.

**Timing across the hierarchy.** Each lane from a group up to SW2 has one register, so no
switch setting can form a combinational loop. The delays on the path from one group to the next
are:

| Stage | Clocks |
|---|---|
| Operand block | 1 |
| Functional device | 126 |
| Up-lane register | 1 |
| **Total** | **128 = two words** |

So a result enters the next group on the same 64-clock word grid as streams taken straight from
the input systems. Streams that differ by any other amount are the operand blocks' job.

## The operand block

`operand_block` sits in front of one device. It takes streams x and y with their markers mx and
my. It produces xo and yo, which are in step, and one output marker. Its parts:

| part | module | what it does |
|---|---|---|
| ctrl | `ob_ctrl` | measures the offset between the streams, picks the mode, drives the rest |
| swi | `swi` | input switch: chooses what goes into rg, syncf and the external-memory path |
| rg | `rg_ring` | 64-bit ring register holding a constant as a circulating serial word |
| syncf | `syncf` | tapped 1000-stage shift register: delay of 0..1000 clocks |
| IWR | `iwr` | external-memory delay line for offsets above 1000 clocks |
| swo | `swo` | output switch: puts the right sources on xo/yo; registered, 1 clock |

### Control inputs

- `sb` selects which stream loads rg (0: x, 1: y).
- `wc` requests a write: of rg when one stream is present, of `del` when none is.
- `wd` qualifies the write of `del`.
- `avt` forces the delay to the stored `del` instead of the measured one.

### Measuring the offset

`ctrl` has a counter Q. Q increases on every clock where exactly one marker is high
(mx XOR my). On the clock the second marker rises, so that both are high, Q is frozen as Δ.
Δ is the number of clocks the leading stream is ahead. Q goes back to zero when both markers
have dropped.

### The modes

| ctrl state | entered when | what reaches the device |
|---|---|---|
| Mode 0 | reset; or only one stream present | the leading stream, and the rg constant on the other input |
| Write rg | one stream present, `wc`=1, `avt`=0, `wd`=0 | for one word (64 clocks) the stream is copied into rg; then back to Mode 0 |
| Write del | no stream, `wc`=1, `wd`=1, `avt`=0 | `del` is stored (one clock); then back to Mode 0 |
| Mode 1 | both present, delay 0 | x and y straight through |
| Mode 2 | both present, 0 < delay ≤ 1000 | the leading stream, delayed by syncf, next to the lagging one |
| Mode 3 | both present, delay > 1000 | the leading stream, delayed by syncf and then external memory, next to the lagging one |

The delay is Δ, or `del` when `avt`=1. A forced delay of 0 gives Mode 1. Modes 1–3 last until
both markers are low, or until `wd` is raised.

**Mode 0 is also the waiting state.** When one stream arrives, the operand block does not know
whether a partner will follow. So it does two things at once:

- it passes the stream on paired with the rg constant, so a "stream op constant" computation
  needs no other setting;
- it writes the stream into syncf (`ws`=1), because it may need it again later.

Once Q reaches 1000, the first bit is leaving the end of syncf. From then on `wi`=1 and the bits
continue into external memory through IWR. When the second stream arrives:

- If Δ ≤ 1000, the leading stream is still inside syncf. The syncf tap is set to Δ, and the bit
  that left syncf Δ clocks earlier comes out alongside the first bit of the lagging stream.
- If Δ > 1000, that bit is in memory. IWR reads it back from Δ − 1000 positions earlier in its
  circular buffer.

In both cases the operand block switches its output over on the clock the lagging stream
arrives. That is why ctrl's outputs are taken from its next state (Mealy outputs). The
registered swo then adds one clock to every path through the block.

With `avt`=1 the mode comes from the stored `del` rather than from Δ. The streams must then
arrive `del` clocks apart. This is how arrays of constants, or a known offset, are handled.

### The rg ring register

`rg_ring` is a 64-stage shift register whose input multiplexer chooses between new data (`w`=1)
and its own last stage (`w`=0). With `w`=0 the word circulates forever, which is how a constant
is kept in triggers that cannot hold a value on their own. The output can be taken after any
stage. The operand block takes it after the last stage, a delay of exactly one word. So a
constant loaded from a stream comes out on the same word grid as that stream.

### syncf and IWR

- **`syncf`** is a chain of 1000 flip-flops with a 1001-way tap multiplexer. A tap of 0 passes
  the input straight through; a tap of a gives a delay of a clocks.
- **`iwr`** runs a circular buffer in a 1-bit external RAM. Every clock with `w`=1 it writes at
  a pointer that then advances. It reads at pointer − (a − 1000), and `r` gates the output.
  Its memory port is brought out of `dpc_top` for each operand block. The testbenches attach a
  behavioural RAM there (`tb/bit_ram_model.sv`: synchronous write, read in the same clock).

## Functional devices

`fd_fp64` (with `KIND` = `FD_ADD`, `FD_MUL` or `FD_DIV`) works as follows:

1. It shifts in one 64-bit word of each operand.
2. It computes the result with the word-level functions in `fp64_pkg`.
3. It shifts the result out, LSB first, with a marker.
4. A delay line brings the total latency to `LAT` = 126 clocks.

Words can follow each other without gaps, so a device accepts one operation per 64 clocks. The
adder has a `sub` input for subtraction.

The arithmetic rounds to nearest-even. Subnormal inputs and results are flushed to zero, and
NaN and infinity are handled only in their basic cases. It is a model of the data rate and the
results, not a bit-serial photonic arithmetic unit.

## Interface systems

**`emis_in`** takes a frame of 64 RAM words of 16 bits each. It loads them into 64 serializers
(`serializer`), and a 64:1 time-division multiplexer (`photonic_mux`) interleaves them onto one
line. Frame bit p comes from lane p mod 64, bit p / 64. A frame is 1024 clocks, or 16 FP64
words. `take` pulses when a frame is taken. The output marker is high for frames offered with
`valid`=1.

**`emis_out`** does the reverse. It starts a frame at the rising marker, spreads the line over
64 deserializers (`photonic_demux`, `deserializer`), and raises `valid` for one clock with the
64 RAM words. The 1 GHz / 16 GHz rates of the real parts become clock enables here.

## Files

| file | contents |
|---|---|
| `rtl/dpc_pkg.sv` | `stream_t`, mode, state and device-kind enums |
| `rtl/fp64_pkg.sv` | binary64 add, multiply, divide (word level) |
| `rtl/dpc_top.sv` | the fragment described above |
| `rtl/operand_block.sv`, `ob_ctrl.sv`, `swi.sv`, `swo.sv`, `rg_ring.sv`, `syncf.sv`, `iwr.sv` | operand block and parts |
| `rtl/static_switch.sv` | SW1/SW2 |
| `rtl/fd_fp64.sv` | functional device |
| `rtl/emis_in.sv`, `emis_out.sv`, `serializer.sv`, `deserializer.sv`, `photonic_mux.sv`, `photonic_demux.sv` | interface systems |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_check.svh`, `tb/bit_ram_model.sv` | check macros; behavioural 1-bit RAM |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. It also has a watchdog that
counts a failure if it hangs. Run from the directory that holds `rtl/` and `tb/` (Verilator 5):

```
verilator --binary --timing -I. -y rtl -y tb rtl/dpc_pkg.sv rtl/fp64_pkg.sv \
          tb/tb_operand_block.sv --top-module tb_operand_block -Mdir obj -o sim
./obj/sim
```

Substitute any other `tb_*` name. `tb_dpc_top` runs the whole fragment at its default sizes in
under a minute. It:

- loads a constant n into a divider's rg;
- builds x², x²/n (Mode 0), x + x²/n with a 256-clock offset (Mode 2), x + y with a 2048-clock
  offset (Mode 3) and a forced delay of 64 (Write del, then Mode 2);
- compares every output word with double-precision arithmetic done in the testbench;
- counts the clocks spent in each operand-block state, memory writes and reads, and frames in
  and out, and counts a failure for any that never happens.

`tb_operand_block` tests many offsets on both sides of the 1000-clock boundary.

## Departures and limits

- **Mode 3 keeps writing syncf.** In Mode 3 the leading stream goes through syncf at full depth
  and then through external memory. The control table of the original design lists `ws = 0` for
  this mode, but its description of the mechanism has the stream passing from syncf into
  memory. This design follows the description.
- **Write conditions.** The mode 1–3 entry conditions are taken as requiring `wc` = 0. They are
  not read as requiring `ws` = 0.
- **Chosen details.** The following are this design's own: the lengths of the Write rg and
  Write del states, when Modes 1–3 end, the `ld` signal (which stream leads), `ri` as the
  memory read enable, and the one-clock swo register.
- **Dynamic switches are mode-driven only.** The architecture also lets the results of
  functional devices steer swi/swo, for conditional branches. No encoding for that is given, so
  it is not built. Nor is an option to disconnect rg while in Modes 1–3.
- **External memory path.** In the architecture, IWR reaches RAM through a static switch and an
  interface system. Here each operand block has a direct 1-bit memory port with a read in the
  same clock, so any extra latency on that path is not modelled.
- **Accumulation.** The variance structure uses running sums, where an adder feeds back into
  itself. How such a sum is started and ended is not defined, so only feed-forward structures
  are tested. A loop inside one group is 127 clocks, which is not a whole number of words.
- **Sizes chosen here, with no value in the original design:**
  - lanes between switch levels (4 down, 3 up per group);
  - two input and three output systems;
  - `LAT` = 126;
  - 2^16-bit memory per operand block (delays up to 1000 + 65535 clocks);
  - a 17-bit Q counter, which saturates.
- **Capacity.** The fragment has 9 operand blocks and 3 devices of each kind. That covers the
  variance structure (3 adders, 2 multipliers, 2 dividers, 7 operand blocks). A Gauss-Seidel
  solver built from 60 pipes of 5 operand blocks and 5 devices (4 adders, 1 multiplier) needs
  300 operand blocks. `N_GRP` and `FD_PER_GRP` scale the array, but the kinds repeat
  adder/multiplier/divider, so that adder-heavy mix does not map directly.
- **Arithmetic.** Word-level binary64 with subnormals flushed to zero (see above).
- **Reset.** An asynchronous active-low `rst_n` clears every register. Switches reset to
  disconnected, operand blocks to Mode 0.
