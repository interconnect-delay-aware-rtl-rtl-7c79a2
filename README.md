# Interconnect-delay-aware shared bus for a four-processor SoC

Four processors share one SRAM over a global bus. On a real die the bus wire
from a processor near the memory is much shorter than the one from a far
processor, so their read round trips differ by several nanoseconds. A memory
controller that waits the same, worst-case number of clocks for everyone
wastes those nanoseconds on every access from the near processors. The
memory bus interface (MBI) in this design waits a separate number of clocks
for each processor instead. It works that number out, at elaboration, from
the estimated wire delay of that processor's path:

    clocks(PE) = ceil( (2 * wire_delay(PE) + sram_access_time) / clock_period )

The delay is doubled because a read goes out (address) and comes back (data).

The default build is the four-PE example system: a 2 Mbyte SRAM with an 8 ns
access time, a 300 MHz bus clock (3.33 ns), and these one-way wire delays:

| PE | wire delay | read path total | clocks @ 300 MHz | @ 200 MHz | @ 100 MHz |
|----|-----------:|----------------:|-----------------:|----------:|----------:|
| 1  | 0.2848 ns  | 8.5696 ns       | 3                | 2         | 1         |
| 2  | 0.5727 ns  | 9.1454 ns       | 3                | 2         | 1         |
| 3  | 2.2882 ns  | 12.5764 ns      | 4                | 3         | 2         |
| 4  | 3.0472 ns  | 14.0944 ns      | 5                | 3         | 2         |

A worst-case design gives every PE the bottom row (5 clocks at 300 MHz). This
one gives PE 1 and PE 2 two clocks fewer per access.

## Structure

The architecture is a General Global Bus Architecture (GGBA): five bus
access nodes (BANs) on one shared bus.

```
  BAN 1        BAN 2        BAN 3        BAN 4         (PEs are outside: their
 [PE 1]       [PE 2]       [PE 3]       [PE 4]          pins are top-level ports)
   |            |            |            |
 [cbi]        [cbi]        [cbi]        [cbi]
   |            |            |            |
 ==+============+============+============+====  shared bus (mux on grant index,
   |            |                                 per-PE acknowledge lines)
 [bus_arbiter] [mbi] --- [sram]                  BAN 5
```

| module | file | role |
|---|---|---|
| `ggba_pkg` | `rtl/ggba_pkg.sv` | widths, bus structs, example delays, `read_clocks()` |
| `cbi` | `rtl/cbi.sv` | CPU bus interface: one PE to the shared bus |
| `bus_arbiter` | `rtl/bus_arbiter.sv` | round-robin grant of the shared bus |
| `mbi` | `rtl/mbi.sv` | memory controller with per-PE access length |
| `sram` | `rtl/sram.sv` | 2^18 x 64-bit memory array, async-SRAM-style pins |
| `bus_system` | `rtl/bus_system.sv` | top: four CBIs, arbiter, MBI and SRAM |

The processors (MPC755 PowerPCs with L1 caches in the example) are not part
of the RTL. Each PE's bus pins are ports of `bus_system`, as packed arrays
indexed by PE; index 0 is PE 1.

## One transfer, cycle by cycle

This is the part that needs the most care when you connect a processor or
change a module. The PE side uses a single-beat, 60x-bus-like protocol with
active-low strobes. A PE starts a transfer by pulling `pe_ts_bar` low for
one cycle, with `pe_we`, `pe_addr` and `pe_wdata` valid. It must not start
another transfer until it has seen `pe_ta_bar`. An assertion in `cbi`
enforces this.

With the bus idle and an MBI access length of N clocks for this PE:

| cycle | what happens |
|---|---|
| 0 | PE drives `pe_ts_bar` low; the CBI latches the transfer |
| 1 | CBI raises `req` to the arbiter |
| 2 | arbiter's grant is visible; the CBI puts the transfer on the bus for this one cycle; the MBI takes it and looks up N from the grant index |
| 3 .. N+2 | MBI holds `cs_bar` low, with `re_bar` or `we_bar`, for exactly N cycles; in cycle 3 it pulses this PE's `aack_bars` line low |
| 4 | CBI passes the address acknowledge on: `pe_aack_bar` low |
| N+3 | MBI pulses this PE's `ta_bars` line low, with the data it sampled at the end of cycle N+2 on the shared read-data bus; the arbiter drops the grant at the end of this cycle |
| N+4 | CBI pulls `pe_ta_bar` low for one cycle with `pe_rdata` valid |

The MBI answers over one active-low address-acknowledge line and one
transfer-acknowledge line per PE (`aack_bars`, `ta_bars`). The read data is
shared. Each CBI registers its PE's two acknowledges once on their way to
the PE.

So an uncontended read takes N + 4 clocks from `pe_ts_bar` to `pe_ta_bar`:
7, 7, 8 and 9 clocks for PE 1..4 at 300 MHz. The CBI and arbiter add four
cycles of handshaking around the N-clock memory access. Under contention a
PE waits in cycle 1 until it is granted. The arbiter gives a new grant one
idle cycle after the previous transfer's acknowledge.

Writes are held for the same N clocks as reads. The SRAM stores the word at
every clock edge while `cs_bar` and `we_bar` are low, so the same word is
written up to N times. The MBI maps byte address bits [20:3] to the SRAM
word address. Higher address bits alias.

## The SRAM model and what N buys

`sram` is a plain memory array. Its read is combinational while `cs_bar` and
`re_bar` are low, which stands for an asynchronous SRAM. In RTL simulation
the data is therefore available at once, and any N >= 1 would pass a
functional test. The value of N only shows once real delays are modelled.
`tb/tb_wire_timing.sv` does that. It puts transport delays on the MBI's
SRAM pins (the wire delay out) and on the read data (8 ns access plus the
wire delay back). Under that model an MBI built with the per-PE delays
returns the right word for every PE at all three clocks. The same MBI built
with zero wire delays returns stale data for PE 3 and PE 4. That
testbench puts the whole round trip on the MBI-SRAM pins, which simplifies
the physical layout: there the long wire runs between the PE and the
memory.

## Retargeting

All timing inputs are parameters of `bus_system` (and of `mbi`), in
femtoseconds so that four-decimal nanosecond values stay exact:

- `CLK_PERIOD_FS`: bus clock period. The default is 3 330 000 (3.33 ns).
  Use 5 000 000 or 10 000 000 for 200 or 100 MHz.
- `SRAM_ACCESS_FS`: SRAM access time. The default is 8 000 000.
- `WIRE_DELAY_FS`: packed array of one-way wire delays, entry k for PE k+1.
  Setting every entry to the largest gives the worst-case design.
- `NUM_PE`, `SRAM_ADDR_BITS`: number of PEs and SRAM size in 64-bit words
  (log2). If you change `NUM_PE`, also pass a `WIRE_DELAY_FS` of that length.

The counts are computed by `ggba_pkg::read_clocks` and are never less than
one. The address width (32) and data width (64) are package constants that
match the MPC755 bus.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and stops itself with a watchdog. With Verilator 5, from the folder that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ggba_pkg.sv tb/tb_bus_system.sv --top-module tb_bus_system
./obj_dir/Vtb_bus_system
```

| testbench | what it shows |
|---|---|
| `tb_ggba_pkg` | `read_clocks` reproduces the 12 clock counts in the table above |
| `tb_sram` | reads/writes against a shadow array; writes need `cs_bar` |
| `tb_bus_arbiter` | matches a reference round-robin model under random requests |
| `tb_cbi` | PE-side timing (`aack` at t+4, `ta` at t+N+4), bus contents, delayed grants |
| `tb_mbi` | access length per PE (3/3/4/5 clocks) and read data |
| `tb_bus_system` | full default size. All four PEs run a four-stage pipeline through the SRAM, the way an OFDM transmitter's stages are spread over the PEs (generate/map, inverse FFT, normalise, guard insertion and output). Checks every word and every transfer's length, and counts contention and grant handovers |
| `tb_clock_configs` | PE-side latency N+4 at 300/200/100 MHz, per-PE and worst-case delays |
| `tb_pipeline_compare` | a smaller pipeline (`tb/pipeline_pes.sv`) on per-PE and worst-case systems at each clock; the per-PE one must finish first |
| `tb_wire_timing` | per-PE counts are enough under real wire/SRAM delays; zero-delay counts are not |

`tb_bus_system` uses the default parameters and runs in a few seconds.

## Design choices and limits

The architecture comes from the example system: four PE/CBI nodes and a
memory node with arbiter, MBI and SRAM on one shared bus. So do the per-PE
clock-count rule, the delay and timing numbers, the SRAM size and pin names
(`cs_bar`, `we_bar`, `re_bar`), the PE-side acknowledge names (`aack`, `ta`)
and the top's clock and reset names (`sysclk`, `sysrstb`).

The following are this design's own choices:

- The CBI protocol and its timing. The PE does not arbitrate itself: the CBI
  requests the bus for it.
- Round-robin arbitration with one idle cycle between transfers.
- Single-beat 64-bit transfers. There are no cache-line bursts and no byte
  or partial-word writes, although a real MPC755 uses both.
- Writes take the same count as reads.
- The data buses are split into input and output halves instead of
  tri-states.
- A multiplexed shared bus.
- Asynchronous active-low reset.
- One module, `bus_system`, forms both the bus subsystem and the whole
  bus system. With a single subsystem, a separate outer level would only
  pass signals through.

Not built:

- The processors themselves.
- The bus wires, which are analog RC lines. Their delays are estimated off
  line from the floorplan and enter only as parameter values.
- The generator that writes such RTL from a user description. Here
  parameters and elaboration-time functions take its place.

Performance figures for the OFDM transmitter (execution time per packet)
depend on the processors' software and cannot be reproduced without them.
With bus traffic alone, `tb_pipeline_compare` measures how much shorter the
per-PE timing makes a memory-bound pipeline than the worst-case timing.
It finishes about 14% sooner at 300 MHz, 7% at 200 MHz and 8% at 100 MHz.
These gains come from the memory accesses alone, so they cannot be compared
directly with whole-application numbers.
