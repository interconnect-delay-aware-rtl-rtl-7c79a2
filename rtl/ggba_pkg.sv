// ggba_pkg: types and constants shared by the blocks of the General Global
// Bus Architecture (GGBA) bus system, plus the calculation that turns an
// estimated interconnect delay into a number of bus clocks.
//
// The GGBA puts four processing elements (PEs), each behind a CPU bus
// interface (CBI), on one shared bus to a shared SRAM. The memory bus
// interface (MBI) holds every SRAM access for a per-PE number of clocks that
// covers the round trip over the bus wire plus the SRAM access time:
//
//   clocks(PE) = ceil( (2 * wire_delay(PE) + sram_access) / clock_period )
//
// The read delay is twice the one-way wire delay (address out, data back).
// All delays are given in femtoseconds so that the four-decimal nanosecond
// estimates (0.2848 ns, ...) are exact integers. The default delays are the
// estimates for the four PEs of the example floorplan (TSMC 0.25 um wires),
// the 8 ns access time of the shared 2 Mbyte SRAM and a 300 MHz bus clock
// (3.33 ns period). The widths (32-bit address, 64-bit data) are those of
// the MPC755 processor bus and are this design's choice; the bus carries
// single-beat transfers only.
package ggba_pkg;

  localparam int unsigned ADDR_W = 32;   // PE address width
  localparam int unsigned DATA_W = 64;   // PE data bus width
  localparam int unsigned NUM_PE = 4;    // PEs on the shared bus

  // Delay estimates of the example system, in femtoseconds.
  localparam int unsigned SRAM_ACCESS_FS = 8_000_000;   // 8.00 ns
  localparam int unsigned CLK_300MHZ_FS  = 3_330_000;   // 3.33 ns
  localparam int unsigned CLK_200MHZ_FS  = 5_000_000;   // 5.00 ns
  localparam int unsigned CLK_100MHZ_FS  = 10_000_000;  // 10.00 ns
  // One-way bus wire delay PE k -> SRAM; element [k-1] belongs to PE k.
  localparam logic [NUM_PE-1:0][31:0] WIRE_DELAY_FS = {
    32'd3_047_200,   // PE 4: 3.0472 ns
    32'd2_288_200,   // PE 3: 2.2882 ns
    32'd572_700,     // PE 2: 0.5727 ns
    32'd284_800      // PE 1: 0.2848 ns
  };

  // Request a bus master places on the shared bus.
  typedef struct packed {
    logic              valid;  // one-cycle transfer start
    logic              we;     // 1: write, 0: read
    logic [ADDR_W-1:0] addr;   // byte address
    logic [DATA_W-1:0] wdata;  // write data
  } bus_req_t;

  // Number of clocks a read from a PE with the given one-way wire delay
  // needs, rounded up to whole clocks; never less than one.
  function automatic int unsigned read_clocks(input longint unsigned wire_fs,
                                              input longint unsigned sram_fs,
                                              input longint unsigned period_fs);
    longint unsigned total;
    longint unsigned n;
    total = 2 * wire_fs + sram_fs;
    n = (total + period_fs - 1) / period_fs;
    if (n == 0) n = 1;
    return int'(n);
  endfunction

endpackage
