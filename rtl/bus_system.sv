// bus_system: a General Global Bus Architecture (GGBA) bus subsystem with
// interconnect-delay-aware memory timing.
//
// Four bus access nodes (BAN 1-4) each hold a PE and its CPU bus interface
// (cbi); a fifth node holds the bus arbiter, the memory bus interface (mbi)
// and the shared SRAM. All CBIs share one bus to the MBI: the arbiter grants
// it to one CBI at a time, the granted CBI's request is selected onto the
// bus by the grant index, and the MBI answers over one address-acknowledge
// and one transfer-acknowledge line per PE, with the read data shared.
// The MBI holds each SRAM access for a per-PE number of clocks computed from
// the estimated wire delay between that PE and the SRAM (see mbi), so that
// near PEs are served faster than far ones instead of all paying the
// worst-case delay.
//
// The PEs (MPC755 processors) are outside this module: each PE's bus pins
// are ports, as packed arrays indexed by PE (index k is PE k+1). The
// defaults are the example system: four PEs, a 2 Mbyte SRAM (2^18 words of
// 64 bits), a 300 MHz clock and the per-PE wire delays in ggba_pkg. For
// other clock rates or floorplans, change CLK_PERIOD_FS and WIRE_DELAY_FS;
// setting every WIRE_DELAY_FS entry to the largest one gives the worst-case
// timing for all PEs. See cbi for the PE-side protocol and its timing.
module bus_system #(
  parameter int unsigned NUM_PE         = ggba_pkg::NUM_PE,
  parameter int unsigned SRAM_ADDR_BITS = 18,
  parameter int unsigned CLK_PERIOD_FS  = ggba_pkg::CLK_300MHZ_FS,
  parameter int unsigned SRAM_ACCESS_FS = ggba_pkg::SRAM_ACCESS_FS,
  parameter logic [NUM_PE-1:0][31:0] WIRE_DELAY_FS = ggba_pkg::WIRE_DELAY_FS
) (
  input  logic                                      sysclk,
  input  logic                                      sysrstb,
  // PE bus pins, one entry per PE
  input  logic [NUM_PE-1:0]                         pe_ts_bar,
  input  logic [NUM_PE-1:0]                         pe_we,
  input  logic [NUM_PE-1:0][ggba_pkg::ADDR_W-1:0]   pe_addr,
  input  logic [NUM_PE-1:0][ggba_pkg::DATA_W-1:0]   pe_wdata,
  output logic [NUM_PE-1:0]                         pe_aack_bar,
  output logic [NUM_PE-1:0]                         pe_ta_bar,
  output logic [NUM_PE-1:0][ggba_pkg::DATA_W-1:0]   pe_rdata
);
  import ggba_pkg::*;

  localparam int unsigned IDW = $clog2(NUM_PE);

  bus_req_t [NUM_PE-1:0] cbi_req;
  logic     [NUM_PE-1:0] arb_req;
  logic     [NUM_PE-1:0] arb_gnt;
  logic     [IDW-1:0]    gnt_id;
  logic                  gnt_valid;
  bus_req_t              bus_req;
  logic     [NUM_PE-1:0] aack_bars;
  logic     [NUM_PE-1:0] ta_bars;
  logic     [DATA_W-1:0] bus_rdata;
  logic                  mbi_busy;

  logic [SRAM_ADDR_BITS-1:0] sram_addr;
  logic [DATA_W-1:0]         sram_din;
  logic [DATA_W-1:0]         sram_dout;
  logic                      cs_bar, we_bar, re_bar;

  // BAN 1-4: CPU bus interfaces
  for (genvar k = 0; k < NUM_PE; k++) begin : g_ban
    cbi u_cbi (
      .clk         (sysclk),
      .rst_n       (sysrstb),
      .pe_ts_bar   (pe_ts_bar[k]),
      .pe_we       (pe_we[k]),
      .pe_addr     (pe_addr[k]),
      .pe_wdata    (pe_wdata[k]),
      .pe_aack_bar (pe_aack_bar[k]),
      .pe_ta_bar   (pe_ta_bar[k]),
      .pe_rdata    (pe_rdata[k]),
      .req         (arb_req[k]),
      .gnt         (arb_gnt[k]),
      .bus_req     (cbi_req[k]),
      .aack_bar_i  (aack_bars[k]),
      .ta_bar_i    (ta_bars[k]),
      .bus_rdata   (bus_rdata)
    );
  end

  // Shared bus: the granted CBI drives it.
  always_comb begin
    bus_req = cbi_req[gnt_id];
    if (!gnt_valid) bus_req = '0;
  end

  // BAN 5: arbiter, MBI and SRAM
  bus_arbiter #(.NUM_PE(NUM_PE)) u_arbiter (
    .clk       (sysclk),
    .rst_n     (sysrstb),
    .req       (arb_req),
    .done      (!(&ta_bars)),
    .gnt       (arb_gnt),
    .gnt_id    (gnt_id),
    .gnt_valid (gnt_valid)
  );

  mbi #(
    .NUM_PE         (NUM_PE),
    .SRAM_ADDR_BITS (SRAM_ADDR_BITS),
    .CLK_PERIOD_FS  (CLK_PERIOD_FS),
    .SRAM_ACCESS_FS (SRAM_ACCESS_FS),
    .WIRE_DELAY_FS  (WIRE_DELAY_FS)
  ) u_mbi (
    .clk       (sysclk),
    .rst_n     (sysrstb),
    .bus_req   (bus_req),
    .gnt_id    (gnt_id),
    .aack_bars (aack_bars),
    .ta_bars   (ta_bars),
    .rdata     (bus_rdata),
    .busy      (mbi_busy),
    .sram_addr (sram_addr),
    .sram_din  (sram_din),
    .sram_dout (sram_dout),
    .cs_bar    (cs_bar),
    .we_bar    (we_bar),
    .re_bar    (re_bar)
  );

  sram #(.ADDR_BITS(SRAM_ADDR_BITS), .DATA_W(DATA_W)) u_sram (
    .clk    (sysclk),
    .cs_bar (cs_bar),
    .we_bar (we_bar),
    .re_bar (re_bar),
    .addr   (sram_addr),
    .din    (sram_din),
    .dout   (sram_dout)
  );

  // The MBI is only ever handed a transfer while it is idle.
  a_no_overlap: assert property (@(posedge sysclk) disable iff (!sysrstb)
    bus_req.valid |-> !mbi_busy);

endmodule
