// mbi: memory bus interface, the memory controller between the shared bus
// and the shared SRAM.
//
// Wires from the PEs to the SRAM differ in length, so a read from a distant
// PE takes longer than one from a near PE. The MBI holds each SRAM access
// for a number of clocks chosen per PE: CLKS[k] = ceil((2 * WIRE_DELAY_FS[k]
// + SRAM_ACCESS_FS) / CLK_PERIOD_FS), worked out at elaboration from the
// interconnect delay estimates (ggba_pkg::read_clocks). With the defaults
// (300 MHz clock) this gives 3, 3, 4 and 5 clocks for PE 1 to PE 4.
//
// Timing: a request (bus_req.valid, one cycle) is taken in IDLE, tagged with
// the index of the granted master (gnt_id). The MBI then drives cs_bar low,
// with re_bar or we_bar, for exactly CLKS[gnt_id] cycles (ACCESS), samples
// the SRAM data at the end of the last one, and in the following cycle
// (DONE) pulses that master's transfer acknowledge ta_bars[id] low with the
// read data on rdata. A transfer thus ends CLKS + 1 cycles after its request
// cycle. The master's address acknowledge aack_bars[id] is pulsed low in the
// first ACCESS cycle, when the address has been taken. Both acknowledges are
// active low with one line per PE, as the PE bus expects. Writes are held
// for the same number of clocks as reads, which is this design's choice; so
// is the single-beat transfer and the byte-address-to-word mapping (the word
// address is addr[3 +: SRAM_ADDR_BITS]; higher address bits alias).
module mbi #(
  parameter int unsigned NUM_PE         = ggba_pkg::NUM_PE,
  parameter int unsigned SRAM_ADDR_BITS = 18,
  parameter int unsigned CLK_PERIOD_FS  = ggba_pkg::CLK_300MHZ_FS,
  parameter int unsigned SRAM_ACCESS_FS = ggba_pkg::SRAM_ACCESS_FS,
  parameter logic [NUM_PE-1:0][31:0] WIRE_DELAY_FS = ggba_pkg::WIRE_DELAY_FS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // shared bus side
  input  ggba_pkg::bus_req_t            bus_req,
  input  logic [$clog2(NUM_PE)-1:0]     gnt_id,
  output logic [NUM_PE-1:0]             aack_bars,
  output logic [NUM_PE-1:0]             ta_bars,
  output logic [ggba_pkg::DATA_W-1:0]   rdata,
  output logic                          busy,
  // SRAM side
  output logic [SRAM_ADDR_BITS-1:0]     sram_addr,
  output logic [ggba_pkg::DATA_W-1:0]   sram_din,
  input  logic [ggba_pkg::DATA_W-1:0]   sram_dout,
  output logic                          cs_bar,
  output logic                          we_bar,
  output logic                          re_bar
);
  import ggba_pkg::*;

  localparam int unsigned CNT_W = 8;

  // Per-PE access length in clocks, from the interconnect delay estimates.
  function automatic logic [NUM_PE-1:0][CNT_W-1:0] calc_clks();
    logic [NUM_PE-1:0][CNT_W-1:0] c;
    for (int k = 0; k < int'(NUM_PE); k++)
      c[k] = CNT_W'(read_clocks(WIRE_DELAY_FS[k], SRAM_ACCESS_FS, CLK_PERIOD_FS));
    return c;
  endfunction
  localparam logic [NUM_PE-1:0][CNT_W-1:0] CLKS = calc_clks();

  typedef enum logic [1:0] {IDLE, ACCESS, DONE} state_t;
  state_t state;

  logic [CNT_W-1:0]   cnt;
  logic               we_q;
  logic               first_q;
  logic [$clog2(NUM_PE)-1:0] id_q;
  logic [DATA_W-1:0]  rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      cnt       <= '0;
      we_q      <= 1'b0;
      first_q   <= 1'b0;
      id_q      <= '0;
      sram_addr <= '0;
      sram_din  <= '0;
      rdata_q   <= '0;
    end else begin
      unique case (state)
        IDLE: if (bus_req.valid) begin
          we_q      <= bus_req.we;
          id_q      <= gnt_id;
          first_q   <= 1'b1;
          sram_addr <= bus_req.addr[3 +: SRAM_ADDR_BITS];
          sram_din  <= bus_req.wdata;
          cnt       <= CLKS[gnt_id] - 1'b1;
          state     <= ACCESS;
        end
        ACCESS: begin
          first_q <= 1'b0;
          if (cnt == '0) begin
            rdata_q <= we_q ? '0 : sram_dout;
            state   <= DONE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        DONE: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign cs_bar        = (state != ACCESS);
  assign we_bar        = !(state == ACCESS && we_q);
  assign re_bar        = !(state == ACCESS && !we_q);
  always_comb begin
    aack_bars = '1;
    ta_bars   = '1;
    aack_bars[id_q] = !(state == ACCESS && first_q);
    ta_bars[id_q]   = !(state == DONE);
  end
  assign rdata         = rdata_q;
  assign busy          = (state != IDLE);

  // Bus rules: a new transfer may only start while the MBI is idle.
  a_req_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    bus_req.valid |-> state == IDLE);
  a_clks_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    bus_req.valid |-> CLKS[gnt_id] != '0);

endmodule
