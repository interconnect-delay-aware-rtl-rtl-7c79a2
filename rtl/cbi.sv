// cbi: CPU bus interface, connects one PE (an MPC755 processor) to the shared
// bus of the bus system.
//
// PE side: a 60x-style single-beat interface with active-low strobes. The PE
// starts a transfer by pulling pe_ts_bar low for one cycle with pe_we,
// pe_addr and pe_wdata valid; it must not start another before pe_ta_bar.
// The CBI latches the transfer and requests the bus from the arbiter. Once
// granted it places the transfer on the shared bus for one cycle. The MBI
// then pulses this PE's address acknowledge line (aack_bar_i) and, when the
// access is over, its transfer acknowledge line (ta_bar_i) with the read
// data on bus_rdata. The CBI passes both acknowledges on to the PE one cycle
// later, through registers (pe_aack_bar, pe_ta_bar), latching the read data
// for pe_rdata. The bidirectional PE data bus is split into pe_wdata and
// pe_rdata. The CBI's place between PE and bus follows the bus system; its
// protocol and timing are this design's choice.
//
// Timing from the pe_ts_bar cycle (t = 0) without contention: bus request
// at t = 1, grant and bus transfer at t = 2, MBI address acknowledge at
// t = 3, pe_aack_bar at t = 4, and, with an access of N clocks in the MBI,
// pe_ta_bar at t = N + 4.
module cbi (
  input  logic                        clk,
  input  logic                        rst_n,
  // PE side
  input  logic                        pe_ts_bar,
  input  logic                        pe_we,
  input  logic [ggba_pkg::ADDR_W-1:0] pe_addr,
  input  logic [ggba_pkg::DATA_W-1:0] pe_wdata,
  output logic                        pe_aack_bar,
  output logic                        pe_ta_bar,
  output logic [ggba_pkg::DATA_W-1:0] pe_rdata,
  // arbiter
  output logic                        req,
  input  logic                        gnt,
  // shared bus
  output ggba_pkg::bus_req_t          bus_req,
  input  logic                        aack_bar_i,
  input  logic                        ta_bar_i,
  input  logic [ggba_pkg::DATA_W-1:0] bus_rdata
);
  import ggba_pkg::*;

  typedef enum logic [1:0] {IDLE, REQ, WAIT, ACK} state_t;
  state_t state;

  logic              we_q;
  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] wdata_q;
  logic [DATA_W-1:0] rdata_q;
  logic              aack_q;
  logic              issue;

  assign issue = (state == REQ) && gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      we_q    <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
      rdata_q <= '0;
      aack_q  <= 1'b0;
    end else begin
      aack_q <= !aack_bar_i;
      unique case (state)
        IDLE: if (!pe_ts_bar) begin
          we_q    <= pe_we;
          addr_q  <= pe_addr;
          wdata_q <= pe_wdata;
          state   <= REQ;
        end
        REQ:  if (gnt) state <= WAIT;
        WAIT: if (!ta_bar_i) begin
          rdata_q <= bus_rdata;
          state   <= ACK;
        end
        ACK:  state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign req           = (state == REQ) || (state == WAIT);
  assign bus_req.valid = issue;
  assign bus_req.we    = issue && we_q;
  assign bus_req.addr  = issue ? addr_q  : '0;
  assign bus_req.wdata = issue ? wdata_q : '0;
  assign pe_aack_bar   = !aack_q;
  assign pe_ta_bar     = !(state == ACK);
  assign pe_rdata      = rdata_q;

  // PE rule: one outstanding transfer per PE; acknowledges only while waiting.
  a_ack_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    !ta_bar_i |-> state == WAIT);
  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    !pe_ts_bar |-> state == IDLE);

endmodule
