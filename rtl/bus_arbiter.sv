// bus_arbiter: grants the shared bus of the bus system to one CBI at a time.
//
// Round-robin: when the bus is free, the requesting master that follows the
// last granted one (in index order, wrapping) wins. The grant is held for
// the whole transfer and dropped in the cycle after the MBI's transfer
// acknowledge (done); a new grant is given one cycle after that, which
// leaves one idle bus cycle between transfers. Outputs are registered: gnt
// (one-hot), gnt_id (its index) and gnt_valid. The arbiter's place (next to
// the MBI) follows the bus system; the policy and timing are this design's
// choice.
module bus_arbiter #(
  parameter int unsigned NUM_PE = ggba_pkg::NUM_PE
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NUM_PE-1:0]         req,
  input  logic                      done,
  output logic [NUM_PE-1:0]         gnt,
  output logic [$clog2(NUM_PE)-1:0] gnt_id,
  output logic                      gnt_valid
);

  localparam int unsigned IDW = $clog2(NUM_PE);

  logic [IDW-1:0] last_q;    // last master granted
  logic [IDW-1:0] pick;
  logic           pick_ok;

  // Next requester after last_q, round-robin.
  always_comb begin
    pick    = '0;
    pick_ok = 1'b0;
    for (int i = 1; i <= int'(NUM_PE); i++) begin
      logic [IDW-1:0] idx;
      idx = IDW'((int'(last_q) + i) % int'(NUM_PE));
      if (!pick_ok && req[idx]) begin
        pick    = idx;
        pick_ok = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt_valid <= 1'b0;
      gnt_id    <= '0;
      last_q    <= IDW'(NUM_PE - 1);
    end else if (gnt_valid) begin
      if (done) gnt_valid <= 1'b0;
    end else if (pick_ok) begin
      gnt_valid <= 1'b1;
      gnt_id    <= pick;
      last_q    <= pick;
    end
  end

  always_comb begin
    gnt = '0;
    gnt[gnt_id] = gnt_valid;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
