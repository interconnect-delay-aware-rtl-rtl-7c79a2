// tb_bus_system: end-to-end test of the bus system at its default size
// (four PEs, 2 Mbyte SRAM, 300 MHz delay settings).
//
// The four PEs are modelled by tasks that speak the CBI's PE-side protocol.
// They run a four-stage software pipeline through the shared SRAM, the way
// the stages of an OFDM transmitter are spread over the four PEs: PE 1
// generates each block, PE 2..4 each read the previous stage's block, change
// every word and write their own block. A stage starts on block j once the
// stage before has finished it, so all four PEs overlap and contend for the
// bus. Checks:
//  - every word a PE reads equals the value the stage before must have
//    written (computed here from the same formula), and the final blocks in
//    the SRAM are right;
//  - every transfer keeps the SRAM selected for exactly the clock count of
//    the PE that issued it (3, 3, 4, 5 for PE 1..4) and ends one clock
//    later;
//  - the MBI is never given a transfer while busy (assertion in the RTL).
// Mechanisms counted, each must happen: transfers from every PE with its own
// clock count, reads, writes, cycles with PEs waiting for the bus, and
// grants passing between PEs.
module tb_bus_system;
  import ggba_pkg::*;

  localparam int unsigned N = NUM_PE;
  localparam int unsigned WORDS = 32;     // words per block
  localparam int unsigned BLOCKS = 6;     // blocks through the pipeline
  localparam int EXP_CLKS [4] = '{3, 3, 4, 5};

  logic sysclk = 0, sysrstb = 0;
  logic [N-1:0] pe_ts_bar, pe_we, pe_aack_bar, pe_ta_bar;
  logic [N-1:0][ADDR_W-1:0] pe_addr;
  logic [N-1:0][DATA_W-1:0] pe_wdata, pe_rdata;

  bus_system dut (.*);

  always #5 sysclk = ~sysclk;

  int checks = 0, failures = 0;
  int produced [N];
  int n_read = 0, n_write = 0, n_wait_cycles = 0, n_handover = 0;
  int n_xfer [N];
  longint cycle = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // Block buffer of a stage: stage s, block j, word w.
  function automatic logic [ADDR_W-1:0] buf_addr(int s, int j, int w);
    return ADDR_W'((s << 16) | (j << 9) | (w << 3));
  endfunction
  // Word stage s writes (stage 0 generates, later stages transform).
  function automatic logic [DATA_W-1:0] stage_word(int s, int j, int w);
    logic [DATA_W-1:0] v;
    v = {32'(j * 1000 + w), 32'hC0DE_0000 ^ 32'(w * 7)};
    for (int k = 1; k <= s; k++) v = (v ^ {8{8'(k * 17)}}) + DATA_W'(k);
    return v;
  endfunction

  task automatic pe_xfer(input int p, input logic we, input logic [ADDR_W-1:0] a,
                         input logic [DATA_W-1:0] d, output logic [DATA_W-1:0] q);
    @(negedge sysclk);
    pe_ts_bar[p] = 0; pe_we[p] = we; pe_addr[p] = a; pe_wdata[p] = d;
    @(negedge sysclk);
    pe_ts_bar[p] = 1;
    while (pe_ta_bar[p]) @(negedge sysclk);
    q = pe_rdata[p];
  endtask

  task automatic pe_run(input int p);
    logic [DATA_W-1:0] q, v;
    for (int j = 0; j < BLOCKS; j++) begin
      if (p > 0) while (produced[p - 1] <= j) @(negedge sysclk);
      for (int w = 0; w < WORDS; w++) begin
        if (p > 0) begin
          pe_xfer(p, 1'b0, buf_addr(p - 1, j, w), '0, q);
          check($sformatf("PE%0d read b%0d w%0d", p + 1, j, w), q, stage_word(p - 1, j, w));
          v = (q ^ {8{8'(p * 17)}}) + DATA_W'(p);
        end else begin
          v = stage_word(0, j, w);
        end
        pe_xfer(p, 1'b1, buf_addr(p, j, w), v, q);
      end
      produced[p]++;
    end
  endtask

  // Monitor of the shared bus: per-transfer clock count and mechanisms.
  int  mon_id, mon_len, mon_cs;
  bit  mon_active = 0;
  int  last_gnt = -1;
  always @(posedge sysclk) if (sysrstb) begin
    cycle++;
    if ($countones(dut.arb_req) > 1) n_wait_cycles++;
    if (dut.bus_req.valid) begin
      mon_active <= 1; mon_id <= int'(dut.gnt_id); mon_len <= 1; mon_cs <= 0;
      if (dut.bus_req.we) n_write++; else n_read++;
      if (last_gnt >= 0 && last_gnt != int'(dut.gnt_id)) n_handover++;
      last_gnt <= int'(dut.gnt_id);
    end else if (mon_active) begin
      mon_len <= mon_len + 1;
      if (!dut.cs_bar) mon_cs <= mon_cs + 1;
      if (dut.ta_bars != '1) begin
        check("ta line of the granted PE", dut.ta_bars, 4'(~(4'b1 << mon_id)));
        mon_active <= 0;
        check($sformatf("PE%0d access clocks", mon_id + 1), mon_cs, EXP_CLKS[mon_id]);
        check($sformatf("PE%0d transfer length", mon_id + 1), mon_len, EXP_CLKS[mon_id] + 1);
        n_xfer[mon_id]++;
      end
    end
  end

  initial begin
    longint t0;
    pe_ts_bar = '1; pe_we = '0; pe_addr = '0; pe_wdata = '0;
    for (int p = 0; p < N; p++) begin produced[p] = 0; n_xfer[p] = 0; end
    repeat (3) @(posedge sysclk);
    sysrstb = 1;
    t0 = cycle;
    fork
      pe_run(0);
      pe_run(1);
      pe_run(2);
      pe_run(3);
    join
    $display("pipeline of %0d blocks x %0d words: %0d cycles (%0d ns at 3.33 ns)",
             BLOCKS, WORDS, cycle - t0, (cycle - t0) * 333 / 100);
    // final blocks in the SRAM
    for (int j = 0; j < BLOCKS; j++)
      for (int w = 0; w < WORDS; w++)
        check("final block", dut.u_sram.mem[buf_addr(N - 1, j, w) >> 3], stage_word(N - 1, j, w));
    for (int p = 0; p < N; p++) begin
      checks++;
      if (n_xfer[p] == 0) begin failures++; $display("FAIL no transfer from PE%0d", p + 1); end
      $display("PE%0d transfers: %0d", p + 1, n_xfer[p]);
    end
    checks++; if (n_read == 0)        begin failures++; $display("FAIL no read"); end
    checks++; if (n_write == 0)       begin failures++; $display("FAIL no write"); end
    checks++; if (n_wait_cycles == 0) begin failures++; $display("FAIL no bus contention"); end
    checks++; if (n_handover == 0)    begin failures++; $display("FAIL no grant handover"); end
    $display("reads %0d writes %0d contention cycles %0d handovers %0d",
             n_read, n_write, n_wait_cycles, n_handover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge sysclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
