// tb_wire_timing: checks the MBI's clock counts against real wire and SRAM
// timing. A behavioural model in this testbench delays the MBI's SRAM pins
// by the one-way wire delay of the PE being served (transport delay), and
// delays the SRAM's read data by the 8 ns access time plus the same wire
// delay on the way back, so a read only returns the right word if the
// MBI waits at least 2 * wire delay + 8 ns before sampling.
//
// For each of the three bus clocks (3.33, 5.00 and 10.00 ns) two MBIs are
// compared, each with its own SRAM and wire model:
//  - "aware": the MBI built with the per-PE wire delays; every read from
//    every PE must return the right word;
//  - "unaware": the same MBI built with zero wire delays (only the SRAM
//    access time is budgeted); reads from PE 1 and 2 still work but reads
//    from the far PEs 3 and 4 must return a stale word.
// The whole round trip is lumped onto the MBI-SRAM pins, a simplification
// of the physical wire between each PE and the memory.
module tb_wire_timing;
  timeunit 1ns;
  timeprecision 1ps;
  import ggba_pkg::*;

  localparam int unsigned AB = 6;
  localparam realtime PERIOD_NS [3] = '{3.33, 5.00, 10.00};
  localparam int unsigned PERIOD_FS [3] = '{CLK_300MHZ_FS, CLK_200MHZ_FS, CLK_100MHZ_FS};
  localparam realtime WIRE_NS [4] = '{0.2848, 0.5727, 2.2882, 3.0472};
  localparam realtime ACCESS_NS = 8.0;

  int checks = 0, failures = 0;
  int stale_seen = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // word stored at address a of every SRAM
  function automatic logic [DATA_W-1:0] word_at(int a);
    return {32'hA5A5_0000 | 32'(a), 32'(a * 977 + 13)};
  endfunction

  for (genvar c = 0; c < 3; c++) begin : g_clk
    logic clk = 0;
    logic rst_n = 0;
    always #(PERIOD_NS[c] / 2) clk = ~clk;

    realtime dly = 0.0;         // one-way wire delay of the PE being served
    bus_req_t bus_req;
    logic [1:0] gnt_id;

    for (genvar v = 0; v < 2; v++) begin : g_var   // 0: aware, 1: unaware
      logic [3:0] aack_bars, ta_bars;
      logic [DATA_W-1:0] rdata;
      logic busy;
      logic [AB-1:0] a, a_d;
      logic [DATA_W-1:0] din, din_d, q, q_d;
      logic cs, we, re, cs_d, we_d, re_d;

      mbi #(
        .SRAM_ADDR_BITS (AB),
        .CLK_PERIOD_FS  (PERIOD_FS[c]),
        .WIRE_DELAY_FS  (v == 0 ? WIRE_DELAY_FS : '0)
      ) u_mbi (
        .clk, .rst_n, .bus_req, .gnt_id, .aack_bars, .ta_bars, .rdata, .busy,
        .sram_addr(a), .sram_din(din), .sram_dout(q_d),
        .cs_bar(cs), .we_bar(we), .re_bar(re));

      // wire towards the SRAM
      always @(a)   a_d   <= #(dly) a;
      always @(din) din_d <= #(dly) din;
      always @(cs)  cs_d  <= #(dly) cs;
      always @(we)  we_d  <= #(dly) we;
      always @(re)  re_d  <= #(dly) re;

      sram #(.ADDR_BITS(AB)) u_sram (
        .clk, .cs_bar(cs_d), .we_bar(we_d), .re_bar(re_d),
        .addr(a_d), .din(din_d), .dout(q));

      // SRAM access time and wire back
      always @(q) q_d <= #(ACCESS_NS + dly) q;

      initial begin
        a_d = '0; din_d = '0; cs_d = 1; we_d = 1; re_d = 1; q_d = '0;
        for (int i = 0; i < 2**AB; i++) u_sram.mem[i] = word_at(i);
      end
    end

    initial begin : run
      bus_req = '0; gnt_id = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      for (int n = 0; n < 48; n++) begin
        int p, addr;
        logic [DATA_W-1:0] got0, got1;
        p = n % 4;
        addr = (n * 5 + 3) % (2**AB);
        @(negedge clk);
        dly = WIRE_NS[p];
        bus_req.valid = 1; bus_req.we = 0; bus_req.addr = ADDR_W'(addr << 3);
        gnt_id = 2'(p);
        @(negedge clk);
        bus_req = '0;
        while (g_var[0].ta_bars[p]) @(negedge clk);
        got0 = g_var[0].rdata;
        while (g_var[1].ta_bars[p] && g_var[1].busy) @(negedge clk);
        got1 = g_var[1].rdata;
        check($sformatf("clock %0d aware PE%0d read", c, p + 1), got0 == word_at(addr));
        if (p < 2) check($sformatf("clock %0d unaware PE%0d read", c, p + 1), got1 == word_at(addr));
        else begin
          check($sformatf("clock %0d unaware PE%0d stale", c, p + 1), got1 != word_at(addr));
          if (got1 != word_at(addr)) stale_seen++;
        end
        // let both MBIs and the wires settle
        repeat (4) @(negedge clk);
      end
      done[c] = 1;
    end
  end

  bit done [3];
  initial begin
    wait (done[0] && done[1] && done[2]);
    checks++;
    if (stale_seen == 0) begin failures++; $display("FAIL no stale read seen"); end
    $display("stale reads from the unaware MBI: %0d", stale_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
