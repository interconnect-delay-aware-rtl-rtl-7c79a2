// tb_clock_configs: the bus system at the three bus clocks of the example
// (300, 200 and 100 MHz), each once with the per-PE wire delays and once with
// the worst-case delay on every PE. For every configuration and PE it makes
// one write and one read with the bus otherwise idle and checks the PE-side
// latency from pe_ts_bar to pe_ta_bar: N + 4 clocks, where N is the PE's
// read clock count from the example's table (per-PE: 3,3,4,5 at 300 MHz,
// 2,2,3,3 at 200 MHz, 1,1,2,2 at 100 MHz; worst case: 5, 3 and 2 for all).
// It also checks the read data.
module tb_clock_configs;
  import ggba_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned AB = 10;
  localparam logic [N-1:0][31:0] WORST = {4{WIRE_DELAY_FS[3]}};
  localparam int NCFG = 6;
  localparam int EXP [NCFG][N] = '{
    '{3, 3, 4, 5}, '{2, 2, 3, 3}, '{1, 1, 2, 2},
    '{5, 5, 5, 5}, '{3, 3, 3, 3}, '{2, 2, 2, 2}};
  localparam string NAME [NCFG] = '{"300MHz per-PE", "200MHz per-PE", "100MHz per-PE",
                                    "300MHz worst", "200MHz worst", "100MHz worst"};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NCFG-1:0][N-1:0] ts_bar, we, aack_bar, ta_bar;
  logic [NCFG-1:0][N-1:0][ADDR_W-1:0] addr;
  logic [NCFG-1:0][N-1:0][DATA_W-1:0] wdata, rdata;

  localparam int unsigned PERIOD [3] = '{CLK_300MHZ_FS, CLK_200MHZ_FS, CLK_100MHZ_FS};

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    bus_system #(
      .SRAM_ADDR_BITS (AB),
      .CLK_PERIOD_FS  (PERIOD[c % 3]),
      .WIRE_DELAY_FS  (c < 3 ? WIRE_DELAY_FS : WORST)
    ) dut (
      .sysclk(clk), .sysrstb(rst_n),
      .pe_ts_bar(ts_bar[c]), .pe_we(we[c]), .pe_addr(addr[c]), .pe_wdata(wdata[c]),
      .pe_aack_bar(aack_bar[c]), .pe_ta_bar(ta_bar[c]), .pe_rdata(rdata[c]));
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic xfer(input int c, input int p, input logic w, input logic [ADDR_W-1:0] a,
                      input logic [DATA_W-1:0] d, output int lat, output logic [DATA_W-1:0] q);
    @(negedge clk);
    ts_bar[c][p] = 0; we[c][p] = w; addr[c][p] = a; wdata[c][p] = d;
    @(negedge clk);
    ts_bar[c][p] = 1;
    lat = 1;
    while (ta_bar[c][p] && lat < 50) begin @(negedge clk); lat++; end
    q = rdata[c][p];
  endtask

  initial begin
    ts_bar = '1; we = '0; addr = '0; wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCFG; c++) begin
      for (int p = 0; p < N; p++) begin
        int lat;
        logic [DATA_W-1:0] q, d;
        d = {$urandom, $urandom};
        xfer(c, p, 1'b1, ADDR_W'(p * 8 + 64), d, lat, q);
        check($sformatf("%s PE%0d write latency", NAME[c], p + 1), lat, EXP[c][p] + 4);
        xfer(c, p, 1'b0, ADDR_W'(p * 8 + 64), '0, lat, q);
        check($sformatf("%s PE%0d read latency", NAME[c], p + 1), lat, EXP[c][p] + 4);
        check($sformatf("%s PE%0d read data", NAME[c], p + 1), q, d);
        $display("%s PE%0d: %0d-clock access, %0d clocks from request to data",
                 NAME[c], p + 1, EXP[c][p], lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
