// tb_pipeline_compare: the same four-stage pipeline (pipeline_pes) runs on
// six bus systems: per-PE wire delays and worst-case delays, each at 300,
// 200 and 100 MHz. Checks that every word read is right and that, at each
// clock, the per-PE system finishes in fewer clocks than the worst-case one.
// Prints the run times and the reduction. Only bus traffic is modelled, no processor
// work, so the reductions are those of the memory accesses alone.
module tb_pipeline_compare;
  timeunit 1ns;
  timeprecision 1ps;
  import ggba_pkg::*;

  localparam int NCFG = 6;
  localparam logic [3:0][31:0] WORST = {4{WIRE_DELAY_FS[3]}};
  localparam int unsigned PERIOD_FS [3] = '{CLK_300MHZ_FS, CLK_200MHZ_FS, CLK_100MHZ_FS};
  localparam string NAME [3] = '{"300MHz", "200MHz", "100MHz"};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   done   [NCFG];
  int     errors [NCFG];
  int     reads  [NCFG];
  longint cycles [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic [3:0] ts_bar, we, aack_bar, ta_bar;
    logic [3:0][ADDR_W-1:0] addr;
    logic [3:0][DATA_W-1:0] wdata, rdata;

    bus_system #(
      .SRAM_ADDR_BITS (12),
      .CLK_PERIOD_FS  (PERIOD_FS[c % 3]),
      .WIRE_DELAY_FS  (c < 3 ? WIRE_DELAY_FS : WORST)
    ) dut (
      .sysclk(clk), .sysrstb(rst_n),
      .pe_ts_bar(ts_bar), .pe_we(we), .pe_addr(addr), .pe_wdata(wdata),
      .pe_aack_bar(aack_bar), .pe_ta_bar(ta_bar), .pe_rdata(rdata));

    pipeline_pes #(.WORDS(16), .BLOCKS(4)) u_pes (
      .clk, .rst_n, .pe_ts_bar(ts_bar), .pe_we(we), .pe_addr(addr),
      .pe_wdata(wdata), .pe_ta_bar(ta_bar), .pe_rdata(rdata),
      .done(done[c]), .errors(errors[c]), .reads(reads[c]), .cycles(cycles[c]));
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    for (int c = 0; c < NCFG; c++) begin
      checks++;
      if (errors[c] != 0 || reads[c] == 0) begin
        failures++;
        $display("FAIL config %0d: %0d bad reads of %0d", c, errors[c], reads[c]);
      end
    end
    for (int k = 0; k < 3; k++) begin
      longint t_acc, t_worst;
      t_acc   = cycles[k] * PERIOD_FS[k] / 1000;
      t_worst = cycles[k + 3] * PERIOD_FS[k] / 1000;
      $display("%s: per-PE %0d clocks (%0d ps), worst-case %0d clocks (%0d ps), %0d.%0d%% shorter",
               NAME[k], cycles[k], t_acc, cycles[k + 3], t_worst,
               (t_worst - t_acc) * 100 / t_worst, ((t_worst - t_acc) * 1000 / t_worst) % 10);
      checks++;
      if (cycles[k] >= cycles[k + 3]) begin
        failures++;
        $display("FAIL %s: per-PE system not faster", NAME[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
