// tb_ggba_pkg: checks the wire-delay-to-clock-count calculation of ggba_pkg
// against the clock counts of the example system at 100, 200 and 300 MHz
// (PE 1..4: 1,1,2,2 / 2,2,3,3 / 3,3,4,5) and against the read-path totals
// (8.5696, 9.1454, 12.5764 and 14.0944 ns), plus a few edge cases.
module tb_ggba_pkg;
  import ggba_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  localparam int unsigned EXP_100 [4] = '{1, 1, 2, 2};
  localparam int unsigned EXP_200 [4] = '{2, 2, 3, 3};
  localparam int unsigned EXP_300 [4] = '{3, 3, 4, 5};
  localparam longint unsigned TOTAL_FS [4] = '{8_569_600, 9_145_400, 12_576_400, 14_094_400};

  initial begin
    for (int k = 0; k < 4; k++) begin
      check($sformatf("total PE%0d", k + 1), 2 * longint'(WIRE_DELAY_FS[k]) + SRAM_ACCESS_FS, TOTAL_FS[k]);
      check($sformatf("100MHz PE%0d", k + 1), read_clocks(WIRE_DELAY_FS[k], SRAM_ACCESS_FS, CLK_100MHZ_FS), EXP_100[k]);
      check($sformatf("200MHz PE%0d", k + 1), read_clocks(WIRE_DELAY_FS[k], SRAM_ACCESS_FS, CLK_200MHZ_FS), EXP_200[k]);
      check($sformatf("300MHz PE%0d", k + 1), read_clocks(WIRE_DELAY_FS[k], SRAM_ACCESS_FS, CLK_300MHZ_FS), EXP_300[k]);
    end
    // exact multiple does not round up; zero delay still needs one clock
    check("exact", read_clocks(0, 10_000_000, 5_000_000), 2);
    check("exact+1", read_clocks(0, 10_000_001, 5_000_000), 3);
    check("zero", read_clocks(0, 0, 5_000_000), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
