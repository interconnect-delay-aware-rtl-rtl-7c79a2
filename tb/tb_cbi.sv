// tb_cbi: one CPU bus interface between a scripted PE and a model of the
// arbiter and MBI written in the testbench. Checks the PE-side timing
// (pe_aack_bar at t+4, pe_ta_bar at t+N+4 after pe_ts_bar at t when the
// grant comes at once and the MBI takes N clocks), that the transfer placed
// on the bus carries the PE's address, data and direction for exactly one
// cycle, and that read data from the bus reaches the PE; also with the
// grant delayed.
module tb_cbi;
  import ggba_pkg::*;

  logic clk = 0, rst_n = 0;
  logic pe_ts_bar, pe_we;
  logic [ADDR_W-1:0] pe_addr;
  logic [DATA_W-1:0] pe_wdata;
  logic pe_aack_bar, pe_ta_bar;
  logic [DATA_W-1:0] pe_rdata;
  logic req, gnt;
  bus_req_t bus_req;
  logic aack_bar_i, ta_bar_i;
  logic [DATA_W-1:0] bus_rdata;
  int checks = 0, failures = 0;

  cbi dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // Arbiter + MBI model: grant after gnt_delay cycles of req, respond
  // mbi_n + 1 cycles after the bus transfer with rdata = ~addr.
  int gnt_delay = 0, mbi_n = 3;
  int valid_count = 0;
  bus_req_t seen;
  initial begin
    gnt = 0; aack_bar_i = 1; ta_bar_i = 1; bus_rdata = '0;
    forever begin
      @(negedge clk);
      if (req && !gnt) begin
        repeat (gnt_delay + 1) @(negedge clk);
        gnt = 1;
        @(negedge clk);
        aack_bar_i = 0;
        repeat (mbi_n) begin @(negedge clk); aack_bar_i = 1; end
        ta_bar_i = 0; bus_rdata = {seen.addr, ~seen.addr};
        @(negedge clk);
        ta_bar_i = 1; bus_rdata = '0; gnt = 0;
      end
    end
  end
  always @(posedge clk) if (bus_req.valid) begin seen <= bus_req; valid_count++; end

  initial begin
    pe_ts_bar = 1; pe_we = 0; pe_addr = '0; pe_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int t_aack, t_ta, t;
      logic we;
      logic [ADDR_W-1:0] a;
      logic [DATA_W-1:0] d;
      gnt_delay = (n < 20) ? 0 : $urandom_range(0, 3);
      mbi_n = $urandom_range(1, 6);
      we = 1'($urandom_range(0, 1));
      a = $urandom; d = {$urandom, $urandom};
      valid_count = 0;
      @(negedge clk);
      pe_ts_bar = 0; pe_we = we; pe_addr = a; pe_wdata = d;
      @(negedge clk);
      pe_ts_bar = 1; pe_addr = '0; pe_wdata = '0;
      t = 1; t_aack = -1; t_ta = -1;
      while (t_ta < 0 && t < 40) begin
        if (!pe_aack_bar) t_aack = t;
        if (!pe_ta_bar) begin
          t_ta = t;
          if (!we) check("read data", pe_rdata, {a, ~a});
        end
        @(negedge clk); t++;
      end
      check("bus addr", seen.addr, a);
      check("bus we", seen.we, we);
      if (we) check("bus wdata", seen.wdata, d);
      check("one bus cycle", valid_count, 1);
      check("aack time", t_aack, 4 + gnt_delay);
      check("ta time", t_ta, mbi_n + 4 + gnt_delay);
      check("ta one cycle", pe_ta_bar, 1);
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
