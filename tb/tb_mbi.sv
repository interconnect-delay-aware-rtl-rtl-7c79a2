// tb_mbi: the memory bus interface with a small sram behind it, at the
// default 300 MHz delay settings. Issues random reads and writes tagged with
// random PE indices and checks, for each transfer, that the SRAM is selected
// for exactly the PE's clock count (3, 3, 4, 5 for PE 1..4), that the
// PE's address acknowledge comes one clock after the request and its
// transfer acknowledge that many clocks plus one after it, that no other
// PE's acknowledge line moves, and that read data matches a shadow memory.
module tb_mbi;
  import ggba_pkg::*;
  localparam int unsigned AB = 8;
  localparam int EXP_CLKS [4] = '{3, 3, 4, 5};

  logic clk = 0, rst_n = 0;
  bus_req_t bus_req;
  logic [1:0] gnt_id;
  logic [3:0] aack_bars, ta_bars;
  logic [DATA_W-1:0] rdata;
  logic busy;
  logic [AB-1:0] sram_addr;
  logic [DATA_W-1:0] sram_din, sram_dout;
  logic cs_bar, we_bar, re_bar;
  logic [DATA_W-1:0] shadow [2**AB];
  int checks = 0, failures = 0;
  int per_pe [4];

  mbi #(.SRAM_ADDR_BITS(AB)) dut (.*);
  sram #(.ADDR_BITS(AB)) u_sram (.clk, .cs_bar, .we_bar, .re_bar,
                                 .addr(sram_addr), .din(sram_din), .dout(sram_dout));

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // count cycles with the SRAM selected
  int cs_cycles;
  always @(posedge clk) if (!cs_bar) cs_cycles++;

  initial begin
    bus_req = '0; gnt_id = 0;
    for (int a = 0; a < 2**AB; a++) shadow[a] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // clear the small SRAM through the MBI
    for (int a = 0; a < 2**AB + 600; a++) begin
      int id, lat;
      logic we;
      logic [AB-1:0] wa;
      logic [DATA_W-1:0] d;
      id = $urandom_range(0, 3);
      we = (a < 2**AB) ? 1'b1 : 1'($urandom_range(0, 1));
      wa = (a < 2**AB) ? AB'(a) : AB'($urandom);
      d  = {$urandom, $urandom};
      @(negedge clk);
      bus_req.valid = 1; bus_req.we = we; bus_req.addr = {wa, 3'b000};
      bus_req.wdata = d; gnt_id = 2'(id);
      cs_cycles = 0;
      @(negedge clk);
      bus_req = '0;
      lat = 1;
      check("aack line", aack_bars, 4'(~(4'b1 << id)));
      while (ta_bars == '1 && lat < 20) begin
        @(negedge clk); lat++;
        if (aack_bars != '1) begin checks++; failures++; $display("FAIL late aack"); end
      end
      check("ack latency", lat, EXP_CLKS[id] + 1);
      check("ta line", ta_bars, 4'(~(4'b1 << id)));
      check("sram select cycles", cs_cycles, EXP_CLKS[id]);
      if (we) shadow[wa] = d;
      else check("read data", rdata, shadow[wa]);
      per_pe[id]++;
      // sometimes leave an idle cycle
      if ($urandom_range(0, 1)) @(negedge clk);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (per_pe[k] == 0) begin failures++; $display("FAIL PE%0d never served", k + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
