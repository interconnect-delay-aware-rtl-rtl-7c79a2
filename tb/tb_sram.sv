// tb_sram: random writes and reads of a reduced-size sram against a shadow
// array; checks that disabled reads give zero and that a write needs both
// cs_bar and we_bar low.
module tb_sram;
  localparam int unsigned AB = 6;
  localparam int unsigned DW = 64;

  logic clk = 0;
  logic cs_bar, we_bar, re_bar;
  logic [AB-1:0] addr;
  logic [DW-1:0] din, dout;
  logic [DW-1:0] shadow [2**AB];
  int checks = 0, failures = 0;

  sram #(.ADDR_BITS(AB), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [DW-1:0] got, input logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    cs_bar = 1; we_bar = 1; re_bar = 1; addr = '0; din = '0;
    // fill
    for (int a = 0; a < 2**AB; a++) begin
      @(negedge clk);
      cs_bar = 0; we_bar = 0; addr = AB'(a); din = {$urandom, $urandom};
      shadow[a] = din;
    end
    @(negedge clk); cs_bar = 1; we_bar = 1;
    // write with cs_bar high must not store
    @(negedge clk); cs_bar = 1; we_bar = 0; addr = 5; din = 64'hdead_beef_0000_0001;
    @(negedge clk); we_bar = 1;
    cs_bar = 0; re_bar = 0;
    #1 check("write blocked by cs_bar", dout, shadow[5]);
    @(negedge clk); re_bar = 1;
    // random mix
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      addr = AB'($urandom);
      if ($urandom_range(0, 1)) begin
        cs_bar = 0; we_bar = 0; re_bar = 1; din = {$urandom, $urandom};
        shadow[addr] = din;
      end else begin
        cs_bar = 0; we_bar = 1; re_bar = 0;
        #1 check("read", dout, shadow[addr]);
      end
    end
    @(negedge clk);
    cs_bar = 0; we_bar = 1; re_bar = 1; addr = 3;
    #1 check("no re", dout, '0);
    cs_bar = 1; re_bar = 0;
    #1 check("no cs", dout, '0);
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
