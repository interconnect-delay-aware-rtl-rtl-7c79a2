// sram: the shared SRAM of the bus system (2 Mbyte at the default size),
// written as a memory array.
//
// The pins follow an asynchronous SRAM with active-low chip select, write
// enable and read enable. A read is combinational: while cs_bar and re_bar
// are low, dout shows the word at addr (the real part needs its 8 ns access
// time for this; the MBI in front of it budgets that time in whole clocks).
// A write takes place at the rising clock edge while cs_bar and we_bar are
// low. The bidirectional data bus of the real part is split into din and
// dout, and dout is zero when no read is enabled. Words are DATA_W bits wide;
// ADDR_BITS = 18 gives 2^18 words of 64 bits = 2 Mbyte. The size is the
// shared SRAM's; the word-wide organisation is this design's choice.
module sram #(
  parameter int unsigned ADDR_BITS = 18,
  parameter int unsigned DATA_W    = ggba_pkg::DATA_W
) (
  input  logic                 clk,
  input  logic                 cs_bar,
  input  logic                 we_bar,
  input  logic                 re_bar,
  input  logic [ADDR_BITS-1:0] addr,
  input  logic [DATA_W-1:0]    din,
  output logic [DATA_W-1:0]    dout
);

  logic [DATA_W-1:0] mem [2**ADDR_BITS];

  always_ff @(posedge clk) begin
    if (!cs_bar && !we_bar) mem[addr] <= din;
  end

  always_comb begin
    if (!cs_bar && !re_bar) dout = mem[addr];
    else                    dout = '0;
  end

endmodule
