// pipeline_pes: testbench model of the four PEs of a bus_system running a
// four-stage software pipeline through the shared SRAM (stage 1 generates
// each block, stages 2-4 read the previous stage's block, change every word
// and write their own). It drives the PE-side pins of one bus_system, checks
// every word it reads, and reports when all blocks are through and how many
// clocks that took. Behavioural only; not synthesizable.
module pipeline_pes #(
  parameter int unsigned WORDS  = 16,
  parameter int unsigned BLOCKS = 4
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  output logic [3:0]                              pe_ts_bar,
  output logic [3:0]                              pe_we,
  output logic [3:0][ggba_pkg::ADDR_W-1:0]        pe_addr,
  output logic [3:0][ggba_pkg::DATA_W-1:0]        pe_wdata,
  input  logic [3:0]                              pe_ta_bar,
  input  logic [3:0][ggba_pkg::DATA_W-1:0]        pe_rdata,
  output logic                                    done,
  output int                                      errors,
  output int                                      reads,
  output longint                                  cycles
);
  import ggba_pkg::*;

  int produced [4];

  function automatic logic [ADDR_W-1:0] buf_addr(int s, int j, int w);
    return ADDR_W'((s << 12) | (j << 7) | (w << 3));
  endfunction
  function automatic logic [DATA_W-1:0] stage_word(int s, int j, int w);
    logic [DATA_W-1:0] v;
    v = {32'(j * 1000 + w), 32'h5EED_0000 ^ 32'(w * 3)};
    for (int k = 1; k <= s; k++) v = (v ^ {8{8'(k * 29)}}) + DATA_W'(k);
    return v;
  endfunction

  task automatic xfer(input int p, input logic we, input logic [ADDR_W-1:0] a,
                      input logic [DATA_W-1:0] d, output logic [DATA_W-1:0] q);
    @(negedge clk);
    pe_ts_bar[p] = 0; pe_we[p] = we; pe_addr[p] = a; pe_wdata[p] = d;
    @(negedge clk);
    pe_ts_bar[p] = 1;
    while (pe_ta_bar[p]) @(negedge clk);
    q = pe_rdata[p];
  endtask

  task automatic run(input int p);
    logic [DATA_W-1:0] q, v;
    for (int j = 0; j < int'(BLOCKS); j++) begin
      if (p > 0) while (produced[p - 1] <= j) @(negedge clk);
      for (int w = 0; w < int'(WORDS); w++) begin
        if (p > 0) begin
          xfer(p, 1'b0, buf_addr(p - 1, j, w), '0, q);
          reads++;
          if (q != stage_word(p - 1, j, w)) errors++;
          v = (q ^ {8{8'(p * 29)}}) + DATA_W'(p);
        end else v = stage_word(0, j, w);
        xfer(p, 1'b1, buf_addr(p, j, w), v, q);
      end
      produced[p]++;
    end
  endtask

  always @(posedge clk) if (rst_n && !done) cycles++;

  initial begin
    pe_ts_bar = '1; pe_we = '0; pe_addr = '0; pe_wdata = '0;
    done = 0; errors = 0; reads = 0; cycles = 0;
    for (int p = 0; p < 4; p++) produced[p] = 0;
    wait (rst_n);
    fork
      run(0); run(1); run(2); run(3);
    join
    done = 1;
  end
endmodule
