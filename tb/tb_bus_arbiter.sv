// tb_bus_arbiter: drives random requests into the arbiter and checks it
// against a reference round-robin model: one-hot grant, grant held until
// done, and the next grant going to the first requester after the last one.
module tb_bus_arbiter;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req;
  logic done;
  logic [N-1:0] gnt;
  logic [1:0] gnt_id;
  logic gnt_valid;
  int checks = 0, failures = 0;
  int grants [N];
  int waits = 0;

  bus_arbiter #(.NUM_PE(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // reference model state
  logic ref_valid;
  int   ref_id, ref_last;
  int   hold;

  initial begin
    req = '0; done = 0;
    ref_valid = 0; ref_id = 0; ref_last = N - 1; hold = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // compare with the model
      check("valid", gnt_valid, ref_valid);
      if (ref_valid) begin
        check("id", gnt_id, ref_id);
        check("onehot", gnt, 1 << ref_id);
      end else check("nogrant", gnt, 0);
      // new stimulus: requesters keep requesting until served
      for (int k = 0; k < N; k++)
        if (!req[k] && $urandom_range(0, 3) == 0) req[k] = 1;
      done = 0;
      if (ref_valid) begin
        hold++;
        if (hold >= 1 + $urandom_range(0, 4)) begin
          done = 1;
          req[ref_id] = 0;
        end
      end
      if (ref_valid && |(req & ~(1 << ref_id))) waits++;
      // model update for the coming edge
      if (ref_valid) begin
        if (done) ref_valid = 0;
      end else if (|req) begin
        for (int i = 1; i <= N; i++) begin
          int idx;
          idx = (ref_last + i) % N;
          if (req[idx]) begin
            ref_id = idx; ref_last = idx; ref_valid = 1; hold = 0;
            grants[idx]++;
            break;
          end
        end
      end
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (grants[k] == 0) begin failures++; $display("FAIL master %0d never granted", k); end
    end
    checks++;
    if (waits == 0) begin failures++; $display("FAIL no contention seen"); end
    $display("grants %0d %0d %0d %0d, contention cycles %0d", grants[0], grants[1], grants[2], grants[3], waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
