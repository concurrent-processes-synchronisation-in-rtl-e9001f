// Testbench of synch_state.
//
// Drives random fork (put), join (take) and clear requests that obey the
// rules of a one-token synch state (a join only when a token is there, a
// fork only when it is empty or consumed in the same cycle) and compares
// full with a token counter kept in the testbench. Also checks the timing:
// a token put at one edge is visible right after that edge, so a join can
// fire one clock after its fork at the earliest.
module synch_state_tb;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic clr = 1'b0, put = 1'b0, take = 1'b0;
  logic full;
  int tokens = 0;
  int checks = 0, failures = 0;
  int n_put = 0, n_take = 0, n_both = 0, n_clr = 0;

  always #5 clk = ~clk;

  synch_state dut (.clk, .rst, .clr, .put, .take, .full);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!full, "not empty after reset");
    // directed: fork, then join one clock later
    put = 1'b1;
    @(negedge clk);
    put = 1'b0;
    check(full, "token not present one clock after the fork");
    take = 1'b1;
    @(negedge clk);
    take = 1'b0;
    check(!full, "token not consumed by the join");
    // random
    for (int i = 0; i < 2000; i++) begin
      clr  = ($urandom_range(0, 19) == 0);
      take = tokens > 0 && $urandom_range(0, 2) == 0;
      put  = (tokens == 0 || take) && $urandom_range(0, 2) == 0;
      @(negedge clk);
      if (clr) begin
        tokens = 0; n_clr++;
      end else begin
        tokens = tokens - int'(take) + int'(put);
        if (put) n_put++;
        if (take) n_take++;
        if (put && take) n_both++;
      end
      check(full == (tokens > 0), $sformatf("full=%0d with %0d tokens", full, tokens));
    end
    clr = 1'b0; put = 1'b0; take = 1'b0;
    check(n_put > 0 && n_take > 0 && n_both > 0 && n_clr > 0, "a case never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
