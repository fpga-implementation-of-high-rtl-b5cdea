// tb_clk_counter: self-checking testbench for clk_counter.
//
// Loads a range of values (including 0 and the largest) and checks that
// `done` stays low for exactly the loaded number of cycles and then stays
// high, that a new load restarts the count, and that reset clears it.  The
// expected cycle counts come from a reference count kept in the testbench.
module tb_clk_counter;

  localparam int W = 8;

  logic         clk = 1'b0;
  logic         reset = 1'b1;
  logic         load = 1'b0;
  logic [W-1:0] load_val = '0;
  logic         done;

  int checks = 0;
  int failures = 0;

  clk_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Load v, then count the cycles until done rises.
  task automatic run_one(input int v);
    int n;
    @(negedge clk);
    load = 1'b1;
    load_val = W'(v);
    @(negedge clk);
    load = 1'b0;
    n = 0;
    while (!done && n < 400) begin
      n++;
      @(negedge clk);
    end
    check(n == v, $sformatf("load %0d: done after %0d cycles", v, n));
    repeat (3) @(negedge clk);
    check(done, $sformatf("load %0d: done does not stay high", v));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 1'b0;
    check(done, "done after reset");
    run_one(0);
    run_one(1);
    run_one(2);
    run_one(9);
    run_one(255);
    for (int k = 0; k < 10; k++) run_one(int'($urandom_range(0, 40)));
    // reload while counting restarts the count
    @(negedge clk);
    load = 1'b1; load_val = 8'd20;
    @(negedge clk);
    load_val = 8'd3;
    @(negedge clk);
    load = 1'b0;
    repeat (2) @(negedge clk);
    check(!done, "reload: done early");
    @(negedge clk);
    check(done, "reload: done late");
    // reset clears the count
    @(negedge clk);
    load = 1'b1; load_val = 8'd50;
    @(negedge clk);
    load = 1'b0;
    reset = 1'b1;
    #1;
    check(done, "asynchronous reset clears count");
    reset = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
