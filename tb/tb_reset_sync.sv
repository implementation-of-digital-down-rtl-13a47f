// Self-checking test of the reset generator: the output must go low at once (without a
// clock edge) when reset rises or locked falls, and must rise exactly on the second clock
// edge after both have been released.
module tb_reset_sync;
  logic clk = 0, reset = 1, locked = 0, glbl_reset_b;
  int checks = 0, failures = 0;

  reset_sync dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic release_check;
    @(negedge clk);
    checks++;
    if (glbl_reset_b !== 1'b0) failures++;   // one edge seen: still low
    @(negedge clk);
    checks++;
    if (glbl_reset_b !== 1'b1) begin failures++; $display("not released after 2 edges"); end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    checks++;
    if (glbl_reset_b !== 1'b0) failures++;
    reset = 0;                 // still not locked
    repeat (4) @(negedge clk);
    checks++;
    if (glbl_reset_b !== 1'b0) failures++;
    locked = 1;
    release_check();
    repeat (3) @(negedge clk);
    #2 locked = 0;             // loss of lock: immediate assertion
    #1;
    checks++;
    if (glbl_reset_b !== 1'b0) failures++;
    @(negedge clk);
    locked = 1;
    release_check();
    #2 reset = 1;
    #1;
    checks++;
    if (glbl_reset_b !== 1'b0) failures++;
    @(negedge clk);
    reset = 0;
    release_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
