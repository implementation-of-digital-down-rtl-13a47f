// Self-checking test of the CORDIC magnitude: random vectors in all four quadrants, at full
// and at small scale, plus the axes and the extreme corners. Each result must be within
// 2^-14 of sqrt(x^2 + y^2) plus 4 LSB, and appear ITER + 2 clocks after its input (checked
// by tagging the inputs).
module tb_cordic_abs;
  localparam int unsigned W = 39, ITER = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] x = 0, y = 0;
  logic [W-1:0] mag;
  int checks = 0, failures = 0;
  real exq [$];
  int cyc = 0;
  int tq [$];

  cordic_abs #(.W(W), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real e, err;
  int t0;
  always @(negedge clk) if (rst_n && out_valid) begin
    e = exq.pop_front();
    t0 = tq.pop_front();
    err = real'(mag) - e;
    if (err < 0) err = -err;
    checks += 2;
    if (err > e / 16384.0 + 4.0) begin
      failures++;
      if (failures < 8) $display("mag %0d expected %f", mag, e);
    end
    if (cyc - t0 + 1 != ITER + 2) begin   // counting the edge that takes the input
      failures++;
      if (failures < 8) $display("latency %0d", cyc - t0);
    end
  end

  task automatic put(input longint a, input longint b);
    @(negedge clk);
    in_valid = 1;
    x = W'(a);
    y = W'(b);
    exq.push_back($sqrt(real'(a) * real'(a) + real'(b) * real'(b)));
    tq.push_back(cyc + 1);
  endtask

  longint big;
  initial begin
    big = (longint'(1) << (W - 1)) - 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    put(big, 0); put(-big, 0); put(0, big); put(0, -big);
    put(big, big); put(-big - 1, -big - 1); put(0, 0); put(1000, -1000);
    for (int i = 0; i < 4000; i++) begin
      if (i % 2) put(longint'($signed(W'({$urandom, $urandom}))),
                     longint'($signed(W'({$urandom, $urandom}))));
      else       put(longint'($signed(20'($urandom))), longint'($signed(20'($urandom))));
    end
    @(negedge clk);
    in_valid = 0;
    repeat (ITER + 5) @(negedge clk);
    checks++;
    if (exq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
