// Self-checking test of the pulse-compression FIR: random 64 coefficients (changed twice
// during the run, as a reference reload would), random 16-bit inputs with a random valid
// pattern; each output must equal sum_k coef[k] x[n-k] exactly and follow its input by one
// clock.
module tb_pc_fir;
  localparam int unsigned TAPS = 64;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [15:0] x = 0;
  logic signed [15:0] coef [TAPS];
  logic signed [37:0] y;
  int checks = 0, failures = 0, n = 0;
  longint xs [$];
  longint ex;
  bit vld_d = 0;

  pc_fir #(.TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(input int idx);
    longint acc = 0;
    for (int k = 0; k < TAPS; k++)
      if (idx - k >= 0) acc += longint'(coef[k]) * xs[idx - k];
    return acc;
  endfunction

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== vld_d) failures++;
    if (out_valid) begin
      ex = model(n - 1);
      checks++;
      if (longint'(y) != ex) begin
        failures++;
        if (failures < 8) $display("n=%0d y=%0d exp=%0d", n - 1, y, ex);
      end
    end
  end

  initial begin
    for (int k = 0; k < TAPS; k++) coef[k] = 16'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      #1;
      if (t == 1000 || t == 2000)
        for (int k = 0; k < TAPS; k++) coef[k] = (t == 2000) ? -16'sh8000 : 16'($urandom);
      in_valid = (t < 500) || ($urandom % 2);
      x = (t >= 2000 && t < 2200) ? -16'sh8000 : 16'($urandom);
      if (in_valid) xs.push_back(longint'(x));
      @(posedge clk);
      vld_d = in_valid;
      if (in_valid) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
