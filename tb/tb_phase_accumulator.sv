// Self-checking test of the NCO phase accumulator: random tuning words and enable pattern,
// the phase compared each clock with a modulo-2^16 sum kept here, the wrap flag with the
// carry of that sum, and the one-clock update latency.
module tb_phase_accumulator;
  localparam int unsigned PW = 16;
  logic clk = 0, rst_n = 0, en = 0, wrap;
  logic [PW-1:0] ftw = '0, phase;
  int checks = 0, failures = 0, wraps = 0;
  longint model = 0;
  logic exp_wrap;

  phase_accumulator #(.PHASE_W(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    if (phase !== '0) failures++;
    checks++;
    for (int t = 0; t < 5000; t++) begin
      if (t % 500 == 0) ftw = PW'($urandom);
      en = ($urandom % 4) != 0;
      @(posedge clk);
      exp_wrap = 1'b0;
      if (en) begin
        exp_wrap = (model + ftw) >= (64'd1 << PW);
        model = (model + ftw) % (64'd1 << PW);
      end
      @(negedge clk);
      checks += 2;
      if (phase !== PW'(model)) begin
        failures++;
        if (failures < 5) $display("t=%0d phase %h expected %h", t, phase, PW'(model));
      end
      if (wrap !== exp_wrap) failures++;
    end
    // frequency: FTW = 0x4000 wraps once every 4 clocks
    ftw = 16'h4000; en = 1;
    @(negedge clk);
    wraps = 0; count_wraps = 1;
    repeat (400) @(negedge clk);
    count_wraps = 0;
    checks++;
    if (wraps < 99 || wraps > 101) begin
      failures++;
      $display("wraps %0d, expected 100", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit count_wraps = 0;
  always @(negedge clk) if (count_wraps && wrap) wraps++;
endmodule
