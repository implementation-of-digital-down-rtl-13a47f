// Self-checking test of the ADC capture register: every 14-bit offset-binary code must come
// out one clock later as code - 8192 in two's complement; a second instance with
// OFFSET_BINARY = 0 must pass codes unchanged; samples without adc_valid must be held.
module tb_adc_capture;
  logic clk = 0, rst_n = 0, adc_valid = 0;
  logic [13:0] adc_data = 0;
  logic signed [13:0] x, x2;
  logic xv, xv2;
  int checks = 0, failures = 0;
  int held;

  adc_capture dut (.clk, .rst_n, .adc_valid, .adc_data, .x, .x_valid(xv));
  adc_capture #(.OFFSET_BINARY(1'b0)) dut2 (.clk, .rst_n, .adc_valid, .adc_data, .x(x2),
                                            .x_valid(xv2));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 16384; c++) begin
      @(negedge clk);
      adc_valid = 1;
      adc_data = 14'(c);
      @(negedge clk);
      checks += 3;
      if (!xv || !xv2) failures++;
      if (int'(x) != c - 8192) begin
        failures++;
        if (failures < 8) $display("code %0d -> %0d", c, x);
      end
      if (x2 !== $signed(14'(c))) failures++;
    end
    held = int'(x);
    adc_valid = 0;
    adc_data = 14'd5;
    @(negedge clk);
    checks += 2;
    if (xv) failures++;
    if (int'(x) != held) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
