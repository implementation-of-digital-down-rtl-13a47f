// Self-checking test of the CFIR decimating FIR (fir_decimator with the CFIR coefficient set).
// Random 16-bit inputs with a random valid pattern (back-to-back and gapped), then a DC run
// and a worst-case run that must saturate. Then every tap is rewritten through the
// coefficient port with random values and random data is filtered again; finally a reset
// must restore the default set (checked by the DC gain). Each output is compared with a
// convolution computed here with the coefficients currently loaded:
// round(sum_k c[k] x[n-k] / 2^15) clamped to 16 bits, for n = e*DECIM+DECIM-1, and must
// appear one clock after that input; one output per DECIM inputs.
module tb_cfir;
  import ddc_pkg::*;
  localparam int unsigned TAPS  = CFIR_TAPS;
  localparam int unsigned DECIM = CFIR_DECIM;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [15:0] x = 0, y;
  logic coef_we = 0;
  logic [$clog2(TAPS)-1:0] coef_addr = 0;
  logic signed [15:0] coef_wdata = 0;
  int checks = 0, failures = 0, sats = 0, nin = 0, e = 0, writes = 0;
  longint xs [$];
  longint cf [TAPS];
  bit last_fire = 0;

  fir_decimator #(.TAPS(TAPS), .DECIM(DECIM), .COEFS(CFIR_COEFS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(input int n);
    longint acc = 0;
    for (int k = 0; k < TAPS; k++)
      if (n - k >= 0) acc += cf[k] * xs[n - k];
    acc = (acc + 16384) >>> 15;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return acc;
  endfunction

  longint ex;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== last_fire) begin
      failures++;
      if (failures < 4) $display("valid mismatch e=%0d nin=%0d", e, nin);
    end
    if (out_valid) begin
      ex = model(e * DECIM + DECIM - 1);
      checks++;
      if (longint'(y) != ex) begin
        failures++;
        if (failures < 8) $display("e=%0d y=%0d exp=%0d", e, y, ex);
      end
      if (y == 16'sh7fff || y == -16'sh8000) sats++;
      e++;
    end
  end

  task automatic push(input logic signed [15:0] v, input bit vld);
    @(negedge clk);
    in_valid = vld;
    x = v;
    if (vld) xs.push_back(longint'(v));
    @(posedge clk);
    last_fire = vld && ((nin % DECIM) == DECIM - 1);
    if (vld) nin++;
  endtask

  task automatic check_dc(input string what);
    longint s, ev;
    for (int t = 0; t < 2 * TAPS + 20; t++) push(16'sd10000, 1'b1);
    push(0, 1'b0);
    s = 0;
    for (int k = 0; k < TAPS; k++) s += cf[k];
    ev = (10000 * s + 16384) >>> 15;
    if (ev > 32767) ev = 32767;
    if (ev < -32768) ev = -32768;
    checks++;
    if (longint'(y) != ev) begin
      failures++;
      $display("%s: DC %0d", what, y);
    end
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) cf[k] = longint'(CFIR_COEFS[k]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) push(16'($urandom), (t < 1000) || ($urandom % 2));
    // DC gain: sum of the coefficients / 2^15
    check_dc("default set");
    // drive with the coefficient signs at full scale: the sum exceeds 16 bits
    for (int t = 0; t < 4 * TAPS; t++)
      push((CFIR_COEFS[TAPS - 1 - (t % TAPS)] >= 0) ? 16'sh7fff : -16'sh8000, 1'b1);
    push(0, 1'b0);
    checks++;
    if (sats == 0) begin failures++; $display("saturation never happened"); end
    // rewrite every tap at run time (no samples in flight), then filter random data
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      coef_we = 1;
      coef_addr = ($bits(coef_addr))'(k);
      coef_wdata = 16'($urandom) >>> 3;
      cf[k] = longint'(coef_wdata);
      writes++;
    end
    @(negedge clk);
    coef_we = 0;
    for (int t = 0; t < 1000; t++) push(16'($urandom), ($urandom % 3) != 0);
    check_dc("rewritten set");
    checks++;
    if (e != nin / DECIM) begin failures++; $display("outputs %0d inputs %0d", e, nin); end
    // reset restores the default set
    @(negedge clk);
    rst_n = 0;
    xs.delete(); nin = 0; e = 0; last_fire = 0;
    for (int k = 0; k < TAPS; k++) cf[k] = longint'(CFIR_COEFS[k]);
    @(negedge clk);
    rst_n = 1;
    check_dc("after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
