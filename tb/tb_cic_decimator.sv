// Self-checking test of the CIC decimator. Two instances: the default (N = 8, R = 2, M = 1,
// 28-bit in, 16-bit out) and a second shape (N = 3, R = 4, M = 2) to exercise the differential
// delay. Inputs are random full-scale values with a random valid pattern. The expected output
// is computed here as a direct convolution with the CIC impulse response (N-fold convolution
// of R*M ones), y[e] = sum_j h[j] x[e*R + R - 1 - N - j], arithmetically shifted right by
// W - OUT_W; this also checks that integrator wrap-around cancels. Also checks one output per
// R valid inputs, one clock after the R-th input, and the DC gain.
module tb_cic_decimator;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [27:0] x = 0;
  logic signed [15:0] y_a, y_b;
  logic va, vb;
  int checks = 0, failures = 0;

  cic_decimator dut_a (.clk, .rst_n, .in_valid, .x, .y(y_a), .out_valid(va));
  cic_decimator #(.IN_W(28), .OUT_W(16), .N(3), .R(4), .M(2)) dut_b (
    .clk, .rst_n, .in_valid, .x, .y(y_b), .out_valid(vb));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xs [$];
  longint ha [$], hb [$];

  function automatic void make_h(ref longint h [$], input int n, input int rm);
    longint t [$];
    h = '{1};
    for (int s = 0; s < n; s++) begin
      t = {};
      for (int i = 0; i < h.size() + rm - 1; i++) t.push_back(0);
      for (int i = 0; i < h.size(); i++)
        for (int j = 0; j < rm; j++) t[i+j] += h[i];
      h = t;
    end
  endfunction

  function automatic longint expect_y(ref longint h [$], input int e, input int n, input int r,
                                      input int shift);
    longint acc = 0;
    int base = e * r + r - 1 - n;
    for (int j = 0; j < h.size(); j++)
      if (base - j >= 0) acc += h[j] * xs[base - j];
    return acc >>> shift;
  endfunction

  int ea = 0, eb = 0, nin = 0;
  bit dc_mode = 0;

  // compare each output as it appears
  always @(negedge clk) if (rst_n) begin
    if (va) begin
      checks++;
      if (longint'(y_a) != expect_y(ha, ea, 8, 2, 20)) begin
        failures++;
        if (failures < 8) $display("A e=%0d y=%0d exp=%0d", ea, y_a, expect_y(ha, ea, 8, 2, 20));
      end
      // output rate: the e-th output needs the (e*2+2)-th input
      checks++;
      if (nin != ea * 2 + 2) begin failures++; if (failures < 8) $display("rate e=%0d nin=%0d", ea, nin); end
      ea++;
    end
    if (vb) begin
      checks++;
      // W = 28 + 3*3 = 37, OUT_W = 16: shift 21
      if (longint'(y_b) != expect_y(hb, eb, 3, 4, 21)) begin
        failures++;
        if (failures < 8) $display("B e=%0d y=%0d exp=%0d", eb, y_b, expect_y(hb, eb, 3, 4, 21));
      end
      eb++;
    end
  end

  initial begin
    make_h(ha, 8, 2);
    make_h(hb, 3, 8);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      in_valid = (t < 3000) ? 1'b1 : (($urandom % 3) != 0);
      if (t > 5000) begin
        x = 28'sd100000000;   // DC, near full scale
        dc_mode = 1;
      end else
        x = 28'($urandom);
      if (in_valid) begin
        xs.push_back(longint'(x));
      end
      @(posedge clk);
      if (in_valid) nin++;
    end
    @(negedge clk);
    // DC gain of the default filter: (R*M)^N = 256, output keeps top 16 of 36 bits
    checks++;
    if (y_a != 16'(100000000 >>> 12)) begin failures++; $display("DC %0d", y_a); end
    checks++;
    if (ea != nin / 2 || ea < 2400) begin failures++; $display("count %0d of %0d", ea, nin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
