// Self-checking test of the NCO: at FTW = 0x4000 (f_clk/4, 10 MHz at 40 MSps) the outputs
// must be the exact quarter-rate sequence cos 8191,0,-8191,0 / sin 0,8191,0,-8191; at random
// tuning words the k-th valid output must match 8191*cos/sin(2*pi*trunc(k*FTW)/1024) within
// 1 LSB; out_valid must follow en by one clock, and wrap must pulse FTW*T/2^16 times.
module tb_nco;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] ftw = 16'h4000;
  logic signed [13:0] cos_o, sin_o;
  logic out_valid, wrap;
  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  int checks = 0, failures = 0, k, wraps;
  longint ph;
  real a;
  logic en_d;

  nco dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) en_d <= en;

  initial begin
    int exp_c [4] = '{8191, 0, -8191, 0};
    int exp_s [4] = '{0, 8191, 0, -8191};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1; k = 0; wraps = 0;
    while (k < 400) begin
      @(negedge clk);
      if (wrap) wraps++;
      checks++;
      if (out_valid !== en_d) failures++;
      if (out_valid) begin
        checks++;
        if (cos_o !== 14'(exp_c[k % 4]) || sin_o !== 14'(exp_s[k % 4])) begin
          failures++;
          if (failures < 8) $display("k=%0d cos %0d sin %0d", k, cos_o, sin_o);
        end
        k++;
      end
    end
    checks++;
    if (wraps < 99 || wraps > 101) begin failures++; $display("wraps %0d", wraps); end
    // random tuning words, random enable; reset the phase between runs
    for (int run = 0; run < 6; run++) begin
      @(negedge clk);
      en = 0; rst_n = 0; ftw = 16'($urandom);
      @(negedge clk);
      rst_n = 1; k = 0; ph = 0;
      while (k < 300) begin
        en = ($urandom % 3) != 0;
        @(negedge clk);
        checks++;
        if (out_valid !== en_d) failures++;
        if (out_valid) begin
          a = 2.0 * PI * real'((ph % 65536) >> 6) / 1024.0;
          checks++;
          if (fabs(real'(cos_o) - 8191.0 * $cos(a)) > 1.0 ||
              fabs(real'(sin_o) - 8191.0 * $sin(a)) > 1.0) begin
            failures++;
            if (failures < 8) $display("ftw %h k=%0d cos %0d sin %0d", ftw, k, cos_o, sin_o);
          end
          ph += ftw;
          k++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
