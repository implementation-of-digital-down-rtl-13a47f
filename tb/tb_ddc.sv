// Self-checking test of the digital down converter at its default sizes (40 MSps in, 5 MSps
// out). Tones of known frequency are fed as 14-bit samples; for each, after the filters
// have settled, every complex output is checked against what an ideal DDC gives:
//  - in-band tones (LO +0.5, -0.8 MHz, and +0.3 MHz with the LO moved to 12 MHz) must come
//    out with magnitude A within 4 % (unity pass-band gain) and rotate by 2*pi*df/5 MHz per
//    output within 3 degrees (which also checks the sign of Q, i.e. mixing by e^{-jwt});
//  - an out-of-band tone (LO + 3.5 MHz, which would alias to -1.5 MHz) must be below A/100;
//  - after the PFIR has been reprogrammed through the bandwidth port to a single centre tap
//    (no band limiting of its own), the same tone must get through above A/10, while an
//    in-band tone still meets the in-band checks.
// Rates: exactly one output per 8 inputs, NCO wraps every 4 inputs at 10 MHz, CIC output
// every 2 and CFIR output every 4 inputs.
module tb_ddc;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 40.0e6;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [13:0] x = 0;
  logic [15:0] ftw = 16'h4000;
  logic signed [15:0] out_i, out_q;
  logic out_valid, nco_wrap, cic_valid, cfir_valid;
  logic bw_we = 0, bw_sel = 0;
  logic [5:0] bw_addr = 0;
  logic signed [15:0] bw_data = 0;
  int checks = 0, failures = 0;
  int n_in, n_out, n_wrap, n_cic, n_cfir;

  ddc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid)   n_in++;
    if (out_valid)  n_out++;
    if (nco_wrap)   n_wrap++;
    if (cic_valid)  n_cic++;
    if (cfir_valid) n_cfir++;
  end

  function automatic real wrap_pi(input real a);
    while (a > PI) a -= 2.0 * PI;
    while (a < -PI) a += 2.0 * PI;
    return a;
  endfunction

  // Run one tone: f_in (Hz), LO tuning word, amplitude; returns nothing, counts checks.
  task automatic run_tone(input real f_in, input logic [15:0] tw, input real f_lo,
                          input real amp, input bit in_band, input bit wide = 1'b0);
    real ph_prev, ph, mg, dph, exp_dph, maxmag;
    int k;
    @(negedge clk);
    rst_n = 0;
    ftw = tw;
    n_in = 0; n_out = 0; n_wrap = 0; n_cic = 0; n_cfir = 0;
    @(negedge clk);
    rst_n = 1;
    if (wide) begin
      // PFIR -> single centre tap of 32767: a pure delay of 20 samples
      for (int t = 0; t < 41; t++) begin
        @(negedge clk);
        bw_we = 1;
        bw_sel = 1;
        bw_addr = 6'(t);
        bw_data = (t == 20) ? 16'sd32767 : 16'sd0;
      end
      @(negedge clk);
      bw_we = 0;
    end
    n_in = 0; n_out = 0; n_wrap = 0; n_cic = 0; n_cfir = 0;
    k = 0;
    maxmag = 0.0;
    exp_dph = wrap_pi(2.0 * PI * (f_in - f_lo) * 8.0 / FS);
    for (int n = 0; n < 8 * 200; n++) begin
      @(negedge clk);
      in_valid = 1;
      x = 14'($rtoi($floor(amp * $cos(2.0 * PI * f_in * n / FS) + 0.5)));
      @(posedge clk);
      #1;
      if (out_valid) begin
        ph = $atan2(real'(out_q), real'(out_i));
        mg = $sqrt(real'(out_i) * real'(out_i) + real'(out_q) * real'(out_q));
        if (k >= 40) begin
          if (in_band) begin
            dph = wrap_pi(ph - ph_prev);
            checks += 2;
            if (mg < 0.96 * amp || mg > 1.04 * amp) begin
              failures++;
              if (failures < 8) $display("f=%f k=%0d |y|=%f", f_in, k, mg);
            end
            if (dph - exp_dph > 3.0 * PI / 180.0 || exp_dph - dph > 3.0 * PI / 180.0) begin
              failures++;
              if (failures < 8) $display("f=%f k=%0d dphi=%f exp %f", f_in, k, dph, exp_dph);
            end
          end else if (wide) begin
            checks++;
            if (mg < amp / 10.0) begin
              failures++;
              if (failures < 8) $display("f=%f k=%0d wide band, |y|=%f", f_in, k, mg);
            end
          end else begin
            checks++;
            if (mg > amp / 100.0) begin
              failures++;
              if (failures < 8) $display("f=%f k=%0d leak |y|=%f", f_in, k, mg);
            end
          end
        end
        ph_prev = ph;
        k++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks += 3;
    if (n_out != n_in / 8) begin failures++; $display("outputs %0d for %0d inputs", n_out, n_in); end
    if (n_cic != n_in / 2 || n_cfir != n_in / 4) begin
      failures++;
      $display("cic %0d cfir %0d for %0d inputs", n_cic, n_cfir, n_in);
    end
    if (tw == 16'h4000 && !wide && n_wrap != n_in / 4) begin
      failures++;
      $display("wraps %0d", n_wrap);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run_tone(10.5e6, 16'h4000, 10.0e6, 7000.0, 1'b1);
    run_tone(9.2e6,  16'h4000, 10.0e6, 7000.0, 1'b1);
    run_tone(13.5e6, 16'h4000, 10.0e6, 7000.0, 1'b0);
    // LO moved to 12 MHz: FTW = round(2^16 * 12/40) = 19661 -> 12.0001 MHz
    run_tone(12.3e6, 16'd19661, 40.0e6 * 19661.0 / 65536.0, 7000.0, 1'b1);
    // bandwidth reprogrammed: out-of-band tone now passes, in-band tone unchanged
    run_tone(13.5e6, 16'h4000, 10.0e6, 7000.0, 1'b0, 1'b1);
    run_tone(10.5e6, 16'h4000, 10.0e6, 7000.0, 1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
