// Self-checking test of the pulse compressor (64-sample reference).
// Part 1: a random reference is written through the port and random complex inputs are fed
// with a random valid pattern; re/im must equal the complex correlation
// sum_m s[n-63+m] * conj(r[m]) computed here, and mag its modulus (within 2^-14 + 4 LSB).
// Part 2: the reference is rewritten with a linear FM chirp and the input is the same chirp,
// scaled, starting at sample n0 inside zeros; the magnitude must peak at n0 + 63 and the
// peak must exceed every output outside the +-4 sample main lobe by 3x. Latencies (counting
// the edge that takes the input): re/im 2 clocks, mag 20 clocks.
module tb_pulse_compression;
  localparam int unsigned L = 64, ITER = 16;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, in_valid = 0, ref_we = 0;
  logic [5:0] ref_addr = 0;
  logic signed [15:0] ref_i = 0, ref_q = 0, in_i = 0, in_q = 0;
  logic signed [38:0] re, im;
  logic ri_valid, out_valid;
  logic [38:0] mag;
  int checks = 0, failures = 0;
  longint ri [L], rq [L];
  longint si [$], sq [$];
  int n_ri = 0, n_mag = 0, reloads = 0;
  bit part2 = 0;
  int cyc = 0;
  int tin [$];
  longint mags [$];

  pulse_compression #(.REF_LEN(L), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void corr(input int n, output longint cr, output longint ci);
    cr = 0; ci = 0;
    for (int m = 0; m < L; m++) begin
      int idx = n - (L - 1) + m;
      if (idx >= 0) begin
        cr += si[idx] * ri[m] + sq[idx] * rq[m];
        ci += sq[idx] * ri[m] - si[idx] * rq[m];
      end
    end
  endfunction

  longint er, ei;
  real em, d;
  longint mq_r [$], mq_i [$];
  always @(negedge clk) if (rst_n) begin
    if (ri_valid) begin
      corr(n_ri, er, ei);
      checks += 2;
      if (longint'(re) != er || longint'(im) != ei) begin
        failures++;
        if (failures < 8) $display("n=%0d re=%0d im=%0d exp %0d %0d", n_ri, re, im, er, ei);
      end
      if (cyc - tin.pop_front() != 1) begin failures++; if (failures < 8) $display("ri latency"); end
      mq_r.push_back(er);
      mq_i.push_back(ei);
      n_ri++;
    end
    if (out_valid) begin
      er = mq_r.pop_front();
      ei = mq_i.pop_front();
      em = $sqrt(real'(er) * real'(er) + real'(ei) * real'(ei));
      d = real'(mag) - em;
      if (d < 0) d = -d;
      checks++;
      if (d > em / 16384.0 + 4.0) begin
        failures++;
        if (failures < 8) $display("mag %0d exp %f", mag, em);
      end
      if (part2) mags.push_back(longint'(mag));
      n_mag++;
    end
  end

  task automatic write_ref(input bit chirp);
    real ph;
    for (int m = 0; m < L; m++) begin
      @(negedge clk);
      ref_we = 1;
      ref_addr = 6'(m);
      if (chirp) begin
        // baseband LFM sweeping -1.25 .. +1.25 MHz over 64 samples at 5 MSps
        ph = PI * (-0.25 * m + 0.25 * m * m / 64.0);
        ref_i = 16'($rtoi(16000.0 * $cos(ph)));
        ref_q = 16'($rtoi(16000.0 * $sin(ph)));
      end else begin
        ref_i = 16'($urandom);
        ref_q = 16'($urandom);
      end
      ri[m] = longint'(ref_i);
      rq[m] = longint'(ref_q);
    end
    @(negedge clk);
    ref_we = 0;
    reloads++;
  endtask

  task automatic feed(input logic signed [15:0] a, input logic signed [15:0] b, input bit v);
    @(negedge clk);
    #1;
    in_valid = v;
    in_i = a;
    in_q = b;
    if (v) begin
      si.push_back(longint'(a));
      sq.push_back(longint'(b));
      tin.push_back(cyc + 1);
    end
  endtask

  int pk;
  longint pv;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    write_ref(1'b0);
    for (int t = 0; t < 1500; t++) feed(16'($urandom), 16'($urandom), (t < 300) || ($urandom % 2));
    feed(0, 0, 1'b0);
    repeat (ITER + 6) @(negedge clk);
    // part 2: chirp reference and echo
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    si.delete(); sq.delete(); mq_r.delete(); mq_i.delete(); tin.delete();
    n_ri = 0;
    part2 = 1;
    write_ref(1'b1);
    for (int t = 0; t < 300; t++) begin
      if (t >= 100 && t < 100 + L) feed(16'(ri[t - 100] / 2), 16'(rq[t - 100] / 2), 1'b1);
      else feed(0, 0, 1'b1);
    end
    feed(0, 0, 1'b0);
    repeat (ITER + 6) @(negedge clk);
    pk = 0; pv = 0;
    foreach (mags[i]) if (mags[i] > pv) begin pv = mags[i]; pk = i; end
    checks++;
    if (pk != 100 + L - 1) begin failures++; $display("peak at %0d", pk); end
    foreach (mags[i]) if (i < pk - 4 || i > pk + 4) begin   // outside the main lobe
      checks++;
      if (mags[i] * 3 > pv) begin
        failures++;
        if (failures < 8) $display("sidelobe %0d at %0d vs peak %0d", mags[i], i, pv);
      end
    end
    checks++;
    if (reloads != 2 || mags.size() != 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
