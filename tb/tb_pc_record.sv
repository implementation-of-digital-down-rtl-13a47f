// Range-record test of the receiver core: 1024 range cells, every parameter at its default.
//
// After reset and lock, the up-chirp reference (64 samples, -1.25 .. +1.25 MHz at 5 MSps) is
// written, then one receive window of 1024 DDC outputs (8192 ADC samples at 40 MSps) is
// streamed in. It holds four echoes of that chirp on a 10 MHz carrier, in low-level noise:
//   cell 100, amplitude 7000   an isolated strong target;
//   cell 400, amplitude 4000   an isolated weak target;
//   cells 700 and 712, 3800    two targets 12 cells apart whose echoes overlap by 52 samples.
// The echo starting at cell c must compress to a peak at cell c + 13 + 63 + 1 (DDC group delay,
// reference length - 1, one output of alignment), within 2 cells. Checks:
//   * every pc_re/pc_im equals the exact correlation of the DDC outputs on the ports with the
//     reference, and pc_mag its modulus within 2^-14 + 4 LSB;
//   * the detections, local maxima (largest within +-3 cells) above half the weakest expected
//     peak, are exactly the four targets, the overlapping pair included;
//   * each isolated peak is 0.97 * 64 * A * 16000 within 15 % (0.97: the DDC pass-band gain
//     over the chirp), each peak of the pair within 25 % (the other's sidelobes add);
//   * the window of 8192 ADC samples yields exactly 1024 DDC outputs.
// Counted mechanisms: cells received, detections, overlapping-pair resolution.
module tb_pc_record;
  localparam real PI = 3.14159265358979323846;
  localparam int L = 64;
  localparam int NCELL = 1024;
  localparam int NT = 4;
  localparam int DELAY = 13 + L - 1 + 1;
  logic clk_40mhz = 0, reset = 1, locked = 0;
  logic [13:0] adc_data_input = 14'h2000;
  logic [15:0] ftw = 16'h4000;
  logic ref_we = 0;
  logic [5:0] ref_addr = 0;
  logic signed [15:0] ref_i = 0, ref_q = 0;
  logic bw_we = 0, bw_sel = 0;
  logic [5:0] bw_addr = 0;
  logic signed [15:0] bw_data = 0;
  logic glbl_reset_b;
  logic signed [15:0] ddc_i, ddc_q;
  logic ddc_valid, pc_ri_valid, pc_valid;
  logic signed [38:0] pc_re, pc_im;
  logic [38:0] pc_mag;
  int checks = 0, failures = 0;

  ddc_pc_top dut (.*);

  always #12.5 clk_40mhz = ~clk_40mhz;

  initial begin
    repeat (40000) @(posedge clk_40mhz);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_ddc = 0;
  always @(posedge clk_40mhz) if (ddc_valid) m_ddc++;

  // exact correlation of the observed DDC outputs with the reference
  longint ri [L], rq [L];
  longint si [$], sq [$];
  longint mr [$], mi [$];
  longint mags [$];
  int n_ri = 0;
  longint cr, ci;
  real em, d;
  int idx;
  always @(negedge clk_40mhz) if (glbl_reset_b) begin
    if (ddc_valid) begin
      si.push_back(longint'(ddc_i));
      sq.push_back(longint'(ddc_q));
    end
    if (pc_ri_valid) begin
      cr = 0; ci = 0;
      for (int m = 0; m < L; m++) begin
        idx = n_ri - (L - 1) + m;
        if (idx >= 0) begin
          cr += si[idx] * ri[m] + sq[idx] * rq[m];
          ci += sq[idx] * ri[m] - si[idx] * rq[m];
        end
      end
      checks++;
      if (longint'(pc_re) != cr || longint'(pc_im) != ci) begin
        failures++;
        if (failures < 8) $display("corr n=%0d %0d %0d exp %0d %0d", n_ri, pc_re, pc_im, cr, ci);
      end
      mr.push_back(cr);
      mi.push_back(ci);
      n_ri++;
    end
    if (pc_valid) begin
      cr = mr.pop_front();
      ci = mi.pop_front();
      em = $sqrt(real'(cr) * real'(cr) + real'(ci) * real'(ci));
      d = real'(pc_mag) - em;
      if (d < 0) d = -d;
      checks++;
      if (d > em / 16384.0 + 4.0) begin
        failures++;
        if (failures < 8) $display("mag %0d exp %f", pc_mag, em);
      end
      mags.push_back(longint'(pc_mag));
    end
  end

  function automatic real chirp_phase(input real m);
    return PI * (-0.25 * m + 0.25 * m * m / 64.0);
  endfunction

  int   t_cell [NT] = '{100, 400, 700, 712};
  real  t_amp  [NT] = '{7000.0, 4000.0, 3800.0, 3800.0};
  real  t_tol  [NT] = '{0.15, 0.15, 0.25, 0.25};

  int base, inflight, ddc0, n_cells, n_det, m_found, m_pair;
  int det_cell [$];
  longint det_val [$];
  real v, m, ideal, thr;
  bit is_max, hit;
  longint cur;
  initial begin
    repeat (5) @(negedge clk_40mhz);
    reset = 0;
    locked = 1;
    repeat (5) @(negedge clk_40mhz);
    checks++;
    if (glbl_reset_b !== 1'b1) failures++;

    for (int k = 0; k < L; k++) begin
      @(negedge clk_40mhz);
      ref_we = 1;
      ref_addr = 6'(k);
      ref_i = 16'($rtoi(16000.0 * $cos(chirp_phase(real'(k)))));
      ref_q = 16'($rtoi(16000.0 * $sin(chirp_phase(real'(k)))));
      ri[k] = longint'(ref_i);
      rq[k] = longint'(ref_q);
    end
    @(negedge clk_40mhz);
    ref_we = 0;
    // let the reference settle through the filters' history before the record starts
    repeat (8 * (L + 20)) @(negedge clk_40mhz);

    base = mags.size();
    inflight = m_ddc - base;
    ddc0 = m_ddc;
    for (int n = 0; n < 8 * NCELL; n++) begin
      @(negedge clk_40mhz);
      v = real'(int'($urandom % 101) - 50);
      for (int t = 0; t < NT; t++) begin
        m = real'(n - 8 * t_cell[t]) / 8.0;
        if (m >= 0.0 && m < real'(L))
          v += t_amp[t] * $cos(2.0 * PI * 10.0e6 * n / 40.0e6 + chirp_phase(m));
      end
      adc_data_input = 14'($rtoi($floor(v + 0.5)) + 8192);
    end
    n_cells = m_ddc - ddc0;
    adc_data_input = 14'h2000;
    repeat (40) @(negedge clk_40mhz);

    // magnitudes of the window: cell j is mags[base + inflight + j]
    checks++;
    if (n_cells != NCELL) begin
      failures++;
      $display("record holds %0d cells, expected %0d", n_cells, NCELL);
    end

    thr = 0.5 * 0.97 * 64.0 * 3800.0 * 16000.0;
    for (int j = 3; j < n_cells - 3; j++) begin
      cur = mags[base + inflight + j];
      if (real'(cur) > thr) begin
        is_max = 1;
        for (int k = -3; k <= 3; k++)
          if (k != 0 && mags[base + inflight + j + k] > cur) is_max = 0;
        if (is_max) begin
          det_cell.push_back(j);
          det_val.push_back(cur);
        end
      end
    end
    n_det = det_cell.size();
    foreach (det_cell[i]) $display("detection at cell %0d, magnitude %0d", det_cell[i], det_val[i]);

    checks++;
    if (n_det != NT) begin
      failures++;
      $display("%0d detections, expected %0d", n_det, NT);
    end
    m_found = 0;
    for (int t = 0; t < NT; t++) begin
      hit = 0;
      ideal = 0.97 * 64.0 * t_amp[t] * 16000.0;
      foreach (det_cell[i])
        if (det_cell[i] >= t_cell[t] + DELAY - 2 && det_cell[i] <= t_cell[t] + DELAY + 2) begin
          hit = 1;
          checks++;
          if (real'(det_val[i]) < ideal * (1.0 - t_tol[t]) ||
              real'(det_val[i]) > ideal * (1.0 + t_tol[t])) begin
            failures++;
            $display("target %0d: peak %0d, expected %f", t, det_val[i], ideal);
          end
        end
      checks++;
      if (!hit) begin
        failures++;
        $display("target at cell %0d not detected near %0d", t_cell[t], t_cell[t] + DELAY);
      end else m_found++;
    end
    m_pair = 0;
    foreach (det_cell[i])
      if (det_cell[i] > t_cell[2] + DELAY - 3 && det_cell[i] < t_cell[3] + DELAY + 3) m_pair++;

    $display("mechanisms: cells=%0d detections=%0d found=%0d pair_peaks=%0d", n_cells, n_det,
             m_found, m_pair);
    checks += 3;
    if (n_cells == 0) failures++;
    if (m_found == 0) failures++;
    if (m_pair != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
