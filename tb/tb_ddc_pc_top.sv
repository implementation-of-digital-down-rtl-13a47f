// End-to-end test of the receiver core with every parameter at its default.
//
// The ADC stream is generated here: a linear-FM echo (64 samples of 5 MSps baseband,
// sweeping -1.25 .. +1.25 MHz) on a 10 MHz carrier sampled at 40 MSps, in low-level noise,
// as 14-bit offset-binary codes. Phases of the run:
//   1. reset released while the clock is not locked: the core must stay in reset;
//   2. the matching chirp is written as reference; one echo is received: the compressed
//      magnitude must peak where the echo start, the DDC delay (13 outputs) and the reference
//      length (63) put it, within 2 samples, and exceed every output outside the main lobe 3x;
//   3. the LO is retuned to 12 MHz and an echo on a 12 MHz carrier is received: same checks;
//   4. a down-chirp reference is loaded: the same up-chirp echo must now give a peak at most
//      half the matched one;
//   5. the up-chirp reference is reloaded and the PFIR is reprogrammed through the bandwidth
//      port to a single centre tap (wider band): the echo must still compress at the same
//      place with the same sidelobe margin.
// Throughout, every pc_re/pc_im is compared with the correlation of the DDC outputs seen on
// the ports with the reference (exact), pc_mag with its modulus, and ddc_valid must come
// exactly every 8 clocks. Each mechanism (lock wait, NCO wrap, each decimation stage,
// reference load, LO retune, bandwidth reprogramming, matched and mismatched compression)
// is counted and must occur.
module tb_ddc_pc_top;
  localparam real PI = 3.14159265358979323846;
  localparam int L = 64;
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
    repeat (200000) @(posedge clk_40mhz);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int m_lock_wait = 0, m_nco_wrap = 0, m_cic = 0, m_cfir = 0, m_ddc = 0, m_ref_load = 0;
  int m_retune = 0, m_matched = 0, m_mismatch = 0, m_bw = 0;

  always @(posedge clk_40mhz) begin
    if (dut.u_ddc.nco_wrap)   m_nco_wrap++;
    if (dut.u_ddc.cic_valid)  m_cic++;
    if (dut.u_ddc.cfir_valid) m_cfir++;
  end

  // DDC output rate: one output every 8 clocks once running
  int last_ddc = -1, cyc = 0;
  always @(posedge clk_40mhz) begin
    cyc++;
    if (ddc_valid) begin
      m_ddc++;
      if (last_ddc >= 0) begin
        checks++;
        if (cyc - last_ddc != 8) begin
          failures++;
          if (failures < 8) $display("ddc interval %0d", cyc - last_ddc);
        end
      end
      last_ddc = cyc;
    end
  end

  // reference model of the correlator on the observed DDC output
  longint ri [L], rq [L];
  longint si [$], sq [$];
  longint mr [$], mi [$];
  longint mags [$];
  int n_ri = 0;
  longint cr, ci;
  real em, d;
  int idx;
  int hold = 0;   // > 0 while the reference store is changing: correlation not checked
  always @(negedge clk_40mhz) if (hold > 0) hold--;
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
      if (hold > 0 || ref_we) begin
        cr = longint'(pc_re);
        ci = longint'(pc_im);
      end else begin
        checks++;
        if (longint'(pc_re) != cr || longint'(pc_im) != ci) begin
          failures++;
          if (failures < 8) $display("corr n=%0d %0d %0d exp %0d %0d si=%0d t=%0t", n_ri, pc_re, pc_im, cr, ci, si.size(), $time);
        end
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

  function automatic real chirp_phase(input real m, input bit down);
    real p;
    p = PI * (-0.25 * m + 0.25 * m * m / 64.0);
    return down ? -p : p;
  endfunction

  task automatic load_ref(input bit down);
    for (int m = 0; m < L; m++) begin
      @(negedge clk_40mhz);
      ref_we = 1;
      ref_addr = 6'(m);
      ref_i = 16'($rtoi(16000.0 * $cos(chirp_phase(real'(m), down))));
      ref_q = 16'($rtoi(16000.0 * $sin(chirp_phase(real'(m), down))));
      ri[m] = longint'(ref_i);
      rq[m] = longint'(ref_q);
    end
    @(negedge clk_40mhz);
    ref_we = 0;
    hold = 4;
    m_ref_load++;
  endtask

  // Receive one window of 8*NOUT ADC samples with an echo starting at ADC sample S0 on
  // carrier FC; return the index and value of the largest magnitude and the largest
  // magnitude outside +-4 of it. The index counts DDC outputs from the first one formed
  // in the window (outputs still in the correlator pipeline when it starts are discounted).
  localparam int NOUT = 260, S0 = 480;
  task automatic receive(input real fc, output int pk, output longint pv, output longint side);
    real t, m, v;
    int base, inflight;
    base = mags.size();
    inflight = m_ddc - base;
    for (int n = 0; n < 8 * NOUT; n++) begin
      @(negedge clk_40mhz);
      m = real'(n - S0) / 8.0;            // position in 5 MSps samples
      v = 0.0;
      if (m >= 0.0 && m < real'(L))
        v = 7000.0 * $cos(2.0 * PI * fc * n / 40.0e6 + chirp_phase(m, 1'b0));
      v += real'(int'($urandom % 101) - 50);
      adc_data_input = 14'($rtoi($floor(v + 0.5)) + 8192);
    end
    repeat (40) @(negedge clk_40mhz);
    pk = 0; pv = 0; side = 0;
    for (int i = base; i < mags.size(); i++)
      if (mags[i] > pv) begin pv = mags[i]; pk = i - base; end
    pk -= inflight;
    for (int i = base; i < mags.size(); i++)
      if ((i - base - inflight < pk - 4 || i - base - inflight > pk + 4) && mags[i] > side)
        side = mags[i];
  endtask

  int pk;
  longint pv, pv_matched, side;
  int expected_pk;
  initial begin
    // 1. reset released, clock not locked yet
    repeat (5) @(negedge clk_40mhz);
    reset = 0;
    repeat (20) begin
      @(negedge clk_40mhz);
      checks++;
      if (glbl_reset_b !== 1'b0) failures++;
      else m_lock_wait++;
    end
    locked = 1;
    repeat (3) @(negedge clk_40mhz);
    checks++;
    if (glbl_reset_b !== 1'b1) failures++;

    // 2. matched reference, echo on 10 MHz
    load_ref(1'b0);
    // DDC output index of the peak: echo start S0/8, linear-phase filter delay 13 outputs
    // (CIC 4, CFIR 20, PFIR 80 input samples = 104/8), reference length - 1, and 1 more
    // because output e is formed from input 8e+7 and the pipeline adds a few clocks.
    receive(10.0e6, pk, pv, side);
    expected_pk = S0 / 8 + 13 + L - 1 + 1;
    checks += 2;
    $display("10 MHz echo: peak %0d at %0d (expected %0d), largest sidelobe %0d", pv, pk,
             expected_pk, side);
    if (pk < expected_pk - 2 || pk > expected_pk + 2) begin
      failures++;
      $display("peak at %0d, expected %0d", pk, expected_pk);
    end
    if (side * 3 > pv) begin failures++; $display("sidelobe %0d peak %0d", side, pv); end
    else m_matched++;
    pv_matched = pv;

    // 3. LO retuned to 12 MHz, echo on a 12 MHz carrier
    ftw = 16'd19661;
    m_retune++;
    receive(40.0e6 * 19661.0 / 65536.0, pk, pv, side);
    $display("12 MHz echo: peak %0d at %0d, largest sidelobe %0d", pv, pk, side);
    checks += 2;
    if (pk < expected_pk - 2 || pk > expected_pk + 2) begin
      failures++;
      $display("retuned: peak at %0d, expected %0d", pk, expected_pk);
    end
    if (side * 3 > pv) begin failures++; $display("retuned: sidelobe %0d peak %0d", side, pv); end
    else m_matched++;

    // 4. mismatched (down-chirp) reference, up-chirp echo on 10 MHz
    ftw = 16'h4000;
    m_retune++;
    load_ref(1'b1);
    receive(10.0e6, pk, pv, side);
    $display("mismatched reference: peak %0d", pv);
    checks++;
    if (pv * 2 > pv_matched) begin
      failures++;
      $display("mismatched peak %0d vs matched %0d", pv, pv_matched);
    end else m_mismatch++;

    // 5. matched reference again, PFIR reprogrammed to a single centre tap
    load_ref(1'b0);
    for (int t = 0; t < 41; t++) begin
      @(negedge clk_40mhz);
      bw_we = 1;
      bw_sel = 1;
      bw_addr = 6'(t);
      bw_data = (t == 20) ? 16'sd32767 : 16'sd0;
    end
    @(negedge clk_40mhz);
    bw_we = 0;
    m_bw++;
    receive(10.0e6, pk, pv, side);
    $display("wide PFIR: peak %0d at %0d, largest sidelobe %0d", pv, pk, side);
    checks += 2;
    if (pk < expected_pk - 2 || pk > expected_pk + 2) begin
      failures++;
      $display("wide PFIR: peak at %0d, expected %0d", pk, expected_pk);
    end
    if (side * 3 > pv) begin failures++; $display("wide PFIR: sidelobe %0d peak %0d", side, pv); end
    else m_matched++;

    $display("mechanisms: lock_wait=%0d nco_wrap=%0d cic=%0d cfir=%0d ddc=%0d ref_load=%0d retune=%0d matched=%0d mismatched=%0d bw_reprogram=%0d",
             m_lock_wait, m_nco_wrap, m_cic, m_cfir, m_ddc, m_ref_load, m_retune, m_matched,
             m_mismatch, m_bw);
    checks += 10;
    if (m_bw == 0) failures++;
    if (m_lock_wait == 0) failures++;
    if (m_nco_wrap == 0) failures++;
    if (m_cic == 0) failures++;
    if (m_cfir == 0) failures++;
    if (m_ddc == 0) failures++;
    if (m_ref_load < 3) failures++;
    if (m_retune == 0) failures++;
    if (m_matched < 3) failures++;
    if (m_mismatch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
