// tb_hilbert_pll_top: end-to-end test of the complete design at its
// default sizes.
//
// Stimulus: a 14-bit cosine x(n) = 7000 cos(theta(n)) whose phase comes from
// a 64-bit accumulator, at fs = 120 MHz:
//   1. 4.8 MHz (0.04 fs) with the DDS centre word 1 % too high, from an
//      arbitrary starting phase: the loop must pull in and lock;
//   2. a frequency ramp of 68 MHz/s (the fastest ramp the PLL is specified
//      for) from 4.8 MHz for RAMP cycles;
//   3. a hold at the final frequency.
// Checks:
//   * after lock and throughout the ramp, the DDS phase (accumulator) is
//     within 5 degrees of the true input phase of the same sample;
//   * the DDS sine output follows sin(theta) with the phase error plus the
//     table quantisation;
//   * the tuning word settles to the input frequency;
//   * the low-pass reduces the ripple of the raw phase difference;
//   * first, before the PLL test and from reset, the three frequency
//     sampling filters get a real tone at 0.22 fs: the H_A2 output equals
//     its FIR form, H_A3/H_A4 output magnitudes are constant within 1 %
//     (negative image suppressed) and H_A4 has 0 dB gain.
//   * the H_A4 PLL (filtered feedback) locks and tracks the ramp within
//     5 degrees, its tuning word settles, and the phase ripple its H_A4
//     detector shows at 0.04 fs cancels in the phase difference.
// Mechanisms counted (each must occur): phase-detector wrap, CORDIC left
// half-plane input, analytic FSF output, integrator pull-in (tuning word
// moving from the centre word), F_LP ripple reduction, lock, ramp
// tracking, and for the H_A4 PLL lock, ramp tracking and ripple
// cancellation through the filtered feedback path.
module tb_hilbert_pll_top;
  import hilbert_pkg::*;

  localparam int  LOCK_CYC = 60000;
  localparam int  RAMP     = 200000;
  localparam int  HOLD     = 20000;
  localparam int  FSF_CYC  = 2000;
  localparam real TWO_PI   = 6.28318530717958647692;
  localparam real FS       = 120.0e6;
  localparam real F0       = 4.8e6;
  localparam real RATE     = 68.0e6;        // Hz per second

  logic clk = 1'b0, rst = 1'b1;
  logic signed [ADC_W-1:0] adc_x;
  logic [ACC_W-1:0] ftw_centre, pll_ftw;
  logic signed [DAC_W-1:0] dac_y;
  logic [PHASE_W-1:0] pll_phase_x;
  logic signed [PHASE_W-1:0] pll_err_raw, pll_err;
  logic signed [DAC_W-1:0] dac4_y;
  logic [ACC_W-1:0] pll4_ftw;
  logic [PHASE_W-1:0] pll4_phase_x;
  logic signed [PHASE_W-1:0] pll4_err_raw, pll4_err;
  logic signed [ADC_W:0] ha1_i, ha1_q, ha2_i, ha2_q;
  logic signed [ADC_W+5:0] ha3_i, ha3_q;
  logic signed [ADC_W+7:0] ha4_i, ha4_q;

  hilbert_pll_top dut (.*);

  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  int n_wrap = 0, n_lefthalf = 0, n_pull = 0, n_ripple = 0, n_lock = 0, n_ramp = 0,
       n_analytic = 0, n_lock4 = 0, n_ramp4 = 0, n_cancel = 0;

  initial begin
    repeat (FSF_CYC + LOCK_CYC + RAMP + HOLD + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input phase accumulator, 64-bit turn fraction
  longint unsigned theta, theta_prev, theta_prev2, dtheta;
  real f_now, dphase_deg, max_err_ramp, max_err_lock, sq_raw, sq_flt;
  real dphase4_deg, max_err_ramp4, max_err_lock4, sq_raw4, d4, d4min, d4max;
  int  hist [0:7];
  int  n_raw;
  logic [PHASE_W-1:0] prev_px;

  function automatic real turns_to_deg_signed(input longint unsigned d);
    real t;
    t = real'(d >> 11) / real'(64'd1 << 53);  // 0 .. 1 turn
    if (t >= 0.5) t = t - 1.0;
    return t * 360.0;
  endfunction

  function automatic longint unsigned ftw64(input real f);
    return longint'(f / FS * 18446744073709551616.0 / 4.0) * 4;
  endfunction

  initial begin
    real ymag3, ymag4, mx3, mn3, mx4, mn4;
    longint unsigned ddsph;
    theta       = 64'h3A5C_0000_0000_0000;   // arbitrary start phase
    theta_prev  = theta;
    theta_prev2 = theta;
    f_now       = F0;
    dtheta      = ftw64(F0);
    ftw_centre  = ACC_W'(longint'(F0 * 1.01 / FS * 4294967296.0));
    adc_x       = '0;
    for (int k = 0; k < 8; k++) hist[k] = 0;
    max_err_ramp = 0.0; max_err_lock = 0.0;
    max_err_ramp4 = 0.0; max_err_lock4 = 0.0; sq_raw4 = 0.0; d4min = 1.0e9; d4max = -1.0e9;
    sq_raw = 0.0; sq_flt = 0.0; n_raw = 0;
    mx3 = 0.0; mn3 = 1.0e30; mx4 = 0.0; mn4 = 1.0e30;
    prev_px = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    // 0. frequency sampling filters: real tone at 0.22 fs, inside their
    //    pass-band, negative image in their stop-band
    for (int n = 0; n < FSF_CYC; n++) begin
      int v;
      v = int'(7000.0 * $cos(TWO_PI * 0.22 * real'(n)));
      adc_x <= ADC_W'(v);
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = v;
      @(posedge clk);
      #1;
      checks++;
      if (int'(ha2_i) != hist[1] - hist[3] || int'(ha2_q) != hist[2] - hist[4]) begin
        failures++;
        if (failures < 10) $display("n=%0d ha2 mismatch", n);
      end
      if (n > 100) begin
        ymag3 = $sqrt(real'(ha3_i) * real'(ha3_i) + real'(ha3_q) * real'(ha3_q));
        ymag4 = $sqrt(real'(ha4_i) * real'(ha4_i) + real'(ha4_q) * real'(ha4_q));
        if (ymag3 > mx3) mx3 = ymag3;
        if (ymag3 < mn3) mn3 = ymag3;
        if (ymag4 > mx4) mx4 = ymag4;
        if (ymag4 < mn4) mn4 = ymag4;
      end
    end
    checks++;
    if ((mx3 - mn3) / (mx3 + mn3) > 0.01 || (mx4 - mn4) / (mx4 + mn4) > 0.01
        || mx4 < 0.99 * 8.0 * 7000.0 || mx4 > 1.01 * 8.0 * 7000.0) begin
      failures++;
      $display("FSF magnitudes: ha3 %f..%f ha4 %f..%f", mn3, mx3, mn4, mx4);
    end else n_analytic++;
    $display("FSF at 0.22 fs: |H_A3 out| %f..%f, |H_A4 out| %f..%f", mn3, mx3, mn4, mx4);
    // restart the PLL for the locking test
    rst <= 1'b1;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < LOCK_CYC + RAMP + HOLD; n++) begin
      int v;
      // present x(n)
      v = int'(7000.0 * $cos(TWO_PI * real'(theta >> 11) / real'(64'd1 << 53)));
      adc_x <= ADC_W'(v);
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = v;
      @(posedge clk);
      #1;
      // accumulator now holds the DDS phase for sample n: compare with theta(n)
      ddsph      = longint'(dut.u_pll.u_dds.phase) << 32;
      dphase_deg = turns_to_deg_signed(ddsph - (theta + dtheta));
      // the H_A4 PLL compares the phase of its filtered sine output with
      // the filtered cosine input, so its sine output (one register after
      // the accumulator) lines up with the input: the accumulator leads by
      // a quarter turn and one more sample
      ddsph       = longint'(dut.u_pll4.u_dds.phase) << 32;
      dphase4_deg = turns_to_deg_signed(ddsph - (theta + 2 * dtheta) - 64'h4000_0000_0000_0000);

      // mechanisms
      if (pll_phase_x < prev_px && prev_px - pll_phase_x > 16'h8000) n_wrap++;
      prev_px = pll_phase_x;
      if (ha1_i < 0) n_lefthalf++;
      if (n == LOCK_CYC / 2 && pll_ftw != ftw_centre) n_pull++;

      if (n > LOCK_CYC / 2 && n < LOCK_CYC) begin
        // locked at constant frequency
        if (dphase_deg > max_err_lock) max_err_lock = dphase_deg;
        if (-dphase_deg > max_err_lock) max_err_lock = -dphase_deg;
        sq_raw += real'(pll_err_raw) * real'(pll_err_raw);
        sq_flt += real'(pll_err) * real'(pll_err);
        n_raw++;
        if (dphase4_deg > max_err_lock4) max_err_lock4 = dphase4_deg;
        if (-dphase4_deg > max_err_lock4) max_err_lock4 = -dphase4_deg;
        sq_raw4 += real'(pll4_err_raw) * real'(pll4_err_raw);
        // ripple of the H_A4 detector alone: detected minus true phase
        d4 = turns_to_deg_signed((longint'(pll4_phase_x) << 48) - theta);
        if (d4 < d4min) d4min = d4;
        if (d4 > d4max) d4max = d4;
        // DDS output: sin of the phase one sample back
        checks++;
        begin
          real ey;
          ey = 8191.0 * $sin(TWO_PI * real'(theta >> 11) / real'(64'd1 << 53));
          if (real'(dac_y) - ey > 1000.0 || ey - real'(dac_y) > 1000.0) begin
            failures++;
            if (failures < 10) $display("n=%0d dac_y=%0d expected %f", n, dac_y, ey);
          end
        end
        // frequency sampling filters on the same input
        checks++;
        if (int'(ha2_i) != hist[1] - hist[3] || int'(ha2_q) != hist[2] - hist[4]) begin
          failures++;
          if (failures < 10) $display("n=%0d ha2 mismatch", n);
        end
      end
      if (n == LOCK_CYC - 1) begin
        checks++;
        if (max_err_lock < 5.0) n_lock++;
        else begin
          failures++;
          $display("no lock: max phase error %f deg", max_err_lock);
        end
        checks++;
        if (sq_flt < 0.25 * sq_raw) n_ripple++;
        else begin
          failures++;
          $display("ripple not reduced: raw %f filtered %f", sq_raw / n_raw, sq_flt / n_raw);
        end
        $display("locked: max DDS phase error %f deg, rms err raw %f filtered %f LSB",
                 max_err_lock, $sqrt(sq_raw / n_raw), $sqrt(sq_flt / n_raw));
        checks++;
        if (max_err_lock4 < 5.0) n_lock4++;
        else begin
          failures++;
          $display("H_A4 PLL no lock: max phase error %f deg", max_err_lock4);
        end
        // filtered feedback: the detector ripple cancels in the difference
        checks++;
        if (d4max - d4min > 1.0
            && 10.0 * $sqrt(sq_raw4 / n_raw) * 360.0 / 65536.0 < (d4max - d4min) / 2.0) n_cancel++;
        else begin
          failures++;
          $display("H_A4 ripple not cancelled: detector +-%f deg, difference rms %f LSB",
                   (d4max - d4min) / 2.0, $sqrt(sq_raw4 / n_raw));
        end
        $display("H_A4 PLL locked: max DDS phase error %f deg, detector ripple +-%f deg, rms err raw %f LSB",
                 max_err_lock4, (d4max - d4min) / 2.0, $sqrt(sq_raw4 / n_raw));
      end
      if (n >= LOCK_CYC + RAMP / 10 && n < LOCK_CYC + RAMP) begin
        if (dphase_deg > max_err_ramp) max_err_ramp = dphase_deg;
        if (-dphase_deg > max_err_ramp) max_err_ramp = -dphase_deg;
        if (dphase4_deg > max_err_ramp4) max_err_ramp4 = dphase4_deg;
        if (-dphase4_deg > max_err_ramp4) max_err_ramp4 = -dphase4_deg;
      end
      if (n == LOCK_CYC + RAMP - 1) begin
        checks++;
        if (max_err_ramp < 5.0) n_ramp++;
        else begin
          failures++;
          $display("ramp tracking error %f deg", max_err_ramp);
        end
        $display("ramp to %f MHz: max DDS phase error %f deg", f_now / 1.0e6, max_err_ramp);
        checks++;
        if (max_err_ramp4 < 5.0) n_ramp4++;
        else begin
          failures++;
          $display("H_A4 PLL ramp tracking error %f deg", max_err_ramp4);
        end
        $display("H_A4 PLL ramp: max DDS phase error %f deg", max_err_ramp4);
      end

      // advance the input phase
      theta_prev2 = theta_prev;
      theta_prev  = theta;
      theta       = theta + dtheta;
      if (n >= LOCK_CYC && n < LOCK_CYC + RAMP) begin
        f_now  = f_now + RATE / FS;
        dtheta = ftw64(f_now);
      end
    end
    // tuning word settled on the final frequency (within 0.01 %)
    checks++;
    begin
      real f_dds;
      f_dds = real'(pll_ftw) / 4294967296.0 * FS;
      if (f_dds < f_now * 0.9999 || f_dds > f_now * 1.0001) begin
        failures++;
        $display("final frequency %f, input %f", f_dds, f_now);
      end
      checks++;
      f_dds = real'(pll4_ftw) / 4294967296.0 * FS;
      if (f_dds < f_now * 0.9999 || f_dds > f_now * 1.0001) begin
        failures++;
        $display("H_A4 PLL final frequency %f, input %f", f_dds, f_now);
      end
    end
    $display("mechanisms: wrap=%0d lefthalf=%0d pull=%0d ripple=%0d lock=%0d ramp=%0d analytic=%0d",
             n_wrap, n_lefthalf, n_pull, n_ripple, n_lock, n_ramp, n_analytic);
    $display("H_A4 PLL mechanisms: lock=%0d ramp=%0d ripple_cancel=%0d", n_lock4, n_ramp4, n_cancel);
    checks++;
    if (n_wrap == 0 || n_lefthalf == 0 || n_pull == 0 || n_ripple == 0 || n_lock == 0 || n_ramp == 0
        || n_analytic == 0 || n_lock4 == 0 || n_ramp4 == 0 || n_cancel == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
