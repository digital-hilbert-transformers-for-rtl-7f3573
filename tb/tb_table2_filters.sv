// tb_table2_filters: measures the frequency responses of the built filters
// and holds them against their published performance figures.
//
// Each filter gets a single full-scale impulse from reset; its impulse
// response (NH samples, long enough for the IIR sections to die out) is
// recorded and transformed in the bench at NF/2 - 1 frequencies between
// 0 and fs/2. For a complex output h = hi + j*hq the bench forms
//   H(+f) = sum h(n) e^{-j 2 pi f n},  H(-f) = sum h(n) e^{+j 2 pi f n},
//   Hi(f), Hq(f): the same sums over hi and hq alone,
// and derives, with 0 dB the design gain of each filter:
//   * the 3-dB band [f_lo, f_hi] of H(+f) around fs/4 (linear
//     interpolation between grid points) and the peak gain inside it;
//   * the image suppression: 0 dB over the largest |H(-f)| for f in
//     0.154..0.346 fs (the pass-band of H_A3);
//   * the I/Q gain mismatch |Hq|/|Hi| and phase error arg(Hq/Hi) + 90
//     degrees inside the 3-dB band.
// F_LP (real, low-pass) gets its DC gain, its 3-dB cut-off and its
// attenuation at 0.018 fs, the lower band edge of H_A1.
// Checked against the published filter figures: the band edges of H_A1
// (0.018..0.482), H_A2 (0.137..0.364), H_A3 (0.154..0.346) and H_A4
// (0.0145..0.4865) within 0.002 fs; H_A1's pass-band peak (+0.76 dB);
// the image suppression of H_A2 (11.3 dB), H_A3 (47.7 dB) and H_A4
// (44.6 dB) within 1 dB; the I/Q gain mismatch of H_A2 (0 dB) and H_A3
// (up to 0.103 dB); the I/Q phase error of H_A1 and H_A3 (0, within
// 0.1 degree for the floor rounding of the 14-bit response) and of H_A2
// (up to 40 degrees); the F_LP attenuation at 0.018 fs (18 dB) within 1 dB.
// Printed but not checked: H_A1's image suppression (published 20.7 dB;
// the band it refers to is not stated) and the F_LP cut-off (published
// 0.004 fs; this cascade of three M = 4 stages has 0.0052 fs).
module tb_table2_filters;
  import hilbert_pkg::*;
  localparam int  NH     = 1024;     // recorded impulse response length
  localparam int  NF     = 2000;     // frequency grid step fs/NF
  localparam int  NFILT  = 5;        // H_A1, H_A2, H_A3, H_A4, F_LP
  localparam real TWO_PI = 6.28318530717958647692;
  localparam int  B3_LO  = 308;      // 0.154 fs
  localparam int  B3_HI  = 692;      // 0.346 fs

  logic clk = 1'b0, rst = 1'b1;
  logic signed [ADC_W-1:0] x;
  logic signed [PHASE_W-1:0] xl, yl;
  logic signed [ADC_W:0] h1i, h1q, h2i, h2q;
  logic signed [ADC_W+5:0] h3i, h3q;
  logic signed [ADC_W+7:0] h4i, h4q;

  fir_hilbert_ha1 u_ha1 (.clk, .rst, .x, .y_i(h1i), .y_q(h1q));
  fsf_ha2         u_ha2 (.clk, .rst, .x, .yi(h2i), .yq(h2q));
  fsf_ha4         u_ha4 (.clk, .rst, .x, .y3i(h3i), .y3q(h3q), .yi(h4i), .yq(h4q));
  iir_lowpass_flp u_flp (.clk, .rst, .x(xl), .y(yl));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (NH + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ri [NFILT][NH];
  real rq [NFILT][NH];
  real mp [NFILT][NF/2];   // |H(+f)|
  real mn [NFILT][NF/2];   // |H(-f)|
  real ge [NFILT][NF/2];   // |Hq| / |Hi|
  real pe [NFILT][NF/2];   // arg(Hq / Hi) + 90 degrees

  function automatic real db(input real r);
    return 20.0 * $ln(r) / $ln(10.0);
  endfunction

  task automatic check_near(input string what, input real got, input real want, input real tol);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      $display("MISMATCH %s: measured %f, published %f", what, got, want);
    end
  endtask

  initial begin
    x  = '0;
    xl = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    x  <= ADC_W'(8191);
    xl <= PHASE_W'(32767);
    for (int n = 0; n < NH; n++) begin
      @(posedge clk);
      #1;
      x  <= '0;
      xl <= '0;
      ri[0][n] = real'(h1i); rq[0][n] = real'(h1q);
      ri[1][n] = real'(h2i); rq[1][n] = real'(h2q);
      ri[2][n] = real'(h3i); rq[2][n] = real'(h3q);
      ri[3][n] = real'(h4i); rq[3][n] = real'(h4q);
      ri[4][n] = real'(yl);  rq[4][n] = 0.0;
    end

    // transform
    for (int m = 1; m < NF / 2; m++) begin
      real w, c, s;
      real ci [NFILT], si [NFILT], cq [NFILT], sq [NFILT];
      for (int k = 0; k < NFILT; k++) begin
        ci[k] = 0.0; si[k] = 0.0; cq[k] = 0.0; sq[k] = 0.0;
      end
      w = TWO_PI * real'(m) / real'(NF);
      for (int n = 0; n < NH; n++) begin
        c = $cos(w * real'(n));
        s = $sin(w * real'(n));
        for (int k = 0; k < NFILT; k++) begin
          ci[k] += ri[k][n] * c;  si[k] += ri[k][n] * s;
          cq[k] += rq[k][n] * c;  sq[k] += rq[k][n] * s;
        end
      end
      for (int k = 0; k < NFILT; k++) begin
        // Hi = ci - j si, Hq = cq - j sq; H(+f) = Hi + j Hq; H(-f) from e^{+jwn}
        mp[k][m] = $sqrt((ci[k] + sq[k]) ** 2 + (cq[k] - si[k]) ** 2);
        mn[k][m] = $sqrt((ci[k] - sq[k]) ** 2 + (si[k] + cq[k]) ** 2);
        ge[k][m] = $sqrt(cq[k] ** 2 + sq[k] ** 2) / $sqrt(ci[k] ** 2 + si[k] ** 2 + 1.0e-30);
        pe[k][m] = ($atan2(-sq[k], cq[k]) - $atan2(-si[k], ci[k])) * 360.0 / TWO_PI + 90.0;
        while (pe[k][m] > 180.0) pe[k][m] -= 360.0;
        while (pe[k][m] <= -180.0) pe[k][m] += 360.0;
      end
    end

    // analytic filters; 0 dB is the design gain (2 for H_A1, whose I and Q
    // parts each have gain 1; the scale factor 4, 36 or 16 for the others)
    for (int k = 0; k < 4; k++) begin
      real nom, lim, peak, flo, fhi, img, gmin, gmax, pmax;
      int  lo, hi;
      string nm;
      nm  = k == 0 ? "H_A1" : k == 1 ? "H_A2" : k == 2 ? "H_A3" : "H_A4";
      nom = 8191.0 * (k == 0 ? 2.0 : k == 1 ? 4.0 : k == 2 ? 36.0 : 16.0);
      lim = nom / $sqrt(2.0);
      lo = NF / 4;
      while (lo > 1 && mp[k][lo-1] >= lim) lo--;
      hi = NF / 4;
      while (hi < NF / 2 - 1 && mp[k][hi+1] >= lim) hi++;
      flo = (real'(lo) - (mp[k][lo] - lim) / (mp[k][lo] - mp[k][lo-1])) / real'(NF);
      fhi = (real'(hi) + (mp[k][hi] - lim) / (mp[k][hi] - mp[k][hi+1])) / real'(NF);
      peak = 0.0; gmin = 1.0e30; gmax = 0.0; pmax = 0.0;
      for (int m = lo; m <= hi; m++) begin
        if (mp[k][m] > peak) peak = mp[k][m];
        if (ge[k][m] < gmin) gmin = ge[k][m];
        if (ge[k][m] > gmax) gmax = ge[k][m];
        if (pe[k][m] > pmax) pmax = pe[k][m];
        if (-pe[k][m] > pmax) pmax = -pe[k][m];
      end
      img = 0.0;
      for (int m = B3_LO; m <= B3_HI; m++) if (mn[k][m] > img) img = mn[k][m];
      $display("%s: 3-dB band %6.4f .. %6.4f fs, peak %6.3f dB, image suppression over 0.154..0.346 fs %5.1f dB, |Hq|/|Hi| %7.3f .. %7.3f dB, I/Q phase error up to %6.3f deg",
               nm, flo, fhi, db(peak / nom), db(nom / img), db(gmin), db(gmax), pmax);
      case (k)
        0: begin
          check_near("H_A1 lower edge", flo, 0.018, 0.002);
          check_near("H_A1 upper edge", fhi, 0.482, 0.002);
          check_near("H_A1 pass-band peak (dB)", db(peak / nom), 0.76, 0.05);
          check_near("H_A1 I/Q phase error (deg)", pmax, 0.0, 0.1);
        end
        1: begin
          check_near("H_A2 lower edge", flo, 0.137, 0.002);
          check_near("H_A2 upper edge", fhi, 0.364, 0.002);
          check_near("H_A2 image suppression (dB)", db(nom / img), 11.3, 1.0);
          check_near("H_A2 I/Q gain mismatch (dB)", db(gmax), 0.0, 0.01);
          check_near("H_A2 I/Q phase error (deg)", pmax, 40.0, 2.0);
        end
        2: begin
          check_near("H_A3 lower edge", flo, 0.154, 0.002);
          check_near("H_A3 upper edge", fhi, 0.346, 0.002);
          check_near("H_A3 image suppression (dB)", db(nom / img), 47.7, 1.0);
          check_near("H_A3 I/Q gain mismatch (dB)", db(gmax), 0.103, 0.01);
          check_near("H_A3 I/Q phase error (deg)", pmax, 0.0, 0.1);
        end
        default: begin
          check_near("H_A4 lower edge", flo, 0.0145, 0.002);
          check_near("H_A4 upper edge", fhi, 0.4865, 0.002);
          check_near("H_A4 image suppression (dB)", db(nom / img), 44.6, 1.0);
        end
      endcase
    end

    // F_LP
    begin
      real dc, fc, a018;
      int  m;
      dc = 0.0;
      for (int n = 0; n < NH; n++) dc += ri[4][n];
      m = 1;
      while (m < NF / 2 - 1 && mp[4][m+1] >= dc / $sqrt(2.0)) m++;
      fc = (real'(m) + (mp[4][m] - dc / $sqrt(2.0)) / (mp[4][m] - mp[4][m+1])) / real'(NF);
      a018 = db(dc / mp[4][36]);     // 36 / NF = 0.018
      $display("F_LP: DC gain %f, 3-dB cut-off %6.4f fs, attenuation at 0.018 fs %5.1f dB",
               dc / 32767.0, fc, a018);
      check_near("F_LP DC gain", dc / 32767.0, 1.0, 0.01);
      check_near("F_LP attenuation at 0.018 fs", a018, 18.0, 1.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
