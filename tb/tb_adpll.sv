// tb_adpll: checks the PLL on its own, at default parameters, with
// disturbances the frequency-ramp test does not apply:
//   1. lock to a 1 MHz input (0.0083 fs), where the short FIR Hilbert
//      filter's I/Q gain mismatch is large (about -15 dB), so the raw phase
//      difference carries a large ripple at twice the signal frequency;
//   2. a 90 degree step of the input phase;
//   3. a 2 % step of the input frequency.
// After each settling interval the DDS accumulator phase must be within
// 5 degrees of the true input phase of the same sample; the low-pass must
// cut the ripple power by more than 10x; the detected phase_x, compared
// with the input phase 26 cycles earlier, must show the peak error that
// the I/Q gain ratio Ge of H_A1 predicts, pi/2 - 2 asin(sqrt(Ge/(1+Ge))),
// within 1 degree.
module tb_adpll;
  import hilbert_pkg::*;
  localparam real TWO_PI = 6.28318530717958647692;
  localparam real FS     = 120.0e6;
  localparam int  SETTLE = 60000;
  localparam int  D      = HA1_DELAY + CORDIC_STAGES + 2;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [ADC_W-1:0] x;
  logic [ACC_W-1:0] ftw_centre, ftw;
  logic signed [DAC_W-1:0] y;
  logic [PHASE_W-1:0] phase_x;
  logic signed [PHASE_W-1:0] err_raw, err;
  logic signed [ADC_W:0] ana_i, ana_q;

  adpll dut (.*);
  always #4 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (3 * SETTLE + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned theta, dtheta;
  longint unsigned th_hist [0:63];

  function automatic real deg(input longint unsigned d);
    real t;
    t = real'(d >> 11) / real'(64'd1 << 53);
    if (t >= 0.5) t = t - 1.0;
    return t * 360.0;
  endfunction

  initial begin
    real maxe, maxpx, sr, sf, e;
    theta  = 64'h1234_5678_0000_0000;
    dtheta = longint'(1.0e6 / FS * 4294967296.0) << 32;
    ftw_centre = ACC_W'(longint'(1.005e6 / FS * 4294967296.0));
    x = '0;
    for (int k = 0; k < 64; k++) th_hist[k] = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int phase_no = 0; phase_no < 3; phase_no++) begin
      maxe = 0.0; maxpx = 0.0; sr = 0.0; sf = 0.0;
      if (phase_no == 1) theta = theta + 64'h4000_0000_0000_0000;    // +90 deg
      if (phase_no == 2) dtheta = longint'(1.02e6 / FS * 4294967296.0) << 32;
      for (int n = 0; n < SETTLE; n++) begin
        x <= ADC_W'(int'(7000.0 * $cos(TWO_PI * real'(theta >> 11) / real'(64'd1 << 53))));
        @(posedge clk);
        #1;
        for (int k = 63; k > 0; k--) th_hist[k] = th_hist[k-1];
        th_hist[0] = theta;
        theta = theta + dtheta;
        if (n > SETTLE / 2) begin
          e = deg((longint'(dut.u_dds.phase) << 32) - theta);
          if (e > maxe) maxe = e;
          if (-e > maxe) maxe = -e;
          // phase_x now shows the input sample presented D cycles ago
          e = deg((longint'(phase_x) << 48) - th_hist[D - 1]);
          if (e > maxpx) maxpx = e;
          if (-e > maxpx) maxpx = -e;
          sr += real'(err_raw) * real'(err_raw);
          sf += real'(err) * real'(err);
        end
      end
      checks++;
      if (maxe > 5.0) begin
        failures++;
        $display("step %0d: DDS phase error %f deg", phase_no, maxe);
      end
      checks++;
      if (sf * 10.0 > sr) begin
        failures++;
        $display("step %0d: ripple power raw %f filtered %f", phase_no, sr, sf);
      end
      // peak phase ripple predicted from the I/Q gain ratio Ge of H_A1:
      // pi/2 - 2 asin(sqrt(Ge/(1+Ge))), Ge = 2 sum b_k sin(k W)
      begin
        real w, ge, pk;
        w  = TWO_PI * real'(dtheta >> 11) / real'(64'd1 << 53);
        ge = 2.0 * (163.0 * $sin(w) + 54.0 * $sin(3.0 * w) + 32.0 * $sin(5.0 * w)) / 256.0;
        pk = (TWO_PI / 4.0 - 2.0 * $asin($sqrt(ge / (1.0 + ge)))) * 360.0 / TWO_PI;
        checks++;
        if (maxpx > pk + 1.0 || maxpx < pk - 1.0) begin
          failures++;
          $display("step %0d: detected phase ripple %f deg, predicted %f", phase_no, maxpx, pk);
        end
      end
      $display("step %0d: max DDS phase error %f deg, detector ripple %f deg, rms raw/filtered %f/%f",
               phase_no, maxe, maxpx, $sqrt(sr / (SETTLE / 2)), $sqrt(sf / (SETTLE / 2)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
