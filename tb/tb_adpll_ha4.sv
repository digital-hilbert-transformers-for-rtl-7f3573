// tb_adpll_ha4: checks the PLL in its filtered-feedback configuration:
// H_A4 as analytic filter on the input and, with its own detector, on the
// DDS output (AFILTER = AF_FSF_HA4, FEEDBACK = FB_FILTER).
//   1. Lock at 4.8 MHz (0.04 fs) from a 1 % offset. There the negative
//      image of the real input lies in H_A4's transition band, so each
//      detector shows a clear phase ripple; because both paths use the
//      same filter, the ripple must cancel in the phase difference
//      (rms of err_raw below a tenth of the detector's peak ripple).
//   2. In lock the DDS output y must follow the input cosine in phase:
//      y(n) = 8191 cos(theta(n)), i.e. the accumulator leads the next input
//      sample's phase by a quarter turn; error below 5 degrees.
//   3. A 68 MHz/s ramp for 200000 samples: error stays below 5 degrees.
module tb_adpll_ha4;
  import hilbert_pkg::*;
  localparam real TWO_PI = 6.28318530717958647692;
  localparam real FS     = 120.0e6;
  localparam int  LOCK   = 60000;
  localparam int  RAMP   = 200000;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [ADC_W-1:0] x;
  logic [ACC_W-1:0] ftw_centre, ftw;
  logic signed [DAC_W-1:0] y;
  logic [PHASE_W-1:0] phase_x;
  logic signed [PHASE_W-1:0] err_raw, err;
  logic signed [ADC_W+7:0] ana_i, ana_q;

  adpll #(.AFILTER(AF_FSF_HA4), .FEEDBACK(FB_FILTER)) dut (.*);
  always #4 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (LOCK + RAMP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned theta, dtheta;
  real f_now;

  function automatic real deg(input longint unsigned d);
    real t;
    t = real'(d >> 11) / real'(64'd1 << 53);
    if (t >= 0.5) t = t - 1.0;
    return t * 360.0;
  endfunction

  initial begin
    real e, d, maxe_lock, maxe_ramp, sr, dmin, dmax, rms_deg;
    int nr;
    theta  = 64'h2222_0000_0000_0000;
    f_now  = 4.8e6;
    dtheta = longint'(f_now / FS * 4294967296.0 * 1048576.0) << 12;
    ftw_centre = ACC_W'(longint'(4.848e6 / FS * 4294967296.0));
    x = '0;
    maxe_lock = 0.0; maxe_ramp = 0.0; sr = 0.0; nr = 0;
    dmin = 1.0e9; dmax = -1.0e9;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < LOCK + RAMP; n++) begin
      x <= ADC_W'(int'(7000.0 * $cos(TWO_PI * real'(theta >> 11) / real'(64'd1 << 53))));
      @(posedge clk);
      #1;
      theta = theta + dtheta;
      if (n >= LOCK) begin
        f_now  = f_now + 68.0e6 / FS;
        dtheta = longint'(f_now / FS * 4294967296.0 * 1048576.0) << 12;
      end
      e = deg((longint'(dut.u_dds.phase) << 32) - (theta + dtheta) - 64'h4000_0000_0000_0000);
      if (n > LOCK / 2 && n < LOCK) begin
        if (e > maxe_lock) maxe_lock = e;
        if (-e > maxe_lock) maxe_lock = -e;
        // detected minus true phase: a constant (the detector delay) plus
        // the ripple from the filter's image leakage
        d = deg((longint'(phase_x) << 48) - theta);
        if (d < dmin) dmin = d;
        if (d > dmax) dmax = d;
        sr += real'(err_raw) * real'(err_raw);
        nr++;
      end
      if (n > LOCK + RAMP / 10) begin
        if (e > maxe_ramp) maxe_ramp = e;
        if (-e > maxe_ramp) maxe_ramp = -e;
      end
    end
    rms_deg = $sqrt(sr / nr) * 360.0 / 65536.0;
    checks++;
    if (maxe_lock > 5.0) begin
      failures++;
      $display("lock: output phase error %f deg", maxe_lock);
    end
    checks++;
    if (maxe_ramp > 5.0) begin
      failures++;
      $display("ramp: output phase error %f deg", maxe_ramp);
    end
    checks++;
    if (dmax - dmin < 1.0 || rms_deg * 10.0 > (dmax - dmin) / 2.0) begin
      failures++;
      $display("ripple not cancelled: detector ripple +-%f deg, err_raw rms %f deg",
               (dmax - dmin) / 2.0, rms_deg);
    end
    $display("lock error %f deg, ramp error %f deg (to %f MHz)", maxe_lock, maxe_ramp, f_now / 1.0e6);
    $display("detector ripple +-%f deg, phase difference rms %f deg", (dmax - dmin) / 2.0, rms_deg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
