// tb_ramp_workload: the full accelerating-frequency workload of the PLL.
// The input sweeps from 0.8 MHz to 5.4 MHz at 68 MHz/s (fs = 120 MHz),
// i.e. 8.1 million samples, after a 60000-sample lock at 0.8 MHz. Over the
// whole sweep the DDS phase must stay within 5 degrees of the input phase
// of the same sample, and at the end the tuning word must match the input
// frequency within 0.01 %. The maximum error is reported per 0.5 MHz band.
// Both PLLs of the top run the sweep: the H_A1 prototype and the H_A4 PLL
// with filtered feedback (whose accumulator leads the input phase by a
// quarter turn).
module tb_ramp_workload;
  import hilbert_pkg::*;
  localparam real TWO_PI = 6.28318530717958647692;
  localparam real FS     = 120.0e6;
  localparam real F_LO   = 0.8e6;
  localparam real F_HI   = 5.4e6;
  localparam real RATE   = 68.0e6;
  localparam int  LOCK   = 60000;
  localparam int  NRAMP  = int'((F_HI - F_LO) / RATE * FS);

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

  initial begin
    repeat (LOCK + NRAMP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned theta, dtheta;
  real f_now, e, e4, band_max, all_max, band_max4, all_max4, next_band;

  function automatic real deg(input longint unsigned d);
    real t;
    t = real'(d >> 11) / real'(64'd1 << 53);
    if (t >= 0.5) t = t - 1.0;
    return t * 360.0;
  endfunction

  initial begin
    theta = 64'h7000_0000_0000_0000;
    f_now = F_LO;
    dtheta = longint'(f_now / FS * 4294967296.0 * 1048576.0) << 12;
    ftw_centre = ACC_W'(longint'(F_LO / FS * 4294967296.0));
    adc_x = '0;
    band_max = 0.0; all_max = 0.0; band_max4 = 0.0; all_max4 = 0.0; next_band = 1.3e6;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < LOCK + NRAMP; n++) begin
      adc_x <= ADC_W'(int'(7000.0 * $cos(TWO_PI * real'(theta >> 11) / real'(64'd1 << 53))));
      @(posedge clk);
      #1;
      theta = theta + dtheta;
      if (n >= LOCK) begin
        f_now  = f_now + RATE / FS;
        dtheta = longint'(f_now / FS * 4294967296.0 * 1048576.0) << 12;
      end
      if (n >= LOCK / 2) begin
        e = deg((longint'(dut.u_pll.u_dds.phase) << 32) - theta);
        if (e < 0.0) e = -e;
        if (e > band_max) band_max = e;
        if (e > all_max) all_max = e;
        checks++;
        if (e > 5.0) begin
          failures++;
          if (failures < 10) $display("n=%0d f=%f MHz phase error %f deg", n, f_now / 1.0e6, e);
        end
        e4 = deg((longint'(dut.u_pll4.u_dds.phase) << 32) - (theta + dtheta) - 64'h4000_0000_0000_0000);
        if (e4 < 0.0) e4 = -e4;
        if (e4 > band_max4) band_max4 = e4;
        if (e4 > all_max4) all_max4 = e4;
        checks++;
        if (e4 > 5.0) begin
          failures++;
          if (failures < 10) $display("n=%0d f=%f MHz H_A4 PLL phase error %f deg", n, f_now / 1.0e6, e4);
        end
        if (f_now >= next_band) begin
          $display("up to %4.1f MHz: max phase error %f deg (H_A1 PLL), %f deg (H_A4 PLL)",
                   next_band / 1.0e6, band_max, band_max4);
          band_max = 0.0;
          band_max4 = 0.0;
          next_band = next_band + 0.5e6;
        end
      end
    end
    $display("sweep end %f MHz, max phase error %f deg (H_A1 PLL), %f deg (H_A4 PLL) over %0d samples",
             f_now / 1.0e6, all_max, all_max4, NRAMP);
    checks++;
    if (real'(pll_ftw) / 4294967296.0 * FS < f_now * 0.9999 || real'(pll_ftw) / 4294967296.0 * FS > f_now * 1.0001) begin
      failures++;
      $display("final tuning word off: %f MHz", real'(pll_ftw) / 4294967296.0 * FS / 1.0e6);
    end
    checks++;
    if (real'(pll4_ftw) / 4294967296.0 * FS < f_now * 0.9999 || real'(pll4_ftw) / 4294967296.0 * FS > f_now * 1.0001) begin
      failures++;
      $display("H_A4 PLL final tuning word off: %f MHz", real'(pll4_ftw) / 4294967296.0 * FS / 1.0e6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
