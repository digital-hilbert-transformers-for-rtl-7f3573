// adpll: all-digital phase-locked loop with a Hilbert transformer as the
// front end of an arc-tangent phase detector.
//
// Signal flow (one sample per clock, clock = sampling rate fs):
//   x -> analytic filter -> cordic_pd -> phase_x ---------+
//                                                        (-) -> err_raw
//   DDS phase -> [FB_DELAY: z^-D | FB_FILTER: see below] -+
//   err_raw -> iir_lowpass_flp -> err -> pi_loop_filter -> ftw -> dds
// The input is made analytic, its phase is measured by CORDIC and compared
// with the phase of the DDS. Two feedback paths are available:
//   * FEEDBACK = FB_DELAY (default): the analytic filter must have a
//     constant group delay (H_A1). The DDS accumulator phase is delayed by
//     D = HA1_DELAY + CORDIC latency = 26 clocks, so both phases refer to
//     the same sample instant; in lock the accumulator phase equals the
//     input phase theta of x = A cos(theta), and the sine table outputs
//     sin(theta), 90 degrees behind the input.
//   * FEEDBACK = FB_FILTER: the DDS sine output passes through a second,
//     identical analytic filter and detector. Any filter can then be used,
//     also one with a frequency-dependent group delay such as H_A4, and the
//     gain-mismatch ripple of the filter appears on both phases alike. In
//     lock both filtered signals have the same phase: the sine output y
//     is in step with the input cosine x, so the accumulator phase leads
//     the input phase by a quarter turn.
// AFILTER selects H_A1 (AF_FIR_HA1, default) or H_A4 (AF_FSF_HA4); H_A4
// requires FB_FILTER. The remaining zero-mean phase ripple is removed by
// the multiplier-less low-pass F_LP before the PI controller.
// The default (H_A1, delayed-phase feedback, F_LP) is the loop of the
// published prototype; the filtered feedback with H_A4 is the published
// plan for a later version. The PI gains, the phase and accumulator
// widths and the placement of F_LP directly after the phase subtraction
// are choices of this implementation.
//
// Interface: x is a W-bit real sample; ftw_centre sets the free-running
// DDS frequency (f = ftw/2**AW * fs). Outputs: y the DDS sine, ftw the
// tuning word in use, phase_x the detected input phase, err_raw and err
// the phase difference before and after F_LP (PW-bit signed, 2*pi =
// 2**PW), ana_i/ana_q the analytic input signal. Synchronous active-high
// reset. The accumulator word itself is not compared in FB_FILTER mode,
// and only its top PW bits are in FB_DELAY mode; the I/Q pair of the
// feedback filter (fb_i/fb_q) is not needed either. Lint reports these
// bits as unused; they stay because the sub-blocks produce them anyway.
module adpll
  import hilbert_pkg::*;
#(
  parameter afilter_e  AFILTER  = AF_FIR_HA1,
  parameter feedback_e FEEDBACK = FB_DELAY,
  parameter int W        = ADC_W,
  parameter int PW       = PHASE_W,
  parameter int AW       = ACC_W,
  parameter int TABLE_AW = LUT_AW,
  parameter int DW       = DAC_W,
  parameter int STAGES   = CORDIC_STAGES,
  parameter int M        = LP_M,
  parameter int ORDER    = LP_ORDER,
  parameter int KP_SHIFT = 8,
  parameter int KI_SHIFT = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [W-1:0]  x,
  input  logic        [AW-1:0] ftw_centre,
  output logic signed [DW-1:0] y,
  output logic        [AW-1:0] ftw,
  output logic        [PW-1:0] phase_x,
  output logic signed [PW-1:0] err_raw,
  output logic signed [PW-1:0] err,
  output logic signed [analytic_width(AFILTER, W)-1:0] ana_i,
  output logic signed [analytic_width(AFILTER, W)-1:0] ana_q
);

  if (AFILTER == AF_FSF_HA4 && FEEDBACK == FB_DELAY) begin : gen_cfg_check
    $error("adpll: H_A4 has no constant group delay and needs FEEDBACK = FB_FILTER");
  end

  logic [AW-1:0] dds_phase;
  logic [PW-1:0] phase_y;

  analytic_pd #(.AF(AFILTER), .W(W), .PW(PW), .STAGES(STAGES)) u_in (
    .clk, .rst, .x,
    .ana_i, .ana_q,
    .phase(phase_x)
  );

  if (FEEDBACK == FB_DELAY) begin : gen_fb_delay
    localparam int D = HA1_DELAY + cordic_latency(STAGES);
    phase_delay #(.W(PW), .D(D)) u_delay (
      .clk, .rst,
      .d(dds_phase[AW-1 -: PW]),
      .q(phase_y)
    );
  end else begin : gen_fb_filter
    logic signed [analytic_width(AFILTER, DW)-1:0] fb_i, fb_q;
    analytic_pd #(.AF(AFILTER), .W(DW), .PW(PW), .STAGES(STAGES)) u_fb (
      .clk, .rst,
      .x(y),
      .ana_i(fb_i), .ana_q(fb_q),
      .phase(phase_y)
    );
  end

  // Phase comparison; modulo-2*pi wrap is the natural overflow
  always_ff @(posedge clk) begin
    if (rst) err_raw <= '0;
    else     err_raw <= signed'(phase_x - phase_y);
  end

  iir_lowpass_flp #(.W(PW), .M(M), .ORDER(ORDER)) u_lp (
    .clk, .rst,
    .x(err_raw), .y(err)
  );

  pi_loop_filter #(.EW(PW), .FW(AW), .KP_SHIFT(KP_SHIFT), .KI_SHIFT(KI_SHIFT)) u_pi (
    .clk, .rst,
    .e(err), .ftw_centre,
    .ftw
  );

  dds #(.ACC_W(AW), .LUT_AW(TABLE_AW), .DW(DW)) u_dds (
    .clk, .rst, .ftw,
    .phase(dds_phase),
    .sine(y)
  );

endmodule
