// hilbert_pll_top: the FPGA phase-locked loop with its family of
// multiplier-less Hilbert transformers.
//
// Three parts share one ADC sample stream:
//   * u_pll: the PLL prototype, locking a DDS to the input using the FIR
//     analytic filter H_A1, a CORDIC phase detector, a constant delay of
//     the DDS phase in the feedback path, the IIR low-pass F_LP and a PI
//     loop filter.
//   * u_pll4: the same PLL built with the frequency sampling filter H_A4
//     instead of H_A1. H_A4's group delay is not constant, so the DDS
//     output passes through a second H_A4 and phase detector in the
//     feedback path; the filter's phase ripple then appears in both
//     detected phases and cancels in their difference. Its analytic
//     input signal is the H_A4 output port ha4_i/ha4_q.
//   * the complex frequency sampling analytic filters H_A2 (narrow-band)
//     and H_A3 (linear phase, >40 dB suppression of negative frequencies),
//     each turning the same real input into an analytic signal without
//     multipliers, brought out as I/Q ports for comparison.
// The H_A1 PLL is the published prototype; the H_A4 PLL with filtered
// feedback is the improvement the document proposes for larger devices.
// Both PLLs get the same free-running tuning word ftw_centre.
//
// Interface (one sample per clock, synchronous active-high reset):
//   adc_x       ADC_W-bit input sample
//   ftw_centre  free-running DDS tuning word (f = ftw/2**32 * fs)
//   dac_y       DDS sine output to the DAC
//   pll_*       tuning word, detected phase and phase errors of the H_A1 PLL
//   dac4_y, pll4_*  the same for the H_A4 PLL
//   ha2_*       4 * H_A2 output (binary point 2 bits from the right)
//   ha3_*       36 * H_A3 output
//   ha4_*       16 * H_A4 output (binary point 4 bits from the right)
module hilbert_pll_top
  import hilbert_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst,
  input  logic signed [ADC_W-1:0]     adc_x,
  input  logic        [ACC_W-1:0]     ftw_centre,
  output logic signed [DAC_W-1:0]     dac_y,
  output logic        [ACC_W-1:0]     pll_ftw,
  output logic        [PHASE_W-1:0]   pll_phase_x,
  output logic signed [PHASE_W-1:0]   pll_err_raw,
  output logic signed [PHASE_W-1:0]   pll_err,
  output logic signed [DAC_W-1:0]     dac4_y,
  output logic        [ACC_W-1:0]     pll4_ftw,
  output logic        [PHASE_W-1:0]   pll4_phase_x,
  output logic signed [PHASE_W-1:0]   pll4_err_raw,
  output logic signed [PHASE_W-1:0]   pll4_err,
  output logic signed [ADC_W:0]       ha1_i,
  output logic signed [ADC_W:0]       ha1_q,
  output logic signed [ADC_W:0]       ha2_i,
  output logic signed [ADC_W:0]       ha2_q,
  output logic signed [ADC_W+5:0]     ha3_i,
  output logic signed [ADC_W+5:0]     ha3_q,
  output logic signed [ADC_W+7:0]     ha4_i,
  output logic signed [ADC_W+7:0]     ha4_q
);

  adpll u_pll (
    .clk, .rst,
    .x(adc_x), .ftw_centre,
    .y(dac_y), .ftw(pll_ftw),
    .phase_x(pll_phase_x),
    .err_raw(pll_err_raw), .err(pll_err),
    .ana_i(ha1_i), .ana_q(ha1_q)
  );

  fsf_ha2 #(.W(ADC_W)) u_ha2 (
    .clk, .rst, .x(adc_x),
    .yi(ha2_i), .yq(ha2_q)
  );

  adpll #(
    .AFILTER(AF_FSF_HA4),
    .FEEDBACK(FB_FILTER)
  ) u_pll4 (
    .clk, .rst,
    .x(adc_x), .ftw_centre,
    .y(dac4_y), .ftw(pll4_ftw),
    .phase_x(pll4_phase_x),
    .err_raw(pll4_err_raw), .err(pll4_err),
    .ana_i(ha4_i), .ana_q(ha4_q)
  );

  fsf_ha3 #(.W(ADC_W)) u_ha3 (
    .clk, .rst, .x(adc_x),
    .yi(ha3_i), .yq(ha3_q)
  );

endmodule
