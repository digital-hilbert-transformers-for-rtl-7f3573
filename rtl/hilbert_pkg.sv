// hilbert_pkg: constants shared by the Hilbert-transformer PLL.
//
// Sample and phase formats used across the design:
//   * ADC samples are 14-bit two's complement (the converter of the
//     original prototype board is a 14-bit part), one sample per clock,
//     so the clock is the sampling clock fs.
//   * Phase is an unsigned fraction of a full turn: PHASE_W bits, 2*pi
//     equals 2**PHASE_W, so phase differences wrap for free.
//   * The DDS phase accumulator is ACC_W bits wide; its top PHASE_W bits
//     are the DDS phase in the same format.
// The FIR Hilbert coefficients b1, b3, b5 (in 1/256) are those of the
// published order-10 least-squares design; widths of phase, accumulator
// and sine table are choices of this implementation.
package hilbert_pkg;

  // Sample widths
  localparam int ADC_W   = 14;   // input sample width
  localparam int DAC_W   = 14;   // DDS sine output width

  // Phase formats
  localparam int PHASE_W = 16;   // phase detector output, 2*pi = 2**PHASE_W
  localparam int ACC_W   = 32;   // DDS phase accumulator / tuning word
  localparam int LUT_AW  = 10;   // sine table address width

  // FIR Hilbert filter H_A1: order N = 10, odd-symmetric, 8-bit coefficients
  localparam int HA1_ORDER   = 10;
  localparam int HA1_FRAC    = 8;     // coefficients are integers / 2**8
  localparam int HA1_B1      = 163;
  localparam int HA1_B3      = 54;
  localparam int HA1_B5      = 32;
  // Cycles from a sample at the H_A1 input to the output sample that is
  // centred on it: N/2 = 5 of filter delay plus 3 register stages.
  localparam int HA1_DELAY   = HA1_ORDER/2 + 3;

  // CORDIC phase detector
  localparam int CORDIC_STAGES = 16;
  // Latency of cordic_pd: pre-rotation register, one register per
  // iteration, output register.
  function automatic int cordic_latency(input int stages);
    return stages + 2;
  endfunction

  // Multiplier-less IIR low-pass F_LP: b0 = 2**-M, cascade of LP_ORDER stages
  localparam int LP_M     = 4;
  localparam int LP_ORDER = 3;


  // PLL configurations
  // Analytic filter in front of the phase detector
  typedef enum logic {
    AF_FIR_HA1 = 1'b0,   // FIR Hilbert filter H_A1 (constant group delay)
    AF_FSF_HA4 = 1'b1    // complex frequency sampling filter H_A4
  } afilter_e;
  // How the DDS phase reaches the phase comparison
  typedef enum logic {
    FB_DELAY  = 1'b0,    // accumulator phase through a matching delay z^-D
    FB_FILTER = 1'b1     // DDS output through a second analytic filter and detector
  } feedback_e;

  // Width of the analytic signal produced by a filter for W-bit input
  function automatic int analytic_width(input afilter_e af, input int w);
    return (af == AF_FIR_HA1) ? w + 1 : w + 8;
  endfunction

endpackage
