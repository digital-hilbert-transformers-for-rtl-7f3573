// pi_loop_filter: PI controller F(z) of the PLL.
//
// Converts the (low-pass filtered) phase difference into the DDS frequency
// tuning word:
//   acc(n+1) = acc(n) + e(n)
//   ftw(n+1) = ftw_centre + (e(n) << KP_SHIFT) + (acc(n+1) >>> KI_SHIFT)
// The proportional path sets the loop bandwidth; the integrator makes the
// loop type II, so a frequency offset is tracked with zero mean phase
// error. Gains are powers of two, so the controller needs no multiplier.
// A PI controller as loop filter is what the published PLL names; its
// gains and widths are not published, so the shift gains, the wrap-around
// arithmetic and the widths are choices of this implementation. The
// defaults, for the 16-bit phase and 32-bit tuning-word formats of
// hilbert_pkg, give a proportional gain of 2**-8 rad/sample per rad (loop
// bandwidth about fs/1600) and an integral gain of 2**-18: a frequency
// ramp of 68 MHz/s at fs = 120 MHz then leaves a steady phase error of
// about 0.5 degree.
//
// Interface: e is an EW-bit two's complement phase error (2*pi = 2**EW);
// ftw_centre and ftw are FW-bit tuning words. Synchronous active-high
// reset clears the integrator and loads ftw with ftw_centre.
// Timing: ftw is registered, one cycle after e.
module pi_loop_filter #(
  parameter int EW       = 16,
  parameter int FW       = 32,
  parameter int KP_SHIFT = 8,
  parameter int KI_SHIFT = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [EW-1:0] e,
  input  logic        [FW-1:0] ftw_centre,
  output logic        [FW-1:0] ftw
);

  localparam int AW = FW + KI_SHIFT;   // integrator width

  logic signed [AW-1:0] acc, acc_next;
  logic signed [FW-1:0] p_term, i_term;

  always_comb begin
    acc_next = acc + AW'(e);
    p_term   = FW'(e) <<< KP_SHIFT;
    i_term   = FW'(acc_next >>> KI_SHIFT);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      ftw <= ftw_centre;
    end else begin
      acc <= acc_next;
      ftw <= ftw_centre + p_term + i_term;
    end
  end

endmodule
