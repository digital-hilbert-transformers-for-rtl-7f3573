// fsf_ha2: narrow-band analytic filter H_A2(z) = 1/4 * F_z4(z) * C_+90(z),
// built as a multiplier-less complex frequency sampling filter.
//
// The comb 1 - z^-4 puts zeros at 0, +90, 180 and -90 degrees; the
// resonator C_+90 cancels the one at +90 degrees. What remains is an FIR
// filter whose pass-band is centred on +fs/4 and which has zeros at DC,
// fs/2 and -fs/4, so a real input becomes an analytic output there. The
// cancellation is exact because all arithmetic is integer: the equivalent
// FIR response is  z^-1 (1 + j z^-1 - z^-2 - j z^-3), linear phase, with
// no multiplier and three adders. Structure and scaling follow the
// published design.
//
// Interface: x is a W-bit real input sample per clock. yi, yq are the
// unscaled (W+1)-bit integer result, 4 * H_A2: the 1/4 that normalises the
// pass-band to 0 dB is a binary point two bits from the right, not a
// shift, so no precision is lost. Synchronous active-high reset.
// Timing: yi(n) = x(n-2) - x(n-4), yq(n) = x(n-3) - x(n-5) (the comb has an
// output register, so the whole filter is z^-1 * 4*H_A2(z)).
module fsf_ha2 #(
  parameter int W = 14
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W:0]   yi,
  output logic signed [W:0]   yq
);

  localparam int IW = W + 1;   // |x(n-a) - x(n-b)| < 2**W

  logic signed [IW-1:0] ci, cq;

  fsf_comb #(.W(IW), .N(4)) u_comb (
    .clk, .rst,
    .xi(IW'(x)), .xq('0),
    .yi(ci), .yq(cq)
  );

  fsf_cplus90 #(.W(IW)) u_c90 (
    .clk, .rst,
    .xi(ci), .xq(cq),
    .yi(yi), .yq(yq)
  );

endmodule
