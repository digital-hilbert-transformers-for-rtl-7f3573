// fsf_ha4: analytic filter with flat pass-band
//   H_A4(z) = 9/4 * H_A3(z) * C_P(z)^2,  C_P(z) = z^-2 / (1 - 1/2 z^-2).
//
// The linear-phase H_A3 is followed by two pole-pair sections with poles at
// +-1/sqrt(2). They lift the pass-band edges so that the magnitude becomes
// flat and equiripple over almost all positive frequencies, while negative
// frequencies stay suppressed by more than 40 dB. The group delay is no
// longer constant. C_P has gain 2/3 at fs/4, so C_P^2 supplies exactly the
// 4/9 that H_A3 leaves out: the output is the integer 16 * H_A4, i.e. H_A4
// with a binary point four bits from the right. The structure follows the
// published design; the GF guard fraction bits kept inside the pole
// recursions, and the floor truncation of them at the output, are choices
// of this implementation.
//
// Interface: x is a W-bit real input sample per clock.
//   y3i, y3q  (W+6)-bit H_A3 output of the inner filter (36 * H_A3)
//   yi, yq    (W+8)-bit output, 16 * H_A4
// Synchronous active-high reset.
// Timing: y3 as in fsf_ha3; y = y3 through the two sections (z^-4 and the
// pole responses).
module fsf_ha4 #(
  parameter int W  = 14,
  parameter int GF = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [W-1:0]   x,
  output logic signed [W+5:0]   y3i,
  output logic signed [W+5:0]   y3q,
  output logic signed [W+7:0]   yi,
  output logic signed [W+7:0]   yq
);

  localparam int W1 = W + 7 + GF;   // after first C_P, GF fraction bits
  localparam int W2 = W + 8 + GF;   // after second C_P

  logic signed [W1-1:0] p1i, p1q;
  logic signed [W2-1:0] p2i, p2q;

  fsf_ha3 #(.W(W)) u_ha3 (
    .clk, .rst, .x,
    .yi(y3i), .yq(y3q)
  );

  fsf_cp #(.WI(W + 6), .FRAC_IN(0), .FRAC_OUT(GF)) u_cp1 (
    .clk, .rst,
    .xi(y3i), .xq(y3q),
    .yi(p1i), .yq(p1q)
  );

  fsf_cp #(.WI(W1), .FRAC_IN(GF), .FRAC_OUT(GF)) u_cp2 (
    .clk, .rst,
    .xi(p1i), .xq(p1q),
    .yi(p2i), .yq(p2q)
  );

  assign yi = (W + 8)'(p2i >>> GF);
  assign yq = (W + 8)'(p2q >>> GF);

endmodule
