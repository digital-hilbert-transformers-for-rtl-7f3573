// fsf_ha3: linear-phase analytic filter
//   H_A3(z) = 4/9 * (H_A2(z) * C_0/180(z) * C^-1_-30/-150(z))^2
// built as a multiplier-less complex frequency sampling filter.
//
// One section is comb (1 - z^-4), resonator C_+90, resonator pair C_0/180
// and the complex FIR 1 + j z^-1 - z^-2. The resonators cancel the comb
// zeros at +90, 0 and 180 degrees, which leaves a pass-band over most of
// the positive frequencies, and the FIR adds zeros at -30 and -150 degrees.
// Two identical sections in series square the response for a stop-band of
// over 40 dB on negative frequencies. Exact pole/zero cancellation in
// wrap-around integer arithmetic keeps the overall response FIR and
// linear-phase; every section runs at the final output width W+6, which
// holds the largest possible output (sum of |coefficients| = 36).
// One section equals  z^-5 * P(z),  P(z) = (1 + j z^-1)(1 + j z^-1 - z^-2)
//                                         = 1 + 2j z^-1 - 2 z^-2 - j z^-3,
// so the filter is z^-10 * P(z)^2. The sections follow the published
// design. The normalisation 4/9 is not a power of two and is not applied:
// the outputs are the exact integers 36 * H_A3 (pass-band centre gain 36),
// i.e. 9/4 * H_A3 with a binary point four bits from the right. The phase
// is unaffected, and fsf_ha4's pole sections provide the 4/9 exactly.
//
// Interface: x is a W-bit real input sample per clock; yi, yq are (W+6)-bit
// two's complement. Synchronous active-high reset.
// Timing: the output is z^-10 * P(z)^2 applied to x; group delay 13 cycles.
module fsf_ha3 #(
  parameter int W = 14
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [W-1:0]   x,
  output logic signed [W+5:0]   yi,
  output logic signed [W+5:0]   yq
);

  localparam int IW = W + 6;

  // a: comb out, b: C_+90 out, c: C_0/180 out, d: section out
  logic signed [IW-1:0] a1i, a1q, b1i, b1q, c1i, c1q, d1i, d1q;
  logic signed [IW-1:0] a2i, a2q, b2i, b2q, c2i, c2q;

  // Section 1 (real input)
  fsf_comb #(.W(IW), .N(4)) u_comb1 (
    .clk, .rst, .xi(IW'(x)), .xq('0), .yi(a1i), .yq(a1q)
  );
  fsf_cplus90 #(.W(IW)) u_c90_1 (
    .clk, .rst, .xi(a1i), .xq(a1q), .yi(b1i), .yq(b1q)
  );
  fsf_c0_180 #(.W(IW)) u_c0180_1 (
    .clk, .rst, .xi(b1i), .xq(b1q), .yi(c1i), .yq(c1q)
  );
  fsf_cinv_m30_m150 #(.W(IW)) u_cinv1 (
    .clk, .rst, .xi(c1i), .xq(c1q), .yi(d1i), .yq(d1q)
  );

  // Section 2 (complex input)
  fsf_comb #(.W(IW), .N(4)) u_comb2 (
    .clk, .rst, .xi(d1i), .xq(d1q), .yi(a2i), .yq(a2q)
  );
  fsf_cplus90 #(.W(IW)) u_c90_2 (
    .clk, .rst, .xi(a2i), .xq(a2q), .yi(b2i), .yq(b2q)
  );
  fsf_c0_180 #(.W(IW)) u_c0180_2 (
    .clk, .rst, .xi(b2i), .xq(b2q), .yi(c2i), .yq(c2q)
  );
  fsf_cinv_m30_m150 #(.W(IW)) u_cinv2 (
    .clk, .rst, .xi(c2i), .xq(c2q), .yi(yi), .yq(yq)
  );

endmodule
