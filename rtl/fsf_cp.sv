// fsf_cp: pole-pair section C_P(z) = z^-2 / (1 - zp^2 z^-2), zp^2 = 1/2.
//
// Two real poles at +-zp = +-1/sqrt(2), inside the unit circle. Two of
// these after the linear-phase filter H_A3 flatten its pass-band into an
// equiripple shape (giving H_A4), at the price of a group delay that is no
// longer constant. The coefficient 1/2 is a one-bit shift:
//   r1(n+1) = x(n) + (r2(n) >>> 1),  r2(n+1) = r1(n),  y(n) = r2(n)
// The section is the published one; the number of fraction bits carried
// in the recursion (FRAC_OUT - FRAC_IN extra bits) and the floor
// truncation of the shift are choices of this implementation. The peak
// gain of the section is 2 (at DC and fs/2), so the output has one more
// integer bit than the input.
//
// Interface: x is WI bits with FRAC_IN fraction bits; y is WI + 1 +
// (FRAC_OUT - FRAC_IN) bits with FRAC_OUT fraction bits. Synchronous
// active-high reset.
// Timing: the z^-2 of the transfer function are the two registers.
module fsf_cp #(
  parameter int WI       = 20,
  parameter int FRAC_IN  = 0,
  parameter int FRAC_OUT = 8
) (
  input  logic                                          clk,
  input  logic                                          rst,
  input  logic signed [WI-1:0]                          xi,
  input  logic signed [WI-1:0]                          xq,
  output logic signed [WI+FRAC_OUT-FRAC_IN:0]           yi,
  output logic signed [WI+FRAC_OUT-FRAC_IN:0]           yq
);

  localparam int WO = WI + 1 + FRAC_OUT - FRAC_IN;

  logic signed [WO-1:0] ei, eq, r1i, r1q;

  always_comb begin
    ei = WO'(xi) <<< (FRAC_OUT - FRAC_IN);
    eq = WO'(xq) <<< (FRAC_OUT - FRAC_IN);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r1i <= '0;
      r1q <= '0;
      yi  <= '0;
      yq  <= '0;
    end else begin
      r1i <= ei + (yi >>> 1);
      r1q <= eq + (yq >>> 1);
      yi  <= r1i;
      yq  <= r1q;
    end
  end

endmodule
