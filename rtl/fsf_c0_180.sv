// fsf_c0_180: real resonator pair C_0/180(z) = z^-2 / (1 - z^-2).
//
// Poles at 0 and 180 degrees; in the analytic filters they cancel the comb
// zeros at DC and fs/2 and so widen the pass-band. Real coefficients, so
// the same recursion runs on the real and on the imaginary part:
//   r1(n+1) = x(n) + r2(n),  r2(n+1) = r1(n),  y(n) = r2(n)
// giving y(n) = x(n-2) + y(n-2). Arithmetic is W-bit wrap-around (see
// fsf_comb). The transfer function is the published one; the two-register
// form is a choice of this implementation.
//
// Interface: W-bit two's complement I/Q, synchronous active-high reset.
// Timing: the z^-2 of the transfer function are the two registers.
module fsf_c0_180 #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] xi,
  input  logic signed [W-1:0] xq,
  output logic signed [W-1:0] yi,
  output logic signed [W-1:0] yq
);

  logic signed [W-1:0] r1i, r1q;

  always_ff @(posedge clk) begin
    if (rst) begin
      r1i <= '0;
      r1q <= '0;
      yi  <= '0;
      yq  <= '0;
    end else begin
      r1i <= xi + yi;
      r1q <= xq + yq;
      yi  <= r1i;
      yq  <= r1q;
    end
  end

endmodule
