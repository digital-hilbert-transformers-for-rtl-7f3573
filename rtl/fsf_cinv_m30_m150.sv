// fsf_cinv_m30_m150: inverse of the complex resonator C_-30/-150, used as
// a complex FIR section  1 + j z^-1 - z^-2.
//
// Its two zeros lie at -30 and -150 degrees and deepen the stop-band of the
// analytic filters for negative frequencies. With j costing only a swap and
// a negation the section is
//   yi = xi(n) - xq(n-1) - xi(n-2)
//   yq = xq(n) + xi(n-1) - xq(n-2)
// The zeros follow the published design; the inverse of C = z^-2/(...) is
// non-causal by z^2, which is dropped here, and an output register is
// added, so this section realises z^-1 * (1 + j z^-1 - z^-2).
//
// Interface: W-bit two's complement I/Q, wrap-around arithmetic,
// synchronous active-high reset.
module fsf_cinv_m30_m150 #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] xi,
  input  logic signed [W-1:0] xq,
  output logic signed [W-1:0] yi,
  output logic signed [W-1:0] yq
);

  logic signed [W-1:0] i1, q1, i2, q2;   // x(n-1), x(n-2)

  always_ff @(posedge clk) begin
    if (rst) begin
      i1 <= '0;
      q1 <= '0;
      i2 <= '0;
      q2 <= '0;
      yi <= '0;
      yq <= '0;
    end else begin
      i1 <= xi;
      q1 <= xq;
      i2 <= i1;
      q2 <= q1;
      yi <= xi - q1 - i2;
      yq <= xq + i1 - q2;
    end
  end

endmodule
