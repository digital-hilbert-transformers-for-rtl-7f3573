// fsf_comb: complex comb F_zN(z) = 1 - z^-N of a frequency sampling filter.
//
// Places N equally spaced zeros on the unit circle (at multiples of
// 360/N degrees); the resonators that follow cancel some of them to form
// the pass-band. Applied to the real and the imaginary part alike (for a
// real input, tie xq to zero and the imaginary path is constant zero).
// Arithmetic is W-bit wrap-around: as in a CIC filter, the recursive
// resonators after the comb overflow harmlessly as long as the final
// filter output fits in W bits.
// The comb is the published structure; the output register is a choice of
// this implementation.
//
// Interface: W-bit two's complement I/Q in and out, synchronous
// active-high reset.
// Timing: y(n) = x(n-1) - x(n-1-N), i.e. z^-1 * (1 - z^-N).
module fsf_comb #(
  parameter int W = 16,
  parameter int N = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] xi,
  input  logic signed [W-1:0] xq,
  output logic signed [W-1:0] yi,
  output logic signed [W-1:0] yq
);

  logic signed [W-1:0] di [N];
  logic signed [W-1:0] dq [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N; k++) begin
        di[k] <= '0;
        dq[k] <= '0;
      end
      yi <= '0;
      yq <= '0;
    end else begin
      di[0] <= xi;
      dq[0] <= xq;
      for (int k = 1; k < N; k++) begin
        di[k] <= di[k-1];
        dq[k] <= dq[k-1];
      end
      yi <= xi - di[N-1];
      yq <= xq - dq[N-1];
    end
  end

endmodule
