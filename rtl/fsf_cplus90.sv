// fsf_cplus90: complex resonator C_+90(z) = z^-1 / (1 - j z^-1).
//
// A single pole at z = +j (+90 degrees) on the unit circle, which cancels
// the comb zero at +90 degrees and so passes positive frequencies around
// fs/4 while the zero at -90 degrees stays. The complex coefficient j costs
// no multiplier: (a + jb) * j = -b + ja, a swap of real and imaginary part
// with one negation, so the filter is two registers and two adders:
//   yi(n+1) = xi(n) - yq(n)
//   yq(n+1) = xq(n) + yi(n)
// This is the published structure of the resonator. Arithmetic is W-bit
// wrap-around (see fsf_comb): the pole is only stable because an
// exactly matching comb zero precedes it.
//
// Interface: W-bit two's complement I/Q, synchronous active-high reset.
// Timing: the z^-1 of the transfer function is the register; y is the
// register output.
module fsf_cplus90 #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] xi,
  input  logic signed [W-1:0] xq,
  output logic signed [W-1:0] yi,
  output logic signed [W-1:0] yq
);

  always_ff @(posedge clk) begin
    if (rst) begin
      yi <= '0;
      yq <= '0;
    end else begin
      yi <= xi - yq;
      yq <= xq + yi;
    end
  end

endmodule
