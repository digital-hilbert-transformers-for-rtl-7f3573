// fir_hilbert_ha1: FIR analytic filter H_A1(z) = z^-N/2 + j*H_H1(z).
//
// Turns a real sample stream into an analytic (I/Q) stream. The imaginary
// part comes from an order-10 FIR approximation of the Hilbert transform,
//   H_H1(z) = z^-5 * sum_{k=-5..5} b_k z^-k,  b_-k = -b_k, b_even = 0,
// with b1 = 163/256, b3 = 54/256, b5 = 32/256. The real part is the input
// delayed by the same 5 samples, so I and Q have identical, constant group
// delay and the Hilbert part has an exact 90 degree phase; only its gain
// varies with frequency.
//
// How it works: an 11-tap delay line feeds three pre-subtractors that use
// the odd symmetry (x[n-5-k] - x[n-5+k]), then the three constant products
// are built from shifts and adds in canonic signed digit form
// (163 = 128+32+4-1, 54 = 64-8-2, 32 = 32) and summed: 3 pre-subtractors,
// 5 adders in the constants, 2 in the final sum, 10 in all, no multipliers.
// The coefficients, the symmetry trick and the CSD constants follow the
// published design; the pipeline placement and the truncation are choices
// of this implementation.
//
// Interface: one sample per clock, synchronous active-high reset.
//   x          W-bit two's complement input
//   y_i, y_q   (W+1)-bit outputs. y_i is x sign-extended; y_q is the sum
//              of products divided by 256 with truncation towards minus
//              infinity (floor), so |y_q| < 2**W always fits.
// Timing: y_i(n) = x(n-8). y_q(n) is the Hilbert output centred on the same
// sample, i.e. HA1_DELAY = 8 cycles from input to centred output.
module fir_hilbert_ha1
  import hilbert_pkg::*;
#(
  parameter int W = ADC_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W:0]   y_i,
  output logic signed [W:0]   y_q
);

  localparam int NTAP = HA1_ORDER + 1;
  localparam int DW   = W + 1;             // pre-subtractor width
  localparam int SW   = DW + HA1_FRAC + 1; // product-sum width

  // Tap delay line: tap[k] holds x(n-1-k)
  logic signed [W-1:0] tap [NTAP];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAP; k++) tap[k] <= '0;
    end else begin
      tap[0] <= x;
      for (int k = 1; k < NTAP; k++) tap[k] <= tap[k-1];
    end
  end

  // Stage A: odd-symmetry pre-subtraction and centre tap
  logic signed [DW-1:0] d1, d3, d5;
  logic signed [W-1:0]  centre;

  always_ff @(posedge clk) begin
    if (rst) begin
      d1     <= '0;
      d3     <= '0;
      d5     <= '0;
      centre <= '0;
    end else begin
      d1     <= DW'(tap[6])  - DW'(tap[4]);
      d3     <= DW'(tap[8])  - DW'(tap[2]);
      d5     <= DW'(tap[10]) - DW'(tap[0]);
      centre <= tap[5];
    end
  end

  // The CSD shift/add patterns below must equal the coefficient constants
  if (128 + 32 + 4 - 1 != HA1_B1 || 64 - 8 - 2 != HA1_B3 || 32 != HA1_B5) begin : gen_csd_check
    $error("fir_hilbert_ha1: CSD patterns do not match the coefficients");
  end

  // Stage B: CSD constant multiplication and sum
  logic signed [SW-1:0] e1, e3, e5, p1, p3, p5, acc;

  always_comb begin
    e1  = SW'(d1);
    e3  = SW'(d3);
    e5  = SW'(d5);
    p1  = (e1 <<< 7) + (e1 <<< 5) + (e1 <<< 2) - e1;   // 163
    p3  = (e3 <<< 6) - (e3 <<< 3) - (e3 <<< 1);        // 54
    p5  = (e5 <<< 5);                                  // 32
    acc = p1 + p3 + p5;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y_i <= '0;
      y_q <= '0;
    end else begin
      y_i <= (W+1)'(centre);
      y_q <= (W+1)'(acc >>> HA1_FRAC);
    end
  end

endmodule
