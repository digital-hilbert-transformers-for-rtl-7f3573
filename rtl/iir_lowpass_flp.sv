// iir_lowpass_flp: cascade of multiplier-less first-order IIR low-pass
// filters, used to remove the zero-mean dynamic phase error (at twice the
// signal frequency) that an analytic filter with I/Q gain mismatch leaves
// on the detected phase.
//
// Each stage is the backward-difference discretisation of 1/(1 + s*Tc)
// with the restriction b0 = 2**-M, hence a1 = 2**-M - 1:
//   y(n) = y(n-1) + 2**-M * (x(n) - y(n-1)),
// whose 3-dB cut-off is at the angular frequency 1/Tc = fs/(2**M - 1), i.e.
// fc = fs / (2*pi*(2**M - 1)) in Hz for one stage (M = 4: about fs/94).
// It is built on a state s = y * 2**M kept with M extra fraction bits:
//   s(n+1) = s(n) - (s(n) >>> M) + x(n),   y(n) = s(n) >>> M,
// so one stage is a shift, one subtractor and one adder, and no multiplier.
// ORDER stages are cascaded to raise the stop-band attenuation.
// The structure and the b0 = 2**-M rule follow the published design. The
// defaults M = 8 (fc ~ fs/255, ~0.004 fs) and ORDER = 3 are read from the
// published result table (cut-off 0.004 fs, 6 adders); the state
// register being the output (one extra sample of delay per stage) and the
// floor truncation are choices of this implementation.
//
// Interface: one sample per clock, synchronous active-high reset that
// clears all states. x and y are W-bit two's complement; the DC gain is
// exactly one (a constant input settles to the same constant output).
// Timing: each stage is F_LP(z) * z^-1, so the cascade has ORDER cycles of
// pure delay on top of the filter's own response.
module iir_lowpass_flp #(
  parameter int W     = 16,
  parameter int M     = 4,
  parameter int ORDER = 3
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam int SW = W + M + 1;   // state width (one guard bit)

  logic signed [SW-1:0] s   [ORDER];
  logic signed [W-1:0]  out [ORDER];

  for (genvar k = 0; k < ORDER; k++) begin : gen_stage
    logic signed [W-1:0] xin;
    if (k == 0) begin : gen_first
      assign xin = x;
    end else begin : gen_next
      assign xin = out[k-1];
    end

    always_ff @(posedge clk) begin
      if (rst) s[k] <= '0;
      else     s[k] <= s[k] - (s[k] >>> M) + SW'(xin);
    end

    assign out[k] = W'(s[k] >>> M);
  end

  assign y = out[ORDER-1];

endmodule
