// dds: direct digital synthesizer, the numerically controlled oscillator
// of the PLL.
//
// A phase accumulator adds the frequency tuning word every clock
// (f_out = ftw / 2**ACC_W * fs) and its top LUT_AW bits address a sine
// table. The table holds round(AMP * sin(2*pi*k / 2**LUT_AW)) with
// AMP = 2**(DW-1) - 1 and is computed at elaboration time from a power
// series, so no data file is needed. The accumulator word is also brought
// out, since the PLL compares the DDS phase directly with the detected
// input phase (its top bits have the same turn-fraction format).
// The accumulator-plus-sine-table structure follows the published PLL;
// accumulator width, table size and amplitude are choices of this
// implementation.
//
// Interface: ftw is an ACC_W-bit unsigned tuning word; phase is the
// accumulator; sine is DW-bit two's complement. Synchronous active-high
// reset clears the accumulator and the output.
// Timing: phase(n+1) = phase(n) + ftw(n); sine(n+1) = table(phase(n)).
module dds #(
  parameter int ACC_W  = 32,
  parameter int LUT_AW = 10,
  parameter int DW     = 14
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [ACC_W-1:0]    ftw,
  output logic [ACC_W-1:0]    phase,
  output logic signed [DW-1:0] sine
);

  localparam int  NLUT = 2 ** LUT_AW;
  localparam real AMP  = real'(2 ** (DW - 1) - 1);

  // round(AMP * sin(2*pi*k/NLUT)) using the Taylor series on [-pi/2, pi/2]
  function automatic int sine_entry(input int k);
    real pi_c, a, a2, term, sum;
    pi_c = 3.14159265358979323846;
    a    = 2.0 * pi_c * real'(k) / real'(NLUT);   // 0 .. 2*pi
    if (a > 1.5 * pi_c)      a = a - 2.0 * pi_c;  // -pi/2 .. pi/2
    else if (a > 0.5 * pi_c) a = pi_c - a;        // sin(pi - a) = sin(a)
    a2   = a * a;
    term = a;
    sum  = 0.0;
    for (int n = 1; n < 30; n += 2) begin
      sum  = sum + term;
      term = -term * a2 / real'((n + 1) * (n + 2));
    end
    return int'(sum * AMP);   // real to int conversion rounds to nearest
  endfunction

  logic signed [DW-1:0] table_q [NLUT];
  for (genvar k = 0; k < NLUT; k++) begin : gen_table
    localparam logic signed [DW-1:0] V = DW'(sine_entry(k));
    assign table_q[k] = V;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      sine  <= '0;
    end else begin
      phase <= phase + ftw;
      sine  <= table_q[phase[ACC_W-1 -: LUT_AW]];
    end
  end

endmodule
