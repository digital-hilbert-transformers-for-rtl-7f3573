// cordic_pd: arc-tangent phase detector for an analytic signal.
//
// Computes the four-quadrant phase atan2(Q, I) of the complex sample
// I + jQ with a pipelined CORDIC in vectoring mode. Because the input is
// analytic, this phase is the instantaneous phase of the original real
// signal, which is what the PLL compares.
//
// How it works: a pre-rotation stage maps the left half plane onto the
// right one (negate I and Q, start the angle at half a turn). Each of the
// STAGES iterations then rotates the vector by +-atan(2**-i) towards the
// positive I axis using only shifts and adds, accumulating the applied
// angle. The vector carries four guard fraction bits against the
// truncation of the shifts. Angles are held as fractions of a full turn with two guard bits
// and rounded to PHASE bits at the output. The arctangent constants are
// computed at elaboration time from a power series.
// A CORDIC phase detector is what the published PLL uses; its
// implementation there is an existing one, so this pipeline, its widths
// and its stage count are choices of this implementation.
//
// Interface: i_in, q_in are IW-bit two's complement; phase is PW bits,
// unsigned fraction of a turn (2*pi = 2**PW, 0 = positive I axis,
// 2**(PW-2) = positive Q axis). One sample per clock; synchronous
// active-high reset.
// Timing: latency STAGES + 2 cycles (hilbert_pkg::cordic_latency).
module cordic_pd #(
  parameter int IW     = 15,
  parameter int PW     = 16,
  parameter int STAGES = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [IW-1:0] i_in,
  input  logic signed [IW-1:0] q_in,
  output logic        [PW-1:0] phase
);

  localparam int GB = 4;        // guard fraction bits of the vector
  localparam int XW = IW + 2 + GB; // vector width: CORDIC gain 1.65, sign, guard
  localparam int ZW = PW + 2;   // angle width with two guard bits

  // atan(t) for 0 <= t <= 1 as a fraction of a turn, scaled by 2**ZW
  function automatic longint atan_turns(input int i);
    real t, term, sum, t2;
    if (i == 0) return longint'(2.0 ** ZW / 8.0);
    t    = 2.0 ** (-i);
    t2   = t * t;
    term = t;
    sum  = 0.0;
    for (int k = 0; k < 60; k++) begin
      sum  = sum + ((k % 2 == 0) ? term : -term) / real'(2 * k + 1);
      term = term * t2;
    end
    return longint'(sum / (2.0 * 3.14159265358979323846) * (2.0 ** ZW));
  endfunction

  logic signed [XW-1:0] xs [STAGES+1];
  logic signed [XW-1:0] ys [STAGES+1];
  logic        [ZW-1:0] zs [STAGES+1];

  // Pre-rotation into the right half plane
  always_ff @(posedge clk) begin
    if (rst) begin
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
    end else if (i_in < 0) begin
      xs[0] <= -(XW'(i_in) <<< GB);
      ys[0] <= -(XW'(q_in) <<< GB);
      zs[0] <= ZW'(1) << (ZW - 1);
    end else begin
      xs[0] <= XW'(i_in) <<< GB;
      ys[0] <= XW'(q_in) <<< GB;
      zs[0] <= '0;
    end
  end

  // Vectoring iterations: drive y towards zero
  for (genvar s = 0; s < STAGES; s++) begin : gen_iter
    localparam logic [ZW-1:0] ATAN = ZW'(atan_turns(s));
    always_ff @(posedge clk) begin
      if (rst) begin
        xs[s+1] <= '0;
        ys[s+1] <= '0;
        zs[s+1] <= '0;
      end else if (ys[s] >= 0) begin
        xs[s+1] <= xs[s] + (ys[s] >>> s);
        ys[s+1] <= ys[s] - (xs[s] >>> s);
        zs[s+1] <= zs[s] + ATAN;
      end else begin
        xs[s+1] <= xs[s] - (ys[s] >>> s);
        ys[s+1] <= ys[s] + (xs[s] >>> s);
        zs[s+1] <= zs[s] - ATAN;
      end
    end
  end

  // Round the angle to PW bits
  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= PW'((zs[STAGES] + ZW'(2)) >> 2);
  end

endmodule
