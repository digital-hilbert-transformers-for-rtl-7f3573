// phase_delay: the constant delay z^-D in the PLL's feedback path.
//
// When the analytic filter has a constant group delay, the PLL does not
// need a second analytic filter and phase detector on its own output: the
// DDS phase word is simply delayed by as many clocks as the input path
// (analytic filter plus phase detector) takes, and compared with the
// detected input phase. This module is that delay: a D-stage shift
// register of W-bit words. The delay compensation follows the published
// PLL structure; D is computed by the enclosing design from the latencies
// of its filter and detector.
//
// Interface: synchronous active-high reset clears the stages.
// Timing: q(n) = d(n-D); D = 0 passes d straight through.
module phase_delay #(
  parameter int W = 16,
  parameter int D = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (D == 0) begin : gen_wire
    assign q = d;
  end else begin : gen_shift
    logic [W-1:0] sr [D];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int k = 0; k < D; k++) sr[k] <= '0;
      end else begin
        sr[0] <= d;
        for (int k = 1; k < D; k++) sr[k] <= sr[k-1];
      end
    end
    assign q = sr[D-1];
  end

endmodule
