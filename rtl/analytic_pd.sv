// analytic_pd: analytic filter followed by the arc-tangent phase detector,
// i.e. the H_A(z) -> PD chain of the PLL, with the filter chosen by a
// parameter.
//
//   AF_FIR_HA1: fir_hilbert_ha1, output I/Q of W+1 bits, delay 8 clocks;
//   AF_FSF_HA4: fsf_ha4, output 16*H_A4 of W+8 bits (its inner H_A3 output
//               is not used here).
// The I/Q pair goes to cordic_pd, whose phase (2*pi = 2**PW) appears
// STAGES + 2 clocks later. The same chain is used on the PLL input and,
// in the filtered-feedback configuration, on the DDS output, so that both
// phases see identical filter delay and identical gain-mismatch error.
// Pairing filter and detector this way is the published PLL structure;
// the module boundary is a choice of this implementation.
//
// Interface: x is a W-bit real sample per clock; ana_i/ana_q the analytic
// signal (analytic_width(AF, W) bits); phase the detected phase.
// Synchronous active-high reset.
module analytic_pd
  import hilbert_pkg::*;
#(
  parameter afilter_e AF     = AF_FIR_HA1,
  parameter int       W      = ADC_W,
  parameter int       PW     = PHASE_W,
  parameter int       STAGES = CORDIC_STAGES
) (
  input  logic                                    clk,
  input  logic                                    rst,
  input  logic signed [W-1:0]                     x,
  output logic signed [analytic_width(AF, W)-1:0] ana_i,
  output logic signed [analytic_width(AF, W)-1:0] ana_q,
  output logic        [PW-1:0]                    phase
);

  localparam int AOW = analytic_width(AF, W);

  if (AF == AF_FIR_HA1) begin : gen_ha1
    fir_hilbert_ha1 #(.W(W)) u_ha1 (
      .clk, .rst, .x,
      .y_i(ana_i), .y_q(ana_q)
    );
  end else begin : gen_ha4
    logic signed [W+5:0] h3i, h3q;   // inner H_A3 output, not needed here
    fsf_ha4 #(.W(W)) u_ha4 (
      .clk, .rst, .x,
      .y3i(h3i), .y3q(h3q),
      .yi(ana_i), .yq(ana_q)
    );
  end

  cordic_pd #(.IW(AOW), .PW(PW), .STAGES(STAGES)) u_pd (
    .clk, .rst,
    .i_in(ana_i), .q_in(ana_q),
    .phase
  );

endmodule
