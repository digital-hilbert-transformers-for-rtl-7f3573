// tb_phase_delay: checks q(n) = d(n-D) for random words, D = 26 (the delay
// the PLL uses) and that q is zero until the line has filled after reset.
module tb_phase_delay;
  localparam int W = 16, D = 26, NCYC = 500;
  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [NCYC];

  phase_delay #(.W(W), .D(D)) dut (.clk, .rst, .d, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int m = 0; m < NCYC; m++) begin
      hist[m] = W'($urandom);
      d <= hist[m];
      @(posedge clk);
      #1;
      checks++;
      if (m >= D - 1) begin
        if (q != hist[m-D+1]) begin
          failures++;
          if (failures < 5) $display("m=%0d q=%h exp %h", m, q, hist[m-D+1]);
        end
      end else if (q != '0) begin
        failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
