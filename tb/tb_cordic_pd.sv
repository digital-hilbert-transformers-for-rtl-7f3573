// tb_cordic_pd: checks the CORDIC phase detector against the floating-point
// atan2 for random vectors in all four quadrants (magnitude at least 1/8
// of full scale) and for the axis directions. The phase is expected
// exactly STAGES + 2 cycles after its input; the error must be at most
// 3 LSB of the 16-bit phase (0.017 degree).
module tb_cordic_pd;
  localparam int IW = 15, PW = 16, STAGES = 16, LAT = STAGES + 2;
  localparam int NVEC = 3000;
  localparam real TWO_PI = 6.28318530717958647692;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [IW-1:0] i_in, q_in;
  logic [PW-1:0] phase;
  int checks = 0, failures = 0;
  real expected [NVEC + LAT + 2];

  cordic_pd dut (.clk, .rst, .i_in, .q_in, .phase);
  always #5 clk = ~clk;

  initial begin
    repeat (NVEC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_in = '0;
    q_in = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int m = 0; m < NVEC + LAT; m++) begin
      int vi, vq;
      real a;
      if (m < 8) begin
        vi = (m == 0) ? 16000 : (m == 2) ? -16000 : (m == 4) ? 9000 : (m == 6) ? -9000 : 0;
        vq = (m == 1) ? 16000 : (m == 3) ? -16000 : (m == 5) ? 9000 : (m == 7) ? -9000 : 0;
      end else begin
        do begin
          vi = int'($urandom_range(32766)) - 16383;
          vq = int'($urandom_range(32766)) - 16383;
        end while (vi * vi + vq * vq < 2048 * 2048);
      end
      a = $atan2(real'(vq), real'(vi)) / TWO_PI * 65536.0;
      if (a < 0.0) a = a + 65536.0;
      expected[m] = a;
      i_in <= IW'(vi);
      q_in <= IW'(vq);
      @(posedge clk);
      #1;
      if (m >= LAT) begin
        real d;
        d = real'(phase) - expected[m - LAT + 1];
        if (d > 32768.0) d = d - 65536.0;
        if (d < -32768.0) d = d + 65536.0;
        checks++;
        if (d > 3.0 || d < -3.0) begin
          failures++;
          if (failures < 10) $display("m=%0d phase=%0d exp=%f", m, phase, expected[m - LAT + 1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
