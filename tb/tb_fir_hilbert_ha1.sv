// tb_fir_hilbert_ha1: self-checking test of the FIR analytic filter H_A1.
// Drives random samples, full-scale extremes and a tone at fs/4. The
// reference is the direct convolution with the odd-symmetric coefficients
// (163, 54, 32)/256 floored, aligned on the centre tap 8 cycles back; I
// must equal the input 8 cycles back, which also checks the latency. At
// fs/4 the Hilbert gain must be 2*(163-54+32)/256.
module tb_fir_hilbert_ha1;
  localparam int W = 14;
  localparam int NCYC = 4000;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [W-1:0] x;
  logic signed [W:0] y_i, y_q;
  int checks = 0, failures = 0;

  fir_hilbert_ha1 dut (.clk, .rst, .x, .y_i, .y_q);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [0:NCYC+20];   // hist[m] = x presented during cycle m
  int m;
  real peak_q;

  function automatic int xin(input int k);
    return (k < 0) ? 0 : hist[k];
  endfunction

  initial begin
    x = '0;
    for (int k = 0; k <= NCYC + 20; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    peak_q = 0.0;
    for (m = 0; m < NCYC; m++) begin
      int v;
      if (m < 1500)       v = int'($urandom_range(16383)) - 8192;
      else if (m < 1600)  v = (m % 2 == 0) ? 8191 : -8192;
      else                v = (m % 4 == 0) ? 8000 : (m % 4 == 2) ? -8000 : 0; // cos(pi n/2)
      hist[m] = v;
      x <= W'(v);
      @(posedge clk);
      #1;
      // After edge m+1 the outputs belong to the sample of cycle m+1-8
      if (m >= 20) begin
        int c, exp_i, exp_q, sum;
        c = m - 7;   // centre index of the value now on y
        exp_i = xin(c);
        sum = 163 * (xin(c-1) - xin(c+1)) + 54 * (xin(c-3) - xin(c+3))
            + 32 * (xin(c-5) - xin(c+5));
        exp_q = sum >>> 8;
        checks++;
        if (int'(y_i) != exp_i || int'(y_q) != exp_q) begin
          failures++;
          if (failures < 10)
            $display("m=%0d y_i=%0d exp %0d y_q=%0d exp %0d", m, y_i, exp_i, y_q, exp_q);
        end
        if (m > 1700 && real'(y_q) > peak_q) peak_q = real'(y_q);
      end
    end
    // Hilbert gain at fs/4: cos -> sin with gain 2*141/256
    checks++;
    if (peak_q < 8000.0 * 282.0 / 256.0 - 2.0 || peak_q > 8000.0 * 282.0 / 256.0 + 2.0) begin
      failures++;
      $display("fs/4 gain wrong: peak %f", peak_q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
