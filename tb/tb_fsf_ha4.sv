// tb_fsf_ha4: checks H_A4 = 9/4 H_A3 C_P^2.
//  * The inner H_A3 output y3 against the FIR z^-10 P(z)^2 (exact).
//  * The output against a floating-point model of the two pole sections
//    y(n) = u(n-2) + y(n-2)/2 applied to the exact y3: within 2 LSB.
//  * Real tones at 0.1, 0.25 and 0.4 fs (amplitude A): the output magnitude
//    stays within 1 % of 16 * A/2 (flat pass-band, 0 dB after the binary
//    point) and varies by less than 2 % (negative image suppressed).
module tb_fsf_ha4;
  localparam int W = 14;
  localparam int NC = 7;
  localparam int DLY = 10;
  localparam int NS = 12000;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [W-1:0] x;
  logic signed [W+5:0] y3i, y3q;
  logic signed [W+7:0] yi, yq;
  int checks = 0, failures = 0;
  int hist [0:NS+10];
  real p1i [0:NS+10], p1q [0:NS+10], p2i [0:NS+10], p2q [0:NS+10];
  int e3i [0:NS+10], e3q [0:NS+10];
  int ci [NC], cq [NC];

  fsf_ha4 dut (.clk, .rst, .x, .y3i, .y3q, .yi, .yq);
  always #5 clk = ~clk;

  initial begin
    repeat (NS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int h(input int k);
    return (k < 0) ? 0 : hist[k];
  endfunction

  initial begin
    int pi_ [4], pq [4];
    real mag, mx, mn, freq;
    pi_ = '{1, 0, -2, 0}; pq = '{0, 2, 0, -1};   // P(z) multiplied out
    for (int k = 0; k < NC; k++) begin ci[k] = 0; cq[k] = 0; end
    for (int p = 0; p < 4; p++) for (int r = 0; r < 4; r++) begin
      ci[p+r] += pi_[p] * pi_[r] - pq[p] * pq[r];
      cq[p+r] += pi_[p] * pq[r] + pq[p] * pi_[r];
    end
    x = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    mx = 0.0; mn = 1.0e30; freq = 0.0;
    for (int m = 0; m < NS; m++) begin
      int v;
      if (m < 3000) v = int'($urandom_range(16383)) - 8192;
      else begin
        freq = (m < 6000) ? 0.1 : (m < 9000) ? 0.25 : 0.4;
        v = int'(8000.0 * $cos(6.28318530717958647692 * freq * real'(m)));
      end
      if (m == 6000 || m == 9000) begin mx = 0.0; mn = 1.0e30; end
      hist[m] = v;
      x <= W'(v);
      @(posedge clk);
      #1;
      e3i[m] = 0; e3q[m] = 0;
      for (int k = 0; k < NC; k++) begin
        e3i[m] += ci[k] * h(m + 1 - DLY - k);
        e3q[m] += cq[k] * h(m + 1 - DLY - k);
      end
      p1i[m] = ((m >= 2) ? real'(e3i[m-2]) + 0.5 * p1i[m-2] : 0.0);
      p1q[m] = ((m >= 2) ? real'(e3q[m-2]) + 0.5 * p1q[m-2] : 0.0);
      p2i[m] = ((m >= 2) ? p1i[m-2] + 0.5 * p2i[m-2] : 0.0);
      p2q[m] = ((m >= 2) ? p1q[m-2] + 0.5 * p2q[m-2] : 0.0);
      checks++;
      if (int'(y3i) != e3i[m] || int'(y3q) != e3q[m]) begin
        failures++;
        if (failures < 10) $display("m=%0d y3 mismatch", m);
      end
      checks++;
      if (rabs(real'(yi) - p2i[m]) > 2.0 || rabs(real'(yq) - p2q[m]) > 2.0) begin
        failures++;
        if (failures < 10) $display("m=%0d y=(%0d,%0d) model (%f,%f)", m, yi, yq, p2i[m], p2q[m]);
      end
      if ((m % 3000) > 300 && m > 3000) begin
        mag = $sqrt(real'(yi) * real'(yi) + real'(yq) * real'(yq));
        if (mag > mx) mx = mag;
        if (mag < mn) mn = mag;
      end
      if (m % 3000 == 2999 && m > 3000) begin
        checks++;
        if (mx > 8.0 * 8000.0 * 1.01 || mn < 8.0 * 8000.0 * 0.99 || (mx - mn) / (mx + mn) > 0.01) begin
          failures++;
          $display("tone %f fs: magnitude %f .. %f, expected %f", freq, mn, mx, 64000.0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
