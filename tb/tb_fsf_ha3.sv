// tb_fsf_ha3: checks H_A3 (two sections of comb, C_+90, C_0/180 and
// 1 + j z^-1 - z^-2).
//  * Random and full-scale input against the equivalent FIR z^-10 P(z)^2,
//    P(z) = (1 + j z^-1)(1 + j z^-1 - z^-2), whose coefficients the bench
//    multiplies out itself: the recursive sections must cancel exactly.
//  * A real tone at fs/4 (amplitude A) gives a constant output magnitude
//    36 * A/2.
//  * A real tone at 0.2 fs gives a nearly constant magnitude: its
//    negative-frequency image is suppressed by more than 40 dB.
module tb_fsf_ha3;
  localparam int W = 14;
  localparam int NC = 7;     // taps of P^2
  localparam int DLY = 10;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [W-1:0] x;
  logic signed [W+5:0] yi, yq;
  int checks = 0, failures = 0;
  int hist [0:9999];
  int ci [NC], cq [NC];

  fsf_ha3 dut (.clk, .rst, .x, .yi, .yq);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int h(input int k);
    return (k < 0) ? 0 : hist[k];
  endfunction

  initial begin
    int ai [3], aq [3], bi [2], bq [2], pi_ [4], pq [4];
    real mag, mx, mn;
    // P = (1 + j z^-1) * (1 + j z^-1 - z^-2)
    bi = '{1, 0}; bq = '{0, 1};
    ai = '{1, 0, -1}; aq = '{0, 1, 0};
    for (int k = 0; k < 4; k++) begin pi_[k] = 0; pq[k] = 0; end
    for (int p = 0; p < 2; p++) for (int r = 0; r < 3; r++) begin
      pi_[p+r] += bi[p] * ai[r] - bq[p] * aq[r];
      pq[p+r]  += bi[p] * aq[r] + bq[p] * ai[r];
    end
    for (int k = 0; k < NC; k++) begin ci[k] = 0; cq[k] = 0; end
    for (int p = 0; p < 4; p++) for (int r = 0; r < 4; r++) begin
      ci[p+r] += pi_[p] * pi_[r] - pq[p] * pq[r];
      cq[p+r] += pi_[p] * pq[r] + pq[p] * pi_[r];
    end

    x = '0;
    for (int k = 0; k < 10000; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    mx = 0.0; mn = 1.0e30;
    for (int m = 0; m < 8000; m++) begin
      int v, ei, eq;
      if (m < 3000)      v = int'($urandom_range(16383)) - 8192;
      else if (m < 3200) v = ((m / 3) % 2 == 0) ? 8191 : -8192;
      else if (m < 5000) v = (m % 4 == 0) ? 6000 : (m % 4 == 2) ? -6000 : 0;
      else               v = int'(8000.0 * $cos(6.28318530717958647692 * 0.2 * real'(m)));
      hist[m] = v;
      x <= W'(v);
      @(posedge clk);
      #1;
      ei = 0; eq = 0;
      for (int k = 0; k < NC; k++) begin
        ei += ci[k] * h(m + 1 - DLY - k);
        eq += cq[k] * h(m + 1 - DLY - k);
      end
      checks++;
      if (int'(yi) != ei || int'(yq) != eq) begin
        failures++;
        if (failures < 10) $display("m=%0d y=(%0d,%0d) exp (%0d,%0d)", m, yi, yq, ei, eq);
      end
      mag = $sqrt(real'(yi) * real'(yi) + real'(yq) * real'(yq));
      if (m > 3300 && m < 5000) begin
        checks++;
        if (mag < 36.0 * 3000.0 - 0.5 || mag > 36.0 * 3000.0 + 0.5) begin
          failures++;
          if (failures < 10) $display("fs/4 magnitude %f", mag);
        end
      end
      if (m > 5100) begin
        if (mag > mx) mx = mag;
        if (mag < mn) mn = mag;
      end
    end
    checks++;
    if ((mx - mn) / (mx + mn) > 0.01) begin
      failures++;
      $display("image at 0.2 fs too large: %f .. %f", mn, mx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
