// tb_iir_lowpass_flp: checks the multiplier-less low-pass cascade.
//  1. Default cascade (M = 4, three stages) against a floating-point model
//     of y(n+1) = (1 - 2**-M) y(n) + 2**-M x(n) per stage, on steps and
//     random input: error at most a few LSB.
//  2. Exact DC gain: a held input settles to exactly that value.
//  3. A single stage (M = 4) at the angular cut-off 1/(2**M - 1) rad per
//     sample passes about 1/sqrt(2) of the amplitude.
//  4. A tone at 0.2 fs (twice a typical signal frequency) is attenuated by
//     more than 60 dB by the cascade.
module tb_iir_lowpass_flp;
  localparam int W = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [W-1:0] x, y3, y1;
  int checks = 0, failures = 0;

  iir_lowpass_flp                            dut3 (.clk, .rst, .x, .y(y3));
  iir_lowpass_flp #(.W(W), .M(4), .ORDER(1))  dut1 (.clk, .rst, .x, .y(y1));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real m1, m2, m3, b0;
  real pk1, pk3;

  initial begin
    x  = '0;
    b0 = 1.0 / 16.0;
    m1 = 0.0; m2 = 0.0; m3 = 0.0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // 1. model comparison: steps, then random
    for (int n = 0; n < 6000; n++) begin
      int v;
      if (n < 1000)      v = 10000;
      else if (n < 2000) v = -7000;
      else               v = int'($urandom_range(20000)) - 10000;
      x <= W'(v);
      @(posedge clk);
      #1;
      // model state after this edge: stage k output = previous state
      m3 = m3 + b0 * (m2 - m3);
      m2 = m2 + b0 * (m1 - m2);
      m1 = m1 + b0 * (real'(v) - m1);
      checks++;
      if (real'(y3) - m3 > 6.0 || m3 - real'(y3) > 6.0) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%0d model=%f", n, y3, m3);
      end
    end
    // 2. exact DC gain
    x <= W'(-12345);
    repeat (1500) @(posedge clk);
    #1;
    checks++;
    if (y3 != -12345 || y1 != -12345) begin
      failures++;
      $display("DC: y3=%0d y1=%0d", y3, y1);
    end
    // 3. and 4. tones
    pk1 = 0.0;
    for (int n = 0; n < 8000; n++) begin
      x <= W'(int'(16000.0 * $cos(real'(n) / 15.0)));
      @(posedge clk);
      #1;
      if (n > 2000 && real'(y1) > pk1) pk1 = real'(y1);
    end
    checks++;
    if (pk1 < 16000.0 * 0.66 || pk1 > 16000.0 * 0.74) begin
      failures++;
      $display("cut-off gain %f", pk1 / 16000.0);
    end
    pk3 = 0.0;
    for (int n = 0; n < 4000; n++) begin
      x <= W'(int'(16000.0 * $cos(2.0 * 3.14159265358979 * 0.2 * real'(n))));
      @(posedge clk);
      #1;
      if (n > 2000 && (y3 > 0 ? real'(y3) : -real'(y3)) > pk3)
        pk3 = (y3 > 0 ? real'(y3) : -real'(y3));
    end
    checks++;
    if (pk3 > 16000.0 / 1000.0 + 2.0) begin
      failures++;
      $display("0.2 fs leak %f", pk3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
