// tb_dds: checks the DDS.
//  * The accumulator advances by the tuning word every clock (also across
//    a tuning-word change).
//  * Each sine sample equals round(8191 * sin(2*pi*k/1024)) (within 1 LSB
//    for floating-point rounding) of the table index the accumulator held
//    one clock earlier; every table entry is visited by a slow sweep.
//  * The output frequency: counted upward zero crossings over 2**16 clocks
//    match ftw * 2**16 / 2**32.
module tb_dds;
  localparam int AW = 32, TAW = 10, DW = 14;
  localparam real TWO_PI = 6.28318530717958647692;
  logic clk = 1'b0, rst = 1'b1;
  logic [AW-1:0] ftw, phase;
  logic signed [DW-1:0] sine;
  int checks = 0, failures = 0;

  dds dut (.clk, .rst, .ftw, .phase, .sine);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [AW-1:0] prev_phase, prev_ftw;
  int crossings;
  logic signed [DW-1:0] prev_sine;
  bit visited [1024];

  initial begin
    int expv;
    ftw = 32'd0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // slow sweep: 1/8 table step per clock, then fast random words
    ftw <= 32'h0000_8000 * 16;   // 2**19: one table entry per 2**3 clocks
    @(posedge clk);
    #1;
    prev_phase = phase;
    prev_ftw   = ftw;
    for (int n = 0; n < 20000; n++) begin
      if (n == 12000) begin
        ftw = 32'h1357_9BDF;
        prev_ftw = ftw;
      end
      @(posedge clk);
      #1;
      checks++;
      if (phase != prev_phase + prev_ftw) begin
        failures++;
        if (failures < 5) $display("accumulator n=%0d", n);
      end
      expv = int'(8191.0 * $sin(TWO_PI * real'(prev_phase[AW-1 -: TAW]) / 1024.0));
      checks++;
      if (int'(sine) - expv > 1 || expv - int'(sine) > 1) begin
        failures++;
        if (failures < 5) $display("sine idx=%0d got %0d exp %0d", prev_phase[AW-1 -: TAW], sine, expv);
      end
      visited[prev_phase[AW-1 -: TAW]] = 1'b1;
      prev_phase = phase;
      prev_ftw   = ftw;
    end
    for (int k = 0; k < 1024; k++) if (!visited[k]) begin
      failures++;
      $display("entry %0d never read", k);
      break;
    end
    // frequency: 2**16 clocks
    ftw <= 32'd12345678;
    @(posedge clk);
    crossings = 0;
    prev_sine = sine;
    for (int n = 0; n < 65536; n++) begin
      @(posedge clk);
      #1;
      if (prev_sine < 0 && sine >= 0) crossings++;
      prev_sine = sine;
    end
    checks++;
    // expected 12345678 * 65536 / 2**32 = 188.38 cycles
    if (crossings < 187 || crossings > 189) begin
      failures++;
      $display("crossings %0d", crossings);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
