// tb_pi_loop_filter: checks the PI controller.
//  * Random errors against an integer model of
//    ftw = centre + e*2**KP + floor(sum(e) / 2**KI) (32-bit wrap).
//  * Reset loads the centre word.
//  * A constant error makes the word ramp by e/2**KI per cycle (the
//    integral action that tracks a frequency offset).
module tb_pi_loop_filter;
  localparam int EW = 16, FW = 32, KP = 8, KI = 2;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [EW-1:0] e;
  logic [FW-1:0] centre, ftw;
  int checks = 0, failures = 0;

  pi_loop_filter dut (
    .clk, .rst, .e, .ftw_centre(centre), .ftw);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint acc;
  logic [FW-1:0] expv, prev;

  initial begin
    e = '0;
    centre = 32'h0ABC_1234;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (ftw != centre) begin failures++; $display("reset value %h", ftw); end
    rst <= 1'b0;
    acc = 0;
    for (int n = 0; n < 2000; n++) begin
      int v;
      v = int'($urandom_range(65535)) - 32768;
      if (n > 1500) v = 400;   // constant error
      e <= EW'(v);
      @(posedge clk);
      #1;
      acc  = acc + v;
      expv = centre + FW'(longint'(v) * (longint'(1) << KP)) + FW'(acc >>> KI);
      checks++;
      if (ftw != expv) begin
        failures++;
        if (failures < 10) $display("n=%0d ftw=%h exp %h", n, ftw, expv);
      end
      if (n > 1502) begin
        checks++;
        if (ftw - prev != FW'(400 / (1 << KI))) begin
          failures++;
          $display("ramp step %0d", ftw - prev);
        end
      end
      prev = ftw;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
