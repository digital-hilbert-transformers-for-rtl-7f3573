// tb_fsf_ha2: checks H_A2 = 1/4 F_z4 C_+90.
//  * Random input: the output must equal the FIR that the pole/zero
//    cancellation leaves, z^-1 (1 + j z^-1 - z^-2 - j z^-3), one more clock
//    of delay for the comb register: yi(n) = x(n-2) - x(n-4),
//    yq(n) = x(n-3) - x(n-5). Full-scale input checks the wrap-around.
//  * A real tone at fs/4 (cos(pi n/2), amplitude A) gives an analytic
//    output of constant magnitude 2A (= 4 * A/2).
//  * A tone at DC gives zero output.
module tb_fsf_ha2;
  localparam int W = 14;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [W-1:0] x;
  logic signed [W:0] yi, yq;
  int checks = 0, failures = 0;
  int hist [0:4999];

  fsf_ha2 dut (.clk, .rst, .x, .yi, .yq);
  always #5 clk = ~clk;

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int h(input int k);
    return (k < 0) ? 0 : hist[k];
  endfunction

  initial begin
    x = '0;
    for (int k = 0; k < 5000; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int m = 0; m < 4000; m++) begin
      int v;
      if (m < 2000)      v = int'($urandom_range(16383)) - 8192;
      else if (m < 2100) v = ((m / 2) % 2 == 0) ? 8191 : -8192;
      else if (m < 3000) v = (m % 4 == 0) ? 6000 : (m % 4 == 2) ? -6000 : 0;
      else               v = 5000;
      hist[m] = v;
      x <= W'(v);
      @(posedge clk);
      #1;
      // outputs now hold the response to inputs up to index m
      checks++;
      if (int'(yi) != h(m-1) - h(m-3) || int'(yq) != h(m-2) - h(m-4)) begin
        failures++;
        if (failures < 10) $display("m=%0d y=(%0d,%0d)", m, yi, yq);
      end
      if (m > 2200 && m < 3000) begin
        checks++;
        if (int'(yi) * int'(yi) + int'(yq) * int'(yq) != 12000 * 12000) begin
          failures++;
          if (failures < 10) $display("fs/4 magnitude m=%0d %0d %0d", m, yi, yq);
        end
      end
      if (m > 3010) begin
        checks++;
        if (yi != 0 || yq != 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
