// tb_fsf_cplus90: checks the complex resonator C_+90(z) = z^-1/(1 - j z^-1).
//  * Impulse response: 1, j, -1, -j, 1, ... starting one clock after the
//    impulse (a pole at +90 degrees that never decays).
//  * Random complex input against the recursion y(n) = x(n-1) + j y(n-1)
//    evaluated on complex integers with 16-bit wrap-around.
module tb_fsf_cplus90;
  localparam int W = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [W-1:0] xi, xq, yi, yq;
  int checks = 0, failures = 0;

  fsf_cplus90 dut (.clk, .rst, .xi, .xq, .yi, .yq);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ri, rq, ti;
  int pwr_i [4] = '{100, 0, -100, 0};
  int pwr_q [4] = '{0, 100, 0, -100};

  initial begin
    xi = '0;
    xq = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // impulse of 100
    xi <= 16'sd100;
    @(posedge clk);
    xi <= '0;
    for (int n = 0; n < 12; n++) begin
      #1;
      checks++;
      if (yi != pwr_i[n % 4] || yq != pwr_q[n % 4]) begin
        failures++;
        $display("impulse n=%0d y=(%0d,%0d)", n, yi, yq);
      end
      @(posedge clk);
    end
    // random input against the model; model state = current output
    #1;
    ri = yi;
    rq = yq;
    for (int n = 0; n < 2000; n++) begin
      int vi, vq;
      vi = int'($urandom_range(65535)) - 32768;
      vq = int'($urandom_range(65535)) - 32768;
      xi <= W'(vi);
      xq <= W'(vq);
      @(posedge clk);
      #1;
      ti = ri;
      ri = int'(W'(vi - rq));   // real part of x + j*y
      rq = int'(W'(vq + ti));
      ri = int'($signed(W'(ri)));
      rq = int'($signed(W'(rq)));
      checks++;
      if (int'(yi) != ri || int'(yq) != rq) begin
        failures++;
        if (failures < 10) $display("n=%0d y=(%0d,%0d) exp (%0d,%0d)", n, yi, yq, ri, rq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
