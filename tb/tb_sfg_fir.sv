// Testbench of sfg_fir: random x, a0, a1; y must equal a0 x(n-1) + a1 x(n-2)
// one and two clocks after x was applied.
`timescale 1ps / 1ps
module tb_sfg_fir;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  always #5 clk = ~clk;
  logic signed [7:0] x, a0, a1;
  logic signed [15:0] y;
  int xs [$];

  sfg_fir dut (.clk(clk), .rst_n(rst_n), .x(x), .a0(a0), .a1(a1), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0; a0 = 8'sd37; a1 = -8'sd90;
    xs.push_back(0); xs.push_back(0);
    #12 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int e;
      @(negedge clk);
      if (n % 50 == 0) begin
        a0 = 8'($urandom);
        a1 = 8'($urandom);
        if (a0 == -128) a0 = -127;
        if (a1 == -128) a1 = -127;
        #1;
      end
      e = int'(a0) * xs[xs.size()-1] + int'(a1) * xs[xs.size()-2];
      checks++;
      if (int'(y) != e) begin
        failures++;
        if (failures < 5) $display("n=%0d y=%0d want %0d", n, y, e);
      end
      x = 8'($urandom);
      xs.push_back(int'(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
