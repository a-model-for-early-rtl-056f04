// Testbench of adder_tree: random words into trees of 100 and 7 inputs with
// different register spacing; sums are compared with a plain sum after the
// expected latency floor(ceil(log2 N)/UBL).
`timescale 1ps / 1ps
module tb_adder_tree;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N1 = 100, W1 = 16, L1 = 7, LAT1 = 3;   // UBL = 2
  localparam int N2 = 7,   W2 = 9,  L2 = 3, LAT2 = 3;   // UBL = 1

  logic signed [W1-1:0]    x1 [N1];
  logic signed [W2-1:0]    x2 [N2];
  logic signed [W1+L1-1:0] y1;
  logic signed [W2+L2-1:0] y2;
  longint exp1 [$], exp2 [$];

  adder_tree #(.N(N1), .W(W1), .UBL(2)) dut1 (.clk(clk), .din(x1), .dout(y1));
  adder_tree #(.N(N2), .W(W2), .UBL(1)) dut2 (.clk(clk), .din(x2), .dout(y2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 200; c++) begin
      automatic longint s1 = 0, s2 = 0;
      for (int i = 0; i < N1; i++) begin
        x1[i] = (c == 0) ? -16'sd32768 : (c == 1) ? 16'sd32767 : W1'($urandom);
        s1 += longint'(x1[i]);
      end
      for (int i = 0; i < N2; i++) begin
        x2[i] = W2'($urandom);
        s2 += longint'(x2[i]);
      end
      exp1.push_back(s1);
      exp2.push_back(s2);
      @(posedge clk);
      #1;
      if (c >= LAT1) begin
        checks++;
        if (longint'(y1) != exp1[c - LAT1 + 1]) begin
          failures++;
          if (failures < 5) $display("N=100 cycle %0d: got %0d want %0d", c, y1, exp1[c - LAT1 + 1]);
        end
      end
      if (c >= LAT2) begin
        checks++;
        if (longint'(y2) != exp2[c - LAT2 + 1]) begin
          failures++;
          if (failures < 5) $display("N=7 cycle %0d: got %0d want %0d", c, y2, exp2[c - LAT2 + 1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
