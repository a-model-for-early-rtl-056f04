// Testbench of a2if at the default size: random complex samples, one every
// 2 clocks, are compared with a direct model. Each input m yields two outputs
// on consecutive clocks: x[2m] from the delayed real part and x[2m+1] from
// the filtered imaginary part, with the (-1)^m sign changes saturated.
`timescale 1ps / 1ps
module tb_a2if;
  `include "dtp_tb_util.svh"
  localparam int NSI = 13, NSO = 13, NH = 15, NM = 3, N = 100;
  localparam int K = N / 2, NACC = 7;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 1, in_valid = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  logic signed [NSI-1:0] in_re = '0, in_im = '0;
  logic signed [NSO-1:0] dout;
  logic out_valid, sat;

  a2if dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
            .dout(dout), .out_valid(out_valid), .sat(sat));

  always #5 clk = ~clk;

  longint ure [$], uim [$];
  longint coef [N];
  int nout = 0, last_out = -1, cyc = 0, nsat = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_x(int n);
    int m = n / 2;
    longint v;
    if (n % 2 == 0) begin
      v = (m - K < 0) ? 0 : m_srb(ure[m - K], NSI - NSO, NSO);
      return (m % 2) ? m_neg(v, NSO) : v;
    end
    v = 0;
    for (int i = 0; i < N; i++)
      if (m - i >= 0) v += m_srb(uim[m - i] * coef[i], NH - NM - 1, NSI + NM);
    v = m_srb(v, NSI + NM - NSO, NSO);
    return (m % 2) ? v : m_neg(v, NSO);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (sat) nsat++;
    if (out_valid) begin
      checks++;
      if (longint'(dout) != expect_x(nout)) begin
        failures++;
        if (failures < 6) $display("n=%0d got %0d want %0d", nout, dout, expect_x(nout));
      end
      if (last_out >= 0) begin
        checks++;
        if (cyc - last_out != 1) failures++;
      end
      last_out = cyc;
      nout++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) coef[i] = m_hb(i, N, NH);
    #22 rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_re = (n % 53 == 7) ? -13'sd4096 : NSI'($urandom);
      in_im = (n % 61 == 9) ? 13'sd4095 : NSI'($urandom);
      ure.push_back(longint'(in_re));
      uim.push_back(longint'(in_im));
      @(negedge clk);
      in_valid = 0;
    end
    repeat (20) @(negedge clk);
    checks++;
    if (nout != 1200) begin failures++; $display("outputs %0d", nout); end
    $display("saturation events %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
