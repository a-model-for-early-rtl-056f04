// Testbench of vcpf_analysis at the default size (23 taps, J = 8): random
// complex samples, one every 2 clocks, are fed and each polyphase output
//   v_p[b] = sum_k h[p + kJ] * x[bD + D - 1 - p - kJ]
// is compared bit-exactly with a model that applies the same SRB roundings.
// Outputs come in the order p = 0, J-1, .., 1. Also checks out_first on p = 0, back-to-back outputs within a block, and
// that overrun stays low.
`timescale 1ps / 1ps
module tb_vcpf_analysis;
  `include "dtp_tb_util.svh"
  localparam int NSI = 13, NSO = 13, NH = 15, NM = 3, TAPS = 23, J = 8, D = J / 2;
  localparam int NACC = 5, NSMP = 1600;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 1, in_valid = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  logic signed [NSI-1:0] in_re = '0, in_im = '0;
  logic signed [NSO-1:0] out_re, out_im;
  logic out_valid, out_first, overrun, sat;

  vcpf_analysis dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
                     .out_re(out_re), .out_im(out_im), .out_valid(out_valid), .out_first(out_first),
                     .overrun(overrun), .sat(sat));

  always #5 clk = ~clk;

  longint xr [$], xi [$];
  longint h [TAPS * J];
  int nout = 0, last = -1, cyc = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(int b, int p, bit im);
    longint acc = 0;
    int n;
    for (int k = 0; k < TAPS; k++) begin
      n = b * D + D - 1 - p - k * J;
      if (n >= 0) acc += m_srb((im ? xi[n] : xr[n]) * h[p + k * J], NH - NM - 1, NSI + NM);
    end
    return m_srb(acc, NSI + NM - NSO, NSO);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (out_valid) begin
      automatic int b = nout / J, p = (J - nout % J) % J;
      checks++;
      if (longint'(out_re) != model(b, p, 0) || longint'(out_im) != model(b, p, 1) || out_first !== (p == 0)) begin
        failures++;
        if (failures < 6) $display("b %0d p %0d got %0d,%0d want %0d,%0d", b, p, out_re, out_im, model(b, p, 0), model(b, p, 1));
      end
      if (p != 0) begin
        checks++;
        if (cyc - last != 1) failures++;
      end
      last = cyc;
      nout++;
    end
    if (rst_n && overrun) begin checks++; failures++; end
  end

  initial begin
    for (int i = 0; i < TAPS * J; i++) h[i] = m_proto(i, TAPS, J, NH);
    #22 rst_n = 1;
    for (int n = 0; n < NSMP; n++) begin
      @(negedge clk);
      in_valid = 1;
      if (n < 300) begin   // a tone, then full-scale random samples
        in_re = NSI'($rtoi(3000.0 * $cos(0.3 * n)));
        in_im = NSI'($rtoi(3000.0 * $sin(0.3 * n)));
      end else begin
        in_re = NSI'($urandom);
        in_im = NSI'($urandom);
      end
      xr.push_back(longint'(in_re));
      xi.push_back(longint'(in_im));
      @(negedge clk);
      in_valid = 0;
    end
    repeat (40) @(negedge clk);
    checks++;
    if (nout != NSMP / D * J) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
